// tb_qoag_traffic_change: adaptation of QOAG to a change of traffic.
//
// The 16x16 switch (two queues of 20 buffers per input) runs at load
// p = 0.8. At slot 5000 the output-address distribution changes from the
// Zipf shuffle with its hotspot on output 7 to the one with its hotspot on
// output 6. Loss probability is printed from slot 4900 to 5500 averaged
// over blocks of 25 slots (the raw figure uses blocks of 5). The checks:
// loss over slots 5300-5500 is no more than 0.12 above its level over
// slots 4700-5000 (the queue assignment has adapted), and the worst
// 25-slot block in slots 5000-5300 lies above that later level (the
// transient after the change decays).
module tb_qoag_traffic_change;
  int checks = 0, failures = 0;

  qoag_load_runner u_run ();

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real window_loss(input int from, input int to);
    int a = 0, d = 0;
    for (int t = from; t < to; t++) begin
      a += u_run.arr_cnt[t];
      d += u_run.drop_cnt[t];
    end
    return (a == 0) ? 0.0 : real'(d) / real'(a);
  endfunction

  initial begin
    real thr, loss, delay, l_before, l_after, peak;
    peak = 0.0;
    u_run.run(0.8, 0, 5500, 5000, thr, loss, delay);
    for (int t = 4900; t < 5500; t += 25) begin
      real l;
      l = window_loss(t, t + 25);
      $display("slots %0d-%0d loss=%0.3f", t, t + 24, l);
      check(l >= 0.0 && l <= 1.0, "loss is a probability");
      if (t >= 5000 && t < 5300 && l > peak) peak = l;
    end
    l_before = window_loss(4700, 5000);
    l_after  = window_loss(5300, 5500);
    $display("loss before change %0.3f, 300-500 slots after %0.3f", l_before, l_after);
    check(l_after < l_before + 0.12, "no lasting loss increase after the change");
    check(peak > l_after, "transient after the change decays");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
