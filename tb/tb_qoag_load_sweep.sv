// tb_qoag_load_sweep: throughput, loss and delay against input load.
//
// Runs the 16x16 switch with two queues of 20 buffers per input at loads
// p = 0.1 ... 1.0 under the Zipf traffic with its hotspot on output 7 and
// prints one line per load. Checks: throughput never exceeds the load and
// does not fall as the load rises; light load passes without loss; at
// p = 0.7 throughput is near 0.474 and loss near 0.323 and the mean delay
// near 58 slots; from p = 0.8 on, throughput saturates near 0.5.
module tb_qoag_load_sweep;
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

  initial begin
    real thr, loss, delay, prev;
    prev = 0.0;
    for (int k = 1; k <= 10; k++) begin
      real p;
      p = k / 10.0;
      u_run.run(p, 2000, 20000, -1, thr, loss, delay);
      $display("p=%0.1f throughput=%0.3f loss=%0.3f mean_delay=%0.1f", p, thr, loss, delay);
      check(thr <= p + 0.01, "throughput bounded by load");
      check(thr >= prev - 0.04, "throughput does not fall with load");
      prev = thr;
      if (k == 1) check(loss == 0.0 && thr > 0.085, "light load passes without loss");
      if (k == 7) begin
        check(thr > 0.444 && thr < 0.504, "throughput at p=0.7");
        check(loss > 0.283 && loss < 0.363, "loss at p=0.7");
        check(delay > 43.0 && delay < 73.0, "mean delay at p=0.7");
      end
      if (k >= 8) check(thr > 0.45 && thr < 0.55, "saturated throughput");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
