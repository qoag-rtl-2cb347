// tb_qoag_large_buffer: the switch with very deep queues.
//
// Approximates unbounded input queues with B = 4096 buffers per queue
// (16x16 switch, two queues per input) under the Zipf traffic with its
// hotspot on output 7. At p = 0.19 nothing may be lost and the mean delay
// is printed (about 22 slots is the expected order); at p = 0.6 the queues
// grow without bound but a throughput near 0.453 is expected. Runs are
// 6000 slots after a 1000-slot warm-up, short enough that no queue fills.
module tb_qoag_large_buffer;
  int checks = 0, failures = 0;

  qoag_load_runner #(.B(4096)) u_run ();

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
    real thr, loss, delay;
    u_run.run(0.19, 1000, 6000, -1, thr, loss, delay);
    $display("p=0.19 throughput=%0.3f loss=%0.3f mean_delay=%0.1f", thr, loss, delay);
    check(loss == 0.0, "no loss at p=0.19");
    check(thr > 0.17 && thr < 0.21, "throughput follows load at p=0.19");
    u_run.run(0.6, 1000, 6000, -1, thr, loss, delay);
    $display("p=0.60 throughput=%0.3f loss=%0.3f mean_delay=%0.1f", thr, loss, delay);
    check(loss == 0.0, "no loss at p=0.6");
    check(thr > 0.41 && thr < 0.50, "throughput at p=0.6");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
