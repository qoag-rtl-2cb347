// tb_packet_fifo: self-checking test of one B-deep packet queue.
//
// Drives random pushes and pops (including pushes into a full queue with a
// simultaneous pop) and compares the HOL packet, fill level and full flag
// every cycle with a SystemVerilog queue used as the reference.
module tb_packet_fifo;
  localparam int unsigned B = 5, AW = 4, DW = 12;
  logic clk = 0, rst_n = 0;
  logic push, pop, hol_valid, full;
  logic [AW-1:0] push_addr, hol_addr;
  logic [DW-1:0] push_data, hol_data;
  logic [$clog2(B+1)-1:0] count;
  int checks = 0, failures = 0, full_pushpop = 0;
  logic [AW+DW-1:0] model[$];

  packet_fifo #(.B(B), .AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_addr = 0; push_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      // bias phases toward filling and draining
      int bias;
      bias = ((t / 200) % 2 != 0) ? 70 : 30;
      @(negedge clk);
      check(count == model.size(), "count");
      check(full == (model.size() == B), "full");
      check(hol_valid == (model.size() != 0), "hol_valid");
      if (model.size() != 0) check({hol_addr, hol_data} == model[0], "hol packet");
      push = ($urandom_range(99) < bias);
      pop  = (model.size() != 0) && ($urandom_range(99) >= bias);
      if (model.size() == B && push) pop = 1;
      push_addr = AW'($urandom);
      push_data = DW'($urandom);
      @(posedge clk);
      if (model.size() == B && push && pop) full_pushpop++;
      if (pop) void'(model.pop_front());
      if (push) model.push_back({push_addr, push_data});
    end
    check(full_pushpop > 0, "push into full queue with pop exercised");
    $display("full-queue push+pop cycles: %0d", full_pushpop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
