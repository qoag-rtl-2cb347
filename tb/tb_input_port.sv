// tb_input_port: self-checking test of one switch input.
//
// A reference model holds the Q queues as SystemVerilog queues and applies
// the QOAG rule itself (same-address queue, else shortest, lowest index on
// a tie, drop when full, departures first). Each cycle the test grants a
// random queue, checks the departing packet against the model's head,
// offers a random arrival, and checks the drop and grouping flags and the
// HOL addresses of every queue.
module tb_input_port;
  localparam int unsigned N = 4, Q = 2, B = 3, DW = 16;
  localparam int unsigned AW = $clog2(N), QW = $clog2(Q);
  logic clk = 0, rst_n = 0;
  logic in_valid, grant_valid, dep_valid, drop, grouped;
  logic [AW-1:0] in_addr, dep_addr;
  logic [DW-1:0] in_data, dep_data;
  logic [Q-1:0] hol_valid;
  logic [Q-1:0][AW-1:0] hol_addr;
  logic [QW-1:0] grant_queue;
  int checks = 0, failures = 0, n_drop = 0, n_group = 0, n_dep = 0;
  logic [AW+DW-1:0] mq[Q][$];

  input_port #(.N(N), .Q(Q), .B(B), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel, hit;
    logic [AW+DW-1:0] pkt;
    in_valid = 0; in_addr = 0; in_data = 0; grant_valid = 0; grant_queue = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 10000; t++) begin
      @(negedge clk);
      for (int q = 0; q < Q; q++) begin
        check(hol_valid[q] == (mq[q].size() != 0), "hol_valid");
        if (mq[q].size() != 0) check(hol_addr[q] == mq[q][0][AW+DW-1:DW], "hol_addr");
      end
      grant_queue = QW'($urandom_range(Q - 1));
      grant_valid = (mq[grant_queue].size() != 0) && ($urandom_range(99) < 40);
      in_valid = ($urandom_range(99) < 60);
      in_addr  = AW'($urandom_range(N - 1));
      in_data  = DW'($urandom);
      #1;
      check(dep_valid == grant_valid, "dep_valid");
      if (grant_valid) begin
        pkt = mq[grant_queue].pop_front();
        check({dep_addr, dep_data} == pkt, "departing packet");
        n_dep++;
      end
      if (in_valid) begin
        hit = -1;
        for (int q = 0; q < Q; q++)
          foreach (mq[q][k]) if (mq[q][k][AW+DW-1:DW] == in_addr) hit = q;
        sel = hit;
        if (hit < 0) begin
          sel = 0;
          for (int q = 1; q < Q; q++) if (mq[q].size() < mq[sel].size()) sel = q;
        end
        check(grouped == (hit >= 0), "grouped");
        check(drop == (mq[sel].size() == B), "drop");
        if (mq[sel].size() == B) n_drop++;
        else mq[sel].push_back({in_addr, in_data});
        if (hit >= 0) n_group++;
      end
      @(posedge clk);
    end
    check(n_drop > 0 && n_group > 0 && n_dep > 0, "drops, grouping and departures exercised");
    $display("departures=%0d grouped=%0d drops=%0d", n_dep, n_group, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
