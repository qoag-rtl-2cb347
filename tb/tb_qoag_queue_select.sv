// tb_qoag_queue_select: self-checking test of the QOAG queue selector.
//
// A reference model keeps its own per-queue, per-output packet counts and
// queue lengths. Each cycle the test offers a random arrival and, when the
// model holds packets, a random legal departure, then checks the chosen
// queue, the drop and grouping flags and the queue lengths. It counts how
// often each rule fired: grouping with an existing address, shortest-queue
// choice, a tie for the shortest queue, a drop, and an arrival accepted by
// a full queue whose packet left in the same slot.
module tb_qoag_queue_select;
  localparam int unsigned N = 4, Q = 3, B = 4;
  localparam int unsigned AW = $clog2(N), QW = $clog2(Q), CW = $clog2(B + 1);
  logic clk = 0, rst_n = 0;
  logic arr_valid, dep_valid, enq_valid, drop, grouped;
  logic [AW-1:0] arr_addr, dep_addr;
  logic [QW-1:0] dep_queue, enq_queue;
  logic [Q-1:0][CW-1:0] qlen;
  int checks = 0, failures = 0;
  int n_group = 0, n_short = 0, n_tie = 0, n_drop = 0, n_full_refill = 0;
  int c[Q][N];
  int l[Q];

  qoag_queue_select #(.N(N), .Q(Q), .B(B)) dut (.*);

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
    int exp_q, minlen, ties, grp, total;
    bit exp_drop;
    arr_valid = 0; arr_addr = 0; dep_valid = 0; dep_queue = 0; dep_addr = 0;
    foreach (c[i, j]) c[i][j] = 0;
    foreach (l[i]) l[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      for (int i = 0; i < Q; i++) check(qlen[i] == CW'(l[i]), "qlen");
      // random legal departure
      total = 0;
      foreach (l[i]) total += l[i];
      dep_valid = (total != 0) && ($urandom_range(99) < 35);
      if (dep_valid) begin
        int qi, aj;
        do begin
          qi = $urandom_range(Q - 1);
          aj = $urandom_range(N - 1);
        end while (c[qi][aj] == 0);
        dep_queue = QW'(qi);
        dep_addr  = AW'(aj);
        c[qi][aj]--;
        l[qi]--;
      end
      arr_valid = ($urandom_range(99) < 60);
      arr_addr  = AW'($urandom_range(N - 1));
      #1;
      if (arr_valid) begin
        // reference QOAG decision on post-departure state
        grp = -1;
        for (int i = 0; i < Q; i++) if (c[i][arr_addr] > 0) grp = i;
        if (grp >= 0) begin
          exp_q = grp;
          n_group++;
        end else begin
          minlen = B + 1;
          foreach (l[i]) if (l[i] < minlen) minlen = l[i];
          ties = 0;
          exp_q = -1;
          for (int i = Q - 1; i >= 0; i--) if (l[i] == minlen) begin exp_q = i; ties++; end
          n_short++;
          if (ties > 1) n_tie++;
        end
        exp_drop = (l[exp_q] == B);
        if (exp_drop) n_drop++;
        if (!exp_drop && dep_valid && l[exp_q] == B - 1 && int'(dep_queue) == exp_q) n_full_refill++;
        check(drop == exp_drop, "drop");
        check(enq_valid == !exp_drop, "enq_valid");
        check(grouped == (grp >= 0), "grouped");
        if (!exp_drop) begin
          check(int'(enq_queue) == exp_q, "queue choice");
          c[exp_q][arr_addr]++;
          l[exp_q]++;
        end
      end else begin
        check(!enq_valid && !drop && !grouped, "idle");
      end
      @(posedge clk);
    end
    check(n_group > 0, "grouping used");
    check(n_short > 0, "shortest queue used");
    check(n_tie > 0, "shortest-queue tie");
    check(n_drop > 0, "drop");
    check(n_full_refill > 0, "full queue refilled in the slot it drains");
    $display("grouped=%0d shortest=%0d ties=%0d drops=%0d refill=%0d",
             n_group, n_short, n_tie, n_drop, n_full_refill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
