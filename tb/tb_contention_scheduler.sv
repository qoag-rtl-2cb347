// tb_contention_scheduler: self-checking test of the Q-round scheduler.
//
// Random HOL patterns are applied every cycle. The test checks that the
// grants form a legal matching (one packet per input and per output, each
// grant backed by a HOL packet addressed to that output), that the serving
// order rotates by one queue per slot, and the round rule: an input left
// unmatched in round r (or not matched at all) may only have HOL packets
// in its round-r queue for outputs taken in round r or earlier. A second
// phase lets three inputs contend for one output for many slots and checks
// that every one of them wins a fair share, so the tie-break is random
// rather than fixed.
module tb_contention_scheduler;
  localparam int unsigned N = 6, Q = 3;
  localparam int unsigned AW = $clog2(N), QW = $clog2(Q);
  logic clk = 0, rst_n = 0;
  logic [N-1:0][Q-1:0]         hol_valid;
  logic [N-1:0][Q-1:0][AW-1:0] hol_addr;
  logic [N-1:0]                grant_valid, out_busy;
  logic [N-1:0][QW-1:0]        grant_queue;
  logic [N-1:0][AW-1:0]        out_src;
  logic [QW-1:0]               serve_offset;
  int checks = 0, failures = 0, n_tie = 0, n_late = 0;
  int wins[N];
  int prev_off = 0;

  contention_scheduler #(.N(N), .Q(Q)) dut (.*);

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

  function automatic int round_of(input int q, input int off);
    return (q - off + Q) % Q;
  endfunction

  task automatic check_slot(input int t);
    int off, ngrant, nbusy, r_in, a, r_out;
    int req[N];
    off = int'(serve_offset);
    if (t > 0) check(off == (prev_off + 1) % Q, "serving order rotates");
    prev_off = off;
    ngrant = 0;
    nbusy = 0;
    for (int i = 0; i < N; i++) if (grant_valid[i]) begin
      ngrant++;
      a = int'(hol_addr[i][grant_queue[i]]);
      check(hol_valid[i][grant_queue[i]], "grant backed by HOL packet");
      check(a < N && out_busy[a] && int'(out_src[a]) == i, "grant matches output");
    end
    for (int j = 0; j < N; j++) if (out_busy[j]) begin
      nbusy++;
      check(grant_valid[out_src[j]], "output source granted");
    end
    check(ngrant == nbusy, "one packet per input and output");
    // round rule
    for (int i = 0; i < N; i++) begin
      r_in = grant_valid[i] ? round_of(int'(grant_queue[i]), off) : Q;
      for (int r = 0; r < r_in; r++) begin
        int q;
        q = (off + r) % Q;
        if (hol_valid[i][q]) begin
          a = int'(hol_addr[i][q]);
          r_out = out_busy[a] ? round_of(int'(grant_queue[out_src[a]]), off) : Q;
          check(r_out <= r, "no free output left behind in a round");
        end
      end
      if (grant_valid[i] && r_in > 0) n_late++;
    end
    // contention in some round
    for (int r = 0; r < Q; r++) begin
      for (int j = 0; j < N; j++) begin
        int cnt;
        cnt = 0;
        for (int i = 0; i < N; i++)
          if (hol_valid[i][(off + r) % Q] && int'(hol_addr[i][(off + r) % Q]) == j) cnt++;
        if (cnt > 1) n_tie++;
      end
    end
  endtask

  initial begin
    hol_valid = '0;
    hol_addr  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++)
        for (int q = 0; q < Q; q++) begin
          hol_valid[i][q] = ($urandom_range(99) < 70);
          hol_addr[i][q]  = AW'($urandom_range(N - 1));
        end
      #1 check_slot(t);
    end
    // fairness phase: inputs 1, 3 and 4 all want output 2 in every queue
    foreach (wins[i]) wins[i] = 0;
    for (int t = 5000; t < 5600; t++) begin
      @(negedge clk);
      hol_valid = '0;
      foreach (hol_valid[i, q]) if (i == 1 || i == 3 || i == 4) begin
        hol_valid[i][q] = 1'b1;
        hol_addr[i][q]  = AW'(2);
      end
      #1 check_slot(t);
      check(out_busy == N'(1 << 2), "contended output served");
      wins[out_src[2]]++;
    end
    check(wins[1] > 120 && wins[3] > 120 && wins[4] > 120, "random tie-break shares wins");
    check(n_tie > 0 && n_late > 0, "ties and later-round grants exercised");
    $display("wins 1/3/4: %0d %0d %0d, ties=%0d later-round grants=%0d",
             wins[1], wins[3], wins[4], n_tie, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
