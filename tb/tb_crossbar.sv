// tb_crossbar: self-checking test of the nonblocking fabric.
//
// Applies random packets and random partial permutations (each input
// connected to at most one output) and checks every output against the
// packet of its selected input, and that idle outputs carry nothing.
module tb_crossbar;
  localparam int unsigned N = 8, W = 20, AW = $clog2(N);
  logic [N-1:0][W-1:0]  in_pkt, out_pkt;
  logic [N-1:0]         sel_valid, out_valid;
  logic [N-1:0][AW-1:0] sel_src;
  int checks = 0, failures = 0;

  crossbar #(.N(N), .W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm[N];
    for (int t = 0; t < 2000; t++) begin
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      for (int j = 0; j < N; j++) begin
        in_pkt[j]    = W'($urandom);
        sel_valid[j] = ($urandom_range(99) < 75);
        sel_src[j]   = AW'(perm[j]);
      end
      #1;
      for (int j = 0; j < N; j++) begin
        check(out_valid[j] == sel_valid[j], "out_valid");
        if (sel_valid[j]) check(out_pkt[j] == in_pkt[perm[j]], "routed packet");
        else              check(out_pkt[j] == '0, "idle output");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
