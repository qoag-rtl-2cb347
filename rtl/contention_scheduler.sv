// contention_scheduler: Q-round HOL packet scheduler of the switch.
//
// Every time slot the scheduler matches inputs to outputs in Q contention
// rounds. Round r looks at the HOL packet of queue (offset + r) mod Q of
// every input that has not been matched in an earlier round; each output
// still free picks one of the inputs whose HOL packet is addressed to it.
// An input sends at most one packet and an output takes at most one packet
// per slot. When several inputs contend for one output, the winner is
// chosen at random. The serving order is rotated by one queue every slot
// (offset advances), which with Q = 2 alternates the two queues. The round
// structure, the random tie-break and the rotation follow the scheduling
// algorithm the QOAG switch is evaluated with.
//
// Choices of this design: the random choice takes the (d mod m)-th of the
// m contending inputs, d being 16 bits drawn per output and per round from
// a xorshift32 generator per output (rounds beyond two reuse the halves of
// the draw, XORed with the round number); outputs matched in
// an earlier round do not take part in later rounds; all rounds are
// resolved combinationally within one clock cycle (one time slot).
//
// Interface: hol_valid/hol_addr give every queue's HOL packet. grant_*
// name the queue each input sends from, out_busy/out_src the input each
// output receives from, serve_offset the queue served in round 0. All
// outputs are combinational for the current slot; the generators and the
// offset advance at the rising edge. Reset is synchronous, active low.
module contention_scheduler #(
  parameter int unsigned N = qoag_pkg::N_PORTS,
  parameter int unsigned Q = qoag_pkg::Q_QUEUES,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0][Q-1:0]          hol_valid,
  input  logic [N-1:0][Q-1:0][AW-1:0]  hol_addr,
  output logic [N-1:0]                 grant_valid,
  output logic [N-1:0][QW-1:0]         grant_queue,
  output logic [N-1:0]                 out_busy,
  output logic [N-1:0][AW-1:0]         out_src,
  output logic [QW-1:0]                serve_offset
);
  logic [N-1:0][31:0] rnd;
  logic [QW-1:0]      offset;

  for (genvar j = 0; j < N; j++) begin : g_rng
    xorshift_rng #(.SEED(32'(32'h9E37_79B9 * (j + 1)))) u_rng (
      .clk   (clk),
      .rst_n (rst_n),
      .step  (1'b1),
      .value (rnd[j])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                    offset <= '0;
    else if (offset == QW'(Q - 1)) offset <= '0;
    else                           offset <= offset + 1'b1;
  end
  assign serve_offset = offset;

  // k-th (from 0) set bit of a request vector
  function automatic int unsigned kth_set(input logic [N-1:0] v, input int unsigned k);
    int unsigned seen;
    int unsigned pos;
    seen = 0;
    pos  = 0;
    for (int unsigned i = 0; i < N; i++) begin
      if (v[i]) begin
        if (seen == k) pos = i;
        seen++;
      end
    end
    return pos;
  endfunction

  always_comb begin
    logic [N-1:0]  in_taken;
    logic [N-1:0]  out_taken;
    logic [N-1:0]  req;
    logic [15:0]   draw;
    automatic int unsigned q;
    automatic int unsigned m;
    automatic int unsigned win;
    in_taken    = '0;
    out_taken   = '0;
    grant_valid = '0;
    grant_queue = '0;
    out_src     = '0;
    for (int unsigned r = 0; r < Q; r++) begin
      q = (int'(offset) + r) % Q;
      for (int unsigned j = 0; j < N; j++) begin
        // contenders: inputs unmatched so far whose round-r HOL packet wants j;
        // each input has one HOL packet per round, so it contends for one output
        for (int unsigned i = 0; i < N; i++)
          req[i] = !in_taken[i] && hol_valid[i][q] && hol_addr[i][q] == AW'(j);
        m    = $countones(req);
        draw = rnd[j][(r % 2) * 16 +: 16] ^ 16'(r / 2);
        win  = kth_set(req, (m == 0) ? 0 : int'(draw) % m);
        if (!out_taken[j] && m != 0) begin
          out_taken[j]     = 1'b1;
          out_src[j]       = AW'(win);
          grant_valid[win] = 1'b1;
          grant_queue[win] = QW'(q);
        end
      end
      in_taken = grant_valid;
    end
    out_busy = out_taken;
  end
endmodule
