// qoag_switch: N x N input-buffered switch with QOAG queueing.
//
// Each of the N inputs has Q queues of B packet buffers. Arriving packets
// are placed by Queueing with Output Address Grouping: a packet joins the
// queue that already holds packets for the same output, otherwise the
// shortest queue, and is dropped if that queue is full. Grouping packets
// by output address keeps the HOL packets of one input's queues addressed
// to different outputs, which reduces head-of-line blocking when traffic
// is concentrated on a few outputs. Each slot a Q-round contention
// scheduler matches HOL packets to outputs and a nonblocking crossbar
// delivers them, at most one packet per input and per output.
//
// Interface: at most one packet per input per clock cycle (one cycle is
// one time slot) on in_valid/in_addr/in_data. out_valid/out_data/out_src
// are registered: a packet switched in slot t shows at the outputs during
// slot t+1, together with the input it came from. An arrival in slot t is
// queued at the end of slot t, so the shortest arrival-to-output latency
// is two cycles. in_drop is registered too: in_drop[i] during slot t+1
// means the arrival at input i in slot t was lost. Reset is synchronous,
// active low. The organisation, policy and scheduler follow the QOAG
// switch; the payload width, registered outputs and one-cycle slot are
// choices of this design.
module qoag_switch #(
  parameter int unsigned N  = qoag_pkg::N_PORTS,
  parameter int unsigned Q  = qoag_pkg::Q_QUEUES,
  parameter int unsigned B  = qoag_pkg::B_BUFS,
  parameter int unsigned DW = qoag_pkg::DW_DATA,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         in_valid,
  input  logic [N-1:0][AW-1:0] in_addr,
  input  logic [N-1:0][DW-1:0] in_data,
  output logic [N-1:0]         in_drop,
  output logic [N-1:0]         out_valid,
  output logic [N-1:0][DW-1:0] out_data,
  output logic [N-1:0][AW-1:0] out_src
);
  logic [N-1:0][Q-1:0]         hol_valid;
  logic [N-1:0][Q-1:0][AW-1:0] hol_addr;
  logic [N-1:0]                grant_valid;
  logic [N-1:0][QW-1:0]        grant_queue;
  logic [N-1:0]                sel_valid;
  logic [N-1:0][AW-1:0]        sel_src;
  logic [N-1:0]                dep_valid, drop;
  logic [N-1:0][AW-1:0]        dep_addr;
  logic [N-1:0][DW-1:0]        dep_data;
  logic [N-1:0][AW+DW-1:0]     dep_pkt, xb_pkt;
  logic [N-1:0]                xb_valid;

  // the scheme is defined for more than one and fewer than N queues per input
  if (Q < 2 || Q >= N) begin : g_bad_q
    $error("qoag_switch: Q must satisfy 1 < Q < N");
  end

  for (genvar i = 0; i < N; i++) begin : g_in
    input_port #(.N(N), .Q(Q), .B(B), .DW(DW)) u_port (
      .clk         (clk),
      .rst_n       (rst_n),
      .in_valid    (in_valid[i]),
      .in_addr     (in_addr[i]),
      .in_data     (in_data[i]),
      .hol_valid   (hol_valid[i]),
      .hol_addr    (hol_addr[i]),
      .grant_valid (grant_valid[i]),
      .grant_queue (grant_queue[i]),
      .dep_valid   (dep_valid[i]),
      .dep_addr    (dep_addr[i]),
      .dep_data    (dep_data[i]),
      .drop        (drop[i]),
      .grouped     ()
    );
    assign dep_pkt[i] = {dep_addr[i], dep_data[i]};
  end

  contention_scheduler #(.N(N), .Q(Q)) u_sched (
    .clk          (clk),
    .rst_n        (rst_n),
    .hol_valid    (hol_valid),
    .hol_addr     (hol_addr),
    .grant_valid  (grant_valid),
    .grant_queue  (grant_queue),
    .out_busy     (sel_valid),
    .out_src      (sel_src),
    .serve_offset ()
  );

  crossbar #(.N(N), .W(AW + DW)) u_xbar (
    .in_pkt    (dep_pkt),
    .sel_valid (sel_valid),
    .sel_src   (sel_src),
    .out_valid (xb_valid),
    .out_pkt   (xb_pkt)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_data  <= '0;
      out_src   <= '0;
      in_drop   <= '0;
    end else begin
      out_valid <= xb_valid;
      in_drop   <= drop;
      for (int unsigned j = 0; j < N; j++) begin
        out_data[j] <= xb_pkt[j][DW-1:0];
        out_src[j]  <= sel_src[j];
      end
    end
  end

  // the fabric carries exactly the packets the inputs release
  a_dep_count: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(dep_valid) == $countones(sel_valid));

  // every delivered packet is addressed to the output it reaches
  always_comb begin
    if (rst_n) begin
      for (int unsigned j = 0; j < N; j++) begin
        if (xb_valid[j]) a_right_output: assert (xb_pkt[j][AW+DW-1:DW] == AW'(j));
      end
    end
  end
endmodule
