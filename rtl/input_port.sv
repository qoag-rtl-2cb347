// input_port: one input of the QOAG switch with its Q queues.
//
// An arriving packet is steered by the QOAG queue selector into one of Q
// packet FIFOs of B buffers, or dropped when the chosen queue is full. The
// HOL packet of every queue is offered to the scheduler. When the
// scheduler grants a queue, its HOL packet is popped and driven out as
// dep_* to the fabric, and the selector's counters are told of the
// departure in the same slot.
//
// Timing: in_* and grant_* belong to the current slot; dep_*, drop and
// grouped are combinational for that slot; the queues change at the
// rising edge, so an arrival can be granted in the next slot at the
// earliest. The selector's queue lengths are asserted equal to the FIFO
// fill levels. The Q queues of B buffers per input follow the switch
// organisation; the payload width is a choice of this design.
module input_port #(
  parameter int unsigned N  = qoag_pkg::N_PORTS,
  parameter int unsigned Q  = qoag_pkg::Q_QUEUES,
  parameter int unsigned B  = qoag_pkg::B_BUFS,
  parameter int unsigned DW = qoag_pkg::DW_DATA,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned CW = $clog2(B + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [AW-1:0]        in_addr,
  input  logic [DW-1:0]        in_data,
  output logic [Q-1:0]         hol_valid,
  output logic [Q-1:0][AW-1:0] hol_addr,
  input  logic                 grant_valid,
  input  logic [QW-1:0]        grant_queue,
  output logic                 dep_valid,
  output logic [AW-1:0]        dep_addr,
  output logic [DW-1:0]        dep_data,
  output logic                 drop,
  output logic                 grouped
);
  logic                 enq_valid;
  logic [QW-1:0]        enq_queue;
  logic [Q-1:0][CW-1:0] qlen, fifo_count;
  logic [Q-1:0][DW-1:0] hol_data;
  logic [Q-1:0]         fifo_full;

  assign dep_valid = grant_valid && hol_valid[grant_queue];
  assign dep_addr  = hol_addr[grant_queue];
  assign dep_data  = hol_data[grant_queue];

  qoag_queue_select #(.N(N), .Q(Q), .B(B)) u_sel (
    .clk       (clk),
    .rst_n     (rst_n),
    .arr_valid (in_valid),
    .arr_addr  (in_addr),
    .dep_valid (dep_valid),
    .dep_queue (grant_queue),
    .dep_addr  (dep_addr),
    .enq_valid (enq_valid),
    .enq_queue (enq_queue),
    .drop      (drop),
    .grouped   (grouped),
    .qlen      (qlen)
  );

  for (genvar q = 0; q < Q; q++) begin : g_queue
    packet_fifo #(.B(B), .AW(AW), .DW(DW)) u_fifo (
      .clk       (clk),
      .rst_n     (rst_n),
      .push      (enq_valid && enq_queue == QW'(q)),
      .push_addr (in_addr),
      .push_data (in_data),
      .pop       (dep_valid && grant_queue == QW'(q)),
      .hol_valid (hol_valid[q]),
      .hol_addr  (hol_addr[q]),
      .hol_data  (hol_data[q]),
      .count     (fifo_count[q]),
      .full      (fifo_full[q])
    );
  end

  a_len_match: assert property (@(posedge clk) disable iff (!rst_n)
    qlen == fifo_count);
  for (genvar q = 0; q < Q; q++) begin : g_full_chk
    a_full_match: assert property (@(posedge clk) disable iff (!rst_n)
      fifo_full[q] == (qlen[q] == CW'(B)));
  end
  a_grant_hol: assert property (@(posedge clk) disable iff (!rst_n)
    grant_valid |-> hol_valid[grant_queue]);
endmodule
