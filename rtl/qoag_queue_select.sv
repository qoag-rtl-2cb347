// qoag_queue_select: Queueing with Output Address Grouping for one input.
//
// The selector keeps, for its input port, c[i][j], the number of packets
// in queue i addressed to output j, and l[i], the length of queue i. A
// packet arriving for output k joins the queue i that already holds a
// packet for k (c[i][k] > 0), so packets for one output stay in one queue
// and keep their order. If no queue holds a packet for k, the packet joins
// the shortest queue. If the chosen queue is full (l[i] == B) the packet
// is dropped. When the HOL packet for output k leaves queue i, c[i][k] and
// l[i] are decremented. These rules are the QOAG policy itself.
//
// Choices of this design: departures of the current slot are applied
// before the arrival is assigned (a full queue whose HOL packet leaves in
// this slot accepts the arrival); ties for the shortest queue go to the
// lowest index. By construction at most one queue has c[i][k] > 0 for a
// given k; an assertion guards that.
//
// Timing: arr_* and dep_* describe the current slot; enq_valid, enq_queue,
// drop and grouped are combinational decisions for that slot; counters
// update at the rising edge. Reset is synchronous, active low.
module qoag_queue_select #(
  parameter int unsigned N = qoag_pkg::N_PORTS,
  parameter int unsigned Q = qoag_pkg::Q_QUEUES,
  parameter int unsigned B = qoag_pkg::B_BUFS,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned CW = $clog2(B + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 arr_valid,
  input  logic [AW-1:0]        arr_addr,
  input  logic                 dep_valid,
  input  logic [QW-1:0]        dep_queue,
  input  logic [AW-1:0]        dep_addr,
  output logic                 enq_valid,
  output logic [QW-1:0]        enq_queue,
  output logic                 drop,
  output logic                 grouped,
  output logic [Q-1:0][CW-1:0] qlen
);
  logic [Q-1:0][N-1:0][CW-1:0] c_q, c_dep, c_d;
  logic [Q-1:0][CW-1:0]        l_q, l_dep, l_d;

  always_comb begin
    logic [QW-1:0] sel;
    logic          hit;
    // apply this slot's departure first
    c_dep = c_q;
    l_dep = l_q;
    if (dep_valid) begin
      c_dep[dep_queue][dep_addr] = c_q[dep_queue][dep_addr] - 1'b1;
      l_dep[dep_queue]           = l_q[dep_queue] - 1'b1;
    end
    // group match, else shortest queue (lowest index wins a tie)
    hit = 1'b0;
    sel = '0;
    for (int unsigned i = 0; i < Q; i++) begin
      if (!hit && c_dep[i][arr_addr] != '0) begin
        hit = 1'b1;
        sel = QW'(i);
      end
    end
    if (!hit) begin
      for (int unsigned i = 1; i < Q; i++) begin
        if (l_dep[i] < l_dep[sel]) sel = QW'(i);
      end
    end
    grouped   = arr_valid && hit;
    enq_queue = sel;
    enq_valid = arr_valid && (l_dep[sel] != CW'(B));
    drop      = arr_valid && (l_dep[sel] == CW'(B));
    c_d = c_dep;
    l_d = l_dep;
    if (enq_valid) begin
      c_d[sel][arr_addr] = c_dep[sel][arr_addr] + 1'b1;
      l_d[sel]           = l_dep[sel] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_q <= '0;
      l_q <= '0;
    end else begin
      c_q <= c_d;
      l_q <= l_d;
    end
  end

  assign qlen = l_q;

  // a departure must come from a queue that holds a packet for that output
  a_dep_legal: assert property (@(posedge clk) disable iff (!rst_n)
    dep_valid |-> (c_q[dep_queue][dep_addr] != '0));

  // each output address is grouped in at most one queue
  function automatic int unsigned holders(input logic [Q-1:0][N-1:0][CW-1:0] c,
                                          input int unsigned j);
    int unsigned h;
    h = 0;
    for (int unsigned i = 0; i < Q; i++) h += (c[i][j] != '0) ? 1 : 0;
    return h;
  endfunction

  logic group_conflict;
  always_comb begin
    group_conflict = 1'b0;
    for (int unsigned j = 0; j < N; j++) begin
      if (holders(c_q, j) > 1) group_conflict = 1'b1;
    end
  end
  a_one_group: assert property (@(posedge clk) disable iff (!rst_n) !group_conflict);
endmodule
