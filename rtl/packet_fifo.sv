// packet_fifo: one input queue of B packet buffers.
//
// A circular buffer of B entries, each holding a packet's output address
// and payload. The head-of-line (HOL) packet is presented combinationally
// from the storage array; the scheduler looks at its address and the
// fabric takes it when the queue is granted. A push and a pop in the same
// cycle are both honoured, also when the queue is full, so a full queue
// can accept a packet in the slot its HOL packet leaves. A push into a
// full queue without a pop is a caller error and is asserted against.
//
// Timing: push and pop act at the rising clock edge; hol_* and count
// reflect the state after that edge. Reset is synchronous, active low.
// The queue depth B follows the evaluated configuration; the circular
// buffer organisation and the simultaneous push/pop rule are choices of
// this design.
module packet_fifo #(
  parameter int unsigned B  = qoag_pkg::B_BUFS,
  parameter int unsigned AW = $clog2(qoag_pkg::N_PORTS),
  parameter int unsigned DW = qoag_pkg::DW_DATA,
  localparam int unsigned CW = $clog2(B + 1),
  localparam int unsigned PW = (B > 1) ? $clog2(B) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [AW-1:0] push_addr,
  input  logic [DW-1:0] push_data,
  input  logic          pop,
  output logic          hol_valid,
  output logic [AW-1:0] hol_addr,
  output logic [DW-1:0] hol_data,
  output logic [CW-1:0] count,
  output logic          full
);
  logic [AW+DW-1:0] mem [B];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic [CW-1:0]    cnt;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(B - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_pop, do_push;
  assign do_pop  = pop && (cnt != '0);
  assign do_push = push && ((cnt != CW'(B)) || do_pop);

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= {push_addr, push_data};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      cnt <= cnt + CW'(do_push) - CW'(do_pop);
    end
  end

  assign hol_valid = (cnt != '0);
  assign {hol_addr, hol_data} = mem[rd_ptr];
  assign count = cnt;
  assign full  = (cnt == CW'(B));

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push && full |-> pop);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> hol_valid);
endmodule
