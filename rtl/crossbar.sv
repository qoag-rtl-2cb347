// crossbar: N x N nonblocking switching fabric.
//
// Each output is an N:1 multiplexer that takes the packet offered by the
// input the scheduler connected to it. Any set of input/output pairs with
// distinct outputs can be connected in the same slot, which is what makes
// the fabric nonblocking. The fabric is combinational; the switch top
// registers its outputs. The multiplexer structure is a choice of this
// design: only the fabric's function is given for the switch.
module crossbar #(
  parameter int unsigned N = qoag_pkg::N_PORTS,
  parameter int unsigned W = $clog2(qoag_pkg::N_PORTS) + qoag_pkg::DW_DATA,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic [N-1:0][W-1:0]  in_pkt,
  input  logic [N-1:0]         sel_valid,
  input  logic [N-1:0][AW-1:0] sel_src,
  output logic [N-1:0]         out_valid,
  output logic [N-1:0][W-1:0]  out_pkt
);
  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      out_valid[j] = sel_valid[j];
      out_pkt[j]   = sel_valid[j] ? in_pkt[sel_src[j]] : '0;
    end
  end
endmodule
