// xorshift_rng: 32-bit xorshift pseudo-random generator.
//
// Marsaglia's xorshift32 (shifts 13, 17, 5) advances once per cycle while
// `step` is high. The state is loaded with SEED at reset; SEED must be
// non-zero. The scheduler uses one generator per output to pick random
// draws for its random tie-break. Output `value` is the current state.
// The tie-break is random by the switch's definition; the choice of
// xorshift32 as its source is this design's own.
module xorshift_rng #(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  output logic [31:0] value
);
  logic [31:0] s, s1, s2, s3;
  always_comb begin
    s1 = s  ^ (s  << 13);
    s2 = s1 ^ (s1 >> 17);
    s3 = s2 ^ (s2 << 5);
  end
  always_ff @(posedge clk) begin
    if (!rst_n)    s <= SEED;
    else if (step) s <= s3;
  end
  assign value = s;
endmodule
