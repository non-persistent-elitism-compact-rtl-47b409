// evo_rng: 32-bit xorshift pseudo-random number generator.
//
// Produces a new 32-bit word every clock in which en is high, using the
// xorshift32 recurrence x ^= x<<13; x ^= x>>17; x ^= x<<5. The state is
// loaded with SEED on reset (a zero SEED is replaced by 1, since zero is a
// fixed point). The genetic algorithm samples its chromosomes with it; the
// generator type is this design's choice. rnd is the current state.
module evo_rng #(
  parameter logic [31:0] SEED = 32'h1234_5678
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [31:0] rnd
);
  logic [31:0] x, nxt;

  always_comb begin
    nxt = x;
    nxt = nxt ^ (nxt << 13);
    nxt = nxt ^ (nxt >> 17);
    nxt = nxt ^ (nxt << 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  x <= (SEED == 32'd0) ? 32'd1 : SEED;
    else if (en) x <= nxt;
  end

  assign rnd = x;
endmodule
