// sann_rng: uniform pseudorandom number generator of one synapse.
//
// Each synapse draws one random number per time step and compares it with its
// release probability (rand <= PR transmits). The generator is a 32-bit xorshift
// (x ^= x<<13; x ^= x>>17; x ^= x<<5), period 2^32-1, whose upper 16 bits are
// the draw, read as an unsigned fraction in [0,1). The seed input (seedRNDNum)
// is loaded while reset is active; a zero seed, which would lock the generator,
// is replaced by a fixed constant.
//
// Timing: rnd shows the current state; a pulse on en advances it one draw in the
// next clock edge. The source only says the generator is uniform and seeded; the
// xorshift choice and the seed handling are this design's.
module sann_rng
  import sann_pkg::*;
#(
  parameter logic [31:0] ZERO_SEED_SUB = 32'h2545_F491
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] seed,
  input  logic        en,
  output rnd_t        rnd
);

  logic [31:0] state, s1, s2, s3;

  always_comb begin
    s1 = state ^ (state << 13);
    s2 = s1 ^ (s1 >> 17);
    s3 = s2 ^ (s2 << 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= (seed == '0) ? ZERO_SEED_SUB : seed;
    else if (en) state <= s3;
  end

  assign rnd = state[31:32-PR_F];

endmodule
