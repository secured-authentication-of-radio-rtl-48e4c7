// rng64: 64-bit pseudo-random number generator (RNG64) for the tag and the
// reader.
//
// A 64-bit Galois linear-feedback shift register with the maximal-length
// polynomial x^64 + x^63 + x^61 + x^60 + 1. rnd is the register itself; next
// advances it one step per clock. seed_ld loads a seed (an all-zero seed,
// which would lock the register, is replaced by RESET_SEED). The kind of
// generator is this design's choice: only a 64-bit random source is
// specified. It is not cryptographically strong.
module rng64 #(
  parameter logic [63:0] RESET_SEED = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_ld,
  input  logic [63:0] seed,
  input  logic        next,
  output logic [63:0] rnd
);

  localparam logic [63:0] TAPS = 64'hD800_0000_0000_0000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rnd <= RESET_SEED;
    else if (seed_ld) rnd <= (seed == '0) ? RESET_SEED : seed;
    else if (next)    rnd <= (rnd >> 1) ^ (rnd[0] ? TAPS : '0);
  end

endmodule
