// lfsr_prng: low-cost pseudo-random number generator of the cache hierarchy.
//
// Cache randomization needs a pseudo-random source for random replacement and
// for the fresh seeds the operating system installs once per hyperperiod. This
// block is a maximal-length 32-bit Galois LFSR (polynomial
// x^32 + x^22 + x^2 + x + 1, period 2^32 - 1) that advances once per clock.
// The choice of an LFSR and of the polynomial is this design's; the need for a
// cheap generator of sufficient quality is the design's requirement.
//
// Interface: seed_we loads seed_in into the state on the next edge (a zero seed
// is replaced by the reset constant, because the all-zero state is a fixed
// point). rnd is the current state; it changes every cycle.
module lfsr_prng (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             seed_we,
  input  logic [31:0] seed_in,
  output logic [31:0] rnd
);

  localparam logic [31:0] TAPS      = 32'h8020_0003;  // bits 31, 21, 1, 0
  localparam logic [31:0] RESET_VAL = 32'hACE1_2468;

  logic [31:0] state;

  // One Galois step: shift right, fold the taps in when the output bit is 1.
  function automatic logic [31:0] step(input logic [31:0] s);
    return s[0] ? ((s >> 1) ^ TAPS) : (s >> 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= RESET_VAL;
    else if (seed_we)
      state <= (seed_in == '0) ? RESET_VAL : seed_in;
    else
      state <= step(state);
  end

  assign rnd = state;

endmodule
