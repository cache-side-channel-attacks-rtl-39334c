// hashrp_placement: hash-based parametric random placement (hashRP) for the L2.
//
// The whole line address (tag and index bits) is mixed with the seed by
// N_ROT rotator blocks whose outputs are XORed:
//   amt_i = (seed slice i ^ line_addr slice i) mod LW      5-bit slices
//   r_0   = rotate_left(seed[LW-1:0], amt_0)
//   r_i   = rotate_left(line_addr,    amt_i)               i = 1 .. N_ROT-1
//   h     = r_0 ^ r_1 ^ ... ^ r_{N_ROT-1}
//   set   = h folded (XORed) down to IDX_BITS bits
// The line-address slices of the rotation amounts (bits 5i..5i+4, wrapping)
// cover every line-address bit, so two different lines are rotated by
// different amounts and whether they share a set depends on the seed: any two
// lines collide for some seeds and not for others (full randomness), and the
// rotated seed term spreads one line over all sets. Unlike random modulo this
// places no constraint on pages, which suits a large L2 whose way size
// exceeds the page size.
//
// Rotator blocks feeding XOR gates are the hashRP structure; the rotation
// amounts, the seed term, the fold and N_ROT = 7 are this design's choices.
// The number of rotated address copies (N_ROT-1) must be even: rotation and
// the XOR fold keep the parity of the bit count, so with an odd number of
// address copies, lines whose addresses differ in an odd number of bits could
// never share a set. bypass = 1 forwards the address index bits (plain modulo
// placement).
// Purely combinational.
module hashrp_placement
  import tsc_pkg::*;
#(
  parameter int unsigned IDX_BITS = 11,
  parameter int unsigned N_ROT    = 7
) (
  input  logic [ADDR_W-1:0]   addr,
  input  logic [SEED_W-1:0]   seed,
  input  logic                bypass,
  output logic [IDX_BITS-1:0] set_idx
);

  localparam int unsigned LW = ADDR_W - OFF_BITS;   // line-address bits
  localparam int unsigned RB = $clog2(LW);          // rotation-amount bits

  if (LW + RB * N_ROT > SEED_W) begin : g_bad_seed
    $error("hashrp_placement: seed too narrow for the rotator controls");
  end
  if (N_ROT % 2 == 0) begin : g_bad_nrot
    $error("hashrp_placement: N_ROT must be odd (even number of address copies)");
  end

  function automatic logic [LW-1:0] rotl(input logic [LW-1:0] x, input int unsigned a);
    logic [2*LW-1:0] d;
    d = {x, x} << a;
    return d[2*LW-1 -: LW];
  endfunction

  logic [LW-1:0]       line_addr, h;
  logic [IDX_BITS-1:0] folded;

  assign line_addr = addr[ADDR_W-1:OFF_BITS];

  always_comb begin
    h = '0;
    for (int unsigned i = 0; i < N_ROT; i++) begin
      logic [RB-1:0] amt;
      for (int unsigned k = 0; k < RB; k++)
        amt[k] = seed[LW + RB*i + k] ^ line_addr[(RB*i + k) % LW];
      h ^= rotl((i == 0) ? seed[LW-1:0] : line_addr, int'(amt) % LW);
    end
    folded = '0;
    for (int unsigned j = 0; j < LW; j++)
      folded[j % IDX_BITS] ^= h[j];
  end

  assign set_idx = bypass ? line_addr[IDX_BITS-1:0] : folded;

endmodule
