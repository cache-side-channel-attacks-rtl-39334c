// rm_placement: random modulo (RM) set placement for the L1 caches.
//
// The set of a line is a seed-dependent permutation of its index bits:
//   xi  = index ^ seed[IDX_BITS-1:0]             (XORed index bits)
//   xt  = tag   ^ seed[IDX_BITS +: TAG_BITS]     (XORed tag bits)
//   set = Benes(xi) with its switches driven by xt
// Because the network only permutes bits, two lines with the same tag (the
// same page when the way size equals the page size) never share a set, while
// lines of different pages meet in a set only for some seeds. That is the
// partial, page-fixed randomness that keeps the cache analysable across
// software integrations; a new seed gives a new, independent layout.
//
// The XOR-then-Benes structure follows the random-modulo design. Where the
// tag has more bits than the network has switches, the XORed tag bits are
// folded (XORed) onto the switch controls so that every tag bit matters: this
// folding is this design's choice. bypass = 1 forwards the address index bits
// unchanged (plain modulo placement) for tasks that need no randomization.
// Purely combinational.
module rm_placement
  import tsc_pkg::*;
#(
  parameter int unsigned IDX_BITS = 7
) (
  input  logic [ADDR_W-1:0]   addr,
  input  logic [SEED_W-1:0]   seed,
  input  logic                bypass,
  output logic [IDX_BITS-1:0] set_idx
);

  localparam int unsigned TAG_BITS = ADDR_W - OFF_BITS - IDX_BITS;
  localparam int unsigned NSW      = benes_nsw(IDX_BITS);

  if (IDX_BITS + TAG_BITS > SEED_W) begin : g_bad_seed
    $error("rm_placement: seed too narrow for tag and index bits");
  end

  logic [IDX_BITS-1:0] idx, xi, permuted;
  logic [TAG_BITS-1:0] xt;
  logic [NSW-1:0]      ctrl;

  assign idx = addr[OFF_BITS +: IDX_BITS];
  assign xi  = idx ^ seed[IDX_BITS-1:0];
  assign xt  = addr[ADDR_W-1 -: TAG_BITS] ^ seed[IDX_BITS +: TAG_BITS];

  // fold the XORed tag onto the switch controls
  always_comb begin
    ctrl = '0;
    for (int unsigned j = 0; j < TAG_BITS; j++)
      ctrl[j % NSW] ^= xt[j];
  end

  benes_network #(.N(IDX_BITS), .NSW(NSW)) u_benes (
    .ctrl    (ctrl),
    .in_bits (xi),
    .out_bits(permuted)
  );

  assign set_idx = bypass ? idx : permuted;

endmodule
