// tscache_top: time-predictable secure cache hierarchy (TSCache).
//
// A cache hierarchy that is both analysable with measurement-based
// probabilistic timing analysis and robust against contention-based cache
// timing side-channel attacks. Placement is randomized by a seed: the L1
// instruction and data caches use random modulo (page-preserving permutation
// of the index bits through a Benes network) and the shared L2 uses hashRP
// (rotate-and-XOR hash of the whole line address). Security comes from giving
// every software component its own seed, so an attacker's lines and a
// victim's lines conflict in sets that are random and independent of their
// addresses; timing analysability comes from new random seeds and a flush per
// hyperperiod. The PRNG feeds random replacement and is readable so the
// operating system can draw fresh seeds.
//
// Blocks: lfsr_prng, seed_ctrl (seed registers, drain-then-switch, flush),
// two rand_cache L1s (PLACE_RM), l2_arbiter, one rand_cache L2 (PLACE_HASHRP).
// The core and main memory are outside: the fetch port (if_*), the data port
// (d_*) and the memory port (mem_*) connect to them. The memory port issues
// line reads and word write-throughs, and expects one mem_rvalid pulse per
// request.
//
// Default sizes are those of the evaluated configuration: 16 KB, 128-set,
// 4-way L1s and a 256 KB, 2048-set, 4-way L2, with 32-byte lines. The
// write-through policy, port protocol and 32-bit addresses are this design's
// choices. Timing: an L1 hit returns its data in the cycle after the request
// is accepted; an L1 miss that hits in the L2 returns it 4 cycles after
// acceptance (L1 lookup, request to the arbiter, grant, L2 lookup); an L2 miss
// adds the memory latency plus 2 cycles. The unused full-line outputs of the
// caches (l1i_line, l1d_line, l2_rword) are left open on purpose.
module tscache_top
  import tsc_pkg::*;
#(
  parameter int unsigned L1_SETS = 128,
  parameter int unsigned L1_WAYS = 4,
  parameter int unsigned L2_SETS = 2048,
  parameter int unsigned L2_WAYS = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // instruction fetch port (read only)
  input  logic                 if_valid,
  output logic                 if_ready,
  input  logic [ADDR_W-1:0]    if_addr,
  output logic                 if_rvalid,
  output logic [WORD_W-1:0]    if_rdata,
  // data port
  input  logic                 d_valid,
  output logic                 d_ready,
  input  mem_req_t             d_req,
  output logic                 d_rvalid,
  output logic [WORD_W-1:0]    d_rdata,
  // seed command port (operating system)
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  seed_cmd_e            cmd,
  input  seed_set_t            cmd_seeds,
  input  logic                 cmd_bypass,
  output logic                 cmd_done,
  // PRNG access
  input  logic                 prng_we,
  input  logic [31:0]          prng_seed,
  output logic [31:0]          prng_value,
  // main memory port
  output logic                 mem_valid,
  input  logic                 mem_ready,
  output mem_req_t             mem_req,
  input  logic                 mem_rvalid,
  input  logic [LINE_BITS-1:0] mem_rline,
  // event pulses
  output logic                 ev_l1i_hit,
  output logic                 ev_l1i_miss,
  output logic                 ev_l1d_hit,
  output logic                 ev_l1d_miss,
  output logic                 ev_l2_hit,
  output logic                 ev_l2_miss,
  output logic                 ev_evict,
  output logic                 ev_l2_conflict,
  output logic                 ev_drain_wait
);

  logic [31:0] rnd;
  seed_set_t   seeds;
  logic        bypass, flush, hold;
  logic        l1i_busy, l1d_busy, l2_busy, arb_busy;
  logic        l1i_evict, l1d_evict, l2_evict;

  lfsr_prng u_prng (
    .clk(clk), .rst_n(rst_n), .seed_we(prng_we), .seed_in(prng_seed), .rnd(rnd));
  assign prng_value = rnd;

  seed_ctrl u_seed_ctrl (
    .clk(clk), .rst_n(rst_n),
    .cmd_valid(cmd_valid), .cmd_ready(cmd_ready), .cmd(cmd),
    .cmd_seeds(cmd_seeds), .cmd_bypass(cmd_bypass), .done(cmd_done),
    .caches_busy(l1i_busy || l1d_busy || l2_busy || arb_busy),
    .hold(hold), .flush(flush), .seeds(seeds), .bypass(bypass),
    .ev_drain_wait(ev_drain_wait));

  // L1 <-> arbiter links
  logic                 l1i_dn_valid, l1i_dn_ready, l1i_dn_rvalid;
  logic                 l1d_dn_valid, l1d_dn_ready, l1d_dn_rvalid;
  mem_req_t             l1i_dn_req, l1d_dn_req, if_req;
  // arbiter <-> L2 link
  logic                 l2_valid, l2_ready, l2_rvalid;
  mem_req_t             l2_req;
  logic [LINE_BITS-1:0] l2_rline, l1i_line, l1d_line;
  logic [WORD_W-1:0]    l2_rword;

  assign if_req = '{we: 1'b0, addr: if_addr, wdata: '0, wstrb: '0};

  rand_cache #(.PLACE(PLACE_RM), .SETS(L1_SETS), .WAYS(L1_WAYS)) u_l1i (
    .clk(clk), .rst_n(rst_n),
    .seed(seeds.l1i), .bypass(bypass), .flush(flush), .hold(hold),
    .rnd(rnd), .busy(l1i_busy),
    .up_valid(if_valid), .up_ready(if_ready), .up_req(if_req),
    .up_rvalid(if_rvalid), .up_rline(l1i_line), .up_rword(if_rdata),
    .dn_valid(l1i_dn_valid), .dn_ready(l1i_dn_ready), .dn_req(l1i_dn_req),
    .dn_rvalid(l1i_dn_rvalid), .dn_rline(l2_rline),
    .ev_hit(ev_l1i_hit), .ev_miss(ev_l1i_miss), .ev_evict(l1i_evict));

  rand_cache #(.PLACE(PLACE_RM), .SETS(L1_SETS), .WAYS(L1_WAYS)) u_l1d (
    .clk(clk), .rst_n(rst_n),
    .seed(seeds.l1d), .bypass(bypass), .flush(flush), .hold(hold),
    .rnd({rnd[7:0], rnd[31:8]}), .busy(l1d_busy),
    .up_valid(d_valid), .up_ready(d_ready), .up_req(d_req),
    .up_rvalid(d_rvalid), .up_rline(l1d_line), .up_rword(d_rdata),
    .dn_valid(l1d_dn_valid), .dn_ready(l1d_dn_ready), .dn_req(l1d_dn_req),
    .dn_rvalid(l1d_dn_rvalid), .dn_rline(l2_rline),
    .ev_hit(ev_l1d_hit), .ev_miss(ev_l1d_miss), .ev_evict(l1d_evict));

  l2_arbiter u_arb (
    .clk(clk), .rst_n(rst_n),
    .m0_valid(l1i_dn_valid), .m0_ready(l1i_dn_ready), .m0_req(l1i_dn_req),
    .m0_rvalid(l1i_dn_rvalid),
    .m1_valid(l1d_dn_valid), .m1_ready(l1d_dn_ready), .m1_req(l1d_dn_req),
    .m1_rvalid(l1d_dn_rvalid),
    .s_valid(l2_valid), .s_ready(l2_ready), .s_req(l2_req), .s_rvalid(l2_rvalid),
    .busy(arb_busy), .ev_conflict(ev_l2_conflict));

  rand_cache #(.PLACE(PLACE_HASHRP), .SETS(L2_SETS), .WAYS(L2_WAYS)) u_l2 (
    .clk(clk), .rst_n(rst_n),
    .seed(seeds.l2), .bypass(bypass), .flush(flush), .hold(1'b0),
    .rnd({rnd[15:0], rnd[31:16]}), .busy(l2_busy),
    .up_valid(l2_valid), .up_ready(l2_ready), .up_req(l2_req),
    .up_rvalid(l2_rvalid), .up_rline(l2_rline), .up_rword(l2_rword),
    .dn_valid(mem_valid), .dn_ready(mem_ready), .dn_req(mem_req),
    .dn_rvalid(mem_rvalid), .dn_rline(mem_rline),
    .ev_hit(ev_l2_hit), .ev_miss(ev_l2_miss), .ev_evict(l2_evict));

  assign ev_evict = l1i_evict || l1d_evict || l2_evict;

endmodule
