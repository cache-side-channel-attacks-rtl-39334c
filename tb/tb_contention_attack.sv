// tb_contention_attack: an evict-and-time contention attack on the L1 data
// cache of the full-size hierarchy, run in two settings.
//
// In each trial the victim loads one secret line v. The attacker then loads
// 16 of its own lines that it has chosen to fall into the same L1 set as v
// (it knows v's address and the placement function, and for the choice it
// uses the seed it runs with). Finally the victim loads v again, and the
// attacker learns from the victim's time whether v was evicted.
//  - Shared seed: the attacker runs with the victim's seed, as plain
//    MBPTA-style random placement would allow. Its lines really do fall
//    into v's set, and v is evicted in almost every trial.
//  - Per-component seeds, the design's mode: the attacker has its own seed.
//    The set it aims at is unrelated to v's set, and v is evicted only
//    rarely, by chance.
// Every trial starts with a flush and fresh PRNG-drawn seeds.
//
// The attacker's search uses its own instance of the random-modulo
// placement. This models what an attacker could learn by probing under its
// own seed.
module tb_contention_attack;
  import tsc_pkg::*;
  localparam int unsigned MEM_LAT = 20;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic if_valid = 0, if_ready, if_rvalid;
  logic [ADDR_W-1:0] if_addr = '0;
  logic [WORD_W-1:0] if_rdata, d_rdata;
  logic d_valid = 0, d_ready, d_rvalid;
  mem_req_t d_req = '0;
  logic cmd_valid = 0, cmd_ready, cmd_bypass = 0, cmd_done;
  seed_cmd_e cmd = CMD_SWITCH;
  seed_set_t cmd_seeds = '0;
  logic prng_we = 0;
  logic [31:0] prng_seed = '0, prng_value;
  logic mem_valid, mem_ready, mem_rvalid;
  mem_req_t mem_req;
  logic [LINE_BITS-1:0] mem_rline;
  logic ev_l1i_hit, ev_l1i_miss, ev_l1d_hit, ev_l1d_miss, ev_l2_hit, ev_l2_miss;
  logic ev_evict, ev_l2_conflict, ev_drain_wait;
  int unsigned n_reads, n_writes;

  tscache_top dut (.*);

  mem_model #(.LATENCY(MEM_LAT)) u_mem (
    .clk, .rst_n, .valid(mem_valid), .ready(mem_ready), .req(mem_req),
    .rvalid(mem_rvalid), .rline(mem_rline), .n_reads, .n_writes);

  always #5 clk = ~clk;

  // mechanism counters
  int c_l1i_hit, c_l1i_miss, c_l1d_hit, c_l1d_miss, c_l2_hit, c_l2_miss;
  int c_evict, c_conflict, c_drain, c_flush, c_switch, c_bypass_ops, c_restore_hit;
  always @(posedge clk) if (rst_n) begin
    c_l1i_hit  += int'(ev_l1i_hit);  c_l1i_miss += int'(ev_l1i_miss);
    c_l1d_hit  += int'(ev_l1d_hit);  c_l1d_miss += int'(ev_l1d_miss);
    c_l2_hit   += int'(ev_l2_hit);   c_l2_miss  += int'(ev_l2_miss);
    c_evict    += int'(ev_evict);    c_conflict += int'(ev_l2_conflict);
    c_drain    += int'(ev_drain_wait);
    c_flush    += int'(dut.flush);
  end

  logic [WORD_W-1:0] shadow [logic [ADDR_W-3:0]];
  int writes_issued = 0;

  function automatic logic [WORD_W-1:0] expect_word(input logic [ADDR_W-1:0] a);
    logic [ADDR_W-3:0] wa = a[ADDR_W-1:2];
    return shadow.exists(wa) ? shadow[wa] : ((32'(wa) * 32'h9E37_79B1) ^ 32'h5A5A_1234);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // instruction fetch; lat = cycles from the accepting edge to the response
  task automatic fetch(input logic [ADDR_W-1:0] a, output int lat);
    logic [WORD_W-1:0] e;
    e = expect_word(a);
    @(negedge clk);
    if_valid = 1; if_addr = a;
    @(posedge clk);
    while (!if_ready) @(posedge clk);
    @(negedge clk);
    if_valid = 0;
    lat = 1;
    while (!if_rvalid) begin @(negedge clk); lat++; end
    check(if_rdata == e, $sformatf("fetch %h: %h expected %h", a, if_rdata, e));
    @(posedge clk); #1;
  endtask

  task automatic daccess(input logic we, input logic [ADDR_W-1:0] a,
                         input logic [WORD_W-1:0] wd, input logic [3:0] st, output int lat);
    logic [WORD_W-1:0] e;
    e = expect_word(a);
    @(negedge clk);
    d_valid = 1; d_req = '{we: we, addr: a, wdata: wd, wstrb: st};
    @(posedge clk);
    while (!d_ready) @(posedge clk);
    @(negedge clk);
    d_valid = 0;
    lat = 1;
    while (!d_rvalid) begin @(negedge clk); lat++; end
    if (we) begin
      for (int b = 0; b < 4; b++) if (st[b]) e[b*8 +: 8] = wd[b*8 +: 8];
      shadow[a[ADDR_W-1:2]] = e;
      writes_issued++;
    end else
      check(d_rdata == e, $sformatf("load %h: %h expected %h", a, d_rdata, e));
    @(posedge clk); #1;
  endtask

  task automatic os_cmd(input seed_cmd_e c, input seed_set_t s, input logic byp);
    @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_seeds = s; cmd_bypass = byp;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
    while (!cmd_done) @(negedge clk);
    @(negedge clk);   // new seeds are in use from here
    if (c == CMD_SWITCH) c_switch++;
  endtask

  // the OS draws fresh seeds from the PRNG
  task automatic draw_seeds(output seed_set_t s);
    logic [31:0] w [6];
    for (int i = 0; i < 6; i++) begin @(negedge clk); w[i] = prng_value; end
    s = {w[0], w[1], w[2], w[3], w[4], w[5]};
  endtask


  // the attacker's model of L1 placement
  logic [ADDR_W-1:0] p_addr;
  logic [SEED_W-1:0] p_seed;
  logic [6:0]        p_set;
  rm_placement #(.IDX_BITS(7)) u_attacker_model (
    .addr(p_addr), .seed(p_seed), .bypass(1'b0), .set_idx(p_set));

  localparam int TRIALS = 40, NEVICT = 16;
  localparam logic [ADDR_W-1:0] VLINE = 32'h5000_0A40;   // the victim's secret line

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one trial; returns 1 if the victim's second load missed
  task automatic trial(input bit shared_seed, output bit evicted);
    seed_set_t sv, sa;
    logic [ADDR_W-1:0] ev [NEVICT];
    logic [6:0] target;
    int lat, found;
    draw_seeds(sv);
    draw_seeds(sa);
    if (shared_seed) sa = sv;
    // attacker: find NEVICT of its lines that its model puts in v's set
    p_seed = sa.l1d; p_addr = VLINE; #1; target = p_set;
    found = 0;
    for (int k = 0; found < NEVICT && k < 200000; k++) begin
      p_addr = 32'h6000_0000 + 32'(k * 32); #1;
      if (p_set == target) begin ev[found] = p_addr; found++; end
    end
    check(found == NEVICT, "attacker finds an eviction set");
    // victim loads v
    os_cmd(CMD_FLUSH, sv, 0);
    daccess(0, VLINE, '0, '0, lat);
    // attacker primes
    os_cmd(CMD_SWITCH, sa, 0);
    for (int i = 0; i < found; i++) daccess(0, ev[i], '0, '0, lat);
    // victim reloads v: a hit takes 1 cycle
    os_cmd(CMD_SWITCH, sv, 0);
    daccess(0, VLINE, '0, '0, lat);
    evicted = (lat != 1);
  endtask

  initial begin
    int ev_shared, ev_private;
    bit e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    prng_we = 1; prng_seed = 32'h1414_2135;
    @(negedge clk);
    prng_we = 0;

    ev_shared = 0; ev_private = 0;
    for (int t = 0; t < TRIALS; t++) begin
      trial(1, e); ev_shared += int'(e);
      trial(0, e); ev_private += int'(e);
    end
    $display("victim line evicted: shared seed %0d of %0d trials, per-component seeds %0d of %0d",
             ev_shared, TRIALS, ev_private, TRIALS);
    check(ev_shared >= TRIALS * 9 / 10, "shared seed: the attack evicts the victim's line");
    check(ev_private <= TRIALS / 4, "own seeds: the attack no longer targets the victim's line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
