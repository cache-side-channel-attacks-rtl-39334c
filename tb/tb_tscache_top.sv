// tb_tscache_top: end-to-end test of the TSCache hierarchy at its full size
// (16 KB 4-way L1s with random modulo, 256 KB 4-way shared L2 with hashRP).
// A testbench core fetches instructions and does loads and stores through the
// two ports at once, and a testbench operating system drives the seed
// controller the way a component-based real-time system would: a seed per
// software component, a context switch while accesses are in flight, the
// return to a component whose lines are then found again without any flush,
// a flush with fresh PRNG-drawn seeds at the end of the hyperperiod, and the
// bypass (modulo) mode. Every load is compared with a shadow memory kept by
// the testbench, writes are counted at the memory (write-through), and the
// latencies of an L1 hit, of an L1 miss that hits in the L2 and of a miss in
// both levels are checked.
// Each mechanism is counted and one that never happens is a failure.
module tb_tscache_top;
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

  // a component's work: a code loop and loads/stores over its data region
  task automatic run_component(input logic [ADDR_W-1:0] code, input logic [ADDR_W-1:0] data,
                               input int n);
    fork
      begin
        int lat;
        for (int i = 0; i < n; i++) fetch(code + 32'((i % 1024) * 4), lat);
      end
      begin
        int lat;
        for (int i = 0; i < n; i++) begin
          logic [ADDR_W-1:0] a;
          a = data + 32'(($urandom % 1024) * 32 + ($urandom % 8) * 4);
          if (($urandom % 4) == 0) daccess(1, a, $urandom, 4'($urandom), lat);
          else                     daccess(0, a, '0, '0, lat);
        end
      end
    join
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

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seed_set_t swc1, swc2, fresh;
    int lat, h0, m0, l2h0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    prng_we = 1; prng_seed = 32'h0BAD_F00D;
    @(negedge clk);
    prng_we = 0;
    check(prng_value == 32'h0BAD_F00D, "PRNG loaded");
    @(negedge clk);
    check(prng_value != 32'h0BAD_F00D && prng_value != 0, "PRNG advances after loading");

    // hyperperiod start: flush and fresh seeds for the first component
    draw_seeds(swc1);
    draw_seeds(swc2);
    check(swc1 != swc2, "components get different seeds");
    os_cmd(CMD_FLUSH, swc1, 0);

    // latency of an L1 miss that hits in the L2, and of an L1 hit
    daccess(0, 32'h2000_0100, '0, '0, lat);          // fills L1 and L2
    daccess(0, 32'h2000_0104, '0, '0, lat);
    check(lat == 1, $sformatf("L1 hit latency %0d (expected 1)", lat));
    os_cmd(CMD_SWITCH, swc2, 0);                       // L1 sets differ now
    os_cmd(CMD_FLUSH, swc1, 0);
    daccess(0, 32'h2000_0100, '0, '0, lat);          // misses both
    check(lat == MEM_LAT + 6, $sformatf("L1 and L2 miss latency %0d (expected %0d)", lat, MEM_LAT + 6));

    // component 1 runs
    run_component(32'h0000_0000, 32'h1000_0000, 3000);

    // a line loaded just before the switch
    daccess(0, 32'h1000_0040, '0, '0, lat);
    // context switch to component 2 while both ports are busy
    fork
      run_component(32'h0001_0000, 32'h1100_0000, 400);
      begin
        repeat (37) @(posedge clk);
        os_cmd(CMD_SWITCH, swc2, 0);
      end
    join
    run_component(32'h0001_0000, 32'h1100_0000, 1500);

    // component 1 loads a line, component 2 runs briefly, and component 1
    // finds its line again without a flush
    os_cmd(CMD_SWITCH, swc1, 0);
    daccess(0, 32'h1000_0040, '0, '0, lat);
    os_cmd(CMD_SWITCH, swc2, 0);
    for (int i = 0; i < 8; i++) daccess(0, 32'h1100_0000 + 32'(i * 32), '0, '0, lat);
    os_cmd(CMD_SWITCH, swc1, 0);
    h0 = c_l1d_hit;
    daccess(0, 32'h1000_0040, '0, '0, lat);
    if (c_l1d_hit == h0 + 1 && lat == 1) c_restore_hit++;
    check(c_restore_hit == 1, "component 1 finds its line again after the switch back");

    // L1 miss / L2 hit latency, with no other traffic: component 1's data
    // region (32 KB) exceeds the L1 but fits the L2
    begin
      int found = 0;
      for (int i = 0; i < 1024 && found == 0; i++) begin
        l2h0 = c_l2_hit; m0 = c_l1d_miss;
        daccess(0, 32'h1000_0000 + 32'(i * 32), '0, '0, lat);
        if (c_l1d_miss == m0 + 1 && c_l2_hit == l2h0 + 1) begin
          found = 1;
          check(lat == 4, $sformatf("L1 miss, L2 hit latency %0d (expected 4)", lat));
        end
      end
      check(found == 1, "an L1 miss that hits in the L2");
    end

    // end of hyperperiod: fresh seeds and flush, then everything misses
    draw_seeds(fresh);
    os_cmd(CMD_FLUSH, fresh, 0);
    m0 = c_l2_miss;
    daccess(0, 32'h1000_0040, '0, '0, lat);
    check(c_l2_miss == m0 + 1, "L2 miss after flush");

    // bypass mode: plain modulo placement, same results
    os_cmd(CMD_FLUSH, fresh, 1);
    check(dut.bypass == 1'b1, "bypass mode on");
    run_component(32'h0002_0000, 32'h1200_0000, 800);
    c_bypass_ops = 800;
    os_cmd(CMD_SWITCH, fresh, 0);

    repeat (MEM_LAT + 5) @(posedge clk);
    check(n_writes == writes_issued, $sformatf("write-through %0d of %0d", n_writes, writes_issued));

    $display("mechanisms: l1i hit %0d miss %0d, l1d hit %0d miss %0d, l2 hit %0d miss %0d",
             c_l1i_hit, c_l1i_miss, c_l1d_hit, c_l1d_miss, c_l2_hit, c_l2_miss);
    $display("mechanisms: evictions %0d, L2 port conflicts %0d, drain-wait cycles %0d, flushes %0d, switches %0d, restore hits %0d, bypass ops %0d",
             c_evict, c_conflict, c_drain, c_flush, c_switch, c_restore_hit, c_bypass_ops);
    check(c_l1i_hit > 0 && c_l1i_miss > 0, "L1I hits and misses");
    check(c_l1d_hit > 0 && c_l1d_miss > 0, "L1D hits and misses");
    check(c_l2_hit > 0 && c_l2_miss > 0, "L2 hits and misses");
    check(c_evict > 0, "random-replacement evictions");
    check(c_conflict > 0, "L1I/L1D contention at the L2");
    check(c_drain > 0, "seed switch waited for in-flight accesses");
    check(c_flush == 4, $sformatf("flushes %0d", c_flush));
    check(c_switch >= 6, "seed switches");
    check(c_bypass_ops > 0, "bypass mode used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
