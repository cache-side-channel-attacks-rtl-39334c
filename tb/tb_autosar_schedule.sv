// tb_autosar_schedule: runs the example schedule of a component-based
// automotive application on the full-size TSCache hierarchy, over several
// hyperperiods. Three software components: SWC1 with runnable R1 (10 ms),
// SWC2 with R2 (10 ms) and R3 (20 ms), SWC3 with R4 and R5 (20 ms). Task A
// (10 ms) runs R1, R2; task B (20 ms) runs R3, R4, R5; the operating system
// runs once inside R5. Each hyperperiod (20 ms) is:
//   FLUSH + new seeds, seed(SWC1) R1, seed(SWC2) R2 R3, seed(SWC3) R4 R5,
//   seed(OS) OS, seed(SWC3) rest of R5, | 10 ms: seed(SWC1) R1, seed(SWC2) R2
// so every hyperperiod has one flush (which installs SWC1's seed) and six
// further seed switches. The operating
// system draws four distinct seeds per hyperperiod from the PRNG. Time is
// compressed: each runnable is a fixed list of fetches and loads/stores.
// Checks: all data correct; R2 writes a buffer that R3 (same component, same
// seed) reads back through the cache; the seeds of the components differ;
// R1's first-instance cycle count differs across hyperperiods (R1 sweeps
// 600 lines, more than the 16 KB L1 holds, twice; fresh seeds and random
// replacement give a new cache behaviour every hyperperiod) and is printed as
// the sample an execution-time analysis would collect.
module tb_autosar_schedule;
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
  logic [WORD_W-1:0] last_rdata;
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
    end else begin
      check(d_rdata == e, $sformatf("load %h: %h expected %h", a, d_rdata, e));
      last_rdata = d_rdata;
    end
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

  // one runnable: n fetches from its code and n data accesses that sweep
  // `span` lines of its data region, both with a fixed, repeatable address
  // pattern. Returns the cycles taken.
  task automatic runnable(input int id, input logic [ADDR_W-1:0] code,
                          input logic [ADDR_W-1:0] data, input int n, input int span,
                          output int cycles);
    int t0 = $time;
    fork
      begin
        int lat;
        for (int i = 0; i < n; i++) fetch(code + 32'(((i * 7) % 512) * 4), lat);
      end
      begin
        int lat;
        for (int i = 0; i < n; i++) begin
          logic [ADDR_W-1:0] a;
          a = data + 32'((i % span) * 32 + (i % 8) * 4);
          if (i % 5 == 0) daccess(1, a, 32'(id * 65536 + i), 4'hf, lat);
          else            daccess(0, a, '0, '0, lat);
        end
      end
    join
    cycles = ($time - t0) / 10;
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int HYPER = 6;
  localparam logic [ADDR_W-1:0] CODE1 = 32'h0000_0000, DATA1 = 32'h1000_0000;
  localparam logic [ADDR_W-1:0] CODE2 = 32'h0001_0000, DATA2 = 32'h2000_0000;
  localparam logic [ADDR_W-1:0] CODE3 = 32'h0002_0000, DATA3 = 32'h3000_0000;
  localparam logic [ADDR_W-1:0] CODEOS = 32'h0003_0000, DATAOS = 32'h4000_0000;
  localparam logic [ADDR_W-1:0] BUF2 = 32'h2008_0000;   // R2 -> R3 shared buffer

  int r1_time [HYPER];

  initial begin
    seed_set_t s1, s2, s3, sos;
    int cyc, n_switch_before, lat, distinct;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    prng_we = 1; prng_seed = 32'h2718_2818;
    @(negedge clk);
    prng_we = 0;

    for (int h = 0; h < HYPER; h++) begin
      n_switch_before = c_switch;
      draw_seeds(s1); draw_seeds(s2); draw_seeds(s3); draw_seeds(sos);
      check(s1 != s2 && s1 != s3 && s2 != s3 && sos != s1 && sos != s2 && sos != s3,
            "distinct seeds per component");
      // 0 ms
      os_cmd(CMD_FLUSH, s1, 0);
      runnable(1, CODE1, DATA1, 1200, 600, r1_time[h]);
      os_cmd(CMD_SWITCH, s2, 0);
      runnable(2, CODE2, DATA2, 300, 200, cyc);
      for (int i = 0; i < 16; i++)
        daccess(1, BUF2 + 32'(i * 4), 32'(h * 1000 + i), 4'hf, lat);
      // R3: same component, same seed, reads R2's buffer
      for (int i = 0; i < 16; i++) begin
        daccess(0, BUF2 + 32'(i * 4), '0, '0, lat);
        check(last_rdata == 32'(h * 1000 + i), "R3 reads R2's buffer");
      end
      runnable(3, CODE2 + 32'h800, DATA2 + 32'h4000, 200, 200, cyc);
      os_cmd(CMD_SWITCH, s3, 0);
      runnable(4, CODE3, DATA3, 200, 200, cyc);
      runnable(5, CODE3 + 32'h800, DATA3 + 32'h4000, 100, 200, cyc);
      os_cmd(CMD_SWITCH, sos, 0);
      runnable(6, CODEOS, DATAOS, 60, 200, cyc);
      os_cmd(CMD_SWITCH, s3, 0);
      runnable(5, CODE3 + 32'h800, DATA3 + 32'h4000, 100, 200, cyc);
      // 10 ms
      os_cmd(CMD_SWITCH, s1, 0);
      runnable(1, CODE1, DATA1, 300, 200, cyc);
      os_cmd(CMD_SWITCH, s2, 0);
      runnable(2, CODE2, DATA2, 300, 200, cyc);
      check(c_switch - n_switch_before == 6, "six seed switches per hyperperiod besides the flush");
    end

    distinct = 0;
    for (int h = 0; h < HYPER; h++) begin
      bit seen = 0;
      for (int k = 0; k < h; k++) if (r1_time[k] == r1_time[h]) seen = 1;
      if (!seen) distinct++;
      $display("hyperperiod %0d: R1 took %0d cycles", h, r1_time[h]);
    end
    check(distinct > 1, $sformatf("R1 execution time varies across hyperperiods (%0d distinct)", distinct));
    check(c_flush == HYPER, $sformatf("one flush per hyperperiod (%0d)", c_flush));
    repeat (MEM_LAT + 5) @(posedge clk);
    check(n_writes == writes_issued, "write-through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
