// tb_rand_cache: drives one random-modulo cache (8 sets, 2 ways, so that
// evictions are frequent) over a behavioural memory, and compares every read
// with a shadow copy of memory kept by the testbench. Covers read miss and
// fill, read hit in the cycle after acceptance, write hit and write miss with
// byte strobes (write-through: every write reaches memory), random
// replacement, a seed change without flush (data stays correct), flush
// (everything misses afterwards), hold (no request is taken) and bypass.
module tb_rand_cache;
  import tsc_pkg::*;
  localparam int unsigned SETS = 8, WAYS = 2, MEM_LAT = 5;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [SEED_W-1:0] seed = '0;
  logic bypass = 0, flush = 0, hold = 0;
  logic [31:0] rnd;
  logic busy;
  logic up_valid = 0, up_ready, up_rvalid;
  mem_req_t up_req = '0;
  logic [LINE_BITS-1:0] up_rline, dn_rline;
  logic [WORD_W-1:0] up_rword;
  logic dn_valid, dn_ready, dn_rvalid;
  mem_req_t dn_req;
  logic ev_hit, ev_miss, ev_evict;
  int unsigned n_reads, n_writes;

  rand_cache #(.PLACE(PLACE_RM), .SETS(SETS), .WAYS(WAYS)) dut (
    .clk, .rst_n, .seed, .bypass, .flush, .hold, .rnd, .busy,
    .up_valid, .up_ready, .up_req, .up_rvalid, .up_rline, .up_rword,
    .dn_valid, .dn_ready, .dn_req, .dn_rvalid, .dn_rline,
    .ev_hit, .ev_miss, .ev_evict);

  mem_model #(.LATENCY(MEM_LAT)) u_mem (
    .clk, .rst_n, .valid(dn_valid), .ready(dn_ready), .req(dn_req),
    .rvalid(dn_rvalid), .rline(dn_rline), .n_reads, .n_writes);

  always #5 clk = ~clk;
  always_ff @(posedge clk) rnd <= $urandom;

  int n_hit = 0, n_miss = 0, n_evict = 0;
  always @(posedge clk) if (rst_n) begin
    n_hit   += int'(ev_hit);
    n_miss  += int'(ev_miss);
    n_evict += int'(ev_evict);
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

  // one access; lat = cycles from the accepting edge to the response edge
  task automatic access(input logic we, input logic [ADDR_W-1:0] a,
                        input logic [WORD_W-1:0] wd, input logic [3:0] st,
                        output logic [WORD_W-1:0] rd, output int lat);
    @(negedge clk);
    up_valid = 1; up_req = '{we: we, addr: a, wdata: wd, wstrb: st};
    @(posedge clk);
    while (!up_ready) @(posedge clk);
    @(negedge clk);
    up_valid = 0;
    lat = 1;
    while (!up_rvalid) begin @(negedge clk); lat++; end
    rd = up_rword;
    @(posedge clk); #1;   // let the event counters see the response cycle
    if (we) begin
      logic [WORD_W-1:0] w = expect_word(a);
      for (int b = 0; b < 4; b++) if (st[b]) w[b*8 +: 8] = wd[b*8 +: 8];
      shadow[a[ADDR_W-1:2]] = w;
      writes_issued++;
    end
  endtask

  task automatic random_ops(input int n, input logic [ADDR_W-1:0] base);
    logic [WORD_W-1:0] rd;
    int lat;
    for (int i = 0; i < n; i++) begin
      logic [ADDR_W-1:0] a;
      logic we;
      a = base + ((($urandom % 48) * 32) | (($urandom % 8) * 4));
      we = ($urandom % 10) < 3;
      if (we) access(1, a, $urandom, 4'($urandom), rd, lat);
      else begin
        logic [WORD_W-1:0] e = expect_word(a);
        access(0, a, '0, '0, rd, lat);
        check(rd == e, $sformatf("read %h: got %h expected %h", a, rd, e));
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WORD_W-1:0] rd;
    int lat, h0, m0;
    seed = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // miss, then hit in the cycle after acceptance
    m0 = n_miss;
    access(0, 32'h0000_1044, '0, '0, rd, lat);
    check(rd == expect_word(32'h0000_1044), "first read data");
    check(n_miss == m0 + 1, "first read misses");
    check(lat > MEM_LAT, $sformatf("miss latency %0d", lat));
    h0 = n_hit;
    access(0, 32'h0000_1048, '0, '0, rd, lat);
    check(rd == expect_word(32'h0000_1048), "second read data");
    check(n_hit == h0 + 1, "second read in the same line hits");
    check(lat == 1, $sformatf("hit latency %0d (expected 1)", lat));

    // write hit updates the line and goes through to memory
    access(1, 32'h0000_1044, 32'hDEAD_BEEF, 4'b0101, rd, lat);
    access(0, 32'h0000_1044, '0, '0, rd, lat);
    check(rd == expect_word(32'h0000_1044), "read after write hit");
    check(lat == 1, "read after write hit is a hit");

    random_ops(1500, 32'h0002_0000);
    check(n_evict > 0, $sformatf("evictions %0d", n_evict));

    // seed change without flush
    seed = {$urandom, $urandom};
    random_ops(500, 32'h0002_0000);

    // flush: the line read just before misses afterwards
    access(0, 32'h0000_3000, '0, '0, rd, lat);
    access(0, 32'h0000_3000, '0, '0, rd, lat);
    check(lat == 1, "line present before flush");
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    m0 = n_miss;
    access(0, 32'h0000_3000, '0, '0, rd, lat);
    check(n_miss == m0 + 1 && lat > 1, "miss after flush");
    check(rd == expect_word(32'h0000_3000), "data after flush");

    // hold: a waiting request is not taken
    @(negedge clk);
    hold = 1; up_valid = 1; up_req = '{we: 0, addr: 32'h40, wdata: 0, wstrb: 0};
    begin
      int taken = 0;
      repeat (10) begin @(posedge clk); if (up_ready) taken++; end
      check(taken == 0 && !busy, "hold blocks requests");
    end
    @(negedge clk); up_valid = 0; hold = 0;

    // bypass (modulo placement)
    bypass = 1;
    random_ops(500, 32'h0003_0000);
    bypass = 0;

    repeat (MEM_LAT + 3) @(posedge clk);
    check(n_writes == writes_issued, $sformatf("write-through %0d of %0d", n_writes, writes_issued));
    check(n_hit > 100 && n_miss > 100, $sformatf("hits %0d misses %0d", n_hit, n_miss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
