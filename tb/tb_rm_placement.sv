// tb_rm_placement: checks random-modulo placement with the L1 geometry
// (7 index bits, 20 tag bits):
//  - bypass gives the address index bits (modulo placement);
//  - seed 0 and tag 0 leave the network straight, so the set is the index;
//  - for any seed, the 128 lines of one page fill all 128 sets once;
//  - one line lands in several different sets across seeds;
//  - two lines of different pages share a set for some seeds and not others;
//  - lines whose index bits are equal but tags differ are not always in the
//    same set (no fixed XOR-only mapping).
module tb_rm_placement;
  import tsc_pkg::*;
  localparam int unsigned IDX = 7;
  int checks = 0, failures = 0;

  logic [ADDR_W-1:0] addr;
  logic [SEED_W-1:0] seed;
  logic              bypass;
  logic [IDX-1:0]    set_idx;

  rm_placement #(.IDX_BITS(IDX)) dut (.addr, .seed, .bypass, .set_idx);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [SEED_W-1:0] rseed();
    return {$urandom, $urandom};
  endfunction

  task automatic place(input logic [ADDR_W-1:0] a, input logic [SEED_W-1:0] s,
                       output logic [IDX-1:0] set);
    addr = a; seed = s; #1; set = set_idx;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [IDX-1:0] s1, s2;
    int same, diff, distinct;
    bit  hit [128];
    bit  ok;

    bypass = 1;
    for (int t = 0; t < 100; t++) begin
      logic [ADDR_W-1:0] a;
      a = $urandom;
      place(a, rseed(), s1);
      check(s1 == a[OFF_BITS +: IDX], "bypass is modulo");
    end

    bypass = 0;
    for (int t = 0; t < 50; t++) begin
      logic [ADDR_W-1:0] a;
      a = {20'h0, 7'($urandom), 5'($urandom)};
      place(a, '0, s1);
      check(s1 == a[OFF_BITS +: IDX], "seed 0, tag 0 is modulo");
    end

    // one page (same tag) under random seeds: a permutation of the sets
    for (int t = 0; t < 40; t++) begin
      logic [SEED_W-1:0] sd;
      logic [19:0] tag;
      sd = rseed(); tag = 20'($urandom);
      hit = '{default: 0};
      ok = 1;
      for (int i = 0; i < 128; i++) begin
        place({tag, 7'(i), 5'd0}, sd, s1);
        if (hit[s1]) ok = 0;
        hit[s1] = 1;
      end
      check(ok, $sformatf("page %h fills every set once", tag));
    end

    // one line under many seeds lands in many sets
    begin
      bit seen [128];
      logic [ADDR_W-1:0] a;
      a = 32'h1234_5660;
      seen = '{default: 0};
      distinct = 0;
      for (int t = 0; t < 400; t++) begin
        place(a, rseed(), s1);
        if (!seen[s1]) distinct++;
        seen[s1] = 1;
      end
      check(distinct > 100, $sformatf("line reaches %0d sets", distinct));
    end

    // lines of two pages: sometimes together, sometimes apart
    for (int p = 0; p < 10; p++) begin
      logic [ADDR_W-1:0] a, b;
      a = $urandom; b = $urandom;
      b[OFF_BITS +: IDX] = a[OFF_BITS +: IDX];   // identical index bits
      if (b[31:12] == a[31:12]) b[31] = ~b[31];
      same = 0; diff = 0;
      for (int t = 0; t < 2000; t++) begin
        logic [SEED_W-1:0] sd;
        sd = rseed();
        place(a, sd, s1);
        place(b, sd, s2);
        if (s1 == s2) same++; else diff++;
      end
      check(same > 0 && diff > 0, $sformatf("pair %0d: same %0d diff %0d", p, same, diff));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
