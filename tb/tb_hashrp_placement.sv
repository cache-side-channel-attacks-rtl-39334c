// tb_hashrp_placement: checks hashRP placement with the L2 geometry (11 index
// bits, 27 line-address bits, 7 rotators) against a reference written with
// explicit bit indices: rotator i's amount is seed bits 27+5i.. XOR line bits
// 5i.. (mod 27); copy 0 is the seed's low 27 bits and copies 1..6 the line
// address; bit j of a copy goes to bit (j + amount) mod 27, the copies are XORed, and bit j of
// the result is XORed into set bit j mod 11. Also checks bypass, that one line
// reaches many sets across seeds, and that two lines share a set for some
// seeds only, even two lines of one 4 KB page.
module tb_hashrp_placement;
  import tsc_pkg::*;
  localparam int unsigned IDX = 11, LW = 27, NROT = 7;
  int checks = 0, failures = 0;

  logic [ADDR_W-1:0] addr;
  logic [SEED_W-1:0] seed;
  logic              bypass;
  logic [IDX-1:0]    set_idx;

  hashrp_placement #(.IDX_BITS(IDX), .N_ROT(NROT)) dut (.addr, .seed, .bypass, .set_idx);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [IDX-1:0] ref_set(input logic [ADDR_W-1:0] a, input logic [SEED_W-1:0] s);
    bit v [LW];
    bit h [LW];
    logic [IDX-1:0] r;
    foreach (h[j]) h[j] = 0;
    for (int i = 0; i < NROT; i++) begin
      int amt = 0;
      for (int k = 0; k < 5; k++) amt += int'(s[LW + 5*i + k] ^ a[5 + (5*i + k) % LW]) << k;
      amt = amt % LW;
      for (int j = 0; j < LW; j++) v[j] = (i == 0) ? s[j] : a[5 + j];
      for (int j = 0; j < LW; j++) h[(j + amt) % LW] ^= v[j];
    end
    r = '0;
    for (int j = 0; j < LW; j++) r[j % IDX] ^= h[j];
    return r;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int same, diff, distinct;
    logic [IDX-1:0] s1, s2;

    bypass = 1;
    for (int t = 0; t < 100; t++) begin
      addr = $urandom; seed = {$urandom, $urandom}; #1;
      check(set_idx == addr[5 +: IDX], "bypass is modulo");
    end

    bypass = 0;
    for (int t = 0; t < 2000; t++) begin
      addr = $urandom; seed = {$urandom, $urandom}; #1;
      check(set_idx == ref_set(addr, seed), $sformatf("hash a=%h s=%h", addr, seed));
    end

    begin
      bit seen [2048];
      seen = '{default: 0};
      distinct = 0;
      addr = 32'h0040_1a80;
      for (int t = 0; t < 4000; t++) begin
        seed = {$urandom, $urandom}; #1;
        if (!seen[set_idx]) distinct++;
        seen[set_idx] = 1;
      end
      check(distinct > 1000, $sformatf("line reaches %0d sets", distinct));
    end

    for (int p = 0; p < 10; p++) begin
      logic [ADDR_W-1:0] a, b;
      a = $urandom;
      b = (p < 5) ? {a[31:12], 12'($urandom)} : $urandom;   // same page, then any
      if (b[31:5] == a[31:5]) b[6] = ~b[6];
      same = 0; diff = 0;
      for (int t = 0; t < 20000; t++) begin
        seed = {$urandom, $urandom};
        addr = a; #1; s1 = set_idx;
        addr = b; #1; s2 = set_idx;
        if (s1 == s2) same++; else diff++;
      end
      check(same > 0 && diff > 0, $sformatf("pair %0d: same %0d diff %0d", p, same, diff));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
