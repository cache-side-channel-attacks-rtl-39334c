// tb_benes_network: checks that the Benes network is the identity with all
// switches straight, that every control setting gives a permutation (each
// one-hot input appears at exactly one output and no two inputs share an
// output), and that the controls reach many different permutations. Runs the
// 7-line network of the L1 and an 8-line and 11-line network.
module tb_benes_network;
  import tsc_pkg::*;
  int checks = 0, failures = 0;

  localparam int unsigned N7 = 7, N8 = 8, N11 = 11;
  localparam int unsigned S7 = benes_nsw(N7), S8 = benes_nsw(N8), S11 = benes_nsw(N11);

  logic [S7-1:0]  c7;  logic [N7-1:0]  i7,  o7;
  logic [S8-1:0]  c8;  logic [N8-1:0]  i8,  o8;
  logic [S11-1:0] c11; logic [N11-1:0] i11, o11;

  benes_network #(.N(N7))  u7  (.ctrl(c7),  .in_bits(i7),  .out_bits(o7));
  benes_network #(.N(N8))  u8  (.ctrl(c8),  .in_bits(i8),  .out_bits(o8));
  benes_network #(.N(N11)) u11 (.ctrl(c11), .in_bits(i11), .out_bits(o11));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string seen [string];
    string key;
    // switch counts of the recursive construction: 2-line = 1 switch,
    // 3 = 1+1+1, 4 = 2+2+1+1, 7 = 3+3+S(3)+S(4), 8 = 4+4+2*S(4)
    check(S7 == 15, $sformatf("S(7)=%0d", S7));
    check(S8 == 20, $sformatf("S(8)=%0d", S8));
    // S(11) = 5+5+S(5)+S(6); S(5)=2+2+S(2)+S(3)=8; S(6)=3+3+S(3)+S(3)=12
    check(S11 == 30, $sformatf("S(11)=%0d", S11));

    c7 = '0; c8 = '0; c11 = '0;
    for (int k = 0; k < 200; k++) begin
      i7 = N7'($urandom); i8 = N8'($urandom); i11 = N11'($urandom);
      #1;
      check(o7 == i7 && o8 == i8 && o11 == i11, "identity with zero controls");
    end

    for (int t = 0; t < 300; t++) begin
      logic [N7-1:0] used7; logic [N8-1:0] used8; logic [N11-1:0] used11;
      bit ok;
      c7 = S7'({$urandom, $urandom}); c8 = S8'({$urandom, $urandom});
      c11 = S11'({$urandom, $urandom});
      used7 = '0; used8 = '0; used11 = '0; ok = 1; key = "";
      for (int i = 0; i < N7; i++) begin
        i7 = N7'(1) << i; #1;
        if ($countones(o7) != 1 || (o7 & used7) != 0) ok = 0;
        used7 |= o7;
        key = {key, $sformatf("%0d,", $clog2(o7))};
      end
      for (int i = 0; i < N8; i++) begin
        i8 = N8'(1) << i; #1;
        if ($countones(o8) != 1 || (o8 & used8) != 0) ok = 0;
        used8 |= o8;
      end
      for (int i = 0; i < N11; i++) begin
        i11 = N11'(1) << i; #1;
        if ($countones(o11) != 1 || (o11 & used11) != 0) ok = 0;
        used11 |= o11;
      end
      check(ok && &used7 && &used8 && &used11, $sformatf("permutation, trial %0d", t));
      seen[key] = "";
    end
    check(seen.num() > 100, $sformatf("distinct 7-line permutations %0d", seen.num()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
