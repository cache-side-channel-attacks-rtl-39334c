// tb_lfsr_prng: checks the PRNG against a bit-level model of the LFSR
// recurrence (x^32 + x^22 + x^2 + x + 1, Galois form), its reset value, seed
// loading, the zero-seed guard, and that it never reaches the all-zero state.
module tb_lfsr_prng;
  logic        clk = 0, rst_n = 1, seed_we = 0;
  logic [31:0] seed_in = '0, rnd;
  int checks = 0, failures = 0;

  lfsr_prng dut (.clk, .rst_n, .seed_we, .seed_in, .rnd);

  always #5 clk = ~clk;

  // model: out bit s[0] shifts out; it is fed back into bits 31, 21, 1, 0
  function automatic logic [31:0] model_step(input logic [31:0] s);
    logic [31:0] n;
    for (int i = 0; i < 31; i++) n[i] = s[i+1];
    n[31] = 1'b0;
    if (s[0]) begin
      n[31] = ~n[31]; n[21] = ~n[21]; n[1] = ~n[1]; n[0] = ~n[0];
    end
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] m;
    int ones;
    #1 rst_n = 0;
    #1 check(rnd == 32'hACE1_2468, "reset value");
    @(negedge clk) rst_n = 1;
    m = rnd;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      m = model_step(m);
      check(rnd == m, $sformatf("step %0d: %h vs %h", i, rnd, m));
    end
    // load a seed
    seed_we = 1; seed_in = 32'h1234_5678;
    @(negedge clk);
    seed_we = 0;
    check(rnd == 32'h1234_5678, "seed load");
    m = rnd;
    ones = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      m = model_step(m);
      if (rnd != m || rnd == 0) begin
        check(0, $sformatf("after seed step %0d", i));
        break;
      end
      ones += int'(rnd[0]);
    end
    check(1, "sequence after seed");
    check(ones > 1800 && ones < 2200, $sformatf("bit balance %0d/4000", ones));
    // zero seed is replaced by the reset constant
    seed_we = 1; seed_in = '0;
    @(negedge clk);
    seed_we = 0;
    check(rnd == 32'hACE1_2468, "zero seed guard");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
