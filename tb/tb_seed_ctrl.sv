// tb_seed_ctrl: checks the seed-change sequence. A testbench busy signal
// stands for accesses in flight. Checks: reset seeds are zero, an accepted
// command raises hold at once, seeds do not change while busy stays high,
// done comes one cycle after busy falls (DRAIN sees busy low, APPLY loads the
// seeds), so with idle caches a command completes 2 cycles after acceptance.
// CMD_FLUSH pulses flush once, CMD_SWITCH never does, and the bypass mode
// follows the command.
module tb_seed_ctrl;
  import tsc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_bypass = 0, done;
  seed_cmd_e cmd = CMD_SWITCH;
  seed_set_t cmd_seeds = '0, seeds;
  logic caches_busy = 0, hold, flush, bypass, ev_drain_wait;

  seed_ctrl dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .cmd_seeds,
    .cmd_bypass, .done, .caches_busy, .hold, .flush, .seeds, .bypass, .ev_drain_wait);

  always #5 clk = ~clk;

  int n_flush = 0;
  always @(posedge clk) if (rst_n) n_flush += int'(flush);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // issue a command; busy_cycles of in-flight work follow its acceptance.
  // Returns the cycles from acceptance to the done pulse.
  task automatic issue(input seed_cmd_e c, input seed_set_t s, input logic byp,
                       input int busy_cycles, output int lat);
    seed_set_t prev_seeds = seeds;
    @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_seeds = s; cmd_bypass = byp;
    caches_busy = (busy_cycles > 0);
    @(posedge clk);
    check(cmd_ready, "command accepted when idle");
    @(negedge clk);
    cmd_valid = 0; cmd_seeds = '0;
    check(hold, "hold right after acceptance");
    lat = 1;
    for (int i = 1; i < busy_cycles; i++) begin
      check(seeds == prev_seeds && !done, "no change while accesses are in flight");
      check(ev_drain_wait, "drain wait reported");
      @(negedge clk); lat++;
    end
    caches_busy = 0;
    while (!done) begin @(negedge clk); lat++; end
    check(hold, "hold during apply");
    @(negedge clk);
    check(seeds == s && bypass == byp, "new seeds and mode loaded");
    check(!hold, "hold released");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    seed_set_t s;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(seeds == '0 && !bypass && !hold && cmd_ready, "reset state");

    s = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    issue(CMD_SWITCH, s, 0, 0, lat);
    check(lat == 2, $sformatf("switch with idle caches takes %0d cycles", lat));
    check(n_flush == 0, "switch does not flush");

    for (int b = 2; b < 12; b += 3) begin
      s = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      issue(CMD_SWITCH, s, 1'($urandom), b, lat);
      check(lat == b + 1, $sformatf("switch after %0d busy cycles took %0d", b, lat));
    end
    check(n_flush == 0, "switches do not flush");

    s = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    issue(CMD_FLUSH, s, 0, 4, lat);
    @(posedge clk);
    check(n_flush == 1, $sformatf("flush pulses once (%0d)", n_flush));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
