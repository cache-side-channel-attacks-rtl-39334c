// tb_l2_arbiter: two requesters (standing in for the L1 instruction and data
// caches) issue tagged requests through the arbiter to a testbench L2 that
// takes them after a random delay and answers after a random latency.
// Checks: the forwarded request stays stable until taken, every response
// returns to the requester whose request the L2 took, no request is lost or
// duplicated, and when both requesters wait the grant alternates.
module tb_l2_arbiter;
  import tsc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic m0_valid = 0, m0_ready, m0_rvalid;
  logic m1_valid = 0, m1_ready, m1_rvalid;
  mem_req_t m0_req = '0, m1_req = '0, s_req;
  logic s_valid, s_ready = 0, s_rvalid = 0, busy, ev_conflict;

  l2_arbiter dut (.clk, .rst_n,
    .m0_valid, .m0_ready, .m0_req, .m0_rvalid,
    .m1_valid, .m1_ready, .m1_req, .m1_rvalid,
    .s_valid, .s_ready, .s_req, .s_rvalid, .busy, .ev_conflict);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NREQ = 300;
  int done0 = 0, done1 = 0, conflicts = 0, same_twice = 0;
  int last_taken = -1;
  logic [ADDR_W-1:0] taken_addr;

  // L2 model: takes a request after a random wait, answers 1..4 cycles later
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      s_ready = 0;
      if (s_valid) begin
        mem_req_t r0;
        r0 = s_req;
        repeat ($urandom % 3) begin
          @(negedge clk);
          check(s_valid && s_req == r0, "request stable until taken");
        end
        s_ready = 1;
        @(posedge clk);
        taken_addr = s_req.addr;
        @(negedge clk);
        s_ready = 0;
        repeat ($urandom % 4) @(negedge clk);
        s_rvalid = 1;
        @(posedge clk);
        check((m0_rvalid ^ m1_rvalid) && (m1_rvalid == taken_addr[31]),
              "response routed to the requester served");
        @(negedge clk);
        s_rvalid = 0;
      end
    end
  end

  task automatic requester(input int id);
    for (int n = 0; n < NREQ; n++) begin
      mem_req_t r;
      r = '{we: 1'($urandom), addr: {1'(id), 15'd0, 16'(n)}, wdata: $urandom, wstrb: 4'hf};
      @(negedge clk);
      if (id == 0) begin m0_valid = 1; m0_req = r; end
      else         begin m1_valid = 1; m1_req = r; end
      do @(posedge clk); while (!(id == 0 ? m0_ready : m1_ready));
      check(s_req.addr == r.addr, "forwarded request is the requester's");
      @(negedge clk);
      if (id == 0) m0_valid = 0; else m1_valid = 0;
      do @(posedge clk); while (!(id == 0 ? m0_rvalid : m1_rvalid));
      if (id == 0) done0++; else done1++;
      repeat ($urandom % 2) @(negedge clk);
    end
  endtask

  // round-robin: on a cycle where both wait, the winner is not the last served
  always @(posedge clk) if (rst_n) begin
    if (ev_conflict) conflicts++;
    if (ev_conflict && last_taken >= 0) begin
      // the grant decided this cycle goes to the other requester
      if (dut.pick == 1'(last_taken)) same_twice++;
    end
    if (s_valid && s_ready) last_taken = int'(s_req.addr[31]);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      requester(0);
      requester(1);
    join
    repeat (5) @(posedge clk);
    check(done0 == NREQ && done1 == NREQ, $sformatf("completed %0d/%0d", done0, done1));
    check(conflicts > 20, $sformatf("conflicts %0d", conflicts));
    check(same_twice == 0, $sformatf("grant repeated under conflict %0d times", same_twice));
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
