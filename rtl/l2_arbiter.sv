// l2_arbiter: shares the single port of the L2 cache between the L1
// instruction cache (requester 0) and the L1 data cache (requester 1).
//
// One transaction is in flight at a time. When idle, the arbiter grants a
// requesting L1; if both request in the same cycle the one not served last
// wins (round-robin). The grant is registered, so the request forwarded to
// the L2 is stable until the L2 takes it; the single response pulse of the L2
// is routed back to the granted requester, after which the arbiter is idle
// again. The shared L2 is part of the design; the round-robin policy and the
// one-transaction limit are this design's choices.
//
// Ports use the hierarchy's convention (valid/ready request of a mem_req_t,
// one rvalid pulse with the line as answer). busy = 1 while a transaction is
// granted. ev_conflict pulses when both requesters wait in the same cycle.
// Timing: one cycle from an idle request to the forwarded request.
module l2_arbiter
  import tsc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // requester 0 (L1 instruction cache)
  input  logic                 m0_valid,
  output logic                 m0_ready,
  input  mem_req_t             m0_req,
  output logic                 m0_rvalid,
  // requester 1 (L1 data cache)
  input  logic                 m1_valid,
  output logic                 m1_ready,
  input  mem_req_t             m1_req,
  output logic                 m1_rvalid,
  // L2 side
  output logic                 s_valid,
  input  logic                 s_ready,
  output mem_req_t             s_req,
  input  logic                 s_rvalid,
  output logic                 busy,
  output logic                 ev_conflict
);

  typedef enum logic [1:0] { A_IDLE, A_REQ, A_WAIT } astate_e;

  astate_e state_q;
  logic    owner_q;   // granted requester
  logic    last_q;    // requester served last (round-robin pointer)
  logic    pick;

  // both waiting: the one not served last; otherwise whichever is waiting
  assign pick = (m0_valid && m1_valid) ? !last_q : m1_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= A_IDLE;
      owner_q <= 1'b0;
      last_q  <= 1'b1;
    end else begin
      unique case (state_q)
        A_IDLE: if (m0_valid || m1_valid) begin
          owner_q <= pick;
          last_q  <= pick;
          state_q <= A_REQ;
        end
        A_REQ:   if (s_ready)  state_q <= A_WAIT;
        A_WAIT:  if (s_rvalid) state_q <= A_IDLE;
        default: state_q <= A_IDLE;
      endcase
    end
  end

  assign s_valid   = (state_q == A_REQ);
  assign s_req     = owner_q ? m1_req : m0_req;
  assign m0_ready  = (state_q == A_REQ) && !owner_q && s_ready;
  assign m1_ready  = (state_q == A_REQ) &&  owner_q && s_ready;
  assign m0_rvalid = (state_q == A_WAIT) && !owner_q && s_rvalid;
  assign m1_rvalid = (state_q == A_WAIT) &&  owner_q && s_rvalid;
  assign busy      = (state_q != A_IDLE);
  assign ev_conflict = (state_q == A_IDLE) && m0_valid && m1_valid;

endmodule
