// seed_ctrl: seed registers and seed-change sequencing of the TSCache.
//
// Every software component (and the operating system) runs with its own
// placement seeds, so an attacker component never shares a cache layout with
// its victim. On a context switch between components the operating system
// hands the incoming component's seeds to this block (CMD_SWITCH). Once per
// hyperperiod it hands fresh random seeds and asks for a flush (CMD_FLUSH).
// The cache is not flushed on an ordinary switch: contents stay consistent
// because each component finds its own lines again under its own seed.
//
// Sequencing: an accepted command raises hold, which stops the caches taking
// new accesses; the block waits (DRAIN) until no access is in flight
// (caches_busy = 0), then in one APPLY cycle loads the seed registers and
// bypass mode, pulses flush for CMD_FLUSH and pulses done. Waiting for the
// in-flight accesses, restoring seeds and flushing per hyperperiod follow the
// design; the command port, the APPLY cycle and the reset values (zero seeds,
// randomized placement enabled) are this design's choices.
//
// Timing: with idle caches a command completes in 2 cycles after acceptance
// (DRAIN, APPLY); the new seeds are in use from the cycle after done.
module seed_ctrl
  import tsc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // command port (operating system)
  input  logic      cmd_valid,
  output logic      cmd_ready,
  input  seed_cmd_e cmd,
  input  seed_set_t cmd_seeds,
  input  logic      cmd_bypass,
  output logic      done,
  // cache side
  input  logic      caches_busy,
  output logic      hold,
  output logic      flush,
  output seed_set_t seeds,
  output logic      bypass,
  output logic      ev_drain_wait
);

  typedef enum logic [1:0] { C_IDLE, C_DRAIN, C_APPLY } cstate_e;

  cstate_e   state_q;
  seed_cmd_e cmd_q;
  seed_set_t pend_q;
  logic      pend_bypass_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= C_IDLE;
      cmd_q         <= CMD_SWITCH;
      pend_q        <= '0;
      pend_bypass_q <= 1'b0;
      seeds         <= '0;
      bypass        <= 1'b0;
    end else begin
      unique case (state_q)
        C_IDLE: if (cmd_valid) begin
          cmd_q         <= cmd;
          pend_q        <= cmd_seeds;
          pend_bypass_q <= cmd_bypass;
          state_q       <= C_DRAIN;
        end
        C_DRAIN: if (!caches_busy) state_q <= C_APPLY;
        C_APPLY: begin
          seeds   <= pend_q;
          bypass  <= pend_bypass_q;
          state_q <= C_IDLE;
        end
        default: state_q <= C_IDLE;
      endcase
    end
  end

  assign cmd_ready     = (state_q == C_IDLE);
  assign hold          = (state_q != C_IDLE);
  assign flush         = (state_q == C_APPLY) && (cmd_q == CMD_FLUSH);
  assign done          = (state_q == C_APPLY);
  assign ev_drain_wait = (state_q == C_DRAIN) && caches_busy;

endmodule
