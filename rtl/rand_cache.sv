// rand_cache: set-associative cache with seed-driven random placement.
//
// One cache of the TSCache hierarchy. The set of every line is computed from
// its address and the current seed by a placement function chosen with PLACE:
// random modulo (rm_placement) for the L1 caches, hashRP (hashrp_placement)
// for the L2. The victim way on a miss is an invalid way if there is one, and
// otherwise a way picked by random bits from the PRNG (random replacement).
// Changing the seed gives the cache a new, independent random layout without
// any flush: lines of one software component are found again as long as its
// own seed is restored. flush invalidates every line (done once per
// hyperperiod). bypass selects plain modulo placement.
//
// The tag store keeps the whole line address, because hashRP mixes index bits
// into the set: a stored line can be identified whatever the placement.
// Both levels are write-through and no-write-allocate (a write updates a
// hitting line and is always passed down), so a flush only clears valid bits.
// The write policy, the full-address tags and the timing below are this
// design's choices; the geometry defaults (128 sets, 4 ways) are the L1's.
//
// Interface (one access in flight):
//   up_valid/up_ready accept a mem_req_t; exactly one up_rvalid pulse answers
//   it, with the whole line on up_rline and the addressed word on up_rword
//   (for a write it is only an acknowledge). The downstream port uses the same
//   convention: dn_valid holds dn_req stable until dn_ready; one dn_rvalid
//   pulse answers it, with the line for a read.
//   hold = 1 stops new requests (seed change in progress); busy = 1 while an
//   access is in flight. flush is only given while the cache is idle.
// Timing: a read hit answers in the cycle after acceptance (the tag and data
// arrays are read synchronously at the accepting edge and compared in the
// next cycle). A miss adds one cycle to raise the downstream request, then
// that request's latency; the line is written and returned in the cycle the
// fill arrives. A write answers when the level below acknowledges it.
module rand_cache
  import tsc_pkg::*;
#(
  parameter placement_e  PLACE = PLACE_RM,
  parameter int unsigned SETS  = 128,
  parameter int unsigned WAYS  = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration from the seed controller
  input  logic [SEED_W-1:0]    seed,
  input  logic                 bypass,
  input  logic                 flush,
  input  logic                 hold,
  input  logic [31:0]          rnd,
  output logic                 busy,
  // upstream (core or L1) side
  input  logic                 up_valid,
  output logic                 up_ready,
  input  mem_req_t             up_req,
  output logic                 up_rvalid,
  output logic [LINE_BITS-1:0] up_rline,
  output logic [WORD_W-1:0]    up_rword,
  // downstream (L2 or memory) side
  output logic                 dn_valid,
  input  logic                 dn_ready,
  output mem_req_t             dn_req,
  input  logic                 dn_rvalid,
  input  logic [LINE_BITS-1:0] dn_rline,
  // event pulses for statistics
  output logic                 ev_hit,
  output logic                 ev_miss,
  output logic                 ev_evict
);

  localparam int unsigned IDX_BITS = $clog2(SETS);
  localparam int unsigned WAY_BITS = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned LW       = ADDR_W - OFF_BITS;
  localparam int unsigned WSEL     = OFF_BITS - 2;   // word-select bits

  typedef enum logic [2:0] {
    S_IDLE, S_LOOKUP, S_FILL_REQ, S_FILL_WAIT, S_WR_REQ, S_WR_WAIT
  } state_e;

  state_e                state_q;
  mem_req_t              req_q;
  logic [IDX_BITS-1:0]   set_new, set_q;
  logic [WAY_BITS-1:0]   victim_q;

  // ---------------------------------------------------------------- placement
  if (PLACE == PLACE_RM) begin : g_rm
    rm_placement #(.IDX_BITS(IDX_BITS)) u_place (
      .addr(up_req.addr), .seed(seed), .bypass(bypass), .set_idx(set_new));
  end else begin : g_hashrp
    hashrp_placement #(.IDX_BITS(IDX_BITS)) u_place (
      .addr(up_req.addr), .seed(seed), .bypass(bypass), .set_idx(set_new));
  end

  wire accept = up_valid && up_ready;

  // ------------------------------------------------------------------ arrays
  logic [LW-1:0]        tag_rd   [WAYS];
  logic [LINE_BITS-1:0] data_rd  [WAYS];
  logic [WAYS-1:0]      valid_rd;
  logic [SETS-1:0]      valid_q  [WAYS];

  logic                 fill_we, hitwr_we;
  logic [WAY_BITS-1:0]  hit_way;
  logic [LINE_BITS-1:0] merged_line;

  assign fill_we = (state_q == S_FILL_WAIT) && dn_rvalid;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [LW-1:0]        tag_mem  [SETS];
    logic [LINE_BITS-1:0] data_mem [SETS];

    always_ff @(posedge clk) begin
      if (accept) begin
        tag_rd[w]  <= tag_mem[set_new];
        data_rd[w] <= data_mem[set_new];
      end
      if (fill_we && victim_q == WAY_BITS'(w)) begin
        tag_mem[set_q]  <= req_q.addr[ADDR_W-1:OFF_BITS];
        data_mem[set_q] <= dn_rline;
      end else if (hitwr_we && hit_way == WAY_BITS'(w)) begin
        data_mem[set_q] <= merged_line;
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        valid_q[w]  <= '0;
        valid_rd[w] <= 1'b0;
      end else begin
        if (accept)
          valid_rd[w] <= valid_q[w][set_new];
        if (flush)
          valid_q[w] <= '0;
        else if (fill_we && victim_q == WAY_BITS'(w))
          valid_q[w][set_q] <= 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------ lookup
  logic [WAYS-1:0]     hit_vec;
  logic                hit;
  logic [WAY_BITS-1:0] first_free;
  logic                any_free;

  always_comb begin
    hit_vec    = '0;
    hit_way    = '0;
    first_free = '0;
    any_free   = 1'b0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      hit_vec[w] = valid_rd[w] && (tag_rd[w] == req_q.addr[ADDR_W-1:OFF_BITS]);
      if (hit_vec[w]) hit_way = WAY_BITS'(w);
    end
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid_rd[w]) begin
        first_free = WAY_BITS'(w);
        any_free   = 1'b1;
      end
    end
  end
  assign hit = |hit_vec;

  // write-hit data: the addressed word of the hitting line, byte by byte
  always_comb begin
    merged_line = data_rd[hit_way];
    for (int unsigned b = 0; b < 4; b++)
      if (req_q.wstrb[b])
        merged_line[req_q.addr[OFF_BITS-1:2]*WORD_W + b*8 +: 8] = req_q.wdata[b*8 +: 8];
  end

  assign hitwr_we = (state_q == S_LOOKUP) && req_q.we && hit;

  // ------------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      req_q    <= '0;
      set_q    <= '0;
      victim_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (accept) begin
          req_q   <= up_req;
          set_q   <= set_new;
          state_q <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (req_q.we)
            state_q <= S_WR_REQ;
          else if (!hit) begin
            victim_q <= any_free ? first_free : rnd[WAY_BITS-1:0];
            state_q  <= S_FILL_REQ;
          end else
            state_q <= S_IDLE;
        end
        S_FILL_REQ:  if (dn_ready)  state_q <= S_FILL_WAIT;
        S_FILL_WAIT: if (dn_rvalid) state_q <= S_IDLE;
        S_WR_REQ:    if (dn_ready)  state_q <= S_WR_WAIT;
        S_WR_WAIT:   if (dn_rvalid) state_q <= S_IDLE;
        default:     state_q <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state_q != S_IDLE);
  assign up_ready = (state_q == S_IDLE) && !hold && !flush;

  always_comb begin
    dn_valid = 1'b0;
    dn_req   = req_q;
    if (state_q == S_FILL_REQ) begin
      dn_valid             = 1'b1;
      dn_req.we            = 1'b0;
      dn_req.addr          = {req_q.addr[ADDR_W-1:OFF_BITS], {OFF_BITS{1'b0}}};
      dn_req.wdata         = '0;
      dn_req.wstrb         = '0;
    end else if (state_q == S_WR_REQ) begin
      dn_valid             = 1'b1;
    end
  end

  always_comb begin
    up_rvalid = 1'b0;
    up_rline  = '0;
    unique case (state_q)
      S_LOOKUP: if (!req_q.we && hit) begin
        up_rvalid = 1'b1;
        up_rline  = data_rd[hit_way];
      end
      S_FILL_WAIT: if (dn_rvalid) begin
        up_rvalid = 1'b1;
        up_rline  = dn_rline;
      end
      S_WR_WAIT: up_rvalid = dn_rvalid;
      default: ;
    endcase
    up_rword = up_rline[req_q.addr[OFF_BITS-1:2]*WORD_W +: WORD_W];
  end

  assign ev_hit   = (state_q == S_LOOKUP) && hit;
  assign ev_miss  = (state_q == S_LOOKUP) && !hit;
  assign ev_evict = (state_q == S_LOOKUP) && !hit && !req_q.we && !any_free;

  // -------------------------------------------------------------- assertions
  // Handshake rules, checked in simulation: a downstream request stays up and
  // unchanged until it is taken, and flush only comes while the cache is idle.
  logic     dn_wait_q;
  mem_req_t dn_req_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_wait_q <= 1'b0;
      dn_req_q  <= '0;
    end else begin
      dn_wait_q <= dn_valid && !dn_ready;
      dn_req_q  <= dn_req;
      if (dn_wait_q)
        a_dn_stable: assert (dn_valid && dn_req == dn_req_q)
          else $error("rand_cache: downstream request dropped or changed before dn_ready");
      if (flush)
        a_flush_idle: assert (state_q == S_IDLE)
          else $error("rand_cache: flush while an access is in flight");
    end
  end

  if (WSEL == 0) begin : g_bad_line
    $error("rand_cache: a line must hold at least two words");
  end

endmodule
