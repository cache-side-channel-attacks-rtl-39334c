// tsc_pkg: types and constants shared by the time-predictable secure cache
// (TSCache) hierarchy.
//
// Sizes: 32-bit byte addresses, 32-bit words and 32-byte cache lines. The line
// size follows from the cache geometry the design targets (16 KB / (128 sets x
// 4 ways) and 256 KB / (2048 sets x 4 ways) both give 32 bytes); the address
// and word width are this design's choice for a 32-bit embedded core. Seeds are
// 64 bits wide, enough for both placement functions (also this design's choice).
//
// mem_req_t is the request bundle used on every link of the hierarchy
// (core -> L1, L1 -> L2 arbiter, arbiter -> L2, L2 -> memory): a read of a
// whole line, or a write-through of one word with byte strobes.
package tsc_pkg;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned WORD_W     = 32;
  localparam int unsigned LINE_BYTES = 32;
  localparam int unsigned LINE_BITS  = LINE_BYTES * 8;
  localparam int unsigned OFF_BITS   = $clog2(LINE_BYTES);
  localparam int unsigned SEED_W     = 64;

  // Placement function of a cache.
  typedef enum logic {
    PLACE_RM     = 1'b0,  // random modulo (Benes network), L1 caches
    PLACE_HASHRP = 1'b1   // hash-based parametric random placement, L2
  } placement_e;

  typedef struct packed {
    logic              we;     // 1 = word write, 0 = line read
    logic [ADDR_W-1:0] addr;   // byte address
    logic [WORD_W-1:0] wdata;  // write data (word at addr[OFF_BITS-1:2])
    logic [3:0]        wstrb;  // byte enables of the write
  } mem_req_t;

  // Seeds of the three caches, held by the seed controller.
  typedef struct packed {
    logic [SEED_W-1:0] l1i;
    logic [SEED_W-1:0] l1d;
    logic [SEED_W-1:0] l2;
  } seed_set_t;

  // Commands the operating system gives the seed controller.
  typedef enum logic {
    CMD_SWITCH = 1'b0,  // context switch between software components: new seeds
    CMD_FLUSH  = 1'b1   // end of hyperperiod: new seeds and flush of all caches
  } seed_cmd_e;

  // Number of 2x2 switches in the recursive Benes network of n lines (see
  // benes_network). A 2-line network is one switch; a network of m > 2 lines
  // has 2*floor(m/2) edge switches plus sub-networks of floor(m/2) and
  // ceil(m/2) lines. At every recursion level the sizes are only q and q+1,
  // so the count is done level by level (cq nets of q lines, cq1 of q+1).
  function automatic int unsigned benes_sw(input int unsigned m);
    return (m == 2) ? 1 : ((m > 2) ? 2 * (m / 2) : 0);
  endfunction

  function automatic int unsigned benes_nsw(input int unsigned n);
    int unsigned q, cq, cq1, nh, nh1, total;
    q = n; cq = 1; cq1 = 0; total = 0;
    while (q >= 1) begin
      total += cq * benes_sw(q) + cq1 * benes_sw(q + 1);
      if (q % 2 == 0) begin
        nh = 2 * cq + cq1; nh1 = cq1;
      end else begin
        nh = cq; nh1 = cq + 2 * cq1;
      end
      q = q / 2; cq = nh; cq1 = nh1;
    end
    return total;
  endfunction

endpackage
