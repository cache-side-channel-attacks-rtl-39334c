// mem_model: behavioural main memory for the cache testbenches (not
// synthesizable, no RTL counterpart).
//
// Speaks the hierarchy's downstream protocol: takes one mem_req_t at a time
// (ready while idle), and LATENCY cycles later gives one rvalid pulse. A read
// returns the whole 32-byte line; a write stores the strobed bytes of one word.
// Words never written read as init_word(address), a fixed scramble of the
// word address, so every testbench can compute expected data on its own.
module mem_model
  import tsc_pkg::*;
#(
  parameter int unsigned LATENCY = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,
  output logic                 ready,
  input  mem_req_t             req,
  output logic                 rvalid,
  output logic [LINE_BITS-1:0] rline,
  output int unsigned          n_reads,
  output int unsigned          n_writes
);

  logic [WORD_W-1:0] store [logic [ADDR_W-3:0]];
  mem_req_t    cur;
  int unsigned cnt;
  logic        pending;

  function automatic logic [WORD_W-1:0] init_word(input logic [ADDR_W-3:0] wa);
    return (32'(wa) * 32'h9E37_79B1) ^ 32'h5A5A_1234;
  endfunction

  function automatic logic [WORD_W-1:0] peek(input logic [ADDR_W-3:0] wa);
    return store.exists(wa) ? store[wa] : init_word(wa);
  endfunction

  assign ready = !pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= 1'b0;
      rvalid   <= 1'b0;
      rline    <= '0;
      cnt      <= 0;
      n_reads  <= 0;
      n_writes <= 0;
      cur      <= '0;
    end else begin
      rvalid <= 1'b0;
      if (!pending && valid) begin
        pending <= 1'b1;
        cur     <= req;
        cnt     <= LATENCY;
      end else if (pending) begin
        if (cnt > 1) cnt <= cnt - 1;
        else begin
          pending <= 1'b0;
          rvalid  <= 1'b1;
          if (cur.we) begin
            logic [WORD_W-1:0] w;
            w = peek(cur.addr[ADDR_W-1:2]);
            for (int b = 0; b < 4; b++)
              if (cur.wstrb[b]) w[b*8 +: 8] = cur.wdata[b*8 +: 8];
            store[cur.addr[ADDR_W-1:2]] = w;
            n_writes <= n_writes + 1;
          end else begin
            for (int i = 0; i < LINE_BYTES / 4; i++)
              rline[i*32 +: 32] <= peek({cur.addr[ADDR_W-1:OFF_BITS], (OFF_BITS-2)'(i)});
            n_reads <= n_reads + 1;
          end
        end
      end
    end
  end

endmodule
