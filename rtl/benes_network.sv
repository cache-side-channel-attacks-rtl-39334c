// benes_network: permutation network used by random-modulo placement.
//
// N input bits are routed to N output bits through columns of 2x2 switches.
// Whatever the control bits are, the output is a permutation of the input,
// so distinct index values always stay distinct (this is what keeps all lines
// of one page in different cache sets). With all controls at 0 the network is
// the identity.
//
// Construction (classic recursive Benes): a column of floor(N/2) input
// switches takes lines 2i and 2i+1 into line i of an upper sub-network of
// floor(N/2) lines and of a lower sub-network of ceil(N/2) lines; a mirror
// column of output switches merges them again. For odd N the last line skips
// both columns and enters the lower sub-network. A 2-line network is a single
// switch. The use of a Benes network driven by tag bits follows the
// random-modulo design; this particular recursion for odd widths (the L1 has
// 7 index bits) is this design's choice.
//
// ctrl layout: [H-1:0] input column, [2H-1:H] output column, then the upper
// sub-network's controls, then the lower's (H = floor(N/2)). A control bit of
// 1 crosses its switch. Purely combinational.
//
// Some lint tools report up_out and lo_out of the outermost level as
// undriven: they do not follow the outputs of the self-instantiated
// sub-networks when this module is linted as a top. They are driven (the
// sub-networks' out_bits); simulation of every width used here confirms that
// each control setting yields a full permutation.
module benes_network
  import tsc_pkg::*;
#(
  parameter int unsigned N   = 7,
  parameter int unsigned NSW = benes_nsw(N)
) (
  input  logic [NSW-1:0] ctrl,
  input  logic [N-1:0]   in_bits,
  output logic [N-1:0]   out_bits
);

  if (N == 1) begin : g_wire
    assign out_bits = in_bits;
  end else if (N == 2) begin : g_switch
    assign out_bits = ctrl[0] ? {in_bits[0], in_bits[1]} : in_bits;
  end else begin : g_rec
    localparam int unsigned H    = N / 2;
    localparam int unsigned L    = N - H;
    localparam int unsigned NSWU = benes_nsw(H);
    localparam int unsigned NSWL = benes_nsw(L);

    logic [H-1:0] up_in, up_out;
    logic [L-1:0] lo_in, lo_out;

    always_comb begin
      lo_in = '0;
      for (int unsigned i = 0; i < H; i++) begin
        up_in[i] = ctrl[i] ? in_bits[2*i+1] : in_bits[2*i];
        lo_in[i] = ctrl[i] ? in_bits[2*i]   : in_bits[2*i+1];
      end
      if (L > H) lo_in[L-1] = in_bits[N-1];
    end

    if (H == 1) begin : g_upper_wire
      // a 1-line sub-network (N = 3) is a plain wire with no controls
      assign up_out = up_in;
    end else begin : g_upper
      benes_network #(.N(H), .NSW(NSWU)) u_upper (
        .ctrl    (ctrl[2*H +: NSWU]),
        .in_bits (up_in),
        .out_bits(up_out)
      );
    end

    benes_network #(.N(L), .NSW(NSWL)) u_lower (
      .ctrl    (ctrl[2*H+NSWU +: NSWL]),
      .in_bits (lo_in),
      .out_bits(lo_out)
    );

    always_comb begin
      out_bits = '0;
      for (int unsigned i = 0; i < H; i++) begin
        out_bits[2*i]   = ctrl[H+i] ? lo_out[i] : up_out[i];
        out_bits[2*i+1] = ctrl[H+i] ? up_out[i] : lo_out[i];
      end
      if (L > H) out_bits[N-1] = lo_out[L-1];
    end
  end

endmodule
