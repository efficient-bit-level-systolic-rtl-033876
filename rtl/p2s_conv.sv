// Output converter: turns the bit-parallel, time-skewed upper result bits of
// an inner product or FIR array into two bit-serial streams, to save pins.
//
// The array delivers result bit B+i on accumulator column 1+i one clock
// after bit B+i-1 on column i. Two cascaded chains of type-III multiplexer
// cells sit under those columns: a chain of B cells for bits B..2B-1 and a
// chain of L cells for bits 2B..2B+L-1. The control SEL enters the right end
// and moves left one cell per clock through both chains, so each cell loads
// its bit just as it arrives; between loads the cells shift right. Each
// chain's rightmost cell sends its bits out LSB first with a free slot
// between bits (filled by the second of two interleaved results when SEL is
// two ones). The B-bit stream is delayed B clocks so that bits B and 2B leave
// together.
//
// With LO = L the chains swap places: the L-cell chain takes bits
// B..B+L-1 on the right and the B-cell chain takes the most significant B
// bits on the left, so those leave grouped in one stream (the variant the
// published scheme mentions). LO may be any value from 1 to B+L-1.
//
// Interface and timing: y_hi[i] is accumulator output column 1+i (result
// bit B+i). SEL must be 1 at the clock T0 at which bit B of a result is on
// y_hi[0] (and at T0+1 for the second of two interleaved results; the
// published pattern is two ones followed by 2B-2 zeros). Then bit B+k leaves
// on ser_lo, and bit B+LO+k on ser_hi, at T0 + LO + 1 + 2k (with the default
// LO = B: bits B+k and 2B+k at T0 + B + 1 + 2k).
// Structure follows the published scheme; the ports and the LO parameter are
// this design's.
module p2s_conv #(
  parameter int unsigned B = 4,
  parameter int unsigned L = 2,
  parameter int unsigned LO = B   // cells of the right-hand chain: B, or L for the variant
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [B+L-1:0] y_hi,
  input  logic           sel,
  output logic           ser_lo,   // bits B .. B+LO-1
  output logic           ser_hi    // bits B+LO .. 2B+L-1
);
  localparam int unsigned C = B + L;
  logic [C-1:0] w, so, uo;

  for (genvar i = 0; i < C; i++) begin : g_cell
    logic v, s;
    assign v = (i == LO - 1 || i == C - 1) ? 1'b0 : w[(i == C - 1) ? 0 : i + 1];
    assign s = (i == 0) ? sel : so[(i == 0) ? 0 : i - 1];
    mux_cell_iii u_m (.clk(clk), .rst(rst), .u(y_hi[i]), .v(v), .sel_i(s),
                      .u_o(uo[i]), .w(w[i]), .sel_o(so[i]));
  end

  delay_line #(.D(LO)) u_bdel (.clk(clk), .rst(rst), .d(w[0]), .q(ser_lo));
  assign ser_hi = w[LO];
endmodule
