// Bit-level systolic IIR filter.
//
// Computes R_n = sum_{i=0}^{N-1} a_i * x_{n-i} + sum_{j=1}^{M} b_j * yt_{n-j}
// with unsigned B-bit coefficients and samples, where yt_n = R_n >> (B+L) is
// the output truncated to B bits. Read as fractions (samples with the binary
// point in front of the MSB, output with the point in front of bit 2B+L-1),
// this is a unity-gain recursive filter whose fed-back output has the same
// word length as the input.
//
// It is the inner product array with N+M rows. The top N rows hold
// a_{N-1}..a_0 (a_0 in row N-1) and carry the input samples: the stream enters
// row N-1 and, after crossing a row, is fed into the row above. The lower M
// rows hold b_M..b_1 (b_1 at the bottom) and carry the truncated outputs:
// they enter the bottom row and climb in the same way, but never into the
// forward rows. Row-to-row delay is B+L clocks through a row plus j = B+1
// flip-flops, i.e. one sample period minus one.
//
// The truncated output bits (result bits B+L..2B+L-1) leave the accumulator
// chain at columns L+1..B+L, one clock apart. A row of B type-III
// multiplexer cells under those columns loads them as SEL passes leftwards
// and shifts them right, so they leave the rightmost cell LSB first with a
// zero between bits, exactly in the format the bottom row needs one sample
// period after they were computed. This loop fixes the sample period at
// P = 2B+L+2 clocks: 2B-1 clocks of sample bits and a guard band of L+3
// zeros. The multiplexer row also delays the upper result bits by one clock;
// the lower L+1 result bits get one flip-flop each so that all result bits
// keep the inner product array's output format.
//
// Control: PTRL is 2B-2 ones followed by L+4 zeros, SEL is two ones followed
// by 2B+L zeros, both period P, from internal recirculating rings.
//
// Interface and timing (t in clocks from the first clock after reset;
// 'frame' is high when t mod P = 0):
//   x_in : bit m of x_n at t = P*n + 2m; odd clocks may carry a second
//          independent sample stream, filtered with the same coefficients
//          (its results one clock later).
//   y_out: bit w < B of R_n on y_out[0] at P*n + M + 2w + 3,
//          bit w >= B on y_out[w-B+1] at P*n + M + w + B + 2.
// With TC = 1 the array is built on the two's complement inner product array
// (tc_ip_array) with period P: coefficients, samples and results are signed,
// the fed-back word is the top B bits of the signed result (an arithmetic
// shift), and formats and timing are unchanged. Its CTRL and ITRL patterns
// carry zeros in the guard band. The feedback row loads nothing during the
// first period after reset, because the words in flight at reset were never
// complete (this matters only for signed arithmetic, whose correction term
// would otherwise be fed back on its own).
// Structure, cell functions, delays and the control patterns' lengths follow
// the published array. The phases of PTRL and SEL, coefficient load, reset
// and the phase reference are this design's choices. L must be even for the
// two-stream mode (P even).
module iir_array #(
  parameter int unsigned B = 4,
  parameter int unsigned N = 2,   // forward coefficients a_0..a_{N-1}
  parameter int unsigned M = 2,   // feedback coefficients b_1..b_M
  parameter int unsigned L = 2,
  parameter bit          TC = 1'b0   // 1: two's complement coefficients, samples, results
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                coef_ld,
  input  logic [N-1:0][B-1:0] a_coef,   // a_coef[i] = a_i
  input  logic [M-1:0][B-1:0] b_coef,   // b_coef[j-1] = b_j
  input  logic                x_in,
  output logic                frame,
  output logic [B+L:0]        y_out
);
  localparam int unsigned NR = N + M;
  localparam int unsigned W  = B + L;
  localparam int unsigned P  = 2 * B + L + 2;
  localparam int unsigned J  = B + 1;          // published j
  localparam int unsigned D  = W + J;          // row-to-row delay, P-1

  logic [NR-1:0][B-1:0] row_coef;
  logic [NR-1:0]        x_row;
  logic [NR-1:0][W-1:0] x_reg;
  logic [B+L:0]         y_acc;
  logic [B-1:0]         mw, msel, mu;
  logic                 sel_src, sel_ring, started;
  localparam int unsigned PW = $clog2(P);
  logic [PW-1:0]        phase;

  for (genvar r = 0; r < NR; r++) begin : g_row
    if (r < N) begin : g_fwd
      assign row_coef[r] = a_coef[N-1-r];
      if (r == N - 1) begin : g_in
        assign x_row[r] = x_in;
      end else begin : g_fb
        row_tap #(.W(W), .D(D)) u_tap (.clk(clk), .rst(rst), .xr(x_reg[r+1]), .q(x_row[r]));
      end
    end else begin : g_rec
      assign row_coef[r] = b_coef[NR-1-r];
      if (r == NR - 1) begin : g_in
        assign x_row[r] = mw[0];
      end else begin : g_fb
        row_tap #(.W(W), .D(D)) u_tap (.clk(clk), .rst(rst), .xr(x_reg[r+1]), .q(x_row[r]));
      end
    end
  end

  if (TC) begin : g_tc
    // signed array; its own rings produce PTRL, CTRL and ITRL of period P
    tc_ip_array #(.B(B), .N(NR), .L(L), .S0((NR * P + 1 - N) % P), .PER(P),
                  .PZ_LEN(L + 4), .PZ_START((M + 2 * B - 1) % P)) u_arr (
      .clk(clk), .rst(rst), .coef_ld(coef_ld), .coef(row_coef), .x_row(x_row),
      .y_acc(y_acc), .x_reg(x_reg));
  end else begin : g_pos
    logic ptrl;
    ctrl_pattern #(.P(P), .INIT(P'(bsa_pkg::window_pattern(P, (M + 2 * B - 1) % P, L + 4, 1'b0)))) u_ptrl (
      .clk(clk), .rst(rst), .q(ptrl));
    ip_array #(.B(B), .N(NR), .L(L)) u_arr (
      .clk(clk), .rst(rst), .coef_ld(coef_ld), .coef(row_coef), .x_row(x_row),
      .ptrl(ptrl), .y_acc(y_acc), .x_reg(x_reg));
  end

  // type-III multiplexer row under accumulator columns L+1 .. B+L
  for (genvar i = 0; i < B; i++) begin : g_mux
    logic v, s;
    assign v = (i == B - 1) ? 1'b0 : mw[(i == B - 1) ? 0 : i + 1];
    assign s = (i == 0) ? sel_src : msel[(i == 0) ? 0 : i - 1];
    mux_cell_iii u_m (.clk(clk), .rst(rst), .u(y_acc[L+1+i]), .v(v), .sel_i(s),
                      .u_o(mu[i]), .w(mw[i]), .sel_o(msel[i]));
    assign y_out[L+1+i] = mu[i];
  end

  // one-clock delays on the lower result bits
  for (genvar c = 0; c <= L; c++) begin : g_tau
    delay_line #(.D(1)) u_t (.clk(clk), .rst(rst), .d(y_acc[c]), .q(y_out[c]));
  end

  ctrl_pattern #(.P(P), .INIT(P'(bsa_pkg::window_pattern(P, (M + P - 1) % P, 2, 1'b1)))) u_sel (
    .clk(clk), .rst(rst), .q(sel_ring));
  // no result is loaded for feedback before the first full period after
  // reset: the words in flight at reset were never complete
  assign sel_src = sel_ring & started;

  always_ff @(posedge clk) begin
    if (rst || phase == PW'(P - 1)) phase <= '0;
    else                       phase <= phase + 1'b1;
  end
  assign frame = (phase == 0);

  always_ff @(posedge clk) begin
    if (rst)                      started <= 1'b0;
    else if (phase == PW'(P - 1)) started <= 1'b1;
  end
endmodule
