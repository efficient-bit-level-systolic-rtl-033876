// Bit-level systolic inner product array for two's complement arithmetic.
//
// Computes y = sum_i a_i * x_i modulo 2^(2B+L) for N signed B-bit
// coefficients and data words (N = 2^L), so the 2B+L bit result is the exact
// signed inner product. Data format, data flow and timing are those of the
// positive-arithmetic array (ip_array), with two additions:
//  * Every main cell complements its partial product when its CTRL bit is 1.
//    CTRL bits enter the top of each of the B coefficient columns and move
//    down with the accumulating partial products; they are 1 exactly where a
//    sign bit meets a non-sign bit, which turns each signed product into a
//    sum of positive terms plus the constant 2^B - 2^(2B-1).
//  * The constant N*(2^B - 2^(2B-1)) is added by an extra leftmost column of
//    N one-clock delays whose input ITRL carries the constant's upper bits,
//    one per lane, into the leftmost accumulator cell.
// CTRL and ITRL are period-2B patterns held in recirculating rings; they
// serve two interleaved computations (the published ITRL 1 1 0 0 0 1 1
// for B = N = 4).
//
// Interface and timing (t in clocks from the first clock after reset, S0 the
// phase parameter):
//   x_row[r]: bit m of row r's word at t = 2B*p + S0 + r + 2m for the p-th
//             product (a second interleaved product one clock later).
//   y_acc  : bit w < B on y_acc[0] at 2B*p + S0 + N + 2w + 1,
//            bit w >= B on y_acc[w-B+1] at 2B*p + S0 + N + w + B.
//   x_reg  : every main cell's data register, so that the FIR filters can
//            feed one row from another as in the positive-arithmetic array.
// By default the word period PER is 2B and PTRL has two zeros, as above. The
// IIR filter sets PER = 2B+L+2 and its own PTRL window (PZ_START, PZ_LEN);
// CTRL and ITRL are then zero in the clocks after the 2B data clocks.
// Cell function and the correction method follow the published design; the
// ring registers, ports and phase reference are this design's choices.
module tc_ip_array #(
  parameter int unsigned B = 4,
  parameter int unsigned N = 4,
  parameter int unsigned L = 2,
  parameter int unsigned S0 = 0,  // phase (mod PER) of bit 0 of row 0's word
  parameter int unsigned PER = 2 * B,                          // word period
  parameter int unsigned PZ_LEN = 2,                           // PTRL zeros
  parameter int unsigned PZ_START = (S0 + N + PER - 2) % PER   // first PTRL zero
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  coef_ld,
  input  logic [N-1:0][B-1:0]   coef,     // signed coefficient of row r
  input  logic [N-1:0]          x_row,
  output logic [B+L:0]          y_acc,
  output logic [N-1:0][B+L-1:0] x_reg     // data registers of each row, [0] rightmost
);
  localparam int unsigned W = B + L;
  localparam int unsigned P = PER;

  logic [N-1:0][W-1:0] xo, yo, co;
  logic [N-1:0][B-1:0] ko;
  logic [B-1:0] ctrl_top;
  logic [W:0] s_o, s_r, c_a, p_a;
  logic ptrl, itrl, itrl_d;

  for (genvar c = 0; c < B; c++) begin : g_ctrl
    ctrl_pattern #(.P(P), .INIT(P'(bsa_pkg::rotate_pattern(P, bsa_pkg::tc_ctrl_pattern(B, c, P), S0)))) u_c (
      .clk(clk), .rst(rst), .q(ctrl_top[c]));
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < W; c++) begin : g_col
      logic xi, yi, ci, ad;
      assign xi = (c == 0) ? x_row[r] : xo[r][(c == 0) ? 0 : c - 1];
      assign ci = (c == 0) ? 1'b0     : co[r][(c == 0) ? 0 : c - 1];
      assign yi = (r == 0) ? 1'b0     : yo[(r == 0) ? 0 : r - 1][c];
      assign ad = (c < B) ? coef[r][(c < B) ? c : 0] : 1'b0;
      if (c < B) begin : g_tc
        logic ki;
        assign ki = (r == 0) ? ctrl_top[c] : ko[(r == 0) ? 0 : r - 1][c];
        tc_main_cell u_cell (
          .clk(clk), .rst(rst), .a_ld(coef_ld), .a_d(ad),
          .x_i(xi), .y_i(yi), .c_i(ci), .ctrl_i(ki),
          .x_o(xo[r][c]), .y_o(yo[r][c]), .c_o(co[r][c]), .ctrl_o(ko[r][c]));
      end else begin : g_pos
        // growth columns hold zero coefficients and never complement
        main_cell u_cell (
          .clk(clk), .rst(rst), .a_ld(coef_ld), .a_d(ad),
          .x_i(xi), .y_i(yi), .c_i(ci),
          .x_o(xo[r][c]), .y_o(yo[r][c]), .c_o(co[r][c]));
      end
    end
  end

  // correction column: ITRL through N one-clock delays
  ctrl_pattern #(.P(P), .INIT(P'(bsa_pkg::rotate_pattern(P, bsa_pkg::tc_itrl_pattern(B, L, N, P), S0)))) u_itrl (
    .clk(clk), .rst(rst), .q(itrl));
  delay_line #(.D(N)) u_icol (.clk(clk), .rst(rst), .d(itrl), .q(itrl_d));

  ctrl_pattern #(.P(P), .INIT(P'(bsa_pkg::window_pattern(P, PZ_START, PZ_LEN, 1'b0)))) u_ptrl (
    .clk(clk), .rst(rst), .q(ptrl));

  for (genvar c = 0; c <= W; c++) begin : g_acc
    logic si, yi, ci, pi;
    assign si = (c == W) ? 1'b0   : s_r[(c == W) ? 0 : c + 1];
    assign yi = (c == W) ? itrl_d : yo[N-1][(c == W) ? 0 : c];
    assign ci = (c == 0) ? 1'b0   : c_a[(c == 0) ? 0 : c - 1];
    assign pi = (c == 0) ? ptrl   : p_a[(c == 0) ? 0 : c - 1];
    acc_cell u_acc (
      .clk(clk), .rst(rst), .s_i(si), .y_i(yi), .c_i(ci), .ptrl_i(pi),
      .s_o(s_o[c]), .s_r_o(s_r[c]), .c_o(c_a[c]), .ptrl_o(p_a[c]));
  end

  assign y_acc = s_o;
  assign x_reg = xo;

  initial assert ((1 << L) == N) else $error("tc_ip_array needs N = 2^L");
endmodule
