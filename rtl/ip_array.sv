// Bit-level systolic inner product array (positive arithmetic).
//
// Computes y = sum_i a_i * x_i for N unsigned B-bit coefficients and data
// words, giving a 2B+L bit result (L = growth bits of the accumulation).
// Structure: N rows of B+L main cells (row r holds the coefficient bits of
// coef[r] in its B right-hand cells and zeros in its L left-hand cells),
// followed by one chain of B+L+1 accumulator cells.
//
// Input format: each row's data word enters its row's right edge serially,
// least significant bit first, one bit every second clock (a zero, or a bit
// of a second interleaved computation, in between). Row r's word is one clock
// later than row r-1's, because the accumulating partial products move down
// one row per clock.
//
// Timing (all times in clocks; bit 0 of row 0's word on x_row[0] at time S):
//   result bit w < B     appears on y_acc[0]       at S + N + 2w + 1,
//   result bit w >= B    appears on y_acc[w-B+1]   at S + N + w + B.
// PTRL, entering the rightmost accumulator cell, must be 0 at times
// S+N-2 and S+N-1 (mod 2B) and 1 otherwise: 2B-2 ones then two zeros, as
// published. With one word per 2B clocks the array is 50 percent busy; a
// second computation in the odd slots doubles the throughput.
//
// Array structure and cell functions follow the published design. The port
// layout, the per-row data lines and the exposure of every row's data
// registers (x_reg, used by the filters for their row-to-row feedback) are
// this design's choices.
module ip_array #(
  parameter int unsigned B = 4,   // word length
  parameter int unsigned N = 4,   // rows (vector length)
  parameter int unsigned L = 2    // word growth
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      coef_ld,
  input  logic [N-1:0][B-1:0]       coef,     // coef[r] stored in row r (row 0 on top)
  input  logic [N-1:0]              x_row,    // serial data into the right edge of each row
  input  logic                      ptrl,     // accumulator control, enters on the right
  output logic [B+L:0]              y_acc,    // result bits of the accumulator chain, [0] rightmost
  output logic [N-1:0][B+L-1:0]     x_reg     // data registers of each row, [0] rightmost
);
  localparam int unsigned W = B + L;

  logic [N-1:0][W-1:0] xo, yo, co;
  logic [W:0] s_o, s_r, c_a, p_a;

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < W; c++) begin : g_col
      logic xi, yi, ci, ad;
      assign xi = (c == 0) ? x_row[r] : xo[r][(c == 0) ? 0 : c - 1];
      assign ci = (c == 0) ? 1'b0     : co[r][(c == 0) ? 0 : c - 1];
      assign yi = (r == 0) ? 1'b0     : yo[(r == 0) ? 0 : r - 1][c];
      assign ad = (c < B) ? coef[r][(c < B) ? c : 0] : 1'b0;
      main_cell u_cell (
        .clk(clk), .rst(rst), .a_ld(coef_ld), .a_d(ad),
        .x_i(xi), .y_i(yi), .c_i(ci),
        .x_o(xo[r][c]), .y_o(yo[r][c]), .c_o(co[r][c])
      );
    end
  end

  for (genvar c = 0; c <= W; c++) begin : g_acc
    logic si, yi, ci, pi;
    assign si = (c == W) ? 1'b0 : s_r[(c == W) ? 0 : c + 1];
    assign yi = (c == W) ? 1'b0 : yo[N-1][(c == W) ? 0 : c];
    assign ci = (c == 0) ? 1'b0 : c_a[(c == 0) ? 0 : c - 1];
    assign pi = (c == 0) ? ptrl : p_a[(c == 0) ? 0 : c - 1];
    acc_cell u_acc (
      .clk(clk), .rst(rst), .s_i(si), .y_i(yi), .c_i(ci), .ptrl_i(pi),
      .s_o(s_o[c]), .s_r_o(s_r[c]), .c_o(c_a[c]), .ptrl_o(p_a[c])
    );
  end

  assign y_acc = s_o;
  assign x_reg = xo;
endmodule
