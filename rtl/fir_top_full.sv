// Bit-level systolic FIR filter, data entering at the top row, 100 percent
// cell utilisation for a single data stream.
//
// Computes y_n = sum_{i=0}^{N-1} a_i * x_{n-i} (unsigned B-bit coefficients
// and samples, 2B+L bit result). As in the bottom-fed full-rate array, the
// samples arrive in pairs with interleaved bits (x_{2q} on even clocks,
// x_{2q+1} on odd clocks of a 2B-clock frame) and two consecutive outputs
// are produced every 2B clocks.
//
// Coefficient a_i sits in row i (a_0 on top). The top row takes the stream
// directly; each row below takes its input through a type-II multiplexer:
// on the even-output slots (SEL = 0) the bit that entered the row above 2B
// clocks earlier (B+L clocks through the row, K' = B-L-2 flip-flops, one
// further flip-flop and the multiplexer's latch), on the odd-output slots
// (SEL = 1) the bit that entered the row above 2 clocks earlier (one
// flip-flop plus the multiplexer's latch). SEL (alternating) enters the top
// multiplexer and moves down one row per clock.
//
// Interface and timing (t in clocks from the first clock after reset;
// 'frame' is high when t mod 2B = 0):
//   x_in : bit m of x_{2q} at t = 2B*q + 2m, bit m of x_{2q+1} at t+1.
//   y_acc: bit w < B of y_{2q} on y_acc[0] at 2B*q + N + 2w + 1,
//          bit w >= B on y_acc[w-B+1] at 2B*q + N + w + B;
//          y_{2q+1} one clock later.
// With TC = 1 the array is built on the two's complement inner product array
// (tc_ip_array): coefficients, samples and results are then signed, with the
// same formats and timing; its CTRL, ITRL and PTRL rings are shifted to this
// filter's phase. The published text only says that signed filters follow
// from the signed inner product array; this construction is this design's.
// Structure, delays and control patterns follow the published array; the
// combinational selection (its latch counted in the delay lines), the SEL
// phase that results from it, load, reset and phase reference are this
// design's choices.
module fir_top_full #(
  parameter int unsigned B = 4,
  parameter int unsigned N = 4,
  parameter int unsigned L = 2,
  parameter bit          TC = 1'b0   // 1: two's complement coefficients and samples
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                coef_ld,
  input  logic [N-1:0][B-1:0] coef,    // coef[i] = a_i
  input  logic                x_in,
  output logic                frame,
  output logic [B+L:0]        y_acc
);
  localparam int unsigned P = 2 * B;
  localparam int unsigned W = B + L;
  localparam int KP = int'(B) - int'(L) - 2;   // published K'
  localparam int unsigned D = W + KP + 2;      // feedback delay: row, K', tau, mux latch = 2B

  logic [N-1:0]        x_row;
  logic [N-1:0][W-1:0] x_reg;
  logic [N-1:0]        sel_o;    // SEL leaving the multiplexer of row r (row 0: source)
  logic                sel_src;
  localparam int unsigned PW = $clog2(P);
  logic [PW-1:0]        phase;

  for (genvar r = 0; r < N; r++) begin : g_map
    if (r == 0) begin : g_in
      assign x_row[r] = x_in;
      assign sel_o[r] = sel_src;
    end else begin : g_mux
      logic fb, dir;
      row_tap #(.W(W), .D(D)) u_tap (.clk(clk), .rst(rst), .xr(x_reg[r-1]), .q(fb));
      delay_line #(.D(2)) u_dir (.clk(clk), .rst(rst), .d(x_row[r-1]), .q(dir));
      mux_cell_ii u_mux (.clk(clk), .rst(rst), .x(fb), .y(dir),
                         .sel_i(sel_o[r-1]), .z(x_row[r]), .sel_o(sel_o[r]));
    end
  end

  ctrl_pattern #(.P(P), .INIT(P'(bsa_pkg::alt_pattern(P, 0)))) u_sel (
    .clk(clk), .rst(rst), .q(sel_src));

  always_ff @(posedge clk) begin
    if (rst || phase == PW'(P - 1)) phase <= '0;
    else                       phase <= phase + 1'b1;
  end
  assign frame = (phase == 0);

  if (TC) begin : g_tc
    // signed array; its own rings produce PTRL, CTRL and ITRL in this phase
    tc_ip_array #(.B(B), .N(N), .L(L), .S0(0)) u_arr (
      .clk(clk), .rst(rst), .coef_ld(coef_ld), .coef(coef), .x_row(x_row),
      .y_acc(y_acc), .x_reg(x_reg));
  end else begin : g_pos
    logic ptrl;
    ctrl_pattern #(.P(P), .INIT(P'(bsa_pkg::window_pattern(P, (N + P - 2) % P, 2, 1'b0)))) u_ptrl (
      .clk(clk), .rst(rst), .q(ptrl));
    ip_array #(.B(B), .N(N), .L(L)) u_arr (
      .clk(clk), .rst(rst), .coef_ld(coef_ld), .coef(coef), .x_row(x_row),
      .ptrl(ptrl), .y_acc(y_acc), .x_reg(x_reg));
  end
endmodule
