// Bit-level systolic FIR filter, data entering at the top row, 50 percent
// cell utilisation for one data stream.
//
// Computes y_n = sum_{i=0}^{N-1} a_i * x_{n-i} (unsigned B-bit coefficients
// and samples, 2B+L bit result). Coefficient a_i sits in row i (a_0 on top),
// the sample stream enters only the top row, and after a bit has crossed a
// row it is delayed and fed into the right edge of the row below. The
// row-to-row delay is 2B+1 clocks: B+L clocks through the row plus
// K = B-L+1 flip-flops. So x_{n-i} enters row i one clock after x_{n-i+1}
// enters row i-1. Data, partial products and results all move downwards,
// which suits cascading chips.
//
// Interface and timing (t in clocks from the first clock after reset;
// 'frame' is high when t mod 2B = 0):
//   x_in : sample x_n, LSB first, bit m at t = 2B*n + 2m; odd clocks carry
//          zeros or a second independent stream (results one clock later).
//   y_acc: bit w < B of y_n on y_acc[0] at 2B*n + N + 2w + 1,
//          bit w >= B on y_acc[w-B+1] at 2B*n + N + w + B.
// PTRL (2B-2 ones, two zeros) comes from an internal recirculating ring.
// With TC = 1 the array is built on the two's complement inner product array
// (tc_ip_array): coefficients, samples and results are then signed, with the
// same formats and timing; its CTRL, ITRL and PTRL rings are shifted to this
// filter's phase. The published text only says that signed filters follow
// from the signed inner product array; this construction is this design's.
// Structure, delays and control pattern follow the published array; load,
// reset and phase reference are this design's choices.
module fir_top_half #(
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
  localparam int K = int'(B) - int'(L) + 1;   // published extra delay
  localparam int unsigned D = W + K;           // row-to-row delay, 2B+1

  logic [N-1:0]        x_row;
  logic [N-1:0][W-1:0] x_reg;
  localparam int unsigned PW = $clog2(P);
  logic [PW-1:0]        phase;

  for (genvar r = 0; r < N; r++) begin : g_map
    if (r == 0) begin : g_in
      assign x_row[r] = x_in;
    end else begin : g_fb
      row_tap #(.W(W), .D(D)) u_tap (.clk(clk), .rst(rst), .xr(x_reg[r-1]), .q(x_row[r]));
    end
  end

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
