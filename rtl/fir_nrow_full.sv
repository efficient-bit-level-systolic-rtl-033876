// Bit-level systolic FIR filter, data entering at the bottom (Nth) row, 100
// percent cell utilisation for a single data stream.
//
// Computes y_n = sum_{i=0}^{N-1} a_i * x_{n-i} (unsigned B-bit coefficients
// and samples, 2B+L bit result). Consecutive samples arrive in pairs with
// their bits interleaved: x_{2q} on the even clocks and x_{2q+1} on the odd
// clocks of a 2B-clock frame. The array then works on the two data vectors
// X_{2q} and X_{2q+1} at once and delivers y_{2q} and y_{2q+1} every 2B
// clocks, one word per B clocks on average.
//
// Coefficient a_i sits in row N-1-i. The bottom row takes the stream
// directly. Each row above takes its input through a type-I multiplexer:
// on the slots of the even output (SEL = 0) it takes the bit that entered
// the row below 2B-2 clocks earlier (the odd sample of the previous pair:
// B+L clocks through the row plus K' = B-L-3 flip-flops plus one clock for
// the multiplexer's latch); on the slots of the odd output (SEL = 1) it takes
// the bit entering the row below in the same clock. SEL (1 0 1 0 ...) starts
// in the bottom multiplexer and climbs one row per clock.
//
// Interface and timing (t in clocks from the first clock after reset;
// 'frame' is high when t mod 2B = 0):
//   x_in : bit m of x_{2q} at t = 2B*q + 2m, bit m of x_{2q+1} at t+1.
//   y_acc: bit w < B of y_{2q} on y_acc[0] at 2B*q + 2w + 2,
//          bit w >= B on y_acc[w-B+1] at 2B*q + w + B + 1;
//          y_{2q+1} one clock later on the same pins.
// With TC = 1 the array is built on the two's complement inner product array
// (tc_ip_array): coefficients, samples and results are then signed, with the
// same formats and timing; its CTRL, ITRL and PTRL rings are shifted to this
// filter's phase. The published text only says that signed filters follow
// from the signed inner product array; this construction is this design's.
// Structure, delays and control patterns follow the published array. Making
// the multiplexer's selection combinational and counting its latch in the
// feedback delay, which gives the same-clock direct path, is this design's
// choice, as are load, reset and phase reference.
module fir_nrow_full #(
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
  localparam int KP = int'(B) - int'(L) - 3;   // published K'
  localparam int unsigned D = W + KP + 1;      // feedback delay incl. mux latch, 2B-2

  logic [N-1:0][B-1:0] row_coef;
  logic [N-1:0]        x_row;
  logic [N-1:0][W-1:0] x_reg;
  logic [N-1:0]        sel;      // SEL arriving at the multiplexer of row r
  logic [N-1:0]        sel_o;
  logic                sel_src;
  localparam int unsigned PW = $clog2(P);
  logic [PW-1:0]        phase;

  for (genvar r = 0; r < N; r++) begin : g_map
    assign row_coef[r] = coef[N-1-r];
    if (r == N - 1) begin : g_in
      assign x_row[r] = x_in;
      assign sel[r]   = sel_src;   // SEL stream enters below the lowest multiplexer
      assign sel_o[r] = sel_src;
    end else begin : g_mux
      logic fb;
      row_tap #(.W(W), .D(D)) u_tap (.clk(clk), .rst(rst), .xr(x_reg[r+1]), .q(fb));
      assign sel[r] = sel_o[r+1];
      mux_cell_i u_mux (.clk(clk), .rst(rst), .u(fb), .v(x_row[r+1]),
                        .sel_i(sel[r]), .z(x_row[r]), .sel_o(sel_o[r]));
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
    tc_ip_array #(.B(B), .N(N), .L(L), .S0((N * (P - 1) + 1) % P)) u_arr (
      .clk(clk), .rst(rst), .coef_ld(coef_ld), .coef(row_coef), .x_row(x_row),
      .y_acc(y_acc), .x_reg(x_reg));
  end else begin : g_pos
    logic ptrl;
    ctrl_pattern #(.P(P), .INIT(P'(bsa_pkg::window_pattern(P, P - 1, 2, 1'b0)))) u_ptrl (
      .clk(clk), .rst(rst), .q(ptrl));
    ip_array #(.B(B), .N(N), .L(L)) u_arr (
      .clk(clk), .rst(rst), .coef_ld(coef_ld), .coef(row_coef), .x_row(x_row),
      .ptrl(ptrl), .y_acc(y_acc), .x_reg(x_reg));
  end
endmodule
