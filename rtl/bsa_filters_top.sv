// Bit-level systolic FIR and IIR filter arrays, side by side.
//
// The filter arrays and the two's complement inner product array share
// only clock, reset and the coefficient load strobe; each has its own
// coefficients, serial sample input, phase strobe and result outputs:
//   fa : FIR, samples enter the bottom row, two interleaved channels
//   fb : FIR, samples enter the top row, two interleaved channels
//   fc : FIR, bottom row input, full rate for one stream; its upper result
//        bits also go through the bit-parallel to bit-serial converter, so
//        each result is available on three serial pins (fc_y_lo, fc_ser_lo,
//        fc_ser_hi)
//   fd : FIR, top row input, full rate for one stream
//   fs : the fc array in its two's complement form (signed coefficients,
//        samples and results), full rate for one stream
//   ir : IIR with N forward and M feedback coefficients
//   is : the IIR array in its two's complement form
//   tc : two's complement inner product array
// The formats and timing of each part are described in its own module. For
// the converter on fc, bit B of result y_{2q} is on accumulator column 1 at
// clock 2B*q + 2B + 1, so its SEL ring holds two ones at phases 1 and 2 of
// the 2B-clock frame; fc's bits B+k and 2B+k then leave fc_ser_lo and
// fc_ser_hi at 2B*q + 3B + 2 + 2k, and bit k < B leaves fc_y_lo at
// 2B*q + 2k + 2 (y_{2q+1} one clock later each).
module bsa_filters_top #(
  parameter int unsigned B  = 4,   // word length of the FIR and inner product arrays
  parameter int unsigned N  = 4,   // FIR taps / inner product length
  parameter int unsigned L  = 2,   // word growth, log2 N
  parameter int unsigned IB = 4,   // IIR word length
  parameter int unsigned IN = 2,   // IIR forward coefficients
  parameter int unsigned IM = 2,   // IIR feedback coefficients
  parameter int unsigned IL = 2    // IIR word growth
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   coef_ld,
  // FIR, bottom-row input, 50 percent
  input  logic [N-1:0][B-1:0]    fa_coef,
  input  logic                   fa_x,
  output logic                   fa_frame,
  output logic [B+L:0]           fa_y,
  // FIR, top-row input, 50 percent
  input  logic [N-1:0][B-1:0]    fb_coef,
  input  logic                   fb_x,
  output logic                   fb_frame,
  output logic [B+L:0]           fb_y,
  // FIR, bottom-row input, 100 percent, with serial output converter
  input  logic [N-1:0][B-1:0]    fc_coef,
  input  logic                   fc_x,
  output logic                   fc_frame,
  output logic [B+L:0]           fc_y,
  output logic                   fc_y_lo,
  output logic                   fc_ser_lo,
  output logic                   fc_ser_hi,
  // FIR, top-row input, 100 percent
  input  logic [N-1:0][B-1:0]    fd_coef,
  input  logic                   fd_x,
  output logic                   fd_frame,
  output logic [B+L:0]           fd_y,
  // FIR, bottom-row input, 100 percent, two's complement
  input  logic [N-1:0][B-1:0]    fs_coef,
  input  logic                   fs_x,
  output logic                   fs_frame,
  output logic [B+L:0]           fs_y,
  // IIR
  input  logic [IN-1:0][IB-1:0]  ir_a,
  input  logic [IM-1:0][IB-1:0]  ir_b,
  input  logic                   ir_x,
  output logic                   ir_frame,
  output logic [IB+IL:0]         ir_y,
  // IIR, two's complement
  input  logic [IN-1:0][IB-1:0]  is_a,
  input  logic [IM-1:0][IB-1:0]  is_b,
  input  logic                   is_x,
  output logic                   is_frame,
  output logic [IB+IL:0]         is_y,
  // two's complement inner product
  input  logic [N-1:0][B-1:0]    tc_coef,
  input  logic [N-1:0]           tc_x,
  output logic [B+L:0]           tc_y
);
  localparam int unsigned P = 2 * B;
  logic fc_sel;
  logic [N-1:0][B+L-1:0] tc_x_reg;   // row data registers, not used here

  fir_nrow_half #(.B(B), .N(N), .L(L)) u_fa (
    .clk(clk), .rst(rst), .coef_ld(coef_ld), .coef(fa_coef), .x_in(fa_x),
    .frame(fa_frame), .y_acc(fa_y));

  fir_top_half #(.B(B), .N(N), .L(L)) u_fb (
    .clk(clk), .rst(rst), .coef_ld(coef_ld), .coef(fb_coef), .x_in(fb_x),
    .frame(fb_frame), .y_acc(fb_y));

  fir_nrow_full #(.B(B), .N(N), .L(L)) u_fc (
    .clk(clk), .rst(rst), .coef_ld(coef_ld), .coef(fc_coef), .x_in(fc_x),
    .frame(fc_frame), .y_acc(fc_y));

  ctrl_pattern #(.P(P), .INIT(P'(bsa_pkg::window_pattern(P, 1, 2, 1'b1)))) u_fc_sel (
    .clk(clk), .rst(rst), .q(fc_sel));

  p2s_conv #(.B(B), .L(L)) u_fc_p2s (
    .clk(clk), .rst(rst), .y_hi(fc_y[B+L:1]), .sel(fc_sel),
    .ser_lo(fc_ser_lo), .ser_hi(fc_ser_hi));
  assign fc_y_lo = fc_y[0];

  fir_top_full #(.B(B), .N(N), .L(L)) u_fd (
    .clk(clk), .rst(rst), .coef_ld(coef_ld), .coef(fd_coef), .x_in(fd_x),
    .frame(fd_frame), .y_acc(fd_y));

  fir_nrow_full #(.B(B), .N(N), .L(L), .TC(1'b1)) u_fs (
    .clk(clk), .rst(rst), .coef_ld(coef_ld), .coef(fs_coef), .x_in(fs_x),
    .frame(fs_frame), .y_acc(fs_y));

  iir_array #(.B(IB), .N(IN), .M(IM), .L(IL)) u_ir (
    .clk(clk), .rst(rst), .coef_ld(coef_ld), .a_coef(ir_a), .b_coef(ir_b),
    .x_in(ir_x), .frame(ir_frame), .y_out(ir_y));

  iir_array #(.B(IB), .N(IN), .M(IM), .L(IL), .TC(1'b1)) u_is (
    .clk(clk), .rst(rst), .coef_ld(coef_ld), .a_coef(is_a), .b_coef(is_b),
    .x_in(is_x), .frame(is_frame), .y_out(is_y));

  tc_ip_array #(.B(B), .N(N), .L(L)) u_tc (
    .clk(clk), .rst(rst), .coef_ld(coef_ld), .coef(tc_coef), .x_row(tc_x),
    .y_acc(tc_y), .x_reg(tc_x_reg));
endmodule
