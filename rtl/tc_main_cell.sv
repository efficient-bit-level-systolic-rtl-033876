// Main array cell for two's complement arithmetic.
// Like the positive-arithmetic cell, but a control bit CTRL travels down
// with the accumulating partial product and, when set, complements the
// partial product a&x before it is added. A parallelogram of CTRL bits that
// is 1 exactly where a sign bit meets a non-sign bit turns the two's
// complement product into a sum of positive terms plus a fixed correction.
// All outputs are registered: x and carry move left, y and CTRL move down,
// one cell per clock. The cell function follows the published cell; reset
// and coefficient loading are this design's choice.
module tc_main_cell (
  input  logic clk,
  input  logic rst,
  input  logic a_ld,
  input  logic a_d,
  input  logic x_i,
  input  logic y_i,
  input  logic c_i,
  input  logic ctrl_i,   // complement control from above
  output logic x_o,
  output logic y_o,
  output logic c_o,
  output logic ctrl_o    // complement control downwards
);
  logic a;
  logic t;

  always_ff @(posedge clk) begin
    if (rst)       a <= 1'b0;
    else if (a_ld) a <= a_d;
  end

  assign t = ctrl_i ^ (a & x_i);

  always_ff @(posedge clk) begin
    if (rst) begin
      x_o    <= 1'b0;
      y_o    <= 1'b0;
      c_o    <= 1'b0;
      ctrl_o <= 1'b0;
    end else begin
      x_o    <= x_i;
      y_o    <= y_i ^ t ^ c_i;
      c_o    <= (y_i & c_i) | (y_i & t) | (c_i & t);
      ctrl_o <= ctrl_i;
    end
  end
endmodule
