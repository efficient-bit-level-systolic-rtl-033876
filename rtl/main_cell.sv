// Main array cell of the bit-level inner product array (positive arithmetic).
// The cell holds one coefficient bit a. Each clock it forms the partial
// product a&x, adds it to the accumulating partial-product bit y arriving
// from the cell above and to the carry c arriving from the cell on its right,
// and registers the three results: the data bit moves on to the left (x_o),
// the sum bit goes down (y_o) and the carry goes left (c_o). Every output is
// a register, so a bit advances one cell per clock in every direction; this
// is the pipelining latch the cell function implies.
// The cell function follows the published cell; the synchronous reset and
// the parallel coefficient load strobe (a_ld/a_d) are this design's choice.
module main_cell (
  input  logic clk,
  input  logic rst,
  input  logic a_ld,   // load coefficient bit
  input  logic a_d,    // coefficient bit to load
  input  logic x_i,    // data bit from the right
  input  logic y_i,    // accumulating partial product from above
  input  logic c_i,    // carry from the right
  output logic x_o,    // data bit to the left
  output logic y_o,    // accumulating partial product downwards
  output logic c_o     // carry to the left
);
  logic a;
  logic pp;

  always_ff @(posedge clk) begin
    if (rst)       a <= 1'b0;
    else if (a_ld) a <= a_d;
  end

  assign pp = a & x_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_o <= 1'b0;
      y_o <= 1'b0;
      c_o <= 1'b0;
    end else begin
      x_o <= x_i;
      y_o <= y_i ^ pp ^ c_i;
      c_o <= (y_i & c_i) | (y_i & pp) | (c_i & pp);
    end
  end
endmodule
