// Accumulator cell of the bit-level inner product array.
// A full adder of three bits: s from the cell on the left, y from the bottom
// of the main array above, and the carry c from the cell on the right. The
// sum is output downwards (s_o, the result bit tapped at this column), the
// sum gated by the control bit PTRL is passed to the right (s_r_o) so that
// bits of equal significance, which leave the main array on a slant, are
// collected, and the carry and PTRL are passed to the left. A 0 in PTRL cuts
// the rightward sum so that one inner product does not spill into the next.
// All outputs are registered (one cell per clock). The function follows the
// published cell; the synchronous reset is this design's choice.
module acc_cell (
  input  logic clk,
  input  logic rst,
  input  logic s_i,      // sum from the left
  input  logic y_i,      // bit from the main array above
  input  logic c_i,      // carry from the right
  input  logic ptrl_i,   // control from the right
  output logic s_o,      // result bit downwards
  output logic s_r_o,    // gated sum to the right
  output logic c_o,      // carry to the left
  output logic ptrl_o    // control to the left
);
  logic sum;
  assign sum = s_i ^ y_i ^ c_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_o    <= 1'b0;
      s_r_o  <= 1'b0;
      c_o    <= 1'b0;
      ptrl_o <= 1'b0;
    end else begin
      s_o    <= sum;
      s_r_o  <= ptrl_i & sum;
      c_o    <= (s_i & c_i) | (s_i & y_i) | (y_i & c_i);
      ptrl_o <= ptrl_i;
    end
  end
endmodule
