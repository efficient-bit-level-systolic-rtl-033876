// Type-II multiplexer cell, used on the right edge of the full-rate FIR array
// whose data enter at the top row. It picks the bit that enters its row:
// x (SEL=0, the long feedback path) or y (SEL=1, the short direct path).
// The selection is combinational and the row's first main cell latches the
// chosen bit; the cell's own latch delay is counted in the delay lines that
// feed x and y. SEL is registered and passed down to the next row's cell.
// Function as published; the timing split is this design's choice.
module mux_cell_ii (
  input  logic clk,
  input  logic rst,
  input  logic x,       // selected when SEL = 0
  input  logic y,       // selected when SEL = 1
  input  logic sel_i,
  output logic z,
  output logic sel_o
);
  assign z = sel_i ? y : x;

  always_ff @(posedge clk) begin
    if (rst) sel_o <= 1'b0;
    else     sel_o <= sel_i;
  end
endmodule
