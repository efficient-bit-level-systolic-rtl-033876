// Type-I multiplexer cell, used on the right edge of the full-rate FIR array
// whose data enter at the bottom row. It picks the bit that enters its row:
// u (SEL=0) or v (SEL=1). The selection itself is combinational; the row's
// first main cell latches the chosen bit, and the cell's own latch delay is
// counted in the feedback delay line that feeds u. SEL is registered and
// passed on (sel_o) to the cell of the next row, one row per clock.
// Function as published; the split between combinational select and
// registered SEL is this design's choice.
module mux_cell_i (
  input  logic clk,
  input  logic rst,
  input  logic u,       // selected when SEL = 0
  input  logic v,       // selected when SEL = 1
  input  logic sel_i,
  output logic z,
  output logic sel_o
);
  assign z = sel_i ? v : u;

  always_ff @(posedge clk) begin
    if (rst) sel_o <= 1'b0;
    else     sel_o <= sel_i;
  end
endmodule
