// Type-III multiplexer cell: one stage of a bit-parallel to bit-serial shift
// register. The bit u arriving from above is passed down (u_o). When SEL is 1
// the cell loads u into its output register w, otherwise it shifts in v, the
// w output of the neighbouring cell on its left. SEL moves left one cell per
// clock, so a chain of these cells picks up bits that arrive one cycle apart
// from column to column and sends them out of the rightmost cell in series.
// Function as published; the registered outputs and reset are this
// design's choice.
module mux_cell_iii (
  input  logic clk,
  input  logic rst,
  input  logic u,       // parallel bit from above
  input  logic v,       // serial bit from the left neighbour
  input  logic sel_i,   // control from the right
  output logic u_o,     // parallel bit passed down
  output logic w,       // serial bit to the right
  output logic sel_o    // control to the left
);
  always_ff @(posedge clk) begin
    if (rst) begin
      u_o   <= 1'b0;
      w     <= 1'b0;
      sel_o <= 1'b0;
    end else begin
      u_o   <= u;
      w     <= sel_i ? u : v;
      sel_o <= sel_i;
    end
  end
endmodule
