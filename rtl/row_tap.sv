// Feedback tap of one array row: delivers the bit that entered the row D
// clocks ago. The data bits pass through the row's cells one per clock, so
// the cell registers already form a delay line of up to W stages (xr[c] is
// the row input delayed by c+1). For D <= W the tap is taken inside the
// row; otherwise it leaves the leftmost cell and goes through D-W further
// flip-flops. Taking the tap inside the row is how a negative row-to-row
// delay (K or K' below zero for small word lengths) is avoided.
module row_tap #(
  parameter int unsigned W = 6,   // cells in the row (B+L)
  parameter int unsigned D = 7    // total delay, at least 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] xr,        // x registers of the row, xr[0] rightmost
  output logic         q
);
  if (D <= W) begin : g_inside
    assign q = xr[D-1];
  end else begin : g_outside
    delay_line #(.D(D - W)) u_dl (.clk(clk), .rst(rst), .d(xr[W-1]), .q(q));
  end
endmodule
