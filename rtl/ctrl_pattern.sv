// Recirculating control pattern generator: a ring of P flip-flops preset by
// reset to the pattern INIT and rotated every clock, so that q shows
// INIT[t mod P] t clocks after reset. The arrays use it for the PTRL, SEL
// and ITRL streams, which the published design describes as patterns that
// recirculate continuously.
module ctrl_pattern #(
  parameter int unsigned P = 8,
  parameter logic [P-1:0] INIT = '1
) (
  input  logic clk,
  input  logic rst,
  output logic q
);
  logic [P-1:0] ring;
  always_ff @(posedge clk) begin
    if (rst) ring <= INIT;
    else     ring <= {ring[0], ring[P-1:1]};
  end
  assign q = ring[0];
endmodule
