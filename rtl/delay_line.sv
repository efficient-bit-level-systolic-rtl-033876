// Delay line of D clock periods for one bit (a chain of D flip-flops), the
// "K tau" style delay elements placed between rows of the arrays. D = 0 is a
// plain wire. Reset clears the chain.
module delay_line #(
  parameter int unsigned D = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else if (D == 1) begin : g_one
    always_ff @(posedge clk) begin
      if (rst) q <= 1'b0;
      else     q <= d;
    end
  end else begin : g_regs
    logic [D-1:0] sr;
    always_ff @(posedge clk) begin
      if (rst) sr <= '0;
      else     sr <= {sr[D-2:0], d};
    end
    assign q = sr[D-1];
  end
endmodule
