// Self-checking testbench for main_cell: all input combinations for both
// coefficient values, each checked one clock later against the full-adder
// function y' = y ^ (a&x) ^ c, c' = majority(y, a&x, c), x' = x.
module main_cell_tb;
  logic clk = 0, rst = 1, a_ld = 0, a_d = 0, x_i = 0, y_i = 0, c_i = 0;
  logic x_o, y_o, c_o;
  main_cell dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst = 0;
    for (int a = 0; a < 2; a++) begin
      a_ld = 1; a_d = 1'(a);
      @(negedge clk);
      a_ld = 0; a_d = ~a_d;   // must not load
      for (int v = 0; v < 8; v++) begin
        int pp, sum;
        {x_i, y_i, c_i} = 3'(v);
        @(negedge clk);
        pp = a & int'(x_i);
        sum = pp + int'(y_i) + int'(c_i);
        checks++;
        if (x_o != x_i || y_o != sum[0] || c_o != sum[1]) begin
          failures++;
          $display("a=%0d x=%b y=%b c=%b: got x'=%b y'=%b c'=%b", a, x_i, y_i, c_i, x_o, y_o, c_o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
