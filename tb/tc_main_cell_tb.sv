// Self-checking testbench for tc_main_cell: all input combinations for both
// coefficient values, checked one clock later against
// t = CTRL ^ (a&x), y' = y ^ t ^ c, c' = majority(y, t, c), x' = x, CTRL' = CTRL.
module tc_main_cell_tb;
  logic clk = 0, rst = 1, a_ld = 0, a_d = 0, x_i = 0, y_i = 0, c_i = 0, ctrl_i = 0;
  logic x_o, y_o, c_o, ctrl_o;
  tc_main_cell dut (.*);
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
      a_ld = 0; a_d = ~a_d;
      for (int v = 0; v < 16; v++) begin
        int t, sum;
        {ctrl_i, x_i, y_i, c_i} = 4'(v);
        @(negedge clk);
        t = int'(ctrl_i) ^ (a & int'(x_i));
        sum = t + int'(y_i) + int'(c_i);
        checks++;
        if (x_o != x_i || ctrl_o != ctrl_i || y_o != sum[0] || c_o != sum[1]) begin
          failures++;
          $display("a=%0d ctrl=%b x=%b y=%b c=%b: got y'=%b c'=%b", a, ctrl_i, x_i, y_i, c_i, y_o, c_o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
