// Self-checking testbench for acc_cell: all input combinations, checked one
// clock later against s' = s^y^c, s'' = PTRL & (s^y^c),
// c' = majority(s, y, c), PTRL' = PTRL.
module acc_cell_tb;
  logic clk = 0, rst = 1, s_i = 0, y_i = 0, c_i = 0, ptrl_i = 0;
  logic s_o, s_r_o, c_o, ptrl_o;
  acc_cell dut (.*);
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
    for (int v = 0; v < 16; v++) begin
      int sum;
      {ptrl_i, s_i, y_i, c_i} = 4'(v);
      @(negedge clk);
      sum = int'(s_i) + int'(y_i) + int'(c_i);
      checks++;
      if (s_o != sum[0] || s_r_o != (ptrl_i & sum[0]) || c_o != sum[1] || ptrl_o != ptrl_i) begin
        failures++;
        $display("ptrl=%b s=%b y=%b c=%b: got s'=%b s''=%b c'=%b", ptrl_i, s_i, y_i, c_i, s_o, s_r_o, c_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
