// Self-checking testbench for mux_cell_ii: for every input combination the
// output must equal x when SEL = 0 and y when SEL = 1 in the same clock,
// and SEL must reappear on sel_o one clock later.
module mux_cell_ii_tb;
  logic clk = 0, rst = 1, x = 0, y = 0, sel_i = 0;
  logic z, sel_o;
  mux_cell_ii dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_sel;
    @(negedge clk); rst = 0;
    prev_sel = 0;
    for (int k = 0; k < 32; k++) begin
      {sel_i, x, y} = 3'(k);
      #1;
      checks++;
      if (z != (sel_i ? y : x)) begin
        failures++;
        $display("sel=%b x=%b y=%b: z=%b", sel_i, x, y, z);
      end
      prev_sel = sel_i;
      @(negedge clk);
      checks++;
      if (sel_o != prev_sel) begin
        failures++;
        $display("sel_o wrong");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
