// Self-checking testbench for mux_cell_i: for every input combination the
// output must equal u when SEL = 0 and v when SEL = 1 in the same clock,
// and SEL must reappear on sel_o one clock later.
module mux_cell_i_tb;
  logic clk = 0, rst = 1, u = 0, v = 0, sel_i = 0;
  logic z, sel_o;
  mux_cell_i dut (.*);
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
      {sel_i, u, v} = 3'(k);
      #1;
      checks++;
      if (z != (sel_i ? v : u)) begin
        failures++;
        $display("sel=%b u=%b v=%b: z=%b", sel_i, u, v, z);
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
