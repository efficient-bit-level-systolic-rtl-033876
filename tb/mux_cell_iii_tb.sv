// Self-checking testbench for mux_cell_iii: with random inputs every clock,
// w must take u (SEL = 1) or v (SEL = 0) one clock later, and u and SEL must
// be passed on with one clock of delay.
module mux_cell_iii_tb;
  logic clk = 0, rst = 1, u = 0, v = 0, sel_i = 0;
  logic u_o, w, sel_o;
  mux_cell_iii dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pu, pv, ps;
    @(negedge clk); rst = 0;
    for (int k = 0; k < 200; k++) begin
      {sel_i, u, v} = 3'($urandom);
      pu = u; pv = v; ps = sel_i;
      @(negedge clk);
      checks++;
      if (w != (ps ? pu : pv) || u_o != pu || sel_o != ps) begin
        failures++;
        $display("sel=%b u=%b v=%b: w=%b u'=%b sel'=%b", ps, pu, pv, w, u_o, sel_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
