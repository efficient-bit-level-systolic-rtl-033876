// Self-checking testbench for tc_ip_array.
// Two interleaved streams of signed inner products with random signed
// coefficients and data (including the most negative values) are computed;
// the result bits are read at the clocks the timing rule gives, the 2B+L bit
// words are sign-extended and compared with the signed sums computed here.
module tc_ip_array_tb;
  localparam int B = 4, N = 4, L = 2, W = B + L, NP = 16;
  localparam int P = 2 * B;

  logic clk = 0, rst = 1, coef_ld = 0;
  logic [N-1:0][B-1:0] coef;
  logic [N-1:0] x_row;
  logic [B+L:0] y_acc;
  logic [N-1:0][B+L-1:0] x_reg;   // not checked here; used by the FIR filters

  tc_ip_array #(.B(B), .N(N), .L(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, negatives = 0;
  logic signed [B-1:0] xw [NP][2][N];
  logic [2*B+L-1:0] got [NP][2];
  int expv [NP][2];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < N; r++) coef[r] = B'($urandom);
    coef[0] = {1'b1, {(B-1){1'b0}}};   // most negative coefficient
    for (int p = 0; p < NP; p++)
      for (int s = 0; s < 2; s++) begin
        expv[p][s] = 0;
        got[p][s] = '0;
        for (int r = 0; r < N; r++) begin
          xw[p][s][r] = (p == 0) ? {1'b1, {(B-1){1'b0}}} : B'($urandom);
          expv[p][s] += int'($signed(coef[r])) * int'(xw[p][s][r]);
        end
        if (expv[p][s] < 0) negatives++;
      end
    x_row = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    coef_ld = 1;
    @(negedge clk);
    coef_ld = 0;
    for (int cyc = 1; cyc < P * (NP + 4); cyc++) begin
      for (int p = 0; p < NP; p++)
        for (int s = 0; s < 2; s++)
          for (int w = 0; w < 2 * B + L; w++) begin
            int sp;
            sp = P * (p + 1) + s;
            if (w < B  && cyc == sp + N + 2 * w + 1) got[p][s][w] = y_acc[0];
            if (w >= B && cyc == sp + N + w + B)     got[p][s][w] = y_acc[w-B+1];
          end
      for (int r = 0; r < N; r++) begin
        x_row[r] = 1'b0;
        for (int p = 0; p < NP; p++)
          for (int s = 0; s < 2; s++)
            for (int m = 0; m < B; m++)
              if (cyc == P * (p + 1) + s + r + 2 * m) x_row[r] = xw[p][s][r][m];
      end
      @(negedge clk);
    end
    for (int p = 0; p < NP; p++)
      for (int s = 0; s < 2; s++) begin
        checks++;
        if (int'($signed(got[p][s])) != expv[p][s]) begin
          failures++;
          $display("product %0d stream %0d: got %0d expected %0d", p, s,
                   $signed(got[p][s]), expv[p][s]);
        end
      end
    checks++;
    if (negatives == 0) failures++;
    $display("negative results: %0d", negatives);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
