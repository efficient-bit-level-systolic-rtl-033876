// Self-checking testbench for ip_array.
// Two independent inner products are interleaved (even and odd clock slots),
// NP of each, one pair every 2B clocks, with random coefficients and data.
// The result bits are collected from the accumulator chain at the times the
// array's timing rule gives and compared with sum_i a_i*x_i computed here.
module ip_array_tb;
  localparam int B = 4, N = 4, L = 2, W = B + L, NP = 12, S0 = 8;
  localparam int P = 2 * B;

  logic clk = 0, rst = 1, coef_ld = 0, ptrl = 1;
  logic [N-1:0][B-1:0] coef;
  logic [N-1:0] x_row;
  logic [B+L:0] y_acc;
  logic [N-1:0][W-1:0] x_reg;

  ip_array #(.B(B), .N(N), .L(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [B-1:0] xw [NP][2][N];
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
    coef[0] = '1;  // make sure the largest coefficient occurs
    for (int p = 0; p < NP; p++)
      for (int s = 0; s < 2; s++) begin
        expv[p][s] = 0;
        got[p][s] = '0;
        for (int r = 0; r < N; r++) begin
          xw[p][s][r] = (p == 0) ? '1 : B'($urandom);
          expv[p][s] += int'(coef[r]) * int'(xw[p][s][r]);
        end
      end
    x_row = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    coef_ld = 1;
    @(negedge clk);
    coef_ld = 0;
    for (int cyc = 0; cyc < S0 + P * NP + 4 * P; cyc++) begin
      // outputs of this cycle
      for (int p = 0; p < NP; p++)
        for (int s = 0; s < 2; s++)
          for (int w = 0; w < 2 * B + L; w++) begin
            int sp;
            sp = S0 + P * p + s;
            if (w < B  && cyc == sp + N + 2 * w + 1) got[p][s][w] = y_acc[0];
            if (w >= B && cyc == sp + N + w + B)     got[p][s][w] = y_acc[w-B+1];
          end
      // inputs of this cycle
      ptrl = (((cyc + 10 * P - S0 - N + 2) % P) < 2) ? 1'b0 : 1'b1;
      for (int r = 0; r < N; r++) begin
        x_row[r] = 1'b0;
        for (int p = 0; p < NP; p++)
          for (int s = 0; s < 2; s++)
            for (int m = 0; m < B; m++)
              if (cyc == S0 + P * p + s + r + 2 * m) x_row[r] = xw[p][s][r][m];
      end
      @(negedge clk);
    end
    for (int p = 0; p < NP; p++)
      for (int s = 0; s < 2; s++) begin
        checks++;
        if (int'(got[p][s]) != expv[p][s]) begin
          failures++;
          $display("product %0d stream %0d: got %0d expected %0d", p, s, got[p][s], expv[p][s]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
