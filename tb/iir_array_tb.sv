// Self-checking testbench for iir_array.
// Two independent sample streams are interleaved (even and odd clocks) and
// filtered with the same random coefficients. The recursion
//   R_n = sum_i a_i x_{n-i} + sum_j b_j (R_{n-j} >> (B+L))
// is computed here; every result bit is read at the clock the array's timing
// rule gives (which also checks the rate of one sample per 2B+L+2 clocks) and
// the rebuilt words are compared. The counts of non-zero fed-back words are
// reported to show the feedback path is exercised. A second array with
// TC = 1 receives the same bits, read as two's complement numbers, and is
// checked against the signed recursion (arithmetic shift in the feedback).
module iir_array_tb;
  localparam int B = 4, N = 2, M = 2, L = 2, NQ = 24;
  localparam int P = 2 * B + L + 2;

  logic clk = 0, rst = 1, coef_ld = 0, x_in = 0;
  logic [N-1:0][B-1:0] a_coef;
  logic [M-1:0][B-1:0] b_coef;
  logic frame;
  logic [B+L:0] y_out;

  logic frame_s;
  logic [B+L:0] y_s;

  iir_array #(.B(B), .N(N), .M(M), .L(L)) dut (.*);
  iir_array #(.B(B), .N(N), .M(M), .L(L), .TC(1'b1)) dut_s (
    .clk(clk), .rst(rst), .coef_ld(coef_ld), .a_coef(a_coef), .b_coef(b_coef),
    .x_in(x_in), .frame(frame_s), .y_out(y_s));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, fed_back = 0;
  logic [B-1:0] xs [NQ][2];
  logic [2*B+L-1:0] got [NQ][2];
  logic [2*B+L-1:0] got_s [NQ][2];
  int rs [NQ][2];
  int negatives = 0, fed_back_s = 0;
  int rv [NQ][2];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) a_coef[i] = B'($urandom);
    for (int j = 0; j < M; j++) b_coef[j] = B'($urandom | 8);
    for (int s = 0; s < 2; s++)
      for (int q = 0; q < NQ; q++) begin
        xs[q][s] = (q < 2) ? '1 : B'($urandom);
        got[q][s] = '0;
        got_s[q][s] = '0;
      end
    for (int s = 0; s < 2; s++)
      for (int q = 0; q < NQ; q++) begin
        rv[q][s] = 0;
        for (int i = 0; i < N; i++)
          if (q - i >= 0) rv[q][s] += int'(a_coef[i]) * int'(xs[q-i][s]);
        for (int j = 1; j <= M; j++)
          if (q - j >= 0) rv[q][s] += int'(b_coef[j-1]) * (rv[q-j][s] >> (B + L));
        rv[q][s] = rv[q][s] % (1 << (2 * B + L));
        if ((rv[q][s] >> (B + L)) != 0) fed_back++;
        rs[q][s] = 0;
        for (int i = 0; i < N; i++)
          if (q - i >= 0) rs[q][s] += int'($signed(a_coef[i])) * int'($signed(xs[q-i][s]));
        for (int j = 1; j <= M; j++)
          if (q - j >= 0) rs[q][s] += int'($signed(b_coef[j-1])) * (rs[q-j][s] >>> (B + L));
        if ((rs[q][s] >>> (B + L)) != 0) fed_back_s++;
        if (rs[q][s] < 0) negatives++;
      end
    repeat (3) @(negedge clk);
    rst = 0;
    coef_ld = 1;
    @(negedge clk);
    coef_ld = 0;
    for (int cyc = 1; cyc < P * (NQ + 4); cyc++) begin
      if (frame != ((cyc % P) == 0) || frame_s != frame) begin
        failures++;
        $display("frame strobe wrong at cycle %0d", cyc);
      end
      for (int q = 0; q < NQ; q++)
        for (int s = 0; s < 2; s++)
          for (int w = 0; w < 2 * B + L; w++) begin
            int sq;
            sq = P * (q + 1) + s;
            if (w < B  && cyc == sq + M + 2 * w + 3) begin
              got[q][s][w] = y_out[0];
              got_s[q][s][w] = y_s[0];
            end
            if (w >= B && cyc == sq + M + w + B + 2) begin
              got[q][s][w] = y_out[w-B+1];
              got_s[q][s][w] = y_s[w-B+1];
            end
          end
      x_in = 1'b0;
      for (int q = 0; q < NQ; q++)
        for (int s = 0; s < 2; s++)
          for (int m = 0; m < B; m++)
            if (cyc == P * (q + 1) + s + 2 * m) x_in = xs[q][s][m];
      @(negedge clk);
    end
    for (int q = 0; q < NQ; q++)
      for (int s = 0; s < 2; s++) begin
        checks++;
        if (int'(got[q][s]) != rv[q][s]) begin
          failures++;
          $display("sample %0d stream %0d: got %0d expected %0d", q, s, got[q][s], rv[q][s]);
        end
        checks++;
        if (int'($signed(got_s[q][s])) != rs[q][s]) begin
          failures++;
          $display("signed sample %0d stream %0d: got %0d expected %0d",
                   q, s, $signed(got_s[q][s]), rs[q][s]);
        end
      end
    checks++;
    if (fed_back < NQ) begin
      failures++;
      $display("feedback path hardly exercised (%0d)", fed_back);
    end
    checks++;
    if (fed_back_s < NQ || negatives == 0) begin
      failures++;
      $display("signed feedback or negative results hardly exercised (%0d, %0d)", fed_back_s, negatives);
    end
    $display("fed-back non-zero words: %0d, signed: %0d, negative signed results: %0d",
             fed_back, fed_back_s, negatives);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
