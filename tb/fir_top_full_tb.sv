// Self-checking testbench for fir_top_full.
// One stream whose consecutive samples arrive in interleaved pairs, as the full-rate array expects.
// Random coefficients (one all-ones, one with only the sign bit set) and
// random samples (the first frame all ones) are filtered, by the array in
// its unsigned form and, with the same bit patterns read as two's complement
// numbers, by a second array in its signed form (TC = 1); each result bit is picked from the accumulator
// chain at the clock the array's timing rule gives, the words are rebuilt and
// compared with the convolution sum computed here. A result arriving at any
// other clock would be read wrong, so the checks also cover the latency and
// the rate of two results per 2B clocks.
module fir_top_full_tb;
  localparam int B = 4, N = 4, L = 2, W = B + L, NQ = 16;
  localparam int P = 2 * B;
  localparam bit FULL = 1;   // 1: one stream, consecutive samples interleaved
  localparam int OFF = N;     // result bit w<B appears at frame start + OFF + 2w + 1

  logic clk = 0, rst = 1, coef_ld = 0, x_in = 0;
  logic [N-1:0][B-1:0] coef;
  logic frame;
  logic [B+L:0] y_acc;
  logic frame_s;
  logic [B+L:0] y_s;

  fir_top_full #(.B(B), .N(N), .L(L)) dut (.*);
  fir_top_full #(.B(B), .N(N), .L(L), .TC(1'b1)) dut_s (
    .clk(clk), .rst(rst), .coef_ld(coef_ld), .coef(coef), .x_in(x_in),
    .frame(frame_s), .y_acc(y_s));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, frames_seen = 0, negatives = 0;
  logic [B-1:0] xs [NQ][2];
  logic [2*B+L-1:0] got [NQ][2];
  logic [2*B+L-1:0] got_s [NQ][2];

  function automatic int ref_y(int q, int s);
    int acc = 0;
    for (int i = 0; i < N; i++) begin
      if (FULL) begin
        int k = 2 * q + s - i;
        if (k >= 0) acc += int'(coef[i]) * int'(xs[k / 2][k % 2]);
      end else begin
        if (q - i >= 0) acc += int'(coef[i]) * int'(xs[q - i][s]);
      end
    end
    return acc;
  endfunction

  function automatic int sv(logic [B-1:0] v);
    return int'($signed(v));
  endfunction

  function automatic int ref_s(int q, int s);
    int acc = 0;
    for (int i = 0; i < N; i++) begin
      if (FULL) begin
        int k = 2 * q + s - i;
        if (k >= 0) acc += sv(coef[i]) * sv(xs[k / 2][k % 2]);
      end else begin
        if (q - i >= 0) acc += sv(coef[i]) * sv(xs[q - i][s]);
      end
    end
    return acc;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) coef[i] = B'($urandom);
    coef[1] = '1;
    coef[2] = {1'b1, {(B-1){1'b0}}};
    for (int q = 0; q < NQ; q++)
      for (int s = 0; s < 2; s++) begin
        xs[q][s] = (q == 0) ? '1 : B'($urandom);
        got[q][s] = '0;
        got_s[q][s] = '0;
      end
    repeat (3) @(negedge clk);
    rst = 0;
    coef_ld = 1;
    @(negedge clk);
    coef_ld = 0;
    // the clock just completed was cycle 0 after reset; from here cycle 1 on
    for (int cyc = 1; cyc < P * (NQ + 4); cyc++) begin
      if (frame != ((cyc % P) == 0) || frame_s != frame) begin
        failures++;
        $display("frame strobe wrong at cycle %0d", cyc);
      end
      if (frame) frames_seen++;
      for (int q = 0; q < NQ; q++)
        for (int s = 0; s < 2; s++)
          for (int w = 0; w < 2 * B + L; w++) begin
            int sq;
            sq = P * (q + 1) + s;
            if (w < B  && cyc == sq + OFF + 2 * w + 1) begin
              got[q][s][w] = y_acc[0];
              got_s[q][s][w] = y_s[0];
            end
            if (w >= B && cyc == sq + OFF + w + B) begin
              got[q][s][w] = y_acc[w-B+1];
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
        if (int'(got[q][s]) != ref_y(q, s)) begin
          failures++;
          $display("frame %0d slot %0d: got %0d expected %0d", q, s, got[q][s], ref_y(q, s));
        end
        checks++;
        if (int'($signed(got_s[q][s])) != ref_s(q, s)) begin
          failures++;
          $display("signed frame %0d slot %0d: got %0d expected %0d",
                   q, s, $signed(got_s[q][s]), ref_s(q, s));
        end
        if (ref_s(q, s) < 0) negatives++;
      end
    checks++;
    if (frames_seen < NQ) failures++;
    checks++;
    if (negatives == 0) begin
      failures++;
      $display("no negative signed result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
