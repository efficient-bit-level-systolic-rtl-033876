// End-to-end testbench for bsa_filters_top at its default sizes.
// All eight arrays run at once from random coefficients and samples:
//   fa, fb : two independent channels interleaved on even/odd clocks
//   fc, fd : one stream at full rate (consecutive samples interleaved);
//            fc's results are rebuilt from its three serial pins, which
//            exercises the bit-parallel to bit-serial converter
//   fs     : the same stream's bits, read as two's complement numbers,
//            through the signed full-rate FIR array
//   ir     : two interleaved IIR streams with live feedback
//   is     : the same IIR stream bits, read as two's complement numbers,
//            through the signed IIR array
//   tc     : two interleaved streams of signed inner products
// Every result bit is read at the clock the timing rules give and every word
// is compared with a reference computed here. The testbench counts how often
// each mechanism occurs (second channel, full-rate pairs, non-zero IIR
// feedback, second IIR stream, serial conversion, negative two's complement
// result of the inner product, FIR and IIR arrays, PTRL cut between overlapping results) and fails if one never does.
module bsa_filters_top_tb;
  localparam int B = 4, N = 4, L = 2, IB = 4, IN = 2, IM = 2, IL = 2;
  localparam int P = 2 * B, IP = 2 * IB + IL + 2;
  localparam int NQ = 16;   // FIR / inner product frames
  localparam int NI = 20;   // IIR samples per stream
  localparam int NCYC = IP * (NI + 4);

  logic clk = 0, rst = 1, coef_ld = 0;
  logic [N-1:0][B-1:0] fa_coef, fb_coef, fc_coef, fd_coef, fs_coef, tc_coef;
  logic fa_x = 0, fb_x = 0, fc_x = 0, fd_x = 0, fs_x = 0, ir_x = 0, is_x = 0;
  logic [N-1:0] tc_x = '0;
  logic [IN-1:0][IB-1:0] ir_a;
  logic [IM-1:0][IB-1:0] ir_b;
  logic [IN-1:0][IB-1:0] is_a;
  logic [IM-1:0][IB-1:0] is_b;
  logic is_frame;
  logic [IB+IL:0] is_y;
  logic fa_frame, fb_frame, fc_frame, fd_frame, fs_frame, ir_frame;
  logic [B+L:0] fa_y, fb_y, fc_y, fd_y, fs_y, tc_y;
  logic [IB+IL:0] ir_y;
  logic fc_y_lo, fc_ser_lo, fc_ser_hi;

  bsa_filters_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_second_channel = 0, n_full_pairs = 0, n_iir_feedback = 0, n_iir_second = 0;
  int n_serial = 0, n_negative = 0, n_fir_negative = 0, n_iir_negative = 0, n_cut = 0;

  logic [B-1:0] xh [NQ][2];          // half-rate channels (fa, fb)
  logic [B-1:0] xf [NQ][2];          // full-rate stream, sample 2q+s (fc, fd)
  logic [B-1:0] xt [NQ][2][N];       // tc rows
  logic [IB-1:0] xi [NI][2];         // IIR streams
  logic [2*B+L-1:0] g_fa [NQ][2], g_fb [NQ][2], g_fc [NQ][2], g_fd [NQ][2], g_fs [NQ][2], g_tc [NQ][2];
  logic [2*B+L-1:0] g_ser [NQ][2];
  logic [2*IB+IL-1:0] g_ir [NI][2];
  int r_ir [NI][2];
  logic [2*IB+IL-1:0] g_is [NI][2];
  int r_is [NI][2];

  function automatic int fir_half(logic [N-1:0][B-1:0] c, int q, int s);
    int acc = 0;
    for (int i = 0; i < N; i++)
      if (q - i >= 0) acc += int'(c[i]) * int'(xh[q-i][s]);
    return acc;
  endfunction

  function automatic int fir_full(logic [N-1:0][B-1:0] c, int q, int s);
    int acc = 0;
    for (int i = 0; i < N; i++) begin
      int k = 2 * q + s - i;
      if (k >= 0) acc += int'(c[i]) * int'(xf[k / 2][k % 2]);
    end
    return acc;
  endfunction

  function automatic int fir_full_s(logic [N-1:0][B-1:0] c, int q, int s);
    int acc = 0;
    for (int i = 0; i < N; i++) begin
      int k = 2 * q + s - i;
      if (k >= 0) acc += int'($signed(c[i])) * int'($signed(xf[k / 2][k % 2]));
    end
    return acc;
  endfunction

  function automatic int tc_ref(int p, int s);
    int acc = 0;
    for (int r = 0; r < N; r++) acc += int'($signed(tc_coef[r])) * int'($signed(xt[p][s][r]));
    return acc;
  endfunction

  // store bit w of a result whose bit-0 lane has base time 'base' (the
  // inner product array's E+N): w<B on column 0 at base+2w+1, w>=B on column
  // w-B+1 at base+w+B
  function automatic logic pick(int cyc, int base, int w, logic [B+L:0] y, output logic hit);
    hit = 1'b0;
    if (w < B && cyc == base + 2 * w + 1) begin hit = 1'b1; return y[0]; end
    if (w >= B && cyc == base + w + B)    begin hit = 1'b1; return y[w-B+1]; end
    return 1'b0;
  endfunction

  task automatic check(string what, int q, int s, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%s %0d.%0d: got %0d expected %0d", what, q, s, got, exp_v);
    end
  endtask

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      fa_coef[i] = B'($urandom); fb_coef[i] = B'($urandom);
      fc_coef[i] = B'($urandom); fd_coef[i] = B'($urandom); fs_coef[i] = B'($urandom);
      tc_coef[i] = B'($urandom);
    end
    fa_coef[0] = '1; fc_coef[N-1] = '1; tc_coef[1] = {1'b1, {(B-1){1'b0}}};
    fs_coef[2] = {1'b1, {(B-1){1'b0}}};
    for (int i = 0; i < IN; i++) ir_a[i] = IB'($urandom);
    for (int j = 0; j < IM; j++) ir_b[j] = IB'($urandom | 8);
    for (int i = 0; i < IN; i++) is_a[i] = IB'($urandom);
    for (int j = 0; j < IM; j++) is_b[j] = IB'($urandom);
    is_a[0] = {1'b1, {(IB-1){1'b0}}};
    for (int q = 0; q < NQ; q++)
      for (int s = 0; s < 2; s++) begin
        xh[q][s] = B'($urandom);
        xf[q][s] = (q == 1) ? '1 : B'($urandom);
        for (int r = 0; r < N; r++) xt[q][s][r] = B'($urandom);
        g_fa[q][s] = '0; g_fb[q][s] = '0; g_fc[q][s] = '0; g_fd[q][s] = '0; g_fs[q][s] = '0;
        g_tc[q][s] = '0; g_ser[q][s] = '0;
      end
    for (int q = 0; q < NI; q++)
      for (int s = 0; s < 2; s++) begin
        xi[q][s] = IB'($urandom);
        g_ir[q][s] = '0;
        g_is[q][s] = '0;
      end
    for (int s = 0; s < 2; s++)
      for (int q = 0; q < NI; q++) begin
        r_ir[q][s] = 0;
        for (int i = 0; i < IN; i++)
          if (q - i >= 0) r_ir[q][s] += int'(ir_a[i]) * int'(xi[q-i][s]);
        for (int j = 1; j <= IM; j++)
          if (q - j >= 0) r_ir[q][s] += int'(ir_b[j-1]) * (r_ir[q-j][s] >> (IB + IL));
        r_ir[q][s] %= 1 << (2 * IB + IL);
        r_is[q][s] = 0;
        for (int i = 0; i < IN; i++)
          if (q - i >= 0) r_is[q][s] += int'($signed(is_a[i])) * int'($signed(xi[q-i][s]));
        for (int j = 1; j <= IM; j++)
          if (q - j >= 0) r_is[q][s] += int'($signed(is_b[j-1])) * (r_is[q-j][s] >>> (IB + IL));
      end

    repeat (3) @(negedge clk);
    rst = 0;
    coef_ld = 1;
    @(negedge clk);
    coef_ld = 0;
    for (int cyc = 1; cyc < NCYC; cyc++) begin
      // ---- collect outputs of this clock
      for (int q = 0; q < NQ; q++)
        for (int s = 0; s < 2; s++) begin
          int sq;
          sq = P * (q + 1) + s;
          for (int w = 0; w < 2 * B + L; w++) begin
            logic hit, b;
            b = pick(cyc, sq + 1, w, fa_y, hit); if (hit) g_fa[q][s][w] = b;
            b = pick(cyc, sq + N, w, fb_y, hit); if (hit) g_fb[q][s][w] = b;
            b = pick(cyc, sq + 1, w, fc_y, hit); if (hit) g_fc[q][s][w] = b;
            b = pick(cyc, sq + N, w, fd_y, hit); if (hit) g_fd[q][s][w] = b;
            b = pick(cyc, sq + 1, w, fs_y, hit); if (hit) g_fs[q][s][w] = b;
            b = pick(cyc, sq + N, w, tc_y, hit); if (hit) g_tc[q][s][w] = b;
          end
          // serial pins of fc
          for (int k = 0; k < B; k++) begin
            if (cyc == sq + 2 * k + 2)          g_ser[q][s][k]     = fc_y_lo;
            if (cyc == sq + 3 * B + 2 + 2 * k)  g_ser[q][s][B+k]   = fc_ser_lo;
            if (k < L && cyc == sq + 3 * B + 2 + 2 * k) g_ser[q][s][2*B+k] = fc_ser_hi;
          end
        end
      for (int q = 0; q < NI; q++)
        for (int s = 0; s < 2; s++) begin
          int sq;
          sq = IP * (q + 1) + s;
          for (int w = 0; w < 2 * IB + IL; w++) begin
            if (w < IB  && cyc == sq + IM + 2 * w + 3)   g_ir[q][s][w] = ir_y[0];
            if (w >= IB && cyc == sq + IM + w + IB + 2)  g_ir[q][s][w] = ir_y[w-IB+1];
            if (w < IB  && cyc == sq + IM + 2 * w + 3)   g_is[q][s][w] = is_y[0];
            if (w >= IB && cyc == sq + IM + w + IB + 2)  g_is[q][s][w] = is_y[w-IB+1];
          end
        end
      // ---- frame strobes
      if (fa_frame != ((cyc % P) == 0) || fb_frame != ((cyc % P) == 0) ||
          fc_frame != ((cyc % P) == 0) || fd_frame != ((cyc % P) == 0) || fs_frame != ((cyc % P) == 0) ||
          ir_frame != ((cyc % IP) == 0) || is_frame != ir_frame) begin
        failures++;
        $display("frame strobe wrong at clock %0d", cyc);
      end
      // ---- drive inputs of this clock
      fa_x = 0; fb_x = 0; fc_x = 0; fd_x = 0; fs_x = 0; ir_x = 0; is_x = 0; tc_x = '0;
      for (int q = 0; q < NQ; q++)
        for (int s = 0; s < 2; s++)
          for (int m = 0; m < B; m++) begin
            if (cyc == P * (q + 1) + s + 2 * m) begin
              fa_x = xh[q][s][m]; fb_x = xh[q][s][m];
              fc_x = xf[q][s][m]; fd_x = xf[q][s][m]; fs_x = xf[q][s][m];
            end
            for (int r = 0; r < N; r++)
              if (cyc == P * (q + 1) + s + r + 2 * m) tc_x[r] = xt[q][s][r][m];
          end
      for (int q = 0; q < NI; q++)
        for (int s = 0; s < 2; s++)
          for (int m = 0; m < IB; m++)
            if (cyc == IP * (q + 1) + s + 2 * m) begin ir_x = xi[q][s][m]; is_x = xi[q][s][m]; end
      @(negedge clk);
    end

    // ---- compare
    for (int q = 0; q < NQ; q++)
      for (int s = 0; s < 2; s++) begin
        check("fa", q, s, int'(g_fa[q][s]), fir_half(fa_coef, q, s));
        check("fb", q, s, int'(g_fb[q][s]), fir_half(fb_coef, q, s));
        check("fc", q, s, int'(g_fc[q][s]), fir_full(fc_coef, q, s));
        check("fc serial", q, s, int'(g_ser[q][s]), fir_full(fc_coef, q, s));
        check("fd", q, s, int'(g_fd[q][s]), fir_full(fd_coef, q, s));
        check("fs", q, s, int'($signed(g_fs[q][s])), fir_full_s(fs_coef, q, s));
        if (fir_full_s(fs_coef, q, s) < 0) n_fir_negative++;
        check("tc", q, s, int'($signed(g_tc[q][s])), tc_ref(q, s));
        if (s == 1 && fir_half(fa_coef, q, 1) != 0) n_second_channel++;
        if (s == 1 && fir_full(fc_coef, q, 1) != 0) n_full_pairs++;
        if (g_ser[q][s] != 0) n_serial++;
        if (tc_ref(q, s) < 0) n_negative++;
        // results overlap in the accumulator chain when the upper bits of
        // one and the lower bits of the next are both non-zero
        if ((fir_full(fc_coef, q, s) >> B) != 0 && q + 1 < NQ && fir_full(fc_coef, q + 1, s) != 0)
          n_cut++;
      end
    for (int q = 0; q < NI; q++)
      for (int s = 0; s < 2; s++) begin
        check("ir", q, s, int'(g_ir[q][s]), r_ir[q][s]);
        check("is", q, s, int'($signed(g_is[q][s])), r_is[q][s]);
        if (r_is[q][s] < 0) n_iir_negative++;
        if (q > 0 && (r_ir[q-1][s] >> (IB + IL)) != 0) n_iir_feedback++;
        if (s == 1 && r_ir[q][s] != 0) n_iir_second++;
      end

    $display("mechanisms: second FIR channel %0d, full-rate pairs %0d, IIR feedback %0d, second IIR stream %0d, serial conversion %0d, negative tc results %0d, negative signed FIR results %0d, negative signed IIR results %0d, PTRL cuts %0d",
             n_second_channel, n_full_pairs, n_iir_feedback, n_iir_second, n_serial, n_negative, n_fir_negative, n_iir_negative, n_cut);
    checks++; if (n_second_channel == 0) begin failures++; $display("no second FIR channel"); end
    checks++; if (n_full_pairs == 0)     begin failures++; $display("no full-rate pair"); end
    checks++; if (n_iir_feedback == 0)   begin failures++; $display("no IIR feedback"); end
    checks++; if (n_iir_second == 0)     begin failures++; $display("no second IIR stream"); end
    checks++; if (n_serial == 0)         begin failures++; $display("no serial conversion"); end
    checks++; if (n_negative == 0)       begin failures++; $display("no negative tc result"); end
    checks++; if (n_fir_negative == 0)   begin failures++; $display("no negative signed FIR result"); end
    checks++; if (n_iir_negative == 0)   begin failures++; $display("no negative signed IIR result"); end
    checks++; if (n_cut == 0)            begin failures++; $display("no PTRL cut"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
