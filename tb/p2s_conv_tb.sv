// Self-checking testbench for p2s_conv.
// Pairs of random 2B+L bit results are presented the way an array's
// accumulator chain delivers them: bit B+i on y_hi[i] at T0+i for the first
// result and one clock later for the second, with random values on every
// other clock (the chain shows partial sums there). SEL is two ones then
// 2B-2 zeros, aligned with T0. The two serial outputs are checked bit by bit
// at T0 + B + 1 + 2k (first result) and one clock later (second result).
// A second converter with the chains swapped (LO = L, top B bits grouped)
// gets the same inputs; its bits B+k and B+L+k are checked at T0 + L + 1 + 2k.
module p2s_conv_tb;
  localparam int B = 4, L = 2, NP = 12;
  localparam int P = 2 * B;

  logic clk = 0, rst = 1, sel = 0;
  logic [B+L-1:0] y_hi;
  logic ser_lo, ser_hi;

  logic ser_lo2, ser_hi2;

  p2s_conv #(.B(B), .L(L)) dut (.*);
  p2s_conv #(.B(B), .L(L), .LO(L)) dut2 (
    .clk(clk), .rst(rst), .y_hi(y_hi), .sel(sel), .ser_lo(ser_lo2), .ser_hi(ser_hi2));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [2*B+L-1:0] yv [NP][2];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++)
      for (int s = 0; s < 2; s++) yv[p][s] = (2*B+L)'($urandom);
    y_hi = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < P * (NP + 4); cyc++) begin
      // check outputs of this cycle
      for (int p = 0; p < NP; p++)
        for (int s = 0; s < 2; s++) begin
          int t0;
          t0 = P * (p + 1) + s;
          for (int k = 0; k < B; k++)
            if (cyc == t0 + B + 1 + 2 * k) begin
              checks++;
              if (ser_lo !== yv[p][s][B+k]) begin
                failures++;
                $display("ser_lo result %0d.%0d bit %0d wrong", p, s, B + k);
              end
            end
          for (int k = 0; k < L; k++)
            if (cyc == t0 + B + 1 + 2 * k) begin
              checks++;
              if (ser_hi !== yv[p][s][2*B+k]) begin
                failures++;
                $display("ser_hi result %0d.%0d bit %0d wrong", p, s, 2 * B + k);
              end
            end
          for (int k = 0; k < L; k++)
            if (cyc == t0 + L + 1 + 2 * k) begin
              checks++;
              if (ser_lo2 !== yv[p][s][B+k]) begin
                failures++;
                $display("variant ser_lo result %0d.%0d bit %0d wrong", p, s, B + k);
              end
            end
          for (int k = 0; k < B; k++)
            if (cyc == t0 + L + 1 + 2 * k) begin
              checks++;
              if (ser_hi2 !== yv[p][s][B+L+k]) begin
                failures++;
                $display("variant ser_hi result %0d.%0d bit %0d wrong", p, s, B + L + k);
              end
            end
        end
      // drive inputs of this cycle
      sel = (((cyc % P) == 0) || ((cyc % P) == 1)) && cyc >= P;
      for (int i = 0; i < B + L; i++) begin
        y_hi[i] = 1'($urandom);
        for (int p = 0; p < NP; p++)
          for (int s = 0; s < 2; s++)
            if (cyc == P * (p + 1) + s + i) y_hi[i] = yv[p][s][B+i];
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
