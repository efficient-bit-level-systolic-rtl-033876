// Shared helpers for the bit-level systolic filter arrays: construction of
// the recirculating control patterns (PTRL, SEL, ITRL) that are preloaded
// into ring registers. A pattern of period P is a P-bit vector whose bit t is
// the value the ring presents t clocks after reset (modulo P).
package bsa_pkg;
  localparam int unsigned MAXP = 256;
  typedef logic [MAXP-1:0] pattern_t;

  // Period-P pattern that is 'inval' for 'len' clocks starting at phase
  // 'start', and the complement elsewhere.
  function automatic pattern_t window_pattern(int unsigned p, int unsigned start,
                                              int unsigned len, logic inval);
    pattern_t r;
    r = '0;
    for (int unsigned t = 0; t < MAXP; t++) begin
      if (t < p) r[t] = ((((t + p) - (start % p)) % p) < len) ? inval : ~inval;
    end
    return r;
  endfunction

  // Period-P alternating pattern that is 1 on phases of parity 'par'.
  function automatic pattern_t alt_pattern(int unsigned p, int unsigned par);
    pattern_t r;
    r = '0;
    for (int unsigned t = 0; t < MAXP; t++) begin
      if (t < p) r[t] = ((t % 2) == (par % 2));
    end
    return r;
  endfunction

  // The period-P pattern 'pat' delayed by s clocks: what 'pat' presents at
  // phase t, the result presents at phase t + s.
  function automatic pattern_t rotate_pattern(int unsigned p, pattern_t pat, int unsigned s);
    pattern_t r;
    r = '0;
    for (int unsigned t = 0; t < MAXP; t++) begin
      if (t < p) r[t] = pat[((t + p) - (s % p)) % p];
    end
    return r;
  endfunction

  // CTRL pattern (period p, 2B for the inner product and FIR arrays) entering
  // the top of column c of the two's complement array. The word's bit 0
  // enters row 0 at phase 0 (and at phase 1 for a second interleaved word),
  // so the lane that reaches the top of column c at clock t is k = (t - c)
  // mod p clocks into the word and carries data bit m = k / 2 while k < 2B;
  // later clocks (the guard band of a longer period) carry no data. CTRL is 1
  // where exactly one of coefficient bit c and data bit m is a sign bit.
  function automatic pattern_t tc_ctrl_pattern(int unsigned b, int unsigned c, int unsigned p);
    pattern_t r;
    int unsigned k;
    r = '0;
    for (int unsigned t = 0; t < p; t++) begin
      k = ((t + p) - (c % p)) % p;
      r[t] = (c < b) && (k < 2 * b) && ((c == b - 1) != (k / 2 == b - 1));
    end
    return r;
  endfunction

  // ITRL pattern (period p) entering the top of the correction column
  // (significance 2^(B+L+m) in lane m, the lane reaching column B+L at clock
  // 2m or 2m+1 into the word). It carries bit B+L+m of the correction
  // n*(2^B - 2^(2B-1)) modulo 2^(2B+L), n being the number of products; with
  // n = 2^L this is 2^(B+L) + 2^(2B+L-1), i.e. ones in the first and the
  // last lane.
  function automatic pattern_t tc_itrl_pattern(int unsigned b, int unsigned l, int unsigned n,
                                               int unsigned p);
    pattern_t r;
    longint unsigned cor;
    int unsigned k;
    cor = ((longint'(n) << b) - (longint'(n) << (2 * b - 1))) & ((64'd1 << (2 * b + l)) - 1);
    r = '0;
    for (int unsigned t = 0; t < p; t++) begin
      k = ((t + p) - ((b + l) % p)) % p;
      r[t] = (k < 2 * b) && cor[b + l + k / 2];
    end
    return r;
  endfunction
endpackage
