// lfsr_pkg: elaboration-time helpers shared by the gated-clock LFSR.
//
// A feedback polynomial x^N + c_{N-1} x^{N-1} + ... + c_1 x + 1 is held as a
// tap vector: bit j is the coefficient c_j of x^j (bit 0, the constant term,
// must be 1). The functions below find the couples of adjacent taps whose
// XOR is already produced, as a clock-enable signal, by the clock gate of
// the lower stage of the couple. A stage's binomial x^(i+1) xor x^i exists
// for i = 0 .. N-2 only; the top stage's binomial contains the feedback
// itself and is never used. Each tap belongs to at most one couple. Couples
// are picked greedily from x^0 upward, which gives the largest possible
// number of couples m_c for any tap vector.
package lfsr_pkg;

  localparam int unsigned MAX_N = 64;
  typedef logic [MAX_N-1:0] tapvec_t;

  // Bit i set: taps i and i+1 form a couple, fed by the binomial of stage i.
  function automatic tapvec_t couple_low_mask(int unsigned n, tapvec_t taps);
    tapvec_t m = '0;
    int unsigned i = 0;
    while (i + 1 < n) begin
      if (taps[i] && taps[i+1]) begin
        m[i] = 1'b1;
        i += 2;
      end else begin
        i += 1;
      end
    end
    return m;
  endfunction

  // Bit i set: tap i is used on its own, as the stage output x^i.
  function automatic tapvec_t single_mask(int unsigned n, tapvec_t taps);
    tapvec_t c = couple_low_mask(n, taps);
    tapvec_t s = '0;
    for (int unsigned i = 0; i < n; i++) begin
      s[i] = taps[i] && !c[i] && !(i > 0 && c[i-1]);
    end
    return s;
  endfunction

  function automatic int unsigned popcount(tapvec_t v);
    int unsigned k = 0;
    for (int unsigned i = 0; i < MAX_N; i++) k += int'(v[i]);
    return k;
  endfunction

  // n_t: XORs of a conventional feedback chain (taps minus one).
  function automatic int unsigned xor_count_plain(int unsigned n, tapvec_t taps);
    tapvec_t t = '0;
    for (int unsigned i = 0; i < n; i++) t[i] = taps[i];
    return popcount(t) - 1;
  endfunction

  // m_c: number of couples of adjacent taps.
  function automatic int unsigned couple_count(int unsigned n, tapvec_t taps);
    return popcount(couple_low_mask(n, taps));
  endfunction

  // n_t'' = n_t - m_c: XORs of the reduced feedback chain.
  function automatic int unsigned xor_count_reduced(int unsigned n, tapvec_t taps);
    return xor_count_plain(n, taps) - couple_count(n, taps);
  endfunction

endpackage
