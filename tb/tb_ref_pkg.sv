// tb_ref_pkg: reference model and helpers for the multiplier testbenches.
//
// Trit vectors are handled as flat bit vectors, two bits per trit, trit i in
// bits [2i+1:2i], up to 64 trits. The reference model recomputes every step
// of the residue-logarithmic multiplication with plain integer arithmetic on
// digit arrays (no residue channels, no shifter structure), so the RTL is
// checked against an independent statement of the same algorithm:
//   log:   c = position of the leading non-zero trit, mantissa corrected by
//          the four leading-trit conditions
//   sum:   log3 X + log3 Y as an integer characteristic plus NT-trit fraction
//   alog:  antilog correction of the fraction, then value * 3^(c - NT + 1),
//          truncated.
package tb_ref_pkg;

  typedef logic [127:0] wide_t;

  function automatic wide_t p3(input int k);
    wide_t p = 1;
    for (int i = 0; i < k; i++) p = p * 3;
    return p;
  endfunction

  // Value of an n-trit vector given as packed bits.
  function automatic wide_t tval(input wide_t bits, input int n);
    wide_t v = 0;
    for (int i = n - 1; i >= 0; i--) v = v * 3 + wide_t'(bits[2*i +: 2]);
    return v;
  endfunction

  // Encode a value as an n-trit vector.
  function automatic wide_t tenc(input wide_t v, input int n);
    wide_t b = 0;
    for (int i = 0; i < n; i++) begin
      b[2*i +: 2] = 2'(v % 3);
      v = v / 3;
    end
    return b;
  endfunction

  // Trit vector well-formed (no 2'b11 code).
  function automatic bit tvalid(input wide_t bits, input int n);
    for (int i = 0; i < n; i++) if (bits[2*i +: 2] == 2'b11) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int sinv(input int d);
    return (d == 2) ? 0 : d;
  endfunction

  // Logarithmic error correction on digit arrays.
  //   lead: leading trit, m[0..nt-2]: mantissa trits, m[0] = m_-1.
  //   om[0..nt-1], om[0] = Om_-1. Returns the condition number 1..4.
  function automatic int ref_lec(input int nt, input int lead, input int m[64],
                                 output int om[64]);
    int m2, m1;
    m2 = m[0];
    m1 = m[1];
    for (int i = 0; i < 64; i++) om[i] = 0;
    if (lead == 2 || m2 == 2) begin
      om[0] = lead;
      for (int i = 0; i < nt - 1; i++) om[i+1] = m[i];
      return 1;
    end else if (m2 == 1 && m1 != 0) begin
      om[0] = lead;
      for (int i = 0; i < nt - 1; i++) om[i+1] = sinv(m[i]);
      if (m1 == 1) om[1] = 0;
      return 2;
    end else if (m2 == 1) begin
      for (int i = 0; i < nt - 1; i++) om[i] = sinv(m[i]);
      return 3;
    end else begin
      for (int i = 0; i < nt - 1; i++) om[i] = m[i];
      return 4;
    end
  endfunction

  // Logarithm of x (> 0): characteristic and corrected mantissa as an
  // integer fraction over 3^nt. Returns the LEC condition.
  function automatic int ref_log(input int nt, input wide_t x, output int c,
                                 output wide_t mant);
    int dig[64];
    int m[64];
    int om[64];
    int cond;
    wide_t v = x;
    for (int i = 0; i < 64; i++) begin dig[i] = 0; m[i] = 0; end
    for (int i = 0; i < nt; i++) begin dig[i] = int'(v % 3); v = v / 3; end
    c = 0;
    for (int i = 0; i < nt; i++) if (dig[i] != 0) c = i;
    for (int i = 0; i < c; i++) m[i] = dig[c - 1 - i];
    cond = ref_lec(nt, dig[c], m, om);
    mant = 0;
    for (int i = 0; i < nt; i++) mant = mant * 3 + wide_t'(om[i]);
    return cond;
  endfunction

  // Antilog correction on digit arrays, m[0] = m_-1; io[0] = integer trit.
  // Returns a case id: 1 (m_-1=2), 2..5 (m_-1=1 sub-cases), 6 (m_-1=0).
  function automatic int ref_alec(input int nt, input int m[64], output int io[64]);
    for (int i = 0; i < 64; i++) io[i] = (i < nt) ? m[i] : 0;
    if (m[0] == 2) return 1;
    if (m[0] == 0) begin
      io[0] = 1;
      for (int i = 1; i < nt; i++) io[i] = m[i-1];
      return 6;
    end
    if (m[1] == 2) return 2;
    io[0] = 1;
    io[1] = 1;
    if (m[1] == 1) begin io[2] = 2; return 3; end
    if (m[2] != 0) begin io[2] = 1; return 4; end
    io[2] = 0;
    return 5;
  endfunction

  // Full approximate product. Returns 0 for a zero operand.
  function automatic wide_t ref_mult(input int nt, input wide_t x, input wide_t y);
    int cx, cy, t, cnd;
    wide_t mx, my, s, frac;
    int m[64];
    int io[64];
    wide_t iv;
    if (x == 0 || y == 0) return 0;
    cnd = ref_log(nt, x, cx, mx);
    cnd = ref_log(nt, y, cy, my);
    s = mx + my;
    t = cx + cy + int'(s / p3(nt));
    frac = s % p3(nt);
    for (int i = nt - 1; i >= 0; i--) begin m[i] = int'(frac % 3); frac = frac / 3; end
    for (int i = nt; i < 64; i++) m[i] = 0;
    cnd = ref_alec(nt, m, io);
    iv = 0;
    for (int i = 0; i < nt; i++) iv = iv * 3 + wide_t'(io[i]);
    // iv holds 3^mn scaled by 3^(nt-1); keep the integer part of iv*3^(t-nt+1).
    if (t >= nt - 1) return iv * p3(t - nt + 1);
    return iv / p3(nt - 1 - t);
  endfunction

endpackage
