// lec: logarithmic error correction of the ternary mantissa.
//
// A plain "leading-trit removed" mantissa is a poor approximation of the
// fractional part of log3. This block picks one of four corrections from
// the three most significant trits of the normalised operand: M3 (the
// leading trit), M2 and M1 (the first two mantissa trits). Input m holds the
// NT-1 mantissa trits, m[NT-2] being m_-1; output om holds NT trits,
// om[NT-1] being Om_-1 (weight 1/3). "Selected inversion" maps a "2" to "0"
// and leaves "0" and "1" unchanged.
//
//   1. M3 = 2 or M2 = 2:          om = M3, m_-1 .. m_-(NT-1)
//   2. M3 M2 = 11, M1 = 1 or 2:   om = M3, inv(m_-1 .. m_-(NT-1)),
//                                 and Om_-2 = 0 when M1 = 1
//   3. M3 M2 = 11, M1 = 0:        om = inv(m_-1 .. m_-(NT-1)), 0
//   4. M3 M2 = 10:                om = m_-1 .. m_-(NT-1), 0
//
// The four conditions are the document's; filling the freed least
// significant trit with "0" in cases 3 and 4, and applying the selected
// inversion to every mantissa trit for NT > 6, are this design's reading.
// Example: 192 = 021010_3 gives M3 M2 M1 = 210, case 1, om = 0.210100_3,
// so log3(192) is approximated by 4.7901 (exact 4.7855).
//
// Purely combinational. NT must be at least 3.
module lec
  import tvl_pkg::*;
#(
  parameter int unsigned NT = 6
) (
  input  trit_t          lead,  // M3
  input  trit_t [NT-2:0] m,     // m_-1 at index NT-2
  output trit_t [NT-1:0] om     // Om_-1 at index NT-1
);

  trit_t          m2, m1;
  trit_t [NT-2:0] m_inv;

  assign m2 = m[NT-2];
  assign m1 = m[NT-3];

  always_comb begin
    for (int i = 0; i < NT - 1; i++) m_inv[i] = (m[i] == T2) ? T0 : m[i];

    if (lead == T2 || m2 == T2) begin
      om = {lead, m};
    end else if (m2 == T1 && m1 != T0) begin
      om = {lead, m_inv};
      if (m1 == T1) om[NT-2] = T0;
    end else if (m2 == T1) begin
      om = {m_inv, T0};
    end else begin
      om = {m, T0};
    end
  end

endmodule
