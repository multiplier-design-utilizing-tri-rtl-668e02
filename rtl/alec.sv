// alec: antilogarithmic error correction.
//
// Turns the added mantissa mn (fraction of the product's log3, m_-1 at
// index NT-1) into the NT most significant trits of 3^mn, written as
// I_(NT-1).I_(NT-2) ... I_0 with one integer trit. It inverts, piecewise,
// the mapping the logarithmic error correction applied:
//   m_-1 = 2:  pass m unchanged (3^mn in [2, 3) is read as 2.xxx)
//   m_-1 = 0:  prepend "1" and drop the last trit (3^mn in [1, 1.44))
//   m_-1 = 1:  the first three output trits undo the selected inversion of
//              the leading patterns 112, 111, 110; the rest pass through:
//                m_-2 = 2             -> pass m unchanged (1.2xx)
//                m_-2 = 1             -> 1, 1, 2, m_-4 ...
//                m_-2 = 0, m_-3 != 0  -> 1, 1, 1, m_-4 ...
//                m_-2 = 0, m_-3 = 0   -> 1, 1, 0, m_-4 ...
// The first and last rows are the document's. The m_-1 = 1 sub-table is
// this design's reading of its "reverse the 112/111/110 correction" rule.
// Purely combinational. NT must be at least 4.
module alec
  import tvl_pkg::*;
#(
  parameter int unsigned NT = 6
) (
  input  trit_t [NT-1:0] m,    // m_-1 at index NT-1
  output trit_t [NT-1:0] i_o   // integer trit at index NT-1
);

  always_comb begin
    i_o = m;
    if (m[NT-1] == T0) begin
      i_o = {T1, m[NT-1:1]};
    end else if (m[NT-1] == T1) begin
      if (m[NT-2] == T1) begin
        i_o[NT-1:NT-3] = {T1, T1, T2};
      end else if (m[NT-2] == T0) begin
        i_o[NT-1:NT-3] = {T1, T1, (m[NT-3] == T0) ? T0 : T1};
      end
    end
  end

endmodule
