// rlns_adder: logarithmic addition in the residue domain.
//
// Multiplying two numbers is adding their logarithms. Each logarithm is a
// characteristic, held as residues modulo 8 and 9, plus a corrected
// NT-trit mantissa. The block computes
//   p.mn = Xc1.Xcmn + Yc1.Ycmn      q.mn = Xc2.Xcmn + Yc2.Ycmn
// and reduces t1 = p mod 8, t2 = q mod 9. Both sums share one fractional
// part, so one NT-trit ternary adder forms mn and its carry, and the carry
// enters the two 2-trit residue adders. Each residue sum (3 trits) is then
// reduced by its modulus. Sharing the mantissa adder between the two
// channels is this design's choice; the document writes the two sums
// separately. Purely combinational.
module rlns_adder
  import tvl_pkg::*;
#(
  parameter int unsigned NT = 6
) (
  input  trit_t [RT-1:0] xr1,  // Xc mod 8
  input  trit_t [RT-1:0] xr2,  // Xc mod 9
  input  trit_t [RT-1:0] yr1,  // Yc mod 8
  input  trit_t [RT-1:0] yr2,  // Yc mod 9
  input  trit_t [NT-1:0] xm,   // corrected mantissa of X
  input  trit_t [NT-1:0] ym,   // corrected mantissa of Y
  output trit_t [RT-1:0] t1,   // p mod 8
  output trit_t [RT-1:0] t2,   // q mod 9
  output trit_t [NT-1:0] mn,   // added mantissa
  output trit_t          mcarry // carry of the mantissa addition
);

  trit_t [RT-1:0] s1, s2;
  trit_t          c1, c2;

  tadd #(.W(NT)) u_mant (
    .a (xm), .b (ym), .cin (T0), .s (mn), .cout (mcarry)
  );

  tadd #(.W(RT)) u_p (
    .a (xr1), .b (yr1), .cin (mcarry), .s (s1), .cout (c1)
  );

  tadd #(.W(RT)) u_q (
    .a (xr2), .b (yr2), .cin (mcarry), .s (s2), .cout (c2)
  );

  tmod #(.IW(RT+1), .MOD(MOD1), .OW(RT)) u_t1 (.a({c1, s1}), .r(t1));
  tmod #(.IW(RT+1), .MOD(MOD2), .OW(RT)) u_t2 (.a({c2, s2}), .r(t2));

endmodule
