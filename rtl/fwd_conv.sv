// fwd_conv: forward (residue) converter of the characteristic.
//
// Converts the CT-trit characteristic of an operand's logarithm into its
// residues modulo the moduli set {3^2 - 1, 3^2} = {8, 9}. Each residue is a
// 2-trit ternary number. The modulo-9 residue is simply the two least
// significant trits; the modulo-8 residue folds the higher trits back
// (3^2 = 1 mod 8). Purely combinational.
module fwd_conv
  import tvl_pkg::*;
#(
  parameter int unsigned CT = 2
) (
  input  trit_t [CT-1:0] c,
  output trit_t [RT-1:0] r1,   // c mod 8
  output trit_t [RT-1:0] r2    // c mod 9
);

  tmod #(.IW(CT), .MOD(MOD1), .OW(RT)) u_m1 (.a(c), .r(r1));
  tmod #(.IW(CT), .MOD(MOD2), .OW(RT)) u_m2 (.a(c), .r(r2));

endmodule
