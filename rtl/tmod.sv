// tmod: residue of a ternary number modulo MOD.
//
// Reads an IW-trit unsigned ternary value and returns value mod MOD as an
// OW-trit ternary number. The document specifies what this converter
// computes, not its gates: it is written here as a direct evaluation of the
// ternary value and a remainder, which synthesis turns into a small table
// for the widths used (at most four input trits). For MOD = 3^OW it reduces
// to keeping the low OW trits. Purely combinational.
module tmod
  import tvl_pkg::*;
#(
  parameter int unsigned IW  = 3,
  parameter int unsigned MOD = 8,
  parameter int unsigned OW  = 2
) (
  input  trit_t [IW-1:0] a,
  output trit_t [OW-1:0] r
);

  always_comb begin
    int unsigned v;
    int unsigned rem;
    v = 0;
    for (int i = IW - 1; i >= 0; i--) v = v * 3 + int'(a[i]);
    rem = v % MOD;
    for (int unsigned k = 0; k < OW; k++) begin
      r[k] = trit_t'(rem % 3);
      rem  = rem / 3;
    end
  end

endmodule
