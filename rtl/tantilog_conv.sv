// tantilog_conv: ternary antilogarithm converter.
//
// Forms the product 3^(T + mn) from the reverse-converted characteristic T
// and the added mantissa mn. The antilogarithmic error correction turns mn
// into NT trits I = 3^mn (one integer trit); they occupy the top NT trits
// of a (2NT-1)-trit logarithmic shifter whose low NT-1 trits are "0". The
// shifter moves them down by T' = STI(T + V) = (2NT-2) - T positions, which
// puts the integer trit at position T; fraction trits that fall below
// position 0 are dropped. Result z has 2NT-1 trits.
// Purely combinational.
module tantilog_conv
  import tvl_pkg::*;
#(
  parameter int unsigned NT = 6,
  parameter int unsigned K  = actl_trits(NT)
) (
  input  trit_t [NT-1:0]   mn,
  input  trit_t [TT-1:0]   t,
  output trit_t [2*NT-2:0] z
);

  trit_t [K-1:0]  tp;
  trit_t [NT-1:0] corr;

  ctrl_adjust #(.NT(NT), .K(K)) u_adj (
    .t  (t),
    .tp (tp)
  );

  alec #(.NT(NT)) u_alec (
    .m   (mn),
    .i_o (corr)
  );

  tlog_shifter #(.W(2*NT-1), .K(K), .WRAP(1'b0)) u_shift (
    .din  ({corr, {(NT-1){T0}}}),
    .sh   (tp),
    .dout (z)
  );

endmodule
