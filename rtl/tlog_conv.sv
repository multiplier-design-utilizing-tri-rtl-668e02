// tlog_conv: ternary logarithm converter for an NT-trit unsigned operand.
//
// Produces the approximate base-3 logarithm of x as a characteristic c
// (CT trits, the position of the leading non-zero trit) and a corrected
// mantissa mn (NT trits of fraction, weight 3^-1 at index NT-1).
// Dataflow, as in the document's logarithm converter:
//   x -> leading trit detector -> characteristic value identifier -> c
//   x -> NT-trit logarithmic shifter rotated right by c
//        (the leading trit lands in the least significant position and is
//         removed; the NT-1 trits above it are the raw mantissa)
//     -> logarithmic error correction (uses the leading trit and the first
//        two mantissa trits) -> mn
// `zero` flags x = 0, for which log3 does not exist (this design's
// addition). Purely combinational.
module tlog_conv
  import tvl_pkg::*;
#(
  parameter int unsigned NT = 6,
  parameter int unsigned CT = char_trits(NT)
) (
  input  trit_t [NT-1:0] x,
  output trit_t [CT-1:0] c,
  output trit_t [NT-1:0] mn,
  output logic           zero
);

  trit_t [NT-1:0] lead_only;
  trit_t [NT-1:0] rotated;

  ltd #(.NT(NT)) u_ltd (
    .x    (x),
    .d    (lead_only),
    .zero (zero)
  );

  cvi #(.NT(NT), .CT(CT)) u_cvi (
    .d (lead_only),
    .c (c)
  );

  tlog_shifter #(.W(NT), .K(CT), .WRAP(1'b1)) u_shift (
    .din  (x),
    .sh   (c),
    .dout (rotated)
  );

  lec #(.NT(NT)) u_lec (
    .lead (rotated[0]),
    .m    (rotated[NT-1:1]),
    .om   (mn)
  );

endmodule
