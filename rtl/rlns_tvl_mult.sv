// rlns_tvl_mult: residue-logarithmic multiplier in tri-valued logic.
//
// Multiplies two NT-trit unsigned ternary operands x and y approximately,
// by adding their base-3 logarithms with the characteristics carried in a
// residue number system with moduli {8, 9}:
//   1. each operand -> ternary logarithm converter: characteristic c and
//      corrected mantissa (leading trit detector, characteristic value
//      identifier, NT-trit logarithmic shifter, logarithmic correction)
//   2. each characteristic -> forward converter: residues mod 8 and mod 9
//   3. residue-domain logarithmic adder: t1, t2 and the added mantissa mn
//   4. CRT reverse converter: characteristic T of the product
//   5. antilogarithm converter: antilogarithmic correction of mn and a
//      (2NT-1)-trit logarithmic shifter controlled by STI(T + V)
// z is the (2NT-1)-trit product. The design targets products whose log3
// characteristic is at most 2NT-2 (for NT = 6 the document sizes it for
// 8-bit operands, products up to 255*255); larger products are not
// representable in z; a simulation assertion reports such operands. A zero
// operand gives z = 0 (this design's choice;
// the logarithm of zero does not exist). The average relative error of the
// approximation is a few percent.
//
// Purely combinational: no clock, the result follows the operands.
module rlns_tvl_mult
  import tvl_pkg::*;
#(
  parameter int unsigned NT = 6
) (
  input  trit_t [NT-1:0]   x,
  input  trit_t [NT-1:0]   y,
  output trit_t [2*NT-2:0] z
);

  localparam int unsigned CT = char_trits(NT);

  trit_t [CT-1:0]   xc, yc;
  trit_t [NT-1:0]   xm, ym, mn;
  logic             xzero, yzero;
  trit_t [RT-1:0]   xr1, xr2, yr1, yr2, t1, t2;
  trit_t [TT-1:0]   t;
  trit_t [2*NT-2:0] z_raw;

  tlog_conv #(.NT(NT), .CT(CT)) u_logx (.x(x), .c(xc), .mn(xm), .zero(xzero));
  tlog_conv #(.NT(NT), .CT(CT)) u_logy (.x(y), .c(yc), .mn(ym), .zero(yzero));

  fwd_conv #(.CT(CT)) u_fwdx (.c(xc), .r1(xr1), .r2(xr2));
  fwd_conv #(.CT(CT)) u_fwdy (.c(yc), .r1(yr1), .r2(yr2));

  rlns_adder #(.NT(NT)) u_add (
    .xr1 (xr1), .xr2 (xr2), .yr1 (yr1), .yr2 (yr2),
    .xm  (xm),  .ym  (ym),
    .t1  (t1),  .t2  (t2),  .mn (mn), .mcarry ()
  );

  crt_rev u_crt (.t1(t1), .t2(t2), .t(t));

  tantilog_conv #(.NT(NT)) u_alog (.mn(mn), .t(t), .z(z_raw));

  assign z = (xzero || yzero) ? '0 : z_raw;

  // Usage rule: the characteristic of the product must fit the antilog
  // shifter (T <= 2NT-2), otherwise T + V wraps and z is meaningless.
  always_comb begin
    int unsigned tval;
    tval = 0;
    for (int k = TT - 1; k >= 0; k--) tval = tval * 3 + int'(t[k]);
    if (!(xzero || yzero))
      assert (tval <= 2 * NT - 2)
      else $warning("product characteristic %0d exceeds %0d: z out of range",
                    tval, 2 * NT - 2);
  end

endmodule
