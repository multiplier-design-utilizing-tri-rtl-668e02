// ltd: leading trit detector for an NT-trit ternary operand.
//
// The output keeps only the most significant non-zero trit of x (value "1"
// or "2", at its own position) and forces every other trit to "0". It is the
// ternary counterpart of a leading-one detector.
//
// Up to 6 trits (the basic block) a chain of ternary multiplexers carries a
// "nothing non-zero above" signal from the most significant trit downwards:
// it is "2" while every higher trit is "0" and drops to "0" below the first
// non-zero trit. Each output trit is the standard ternary AND of its input
// trit and that signal.
//
// Above 6 trits the detector is built, as in the document, from basic
// blocks: the least significant 6 trits form one group and every further 5
// trits another (11 = 6 + 5, 21 = 6 + 5 + 5 + 5). Each group has its own
// basic detector. A small detector over the groups' "non-zero" flags (a
// 2-trit one for NT = 11, a 4-trit one for NT = 21) yields one control trit
// a_g per group, "2" only for the leading non-zero group. Block M then
// passes a group's detector output where a_g = "2" and forces it to "0"
// elsewhere. Which end gets the 6-trit group is this design's choice.
//
// `zero` (all trits "0") is an addition of this design, used to return a
// zero product for a zero operand.
//
// Purely combinational.
module ltd
  import tvl_pkg::*;
#(
  parameter int unsigned NT = 6
) (
  input  trit_t [NT-1:0] x,
  output trit_t [NT-1:0] d,
  output logic           zero
);

  localparam int unsigned BASE = 6;  // basic block, least significant group
  localparam int unsigned STEP = 5;  // further groups
  localparam int unsigned NG   = (NT <= BASE) ? 1 : 1 + (NT - BASE + STEP - 1) / STEP;

  function automatic int unsigned grp_lo(input int unsigned g);
    return (g == 0) ? 0 : BASE + STEP * (g - 1);
  endfunction

  function automatic int unsigned grp_w(input int unsigned g);
    int unsigned rest;
    if (g == 0) return BASE;
    rest = NT - grp_lo(g);
    return (rest < STEP) ? rest : STEP;
  endfunction

  if (NG == 1) begin : g_flat
    // above[i] = "2" when all trits at positions i and higher are "0".
    trit_t [NT:0] above;

    assign above[NT] = T2;

    for (genvar i = 0; i < NT; i++) begin : g_chain
      assign above[i] = t_mux(x[i], above[i+1], T0, T0);
      assign d[i]     = t_and(x[i], above[i+1]);
    end

    assign zero = (above[0] == T2);

  end else begin : g_tree
    trit_t [NG-1:0] nz;    // "2" for a group holding a non-zero trit
    trit_t [NG-1:0] a;     // "2" for the leading non-zero group only

    for (genvar g = 0; g < NG; g++) begin : g_grp
      localparam int unsigned LO = grp_lo(g);
      localparam int unsigned W  = grp_w(g);
      trit_t [W-1:0] dg;
      logic          zg;

      ltd #(.NT(W)) u_blk (
        .x    (x[LO +: W]),
        .d    (dg),
        .zero (zg)
      );

      assign nz[g] = zg ? T0 : T2;

      // Block M: pass the group's leading trit only in the leading group.
      for (genvar i = 0; i < W; i++) begin : g_m
        assign d[LO + i] = t_mux(a[g], T0, dg[i], dg[i]);
      end
    end

    ltd #(.NT(NG)) u_grp (
      .x    (nz),
      .d    (a),
      .zero (zero)
    );
  end

endmodule
