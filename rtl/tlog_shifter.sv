// tlog_shifter: ternary logarithmic (barrel) shifter.
//
// Shifts a W-trit vector towards the least significant end by the ternary
// amount `sh`. Stage i is a row of ternary multiplexers controlled by trit
// sh[i]: it shifts by 0, 3^i or 2*3^i positions for sh[i] = "0", "1", "2".
// With WRAP = 1 the trits leaving the least significant end re-enter at the
// most significant end (a rotation); this is how the logarithm converter
// uses it, so that the trits below the leading trit end up left-aligned at
// the top and the leading trit itself lands in the least significant
// position. With WRAP = 0 vacated positions are filled with "0" and trits
// shifted out are dropped; this is how the antilogarithm converter uses it.
//
// Purely combinational; K stages of W multiplexers.
module tlog_shifter
  import tvl_pkg::*;
#(
  parameter int unsigned W    = 6,
  parameter int unsigned K    = 2,
  parameter bit          WRAP = 1'b1
) (
  input  trit_t [W-1:0] din,
  input  trit_t [K-1:0] sh,
  output trit_t [W-1:0] dout
);

  trit_t [K:0][W-1:0] stage;

  assign stage[0] = din;

  for (genvar s = 0; s < K; s++) begin : g_stage
    localparam int unsigned STEP = pow3(s);
    for (genvar i = 0; i < W; i++) begin : g_trit
      localparam int unsigned SRC1 = i + STEP;
      localparam int unsigned SRC2 = i + 2 * STEP;
      trit_t sh1, sh2;
      if (WRAP) begin : g_rot
        assign sh1 = stage[s][SRC1 % W];
        assign sh2 = stage[s][SRC2 % W];
      end else begin : g_fill
        assign sh1 = (SRC1 < W) ? stage[s][SRC1 % W] : T0;
        assign sh2 = (SRC2 < W) ? stage[s][SRC2 % W] : T0;
      end
      assign stage[s+1][i] = t_mux(sh[s], stage[s][i], sh1, sh2);
    end
  end

  assign dout = stage[K];

endmodule
