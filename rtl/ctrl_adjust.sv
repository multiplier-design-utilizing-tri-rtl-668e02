// ctrl_adjust: control input of the antilogarithm shifter, T' = STI(T + V).
//
// The antilogarithm shifter places the corrected mantissa in its top NT
// trits and shifts it down, so it must shift by (2NT-2) - T to put the
// integer trit of the mantissa at position T. Adding the constant V and
// inverting every trit (standard ternary inverter) over K trits gives
// exactly that: STI(v) = (3^K - 1) - v, so T' = 3^K - 1 - V - T =
// (2NT-2) - T. V is 121_3 for NT = 6, 020_3 for NT = 11 and 1111_3 for
// NT = 21, the document's values. T above 2NT-2 (a product beyond the
// design's output range) wraps and yields a large shift.
// Purely combinational: one K-trit ternary adder and K inverters.
module ctrl_adjust
  import tvl_pkg::*;
#(
  parameter int unsigned NT = 6,
  parameter int unsigned K  = actl_trits(NT)
) (
  input  trit_t [TT-1:0] t,
  output trit_t [K-1:0]  tp
);

  localparam int unsigned V = adjust_v(NT);

  trit_t [K-1:0] t_k, v_k, sum;
  trit_t         unused_carry;

  always_comb begin
    int unsigned rem;
    rem = V;
    for (int unsigned k = 0; k < K; k++) begin
      t_k[k] = (k < TT) ? t[k] : T0;
      v_k[k] = trit_t'(rem % 3);
      rem    = rem / 3;
    end
  end

  tadd #(.W(K)) u_add (
    .a (t_k), .b (v_k), .cin (T0), .s (sum), .cout (unused_carry)
  );

  always_comb
    for (int unsigned k = 0; k < K; k++) tp[k] = t_sti(sum[k]);

endmodule
