// crt_rev: reverse converter by the Chinese Remainder Theorem.
//
// Rebuilds the characteristic of the product from its residues:
//   T = < <t1*N1>_8 * M1 + <t2*N2>_9 * M2 >_72
// with M = 72, M1 = 9, M2 = 8, N1 = <9^-1>_8 = 1 and N2 = <8^-1>_9 = 8.
// T is a 4-trit ternary number (72 = 2200_3). The document gives the
// equation, not the gates; it is evaluated here directly and synthesises
// to a small table of the four input trits. Purely combinational.
module crt_rev
  import tvl_pkg::*;
(
  input  trit_t [RT-1:0] t1,
  input  trit_t [RT-1:0] t2,
  output trit_t [TT-1:0] t
);

  logic [3:0] v1, v2;   // residues as integers, 0..7 and 0..8
  logic [3:0] a1, a2;   // <t1*N1>_8 and <t2*N2>_9
  logic [6:0] tv;       // T, 0..71

  assign v1 = 4'(t1[1]) * 4'd3 + 4'(t1[0]);
  assign v2 = 4'(t2[1]) * 4'd3 + 4'(t2[0]);
  assign a1 = 4'((32'(v1) * CRT_N1) % MOD1);
  assign a2 = 4'((32'(v2) * CRT_N2) % MOD2);
  assign tv = 7'((32'(a1) * CRT_W1 + 32'(a2) * CRT_W2) % DYN_M);

  // Ternary digits of T.
  for (genvar k = 0; k < TT; k++) begin : g_trit
    assign t[k] = trit_t'((32'(tv) / pow3(k)) % 3);
  end

endmodule
