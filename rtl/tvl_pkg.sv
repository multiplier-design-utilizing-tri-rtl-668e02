// tvl_pkg: shared types, gates and constants of the tri-valued-logic (TVL)
// residue-logarithmic multiplier.
//
// A ternary digit (trit) is carried on two binary wires: 2'b00 = logic "0",
// 2'b01 = logic "1", 2'b10 = logic "2". The code 2'b11 is never produced by
// any module of this design. Vectors of trits are packed arrays of trit_t
// with index 0 the least significant trit, so a trit vector reads like a
// ternary number written most significant trit first.
//
// The gate functions are the standard ternary primitives the multiplier is
// drawn with: the standard ternary inverter (STI, d -> 2-d), the standard
// ternary AND (minimum) and OR (maximum), and the ternary multiplexer.
//
// Constants: the residue moduli {3^n - 1, 3^n} with n = 2, i.e. {8, 9}, the
// dynamic range M = 72 of the characteristic path, the CRT weights, and the
// helper functions that size the trit vectors from the operand width NT.
package tvl_pkg;

  typedef logic [1:0] trit_t;

  localparam trit_t T0 = 2'd0;
  localparam trit_t T1 = 2'd1;
  localparam trit_t T2 = 2'd2;

  // Moduli set {3^MOD_N - 1, 3^MOD_N}.
  localparam int unsigned MOD_N = 2;
  localparam int unsigned MOD1  = 8;           // 3^2 - 1
  localparam int unsigned MOD2  = 9;           // 3^2
  localparam int unsigned RT    = 2;           // trits per residue
  localparam int unsigned DYN_M = MOD1 * MOD2; // 72
  localparam int unsigned CRT_W1 = DYN_M / MOD1;  // M1 = 9
  localparam int unsigned CRT_W2 = DYN_M / MOD2;  // M2 = 8
  localparam int unsigned CRT_N1 = 1;          // <9^-1>_8 = 1
  localparam int unsigned CRT_N2 = 8;          // <8^-1>_9 = 8
  localparam int unsigned TT    = 4;           // trits of T (72 = 2200_3)

  // Smallest k with 3^k >= n: trits needed to count 0 .. n-1.
  function automatic int unsigned clog3(input int unsigned n);
    int unsigned k = 0;
    longint unsigned p = 1;
    while (p < longint'(n)) begin
      p = p * 3;
      k++;
    end
    return k;
  endfunction

  function automatic int unsigned pow3(input int unsigned k);
    int unsigned p = 1;
    for (int unsigned i = 0; i < k; i++) p = p * 3;
    return p;
  endfunction

  // Characteristic width for an NT-trit operand (holds NT-1).
  function automatic int unsigned char_trits(input int unsigned nt);
    return clog3(nt);
  endfunction

  // Control width of the (2NT-1)-trit antilogarithm shifter (holds 2NT-2).
  function automatic int unsigned actl_trits(input int unsigned nt);
    return clog3(2 * nt - 1);
  endfunction

  // Adjusting constant V of the antilogarithm control: STI(T + V) over
  // actl_trits(nt) trits equals (2NT-2) - T. NT=6 -> 121_3, NT=11 -> 020_3,
  // NT=21 -> 1111_3.
  function automatic int unsigned adjust_v(input int unsigned nt);
    return pow3(actl_trits(nt)) - 1 - (2 * nt - 2);
  endfunction

  // Standard ternary inverter.
  function automatic trit_t t_sti(input trit_t a);
    return trit_t'(2'd2 - a);
  endfunction

  // Standard ternary AND / OR.
  function automatic trit_t t_and(input trit_t a, input trit_t b);
    return (a < b) ? a : b;
  endfunction

  function automatic trit_t t_or(input trit_t a, input trit_t b);
    return (a > b) ? a : b;
  endfunction

  // Ternary multiplexer: select s0/s1/s2 by the control trit.
  function automatic trit_t t_mux(input trit_t sel, input trit_t s0,
                                  input trit_t s1, input trit_t s2);
    case (sel)
      T1:      return s1;
      T2:      return s2;
      default: return s0;
    endcase
  endfunction

endpackage
