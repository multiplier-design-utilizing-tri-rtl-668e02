// cvi: characteristic value identifier.
//
// Takes the one-hot-in-position output of the leading trit detector and
// returns the position of the leading trit as a ternary number: the integer
// part (characteristic) of log3 of the operand. It is a small read-only
// memory: input line j, when it carries a non-zero trit, drives the ternary
// code of j onto the CT output trits. Each line is first normalised to
// "2"/"0" (active/inactive) as the document does with its input control
// gates, and the lines are merged with ternary OR, as the precharged lines
// of a MOS ROM are. Line 0 drives the code 0, so it needs no gate.
// CT = clog3(NT) trits (2 for NT = 6, 3 for NT = 11 and 21).
//
// Purely combinational.
module cvi
  import tvl_pkg::*;
#(
  parameter int unsigned NT = 6,
  parameter int unsigned CT = char_trits(NT)
) (
  input  trit_t [NT-1:0] d,
  output trit_t [CT-1:0] c
);

  always_comb begin
    trit_t [CT-1:0] acc;
    acc = '0;
    for (int unsigned j = 1; j < NT; j++) begin
      // Active line: "2" for a leading "1" or "2", else "0".
      trit_t act;
      int unsigned code;
      act  = (d[j] != T0) ? T2 : T0;
      code = j;
      for (int unsigned k = 0; k < CT; k++) begin
        acc[k] = t_or(acc[k], t_and(act, trit_t'(code % 3)));
        code = code / 3;
      end
    end
    c = acc;
  end

endmodule
