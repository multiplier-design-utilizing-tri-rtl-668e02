// tadd: W-trit ripple-carry ternary adder.
//
// Each stage is a ternary full adder: sum = (a + b + cin) mod 3 and
// carry = (a + b + cin) div 3, the carry being "0" or "1". Used for the
// mantissa addition, the characteristic-residue addition and the
// antilogarithm control adjustment. Purely combinational.
module tadd
  import tvl_pkg::*;
#(
  parameter int unsigned W = 2
) (
  input  trit_t [W-1:0] a,
  input  trit_t [W-1:0] b,
  input  trit_t         cin,
  output trit_t [W-1:0] s,
  output trit_t         cout
);

  always_comb begin
    logic [2:0] acc;
    trit_t      c;
    c = cin;
    for (int i = 0; i < W; i++) begin
      acc  = 3'(a[i]) + 3'(b[i]) + 3'(c);
      s[i] = (acc >= 3'd3) ? trit_t'(acc - 3'd3) : trit_t'(acc);
      c    = (acc >= 3'd3) ? T1 : T0;
    end
    cout = c;
  end

endmodule
