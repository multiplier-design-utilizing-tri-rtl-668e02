// tb_rlns_tvl_mult: end-to-end testbench of the multiplier at its default
// size (6-trit operands, 11-trit product), top instantiated without
// parameter overrides.
//
// Runs every operand pair 0..255 x 0..255 (the 8-bit operand range the
// 6-trit design is sized for) and compares the product bit-exactly with the
// integer reference model of the same approximate algorithm. It then draws
// 500 random pairs of non-zero 8-bit operands and checks that the mean
// relative error against the exact product stays within 7 %, the bound
// reported for this multiplier. Every mechanism of the datapath is counted
// and must occur at least once: the four logarithmic correction conditions
// (and the Om_-2 exception of condition 2), the six antilogarithmic
// correction cases, the carry out of the mantissa addition, the modulo-8
// wrap of the residue channel, a product characteristic below and above
// NT-1 (antilog shifter dropping fraction trits or not), and a zero
// operand. Purely combinational stimulus, 1 ns per vector; the clock only
// drives the watchdog.
module tb_rlns_tvl_mult;
  import tvl_pkg::*;
  import tb_ref_pkg::*;

  localparam int NT = 6;

  int checks = 0, failures = 0;
  int lec_cond[5];
  int lec_exc = 0;
  int alec_case[7];
  int n_carry = 0, n_wrap8 = 0, n_zero = 0, n_small_t = 0, n_large_t = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trit_t [NT-1:0]   x, y;
  trit_t [2*NT-2:0] z;

  rlns_tvl_mult dut (.x(x), .y(y), .z(z));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string tag, input wide_t got, input wide_t exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d", tag, got, exp);
    end
  endtask

  // Classify one operand pair for the mechanism counters.
  task automatic classify(input int a, input int b);
    int ca, cb, t, ka, kb, cs;
    wide_t ma, mb, s, frac;
    int m[64];
    int io[64];
    if (a == 0 || b == 0) begin n_zero++; return; end
    ka = ref_log(NT, a, ca, ma);
    kb = ref_log(NT, b, cb, mb);
    lec_cond[ka]++;
    // condition 2 with M1 = 1: leading trits 111
    if (ka == 2 && (a / p3(ca > 1 ? ca - 2 : 0)) == 13 && ca >= 2) lec_exc++;
    s = ma + mb;
    if (s >= p3(NT)) n_carry++;
    t = ca + cb + int'(s / p3(NT));
    if ((ca % 8) + (cb % 8) + int'(s / p3(NT)) >= 8) n_wrap8++;
    if (t < NT - 1) n_small_t++; else n_large_t++;
    frac = s % p3(NT);
    for (int i = NT - 1; i >= 0; i--) begin m[i] = int'(frac % 3); frac = frac / 3; end
    for (int i = NT; i < 64; i++) m[i] = 0;
    cs = ref_alec(NT, m, io);
    alec_case[cs]++;
  endtask

  initial begin
    real err_sum;
    int  ncount;
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x = tenc(a, NT);
        y = tenc(b, NT);
        #1;
        chk($sformatf("z(%0d*%0d)", a, b), tval(z, 2*NT-1), ref_mult(NT, a, b));
        classify(a, b);
      end
    end
    // Accuracy over 500 random operand pairs.
    err_sum = 0.0;
    ncount  = 0;
    for (int k = 0; k < 500; k++) begin
      int a, b;
      real zr, pr;
      a = $urandom_range(1, 255);
      b = $urandom_range(1, 255);
      x = tenc(a, NT);
      y = tenc(b, NT);
      #1;
      zr = real'(tval(z, 2*NT-1));
      pr = real'(a * b);
      err_sum += ((zr > pr) ? zr - pr : pr - zr) / pr;
      ncount++;
    end
    $display("mean relative error over %0d random 8-bit pairs: %0.2f %%",
             ncount, 100.0 * err_sum / ncount);
    chk("mean error <= 7%", (100.0 * err_sum / ncount) <= 7.0, 1);
    for (int c = 1; c <= 4; c++) begin
      $display("LEC condition %0d: %0d operands", c, lec_cond[c]);
      chk("LEC condition seen", lec_cond[c] > 0, 1);
    end
    $display("LEC condition 2 Om_-2 exception: %0d", lec_exc);
    chk("LEC exception seen", lec_exc > 0, 1);
    for (int c = 1; c <= 6; c++) begin
      $display("ALEC case %0d: %0d products", c, alec_case[c]);
      chk("ALEC case seen", alec_case[c] > 0, 1);
    end
    $display("mantissa carry %0d, mod-8 wrap %0d, zero operand %0d, T<NT-1 %0d, T>=NT-1 %0d",
             n_carry, n_wrap8, n_zero, n_small_t, n_large_t);
    chk("carry seen", n_carry > 0, 1);
    chk("wrap8 seen", n_wrap8 > 0, 1);
    chk("zero seen", n_zero > 0, 1);
    chk("small T seen", n_small_t > 0, 1);
    chk("large T seen", n_large_t > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
