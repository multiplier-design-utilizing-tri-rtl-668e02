// tb_rlns_tvl_mult_sizes: the multiplier at its two larger evaluated sizes.
//
// Instantiates the top with NT = 11 (sized against 16-bit binary operands,
// 21-trit product) and NT = 21 (sized against 32-bit operands, 41-trit
// product). For each, 500 random operand pairs drawn from the binary range
// (operand magnitudes spread over all exponents) are compared bit-exactly
// with the integer reference model, and the mean relative error against the
// exact product must stay within 7 %, the bound reported for the design.
// Also checks the largest binary operands (65535^2, 4294967295^2), which
// give the largest characteristic each shifter must reach. Purely
// combinational stimulus; the clock only drives the watchdog.
module tb_rlns_tvl_mult_sizes;
  import tvl_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trit_t [10:0] x11, y11;
  trit_t [20:0] z11;
  trit_t [20:0] x21, y21;
  trit_t [40:0] z21;

  rlns_tvl_mult #(.NT(11)) dut11 (.x(x11), .y(y11), .z(z11));
  rlns_tvl_mult #(.NT(21)) dut21 (.x(x21), .y(y21), .z(z21));

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic real rel_err(input wide_t z, input wide_t p);
    real zr, pr;
    zr = real'(z);
    pr = real'(p);
    return ((zr > pr) ? zr - pr : pr - zr) / pr;
  endfunction

  initial begin
    real e11, e21;
    wide_t a, b;
    e11 = 0.0;
    e21 = 0.0;
    for (int k = 0; k < 500; k++) begin
      a = wide_t'($urandom_range(1, 65535)) >> $urandom_range(0, 15);
      b = wide_t'($urandom_range(1, 65535)) >> $urandom_range(0, 15);
      if (a == 0) a = 1;
      if (b == 0) b = 1;
      x11 = tenc(a, 11);
      y11 = tenc(b, 11);
      #1;
      chk("z11", tval(z11, 21), ref_mult(11, a, b));
      e11 += rel_err(tval(z11, 21), a * b);
    end
    for (int k = 0; k < 500; k++) begin
      a = wide_t'($urandom()) >> $urandom_range(0, 31);
      b = wide_t'($urandom()) >> $urandom_range(0, 31);
      if (a == 0) a = 1;
      if (b == 0) b = 1;
      x21 = tenc(a, 21);
      y21 = tenc(b, 21);
      #1;
      chk("z21", tval(z21, 41), ref_mult(21, a, b));
      e21 += rel_err(tval(z21, 41), a * b);
    end
    x11 = tenc(65535, 11);
    y11 = tenc(65535, 11);
    x21 = tenc(64'd4294967295, 21);
    y21 = tenc(64'd4294967295, 21);
    #1;
    chk("z11 max", tval(z11, 21), ref_mult(11, 65535, 65535));
    chk("z21 max", tval(z21, 41), ref_mult(21, 64'd4294967295, 64'd4294967295));
    $display("NT=11 mean relative error %0.2f %%, NT=21 mean relative error %0.2f %%",
             100.0 * e11 / 500, 100.0 * e21 / 500);
    chk("NT=11 mean error <= 7%", (100.0 * e11 / 500) <= 7.0, 1);
    chk("NT=21 mean error <= 7%", (100.0 * e21 / 500) <= 7.0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
