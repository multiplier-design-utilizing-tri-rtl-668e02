// tb_tlog_conv: testbench of the ternary logarithm converter. Every 6-trit operand 1..728 and 2000 random 21-trit operands; characteristic and corrected mantissa are compared with the digit-array reference model.
//
// Self-checking, purely combinational stimulus with a 1 ns settle per
// vector. A clock runs only for the watchdog, which fails the test if the
// run has not ended after a fixed number of cycles. Ends with one
// TB_RESULT line.
module tb_tlog_conv;
  import tvl_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trit_t [5:0]  x6, m6;
  trit_t [1:0]  c6;
  logic         z6, z21;
  trit_t [20:0] x21, m21;
  trit_t [2:0]  c21;

  tlog_conv #(.NT(6))  dut6  (.x(x6),  .c(c6),  .mn(m6),  .zero(z6));
  tlog_conv #(.NT(21)) dut21 (.x(x21), .c(c21), .mn(m21), .zero(z21));

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
      $display("FAIL %s got=%0d exp=%0d", tag, got, exp);
    end
  endtask

  initial begin
    int c, cnd;
    wide_t mant, v;
    for (int k = 1; k < 729; k++) begin
      x6 = tenc(k, 6);
      #1;
      cnd = ref_log(6, k, c, mant);
      chk("char6", tval(c6, 2), c);
      chk("mant6", tval(m6, 6), mant);
      chk("zero6", z6, 0);
    end
    // 192 = 021010_3 -> 4 + 0.210100_3
    x6 = tenc(192, 6);
    #1;
    chk("ex192 char", tval(c6, 2), 4);
    chk("ex192 mant", tval(m6, 6), 2*243 + 81 + 9);
    x6 = '0;
    #1;
    chk("zero6 flag", z6, 1);
    for (int k = 0; k < 2000; k++) begin
      v = {$urandom(), $urandom()} % p3(21);
      v = v / p3($urandom_range(0, 20));
      if (v == 0) v = 1;
      x21 = tenc(v, 21);
      #1;
      cnd = ref_log(21, v, c, mant);
      chk("char21", tval(c21, 3), c);
      chk("mant21", tval(m21, 21), mant);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
