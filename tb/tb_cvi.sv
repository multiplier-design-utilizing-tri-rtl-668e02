// tb_cvi: testbench of the characteristic value identifier. Drives every single active line with a leading 1 and a leading 2 (and no line) for the 6-, 11- and 21-trit versions and checks that the output is the line's position in ternary.
//
// Self-checking, purely combinational stimulus with a 1 ns settle per
// vector. A clock runs only for the watchdog, which fails the test if the
// run has not ended after a fixed number of cycles. Ends with one
// TB_RESULT line.
module tb_cvi;
  import tvl_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trit_t [5:0]  d6;
  trit_t [1:0]  c6;
  trit_t [10:0] d11;
  trit_t [2:0]  c11;
  trit_t [20:0] d21;
  trit_t [2:0]  c21;

  cvi #(.NT(6))  dut6  (.d(d6),  .c(c6));
  cvi #(.NT(11)) dut11 (.d(d11), .c(c11));
  cvi #(.NT(21)) dut21 (.d(d21), .c(c21));

  task automatic chk(input string tag, input wide_t got, input wide_t exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", tag, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int lv = 1; lv <= 2; lv++) begin
      for (int j = 0; j < 21; j++) begin
        d6 = '0; d11 = '0; d21 = '0;
        if (j < 6)  d6[j]  = trit_t'(lv);
        if (j < 11) d11[j] = trit_t'(lv);
        d21[j] = trit_t'(lv);
        #1;
        if (j < 6)  chk("cvi6",  tval(c6, 2),  j);
        if (j < 11) chk("cvi11", tval(c11, 3), j);
        chk("cvi21", tval(c21, 3), j);
      end
    end
    d6 = '0; d11 = '0; d21 = '0;
    #1;
    chk("cvi6 none", tval(c6, 2), 0);
    chk("cvi21 none", tval(c21, 3), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
