// tb_crt_rev: testbench of the CRT reverse converter. All 72 residue pairs; the output must be below 72 and leave the given remainders mod 8 and mod 9.
//
// Self-checking, purely combinational stimulus with a 1 ns settle per
// vector. A clock runs only for the watchdog, which fails the test if the
// run has not ended after a fixed number of cycles. Ends with one
// TB_RESULT line.
module tb_crt_rev;
  import tvl_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trit_t [1:0] t1, t2;
  trit_t [3:0] t;

  crt_rev dut (.t1(t1), .t2(t2), .t(t));

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
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 9; b++) begin
        wide_t v;
        t1 = tenc(a, 2);
        t2 = tenc(b, 2);
        #1;
        v = tval(t, 4);
        chk("range", v < 72, 1);
        chk("mod8", v % 8, a);
        chk("mod9", v % 9, b);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
