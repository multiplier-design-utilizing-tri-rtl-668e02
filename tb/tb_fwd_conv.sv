// tb_fwd_conv: testbench of the forward converter. Every characteristic of the 2- and 3-trit versions; residues compared with the remainders mod 8 and 9.
//
// Self-checking, purely combinational stimulus with a 1 ns settle per
// vector. A clock runs only for the watchdog, which fails the test if the
// run has not ended after a fixed number of cycles. Ends with one
// TB_RESULT line.
module tb_fwd_conv;
  import tvl_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trit_t [1:0] c2, a1, a2;
  trit_t [2:0] c3;
  trit_t [1:0] b1, b2;

  fwd_conv #(.CT(2)) dut2 (.c(c2), .r1(a1), .r2(a2));
  fwd_conv #(.CT(3)) dut3 (.c(c3), .r1(b1), .r2(b2));

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
    for (int v = 0; v < 27; v++) begin
      c3 = tenc(v, 3);
      c2 = tenc(v % 9, 2);
      #1;
      chk("r1 ct3", tval(b1, 2), v % 8);
      chk("r2 ct3", tval(b2, 2), v % 9);
      chk("r1 ct2", tval(a1, 2), (v % 9) % 8);
      chk("r2 ct2", tval(a2, 2), v % 9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
