// tb_ctrl_adjust: testbench of the antilogarithm control adjustment. For NT = 6, 11 and 21, every characteristic T from 0 to 2NT-2 must give T' = (2NT-2) - T; also checks the adjusting constants 121_3, 020_3 and 1111_3.
//
// Self-checking, purely combinational stimulus with a 1 ns settle per
// vector. A clock runs only for the watchdog, which fails the test if the
// run has not ended after a fixed number of cycles. Ends with one
// TB_RESULT line.
module tb_ctrl_adjust;
  import tvl_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trit_t [3:0] t;
  trit_t [2:0] tp6, tp11;
  trit_t [3:0] tp21;

  ctrl_adjust #(.NT(6))  dut6  (.t(t), .tp(tp6));
  ctrl_adjust #(.NT(11)) dut11 (.t(t), .tp(tp11));
  ctrl_adjust #(.NT(21)) dut21 (.t(t), .tp(tp21));

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
    chk("V6",  adjust_v(6),  16);   // 121_3
    chk("V11", adjust_v(11), 6);    // 020_3
    chk("V21", adjust_v(21), 40);   // 1111_3
    for (int v = 0; v <= 40; v++) begin
      t = tenc(v, 4);
      #1;
      if (v <= 10) chk("tp6", tval(tp6, 3), 10 - v);
      if (v <= 20) chk("tp11", tval(tp11, 3), 20 - v);
      chk("tp21", tval(tp21, 4), 40 - v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
