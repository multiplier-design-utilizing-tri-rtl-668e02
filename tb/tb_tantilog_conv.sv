// tb_tantilog_conv: testbench of the antilogarithm converter. Random 6-trit added mantissas with every characteristic 0..10; the 11-trit result must equal the corrected mantissa scaled by 3^(T-5), truncated.
//
// Self-checking, purely combinational stimulus with a 1 ns settle per
// vector. A clock runs only for the watchdog, which fails the test if the
// run has not ended after a fixed number of cycles. Ends with one
// TB_RESULT line.
module tb_tantilog_conv;
  import tvl_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trit_t [5:0]  mn;
  trit_t [3:0]  t;
  trit_t [10:0] z;

  tantilog_conv #(.NT(6)) dut (.mn(mn), .t(t), .z(z));

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
    for (int k = 0; k < 2200; k++) begin
      int m[64];
      int io[64];
      int cs, tv;
      wide_t mv, iv, e, r;
      mv = wide_t'($urandom_range(0, 728));
      tv = k % 11;
      r = mv;
      for (int i = 0; i < 64; i++) m[i] = 0;
      for (int i = 5; i >= 0; i--) begin m[i] = int'(r % 3); r = r / 3; end
      cs = ref_alec(6, m, io);
      iv = 0;
      for (int i = 0; i < 6; i++) iv = iv * 3 + wide_t'(io[i]);
      e = (tv >= 5) ? iv * p3(tv - 5) : iv / p3(5 - tv);
      mn = tenc(mv, 6);
      t  = tenc(tv, 4);
      #1;
      chk("z", tval(z, 11), e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
