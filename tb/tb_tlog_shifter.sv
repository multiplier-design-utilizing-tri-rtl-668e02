// tb_tlog_shifter: testbench of the ternary logarithmic shifter. The rotating 6-trit version (as used for the logarithm) is checked for every shift 0..8 on random data against a rotation computed with integer division; the zero-filling 11-trit version (as used for the antilogarithm) is checked for every shift 0..26 against division by a power of three.
//
// Self-checking, purely combinational stimulus with a 1 ns settle per
// vector. A clock runs only for the watchdog, which fails the test if the
// run has not ended after a fixed number of cycles. Ends with one
// TB_RESULT line.
module tb_tlog_shifter;
  import tvl_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trit_t [5:0]  r_in, r_out;
  trit_t [1:0]  r_sh;
  trit_t [10:0] f_in, f_out;
  trit_t [2:0]  f_sh;

  tlog_shifter #(.W(6),  .K(2), .WRAP(1'b1)) dut_rot  (.din(r_in), .sh(r_sh), .dout(r_out));
  tlog_shifter #(.W(11), .K(3), .WRAP(1'b0)) dut_fill (.din(f_in), .sh(f_sh), .dout(f_out));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      wide_t v, e;
      int s;
      v = wide_t'($urandom_range(0, 728));
      s = k % 9;
      r_in = tenc(v, 6);
      r_sh = tenc(s, 2);
      #1;
      // rotate right by s mod 6
      e = (v / p3(s % 6)) + (v % p3(s % 6)) * p3(6 - (s % 6));
      checks++;
      if (tval(r_out, 6) != e) begin
        failures++;
        $display("FAIL rot v=%0d s=%0d got=%0d exp=%0d", v, s, tval(r_out, 6), e);
      end
    end
    for (int k = 0; k < 540; k++) begin
      wide_t v;
      int s;
      v = wide_t'($urandom_range(0, 177146));
      s = k % 27;
      f_in = tenc(v, 11);
      f_sh = tenc(s, 3);
      #1;
      checks++;
      if (tval(f_out, 11) != v / p3(s)) begin
        failures++;
        $display("FAIL fill v=%0d s=%0d got=%0d", v, s, tval(f_out, 11));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
