// tb_rlns_adder: testbench of the residue-domain logarithmic adder. Random residues (mod 8 and mod 9) and random 6-trit mantissas; the added mantissa, its carry and both reduced residues are compared with integer sums. Counts that the mantissa carry and the modulo-8 and modulo-9 wrap-around all occur.
//
// Self-checking, purely combinational stimulus with a 1 ns settle per
// vector. A clock runs only for the watchdog, which fails the test if the
// run has not ended after a fixed number of cycles. Ends with one
// TB_RESULT line.
module tb_rlns_adder;
  import tvl_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_carry = 0, n_wrap8 = 0, n_wrap9 = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trit_t [1:0] xr1, xr2, yr1, yr2, t1, t2;
  trit_t [5:0] xm, ym, mn;
  trit_t       mc;

  rlns_adder #(.NT(6)) dut (
    .xr1(xr1), .xr2(xr2), .yr1(yr1), .yr2(yr2), .xm(xm), .ym(ym),
    .t1(t1), .t2(t2), .mn(mn), .mcarry(mc)
  );

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
    for (int k = 0; k < 3000; k++) begin
      int a1, a2, b1, b2, ma, mb, s, cy;
      a1 = $urandom_range(0, 7); b1 = $urandom_range(0, 7);
      a2 = $urandom_range(0, 8); b2 = $urandom_range(0, 8);
      ma = $urandom_range(0, 728); mb = $urandom_range(0, 728);
      xr1 = tenc(a1, 2); yr1 = tenc(b1, 2);
      xr2 = tenc(a2, 2); yr2 = tenc(b2, 2);
      xm = tenc(ma, 6); ym = tenc(mb, 6);
      #1;
      s  = ma + mb;
      cy = s / 729;
      chk("mn", tval(mn, 6), s % 729);
      chk("carry", tval(mc, 1), cy);
      chk("t1", tval(t1, 2), (a1 + b1 + cy) % 8);
      chk("t2", tval(t2, 2), (a2 + b2 + cy) % 9);
      if (cy != 0) n_carry++;
      if (a1 + b1 + cy >= 8) n_wrap8++;
      if (a2 + b2 + cy >= 9) n_wrap9++;
    end
    chk("carry seen", n_carry > 0, 1);
    chk("wrap8 seen", n_wrap8 > 0, 1);
    chk("wrap9 seen", n_wrap9 > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
