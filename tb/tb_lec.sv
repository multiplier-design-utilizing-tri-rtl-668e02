// tb_lec: testbench of the logarithmic error correction. Exhaustive for NT = 6 (leading trit 1 or 2 with all 243 mantissas) and random for NT = 11, compared with the digit-array model of the four correction conditions; also checks the worked example 192 -> 0.210100 and that every condition occurs.
//
// Self-checking, purely combinational stimulus with a 1 ns settle per
// vector. A clock runs only for the watchdog, which fails the test if the
// run has not ended after a fixed number of cycles. Ends with one
// TB_RESULT line.
module tb_lec;
  import tvl_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  int cond_seen[5];
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trit_t        lead6, lead11;
  trit_t [4:0]  m6;
  trit_t [5:0]  om6;
  trit_t [9:0]  m11;
  trit_t [10:0] om11;

  lec #(.NT(6))  dut6  (.lead(lead6),  .m(m6),  .om(om6));
  lec #(.NT(11)) dut11 (.lead(lead11), .m(m11), .om(om11));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nt, input int ld, input wide_t mv);
    int m[64];
    int om[64];
    int cnd;
    wide_t e, got;
    wide_t t = mv;
    for (int i = 0; i < 64; i++) m[i] = 0;
    for (int i = nt - 2; i >= 0; i--) begin m[i] = int'(t % 3); t = t / 3; end
    cnd = ref_lec(nt, ld, m, om);
    e = 0;
    for (int i = 0; i < nt; i++) e = e * 3 + wide_t'(om[i]);
    if (nt == 6) begin
      lead6 = trit_t'(ld); m6 = tenc(mv, 5);
      #1; got = tval(om6, 6);
    end else begin
      lead11 = trit_t'(ld); m11 = tenc(mv, 10);
      #1; got = tval(om11, 11);
    end
    cond_seen[cnd]++;
    checks++;
    if (got != e) begin
      failures++;
      $display("FAIL lec nt=%0d lead=%0d m=%0d got=%0d exp=%0d", nt, ld, mv, got, e);
    end
  endtask

  initial begin
    for (int ld = 1; ld <= 2; ld++)
      for (int mv = 0; mv < 243; mv++) run(6, ld, mv);
    for (int k = 0; k < 1000; k++) run(11, $urandom_range(1, 2), wide_t'($urandom_range(0, 59048)));
    // 192 = 021010_3: leading 2, mantissa 1010(0) -> 0.210100_3
    lead6 = T2;
    m6 = tenc(1*81 + 0*27 + 1*9 + 0*3 + 0, 5);
    #1;
    checks++;
    if (tval(om6, 6) != wide_t'(2*243 + 1*81 + 0*27 + 1*9 + 0*3 + 0)) begin
      failures++;
      $display("FAIL example 192: got %0d", tval(om6, 6));
    end
    for (int c = 1; c <= 4; c++) begin
      checks++;
      if (cond_seen[c] == 0) begin
        failures++;
        $display("FAIL condition %0d never exercised", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
