// tb_alec: testbench of the antilogarithmic error correction. All 729 six-trit mantissas and 2000 random eleven-trit ones, compared with the digit-array model; every correction case must occur.
//
// Self-checking, purely combinational stimulus with a 1 ns settle per
// vector. A clock runs only for the watchdog, which fails the test if the
// run has not ended after a fixed number of cycles. Ends with one
// TB_RESULT line.
module tb_alec;
  import tvl_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  int seen[7];
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trit_t [5:0]  m6, i6;
  trit_t [10:0] m11, i11;

  alec #(.NT(6))  dut6  (.m(m6),  .i_o(i6));
  alec #(.NT(11)) dut11 (.m(m11), .i_o(i11));

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

  task automatic run(input int nt, input wide_t mv);
    int m[64];
    int io[64];
    int cs;
    wide_t e, t;
    t = mv;
    for (int i = 0; i < 64; i++) m[i] = 0;
    for (int i = nt - 1; i >= 0; i--) begin m[i] = int'(t % 3); t = t / 3; end
    cs = ref_alec(nt, m, io);
    seen[cs]++;
    e = 0;
    for (int i = 0; i < nt; i++) e = e * 3 + wide_t'(io[i]);
    if (nt == 6) begin
      m6 = tenc(mv, 6); #1; chk("alec6", tval(i6, 6), e);
    end else begin
      m11 = tenc(mv, 11); #1; chk("alec11", tval(i11, 11), e);
    end
  endtask

  initial begin
    for (int v = 0; v < 729; v++) run(6, v);
    for (int k = 0; k < 2000; k++) run(11, wide_t'($urandom_range(0, 177146)));
    for (int c = 1; c <= 6; c++) chk("case seen", seen[c] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
