// tb_ltd: testbench of the leading trit detector. All 729 operands of the flat 6-trit detector and 2000 random operands each of the grouped 11- and 21-trit detectors; each output is compared with the leading non-zero trit found by integer division.
//
// Self-checking, purely combinational stimulus with a 1 ns settle per
// vector. A clock runs only for the watchdog, which fails the test if the
// run has not ended after a fixed number of cycles. Ends with one
// TB_RESULT line.
module tb_ltd;
  import tvl_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  trit_t [5:0]  x6, d6;
  trit_t [10:0] x11, d11;
  trit_t [20:0] x21, d21;
  logic z6, z11, z21;

  ltd #(.NT(6))  dut6  (.x(x6),  .d(d6),  .zero(z6));
  ltd #(.NT(11)) dut11 (.x(x11), .d(d11), .zero(z11));
  ltd #(.NT(21)) dut21 (.x(x21), .d(d21), .zero(z21));

  // Expected: only the leading non-zero trit survives.
  function automatic wide_t exp_lead(input wide_t v, input int n);
    wide_t p;
    if (v == 0) return 0;
    p = 1;
    while (v / p >= 3) p = p * 3;
    return (v / p) * p;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 729; v++) begin
      x6 = tenc(v, 6);
      #1;
      checks++;
      if (tval(d6, 6) != exp_lead(v, 6) || z6 != (v == 0) || !tvalid(d6, 6)) begin
        failures++;
        $display("FAIL ltd6 x=%0d d=%0d zero=%0b", v, tval(d6, 6), z6);
      end
    end
    for (int k = 0; k < 2000; k++) begin
      wide_t v;
      v = wide_t'($urandom_range(0, 177146)) / p3($urandom_range(0, 10));
      x11 = tenc(v, 11);
      #1;
      checks++;
      if (tval(d11, 11) != exp_lead(v, 11) || z11 != (v == 0)) begin
        failures++;
        $display("FAIL ltd11 x=%0d d=%0d", v, tval(d11, 11));
      end
    end
    for (int k = 0; k < 2000; k++) begin
      wide_t v;
      v = ({$urandom(), $urandom()} % p3(21)) / p3($urandom_range(0, 21));
      x21 = tenc(v, 21);
      #1;
      checks++;
      if (tval(d21, 21) != exp_lead(v, 21) || z21 != (v == 0)) begin
        failures++;
        $display("FAIL ltd21 x=%0d d=%0d", v, tval(d21, 21));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
