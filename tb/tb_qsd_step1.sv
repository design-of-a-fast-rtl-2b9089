// tb_qsd_step1: exhaustive self-checking test of the first-stage recoder.
//
// All 49 pairs of legal digits are applied. The expected (carry, sum) pair for each
// operand sum -6..+6 comes from the recoding table written out below; on top of that,
// every output is checked against the rules it must satisfy: ic*4 + is equals a + b,
// |is| <= 2, |ic| <= 1 and ic[2] == ic[1]. The block is combinational: inputs change on
// the falling clock edge and outputs are checked in the same cycle (latency 0).
module tb_qsd_step1;
  import qsd_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  qsd_digit_t a, b, ic, is;
  int checks = 0, failures = 0;

  qsd_step1 dut (.a(a), .b(b), .ic(ic), .is(is));

  // Expected code for operand sums -6..+6 (index sum+6).
  int exp_c [13] = '{-1, -1, -1, -1, 0, 0, 0, 0, 0, 1, 1, 1, 1};
  int exp_s [13] = '{-2, -1,  0,  1, -2, -1, 0, 1, 2, -1, 0, 1, 2};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d ic=%0d is=%0d", what, a, b, ic, is);
    end
  endtask

  initial begin
    a = '0; b = '0;
    for (int x = -3; x <= 3; x++) begin
      for (int y = -3; y <= 3; y++) begin
        @(negedge clk);
        a = 3'(x); b = 3'(y);
        #1;
        check(int'(ic) == exp_c[x+y+6], "carry code");
        check(int'(is) == exp_s[x+y+6], "sum code");
        check(int'(ic) * 4 + int'(is) == x + y, "value kept");
        check(int'(is) >= -2 && int'(is) <= 2 && int'(ic) >= -1 && int'(ic) <= 1, "ranges");
        check(ic[2] == ic[1], "carry sign bit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
