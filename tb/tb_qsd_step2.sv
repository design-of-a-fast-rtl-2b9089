// tb_qsd_step2: exhaustive self-checking test of the second-stage digit adder.
//
// All 15 combinations of intermediate sum (-2..2) and lower-digit carry (-1..1) are
// applied; the output must equal their integer sum, which always lies in -3..3. The
// block is combinational: checked in the cycle its inputs change.
module tb_qsd_step2;
  import qsd_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  qsd_digit_t is, c_lo, s;
  int checks = 0, failures = 0;

  qsd_step2 dut (.is(is), .c_lo(c_lo), .s(s));

  initial begin
    is = '0; c_lo = '0;
    for (int x = -2; x <= 2; x++) begin
      for (int c = -1; c <= 1; c++) begin
        @(negedge clk);
        is = 3'(x); c_lo = 3'(c);
        #1;
        checks++;
        if (int'(s) != x + c) begin
          failures++;
          $display("FAIL is=%0d c_lo=%0d s=%0d expected %0d", x, c, s, x + c);
        end
        checks++;
        if (!qsd_is_digit(s)) begin
          failures++;
          $display("FAIL s=%0d is not a QSD digit", s);
        end
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
