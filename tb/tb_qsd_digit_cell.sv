// tb_qsd_digit_cell: exhaustive self-checking test of the single-digit QSD adder cell.
//
// All 49 operand pairs are combined with the three possible lower-digit carries (-1, 0,
// +1). The expected carry out comes from the rule "sums of 3 or more send +1 up, sums of
// -3 or less send -1 up"; the expected sum digit is a + b - 4*c_out + c_in. The test also
// checks that c_out does not depend on c_in (no carry chain) and that s is a legal digit.
// Combinational: checked in the cycle the inputs change.
module tb_qsd_digit_cell;
  import qsd_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  qsd_digit_t a, b, c_in, s, c_out;
  int checks = 0, failures = 0;

  qsd_digit_cell dut (.a(a), .b(b), .c_in(c_in), .s(s), .c_out(c_out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d c_in=%0d s=%0d c_out=%0d", what, a, b, c_in, s, c_out);
    end
  endtask

  initial begin
    int ec, es, c_out_at_zero;
    a = '0; b = '0; c_in = '0;
    for (int x = -3; x <= 3; x++) begin
      for (int y = -3; y <= 3; y++) begin
        ec = (x + y >= 3) ? 1 : (x + y <= -3) ? -1 : 0;
        c_out_at_zero = 0;
        for (int c = -1; c <= 1; c++) begin
          @(negedge clk);
          a = 3'(x); b = 3'(y); c_in = 3'(c);
          #1;
          es = x + y - 4 * ec + c;
          check(int'(c_out) == ec, "carry out");
          check(int'(s) == es, "sum digit");
          check(qsd_is_digit(s), "legal sum digit");
          if (c == -1) c_out_at_zero = int'(c_out);
          else check(int'(c_out) == c_out_at_zero, "carry out independent of carry in");
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
