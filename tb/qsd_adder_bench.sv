// qsd_adder_bench: reusable driver and checker for one qsd_adder of a given size.
//
// Instantiates a qsd_adder with DIGITS digits and, once start is high, applies the
// worked example 107 + (-233) when DIGITS >= 4, every pair of single digits when
// DIGITS == 1, the extreme operands, and VECTORS random operand pairs. Each result is
// checked against integer arithmetic (value(s) + c_out*4^DIGITS == value(a) + value(b))
// and against the digit-by-digit two-step rule; all sum digits must be legal. Counts of
// checks and failures are outputs; done rises when the bench has finished. The adder is
// combinational and is checked in the cycle its operands change.
module qsd_adder_bench
  import qsd_pkg::*;
#(
  parameter int unsigned DIGITS  = 4,
  parameter int unsigned VECTORS = 500
) (
  input  logic clk,
  input  logic start,
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int W = 2 * DIGITS + 12;

  qsd_digit_t [DIGITS-1:0] a, b, s;
  qsd_digit_t              c_out;

  qsd_adder #(.DIGITS(DIGITS)) dut (.a(a), .b(b), .s(s), .c_out(c_out));

  function automatic logic signed [W-1:0] qsd_value(qsd_digit_t [DIGITS-1:0] x);
    logic signed [W-1:0] v = '0;
    for (int i = DIGITS - 1; i >= 0; i--) v = v * 4 + W'(x[i]);
    return v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL DIGITS=%0d %s", DIGITS, what);
    end
  endtask

  task automatic apply(qsd_digit_t [DIGITS-1:0] x, qsd_digit_t [DIGITS-1:0] y);
    logic signed [W-1:0] va, vb, vs;
    int ec [DIGITS+1];
    int sum_i;
    bit digits_ok = 1'b1;
    @(negedge clk);
    a = x; b = y;
    #1;
    va = qsd_value(a);
    vb = qsd_value(b);
    vs = qsd_value(s) + (W'(c_out) <<< (2 * DIGITS));
    check(vs == va + vb, $sformatf("value: a=%0d b=%0d got %0d", va, vb, vs));
    ec[0] = 0;
    for (int i = 0; i < DIGITS; i++) begin
      sum_i = int'(a[i]) + int'(b[i]);
      ec[i+1] = (sum_i >= 3) ? 1 : (sum_i <= -3) ? -1 : 0;
      if (int'(s[i]) != sum_i - 4 * ec[i+1] + ec[i]) digits_ok = 1'b0;
      if (!qsd_is_digit(s[i])) digits_ok = 1'b0;
    end
    check(digits_ok, "digit-by-digit result");
    check(int'(c_out) == ec[DIGITS], "carry out digit");
  endtask

  // Worked example, least significant digit first: 107 = (2,-2,3,-1), -233 = (-3,-3,2,-1).
  localparam int ex_a [4] = '{-1, 3, -2, 2};
  localparam int ex_b [4] = '{-1, 2, -3, -3};

  initial begin
    qsd_digit_t [DIGITS-1:0] x, y;
    checks = 0; failures = 0; done = 1'b0;
    a = '0; b = '0;
    wait (start);

    if (DIGITS == 1) begin
      for (int p = -3; p <= 3; p++)
        for (int q = -3; q <= 3; q++) begin
          x = '0; y = '0;
          x[0] = 3'(p); y[0] = 3'(q);
          apply(x, y);
        end
    end
    if (DIGITS >= 4) begin
      x = '0; y = '0;
      for (int i = 0; i < 4; i++) begin
        x[i] = 3'(ex_a[i]);
        y[i] = 3'(ex_b[i]);
      end
      apply(x, y);
      check(qsd_value(s) == -126 && c_out == '0, "worked example gives -126");
    end
    apply({DIGITS{3'sd3}}, {DIGITS{3'sd3}});
    apply({DIGITS{-3'sd3}}, {DIGITS{-3'sd3}});
    for (int n = 0; n < int'(VECTORS); n++) begin
      for (int i = 0; i < DIGITS; i++) begin
        x[i] = 3'($urandom_range(6)) - 3'sd3;
        y[i] = 3'($urandom_range(6)) - 3'sd3;
      end
      apply(x, y);
    end
    done = 1'b1;
  end

endmodule
