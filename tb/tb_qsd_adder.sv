// tb_qsd_adder: end-to-end self-checking test of the carry-free QSD adder at its default
// size (64 digits).
//
// Vectors: the worked example 107 + (-233) in the four low digits, the extreme operands
// (all digits +3, all -3, and their mix), alternating patterns that put a carry into
// every position, and random operands with digits drawn uniformly from -3..3.
// For every vector the test checks, independently of the RTL:
//   * value(s) + c_out * 4^64 == value(a) + value(b), in 140-bit integer arithmetic;
//   * every sum digit is legal and c_out lies in -1..1;
//   * each digit matches the two-step rule evaluated here: carry +1 for a digit sum of 3
//     or more, -1 for -3 or less, sum digit = a_i + b_i - 4*carry_i + carry_(i-1).
// It counts how often each mechanism of the adder occurs (positive and negative
// intermediate carries, a carry absorbed by a digit at the +/-3 limit, a carry out of
// either sign, every operand-digit sum from -6 to +6, mixed-sign operands) and counts a
// failure for any that never occurs. The adder is combinational: results are checked in
// the cycle the operands change.
module tb_qsd_adder;
  import qsd_pkg::*;

  localparam int D = 64;           // the adder's default DIGITS
  localparam int W = 2 * D + 12;   // integer width that holds any D-digit QSD value

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  qsd_digit_t [D-1:0] a, b, s;
  qsd_digit_t         c_out;

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_pos_carry = 0, n_neg_carry = 0, n_absorb = 0, n_cout_pos = 0, n_cout_neg = 0;
  int n_mixed = 0;
  int n_sum [13];

  qsd_adder dut (.a(a), .b(b), .s(s), .c_out(c_out));

  function automatic logic signed [W-1:0] qsd_value(qsd_digit_t [D-1:0] x);
    logic signed [W-1:0] v = '0;
    for (int i = D - 1; i >= 0; i--) v = v * 4 + W'(x[i]);
    return v;
  endfunction

  // Convert an integer to QSD digits using digits 0..3 only, for the magnitude, then
  // negate digit by digit when the value is negative.
  function automatic qsd_digit_t [D-1:0] to_qsd(longint v);
    qsd_digit_t [D-1:0] r = '0;
    longint m = (v < 0) ? -v : v;
    for (int i = 0; i < D; i++) begin
      r[i] = 3'(m % 4);
      if (v < 0) r[i] = -r[i];
      m = m / 4;
    end
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic apply(qsd_digit_t [D-1:0] x, qsd_digit_t [D-1:0] y);
    logic signed [W-1:0] va, vb, vs;
    int ec [D+1];
    int sum_i;
    bit digits_ok = 1'b1, legal = 1'b1;
    @(negedge clk);
    a = x; b = y;
    #1;
    va = qsd_value(a);
    vb = qsd_value(b);
    vs = qsd_value(s) + (W'(c_out) <<< (2 * D));
    check(vs == va + vb, $sformatf("value: a=%0d b=%0d got %0d", va, vb, vs));
    ec[0] = 0;
    for (int i = 0; i < D; i++) begin
      sum_i = int'(a[i]) + int'(b[i]);
      ec[i+1] = (sum_i >= 3) ? 1 : (sum_i <= -3) ? -1 : 0;
      if (int'(s[i]) != sum_i - 4 * ec[i+1] + ec[i]) digits_ok = 1'b0;
      if (!qsd_is_digit(s[i])) legal = 1'b0;
      n_sum[sum_i+6]++;
      if (ec[i+1] > 0) n_pos_carry++;
      if (ec[i+1] < 0) n_neg_carry++;
      if ((s[i] == 3'sd3 || s[i] == -3'sd3) && ec[i] != 0) n_absorb++;
    end
    check(digits_ok, "digit-by-digit result");
    check(legal, "all sum digits legal");
    check(int'(c_out) == ec[D], "carry out digit");
    if (c_out == 3'sd1) n_cout_pos++;
    if (c_out == -3'sd1) n_cout_neg++;
    if ((va > 0 && vb < 0) || (va < 0 && vb > 0)) n_mixed++;
  endtask

  initial begin
    qsd_digit_t [D-1:0] x, y;
    foreach (n_sum[k]) n_sum[k] = 0;
    a = '0; b = '0;

    // Worked example: 107 = (2,-2,3,-1), -233 = (-3,-3,2,-1), sum -126 = (-2,0,1,-2).
    x = '0; y = '0;
    x[3:0] = {3'sd2, -3'sd2, 3'sd3, -3'sd1};
    y[3:0] = {-3'sd3, -3'sd3, 3'sd2, -3'sd1};
    apply(x, y);
    check(s[3:0] == {-3'sd2, 3'sd0, 3'sd1, -3'sd2} && s[D-1:4] == '0 && c_out == '0,
          "worked example digits (-2,0,1,-2)");
    check(qsd_value(s) == -126, "worked example value -126");

    // Small integers through the conversion helper.
    apply(to_qsd(107), to_qsd(-233));
    apply(to_qsd(64'sd123456789), to_qsd(-64'sd987654321));

    // Extremes: largest and smallest operands.
    apply({D{3'sd3}}, {D{3'sd3}});
    apply({D{-3'sd3}}, {D{-3'sd3}});
    apply({D{3'sd3}}, {D{-3'sd3}});
    apply({D{3'sd2}}, {D{3'sd1}});
    apply({D{-3'sd1}}, {D{-3'sd2}});
    // Alternating carries: +3,+3 next to 2,0 pushes a +1 into a digit already at +2.
    apply({(D/2){3'sd3, 3'sd2}}, {(D/2){3'sd3, 3'sd0}});
    apply({(D/2){-3'sd3, -3'sd2}}, {(D/2){-3'sd3, 3'sd0}});

    // Random operands.
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < D; i++) begin
        x[i] = 3'($urandom_range(6)) - 3'sd3;
        y[i] = 3'($urandom_range(6)) - 3'sd3;
      end
      apply(x, y);
    end

    $display("mechanisms: pos_carry=%0d neg_carry=%0d absorbed_at_limit=%0d cout+=%0d cout-=%0d mixed_sign=%0d",
             n_pos_carry, n_neg_carry, n_absorb, n_cout_pos, n_cout_neg, n_mixed);
    check(n_pos_carry > 0, "a positive intermediate carry occurred");
    check(n_neg_carry > 0, "a negative intermediate carry occurred");
    check(n_absorb > 0, "a carry was absorbed by a digit at the +/-3 limit");
    check(n_cout_pos > 0, "a positive carry out occurred");
    check(n_cout_neg > 0, "a negative carry out occurred");
    check(n_mixed > 0, "mixed-sign operands occurred");
    for (int k = 0; k < 13; k++) check(n_sum[k] > 0, $sformatf("digit sum %0d occurred", k - 6));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
