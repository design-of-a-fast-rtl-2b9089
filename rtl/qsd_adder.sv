// qsd_adder: DIGITS-digit carry-free quaternary signed-digit adder.
//
// Adds two QSD numbers a and b, each DIGITS radix-4 digits from {-3..3}, LSD at index 0.
// Each digit position is a qsd_digit_cell. The intermediate carry of cell i feeds the
// second stage of cell i+1; cell 0 receives a carry of 0. The carry of the most
// significant cell is brought out as c_out, a further digit (-1..1) of weight 4^DIGITS,
// so that value(s) + c_out * 4^DIGITS = value(a) + value(b) exactly, with no overflow.
//
// Because no carry passes more than one digit position, the delay is that of a single
// cell for any DIGITS: the adder is a row of identical cells with only
// nearest-neighbour wiring.
//
// The row structure, a carry of 0 into the lowest digit and a carry digit brought out at
// the top follow the published design and its worked example; it has no external carry
// input, and none is added here.
//
// Parameters: DIGITS, the number of digit positions (64 by default, one of the word
// lengths named for this adder; 1, 4 and 128 are also exercised).
// Interface: a, b in and s out are packed arrays of 3-bit two's complement digits; c_out
// is one such digit. Operands must hold no 3'b100 digit.
// Timing: purely combinational, no clock, no reset.
module qsd_adder
  import qsd_pkg::*;
#(
  parameter int unsigned DIGITS = 64
) (
  input  qsd_digit_t [DIGITS-1:0] a,      // addend, a[0] least significant
  input  qsd_digit_t [DIGITS-1:0] b,      // augend
  output qsd_digit_t [DIGITS-1:0] s,      // sum digits
  output qsd_digit_t              c_out   // carry digit, weight 4^DIGITS
);

  // carry[i] is the intermediate carry entering digit i; carry[DIGITS] leaves the top.
  qsd_digit_t [DIGITS:0] carry;

  assign carry[0] = '0;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    qsd_digit_cell u_cell (
      .a     (a[i]),
      .b     (b[i]),
      .c_in  (carry[i]),
      .s     (s[i]),
      .c_out (carry[i+1])
    );
  end

  assign c_out = carry[DIGITS];

endmodule
