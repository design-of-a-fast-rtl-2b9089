// qsd_digit_cell: single-digit QSD adder cell.
//
// One digit position of the carry-free adder. The first stage (qsd_step1) adds the two
// operand digits a and b and recodes the result into an intermediate carry c_out, which
// goes to the next higher digit, and an intermediate sum. The second stage (qsd_step2)
// adds that intermediate sum to c_in, the intermediate carry of the next lower digit,
// and gives the final sum digit s. c_out depends only on a and b, never on c_in, so a
// row of these cells has no carry chain.
//
// Interface (all 3-bit two's complement):
//   a, b   operand digits, -3..3
//   c_in   intermediate carry from the lower digit, -1..1 (0 at the least significant digit)
//   s      sum digit, -3..3
//   c_out  intermediate carry to the higher digit, -1..1
// The cell follows the published single-digit QSD adder. Its port list (five 3-bit digits)
// is this design's choice.
// Timing: purely combinational; the delay from any input to any output is that of one
// recoding stage plus one 3-bit addition, whatever the word length of the adder.
module qsd_digit_cell
  import qsd_pkg::*;
(
  input  qsd_digit_t a,
  input  qsd_digit_t b,
  input  qsd_digit_t c_in,
  output qsd_digit_t s,
  output qsd_digit_t c_out
);

  qsd_digit_t isum;

  qsd_step1 u_step1 (
    .a  (a),
    .b  (b),
    .ic (c_out),
    .is (isum)
  );

  qsd_step2 u_step2 (
    .is   (isum),
    .c_lo (c_in),
    .s    (s)
  );

endmodule
