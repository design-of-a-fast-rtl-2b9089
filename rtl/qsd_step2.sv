// qsd_step2: second stage of QSD addition for one digit position.
//
// Adds the intermediate sum of this digit (is, -2..2) to the intermediate carry that the
// first stage of the next lower digit produced (c_lo, -1..1). The result lies in -3..3,
// so it is a single QSD digit and no carry leaves this stage: this is what makes the
// whole addition carry free, since no signal runs more than one digit position.
//
// Interface: is, c_lo in; s out, all 3-bit two's complement.
// Timing: purely combinational, no clock.
// The two-step scheme and the ranges are those of the published QSD adder; building this
// stage as a plain 3-bit two's complement adder is this design's own choice.
// Inputs outside the ranges above (which the first stage never produces) give the sum
// modulo 8 in two's complement.
module qsd_step2
  import qsd_pkg::*;
(
  input  qsd_digit_t is,    // intermediate sum of this digit, -2..2
  input  qsd_digit_t c_lo,  // intermediate carry of the lower digit, -1..1
  output qsd_digit_t s      // final sum digit, -3..3
);

  always_comb s = is + c_lo;

endmodule
