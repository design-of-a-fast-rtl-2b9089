// qsd_step1: first stage of QSD addition for one digit position.
//
// The two operand digits a and b (each -3..3) are added; their sum lies in -6..+6 and is
// recoded as ic*4 + is, the intermediate carry ic and intermediate sum is. Of the
// several two-digit codes for each sum, the one with |is| <= 2 and |ic| <= 1 is chosen,
// which is what lets the second stage add is to the carry of the lower digit without
// producing a carry of its own:
//
//   sum   -6  -5  -4  -3  -2  -1   0  +1  +2  +3  +4  +5  +6
//   ic    -1  -1  -1  -1   0   0   0   0   0  +1  +1  +1  +1
//   is    -2  -1   0  +1  -2  -1   0  +1  +2  -1   0  +1  +2
//
// The recoding follows the published mapping table digit pair by digit pair; sums of
// +/-2 stay in the sum digit and sums of +/-3 are sent up as a carry. The table is
// written here as a case on the 4-bit sum rather than as six separate sum-of-products
// equations; a synthesis tool reduces either to the same six-input logic per output bit.
//
// Interface: a, b in; ic, is out, all 3-bit two's complement. ic[2] always equals ic[1].
// Timing: purely combinational, no clock. Deferred assertions check both range rules
// on every evaluation.
// Operands of 3'b100 (-4) are not QSD digits; for them the outputs are 0.
module qsd_step1
  import qsd_pkg::*;
(
  input  qsd_digit_t a,   // addend digit, -3..3
  input  qsd_digit_t b,   // augend digit, -3..3
  output qsd_digit_t ic,  // intermediate carry, -1..1
  output qsd_digit_t is   // intermediate sum, -2..2
);

  logic signed [3:0] sum;  // -6..+6 for legal digits

  always_comb begin
    sum = 4'(a) + 4'(b);
    unique case (sum)
      -4'sd6: begin ic = -3'sd1; is = -3'sd2; end
      -4'sd5: begin ic = -3'sd1; is = -3'sd1; end
      -4'sd4: begin ic = -3'sd1; is =  3'sd0; end
      -4'sd3: begin ic = -3'sd1; is =  3'sd1; end
      -4'sd2: begin ic =  3'sd0; is = -3'sd2; end
      -4'sd1: begin ic =  3'sd0; is = -3'sd1; end
       4'sd0: begin ic =  3'sd0; is =  3'sd0; end
       4'sd1: begin ic =  3'sd0; is =  3'sd1; end
       4'sd2: begin ic =  3'sd0; is =  3'sd2; end
       4'sd3: begin ic =  3'sd1; is = -3'sd1; end
       4'sd4: begin ic =  3'sd1; is =  3'sd0; end
       4'sd5: begin ic =  3'sd1; is =  3'sd1; end
       4'sd6: begin ic =  3'sd1; is =  3'sd2; end
      default: begin ic = 3'sd0; is = 3'sd0; end  // only reached with an operand of -4
    endcase
  end

  // The two rules that make the second stage carry free: |intermediate sum| <= 2 and
  // |intermediate carry| <= 1, with the carry's extra top bit a copy of its sign.
  always_comb begin
    assert #0 (is >= -3'sd2 && is <= 3'sd2) else $error("intermediate sum %0d out of range", is);
    assert #0 (ic >= -3'sd1 && ic <= 3'sd1 && ic[2] == ic[1])
      else $error("intermediate carry %0d out of range", ic);
  end

endmodule
