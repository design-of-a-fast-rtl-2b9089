// qsd_pkg: shared types and helpers of the quaternary signed-digit (QSD) adder.
//
// A QSD number is a string of radix-4 digits, each taken from {-3,...,+3}, with value
// sum(x_i * 4^i). Every digit travels on a 3-bit two's complement bus (qsd_digit_t), as
// do the intermediate carry and intermediate sum between the two addition stages. The
// pattern 3'b100 (-4) is not a QSD digit and must not be driven onto an operand input.
// The intermediate carry needs only two bits; it is carried on three bits, with the top
// bit equal to the middle one, so that all digit buses share one width.
package qsd_pkg;

  // One QSD digit, intermediate carry or intermediate sum, 3-bit two's complement.
  typedef logic signed [2:0] qsd_digit_t;

  // True when d is a legal QSD digit (-3..3), i.e. not the code 3'b100.
  function automatic logic qsd_is_digit(qsd_digit_t d);
    return d != 3'sb100;
  endfunction

endpackage
