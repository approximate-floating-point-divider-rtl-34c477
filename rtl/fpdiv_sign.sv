// fpdiv_sign: sign of a floating-point quotient.
//
// The quotient is negative exactly when one operand is negative, so the
// result sign is the exclusive OR of the operand signs. Purely
// combinational, no clock.
//
//   sx, sy : operand sign bits (1 = negative)
//   sz     : quotient sign bit
module fpdiv_sign (
  input  logic sx,
  input  logic sy,
  output logic sz
);

  always_comb sz = sx ^ sy;

endmodule
