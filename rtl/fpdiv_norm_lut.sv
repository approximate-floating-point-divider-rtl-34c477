// fpdiv_norm_lut: normalising look-up table of the divide & zero divider.
//
// The significand quotient q from fpdiv_mant_div lies in (1/2, 2). The upper
// mantissa field of the result is read from q at the position that is right
// when q >= 1 (Mx >= My): the bits just below the integer bit, q[DIV_W-1:1].
// When Mx < My the quotient is below one, its leading one sits one place
// lower, and the exponent path has already subtracted one; the table then
// shifts the quotient left by one bit, so the field becomes q[DIV_W-2:0].
// The table is indexed by the one-bit comparison result, so it reduces to
// a 2:1 selection of two shifted copies of q. Combinational.
//
// Which comparison case takes the shift follows from the arithmetic (it must
// match the exponent decrement); this is how the design reads the
// description of the table.
//
//   q        : DIV_W+1-bit quotient, DIV_W fraction bits
//   mx_lt_my : mantissa comparison result
//   mant_hi  : normalised upper mantissa field (DIV_W-1 bits, MSB = Z22)
module fpdiv_norm_lut #(
  parameter int unsigned DIV_W = 8
) (
  input  logic [DIV_W:0]   q,
  input  logic             mx_lt_my,
  output logic [DIV_W-2:0] mant_hi
);

  // Bit q[DIV_W] is the integer bit; when it is set it is the hidden one,
  // otherwise q[DIV_W-1] is, so neither reaches the mantissa field.
  always_comb mant_hi = mx_lt_my ? q[DIV_W-2:0] : q[DIV_W-1:1];

endmodule
