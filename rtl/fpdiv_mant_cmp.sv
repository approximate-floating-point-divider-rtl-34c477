// fpdiv_mant_cmp: mantissa comparison that steers the approximate divider.
//
// Compares the dividend and divisor mantissa bits that go into the
// significand divider (the top DIV_W-1 stored bits, M22 downwards; the hidden
// ones are equal and need not be compared). Its output selects the exponent
// case (E_X - E_Y - 1 when Mx < My, E_X - E_Y otherwise) and, in the
// look-up-table variant, the one-bit normalisation of the quotient.
// Comparing the truncated fields, not all 23 bits, is this design's choice:
// it keeps the exponent consistent with the quotient the divider actually
// produces. Equal fields count as "not less". Combinational.
//
//   mx, my   : DIV_W-1 top mantissa bits of dividend and divisor
//   mx_lt_my : 1 when mx < my
module fpdiv_mant_cmp #(
  parameter int unsigned DIV_W = 8
) (
  input  logic [DIV_W-2:0] mx,
  input  logic [DIV_W-2:0] my,
  output logic             mx_lt_my
);

  always_comb mx_lt_my = (mx < my);

endmodule
