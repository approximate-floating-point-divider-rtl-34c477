// fpdiv_exp: exponent path of the approximate divider.
//
// With both exponents stored in biased form, the stored exponent of X/Y is
// E_X - E_Y + BIAS when the significand quotient is at least one, and one
// less when it is below one (Mx < My). Two differences are formed, E_X - E_Y - 1
// and E_X - E_Y, a 2:1 multiplexer picks one with the mantissa comparison,
// and the bias is added. Arithmetic is modulo 2^8: exponent overflow,
// underflow and the special exponents 0 and 255 are not treated, as the
// approximate divider does not handle special values. Combinational.
//
//   ex, ey   : stored (biased) exponents of dividend and divisor
//   mx_lt_my : mantissa comparison result (mux select)
//   ez       : stored exponent of the quotient
module fpdiv_exp
  import fpdiv_pkg::*;
#(
  parameter int unsigned BIAS_P = fpdiv_pkg::BIAS
) (
  input  logic [EXP_W-1:0] ex,
  input  logic [EXP_W-1:0] ey,
  input  logic             mx_lt_my,
  output logic [EXP_W-1:0] ez
);

  logic [EXP_W-1:0] diff, diff_m1, sel;

  always_comb begin
    diff    = ex - ey;
    diff_m1 = ex - ey - EXP_W'(1);
    sel     = mx_lt_my ? diff_m1 : diff;
    ez      = sel + EXP_W'(BIAS_P);
  end

endmodule
