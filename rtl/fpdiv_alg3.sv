// fpdiv_alg3: approximate binary32 divider, divide & zero variant.
//
// This is the most accurate of the three variants and the recommended one.
// Computes z ~ x / y combinationally:
//   sign      sx XOR sy;
//   exponent  E_X - E_Y + 127, less one when the divided mantissa field of x
//             is below that of y (Mx < My);
//   mantissa  the hidden one and the DIV_W-1 bits below it (1.M22..M16 by
//             default) of each operand are divided by a short integer
//             divider; the remaining 16 input bits are treated as zeros.
//             A look-up table indexed by the comparison Mx < My normalises
//             the quotient by one bit so its leading one becomes the hidden
//             bit; the normalised quotient fills the upper DIV_W-1 mantissa
//             bits of z and the lower 16 bits of z are zero.
// The result is the truncated quotient of the truncated significands, with
// an average relative error of about 0.3% for random operands at DIV_W = 8.
// Zero, infinity, NaN, subnormals and exponent overflow are not handled;
// there is no rounding. Field widths follow an 8-bit division that includes
// the hidden bit; the direction of the table's shift follows the arithmetic.
//
//   x, y : operands (fp32_t), z : approximate quotient. No clock.
module fpdiv_alg3
  import fpdiv_pkg::*;
#(
  parameter int unsigned DIV_W = fpdiv_pkg::DIV_W_DEFAULT
) (
  input  fp32_t x,
  input  fp32_t y,
  output fp32_t z
);

  // Mantissa bits that enter the divider, and the low bits left over.
  localparam int unsigned HI_W  = DIV_W - 1;
  localparam int unsigned LOW_W = MAN_W - HI_W;

  logic [HI_W-1:0]  mx_hi, my_hi, mz_hi;
  logic [LOW_W-1:0] mz_lo;
  logic [DIV_W:0]   q;
  logic             mx_lt_my;
  logic             sz;
  logic [EXP_W-1:0] ez;

  assign mx_hi = x.man[MAN_W-1 -: HI_W];
  assign my_hi = y.man[MAN_W-1 -: HI_W];

  fpdiv_sign u_sign (.sx(x.sign), .sy(y.sign), .sz(sz));

  fpdiv_mant_cmp #(.DIV_W(DIV_W)) u_cmp (
    .mx(mx_hi), .my(my_hi), .mx_lt_my(mx_lt_my)
  );

  fpdiv_exp u_exp (.ex(x.exp), .ey(y.exp), .mx_lt_my(mx_lt_my), .ez(ez));

  // Significands with the hidden one restored.
  fpdiv_mant_div #(.DIV_W(DIV_W)) u_div (
    .a({1'b1, mx_hi}), .b({1'b1, my_hi}), .q(q)
  );

  fpdiv_norm_lut #(.DIV_W(DIV_W)) u_lut (
    .q(q), .mx_lt_my(mx_lt_my), .mant_hi(mz_hi)
  );

  // Lower field: zeros.
  assign mz_lo = '0;

  always_comb z = '{sign: sz, exp: ez, man: {mz_hi, mz_lo}};

endmodule
