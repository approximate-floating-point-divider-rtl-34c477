// fpdiv_alg1: approximate binary32 divider, divide & subtract variant.
//
// Computes z ~ x / y combinationally. The sign is sx XOR sy. The stored
// exponent is E_X - E_Y + 127, less one when the dividend's divided mantissa
// field is below the divisor's (Mx < My). Only the top of each significand,
// the hidden one and the DIV_W-1 bits below it (1.M22..M16 by default), goes
// through a short integer divider; its quotient fills the upper DIV_W-1
// mantissa bits of z. The lower 16 bits of z are not divided at all: they are
// the difference of the operands' low mantissa bits, M_X[15:0] - M_Y[15:0]
// (modulo 2^16).
//
// The upper field is read from the quotient at the place that is right when
// Mx >= My, and it is not renormalised when Mx < My: that correction (a
// one-bit look-up table) belongs only to the divide & zero variant. This
// accounts for most of this variant's error, about 6% on average for random
// operands. Zero, infinity, NaN, subnormals and exponent overflow are not
// handled. The field widths follow an 8-bit division that includes the
// hidden bit; the wrap of the low subtraction is this design's choice.
//
//   x, y : operands (fp32_t), z : approximate quotient. No clock; z follows
//   x and y after the combinational delay.
module fpdiv_alg1
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

  // Upper field: quotient bits below the integer bit, no renormalisation.
  assign mz_hi = q[DIV_W-1:1];

  fpdiv_low_sub #(.LOW_W(LOW_W)) u_lowsub (
    .lx(x.man[LOW_W-1:0]), .ly(y.man[LOW_W-1:0]), .d(mz_lo)
  );

  always_comb z = '{sign: sz, exp: ez, man: {mz_hi, mz_lo}};

endmodule
