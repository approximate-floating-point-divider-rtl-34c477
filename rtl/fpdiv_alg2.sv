// fpdiv_alg2: approximate binary32 divider, divide & alternate-'10' variant.
//
// Computes z ~ x / y combinationally. Sign and exponent are formed as in the
// other variants: sx XOR sy, and E_X - E_Y + 127, less one when the divided
// mantissa field of x is below that of y (Mx < My). Only the hidden one and
// the DIV_W-1 mantissa bits below it (1.M22..M16 by default) are divided;
// the remaining 16 input bits are ignored. The quotient fills the upper
// DIV_W-1 mantissa bits of z and the lower 16 bits are the constant
// 1010...10 (Z15 = 1), which sits near the middle of the range the dropped
// bits could take.
//
// The upper field is read from the quotient at the place that is right when
// Mx >= My and is not renormalised when Mx < My (only the divide & zero
// variant adds that table), giving an average error of about 6% on random
// operands. Zero, infinity, NaN, subnormals and exponent overflow are not
// handled. Field widths follow an 8-bit division that includes the hidden bit.
//
//   x, y : operands (fp32_t), z : approximate quotient. No clock.
module fpdiv_alg2
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

  // Lower field: alternating ones and zeros, starting with a one at the top.
  always_comb
    for (int i = 0; i < LOW_W; i++) mz_lo[i] = ((LOW_W - 1 - i) % 2) == 0;

  always_comb z = '{sign: sz, exp: ez, man: {mz_hi, mz_lo}};

endmodule
