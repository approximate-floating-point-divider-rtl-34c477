// fpdiv_pkg: types and constants shared by the approximate binary32 dividers.
//
// IEEE-754 single precision: 1 sign bit, 8 exponent bits with a bias of 127,
// and 23 stored mantissa bits under an implicit (hidden) leading one. The
// struct fp32_t lays the word out as bits [31], [30:23] and [22:0], so a
// 32-bit vector can be cast to it directly. These are the standard format
// widths; nothing here is a design choice.
package fpdiv_pkg;

  localparam int unsigned EXP_W = 8;
  localparam int unsigned MAN_W = 23;
  localparam int unsigned BIAS  = 127;

  // Significand width (hidden bit included) that the approximate dividers
  // feed to their integer divider by default.
  localparam int unsigned DIV_W_DEFAULT = 8;

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } fp32_t;

endpackage
