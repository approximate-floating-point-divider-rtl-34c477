// approx_fp_divider_top: the three approximate binary32 dividers side by side.
//
// The same operands x and y drive the divide & subtract (z_alg1), divide &
// alternate-'10' (z_alg2) and divide & zero (z_alg3) dividers, so their
// results can be compared directly; divide & zero is the most accurate and
// the one to use on its own. Each divider is a combinational circuit with no
// clock or reset: every output follows the inputs after its propagation
// delay. Sharing one pair of operand inputs is this design's choice.
//
//   x, y   : dividend and divisor, IEEE-754 single precision (fp32_t)
//   z_alg1 : divide & subtract quotient
//   z_alg2 : divide & alternate-'10' quotient
//   z_alg3 : divide & zero quotient (look-up table normalisation)
//   DIV_W  : width of the significands fed to the short divider, hidden bit
//            included (8)
module approx_fp_divider_top
  import fpdiv_pkg::*;
#(
  parameter int unsigned DIV_W = fpdiv_pkg::DIV_W_DEFAULT
) (
  input  fp32_t x,
  input  fp32_t y,
  output fp32_t z_alg1,
  output fp32_t z_alg2,
  output fp32_t z_alg3
);

  fpdiv_alg1 #(.DIV_W(DIV_W)) u_alg1 (.x(x), .y(y), .z(z_alg1));
  fpdiv_alg2 #(.DIV_W(DIV_W)) u_alg2 (.x(x), .y(y), .z(z_alg2));
  fpdiv_alg3 #(.DIV_W(DIV_W)) u_alg3 (.x(x), .y(y), .z(z_alg3));

endmodule
