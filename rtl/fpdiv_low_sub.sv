// fpdiv_low_sub: low-field subtractor of the divide & subtract divider.
//
// The divide & subtract divider divides only the top of the mantissas and
// fills the remaining LOW_W mantissa bits of the result with the difference
// of the operands' own low mantissa bits, lx - ly. The difference is taken
// modulo 2^LOW_W: when ly > lx it wraps (the borrow out is dropped), which is
// this design's choice. Combinational.
//
//   lx, ly : low LOW_W mantissa bits of dividend and divisor
//   d      : lx - ly modulo 2^LOW_W
module fpdiv_low_sub #(
  parameter int unsigned LOW_W = 16
) (
  input  logic [LOW_W-1:0] lx,
  input  logic [LOW_W-1:0] ly,
  output logic [LOW_W-1:0] d
);

  always_comb d = lx - ly;

endmodule
