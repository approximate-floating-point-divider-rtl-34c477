// fpdiv_mant_div: short significand divider.
//
// Divides two DIV_W-bit significands a = 1.f_a and b = 1.f_b (hidden one at
// the top bit) and returns q = floor(a * 2^DIV_W / b), i.e. the quotient a/b,
// which lies in (1/2, 2), as DIV_W+1 bits with DIV_W fraction bits. Bit DIV_W
// of q is set when a >= b; otherwise bit DIV_W-1 is the leading one.
//
// It is a combinational restoring array divider: DIV_W+1 rows, each shifting
// the partial remainder left by one, bringing in the next dividend bit
// (zeros after the integer part), trying a subtraction of b and keeping it
// when it does not go negative. No rounding; the remainder is dropped. The
// array structure is this design's choice: the approximate divider only
// calls for an ordinary binary division of the short significands.
//
//   a, b : dividend and divisor significands, top bit = hidden one (b != 0)
//   q    : quotient with DIV_W fraction bits
module fpdiv_mant_div #(
  parameter int unsigned DIV_W = 8
) (
  input  logic [DIV_W-1:0] a,
  input  logic [DIV_W-1:0] b,
  output logic [DIV_W:0]   q
);

  // Dividend a * 2^DIV_W, consumed from the top, one bit per row.
  localparam int unsigned NUM_W = 2 * DIV_W;

  logic [NUM_W-1:0] num;
  logic [DIV_W:0]   rem;   // partial remainder, one bit wider than b
  logic [DIV_W:0]   trial;

  always_comb begin
    num = {a, {DIV_W{1'b0}}};
    rem = '0;
    q   = '0;
    // Quotient bits above DIV_W are always zero since a < 2*b for
    // normalised significands, so the first DIV_W-1 dividend bits only
    // build up the remainder; rows that matter start at bit DIV_W of num.
    for (int i = NUM_W - 1; i >= 0; i--) begin
      rem   = {rem[DIV_W-1:0], num[i]};
      trial = rem - {1'b0, b};
      if (!trial[DIV_W]) begin
        rem = trial;
        if (i <= DIV_W) q[i] = 1'b1;
      end
    end
  end

endmodule
