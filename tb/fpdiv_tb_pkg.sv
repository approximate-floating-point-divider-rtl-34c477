// fpdiv_tb_pkg: reference models for the approximate divider testbenches.
//
// Everything here is written from the arithmetic definition of each divider
// variant, not from the RTL structure: the short significand quotient comes
// from the integer '/' operator, the exponent from integer arithmetic on the
// biased exponents, and fp32_value converts a word to a real number so that
// errors can be measured against the exact quotient x/y.
package fpdiv_tb_pkg;

  // Real value of a normal binary32 word.
  function automatic real fp32_value(input logic [31:0] w);
    real m;
    int  e;
    m = 1.0 + real'(w[22:0]) / 8388608.0;
    e = int'(w[30:23]) - 127;
    fp32_value = (w[31] ? -m : m) * (2.0 ** e);
  endfunction

  // Build a normal binary32 word from its fields.
  function automatic logic [31:0] fp32_make(input logic s, input logic [7:0] e,
                                            input logic [22:0] m);
    return {s, e, m};
  endfunction

  // Reference approximate quotient.
  //   alg = 1 divide & subtract, 2 divide & alternate '10', 3 divide & zero.
  //   n   = significand bits divided, hidden one included.
  function automatic logic [31:0] ref_div(input int alg, input int n,
                                          input logic [31:0] x, input logic [31:0] y);
    int unsigned a, b, q, hi, lo, lo_w, k;
    logic        lt;
    int          ez;
    logic [22:0] man;
    lo_w = 24 - n;
    a  = (1 << (n - 1)) | (x[22:0] >> lo_w);
    b  = (1 << (n - 1)) | (y[22:0] >> lo_w);
    lt = a < b;
    ez = int'(x[30:23]) - int'(y[30:23]) + 127 - (lt ? 1 : 0);
    q  = (a << n) / b;                       // n fraction bits
    if (alg == 3 && lt) hi = q & ((1 << (n - 1)) - 1);          // bits n-2..0
    else                hi = (q >> 1) & ((1 << (n - 1)) - 1);   // bits n-1..1
    case (alg)
      1: lo = (x[22:0] - y[22:0]) & ((1 << lo_w) - 1);
      2: begin
        lo = 0;
        for (k = 0; k < lo_w; k++) if ((lo_w - 1 - k) % 2 == 0) lo |= (1 << k);
      end
      default: lo = 0;
    endcase
    man = 23'((hi << lo_w) | lo);
    return {x[31] ^ y[31], 8'(ez), man};
  endfunction

endpackage
