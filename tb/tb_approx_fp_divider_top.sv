// tb_approx_fp_divider_top: end-to-end testbench of the three approximate
// dividers, at the design's default parameters.
//
// Drives directed and random normal binary32 operand pairs into the top and
// checks all three quotients bit for bit against the arithmetic reference
// models in fpdiv_tb_pkg. Over the random pairs it measures each variant's
// mean relative error against the exact quotient x/y and checks it against
// the expected average errors (divide & subtract about 6.0%, divide &
// alternate-'10' about 5.9%, divide & zero about 0.36%), each within a band,
// and that divide & zero is the most accurate. It counts how often each
// mechanism of the design is exercised and fails if one never is:
//   - Mx < My: exponent decrement and the table's one-bit normalising shift;
//   - Mx >= My: no decrement, no shift;
//   - Mx == My in the divided field: quotient exactly one;
//   - a negative low-field difference (the subtraction wraps);
//   - a negative quotient sign.
// The DUT is combinational: inputs are applied and outputs sampled 1 ns later.
module tb_approx_fp_divider_top;
  import fpdiv_pkg::*;
  import fpdiv_tb_pkg::*;

  localparam int unsigned DIV_W    = fpdiv_pkg::DIV_W_DEFAULT;
  localparam int          N_RANDOM = 50000;

  fp32_t x, y, z1, z2, z3;
  int checks = 0, failures = 0;
  int n_lt = 0, n_ge = 0, n_eq = 0, n_wrap = 0, n_neg = 0;
  real err_sum [3];
  int  err_n = 0;

  approx_fp_divider_top dut (.x(x), .y(y), .z_alg1(z1), .z_alg2(z2), .z_alg3(z3));

  function automatic real rel_err(input logic [31:0] vx, input logic [31:0] vy,
                                  input logic [31:0] vz);
    real exact, got, r;
    exact = fp32_value(vx) / fp32_value(vy);
    got   = fp32_value(vz);
    r     = (exact - got) / got;
    return (r < 0.0) ? -r : r;
  endfunction

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp,
                           input logic [31:0] vx, input logic [31:0] vy);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s x=%h y=%h z=%h ref=%h", what, vx, vy, got, exp);
    end
  endtask

  task automatic apply(input logic [31:0] vx, input logic [31:0] vy, input bit measure);
    logic [22-DIV_W+1:0] lowx, lowy;
    x = vx; y = vy;
    #1;
    expect_eq("alg1", z1, ref_div(1, DIV_W, vx, vy), vx, vy);
    expect_eq("alg2", z2, ref_div(2, DIV_W, vx, vy), vx, vy);
    expect_eq("alg3", z3, ref_div(3, DIV_W, vx, vy), vx, vy);
    if (vx[22:24-DIV_W] < vy[22:24-DIV_W]) n_lt++; else n_ge++;
    if (vx[22:24-DIV_W] == vy[22:24-DIV_W]) n_eq++;
    lowx = vx[23-DIV_W:0]; lowy = vy[23-DIV_W:0];
    if (lowx < lowy) n_wrap++;
    if (z3.sign) n_neg++;
    if (measure) begin
      err_sum[0] += rel_err(vx, vy, z1);
      err_sum[1] += rel_err(vx, vy, z2);
      err_sum[2] += rel_err(vx, vy, z3);
      err_n++;
    end
  endtask

  task automatic count_check(input string what, input int n);
    checks++;
    $display("mechanism %-28s exercised %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  task automatic band_check(input string what, input real v, input real lo, input real hi);
    checks++;
    $display("%-24s mean relative error %0.3f%%", what, v);
    if (v < lo || v > hi) begin
      failures++;
      $display("FAIL %s error %0.3f%% outside [%0.2f, %0.2f]", what, v, lo, hi);
    end
  endtask

  function automatic logic [31:0] rand_fp();
    logic [31:0] r;
    r = $urandom;
    return fp32_make(r[31], 8'(100 + ($urandom % 55)), r[22:0]);
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e1, e2, e3;
    err_sum = '{0.0, 0.0, 0.0};
    // Directed: unity, powers of two, 1/3, an example pair (about 23.19 and
    // 16.9) both ways, negative operands.
    apply(32'h3f800000, 32'h3f800000, 0);
    apply(32'h40800000, 32'h40000000, 0);
    apply(32'h3f800000, 32'h40400000, 0);
    apply(32'h41b9851f, 32'h41873333, 0);
    apply(32'h41873333, 32'h41b9851f, 0);
    apply(32'hc1b9851f, 32'h41873333, 0);
    apply(32'h41b9851f, 32'hc1873333, 0);
    apply(32'hc1b9851f, 32'hc1873333, 0);
    // Exact results where no input bit is dropped: 6/1.5 = 4, 1.5/1.5 = 1.
    apply(32'h40c00000, 32'h3fc00000, 0);
    checks++;
    if (z3 !== 32'h40800000) begin
      failures++;
      $display("FAIL 6/1.5 gave %h", z3);
    end
    for (int i = 0; i < N_RANDOM; i++) apply(rand_fp(), rand_fp(), 1);
    e1 = 100.0 * err_sum[0] / err_n;
    e2 = 100.0 * err_sum[1] / err_n;
    e3 = 100.0 * err_sum[2] / err_n;
    band_check("divide & subtract", e1, 4.5, 7.5);
    band_check("divide & alternate-10", e2, 4.5, 7.5);
    band_check("divide & zero", e3, 0.15, 0.6);
    checks++;
    if (!(e3 < e1 && e3 < e2)) begin
      failures++;
      $display("FAIL divide & zero is not the most accurate");
    end
    count_check("Mx < My (decrement, shift)", n_lt);
    count_check("Mx >= My", n_ge);
    count_check("Mx == My (quotient one)", n_eq);
    count_check("low difference wraps", n_wrap);
    count_check("negative quotient", n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
