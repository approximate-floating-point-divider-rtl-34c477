// tb_fpdiv_alg2: self-checking testbench of the divide & alternate-'10' divider.
//
// Drives directed and random normal operands (exponents kept away from
// overflow and underflow, which the divider does not handle) and compares
// every result bit for bit with the arithmetic reference in fpdiv_tb_pkg.
// It also measures the mean relative error against the exact quotient x/y
// over the random operands and checks that it lies in [4.0%, 8.0%], a
// band around the 5.9% average error expected of this variant at the
// default 8-bit division. Both comparison cases (Mx < My and Mx >= My) must
// occur. Combinational DUT: inputs are applied and the outputs sampled 1 ns later.
module tb_fpdiv_alg2;
  import fpdiv_pkg::*;
  import fpdiv_tb_pkg::*;

  localparam int unsigned DIV_W = 8;
  localparam int          N_RANDOM = 20000;

  fp32_t x, y, z;
  int checks = 0, failures = 0;
  int n_lt = 0, n_ge = 0;
  real err_sum = 0.0;
  int  err_n = 0;

  fpdiv_alg2 #(.DIV_W(DIV_W)) dut (.x(x), .y(y), .z(z));

  task automatic apply(input logic [31:0] vx, input logic [31:0] vy, input bit measure);
    logic [31:0] zr;
    real exact, got, rel;
    x = vx; y = vy;
    #1;
    zr = ref_div(2, DIV_W, vx, vy);
    if (vx[22:24-DIV_W] < vy[22:24-DIV_W]) n_lt++; else n_ge++;
    checks++;
    if (z !== zr) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h y=%h z=%h ref=%h", vx, vy, z, zr);
    end
    if (measure) begin
      exact = fp32_value(vx) / fp32_value(vy);
      got   = fp32_value(z);
      rel   = (exact - got) / got;
      err_sum += (rel < 0.0) ? -rel : rel;
      err_n++;
    end
  endtask

  function automatic logic [31:0] rand_fp();
    logic [31:0] r;
    r = $urandom;
    return fp32_make(r[31], 8'(100 + ($urandom % 55)), r[22:0]);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mean;
    // Directed cases: equal operands, powers of two, the operand pair of a
    // simulation example (about 23.19 / 16.9), swapped, and signs.
    apply(32'h3f800000, 32'h3f800000, 0);   // 1 / 1
    apply(32'h40000000, 32'h3f800000, 0);   // 2 / 1
    apply(32'h3f800000, 32'h40400000, 0);   // 1 / 3
    apply(32'h41b9851f, 32'h41873333, 0);
    apply(32'h41873333, 32'h41b9851f, 0);
    apply(32'hc1b9851f, 32'h41873333, 0);
    apply(32'hc0490fdb, 32'hc02df854, 0);   // -pi / -e
    for (int i = 0; i < N_RANDOM; i++) apply(rand_fp(), rand_fp(), 1);
    mean = 100.0 * err_sum / err_n;
    $display("mean relative error %0.3f%% over %0d random operand pairs", mean, err_n);
    checks++;
    if (mean < 4.0 || mean > 8.0) begin
      failures++;
      $display("FAIL mean error %0.3f%% outside [4.0, 8.0]", mean);
    end
    checks++;
    if (n_lt == 0 || n_ge == 0) begin
      failures++;
      $display("FAIL comparison cases not both covered: lt=%0d ge=%0d", n_lt, n_ge);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
