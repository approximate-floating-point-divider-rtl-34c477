// tb_fpdiv_mant_div: exhaustive check of the significand divider at the
// default width: every pair of normalised 8-bit significands (top bit set)
// is divided and q is compared with floor(a * 2^8 / b) from the integer
// divide operator. It also checks that both quotient ranges occur
// (q >= 1 and q < 1).
module tb_fpdiv_mant_div;
  localparam int unsigned DIV_W = 8;
  logic [DIV_W-1:0] a, b;
  logic [DIV_W:0]   q;
  int checks = 0, failures = 0;
  int n_ge = 0, n_lt = 0;
  int unsigned expv;

  fpdiv_mant_div #(.DIV_W(DIV_W)) dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 1 << (DIV_W - 1); i < (1 << DIV_W); i++)
      for (int j = 1 << (DIV_W - 1); j < (1 << DIV_W); j++) begin
        a = DIV_W'(i); b = DIV_W'(j);
        #1;
        expv = (i << DIV_W) / j;
        checks++;
        if (q[DIV_W]) n_ge++; else n_lt++;
        if (int'(q) != int'(expv)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d q=%0d exp=%0d", i, j, q, expv);
        end
      end
    checks++;
    if (n_ge == 0 || n_lt == 0) begin
      failures++;
      $display("FAIL quotient range not covered: ge=%0d lt=%0d", n_ge, n_lt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
