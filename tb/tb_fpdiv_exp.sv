// tb_fpdiv_exp: exhaustive check of the exponent path. For every pair of
// stored exponents and both comparison results the expected stored exponent
// is (E_X - E_Y + 127 - [Mx < My]) mod 256, worked out in integer arithmetic.
module tb_fpdiv_exp;
  logic [7:0] ex, ey, ez;
  logic       lt;
  int checks = 0, failures = 0;
  int expv;

  fpdiv_exp dut (.ex(ex), .ey(ey), .mx_lt_my(lt), .ez(ez));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          ex = 8'(i); ey = 8'(j); lt = c[0];
          #1;
          expv = ((i - j + 127 - c) % 256 + 256) % 256;
          checks++;
          if (int'(ez) != expv) begin
            failures++;
            if (failures < 10) $display("FAIL ex=%0d ey=%0d lt=%0d ez=%0d exp=%0d", i, j, c, ez, expv);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
