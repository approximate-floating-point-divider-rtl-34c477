// tb_fpdiv_sign: exhaustive check of the quotient sign (all four sign pairs):
// the quotient is negative exactly when the operand signs differ.
module tb_fpdiv_sign;
  logic sx, sy, sz;
  int checks = 0, failures = 0;

  fpdiv_sign dut (.sx(sx), .sy(sy), .sz(sz));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      sx = i[1]; sy = i[0];
      #1;
      checks++;
      if (sz !== (sx != sy)) begin
        failures++;
        $display("FAIL sx=%b sy=%b sz=%b", sx, sy, sz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
