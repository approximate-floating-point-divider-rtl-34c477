// tb_fpdiv_mant_cmp: exhaustive check of the mantissa comparator at the
// default width (7 compared bits): every pair, expected result from the
// integer ordering of the fields.
module tb_fpdiv_mant_cmp;
  localparam int unsigned DIV_W = 8;
  logic [DIV_W-2:0] mx, my;
  logic             lt;
  int checks = 0, failures = 0;

  fpdiv_mant_cmp dut (.mx(mx), .my(my), .mx_lt_my(lt));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (DIV_W - 1)); i++)
      for (int j = 0; j < (1 << (DIV_W - 1)); j++) begin
        mx = (DIV_W-1)'(i); my = (DIV_W-1)'(j);
        #1;
        checks++;
        if (lt !== (i < j)) begin
          failures++;
          if (failures < 10) $display("FAIL mx=%0d my=%0d lt=%b", i, j, lt);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
