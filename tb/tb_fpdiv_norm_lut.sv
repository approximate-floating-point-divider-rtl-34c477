// tb_fpdiv_norm_lut: exhaustive check of the normalising table. For every
// quotient value and comparison result the output field must equal the
// DIV_W-1 bits directly below the quotient's leading one, found here by
// searching for the highest set bit of q (independent of the select input).
module tb_fpdiv_norm_lut;
  localparam int unsigned DIV_W = 8;
  logic [DIV_W:0]   q;
  logic             lt;
  logic [DIV_W-2:0] mant_hi;
  int checks = 0, failures = 0;
  int lead, expv;

  fpdiv_norm_lut #(.DIV_W(DIV_W)) dut (.q(q), .mx_lt_my(lt), .mant_hi(mant_hi));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Quotients in [1/2, 2): q in [2^(DIV_W-1), 2^(DIV_W+1)). The comparison
    // result that goes with q is q < 1.
    for (int v = 1 << (DIV_W - 1); v < (1 << (DIV_W + 1)); v++) begin
      q  = (DIV_W+1)'(v);
      lt = (v < (1 << DIV_W));
      #1;
      lead = 0;
      for (int k = 0; k <= DIV_W; k++) if (v & (1 << k)) lead = k;
      expv = (v >> (lead - (DIV_W - 1))) & ((1 << (DIV_W - 1)) - 1);
      checks++;
      if (int'(mant_hi) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL q=%0d lt=%b out=%0h exp=%0h", v, lt, mant_hi, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
