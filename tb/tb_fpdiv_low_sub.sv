// tb_fpdiv_low_sub: random and corner-case check of the low-field
// subtractor: d must equal (lx - ly) mod 2^16, computed in 32-bit integer
// arithmetic. Both signs of the true difference are exercised.
module tb_fpdiv_low_sub;
  localparam int unsigned LOW_W = 16;
  logic [LOW_W-1:0] lx, ly, d;
  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0;
  int expv;

  fpdiv_low_sub #(.LOW_W(LOW_W)) dut (.lx(lx), .ly(ly), .d(d));

  task automatic check(input int unsigned vx, input int unsigned vy);
    lx = LOW_W'(vx); ly = LOW_W'(vy);
    #1;
    expv = (int'(lx) - int'(ly)) & ((1 << LOW_W) - 1);
    if (int'(lx) < int'(ly)) n_neg++; else n_pos++;
    checks++;
    if (int'(d) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL lx=%h ly=%h d=%h exp=%h", lx, ly, d, expv);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(16'hffff, 0); check(0, 16'hffff); check(16'h8000, 1);
    for (int i = 0; i < 5000; i++) check($urandom, $urandom);
    checks++;
    if (n_neg == 0 || n_pos == 0) begin
      failures++;
      $display("FAIL both signs not covered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
