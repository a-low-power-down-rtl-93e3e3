// tb_gps_pkg: checks the value function of the 2-bit sign/magnitude code in
// gps_pkg against the code definition (bit 1 sign, bit 0 selects 1 or 3).
module tb_gps_pkg;
  import gps_pkg::*;

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv[4];
    expv = '{1, 3, -1, -3};
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (smag2_value(smag2_t'(c)) != expv[c]) begin
        failures++;
        $display("FAIL code %b: value %0d expected %0d", c[1:0], smag2_value(smag2_t'(c)), expv[c]);
      end
    end
    checks += 3;
    if (PROD_W != 6)  begin failures++; $display("FAIL PROD_W"); end
    if (ACC_W != 22)  begin failures++; $display("FAIL ACC_W"); end
    if (PATH_W != 16) begin failures++; $display("FAIL PATH_W"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
