// tb_gps_mapper: exhaustive check of the down-conversion mapper.
// All 16 (sample, sine) pairs are applied; the expected product is computed
// from the sign/magnitude values of both codes, independently of the table.
module tb_gps_mapper;
  import gps_pkg::*;

  smag2_t sig, sine;
  prod_t  prod;
  int     checks = 0, failures = 0;

  gps_mapper dut (.sig(sig), .sine(sine), .prod(prod));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        int s, c, expv;
        sig  = smag2_t'(a);
        sine = smag2_t'(b);
        s    = ((a & 1) ? 3 : 1) * ((a & 2) ? -1 : 1);
        c    = ((b & 1) ? 3 : 1) * ((b & 2) ? -1 : 1);
        expv = s * c;
        #1;
        checks++;
        if (int'(prod) != expv) begin
          failures++;
          $display("FAIL sig=%b sine=%b prod=%0d expected %0d", a[1:0], b[1:0], prod, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
