// tb_gold_wipeoff: exhaustive check of the Gold code removal.
// Every 6-bit input is applied with both code values; code 1 must negate the
// input (chip value -1), code 0 must pass it unchanged.
module tb_gold_wipeoff;
  import gps_pkg::*;

  prod_t din, dout;
  logic  code;
  int    checks = 0, failures = 0;

  gold_wipeoff dut (.din(din), .code(code), .dout(dout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32; v < 32; v++)
      for (int c = 0; c < 2; c++) begin
        int expv;
        din  = prod_t'(v);
        code = c[0];
        expv = c ? -v : v;
        if (expv == 32) expv = -32;   // -(-32) wraps in 6 bits
        #1;
        checks++;
        if (int'(dout) != expv) begin
          failures++;
          $display("FAIL din=%0d code=%0d dout=%0d expected %0d", v, c, dout, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
