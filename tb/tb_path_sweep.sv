// tb_path_sweep: the parallel engine at every path count evaluated for the
// 400 MHz signal (1, 2, 4, 16 and 32 paths), each build checked by its own
// par_chk harness; the 32-path build also uses 2-slice accumulators.
module tb_path_sweep;

  localparam int NB = 5;

  logic clk = 0, rst_n = 0;
  logic [NB-1:0] done;
  int   c[NB], f[NB];

  par_chk #(.PATHS(1))  u1  (.clk(clk), .rst_n(rst_n), .done(done[0]), .checks(c[0]), .failures(f[0]));
  par_chk #(.PATHS(2))  u2  (.clk(clk), .rst_n(rst_n), .done(done[1]), .checks(c[1]), .failures(f[1]));
  par_chk #(.PATHS(4))  u4  (.clk(clk), .rst_n(rst_n), .done(done[2]), .checks(c[2]), .failures(f[2]));
  par_chk #(.PATHS(16)) u16 (.clk(clk), .rst_n(rst_n), .done(done[3]), .checks(c[3]), .failures(f[3]));
  par_chk #(.PATHS(32), .PATH_STAGES(2), .ACC_STAGES(2)) u32 (
    .clk(clk), .rst_n(rst_n), .done(done[4]), .checks(c[4]), .failures(f[4]));

  always #5 clk = ~clk;

  int checks, failures;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NB; i++) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NB; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
