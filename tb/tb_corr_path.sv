// tb_corr_path: the sequential three-stage path, checked in three builds
// that see the same random stream: the 22-bit accumulator in one slice
// (default), in two and in three pipelined slices.  The expected sum of each integration is
// computed here from the sample values (sample * sine * chip, with chip = -1
// for code bit 1) and compared, with its arrival cycle, against both builds.
module tb_corr_path;
  import gps_pkg::*;

  localparam int NDUT = 3;
  localparam int STG[NDUT] = '{1, 2, 3};

  logic   clk = 0, rst_n = 0;
  logic   in_valid = 0, in_last = 0, code = 0;
  smag2_t sig = '0, sine = '0;
  logic [NDUT-1:0] ov;
  logic [21:0] sum [NDUT];

  int checks = 0, failures = 0;
  int edge_no = 0;

  corr_path dut0 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_last(in_last),
                  .sig(sig), .sine(sine), .code(code), .out_valid(ov[0]), .out_sum(sum[0]));
  corr_path #(.ACC_W(22), .ACC_STAGES(2)) dut1 (
                  .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_last(in_last),
                  .sig(sig), .sine(sine), .code(code), .out_valid(ov[1]), .out_sum(sum[1]));
  corr_path #(.ACC_W(22), .ACC_STAGES(3)) dut2 (
                  .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_last(in_last),
                  .sig(sig), .sine(sine), .code(code), .out_valid(ov[2]), .out_sum(sum[2]));

  always #5 clk = ~clk;
  always @(posedge clk) edge_no++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint run_sum = 0;
  longint exp_val[$];
  int     exp_edge[$];
  int     got[NDUT];

  always @(negedge clk)
    for (int d = 0; d < NDUT; d++)
      if (ov[d]) begin
        if (got[d] >= exp_val.size()) begin
          failures++;
          $display("FAIL dut%0d: unexpected result", d);
        end else begin
          longint e;
          int ee;
          e  = exp_val[got[d]] & 64'h3fffff;
          ee = exp_edge[got[d]] + 1 + STG[d];
          checks += 2;
          if (longint'(sum[d]) != e) begin
            failures++;
            $display("FAIL dut%0d result %0d: got %h expected %h", d, got[d], sum[d], e);
          end
          if (edge_no != ee) begin
            failures++;
            $display("FAIL dut%0d result %0d: edge %0d expected %0d", d, got[d], edge_no, ee);
          end
        end
        got[d]++;
      end

  // Drive one sample (at a falling edge); fixed selects a constant product.
  task automatic drive(bit last, int fixed);
    in_valid = 1;
    in_last  = last;
    if (fixed != 0) begin
      sig = 2'b01; sine = 2'b01; code = fixed < 0;   // +-9
    end else begin
      sig  = smag2_t'($urandom_range(3));
      sine = smag2_t'($urandom_range(3));
      code = $urandom_range(1);
    end
    run_sum += smag2_value(sig) * smag2_value(sine) * (code ? -1 : 1);
    if (last) begin
      exp_val.push_back(run_sum);
      exp_edge.push_back(edge_no + 1);
      run_sum = 0;
    end
  endtask

  task automatic integrate(int len, int gap_pct, int fixed);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      while ($urandom_range(99) < gap_pct) begin
        in_valid = 0;
        @(negedge clk);
      end
      drive(i == len - 1, fixed);
    end
  endtask

  initial begin
    got = '{default: 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    integrate(1, 0, 0);
    integrate(2, 0, 0);
    integrate(30, 0, 1);       // +9 each: carries between slices
    integrate(30, 0, -1);      // -9 each
    integrate(2000, 0, 1);
    for (int k = 0; k < 40; k++) integrate(1 + $urandom_range(300), $urandom_range(30), 0);
    for (int k = 0; k < 20; k++) integrate(1 + $urandom_range(3), 0, 0);   // back to back
    @(negedge clk);
    in_valid = 0;
    in_last  = 0;
    repeat (10) @(negedge clk);
    for (int d = 0; d < NDUT; d++) begin
      checks++;
      if (got[d] != exp_val.size()) begin
        failures++;
        $display("FAIL dut%0d produced %0d results, expected %0d", d, got[d], exp_val.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
