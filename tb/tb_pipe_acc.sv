// tb_pipe_acc: integrate-and-dump accumulator in three configurations fed by
// one random stream of signed 6-bit samples:
//   d0: 16 bits in 2 slices (the drawn two-stage accumulator, defaults)
//   d1: 22 bits in 3 slices
//   d2: 22 bits in 1 slice (plain accumulator)
// Valid gaps and integration lengths are random; some integrations are long
// enough to carry into and wrap the upper slices.  Each result is compared
// with a sum kept by the testbench, and the cycle it appears on with the
// expected latency (edge of the last sample + STAGES - 1).
module tb_pipe_acc;

  localparam int NDUT = 3;
  localparam int WID[NDUT] = '{16, 22, 22};
  localparam int STG[NDUT] = '{2, 3, 1};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0;
  logic signed [5:0] in_data = '0;
  logic [NDUT-1:0] ov;
  logic [15:0] s0;
  logic [21:0] s1, s2;

  int checks = 0, failures = 0;
  int edge_no = 0;

  pipe_acc dut0 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_last(in_last),
                 .in_data(in_data), .out_valid(ov[0]), .out_sum(s0));
  pipe_acc #(.IN_W(6), .WIDTH(22), .STAGES(3)) dut1 (
                 .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_last(in_last),
                 .in_data(in_data), .out_valid(ov[1]), .out_sum(s1));
  pipe_acc #(.IN_W(6), .WIDTH(22), .STAGES(1)) dut2 (
                 .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_last(in_last),
                 .in_data(in_data), .out_valid(ov[2]), .out_sum(s2));

  always #5 clk = ~clk;
  always @(posedge clk) edge_no++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint run_sum = 0;
  longint exp_val[$];
  int     exp_edge[$];
  int     got[NDUT];

  // Compare outputs at the falling edge, after the rising edge that set them.
  always @(negedge clk) begin
    for (int d = 0; d < NDUT; d++) begin
      if (ov[d]) begin
        longint g, e;
        int ee;
        g = (d == 0) ? longint'(s0) : (d == 1) ? longint'(s1) : longint'(s2);
        if (got[d] >= exp_val.size()) begin
          failures++;
          $display("FAIL dut%0d: unexpected result %0d", d, g);
        end else begin
          e  = exp_val[got[d]] & ((64'd1 << WID[d]) - 1);
          ee = exp_edge[got[d]] + STG[d] - 1;
          checks += 2;
          if (g != e) begin
            failures++;
            $display("FAIL dut%0d result %0d: got %h expected %h", d, got[d], g, e);
          end
          if (edge_no != ee) begin
            failures++;
            $display("FAIL dut%0d result %0d: at edge %0d expected %0d", d, got[d], edge_no, ee);
          end
        end
        got[d]++;
      end
    end
  end

  task automatic integrate(int len, int gap_pct, int bias);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      while ($urandom_range(99) < gap_pct) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_last  = (i == len - 1);
      if (bias != 0) in_data = 6'(bias);
      else           in_data = 6'($urandom_range(63));
      run_sum += longint'(in_data);
      if (in_last) begin
        // the sample is taken by the next rising edge
        exp_val.push_back(run_sum);
        exp_edge.push_back(edge_no + 1);
        run_sum = 0;
      end
    end
    @(negedge clk);
    in_valid = 0;
    in_last  = 0;
  endtask

  initial begin
    got = '{default: 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    integrate(1, 0, 0);          // single-sample integration
    integrate(1, 0, -7);
    integrate(5, 0, 0);
    integrate(40, 30, 0);
    integrate(600, 0, 31);       // crosses 16 bits' low slice many times
    integrate(600, 10, -32);     // negative, borrows through the slices
    integrate(3000, 0, 31);      // wraps the 16-bit sum
    for (int k = 0; k < 60; k++) integrate(1 + $urandom_range(200), $urandom_range(40), 0);
    // back-to-back integrations with no gap between them
    for (int k = 0; k < 20; k++) begin
      int len;
      len = 1 + $urandom_range(4);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        in_valid = 1;
        in_last  = (i == len - 1);
        in_data  = 6'($urandom_range(63));
        run_sum += longint'(in_data);
        if (in_last) begin
          exp_val.push_back(run_sum);
          exp_edge.push_back(edge_no + 1);
          run_sum = 0;
        end
      end
    end
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
