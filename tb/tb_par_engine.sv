// tb_par_engine: the parallel engine in two builds driven side by side with
// their own random streams: the default (16 paths, single-slice
// accumulators) and a small one (4 paths, 2-slice path and second-stage
// accumulators).  For each build the testbench keeps its own block count and
// integration sum (sample * sine * chip over all paths), closes an
// integration at the end of the block in which dump was seen, and compares
// every 22-bit result and its cycle (closing edge + 1 + PATH_STAGES + PATHS +
// ACC_STAGES).  It also checks that the second-stage enable is high exactly
// PATHS cycles per block, and that it is low while the paths collect.
module tb_par_engine;
  import gps_pkg::*;

  localparam int NDUT = 2;
  localparam int NP[NDUT]  = '{16, 4};
  localparam int PST[NDUT] = '{1, 2};
  localparam int AST[NDUT] = '{1, 2};

  logic clk = 0, rst_n = 0;
  logic [NDUT-1:0] vin = '0, dump = '0, blast, cen, ov, orun;
  smag2_t [15:0] sig0 = '0, sine0 = '0;
  logic   [15:0] code0 = '0;
  smag2_t [3:0]  sig1 = '0, sine1 = '0;
  logic   [3:0]  code1 = '0;
  logic [21:0] sum [NDUT];

  int checks = 0, failures = 0;
  int edge_no = 0;

  par_engine dut0 (.clk(clk), .rst_n(rst_n), .in_valid(vin[0]), .sig(sig0), .sine(sine0),
    .code(code0), .dump(dump[0]), .block_last(blast[0]), .comb_en(cen[0]),
    .out_valid(ov[0]), .out_sum(sum[0]), .overrun(orun[0]));
  par_engine #(.PATHS(4), .PATH_W(16), .ACC_W(22), .PATH_STAGES(2), .ACC_STAGES(2)) dut1 (
    .clk(clk), .rst_n(rst_n), .in_valid(vin[1]), .sig(sig1), .sine(sine1),
    .code(code1), .dump(dump[1]), .block_last(blast[1]), .comb_en(cen[1]),
    .out_valid(ov[1]), .out_sum(sum[1]), .overrun(orun[1]));

  always #5 clk = ~clk;
  always @(posedge clk) edge_no++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference state per build
  longint run_sum[NDUT], exp_val[NDUT][$];
  int     exp_edge[NDUT][$], got[NDUT], blk[NDUT], blocks[NDUT], en_cycles[NDUT];
  bit     pend[NDUT];
  int     deferred = 0, gated_idle[NDUT];

  always @(negedge clk) if (rst_n)
    for (int d = 0; d < NDUT; d++) begin
      if (cen[d]) en_cycles[d]++;
      else        gated_idle[d]++;
      if (ov[d]) begin
        if (got[d] >= exp_val[d].size()) begin
          failures++;
          $display("FAIL dut%0d: unexpected result", d);
        end else begin
          longint e;
          int ee;
          e  = exp_val[d][got[d]] & 64'h3fffff;
          ee = exp_edge[d][got[d]] + 1 + PST[d] + NP[d] + AST[d];
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
    end

  // One cycle of stimulus for build d (called at a falling edge).
  task automatic step(int d, int gap_pct, int dump_pct);
    vin[d]  = ($urandom_range(99) >= gap_pct);
    dump[d] = vin[d] && ($urandom_range(99) < dump_pct);
    for (int i = 0; i < NP[d]; i++) begin
      smag2_t a, b;
      logic   c;
      a = smag2_t'($urandom_range(3));
      b = smag2_t'($urandom_range(3));
      c = 1'($urandom_range(1));
      if (d == 0) begin sig0[i] = a; sine0[i] = b; code0[i] = c; end
      else        begin sig1[i] = a; sine1[i] = b; code1[i] = c; end
      if (vin[d]) run_sum[d] += smag2_value(a) * smag2_value(b) * (c ? -1 : 1);
    end
    if (vin[d]) begin
      checks++;
      if (blast[d] != (blk[d] == NP[d] - 1)) begin
        failures++;
        $display("FAIL dut%0d block_last %0d at set %0d", d, blast[d], blk[d]);
      end
      if (blk[d] == NP[d] - 1) begin
        blocks[d]++;
        if (dump[d] || pend[d]) begin
          if (pend[d]) deferred++;
          exp_val[d].push_back(run_sum[d]);
          exp_edge[d].push_back(edge_no + 1);
          run_sum[d] = 0;
        end
        pend[d] = 0;
        blk[d]  = 0;
      end else begin
        pend[d] = pend[d] || dump[d];
        blk[d]++;
      end
    end
  endtask

  initial begin
    run_sum = '{default: 0};
    got = '{default: 0}; blk = '{default: 0}; blocks = '{default: 0};
    en_cycles = '{default: 0}; gated_idle = '{default: 0}; pend = '{default: 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 4; phase++) begin
      int gap, dmp;
      gap = (phase == 1) ? 30 : (phase == 3) ? 60 : 0;
      dmp = (phase == 2) ? 40 : 5;
      repeat (1500) begin
        @(negedge clk);
        step(0, gap, dmp);
        step(1, gap, dmp);
      end
    end
    // close both integrations: dump on every set until a block boundary
    // has passed in both builds, then let the results drain
    repeat (NP[0]) begin
      @(negedge clk);
      step(0, 0, 100);
      step(1, 0, 100);
    end
    while (blk[0] != 0 || blk[1] != 0) begin
      @(negedge clk);
      for (int d = 0; d < NDUT; d++)
        if (blk[d] != 0) step(d, 0, 100);
        else begin vin[d] = 0; dump[d] = 0; end
    end
    @(negedge clk);
    vin = '0; dump = '0;
    repeat (40) @(negedge clk);
    for (int d = 0; d < NDUT; d++) begin
      checks += 3;
      if (got[d] != exp_val[d].size() || got[d] < 10) begin
        failures++;
        $display("FAIL dut%0d produced %0d results, expected %0d", d, got[d], exp_val[d].size());
      end
      if (en_cycles[d] != blocks[d] * NP[d]) begin
        failures++;
        $display("FAIL dut%0d second stage enabled %0d cycles for %0d blocks", d, en_cycles[d], blocks[d]);
      end
      if (orun[d]) begin
        failures++;
        $display("FAIL dut%0d overrun", d);
      end
      $display("dut%0d: %0d integrations, %0d blocks, second stage idle %0d cycles",
               d, got[d], blocks[d], gated_idle[d]);
    end
    checks++;
    if (deferred == 0) begin
      failures++;
      $display("FAIL no deferred dump exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
