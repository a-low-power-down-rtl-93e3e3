// par_chk: self-checking harness around one par_engine build, used by the
// path-count sweep.  It drives random sample sets with input gaps and
// random dumps, keeps its own block count and integration sum, and compares
// every result and its arrival cycle (closing edge + 1 + PATH_STAGES + PATHS
// + ACC_STAGES).  After SETS sample sets it closes the integration, drains,
// and raises done with its check and failure counts.
module par_chk
  import gps_pkg::*;
#(
  parameter int PATHS       = 4,
  parameter int PATH_STAGES = 1,
  parameter int ACC_STAGES  = 1,
  parameter int SETS        = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  logic            vin = 0, dump = 0, blast, cen, ov, orun;
  smag2_t [PATHS-1:0] sig = '0, sine = '0;
  logic   [PATHS-1:0] code = '0;
  logic [21:0]     sum;

  par_engine #(.PATHS(PATHS), .PATH_W(16), .ACC_W(22), .PATH_STAGES(PATH_STAGES),
               .ACC_STAGES(ACC_STAGES)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(vin), .sig(sig), .sine(sine), .code(code),
    .dump(dump), .block_last(blast), .comb_en(cen), .out_valid(ov), .out_sum(sum),
    .overrun(orun));

  int     edge_no = 0, got = 0, blk = 0, blocks = 0, en_cycles = 0;
  longint run_sum = 0, exp_val[$];
  int     exp_edge[$];
  bit     pend = 0;

  always @(posedge clk) edge_no++;

  always @(negedge clk) if (rst_n) begin
    if (cen) en_cycles++;
    if (ov) begin
      if (got >= exp_val.size()) begin
        failures++;
        $display("FAIL PATHS=%0d: unexpected result", PATHS);
      end else begin
        checks += 2;
        if (longint'(sum) != (exp_val[got] & 64'h3fffff)) begin
          failures++;
          $display("FAIL PATHS=%0d result %0d: got %h expected %h", PATHS, got, sum, exp_val[got] & 64'h3fffff);
        end
        if (edge_no != exp_edge[got] + 1 + PATH_STAGES + PATHS + ACC_STAGES) begin
          failures++;
          $display("FAIL PATHS=%0d result %0d at edge %0d", PATHS, got, edge_no);
        end
      end
      got++;
    end
  end

  task automatic step(int gap_pct, int dump_pct);
    vin  = ($urandom_range(99) >= gap_pct);
    dump = vin && ($urandom_range(99) < dump_pct);
    for (int i = 0; i < PATHS; i++) begin
      sig[i]  = smag2_t'($urandom_range(3));
      sine[i] = smag2_t'($urandom_range(3));
      code[i] = 1'($urandom_range(1));
      if (vin) run_sum += smag2_value(sig[i]) * smag2_value(sine[i]) * (code[i] ? -1 : 1);
    end
    if (vin) begin
      checks++;
      if (blast != (blk == PATHS - 1)) begin
        failures++;
        $display("FAIL PATHS=%0d block_last wrong", PATHS);
      end
      if (blk == PATHS - 1) begin
        blocks++;
        if (dump || pend) begin
          exp_val.push_back(run_sum);
          exp_edge.push_back(edge_no + 1);
          run_sum = 0;
        end
        pend = 0;
        blk  = 0;
      end else begin
        pend = pend || dump;
        blk++;
      end
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    @(posedge rst_n);
    for (int n = 0; n < SETS; n++) begin
      @(negedge clk);
      step((n / 500) % 2 == 1 ? 30 : 0, 3);
    end
    do begin
      @(negedge clk);
      step(0, 100);
    end while (blk != 0);
    @(negedge clk);
    vin = 0; dump = 0;
    repeat (PATHS + 20) @(negedge clk);
    checks += 3;
    if (got != exp_val.size() || got == 0) begin
      failures++;
      $display("FAIL PATHS=%0d: %0d results, expected %0d", PATHS, got, exp_val.size());
    end
    if (en_cycles != blocks * PATHS) begin
      failures++;
      $display("FAIL PATHS=%0d: second stage on %0d cycles for %0d blocks", PATHS, en_cycles, blocks);
    end
    if (orun) begin
      failures++;
      $display("FAIL PATHS=%0d: overrun", PATHS);
    end
    $display("PATHS=%0d: %0d integrations over %0d blocks", PATHS, got, blocks);
    done = 1;
  end
endmodule
