// par_engine: parallel down-conversion and correlation engine (the 400 MHz
// receiver version).
//
// The sample stream is split over PATHS identical paths, each a copy of the
// sequential path (mapper, Gold code removal, accumulator) but with a 16-bit
// accumulator, so every path runs at 1/PATHS of the sample rate and can be
// supplied from a lower voltage.  Each clock cycle of this engine delivers
// one set of PATHS consecutive samples, sample i of the set going to path i.
//
// Combining: the paths integrate over blocks of PATHS sample sets.  At the end
// of a block all path sums are loaded into the shifter, which feeds them one
// per cycle into the 22-bit second-stage accumulator; a block therefore takes
// exactly as long to drain as to collect, and the next load never finds the
// shifter busy.  The second-stage accumulator only advances while the shifter
// presents a word: comb_en is the enable that stands for the clock gate of
// the original design (with PATHS = 32 the combiner handles one word per path-clock
// cycle, i.e. once per 32 sample-clock cycles).  The duplicated paths, the
// shifter, the 16-bit path and 22-bit second-stage widths and the gating
// follow the original design; the block length, the sample-to-path order and the
// dump handshake are this design's choices.
//
// Interface: in_valid qualifies sig/sine/code (PATHS samples each).  dump
// asks to close the integration: it takes effect at the end of the current
// block, i.e. with the sample set that has block_last high (block_last is a
// combinational output so a controller can align its dumps).  out_valid then
// pulses with the 22-bit sum of every sample since the previous dump.  If
// clock edge e takes the closing sample set, out_valid is set by edge
// e + 1 + PATH_STAGES + PATHS + ACC_STAGES (paths, load, PATHS shifts, and
// the second-stage accumulator).
module par_engine
  import gps_pkg::smag2_t;
#(
  parameter int unsigned PATHS       = 16,
  parameter int unsigned PATH_W      = gps_pkg::PATH_W,
  parameter int unsigned ACC_W       = gps_pkg::ACC_W,
  parameter int unsigned PATH_STAGES = 1,
  parameter int unsigned ACC_STAGES  = 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  smag2_t [PATHS-1:0]        sig,
  input  smag2_t [PATHS-1:0]        sine,
  input  logic   [PATHS-1:0]        code,
  input  logic                      dump,
  output logic                      block_last,
  output logic                      comb_en,
  output logic                      out_valid,
  output logic [ACC_W-1:0]          out_sum,
  output logic                      overrun
);

  localparam int unsigned PATH_LAT = 2 + PATH_STAGES;
  localparam int unsigned BLK_W    = (PATHS > 1) ? $clog2(PATHS) : 1;

  // ---- block counter and dump request --------------------------------------
  logic [BLK_W-1:0] blk_cnt;
  logic             dump_pend;     // dump seen earlier in this block
  logic             close_now;     // this block ends the integration

  assign block_last = (blk_cnt == BLK_W'(PATHS - 1));
  assign close_now  = dump || dump_pend;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      blk_cnt   <= '0;
      dump_pend <= 1'b0;
    end else if (in_valid) begin
      blk_cnt   <= block_last ? '0 : blk_cnt + 1'b1;
      dump_pend <= close_now && !block_last;
    end

  // ---- the parallel paths ----------------------------------------------------
  logic [PATHS-1:0]             p_valid;
  logic [PATHS-1:0][PATH_W-1:0] p_sum;

  for (genvar i = 0; i < PATHS; i++) begin : g_path
    corr_path #(.ACC_W(PATH_W), .ACC_STAGES(PATH_STAGES)) u_path (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .in_last  (block_last),
      .sig      (sig[i]),
      .sine     (sine[i]),
      .code     (code[i]),
      .out_valid(p_valid[i]),
      .out_sum  (p_sum[i])
    );
  end

  // The "integration ends here" mark travels beside the paths.
  logic [PATH_LAT-1:0] tag_dly;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tag_dly <= '0;
    else        tag_dly <= {tag_dly[PATH_LAT-2:0], in_valid && block_last && close_now};

  // ---- shifter and gated second-stage accumulator ---------------------------
  logic [PATH_W-1:0] sh_word;
  logic              sh_last;

  path_shifter #(.N(PATHS), .W(PATH_W)) u_shift (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (p_valid[0]),
    .tag_in   (tag_dly[PATH_LAT-1]),
    .din      (p_sum),
    .out_valid(comb_en),
    .out_word (sh_word),
    .out_last (sh_last),
    .overrun  (overrun)
  );

  pipe_acc #(.IN_W(PATH_W), .WIDTH(ACC_W), .STAGES(ACC_STAGES)) u_acc2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (comb_en),
    .in_last  (sh_last),
    .in_data  (sh_word),
    .out_valid(out_valid),
    .out_sum  (out_sum)
  );

  a_paths_in_step: assert property (@(posedge clk) disable iff (!rst_n) p_valid == '0 || p_valid == '1)
    else $error("par_engine: paths out of step");

endmodule
