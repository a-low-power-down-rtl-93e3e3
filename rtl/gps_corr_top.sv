// gps_corr_top: the two low-power correlation engines side by side.
//
// The text proposes a different organisation for each of the two GPS signal
// classes it studies, and this top carries both with their own ports:
//   * p_*  the 400 MHz-sampled (20.46 MHz wide) signal: the parallel engine,
//          PATHS copies of the sequential path, default 16, the number of
//          paths at which the original evaluation finds the lowest power; each clock delivers
//          PATHS samples.
//   * s_*  the 40 MHz-sampled (2.046 MHz wide) signal: the sequential
//          three-stage path with a 22-bit accumulator split into SEQ_STAGES
//          pipelined carry slices (default 2, the drawn two-stage version).
// The local sine wave and the Gold code come from generators outside this
// engine, as do the dump strobes (from the tracking loops); the engines'
// integrated sums go back to them.  Timing of each side is given in
// par_engine and corr_path.
module gps_corr_top
  import gps_pkg::smag2_t;
#(
  parameter int unsigned PATHS       = 16,
  parameter int unsigned PATH_STAGES = 1,
  parameter int unsigned SEQ_STAGES  = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // 400 MHz class: parallel engine
  input  logic                       p_valid,
  input  smag2_t [PATHS-1:0]         p_sig,
  input  smag2_t [PATHS-1:0]         p_sine,
  input  logic   [PATHS-1:0]         p_code,
  input  logic                       p_dump,
  output logic                       p_block_last,
  output logic                       p_comb_en,
  output logic                       p_out_valid,
  output logic [gps_pkg::ACC_W-1:0]  p_out_sum,
  output logic                       p_overrun,
  // 40 MHz class: sequential engine with pipelined accumulator
  input  logic                       s_valid,
  input  smag2_t                     s_sig,
  input  smag2_t                     s_sine,
  input  logic                       s_code,
  input  logic                       s_dump,
  output logic                       s_out_valid,
  output logic [gps_pkg::ACC_W-1:0]  s_out_sum
);

  par_engine #(
    .PATHS      (PATHS),
    .PATH_W     (gps_pkg::PATH_W),
    .ACC_W      (gps_pkg::ACC_W),
    .PATH_STAGES(PATH_STAGES),
    .ACC_STAGES (1)
  ) u_par (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (p_valid),
    .sig       (p_sig),
    .sine      (p_sine),
    .code      (p_code),
    .dump      (p_dump),
    .block_last(p_block_last),
    .comb_en   (p_comb_en),
    .out_valid (p_out_valid),
    .out_sum   (p_out_sum),
    .overrun   (p_overrun)
  );

  corr_path #(.ACC_W(gps_pkg::ACC_W), .ACC_STAGES(SEQ_STAGES)) u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s_valid),
    .in_last  (s_dump),
    .sig      (s_sig),
    .sine     (s_sine),
    .code     (s_code),
    .out_valid(s_out_valid),
    .out_sum  (s_out_sum)
  );

endmodule
