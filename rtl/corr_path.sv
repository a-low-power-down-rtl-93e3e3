// corr_path: the sequential down-conversion and correlation path.
//
// One sample per clock passes three pipeline stages, the three components of
// the sequential design: (1) the mapper multiplies the 2-bit IF sample by the
// 2-bit local sine wave, giving a 6-bit product; (2) the Gold code removal
// keeps or negates the product according to the 1-bit code; (3) the
// accumulator despreads by summing the products over an integration period
// into an ACC_W-bit result.  The accumulator can itself be pipelined
// (ACC_STAGES > 1), which is the original design's remedy for the accumulator being the
// slowest and most variation-sensitive stage at low supply voltage.
//
// Interface: in_valid qualifies sig/sine/code; in_last marks the final sample
// of an integration.  out_valid pulses for one cycle with the ACC_W-bit
// two's-complement sum on out_sum.  If clock edge e takes the in_last sample,
// out_valid is set by edge e + 1 + ACC_STAGES (two register stages, then the
// accumulator's own latency).
// The mapper and code-removal register stages, the widths 2/6 and the 22-bit
// default follow the original design; the integrate/dump handshake and the reset are
// this design's choice.
module corr_path
  import gps_pkg::smag2_t, gps_pkg::prod_t, gps_pkg::PROD_W;
#(
  parameter int unsigned ACC_W      = gps_pkg::ACC_W,
  parameter int unsigned ACC_STAGES = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_last,
  input  smag2_t           sig,
  input  smag2_t           sine,
  input  logic             code,
  output logic             out_valid,
  output logic [ACC_W-1:0] out_sum
);


  // Stage 1: down-conversion
  prod_t prod;
  prod_t prod_q;
  logic  code_q, v1_q, last1_q;

  gps_mapper u_map (.sig(sig), .sine(sine), .prod(prod));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      prod_q <= '0; code_q <= 1'b0; v1_q <= 1'b0; last1_q <= 1'b0;
    end else begin
      prod_q  <= prod;
      code_q  <= code;
      v1_q    <= in_valid;
      last1_q <= in_last;
    end

  // Stage 2: Gold code removal
  prod_t desp;
  prod_t desp_q;
  logic  v2_q, last2_q;

  gold_wipeoff u_wipe (.din(prod_q), .code(code_q), .dout(desp));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      desp_q <= '0; v2_q <= 1'b0; last2_q <= 1'b0;
    end else begin
      desp_q  <= desp;
      v2_q    <= v1_q;
      last2_q <= last1_q;
    end

  // Stage 3: despreading accumulator
  pipe_acc #(.IN_W(PROD_W), .WIDTH(ACC_W), .STAGES(ACC_STAGES)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v2_q),
    .in_last  (last2_q),
    .in_data  (desp_q),
    .out_valid(out_valid),
    .out_sum  (out_sum)
  );

endmodule
