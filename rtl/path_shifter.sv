// path_shifter: parallel-in, serial-out register that hands the per-path sums
// of the parallel engine to the second-stage accumulator one at a time.
//
// On load it takes all N words at once (din[i] into position i); position 0
// is the LSB end, whose word is presented on out_word.  Every following cycle
// the contents move one position toward the LSB end until all N words have
// left, so N cycles after a load the shifter is empty again.  The load may
// coincide with the cycle that presents the last word of the previous load.
// A load while more than one word is still waiting would lose data: it is
// flagged on the sticky overrun output and by an assertion.  tag_in is stored
// with a load and returned on out_last with the final word of that load; the
// parallel engine uses it to mark the end of an integration.  The shifting
// direction (MSB toward LSB, output at the LSB end) follows the original drawing of
// the parallel engine; counting, the tag and the overrun flag are this
// design's additions.
//
// Interface: load/din/tag_in in; out_valid/out_word/out_last out, registered.
module path_shifter #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic                 tag_in,
  input  logic [N-1:0][W-1:0]  din,
  output logic                 out_valid,
  output logic [W-1:0]         out_word,
  output logic                 out_last,
  output logic                 overrun
);

  localparam int unsigned CNT_W = $clog2(N + 1);

  logic [N-1:0][W-1:0] sreg;
  logic [CNT_W-1:0]    cnt;     // words still to be presented
  logic                tag_q;

  assign out_valid = (cnt != '0);
  assign out_word  = sreg[0];
  assign out_last  = tag_q && (cnt == CNT_W'(1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sreg    <= '0;
      cnt     <= '0;
      tag_q   <= 1'b0;
      overrun <= 1'b0;
    end else if (load) begin
      sreg    <= din;
      cnt     <= CNT_W'(N);
      tag_q   <= tag_in;
      if (cnt > CNT_W'(1)) overrun <= 1'b1;
    end else if (cnt != '0) begin
      for (int i = 0; i < int'(N) - 1; i++) sreg[i] <= sreg[i+1];
      sreg[N-1] <= '0;
      cnt     <= cnt - 1'b1;
    end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) load |-> cnt <= CNT_W'(1))
    else $error("path_shifter: load while %0d words still waiting", cnt);

endmodule
