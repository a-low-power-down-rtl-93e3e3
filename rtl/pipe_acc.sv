// pipe_acc: integrate-and-dump accumulator with an optional carry pipeline.
//
// Function: adds a stream of signed IN_W-bit samples into a WIDTH-bit
// two's-complement sum.  The sample flagged in_last closes an integration:
// its total appears on out_sum with a one-cycle out_valid pulse, and the next
// valid sample starts a new sum from zero.
//
// Structure: the WIDTH-bit register is cut into STAGES slices of
// CW = ceil(WIDTH/STAGES) bits (the top slice takes the remainder).  Slice 0
// adds the sign-extended sample; its carry-out and the sample's sign bit are
// registered and handed to slice 1 one cycle later, where the sign bit is
// widened to the slice width and added together with the carry; and so on up
// the chain.  This is the multi-stage pipelined accumulator of the original design
// (drawn there for 16 bits as two 8-bit adders, the upper one fed with the
// registered carry and a "1 bit to 8 bits extension" of the MSB), so each
// adder is only CW bits long.  STAGES = 1 gives the plain single adder.
// Because the slices finish one cycle apart, each finished slice value rides
// up the pipeline with the carry, and the "16-bit output" register takes all
// slices of an integration together from the top slice.
//
// Timing: one sample per cycle.  If clock edge t takes the in_last sample,
// out_valid and out_sum are set by edge t + STAGES - 1, i.e. the result is
// readable STAGES - 1 cycles later than with a plain single-cycle adder.  The reset value and the first/last handshake are this
// design's choice; the original description does not say how a sum is cleared.
// When the sample is wider than a slice (e.g. the 16-bit path sums entering
// a 2-slice 22-bit accumulator) its upper bits are carried up with the carry
// and added in the slices they belong to; slices wholly above the sample
// width add the widened sign bit, as in the drawn version.
module pipe_acc #(
  parameter int unsigned IN_W   = 6,
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned STAGES = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_last,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic [WIDTH-1:0]        out_sum
);

  localparam int unsigned CW = (WIDTH + STAGES - 1) / STAGES;

  // Control and carry handed from one slice to the next.
  typedef struct packed {
    logic valid;
    logic first;   // slice starts a new sum
    logic last;    // slice closes the sum
    logic cin;     // carry from the slice below
    logic sign;    // sign bit of the sample
    logic [WIDTH-1:0] x;    // sign-extended sample
    logic [WIDTH-1:0] res;  // final values of the slices below
  } hop_t;

  logic first_pend;   // next valid sample starts a new integration

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        first_pend <= 1'b1;
    else if (in_valid) first_pend <= in_last;

  for (genvar k = 0; k < STAGES; k++) begin : g_slice
    localparam int unsigned LO = k * CW;
    localparam int unsigned HI = ((k + 1) * CW < WIDTH) ? (k + 1) * CW - 1 : WIDTH - 1;
    localparam int unsigned SW = HI - LO + 1;

    hop_t          hin;    // what this slice works on this cycle
    logic [SW-1:0] acc;
    logic [SW-1:0] addend;
    logic [SW:0]   sum;

    if (k == 0) begin : g_in
      logic signed [WIDTH-1:0] ext;
      assign ext = WIDTH'(in_data);   // sign extension
      assign hin = '{valid: in_valid, first: first_pend, last: in_last,
                     cin: 1'b0, sign: in_data[IN_W-1], x: ext, res: '0};
      assign addend = ext[HI:LO];
    end else begin : g_hop
      assign hin = g_slice[k-1].g_fwd.hout;
      if (LO >= IN_W) begin : g_sign
        assign addend = {SW{hin.sign}};  // 1 bit to SW bits extension
      end else begin : g_part
        assign addend = hin.x[HI:LO];    // sample wider than slice 0
      end
    end

    assign sum = (hin.first ? (SW+1)'(0) : {1'b0, acc}) + {1'b0, addend} + (SW+1)'(hin.cin);

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)         acc <= '0;
      else if (hin.valid) acc <= sum[SW-1:0];

    // This slice's new value merged into the result travelling upward.
    logic [WIDTH-1:0] res_next;
    always_comb begin
      res_next        = hin.res;
      res_next[HI:LO] = sum[SW-1:0];
    end

    if (k < STAGES - 1) begin : g_fwd
      // Registered hand-over to the next slice (carry, sign, control and
      // the finished lower slices, which stay aligned with the sample).
      hop_t hout;
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) hout <= '0;
        else        hout <= '{valid: hin.valid, first: hin.first, last: hin.last,
                              cin: sum[SW], sign: hin.sign, x: hin.x,
                              res: res_next};
    end else begin : g_out
      // Output register: all slices of one integration, written at once.
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) begin
          out_sum   <= '0;
          out_valid <= 1'b0;
        end else begin
          out_valid <= hin.valid && hin.last;
          if (hin.valid && hin.last) out_sum <= res_next;
        end
    end
  end

endmodule
