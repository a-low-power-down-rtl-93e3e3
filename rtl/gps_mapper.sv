// gps_mapper: the "4 bits to 6 bits mapper" that performs the down-conversion
// multiplication.
//
// The 2-bit IF sample and the 2-bit local sine value together form a 4-bit
// address; the mapper returns their product as a 6-bit two's-complement
// number.  It is a purely combinational 16-entry table.  Both 2-bit inputs use
// the sign/magnitude code of gps_pkg (values -3, -1, +1, +3), so the product
// is one of +-1, +-3, +-9.  Using a table instead of a multiplier, and the
// 4-in/6-out sizes, follow the original design; the code of the 2-bit values and hence
// the table contents are this design's choice.  With products of at most 9
// the top two output bits are always equal; the 6-bit width is kept as
// specified.
//
// Interface: sig, sine in; prod out, same cycle (no clock).
module gps_mapper
  import gps_pkg::*;
(
  input  smag2_t sig,
  input  smag2_t sine,
  output prod_t  prod
);

  always_comb begin
    unique case ({sig, sine})
      //            sig   sine        product
      4'b00_00: prod = 6'sd1;    //  +1 * +1
      4'b00_01: prod = 6'sd3;    //  +1 * +3
      4'b00_10: prod = -6'sd1;   //  +1 * -1
      4'b00_11: prod = -6'sd3;   //  +1 * -3
      4'b01_00: prod = 6'sd3;    //  +3 * +1
      4'b01_01: prod = 6'sd9;    //  +3 * +3
      4'b01_10: prod = -6'sd3;   //  +3 * -1
      4'b01_11: prod = -6'sd9;   //  +3 * -3
      4'b10_00: prod = -6'sd1;   //  -1 * +1
      4'b10_01: prod = -6'sd3;   //  -1 * +3
      4'b10_10: prod = 6'sd1;    //  -1 * -1
      4'b10_11: prod = 6'sd3;    //  -1 * -3
      4'b11_00: prod = -6'sd3;   //  -3 * +1
      4'b11_01: prod = -6'sd9;   //  -3 * +3
      4'b11_10: prod = 6'sd3;    //  -3 * -1
      default:  prod = 6'sd9;    //  -3 * -3
    endcase
  end

endmodule
