// gold_wipeoff: Gold code removal (despreading multiplier).
//
// The 6-bit down-converted sample goes straight to one mux input and through a
// two's-complement negation to the other; the 1-bit Gold code selects between
// them.  Multiplying by a +-1 chip this way is the structure given in the
// text.  Which code value selects the negated input is not stated: here a
// code bit of 1 stands for chip value -1 and selects the negation, the usual
// 0 -> +1, 1 -> -1 mapping.  The product range of the mapper (+-9) keeps the
// negation free of overflow.
//
// Interface: din, code in; dout out, same cycle (no clock).
module gold_wipeoff
  import gps_pkg::*;
(
  input  prod_t din,
  input  logic  code,
  output prod_t dout
);

  prod_t neg;

  always_comb begin
    neg  = prod_t'(~din + 1'b1);   // 2's complement
    dout = code ? neg : din;       // mux selected by the Gold code
  end

endmodule
