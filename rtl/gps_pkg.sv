// gps_pkg: widths and sample types shared by the down-conversion and
// correlation engine.
//
// The IF sample and the local sine wave are 2-bit codes, the Gold code is one
// bit per sample, the product of sample and sine is a 6-bit two's-complement
// number and the integrated result is 22 bits wide; these widths follow the
// original engine description.  The parallel engine keeps 16-bit partial sums
// in each path.  The 2-bit code itself (sign and magnitude, values +-1 and
// +-3) is this design's choice, since the interpretation of the two bits is
// not stated.
package gps_pkg;

  localparam int unsigned PROD_W   = 6;   // mapper output
  localparam int unsigned ACC_W    = 22;  // final accumulator
  localparam int unsigned PATH_W   = 16;  // per-path accumulator (parallel engine)

  // 2-bit sign/magnitude code: bit 1 = sign (1 = negative), bit 0 = magnitude
  // (0 = 1, 1 = 3).
  typedef struct packed {
    logic neg;
    logic big;
  } smag2_t;

  typedef logic signed [PROD_W-1:0] prod_t;

  // Value of a 2-bit sign/magnitude code as a small signed integer.
  function automatic int smag2_value(smag2_t c);
    int m;
    m = c.big ? 3 : 1;
    return c.neg ? -m : m;
  endfunction

endpackage
