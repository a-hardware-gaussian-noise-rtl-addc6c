// gng_pkg: widths, fixed-point formats and coefficient record types shared by
// the Box-Muller Gaussian noise generator.
//
// Number formats (all fixed point):
//   u1   : 32-bit unsigned fraction, u1 = U1 / 2^32            (width from the design)
//   u2   : 18-bit unsigned fraction; 2 MSBs = quadrant, 16 LSBs = position
//   f    : f(u1) = sqrt(-ln u1), unsigned, 3 integer + 29 fraction bits
//   g    : sin / cos without the sqrt(2) factor, signed, 2 integer + 16 fraction bits
//   x    : product f*g, signed, 5 integer + 20 fraction bits
//   out  : sum of two products, signed, 5 integer + 11 fraction bits, unit variance
// The u1/u2 widths, the 60-bit LFSR length, the 59/21 segment counts and the
// coefficient field widths follow the design; the f, g, x and out formats are
// this implementation's choice.
package gng_pkg;

  localparam int unsigned LFSR_W = 60;  // LFSR length (period 2^60 - 1)
  localparam int unsigned U1_W   = 32;  // bits of u1
  localparam int unsigned U2_W   = 18;  // bits of u2
  localparam int unsigned GX_W   = 16;  // position bits of u2 within a quadrant

  localparam int unsigned F_LO   = 30;  // f segments below 1/2
  localparam int unsigned F_HI   = 29;  // f segments at or above 1/2
  localparam int unsigned F_SEGS = F_LO + F_HI;  // linear segments for f (59)
  localparam int unsigned G_SEGS = 21;  // linear segments for g (one quarter period)

  localparam int unsigned F_W    = 32;  // f output width
  localparam int unsigned F_FRAC = 29;
  localparam int unsigned G_W    = 18;  // g output width
  localparam int unsigned G_FRAC = 16;
  localparam int unsigned X_W    = 25;  // product width
  localparam int unsigned X_FRAC = 20;
  localparam int unsigned OUT_W  = 16;  // noise sample width
  localparam int unsigned OUT_FRAC = 11;

  // Latencies in enabled clock cycles.
  localparam int unsigned EVAL_LAT = 3; // u -> f, g1, g2

  // f coefficient record (48 bits):
  //   f(u) = c * 2^(sc-40) - m * 2^(sm-5) * u
  typedef struct packed {
    logic [5:0]  m;   // gradient magnitude
    logic [4:0]  sm;  // gradient scale
    logic [31:0] c;   // y-intercept
    logic [4:0]  sc;  // y-intercept scale
  } f_coeff_t;

  // g coefficient record (32 bits), s(x) = sin(pi/2 * x), x in [0,1]:
  //   s(x) = m * 2^-(sm+7) * x + c * 2^-(14+sc),  c signed
  typedef struct packed {
    logic [7:0]         m;
    logic [3:0]         sm;
    logic signed [15:0] c;
    logic [3:0]         sc;
  } g_coeff_t;

  localparam int unsigned F_AW = $clog2(F_SEGS);
  localparam int unsigned G_AW = $clog2(G_SEGS);

endpackage
