// surf_pkg: widths, number formats and shared types of the SRI-SURF feature
// extractor. Coordinates and interpolation weights carry a 16-bit fractional
// part, as the design specifies; the remaining widths are chosen so that a
// 1920x1080 8-bit image cannot overflow any accumulator.
package surf_pkg;
  localparam int PIX_W   = 8;    // grey-level pixel
  localparam int II_W    = 32;   // integral image word (1920*1080*255 < 2^31)
  localparam int HAAR_W  = 16;   // signed Haar response of a 2*s0 wavelet, s0 <= 5
  localparam int FRAC    = 16;   // fractional bits of coordinates and weights
  localparam int IVAL_W  = HAAR_W + 8;   // interpolated Haar value, 8 fractional bits
  localparam int ACC_W   = 48;   // orientation / descriptor accumulators
  localparam int NSCALE  = 4;    // scaled RAMs for s0 = 2, 3, 4, 5
  localparam int S0_MIN  = 2;
  localparam int DESC_N  = 64;   // 4x4 sub-regions x 4 sums
  localparam int DESC_W  = 16;   // normalised descriptor element, signed Q1.15

  // One pre-computed Haar pair as it is stored in a scaled RAM
  typedef struct packed {
    logic signed [HAAR_W-1:0] dx;
    logic signed [HAAR_W-1:0] dy;
  } haar_t;

  // A detected feature point: pixel position and box-filter size
  typedef struct packed {
    logic [11:0] x;
    logic [11:0] y;
    logic [7:0]  fsize;   // box-filter side L; scale s = 2L/15
  } fp_t;

  // Scale in Q16 for filter side L: s = 1.2 * L / 9
  function automatic logic [31:0] scale_q16(input logic [7:0] l);
    return (32'(l) * 32'd131072 + 32'd7) / 32'd15;
  endfunction

  // Rounded scale s0 = round(s), the scaled RAM a feature point is served from
  function automatic logic [2:0] scale_s0(input logic [7:0] l);
    logic [31:0] s;
    s = scale_q16(l);
    return 3'((s + 32'd32768) >> 16);
  endfunction
endpackage
