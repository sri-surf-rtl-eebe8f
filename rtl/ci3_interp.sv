// ci3_interp: the interpolator of the scaled-RAM interpolator. A sample at a
// non-integer position of the scaled grid gets its Haar pair by bilinear
// interpolation of the four pre-computed pairs around it, instead of being
// rounded to the nearest integer position. fx and fy are the 16-bit
// fractional parts of the sample position; the result keeps 8 fractional bits.
// v = a + (b-a)fx  (top edge), w = c + (d-c)fx (bottom edge), out = v + (w-v)fy,
// computed exactly with 16-bit weights and truncated (floor) once at the end.
// Purely combinational. Bilinear interpolation of pre-computed wavelets with
// a 16-bit fraction follows the design; the rounding is this implementation's.
module ci3_interp
  import surf_pkg::*;
(
  input  haar_t                    q [4],  // (X,Y) (X+1,Y) (X,Y+1) (X+1,Y+1)
  input  logic [FRAC-1:0]          fx,
  input  logic [FRAC-1:0]          fy,
  output logic signed [IVAL_W-1:0] dx,
  output logic signed [IVAL_W-1:0] dy
);
  function automatic logic signed [IVAL_W-1:0] bilin(
      input logic signed [HAAR_W-1:0] a, b, c, d,
      input logic [FRAC-1:0] wx, wy);
    logic signed [63:0] top, bot, v;
    top = (64'(a) <<< FRAC) + (64'(b) - 64'(a)) * $signed({48'd0, wx});
    bot = (64'(c) <<< FRAC) + (64'(d) - 64'(c)) * $signed({48'd0, wx});
    v   = (top <<< FRAC) + (bot - top) * $signed({48'd0, wy});
    return IVAL_W'(v >>> (2 * FRAC - 8));
  endfunction

  assign dx = bilin(q[0].dx, q[1].dx, q[2].dx, q[3].dx, fx, fy);
  assign dy = bilin(q[0].dy, q[1].dy, q[2].dy, q[3].dy, fx, fy);
endmodule
