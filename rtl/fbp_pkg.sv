// fbp_pkg -- shared constants and constant functions of the filtered
// backprojection (FBP) engine.
//
// Holds the default sizes of the engine and the two constant tables it
// needs, both computed at elaboration time from their formulas so that no
// data file is involved:
//   * ramp_coef(n): tap n (offset from the centre tap) of the spatial-domain
//     ramp filter.  The ramp |w|, band limited to the detector sampling
//     rate, has the impulse response h(0) = 1/4, h(n) = 0 for even n and
//     h(n) = -1/(pi^2 n^2) for odd n (detector spacing 1).  Coefficients are
//     signed fixed point with COEF_FRAC fraction bits, rounded to nearest.
//   * trig_cos(a) / trig_sin(a): cos and sin of projection angle
//     a * 180/NUM_ANGLES degrees, signed fixed point with TRIG_FRAC fraction
//     bits, rounded to nearest.
// The 121-tap symmetric filter and the 180-degree parallel-beam scan follow
// the source design; word widths, the fixed-point formats and the image and
// detector sizes (256 x 256 image, 367 detector bins, the sizes a 256 x 256
// phantom and its 1-degree radon transform have) are this design's choices.
package fbp_pkg;

  // ---- default sizes --------------------------------------------------
  localparam int IMG_N      = 256;  // image is IMG_N x IMG_N pixels
  localparam int N_DET      = 367;  // detector bins per projection
  localparam int NUM_ANGLES = 180;  // projections over 180 degrees
  localparam int TAPS       = 121;  // ramp FIR length (odd, symmetric)

  // ---- word formats ---------------------------------------------------
  localparam int SAMPLE_W  = 16;    // sinogram sample, signed integer
  localparam int COEF_W    = 18;    // FIR coefficient, signed
  localparam int COEF_FRAC = 17;    // fraction bits of a coefficient
  localparam int FILT_W    = 18;    // filtered sample, signed, saturated
  localparam int TRIG_W    = 18;    // cos / sin, signed
  localparam int TRIG_FRAC = 16;    // fraction bits of cos / sin
  localparam int ACC_W     = 26;    // accumulated pixel, signed

  localparam real PI = 3.14159265358979323846;

  // Round a real to the nearest integer (halves away from zero).
  function automatic longint round_real(real x);
    return (x >= 0.0) ? longint'($rtoi(x + 0.5)) : -longint'($rtoi(-x + 0.5));
  endfunction

  // Ramp filter tap at offset n from the centre (n may be negative).
  function automatic longint ramp_coef(int n, int frac);
    real h;
    int  m;
    m = (n < 0) ? -n : n;
    if (m == 0)          h = 0.25;
    else if (m % 2 == 0) h = 0.0;
    else                 h = -1.0 / (PI * PI * real'(m) * real'(m));
    return round_real(h * real'(64'(1) << frac));
  endfunction

  // cos / sin of projection angle index a out of n_angles over 180 degrees.
  function automatic longint trig_cos(int a, int n_angles, int frac);
    return round_real($cos(PI * real'(a) / real'(n_angles)) * real'(64'(1) << frac));
  endfunction

  function automatic longint trig_sin(int a, int n_angles, int frac);
    return round_real($sin(PI * real'(a) / real'(n_angles)) * real'(64'(1) << frac));
  endfunction

endpackage
