// fbp_ref_pkg -- reference models shared by the end-to-end testbenches.
//
// * The modified Shepp-Logan head phantom (ten ellipses) and its analytic
//   parallel-beam projection, used to generate sinograms in the testbench
//   instead of reading a data file.  Phantom coordinates span [-1, 1]; the
//   caller scales them to pixels with radius R.
// * A bit-exact model of the engine: the centred 121-tap ramp convolution
//   (Ram-Lak taps) with the same fixed-point rounding, and the nearest-bin
//   backprojection with the detector position computed directly as
//   T0 + c*cos - r*sin for every pixel (the hardware accumulates it).
// Both are written independently of the RTL, from the formulas.
package fbp_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // ellipse: intensity, semi-axes A, B, centre x0, y0, rotation (degrees)
  typedef struct {
    real rho, a, b, x0, y0, phi;
  } ellipse_t;

  localparam int N_ELL = 10;

  function automatic ellipse_t ell(int i);
    ellipse_t e;
    case (i)
      0: e = '{ 1.0, 0.69,   0.92,   0.0,   0.0,     0.0};
      1: e = '{-0.8, 0.6624, 0.8740, 0.0,  -0.0184,  0.0};
      2: e = '{-0.2, 0.1100, 0.3100, 0.22,  0.0,   -18.0};
      3: e = '{-0.2, 0.1600, 0.4100,-0.22,  0.0,    18.0};
      4: e = '{ 0.1, 0.2100, 0.2500, 0.0,   0.35,    0.0};
      5: e = '{ 0.1, 0.0460, 0.0460, 0.0,   0.1,     0.0};
      6: e = '{ 0.1, 0.0460, 0.0460, 0.0,  -0.1,     0.0};
      7: e = '{ 0.1, 0.0460, 0.0230,-0.08, -0.605,   0.0};
      8: e = '{ 0.1, 0.0230, 0.0230, 0.0,  -0.606,   0.0};
      default: e = '{ 0.1, 0.0230, 0.0460, 0.06, -0.605, 0.0};
    endcase
    return e;
  endfunction

  // phantom intensity at (x, y), phantom units
  function automatic real phantom_val(real x, real y);
    real v = 0.0;
    for (int i = 0; i < N_ELL; i++) begin
      ellipse_t e;
      real ph, dx, dy, u, w;
      e = ell(i);
      ph = e.phi * PI / 180.0;
      dx = x - e.x0; dy = y - e.y0;
      u = dx * $cos(ph) + dy * $sin(ph);
      w = -dx * $sin(ph) + dy * $cos(ph);
      if ((u * u) / (e.a * e.a) + (w * w) / (e.b * e.b) <= 1.0) v += e.rho;
    end
    return v;
  endfunction

  // line integral along the line x cos(th) + y sin(th) = t, phantom units
  function automatic real phantom_proj(real t, real th);
    real p = 0.0;
    for (int i = 0; i < N_ELL; i++) begin
      ellipse_t e;
      real ph, a2, s;
      e = ell(i);
      ph = e.phi * PI / 180.0;
      a2 = e.a * e.a * $cos(th - ph) ** 2 + e.b * e.b * $sin(th - ph) ** 2;
      s = t - (e.x0 * $cos(th) + e.y0 * $sin(th));
      if (s * s < a2) p += 2.0 * e.rho * e.a * e.b * $sqrt(a2 - s * s) / a2;
    end
    return p;
  endfunction

  function automatic longint rnd(real x);
    return (x >= 0.0) ? longint'($rtoi(x + 0.5)) : -longint'($rtoi(-x + 0.5));
  endfunction

  // ramp filter tap at offset n, scaled by 2^frac
  function automatic longint ramp_h(int n, int frac);
    real h;
    if (n == 0) h = 0.25;
    else if (n % 2 == 0) h = 0.0;
    else h = -1.0 / (PI * PI * real'(n) * real'(n));
    return rnd(h * real'(64'sd1 <<< frac));
  endfunction

  // centred ramp convolution of one projection, rounded and saturated
  function automatic void ref_filter(input longint proj [], input int taps, input int frac,
                                     input int out_w, output longint q []);
    int nd = proj.size();
    int half = (taps - 1) / 2;
    longint h [] = new[taps];
    longint mx = (64'sd1 <<< (out_w - 1)) - 1;
    for (int i = 0; i < taps; i++) h[i] = ramp_h(i - half, frac);
    q = new[nd];
    for (int k = 0; k < nd; k++) begin
      longint acc = 0;
      for (int j = k - half; j <= k + half; j++)
        if (j >= 0 && j < nd) acc += proj[j] * h[k - j + half];
      acc = (acc + (64'sd1 <<< (frac - 1))) >>> frac;
      q[k] = (acc > mx) ? mx : (acc < -mx - 1) ? -mx - 1 : acc;
    end
  endfunction

  // add the backprojection of filtered projection q at angle index a
  function automatic void ref_backproject(input longint q [], input int a, input int n_angles,
                                          input int img_n, input int tfrac,
                                          ref longint img [], output int n_outside);
    int nd = q.size();
    longint cq = rnd($cos(PI * a / n_angles) * real'(64'sd1 <<< tfrac));
    longint sq = rnd($sin(PI * a / n_angles) * real'(64'sd1 <<< tfrac));
    longint t0 = (longint'(nd - 1) <<< (tfrac - 1)) + ((longint'(img_n - 1) * (sq - cq)) >>> 1);
    n_outside = 0;
    for (int r = 0; r < img_n; r++)
      for (int c = 0; c < img_n; c++) begin
        longint t = t0 + longint'(c) * cq - longint'(r) * sq;
        longint bin = (t + (64'sd1 <<< (tfrac - 1))) >>> tfrac;
        if (bin >= 0 && bin < nd) img[r * img_n + c] += q[bin];
        else n_outside++;
      end
  endfunction

endpackage
