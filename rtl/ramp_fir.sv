// ramp_fir -- symmetric FIR ramp filter for one projection.
//
// Filters a stream of sinogram samples with a TAPS-tap (default 121)
// spatial-domain ramp filter, the high-pass filter of filtered
// backprojection.  Applying it as an FIR in the spatial domain instead of
// multiplying by |w| after an FFT avoids an FFT/IFFT pair in hardware; the
// 121-tap symmetric FIR is the source design's, the coefficient formula
// (fbp_pkg::ramp_coef, the band-limited ramp of Ram and Lak) and the
// pipeline are this design's.
//
// How it works: a TAPS-long delay line holds the newest samples, dl[0]
// being the newest.  Because the taps are symmetric, samples dl[k] and
// dl[TAPS-1-k] share coefficient h(HALF-k) and are added before the
// multiply, so only HALF+1 multipliers are built (HALF = (TAPS-1)/2); the
// even-offset taps of the ramp are zero and fold away in synthesis.  The
// products are summed, rounded and shifted back by COEF_FRAC bits and
// saturated to FILT_W bits.
//
// Interface and timing: one sample is taken in each cycle in_valid is
// high.  The result for the window ending at that sample appears on
// out_data with out_valid exactly 3 cycles later (delay line, multiply,
// sum).  Output number m is the filter centred on input sample m-HALF, so a
// user that wants the centred ("same") convolution of an L-sample
// projection feeds the L samples followed by HALF zeros and keeps outputs
// HALF .. L+HALF-1.  clear empties the delay line (zero padding before the
// first sample of a projection); it takes effect on the next edge and may
// not coincide with in_valid.
module ramp_fir
#(
  parameter int TAPS      = fbp_pkg::TAPS,
  parameter int SAMPLE_W  = fbp_pkg::SAMPLE_W,
  parameter int COEF_W    = fbp_pkg::COEF_W,
  parameter int COEF_FRAC = fbp_pkg::COEF_FRAC,
  parameter int FILT_W    = fbp_pkg::FILT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] in_data,
  output logic                       out_valid,
  output logic signed [FILT_W-1:0]   out_data
);

  localparam int HALF   = (TAPS - 1) / 2;
  localparam int PRE_W  = SAMPLE_W + 1;
  localparam int PROD_W = PRE_W + COEF_W;
  localparam int SUM_W  = PROD_W + $clog2(HALF + 1);

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_tab_t [HALF+1];

  // coef_tab[d] = h(d), the tap at distance d from the centre.
  function automatic coef_tab_t make_coefs();
    coef_tab_t t;
    for (int d = 0; d <= HALF; d++) t[d] = coef_t'(fbp_pkg::ramp_coef(d, COEF_FRAC));
    return t;
  endfunction

  localparam coef_tab_t COEF = make_coefs();

  initial begin
    assert (TAPS % 2 == 1) else $fatal(1, "ramp_fir: TAPS must be odd");
  end

  // ---- stage 0: delay line -------------------------------------------
  logic signed [SAMPLE_W-1:0] dl [TAPS];
  logic                       v1, v2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) dl[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < TAPS; i++) dl[i] <= '0;
    end else if (in_valid) begin
      dl[0] <= in_data;
      for (int i = 1; i < TAPS; i++) dl[i] <= dl[i-1];
    end
  end

  // ---- stage 1: pre-add and multiply ---------------------------------
  logic signed [PROD_W-1:0] prod [HALF+1];

  always_ff @(posedge clk) begin
    if (v1) begin
      for (int k = 0; k < HALF; k++)
        prod[k] <= (PROD_W'(dl[k]) + PROD_W'(dl[TAPS-1-k])) * PROD_W'(COEF[HALF-k]);
      prod[HALF] <= PROD_W'(dl[HALF] * COEF[0]);
    end
  end

  // ---- stage 2: sum, round, saturate ---------------------------------
  logic signed [SUM_W-1:0] sum;
  logic signed [SUM_W-1:0] scaled;

  always_comb begin
    sum = '0;
    for (int k = 0; k <= HALF; k++) sum += SUM_W'(prod[k]);
    scaled = (sum + (SUM_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
  end

  localparam logic signed [SUM_W-1:0] FMAX = SUM_W'((64'(1) << (FILT_W - 1)) - 1);
  localparam logic signed [SUM_W-1:0] FMIN = -SUM_W'(64'(1) << (FILT_W - 1));

  always_ff @(posedge clk) begin
    if (v2) begin
      if (scaled > FMAX)      out_data <= FMAX[FILT_W-1:0];
      else if (scaled < FMIN) out_data <= FMIN[FILT_W-1:0];
      else                    out_data <= scaled[FILT_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid && !clear;
      v2        <= v1;
      out_valid <= v2;
    end
  end

endmodule
