// trig_lut -- cosine / sine look-up table of the projection angles.
//
// Backprojection needs cos(theta) and sin(theta) of every projection angle
// theta to find where a pixel falls on the detector.  They are kept in a
// small read-only table rather than computed, in line with the source
// design's use of look-up tables; the table contents, fixed-point format
// and read timing are this design's.
//
// How it works: the table holds NUM_ANGLES entries, entry a being
// theta = a * 180/NUM_ANGLES degrees.  Both values are signed fixed point
// with TRIG_FRAC fraction bits, rounded to nearest; they are computed at
// elaboration time by fbp_pkg::trig_cos / trig_sin, so no data file is
// needed.  An angle index beyond the table reads as angle 0.
//
// Interface and timing: purely combinational; cos_q and sin_q follow angle
// in the same cycle.
module trig_lut
#(
  parameter int NUM_ANGLES = fbp_pkg::NUM_ANGLES,
  parameter int TRIG_W     = fbp_pkg::TRIG_W,
  parameter int TRIG_FRAC  = fbp_pkg::TRIG_FRAC,
  localparam int AW        = $clog2(NUM_ANGLES)
) (
  input  logic        [AW-1:0]     angle,
  output logic signed [TRIG_W-1:0] cos_q,
  output logic signed [TRIG_W-1:0] sin_q
);

  typedef logic signed [TRIG_W-1:0] trig_t;
  typedef trig_t tab_t [NUM_ANGLES];

  function automatic tab_t make_cos();
    tab_t t;
    for (int a = 0; a < NUM_ANGLES; a++) t[a] = trig_t'(fbp_pkg::trig_cos(a, NUM_ANGLES, TRIG_FRAC));
    return t;
  endfunction

  function automatic tab_t make_sin();
    tab_t t;
    for (int a = 0; a < NUM_ANGLES; a++) t[a] = trig_t'(fbp_pkg::trig_sin(a, NUM_ANGLES, TRIG_FRAC));
    return t;
  endfunction

  localparam tab_t COS_TAB = make_cos();
  localparam tab_t SIN_TAB = make_sin();

  always_comb begin
    if (32'(angle) < NUM_ANGLES) begin
      cos_q = COS_TAB[angle];
      sin_q = SIN_TAB[angle];
    end else begin
      cos_q = COS_TAB[0];
      sin_q = SIN_TAB[0];
    end
  end

endmodule
