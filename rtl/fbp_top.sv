// fbp_top -- filtered backprojection engine for parallel-beam CT.
//
// Reconstructs an IMG_N x IMG_N slice image from a sinogram of NUM_ANGLES
// parallel-beam projections over 180 degrees, N_DET detector bins each:
//     f(x, y) = sum over theta of Q_theta(x cos(theta) + y sin(theta)),
// where Q_theta is projection theta convolved with a ramp filter.
//
// Structure (source design): a filtering subsystem applies a 121-tap
// symmetric FIR ramp filter to each projection and writes the result into
// one bank of a two-bank (ping-pong) buffer, while the backprojector reads
// the previous angle's filtered projection from the other bank and produces
// one partial pixel per clock cycle; the partial pixels of successive angles
// are summed into the image.  Chosen here: the sizes and word widths (see
// fbp_pkg), nearest-bin lookup, cos/sin table, the on-chip image
// accumulator, and the handshakes.
//
//   s_* --> filter_subsystem (ramp_fir) --> pingpong_buffer
//                                               |
//          trig_lut --> backprojector <---------+
//                           |
//                           +--> pp_* (partial pixels, also output)
//                           +--> image_accumulator --> img_rd_*
//
// Interface: the sinogram enters on a valid/ready stream, N_DET samples
// per angle in detector order, angles in order 0 .. NUM_ANGLES-1, with no
// framing signal.  Backprojection of a frame starts only while run is high
// (the filter may already work ahead).  frame_done pulses once the last
// angle's partial pixels are out; with run low the summed image can then be
// read on img_rd_* (address r*IMG_N+c, data one cycle later) before run is
// raised for the next frame.  With run tied high frames follow each other
// and the partial-pixel stream pp_* is the output.
//
// Timing: the backprojector needs IMG_N^2 cycles per angle and the filter
// N_DET + 65, so the filter always finishes first and the input is
// back-pressured; a frame takes NUM_ANGLES * IMG_N^2 cycles (the source
// design's count) plus, when the first projection is not yet filtered, its
// filtering (about N_DET + 70 cycles), and a 3-cycle pipeline tail.  Values: the image word is the plain sum over angles; the
// factor pi/NUM_ANGLES of the discrete integral is left to the host.
module fbp_top
#(
  parameter int IMG_N      = fbp_pkg::IMG_N,
  parameter int N_DET      = fbp_pkg::N_DET,
  parameter int NUM_ANGLES = fbp_pkg::NUM_ANGLES,
  parameter int TAPS       = fbp_pkg::TAPS,
  parameter int SAMPLE_W   = fbp_pkg::SAMPLE_W,
  parameter int COEF_W     = fbp_pkg::COEF_W,
  parameter int COEF_FRAC  = fbp_pkg::COEF_FRAC,
  parameter int FILT_W     = fbp_pkg::FILT_W,
  parameter int TRIG_W     = fbp_pkg::TRIG_W,
  parameter int TRIG_FRAC  = fbp_pkg::TRIG_FRAC,
  parameter int ACC_W      = fbp_pkg::ACC_W,
  localparam int DAW       = $clog2(N_DET),
  localparam int PAW       = $clog2(IMG_N * IMG_N),
  localparam int ANW       = $clog2(NUM_ANGLES)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       run,
  // sinogram input
  input  logic                       s_valid,
  output logic                       s_ready,
  input  logic signed [SAMPLE_W-1:0] s_data,
  // partial pixel stream (contribution of one angle to one pixel)
  output logic                       pp_valid,
  output logic [PAW-1:0]             pp_addr,
  output logic signed [FILT_W-1:0]   pp_data,
  output logic                       pp_first,
  output logic                       pp_last,
  output logic                       frame_done,
  // reconstructed image read port
  input  logic [PAW-1:0]             img_rd_addr,
  output logic signed [ACC_W-1:0]    img_rd_data,
  // status
  output logic [ANW-1:0]             angle,
  output logic                       filter_busy,
  output logic                       bp_busy,
  output logic                       wr_bank,
  output logic                       rd_bank
);

  initial begin
    assert (ACC_W >= FILT_W + $clog2(NUM_ANGLES))
      else $fatal(1, "fbp_top: ACC_W too narrow for NUM_ANGLES sums");
  end

  logic                     buf_wr_ready, buf_wr_en, buf_wr_commit;
  logic [DAW-1:0]           buf_wr_addr, buf_rd_addr;
  logic signed [FILT_W-1:0] buf_wr_data;
  logic [FILT_W-1:0]        buf_rd_data;
  logic                     buf_rd_ready, buf_rd_release, buf_rd_next_ready;

  filter_subsystem #(
    .N_DET(N_DET), .TAPS(TAPS), .SAMPLE_W(SAMPLE_W), .COEF_W(COEF_W),
    .COEF_FRAC(COEF_FRAC), .FILT_W(FILT_W)
  ) u_filter (
    .clk, .rst_n,
    .s_valid, .s_ready, .s_data,
    .buf_wr_ready, .buf_wr_en, .buf_wr_addr, .buf_wr_data, .buf_wr_commit,
    .busy(filter_busy)
  );

  pingpong_buffer #(.DEPTH(N_DET), .WIDTH(FILT_W)) u_buffer (
    .clk, .rst_n,
    .wr_ready  (buf_wr_ready),
    .wr_en     (buf_wr_en),
    .wr_addr   (buf_wr_addr),
    .wr_data   (buf_wr_data),
    .wr_commit (buf_wr_commit),
    .rd_ready  (buf_rd_ready),
    .rd_addr   (buf_rd_addr),
    .rd_data   (buf_rd_data),
    .rd_release(buf_rd_release),
    .rd_next_ready(buf_rd_next_ready),
    .wr_bank, .rd_bank
  );

  backprojector #(
    .IMG_N(IMG_N), .N_DET(N_DET), .NUM_ANGLES(NUM_ANGLES), .FILT_W(FILT_W),
    .TRIG_W(TRIG_W), .TRIG_FRAC(TRIG_FRAC)
  ) u_bp (
    .clk, .rst_n, .run,
    .rd_ready  (buf_rd_ready),
    .rd_addr   (buf_rd_addr),
    .rd_data   (signed'(buf_rd_data)),
    .rd_release(buf_rd_release),
    .rd_next_ready(buf_rd_next_ready),
    .pp_valid, .pp_addr, .pp_data, .pp_first, .pp_last, .frame_done,
    .angle,
    .busy(bp_busy)
  );

  image_accumulator #(.IMG_N(IMG_N), .FILT_W(FILT_W), .ACC_W(ACC_W)) u_acc (
    .clk, .rst_n,
    .pp_valid, .pp_addr, .pp_data, .pp_first,
    .img_rd_addr, .img_rd_data
  );

endmodule
