// image_accumulator -- frame memory that sums the partial pixels of all
// angles.
//
// The backprojector delivers, for one angle at a time, the contribution of
// that angle to every pixel.  The reconstructed image is the sum of these
// contributions over all angles; this block keeps that running sum, one
// word per pixel, and lets the host read the finished image.  Adding each
// angle's contribution to that of the previous ones until the last angle
// follows the source design; the memory organisation, the clear-on-first-
// angle rule and the read port are this design's.
//
// How it works: a read-modify-write pipeline.  In the cycle a partial pixel
// arrives, its pixel word is read (synchronous memory read); in the next
// cycle the sum is written back.  For the first angle of a frame (pp_first)
// the old word is ignored, so no separate clearing pass is needed between
// frames.  If a partial pixel addresses the word being written in the same
// cycle, the written value is forwarded, so any pixel order is summed
// correctly.  The sum is not saturated: ACC_W must be at least FILT_W +
// ceil(log2(NUM_ANGLES)) bits (26 for the defaults) so it cannot overflow.
//
// Interface and timing: one partial pixel per cycle is accepted on pp_*,
// with no back-pressure.  img_rd_data shows the word at img_rd_addr one
// cycle after the address, but only in cycles after one without pp_valid:
// the host reads the image between frames.
module image_accumulator
#(
  parameter int IMG_N  = fbp_pkg::IMG_N,
  parameter int FILT_W = fbp_pkg::FILT_W,
  parameter int ACC_W  = fbp_pkg::ACC_W,
  localparam int PAW   = $clog2(IMG_N * IMG_N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // partial pixel stream
  input  logic                     pp_valid,
  input  logic [PAW-1:0]           pp_addr,
  input  logic signed [FILT_W-1:0] pp_data,
  input  logic                     pp_first,
  // image read port
  input  logic [PAW-1:0]           img_rd_addr,
  output logic signed [ACC_W-1:0]  img_rd_data
);

  localparam int WORDS = IMG_N * IMG_N;

  logic signed [ACC_W-1:0] mem [WORDS];

  logic                    s_valid, s_first, s_fwd;
  logic [PAW-1:0]          s_addr;
  logic signed [FILT_W-1:0] s_data;
  logic signed [ACC_W-1:0] rd_q, last_sum, base, sum;

  // stage 0: read the pixel word (the host address when idle)
  always_ff @(posedge clk) begin
    rd_q <= mem[pp_valid ? pp_addr : img_rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_valid <= 1'b0;
    else        s_valid <= pp_valid;
  end

  always_ff @(posedge clk) begin
    s_addr  <= pp_addr;
    s_data  <= pp_data;
    s_first <= pp_first;
    s_fwd   <= s_valid && pp_valid && (s_addr == pp_addr);
  end

  // stage 1: add and write back
  always_comb begin
    base = s_fwd ? last_sum : rd_q;
    sum  = (s_first ? '0 : base) + ACC_W'(s_data);
  end

  always_ff @(posedge clk) begin
    if (s_valid) begin
      mem[s_addr] <= sum;
      last_sum    <= sum;
    end
  end

  assign img_rd_data = rd_q;

endmodule
