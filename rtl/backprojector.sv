// backprojector -- produces one partial pixel per clock from a filtered
// projection.
//
// Backprojection smears each filtered projection Q_theta back across the
// image: pixel (x, y) receives Q_theta(x cos(theta) + y sin(theta)).  This
// unit scans all IMG_N x IMG_N pixels of one angle in raster order and emits
// the contribution of that angle to each, one pixel per clock cycle, as the
// source design does; the incremental address arithmetic, nearest-bin
// lookup and pipeline are this design's.
//
// Geometry: pixel (row r, column c) is at x = c - (IMG_N-1)/2 and
// y = (IMG_N-1)/2 - r (y points up, pixel spacing 1); detector bin k is at
// t = k - (N_DET-1)/2 (bin spacing 1).  theta = a * 180/NUM_ANGLES degrees
// for angle index a.  The detector position of the pixel is
//     t = TC + x cos(theta) + y sin(theta),   TC = (N_DET-1)/2,
// kept as a signed fixed-point number with TRIG_FRAC fraction bits.  It is
// not multiplied out: at the start of an angle it is set to
//     T0 = TC*2^F + floor((IMG_N-1) * (S - C) / 2)
// (C, S: cos and sin from trig_lut), then C is added for each step right
// and S subtracted for each step down, which is exact integer arithmetic.
// The pixel takes the nearest bin, floor(t + 1/2); a bin outside
// 0 .. N_DET-1 contributes 0.
//
// Interface and timing: the unit waits until the ping-pong buffer has a
// full bank (rd_ready), scans it, and releases it with the last read.  If
// the other bank is already full then (rd_next_ready), the next angle
// starts in the following cycle: during the last pixel of an angle the
// cos/sin table is already addressed with the next angle and its start
// position loaded.  A frame therefore takes NUM_ANGLES * IMG_N^2 cycles
// when the filter keeps up, the count the source design gives.  A partial
// pixel appears on pp_* two cycles after its bin address is issued:
// pp_addr = r*IMG_N + c, pp_data = filtered sample, pp_first / pp_last mark
// the first and last angle of a frame; frame_done is high with the last
// partial pixel of a frame.  After the last angle the angle index wraps to 0
// and the next frame begins, but a frame (angle 0) is only started while
// run is high, so that a host can read the finished image first; with run
// tied high frames follow each other.  There is no back-pressure on pp_*.
module backprojector
#(
  parameter int IMG_N      = fbp_pkg::IMG_N,
  parameter int N_DET      = fbp_pkg::N_DET,
  parameter int NUM_ANGLES = fbp_pkg::NUM_ANGLES,
  parameter int FILT_W     = fbp_pkg::FILT_W,
  parameter int TRIG_W     = fbp_pkg::TRIG_W,
  parameter int TRIG_FRAC  = fbp_pkg::TRIG_FRAC,
  localparam int DAW       = $clog2(N_DET),
  localparam int PAW       = $clog2(IMG_N * IMG_N),
  localparam int ANW       = $clog2(NUM_ANGLES)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  // ping-pong buffer read port
  input  logic                     rd_ready,
  output logic [DAW-1:0]           rd_addr,
  input  logic signed [FILT_W-1:0] rd_data,
  output logic                     rd_release,
  input  logic                     rd_next_ready,
  // partial pixel stream
  output logic                     pp_valid,
  output logic [PAW-1:0]           pp_addr,
  output logic signed [FILT_W-1:0] pp_data,
  output logic                     pp_first,
  output logic                     pp_last,
  output logic                     frame_done,
  // status
  output logic [ANW-1:0]           angle,
  output logic                     busy
);

  localparam int NW  = $clog2(IMG_N);
  localparam int TW  = TRIG_FRAC + $clog2(N_DET + 2 * IMG_N) + 3;  // position width
  localparam logic signed [TW-1:0] TC_FX   = TW'((N_DET - 1)) <<< (TRIG_FRAC - 1);
  localparam logic signed [TW-1:0] HALF_FX = TW'(1) <<< (TRIG_FRAC - 1);

  logic signed [TRIG_W-1:0] cos_q, sin_q;

  logic [ANW-1:0] next_angle, lut_angle;

  trig_lut #(.NUM_ANGLES(NUM_ANGLES), .TRIG_W(TRIG_W), .TRIG_FRAC(TRIG_FRAC)) u_trig (
    .angle(lut_angle), .cos_q, .sin_q
  );

  typedef enum logic {WAIT, SCAN} state_t;
  state_t state;

  logic [NW-1:0]         col, row;
  logic [PAW-1:0]        pix;
  logic signed [TW-1:0]  t_pos, t_row;
  logic signed [TW-1:0]  t_start;
  logic signed [TW-1:0]  bin;
  logic                  in_range, last_col, last_pix, last_angle;

  // T0 = TC*2^F + floor((IMG_N-1)*(S-C)/2); TC_FX already holds TC*2^F.
  assign t_start    = TC_FX + ((TW'(IMG_N - 1) * (TW'(sin_q) - TW'(cos_q))) >>> 1);
  assign bin        = (t_pos + HALF_FX) >>> TRIG_FRAC;
  assign in_range   = (bin >= 0) && (bin < TW'(N_DET));
  assign last_col   = (col == NW'(IMG_N - 1));
  assign last_pix   = last_col && (row == NW'(IMG_N - 1));
  assign last_angle = (angle == ANW'(NUM_ANGLES - 1));
  assign next_angle = last_angle ? '0 : angle + 1'b1;
  // on the last pixel the steps are no longer needed: look up the next angle
  assign lut_angle  = (state == SCAN && last_pix) ? next_angle : angle;

  assign rd_addr    = in_range ? DAW'(bin) : '0;
  assign rd_release = (state == SCAN) && last_pix;
  assign busy       = (state == SCAN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= WAIT;
      angle <= '0;
      col   <= '0;
      row   <= '0;
      pix   <= '0;
      t_pos <= '0;
      t_row <= '0;
    end else begin
      case (state)
        WAIT: if (rd_ready && (run || angle != '0)) begin
          t_pos <= t_start;
          t_row <= t_start;
          col   <= '0;
          row   <= '0;
          pix   <= '0;
          state <= SCAN;
        end
        SCAN: begin
          pix <= pix + 1'b1;
          if (last_col) begin
            col   <= '0;
            row   <= row + 1'b1;
            t_row <= t_row - TW'(sin_q);
            t_pos <= t_row - TW'(sin_q);
          end else begin
            col   <= col + 1'b1;
            t_pos <= t_pos + TW'(cos_q);
          end
          if (last_pix) begin
            angle <= next_angle;
            if (rd_next_ready && (run || next_angle != '0)) begin
              // next bank already filtered: continue without a gap
              t_pos <= t_start;
              t_row <= t_start;
              col   <= '0;
              row   <= '0;
              pix   <= '0;
            end else begin
              state <= WAIT;
            end
          end
        end
        default: state <= WAIT;
      endcase
    end
  end

  // ---- pipeline: bin address -> buffer read -> partial pixel ----------
  logic           p_valid, p_in_range, p_first, p_last, p_end;
  logic [PAW-1:0] p_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid    <= 1'b0;
      pp_valid   <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      p_valid    <= (state == SCAN);
      pp_valid   <= p_valid;
      frame_done <= p_valid && p_end;
    end
  end

  always_ff @(posedge clk) begin
    p_in_range <= in_range;
    p_addr     <= pix;
    p_first    <= (angle == '0);
    p_last     <= last_angle;
    p_end      <= last_angle && last_pix;
    pp_addr    <= p_addr;
    pp_data    <= p_in_range ? rd_data : '0;
    pp_first   <= p_first;
    pp_last    <= p_last;
  end

endmodule
