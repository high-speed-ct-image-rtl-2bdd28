// filter_subsystem -- ramp-filters one projection per angle into the
// ping-pong buffer.
//
// This is the filtering half of filtered backprojection: each projection
// (the N_DET detector samples of one angle) is convolved with the ramp
// filter and the result is stored in a memory bank from which the
// backprojector later reads it.  That a filtering subsystem writes its
// output into the free bank of a two-bank buffer follows the source design;
// the sequencing below is this design's.
//
// How it works: when the buffer has a free bank (buf_wr_ready) the
// subsystem clears the FIR delay line (zero padding before the projection;
// the previous projection's trailing zeros would leave it clear as well,
// the explicit clear makes each projection independent of what came before),
// then accepts N_DET samples from the input stream, then feeds HALF =
// (TAPS-1)/2 zeros itself (zero padding after the projection).  Output m of
// the FIR is the filter centred on sample m-HALF, so outputs HALF ..
// N_DET+HALF-1 are the N_DET filtered samples; they are written to buffer
// addresses 0 .. N_DET-1, and the bank is committed together with the last
// one.  The filtered projection therefore has the same length and the same
// detector centre as the input ("same" convolution).
//
// Interface and timing: the input is a valid/ready stream; a sample moves
// when s_valid and s_ready are both high, in detector order, N_DET per
// angle, with no framing signal.  s_ready is low while no bank is free and
// while the filter is padding or draining.  One angle takes N_DET + HALF + 5
// cycles when the input never stalls.  The buffer write port is that of
// pingpong_buffer.
module filter_subsystem
#(
  parameter int N_DET     = fbp_pkg::N_DET,
  parameter int TAPS      = fbp_pkg::TAPS,
  parameter int SAMPLE_W  = fbp_pkg::SAMPLE_W,
  parameter int COEF_W    = fbp_pkg::COEF_W,
  parameter int COEF_FRAC = fbp_pkg::COEF_FRAC,
  parameter int FILT_W    = fbp_pkg::FILT_W,
  localparam int DAW      = $clog2(N_DET)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // sinogram input stream
  input  logic                       s_valid,
  output logic                       s_ready,
  input  logic signed [SAMPLE_W-1:0] s_data,
  // ping-pong buffer write port
  input  logic                       buf_wr_ready,
  output logic                       buf_wr_en,
  output logic [DAW-1:0]             buf_wr_addr,
  output logic signed [FILT_W-1:0]   buf_wr_data,
  output logic                       buf_wr_commit,
  // status
  output logic                       busy
);

  localparam int HALF = (TAPS - 1) / 2;
  localparam int TOTAL = N_DET + HALF;          // samples pushed per angle
  localparam int CW = $clog2(TOTAL + 1);

  typedef enum logic [1:0] {IDLE, CLEAR, FEED, DRAIN} state_t;
  state_t state;

  logic [CW-1:0] in_cnt;    // samples pushed into the FIR this angle
  logic [CW-1:0] out_cnt;   // FIR outputs seen this angle

  logic                       fir_clear, fir_in_valid, fir_out_valid;
  logic signed [SAMPLE_W-1:0] fir_in_data;
  logic signed [FILT_W-1:0]   fir_out_data;

  logic feeding_data, feeding_pad;
  assign feeding_data = (state == FEED) && (in_cnt < CW'(N_DET));
  assign feeding_pad  = (state == FEED) && (in_cnt >= CW'(N_DET));

  assign s_ready      = feeding_data;
  assign fir_clear    = (state == CLEAR);
  assign fir_in_valid = (feeding_data && s_valid) || feeding_pad;
  assign fir_in_data  = feeding_data ? s_data : '0;
  assign busy         = (state != IDLE);

  ramp_fir #(
    .TAPS(TAPS), .SAMPLE_W(SAMPLE_W), .COEF_W(COEF_W),
    .COEF_FRAC(COEF_FRAC), .FILT_W(FILT_W)
  ) u_fir (
    .clk, .rst_n,
    .clear    (fir_clear),
    .in_valid (fir_in_valid),
    .in_data  (fir_in_data),
    .out_valid(fir_out_valid),
    .out_data (fir_out_data)
  );

  // write outputs HALF .. N_DET+HALF-1 to addresses 0 .. N_DET-1
  logic last_out;
  assign last_out      = fir_out_valid && (out_cnt == CW'(TOTAL - 1));
  assign buf_wr_en     = fir_out_valid && (out_cnt >= CW'(HALF));
  assign buf_wr_addr   = DAW'(out_cnt - CW'(HALF));
  assign buf_wr_data   = fir_out_data;
  assign buf_wr_commit = last_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      in_cnt  <= '0;
      out_cnt <= '0;
    end else begin
      case (state)
        IDLE:  if (buf_wr_ready) state <= CLEAR;
        CLEAR: begin
          in_cnt  <= '0;
          out_cnt <= '0;
          state   <= FEED;
        end
        FEED: if (fir_in_valid) begin
          in_cnt <= in_cnt + 1'b1;
          if (in_cnt == CW'(TOTAL - 1)) state <= DRAIN;
        end
        DRAIN: if (last_out) state <= IDLE;
        default: state <= IDLE;
      endcase
      if (fir_out_valid) out_cnt <= out_cnt + 1'b1;
    end
  end

  // The bank being filled must stay free until it is committed.
  assert property (@(posedge clk) disable iff (!rst_n) buf_wr_en |-> buf_wr_ready)
    else $error("filter_subsystem: buffer bank taken while filling");

endmodule
