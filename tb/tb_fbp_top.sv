// tb_fbp_top -- end-to-end testbench of fbp_top at a reduced size.
//
// Reconstructs the modified Shepp-Logan phantom on a 32 x 32 image from 30
// projections of 47 detector bins (the full 121-tap filter), twice: the
// second frame with half the sinogram scale, so that a frame that failed to
// restart its sums would show.  The sinogram is computed analytically from
// the ten ellipses and streamed in with random gaps.  Checked:
//   * every image word equals the bit-exact model (fbp_ref_pkg) of filter
//     and backprojector, after each frame, read through the image port;
//   * the partial-pixel stream count, and the frame time against
//     NUM_ANGLES * IMG_N^2 plus the filling of the first bank;
//   * the image resembles the phantom (correlation coefficient at least 0.6
//     at this coarse size, mean value within 20%);
//   * each mechanism occurred: input back-pressure, filtering overlapped
//     with backprojection, both buffer banks used in turn, backprojector
//     waiting for a filtered projection, an angle following the previous
//     one without a gap, a frame held back by run, and the first-angle
//     restart of the sums.
module tb_fbp_top;
  import fbp_ref_pkg::*;

  localparam int N = 32, ND = 47, NA = 30, FRAMES = 2;
  localparam int TAPS = 121, CF = 17, FW = 18, TF = 16, AW = 26;
  localparam int PAW = $clog2(N * N), ANW = $clog2(NA);

  logic clk = 0, rst_n = 0, run = 0;
  logic s_valid = 0, s_ready;
  logic signed [15:0] s_data = '0;
  logic pp_valid, pp_first, pp_last, frame_done;
  logic [PAW-1:0] pp_addr;
  logic signed [FW-1:0] pp_data;
  logic [PAW-1:0] img_rd_addr = '0;
  logic signed [AW-1:0] img_rd_data;
  logic [ANW-1:0] angle;
  logic filter_busy, bp_busy, wr_bank, rd_bank;

  fbp_top #(.IMG_N(N), .N_DET(ND), .NUM_ANGLES(NA)) dut (.*);

  always #5 clk = ~clk;
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  int checks = 0, failures = 0, cycle = 0;
  int n_stall = 0, n_overlap = 0, n_bank_swap = 0, n_starved = 0, n_held = 0, n_first_pp = 0;
  int n_pp = 0, frames_seen = 0, n_chained = 0;
  logic last_wr_bank = 0;
  longint sino [FRAMES][NA][ND];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (s_valid && !s_ready) n_stall++;
      if (filter_busy && bp_busy) n_overlap++;
      if (wr_bank != last_wr_bank) n_bank_swap++;
      last_wr_bank <= wr_bank;
      if (!bp_busy && filter_busy && !pp_valid && run && frames_seen == 0) n_starved++;
      if (!run && !bp_busy && dut.buf_rd_ready) n_held++;
      if (pp_valid) begin n_pp++; if (pp_first) n_first_pp++; end
      if (frame_done) frames_seen++;
      if (dut.buf_rd_release && dut.buf_rd_next_ready) n_chained++;
    end
  end

  initial begin
    real scale [FRAMES] = '{64.0, 32.0};
    real R = real'(N) / 2.0;
    for (int f = 0; f < FRAMES; f++)
      for (int a = 0; a < NA; a++)
        for (int k = 0; k < ND; k++) begin
          real t;
          t = (real'(k) - real'(ND - 1) / 2.0) / R;
          sino[f][a][k] = rnd(R * phantom_proj(t, PI * a / NA) * scale[f]);
        end
    repeat (3) tick();
    rst_n = 1;
    tick();
    for (int f = 0; f < FRAMES; f++)
      for (int a = 0; a < NA; a++)
        for (int k = 0; k < ND; k++) begin
          while ($urandom % 4 == 0) begin s_valid = 0; tick(); end
          s_valid = 1; s_data = 16'(sino[f][a][k]);
          do tick(); while (!(s_ready_q));
        end
    s_valid = 0;
  end

  // s_ready as seen at the last clock edge
  logic s_ready_q;
  always @(posedge clk) s_ready_q <= s_ready && s_valid;

  initial begin
    longint img [];
    longint q [];
    longint p [];
    int outside, start_cycle;
    real scale, sxy, sxx, syy, sx, sy, corr;
    img = new[N * N];
    p = new[ND];
    wait (rst_n);
    tick();
    for (int f = 0; f < FRAMES; f++) begin
      // model of this frame
      for (int i = 0; i < N * N; i++) img[i] = 0;
      for (int a = 0; a < NA; a++) begin
        for (int k = 0; k < ND; k++) p[k] = sino[f][a][k];
        ref_filter(p, TAPS, CF, FW, q);
        ref_backproject(q, a, NA, N, TF, img, outside);
      end
      // hold the frame back for a while, then run it
      repeat (f == 0 ? 50 : 2000) tick();
      run = 1;
      start_cycle = cycle;
      // run only gates the start of a frame: drop it once this one is under way
      while (!bp_busy) tick();
      run = 0;
      while (!frame_done) tick();
      checks++;
      // first frame waits for the first projection to be filtered; later
      // frames find it filtered and take NUM_ANGLES*IMG_N^2 cycles plus two
      // (start from WAIT, output register)
      if ((f == 0) ? (cycle - start_cycle < NA * N * N || cycle - start_cycle > NA * N * N + ND + 200)
                   : (cycle - start_cycle != NA * N * N + 2)) begin
        failures++; $display("FAIL frame %0d: took %0d cycles", f, cycle - start_cycle);
      end
      $display("frame %0d: %0d cycles from run (NUM_ANGLES*IMG_N^2 = %0d)", f, cycle - start_cycle, NA * N * N);
      repeat (3) tick();
      sxy = 0.0; sxx = 0.0; syy = 0.0; sx = 0.0; sy = 0.0;
      scale = PI / (real'(NA) * (f == 0 ? 64.0 : 32.0));
      for (int i = 0; i < N * N; i++) begin
        real x, y, u, v;
        img_rd_addr = PAW'(i);
        tick();
        checks++;
        if (longint'(img_rd_data) != img[i]) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d pixel %0d: got %0d exp %0d", f, i, img_rd_data, img[i]);
        end
        x = (real'(i % N) - real'(N - 1) / 2.0) / (real'(N) / 2.0);
        y = (real'(N - 1) / 2.0 - real'(i / N)) / (real'(N) / 2.0);
        u = real'(img_rd_data) * scale;
        v = phantom_val(x, y);
        sx += u; sy += v; sxy += u * v; sxx += u * u; syy += v * v;
      end
      // correlation coefficient between the reconstruction and the phantom
      corr = (sxy - sx * sy / (N * N)) / $sqrt((sxx - sx * sx / (N * N)) * (syy - sy * sy / (N * N)));
      $display("frame %0d: correlation with the phantom %f, mean value %f (phantom %f)",
               f, corr, sx / (N * N), sy / (N * N));
      checks += 2;
      if (corr < 0.6) begin failures++; $display("FAIL: image does not resemble the phantom"); end
      if (sx / sy < 0.8 || sx / sy > 1.2) begin failures++; $display("FAIL: image mean is off"); end
    end
    checks++;
    if (n_pp != FRAMES * NA * N * N) begin failures++; $display("FAIL: %0d partial pixels", n_pp); end
    $display("mechanisms: input stalls %0d, filter/backprojection overlap %0d, bank swaps %0d, backprojector starved %0d, frame held %0d, first-angle partial pixels %0d, gapless angle changes %0d",
             n_stall, n_overlap, n_bank_swap, n_starved, n_held, n_first_pp, n_chained);
    checks += 7;
    if (n_chained == 0)   begin failures++; $display("FAIL: no angle followed another without a gap"); end
    if (n_stall == 0)     begin failures++; $display("FAIL: no input back-pressure"); end
    if (n_overlap == 0)   begin failures++; $display("FAIL: filtering never overlapped backprojection"); end
    if (n_bank_swap < FRAMES * NA) begin failures++; $display("FAIL: too few bank swaps"); end
    if (n_starved == 0)   begin failures++; $display("FAIL: backprojector never waited for data"); end
    if (n_held == 0)      begin failures++; $display("FAIL: frame never held by run"); end
    if (n_first_pp != FRAMES * N * N) begin failures++; $display("FAIL: first-angle restart count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * (NA * N * N + 2000 + N * N + 500) + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
