// tb_backprojector -- self-checking testbench of backprojector.
//
// A 16 x 16 image, 12 angles and only 15 detector bins, so that image
// corners fall outside the detector.  A writer keeps a pingpong_buffer
// supplied with random filtered projections; every partial pixel is
// compared with the value expected from the pixel's detector position,
// computed here directly as TC + c*cos - r*sin in the same fixed point
// (cos / sin from floating point), with the nearest-bin rule and zero
// outside the detector.  The order of pixels, the first/last-angle flags,
// two whole frames and the frame time NUM_ANGLES * IMG_N^2 cycles are
// checked, and out-of-range pixels must have occurred.
module tb_backprojector;
  localparam int N = 16, ND = 15, NA = 12, FW = 18, F = 16, FRAMES = 2;
  localparam int DAW = $clog2(ND), PAW = $clog2(N * N), ANW = $clog2(NA);
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic wr_ready, wr_en = 0, wr_commit = 0, rd_ready, rd_release;
  logic [DAW-1:0] wr_addr = '0, rd_addr;
  logic [FW-1:0] wr_data = '0, rd_data;
  logic wr_bank, rd_bank, rd_next_ready;
  logic pp_valid, pp_first, pp_last, frame_done, busy;
  logic [PAW-1:0] pp_addr;
  logic signed [FW-1:0] pp_data;
  logic [ANW-1:0] angle;

  pingpong_buffer #(.DEPTH(ND), .WIDTH(FW)) u_buf (.*);
  backprojector #(.IMG_N(N), .N_DET(ND), .NUM_ANGLES(NA)) dut (
    .clk, .rst_n, .run(1'b1), .rd_ready, .rd_addr, .rd_data(signed'(rd_data)), .rd_release, .rd_next_ready,
    .pp_valid, .pp_addr, .pp_data, .pp_first, .pp_last, .frame_done, .angle, .busy);

  always #5 clk = ~clk;
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  int checks = 0, failures = 0, cycle = 0;
  int out_of_range = 0, frames_done = 0, last_done_cycle = -1;
  logic signed [FW-1:0] proj [FRAMES * NA][ND];
  int seen = 0;  // partial pixels received

  function automatic longint rnd(real x);
    return (x >= 0.0) ? longint'($rtoi(x + 0.5)) : -longint'($rtoi(-x + 0.5));
  endfunction

  // expected partial pixel for global index g (angle-major, raster order)
  task automatic expect_pp(int g, output longint val, output int addr, output bit first, output bit last);
    int p, a, r, c;
    longint cq, sq, t0, t, bin;
    p = g / (N * N); addr = g % (N * N);
    a = p % NA; r = addr / N; c = addr % N;
    cq = rnd($cos(PI * a / NA) * 65536.0);
    sq = rnd($sin(PI * a / NA) * 65536.0);
    t0 = (longint'(ND - 1) <<< (F - 1)) + ((longint'(N - 1) * (sq - cq)) >>> 1);
    t = t0 + c * cq - r * sq;
    bin = (t + (64'sd1 <<< (F - 1))) >>> F;
    if (bin < 0 || bin >= ND) begin val = 0; out_of_range++; end
    else val = longint'(proj[p][bin]);
    first = (a == 0); last = (a == NA - 1);
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && pp_valid) begin
      longint ev; int ea; bit ef, el;
      expect_pp(seen, ev, ea, ef, el);
      checks++;
      if (longint'(pp_data) != ev || int'(pp_addr) != ea || pp_first != ef || pp_last != el) begin
        failures++;
        if (failures < 10) $display("FAIL pp %0d: got d=%0d a=%0d f=%0d l=%0d exp d=%0d a=%0d f=%0d l=%0d",
                                    seen, pp_data, pp_addr, pp_first, pp_last, ev, ea, ef, el);
      end
      checks++;
      if (frame_done != (seen % (NA * N * N) == NA * N * N - 1)) begin
        failures++; $display("FAIL: frame_done wrong at pixel %0d", seen);
      end
      seen++;
    end
    if (rst_n && frame_done) begin
      if (last_done_cycle >= 0) begin
        checks++;
        if (cycle - last_done_cycle != NA * N * N) begin
          failures++;
          $display("FAIL: frame took %0d cycles, expected %0d", cycle - last_done_cycle, NA * N * N);
        end
      end
      last_done_cycle = cycle;
      frames_done++;
    end
  end

  initial begin
    for (int p = 0; p < FRAMES * NA; p++)
      for (int k = 0; k < ND; k++) proj[p][k] = FW'($urandom);
    repeat (3) tick();
    rst_n = 1;
    tick();
    for (int p = 0; p < FRAMES * NA; p++) begin
      while (!wr_ready) tick();
      for (int k = 0; k < ND; k++) begin
        wr_en = 1; wr_addr = DAW'(k); wr_data = proj[p][k];
        wr_commit = (k == ND - 1);
        tick();
      end
      wr_en = 0; wr_commit = 0;
    end
    wait (frames_done == FRAMES);
    repeat (5) tick();
    checks++;
    if (seen != FRAMES * NA * N * N) begin failures++; $display("FAIL: %0d partial pixels", seen); end
    checks++;
    if (out_of_range == 0) begin failures++; $display("FAIL: no out-of-range pixel"); end
    $display("partial pixels %0d, out-of-range %0d, frames %0d", seen, out_of_range, frames_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * NA * (N * N + 50) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
