// tb_filter_subsystem -- self-checking testbench of filter_subsystem.
//
// The subsystem is connected to a pingpong_buffer.  Random projections of
// N_DET = 50 samples are streamed in, with random gaps on some angles and
// none on others, and a reader empties the banks slowly enough that the
// input is back-pressured.  Every word of every filtered projection is
// compared with the centred 121-tap convolution (zero padded at both ends)
// computed here from the ramp formula.  On angles whose input never
// stalled, the commit must come exactly N_DET + 60 + 2 cycles after the
// first sample was taken.
module tb_filter_subsystem;
  localparam int N_DET = 50, TAPS = 121, HALF = 60, SW = 16, FW = 18, CF = 17;
  localparam int DAW = $clog2(N_DET), N_ANG = 12;

  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_ready;
  logic signed [SW-1:0] s_data = '0;
  logic buf_wr_ready, buf_wr_en, buf_wr_commit, busy;
  logic [DAW-1:0] buf_wr_addr;
  logic signed [FW-1:0] buf_wr_data;
  logic rd_ready, rd_release = 0, wr_bank, rd_bank;
  logic [DAW-1:0] rd_addr = '0;
  logic [FW-1:0] rd_data;

  filter_subsystem #(.N_DET(N_DET)) dut (.*);
  pingpong_buffer #(.DEPTH(N_DET), .WIDTH(FW)) u_buf (
    .clk, .rst_n, .wr_ready(buf_wr_ready), .wr_en(buf_wr_en), .wr_addr(buf_wr_addr),
    .wr_data(buf_wr_data), .wr_commit(buf_wr_commit), .rd_ready, .rd_addr, .rd_data,
    .rd_release, .wr_bank, .rd_bank);

  always #5 clk = ~clk;
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  int checks = 0, failures = 0, cycle = 0;
  int stall_cycles = 0, timed_angles = 0;
  longint h [TAPS];
  logic signed [SW-1:0] proj [N_ANG][N_DET];
  longint expected [N_ANG][N_DET];
  int first_cycle [N_ANG];
  bit no_gap [N_ANG];
  int commits = 0;

  function automatic longint tb_round(real x);
    return (x >= 0.0) ? longint'($rtoi(x + 0.5)) : -longint'($rtoi(-x + 0.5));
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && !s_ready && s_valid) stall_cycles++;
    if (buf_wr_commit && buf_wr_ready) begin
      if (no_gap[commits]) begin
        timed_angles++;
        checks++;
        if (cycle - first_cycle[commits] != N_DET + HALF + 2) begin
          failures++;
          $display("FAIL angle %0d: commit after %0d cycles, expected %0d",
                   commits, cycle - first_cycle[commits], N_DET + HALF + 2);
        end
      end
      commits++;
    end
  end

  // source
  initial begin
    for (int i = 0; i < TAPS; i++) begin
      int n;
      real hr;
      n = i - HALF;
      if (n == 0) hr = 0.25;
      else if (n % 2 == 0) hr = 0.0;
      else hr = -1.0 / (3.14159265358979323846 ** 2 * real'(n * n));
      h[i] = tb_round(hr * 131072.0);
    end
    for (int a = 0; a < N_ANG; a++) begin
      for (int k = 0; k < N_DET; k++) proj[a][k] = SW'($urandom);
      for (int k = 0; k < N_DET; k++) begin
        longint acc;
        acc = 0;
        for (int j = 0; j < N_DET; j++)
          if (k - j + HALF >= 0 && k - j + HALF < TAPS) acc += longint'(proj[a][j]) * h[k - j + HALF];
        expected[a][k] = (acc + (64'sd1 <<< (CF - 1))) >>> CF;
      end
      no_gap[a] = (a % 3 == 1);
    end
    repeat (3) tick();
    rst_n = 1;
    tick();
    for (int a = 0; a < N_ANG; a++) begin
      for (int k = 0; k < N_DET; k++) begin
        if (!no_gap[a]) while ($urandom % 3 == 0) begin s_valid = 0; tick(); end
        s_valid = 1; s_data = proj[a][k];
        while (1) begin
          @(posedge clk);
          if (s_ready) break;
          #1;
        end
        if (k == 0) first_cycle[a] = cycle;
        #1;
      end
      s_valid = 0;
    end
  end

  // reader: slow on some angles so that both banks fill up
  initial begin
    wait (rst_n);
    tick();
    for (int a = 0; a < N_ANG; a++) begin
      while (!rd_ready) tick();
      if (a % 3 == 0) repeat (200) tick();
      for (int k = 0; k < N_DET; k++) begin
        rd_addr = DAW'(k);
        rd_release = (k == N_DET - 1);
        tick();
        rd_release = 0;
        checks++;
        if (longint'($signed(rd_data)) != expected[a][k]) begin
          failures++;
          if (failures < 10) $display("FAIL angle %0d bin %0d: got %0d exp %0d", a, k, $signed(rd_data), expected[a][k]);
        end
      end
    end
    checks++;
    if (stall_cycles == 0) begin failures++; $display("FAIL: input never back-pressured"); end
    checks++;
    if (timed_angles == 0) begin failures++; $display("FAIL: no angle was timed"); end
    $display("input stall cycles %0d, timed angles %0d", stall_cycles, timed_angles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
