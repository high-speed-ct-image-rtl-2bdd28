// tb_pingpong_buffer -- self-checking testbench of pingpong_buffer.
//
// A writer fills banks with numbered random projections at a random pace
// and a reader reads every word of each bank, in a random address order, at
// its own random pace.  The reader checks that projections arrive in the
// order written and that each word read is the one written (one-cycle read
// latency).  The testbench also requires that writing and reading overlapped
// (one bank filled while the other was read) and that the writer had to wait
// for a full buffer, and checks the ready flags in every cycle against a
// count of the banks committed and not yet released.
module tb_pingpong_buffer;
  localparam int DEPTH = 37, W = 18, AW = $clog2(DEPTH), N_PROJ = 40;

  logic clk = 0, rst_n = 0;
  logic wr_ready, wr_en = 0, wr_commit = 0, rd_ready, rd_release = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic wr_bank, rd_bank, rd_next_ready;

  pingpong_buffer #(.DEPTH(DEPTH), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  // advance one clock and step past the edge so that the DUT's updates are seen
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  int checks = 0, failures = 0;
  int overlap = 0, wr_stall = 0;
  logic [W-1:0] proj [N_PROJ][DEPTH];
  bit wr_busy = 0, rd_busy = 0;

  always @(posedge clk) begin
    if (wr_busy && rd_busy) overlap++;
  end

  // bank occupancy model: projections committed minus projections released
  int n_commit = 0, n_release = 0;
  always @(posedge clk) if (rst_n) begin
    if (wr_commit) n_commit <= n_commit + 1;
    if (rd_release) n_release <= n_release + 1;
  end
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (rd_ready != (n_commit - n_release >= 1) || rd_next_ready != (n_commit - n_release >= 2) ||
        wr_ready != (n_commit - n_release < 2)) begin
      failures++;
      if (failures < 10) $display("FAIL: flags rd %0d next %0d wr %0d with %0d banks full",
                                  rd_ready, rd_next_ready, wr_ready, n_commit - n_release);
    end
  end

  // writer
  initial begin
    for (int p = 0; p < N_PROJ; p++)
      for (int a = 0; a < DEPTH; a++) proj[p][a] = W'($urandom);
    repeat (3) tick();
    rst_n = 1;
    tick();
    for (int p = 0; p < N_PROJ; p++) begin
      while (!wr_ready) begin wr_stall++; tick(); end
      wr_busy = 1;
      for (int a = 0; a < DEPTH; a++) begin
        while ($urandom % 4 == 0) tick();
        wr_en = 1; wr_addr = AW'(a); wr_data = proj[p][a];
        tick();
        wr_en = 0;
      end
      wr_commit = 1;
      tick();
      wr_commit = 0;
      wr_busy = 0;
      repeat ($urandom % 3) tick();
    end
  end

  // reader
  initial begin
    int order [DEPTH];
    wait (rst_n);
    tick();
    for (int p = 0; p < N_PROJ; p++) begin
      while (!rd_ready) tick();
      rd_busy = 1;
      for (int a = 0; a < DEPTH; a++) order[a] = a;
      order.shuffle();
      // slow reader on even projections so the writer has to stall
      for (int i = 0; i < DEPTH; i++) begin
        if (p % 2 == 0) repeat (3) tick();
        rd_addr = AW'(order[i]);
        rd_release = (i == DEPTH - 1);
        tick();
        rd_release = 0;
        checks++;
        if (rd_data !== proj[p][order[i]]) begin
          failures++;
          if (failures < 10) $display("FAIL proj %0d addr %0d: got %h exp %h", p, order[i], rd_data, proj[p][order[i]]);
        end
      end
      rd_busy = 0;
    end
    repeat (2) tick();
    checks++;
    if (rd_ready) begin failures++; $display("FAIL: buffer not empty at end"); end
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL: write and read never overlapped"); end
    checks++;
    if (wr_stall == 0) begin failures++; $display("FAIL: writer never stalled"); end
    $display("overlap cycles %0d, writer stall cycles %0d", overlap, wr_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) tick();
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
