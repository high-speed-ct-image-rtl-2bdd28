// tb_image_accumulator -- self-checking testbench of image_accumulator.
//
// Drives an 8 x 8 accumulator with random partial pixels: random addresses,
// often the same address in consecutive cycles (so the write-back
// forwarding is used), random first-angle flags and idle cycles.  A model
// array holds the expected sums.  Several times during the run, and at the
// end, the whole image is read through the host port (one-cycle latency)
// and compared with the model.  Two frames of a raster-order scan over 4
// angles are also run and read back.
module tb_image_accumulator;
  localparam int N = 8, W = N * N, FW = 18, AW = 26, PAW = $clog2(W);

  logic clk = 0, rst_n = 0;
  logic pp_valid = 0, pp_first = 0;
  logic [PAW-1:0] pp_addr = '0, img_rd_addr = '0;
  logic signed [FW-1:0] pp_data = '0;
  logic signed [AW-1:0] img_rd_data;

  image_accumulator #(.IMG_N(N)) dut (.*);

  always #5 clk = ~clk;
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  int checks = 0, failures = 0, repeats = 0;
  longint model [W];
  bit written [W];

  task automatic push(int a, longint d, bit first);
    pp_valid = 1; pp_addr = PAW'(a); pp_data = FW'(d); pp_first = first;
    if (first || !written[a]) model[a] = d; else model[a] += d;
    written[a] = 1;
    tick();
    pp_valid = 0;
  endtask

  task automatic read_all();
    tick();
    for (int a = 0; a < W; a++) begin
      img_rd_addr = PAW'(a);
      tick();
      if (written[a]) begin
        checks++;
        if (longint'(img_rd_data) != model[a]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d: got %0d exp %0d", a, img_rd_data, model[a]);
        end
      end
    end
  endtask

  initial begin
    int last_a;
    repeat (3) tick();
    rst_n = 1;
    tick();
    // every word starts with a first-angle write
    for (int a = 0; a < W; a++) push(a, longint'($signed(FW'($urandom))), 1);
    last_a = 0;
    for (int rnd = 0; rnd < 6; rnd++) begin
      for (int i = 0; i < 2000; i++) begin
        int a;
        if ($urandom % 5 == 0) begin a = last_a; repeats++; end
        else a = $urandom % W;
        if ($urandom % 6 == 0) tick();
        push(a, longint'($signed(FW'($urandom))), ($urandom % 20) == 0);
        last_a = a;
      end
      read_all();
    end
    // raster-order frames, as the backprojector produces them
    for (int f = 0; f < 2; f++) begin
      for (int ang = 0; ang < 4; ang++)
        for (int a = 0; a < W; a++) push(a, longint'($signed(FW'($urandom))), ang == 0);
      read_all();
    end
    checks++;
    if (repeats == 0) begin failures++; $display("FAIL: no back-to-back address"); end
    $display("back-to-back same-address partial pixels: %0d", repeats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
