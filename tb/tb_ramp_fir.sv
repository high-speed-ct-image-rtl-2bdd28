// tb_ramp_fir -- self-checking testbench of ramp_fir.
//
// Two instances are driven with the same random stream (with idle gaps and
// clear pulses): one at the default widths and one with a 12-bit output so
// that saturation happens.  The expected output of every input sample is
// computed here by a plain 121-tap convolution with coefficients evaluated
// from the ramp formula h(0)=1/4, h(odd n)=-1/(pi^2 n^2), and each result
// must appear exactly 3 cycles after its sample.
module tb_ramp_fir;
  localparam int TAPS = 121, HALF = 60, SW = 16, CF = 17;
  localparam int FW = 18, FW_S = 12;
  localparam int N_SAMPLES = 3000;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [SW-1:0] in_data = '0;
  logic out_valid, out_valid_s;
  logic signed [FW-1:0] out_data;
  logic signed [FW_S-1:0] out_data_s;

  ramp_fir dut (.clk, .rst_n, .clear, .in_valid, .in_data, .out_valid, .out_data);
  ramp_fir #(.FILT_W(FW_S)) dut_s (.clk, .rst_n, .clear, .in_valid, .in_data,
                                   .out_valid(out_valid_s), .out_data(out_data_s));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, sat_seen = 0;
  longint h [TAPS];
  longint ref_dl [TAPS];
  // expected results indexed by the cycle they must appear in
  longint exp_val [int];

  function automatic longint tb_round(real x);
    return (x >= 0.0) ? longint'($rtoi(x + 0.5)) : -longint'($rtoi(-x + 0.5));
  endfunction

  function automatic longint sat(longint v, int w);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    longint mn = -(64'sd1 <<< (w - 1));
    return (v > mx) ? mx : (v < mn) ? mn : v;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // checker: outputs must appear exactly when expected
  always @(negedge clk) if (rst_n) begin
    if (exp_val.exists(cycle)) begin
      longint e, es;
      e = sat(exp_val[cycle], FW);
      es = sat(exp_val[cycle], FW_S);
      checks += 2;
      if (!out_valid || longint'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d: valid=%0d got %0d exp %0d", cycle, out_valid, out_data, e);
      end
      if (!out_valid_s || longint'(out_data_s) != es) begin
        failures++;
        if (failures < 10) $display("FAIL sat cyc %0d: got %0d exp %0d", cycle, out_data_s, es);
      end
      if (es != e) sat_seen++;
      exp_val.delete(cycle);
    end else if (out_valid || out_valid_s) begin
      checks++; failures++;
      if (failures < 10) $display("FAIL cyc %0d: unexpected out_valid", cycle);
    end
  end

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
    for (int i = 0; i < TAPS; i++) ref_dl[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int s = 0; s < N_SAMPLES; s++) begin
      int r;
      r = $urandom % 100;
      if (r < 2) begin
        clear <= 1; in_valid <= 0;
        for (int i = 0; i < TAPS; i++) ref_dl[i] = 0;
      end else if (r < 20) begin
        clear <= 0; in_valid <= 0;
      end else begin
        longint acc;
        logic signed [SW-1:0] x;
        acc = 0;
        // bias towards large values so saturation of the narrow instance occurs
        x = (r < 40) ? ((r % 2 == 1) ? 16'sh7fff : -16'sh8000) : SW'($urandom);
        clear <= 0; in_valid <= 1; in_data <= x;
        for (int i = TAPS - 1; i > 0; i--) ref_dl[i] = ref_dl[i-1];
        ref_dl[0] = longint'(x);
        for (int i = 0; i < TAPS; i++) acc += ref_dl[i] * h[i];
        exp_val[cycle + 4] = (acc + (64'sd1 <<< (CF - 1))) >>> CF;
      end
      @(posedge clk);
    end
    clear <= 0; in_valid <= 0;
    repeat (10) @(posedge clk);
    if (exp_val.size() != 0) begin
      failures++; $display("FAIL: %0d expected outputs never appeared", exp_val.size());
    end
    checks++;
    if (sat_seen == 0) begin
      failures++; $display("FAIL: saturation never exercised");
    end
    $display("saturated outputs: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_SAMPLES * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
