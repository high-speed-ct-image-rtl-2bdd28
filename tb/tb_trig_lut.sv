// tb_trig_lut -- self-checking testbench of trig_lut.
//
// Reads every entry of the default 180-angle table and of a 12-angle table
// and compares each with cos / sin of the angle computed here in floating
// point, scaled by 2^16; the table must be within one unit of the rounded
// value.  Also checks a few exact values (0, 45, 90 degrees).
module tb_trig_lut;
  localparam int NA = 180, NB = 12;
  localparam real PI = 3.14159265358979323846;

  logic [7:0] angle_a = '0;
  logic [3:0] angle_b = '0;
  logic signed [17:0] cos_a, sin_a, cos_b, sin_b;

  trig_lut dut_a (.angle(angle_a), .cos_q(cos_a), .sin_q(sin_a));
  trig_lut #(.NUM_ANGLES(NB)) dut_b (.angle(angle_b), .cos_q(cos_b), .sin_q(sin_b));

  int checks = 0, failures = 0;

  task automatic check(string what, int a, real expected, longint got);
    real d;
    d = expected * 65536.0 - real'(got);
    checks++;
    if (d > 0.51 || d < -0.51) begin
      failures++;
      $display("FAIL %s angle %0d: got %0d expected %f", what, a, got, expected * 65536.0);
    end
  endtask

  initial begin
    for (int a = 0; a < NA; a++) begin
      angle_a = 8'(a);
      #1;
      check("cos", a, $cos(PI * a / NA), longint'(cos_a));
      check("sin", a, $sin(PI * a / NA), longint'(sin_a));
    end
    for (int a = 0; a < NB; a++) begin
      angle_b = 4'(a);
      #1;
      check("cos12", a, $cos(PI * a / NB), longint'(cos_b));
      check("sin12", a, $sin(PI * a / NB), longint'(sin_b));
    end
    angle_a = 8'd0;  #1; checks++; if (cos_a != 18'sd65536 || sin_a != 0) failures++;
    angle_a = 8'd90; #1; checks++; if (cos_a != 0 || sin_a != 18'sd65536) failures++;
    angle_a = 8'd45; #1; checks++; if (cos_a != 18'sd46341 || sin_a != 18'sd46341) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
