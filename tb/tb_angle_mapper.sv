// tb_angle_mapper: exhaustive test of the pi/4 angle mapper. Every phase in
// [0, 2*pi) (N = 16) is applied; the octant and folded angle are compared with
// a reference built from real arithmetic: octant boundaries round(k*pi/4*2^N),
// theta = distance from the octant start (even octants) or to the octant end
// (odd octants). Also checks that theta never exceeds pi/4 by more than 1 LSB
// and that every octant is reached.
module tb_angle_mapper;
  localparam int N = 16;
  localparam real PI = 3.14159265358979323846;

  logic [N+2:0] phase;
  logic [2:0]   octant;
  logic [N-1:0] theta;
  int checks = 0, failures = 0;
  longint t[0:8];
  longint exp_theta;
  int exp_oct;
  int seen[0:7];

  angle_mapper dut (.phase(phase), .octant(octant), .theta(theta));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 8; k++) t[k] = longint'($floor(k * PI / 4.0 * (2.0 ** N) + 0.5));
    for (int k = 0; k < 8; k++) seen[k] = 0;
    for (longint p = 0; p < t[8]; p++) begin
      phase = (N+3)'(p);
      #1;
      exp_oct = 0;
      while (exp_oct < 7 && p >= t[exp_oct + 1]) exp_oct++;
      exp_theta = (exp_oct % 2 == 0) ? p - t[exp_oct] : t[exp_oct + 1] - p;
      seen[exp_oct]++;
      checks++;
      if (int'(octant) != exp_oct || longint'(theta) != exp_theta ||
          real'(theta) > PI / 4.0 * (2.0 ** N) + 1.0) begin
        failures++;
        if (failures < 10)
          $display("phase %0d: octant %0d theta %0d, expected %0d %0d", p, octant, theta, exp_oct, exp_theta);
      end
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
