// tb_sincos_generator: exhaustive accuracy test of the two-level table-lookup
// generator. For every theta in [0, pi/4] (N = 16), cos(theta) = p1 - p2 and
// sin(theta) = p3 - p1 - p2 are formed from the outputs and compared with
// $cos/$sin. The bound of 4 LSB follows from the error budget: the Taylor
// remainders (below 2^-(N+1) each, plus the gamma^3/6 and cos(gamma) terms
// dropped from the expansion), ROM rounding (1/2 LSB each) and the rounding
// of the four products (1/2 LSB each) add up to less than 4 LSB. The rms
// error over all angles must also stay below 1 LSB.
module tb_sincos_generator;
  localparam int N = 16;
  localparam int B = 3 * N / 4;
  localparam real PI = 3.14159265358979323846;
  localparam real LSB = 2.0 ** (-N);
  localparam real TOL_C = 4.0;
  localparam real TOL_S = 4.0;

  logic [N-1:0] theta;
  logic [N-1:0] p1;
  logic [B-1:0] p2;
  logic [N:0]   p3;
  int checks = 0, failures = 0;
  longint tmax;
  real th, ec, es, max_c = 0.0, max_s = 0.0, sum2 = 0.0;

  sincos_generator dut (.theta(theta), .p1(p1), .p2(p2), .p3(p3));

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tmax = longint'($floor(PI / 4.0 / LSB + 0.5)) + 1;
    for (longint t = 0; t <= tmax; t++) begin
      theta = N'(t);
      #1;
      th = real'(t) * LSB;
      ec = (real'(p1) - real'(p2)) - $cos(th) / LSB;
      es = (real'(p3) - real'(p1) - real'(p2)) - $sin(th) / LSB;
      sum2 += ec * ec + es * es;
      if (rabs(ec) > max_c) max_c = rabs(ec);
      if (rabs(es) > max_s) max_s = rabs(es);
      checks++;
      if (rabs(ec) > TOL_C || rabs(es) > TOL_S) begin
        failures++;
        if (failures < 10) $display("theta %0d: cos err %f sin err %f LSB", t, ec, es);
      end
    end
    checks++;
    if ($sqrt(sum2 / (2.0 * real'(tmax + 1))) > 1.0) failures++;
    $display("max |error| cos %f LSB, sin %f LSB, rms %f LSB", max_c, max_s,
             $sqrt(sum2 / (2.0 * real'(tmax + 1))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
