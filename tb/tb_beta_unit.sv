// tb_beta_unit: exhaustive test of the first-level Taylor terms. For every
// beta (3N/4 bits, N = 16) the testbench supplies gamma^3/6 itself (rounded
// from real arithmetic) and checks
//   bg       = round((beta - gamma/2) * gamma * 2^N), halves rounded up
//   sin_beta = beta - gamma^3/6 and d = sin_beta - bg (exact integers)
// and, against the true functions, |sin_beta - sin(beta)| and
// |(1 - bg) - cos(beta)| below 2 LSB.
module tb_beta_unit;
  localparam int N = 16;
  localparam int B = 3 * N / 4;
  localparam real LSB = 2.0 ** (-N);

  logic [B-1:0]   beta;
  logic [N/4-3:0] cube6;
  logic [N/2-1:0] bg;
  logic [B-1:0]   sin_beta, d;
  int checks = 0, failures = 0;
  longint c, g, ebg, esb;
  real b, gr, err_s, err_c, max_s = 0.0, max_c = 0.0;

  beta_unit dut (.beta(beta), .cube6(cube6), .bg(bg), .sin_beta(sin_beta), .d(d));

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
    for (longint x = 0; x < (longint'(1) << B); x++) begin
      g  = x >> (N / 2);
      b  = real'(x) * LSB;
      gr = real'(g) / (2.0 ** (N / 2));
      c  = longint'($floor(gr * gr * gr / 6.0 / LSB + 0.5));
      beta  = B'(x);
      cube6 = (N/4-2)'(c);
      #1;
      ebg = longint'($floor((b - gr / 2.0) * gr / LSB + 0.5));
      esb = x - c;
      err_s = rabs(real'(sin_beta) * LSB - $sin(b)) / LSB;
      err_c = rabs((1.0 - real'(bg) * LSB) - $cos(b)) / LSB;
      if (err_s > max_s) max_s = err_s;
      if (err_c > max_c) max_c = err_c;
      checks++;
      if (longint'(bg) != ebg || longint'(sin_beta) != esb || longint'(d) != esb - ebg ||
          err_s > 2.0 || err_c > 2.0) begin
        failures++;
        if (failures < 10)
          $display("beta %0d: bg %0d/%0d sin_beta %0d/%0d d %0d", x, bg, ebg, sin_beta, esb, d);
      end
    end
    $display("max error sin(beta) %f LSB, cos(beta) %f LSB", max_s, max_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
