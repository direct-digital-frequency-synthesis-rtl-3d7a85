// tb_product_unit: random test of the three products. Operands are drawn as
// the hardware would see them (cos/sin of a random alpha rounded to N bits,
// a random beta with bg, sin_beta and d derived from it) and the outputs are
// compared with the product formulas evaluated in 64-bit integers:
//   p1 = cos_a - round(cos_a*bg/2^N), p2 = round(sin_a*sin_beta/2^N),
//   p3 = (cos_a+sin_a) + round((cos_a+sin_a)*d/2^N), halves rounded up.
// Also checks p1 ~ cos(alpha)cos(beta) and p2 ~ sin(alpha)sin(beta) within
// 3 LSB, with the real products.
module tb_product_unit;
  localparam int N = 16;
  localparam int B = 3 * N / 4;
  localparam real LSB = 2.0 ** (-N);

  logic [N-1:0]   cos_alpha, sin_alpha;
  logic [N/2-1:0] bg;
  logic [B-1:0]   sin_beta, d;
  logic [N-1:0]   p1;
  logic [B-1:0]   p2;
  logic [N:0]     p3;
  int checks = 0, failures = 0;
  longint ca, sa, x, g, ebg, esb, e1, e2, e3;
  longint half = longint'(1) << (N - 1);
  real a, b, gr;

  product_unit dut (.cos_alpha(cos_alpha), .sin_alpha(sin_alpha), .bg(bg),
                             .sin_beta(sin_beta), .d(d), .p1(p1), .p2(p2), .p3(p3));

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
    for (int i = 0; i < 20000; i++) begin
      a  = real'($urandom % (1 << (N / 4))) / (2.0 ** (N / 4));
      x  = longint'($urandom % (1 << B));
      g  = x >> (N / 2);
      b  = real'(x) * LSB;
      gr = real'(g) / (2.0 ** (N / 2));
      ca = longint'($floor($cos(a) / LSB + 0.5));
      if (ca > (longint'(1) << N) - 1) ca = (longint'(1) << N) - 1;
      sa = longint'($floor($sin(a) / LSB + 0.5));
      ebg = longint'($floor((b - gr / 2.0) * gr / LSB + 0.5));
      esb = x - longint'($floor(gr * gr * gr / 6.0 / LSB + 0.5));
      cos_alpha = N'(ca);
      sin_alpha = N'(sa);
      bg        = (N/2)'(ebg);
      sin_beta  = B'(esb);
      d         = B'(esb - ebg);
      #1;
      e1 = ca - ((ca * ebg + half) >> N);
      e2 = (sa * esb + half) >> N;
      e3 = (ca + sa) + (((ca + sa) * (esb - ebg) + half) >> N);
      checks++;
      if (longint'(p1) != e1 || longint'(p2) != e2 || longint'(p3) != e3 ||
          rabs(real'(p1) * LSB - $cos(a) * $cos(b)) > 3.0 * LSB ||
          rabs(real'(p2) * LSB - $sin(a) * $sin(b)) > 3.0 * LSB) begin
        failures++;
        if (failures < 10)
          $display("i %0d: p1 %0d/%0d p2 %0d/%0d p3 %0d/%0d", i, p1, e1, p2, e2, p3, e3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
