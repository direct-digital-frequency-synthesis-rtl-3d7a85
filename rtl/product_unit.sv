// product_unit: the three products p1, p2, p3 of the DDFS.
//
// The rotation cos(a+b) = cos a cos b - sin a sin b,
// sin(a+b) = sin a cos b + cos a sin b is done with three multiplications
// instead of four:
//   p1 = cos(alpha) cos(beta)  ~ cos(alpha) - cos(alpha) * bg
//   p2 = sin(alpha) sin(beta)  ~ sin(alpha) * sin_beta
//   p3 = (cos(alpha)+sin(alpha))(cos(beta)+sin(beta))
//      ~ (cos(alpha)+sin(alpha)) + (cos(alpha)+sin(alpha)) * d
// where bg = (beta-gamma/2)*gamma and d = sin_beta - bg come from beta_unit.
// The multipliers are N x N/2, N x 3N/4 and (N+1) x 3N/4 as in the published design;
// every product is rounded to N fractional bits, as the published design asks for
// p1..p3 with N-bit fractional precision. Rounding to nearest, done by adding
// a half-LSB constant into each product, is this design's choice; it keeps
// the errors of the four products from adding up in one direction. Output widths: p1 N bits (< 1), p2 3N/4 bits
// (< 2^-(N/4)), p3 N+1 bits (< sqrt 2), all with LSB weight 2^-N.
// Purely combinational.
module product_unit #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]     cos_alpha,
  input  logic [N-1:0]     sin_alpha,
  input  logic [N/2-1:0]   bg,
  input  logic [3*N/4-1:0] sin_beta,
  input  logic [3*N/4-1:0] d,
  output logic [N-1:0]     p1,
  output logic [3*N/4-1:0] p2,
  output logic [N:0]       p3
);

  localparam int unsigned B = 3 * N / 4;
  localparam int unsigned H = N / 2;

  logic [N+H-1:0]   m1;   // cos(alpha) * bg + 1/2 LSB, LSB 2^-2N
  logic [N+B-1:0]   m2;   // sin(alpha) * sin(beta) + 1/2, LSB 2^-2N
  logic [N:0]       cs;   // cos(alpha) + sin(alpha),  LSB 2^-N
  logic [N+B:0]     m3;   // cs * d + 1/2 LSB,         LSB 2^-2N

  always_comb begin
    m1 = (N+H)'(cos_alpha) * (N+H)'(bg) + ((N+H)'(1) << (N-1));
    m2 = (N+B)'(sin_alpha) * (N+B)'(sin_beta) + ((N+B)'(1) << (N-1));
    cs = (N+1)'(cos_alpha) + (N+1)'(sin_alpha);
    m3 = (N+B+1)'(cs) * (N+B+1)'(d) + ((N+B+1)'(1) << (N-1));
    p1 = cos_alpha - N'(m1[N+H-1:N]);
    p2 = m2[N+B-1:N];
    p3 = cs + (N+1)'(m3[N+B:N]);
  end

endmodule
