// sincos_generator: two-level table-lookup sin/cos generator.
//
// Splits the folded angle theta (N fractional bits, 0 <= theta <= pi/4) into
//   alpha = theta[N-1:3N/4]   the N/4 MSBs, addressing the COS and SIN ROMs
//   beta  = theta[3N/4-1:0]   the remaining 3N/4 bits
//   gamma = theta[3N/4-1:N/2] the N/4 MSBs of beta, addressing the gamma^3/6 ROM
// The first level (tables of alpha) gives cos(alpha), sin(alpha); the second
// level (beta_unit) approximates cos(beta) and sin(beta) by a Taylor expansion
// around gamma with one small table. product_unit then forms p1, p2, p3, from
// which cos(theta) = p1 - p2 and sin(theta) = p3 - p1 - p2 are taken by the
// combining stage. The bit split follows the published description; everything is
// combinational, as in the published design (this block holds no registers).
module sincos_generator #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]     theta,
  output logic [N-1:0]     p1,
  output logic [3*N/4-1:0] p2,
  output logic [N:0]       p3
);

  logic [N-1:0]     cos_alpha, sin_alpha;
  logic [N/4-3:0]   cube6;
  logic [N/2-1:0]   bg;
  logic [3*N/4-1:0] sin_beta, d;

  cos_rom  #(.N(N)) u_cos_rom  (.alpha(theta[N-1:3*N/4]), .cos_alpha(cos_alpha));
  sin_rom  #(.N(N)) u_sin_rom  (.alpha(theta[N-1:3*N/4]), .sin_alpha(sin_alpha));
  cube_rom #(.N(N)) u_cube_rom (.gamma(theta[3*N/4-1:N/2]), .cube6(cube6));

  beta_unit #(.N(N)) u_beta (
    .beta    (theta[3*N/4-1:0]),
    .cube6   (cube6),
    .bg      (bg),
    .sin_beta(sin_beta),
    .d       (d)
  );

  product_unit #(.N(N)) u_prod (
    .cos_alpha(cos_alpha),
    .sin_alpha(sin_alpha),
    .bg       (bg),
    .sin_beta (sin_beta),
    .d        (d),
    .p1       (p1),
    .p2       (p2),
    .p3       (p3)
  );

endmodule
