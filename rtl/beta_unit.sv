// beta_unit: first-level Taylor terms of the two-level table-lookup DDFS.
//
// beta is the low 3N/4 bits of the folded angle theta (beta < 2^-(N/4) rad,
// LSB 2^-N) and gamma its N/4 most significant bits (LSB 2^-(N/2)). Expanding
// cos(beta) and sin(beta) around gamma and dropping terms below 2^-N gives
//   cos(beta) ~ 1 - (beta - gamma/2)*gamma
//   sin(beta) ~ beta - gamma^3/6
// This block forms, all with LSB weight 2^-N:
//   bmg      = beta - gamma/2        (3N/4 bits; exact, since gamma/2 is a
//                                     multiple of 2^-N)
//   bg       = (beta - gamma/2)*gamma (3N/4 x N/4 multiplier, rounded to
//                                     N/2 bits; it is below 2^-(N/2+1), so
//                                     rounding cannot overflow)
//   sin_beta = beta - gamma^3/6      (3N/4 bits; cube6 comes from cube_rom)
//   d        = sin_beta - bg         (3N/4 bits; never negative)
// d is the bracket (cos(beta)+sin(beta)) - 1 used for p3. Formulas, multiplier
// size and bus widths follow the published design; rounding the product to nearest
// (a half-LSB constant added into the multiplier) is this design's choice. Purely combinational.
module beta_unit #(
  parameter int unsigned N = 16
) (
  input  logic [3*N/4-1:0] beta,
  input  logic [N/4-3:0]   cube6,
  output logic [N/2-1:0]   bg,
  output logic [3*N/4-1:0] sin_beta,
  output logic [3*N/4-1:0] d
);

  localparam int unsigned Q = N / 4;
  localparam int unsigned B = 3 * N / 4;
  localparam int unsigned H = N / 2;

  logic [Q-1:0]   gamma;
  logic [B-1:0]   bmg;
  logic [B+Q-1:0] prod;   // LSB weight 2^-(3N/2), half LSB of bg added

  always_comb begin
    gamma    = beta[B-1:H];
    bmg      = beta - (B'(gamma) << (H - 1));
    prod     = (B+Q)'(bmg) * (B+Q)'(gamma) + ((B+Q)'(1) << (H-1));
    bg       = prod[B+Q-1:H];
    sin_beta = beta - B'(cube6);
    d        = sin_beta - B'(bg);
  end

endmodule
