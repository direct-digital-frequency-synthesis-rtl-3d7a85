// combine_mirror: combining and phase-mirror stage of the DDFS.
//
// Combining: cos(theta) = p1 - p2 and sin(theta) = p3 - p1 - p2, computed
// with two extra bits and clamped to [0, 1] (rounding in the products can
// put sin(theta) an LSB below zero near theta = 0).
// Phase mirror: with the octant k of the phase (from angle_mapper, which
// already mirrored theta inside odd octants),
//   swap cos/sin when k is 1, 2, 5 or 6  (k[0] xor k[1])
//   negate cos   when k is 2, 3, 4 or 5  (k[1] xor k[2])
//   negate sin   when k is 4, 5, 6 or 7  (k[2])
// Outputs are N+1 bits, two's complement with N fractional bits (one sign
// bit, as in the published design); +1.0 is not representable and saturates to
// 1 - 2^-N, -1.0 is exact. The equations follow the published design; the octant
// code, clamping and output format are this design's choices.
// Purely combinational.
module combine_mirror #(
  parameter int unsigned N = 16
) (
  input  logic [2:0]       octant,
  input  logic [N-1:0]     p1,
  input  logic [3*N/4-1:0] p2,
  input  logic [N:0]       p3,
  output logic [N:0]       cos_o,
  output logic [N:0]       sin_o
);

  localparam logic signed [N+2:0] ONE = (N+3)'(1) << N;

  logic signed [N+2:0] c_raw, s_raw;
  logic signed [N+2:0] c_th, s_th;     // cos(theta), sin(theta) in [0, 1]
  logic signed [N+2:0] x, y;
  logic                swap, cneg, sneg;

  function automatic logic signed [N+2:0] clamp01(input logic signed [N+2:0] v);
    if (v < 0)   return '0;
    if (v > ONE) return ONE;
    return v;
  endfunction

  function automatic logic [N:0] to_out(input logic signed [N+2:0] mag, input logic neg);
    logic signed [N+2:0] v;
    v = neg ? -mag : ((mag == ONE) ? ONE - 1 : mag);
    return v[N:0];
  endfunction

  always_comb begin
    c_raw = $signed((N+3)'(p1)) - $signed((N+3)'(p2));
    s_raw = $signed((N+3)'(p3)) - $signed((N+3)'(p1)) - $signed((N+3)'(p2));
    c_th  = clamp01(c_raw);
    s_th  = clamp01(s_raw);
    swap  = octant[0] ^ octant[1];
    cneg  = octant[1] ^ octant[2];
    sneg  = octant[2];
    x     = swap ? s_th : c_th;
    y     = swap ? c_th : s_th;
    cos_o = to_out(x, cneg);
    sin_o = to_out(y, sneg);
  end

endmodule
