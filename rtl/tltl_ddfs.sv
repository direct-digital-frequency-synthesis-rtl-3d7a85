// tltl_ddfs: direct digital frequency synthesizer with a two-level
// table-lookup sin/cos generator.
//
// Data path (one sample per clock):
//   phase_accumulator  phase <- (phase + fcw) mod 2*pi, radians, N+3 bits
//   angle_mapper       octant (3 bits) and folded angle theta in [0, pi/4]
//   sincos_generator   two table levels + Taylor terms -> p1, p2, p3
//   combine_mirror     cos/sin(theta) = p1-p2, p3-p1-p2, unfolded by octant
// Only the phase register is clocked; everything after it is combinational,
// as in the published design, so cos_o/sin_o show cos/sin of the current phase
// register in the same cycle: after the k-th rising edge since reset they
// hold cos/sin(k*fcw mod 2*pi) (for a constant fcw). Output frequency is
// fcw * 2^-N / (2*pi) * f_clk.
//
// Ports: fcw is N+1 bits, a radian step with N fractional bits and
// 0 < fcw < pi/2. cos_o and sin_o are N+1-bit two's complement numbers with N
// fractional bits. rst_n resets the phase to 0 asynchronously.
// N = 16 is the published main configuration; N must be a multiple of 4 and
// at least 12.
module tltl_ddfs #(
  parameter int unsigned N = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [N:0] fcw,
  output logic [N:0] cos_o,
  output logic [N:0] sin_o
);

  logic [N+2:0]     phase;
  logic [2:0]       octant;
  logic [N-1:0]     theta;
  logic [N-1:0]     p1;
  logic [3*N/4-1:0] p2;
  logic [N:0]       p3;

  phase_accumulator #(.N(N)) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .fcw  (fcw),
    .phase(phase)
  );

  angle_mapper #(.N(N)) u_map (
    .phase (phase),
    .octant(octant),
    .theta (theta)
  );

  sincos_generator #(.N(N)) u_gen (
    .theta(theta),
    .p1   (p1),
    .p2   (p2),
    .p3   (p3)
  );

  combine_mirror #(.N(N)) u_comb (
    .octant(octant),
    .p1    (p1),
    .p2    (p2),
    .p3    (p3),
    .cos_o (cos_o),
    .sin_o (sin_o)
  );

endmodule
