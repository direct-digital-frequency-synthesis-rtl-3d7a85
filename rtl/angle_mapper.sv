// angle_mapper: the pi/4 angle mapper of the DDFS.
//
// Folds a phase in [0, 2*pi) onto the first octant. The phase is compared
// with the seven octant boundaries T(k) = round(k*pi/4 * 2^N), k = 1..7, which
// gives the octant number k (0..7). Inside an even octant the folded angle is
// the distance from the octant's start, theta = phase - T(k); inside an odd
// octant it is the distance to the octant's end, theta = T(k+1) - phase
// (T(8) = the accumulator's 2*pi). theta therefore always lies in [0, pi/4]
// and is N fractional bits wide, and the octant number is all the combining
// stage needs to swap and negate cos/sin of theta back to cos/sin of the
// phase.
//
// The published design gives the block's name and its port widths (N+3 in, 3 and N
// out); the compare-and-subtract structure and the octant/mirror convention
// are this design's own. Purely combinational.
module angle_mapper
  import tltl_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N+2:0] phase,
  output logic [2:0]   octant,
  output logic [N-1:0] theta
);

  logic [N+2:0] lo, hi;   // boundaries of the octant the phase lies in
  logic [N+2:0] diff;

  always_comb begin
    octant = 3'd0;
    for (int unsigned k = 1; k <= 7; k++) begin
      if (phase >= (N+3)'(kpi4(k, N))) octant = 3'(k);
    end
    lo = '0;
    hi = '0;
    for (int unsigned k = 0; k <= 7; k++) begin
      if (octant == 3'(k)) begin
        lo = (N+3)'(kpi4(k, N));
        hi = (N+3)'(kpi4(k + 1, N));
      end
    end
    diff  = octant[0] ? hi - phase : phase - lo;
    theta = diff[N-1:0];
  end

endmodule
