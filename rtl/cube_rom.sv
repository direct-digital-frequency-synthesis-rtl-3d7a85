// cube_rom: gamma^3/6 ROM of the DDFS, (N/4-2) x 2^(N/4) bits.
//
// gamma is the N/4 most significant bits of beta, so gamma < 2^-(N/4) and
// gamma^3/6 < 2^-(3N/4+2): the upper 3N/4+2 of its N fractional bits are
// always zero and only the low N/4-2 bits are stored. The output cube6 is
// therefore gamma^3/6 with LSB weight 2^-N, rounded to nearest
// (round(g^3 / (6 * 2^(N/2))) for gamma = g * 2^-(N/2)). Table size and the
// dropped leading zeros follow the published design; rounding to nearest is this
// design's choice. Filled at elaboration, combinational read.
module cube_rom
  import tltl_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N/4-1:0] gamma,
  output logic [N/4-3:0] cube6
);

  localparam int unsigned DEPTH = 1 << (N / 4);
  localparam int unsigned W     = N / 4 - 2;

  function automatic logic [DEPTH-1:0][W-1:0] fill();
    logic [DEPTH-1:0][W-1:0] t;
    for (int unsigned g = 0; g < DEPTH; g++) t[g] = W'(cube_entry(g, N));
    return t;
  endfunction

  localparam logic [DEPTH-1:0][W-1:0] TABLE = fill();

  assign cube6 = TABLE[gamma];

endmodule
