// cos_rom: COS ROM of the DDFS, N x 2^(N/4) bits.
//
// Addressed by alpha, the N/4 most significant bits of the folded angle
// theta (alpha = address * 2^-(N/4) rad), it returns cos(alpha) rounded to N
// fractional bits. cos(0) = 1.0 does not fit N fractional bits and is stored
// as 1 - 2^-N (this saturation is this design's choice). Entries whose
// alpha exceeds pi/4 are never addressed but hold the same function.
// The table is filled at elaboration from tltl_pkg::cos_entry; its size and
// content follow the published design. Combinational read.
module cos_rom
  import tltl_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N/4-1:0] alpha,
  output logic [N-1:0]   cos_alpha
);

  localparam int unsigned DEPTH = 1 << (N / 4);

  function automatic logic [DEPTH-1:0][N-1:0] fill();
    logic [DEPTH-1:0][N-1:0] t;
    for (int unsigned a = 0; a < DEPTH; a++) t[a] = N'(cos_entry(a, N));
    return t;
  endfunction

  localparam logic [DEPTH-1:0][N-1:0] TABLE = fill();

  assign cos_alpha = TABLE[alpha];

endmodule
