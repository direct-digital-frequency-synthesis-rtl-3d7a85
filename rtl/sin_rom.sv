// sin_rom: SIN ROM of the DDFS, N x 2^(N/4) bits.
//
// Addressed by alpha, the N/4 most significant bits of the folded angle
// theta (alpha = address * 2^-(N/4) rad), it returns sin(alpha) rounded to N
// fractional bits. Entries whose
// alpha exceeds pi/4 are never addressed but hold the same function.
// The table is filled at elaboration from tltl_pkg::sin_entry; its size and
// content follow the published design. Combinational read.
module sin_rom
  import tltl_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N/4-1:0] alpha,
  output logic [N-1:0]   sin_alpha
);

  localparam int unsigned DEPTH = 1 << (N / 4);

  function automatic logic [DEPTH-1:0][N-1:0] fill();
    logic [DEPTH-1:0][N-1:0] t;
    for (int unsigned a = 0; a < DEPTH; a++) t[a] = N'(sin_entry(a, N));
    return t;
  endfunction

  localparam logic [DEPTH-1:0][N-1:0] TABLE = fill();

  assign sin_alpha = TABLE[alpha];

endmodule
