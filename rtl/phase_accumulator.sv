// phase_accumulator: radian phase accumulator of the DDFS.
//
// Every clock the frequency control word fcw is added to the phase, and the
// sum is brought back into [0, 2*pi) by subtracting 2*pi once when it reaches
// 2*pi. The phase is a radian value with N fractional bits and 3 integer bits
// (2*pi < 8), i.e. N+3 bits, and fcw is a radian step with N fractional bits
// and one integer bit (N+1 bits, 0 < fcw < pi/2); these widths are the ones
// of the block diagram. Reading both words as radians, so that the wrap is at
// the constant round(2*pi * 2^N) rather than at a power of two, is this
// design's reading of the diagram (the angle mapper and the Taylor terms
// downstream work on radians). The output frequency is therefore
// f_out = fcw * 2^-N / (2*pi) * f_clk.
//
// Interface and timing: phase is the register output; it changes on every
// rising clk edge (phase(k+1) = (phase(k) + fcw) mod 2*pi). rst_n is an
// asynchronous, active-low reset to phase 0 (reset is this design's choice).
// A changed fcw takes effect on the next edge with no phase jump.
module phase_accumulator
  import tltl_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N:0]   fcw,
  output logic [N+2:0] phase
);

  localparam logic [N+3:0] TWO_PI = (N+4)'(kpi4(8, N));

  logic [N+3:0] sum;
  logic [N+3:0] wrapped;

  always_comb begin
    sum     = {1'b0, phase} + (N+4)'(fcw);
    wrapped = (sum >= TWO_PI) ? sum - TWO_PI : sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= wrapped[N+2:0];
  end

  // The control word must stay below pi/2, so one subtraction always suffices.
  a_fcw_range: assert property (@(posedge clk) disable iff (!rst_n)
                                fcw < (N+1)'(kpi4(2, N)));

endmodule
