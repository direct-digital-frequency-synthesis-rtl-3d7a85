// tb_phase_accumulator: self-checking test of the radian phase accumulator.
// A reference model (phase + fcw, minus round(2*pi*2^N) once it reaches that
// value, with 2*pi taken from the simulator's real arithmetic) is compared
// with the register after every clock. fcw is changed at random times within
// 0 < fcw < pi/2, including the largest legal word; reset is checked at the
// start. Counts wraps and requires at least one.
module tb_phase_accumulator;
  localparam int N = 16;
  localparam real PI = 3.14159265358979323846;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N:0]   fcw = '0;
  logic [N+2:0] phase;
  int checks = 0, failures = 0, wraps = 0;
  longint two_pi_q, fcw_max, model;

  phase_accumulator dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    two_pi_q = longint'($floor(2.0 * PI * (2.0 ** N) + 0.5));
    fcw_max  = longint'($floor(PI / 2.0 * (2.0 ** N) + 0.5)) - 1;
    fcw = (N+1)'(1000);
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (phase != 0) begin failures++; $display("phase not zero in reset"); end
    rst_n = 1'b1;
    model = 0;
    for (int i = 0; i < 20000; i++) begin
      if (i % 1000 == 0) fcw = (N+1)'(($urandom % fcw_max) + 1);
      if (i == 5000) fcw = (N+1)'(fcw_max);
      @(posedge clk);
      model = model + longint'(fcw);
      if (model >= two_pi_q) begin model = model - two_pi_q; wraps++; end
      #1;
      checks++;
      if (longint'(phase) != model) begin
        failures++;
        if (failures < 10) $display("cycle %0d: phase %0d expected %0d", i, phase, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no 2*pi wrap seen"); end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
