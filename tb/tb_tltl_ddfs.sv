// tb_tltl_ddfs: end-to-end test of the complete synthesizer at its default
// size (N = 16, no parameter override).
//
// The clock is taken as 100 MHz and the synthesizer is driven with the output
// frequencies 1 kHz, 10 kHz, 100 kHz, 1 MHz and 10 MHz in turn
// (fcw = round(2*pi * f/f_clk * 2^N)), then with the largest legal control
// word, switching fcw on the fly without reset. A reference phase
// (sum of fcw modulo round(2*pi*2^N), in integers) is kept alongside, and
// after every clock cos_o and sin_o are compared with cos/sin of that phase
// from real arithmetic, within 4 LSB. Because the model phase after the k-th
// edge is k*fcw, this also checks the one-sample-per-clock rate and the
// zero-cycle latency from the phase register to the outputs.
// Mechanisms counted, each required at least once: the 2*pi wrap of the
// accumulator, every one of the 8 octants, a mirrored (odd) octant, a
// frequency switch, and the saturated +1.0 output.
module tb_tltl_ddfs;
  localparam int N = 16;
  localparam real PI = 3.14159265358979323846;
  localparam real LSB = 2.0 ** (-N);
  localparam real F_CLK = 100.0e6;
  localparam real TOL = 4.0;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [N:0] fcw = '0;
  logic [N:0] cos_o, sin_o;

  int checks = 0, failures = 0;
  int wraps = 0, switches = 0, mirrored = 0, saturated = 0;
  int seen_oct[0:7];
  longint two_pi_q, model, fmax;
  real ec, es, max_err = 0.0;

  tltl_ddfs dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .cos_o(cos_o), .sin_o(sin_o));

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sval(logic [N:0] v);
    return real'($signed(v));
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check_sample();
    real ph;
    int oct;
    ph = real'(model) * LSB;
    ec = sval(cos_o) - $cos(ph) / LSB;
    es = sval(sin_o) - $sin(ph) / LSB;
    if (rabs(ec) > max_err) max_err = rabs(ec);
    if (rabs(es) > max_err) max_err = rabs(es);
    oct = int'($floor(ph / (PI / 4.0)));
    if (oct > 7) oct = 7;
    seen_oct[oct]++;
    if (oct % 2 == 1) mirrored++;
    if (cos_o == (N+1)'((1 << N) - 1) || sin_o == (N+1)'((1 << N) - 1)) saturated++;
    checks++;
    if (rabs(ec) > TOL || rabs(es) > TOL) begin
      failures++;
      if (failures < 10)
        $display("phase %0d: cos %0d sin %0d, errors %f %f LSB", model, $signed(cos_o), $signed(sin_o), ec, es);
    end
  endtask

  task automatic run(longint f, int cycles);
    if (longint'(fcw) != f) switches++;
    fcw = (N+1)'(f);
    for (int i = 0; i < cycles; i++) begin
      @(posedge clk);
      model = model + f;
      if (model >= two_pi_q) begin model = model - two_pi_q; wraps++; end
      #1;
      check_sample();
    end
  endtask

  real freqs[5] = '{1.0e3, 10.0e3, 100.0e3, 1.0e6, 10.0e6};

  initial begin
    for (int k = 0; k < 8; k++) seen_oct[k] = 0;
    two_pi_q = longint'($floor(2.0 * PI / LSB + 0.5));
    fmax     = longint'($floor(PI / 2.0 / LSB + 0.5)) - 1;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    model = 0;
    check_sample();                       // phase 0 after reset: cos = +1.0
    foreach (freqs[i]) begin
      longint f;
      int cyc;
      f = longint'($floor(2.0 * PI * freqs[i] / F_CLK / LSB + 0.5));
      cyc = int'(F_CLK / freqs[i]) + 10;  // one full period of the output
      if (cyc > 100_010) cyc = 100_010;
      if (cyc < 2000) cyc = 2000;
      run(f, cyc);
    end
    run(fmax, 1000);
    $display("max |error| %f LSB, wraps %0d, switches %0d, mirrored %0d, saturated %0d",
             max_err, wraps, switches, mirrored, saturated);
    checks++; if (wraps == 0)     begin failures++; $display("no 2*pi wrap"); end
    checks++; if (switches < 2)   begin failures++; $display("no frequency switch"); end
    checks++; if (mirrored == 0)  begin failures++; $display("no mirrored octant"); end
    checks++; if (saturated == 0) begin failures++; $display("no saturated +1.0"); end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (seen_oct[k] == 0) begin failures++; $display("octant %0d never reached", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
