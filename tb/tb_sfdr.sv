// tb_sfdr: spurious-free dynamic range of the synthesizer (N = 16) at output
// frequencies across 1 kHz .. 10 MHz with a 100 MHz clock.
//
// Method: the accumulator wraps at P = round(2*pi*2^N) = 411775, so for a
// control word fcw the output sequence repeats exactly after
// M = P / gcd(fcw, P) samples. One full period is captured and its exact DFT
// (no window is needed: the fundamental sits on a bin and there is no
// leakage) is computed for bins 1..M/2. SFDR = fundamental bin power over the
// largest other bin (DC excluded), for the cos and the sin output separately.
// The control words are chosen so that M is short: fcw = 25 (about 6.1 kHz,
// M = 16471) and fcw = 175*K (M = 2353), K = 1, 24, 235 (about 42.5 kHz,
// 1.02 MHz and 9.99 MHz). Each measured SFDR must reach 100 dBc; the values
// are printed.
module tb_sfdr;
  localparam int N = 16;
  localparam real PI = 3.14159265358979323846;
  localparam real LSB = 2.0 ** (-N);
  localparam real F_CLK = 100.0e6;
  localparam real MIN_SFDR = 100.0;
  localparam int MAXM = 16471;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [N:0] fcw = '0;
  logic [N:0] cos_o, sin_o;

  int checks = 0, failures = 0;
  longint two_pi_q;
  real xc[MAXM];
  real xs[MAXM];
  real tw_c[MAXM];
  real tw_s[MAXM];

  tltl_ddfs dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .cos_o(cos_o), .sin_o(sin_o));

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint gcd(longint a, longint b);
    while (b != 0) begin
      longint t;
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic real db(real p);
    return 10.0 * $ln(p) / $ln(10.0);
  endfunction

  task automatic measure(longint f);
    int m, k0, idx;
    real rc, ic, rs, is_, pc, ps, fund_c, fund_s, spur_c, spur_s, sfdr_c, sfdr_s;
    m  = int'(two_pi_q / gcd(f, two_pi_q));
    k0 = int'((f * longint'(m)) / two_pi_q);     // cycles per period = fundamental bin
    // restart from phase 0 and capture one period
    rst_n = 1'b0;
    fcw   = (N+1)'(f);
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int n = 0; n < m; n++) begin
      xc[n] = real'($signed(cos_o));
      xs[n] = real'($signed(sin_o));
      @(posedge clk);
      #1;
    end
    for (int n = 0; n < m; n++) begin
      tw_c[n] = $cos(2.0 * PI * real'(n) / real'(m));
      tw_s[n] = $sin(2.0 * PI * real'(n) / real'(m));
    end
    fund_c = 0.0; fund_s = 0.0; spur_c = 0.0; spur_s = 0.0;
    for (int k = 1; k <= m / 2; k++) begin
      rc = 0.0; ic = 0.0; rs = 0.0; is_ = 0.0;
      idx = 0;
      for (int n = 0; n < m; n++) begin
        rc  += xc[n] * tw_c[idx];
        ic  -= xc[n] * tw_s[idx];
        rs  += xs[n] * tw_c[idx];
        is_ -= xs[n] * tw_s[idx];
        idx += k;
        if (idx >= m) idx -= m;
      end
      pc = rc * rc + ic * ic;
      ps = rs * rs + is_ * is_;
      if (k == k0) begin fund_c = pc; fund_s = ps; end
      else begin
        if (pc > spur_c) spur_c = pc;
        if (ps > spur_s) spur_s = ps;
      end
    end
    sfdr_c = db(fund_c / spur_c);
    sfdr_s = db(fund_s / spur_s);
    $display("fcw %0d  f_out %0.1f Hz  M %0d  SFDR cos %0.1f dBc  sin %0.1f dBc",
             f, real'(f) * LSB / (2.0 * PI) * F_CLK, m, sfdr_c, sfdr_s);
    checks++;
    if (sfdr_c < MIN_SFDR || sfdr_s < MIN_SFDR) failures++;
  endtask

  initial begin
    two_pi_q = longint'($floor(2.0 * PI / LSB + 0.5));
    repeat (2) @(posedge clk);
    measure(25);
    measure(175);
    measure(175 * 24);
    measure(175 * 235);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
