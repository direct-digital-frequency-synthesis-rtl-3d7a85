// tb_cos_rom: checks every entry of the COS ROM against $cos(alpha) from
// the simulator's real arithmetic, rounded to N fractional bits (1.0 clipped
// to 1 - 2^-N). A difference of more than one LSB is a failure; exact
// agreement is expected and the number of off-by-one entries is printed.
module tb_cos_rom;
  localparam int N = 16;
  logic [N/4-1:0] alpha;
  logic [N-1:0]   val;
  int checks = 0, failures = 0, off_by_one = 0;
  longint expv, diff;

  cos_rom dut (.alpha(alpha), .cos_alpha(val));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << (N / 4)); a++) begin
      alpha = (N/4)'(a);
      #1;
      expv = longint'($floor($cos(real'(a) / (2.0 ** (N / 4))) * (2.0 ** N) + 0.5));
      if (expv > (longint'(1) << N) - 1) expv = (longint'(1) << N) - 1;
      diff = longint'(val) - expv;
      checks++;
      if (diff > 1 || diff < -1) begin
        failures++;
        $display("alpha %0d: %0d expected %0d", a, val, expv);
      end else if (diff != 0) off_by_one++;
    end
    $display("off_by_one=%0d", off_by_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
