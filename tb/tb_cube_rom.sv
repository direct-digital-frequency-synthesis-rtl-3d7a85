// tb_cube_rom: checks every entry of the gamma^3/6 ROM against
// round(gamma^3/6 * 2^N) from real arithmetic, gamma = g * 2^-(N/2), and that
// the value fits the N/4-2 stored bits.
module tb_cube_rom;
  localparam int N = 16;
  logic [N/4-1:0] gamma;
  logic [N/4-3:0] cube6;
  int checks = 0, failures = 0;
  longint expv;
  real g;

  cube_rom dut (.gamma(gamma), .cube6(cube6));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << (N / 4)); a++) begin
      gamma = (N/4)'(a);
      #1;
      g = real'(a) / (2.0 ** (N / 2));
      expv = longint'($floor(g * g * g / 6.0 * (2.0 ** N) + 0.5));
      checks++;
      if (longint'(cube6) != expv || expv >= (longint'(1) << (N / 4 - 2))) begin
        failures++;
        $display("gamma %0d: %0d expected %0d", a, cube6, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
