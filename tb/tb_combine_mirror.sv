// tb_combine_mirror: checks the combining equations and the octant unfolding.
// For random octants and p1/p2/p3 values (including sin(theta) slightly below
// zero and cos(theta) = 1.0) the expected outputs come from a table written
// out per octant (which of cos/sin of theta appears, with which sign), not
// from the XOR rules of the block. Every octant is exercised.
module tb_combine_mirror;
  localparam int N = 16;
  localparam int B = 3 * N / 4;
  localparam longint ONE = longint'(1) << N;

  logic [2:0]   octant;
  logic [N-1:0] p1;
  logic [B-1:0] p2;
  logic [N:0]   p3;
  logic [N:0]   cos_o, sin_o;
  int checks = 0, failures = 0;
  int seen[0:7];
  longint v1, v2, v3, c, s, ec, es;

  combine_mirror dut (.octant(octant), .p1(p1), .p2(p2), .p3(p3), .cos_o(cos_o), .sin_o(sin_o));

  function automatic longint outw(longint mag, bit neg);
    longint v;
    v = neg ? -mag : (mag >= ONE ? ONE - 1 : mag);
    return v & ((longint'(1) << (N + 1)) - 1);
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) seen[k] = 0;
    for (int i = 0; i < 20000; i++) begin
      v1 = longint'($urandom % ONE);
      v2 = longint'($urandom % (longint'(1) << B));
      if (v2 > v1) v2 = v1 / 2;
      v3 = v1 + v2 + longint'($urandom % (ONE / 2)) - 3;
      if (i % 50 == 0) v3 = v1 + v2 - 2;                // sin(theta) below zero
      if (i % 50 == 1) begin v1 = ONE - 1; v2 = 0; end  // cos(theta) close to 1
      if (v3 < 0) v3 = 0;
      p1 = N'(v1);
      p2 = B'(v2);
      p3 = (N+1)'(v3);
      octant = 3'($urandom % 8);
      seen[octant]++;
      #1;
      c = v1 - v2;
      s = v3 - v1 - v2;
      if (c < 0) c = 0;
      if (s < 0) s = 0;
      if (c > ONE) c = ONE;
      if (s > ONE) s = ONE;
      case (octant)
        3'd0: begin ec = outw(c, 0); es = outw(s, 0); end
        3'd1: begin ec = outw(s, 0); es = outw(c, 0); end
        3'd2: begin ec = outw(s, 1); es = outw(c, 0); end
        3'd3: begin ec = outw(c, 1); es = outw(s, 0); end
        3'd4: begin ec = outw(c, 1); es = outw(s, 1); end
        3'd5: begin ec = outw(s, 1); es = outw(c, 1); end
        3'd6: begin ec = outw(s, 0); es = outw(c, 1); end
        default: begin ec = outw(c, 0); es = outw(s, 1); end
      endcase
      checks++;
      if (longint'(cos_o) != ec || longint'(sin_o) != es) begin
        failures++;
        if (failures < 10)
          $display("oct %0d p %0d %0d %0d: cos %0h/%0h sin %0h/%0h", octant, v1, v2, v3, cos_o, ec, sin_o, es);
      end
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
