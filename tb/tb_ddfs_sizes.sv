// tb_ddfs_sizes: runs the synthesizer at other output precisions than the
// default, N = 12, 20 and 24, side by side from one clock. Each instance gets
// a control word near 0.37 rad per sample (a few 1000 samples cover many
// periods and all octants); after every clock both outputs of each instance
// are compared with cos/sin of a reference phase kept in integers, within
// 4 LSB of that instance's precision.
module tb_ddfs_sizes;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 4.0;
  localparam int CYCLES = 5000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  logic [12:0] fcw12;
  logic [20:0] fcw20;
  logic [24:0] fcw24;
  logic [12:0] c12, s12;
  logic [20:0] c20, s20;
  logic [24:0] c24, s24;

  int checks = 0, failures = 0;
  longint ph[3], step[3], wrap[3];
  int nbits[3] = '{12, 20, 24};

  tltl_ddfs #(.N(12)) u12 (.clk(clk), .rst_n(rst_n), .fcw(fcw12), .cos_o(c12), .sin_o(s12));
  tltl_ddfs #(.N(20)) u20 (.clk(clk), .rst_n(rst_n), .fcw(fcw20), .cos_o(c20), .sin_o(s20));
  tltl_ddfs #(.N(24)) u24 (.clk(clk), .rst_n(rst_n), .fcw(fcw24), .cos_o(c24), .sin_o(s24));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic cmp(int i, real c, real s);
    real lsb, ec, es;
    lsb = 2.0 ** (-nbits[i]);
    ec = c - $cos(real'(ph[i]) * lsb) / lsb;
    es = s - $sin(real'(ph[i]) * lsb) / lsb;
    checks++;
    if (rabs(ec) > TOL || rabs(es) > TOL) begin
      failures++;
      if (failures < 10) $display("N=%0d phase %0d: errors %f %f LSB", nbits[i], ph[i], ec, es);
    end
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin
      wrap[i] = longint'($floor(2.0 * PI * (2.0 ** nbits[i]) + 0.5));
      step[i] = longint'($floor(0.3718 * (2.0 ** nbits[i])));
      ph[i]   = 0;
    end
    fcw12 = 13'(step[0]);
    fcw20 = 21'(step[1]);
    fcw24 = 25'(step[2]);
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int k = 0; k < CYCLES; k++) begin
      @(posedge clk);
      for (int i = 0; i < 3; i++) begin
        ph[i] += step[i];
        if (ph[i] >= wrap[i]) ph[i] -= wrap[i];
      end
      #1;
      cmp(0, real'($signed(c12)), real'($signed(s12)));
      cmp(1, real'($signed(c20)), real'($signed(s20)));
      cmp(2, real'($signed(c24)), real'($signed(s24)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
