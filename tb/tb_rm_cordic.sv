// tb_rm_cordic: self-checking testbench for the rotation-mode CORDIC.
// Random vectors of length up to sqrt(2) are rotated by random angles over
// the whole input range [-4, 4) rad (so the wrap into [-pi, pi] and both
// coarse +-90 degree rotations are exercised); each result is compared with
// x cos(p) - y sin(p), x sin(p) + y cos(p) in floating point. The latency
// (ITER + 2 clocks) is checked too.
module tb_rm_cordic;
  import strf_pkg::*;

  localparam int unsigned ITER = 16;
  localparam int          LAT  = ITER + 2;
  localparam int          N    = 4000;
  localparam real         PI   = 3.14159265358979;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  word_t x_in = '0, y_in = '0, phase_in = '0;
  logic  out_valid;
  word_t x_out, y_out;

  always #5 clk = ~clk;

  rm_cordic #(.ITER(ITER)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .y_in(y_in),
    .phase_in(phase_in), .out_valid(out_valid), .x_out(x_out), .y_out(y_out)
  );

  int checks = 0, failures = 0;
  int tick = 0;
  int t_first_in = -1, t_first_out = -1;
  int n_wrap = 0, n_coarse_pos = 0, n_coarse_neg = 0;
  real qx[$], qy[$];

  always @(posedge clk) tick++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      real ex, ey, gx, gy;
      if (t_first_out < 0) t_first_out = tick;
      ex = qx.pop_front();
      ey = qy.pop_front();
      gx = real'(x_out) / 16384.0;
      gy = real'(y_out) / 16384.0;
      check((gx - ex < 5.0 / 16384.0) && (ex - gx < 5.0 / 16384.0),
            $sformatf("x got %f exp %f", gx, ex));
      check((gy - ey < 5.0 / 16384.0) && (ey - gy < 5.0 / 16384.0),
            $sformatf("y got %f exp %f", gy, ey));
    end
  end

  task automatic drive(input word_t xv, input word_t yv, input word_t pv);
    real x, y, p;
    @(negedge clk);
    in_valid = 1'b1;
    x_in = xv;
    y_in = yv;
    phase_in = pv;
    x = real'(xv) / 16384.0;
    y = real'(yv) / 16384.0;
    p = real'(pv) / 8192.0;
    if (p > PI || p < -PI) n_wrap++;
    else if (p > PI / 2) n_coarse_pos++;
    else if (p < -PI / 2) n_coarse_neg++;
    qx.push_back(x * $cos(p) - y * $sin(p));
    qy.push_back(x * $sin(p) + y * $cos(p));
    if (t_first_in < 0) t_first_in = tick;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    drive(16'sd16384, 16'sd0, 16'sd0);
    drive(16'sd16384, 16'sd0, 16'sd12868);     // +pi/2
    drive(16'sd16384, 16'sd0, -16'sd25736);    // -pi
    drive(16'sd0, 16'sd16384, 16'sh7fff);      // ~ +4 rad
    for (int n = 0; n < N; n++)
      drive(word_t'($signed($urandom_range(32768)) - 16384),
            word_t'($signed($urandom_range(32768)) - 16384),
            word_t'($urandom));
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    check(qx.size() == 0, "every input produced an output");
    check(t_first_out - t_first_in == LAT,
          $sformatf("latency %0d, expected %0d", t_first_out - t_first_in, LAT));
    check(n_wrap > 50 && n_coarse_pos > 50 && n_coarse_neg > 50, "angle ranges exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
