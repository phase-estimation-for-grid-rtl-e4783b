// tb_atan_cordic: self-checking testbench for the arctangent CORDIC.
// Random vectors from all quadrants, including unit vectors at random
// angles as the estimator produces them, are compared with atan2(y, x) in
// floating point; the latency (ITER + 2 clocks) is checked too.
module tb_atan_cordic;
  import strf_pkg::*;

  localparam int unsigned ITER = 16;
  localparam int          LAT  = ITER + 2;
  localparam int          N    = 4000;
  localparam real         PI   = 3.14159265358979;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  word_t x_in = '0, y_in = '0;
  logic  out_valid;
  word_t phase;

  always #5 clk = ~clk;

  atan_cordic #(.ITER(ITER)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .y_in(y_in),
    .out_valid(out_valid), .phase(phase)
  );

  int checks = 0, failures = 0;
  int tick = 0;
  int t_first_in = -1, t_first_out = -1;
  int quad[4] = '{0, 0, 0, 0};
  real qa[$], qr[$];

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
      real a, r, g, d, tol;
      if (t_first_out < 0) t_first_out = tick;
      a = qa.pop_front();
      r = qr.pop_front();
      g = real'(phase) / 8192.0;
      if (r > 0.01) begin
        tol = 4.0 / 8192.0 + 2.0 / (r * 16384.0);
        d = g - a;
        if (d > PI - 0.001) d -= 2.0 * PI;
        if (d < -PI + 0.001) d += 2.0 * PI;
        check((d < tol) && (-d < tol), $sformatf("phase got %f exp %f", g, a));
      end
    end
  end

  task automatic drive(input word_t xv, input word_t yv);
    real x, y;
    @(negedge clk);
    in_valid = 1'b1;
    x_in = xv;
    y_in = yv;
    x = real'(xv) / 16384.0;
    y = real'(yv) / 16384.0;
    qa.push_back($atan2(y, x));
    qr.push_back($sqrt(x * x + y * y));
    quad[{xv[DW-1], yv[DW-1]}]++;
    if (t_first_in < 0) t_first_in = tick;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    drive(-16'sd16384, 16'sd1);
    drive(-16'sd16384, -16'sd1);
    drive(16'sd0, 16'sd100);
    for (int n = 0; n < N; n++) begin
      if (n % 2 == 0) begin
        real p;
        p = (real'($urandom_range(100000)) / 100000.0 - 0.5) * 2.0 * PI;
        drive(word_t'($rtoi(16384.0 * $cos(p))), word_t'($rtoi(16384.0 * $sin(p))));
      end else begin
        drive(word_t'($urandom), word_t'($urandom));
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    check(qa.size() == 0, "every input produced an output");
    check(t_first_out - t_first_in == LAT,
          $sformatf("latency %0d, expected %0d", t_first_out - t_first_in, LAT));
    for (int q = 0; q < 4; q++) check(quad[q] > 100, $sformatf("quadrant %0d exercised", q));
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
