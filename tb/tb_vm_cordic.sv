// tb_vm_cordic: self-checking testbench for the vectoring-mode CORDIC.
// Random vectors from all four quadrants (plus the axes and a few vectors
// long enough to saturate the magnitude output) go in one per clock; each
// result is compared with sqrt(x^2 + y^2) and atan2(y, x) computed in
// floating point. The pipeline latency (ITER + 2 clocks) is checked too.
module tb_vm_cordic;
  import strf_pkg::*;

  localparam int unsigned ITER = 16;
  localparam int          LAT  = ITER + 2;
  localparam int          N    = 4000;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  word_t x_in = '0, y_in = '0;
  logic  out_valid;
  word_t mag, phase;

  always #5 clk = ~clk;

  vm_cordic #(.ITER(ITER)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .y_in(y_in),
    .out_valid(out_valid), .mag(mag), .phase(phase)
  );

  int checks = 0, failures = 0;
  int tick = 0;                 // rising edges seen so far
  int t_first_in = -1, t_first_out = -1;
  int quad[4] = '{0, 0, 0, 0};
  real qx[$], qy[$];

  always @(posedge clk) tick++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // output monitor
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      real ex, ey, r, a, gm, gp, tol_p, d;
      if (t_first_out < 0) t_first_out = tick;
      ex = qx.pop_front();
      ey = qy.pop_front();
      r  = $sqrt(ex * ex + ey * ey);
      a  = $atan2(ey, ex);
      gm = real'(mag) / 16384.0;
      gp = real'(phase) / 8192.0;
      if (r >= 32767.0 / 16384.0) check(mag == 16'sh7fff, $sformatf("saturated mag %0d", mag));
      else check(((gm - r) < 4.0 / 16384.0) && ((r - gm) < 4.0 / 16384.0),
                 $sformatf("mag x=%f y=%f got %f exp %f", ex, ey, gm, r));
      if (r > 0.01) begin
        tol_p = 4.0 / 8192.0 + 2.0 / (r * 16384.0);
        d = gp - a;
        // +pi and -pi are the same angle
        if (d > 3.14159) d -= 2.0 * 3.14159265358979;
        if (d < -3.14159) d += 2.0 * 3.14159265358979;
        check((d < tol_p) && (-d < tol_p),
              $sformatf("phase x=%f y=%f got %f exp %f", ex, ey, gp, a));
      end
    end
  end

  task automatic drive(input word_t xv, input word_t yv);
    @(negedge clk);
    in_valid = 1'b1;
    x_in = xv;
    y_in = yv;
    qx.push_back(real'(xv) / 16384.0);
    qy.push_back(real'(yv) / 16384.0);
    if (t_first_in < 0) t_first_in = tick;
    quad[{xv[DW-1], yv[DW-1]}]++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // axes and corners
    drive(16'sd16384, 16'sd0);
    drive(-16'sd16384, 16'sd0);
    drive(16'sd0, 16'sd16384);
    drive(16'sd0, -16'sd16384);
    drive(-16'sd16384, -16'sd1);
    drive(16'sh7fff, 16'sh7fff);     // length 2.83: magnitude saturates
    drive(16'sh8000, 16'sh8000);
    for (int n = 0; n < N; n++) drive(word_t'($urandom), word_t'($urandom));
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    check(qx.size() == 0, "every input produced an output");
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
