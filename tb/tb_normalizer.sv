// tb_normalizer: self-checking testbench for the normalisation stage.
// Random alpha-beta vectors with lengths from 0.05 to 1.9 p.u. (sags, swells
// and the attenuation of the filters all show up as such lengths) must come
// out as v / |v| and |v|, compared with floating point. A zero vector must
// give zero outputs and raise zero_vec. Latency: ITER + 2 + 17 clocks.
module tb_normalizer;
  import strf_pkg::*;

  localparam int unsigned ITER = 16;
  localparam int          LAT  = ITER + 2 + DW + 1;
  localparam int          N    = 4000;
  localparam real         PI   = 3.14159265358979;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  word_t v_alpha = '0, v_beta = '0;
  logic  out_valid, zero_vec;
  word_t cos_out, sin_out, mag;

  always #5 clk = ~clk;

  normalizer #(.ITER(ITER)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .v_alpha(v_alpha), .v_beta(v_beta),
    .out_valid(out_valid), .cos_out(cos_out), .sin_out(sin_out), .mag(mag), .zero_vec(zero_vec)
  );

  int checks = 0, failures = 0;
  int tick = 0;
  int t_first_in = -1, t_first_out = -1;
  int n_zero = 0;
  real qa[$], qb[$];

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
      real a, b, r, ec, es, gc, gs, gm, tol;
      if (t_first_out < 0) t_first_out = tick;
      a = qa.pop_front();
      b = qb.pop_front();
      r = $sqrt(a * a + b * b);
      if (r == 0.0) begin
        n_zero++;
        check(zero_vec && cos_out == 0 && sin_out == 0, "zero vector gives zero outputs");
      end else begin
        ec = a / r;
        es = b / r;
        gc = real'(cos_out) / 16384.0;
        gs = real'(sin_out) / 16384.0;
        gm = real'(mag) / 16384.0;
        tol = (3.0 + 4.0 / r) / 16384.0;
        check(!zero_vec, "zero_vec low");
        check((gc - ec < tol) && (ec - gc < tol), $sformatf("cos got %f exp %f (|v| %f)", gc, ec, r));
        check((gs - es < tol) && (es - gs < tol), $sformatf("sin got %f exp %f (|v| %f)", gs, es, r));
        check((gm - r < 4.0 / 16384.0) && (r - gm < 4.0 / 16384.0), $sformatf("mag got %f exp %f", gm, r));
      end
    end
  end

  task automatic drive(input real r, input real p);
    word_t av, bv;
    @(negedge clk);
    in_valid = 1'b1;
    av = word_t'($rtoi(16384.0 * r * $cos(p)));
    bv = word_t'($rtoi(16384.0 * r * $sin(p)));
    v_alpha = av;
    v_beta = bv;
    qa.push_back(real'(av) / 16384.0);
    qb.push_back(real'(bv) / 16384.0);
    if (t_first_in < 0) t_first_in = tick;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    drive(0.0, 0.0);
    drive(1.0, 0.0);
    drive(0.7, PI / 2.0);
    for (int n = 0; n < N; n++) begin
      drive(0.05 + real'($urandom_range(10000)) / 10000.0 * 1.85,
            (real'($urandom_range(100000)) / 100000.0 - 0.5) * 2.0 * PI);
      if (n % 500 == 0) drive(0.0, 0.0);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    check(qa.size() == 0, "every input produced an output");
    check(t_first_out - t_first_in == LAT,
          $sformatf("latency %0d, expected %0d", t_first_out - t_first_in, LAT));
    check(n_zero >= 2, "zero vector exercised");
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
