// tb_clarke_transform: self-checking testbench for the abc -> alpha beta
// gamma projection. Random phase voltages (and balanced three-phase sets)
// are compared with the transform evaluated in floating point, rounded to
// Q2.14 and saturated; a balanced set must give a vector of the phase
// amplitude pointing at the phase of v_a. Latency: one clock.
module tb_clarke_transform;
  import strf_pkg::*;

  localparam int  N  = 4000;
  localparam real PI = 3.14159265358979;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  word_t v_a = '0, v_b = '0, v_c = '0;
  logic  out_valid;
  word_t v_alpha, v_beta, v_gamma;

  always #5 clk = ~clk;

  clarke_transform dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .v_a(v_a), .v_b(v_b), .v_c(v_c),
    .out_valid(out_valid), .v_alpha(v_alpha), .v_beta(v_beta), .v_gamma(v_gamma)
  );

  int checks = 0, failures = 0;
  int tick = 0;
  int t_first_in = -1, t_first_out = -1;
  int n_sat = 0;
  real qa[$], qb[$], qg[$];

  always @(posedge clk) tick++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic real sat(input real v);
    if (v > 32767.0 / 16384.0) return 32767.0 / 16384.0;
    if (v < -2.0) return -2.0;
    return v;
  endfunction

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      real ea, eb, eg, ga, gb, gg;
      if (t_first_out < 0) t_first_out = tick;
      ea = qa.pop_front();
      eb = qb.pop_front();
      eg = qg.pop_front();
      ga = real'(v_alpha) / 16384.0;
      gb = real'(v_beta) / 16384.0;
      gg = real'(v_gamma) / 16384.0;
      check((ga - ea < 1.5 / 16384.0) && (ea - ga < 1.5 / 16384.0), $sformatf("alpha got %f exp %f", ga, ea));
      check((gb - eb < 1.5 / 16384.0) && (eb - gb < 1.5 / 16384.0), $sformatf("beta got %f exp %f", gb, eb));
      check((gg - eg < 1.5 / 16384.0) && (eg - gg < 1.5 / 16384.0), $sformatf("gamma got %f exp %f", gg, eg));
    end
  end

  task automatic drive(input word_t av, input word_t bv, input word_t cv);
    real a, b, c, al, be, ga;
    @(negedge clk);
    in_valid = 1'b1;
    v_a = av;
    v_b = bv;
    v_c = cv;
    a = real'(av) / 16384.0;
    b = real'(bv) / 16384.0;
    c = real'(cv) / 16384.0;
    al = 2.0 / 3.0 * (a - 0.5 * b - 0.5 * c);
    be = 2.0 / 3.0 * ($sqrt(3.0) / 2.0) * (b - c);
    ga = 2.0 / 3.0 / $sqrt(2.0) * (a + b + c);
    if (sat(al) != al || sat(be) != be || sat(ga) != ga) n_sat++;
    qa.push_back(sat(al));
    qb.push_back(sat(be));
    qg.push_back(sat(ga));
    if (t_first_in < 0) t_first_in = tick;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    drive(16'sh7fff, 16'sh8000, 16'sh8000);   // alpha saturates
    drive(16'sh7fff, 16'sh7fff, 16'sh7fff);
    for (int n = 0; n < N; n++) begin
      if (n % 2 == 0) drive(word_t'($urandom), word_t'($urandom), word_t'($urandom));
      else begin
        real p, amp;
        p = real'(n) * 0.0314;
        amp = 0.2 + real'($urandom_range(1000)) / 1000.0;
        drive(word_t'($rtoi(16384.0 * amp * $cos(p))),
              word_t'($rtoi(16384.0 * amp * $cos(p - 2.0 * PI / 3.0))),
              word_t'($rtoi(16384.0 * amp * $cos(p + 2.0 * PI / 3.0))));
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    // a balanced 1 p.u. set at 30 degrees: alpha = cos 30, beta = sin 30, gamma = 0
    drive(word_t'($rtoi(16384.0 * $cos(PI / 6.0))),
          word_t'($rtoi(16384.0 * $cos(PI / 6.0 - 2.0 * PI / 3.0))),
          word_t'($rtoi(16384.0 * $cos(PI / 6.0 + 2.0 * PI / 3.0))));
    @(negedge clk);
    in_valid = 1'b0;
    check((v_alpha - 16'sd14189) < 3 && (16'sd14189 - v_alpha) < 3, "balanced alpha = cos 30");
    check((v_beta - 16'sd8192) < 3 && (16'sd8192 - v_beta) < 3, "balanced beta = sin 30");
    check(v_gamma < 3 && v_gamma > -3, "balanced gamma = 0");
    repeat (4) @(negedge clk);
    check(qa.size() == 0, "every input produced an output");
    check(t_first_out - t_first_in == 1, $sformatf("latency %0d, expected 1", t_first_out - t_first_in));
    check(n_sat > 100, "saturation exercised");
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
