// tb_strf_unfiltered: the estimator with filtering and delay compensation
// switched off (LPF_SHIFT = 0, phi_comp = 0): Clarke transform,
// normalisation and arctangent only, the chain of the 16-bit hardware model.
// Two grid conditions are run: an ideal balanced 1 p.u. grid, and the same
// grid with a 0.3 p.u. sag on all phases for one grid period between two
// ideal periods. With no filter, the estimate must follow the grid angle
// sample by sample (within 0.003 rad) and the output vector must stay of
// unit length through the sag. The latency (73 clocks) is checked.
module tb_strf_unfiltered;
  import strf_pkg::*;

  localparam real PI  = 3.14159265358979;
  localparam real W   = 2.0 * PI * 50.0 / 10000.0;   // 50 Hz at 10 kHz
  localparam int  LAT = 73;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  word_t v_a = '0, v_b = '0, v_c = '0;
  logic  lp_valid, out_valid, zero_vec;
  word_t v_alpha_lp, v_beta_lp, v_gamma, cos_theta, sin_theta, theta, v_mag;

  always #5 clk = ~clk;

  strf_phase_estimator #(.LPF_SHIFT(0)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .v_a(v_a), .v_b(v_b), .v_c(v_c), .phi_comp(16'sd0),
    .lp_valid(lp_valid), .v_alpha_lp(v_alpha_lp), .v_beta_lp(v_beta_lp), .v_gamma(v_gamma),
    .out_valid(out_valid), .cos_theta(cos_theta), .sin_theta(sin_theta), .theta(theta),
    .v_mag(v_mag), .zero_vec(zero_vec)
  );

  int  checks = 0, failures = 0;
  int  tick = 0;
  int  t_first_in = -1, t_first_out = -1;
  int  n_sag = 0;
  real q_th[$], q_amp[$];

  always @(posedge clk) tick++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic real absr(input real d);
    return (d < 0.0) ? -d : d;
  endfunction

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      real e, amp, g, d, gc, gs;
      if (t_first_out < 0) t_first_out = tick;
      e   = q_th.pop_front();
      amp = q_amp.pop_front();
      g   = real'(theta) / 8192.0;
      gc  = real'(cos_theta) / 16384.0;
      gs  = real'(sin_theta) / 16384.0;
      d   = g - e;
      if (d > PI)   d -= 2.0 * PI;
      if (d <= -PI) d += 2.0 * PI;
      check(absr(d) < 0.003, $sformatf("theta %f, grid angle %f", g, e));
      check(absr(gc * gc + gs * gs - 1.0) < 0.002, "unit-length output vector");
      check(absr(real'(v_mag) / 16384.0 - amp) < 0.002,
            $sformatf("|v| %f, expected %f", real'(v_mag) / 16384.0, amp));
      if (amp < 0.8) n_sag++;
    end
  end

  task automatic sample(input int n, input real k);
    real th;
    th = W * real'(n);
    @(negedge clk);
    in_valid = 1'b1;
    v_a = word_t'($rtoi(16384.0 * k * $cos(th)));
    v_b = word_t'($rtoi(16384.0 * k * $cos(th - 2.0 * PI / 3.0)));
    v_c = word_t'($rtoi(16384.0 * k * $cos(th + 2.0 * PI / 3.0)));
    while (th > PI) th -= 2.0 * PI;
    q_th.push_back(th);
    q_amp.push_back(k);
    if (t_first_in < 0) t_first_in = tick;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // ideal grid, three periods
    for (int n = 0; n < 600; n++) sample(n, 1.0);
    // one ideal period, one period sagged to 0.7 p.u., one ideal period
    for (int n = 600; n < 1200; n++) sample(n, (n >= 800 && n < 1000) ? 0.7 : 1.0);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    check(q_th.size() == 0, "every sample produced an output");
    check(t_first_out - t_first_in == LAT,
          $sformatf("latency %0d, expected %0d", t_first_out - t_first_in, LAT));
    check(n_sag == 200, $sformatf("sagged samples seen: %0d", n_sag));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
