// tb_strf_phase_estimator: end-to-end, self-checking testbench of the whole
// phase estimator at its default parameters (16-bit words, LPF_SHIFT = 3,
// ITER = 16).
//
// A 50 Hz three-phase grid sampled at 10 kHz is generated in floating point
// and driven through a sequence of grid conditions: balanced 1 p.u.; the same
// with the delay compensation switched off (phi_comp = 0); a 50 degree phase
// jump; 0.3 p.u. of 5th and 6th harmonics on every phase; a single-phase
// fault (v_a = 0); a 0.3 p.u. voltage sag; a short outage (all phases 0);
// and samples arriving only every third clock.
//
// Every output sample is compared with a floating-point model of the same
// chain (Clarke transform, first-order filter, normalisation, rotation by
// phi_comp, atan2). Where the grid is balanced the estimate is also compared
// with the true grid angle. Each mechanism (compensation on and off, jump
// recovery, harmonics, fault, sag normalisation, zero-vector handling,
// sample gaps, all four quadrants of theta and the +-pi wrap) is counted and
// must occur at least once. The latency of 73 clocks is checked.
module tb_strf_phase_estimator;
  import strf_pkg::*;

  localparam real PI    = 3.14159265358979;
  localparam real FS    = 10000.0;
  localparam real FGRID = 50.0;
  localparam int  LAT   = 73;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  word_t v_a = '0, v_b = '0, v_c = '0, phi_comp = '0;
  logic  lp_valid, out_valid, zero_vec;
  word_t v_alpha_lp, v_beta_lp, v_gamma, cos_theta, sin_theta, theta, v_mag;

  always #5 clk = ~clk;

  strf_phase_estimator dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .v_a(v_a), .v_b(v_b), .v_c(v_c), .phi_comp(phi_comp),
    .lp_valid(lp_valid), .v_alpha_lp(v_alpha_lp), .v_beta_lp(v_beta_lp), .v_gamma(v_gamma),
    .out_valid(out_valid), .cos_theta(cos_theta), .sin_theta(sin_theta), .theta(theta),
    .v_mag(v_mag), .zero_vec(zero_vec)
  );

  // ---- bookkeeping -----------------------------------------------------------
  int checks = 0, failures = 0;
  int tick = 0;
  int t_first_in = -1, t_first_out = -1;

  typedef struct {
    real th_ref;      // model estimate
    real mag_ref;     // model filtered-vector length
    real th_true;     // true grid angle (only meaningful if true_chk)
    bit  true_chk;    // compare with the true angle too
    bit  model_chk;   // compare with the model
    int  scen;        // scenario number
  } exp_t;
  exp_t q[$];
  real  q_lpa[$], q_lpb[$], q_gam[$];   // filtered alpha, beta and gamma of the model

  typedef enum int {
    M_COMP, M_NOCOMP, M_JUMP, M_HARM, M_FAULT, M_SAG, M_ZERO, M_GAPS,
    M_Q0, M_Q1, M_Q2, M_Q3, M_WRAP, M_NUM
  } mech_e;
  int    mech [M_NUM];
  string mech_name [M_NUM] = '{"delay compensation on", "delay compensation off",
                              "50 deg jump recovered", "harmonics", "single-phase fault",
                              "sag normalised", "zero vector", "sample gaps",
                              "theta quadrant I", "theta quadrant II", "theta quadrant III",
                              "theta quadrant IV", "theta wraps at +-pi"};
  real max_err_harm = 0.0, max_err_fault = 0.0;
  int  jump_recover_samples = -1;
  real last_theta = 0.0;

  always @(posedge clk) tick++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic real wrap(input real d);
    real r;
    r = d;
    while (r > PI)   r -= 2.0 * PI;
    while (r <= -PI) r += 2.0 * PI;
    return r;
  endfunction

  function automatic real absr(input real d);
    return (d < 0.0) ? -d : d;
  endfunction

  // ---- monitor of the filtered and zero-sequence outputs ---------------------
  always @(negedge clk) begin
    if (rst_n && lp_valid) begin
      real ea, eb, eg;
      ea = q_lpa.pop_front();
      eb = q_lpb.pop_front();
      eg = q_gam.pop_front();
      check(absr(real'(v_alpha_lp) / 16384.0 - ea) < 4.0 / 16384.0 &&
            absr(real'(v_beta_lp) / 16384.0 - eb) < 4.0 / 16384.0,
            $sformatf("filtered alpha/beta %f %f, model %f %f",
                      real'(v_alpha_lp) / 16384.0, real'(v_beta_lp) / 16384.0, ea, eb));
      check(absr(real'(v_gamma) / 16384.0 - eg) < 2.0 / 16384.0,
            $sformatf("gamma %f, model %f", real'(v_gamma) / 16384.0, eg));
    end
  end

  // ---- output monitor --------------------------------------------------------
  int n_after_jump = 0;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      real g, gc, gs, d;
      if (t_first_out < 0) t_first_out = tick;
      e  = q.pop_front();
      g  = real'(theta) / 8192.0;
      gc = real'(cos_theta) / 16384.0;
      gs = real'(sin_theta) / 16384.0;
      if (zero_vec) begin
        // only a vanishing filtered vector may be flagged, and it gives zeros
        check(e.mag_ref < 2.0 / 16384.0 && theta == 0 && cos_theta == 0 && sin_theta == 0,
              $sformatf("zero vector (model length %f) gives zero outputs", e.mag_ref));
        mech[M_ZERO]++;
      end else if (e.model_chk && e.mag_ref > 0.05) begin
        d = wrap(g - e.th_ref);
        check(absr(d) < 0.002, $sformatf("scenario %0d: theta %f, model %f", e.scen, g, e.th_ref));
        check(absr(gc - $cos(e.th_ref)) < 0.002 && absr(gs - $sin(e.th_ref)) < 0.002,
              $sformatf("scenario %0d: cos/sin %f %f, model %f", e.scen, gc, gs, e.th_ref));
        check(absr(gc * gc + gs * gs - 1.0) < 0.002, "unit-length output vector");
        check(absr(real'(v_mag) / 16384.0 - e.mag_ref) < 0.002,
              $sformatf("scenario %0d: |v| %f, model %f", e.scen, real'(v_mag) / 16384.0, e.mag_ref));
        if (e.true_chk) begin
          d = wrap(g - e.th_true);
          check(absr(d) < 0.01, $sformatf("scenario %0d: theta %f, grid angle %f", e.scen, g, e.th_true));
        end
        // coverage
        if (g >= 0.0 && g < PI / 2) mech[M_Q0]++;
        else if (g >= PI / 2)       mech[M_Q1]++;
        else if (g < -PI / 2)       mech[M_Q2]++;
        else                        mech[M_Q3]++;
        if (last_theta > 2.5 && g < -2.5) mech[M_WRAP]++;
        last_theta = g;
        case (e.scen)
          1: mech[M_COMP]     += e.true_chk;
          2: mech[M_NOCOMP]   += e.true_chk;   // true angle here is grid - phi
          4: begin
               mech[M_HARM]++;
               if (absr(wrap(g - e.th_true)) > max_err_harm) max_err_harm = absr(wrap(g - e.th_true));
             end
          5: begin
               mech[M_FAULT]++;
               if (absr(wrap(g - e.th_true)) > max_err_fault) max_err_fault = absr(wrap(g - e.th_true));
             end
          6: if (e.true_chk && e.mag_ref < 0.7) mech[M_SAG]++;   // length below 0.7, output still unit
          7: if (e.true_chk) mech[M_GAPS]++;
          default: ;
        endcase
        if (e.scen == 3) begin
          n_after_jump++;
          if (jump_recover_samples < 0 && absr(wrap(g - e.th_true)) < 0.01) begin
            jump_recover_samples = n_after_jump;
            mech[M_JUMP]++;
          end
        end
      end
    end
  end

  // ---- grid model and floating-point reference -------------------------------
  real w = 2.0 * PI * FGRID / FS;   // grid angle step per sample
  real a = 1.0 / 8.0;               // filter coefficient 2^-LPF_SHIFT
  real grid_th = 0.0;               // grid phase of v_a
  real ya = 0.0, yb = 0.0;          // model filter states
  real phi_q = 0.0;                 // phi_comp as applied
  int  settle = 0;                  // samples left before true-angle checks

  // one grid sample: amplitudes per phase, harmonic level, gap clocks after it
  task automatic sample(input int scen, input real ka, input real kb, input real kc,
                        input real harm, input int gap, input bit true_ok);
    real va, vb, vc, al, be, r, th_model, th_true;
    word_t qa, qb, qc;
    exp_t e;
    va = ka * $cos(grid_th)
         + harm * ($cos(5.0 * grid_th) + $cos(6.0 * grid_th));
    vb = kb * $cos(grid_th - 2.0 * PI / 3.0)
         + harm * ($cos(5.0 * (grid_th - 2.0 * PI / 3.0)) + $cos(6.0 * (grid_th - 2.0 * PI / 3.0)));
    vc = kc * $cos(grid_th + 2.0 * PI / 3.0)
         + harm * ($cos(5.0 * (grid_th + 2.0 * PI / 3.0)) + $cos(6.0 * (grid_th + 2.0 * PI / 3.0)));
    qa = word_t'($rtoi(16384.0 * va));
    qb = word_t'($rtoi(16384.0 * vb));
    qc = word_t'($rtoi(16384.0 * vc));
    // model of the chain
    al = 2.0 / 3.0 * (real'(qa) - 0.5 * real'(qb) - 0.5 * real'(qc)) / 16384.0;
    be = (real'(qb) - real'(qc)) / $sqrt(3.0) / 16384.0;
    ya = ya + (al - ya) * a;
    yb = yb + (be - yb) * a;
    r = $sqrt(ya * ya + yb * yb);
    th_model = wrap($atan2(yb, ya) + phi_q);
    th_true = wrap(grid_th);
    e.th_ref    = th_model;
    e.mag_ref   = r;
    e.th_true   = (scen == 2) ? wrap(grid_th - ($atan2((1.0 - a) * $sin(w), 1.0 - (1.0 - a) * $cos(w)))) : th_true;
    e.true_chk  = true_ok && (settle == 0);
    e.model_chk = 1'b1;
    e.scen      = scen;
    if (settle > 0) settle--;
    // drive
    @(negedge clk);
    in_valid = 1'b1;
    v_a = qa;
    v_b = qb;
    v_c = qc;
    q.push_back(e);
    q_lpa.push_back(ya);
    q_lpb.push_back(yb);
    q_gam.push_back(2.0 / 3.0 / $sqrt(2.0) * (real'(qa) + real'(qb) + real'(qc)) / 16384.0);
    if (t_first_in < 0) t_first_in = tick;
    for (int i = 0; i < gap; i++) begin
      @(negedge clk);
      in_valid = 1'b0;
    end
    grid_th += w;
  endtask

  task automatic set_phi(input real p);
    // let the pipeline drain so no sample sees a mixed phi
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    phi_comp = word_t'($rtoi(p * 8192.0 + 0.5));
    phi_q = real'(phi_comp) / 8192.0;
  endtask

  initial begin
    real phi;
    for (int i = 0; i < M_NUM; i++) mech[i] = 0;
    phi = $atan2((1.0 - a) * $sin(w), 1.0 - (1.0 - a) * $cos(w));
    $display("filter lag at 50 Hz: %f rad", phi);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1: balanced 1 p.u., compensation on
    set_phi(phi);
    settle = 100;
    for (int n = 0; n < 600; n++) sample(1, 1.0, 1.0, 1.0, 0.0, 0, 1'b1);
    // 2: compensation off: estimate lags by phi
    set_phi(0.0);
    settle = 100;
    for (int n = 0; n < 400; n++) sample(2, 1.0, 1.0, 1.0, 0.0, 0, 1'b1);
    // 3: 50 degree phase jump
    set_phi(phi);
    grid_th += 50.0 * PI / 180.0;
    settle = 100;
    for (int n = 0; n < 400; n++) sample(3, 1.0, 1.0, 1.0, 0.0, 0, 1'b1);
    // 4: 0.3 p.u. of 5th and 6th harmonics
    for (int n = 0; n < 600; n++) sample(4, 1.0, 1.0, 1.0, 0.3, 0, 1'b0);
    // 5: single-phase fault, v_a = 0
    for (int n = 0; n < 600; n++) sample(5, 0.0, 1.0, 1.0, 0.0, 0, 1'b0);
    // 6: 0.3 p.u. voltage sag on all phases
    settle = 100;
    for (int n = 0; n < 600; n++) sample(6, 0.7, 0.7, 0.7, 0.0, 0, 1'b1);
    // outage: all phases at zero
    for (int n = 0; n < 200; n++) sample(8, 0.0, 0.0, 0.0, 0.0, 0, 1'b0);
    // 7: recovery with a sample only every third clock
    settle = 150;
    for (int n = 0; n < 600; n++) sample(7, 1.0, 1.0, 1.0, 0.0, 2, 1'b1);

    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    check(q.size() == 0 && q_lpa.size() == 0, "every sample produced an output");
    check(t_first_out - t_first_in == LAT,
          $sformatf("latency %0d, expected %0d", t_first_out - t_first_in, LAT));
    check(jump_recover_samples > 0 && jump_recover_samples < 100,
          $sformatf("50 deg jump tracked within %0d samples", jump_recover_samples));
    $display("largest angle error: harmonics %f rad, single-phase fault %f rad", max_err_harm, max_err_fault);
    $display("50 deg jump: estimate within 0.01 rad of the grid angle after %0d samples", jump_recover_samples);
    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %-26s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism '%s' happened", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
