// strf_phase_estimator: phase-angle estimator for synchronising a
// grid-connected converter with a three-phase grid, built entirely from
// shift-add CORDIC arithmetic on the stationary (alpha-beta) reference frame.
//
// Signal chain (one grid sample per clock with in_valid):
//   v_a, v_b, v_c -> clarke_transform -> v_alpha, v_beta
//     -> lpf (one per component)  : removes harmonics, lags both by phi
//     -> normalizer               : VM CORDIC |v| and two dividers give
//                                   cos(theta - phi), sin(theta - phi)
//     -> rm_cordic by phi_comp    : delay compensator, gives cos theta, sin theta
//     -> atan_cordic              : theta = atan2(sin theta, cos theta)
// The chain and the role of each stage follow the estimator's block diagram
// and its hardware model with 16-bit words; the filter type, the fixed-point
// formats, the iteration count and the pipelining are this design's choices.
//
// phi_comp is the filter's phase lag at the grid frequency, supplied by the
// user (Q3.13 radians). For the first-order lpf with a = 2^-LPF_SHIFT and
// w = 2*pi*f_grid/f_sample: phi = atan2((1 - a) sin w, 1 - (1 - a) cos w).
// Setting phi_comp = 0 skips the compensation (as does LPF_SHIFT = 0, which
// removes the filtering).
//
// Interface: all voltages Q2.14 (1 p.u. = 16384), angles Q3.13 radians.
// v_alpha_lp, v_beta_lp and v_gamma are the filtered stationary components
// and the zero-sequence component, for monitoring; they appear 2 clocks
// after the sample, with lp_valid. cos_theta, sin_theta and theta appear together, with
// out_valid, LATENCY = 1 + 1 + (ITER+19) + (ITER+2) + (ITER+2) = 73 clocks
// after the sample at the default ITER = 16. zero_vec marks outputs computed
// from a zero alpha-beta vector (cos_theta = sin_theta = 0, theta = 0).
// Throughput: one sample per clock; samples may come at any lower rate.
module strf_phase_estimator
  import strf_pkg::*;
#(
  parameter int unsigned LPF_SHIFT = 3,    // filter pole at 1 - 2^-LPF_SHIFT
  parameter int unsigned ITER      = 16    // CORDIC micro-rotations
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t v_a,
  input  word_t v_b,
  input  word_t v_c,
  input  word_t phi_comp,
  output logic  lp_valid,
  output word_t v_alpha_lp,
  output word_t v_beta_lp,
  output word_t v_gamma,
  output logic  out_valid,
  output word_t cos_theta,
  output word_t sin_theta,
  output word_t theta,
  output word_t v_mag,
  output logic  zero_vec
);

  localparam int unsigned AL = ITER + 2;   // atan_cordic latency

  // ---- abc -> alpha beta gamma --------------------------------------------
  logic  ab_valid;
  word_t v_alpha, v_beta, v_gamma_ab;
  clarke_transform u_clarke (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .v_a      (v_a),
    .v_b      (v_b),
    .v_c      (v_c),
    .out_valid(ab_valid),
    .v_alpha  (v_alpha),
    .v_beta   (v_beta),
    .v_gamma  (v_gamma_ab)
  );

  // gamma is only monitored; one register aligns it with the filter outputs
  always_ff @(posedge clk) v_gamma <= v_gamma_ab;

  // ---- filters --------------------------------------------------------------
  logic lp_b_valid;
  lpf #(.SHIFT(LPF_SHIFT)) u_lpf_alpha (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (ab_valid),
    .x        (v_alpha),
    .out_valid(lp_valid),
    .y        (v_alpha_lp)
  );
  lpf #(.SHIFT(LPF_SHIFT)) u_lpf_beta (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (ab_valid),
    .x        (v_beta),
    .out_valid(lp_b_valid),
    .y        (v_beta_lp)
  );

  // ---- normalisation --------------------------------------------------------
  logic  n_valid, n_zero;
  word_t n_cos, n_sin, n_mag;
  normalizer #(.ITER(ITER)) u_norm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (lp_valid),
    .v_alpha  (v_alpha_lp),
    .v_beta   (v_beta_lp),
    .out_valid(n_valid),
    .cos_out  (n_cos),
    .sin_out  (n_sin),
    .mag      (n_mag),
    .zero_vec (n_zero)
  );

  // ---- delay compensation ---------------------------------------------------
  logic  r_valid;
  word_t r_cos, r_sin;
  rm_cordic #(.ITER(ITER)) u_rm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (n_valid),
    .x_in     (n_cos),
    .y_in     (n_sin),
    .phase_in (phi_comp),
    .out_valid(r_valid),
    .x_out    (r_cos),
    .y_out    (r_sin)
  );

  // ---- phase angle ----------------------------------------------------------
  atan_cordic #(.ITER(ITER)) u_atan (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (r_valid),
    .x_in     (r_cos),
    .y_in     (r_sin),
    .out_valid(out_valid),
    .phase    (theta)
  );

  // cos/sin wait for theta; magnitude and zero flag wait for both CORDICs
  localparam int unsigned ML = 2 * (ITER + 2);
  word_t cos_dly [AL];
  word_t sin_dly [AL];
  word_t mag_dly [ML];
  logic  zero_dly [ML];
  always_ff @(posedge clk) begin
    cos_dly[0]  <= r_cos;
    sin_dly[0]  <= r_sin;
    mag_dly[0]  <= n_mag;
    zero_dly[0] <= n_zero;
    for (int i = 1; i < AL; i++) begin
      cos_dly[i] <= cos_dly[i-1];
      sin_dly[i] <= sin_dly[i-1];
    end
    for (int i = 1; i < ML; i++) begin
      mag_dly[i]  <= mag_dly[i-1];
      zero_dly[i] <= zero_dly[i-1];
    end
  end
  assign cos_theta = cos_dly[AL-1];
  assign sin_theta = sin_dly[AL-1];
  assign v_mag     = mag_dly[ML-1];
  assign zero_vec  = zero_dly[ML-1];

  // the two filter channels run in lockstep
  a_lpf_lockstep: assert property (@(posedge clk) disable iff (!rst_n) lp_valid == lp_b_valid);

endmodule
