// normalizer: turns the filtered alpha-beta vector into a unit vector,
//   cos_out = v_alpha / |v|,  sin_out = v_beta / |v|,  |v| = sqrt(v_alpha^2 + v_beta^2)
// so that the later angle computation no longer depends on the grid voltage
// amplitude (sags, swells, the filter's attenuation).
//
// How it works: a vectoring-mode CORDIC (vm_cordic) computes |v|; the two
// components are held in a delay line of the same length as the CORDIC and
// then divided by |v| in two pipelined dividers (fixed_divider). This
// arrangement of one vectoring CORDIC feeding two dividers follows the
// estimator's normalisation stage; the delay line that keeps the operands
// aligned is this design's.
// Interface: v_alpha, v_beta, cos_out, sin_out, mag Q2.14 (mag is |v|,
// aligned with cos_out/sin_out). A zero vector gives cos_out = sin_out = 0
// and raises zero_vec.
// Timing: one vector per clock; latency ITER+2 (CORDIC) + 17 (divider)
// = 35 clocks at the default ITER = 16.
module normalizer
  import strf_pkg::*;
#(
  parameter int unsigned ITER = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t v_alpha,
  input  word_t v_beta,
  output logic  out_valid,
  output word_t cos_out,
  output word_t sin_out,
  output word_t mag,
  output logic  zero_vec
);

  localparam int unsigned CL = ITER + 2;   // vm_cordic latency
  localparam int unsigned DL = DW + 1;     // fixed_divider latency

  logic  vm_valid;
  word_t vm_mag, vm_phase_unused;

  vm_cordic #(.ITER(ITER)) u_vm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x_in     (v_alpha),
    .y_in     (v_beta),
    .out_valid(vm_valid),
    .mag      (vm_mag),
    .phase    (vm_phase_unused)
  );

  // operands wait for the magnitude
  word_t a_dly [CL];
  word_t b_dly [CL];
  always_ff @(posedge clk) begin
    a_dly[0] <= v_alpha;
    b_dly[0] <= v_beta;
    for (int i = 1; i < CL; i++) begin
      a_dly[i] <= a_dly[i-1];
      b_dly[i] <= b_dly[i-1];
    end
  end

  // magnitude waits for the quotients
  word_t m_dly [DL];
  always_ff @(posedge clk) begin
    m_dly[0] <= vm_mag;
    for (int i = 1; i < DL; i++) m_dly[i] <= m_dly[i-1];
  end
  assign mag = m_dly[DL-1];

  logic dz_b, v_b;

  fixed_divider u_div_alpha (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (vm_valid),
    .a          (a_dly[CL-1]),
    .b          (vm_mag),
    .out_valid  (out_valid),
    .q          (cos_out),
    .div_by_zero(zero_vec)
  );

  fixed_divider u_div_beta (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (vm_valid),
    .a          (b_dly[CL-1]),
    .b          (vm_mag),
    .out_valid  (v_b),
    .q          (sin_out),
    .div_by_zero(dz_b)
  );

  // both dividers see the same divisor, so they must agree on timing and zero
  a_div_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                   (v_b == out_valid) && (!out_valid || dz_b == zero_vec));

endmodule
