// vm_cordic: vectoring-mode CORDIC, fully pipelined. For an input vector
// (x, y) it returns the length R = sqrt(x^2 + y^2) and the angle
// atan2(y, x) in (-pi, pi].
//
// How it works: a coarse-rotation stage first moves the vector into the right
// half plane by a rotation of -90 or +90 degrees and preloads the angle
// accumulator with +pi/2 or -pi/2. ITER micro-rotation stages (cordic_stage,
// vectoring mode) then drive y to zero; x ends as K*R with the CORDIC gain
// K ~ 1.647, and z holds the angle. The last stage multiplies x by the
// constant 1/K, so R comes out gain-compensated, and rounds both results to
// the boundary formats. Shift-add iterations, the coarse rotation and gain
// compensation follow the algorithm as described for the estimator; the
// fully pipelined structure, the number of iterations and the formats are
// this design's choices.
//
// Interface: x_in, y_in Q2.14; mag Q2.14 (saturates at just under 2.0, so a
// vector longer than that reads as 1.99994); phase Q3.13 radians, 0 for a
// zero vector.
// Timing: one vector accepted every clock; results ITER+2 clocks after the
// input, flagged by out_valid.
module vm_cordic
  import strf_pkg::*;
#(
  parameter int unsigned ITER = 16   // number of micro-rotations
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t x_in,
  input  word_t y_in,
  output logic  out_valid,
  output word_t mag,
  output word_t phase
);

  if (ITER < 12 || ITER > 17) begin : g_bad_iter
    $error("vm_cordic: ITER must be between 12 and 17");
  end

  logic v  [ITER+1];
  cxy_t xs [ITER+1];
  cxy_t ys [ITER+1];
  cz_t  zs [ITER+1];

  // ---- coarse rotation into the right half plane --------------------------
  cxy_t xi, yi;
  always_comb begin
    xi = cxy_t'(x_in) <<< XGUARD;
    yi = cxy_t'(y_in) <<< XGUARD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  end

  // a zero vector has no direction: its angle is reported as 0, not as the
  // sum of elementary angles the iterations would leave behind
  logic zero_in [ITER+1];
  always_ff @(posedge clk) begin
    zero_in[0] <= (x_in == '0) && (y_in == '0);
    for (int i = 1; i <= ITER; i++) zero_in[i] <= zero_in[i-1];
  end

  always_ff @(posedge clk) begin
    if (!xi[XW-1]) begin
      xs[0] <= xi;  ys[0] <= yi;  zs[0] <= '0;
    end else if (!yi[XW-1]) begin   // second quadrant: rotate by -90 deg
      xs[0] <= yi;  ys[0] <= -xi; zs[0] <= HALF_PI_Z;
    end else begin                  // third quadrant: rotate by +90 deg
      xs[0] <= -yi; ys[0] <= xi;  zs[0] <= -HALF_PI_Z;
    end
  end

  // ---- micro-rotations ----------------------------------------------------
  for (genvar i = 0; i < ITER; i++) begin : g_stage
    cordic_stage #(.SHIFT(i), .MODE(CORDIC_VECTOR)) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v[i]),
      .x_in     (xs[i]),
      .y_in     (ys[i]),
      .z_in     (zs[i]),
      .out_valid(v[i+1]),
      .x_out    (xs[i+1]),
      .y_out    (ys[i+1]),
      .z_out    (zs[i+1])
    );
  end

  // ---- gain compensation and rounding --------------------------------------
  localparam int unsigned MSH = 18 + XGUARD;   // Q0.18 constant, guard bits
  logic signed [XW+19:0] mag_full;
  logic signed [47:0]    mag_rnd, ph_rnd;
  always_comb begin
    mag_full = (XW+20)'(xs[ITER]) * $signed({2'b00, 18'(INV_K_Q18)});
    mag_rnd  = 48'(mag_full + (XW+20)'(1 << (MSH-1))) >>> MSH;
    ph_rnd   = 48'(zs[ITER] + cz_t'(1 << (ZGUARD-1))) >>> ZGUARD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v[ITER];
  end

  always_ff @(posedge clk) begin
    mag   <= sat_word(mag_rnd);
    phase <= zero_in[ITER] ? '0 : sat_word(ph_rnd);
  end

endmodule
