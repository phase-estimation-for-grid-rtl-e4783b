// rm_cordic: rotation-mode CORDIC, fully pipelined. Rotates the vector
// (x, y) by the angle phase_in:
//   x_out = x cos(phase) - y sin(phase),  y_out = x sin(phase) + y cos(phase)
// In the estimator it is the delay compensator: it turns the normalised
// vector (cos(theta - phi), sin(theta - phi)) by the filter lag phi.
//
// How it works: the input angle is first wrapped into [-pi, pi]; a coarse
// rotation by +-90 degrees then brings it into [-pi/2, pi/2], inside the
// convergence range of the iterations. ITER micro-rotations (cordic_stage,
// rotation mode) drive the residual angle to zero; the result carries the
// CORDIC gain K ~ 1.647, which the last stage removes by multiplying with
// the constant 1/K before rounding to Q2.14. The shift-add iteration with
// d_i = sign(residual angle) and the gain removal follow the algorithm
// described for the estimator; the pipelined form, the iteration count and
// the number formats are this design's choices.
//
// Interface: x_in, y_in, x_out, y_out Q2.14 (outputs saturate at +-2);
// phase_in Q3.13 radians, any value in [-4, 4).
// Timing: one vector per clock, results ITER+2 clocks later with out_valid.
module rm_cordic
  import strf_pkg::*;
#(
  parameter int unsigned ITER = 16   // number of micro-rotations
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t x_in,
  input  word_t y_in,
  input  word_t phase_in,
  output logic  out_valid,
  output word_t x_out,
  output word_t y_out
);

  if (ITER < 12 || ITER > 17) begin : g_bad_iter
    $error("rm_cordic: ITER must be between 12 and 17");
  end

  logic v  [ITER+1];
  cxy_t xs [ITER+1];
  cxy_t ys [ITER+1];
  cz_t  zs [ITER+1];

  // ---- wrap and coarse rotation ---------------------------------------------
  cxy_t xi, yi;
  cz_t  zi, zw;
  always_comb begin
    xi = cxy_t'(x_in) <<< XGUARD;
    yi = cxy_t'(y_in) <<< XGUARD;
    zi = cz_t'(phase_in) <<< ZGUARD;
    if (zi > PI_Z)       zw = zi - (PI_Z <<< 1);
    else if (zi < -PI_Z) zw = zi + (PI_Z <<< 1);
    else                 zw = zi;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (zw > HALF_PI_Z) begin          // rotate by +90 deg first
      xs[0] <= -yi; ys[0] <= xi;  zs[0] <= zw - HALF_PI_Z;
    end else if (zw < -HALF_PI_Z) begin // rotate by -90 deg first
      xs[0] <= yi;  ys[0] <= -xi; zs[0] <= zw + HALF_PI_Z;
    end else begin
      xs[0] <= xi;  ys[0] <= yi;  zs[0] <= zw;
    end
  end

  // ---- micro-rotations ----------------------------------------------------
  for (genvar i = 0; i < ITER; i++) begin : g_stage
    cordic_stage #(.SHIFT(i), .MODE(CORDIC_ROTATE)) u_stage (
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
  localparam int unsigned MSH = 18 + XGUARD;
  logic signed [XW+19:0] xf, yf;
  logic signed [47:0]    xr, yr;
  always_comb begin
    xf = (XW+20)'(xs[ITER]) * $signed({2'b00, 18'(INV_K_Q18)});
    yf = (XW+20)'(ys[ITER]) * $signed({2'b00, 18'(INV_K_Q18)});
    xr = 48'(xf + (XW+20)'(1 << (MSH-1))) >>> MSH;
    yr = 48'(yf + (XW+20)'(1 << (MSH-1))) >>> MSH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v[ITER];
  end

  always_ff @(posedge clk) begin
    x_out <= sat_word(xr);
    y_out <= sat_word(yr);
  end

endmodule
