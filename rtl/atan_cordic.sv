// atan_cordic: four-quadrant arctangent, theta = atan2(y, x), by a fully
// pipelined vectoring-mode CORDIC. In the estimator it turns the
// delay-compensated vector (cos theta, sin theta) into the phase angle.
//
// How it works: a coarse rotation by +-90 degrees moves the vector into the
// right half plane and preloads the angle with -+pi/2; ITER micro-rotations
// (cordic_stage, vectoring mode) drive y to zero while summing the
// elementary angles. Only the angle is delivered, so no gain compensation is
// needed: the CORDIC gain scales x and y alike and leaves the angle alone.
// The arctangent stage itself comes from the hardware model of the
// estimator; building it as a CORDIC (rather than a table) and its formats
// are this design's choices.
//
// Interface: x_in, y_in Q2.14; phase Q3.13 radians in (-pi, pi]; a zero
// vector gives phase 0.
// Timing: one vector per clock, phase ITER+2 clocks later with out_valid.
module atan_cordic
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
  output word_t phase
);

  if (ITER < 12 || ITER > 17) begin : g_bad_iter
    $error("atan_cordic: ITER must be between 12 and 17");
  end

  logic v  [ITER+1];
  cxy_t xs [ITER+1];
  cxy_t ys [ITER+1];
  cz_t  zs [ITER+1];

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

  // coarse rotation: left half plane -> right half plane
  always_ff @(posedge clk) begin
    if (!xi[XW-1]) begin
      xs[0] <= xi;  ys[0] <= yi;  zs[0] <= '0;
    end else if (!yi[XW-1]) begin
      xs[0] <= yi;  ys[0] <= -xi; zs[0] <= HALF_PI_Z;
    end else begin
      xs[0] <= -yi; ys[0] <= xi;  zs[0] <= -HALF_PI_Z;
    end
  end

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

  // round the angle to Q3.13
  logic signed [47:0] ph_rnd;
  always_comb begin
    ph_rnd = 48'(zs[ITER] + cz_t'(1 << (ZGUARD-1))) >>> ZGUARD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v[ITER];
  end

  always_ff @(posedge clk) phase <= zero_in[ITER] ? '0 : sat_word(ph_rnd);

endmodule
