// clarke_transform: projects the three grid phase voltages from the natural
// (abc) frame onto the stationary alpha-beta-gamma frame:
//   v_alpha = 2/3 * (v_a - v_b/2 - v_c/2)
//   v_beta  = 2/3 * (sqrt(3)/2 * v_b - sqrt(3)/2 * v_c)
//   v_gamma = 2/3 * (v_a + v_b + v_c) / sqrt(2)
// The matrix rows are those of the estimator's transform; the 2/3 scale in
// front of them is the amplitude-invariant one, so a balanced 1 p.u. grid
// gives a 1 p.u. alpha-beta vector. (A power-invariant sqrt(2/3) scale would
// only change the length of the vector, which the normaliser removes.)
// With v_a = V cos(theta) the vector (v_alpha, v_beta) points at theta.
//
// How it works: the row sums are formed exactly, then each is multiplied by
// one constant (1/3, 1/sqrt(3) and sqrt(2)/3 in Q0.17) and rounded back to
// Q2.14 with saturation.
// Interface: v_a, v_b, v_c and the three outputs in Q2.14.
// Timing: one sample per clock, outputs registered one clock after inputs.
module clarke_transform
  import strf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t v_a,
  input  word_t v_b,
  input  word_t v_c,
  output logic  out_valid,
  output word_t v_alpha,
  output word_t v_beta,
  output word_t v_gamma
);

  localparam int unsigned CSH = 17;
  localparam logic signed [18:0] C_THIRD   = 19'sd43691;  // round(2^17 / 3)
  localparam logic signed [18:0] C_INVSQ3  = 19'sd75674;  // round(2^17 / sqrt(3))
  localparam logic signed [18:0] C_SQ2_3   = 19'sd61788;  // round(2^17 * sqrt(2) / 3)

  logic signed [DW+2:0] s_alpha, s_beta, s_gamma;   // exact row sums
  logic signed [47:0]   p_alpha, p_beta, p_gamma;

  always_comb begin
    s_alpha = ((DW+3)'(v_a) <<< 1) - (DW+3)'(v_b) - (DW+3)'(v_c);
    s_beta  = (DW+3)'(v_b) - (DW+3)'(v_c);
    s_gamma = (DW+3)'(v_a) + (DW+3)'(v_b) + (DW+3)'(v_c);
    p_alpha = (48'(s_alpha) * 48'(C_THIRD)  + 48'(1 << (CSH-1))) >>> CSH;
    p_beta  = (48'(s_beta)  * 48'(C_INVSQ3) + 48'(1 << (CSH-1))) >>> CSH;
    p_gamma = (48'(s_gamma) * 48'(C_SQ2_3)  + 48'(1 << (CSH-1))) >>> CSH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    v_alpha <= sat_word(p_alpha);
    v_beta  <= sat_word(p_beta);
    v_gamma <= sat_word(p_gamma);
  end

endmodule
