// cordic_stage: one registered CORDIC micro-rotation, the building block of
// the vectoring, rotation and arctangent pipelines.
//
// Stage i rotates (x, y) by +-atan(2^-i) using only a shift and an add:
//   x' = x - d * (y >>> i),  y' = y + d * (x >>> i),  z' = z - d * atan(2^-i)
// In rotation mode d = sign(z), which drives the residual angle z to zero.
// In vectoring mode d = -sign(y), which drives y to zero and accumulates the
// vector's angle in z. A zero z or y counts as positive, as in the iterative
// form of the algorithm. The sign rule for vectoring follows the iterative
// algorithm's decision on y; a printed form of the same rule that tests the
// angle instead is not used, since it would not drive y to zero.
//
// Interface: in_valid/x_in/y_in/z_in are sampled every clock; the results
// and out_valid appear one clock later. Only the valid bit is reset: data
// registers simply follow their inputs.
module cordic_stage
  import strf_pkg::*;
#(
  parameter int unsigned  SHIFT = 0,              // iteration index i
  parameter cordic_mode_e MODE  = CORDIC_ROTATE
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  cxy_t x_in,
  input  cxy_t y_in,
  input  cz_t  z_in,
  output logic out_valid,
  output cxy_t x_out,
  output cxy_t y_out,
  output cz_t  z_out
);

  localparam cz_t SIGMA = atan_elem(SHIFT);

  logic d_pos;   // d_i = +1
  cxy_t x_sh, y_sh;

  always_comb begin
    if (MODE == CORDIC_ROTATE) d_pos = ~z_in[ZW-1];
    else                       d_pos =  y_in[XW-1];
    x_sh = x_in >>> SHIFT;
    y_sh = y_in >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (d_pos) begin
      x_out <= x_in - y_sh;
      y_out <= y_in + x_sh;
      z_out <= z_in - SIGMA;
    end else begin
      x_out <= x_in + y_sh;
      y_out <= y_in - x_sh;
      z_out <= z_in + SIGMA;
    end
  end

endmodule
