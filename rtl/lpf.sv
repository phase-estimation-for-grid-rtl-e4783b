// lpf: first-order low-pass filter for one stationary-frame voltage,
//   y[n] = y[n-1] + (x[n] - y[n-1]) / 2^SHIFT
// i.e. the exponential smoother with pole 1 - 2^-SHIFT and unity DC gain.
// The estimator places one of these on v_alpha and one on v_beta ahead of
// the normaliser; both see the same phase lag phi at the grid frequency,
// which the rotation-mode CORDIC later adds back. The filter's type and
// coefficient are not given for the estimator; this first-order,
// multiplier-free form is this design's choice. With SHIFT = 0 the filter
// reduces to a one-clock register (no filtering, phi = 0).
//
// How it works: the state s holds y scaled by 2^SHIFT, so no fraction bits
// are lost in the update s += x - (s >>> SHIFT); y is s >>> SHIFT.
// Phase lag at normalised frequency w (rad/sample), a = 2^-SHIFT:
//   phi = atan2((1 - a) sin w, 1 - (1 - a) cos w).
// Interface: x, y Q2.14; the state updates only on samples with in_valid,
// so the filter runs at the sample rate, not the clock rate.
// Timing: y and out_valid are registered, one clock after the sample.
// Reset clears the state to zero.
module lpf
  import strf_pkg::*;
#(
  parameter int unsigned SHIFT = 3   // pole at 1 - 2^-SHIFT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t x,
  output logic  out_valid,
  output word_t y
);

  localparam int unsigned SW = DW + SHIFT + 1;
  logic signed [SW-1:0] s, s_next;

  always_comb s_next = s + SW'(x) - (s >>> SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) s <= s_next;
    end
  end

  assign y = word_t'(s >>> SHIFT);

endmodule
