// fixed_divider: pipelined signed fixed-point divider, q = a / b, with a, b
// and q all in Q2.14. In the estimator two of these divide the filtered
// alpha and beta voltages by the vector length from the VM CORDIC, which
// yields cos(theta - phi) and sin(theta - phi).
//
// How it works: the magnitudes are divided by restoring long division, one
// quotient bit per pipeline stage, and the sign is applied at the end. The
// dividend magnitude is pre-scaled by 2^14 so the integer quotient is
// already in Q2.14. A quotient that would reach 2.0 needs no separate
// check: every trial subtraction then succeeds, all quotient bits come out
// as ones, and the result saturates to +-1.99994 by itself. A zero divisor
// (where the same happens) is caught separately and gives a
// zero quotient and raises div_by_zero. The division itself is what the
// estimator needs; the restoring algorithm, the saturation and the
// divide-by-zero rule are this design's choices.
//
// Interface: a (dividend), b (divisor), q Q2.14; div_by_zero flags q = 0
// because b = 0. Timing: one division accepted every clock; the result
// appears DW+1 = 17 clocks after the operands, with out_valid.
module fixed_divider
  import strf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t a,
  input  word_t b,
  output logic  out_valid,
  output word_t q,
  output logic  div_by_zero
);

  localparam int unsigned NQ = DW - 1;         // quotient magnitude bits
  localparam int unsigned RW = 2 * DW;         // remainder / trial width
  typedef logic [RW-1:0] rem_t;

  // pipeline registers; index s holds the state before quotient bit NQ-1-s
  logic             v    [NQ+1];
  rem_t             rem  [NQ+1];
  logic [NQ-1:0]    qb   [NQ+1];
  logic [DW-1:0]    dmag [NQ+1];
  logic             neg  [NQ+1];
  logic             zero [NQ+1];

  // ---- stage 0: magnitudes, sign and zero check ----------------------------
  logic [DW-1:0] amag, bmag;
  rem_t          num;
  always_comb begin
    amag = a[DW-1] ? DW'(-a) : DW'(a);
    bmag = b[DW-1] ? DW'(-b) : DW'(b);
    num  = rem_t'(amag) << VFRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  end

  always_ff @(posedge clk) begin
    rem[0]  <= num;
    qb[0]   <= '0;
    dmag[0] <= bmag;
    neg[0]  <= a[DW-1] ^ b[DW-1];
    zero[0] <= (bmag == '0);
  end

  // ---- restoring division, one quotient bit per stage ---------------------
  for (genvar s = 0; s < NQ; s++) begin : g_div
    localparam int unsigned K = NQ - 1 - s;   // weight of this quotient bit
    rem_t trial;
    always_comb trial = rem_t'(dmag[s]) << K;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[s+1] <= 1'b0;
      else        v[s+1] <= v[s];
    end

    always_ff @(posedge clk) begin
      dmag[s+1] <= dmag[s];
      neg[s+1]  <= neg[s];
      zero[s+1] <= zero[s];
      if (rem[s] >= trial) begin
        rem[s+1] <= rem[s] - trial;
        qb[s+1]  <= qb[s] | (NQ'(1) << K);
      end else begin
        rem[s+1] <= rem[s];
        qb[s+1]  <= qb[s];
      end
    end
  end

  // ---- sign and output register -------------------------------------------
  word_t qmag;
  always_comb qmag = word_t'({1'b0, qb[NQ]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v[NQ];
  end

  always_ff @(posedge clk) begin
    div_by_zero <= zero[NQ];
    if (zero[NQ])     q <= '0;
    else if (neg[NQ]) q <= -qmag;
    else              q <= qmag;
  end

endmodule
