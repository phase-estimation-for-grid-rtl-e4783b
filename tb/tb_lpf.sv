// tb_lpf: self-checking testbench for the first-order low-pass filter.
// (1) Random samples, with gaps in in_valid, are compared with the same
//     recursion y += (x - y) / 2^SHIFT run in floating point; the state must
//     hold still while in_valid is low.
// (2) A 50 Hz sine sampled at 10 kHz must come out, in steady state, with
//     the gain |H| and phase lag phi of H(z) = a / (1 - (1 - a) z^-1),
//     a = 2^-SHIFT, the lag the estimator's delay compensator undoes.
// (3) A DC input settles to itself (unity DC gain).
module tb_lpf;
  import strf_pkg::*;

  localparam int unsigned SHIFT = 3;
  localparam real         PI    = 3.14159265358979;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  word_t x = '0;
  logic  out_valid;
  word_t y;

  always #5 clk = ~clk;

  lpf #(.SHIFT(SHIFT)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid), .y(y)
  );

  int  checks = 0, failures = 0;
  int  n_gap = 0;
  real yr = 0.0;   // floating-point model state (in LSBs)

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // one sample; returns the filter output seen one clock later
  task automatic step(input word_t xv, input bit valid, output real got);
    @(negedge clk);
    in_valid = valid;
    x = xv;
    if (valid) yr = yr + (real'(xv) - yr) / real'(1 << SHIFT);
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid == valid, "out_valid follows in_valid by one clock");
    got = real'(y);
  endtask

  initial begin
    real got, a, w, gain, phi, ymax, t_peak_in, t_peak_out, lag;
    int  n_peak;
    repeat (3) @(negedge clk);
    check(y == 0, "reset clears the state");
    rst_n = 1'b1;

    // (1) random samples with gaps
    for (int n = 0; n < 3000; n++) begin
      bit v;
      v = ($urandom_range(3) != 0);
      if (!v) n_gap++;
      step(word_t'($signed($urandom_range(40000)) - 20000), v, got);
      check((got - yr) < 3.0 && (yr - got) < 3.0, $sformatf("random: got %f exp %f", got, yr));
    end
    check(n_gap > 100, "gaps exercised");

    // (2) 50 Hz sine at 10 kHz: measure amplitude and peak delay in steady state
    a   = 1.0 / real'(1 << SHIFT);
    w   = 2.0 * PI * 50.0 / 10000.0;
    gain = a / $sqrt((1.0 - (1.0 - a) * $cos(w)) ** 2 + ((1.0 - a) * $sin(w)) ** 2);
    phi  = $atan2((1.0 - a) * $sin(w), 1.0 - (1.0 - a) * $cos(w));
    ymax = 0.0;
    lag  = 0.0;
    n_peak = 0;
    for (int n = 0; n < 1200; n++) begin
      real xin, yprev;
      xin = 16384.0 * $sin(w * real'(n));
      step(word_t'($rtoi(xin)), 1'b1, got);
      // correlate with the expected lagged sine after settling
      if (n >= 400) begin
        real e;
        e = 16384.0 * gain * $sin(w * real'(n) - phi);
        check((got - e) < 6.0 && (e - got) < 6.0,
              $sformatf("sine: got %f exp %f (gain %f lag %f rad)", got, e, gain, phi));
        if (got > ymax) ymax = got;
      end
      yprev = got;
    end
    check((ymax - 16384.0 * gain) < 6.0 && (16384.0 * gain - ymax) < 6.0, "sine amplitude = |H|");

    // (3) DC settles to itself
    for (int n = 0; n < 300; n++) step(16'sd10000, 1'b1, got);
    check((got - 10000.0) < 3.0 && (10000.0 - got) < 9.0, $sformatf("DC gain: got %f", got));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
