// tb_fixed_divider: self-checking testbench for the pipelined Q2.14 divider.
// The expected quotient is computed exactly with integer arithmetic:
// trunc(a * 2^14 / b) toward zero, saturated to +-32767, and 0 for b = 0.
// Random operands, small divisors (saturation), zero divisors, the extreme
// values and the estimator's typical case (|a| <= |b|) are all covered, and
// the latency of 17 clocks is checked.
module tb_fixed_divider;
  import strf_pkg::*;

  localparam int LAT = DW + 1;
  localparam int N   = 6000;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  word_t a = '0, b = '0;
  logic  out_valid, div_by_zero;
  word_t q;

  always #5 clk = ~clk;

  fixed_divider dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .q(q), .div_by_zero(div_by_zero)
  );

  int checks = 0, failures = 0;
  int tick = 0;
  int t_first_in = -1, t_first_out = -1;
  int n_sat = 0, n_zero = 0;
  int qe[$];
  bit qz[$];

  always @(posedge clk) tick++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int e;
      bit z;
      if (t_first_out < 0) t_first_out = tick;
      e = qe.pop_front();
      z = qz.pop_front();
      check(int'(q) == e, $sformatf("quotient got %0d exp %0d", q, e));
      check(div_by_zero == z, "div_by_zero flag");
    end
  end

  task automatic drive(input word_t av, input word_t bv);
    longint num, e;
    @(negedge clk);
    in_valid = 1'b1;
    a = av;
    b = bv;
    if (bv == 0) begin
      e = 0;
      n_zero++;
    end else begin
      num = longint'(av) * 16384;
      e = num / longint'(bv);
      if (e > 32767)  begin e = 32767;  n_sat++; end
      if (e < -32767) begin e = -32767; n_sat++; end
    end
    qe.push_back(int'(e));
    qz.push_back(bv == 0);
    if (t_first_in < 0) t_first_in = tick;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    drive(16'sd16384, 16'sd16384);
    drive(-16'sd16384, 16'sd16384);
    drive(16'sh8000, 16'sh8000);
    drive(16'sh8000, 16'sh7fff);
    drive(16'sh7fff, 16'sd1);
    drive(16'sd0, 16'sd0);
    drive(16'sd123, 16'sd0);
    for (int n = 0; n < N; n++) begin
      case (n % 4)
        0: drive(word_t'($urandom), word_t'($urandom));
        1: drive(word_t'($urandom), word_t'($signed($urandom_range(64)) - 32));
        default: begin
          word_t bv, av;
          bv = word_t'($urandom_range(32767, 100));
          av = word_t'($signed($urandom_range(2 * int'(bv))) - int'(bv));
          if ($urandom_range(1)) bv = -bv;
          drive(av, bv);
        end
      endcase
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    check(qe.size() == 0, "every input produced an output");
    check(t_first_out - t_first_in == LAT,
          $sformatf("latency %0d, expected %0d", t_first_out - t_first_in, LAT));
    check(n_sat > 100 && n_zero > 1, "saturation and zero divisor exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
