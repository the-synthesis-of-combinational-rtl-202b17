// single_p_decimal_gen_tb: with every source at the single probability p
// (found here by bisection on 10t-20t^2+20t^3-10t^4-1), enumerates all
// 2^15 source words for each digit code and checks that the output
// probability is d/10 (0 for codes above 10).
module single_p_decimal_gen_tb;
  import prob_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0]  digit;
  logic [14:0] x;
  logic        z;

  single_p_decimal_gen dut (.digit(digit), .x(x), .z(z));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real g1(input real t);
    return 10.0*t - 20.0*t*t + 20.0*t*t*t - 10.0*t*t*t*t - 1.0;
  endfunction

  initial begin
    prob_vec_t p;
    real lo, hi, mid, s, expect_p;
    lo = 0.0; hi = 0.5;
    for (int it = 0; it < 200; it++) begin
      mid = 0.5 * (lo + hi);
      if (g1(mid) < 0.0) lo = mid; else hi = mid;
    end
    p = '{default: 0.5 * (lo + hi)};
    digit = '0; x = '0;
    for (int d = 0; d < 12; d++) begin
      digit = 4'(d);
      s = 0.0;
      for (int i = 0; i < 32768; i++) begin
        x = 15'(i);
        @(posedge clk);
        if (z) s += row_weight(MAX_IN'(i), p, 15);
      end
      expect_p = (d <= 10) ? real'(d) / 10.0 : 0.0;
      check(close(s, expect_p, 1e-9), $sformatf("digit %0d: P=%f", d, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12 * 32768 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
