// decimal_base_gen_tb: for every digit code, sums the weights of the eight
// input rows (P(a)=0.4, P(b)=P(c)=0.5) that give a 1 and compares with
// d/10 (codes above 10 must give 0).
module decimal_base_gen_tb;
  import prob_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] digit;
  logic a, b, c, z;

  decimal_base_gen dut (.digit(digit), .a(a), .b(b), .c(c), .z(z));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    prob_vec_t p;
    real s, expect_p;
    p = '{default: 0.0};
    p[0] = 0.4;  // a
    p[1] = 0.5;  // b
    p[2] = 0.5;  // c
    digit = '0; a = 1'b0; b = 1'b0; c = 1'b0;
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      s = 0.0;
      for (int i = 0; i < 8; i++) begin
        {c, b, a} = 3'(i);
        @(posedge clk);
        if (z) s += row_weight(MAX_IN'(i), p, 3);
      end
      expect_p = (d <= 10) ? real'(d) / 10.0 : 0.0;
      check(close(s, expect_p, 1e-12), $sformatf("digit %0d: P=%f", d, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
