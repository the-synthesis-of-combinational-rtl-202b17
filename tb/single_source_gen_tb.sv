// single_source_gen_tb: finds the root p of 10t-20t^2+20t^3-10t^4-1 in
// (0, 0.5) by bisection, then enumerates the 32 words of each group of five
// sources of probability p and checks P(f1)=0.5 and P(f2)=0.4. It also
// checks that f1 has 30 minterms and that f2 is 1 on exactly the 24
// minterms m2, m4..m8, m10, m12..m24, m26, m28..m30 (x1 most significant).
module single_source_gen_tb;
  import prob_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [4:0] xa, xb;
  logic       z_half, z_two_fifths;

  single_source_gen dut (.xa(xa), .xb(xb), .z_half(z_half), .z_two_fifths(z_two_fifths));

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

  function automatic bit f2_listed(input int m);
    return (m == 2) || (m >= 4 && m <= 8) || (m == 10) || (m >= 12 && m <= 24)
        || (m == 26) || (m >= 28 && m <= 30);
  endfunction

  initial begin
    prob_vec_t p;
    real lo, hi, mid, root, s1, s2, w;
    int n1, n2;
    lo = 0.0; hi = 0.5;
    for (int it = 0; it < 200; it++) begin
      mid = 0.5 * (lo + hi);
      if (g1(mid) < 0.0) lo = mid; else hi = mid;
    end
    root = 0.5 * (lo + hi);
    check(root > 0.0 && root < 0.5, "root in (0, 0.5)");
    p = '{default: root};
    s1 = 0.0; s2 = 0.0; n1 = 0; n2 = 0;
    xa = '0; xb = '0;
    for (int i = 0; i < 32; i++) begin
      xa = 5'(i);
      xb = 5'(i);
      @(posedge clk);
      w = row_weight(MAX_IN'(i), p, 5);
      if (z_half) begin s1 += w; n1++; end
      if (z_two_fifths) begin s2 += w; n2++; end
      check(z_two_fifths == f2_listed(i), $sformatf("f2 minterm %0d", i));
    end
    check(n1 == 30, $sformatf("f1 minterms %0d", n1));
    check(n2 == 24, $sformatf("f2 minterms %0d", n2));
    check(close(s1, 0.5, 1e-9), $sformatf("P(f1)=%f", s1));
    check(close(s2, 0.4, 1e-9), $sformatf("P(f2)=%f", s2));
    $display("p = %f", root);
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
