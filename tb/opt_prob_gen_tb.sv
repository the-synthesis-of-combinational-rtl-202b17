// opt_prob_gen_tb: checks the optimal-set generator for two and three
// inputs. For each target q the column must equal round(q*M), M =
// 2^(2^n)-1, worked out here in real arithmetic, and with the input
// probabilities 2/3, 4/5 (and 16/17) the output probability, summed over
// all input rows, must be exactly cfg/M: the reachable values are evenly
// spaced, so the error is never more than 1/(2M).
module opt_prob_gen_tb;
  import prob_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] q2, q3;
  logic [1:0]  x2;
  logic [2:0]  x3;
  logic [3:0]  cfg2;
  logic [7:0]  cfg3;
  logic        z2, z3;

  opt_prob_gen dut2 (.q(q2), .x(x2), .cfg(cfg2), .z(z2));
  opt_prob_gen #(.N_IN(3), .QW(16)) dut3 (.q(q3), .x(x3), .cfg(cfg3), .z(z3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int round_ref(input int qi, input int m);
    real v;
    v = real'(qi) * real'(m) / 65536.0;
    return int'($floor(v + 0.5));
  endfunction

  task automatic try2(input int qi);
    prob_vec_t p;
    real s, qr;
    int g;
    p = '{default: 0.0};
    p[0] = 2.0/3.0;
    p[1] = 4.0/5.0;
    q2 = 16'(qi);
    g = round_ref(qi, 15);
    s = 0.0;
    for (int i = 0; i < 4; i++) begin
      x2 = 2'(i);
      @(posedge clk);
      if (z2) s += row_weight(MAX_IN'(i), p, 2);
    end
    qr = real'(qi) / 65536.0;
    check(int'(cfg2) == g, $sformatf("n=2 q=%0d cfg=%0d ref=%0d", qi, cfg2, g));
    check(close(s, real'(g) / 15.0, 1e-12), $sformatf("n=2 q=%0d P=%f", qi, s));
    check(close(s, qr, 0.5 / 15.0 + 1e-12), "n=2 error bound");
  endtask

  task automatic try3(input int qi);
    prob_vec_t p;
    real s, qr;
    int g;
    p = '{default: 0.0};
    p[0] = 2.0/3.0;
    p[1] = 4.0/5.0;
    p[2] = 16.0/17.0;
    q3 = 16'(qi);
    g = round_ref(qi, 255);
    s = 0.0;
    for (int i = 0; i < 8; i++) begin
      x3 = 3'(i);
      @(posedge clk);
      if (z3) s += row_weight(MAX_IN'(i), p, 3);
    end
    qr = real'(qi) / 65536.0;
    check(int'(cfg3) == g, $sformatf("n=3 q=%0d cfg=%0d ref=%0d", qi, cfg3, g));
    check(close(s, real'(g) / 255.0, 1e-12), $sformatf("n=3 q=%0d P=%f", qi, s));
    check(close(s, qr, 0.5 / 255.0 + 1e-12), "n=3 error bound");
  endtask

  initial begin
    q2 = '0; q3 = '0; x2 = '0; x3 = '0;
    // ends, exact grid points k/15 do not exist in binary, so also the
    // points just around each half step of the grid
    try2(0);
    try2(65535);
    for (int k = 0; k < 15; k++) begin
      int mid;
      mid = (65536 * (2 * k + 1)) / 30;
      try2(mid);
      try2(mid + 1);
      try2(mid - 1);
    end
    repeat (100) try2(int'($urandom_range(65535)));
    try3(0);
    try3(65535);
    repeat (100) try3(int'($urandom_range(65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
