// gen_049_basic_tb: enumerates all 64 words of the 6 sources
// (0.4, 0.5, 0.5, 0.5, 0.4, 0.5) and checks that the output is 1 with probability 0.49,
// that it is not constant and that flipping each source changes it for
// at least one word.
module gen_049_basic_tb;
  import prob_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [6-1:0] s;
  logic       z;
  localparam int W = 6;

  gen_049_basic dut (.s(s), .z(z));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    prob_vec_t p;
    real sz;
    static real srcp [6] = '{0.4, 0.5, 0.5, 0.5, 0.4, 0.5};
    int ones;
    p = '{default: 0.0};
    for (int k = 0; k < 6; k++) p[k] = srcp[k];
    sz = 0.0;
    ones = 0;
    s = '0;
    for (int i = 0; i < 64; i++) begin
      s = 6'(i);
      @(posedge clk);
      if (z) begin
        sz += row_weight(MAX_IN'(i), p, 6);
        ones++;
      end
    end
    check(close(sz, 0.49, 1e-9), $sformatf("output P=%f", sz));
    // every source must matter: for each bit there is a word where flipping
    // it changes the output
    for (int k = 0; k < W; k++) begin
      bit seen;
      logic z0;
      seen = 1'b0;
      for (int i = 0; i < (1 << W); i++) begin
        s = W'(i);
        @(posedge clk);
        z0 = z;
        s[k] = ~s[k];
        @(posedge clk);
        if (z != z0) seen = 1'b1;
      end
      check(seen, $sformatf("source %0d has no effect", k));
    end
    // the output must depend on the sources: neither constant
    check(ones > 0 && ones < 64, "output not constant");
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
