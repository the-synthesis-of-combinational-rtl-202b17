// gen_0757_tb: enumerates all 256 words of the eight sources (0.4, 0.5,
// 0.5, 0.4, 0.5, 0.5, 0.5, 0.4) and checks that the output is 1 with
// probability 0.757 and that the taps carry 0.7, 0.35, 0.86, 0.43, 0.785,
// 0.6075 and 0.757.
module gen_0757_tb;
  import prob_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] s;
  logic [6:0] taps;
  logic       z;

  gen_0757 dut (.s(s), .taps(taps), .z(z));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    prob_vec_t p;
    real sum_t [7];
    real sz, w;
    static real printed [7] = '{0.7, 0.35, 0.86, 0.43, 0.785, 0.6075, 0.757};
    static real srcp [8] = '{0.4, 0.5, 0.5, 0.4, 0.5, 0.5, 0.5, 0.4};
    p = '{default: 0.0};
    for (int k = 0; k < 8; k++) p[k] = srcp[k];
    sum_t = '{default: 0.0};
    sz = 0.0;
    s = '0;
    for (int i = 0; i < 256; i++) begin
      s = 8'(i);
      @(posedge clk);
      w = row_weight(MAX_IN'(i), p, 8);
      for (int k = 0; k < 7; k++) if (taps[k]) sum_t[k] += w;
      if (z) sz += w;
    end
    for (int k = 0; k < 7; k++)
      check(close(sum_t[k], printed[k], 1e-9),
            $sformatf("tap %0d P=%f expected %f", k, sum_t[k], printed[k]));
    check(close(sz, 0.757, 1e-9), $sformatf("output P=%f", sz));
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
