// prob_lut_tb: checks that the table outputs cfg[x] for every cfg and x,
// and that with input probabilities 4/5 (MSB) and 2/3 (LSB) each of the 16
// columns gives probability cfg/15 exactly, including the worked cases
// column (z0 z1 z2 z3) = 1010 -> 5/15 and 1011 -> 13/15. A three-input
// table with arbitrary input probabilities is checked against the product
// formula for the row probabilities.
module prob_lut_tb;
  import prob_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] cfg2;
  logic [1:0] x2;
  logic       z2;
  logic [7:0] cfg3;
  logic [2:0] x3;
  logic       z3;

  prob_lut #(.N_IN(2)) dut2 (.cfg(cfg2), .x(x2), .z(z2));
  prob_lut #(.N_IN(3)) dut3 (.cfg(cfg3), .x(x3), .z(z3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real lut_prob2(input logic [3:0] c);
    // row probabilities of the two-variable table with P(x)=4/5, P(y)=2/3
    real r [4];
    real s;
    r[0] = (1.0/5.0) * (1.0/3.0);
    r[1] = (1.0/5.0) * (2.0/3.0);
    r[2] = (4.0/5.0) * (1.0/3.0);
    r[3] = (4.0/5.0) * (2.0/3.0);
    s = 0.0;
    for (int i = 0; i < 4; i++) if (c[i]) s += r[i];
    return s;
  endfunction

  initial begin
    prob_vec_t p;
    real s;
    cfg2 = '0; x2 = '0; cfg3 = '0; x3 = '0;
    p = '{default: 0.0};
    p[0] = 2.0/3.0;   // y, least significant
    p[1] = 4.0/5.0;   // x, most significant
    for (int c = 0; c < 16; c++) begin
      cfg2 = 4'(c);
      s = 0.0;
      for (int i = 0; i < 4; i++) begin
        x2 = 2'(i);
        @(posedge clk);
        check(z2 == cfg2[i], "z = cfg[x]");
        if (z2) s += row_weight(MAX_IN'(i), p, 2);
      end
      check(close(s, real'(c) / 15.0, 1e-12), $sformatf("cfg=%0d P=%f", c, s));
      check(close(s, lut_prob2(cfg2), 1e-12), "row products");
    end
    // z0 is the row-0 bit: (z0 z1 z2 z3) = 1010 is cfg = 4'b0101
    check(close(lut_prob2(4'b0101), 5.0/15.0, 1e-12), "1010 -> 5/15");
    check(close(lut_prob2(4'b1101), 13.0/15.0, 1e-12), "1011 -> 13/15");

    p[0] = 0.3; p[1] = 0.55; p[2] = 0.9;
    repeat (20) begin
      real ref_p;
      cfg3 = 8'($urandom);
      s = 0.0;
      ref_p = 0.0;
      for (int i = 0; i < 8; i++) begin
        x3 = 3'(i);
        @(posedge clk);
        check(z3 == cfg3[i], "3-input z = cfg[x]");
        if (z3) s += row_weight(MAX_IN'(i), p, 3);
        if (cfg3[i])
          ref_p += (i[2] ? 0.9 : 0.1) * (i[1] ? 0.55 : 0.45) * (i[0] ? 0.3 : 0.7);
      end
      check(close(s, ref_p, 1e-12), $sformatf("3-input cfg=%h P=%f ref=%f", cfg3, s, ref_p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
