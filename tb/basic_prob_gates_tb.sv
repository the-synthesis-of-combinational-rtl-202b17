// basic_prob_gates_tb: checks the inverter, AND and XOR against their truth
// tables, then checks the output probabilities exactly for two pairs of
// input probabilities by summing the weights of the input rows.
module basic_prob_gates_tb;
  import prob_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic x, y, z_inv, z_and, z_xor;

  basic_prob_gates dut (.x(x), .y(y), .z_inv(z_inv), .z_and(z_and), .z_xor(z_xor));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Exact output probabilities for P(x)=px, P(y)=py.
  task automatic check_probs(input real px, input real py);
    prob_vec_t p;
    real s_inv, s_and, s_xor, w;
    p = '{default: 0.0};
    p[0] = px;
    p[1] = py;
    s_inv = 0.0; s_and = 0.0; s_xor = 0.0;
    for (int i = 0; i < 4; i++) begin
      {y, x} = 2'(i);
      @(posedge clk);
      w = row_weight(MAX_IN'(i), p, 2);
      if (z_inv) s_inv += w;
      if (z_and) s_and += w;
      if (z_xor) s_xor += w;
    end
    check(close(s_inv, 1.0 - px, 1e-12), $sformatf("P(inv)=%f", s_inv));
    check(close(s_and, px * py, 1e-12), $sformatf("P(and)=%f", s_and));
    check(close(s_xor, (1.0 - px) * py + px * (1.0 - py), 1e-12),
          $sformatf("P(xor)=%f", s_xor));
  endtask

  // XOR truth table rows: x, y, z
  localparam logic [2:0] XOR_TT [4] = '{3'b000, 3'b011, 3'b101, 3'b110};

  initial begin
    x = 1'b0; y = 1'b0;
    for (int i = 0; i < 4; i++) begin
      {x, y} = XOR_TT[i][2:1];
      @(posedge clk);
      check(z_xor == XOR_TT[i][0], "xor truth table");
      check(z_inv == ~x, "inverter truth table");
      check(z_and == (x && y), "and truth table");
    end
    check_probs(0.4, 0.5);
    check_probs(0.3, 0.8);
    // the worked numbers: 0.4 -> 0.6 through the inverter, 0.4*0.5 = 0.2
    check_probs(0.4, 0.5);
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
