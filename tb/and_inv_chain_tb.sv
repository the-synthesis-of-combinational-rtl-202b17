// and_inv_chain_tb: checks the chain exactly. For the default chain (the
// 0.757 circuit) and for a second, differently configured chain, all input
// words are enumerated and the probability of every tap is compared with
// the value obtained by applying v -> v*p_k (then 1-v where inverted)
// stage by stage in real arithmetic.
module and_inv_chain_tb;
  import prob_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // default chain: head 0.4, sources 0.5 0.5 0.4 0.5 0.5 0.5 0.4
  logic       head_a, z_a;
  logic [6:0] src_a, taps_a;
  and_inv_chain dut_a (.head(head_a), .src(src_a), .taps(taps_a), .z(z_a));

  // second chain: head 0.7 not inverted, 4 stages, inverters after 1 and 3
  logic       head_b, z_b;
  logic [3:0] src_b, taps_b;
  and_inv_chain #(.STAGES(4), .INV_HEAD(1'b0), .INV_MASK(4'b1010)) dut_b (
    .head(head_b), .src(src_b), .taps(taps_b), .z(z_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    prob_vec_t p;
    real s [7];
    real v;
    static real srcp_a [7] = '{0.5, 0.5, 0.4, 0.5, 0.5, 0.5, 0.4};
    static bit  inv_a  [7] = '{1, 0, 1, 0, 1, 1, 1};
    static real printed [7] = '{0.7, 0.35, 0.86, 0.43, 0.785, 0.6075, 0.757};
    static real srcp_b [4] = '{0.9, 0.2, 0.6, 0.35};
    static bit  inv_b  [4] = '{0, 1, 0, 1};
    real sz;

    head_a = 1'b0; src_a = '0; head_b = 1'b0; src_b = '0;

    // chain A: bit 0 of the word is the head, bits 1..7 the sources
    p = '{default: 0.0};
    p[0] = 0.4;
    for (int k = 0; k < 7; k++) p[k+1] = srcp_a[k];
    s = '{default: 0.0};
    sz = 0.0;
    for (int i = 0; i < 256; i++) begin
      {src_a, head_a} = 8'(i);
      @(posedge clk);
      for (int k = 0; k < 7; k++)
        if (taps_a[k]) s[k] += row_weight(MAX_IN'(i), p, 8);
      if (z_a) sz += row_weight(MAX_IN'(i), p, 8);
    end
    v = 1.0 - 0.4;
    for (int k = 0; k < 7; k++) begin
      v = v * srcp_a[k];
      if (inv_a[k]) v = 1.0 - v;
      check(close(s[k], v, 1e-12), $sformatf("chain A tap %0d P=%f ref=%f", k, s[k], v));
      check(close(s[k], printed[k], 1e-9), $sformatf("chain A tap %0d vs %f", k, printed[k]));
    end
    check(close(sz, 0.757, 1e-9), "chain A output 0.757");

    // chain B
    p = '{default: 0.0};
    p[0] = 0.7;
    for (int k = 0; k < 4; k++) p[k+1] = srcp_b[k];
    s = '{default: 0.0};
    for (int i = 0; i < 32; i++) begin
      {src_b, head_b} = 5'(i);
      @(posedge clk);
      for (int k = 0; k < 4; k++)
        if (taps_b[k]) s[k] += row_weight(MAX_IN'(i), p, 5);
    end
    v = 0.7;
    for (int k = 0; k < 4; k++) begin
      v = v * srcp_b[k];
      if (inv_b[k]) v = 1.0 - v;
      check(close(s[k], v, 1e-12), $sformatf("chain B tap %0d P=%f ref=%f", k, s[k], v));
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
