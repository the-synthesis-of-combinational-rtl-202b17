// prob_synth_top_tb: end-to-end run of every generator with random sources.
//
// Each random input of the top is driven by a model of a probabilistic CMOS
// switch that draws a new independent bit of the required probability every
// clock. Over 16 phases of PHASE_LEN clocks the testbench
//   - steps the lookup-table column through all 16 values (inputs 2/3 and
//     4/5, so column k must give k/15),
//   - steps both decimal digits (from {0.4, 0.5} and from p alone)
//     through 0..10 (and wraps),
//   - gives the optimal-set generator 16 targets that round both up and
//     down,
// and counts the ones on every output. Each measured frequency must lie
// within 5 standard deviations of the probability worked out from the
// circuit's definition; the fixed generators (inverter, AND, XOR, 0.757
// and its taps, both 0.49 circuits, the two single-source outputs) are
// judged over the whole run. Every sample is also checked logically where
// that is possible (table lookup, computed column). Each mechanism
// (column change, digit change, rounding up, rounding down) is counted and
// must have happened.
module prob_synth_top_tb;
  import prob_tb_pkg::*;

  localparam int PHASES    = 16;
  localparam int PHASE_LEN = 20000;
  localparam real P_SS     = 0.12946210096571537;  // root of g1 in (0, 0.5)

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- DUT
  logic        gates_x, gates_y, gates_z_inv, gates_z_and, gates_z_xor;
  logic [3:0]  lut_cfg;
  logic [1:0]  lut_x;
  logic        lut_z;
  logic [15:0] opt_q;
  logic [1:0]  opt_x;
  logic [3:0]  opt_cfg;
  logic        opt_z;
  logic [3:0]  base_digit;
  logic        base_a, base_b, base_c, base_z;
  logic [7:0]  g757_s;
  logic [6:0]  g757_taps;
  logic        g757_z;
  logic [5:0]  g49b_s;
  logic        g49b_z;
  logic [3:0]  g49f_s;
  logic        g49f_z;
  logic [4:0]  ss_xa, ss_xb;
  logic        ss_half, ss_two_fifths;
  logic [3:0]  spd_digit;
  logic [14:0] spd_x;
  logic        spd_z;

  prob_synth_top dut (.*);

  // ------------------------------------------------------- random sources
  localparam real G757_P [8] = '{0.4, 0.5, 0.5, 0.4, 0.5, 0.5, 0.5, 0.4};
  localparam real G49B_P [6] = '{0.4, 0.5, 0.5, 0.5, 0.4, 0.5};
  localparam real G49F_P [4] = '{0.5, 0.4, 0.4, 0.5};

  pcmos_source #(.P(0.4))     src_gx (.clk(clk), .out(gates_x));
  pcmos_source #(.P(0.5))     src_gy (.clk(clk), .out(gates_y));
  pcmos_source #(.P(2.0/3.0)) src_l0 (.clk(clk), .out(lut_x[0]));
  pcmos_source #(.P(4.0/5.0)) src_l1 (.clk(clk), .out(lut_x[1]));
  pcmos_source #(.P(2.0/3.0)) src_o0 (.clk(clk), .out(opt_x[0]));
  pcmos_source #(.P(4.0/5.0)) src_o1 (.clk(clk), .out(opt_x[1]));
  pcmos_source #(.P(0.4))     src_ba (.clk(clk), .out(base_a));
  pcmos_source #(.P(0.5))     src_bb (.clk(clk), .out(base_b));
  pcmos_source #(.P(0.5))     src_bc (.clk(clk), .out(base_c));

  for (genvar k = 0; k < 8; k++) begin : g_s757
    pcmos_source #(.P(G757_P[k])) src (.clk(clk), .out(g757_s[k]));
  end
  for (genvar k = 0; k < 6; k++) begin : g_s49b
    pcmos_source #(.P(G49B_P[k])) src (.clk(clk), .out(g49b_s[k]));
  end
  for (genvar k = 0; k < 4; k++) begin : g_s49f
    pcmos_source #(.P(G49F_P[k])) src (.clk(clk), .out(g49f_s[k]));
  end
  for (genvar k = 0; k < 5; k++) begin : g_sss
    pcmos_source #(.P(P_SS)) src_a (.clk(clk), .out(ss_xa[k]));
    pcmos_source #(.P(P_SS)) src_b (.clk(clk), .out(ss_xb[k]));
  end
  for (genvar k = 0; k < 15; k++) begin : g_spd
    pcmos_source #(.P(P_SS)) src (.clk(clk), .out(spd_x[k]));
  end

  // ---------------------------------------------------------- utilities
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // frequency ones/n against probability p, 5 sigma
  task automatic check_freq(input int ones, input int n, input real p, input string what);
    real f, tol;
    f   = real'(ones) / real'(n);
    tol = 5.0 * $sqrt(p * (1.0 - p) / real'(n)) + 1e-9;
    check(close(f, p, tol), $sformatf("%s: measured %f expected %f", what, f, p));
  endtask

  // ------------------------------------------------------------ counters
  int n_all;
  int c_inv, c_and, c_xor, c_757, c_49b, c_49f, c_half, c_two;
  int c_tap [7];
  int n_ph, c_lut, c_opt, c_base, c_spd;
  int m_cfg_change, m_digit_change, m_round_up, m_round_down;

  // targets for the optimal-set generator (q / 2^16)
  function automatic logic [15:0] q_of_phase(input int ph);
    // spread over [0,1); odd multiples of 2^16/33 fall at varying
    // positions between grid points k/15, so some round up, some down
    return 16'((ph * 2 + 1) * 65536 / 33);
  endfunction

  initial begin
    int expect_cfg;
    real qv;
    lut_cfg = '0; opt_q = '0; base_digit = '0; spd_digit = '0;
    n_all = 0;
    c_inv = 0; c_and = 0; c_xor = 0; c_757 = 0; c_49b = 0; c_49f = 0;
    c_half = 0; c_two = 0;
    c_tap = '{default: 0};
    m_cfg_change = 0; m_digit_change = 0; m_round_up = 0; m_round_down = 0;

    for (int ph = 0; ph < PHASES; ph++) begin
      @(negedge clk);
      if (ph > 0 && lut_cfg != 4'(ph))           m_cfg_change++;
      if (ph > 0 && base_digit != 4'(ph % 11))   m_digit_change++;
      lut_cfg    = 4'(ph);
      base_digit = 4'(ph % 11);
      spd_digit  = 4'((ph + 5) % 11);
      opt_q      = q_of_phase(ph);
      qv         = real'(opt_q) / 65536.0;
      expect_cfg = int'($floor(qv * 15.0 + 0.5));
      if (real'(expect_cfg) > qv * 15.0) m_round_up++;
      else                               m_round_down++;

      n_ph = 0; c_lut = 0; c_opt = 0; c_base = 0; c_spd = 0;
      repeat (PHASE_LEN) begin
        @(negedge clk);
        n_ph++;
        n_all++;
        if (lut_z)  c_lut++;
        if (opt_z)  c_opt++;
        if (base_z) c_base++;
        if (spd_z)  c_spd++;
        if (gates_z_inv) c_inv++;
        if (gates_z_and) c_and++;
        if (gates_z_xor) c_xor++;
        if (g757_z) c_757++;
        if (g49b_z) c_49b++;
        if (g49f_z) c_49f++;
        if (ss_half) c_half++;
        if (ss_two_fifths) c_two++;
        for (int k = 0; k < 7; k++) if (g757_taps[k]) c_tap[k]++;
        if (lut_z != lut_cfg[lut_x]) check(1'b0, "lut_z != lut_cfg[lut_x]");
        if (opt_z != opt_cfg[opt_x]) check(1'b0, "opt_z != opt_cfg[opt_x]");
      end
      check(int'(opt_cfg) == expect_cfg,
            $sformatf("phase %0d: opt_cfg=%0d expected %0d", ph, opt_cfg, expect_cfg));
      check_freq(c_lut, n_ph, real'(ph) / 15.0, $sformatf("lut column %0d", ph));
      check_freq(c_opt, n_ph, real'(expect_cfg) / 15.0, $sformatf("opt q=%f", qv));
      check_freq(c_base, n_ph, real'(ph % 11) / 10.0, $sformatf("base digit %0d", ph % 11));
      check_freq(c_spd, n_ph, real'((ph + 5) % 11) / 10.0,
                 $sformatf("single-p digit %0d", (ph + 5) % 11));
    end

    check_freq(c_inv, n_all, 0.6, "inverter 1-0.4");
    check_freq(c_and, n_all, 0.2, "AND 0.4*0.5");
    check_freq(c_xor, n_all, 0.5, "XOR 0.4,0.5");
    check_freq(c_757, n_all, 0.757, "0.757 chain");
    begin
      static real tap_p [7] = '{0.7, 0.35, 0.86, 0.43, 0.785, 0.6075, 0.757};
      for (int k = 0; k < 7; k++) check_freq(c_tap[k], n_all, tap_p[k], $sformatf("0.757 tap %0d", k));
    end
    check_freq(c_49b, n_all, 0.49, "0.49 digit reduction");
    check_freq(c_49f, n_all, 0.49, "0.49 factorisation");
    check_freq(c_half, n_all, 0.5, "single source f1");
    check_freq(c_two, n_all, 0.4, "single source f2");

    $display("mechanisms: column changes=%0d digit changes=%0d round up=%0d round down=%0d",
             m_cfg_change, m_digit_change, m_round_up, m_round_down);
    check(m_cfg_change > 0, "column change never happened");
    check(m_digit_change > 0, "digit change never happened");
    check(m_round_up > 0, "rounding up never happened");
    check(m_round_down > 0, "rounding down never happened");
    $display("samples=%0d  0.757 -> %f  0.49 -> %f / %f  p-source -> %f / %f",
             n_all, real'(c_757) / n_all, real'(c_49b) / n_all, real'(c_49f) / n_all,
             real'(c_half) / n_all, real'(c_two) / n_all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PHASES * (PHASE_LEN + 1) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
