// prob_synth_top: a library of combinational probability generators.
//
// Every circuit here turns independent random bits of a few fixed
// probabilities into a random bit of a new probability, using nothing but
// logic gates. The generators stand side by side and share nothing; each
// one's random inputs and outputs are ports of the top:
//   gates_*  inverter, AND and XOR                  (1-p, p*q, XOR law)
//   lut_*    2-input table, any column              (predetermined inputs)
//   opt_*    2-input table on inputs 2/3 and 4/5,   (target q rounded to
//            column computed from q                  the nearest k/15)
//   base_*   one-digit decimal d/10 from 0.4, 0.5, 0.5
//   g757_*   0.757 from eight sources in {0.4, 0.5}, linear chain
//   g49b_*   0.49 by digit reduction, balanced, 5 AND gates, depth 4
//   g49f_*   0.49 as 0.7*0.7, 3 AND gates, depth 2
//   ss_*     0.5 and 0.4 from five copies each of one probability p~0.1295
//   spd_*    one-digit decimal d/10 from fifteen copies of p alone
// The random bits would come from probabilistic CMOS switches outside this
// design; the probability each input needs is given in the sub-module's
// header and in the port comments below.
//
// Timing: purely combinational; the outputs follow the inputs after the
// gate delays, and a new independent sample is produced whenever the
// sources are resampled (for example once per clock of the sampling logic).
module prob_synth_top (
  // inverter / AND / XOR
  input  logic        gates_x,        // P = px
  input  logic        gates_y,        // P = py
  output logic        gates_z_inv,    // 1 - px
  output logic        gates_z_and,    // px * py
  output logic        gates_z_xor,    // (1-px)py + px(1-py)
  // lookup table with predetermined input probabilities
  input  logic [3:0]  lut_cfg,        // truth-table column, lut_cfg[i] = z_i
  input  logic [1:0]  lut_x,          // random inputs, bit 1 most significant
  output logic        lut_z,
  // lookup table on the optimal input set
  input  logic [15:0] opt_q,          // target, opt_q / 2^16
  input  logic [1:0]  opt_x,          // P(opt_x[0]) = 2/3, P(opt_x[1]) = 4/5
  output logic [3:0]  opt_cfg,        // round(q * 15)
  output logic        opt_z,          // opt_cfg / 15
  // one-digit decimal generator
  input  logic [3:0]  base_digit,     // 0..10
  input  logic        base_a,         // P = 0.4
  input  logic        base_b,         // P = 0.5
  input  logic        base_c,         // P = 0.5
  output logic        base_z,         // base_digit / 10
  // 0.757 chain
  input  logic [7:0]  g757_s,         // P = 0.4,0.5,0.5,0.4,0.5,0.5,0.5,0.4
  output logic [6:0]  g757_taps,      // 0.7,0.35,0.86,0.43,0.785,0.6075,0.757
  output logic        g757_z,         // 0.757
  // 0.49, digit reduction
  input  logic [5:0]  g49b_s,         // P = 0.4,0.5,0.5,0.5,0.4,0.5
  output logic        g49b_z,         // 0.49
  // 0.49, factorisation
  input  logic [3:0]  g49f_s,         // P = 0.5,0.4,0.4,0.5
  output logic        g49f_z,         // 0.49
  // single-probability source
  input  logic [4:0]  ss_xa,          // P = p each
  input  logic [4:0]  ss_xb,          // P = p each
  output logic        ss_half,        // 0.5
  output logic        ss_two_fifths,  // 0.4
  // one-digit decimal from the single probability p
  input  logic [3:0]  spd_digit,      // 0..10
  input  logic [14:0] spd_x,          // P = p each
  output logic        spd_z           // spd_digit / 10
);

  basic_prob_gates u_gates (
    .x     (gates_x),
    .y     (gates_y),
    .z_inv (gates_z_inv),
    .z_and (gates_z_and),
    .z_xor (gates_z_xor)
  );

  prob_lut #(.N_IN(2)) u_lut (
    .cfg (lut_cfg),
    .x   (lut_x),
    .z   (lut_z)
  );

  opt_prob_gen #(.N_IN(2), .QW(16)) u_opt (
    .q   (opt_q),
    .x   (opt_x),
    .cfg (opt_cfg),
    .z   (opt_z)
  );

  decimal_base_gen u_base (
    .digit (base_digit),
    .a     (base_a),
    .b     (base_b),
    .c     (base_c),
    .z     (base_z)
  );

  gen_0757 u_g757 (
    .s    (g757_s),
    .taps (g757_taps),
    .z    (g757_z)
  );

  gen_049_basic u_g49b (
    .s (g49b_s),
    .z (g49b_z)
  );

  gen_049_factor u_g49f (
    .s (g49f_s),
    .z (g49f_z)
  );

  single_source_gen u_ss (
    .xa           (ss_xa),
    .xb           (ss_xb),
    .z_half       (ss_half),
    .z_two_fifths (ss_two_fifths)
  );

  single_p_decimal_gen u_spd (
    .digit (spd_digit),
    .x     (spd_x),
    .z     (spd_z)
  );

endmodule
