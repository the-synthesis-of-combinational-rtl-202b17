// digit_reduction_workload_tb: every 2- and 3-digit decimal target built as
// an AND/inverter chain and checked exactly.
//
// A constant function below runs the digit-reduction procedure on the
// target u/10^n. It works on exact integers: z = num/10^k. A "1-z" step
// records an inverter, and a "z/0.4" or "z/0.5" step records an AND gate
// with a fresh source. The procedure ends on a one-digit base circuit. The
// steps are then read from the input end and turned into the parameters
// of an and_inv_chain: STAGES, INV_HEAD and INV_MASK, plus the probability
// (0.4 or 0.5) of each source. One chain is instantiated for every target
// with exactly n digits: 90 targets for n = 2 and 900 for n = 3.
//
// A shared counter walks through all source words. Each chain sums the
// probabilities of the words that give a 1, and the sum must equal u/10^n
// to within 1e-9. The testbench also checks two things against the
// reference figures:
//   - no chain needs more than 3n+1 sources;
//   - the chain planned for 0.757 has the parameters of gen_0757, and the
//     chain for 0.49 has five AND gates;
//   - the mean AND count (equal to the depth, since the circuit is linear)
//     is 3.67 for n = 2 and 6.54 for n = 3, within 0.02. This procedure
//     gives 3.667 and 6.556.
module digit_reduction_workload_tb;
  import prob_tb_pkg::*;

  localparam int MAXS     = 12;          // room for the longest chain
  localparam int ROW_BITS = MAXS + 1;

  typedef struct packed {
    logic [7:0]      stages;
    logic            inv_head;
    logic            head04;             // head source is 0.4 (else 0.5)
    logic [MAXS-1:0] inv_mask;
    logic [MAXS-1:0] src04;              // stage source is 0.4 (else 0.5)
  } plan_t;

  // ------------------------------------------------------------------
  // Digit reduction on z = num / 10^k.
  //   op codes: 1 = inverter, 2 = AND with 0.4, 3 = AND with 0.5
  // ------------------------------------------------------------------
  function automatic longint pow10(input int k);
    longint r = 1;
    for (int i = 0; i < k; i++) r = r * 10;
    return r;
  endfunction

  function automatic plan_t plan(input int u, input int n);
    longint num;
    int     k, n0, nops, d;
    int     ops [64];
    plan_t  pl;
    bit     done_step;

    num = longint'(u); k = n; nops = 0;
    // normalise
    while (k > 0 && num % 10 == 0) begin num = num / 10; k--; end

    while (k > 1) begin
      n0 = k;
      done_step = 1'b0;
      // case 4: z > 0.5
      if (2 * num > pow10(k)) begin
        num = pow10(k) - num; ops[nops++] = 1;
      end
      // case 3: 0.4 < z <= 0.5
      if (5 * num > 2 * pow10(k) && 2 * num <= pow10(k)) begin
        num = 2 * num; ops[nops++] = 3;
        while (k > 0 && num % 10 == 0) begin num = num / 10; k--; end
        num = pow10(k) - num; ops[nops++] = 1;
      end
      if (5 * num <= pow10(k)) begin
        // case 1: z <= 0.2 ; z/0.4 then z/0.5 is z*5
        num = num * 25; k = k + 1; ops[nops++] = 2;
        while (k > 0 && num % 10 == 0) begin num = num / 10; k--; end
        num = num * 2; ops[nops++] = 3;
        while (k > 0 && num % 10 == 0) begin num = num / 10; k--; end
        if (k < n0) done_step = 1'b1;
        if (!done_step) begin
          if (2 * num > pow10(k)) begin num = pow10(k) - num; ops[nops++] = 1; end
          num = num * 2; ops[nops++] = 3;
          while (k > 0 && num % 10 == 0) begin num = num / 10; k--; end
        end
      end else begin
        // case 2: 0.2 < z <= 0.4
        num = num * 25; k = k + 1; ops[nops++] = 2;
        while (k > 0 && num % 10 == 0) begin num = num / 10; k--; end
        if (k < n0) done_step = 1'b1;
        if (!done_step) begin
          num = pow10(k) - num; ops[nops++] = 1;
          num = num * 2; ops[nops++] = 3;
          while (k > 0 && num % 10 == 0) begin num = num / 10; k--; end
          if (k < n0) done_step = 1'b1;
        end
        if (!done_step) begin
          if (2 * num > pow10(k)) begin num = pow10(k) - num; ops[nops++] = 1; end
          num = num * 2; ops[nops++] = 3;
          while (k > 0 && num % 10 == 0) begin num = num / 10; k--; end
        end
      end
    end

    // base circuit for the remaining digit, as a chain
    d = (k == 0) ? int'(num) * 10 : int'(num);
    pl = '0;
    pl.head04 = (d != 5);
    case (d)
      1: begin pl.stages = 2; end
      2: begin pl.stages = 1; end
      3: begin pl.stages = 1; pl.inv_head = 1'b1; end
      6: begin pl.inv_head = 1'b1; end
      7: begin pl.stages = 1; pl.inv_head = 1'b1; pl.inv_mask[0] = 1'b1; end
      8: begin pl.stages = 1; pl.inv_mask[0] = 1'b1; end
      9: begin pl.stages = 2; pl.inv_mask[1] = 1'b1; end
      default: ;
    endcase
    // base stages all use 0.5 sources (src04 stays 0)

    // reduction steps, from the input end
    for (int i = nops - 1; i >= 0; i--) begin
      if (ops[i] == 1) begin
        if (pl.stages == 0) pl.inv_head = ~pl.inv_head;
        else pl.inv_mask[int'(pl.stages) - 1] = ~pl.inv_mask[int'(pl.stages) - 1];
      end else begin
        pl.src04[int'(pl.stages)] = (ops[i] == 2);
        pl.stages = pl.stages + 1;
      end
    end
    return pl;
  endfunction

  // ------------------------------------------------------------------
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int and_sum2 = 0, and_sum3 = 0, targets2 = 0, targets3 = 0;
  logic [ROW_BITS-1:0] row;
  logic                running, finished;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // probability of source word 'bits' (bit 0 = head, bit i+1 = stage i)
  function automatic real word_weight(input logic [ROW_BITS-1:0] bits, input plan_t pl);
    real w, p;
    p = pl.head04 ? 0.4 : 0.5;
    w = bits[0] ? p : 1.0 - p;
    for (int i = 0; i < int'(pl.stages); i++) begin
      p = pl.src04[i] ? 0.4 : 0.5;
      w = w * (bits[i+1] ? p : 1.0 - p);
    end
    return w;
  endfunction

  // one chain per target
  for (genvar nd = 2; nd <= 3; nd++) begin : g_n
    localparam int TOP = (nd == 2) ? 100 : 1000;
    for (genvar u = 1; u < TOP; u++) begin : g_u
      if (u % 10 != 0) begin : g_t
        localparam plan_t PL = plan(u, nd);
        localparam int    S  = int'(PL.stages);
        logic         head, z;
        logic [S-1:0] src, taps;
        real          acc;

        and_inv_chain #(
          .STAGES   (S),
          .INV_HEAD (PL.inv_head),
          .INV_MASK (PL.inv_mask[S-1:0])
        ) dut (.head(head), .src(src), .taps(taps), .z(z));

        assign {src, head} = row[S:0];

        initial acc = 0.0;
        always @(negedge clk)
          if (running && (row >> (S + 1)) == '0 && z) acc += word_weight(row, PL);

        initial begin
          wait (finished);
          check(close(acc, real'(u) / real'(TOP), 1e-9),
                $sformatf("target %0d/%0d: P=%f", u, TOP, acc));
          check(S + 1 <= 3 * nd + 1, $sformatf("target %0d/%0d: %0d sources", u, TOP, S + 1));
          if (nd == 2) begin and_sum2 += S; targets2++; end
          else         begin and_sum3 += S; targets3++; end
        end
      end
    end
  end

  initial begin
    plan_t p757, p49;
    real mean2, mean3;
    row = '0; running = 1'b0; finished = 1'b0;

    p757 = plan(757, 3);
    check(p757.stages == 7 && p757.inv_head == 1'b1 &&
          p757.inv_mask[6:0] == 7'b1110101 && p757.src04[6:0] == 7'b1000100 &&
          p757.head04 == 1'b1, "plan for 0.757 matches gen_0757");
    p49 = plan(49, 2);
    check(p49.stages == 5, $sformatf("plan for 0.49 has %0d AND gates", p49.stages));

    @(posedge clk);
    running = 1'b1;
    for (int i = 0; i < (1 << ROW_BITS); i++) begin
      row = ROW_BITS'(i);
      @(posedge clk);
    end
    running = 1'b0;
    finished = 1'b1;
    @(posedge clk);
    @(posedge clk);
    check(targets2 == 90 && targets3 == 900, "all targets checked");
    mean2 = real'(and_sum2) / real'(targets2);
    mean3 = real'(and_sum3) / real'(targets3);
    $display("mean AND gates (= depth): n=2 %f, n=3 %f", mean2, mean3);
    check(close(mean2, 3.67, 0.02), "n=2 mean AND count");
    check(close(mean3, 6.54, 0.02), "n=3 mean AND count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((1 << ROW_BITS) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
