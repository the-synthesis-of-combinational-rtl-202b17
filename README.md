# Combinational probability generators

Stochastic and probabilistic hardware needs random bits that are 1 with a
prescribed probability: 0.3 here, 0.757 there. Physical random sources, such as
a CMOS inverter whose input is disturbed by noise, give a probability set by an
analog knob (the supply voltage), and every distinct probability costs its own
regulator. This library instead takes a few fixed random sources and makes new
probabilities out of them with ordinary logic gates. Nothing is clocked and
nothing is stored: when the input bits are independent, the gates themselves do
the arithmetic.

| gate         | output probability            |
|--------------|-------------------------------|
| NOT x        | 1 - P(x)                      |
| x AND y      | P(x) * P(y)                   |
| x XOR y      | P(x)(1-P(y)) + (1-P(x))P(y)    |
| any table    | sum of the probabilities of the rows where the table outputs 1 |

Every module in `rtl/` is one way of putting that rule to work. They differ in
what is assumed about the sources: whether their probabilities are fixed or may
be chosen, and whether a source may be used once or any number of times
(duplicated).

## Independence is the one rule

All of the arithmetic above is valid only when the inputs of a gate are
statistically independent. A source bit may therefore feed exactly one gate
input. That is why every generator here has one port bit per source, and why
`single_p_decimal_gen` spends fifteen copies of the same probability instead of
sharing five. Feeding one source to two places does not give a wrong circuit in
the logic sense. It gives a wrong probability. For example, a 0.5 bit ANDed with
itself stays 0.5 instead of becoming 0.25. The testbenches catch this kind of
mistake: one of the broken variants used to prove them reuses a group of sources.

## Sources used once: a lookup table as a generator

With n independent inputs of probabilities p1..pn, row i of an n-input truth
table occurs with probability r_i, the product of p_k or 1-p_k over its bits. A
lookup table with output column cfg then outputs 1 with probability
sum(cfg[i] * r_i). Any of the 2^(2^n) columns can be loaded, so one table reaches
up to 2^(2^n) probabilities. The column for a given target is chosen offline, by
minimising |sum cfg[i] r_i - q| over cfg[i] in {0,1}. The column bits are
exactly the table's configuration bits.

`prob_lut` is that table, parameterised by `N_IN` (default 2). Row index bit
N_IN-1 is the most significant.

### Choosing the source probabilities well (`opt_prob_gen`)

This part is the least obvious. If the source probabilities may be chosen, the
best choice is

    P(x[k] = 1) = 2^(2^k) / (2^(2^k) + 1)      i.e. 2/3, 4/5, 16/17, 256/257, ...

With these values, row i occurs with probability exactly 2^i / (2^(2^n) - 1).
You can check this for n = 2: the rows have probabilities 1/15, 2/15, 4/15 and
8/15. The rows are weighted like the bits of a binary number, so a table with
column cfg produces exactly cfg / M, with M = 2^(2^n) - 1. The reachable values
0, 1/M, 2/M, ..., 1 are evenly spaced. Even spacing minimises the average
rounding error over a uniformly distributed target: that average is
1/(4(N-1)) for N = 2^(2^n) values, and no set of n sources does better. For
n = 2, the two sources 2/3 and 4/5 give all sixteen values k/15.

The column for a target q is therefore just g = round(q * M). The round-off is
at most 1/(2M). `opt_prob_gen` computes g in hardware from a binary fraction
`q / 2^QW`:

    cfg = (q * M + 2^(QW-1)) >> QW          (round half up)

It then applies cfg to an internal `prob_lut`. The `x` inputs must be driven by
sources with the probabilities above. `x[0]` is the 2/3 source.

## Sources used any number of times: decimal fractions from {0.4, 0.5}

If a source probability can be duplicated, two values are enough for every
decimal fraction: 0.4 and 0.5.

**One digit** (`decimal_base_gen`), with a = 0.4 and b, c = 0.5:

| d/10 | circuit       | d/10 | circuit         |
|------|---------------|------|-----------------|
| 0.1  | a & b & c     | 0.6  | ~a              |
| 0.2  | a & b         | 0.7  | ~(~a & b)       |
| 0.3  | ~a & b        | 0.8  | ~(a & b)        |
| 0.4  | a             | 0.9  | ~(a & b & c)    |
| 0.5  | b             | 0, 1 | constants       |

The module builds all eleven circuits and selects one with `digit` (0..10).

**More digits** are removed one at a time. Each step works backwards from the
target and uses only "1 - z" (an inverter) and "z / 0.4" or "z / 0.5" (an AND
gate with a fresh source). The steps are chosen so that the numerator loses a
digit. For 0.757:

    0.757 -1-> 0.243 /0.4-> 0.6075 -1-> 0.3925 /0.5-> 0.785 -1-> 0.215 /0.5-> 0.43
    0.43 /0.5-> 0.86 -1-> 0.14 /0.4-> 0.35 /0.5-> 0.7  = 1 - (1-0.4)*0.5

Read from the input end, the result is always a single chain. A head source is
optionally inverted. Then come AND stages, each with its own source and an
optional inverter after it. `and_inv_chain` is this chain. `STAGES` gives the
number of AND gates, `INV_HEAD` inverts the head, and bit k of `INV_MASK` puts an
inverter after stage k. The `taps` output shows every intermediate signal.
`gen_0757` is the instance for the sequence above: eight sources (0.4, 0.5, 0.5,
0.4, 0.5, 0.5, 0.5, 0.4 in port order), seven AND gates and six inverters. Its
taps carry 0.7, 0.35, 0.86, 0.43, 0.785, 0.6075 and 0.757. A chain for an n-digit
target uses at most about 3n AND gates and 3n + 1 sources.

**Shallower circuits.** A chain is as deep as it is long. Two kinds of
restructuring shorten it.

* Regrouping the AND gates into a tree (AND is associative).
  `gen_049_basic` is the balanced digit-reduction circuit for 0.49 = 0.5 *
  (1 - 0.2 * 0.1). It has five AND gates and an AND depth of 4.
* Factoring the numerator. 0.49 = 0.7 * 0.7, and each 0.7 is a one-digit
  circuit. `gen_049_factor` needs three AND gates and has depth 2.

Both take their sources in the order listed in their headers.

## One probability is enough (`single_source_gen`, `single_p_decimal_gen`)

Let p be the root in (0, 0.5) of 10t - 20t^2 + 20t^3 - 10t^4 - 1
(p = 0.129462...). Then p - 2p^2 + 2p^3 - p^4 = 0.1. Take five independent copies
of p:

* f1 = "not all zero and not all one" is 1 with probability 5 * 0.1 = 0.5.
* f2 = (x1|x2|x3|x4) & (x1|x3|~x5) & (~x2|x3|~x5) & (~x1|~x2|~x4|~x5) has 4, 8, 8
  and 4 minterms with one, two, three and four ones. It is 1 with probability
  4 * 0.1 = 0.4. x1 is bit 4 of the port.

`single_source_gen` holds both functions, each on its own five inputs.
`single_p_decimal_gen` shows the consequence. Fifteen copies of p give
independent 0.4, 0.5 and 0.5 bits. These drive `decimal_base_gen`, so every
one-digit decimal comes from p alone. Longer decimals follow the same way, with
five copies of p for every 0.4 or 0.5 source that a chain needs.

## Top level

`prob_synth_top` places all the generators side by side. They share nothing,
and each one's sources and outputs are ports with a prefix:

| prefix  | module                | output probability                  |
|---------|-----------------------|-------------------------------------|
| gates_  | basic_prob_gates      | 1-px, px*py, XOR law                |
| lut_    | prob_lut (N_IN=2)     | sum of row probabilities selected by lut_cfg |
| opt_    | opt_prob_gen          | round(q*15)/15, with sources 2/3 and 4/5 |
| base_   | decimal_base_gen      | base_digit/10                        |
| g757_   | gen_0757              | 0.757 (taps 0.7 ... 0.757)           |
| g49b_   | gen_049_basic         | 0.49                                 |
| g49f_   | gen_049_factor        | 0.49                                 |
| ss_     | single_source_gen     | 0.5 and 0.4 from p                   |
| spd_    | single_p_decimal_gen  | spd_digit/10 from p                  |

The probability each source must have is written next to its port in
`rtl/prob_synth_top.sv`. The top is purely combinational, and the output is a
fresh independent sample whenever the sources produce new bits. The random
sources themselves are not part of the RTL. They are analog devices, and
`tb/pcmos_source.sv` is a behavioural stand-in for testbenches only: each clock
it draws a new bit that is 1 with probability P.

## Verification

Every block testbench is exact rather than statistical. It applies all 2^n input
words, weights each word by the product of its bit probabilities (see
`tb/prob_tb_pkg.sv`), and sums the weights of the words that give a 1. The sum
is then compared with the target probability to within 1e-9. Examples: 0.757 and
every tap of the chain; both 0.49 circuits; k/15 for all sixteen table columns;
d/10 for every digit, both from {0.4, 0.5} and from p alone; 0.5 and 0.4 from p.
The testbenches also check the minterm list of f2 and that `opt_prob_gen`'s
column equals round(q*M), for n = 2 and n = 3.

`tb/digit_reduction_workload_tb.sv` exercises the chain on a full workload.
At elaboration, a constant function runs the digit-reduction procedure in exact
integer arithmetic for every target with exactly two or three decimal digits:
990 targets in all. It instantiates one `and_inv_chain` per target. Every
chain must produce its target exactly and use at most 3n + 1 sources. The
chain planned for 0.757 must equal `gen_0757`. The mean chain length must be
3.67 AND gates for two digits and 6.54 for three, which are the published
averages for the unbalanced circuits. This procedure gives 3.667 and 6.556.
The small difference at three digits may come from tie-breaking details of
the procedure that are not pinned down. Compiling this testbench takes about a
minute.

`tb/prob_synth_top_tb.sv` runs the whole top with random-source models:
320,000 samples over 16 phases. During the run it steps the table column through
all 16 values and both digit inputs through 0..10. It gives the optimal-set
generator targets that round both up and down. Every measured frequency must lie
within five standard deviations of its exact value. The testbench counts each of
these mechanisms and fails if one never happens. It runs the top with its
default parameters in about a second.

Each testbench ends with a line `TB_RESULT checks=N failures=M`. To run one
with plain Verilator:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        tb/prob_tb_pkg.sv tb/prob_synth_top_tb.sv --top-module prob_synth_top_tb -o sim
    ./obj_dir/sim

To run another testbench, substitute its file and module name. Use
`+verilator+seed+N` to change the random sources of the top-level run.

## Where this RTL makes its own choices

* **Retargeting at run time.** The generators for a fixed target are
  fixed netlists. Two blocks add run-time selection that a fixed target would
  not need: `decimal_base_gen` chooses among its eleven circuits with a
  multiplexer, and `opt_prob_gen` computes its table column with a multiplier
  instead of having it loaded.
* **Number formats.** The target of `opt_prob_gen` is a 16-bit binary
  fraction, and ties round upward. The digit code 10 means probability 1; codes
  11..15 give 0.
* **Defaults.** `N_IN = 2` matches the two-input truth tables used as worked
  examples, and the chain defaults to the 0.757 circuit. Both are parameters.
* **Digit reduction.** In the case analysis, after a step that multiplies by
  5 (z/0.4/0.5) or by 2.5 and then does 1-z, the procedure optionally inverts and
  then always divides by 0.5. This is the only reading that removes a digit in
  every case, and it reproduces the 0.757 and 0.49 circuits exactly. The
  workload testbench uses it.
* **Independent groups.** `single_source_gen` gives f1 and f2 separate input
  groups, and the composite generator gives each derived bit its own group of
  five.

## Not included

* **The random sources.** Noise-driven inverters are analog devices with no
  logic function. Their bits enter through ports.
* **The synthesis procedures.** The 0-1 optimisation that picks a table
  column, the digit-reduction and factorisation algorithms, and AND-tree
  balancing are design-time software, not hardware. This library contains the
  circuits they produce for the worked examples (0.757, 0.49 both ways, all
  one-digit values). It also contains the parameterised chain, which can hold
  any digit-reduction result.
* **General multi-digit generators.** No module builds an arbitrary n-digit
  decimal at run time. Each multi-digit target is its own netlist, or an
  `and_inv_chain` instance with the matching `STAGES` and `INV_MASK`.
