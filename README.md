# Rule detection and defuzzification for a fuzzy-logic processor

A fuzzy inference processor spends most of its time on rules that cannot
contribute. For a given crisp input vector, a rule only matters if every
input falls inside the fuzzy term its antecedent names. This RTL finds those
active rules in hardware before any degree of truth is computed. It also
turns the accumulated output sums into crisp values with a single shared
divider. Both halves come from a published architecture for (complex) fuzzy
logic processors that is drawn at the block level. This design fills in the
encodings, handshakes and timing that the architecture leaves open, and says
so wherever it does.

The processor has four stages:

1. **Acquisition.** The unit takes in the crisp inputs and works out, for
   every input, the vector of fuzzy terms the input belongs to.
2. **Degree of truth.** The degree of truth of each antecedent is computed.
3. **Rule detection.** The unit finds the active rules.
4. **Defuzzification.** The sums are turned into crisp outputs.

This RTL implements stages 1 and 3 as the rule detection unit (`rdu`) and
stage 4 as the `defuzzifier`. Stage 2 and the accumulation of sums belong to
the "theta unit". That unit is not described in enough detail to build, so
its connections are ports of the top, `cfuzzy_processor`.

```
 x[0..3] -> intersection detector 1 --serial--> shifter reg (28) --+
 x[4..7] -> intersection detector 2 --serial--> shifter reg (28) --+--> INT_REGISTER (56 = M1..M8)
                                                                            |
  pointer memory (64 x 16) <--> RD control unit <--> premise memory (2048 x 96)
                                      |                    | 4 premises (96 bits)
                                      | rule no., mask     v
                                      |          4 execution units (active-rule selector)
                                      v                    | 4 rule states
                                  RULE-REG (256 bits) <----+
                                      |
                                      v  rules[255:0]  -> theta unit (external)
                                                              |
  sum_thx[k] (22 b), sum_th[k] (14 b), data_ready  <----------+
        -> 2 register pairs -> 2 multiplexers -> divider -> X_D (8 b) per output
```

## Intersection bits: what the execution units look at

The design has 8 input variables, each with up to 7 fuzzy terms. The
*intersection register* holds 56 bits. Field `M_i` (bits `7i+6 : 7i`) has
bit `t` set when input `i` lies inside the support of its term `t`, that is,
when its degree of membership in that term is above zero.

Each intersection detector serves 4 inputs and keeps one support interval
`[lo, hi]` (8-bit bounds) per term. The intervals are written through the
`id*_cfg_*` ports. At reset every support is empty (`lo = 255`, `hi = 0`),
and an empty support never matches. After a start pulse, a detector sends its
28 comparison bits one per clock to its shifter register: variable 0 term 0
first, with the term index running fastest. The two shifter registers are
then copied into the intersection register in one clock. The serial link and
the two-detector split follow the source architecture. The comparison against
support bounds is this design's own choice: the source names the detector
but does not describe how it works.

## Rule premises and the execution unit

A rule premise is 8 codes of 3 bits, one per input variable (24 bits):

| code | meaning |
|------|---------|
| 0 | the rule does not use this input; it always matches |
| 1..7 | the input must lie in term `code-1` |

An execution unit contains eight 8-to-1 multiplexers. Multiplexer `i` takes
the constant 1 and the 7 bits of `M_i`, and its code picks one of them. An
8-input AND of the eight multiplexer outputs gives the unit's `active`
output. The multiplexer outputs themselves also leave the unit as the vector
`ante`, so each antecedent's state can be seen. The
multiplexer-plus-AND8 structure is the source's. The meaning of code 0 is
this design's reading of an 8-input multiplexer that is fed with a 7-bit
field.

The active-rule selector holds four execution units. They evaluate four rules
per clock against the same intersection register.

## The rule base: pointer table and premise words

This part takes the most care when a rule base is loaded.

* **Premise memory.** It has 2048 words of 96 bits. A word holds four
  premises: rule `j` of the word is in bits `24j+23 : 24j`. Rules are grouped.
  A group occupies consecutive words, starting at its own first word.
  Unused lanes in a group's last word are ignored.
* **Pointer memory.** It has 64 entries of 16 bits, one per group, typed as
  `cfl_pkg::ptr_entry_t`:
  * bits `[10:0]`: the address of the group's first premise word;
  * bits `[15:11]`: the number of rules in the group (0 to 31; 0 means the
    entry is skipped).
* **Rule numbering.** The control unit goes through the entries 0 to 63 in
  order and numbers the rules as it meets them. Bit `n` of the 256-bit
  `rules` output is the activity of the `n`-th rule listed by the pointer
  table, counted across all groups. The rule base must list at most 256
  rules in total; a larger one wraps around onto the low rule numbers.

Both memories are loaded through their own write ports (`pm_*`, `ptr_*`).
They read synchronously, with one clock of latency.

## RD control unit: the walk and its two overlaps

`rd_cu` runs two state machines.

**Acquisition.** A `start` pulse is accepted while `acq_ready` is high.
Starting sends `id_start` to both detectors. After 28 clocks the shifter
registers are full. As soon as no walk is running, `int_load` copies them
into the intersection register and clears the rule register in the same
clock. From then on, acquisition is free to take the next start.

**Walk.** The walk reads one premise word per clock. One clock later, when
the word has reached the execution units, the unit writes the four rule
states into RULE-REG at the running rule number, with a lane mask that cuts
off the end of the group.

Two things overlap:

* **Pointer search with rule selection.** A one-entry prefetch buffer holds
  the next non-empty group. A pointer read is issued whenever none is in
  flight and the buffer is free. The buffered group takes over in the same
  clock in which the current group issues its last word, so groups of two or
  more words run back to back. An assertion checks that a returning pointer
  entry always finds the buffer free.
* **Acquisition with the walk.** The intersection register separates the two
  stages, so the inputs of the next inference are collected while the
  current rules are detected. The next inference is loaded in the clock
  after `done`.

Timing, in clocks:

* The first inference loads the intersection register 29 clocks after
  `start`.
* The walk takes about one clock per premise word, plus up to two per
  pointer entry. An empty table takes 128 clocks.
* `done` pulses once the last write has landed.
* `rules` is valid in the `done` clock and in the clock after it. It is
  cleared at the next `int_load`, which comes no earlier than that clock, so
  a consumer should capture `rules` on `done`.

## Defuzzifier

For each of the two outputs, the theta unit delivers two sums: `sum_thx`
(22 bits), the rule degrees weighted by the rules' output values, and
`sum_th` (14 bits), the sum of the degrees. On `data_ready`, all four sums
are stored in registers.

The control unit `defuzz_cu` then handles output 0 and then output 1. For
each output it sets the multiplexer select, starts the divider, and stores
the quotient in `xd[k]`. The raw divider output is `xd_now`, marked by
`xd_valid` and `xd_ch`.

The divider is a restoring divider that produces one quotient bit per clock:

* The result is `floor(sum_thx / sum_th)`, 8 bits.
* A quotient above 255 saturates to 255. Real sums cannot produce one,
  because output values are 8 bits.
* A zero sum of degrees (no active rule for that output) gives 0.
* A division takes 8 clocks after its start clock, or 2 clocks for the zero
  and saturated cases.
* The whole two-output run takes about 22 clocks.

The register pairs, the multiplexers, the single divider and all widths come
from the source. The division algorithm, the rounding and the corner-case
results are this design's.

## What is not here

* **Theta unit.** Stage 2 and the accumulation of sums are missing. The
  source names this unit but gives no insides, number formats or timing.
  `rules` leaves the top, and the sums and `data_ready` come in as ports.
* **Complex-valued membership.** The source's motivation is complex fuzzy
  sets, where a membership grade has an amplitude and a phase and rule
  outputs are combined by vector aggregation. The source describes this only
  as theory. Phase would live in the theta unit, and the defuzzifier here
  works on amplitude sums, which is what the source suggests for
  defuzzifying a complex output. No complex arithmetic is implemented.
* **Which groups to visit.** The source's pointer table could be indexed by
  the active terms to skip whole groups. It does not say how, so the walk
  visits every entry and skips only empty ones.

## Departures from the source architecture

* **Premise-memory word width.** The source's block diagram labels the
  premise-memory data bus 84 bits, but the code bus to the four execution
  units 96 bits (4 x 24). This design uses 96-bit words, so one read feeds
  all four units in a clock. Parameter `premise_memory.DW` can be changed,
  but `rdu` assumes `DW = 4 x 24`.
* **Own choices where the source says nothing:**
  * the pointer-entry bit layout (11-bit address plus 5-bit count, which
    fills the 16 bits);
  * rule numbering by walk order;
  * the lane mask, and clearing RULE-REG on load;
  * the input width (8 bits, the same as the crisp output);
  * all handshakes (`start`/`acq_ready`/`done`, `data_ready`/`done`);
  * asynchronous active-low reset of every control register (the memories
    are not reset).

## Sizes

The shared constants are in `rtl/cfl_pkg.sv`. All of them are the source's
numbers, except the 96-bit premise word and the 8-bit input width.

| constant | value | what |
|---|---|---|
| `N_IN`, `N_TERMS`, `CODE_W` | 8, 7, 3 | inputs, terms per input, antecedent code |
| `N_EU` | 4 | execution units (rules per clock) |
| `INT_W`, `SHIFT_W` | 56, 28 | intersection register, shifter registers |
| `PM_AW`, `PM_DW` | 11, 96 | premise memory |
| `PTR_AW`, `PTR_DW` | 6, 16 | pointer memory |
| `N_RULES` | 256 | rule register |
| `NUM_W`, `DEN_W`, `Q_W` | 22, 14, 8 | defuzzifier sums and output |

At these sizes the top synthesises to about 1,550 flip-flops and 197,632
memory bits (almost all of them the premise memory).

## Files

`rtl/` has one module per file. Going bottom-up:

* `cfl_pkg`
* `execution_unit`, `act_rule_selector`
* `intersection_detector`, `shifter_register`, `int_register`
* `premise_memory`, `pointer_memory`, `rule_reg`, `rd_cu`
* `rdu`
* `defuzz_divider`, `defuzz_cu`, `defuzzifier`
* `cfuzzy_processor` (the top)

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. The
testbenches share the reference models in `tb/cfl_ref_pkg.sv`. Each
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_cfuzzy_processor` runs the top at its default sizes:

* It loads term supports and random rule bases of up to 256 rules.
* It runs 40 inferences back to back and checks every active-rule vector.
* It plays the theta unit, with a made-up degree and output value for each
  rule, and checks both crisp outputs.
* It fails if any mechanism never occurs: skipped empty groups, partial last
  words, pointer search during rule selection, acquisition during a walk,
  don't-care antecedents, active rules that use all eight inputs, both
  defuzzifier outputs, a zero sum of degrees, a saturated quotient, or
  detection and defuzzification running at the same time.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cfl_pkg.sv tb/cfl_ref_pkg.sv tb/tb_cfuzzy_processor.sv \
    --top-module tb_cfuzzy_processor -o sim
./obj_dir/sim
```

Use the same command with another `tb_<module>.sv` and `--top-module` for a
single block. Verilator finds the RTL modules through `-Irtl`. All
testbenches pass and finish in well under a second each. Each one has also
been run against a deliberately broken copy of its module, and each caught
the fault.

## How far to trust it

The block structure, bus widths and the overlap of the pointer search come
from the source's block diagrams and text. The encodings, the handshakes and
the division details are this design's own choices, as listed above.

The testbenches compare the design against independent reference models at
full size. They do not check it against any timing or results from the
source, because the source publishes only logic-analyser screenshots with no
values that could be compared.
