# SWAN fabric: security logic whose location is decided after manufacturing

A foundry that wants to plant a hardware trojan, for example one that sets a
processor's privilege bit, must know which transistor carries that bit when
it edits the layout. This design takes that knowledge away. Security-critical
logic is not built as a fixed netlist. It is built as a **one-time
programmable fabric**: sets of identical small gate clusters joined by
fuse-programmed crossbars. After the chip comes back from the fab, a trusted
party picks one of many functionally equivalent placements at random and
burns it into the fuses. Each logical gate of the protected logic can sit on
any copy in its set. The spare copies are not wasted: they are wired into
**canaries**, identical chains that run on a shared pseudo-random stimulus
and are checked against each other. A trojan placed blindly on one copy
therefore either hits the real signal (probability 1/k for a set of k copies)
or corrupts a canary and raises an alarm. A trojan that first reads the fuses
to find the right copy must monitor many fuses at many places. That makes it
large, and large trojans are found by physical inspection.

Unlike an FPGA, the fabric has no LUTs and can realise only one netlist. Its
flexibility is spent entirely on *where* each gate sits, not *what* it does.
That keeps it far cheaper than an embedded FPGA.

## How the fabric is organised

`swan_fabric` is one generated fabric. It contains:

| Part | Module | What it is |
|---|---|---|
| block sets | `swan_logic_set` of `swan_logic_block` | `N_SETS` sets; set *s* holds copies of one fixed cluster `SET_FN[s]` |
| flop set | `swan_reg_set` | `N_REG` identical flip-flops for the protected logic's state |
| crossbars | `swan_xbar` | one fuse-selected mux per block input, flop D, fabric output and comparator operand |
| canary driver | `swan_canary_driver` | maximal-length LFSR shared by all canary chains |
| canary checker | `swan_canary_checker` | `N_CHK` programmable comparators, sticky flags and alarm |

Clusters available (`swan_pkg::blk_fn_e`): AND2, OR2, XOR2, NAND2,
MUX2 (`c ? b : a`), AO21 (`(a&b)|c`), OA21 (`(a|b)&c`) and AOI21. A fabric
generator would choose the clusters by mining the protected netlist for
frequent small subgraphs with much internal wiring. Here they are a parameter.

**Camouflage.** An ordinary set has `MAPPINGS` copies (default 3). A set that
carries security-critical signals is marked in `SECURE_SETS` and gets
`SECURE_MAPPINGS` copies (default 6). The flop set, which holds the
privilege register in the example, has `N_REG` = 6. More copies mean a lower
chance for a blind trojan and more crossbar area. This is the design's main
cost/security knob.

### The source numbering

Every crossbar selects from one common list of sources, numbered as follows
(helpers in `swan_pkg`):

```
0          constant 0      } configuration-defined constants
1          constant 1      }
2 ..       fabric inputs pin[N_IN-1:0]
then       LFSR bits (LFSR_W)
then       flip-flop outputs (N_REG)
then       block outputs, set 0 first, copy 0 first within a set
```

A crossbar is wired only to the sources it may need. Block set *s* sees the
constants, inputs, LFSR, flops and the outputs of lower-numbered sets *j*
with `SET_DRIVERS[s][j]` set. This mirrors "each group is connected to all
and only the groups that could drive it". The lower-numbered rule also
levelises the fabric: no configuration can build a combinational loop, and
state only goes round through the flop set. Flop D inputs, fabric outputs and
comparator operands can reach every source. A select that points at an unwired
source reads 0. Synthesis removes the mux legs of unwired sources, so the
`ALLOW` mask is a real wiring decision, not a run-time check.

The order of `SET_FN` therefore matters: a set that consumes another set's
outputs must come after it. The default is set 0 AO21, set 1 OA21, set 2
MUX2 (camouflaged) and set 3 XOR2.

### Configuration word

`cfg` is `CFG_W` bits, LSB first:

1. three `SEL_W`-bit selects per block (inputs a, b, c), blocks in flat order;
2. one select per flip-flop;
3. one select per fabric output;
4. two selects per comparator (operand a, operand b);
5. one enable bit per comparator.

`SEL_W = clog2(number of sources)`. At the defaults there are 15 blocks,
6 flops and 39 sources, so `SEL_W` = 6 and `CFG_W` = 486 fuses (16 words).

## Fuses and the configuration flow (`swan_top`)

`swan_top` is what a chip carries: `swan_fuse_bank` feeding `swan_fabric`.
The fuse bank is a **behavioural model** of a one-time programmable macro
(eFuse or antifuse), not synthesizable logic. It models the following:

* every fuse is 0 from manufacture and is untouched by `rst_n`;
* a write (`prog_en`, `prog_addr`, `prog_data`) can only blow fuses. The word
  becomes `old | prog_data`, so no bit ever returns to 0;
* `prog_lock` blows a lock fuse (`cfg_locked`). After that, every write is
  ignored.

Programming sequence: write all `ceil(CFG_W/32)` words, pulse `prog_lock`,
then reset the fabric (`rst_n`). Flops, LFSR and checker flags clear on reset;
the configuration does not.

A real chip would place the fuses next to the crossbars they control and
power-gate the programming circuitry after configuration. Neither affects
logic behaviour, and neither is modelled.

## Canaries: the part to understand

Whatever a configuration leaves unused becomes a canary. The configuring
party builds them as follows (the `swan_map_pkg` testbench package does
exactly this):

* In every set, the spare copies form one canary **stage**. All copies of a
  stage get the *same* inputs: the first copy of the previous stage's canary
  (or an LFSR bit for the first stage) plus LFSR bits.
* The spare flops form a stage in the same way.
* For every stage, one comparator is enabled per extra copy, comparing that
  copy with the stage's first copy.

Untampered copies of a stage are the same gate with the same inputs, so they
agree on every cycle. The LFSR walks through all 2^W−1 non-zero patterns, so
every canary sees its whole input space, and it keeps running as long as the
chip is clocked. A trojan that forces a canary copy produces a difference
within a few cycles. The comparator registers it; its `canary_mismatch` bit
and `canary_alarm` go high and **stay high until reset**. The flags show which
stage, and thus which set, was hit. If the first copy of a stage is hit, every
comparator of that stage fires.

The alarm is meant for a recovery mechanism in the protected design, such as
a rollback or a halt, that is also mapped into the fabric so a trojan cannot
find and silence it. That mechanism belongs to the protected logic and is not
part of this RTL.

How many comparators are needed: for a set of k copies with u used, k−u−1
comparators (if k−u ≥ 2). The default `N_CHK` = 12 covers the example netlist
(1+1+4+1 for the four sets, 4 for the flops). A fabric for a larger netlist
needs `N_CHK` sized the same way.

## Configuration-defined constants and software-visible side channels

Crossbar sources 0 and 1 let a configuration tie any gate input to a
constant. Different configurations can therefore give slightly different,
software-observable behaviour, for instance an output that is inverted in one
configuration and not in another. Software that knows which configuration was
chosen can then check that the fabric really carries a trusted
configuration. The example netlist uses this: `side = priv ^ K` with K chosen
per chip.

## Example protected logic used by the testbenches

The protected modules of a real core (CSR file, decoder, front end, page
table walker, TLB) are not included. The testbenches map this small
privilege-register update onto the default fabric (pin bits: 0 `trap`,
1 `mret`, 2 `mpp`, 3 `en`):

```
set 0 AO21   t    = (mret & mpp) | trap
set 1 OA21   ev   = (trap | mret) & en
set 2 MUX2   d    = ev ? t : priv          (camouflaged, 6 copies)
flop         priv <= d                      (6 copies)
set 3 XOR2   side = priv ^ K               (K = configuration constant)
pout = {t, ev, side, priv}
```

## Timing

* `pin` → `pout` is combinational through the mapped blocks. The path length
  is the netlist depth times one crossbar mux plus one cluster per level.
  Crossbars on every path make the fabric slower than the logic it replaces.
* Flops, LFSR and checker update on the rising edge of `clk`. Reset is
  asynchronous and active low.
* A canary mismatch appears on `canary_mismatch`/`canary_alarm` one clock
  after the differing outputs.
* A fuse write takes effect at the clock edge where it is presented.

## Parameters (`swan_top`, `swan_fabric`)

| Parameter | Default | Meaning |
|---|---|---|
| `N_IN`, `N_OUT` | 8, 4 | protected logic inputs / outputs |
| `N_SETS`, `SET_FN` | 4, {AO21, OA21, MUX2, XOR2} | block sets and their clusters (index 0 first) |
| `MAPPINGS` | 3 | copies per ordinary set |
| `SECURE_MAPPINGS`, `SECURE_SETS` | 6, 4'b0100 | copies per camouflaged set, which sets |
| `SET_DRIVERS` | all ones | `[s][j]` = set j may drive set s (j < s only) |
| `N_REG` | 6 | flip-flops |
| `LFSR_W` | 8 | canary driver width (3 to 16) |
| `N_CHK` | 12 | canary comparators |

Three and six copies match two operating points that this architecture
targets: 3 copies, where a blind trojan succeeds with probability 1/3
(here both spare copies become canaries, so it is caught with probability
2/3), and 6 locations per critical signal,
which is enough for about a 99 % chance that a trojan small enough to escape
inspection fails. For the 99.9 % point, set `SECURE_MAPPINGS` and `N_REG` to
12 and raise `N_CHK` to about 24. The fabric at these defaults is an example
size: a fabric for a real module would have thousands of blocks, with sizes
taken from that module's netlist.

## Files

```
rtl/swan_pkg.sv             cluster enum, LFSR taps, source/config layout helpers
rtl/swan_xbar.sv            one programmable crossbar input
rtl/swan_logic_block.sv     one primitive logic block
rtl/swan_logic_set.sv       set of identical blocks with their crossbars
rtl/swan_reg_set.sv         set of identical flops with D crossbars
rtl/swan_canary_driver.sv   LFSR canary driver
rtl/swan_canary_checker.sv  programmable comparators, sticky flags, alarm
rtl/swan_fabric.sv          the fabric
rtl/swan_fuse_bank.sv       behavioural one-time programmable fuse bank
rtl/swan_top.sv             fuse bank + fabric
tb/swan_map_pkg.sv          configuration builder + reference model (testbench only)
tb/swan_guess_bench.sv      trojan trials on one fabric size (testbench helper)
tb/tb_*.sv                  self-checking testbenches, one per module
```

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog that fails the run if it hangs. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/swan_pkg.sv tb/swan_map_pkg.sv tb/tb_swan_top.sv \
    --top-module tb_swan_top -o sim
./obj_dir/sim
```

For the unit testbenches, replace the last file and the top module, for
example `tb/tb_swan_canary_driver.sv` with `--top-module tb_swan_canary_driver`.
`swan_map_pkg.sv` is needed only by `tb_swan_fabric` and `tb_swan_top`.

What the testbenches show:

* **tb_swan_top** (all defaults, 12 chips). Each chip gets its own random
  configuration through its fuse port, then its lock fuse. A later
  re-programming attempt must leave the fuses unchanged. All chips run the
  same 300-cycle random workload against the reference model and must show
  no alarm. Then one trojan that forces copy 0 of the camouflaged MUX set to 1
  is switched on in every chip. Chips whose configuration put the privilege
  logic on copy 0 must show escalation without an alarm. All other chips
  must raise the alarm with exactly the right mismatch flags and keep correct
  outputs. A typical run: 3 of 12 attacks succeed, as predicted from the
  configurations, and 9 are detected.
* **tb_swan_fabric** (defaults, configuration driven directly). Eight random
  placements, all equivalent to the reference. Both side-channel constants
  are exercised. A trojan on a canary is detected and located; a trojan on
  the mapped copy succeeds unseen.
* **tb_swan_blind_guess** (workload). The blind-guess attack is repeated on
  fabrics with 3, 6 and 12 copies of the camouflaged set and flops, with 96
  random configurations each. Every trial's outcome must match its
  configuration, and each size must see both a success and a detection. The
  measured success rates are printed; their expected values are 1/3, 1/6 and
  1/12. The helper `swan_guess_bench` holds one fabric size.
* **tb_swan_analytic_attack** (workload). The same trials run with a smarter
  trojan. It first reads the fuses that select the attacked copy's inputs and
  fires only if they look like the privilege logic's wiring. It is never
  caught by a canary, but it compromises only the chips whose configuration
  happens to match, about 1/k of them. To cover more locations it would have
  to monitor more fuses at each of them, which is what makes such a trojan
  large enough for physical inspection to find.
* Unit testbenches: crossbar select and wiring mask, cluster truth tables,
  block set and flop set wiring, LFSR maximal period (W = 5 and 8), checker
  stickiness and enables, fuse set-only and lock behaviour.

## Limits and departures

* **No fabric generator.** The netlist mining, grouping, interconnect sizing
  and configuration search are software. This RTL is a parameterised fabric
  whose sizes and cluster types stand in for a generator's output. Which
  clusters exist, the set order, the source numbering, the configuration
  layout and all sizes other than the 3 and 6 copies are this design's
  choices.
* **Crossbar reach.** Within the allowed sets, every block input can select
  any copy. A generated fabric could use sparser crossbars to save area.
* **Canary checker.** Comparators are programmable (fuse selects and enable)
  because which copies are canaries depends on the configuration. Registered,
  sticky flags are a choice made so that short trojan pulses are not lost.
* **Fuses** are a behavioural model with a word port and a lock fuse. A real
  macro's programming interface, and the power gating of the programming
  circuitry, are not modelled.
* **Protected modules** (CSR file, decoder, front end, page table walker,
  TLB) are not included. The fabric at its default size holds only the small
  example above.
* **Recovery logic** driven by the alarm is left to the protected design.
