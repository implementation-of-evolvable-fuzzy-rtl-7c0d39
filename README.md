# Evolvable fuzzy hardware for two-class cell scheduling

This is synthesizable SystemVerilog for a two-class ATM-style cell multiplexer.
A small fuzzy controller decides which class gets each output slot. The
controller's rule set is not fixed: a genetic algorithm running in hardware
next to the multiplexer keeps searching for a better rule set for the traffic
it has just seen. When it finds one, it swaps that rule set into the live
controller in a single clock. Scheduling never stops for the swap.

The design follows the evolvable fuzzy hardware (EFH) scheme of Li, Lim and
Cao ("Implementation of Evolvable Fuzzy Hardware for Packet Scheduling
Through Online Context Switching"). That scheme builds on a table-based
reconfigurable fuzzy inference chip (RFIC). The publication describes the
architecture and the algorithm. Most widths, encodings, the GA operators and
all timing details are this implementation's own choices. Each choice is
listed in [Where this RTL departs from or fills in the scheme](#where-this-rtl-departs-from-or-fills-in-the-scheme).

## The scheduling problem

- **Class1** is delay-sensitive traffic, such as constant bit rate.
- **Class2** is loss-sensitive traffic, such as non-real-time VBR.

Each class has its own buffer (BUF1, BUF2; 100 cells each). One output slot
per cell time carries one cell. When both buffers hold cells, the controller
chooses between:

- **T**: send Class1;
- **F**: send Class2.

When only one buffer holds cells, that buffer is served. An arriving cell that
finds its buffer full is lost.

The controller has two inputs, each digitized to 5 bits (0..31):

| input | meaning | how it is measured here |
|---|---|---|
| `c1` | Class1 arrival rate / output capacity | arrivals in the last `WIN` = 32 slots, scaled by 32/`WIN` and saturated at 31 |
| `c2` | free share of BUF2 | `floor((BUF_LEN - fill) * 31 / BUF_LEN)` |

Each input has five linguistic terms: VS, S, M, L and VL. Their membership
functions are evenly spaced triangles. Term `t` peaks at `x = 7.75 t` with
degree 31 and reaches zero 7.75 steps away. So two neighbouring degrees always
add up to 31.

## Rule sets as chromosomes

A rule set holds one gene for each of the 25 (c1 term, c2 term) pairs. Each
gene is 2 bits:

| gene | meaning |
|---|---|
| 0 | no rule |
| 1 | T |
| 2 | F |
| 3 | unused; treated as no rule |

Gene `g = 5*row + col`, where the row is the c2 term and the column is the c1
term. Written as five rows of five, the startup ("core") rule set is
`12222,11122,11112,11112,11111`:

| c2 \ c1 | VS | S | M | L | VL |
|---|---|---|---|---|---|
| VS | T | F | F | F | F |
| S  | T | T | T | F | F |
| M  | T | T | T | T | F |
| L  | T | T | T | T | F |
| VL | T | T | T | T | T |

Reading the table: when BUF2 is nearly full (c2 = VS), Class2 is sent unless
Class1 is almost idle. When BUF2 is empty (c2 = VL), Class1 always goes
first. In `chrom_t` (package `efh_pkg`) gene `g` is `chrom[g]`. The core set
is `efh_pkg::CORE_RULES`.

Inference works as follows:

1. The firing strength of a rule is the minimum of its two membership degrees.
2. The strengths of all T rules are averaged, and so are those of all F rules.
3. The larger average wins. A tie, including the case where no rule fires,
   goes to T.

## How the RFIC does inference by table lookup (`rfic`)

This is the part that is least like a textbook fuzzy controller. No
membership function is computed at run time. Every possible answer is
precomputed into memory, and the rule set only decides which memories are
read and where their results go.

```
 c1,c2 ──► AEM ──addr {c1,c2}──► FIM: 25 partition blocks PB<i,j> ──► OAM ──► sel_t
                                   ▲ Ena[g], Sel[g]                     (T avg vs F avg)
                     ctx_in ──► CMU (context register = rule set)
```

- **AEM** (`rfic_aem`) registers the 10-bit address `{c1, c2}`.
- **FIM** (`rfic_fim`) holds 25 **partition blocks** (`rfic_pb`), one per
  antecedent "c1 is term i and c2 is term j". Each block is a 2048 x 10-bit
  ROM addressed by `{Sel, c1, c2}`. It stores the firing strength
  `min(mu_i(c1), mu_j(c2))` for every input pair:
  - in the upper 5 bits (the T field) when `Sel = 1`;
  - in the lower 5 bits (the F field) when `Sel = 0`.

  A block whose `Ena` is low outputs zero. The ROM contents are computed at
  elaboration by a constant function from the membership formula above. No
  data file is involved.
- **CMU** (`rfic_cmu`) is the context register holding the working rule set.
  It decodes each gene into the block's `Ena` (a rule exists) and `Sel`
  (the rule says T). Loading `ctx_in` with `ctx_load` is the context switch.
  It takes effect for inputs presented from the next clock on.
- **OAM** (`rfic_oam`) has two identical averaging trees, one for the T
  fields and one for the F fields. The 25 block outputs are padded with zeros
  to 48 inputs. Four levels of 2-averagers (`rfic_ave2`) reduce them
  48 → 24 → 12 → 6 → 3, and one 3-averager (`rfic_ave3`) gives the result.
  - The 2-averagers keep their fraction bit, so they are exact.
  - The 3-averager returns `floor(4*S/3)`, where `S` is the plain sum of the
    fields.
  - The comparison `agg_t >= agg_f` is therefore exactly `S_T >= S_F`.
  - Padding to 48 scales both sides equally, so it does not change the
    decision.

The RFIC is fully pipelined. It accepts one input pair per clock and gives
`sel_t`, `agg_t` and `agg_f` 3 clocks later. It has about 512 kbit of ROM.
The design holds two RFICs: one schedules live traffic, and one sits inside
the scheduling model.

## The adaptation loop (`efh_top`)

```
in1 ─► BUF1 ─┐                         ┌──────── TB1/TB2 (last 300 slots) ──┐ snapshot
in2 ─► BUF2 ─┼─► MP ─► out             │                                    ▼
             │   ▲ sel_t               │      evolution_module ◄──► sched_model
 fuzzy_inputs ─► working RFIC ◄─ ctx switch ──┘   (GA, 12 x 14)       (RFIC + simulated MP,
                                                                     fitness, Eq. 1-3)
```

1. **Training buffers** (`training_buffer`, TB1 and TB2) record each slot's
   arrival flag for each class over the last `TB_LEN` = 300 slots.
2. Once 300 new slots have been recorded and the GA is idle, the record is
   copied into a shadow register and a GA run starts. The live record keeps
   filling while the run goes on.
3. The **evolution module** (`evolution_module`) runs `GENS` = 14
   generations of `POP` = 12 rule sets.
   - **Initial population:** the working set, the core set, and 10 copies of
     the working set mutated with probability 1/4 per gene.
   - **Each later generation:** the best set found so far is kept. Every
     other child comes from two binary tournaments, a one-point crossover at a
     random gene boundary, and mutation with probability 1/16 per gene to a
     random value 0, 1 or 2.
   - **Random source:** a free-running xorshift32.
4. **Each evaluation** goes to the **scheduling model** (`sched_model`). It
   loads the candidate into its own RFIC and replays the 300 frozen slots from
   empty simulated buffers, 4 clocks per slot. For each slot it:
   - computes c1 and c2 with its own `fuzzy_inputs`;
   - asks the RFIC for a decision;
   - sends at most one cell by the multiplexer rule;
   - queues that slot's arrivals.

   The simulated BUF1 stores each Class1 cell's arrival slot. This gives the
   waiting time `m(i)` of every Class1 cell sent and the count `tau` of such
   cells. The simulated BUF2 only needs its fill level.
5. **Fitness** (`fitness_unit`), with time measured in slots (so the time to
   send one cell is 1):

   ```
   AveDelay    = sum m(i) / tau                       (sequential divider, 8 fraction bits)
   DelayFactor = TB_LEN                               (cell time x training length)
   F           = KAPPA - |AveDelay - lambda * DelayFactor|,   KAPPA = 2^20 - 1
   ```

   `lambda` is a run-time input with 8 fraction bits. It sets the Class1
   delay the GA aims for, as a fraction of the training window: 0.35 is
   about 90/256. A smaller `lambda` favours Class1, and a larger one protects
   Class2 from loss. If no Class1 cell was sent, `AveDelay` counts as the
   full window.
6. **End of the run:** if the best fitness is strictly above the fitness of
   the working set on the same window, `ctx_switch` pulses and the new set is
   loaded into the working RFIC's context register. Otherwise `evo_kept`
   pulses and nothing changes.

At full size, one GA run is 168 evaluations of about 1,230 clocks each,
roughly 210,000 clocks. That is 2.1 ms at 100 MHz, or about 53,000 slots when
a slot lasts 4 clocks.

## Interface of `efh_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset (the working RFIC resets to the core set) |
| `slot_tick` | in | one output cell slot; pulses must be at least 4 clocks apart |
| `in1_valid`, `in1_cell` | in | Class1 cell arriving in this slot (`CELL_W` = 16-bit descriptor) |
| `in2_valid`, `in2_cell` | in | Class2 cell arriving in this slot |
| `lambda` | in | desired Class1 delay fraction, 8 fraction bits |
| `out_valid`, `out_class`, `out_cell` | out | cell sent in the previous slot (class 0 = Class1); registered, one clock after `slot_tick` |
| `loss1`, `loss2` | out | an arriving cell found its buffer full (same clock as `slot_tick`) |
| `buf1_count`, `buf2_count`, `c1`, `c2`, `sel_t` | out | buffer levels, controller inputs and live decision |
| `work_ctx` | out | rule set in the working RFIC |
| `evo_busy`, `ctx_switch`, `evo_kept` | out | GA running; a run ended with a switch; a run ended keeping the set |
| `best_fitness`, `work_fitness` | out | fitness of the best set and of the working set in the last run |

Within a slot, the multiplexer sends the head cell chosen from the buffers'
contents before that slot's arrivals. The arrivals are queued on the same
edge, and a cell may arrive into a full buffer if a cell leaves in that
clock. The slot spacing of 4 clocks matters: the decision used at a
`slot_tick` is computed from `c1`/`c2` as they stood 3 clocks earlier, after
the previous slot's update.

Parameters and their defaults:

| parameter | default | note |
|---|---|---|
| `BUF_LEN` | 100 | buffer length |
| `TB_LEN` | 300 | training window |
| `POP` | 12 | GA population |
| `GENS` | 14 | GA generations |
| `CELL_W` | 16 | cell descriptor width |
| `WIN` | 32 | rate window for `c1` |
| `LF` | 8 | fraction bits of `lambda` |
| `FIT_W` | 20 | fitness width |

The first four are the published sizes. The last four are this
implementation's own.

## Files

**Shared definitions**

- `rtl/efh_pkg.sv`: gene encoding, `chrom_t`, the core rule set, and the
  membership function.

**RFIC**

- `rtl/rfic.sv`: the inference chip.
- `rtl/rfic_aem.sv`: address encoding mechanism.
- `rtl/rfic_cmu.sv`: context memory unit.
- `rtl/rfic_fim.sv`, `rtl/rfic_pb.sv`: fuzzy inference map and its partition
  blocks.
- `rtl/rfic_oam.sv`, `rtl/rfic_ave2.sv`, `rtl/rfic_ave3.sv`: output
  aggregation.

**Live multiplexer**

- `rtl/cell_buffer.sv`: BUF#, a show-ahead FIFO with a drop pulse. The
  scheduling model also uses it to store arrival times.
- `rtl/mp_unit.sv`: the multiplexer.
- `rtl/fuzzy_inputs.sv`: computes c1 and c2.

**Adaptation**

- `rtl/training_buffer.sv`: TB#.
- `rtl/sched_model.sv`: the scheduling model.
- `rtl/fitness_unit.sv` and `rtl/seq_divider.sv`: the fitness calculation.
- `rtl/evolution_module.sv`: the GA.

**Top**

- `rtl/efh_top.sv`: the whole design.

**Testbenches**

- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/efh_ref_pkg.sv`: reference inference written independently of the RTL.
  It uses real arithmetic for the membership functions.
- `tb/efh_scoreboard.sv`: end-to-end checker. It checks per-class cell order,
  losses, buffer levels and every live fuzzy decision.
- `tb/tb_efh_top.sv`: end-to-end run at reduced sizes. It forces every
  mechanism at least once: losses in both classes, T and F decisions, serving
  whichever buffer is non-empty, idle slots, rule-set switches, and GA runs
  that keep the set.
- `tb/tb_efh_lambda.sv`: the `lambda` sweep described in the next section.
- `tb/tb_efh_full.sv`: the design at its default sizes under the published
  traffic scenario. Class1 arrives at line rate. Class2 arrives at line rate
  for 733 slots, then stops for 733 slots (2 ms each at 2.73 µs per cell),
  with `lambda` = 0.35. The testbench runs until a full 12 x 14 GA run has
  finished and switched or kept the rule set.

## Behaviour on the published traffic scenario

`tb/tb_efh_lambda.sv` runs the full-size design on the published scenario
four times, from reset, for 170,000 slots each, which covers three GA runs.
The runs use `lambda` = 0.35, 0.4, 0.6 and 0.8. Class1 arrives at line rate,
and Class2 is on at line rate for 733 slots, then off for 733 slots. The
measured results are almost identical for all four values of `lambda`:

- Class1 mean delay is about 200 slots.
- About half of the Class1 cells are lost.
- No Class2 cell is lost.

So the published tunability with `lambda` does not appear here, and the
cause lies in the fitness function as written.

- With Class1 arriving at line rate, c1 stays at VL.
- From empty buffers, a 300-slot replay can reach an average delay of at
  most about 100 slots. The targets `lambda * 300` for 0.35 to 0.8 (105 to
  240 slots) are all above that.
- `AveDelay` counts only the cells that were sent. A rule set that sends
  few Class1 cells therefore scores a short average delay.

Even at `lambda` = 0.02, the GA settles on rule sets that send Class1 only
at the start of the window. Other ways to start the replay or to count unsent
cells would change this. The publication does not specify them.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/efh_pkg.sv tb/efh_ref_pkg.sv \
    tb/tb_efh_full.sv --top-module tb_efh_full -Mdir obj_full
./obj_full/Vtb_efh_full
```

Use the same command for any other testbench, with its name in place of
`tb_efh_full`. Verilator finds the other modules through `-Irtl -Itb`. The 25
ROMs are computed at elaboration, so a design with an RFIC takes about 20 s
per RFIC to elaborate. The full-size run then simulates the whole GA run in
well under a second.

## Where this RTL departs from or fills in the scheme

**Taken from the publication**

- Two classes with their own buffers and a slot multiplexer.
- c1 and c2 as defined above.
- Five terms per input; the gene code 0/1/2; the core rule set.
- Min firing strength, averaging aggregation, and the larger of T and F.
- The RFIC's four parts (AEM, FIM with 25 partition blocks, CMU with
  Ena/Sel, OAM built from 2- and 3-averagers) and its sizes: k = p = 5,
  v = w = 5, m = 1.
- Training buffers and a scheduling model with its own RFIC.
- The fitness function of Eq. 1-3.
- Replacing the working rule set only when a better one is found after a
  fixed number of generations, with the core set as the startup set.
- The sizes 100 / 300 / 12 / 14.

**This implementation's own**

- **Membership functions:** the shapes are assumed, as evenly spaced
  triangles.
- **Inputs:** the rate window used to measure c1, and the scaling of both
  inputs.
- **Partition blocks:** how the ROM word is laid out by `Sel`.
- **OAM:** the tree padding and the tie rule.
- **Pipeline:** the RFIC latency of 3 clocks.
- **Training buffers:** they hold one arrival flag per slot, and are copied
  to a shadow register at the start of a GA run.
- **Scheduling model:** it replays from empty buffers, and uses 4 clocks per
  slot.
- **Multiplexer:** it serves whichever buffer is non-empty.
- **Fitness:** time counted in slots (`rho` = 1), `KAPPA`, the fixed-point
  `lambda`, and the value used when `tau` = 0.
- **GA:** all operators and rates, the make-up of the initial population,
  and the random source.
- **GA start:** a run starts as soon as a full fresh window exists.
- **Rule count:** the publication keeps the number of rules small to limit
  the search space, but does not say how. This GA puts no limit on the
  number of non-zero genes.
- **Cells:** a 16-bit descriptor stands in for the 53-byte cell payload.

**Not built**

- The FIFO and DWPS schedulers that the publication uses only as
  comparisons.

**How far to trust it**

- Every module has a testbench that compares it with an independent model.
  Each testbench was shown to fail when a deliberate bug is put into its
  module.
- The end-to-end testbenches check every cell and every live decision.
- What is not verified is scheduling *quality*. The GA here is a plain one,
  and no claim is made that it reproduces the published delay distributions.
