# Pipelined multi-objective genetic algorithm (island MOGA)

This is synthesizable SystemVerilog for a genetic algorithm that searches for
Pareto-optimal solutions of a multi-objective problem. The demonstration
problem is the two-objective 0/1 knapsack with 50 items. The hardware evaluates
one new candidate per clock in each island. The design rests on three ideas:

* **A pipeline that never stalls.** A simplified *minimal generation gap* model
  is used: two parents go in, one offspring comes out. The offspring can
  replace only a parent or a duplicate. No global sort or ranking of the
  population is ever needed.
* **Diversity by duplicate rejection instead of niching.** Classical MOGAs
  keep their populations diverse by comparing every pair of individuals. Here
  each offspring is compared once with every stored individual as it flows
  through a chain of 64 stages. The chain removes duplicates and reuses their
  slots. Duplicates are recognised by equal fitness vectors.
* **Biased islands.** Several islands run in parallel. One uses ordinary
  Pareto-dominance selection. Each of the others prefers one objective. This
  pushes the search towards the two ends of the Pareto front, which a single
  dominance-based population tends to miss. The islands exchange individuals
  at a fixed interval.

## Top level: `moga_parallel`

```
             +-----------------------------+
             |  island 0 (normal)          |--emig--+---------------> imm of islands 1, 2
   relation -+->imm                        |        |
     ^  ^    +-----------------------------+        |
     |  |    |  island 1 (biased, obj. 0)  |--emig--+
     |  +----|                             |
     |       +-----------------------------+
     |       |  island 2 (biased, obj. 1)  |--emig--+
     +-------|                             |
             +-----------------------------+
```

There are `N_ISL = N_OBJ + 1 = 3` islands. Each has 64 individuals
(`POP = 64`), and each chromosome has 50 bits, one per knapsack item. All
islands migrate in the same clock, every `MIG_INTERVAL = 256` clocks:

* The relation module (`moga_relation`) looks at the individuals the biased
  islands offer. It passes the one that dominates the others to the normal
  island. If none dominates, the earlier candidate is kept.
* The individual the normal island offers is copied to every biased island.

An immigrant does not go into the population directly. It takes the place of
the individual the island has just read, on its way into crossover, and keeps
that individual's local address. Its genes therefore enter the island through
the offspring it parents.

Top-level interface:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock and synchronous active-low reset |
| `run` | in | let the islands work; low = stop issuing individuals and allow host reads |
| `init_done_o` | out | every island has loaded and evaluated its random start population |
| `host_rd_i`, `host_island_i`, `host_addr_i` | in | read one stored individual (only while `run` is low) |
| `host_q_o` | out | the individual (`valid`, `addr`, `chrom`, `fit`), one clock after the read |
| `eval_cnt_o[g]` | out | evaluations performed by island `g` |
| `mig_o`, `bypass_o`, `xo_o`, `mut_o`, `wr_kind_o`, `dup_rej_o`, `rel_idx_o` | out | per-clock event flags: migration, write forwarding, crossover applied, mutation, population write kind, duplicate rejected, relation choice |

After reset with `run` high, each island spends about 135 clocks on its start
population (64 to issue it, about 70 to pass it through the pipeline). Then
`init_done_o` rises and every island evaluates one offspring per clock.

## One island: `moga_island`

```
 management --> immigration --> crossover --> mutation --> evaluation --> selection
     ^                                                                        |
     |                                                                        v
     +------------- population write ----------- overlap rejection (64 stages)
```

Every arrow carries one record per clock. Each stage registers its output,
apart from immigration, which is a multiplexer. The loop from a read to the
write it causes is about `POP + 5` clocks long.

* **management** (`moga_management`) holds the population in a single-port
  memory of 64 words. Each word holds the 50-bit chromosome and two 16-bit
  fitness values. Each clock the memory port does exactly one thing:
  * If overlap rejection delivers a write, the port writes it. In the same
    clock the written offspring is forwarded to crossover in place of a
    memory read, so the memory's busy cycle costs no throughput.
  * Otherwise the port reads a uniformly random address.
* **crossover** (`moga_crossover`) keeps the previous individual in a
  register. It pairs that individual (parent 1) with the current one
  (parent 2), so pairs overlap and one offspring leaves per clock.
  * With probability 102/256 (about 0.4) it applies Half Uniform Crossover.
    The differing bits are taken in order as consecutive pairs, and one random
    member of each pair is taken from parent 2. So exactly half of the
    differing bits are exchanged, rounded up or down. Otherwise the offspring
    is a copy of parent 1.
  * It also picks the parent the offspring may replace: the parent that is
    dominated by the other one, or parent 1 if neither dominates.
* **mutation** (`moga_mutation`) flips each bit with probability 10/256
  (about 0.04).
* **evaluation** (`moga_evaluation`) sums profits and weights per knapsack in
  one clock. If a knapsack is overfull, every objective is 0.
* **selection** (`moga_selection`) sets the *selected* flag when the offspring
  should replace the chosen parent.
  * Normal selection (`BIASED = 0`): the offspring dominates the parent.
  * Biased selection (`BIASED = 1`): the offspring is strictly better in
    objective `BIAS_OBJ`.
* **overlap rejection** (`moga_overlap_rejection`, built from `moga_orm_sub`)
  is described in the next section.

## Overlap rejection: the part that replaces niching

This is the least obvious part of the design. There is one stage per
population slot. Stage *i* keeps a copy of slot *i*'s fitness vector and a
*free* flag. The free flag marks slot *i* as a duplicate that a later
offspring may overwrite.

An offspring record carries these fields:

* its chromosome and fitness;
* the *selected* flag;
* the parent's address;
* a *found* flag, which is set once the offspring has been placed or once an
  identical individual has been seen.

The record visits stages 0, 1, …, 63 on consecutive clocks. At stage *i* the
first matching rule applies:

1. *found* is already set, and slot *i* has the same fitness: set slot *i*'s
   free flag. This duplicate may now be replaced.
2. The offspring is selected and *i* is the parent's address: overwrite
   slot *i* and set *found*. This is **policy 1**, replace the parent.
3. Slot *i* has the same fitness as the offspring: set *found* and write
   nothing. This is **policy 2**, an identical individual already exists, so
   the offspring is dropped and, if selected, the parent is kept.
4. Slot *i* is free, is not the parent, and does not dominate the offspring:
   overwrite slot *i*, set *found* and clear the free flag. This is
   **policy 3**, a duplicate's slot is reused.

Each offspring reaches stage *i* one clock after its predecessor has left it.
The chain therefore behaves exactly as if offspring were processed one at a
time over the whole population, while taking a new offspring every clock.
Because a parent might be overwritten before a duplicate further down the
chain is seen, rule 1 lets a later offspring clean up that duplicate.

A placement is recorded in the record itself. When the record leaves
stage 63, the chain sends a single population write (address, chromosome,
fitness) to management. One record leaves per clock, so the single-port memory
never sees two writes in one clock. The copy of the fitness values held in the
chain and the memory contents agree once the chain has drained. The testbenches
check this.

## Start-up

Reset puts each island's management module into a load phase. It sends 64
records marked *init*, each with a random chromosome and with addresses 0 to
63. Crossover and mutation pass these records unchanged. They are evaluated
and selected unconditionally. The stage that owns each address stores the
record, which comes back as a normal population write. Once all 64 writes are
done, random reads begin. An all-infeasible start is possible but harmless:
overfull solutions score (0, 0).

## Types and sizes (`moga_pkg`)

| constant | value | meaning |
|---|---|---|
| `N_BITS` | 50 | chromosome length = knapsack items |
| `N_OBJ` | 2 | objectives = knapsacks |
| `FIT_W` | 16 | bits per fitness value |
| `POP_SIZE` | 64 | individuals per island (`POP` parameter of the modules) |
| `ADDR_W` | 6 | population address width |
| `N_ISL` | 3 | islands |

The records passed between the modules are `indiv_t`, `off_t` and `orm_t`,
all defined in the package. The package also has `dominates()` and the item
tables:

* `item_value(k, i, t)` is a fixed integer hash mapped to 10..100. `t = 0`
  gives the profit and `t = 1` the weight of item `i` in knapsack `k`.
* `capacity(k)` is half the sum of knapsack `k`'s weights.

These tables follow the usual construction of the 2-knapsack 50-item benchmark
(random values in 10..100, half-sum capacities). They are **not** the published
benchmark instance. To use a real instance, replace `item_value` and
`capacity`. For another problem, replace `moga_evaluation` and the widths in
the package.

Other module parameters: `XO_RATE` and `MUT_RATE` (probabilities × 256),
`MIG_INTERVAL`, and `SEED` for the xorshift32 random generators
(`moga_rng`). Each island and each operator derives its own seed.

## Where this design makes its own choices

The algorithm fixes the structure and the rules above. These points are this
implementation's own:

* **Bus width.** The method allows an m-bit bus with a chromosome streamed over
  ⌈n/m⌉ clocks. Here m = n = 50: a whole chromosome moves in one clock, which
  matches the one-evaluation-per-clock rate the method assumes. Narrower buses
  are not supported.
* **Which parent is replaced.** The descriptions of the method disagree on
  whether crossover forwards the dominated or the dominating parent. This
  design forwards the dominated one, which is the usual minimal-generation-gap
  rule.
* **Unspecified details.** Several details are not specified by the method.
  The choices made here are:
  * the migration interval (256 clocks);
  * how the normal island's emigrant is chosen (whichever individual it reads
    that clock);
  * the immigrant's address (it keeps the local address of the individual it
    displaces);
  * how overfull knapsacks are scored (all objectives 0);
  * the fitness width;
  * the random number generators;
  * how the start population is loaded.
* **The write point.** Population writes are issued from the end of the
  overlap rejection chain rather than from the stage that decides them.
* **Host port.** The host read port is a minimal stand-in for a real host
  interface, which is not part of this design.
* **No clock-rate measurement.** No timing analysis has been done. The
  evaluation is a single-cycle adder tree over 50 items, and the overlap
  rejection chain grows linearly with the population. Both are where a
  frequency target would have to be checked.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

| testbench | what it establishes |
|---|---|
| `tb_moga_management` | initial records, reads equal a reference memory, write forwarding, full address coverage, host reads |
| `tb_moga_immigration` | replacement exactly every `INTERVAL` clocks while enabled, local address kept |
| `tb_moga_crossover` | unchanged common bits, exactly half the differing bits exchanged pairwise, dominated parent forwarded, rate ≈ 0.4 |
| `tb_moga_mutation` | measured flip rate ≈ 0.04, parents untouched, init records untouched |
| `tb_moga_evaluation` | fitness against an item-by-item reference, feasible and overfull cases |
| `tb_moga_selection` | normal and biased flags against a reference dominance rule |
| `tb_moga_orm_sub` | every rule of one stage against a reference model |
| `tb_moga_overlap_rejection` | 8-stage chain against a one-offspring-at-a-time reference: every write, latency, final state |
| `tb_moga_relation` | exact choice for 2 candidates, dominance properties for 4 |
| `tb_moga_island` | one normal island for 1,000,000 evaluations: one evaluation per clock, every stored fitness equals a fresh evaluation and the chain's copy, population improves, every mechanism occurs |
| `tb_moga_parallel` | the full default design for 1,000,000 evaluations per island: rate, every migration checked against the relation rule, population consistency, every mechanism in every island; reports the non-dominated set found |

The RTL also carries concurrent assertions, which `--assert` enables. They
check three rules: population writes target an existing slot; an offspring is
written only after it has been marked as placed; and a running island issues
an individual every clock.

The two shared include files, `tb/moga_orm_ref.svh` (the reference stage rule)
and `tb/moga_tb_util.svh` (reference evaluation and dominance), are written
independently of the RTL.

To simulate one testbench, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_moga_parallel \
  -y rtl -y tb +libext+.sv -Irtl -I. rtl/moga_pkg.sv tb/tb_moga_parallel.sv -o sim
./obj_dir/sim
```

The full-size run takes about 6 seconds of simulation after a 15-second build.
In a typical run the three islands together hold 27 distinct non-dominated
fitness vectors. The two biased islands reach the highest single-objective
values.
