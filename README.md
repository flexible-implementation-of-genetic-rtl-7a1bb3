# Pipelined island genetic algorithm in SystemVerilog

A genetic algorithm (GA) improves a population of candidate solutions by
repeatedly picking parents, mixing them (crossover), perturbing the result
(mutation), scoring it (evaluation) and keeping it if it is good enough.
This RTL turns that loop into a hardware pipeline. Each GA operator is a
module that takes one data word per clock and gives one data word per clock.
The population sits in on-chip memory inside a *management* module. One
offspring is produced per chromosome-time: every clock for a 64-item Knapsack
problem, and about every 1.4·n clocks for an n-city travelling-salesman tour
(every n clocks with the optional second crossover).
Several such pipelines ("islands") run side by side. Each pipeline now and
then takes an individual from its neighbour. The neighbour link is the only
connection between pipelines, so adding pipelines does not lengthen any
critical path.

The architecture follows the paper *Flexible Implementation of Genetic
Algorithms on FPGAs*, which describes a generic GA pipeline and two problem
instances, Knapsack and TSP. This is an independent SystemVerilog
implementation. It builds both instances. Where the paper leaves details open,
this implementation makes its own choices, which are listed in the last
sections.

## The loop of one pipeline

```
        +------------+   +-------------+   +-----------+   +----------+   +------------+
  +---->| management |-->| immigration |-->| crossover |-->| mutation |-->| evaluation |--+
  |     +------------+   +-------------+   +-----------+   +----------+   +------------+  |
  |        |  population memory  ^ from previous pipeline                               |
  |        v to next pipeline                                                            |
  +---------------------------------------------------------------------------------------+
       offspring chromosome + offspring fitness + worse parent's address and fitness
```

Every link carries a *stream*. A stream has a strobe and `first`/`last`
flags. It has one chromosome word of W bits. W is 64 for Knapsack, where the
whole chromosome is one word. W is 6 for TSP, where one word is one city, so
a 51-city tour takes 51 words. Each word also carries an address and a fitness
as side information. What those two fields mean changes along the loop:

| link | chromosome | address / fitness |
|---|---|---|
| management → crossover | a randomly chosen individual (parent2) | that individual's slot and stored fitness |
| crossover → mutation → evaluation | the offspring | slot and fitness of the **worse** of the two parents |
| evaluation → management | the offspring | as above, plus the offspring's fitness on the last word |

### Replacement rule (steady state, no second population)

Each crossover keeps the previous individual it saw as parent1, so parent1
and parent2 are two consecutive random picks. It makes exactly one offspring.
The worse parent is worked out at crossover time, and its address travels
with the offspring. When the offspring comes back scored, the management
module compares it with that parent. The offspring overwrites the parent's
slot only if it is strictly better. The population size never changes, and no
memory is needed for a next generation. The best individual can never be lost:
only the worse parent of a pair is ever replaced. This is a simplified
"minimal generation gap" scheme. It has no roulette wheel. The best of the
family survives because the offspring replaces the worse parent.

The chromosome reaches the management module before its fitness does, since
the fitness is known only on the last word. So the management module first
writes the incoming words into one of two receive buffers. When the last word
arrives and the offspring wins, the fitness is written at once. The chromosome
is then copied into the parent's slot over the next BEATS clocks, while the
other buffer takes the next offspring. The memory has one read port for
issuing and one write port for the fill and the copies.

### Islands and migration

`ga_immigration` sits between the management module and the crossover. Each
management module's output is wired to its own immigration module and also to
the next pipeline's. The pipelines form a chain: pipeline 0 has no
predecessor, and the last pipeline's output goes nowhere. A 16-bit counter
starts at `PERIOD-1` (PERIOD is 10) and counts down once per individual that
passes. At 0, the immigration module captures the next complete chromosome the
previous pipeline sends into a one-chromosome buffer. That chromosome then
replaces the next own individual, word for word, on the own stream's timing.
Only the chromosome moves between islands. The immigrant keeps the address
and stored fitness of the individual it displaces, so all bookkeeping stays
inside the island.

## Knapsack instance (`knap_*`)

A chromosome is S = 64 bits, and bit i says whether item i is packed.
Everything moves one chromosome per clock, so each pipeline evaluates one
offspring every clock.

* **Crossover** is uniform: a fresh random mask chooses each bit from parent1
  or parent2. It takes 1 clock.
* **Mutation** inverts each bit with probability `rate/1024`. Every bit has
  its own 10-bit random number. It takes 1 clock.
* **Evaluation** has two binary adder trees, one for the values and one for
  the volumes of the packed items. Each has log2(S) registered levels, so one
  chromosome enters per clock. The fitness is the value sum, or 0 if the
  volume sum exceeds the capacity. A chromosome that does not fit is a
  *lethal* individual. Latency is log2(S)+2 = 8 clocks: one stage selects the
  leaves, six stages add, and one stage applies the capacity.
* Items (8-bit value, 8-bit volume) and the capacity (14 bits) are written
  through `item_*` / `cap_*`. The top broadcasts them to all pipelines.

From selection to the returned fitness the loop takes 11 clocks: 1 for the
memory read, 1 for crossover, 1 for mutation and 8 for evaluation. Each
pipeline keeps about 11 offspring in flight, so an offspring may be scored
against a parent fitness that has already changed. Like the rest of the design, this tolerates
such staleness rather than stalling.

## TSP instance (`tsp_*`)

A tour is a permutation of the n = 51 city labels, 6 bits each, sent one city
per clock.

### PMX crossover: the hardest part

`tsp_crossover` performs partially-mapped crossover in place on registers:

* `PA[0]`, `PA[1]` hold n labels each. The bit `p1sel` says which one is PA1
  (parent1, turned into the offspring) and which is PA2 (parent2).
* `RS` is the inverse of PA1: `RS[c]` is the position of city c in PA1. With
  it, "where is city v in parent1?" takes one clock, not a search.

One operation has two phases:

1. **LOAD** (n clocks, one per arriving word). The arriving parent is written
   into PA2, word k into slot k. In the *same* clock, slot k's old content is
   sent to the mutation module. That old content is the previous offspring,
   because the previous operation left its offspring in the register that is
   being reloaded now. So sending and receiving overlap. During those clocks
   `RS` is rebuilt for PA1, which is not written during LOAD.
2. **XOVER** (N2−N1+1 clocks). Two random loci N1 ≤ N2 in [0, n] are drawn.
   For each locus i from N1 to N2−1, one clock each:
   `v = PA2[i]; M = RS[v]; PA1[M] ← PA1[i]; PA1[i] ← v`, and RS is updated to
   match. The result is a permutation that copies parent2 on [N1, N2) and
   keeps parent1's relative order elsewhere. In the final clock the roles swap
   (`p1sel` toggles). The untouched parent2 becomes parent1 of the next
   operation, and the offspring now sits in the register that the next LOAD
   will overwrite while it sends the offspring out.

The very first individual after reset is only loaded. `ready_o` is high while
the crossover waits for a new parent. The management module starts a tour only
while `ready_o` is high, then sends all n words back to back. This is the
pipeline stall. On average, N2−N1 ≈ n/3 for two uniform draws. Each offspring
costs n + (N2−N1) + about 4 clocks, measured at 70 clocks for n = 51.

### Removing the stall: duplicated crossover

`tsp_xo_bank` wraps `NXO` copies of the crossover behind the same stream
ports. Its `ready_o` is high while any copy waits for a parent. On a
chromosome's first word, the lowest-numbered waiting copy is chosen, and that
choice holds until the last word. A copy sends its previous offspring while it
loads, and only one copy loads at a time, so the copies' outputs never collide.
They are merged by their strobes. Each copy pairs the two parents that it
received itself.

With two copies, one copy runs its PMX steps while the other loads. A new tour
is then accepted every n clocks, and the stall is gone. This was measured at
51 clocks per tour for n = 51, 75 for n = 76 and 101 for n = 101. The cost is
a second set of PA/RS registers. The default is `NXO = 1`, the configuration
whose speed is quoted at the top. Set `TSP_NXO = 2` on `ga_top` for the
faster pipeline.

### Mutation and evaluation

* **Mutation**: at each tour's first word, two cities N1 and N2 are drawn.
  With probability `rate/1024`, every N1 in the stream is replaced by N2 and
  every N2 by N1. That swaps their positions and keeps the tour a
  permutation. It takes 1 clock.
* **Evaluation**: a table of 8-bit distances at address `n·C1 + C2`, with
  2^12 words (2601 used). It is written through `tbl_*`. Each city adds the
  leg from the previous city. On the last city, a second read port fetches the
  leg back to the first city, so the fitness is the closed tour length (16
  bits). The table read and the add are two pipeline stages. The fitness
  leaves with the tour's last word, 2 clocks after it entered, and the next
  tour may follow immediately.
* The initial population is rotated identity tours. Individual j, word k
  holds (k + j) mod n.

## Module map

| file | role |
|---|---|
| `ga_pkg.sv` | `fit_better` (direction-aware comparison), `rand_below` (scale a random number to [0, n)) |
| `ga_rng.sv` | xorshift32 generators; WIDTH random bits per clock |
| `ga_management.sv` | population memory, random issue, double-buffered replacement, best fitness |
| `ga_immigration.sv` | migration counter, capture buffer, substitution |
| `knap_crossover.sv`, `knap_mutation.sv`, `knap_evaluation.sv` | Knapsack operators |
| `tsp_crossover.sv`, `tsp_mutation.sv`, `tsp_evaluation.sv` | TSP operators |
| `tsp_xo_bank.sv` | NXO crossover copies with dispatch and output merge |
| `knap_pipeline.sv`, `tsp_pipeline.sv` | one island each |
| `knap_parallel_ga.sv`, `tsp_parallel_ga.sv` | chains of NPIPE islands, best-fitness reduction, evaluation counter |
| `ga_top.sv` | both GA circuits side by side |

### Top-level ports (`ga_top`)

* Shared: `clk`, `reset` (synchronous, active high), and `clken_rate` with
  `din_rate[9:0]`, which load the mutation rate into every pipeline of both
  circuits.
* Knapsack data: `knap_item_we`, `knap_item_idx[5:0]`,
  `knap_item_value[7:0]`, `knap_item_volume[7:0]`, `knap_cap_we`,
  `knap_cap_in[13:0]`.
* TSP data: `tsp_tbl_we`, `tsp_tbl_addr[11:0]`, `tsp_tbl_data[7:0]`.
* Results for each circuit: `*_best_fitness[15:0]`, `*_evaluate[15:0]`
  (evaluations modulo 2^16), `*_init_done`, and per-pipeline single-clock
  event flags `*_evt_*`: evaluation, replacement, migration, plus mutation
  and PMX stall for TSP.

After reset, each management module fills its memory (POP·BEATS clocks: 64
for Knapsack, 3264 for TSP) before it issues anything. The problem data may be
loaded during that time.

### Main parameters and defaults

| parameter | default | meaning |
|---|---|---|
| `KNAP_S` | 64 | items = chromosome bits |
| `KNAP_NPIPE` | 2 | Knapsack islands |
| `TSP_N` / `TSP_GB` | 51 / 6 | cities / bits per city |
| `TSP_NPIPE` | 4 | TSP islands |
| `TSP_NXO` | 1 | PMX crossover copies per TSP island |
| `*_POP` | 64 | individuals per island (address 6 bits) |
| fitness width | 16 | both problems |
| `TSP_TAW` | 12 | distance-table address bits (n² must fit) |
| `PERIOD`, `CW` | 10, 16 | migration period in individuals, counter width |
| `RB`, `RATE_INIT` | 10, 16 (Knapsack) / 256 (TSP) | rate width, rate after reset |

A different problem size needs a consistent set. For n cities:
`GB ≥ ceil(log2 n)` and `2^TAW ≥ n²`. For Knapsack, S must be a power of two,
and the capacity width is 8 + log2(S).

## Resource picture

The per-island cost is dominated by the Knapsack evaluation trees
(2·(S−1) adders) and by the TSP distance table (32 kbit per island). The PMX
crossover needs 3·n·6 bits of register storage (PA[0], PA[1], RS) plus
muxes. Together the two circuits hold
about 2000 flip-flops and about 260 kbit of memory. Memories are written as
arrays with one write port, so FPGA block RAM can be inferred. The distance
table is read through two ports.

## Verification

Each module has a self-checking testbench in `tb/`. All print
`TB_RESULT checks=N failures=M`.

* Operator testbenches compare against reference models written in the
  testbench. For Knapsack sums: exact value and exact latency. For PMX: the
  same loci, applied in software, must give the same offspring, and the PMX
  phase must last exactly N2−N1+1 clocks. Also checked are tour lengths,
  mutation statistics at several rates, the replacement rule and read-back of
  the population memory, and the migration period and the integrity of
  immigrants.
* Pipeline and parallel testbenches recompute every evaluated fitness from
  the chromosome. They check one evaluation per clock for Knapsack, check the
  replacement count, and require the search to make progress. On a 64-item
  instance the Knapsack GA reaches the dynamic-programming optimum within
  20 000 clocks. On a random 51-city instance the best tour falls from about
  1500 to under 1000.
* `tb_tsp_xo_bank` runs two crossover copies. It predicts from the dispatch
  rule which copy each parent reaches, checks every offspring against PMX
  applied to that copy's two parents, and requires one tour accepted per
  n+2 clocks or better.
* `tb_ga_workloads` rebuilds the parallel GAs by parameter for the other
  problem sizes. It runs Knapsack with 16 items on 1 island and 128 items on
  3 islands; both reach the dynamic-programming optimum. It runs TSP with 76
  cities on 2 islands and 101 cities on 1 island, with 7-bit labels, larger
  tables and two crossover copies. Every tour and fitness is checked there,
  together with the n-clock rate and progress of the search.
* `tb_ga_top` runs both circuits at full default size for 150 000 clocks.
  It checks convergence and counts that every mechanism occurred: lethal
  individuals, replacement, migration, TSP mutation, PMX stall and the rate
  load.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ga_pkg.sv tb/tb_ga_top.sv \
          --top-module tb_ga_top -Mdir obj_tb_ga_top
./obj_tb_ga_top/Vtb_ga_top
```

Replace `tb_ga_top` with any other file in `tb/`. Each testbench finishes in
well under a minute.

## Choices made here where the published description is open

* **Random numbers**: xorshift32 generators. The seed defaults 65000, 65000,
  45000 and 65000 are the four initial values printed for the generated
  circuit, read here as seeds. Each pipeline offsets them.
* **Mutation rate**: a 10-bit register, probability r/1024, loaded by
  `clken_rate`. For TSP it is decided once per tour.
* **Migration counter**: counts individuals, not clocks. This is the same
  for Knapsack, where one individual is one clock. The immigrant carries only
  its chromosome.
* **Initial population**: sparse random Knapsack chromosomes, each bit set
  with probability 1/8, so most fit the knapsack. Dense random ones are almost
  all lethal and leave the search flat. TSP uses rotated identity tours. The
  initial stored fitness is the worst value.
* **Fitness direction**: maximise for Knapsack, minimise for TSP. A tie never
  replaces.
* **Closed tour**: the TSP fitness includes the leg back to the first city.
* **Handshake**: `ready` from the PMX crossover paces issue. The Knapsack
  pipeline never stalls.
* **Evaluation latency**: the Knapsack trees take log2(S)+2 clocks instead of
  log2(S). The TSP evaluation takes 2 clocks.

## Known departures and limits

* The other way to absorb the PMX crossover's variable latency, a buffer
  after it, is not built. Duplication (`TSP_NXO`) is built instead.
* The Knapsack operators move a whole chromosome per clock (bus width equal
  to the item count). Narrower buses, which would take several clocks per
  chromosome, are supported by the management and immigration modules but
  not by the Knapsack operators.
* The inter-island chain is open-ended, as drawn. Pipeline 0 never receives
  immigrants.
* A population slot being overwritten can be read by the issue port in the
  same few clocks. Its chromosome or fitness may then be half old, half new
  for that one read. The GA tolerates this, and no interlock is built.
* The size-prediction model and the template-driven HDL generator that choose
  the parameters are software and are not part of this RTL. Parameters are
  set by hand.
* Problem sizes are not changeable at run time. A 128-item Knapsack or a
  76- or 101-city TSP needs the corresponding parameters (`KNAP_S = 128`;
  `TSP_N = 76`, `TSP_GB = 7`, `TSP_TAW = 13`; `TSP_N = 101`, `TSP_GB = 7`,
  `TSP_TAW = 14`).
