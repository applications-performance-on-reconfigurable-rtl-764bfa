# Reconfigurable computation structures: a merge-sort tree and a parallel annealer

This repository holds two application-specific circuits of the kind that are
mapped onto an FPGA-based emulator attached to a workstation. The workstation
loads data over a simple memory-mapped bus, starts the computation, and reads
the result back. The two circuits are independent, and the top level places
them side by side:

* **Merge-sort tree.** A binary tree of comparator registers. After a short
  fill, it delivers N keys in descending order at one key per clock.
* **Simulated-annealing TSP engine.** It looks for a short travelling-salesperson
  tour. Several annealing modules work in parallel, each on its own tour. They
  share one distance table, and each has its own subtractive random-number
  generator. Every module evaluates a tour change with an adder tree and
  decides whether to accept an uphill change with an integer series
  approximation of `e^X`. A control block runs a linear cooling schedule and
  picks the best tour at the end.

Everything is synthesizable SystemVerilog. Both circuits are clocked on one
clock `clk` and reset with a synchronous, active-high `rst`.

## The host bus

Both circuits talk to the host through the same request struct,
`rawcs_pkg::host_req_t`:

| field   | width | meaning |
|---------|-------|---------|
| `rd`    | 1     | read strobe, one clock wide |
| `wr`    | 1     | write strobe, one clock wide |
| `addr`  | 24    | word address |
| `wdata` | 32    | write data |

Read data (`*_rdata`) is combinational from the addressed register.

* When a read has a side effect (popping the sorter's root), the strobe is
  applied at one clock edge. The value the host sees is the value after that
  edge.
* When a read has no side effect, the host can sample the data in the same
  cycle.

The bus widths are those of the original workstation interface. There is no
wait-state handshake, because every access completes in one clock.

## Merge-sort tree (`merge_sort_tree`)

### Structure

The tree has N leaves and N−1 comparator nodes, each holding one DW-bit
register. The nodes are numbered in heap order:

* Node 1 is the root.
* Node i has children 2i and 2i+1.
* Leaf j is node N+j.

There are three kinds of cell:

* `merge_node`: an inner comparator.
* `merge_top_node`: the root comparator plus the bus decoder.
* `merge_leaf`: one key register.

### The comparator rule

Each node sees its two children's registers, `in1` (left) and `in2` (right).
When its parent asserts `load`, the node does three things in the same clock:

1. It copies the larger child value into its own register.
2. It raises `read1` or `read2` to tell that child to load as well.
3. The request ripples down to a leaf in the same clock.

A leaf that is asked to load sets its register to 0. Ties go to the right
child.

Two values are reserved:

| value        | meaning | how the comparator treats it |
|--------------|---------|------------------------------|
| all-ones     | "not yet filled"; every register holds it after reset | the child holding it is always asked to load, so the marker is flushed upward; a node whose two children both hold it stays all-ones |
| 0            | "exhausted": the leaf has given up its key | ordinary smallest value |

Keys must therefore be smaller than `2^DW − 1`. A key of 0 is sorted
correctly but cannot be told apart from an exhausted leaf.

### Timing

A full operation runs as follows:

1. **Reset** puts all-ones in every register.
2. **Load.** The host writes the N keys.
   * With `SCAN = 1` (the default), every write to address `SCAN_ID` (2000)
     shifts the whole leaf chain by one. The newest key enters leaf 0 and the
     first one ends in leaf N−1.
   * With `SCAN = 0`, key j is written to address j.
3. **Pre-load.** The host reads the root at address `N+1`. The first
   `log2(N) − 1` reads return all-ones, while the markers drain out of the
   levels below the root.
4. **Output.** The next N reads return the keys in descending order, one per
   clock.
5. **Drain.** All later reads return 0.

The tree must be reset before the next sort.

### Where the time goes

The only sequential element on the load path is each node's register. The
`load` → `read` chain, however, is combinational from the root to a leaf
(log2 N comparators deep). That long path sets the clock rate of the
structure. It is the reason such a tree sorts only a constant factor faster
than software.

## Annealing engine (`tsp_anneal`)

### Blocks

| block | role |
|-------|------|
| `dist_matrix` | C×C distance table, written by the host; one registered read port per annealing module |
| `subtractive_rand` (one per module) | lagged subtractive generator (table of 55, lags 24/55, modulo 2^31) with a rejection test for uniform city indices |
| `sim_anneal` (`NUM_SA` of them) | one module, improving its own tour |
| `energy_change` | inside each module: three-level adder tree for the tour-length change |
| `exp_approx` | inside each module: series approximation of `e^X` |
| `tsp_control` | temperature schedule, stopping rules, selection of the best tour |

### Host address map

In the table, C is `CITIES` and NS is `NUM_SA`.

| address | meaning |
|---------|---------|
| `s + C·t`, for 0 ≤ s, t < C | distance from city s to city t (write) |
| `MB(j) + i`, where `MB(j) = C² + j·(C+1)` | city at tour position i of module j (write) |
| `MB(j) + C` | length of module j's initial tour (write) |
| `CB = C² + NS·(C+1)` | write: start annealing at temperature T. Read: T while annealing, and the best length once finished |
| `CB + 1 + i` | city at position i of the best tour (read, after `done`) |

At the defaults (C = 10, NS = 4), `CB` is 144. The host has to provide a
symmetric distance table and a consistent tour and length. The engine keeps
each length up to date by adding the change of every accepted swap; it never
recomputes a length.

### One swap attempt (`sim_anneal`)

A module holds a tour `order[0..C−1]` and its length. While `run` is high, it
loops through the following states:

1. **PICK0, PICK1.** Draw two positions from the random generator.
   * A number that fails the generator's rejection test is discarded (see
     below).
   * If the two positions are equal, the second becomes the first plus 3,
     modulo C.
   * **CHECK.** If the positions are too close to give six distinct
     neighbouring edges, the pair is drawn again. This applies when fewer
     than 3 positions lie on the path from p0 to p1, or fewer than 2 lie off
     it.
2. **FETCH.** Take the cities around the two positions: A, B, C around p0 and
   D, E, F around p1.
3. **REQ.** Send eight distance requests, one per clock, to the module's port
   of the distance table:
   * the new edges AE, EC, DB, BF;
   * the old edges AB, BC, DE, EF.
   
   Each answer comes back one clock after its request.
4. **DECIDE.** The adder tree forms
   `Δ = (AE+EC) + (DB+BF) − ((AB+BC) + (DE+EF))`.
   * If Δ < 0, the swap is accepted.
   * Otherwise one more raw 31-bit random number r is used:
     * compute `X = −(Δ·2^FRAC / T)`, with the division truncated and X
       saturated to its width;
     * accept if `r · 2^FRAC < e^X(approx) · 2^31`, that is, if r / 2^31 is
       below the approximated probability.
5. **COMMIT.** On acceptance, swap the two cities and add Δ to the length.
   Pulse `tried`, and pulse `accepted` if the swap was accepted.

An attempt takes 15 clocks when no number is rejected and no pair is redrawn.
When `run` falls, the module finishes its current attempt and then raises
`idle`.

### The random generator (`subtractive_rand`)

This is a hardware version of the classic subtractive generator with a table
of 55 entries. It is initialised from a seed by the usual "multiply-free"
recurrence and then stirred three times. It also has to deliver integers
modulo M without bias, so it checks each raw number r:

* `uniform_ok` is high when `r < 2^31 − (2^31 mod M)`;
* `uniform` is `r mod M`.

A module throws away numbers with `uniform_ok` low.

The software processes the whole table at once. The hardware updates one table
entry per clock instead:

* **Seeding** takes 54 + 7·55 = 439 clocks after reset. `seeded` rises when it
  is done.
* **A refill** is needed after 55 numbers have been used. It takes 55 clocks,
  during which `valid` is low.

The sequence of numbers is exactly that of the software generator. The
testbench compares it against a model of that program.

Module j is seeded with −500 + 500·j. The engine does not count annealing time
until every generator is seeded.

### The exponential approximation (`exp_approx`)

The approximation is

`y = 1 + X + X²/2 + X³/6 + X⁴/24`

* `TERMS` (1 to 4) sets how many X terms are kept.
* `FRAC` sets the fixed-point fraction bits.
* The defaults, `TERMS = 4` and `FRAC = 0`, give the all-integer,
  four-term form.
* The divisions truncate toward zero, like C integer division.

Be aware of how this behaves on integers:

* **X = 0** (an uphill change smaller than T) gives y = 1, so the swap is
  always accepted.
* **X = −1** gives y = 1 − 1 + 0 + 0 + 0 = 0, so the swap is never accepted.
* **X = −2** gives y = 1 − 2 + 2 − 1 + 0 = 0, so the swap is never accepted.
* **X ≤ −3:** the even-power terms win and y is at least 1, so the swap is
  always accepted. The first such value is X = −3, where
  y = 1 − 3 + 4 − 4 + 3 = 1.

With the four-term integer default, a large uphill change is therefore always
accepted. This is what the integer series gives, and the design keeps it. The
consequence is much weaker optimisation than true annealing. For example, on
the same 8-city problem, `TERMS = 4, FRAC = 0` reached a tour of length 390,
while `TERMS = 3, FRAC = 8` reached 277.

For annealing that behaves more like `e^X`, do either of the following:

* set `TERMS = 3` (or another odd count), so that y goes negative for large
  negative X;
* add fraction bits with `FRAC`.

Both are plain parameters of `tsp_anneal` and `rawcs_top`.

### Cooling schedule and stopping (`tsp_control`)

A write to `CB` starts annealing at temperature T. The schedule then works
per temperature:

* **Temperature period.** T is held for `TRIES_PER_T · C` clocks (2500 at the
  defaults), after which it drops by `COOL_RATE`.
* **Too many accepts.** If more than `ACCEPTS_PER_T · C` swaps are accepted
  during one temperature (summed over all modules), T drops at once. This is
  the `ev_early` strobe.
* **Frozen.** A temperature period that ends with no accepted swap ends the
  run. This is the `ev_frozen` strobe.
* **Final temperature.** The run also ends when the next temperature would be
  `T_FINAL` or lower.
* **Normal drop.** A normal temperature change is the `ev_cool` strobe.

At the end:

1. T is cleared to 0 and `run` falls.
2. The control block waits until all modules are idle.
3. It picks the module with the shortest tour. The lowest index wins a tie.
4. It raises `done`.

Reading `CB` then returns the best length, and reading `CB+1..CB+C` returns
the best tour. Writing `CB` again restarts annealing from the modules' current
tours.

A run from T = 67 with the default 10 cities and 4 modules takes about 165,000
clocks.

### Distance table (`dist_matrix`)

* It is a plain memory array of C² words with no reset.
* The host writes it through the bus.
* Each annealing module has a read port with one clock of latency.
* The entry for source s and destination t is at index `s + C·t`.

## Top level (`rawcs_top`)

`rawcs_top` holds `merge_sort_tree` and `tsp_anneal`. Each has its own bus
(`sort_req`/`sort_rdata` and `tsp_req`/`tsp_rdata`). The top also brings out
`tsp_done` and the three schedule event strobes.

| parameter | default | meaning |
|-----------|---------|---------|
| `SORT_N` | 256 | keys in the sorter (power of two) |
| `SORT_DW` | 32 | key width |
| `CITIES` | 10 | cities in the TSP |
| `NUM_SA` | 4 | parallel annealing modules |
| `TRIES_PER_T` | 250 | clocks per temperature, per city |
| `ACCEPTS_PER_T` | 60 | accept limit per temperature, per city |
| `TERMS` | 4 | terms of the `e^X` series |
| `FRAC` | 0 | fraction bits of X and of the series |

Resources at the defaults (coarse synthesis) are about 6,600 cells,
18,600 flip-flop bits and 10,000 memory bits.

## Where this design departs from the original, and its own choices

* **Probabilistic acceptance.** The original hardware description accepts
  only shortening swaps. The probabilistic acceptance comes from the original
  software and its experiments with integer series, and it is implemented
  here.
* **Six distinct edges.** Swap pairs that cannot give six distinct edges are
  drawn again, as the software does. The one-step fix-up of the original
  hardware description is not used.
* **Random generator timing.** The generator updates one table entry per
  clock, not the whole table at once. The sequence is unchanged, but numbers
  pause during a refill.
* **Stopping rules and address map.** The accept limit per temperature and
  the frozen-stop rule come from the software. The address map of the
  annealing engine is this design's own, because the original one overlaps.
* **Result selection.** A multiplexer replaces a tri-state bus.
* **Distance width.** The distance table is 32 bits wide, so that all
  annealing blocks share one width (the original gave it 16 bits in one place
  and 32 in another).
* **Clocks per temperature.** The original software allows up to 500·C
  attempts per temperature. The hardware description counts 250·C clocks,
  and this design follows the hardware.
* **Exponential schedule.** The exponential cooling schedule (T ← 0.9·T) is
  not built. Only the linear schedule is built, because it suits integer
  hardware.
* **Problem sizes.** The original evaluated 20- to 640-city problems in
  software. The hardware here defaults to 10 cities. A 640-city problem would
  need a 409,600-word distance table.
* **Not included.** The emulator, the host workstation and its interface
  card are not part of the RTL. The testbenches play the host.

## Files

* `rtl/rawcs_pkg.sv`: bus struct and widths.
* `rtl/merge_*.sv`: the sorter cells and the tree.
* `rtl/dist_matrix.sv`, `rtl/subtractive_rand.sv`, `rtl/energy_change.sv`,
  `rtl/exp_approx.sv`, `rtl/sim_anneal.sv`, `rtl/tsp_control.sv`,
  `rtl/tsp_anneal.sv`: the annealer.
* `rtl/rawcs_top.sv`: top level.
* `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_rawcs_top.sv`: end-to-end run at reduced sizes. It counts every
  mechanism at least once:
  * scan shifts, fill markers and sorted keys;
  * temperature drops, early drops and the frozen stop;
  * redrawn pairs;
  * downhill swaps, and accepted and rejected uphill swaps.
* `tb/tb_rawcs_full.sv`: the top level at its default parameters. It sorts
  256 keys and anneals a random 10-city problem from T = 67.
* `tb/tb_sort_workloads.sv`: trees of 4, 8, 64 and 256 keys, each sorted
  once. It checks the fill-marker count and the one-key-per-clock output.
* `tb/tb_tsp_workloads.sv`: engines of 20 and 80 cities with 4 modules and
  default settings, started from a nearest-neighbour tour at T = 67. It checks
  tour validity, length and the best-of-modules choice. The 20-city run takes
  about 330,000 clocks and the 80-city run about 1.3 million.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rawcs_pkg.sv tb/tb_rawcs_full.sv --top-module tb_rawcs_full -o sim
./obj_dir/sim
```

Any other testbench runs the same way. The full-size run finishes in a few
seconds. Lint a module with `verilator --lint-only -Wall -Irtl -y rtl
rtl/rawcs_pkg.sv rtl/<module>.sv`.

## How far to trust it

* **Sorter.** Checked against a software sort for trees of 4, 8, 16, 64 and 256
  keys, in both load modes.
* **Random generator.** Checked number for number against a model of the
  software generator.
* **Adder tree and series.** Checked against independent arithmetic.
* **Annealing module.** Checked against a model of its energy change and of
  its accept rule on every attempt.
* **Engine.** Checked by tour validity, by length consistency, and by the
  best-of-modules choice.

Tour quality depends strongly on `TERMS` and `FRAC` (see the exponential
approximation section). It also depends on how large the distances are
compared with T. With the integer four-term default and cities spread over a
1000×1000 grid, most uphill swaps have X ≤ −3 and are accepted. The
workload runs then end with longer tours than the nearest-neighbour start
(20 cities: 3,866 → 8,308). The testbenches check that the machine does what
is described, not that the tour is good. For optimisation, scale the distances
so that the typical swap change is below about 2T, or use an odd `TERMS`. No timing closure has been done for any FPGA.
