# A systolic GPF solver: multiplying out products of sums of products in hardware

Many NP-hard problems of logic design (covering, satisfiability, prime
implicant generation, and more) can be written as one Boolean formula of the form

    F = T1 · T2 · ... · Tm,   each term Tk = p1 + p2 + ...,   each pk a product of literals

a *generalized propositional formula* (GPF). The solutions are the products
that satisfy every term. They are found by multiplying the terms out and
simplifying the growing sum of products (SPF) at every step: products that hold
a variable and its complement are dropped, and products absorbed by others
(`ab + a = a`) are removed. The cheapest surviving products, those with the
fewest literals, are the best solutions. If a partial result ever becomes empty,
the formula has no solution.

This RTL builds that multiply-and-simplify loop as a small tree of identical
processors. It implements the GPF solver architecture of P. M. Ho and
M. A. Perkowski ("Systolic Architecture for Solving NP-Hard Combinatorial
Problems of Logic Design and Related Areas"), in the configuration of their
example: two leaf processors and one root. The sections below say where this
RTL fills in details the architecture leaves open.

## The product word

Every product is one 128-bit word:

| bits        | content                                                      |
|-------------|--------------------------------------------------------------|
| `[127:6]`   | 61 variable fields of 2 bits; variable *v* at `[127-2v -: 2]` |
| `[5:0]`     | cost = number of literals in the product                     |

| field | meaning                          |
|-------|----------------------------------|
| `10`  | positive literal *x*             |
| `01`  | negative literal *x̄*             |
| `11`  | variable absent (don't care)     |
| `00`  | contradiction: the product is empty |

With this code the product of two products is simply their bitwise AND. `x·x̄`
gives `10 & 01 = 00`, so a contradiction shows up as a `00` field and can be
detected later. The all-zero word is the *empty product*. It closes a term on
the input streams, and it fills unused registers. The shared types live in
`gpf_pkg` (`product_t`, and `item_t`, which is a product plus a valid bit).

## The data flow tree (`gpfs_top`)

```
 host ──terms──▶ BPP 0 (leaf) ──SPF──┐
                                     ├─▶ stream_join ──▶ BPP 2 (root) ──SPF──▶ host
 host ──terms──▶ BPP 1 (leaf) ──SPF──┘
```

The host splits the formula into two groups of terms and streams one group
into each leaf. A leaf multiplies its terms down to a single simplified SPF and
passes it up. `stream_join` hands the root the left SPF, then the right one, as
two terms. The root multiplies them and returns the final SPF, cheapest product
first. Each BPP works on its own and is coupled to the others only by
valid/ready streams. So the leaves run in parallel, and the root starts as soon
as both halves arrive.

`no_solution` rises as soon as any BPP produces an empty SPF. The host then
pulses `clear`, which returns every unit to its reset state, and starts the
next problem. `load_me[i]` is high while leaf *i* is ready for a term.

**Stream format** (host→leaf, child→parent, root→host): one product per beat,
`valid`/`ready` handshake. Each term is its products followed by one empty
product. `last` is raised with the separator of the final term.

## A BPP: PMU and SAPA in a loop (`bpp`)

Each Boolean Product Processor pairs a **Product Management Unit** (`pmu`),
which generates Cartesian products, with a **Sorting and Absorbing Parallel
Architecture** (`sapa`), which simplifies them. The PMU sends every product of
two terms to the SAPA. The SAPA sends back the simplified, sorted SPF, and the
PMU stores it for the next multiplication.

### The PMU and its control unit (`pmu`, `cpg`, `pmu_local_mem`)

The PMU has three parts:

- a **local memory** (`pmu_local_mem`) of product nodes chained into linked
  lists, with a free list for allocation;
- the **Cartesian product generator** (`cpg`), with one register `R` and an
  array `AR` of up to `AR_N` products; for each `R` it emits `R & AR[j]` for
  every `j`, one product per cycle;
- the **control unit**, written as the state machine inside `pmu`.

The control unit keeps a queue of terms, each a linked list, and proceeds as
follows (`INIT_TERMS = 4`):

1. The first three terms received go into local memory as lists. The fourth
   is loaded into `AR`.
2. *Round:* the products of the list at the head of the queue go one by one
   into `R`, and each node is freed as soon as it is read. For each `R` the CPG
   streams `R & AR[*]` to the SAPA. The last product of the round carries
   `last`.
3. When the SAPA returns a simplified SPF, its products are appended as a
   new list at the tail of the queue. This can happen in any state of the
   control unit. A node freed by a running round in the same cycle is reused
   straight away.
4. As soon as the CPG has sent its last product, `AR` is emptied. While input
   remains, the next input term goes into `AR`, and another round starts once
   a finished list heads the queue. So term 1 meets term 4, term 2 meets
   term 5, and so on. The results queue up behind the unused terms. The next
   SPF is built while the SAPA still works on the previous ones.
5. Once the input is used up, the head list of the queue is moved from memory
   into `AR` instead (`ar_from_mem` pulses) and multiplied by the next list.
   This repeats until one list is left.
6. Once nothing is left in the SAPA, that list goes out, followed by an empty
   product with `last`, and `done` is raised.

A term with no products, or a round whose SPF comes back empty, means the
formula cannot be satisfied: the PMU raises `unsat` and stops until `clear`.
Products that find no free node or no free `AR` register are dropped and
flagged (`mem_overflow`, `ar_overflow`). The host's partitioning is meant to
stop this from happening.

The queue order in steps 1–4 and the overlap of a round with the SAPA work on
the previous one are the ones the architecture prescribes. Step 5, the
end-of-input rule, is this design's own.

### The SAPA (`sapa`)

```
products ─▶ AU ─(N in parallel)─▶ AR2 buffer ─▶ PCEU ─▶ EPDU ─▶ QTS ─▶ sorted SPF
```

Each stage passes a whole SPF on before it takes the next. The absorption
unit therefore works on one SPF while the sorter is still busy with the one
before. Every SPF leaves the SAPA as exactly `N` beats: the real products come
first in cost order, then padding beats with `valid = 0`, and `last` marks
beat `N`.

#### Absorption unit (`au`, `pdd`)

`AR1` and `AR2` are two arrays of `N` product registers, all empty at the
start. An incoming product enters `AR1[0]` while `AR1` shifts right by one. In
the same cycle, every position *i* checks the product now in `AR1[i]` against
`AR2[i]` with its product domination detector:

| PDD result                | action                                             |
|---------------------------|----------------------------------------------------|
| `AR2[i]` implies `AR1[i]` | `AR2[i] ← AR1[i]`, `AR1[i] ← empty` (the weaker product replaces the stronger one) |
| `AR1[i]` implies `AR2[i]` | `AR1[i] ← empty` (the incoming product is absorbed) |
| neither                   | the product moves on next cycle                    |

"X implies Y" is tested bitwise: `(X & ~Y)` is zero over the 122 literal
bits. The cost field is ignored. An empty `AR2` slot implies everything, so a
surviving product settles in the first free slot it reaches. Identical products
absorb each other, which removes repeats.

After the product marked `last`, the unit shifts in `N-1` empty products to
flush `AR1`, then offers `AR2` in parallel. A batch of K products is ready
`K+N-1` cycles after its first product entered. A product that runs off the
end of `AR1` without being caught is lost, and `overflow` pulses. This happens
when an SPF has more than `N` mutually non-absorbing products. The lost
products are not necessarily the expensive ones (see *Departures*).

The procedure does not guarantee a fully minimal SPF. For example, a product
that replaces a stronger one at slot *i* stops there, so a second product it
would absorb at a later slot stays. The SPF it keeps is always equivalent to
the input, however.

#### Buffer, cost and empty-product units (`ar2_buffer`, `pceu`, `epdu`)

The buffer takes all `N` slots of `AR2` at once, which frees the absorption
unit, and shifts them out one per cycle. `pceu` counts the fields that read
`10` or `01` and writes the count into bits `[5:0]`. `epdu` clears the valid
bit of any product with a `00` field: unused slots, and products that held a
contradiction.

#### Quad-tree sorter (`qts`, `qts_pe`, `pipe_fifo`)

The sorter is the part that takes most study. It sorts batches of `N` items
(`N` a power of 4) by cost, with padding last.

- **Input buffer.** Items fill two rows of `N/2` cells serially. Row 1 is
  cells `0..N/2-1` and row 2 is cells `N/2..N-1`. When the buffer is full and
  the leaf PEs have taken the previous batch, each column is compare-swapped so
  that the cheaper item sits in row 1. Then all `N` items move at once into the
  input cells of the leaf PEs: leaf PE *k* gets rows 1 and 2 of columns 2k and
  2k+1. The buffer then refills while the tree sorts.
- **Tree.** There are `TL = log4 N` levels and `TP = (4^TL − 1)/3` PEs,
  numbered heap-wise: the root is 0, and the children of PE *k* are
  4k+1 … 4k+4. A PE at level *j* (root = 0) merges four sorted lists of
  `N/4^(j+1)` items into one list of `N/4^j` items.
- **PE.** Comparator C1 compares the heads of children 1 and 2, C2 those of
  children 3 and 4, and C3 the two winners. A status bit is 1 when the left
  value is greater, so on equal cost the left item wins. A child that has
  already delivered its share of the batch compares as "infinitely large". The
  control logic moves the winner into the PE's PIPE only when the PIPE has room
  and every child that still owes items shows one. This keeps the merge exact
  whatever the arrival times. `en` (C3 takes its left cell) and `fwd` (PE idle)
  are brought out.
- **Forward.** `qts` ANDs the `fwd` bits of the PEs of each level into
  `level_fwd[j]`, the Forward signal F of level *j*: 0 while the level works on
  a batch, 1 when it is idle. It is a status output. Data movement between
  levels is controlled by the pop handshake of each PIPE, which takes the
  place of the status bits that the architecture feeds back from a level to the
  level below.
- **PIPE.** Each PE's output FIFO has `N/4^j − 1` cells: 3 at the leaves and
  15 at the root for `N = 16`.

Timing: for one batch sent to an idle sorter with no output stalls, the last
item leaves 19 cycles after the last item enters (`N = 16`). The
architecture's step count is `TE = N + TL − 1 + Σ(N/4^i + 1) = 24`. Batches
then follow each other one item per cycle.

## Parameters

| module     | parameter        | default | origin                                   |
|------------|------------------|---------|------------------------------------------|
| `gpf_pkg`  | `WORD_W`, `NVARS`, `COST_W` | 128, 61, 6 | architecture                   |
| `gpfs_top` | `N`              | 16      | own choice (the architecture leaves `N` symbolic); power of 4 |
| `gpfs_top` | `AR_N`           | 16      | own choice, equal to `N` so any SPF fits `AR` |
| `gpfs_top` | `LEAF_MEM_DEPTH` | 64      | own choice                               |
| `gpfs_top` | `ROOT_MEM_DEPTH` | 128     | own choice; larger at the root, as the architecture asks |
| `gpfs_top` | `INIT_TERMS`     | 4       | architecture (terms sent to a PMU at start) |

With the defaults the top has about 50 k flip-flop bits. Most of them are the
128-bit product registers of the three absorption arrays, buffers and sorters,
plus 32 k bits of list memory.

## Departures and limits

- **Clocking.** The architecture describes processors that run
  asynchronously. Here everything shares one clock, and units are decoupled by
  valid/ready handshakes.
- **Forward signal.** The architecture derives a level's F from the first
  values held in its C1 comparators. Here a level counts as active while any
  of its PEs holds or still owes items of a batch.
- **Overflow policy.** When an SPF outgrows a processor, the architecture
  keeps only the cheapest products, thanks to sorting. Here that holds for the
  PMU's list memory: results arrive cheapest first, so the products that find
  no free node are the most expensive ones (`mem_overflow`). The absorption
  unit, however, sits before the sorter. When more than `N` products survive
  absorption, it drops those that found no slot, whatever their cost
  (`absorb_overflow`). Results stay correct, because every output product
  satisfies the formula, but some solutions can be missing.
- **Absorption** is the single-pass shift procedure above, so an SPF may keep
  some absorbable products or duplicates. The function is unchanged.
- **Not built:** the host (partitioning and tree search are software; the
  top's stream ports are its interface); the variant with *k* `R` registers
  working in parallel; a bit-serial version; the extensions to other bitwise
  operations, EXOR sums and multiple-valued literals; and the wider
  literal-per-word architecture for problems with thousands of variables.
  A formula must fit 61 variables.
- **Fixed tree.** The tree is two levels (two leaves, one root). Deeper trees
  can be built from `bpp` and `stream_join` in the same way.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv` that
prints `TB_RESULT checks=<n> failures=<n>` and stops itself through a
watchdog. With plain Verilator 5:

```sh
verilator --binary --timing -Wno-fatal --assert rtl/gpf_pkg.sv tb/tb_gpfs_top.sv \
          -y rtl --top-module tb_gpfs_top -o sim
./obj_dir/sim
```

Replace `tb_gpfs_top` with any other testbench name. The package must come
first on the command line.

| testbench           | what it establishes |
|---------------------|---------------------|
| `tb_gpfs_top`       | The whole tree at default sizes. The testbench plays the host. It first runs three small fixed problems: be·bcd must give exactly bcde with cost 4, while ab·a'b and ab·(a'+b') must report no solution. Then it runs 40 formulas over 8 variables: random ones, forced contradictions and unate covering formulas. Each result is compared with the formula over all 256 assignments, and `no_solution` is checked against satisfiability. It also checks cost order, and it requires that absorption, contradiction removal, absorption overflow, compare-swap, refilling `AR` from memory, `no_solution`, `load_me` and result back-pressure each occur. |
| `tb_bpp`, `tb_pmu`  | Whole problems through one BPP. `tb_pmu` uses an ideal SAPA model. Results are checked for Boolean equivalence. `tb_pmu` also checks that the first round pairs term 1 (in `R`) with term 4 (in `AR`), and that new SPFs are built while earlier ones are still coming back. |
| `tb_sapa`           | SPFs through the real SAPA. The kept set is compared with a sequential model of the absorption procedure, together with cost values, order and contradiction removal. |
| `tb_au`, `tb_pdd`   | Slot-by-slot comparison with the absorption procedure; `K+N-1` latency; domination against a field-wise model. |
| `tb_qts`, `tb_qts_pe`, `tb_pipe_fifo` | Sorted output that is a permutation of the input, under stalls; sort time ≤ `TE`; the stable four-way merge with left priority; FIFO order. |
| `tb_cpg`, `tb_pmu_local_mem`, `tb_ar2_buffer`, `tb_pceu`, `tb_epdu`, `tb_stream_join` | Unit behaviour against reference models, including one product per cycle from the CPG. |

## Files

`rtl/` holds one module or package per file. From the bottom up: `gpf_pkg`,
`pdd`, `au`, `ar2_buffer`, `pceu`, `epdu`, `pipe_fifo`, `qts_pe`, `qts`,
`sapa`, `cpg`, `pmu_local_mem`, `pmu`, `bpp`, `stream_join`, `gpfs_top`.
Each file opens with a description of its behaviour, interface and timing.
`tb/` holds the testbenches named above.
