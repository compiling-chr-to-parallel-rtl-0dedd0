# Constraint Handling Rules in hardware

Constraint Handling Rules (CHR) programs work on a multiset of constraints, the
*constraint store*. Each rule looks for a few constraints in the store (its
*head*), checks a guard, and removes, keeps or rewrites them. A program ends when
no rule applies any more. Because a rule only ever looks at a handful of
constraints, many rule applications on disjoint constraints can happen at the
same time, and that is what this RTL exploits.

The design turns each rule into a small combinational block, groups the rules
of one program into a *program hardware block* (PHB) that works on two
constraints, and feeds many PHBs in parallel from a *switch* that holds the
store and keeps handing out new pairs of constraints until nothing changes. It
contains five programs built this way:

| program | rules | executors |
|---|---|---|
| greatest common divisor | R0: drop `gcd(0)`; R1: `gcd(N) \ gcd(M) <=> M>=N | gcd(M-N)` | round-robin switch, strong-parallel shift register |
| prime sieve | `prime(X) \ prime(Y) <=> Y mod X = 0 | true` | strong-parallel shift register, massively parallel array |
| merge sort | M0 and M1 on flattened `c(kind, x, y)` constraints | round-robin switch, two switches joined by a FIFO (online) |
| gcd matrix | GCD0, GCD1 on `gcd(X, Y, N)` | round-robin switch behind a host port |
| interval solver | Redundant, Intersect on `X :: lo : hi` | round-robin switch behind a host port |

All of it is plain synthesizable SystemVerilog with sizes set by parameters.
The default store holds 128 constraints.

## Constraints as packed structs

Every constraint type in `chr_pkg` is a packed struct whose top bit is `valid`.
Removing a constraint means clearing `valid`. The cell stays where it is, and
every block ignores invalid inputs. Nothing is ever physically compacted inside
an executor. Only the host port packs the surviving constraints when it
returns them.

| type | fields | bits |
|---|---|---|
| `gcd_c_t` | valid, n[16] | 17 |
| `prime_c_t` | valid, n[16] | 17 |
| `ms_c_t` | valid, kind (0 = arc, 1 = seq), x[16], y[16] | 34 |
| `gm_c_t` | valid, x[8], y[8], n[8] | 25 |
| `iv_c_t` | valid, v[8], lo[16], hi[16] | 41 |

Widths are package parameters (`GCD_W`, `PRIME_W`, `MS_W`, `GM_W`, `IV_W`,
`IDX_W`). The generic blocks (`chr_cs`, `chr_sp_switch`, `chr_fifo`,
`chr_host_if`) see a constraint only as a `CW`-bit vector and only look at its
top bit.

## Rules and program blocks

A rule block (`rhb_*`) is combinational. It takes its head constraints, evaluates
the guard, and outputs the rewritten constraints plus a `fire` flag. When the
guard is false the outputs equal the inputs.

A PHB (`phb_*`) holds two constraint registers. On `load` it captures the two
inputs. After that, on every clock, it runs all of its rule blocks on the
registered pair, and a *commit* stage picks which firing rule's result to write
back. More than one rule can be enabled at once. Two copies of the same rule
with their inputs swapped can both be enabled, and so can two rules that
rewrite the same constraint. The commit stage lets only a set that does not
conflict go through, in a fixed priority order:

- gcd: both R0 copies (they remove different constraints), else R1(a,b), else R1(b,a).
- merge sort: M0(a,b), M0(b,a), M1(a,b), M1(b,a), one per clock.
- gcd matrix: same as gcd, for GCD0/GCD1.
- interval: Redundant(a,b), Redundant(b,a), Intersect(a,b), Intersect(b,a).

A PHB raises `finish` on the clock after a step in which nothing fired. It keeps
`finish` high until the next `load`. If `load` is raised at edge 0, `finish` is
seen high after edge `k + 2`, where `k` is the number of steps that fired.
`changed` says whether anything fired since the load. The switches use it to
notice when the whole store has gone quiet.

The two strong-parallel PHBs (`phb_gcd_sp`, `phb_prime`) are different. Their
first input is a *read* constraint that they never change. Only the second
input, the *removed* constraint, is rewritten.

## The round-robin switch (`chr_cs`)

`chr_cs` stores `N` constraints and drives `N/2` two-input PHBs. One *round* goes:

1. **LOAD**: PHB `i` is loaded with cells `i` and `N-1-i`.
2. **WAIT**: the switch waits until every PHB raises `finish`. This is the
   barrier: fast PHBs sit idle until the slowest one is done.
3. **XFER**: the results are written back. Cells `1..N-1` then rotate one
   place while cell 0 stays put.

That is the circle method for scheduling a round-robin tournament. Every
`N-1` rounds, every constraint meets every other constraint exactly once.

A run ends once `N-1` rounds in a row have changed nothing. At that point every
pair has been tried on the final store and no rule applies, which is the CHR
notion of termination. `done` stays high until the next `start`. `rounds`
counts the rounds of the run, including the final quiet sweep, so any run
takes at least `N-1` rounds.

While the switch is in XFER, an outside block may write cells through
`wr_en/wr_idx/wr_data`. It may also stretch the window with `xfer_busy`, and
it may keep the switch from finishing with `ext_hold`. Any such write resets
the quiet count. The online merge sort uses this port to move constraints
between its two stores. The other executors tie the port off.

Clocks per round are about `3 + (slowest PHB's firings)`. For gcd that is the
number of subtractions the slowest pair needs. For merge sort it is at most
two.

## The strong-parallel shift register (`chr_sp_switch`)

Some rules only *read* one of their head constraints, for example `prime(X)` in
the sieve or `gcd(N)` in R1. Many rule instances can then share that one
constraint. `chr_sp_switch` keeps the store as a circular shift register:

- cell 0 is the read constraint of all `N-1` PHBs;
- cell `i+1` is the removed constraint of PHB `i`.

After each round the removed constraints are written back and the register
shifts one place (cell `i` takes cell `i-1`, cell 0 takes cell `N-1`). It then
keeps shifting, one place per clock, while cell 0 is invalid, so a round never
starts with nothing to read. The read outputs of the PHBs are not used, because
the read constraint is never rewritten. The two executors leave those pins
open, and Verilator reports one warning for each.

A run ends after `N` shifts in a row without a change. `shifts` counts all
single-place shifts and `rounds` counts PHB rounds. With a common gcd the
128-value query needs 3 rounds and 132 shifts. The prime sieve on
`prime(2..129)` needs 95 rounds and 255 shifts.

## Massive parallelism (`prime_mp_executor`)

The prime rule only removes constraints. Every pair of constraints can
therefore be tested at once, and a constraint survives if *no* rule instance
removed it: its new `valid` is its old `valid` ANDed with the inverse of each
instance's kill signal. Doing all `N(N-1)` ordered pairs at once is too much
hardware (16256 dividers at `N = 128`), so the executor covers them in steps:

- In step `s`, cells `s*ROWS .. s*ROWS+ROWS-1` are the read constraints.
- Each read constraint is tested against all `N` cells, using `ROWS*N` instances of `rhb_prime`.
- A cell never tests itself.

One step takes one clock, and a sweep takes `N/ROWS` steps. The executor
repeats sweeps until one removes nothing. With `ROWS = 8` and `N = 128` that is
1024 remainder units. The sieve on `prime(2..129)` takes two sweeps, 32 clocks.
This is by far the fastest executor, and by far the largest.

This scheme is only correct for programs in which a constraint can never be
removed by a rule whose head it also deletes. The sieve is such a program as
long as the query holds no duplicate values. Two equal primes would remove
each other in the same step.

## Merge sort and the online executor

The merge sort works on constraints of two kinds:

- `c(1, N, A)`: a sorted chain of length `N` that starts at `A`.
- `c(0, A, B)`: an arc, meaning B follows A.

M1 merges two chains of equal length and emits an arc. M0 keeps arcs pointing
to the nearest larger value. A query of 128 values `c(1,1,v)` ends as one
`c(1,128,min)` and 127 arcs that chain all the values in order.

`msort_executor` is the round-robin switch with 64 `phb_msort`. Every pair can
fire, and pairs of arcs keep rewriting each other. The run takes 8727 rounds at
128 values.

`msort_online_executor` splits the work across two switches joined by a
`chr_fifo`:

- **Executor 1** starts from the query. In each of its transfer windows it
  pushes every valid arc in its store into the FIFO, one per clock. It clears
  each cell it pushes and stalls when the FIFO is full.
- **Executor 2** starts with an empty store. In its own transfer windows it pops
  FIFO entries into its first invalid cells, so M0 starts on arcs while M1 is
  still producing them.
- Executor 2 is not allowed to finish while executor 1 is running or the FIFO
  holds anything.
- `done` is the AND of both.

`seqs` and `arcs` are the two final stores. Counters report `rounds1`,
`rounds2`, `arcs_moved`, `fifo_full_waits` and `fifo_peak`.

At 128 values executor 1 takes 512 rounds. Executor 2 takes 8812, so this
version is *not* faster than the single executor. The single-executor run
spends its time on arc-against-arc work too, and that work is still all done
in executor 2. The FIFO never held more than 3 entries. At the default depth
of 128 it cannot overflow, because at most `N-1` arcs are ever produced.

## Accelerators behind a host port

`gcdm_accel` and `interval_accel` are built the same way: a round-robin switch,
its PHBs and `chr_host_if`. The host does the parts of the program that do not
map well to hardware, and calls the accelerator for the inner fixpoint. The
host side is software and is not in this RTL:

- gcd matrix: generating the pairs.
- interval solver: the arithmetic constraints and the consistency checks.

A call has three phases:

1. **Load**: `in_valid/in_data/in_ready` accept up to `N` constraints, one per
   handshake. Any cell not loaded stays invalid. `in_ready` drops when the
   store is full.
2. **Run**: a one-cycle `go` starts the executor. `running` is high until it is
   done.
3. **Unload**: only valid cells are returned, in cell order, on
   `out_valid/out_data/out_ready`. `out_last` marks the final one, and
   `result_count` holds how many there were. An empty result returns nothing,
   and `result_count` is 0.

The gcd-matrix PHB runs Euclid on `gcd(X, Y, N)` pairs that share both
positions `X` and `Y`. It removes zeros. The interval PHB drops an interval
that contains another one on the same variable. It replaces two intervals on
the same variable by their intersection. An empty intersection (`lo > hi`) is
handed back unchanged for the host to detect. Variables are small integer
indexes.

## Sizes

Every executor defaults to `N = 128`:

- gcd: 16-bit values.
- gcd matrix: 8-bit values and positions.

The other value widths are this design's choice. Whether the evaluated
workloads fit in one call:

| workload | needs | fits in one call at N = 128 |
|---|---|---|
| gcd, 16 to 128 values | up to 128 cells | yes |
| prime sieve, 16 to 128 constraints | up to 128 cells | yes |
| merge sort, 8 to 128 values | up to 128 cells (and a 128-entry FIFO) | yes |
| gcd matrix, 16 to 128 byte-sized constraints | up to 128 cells | yes |
| gcd matrix on a set of k elements | k·k constraints | k ≤ 11 |
| interval solver, v variables × 20 intervals | 20·v constraints | v ≤ 6 |

Larger problems have to be split into several calls by the host.

`chr_top` puts all eight executors side by side with separate ports. After
synthesis to generic cells it has about 45 000 cells and 69 000 flip-flop bits,
most of them in the massively parallel sieve and the store registers.

## Where this departs from the original scheme

- **Load and reset.** The PHB has a one-cycle `load` pulse and a synchronous
  active-low reset. In the original, the PHB captures its inputs while reset is
  asserted. With a separate load, a PHB can be reloaded every round.
- **R1 guard.** R1 uses `M >= N`. The original text is inconsistent: in one place
  it has `M > N`. With `>=`, two equal values collapse to one gcd and a zero,
  and the zero is then removed. R1 also needs `N /= 0`.
- **Commit priority.** The priority orders listed above are this design's own.
  The original only says that the commit stage picks a non-conflicting subset
  by priority.
- **Termination.** The switch ends after a full quiet sweep (`N-1` rounds, or
  `N` shifts). The original does not say how a switch decides that it is done.
- **Strong-parallel shifting.** The shift register always moves at least one
  place between rounds, then keeps going while cell 0 is invalid.
- **Massive parallelism.** This executor uses `ROWS*N` rule instances per
  step instead of `N(N-1)`. `ROWS` is a free parameter.
- **Online merge sort.** The original says a new constraint replaces an invalid
  one. This executor always imports into the *first* invalid cell. Exports
  happen only between rounds.
- **Missing pieces.** The host processor, its bus link and the software half of
  the hybrid programs are not part of this RTL. Neither is the hand-written
  parallel-reduction gcd that the original uses as a comparison.

## Simulating

Every module has a self-checking testbench in `tb/` with the same name plus
`tb_`. Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. A
watchdog ends any run that hangs. Most unit testbenches use small stores
(`N` = 8 to 32) and random queries, and compare against a reference model
written in the testbench. To build and run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/chr_pkg.sv tb/tb_gcd_executor.sv \
          --top-module tb_gcd_executor -Mdir obj_gcd
./obj_gcd/Vtb_gcd_executor
```

`tb/tb_chr_top.sv` runs the full `chr_top` at its defaults, one complete
operation for each of the eight executors:

- gcd: 128 multiples of a common factor.
- prime sieve: `prime(2..129)`.
- merge sort: 128 distinct values.
- gcd matrix: an 11-element set.
- interval solver: 6 variables × 20 intervals.

It checks each result against a reference. It also counts how often each
mechanism happened: R0 and R1 firings, commit choices, barrier waits, quiet
sweeps, shift-until-valid, multi-instance removals, FIFO traffic, overlap of the
two merge executors, and cells skipped on unload. The test fails if any of
those never happened. It builds and runs in well under a minute.

| executor | query | rounds (or steps) |
|---|---|---|
| `gcd_executor` | 128 values | 254 rounds |
| `gcd_sp_executor` | 128 values | 3 rounds, 132 shifts |
| `prime_sp_executor` | prime(2..129) | 95 rounds, 255 shifts |
| `prime_mp_executor` | prime(2..129) | 32 steps (clocks) |
| `msort_executor` | 128 values | 8727 rounds |
| `msort_online_executor` | 128 values | 512 / 8812 rounds |
| `gcdm_accel` | 121 constraints | 254 rounds |
| `interval_accel` | 120 intervals | 198 rounds |

## Changing it

- **Store size.** Set `N` (it must be even for `chr_cs`). A switch keeps every
  cell in flip-flops, and the round-robin and shift multiplexers grow with `N`.
- **Value widths.** The widths are in `chr_pkg`. Every block follows from the
  struct types.
- **A new program.** Write its rule blocks and a PHB with the same `load / finish
  / changed` interface, then copy `gcd_executor` (round-robin) or
  `gcd_sp_executor` (for rules whose first head is only read).
