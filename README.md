# Dynamic trace-signal selection for post-silicon debug

After tape-out, a chip can only be observed through a few internal signals.
Their values are recorded every cycle into a small on-chip trace buffer.
The usual method fixes at design time which N signals feed the buffer. Those
N signals are then traced for the whole run, even when the part of the chip
they watch is clock-gated or not of interest.

This RTL makes that choice at run time. The circuit under debug is split into
M *functional regions*, for example one per core, or a core's front end and
back end. At design time each region gets its own ranked list of N signals
that are best at exposing errors in that region. That gives M x N candidates
in total. A validation engineer drives a run-time *knob* that says which
regions are currently relevant. The hardware then fills the N trace bits from
the lists of those regions only.

The default size is M = 4 regions, N = 32 trace bits and a 32 x 1024-bit
trace buffer.

```
                 +------------------+   sel[N]   +------------------+ trace_word +--------------+
active_regions ->| trace_controller |----------->|  trace_datapath  |----------->| trace_buffer |-> rd_data
  (M-bit knob)   | (register + table)|           |  N multiplexers  |   N bits   | N x DEPTH    |
                 +------------------+            +------------------+            +--------------+
                                      cand[M][N] ------^
                                      (ranked signals of the circuit under debug)
```

## Sharing the N trace bits among the active regions

Each region i has a relevance weight r_i (the `RELEVANCE` parameter, 8 bits
per region, default 1 for every region). The weight says how likely errors
are in that region, for example the share of bugs found there before silicon.
For a set of active regions, r is the sum of the weights of the active
regions. Each active region i gets this many trace bits:

    C_i = N * r_i / r

Inactive regions get no trace bits. Region i always contributes its best C_i
signals, `cand[i][0 .. C_i-1]`.

- **Rounding.** Each region first gets floor(N*r_i/r). The bits lost to
  rounding then go one each to the regions with the largest remainders. On a
  tie, the lower region index wins. So the C_i always add up to N, and every
  trace bit carries a signal.
- **Worked example: M = 3, N = 6, weights 1, 2, 3.**
  - All regions active: 1, 2 and 3 bits.
  - Regions 0 and 2 active: the exact shares are 1.5 and 4.5. The remainders
    tie, so the spare bit goes to region 0, giving 2 and 4 bits.
- **Equal weights, two regions, N = 2.**
  - Only region A active: A0, A1.
  - Only region B active: B1, B0.
  - Both active: A0, B0.
- **Special cases.**
  - A knob of all zeros is treated as "all regions active".
  - If all active regions have weight 0, they share the bits equally.

The weights are fixed when the unit is built, so the allocation for each of
the 2^M knob values is known in advance. `trace_controller` works out all of
them during elaboration. In hardware it is only a state register plus a
constant table: 16 entries of 32 seven-bit select codes at the default size.
To change the weights, change the parameter. No logic needs rewriting.

## The reduced multiplexer network

The simple datapath would be N multiplexers, each seeing all M x N
candidates. That is 128 inputs each at the default size. This design uses
fewer inputs by relying on one property of the ranked lists: a region's
signals are always taken best-first. Signal p of a region is traced only if
signals 0 .. p-1 of that region are traced too.

- Every multiplexer is *homed* on one region. Multiplexer k belongs to
  region h = k / (N/M). Its input 0 is that region's signal k mod (N/M).
  So each region's best N/M signals have a fixed home, and never compete
  with each other for a multiplexer.
- The other N - N/M signals of each region are wired to every multiplexer
  that is not homed on that region.
- Each multiplexer therefore has 1 + (M-1)(N - N/M) inputs:
  - 73 inputs instead of 128 at the default size;
  - 5 inputs instead of 9 for M = N = 3.

Placement for one knob value works like this:

- A region that gets C_i <= N/M bits uses only its first C_i home
  multiplexers.
- A region that gets more than N/M bits puts its extra signals (priority
  N/M and up) on the home multiplexers that other regions leave unused.
- Because the C_i add up to N, there are exactly as many unused
  multiplexers as extra signals.
- The extra signals are placed in region order, then priority order, onto
  the free multiplexers in increasing index.

Example, M = N = 3, regions A, B, C:

| multiplexer | code 0 | codes 1-2 | codes 3-4 |
|-------------|--------|-----------|-----------|
| 0 (home A)  | A1     | B2, B3    | C2, C3    |
| 1 (home B)  | B1     | A2, A3    | C2, C3    |
| 2 (home C)  | C1     | A2, A3    | B2, B3    |

If only A is active, multiplexer 0 selects A1 (code 0), multiplexer 1 selects
A2 (code 1) and multiplexer 2 selects A3 (code 2).

The select encoding of multiplexer k, homed on region h:

- Code 0 is the home signal.
- Code 1 + rank*(N - N/M) + (p - N/M) is signal p of region i. Here rank is
  i's position among the regions other than h: i if i < h, otherwise i-1.
- Codes with no input behind them output 0.

`trace_controller` also holds a concurrent assertion that the shares in
effect add up to N.

`dst_pkg` holds the sizing functions that `trace_controller` and
`trace_datapath` share.

The network needs N to be a multiple of M. Both modules stop elaboration with
an error otherwise.

## Timing

Everything runs on the clock of the circuit under debug.

- **Edge t.** The knob is registered, together with the selects and `alloc`
  for the new value.
- **Between edges t and t+1.** `trace_word` is combinational from `cand`
  through the multiplexers. It already shows the new selection.
- **Edge t+1.** If `trace_en` is high, `trace_word` is written to the buffer.

The first trace word under a new region set is therefore the one sampled one
edge after the knob changed. The `state` output shows which region set the
current word belongs to, and `alloc` shows how many bits each region holds.
An off-line tool needs both to read the trace back.

The trace buffer is circular:

- Every enabled cycle writes one word at `wr_ptr`.
- The pointer wraps from DEPTH-1 to 0. After the first wrap, `wrapped` stays
  high.
- Once wrapped, the buffer holds the last DEPTH words, the oldest at
  `wr_ptr`.
- The read port (`rd_addr`, `rd_data`) is synchronous, with one cycle of
  latency. A read of the word being written in the same cycle returns the old
  word.

Reset is synchronous and active low. It selects "all regions active" (shares by
relevance) and clears the buffer pointer and the wrapped flag, but not the
memory.

## Modules

| file | role | key parameters (default) |
|------|------|--------------------------|
| `rtl/dst_top.sv` | whole tracing unit: controller, datapath, buffer | `M`=4, `N`=32, `DEPTH`=1024, `RELEVANCE`=1 each |
| `rtl/trace_controller.sv` | knob register and per-knob-value select/allocation table | `M`, `N`, `RELEVANCE` |
| `rtl/trace_datapath.sv` | N reduced multiplexers and their wiring | `M`, `N` |
| `rtl/trace_mux.sv` | one NIN:1 multiplexer | `NIN`=73 |
| `rtl/trace_buffer.sv` | circular W x DEPTH trace memory with a read port | `W`=32, `DEPTH`=1024 |
| `rtl/dst_pkg.sv` | sizing functions shared by the above | — |

Ports of `dst_top`:

- `cand[M][N]`: the ranked signals of the circuit under debug. Entry
  `cand[i][p]` is the p-th best signal of region i, with p = 0 the best.
- `active_regions[M]`: the knob.
- `trace_en`: when high, the trace word is written to the buffer.
- `trace_word[N]`: the current multiplexer outputs.
- `state` and `alloc`: the region set in effect and each region's number of
  trace bits.
- `rd_addr`, `rd_data`, `wr_ptr` and `wrapped`: the buffer's read port and
  status.

The unit does not include these parts, which are its surroundings:

- **The circuit under debug.** Any design can be used. Its selected signals
  are wired to `cand`.
- **The design-time signal-selection step.** For each region it ranks the
  signals by how likely they are to expose an error in that region's error
  zone. It does this by propagating error probabilities through the
  netlist, and it is software.
- **The off-line tool that reads the buffer.**

## How far it can be trusted

- **From the source design:**
  - the proportional rule C_i = N*r_i/r, with each region's best C_i signals;
  - the reduced multiplexer structure and its input count;
  - the two-region example behaviour;
  - the N = 32, M = 4, 32 x 1024 configuration;
  - a controller clocked with the circuit under debug.
- **Choices made here, where the source gives no detail:**
  - summing r over the active regions only (so that no trace bit stays
    unused);
  - largest-remainder rounding;
  - the zero-knob rule;
  - the multiplexer input order, select encoding and placement order of
    extra signals;
  - building the controller as a table;
  - the register stage and reset values;
  - everything about the buffer beyond its size: circular organization,
    enable, read port, status flags.
- **Order inside the trace word.** Two-region example outputs are written as
  sets, but the hardware gives a fixed order. With only region B active, B1
  sits on bit 0 and B0 on bit 1.
- **Not modelled.** There is no trigger or stop condition for the buffer and
  no time-stamping of knob changes. The `state` output is there so that
  surrounding logic can record them.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `trace_mux_tb` | every select code of the 73-input multiplexer, and unused codes give 0 |
| `trace_datapath_tb` | input lists of every multiplexer at M=N=3 (the 5-input example) and at M=4, N=32, checked by one-hot and one-cold probing |
| `trace_controller_tb` | allocations and select sets for all knob values at M=4/N=32, the two-region table, and a weighted M=3/N=6 case worked by hand; one-cycle latency; reset |
| `trace_buffer_tb` | 32 x 1024 buffer, random writes with gaps over 2.5 wraps, pointer and flag every cycle, full read-back |
| `dst_top_tb` | full default size. Finds the routing of all 16 knob values by probing the 128 candidates and checks it. Then runs ~2700 cycles with random data and random region switches. Predicts every trace word, reads the wrapped buffer back, and counts region switches, extra-signal placement, disabled cycles, buffer wrap and zero knob |
| `dst_workload_tb` | two- and three-region scenarios (all single and pair cases) on the default unit. Each traces 1000 cycles with and without one injected bit-flip every 100 cycles, and checks that an error appears in the trace exactly when its signal is among the traced ones |

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dst_pkg.sv rtl/dst_top.sv \
          tb/dst_top_tb.sv --top-module dst_top_tb
./obj_dir/Vdst_top_tb
```

Replace the testbench and top-module name for the others. The package must be
listed before the files that import it. All testbenches finish in well under
a second.

## Changing the design

- **Number of regions or trace width.** Set `M` and `N` on `dst_top`. Keep N
  a multiple of M. The table has 2^M entries, so M much above 8 makes
  elaboration slow and the table large.
- **Relevance.** Set `RELEVANCE` as a packed array of 8-bit weights, region 0
  in the low byte. Example: `{8'd3, 8'd2, 8'd1}` for regions 2, 1, 0.
- **Buffer depth.** Set `DEPTH`. The read and write pointers are
  `$clog2(DEPTH)` bits wide.
- **Fewer regions than built.** A circuit with fewer regions can use a larger
  unit: tie the unused regions' `cand` inputs to 0 and keep their knob bits
  at 0. The three-region scenarios in `dst_workload_tb` run this way on the
  four-region unit.
