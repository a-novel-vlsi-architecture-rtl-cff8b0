# Memory-based parallel joint-histogram engine

A joint histogram of two 8-bit images counts every pixel pair: 256 × 256 =
65536 bins. Mutual-information image registration recomputes it many times,
so it is worth building in hardware. The two usual structures scale badly at
this size. One counter per bin needs 65536 counters. A plain bin memory
needs one read-modify-write per pixel, and two memories plus a merge if it
is split to go faster.

This engine uses one bin memory and a small array of comparators. Each
cycle it picks one pixel pair value P. It finds every copy of P in a window
of U × T pixel pairs and adds their number to bin P in a single update. So
one cycle retires all copies of a value in the window, not one pixel. The
logic does not depend on the number of bins: only the bin memory grows with
the histogram size.

Defaults: 256 × 256 images with 8-bit pixels, U = 16 working units and
T = 8 pairs per unit. That gives a window of 128 pairs and 65536 bins of
17 bits.

## How a run proceeds

```
 input memory ──group──► [unit 1] ─► [unit 2] ─► ... ─► [unit U] ──K[.][U], K[.][U-1], M[.][U]──► selection unit
   (mem_ads)               ▲  │         ▲  │                ▲  │                                      │
                           └──┼─────────┴──┼──── P ─────────┴──┼──────────────────────────────────────┘ P, q
                              ▼            ▼                   ▼
                           count        count               count   (gated by c_control[j])
                              └────────────┴─────► count adder (C) ──► histogram memory: bin[P] += C
```

* **Data and status bits.** Working unit j holds T data `M[i][j]`. Each
  datum has a bit `D[i][j]` that is 1 until the datum has been counted.
* **Compare.** The chosen datum P goes to all units. Each unit forms
  `K[i][j] = D[i][j] & (M[i][j] != P)`, the bits still uncounted after this
  cycle. It also counts the data with `D = 1` that equal P. The count adder
  sums the U counts into C, and the histogram memory adds C to bin P.
* **Shift or stay (q).** If unit U (the rightmost) has no K bit left, q = 1.
  The whole array then moves one unit to the right, and unit 1 takes the
  next group of T data from the input memory. Each unit takes its left
  neighbour's data together with the neighbour's **K** bits, not its D bits,
  so data counted in this very cycle stay counted. If q = 0 nothing moves,
  and every D takes the value of K.
* **Choosing P.** Two priority encoders find S0, the first uncounted datum
  of unit U, and S1, the first uncounted datum of unit U-1. After a shift,
  unit U-1's group has become unit U, so the next pointer is S1; otherwise
  it is S0. The pointer is kept in a register, and P is the datum of unit U
  at that pointer.

The scheme stays exact for any choice of P, because only data with D = 1 are
ever counted and they are then cleared. A poor choice only costs a cycle. So
where an encoder finds nothing it returns 0, even if that slot has already
been counted.

### Start, fill, drain and stop

| phase | what happens |
|---|---|
| clear | every bin is written to 0, one per cycle (2^16 cycles) |
| fill (`t = 1`) | the array shifts every cycle and counts nothing, until U groups are in. `t` then stays 0 |
| run | one P per cycle. `mem_ads`, the input memory address, counts up on every shift |
| drain | after the last group, `mem_ads` starts again from 0. Empty groups (all D = 0) enter behind the data |
| stop | `c_control[j]` is a shift register that moves with q. It marks a unit that holds an empty group and stops its counting, so units stop from left to right. `c_control[U] = 1`, reached when `mem_ads` has counted to U again, ends the run |
| flush | the last updates leave the bin pipeline; then `done` |

### Bin update pipeline and forwarding

Per P the datapath stages are: compare (cycle 0), per-unit count register
(1), bin read (2), and adding C and writing the bin back (3).

If two consecutive updates hit the same bin, the second read returns the
value from before the first write. `mem_enable` is 0 exactly then (read
address = write address). Its delayed copy `X` makes the adder take `R3`,
the value just written, instead of the memory output. With this bypass every
update takes one cycle, even for the same bin back to back. This happens
often in flat image regions: after a shift, the empty pointer falls back to
a datum equal to the previous P.

### Cycle count

One counting cycle per selected P, and at least one per group of T. So a run
needs between N/T cycles (8192 for a 256 × 256 image) and N cycles. On top
of that come 65536 clear cycles, U fill cycles and a few flush cycles. Below
are measured counting cycles at the full 256 × 256 size. "Clustered" is a
smooth, noisy image pair; "noise" is two independent uniform images.

| U | clustered | noise |
|---|---|---|
| 8  | 54011 | 65493 |
| 16 | 51282 | 65414 |

More units give a wider window, so more copies of each value are caught per
cycle. The gain depends strongly on how repetitive the image data are.

## Files

| file | block |
|---|---|
| `rtl/hist_pkg.sv` | sizes (`PIX_W`, `DATA_W`, `UNITS`, `PER_UNIT`, `IMG_PIXELS`, `GROUPS`, `COUNT_W`) and the phase type |
| `rtl/histogram_top.sv` | the engine |
| `rtl/working_unit.sv` | one column: T data registers with hold/shift muxes, D bits, comparators, K, gated count register |
| `rtl/selection_unit.sv` | two priority encoders, q, S0/S1 mux, pointer register, P mux |
| `rtl/hist_controller.sv` | phases, `mem_ads`, `t`, `c_control`, start/done, cycle counter |
| `rtl/count_adder.sv` | C = sum of the per-unit counts |
| `rtl/histogram_memory.sv` | bins, read-modify-write with `mem_enable`/`X`/`R3` bypass, clear sweep, host read |
| `rtl/input_memory.sv` | image store, one T-wide word per group |

### Top-level interface (`histogram_top`)

* `load_we`, `load_addr`, `load_data`: write one group of T pairs. Element i
  is in `load_data[i*16 +: 16]`, as `{pixel of image A, pixel of image B}`.
  One load per clock.
* `num_groups`: image size in groups, from 1 up to `GROUPS` (8192 by
  default). Write it before `start`.
* `start`: a one-cycle pulse while idle or done. `busy` is high until `done`.
* `count_cycles`: the counting cycles of the last run.
* `hist_rd_addr` → `hist_rd_data`: read a bin, one cycle of latency, after
  `done`.

All flops have an asynchronous, active-low reset `rst_n`. The memories have
no reset, and the clear phase zeroes the bins. For one 8-bit image, put the
pixel in one byte and a constant in the other, or build with `DATA_W = 8`.

## Simulating

Every testbench in `tb/` checks itself and ends with a `TB_RESULT` line.
List the package first:

```
verilator --binary --timing --assert -y rtl rtl/hist_pkg.sv tb/tb_histogram_full.sv --top-module tb_histogram_full
./obj_dir/Vtb_histogram_full
```

`-y rtl` lets verilator find each module in its own file. Replace the
testbench name to run any of the others.

* `tb_histogram_full`: default build with two full 256 × 256 image pairs.
  It compares all 65536 bins against a direct count. It compares the
  counting cycles against a step-by-step model of the algorithm written in
  the testbench. It runs in under a second.
* `tb_histogram_u8`: the same with U = 8.
* `tb_histogram_top`: a reduced build (U = 4, T = 4, 8-bit data, 64 groups).
  It does twelve runs over random, few-valued, constant and tiny images. It
  counts each mechanism: clear, fill, shift, hold, pointer taken from unit
  U-1, `R3` bypass, drain, and per-unit stop.
* One testbench per block: `tb_working_unit`, `tb_selection_unit`,
  `tb_hist_controller`, `tb_count_adder`, `tb_histogram_memory`,
  `tb_input_memory`.

## What is specified and what is chosen here

Taken from the architecture:
* the linear array of U working units, each with T data and one status bit
  per datum
* the compare against a broadcast P, and the K/D update rules
* shifting on q, with a new group entering on the left
* the selection unit: two priority encoders over the last two units, Q
  formed from the last unit's K bits, a 0/1 mux choosing S0 or S1, and a
  data mux over the last unit
* `mem_ads`, `t` and `c_control` with their start and stop behaviour
* the per-unit gated count, the adder, and the bin memory with its
  `mem_enable`/`X`/`R3` bypass
* U = 8 and 16, 256 × 256 images, 8-bit pixels

Chosen here:
* **T = 8.** The number of data per working unit is a free parameter with no
  value given.
* **The meaning of q.** The algorithm's flowchart writes q as the OR of the
  last unit's K bits and pairs "shift" with S0. The selection-unit drawing
  labels the inputs of the pointer mux 0 (S0, from the last unit) and 1 (S1,
  from unit U-1). This design shifts when the last unit is exhausted and
  takes S1 after a shift, S0 otherwise. Only this pairing makes the pointer
  refer to the group that actually sits in unit U. The testbench model uses
  the same reading.
* **The c_control logic** (a shift register moving with q), and the role of
  `t` (shift every cycle, count nothing). Only their behaviour is described.
* **The pointer register**, and 0 as the encoders' result when no bit is set.
* **Pipeline depth and memory timing.** Synchronous memories, a registered
  per-unit count, and a two-stage bin update, which needs a bypass only for
  back-to-back updates.
* **The per-unit gating.** It sits in front of the count register, through
  the unit's enable. The drawing shows a mux after the column block and
  before the register feeding the adder. The result is the same.
* **Things not described at all:** the bin clear sweep, the host load and
  read ports, `start`/`busy`/`done`, `count_cycles`, the 17-bit bin width
  and the `{A, B}` pixel-pair packing.
* **Minimum sizes.** U must be at least 2, because the selection unit looks
  at units U and U-1. `num_groups` must be at least 1.

Not modelled: the FPGA figures (slices, frequency, power), which belong to a
particular device mapping.
