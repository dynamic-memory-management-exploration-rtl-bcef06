# Dynamic memory management for many-accelerator FPGA systems

An FPGA that hosts many accelerators usually runs out of block RAM before it
runs out of logic. The usual cause is static allocation: each accelerator
reserves its worst-case arrays for the whole run, even while it does not use
them. This design replaces that with **dynamic memory management (DMM)**:

- The on-chip RAM is split into a few **heaps**.
- Each heap has its own **allocator**.
- Accelerators obtain their arrays at run time with `malloc(bytes, heap)` and
  give them back with `free(ptr, heap)`.

Memory is therefore held only while it is needed. Accelerators that do not
need memory at the same time can share one heap.

The design follows the DMM-HLS approach, where C kernels get these calls
(`HlsMalloc`/`HlsFree`) and are synthesised with high-level synthesis. Here the
whole system is hand-written, synthesisable SystemVerilog:

- a heap with a freelist/first-fit allocator;
- an interconnect between accelerators and heaps;
- four benchmark kernels written as accelerators that allocate their arrays
  from the heaps.

The DMM-HLS work explores two knobs, and both are parameters here:

- **INLINE**: whether allocator calls to different heaps may run at the same time.
- **FL_WIDTH**: the freelist width, which sets how many heap words the
  allocator examines per step.

```
            start/done/err/result per accelerator
                 |        |        |        |
            +---------+---------+---------+---------+
            |acc_hist |acc_pca  |acc_mmul |acc_kmeans|   kernel accelerators
            +----+----+----+----+----+----+----+----+
                 | dmm_req_t / dmm_rsp_t, one request outstanding each
            +----v---------------------------------v----+
            |                 dmm_xbar                  |   per-heap round robin,
            |    (INLINE=0: one allocator call at once) |   conflict / serial events
            +----+---------+---------+---------+--------+
                 |         |         |         |
            +----v---+ +---v----+ +--v-----+ +-v------+
            |dmm_heap| |dmm_heap| |dmm_heap| |dmm_heap|    heap = dmm_allocator
            +--------+ +--------+ +--------+ +--------+           + heap_ram
```

## The heap and its allocator

`dmm_heap` holds `DEPTH` words of 32 bits (`heap_ram`, a single-port
synchronous RAM) and one `dmm_allocator`. It answers four operations, all
carried in the `dmm_pkg::dmm_req_t` request:

| op          | `addr`        | `data`             | response `rsp.data`     |
|-------------|---------------|--------------------|-------------------------|
| `OP_READ`   | word address  | -                  | the word                |
| `OP_WRITE`  | word address  | value              | -                       |
| `OP_MALLOC` | -             | size in **bytes**  | word address of block   |
| `OP_FREE`   | block address | -                  | -                       |

`rsp.ok` is 0 for an address outside the heap, a failed malloc (out of
memory, or a size of 0) or a free of a word that is not allocated. Pointers are
word addresses inside the heap.

### Freelist and first fit

The allocator's state is a **bitmap with one bit per heap word** (1 = in use).
It is stored as `DEPTH/FL_WIDTH` rows of `FL_WIDTH` bits, and the allocator
handles one row per clock cycle. So `FL_WIDTH` is the number of words it checks
per step. A 64-bit freelist finds and marks space in an eighth of the cycles an
8-bit one needs, at the cost of wider masks.

A malloc runs in three steps:

1. The byte count is rounded up to whole words. This padding is the
   *alignment fragmentation*.
2. **SCAN** walks the rows from row 0. It carries the length of the current
   run of free words across row boundaries. The first run that reaches the
   request wins (first fit).
3. **MARK** sets the run's bits, one row per cycle. It also sets the run's
   last word in a second bitmap of **end marks**.

A free needs only the pointer. **CLEAR** clears bits from the pointer up to
and including the first end mark. This is why the end-mark bitmap exists: the
allocator needs no table of sizes.

Cycle counts, measured from the edge that accepts the command (`s` = first
word, `e` = last word, `W` = `FL_WIDTH`):

| command                                   | edges until `done_valid`          |
|-------------------------------------------|-----------------------------------|
| malloc that succeeds                      | `(e/W + 1) + (e/W - s/W + 1)`     |
| malloc that finds no room                 | `DEPTH/W` (every row scanned)     |
| free                                      | rows spanned, `e/W - s/W + 1`     |
| size 0, oversize, free of an unused word  | 0 (answered on the accepting edge)|

Each heap operation costs one more cycle through `dmm_heap`. A read or write
answers one cycle after it is accepted. The heap takes no new request while
its allocator is busy.

## Sharing heaps: the interconnect

Each accelerator has one request channel and one request outstanding. The
heap field of the request selects the heap. `dmm_xbar` gives each heap a
round-robin arbiter, and a heap serves one request at a time, from grant to
response. Several accelerators on one heap therefore wait for each other; this
is the *memory access conflict* that more heaps remove. Accelerators on
different heaps run in parallel.

`INLINE` sets how allocator calls overlap:

- `INLINE=1`: each heap runs its malloc/free calls on its own, so calls to
  different heaps overlap.
- `INLINE=0`: only one malloc/free is in flight in the whole system. A call to
  another heap waits until it finishes, and on a tie the lower heap number
  wins. Reads and writes are never held back by this rule.

The interconnect brings out two event bits per heap for counting:

- `ev_conflict[h]`: a request for heap `h` waits for another accelerator.
- `ev_serial[h]`: a malloc/free for heap `h` waits only because of `INLINE=0`.

With `INLINE=1` the `ev_serial` outputs are constant 0.

## The accelerators

All four kernels follow the same pattern:

1. malloc their arrays;
2. generate input data with `lfsr_rand`;
3. compute, with every array access a heap read or write;
4. free the arrays, last first;
5. pulse `done` with `result`.

If a malloc fails, an accelerator frees what it already holds and pulses
`done` with `err=1` and `result=0`. Another accelerator can then use the
space, and the failed one can simply be started again. Every array element
takes one 32-bit heap word.

`lfsr_rand` plays the role of the benchmarks' `RandMinMaxSyn(min, max)`. It is
a 16-bit LFSR, seed `0xACE1`, taps 16/14/13/11. It returns
`min + state mod (max-min+1)` after 34 cycles; the modulo uses the
sequential divider `seq_divider`. Each accelerator has its own generator, and
it is reset only by `rst_n`, so a second run draws new numbers.

| kernel | module | arrays in the heap (default size) | result |
|---|---|---|---|
| Histogram | `acc_histogram` | pixels `N` bytes; blue, green and red bins of 256 (960 words) | `3*ceil(N/3)` |
| PCA | `acc_pca` | matrix `ROWS x COLS`; `ROWS` means; `ROWS x ROWS` covariance (136 words) | sum of covariance + `N_PCA` |
| Matrix multiply | `acc_mmul` | A, B and C, `DIM x DIM` each (192 words) | sum of C |
| K-means | `acc_kmeans` | points `NPTS x DIM`; means `NCLUST x DIM`; cluster ids `NPTS` (268 words) | sum of the final means |

Details that matter when checking results:

- **Histogram.** Pixel `i` is `(char)rand(1, i+1)`. The bins are cleared, then
  counted three channels at a time.
- **PCA.**
  - The matrix is filled with `rand(1, GRID)`.
  - Each mean is the row sum divided by `COLS`.
  - The covariance of rows `i` and `j` is the sum of the products of their
    deviations, divided by `COLS-1`. The division is C integer division
    (`seq_divider`, signed), and the matrix is symmetric.
  - The result sums the whole `ROWS x ROWS` covariance matrix.
- **Matrix multiply.** A and then B are filled with `rand(1, GRID)` in row
  order. C is computed with 32-bit wrap-around arithmetic.
- **K-means.**
  - Points are filled with `rand(1, GRID)`, and the means start as the first
    `NCLUST` points.
  - Each iteration first sends every point to the nearest mean. Distance is
    squared Euclidean, and a tie goes to the lower cluster number.
  - It then sets every mean that has members to its members' sum divided by
    their count.
  - Iterations repeat while a point changed cluster, at most `MAX_ITER` times.
  - Per-cluster sums and counts are kept in registers.

## The top: `dmm_system`

`dmm_system` instantiates `NUM_ACC` accelerators, `dmm_xbar` and `NUM_HEAPS`
heaps. Slot `a` is bound to heap `a mod NUM_HEAPS`. It runs the kernel in
`KERNELS[2a+1:2a]`: `dmm_pkg::kernel_e`, with 0 Histogram, 1 PCA, 2 MMUL and
3 Kmeans.

| parameter | default | meaning |
|---|---|---|
| `NUM_ACC` | 4 | accelerators |
| `NUM_HEAPS` | 4 | heaps (default: one per accelerator) |
| `INLINE` | 1 | allocator calls to different heaps may overlap |
| `FL_WIDTH` | 32 | freelist bits examined per cycle (8, 32, 64 are the studied values) |
| `HEAP_DEPTH` | 1024 | words per heap |
| `KERNELS` | `{K_KMEANS, K_MMUL, K_PCA, K_HIST}` | kernel of each slot (slot 0 in the low bits) |
| `HIST_N` | 192 | Histogram image bytes |
| `PCA_ROWS`, `PCA_COLS` | 8, 8 | PCA matrix |
| `MMUL_DIM` | 8 | matrix size |
| `KM_NPTS`, `KM_DIM`, `KM_CLUST` | 64, 3, 4 | K-means problem |
| `GRID` | 100 | random values are drawn from 1..GRID |

Ports:

- `clk`, `rst_n` (asynchronous, active low);
- per accelerator: `start`, `busy`, `done`, `err` and `result[a]`;
- per heap: `ev_conflict` and `ev_serial`.

At the defaults, synthesis gives about 7.5k cells, 11k flip-flop bits and four
32-kbit heap memories.

### Will a configuration fit?

A heap must hold, at the same moment, all arrays of the accelerators that
share it. At the defaults:

- Four Histogram accelerators need 4 x 960 words. That does not fit in one
  heap, or in two heaps shared two by two. It fits with one heap each.
- PCA (136 words) and MMUL (192 words) fit four to a heap.
- K-means (268 words) fits two to a heap, but not four.

When memory runs out, the accelerator that asked last gets `err` and can be
started again later. Freelist width and `INLINE` never change whether a
configuration fits; they only change how long it takes.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_heap_ram` | read-first behaviour, enable, and one-cycle latency against a model |
| `tb_dmm_allocator` | 8-bit and 32-bit freelists side by side against a first-fit model. It checks every pointer and ok flag, and the exact cycle count from the table above. Traffic is directed cases plus 300 random malloc/free calls. |
| `tb_dmm_heap` | reads and writes, out-of-range addresses, malloc and free, and malloc latency |
| `tb_lfsr_rand` | values against a software LFSR, range, and 34-cycle latency |
| `tb_dmm_xbar` | two 4-port/2-heap systems (INLINE 1 and 0) with data routing. INLINE=1 must overlap allocator calls; INLINE=0 must never overlap them. Counts conflict and serialisation events. |
| `tb_acc_histogram`, `tb_acc_pca`, `tb_acc_mmul`, `tb_acc_kmeans` | each kernel on a real heap against a software model (results, arrays left in RAM, iteration count), plus a run on a heap that is too small: it must report `err` and leave the freelist empty |
| `tb_dmm_system` | end to end, two systems side by side (below) |
| `tb_dmm_system_full` | `dmm_system` at its default parameters: all four accelerators, every result, the histogram bins in RAM, no conflict, overlapping allocator calls, empty heaps afterwards |

`tb_dmm_system` runs two systems:

- **Separate heaps.** One heap per accelerator, 8-bit freelists, `INLINE=1`.
- **Shared heaps.** Two heaps, 64-bit freelists, `INLINE=0`.
  - Heap 0 is too small for Histogram and MMUL together, so one of them runs
    out of memory and is restarted after the other has finished.
  - PCA and K-means share heap 1 without trouble.

The test counts each mechanism and counts a failure for any that never
occurs:

- allocator overlap;
- heap conflict;
- serialisation;
- out of memory;
- successful retry;
- malloc and free calls.

The reference models are in `tb/dmm_ref_pkg.sv`.

Running a testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/` (`tb/dmm_ref_pkg.sv` is needed only by the system and K-means
testbenches):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dmm_pkg.sv tb/dmm_ref_pkg.sv tb/tb_dmm_system.sv --top-module tb_dmm_system
./obj_dir/Vtb_dmm_system
```

Every testbench resets the design properly and runs with any initial state
(`+verilator+rand+reset+2`). The full-size system test simulates about 61,000
clock cycles in a few seconds.

## Where this design departs from DMM-HLS, and what is missing

- **String match is not built.** That benchmark is only described as
  searching a file of keys for an encrypted word. The encryption, the key
  format and the matching rule are not defined, so no circuit can be derived
  for it.
- **Data sizes are this design's own.** The benchmarks' data sizes, the heap
  size and the word width are not given. The values above were chosen to be
  small and to fit one or two 18-kbit BRAMs per heap, so the fit arithmetic
  uses these sizes.
- **Timing is not comparable.** In DMM-HLS the allocator and the kernels come
  out of an HLS tool, and the evaluation reports simulation time and
  BRAM/DSP/FF/LUT use. This RTL has its own cycle schedule, so none of those
  numbers carry over. Only the trends should hold:
  - a wider freelist gives faster allocation;
  - more heaps give fewer conflicts;
  - `INLINE=1` lets allocator calls overlap.
- **No loop-level optimisation.** The DMM-HLS work also tries HLS loop
  directives (unroll, pipeline, merge, flatten) on the Histogram and PCA
  kernels. These accelerators are plain sequential state machines: one heap
  access at a time, about three cycles each. None of those variants is
  built.
- **Heaps are fixed.** DMM-HLS maps a virtual memory onto the BRAMs and can
  add or remove heaps, or change the freelist width, at run time. Here the
  heaps, their size and the freelist width are fixed when the design is
  elaborated.
- **One word type.** DMM-HLS allocates any simple C type. Here every element
  is one 32-bit word, and a byte array takes a word per byte.
- **Histogram input.** The reference code fills only every third pixel byte
  and never clears the bins. This design fills every byte and clears the bins,
  so that all three channels count defined values.
- **PCA final sum.** Two versions of the PCA code disagree on the final sum:
  one runs the inner loop to the column count, the other to the row count.
  The covariance matrix is square in the row count, so this design sums
  `ROWS x ROWS`.
- **MMUL and K-means structure.** Only the function of these two kernels is
  given. Their data generation, loop order and returned value follow the
  pattern of the other kernels.
- **Arbitration and INLINE=0.** The round-robin policy is this design's
  choice. So is the exact rule for `INLINE=0`: a single system-wide allocator
  call in flight, with the lower heap first.
- **LFSR taps.** The random generator's seed matches the reference code
  (`0xACE1`); the taps are a common maximal-length choice.

Lint notes. Verilator's `-Wall` reports two kinds of warning that stand:

- **Unused bits.** For example, the upper bits of a random value that the
  Histogram kernel truncates to a byte, or the divider remainder that the
  kernels do not use.
- **SYNCASYNCNET.** `rst_n` is used both as the asynchronous reset of the
  flip-flops and in the `disable iff` of the handshake assertions. The
  assertions need it to stay silent during reset.
