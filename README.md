# Weight-stationary systolic array for CNN layers

This is a small CNN accelerator built around an N × N grid of multiply-accumulate
cells (N = 64 by default). Every cell holds one 8-bit weight. Input activations
stream across the grid from the left, and partial sums flow down the columns.
Each column therefore delivers one dot product per input vector. One pass computes
`Y = act(X · W)` for a 64 × 64 weight tile and any number of 64-element input
vectors. An accumulator bank adds passes together, so the inner dimension can be
larger than 64. The input is a 128 × 128 image of 8-bit pixels. It sits in an
image ROM, is copied into a 16 KB activation cache after reset, and from there is
fed to the array. Results pass through ReLU and back into the cache, where they
can be the input of the next layer.

The grid, the MAC cell and its ports, the 8/16-bit widths, the image ROM with its
14-bit address counter and the chain of blocks come from a published FPGA
accelerator design. The command controller, the queue depths, the handshakes, the
stall rule, the accumulator bank and the requantisation are this implementation's
own. They are listed under [Departures and own choices](#departures-and-own-choices).

## Block chain

```
 image ROM + 14-bit counter (input_memory)
        │ one pixel per clock after reset
        ▼
 activation_cache (16 KB, 64-byte words) ──► input_queue ──► systolic_array ──► accumulator ──► relu ──► output_queue ──► out_* port
        ▲                                   (FIFO + skew)       (64 × 64)        (deskew + bank)            │
        └────────────────────────── write-back (optional) ──────────────────────────────────────────────────┘
 wt_* port ──► weight_fetch (64-row queue) ──► top edge of the array
```

| file | role |
|---|---|
| `rtl/sa_pkg.sv` | widths (`DATA_W` = 8, `ACC_W` = 16), the command struct `cmd_t`, the opcodes |
| `rtl/mac_cell.sv` | one processing element |
| `rtl/systolic_array.sv` | N × N grid of `mac_cell`, valid tracking along the bottom row |
| `rtl/input_queue.sv` | vector FIFO followed by the row skew network, one valid bit per row |
| `rtl/weight_fetch.sv` | weight-row queue and the N-clock weight shift |
| `rtl/accumulator.sv` | column deskew and a bank of partial-sum vectors |
| `rtl/relu.sv` | ReLU, right shift, saturation to 8 bits |
| `rtl/output_queue.sv` | result FIFO; produces the pipeline enable `advance` |
| `rtl/activation_cache.sv` | activation RAM: byte-enable write port, registered read port |
| `rtl/counter_14.sv`, `rtl/image_rom.sv`, `rtl/input_memory.sv` | main memory: the counter addresses the image ROM |
| `rtl/vec_fifo.sv` | generic first-word-fall-through FIFO used by the three queues |
| `rtl/cnn_accelerator.sv` | top level: the blocks above plus the command controller |
| `rtl/image_pixels.hex` | the first 19 pixels of the reference image |

## The MAC cell

`mac_cell` has the ports `clk`, `rst` (active low, asynchronous), `en`, `wg_set`,
`w_in[7:0]`, `din[7:0]` and `acc_in[15:0]`. Its outputs are `acc_out[15:0]` and
`dout[7:0]`, plus one extra output, `w_out[7:0]`:

* `wg_set` high: the weight register takes `w_in` (whatever `en` is).
* `en` high: `acc_out <= acc_in + din * weight` (modulo 2^16) and `dout <= din`.
* `en` low: both outputs hold.
* `w_out` always shows the stored weight. It feeds the cell below during weight loading.

Arithmetic is unsigned by default, which fits the reference operations:
200 + 50·100 = 5200, 1500 + 70·30 = 3600 and 15550 + 150·250 = 53050.
The testbench replays all three. With `SIGNED = 1` the operands are two's
complement.

## Timing through the array (the part to read carefully)

The array is weight stationary. Cell (r, c) holds `W[r][c]`.

* **Data** enters at the left of row r and moves one cell right per enabled clock.
* **Partial sums** start as 0 above row 0 and move one cell down per enabled clock.
* **Skew.** Element r of a vector must reach row r exactly r clocks after element
  0 reaches row 0. The `input_queue` provides this: row r of its skew network has
  r + 1 register stages.
* **Result.** Column c then delivers `Σ_r x[r] · W[r][c]` at its bottom edge
  N + c clocks after element 0 was presented to row 0.
* **Latency.** The last column of a vector is complete **2N − 1 clocks** after the
  vector started. For N = 64 that is 127 clocks. `tb_systolic_array` checks this
  exactly for N = 4, 8 and 64.
* **Column alignment.** Columns come out staggered by one clock each. The
  `accumulator` delays column c by N − 1 − c clocks, which lines the N sums of one
  vector up again.
* **Valid bits.** Each row carries a valid bit. The array needs only the bottom
  row's bit, and it travels along the bottom row next to the data. Bubbles
  (empty queue) enter as zero data with valid low. They flow through harmlessly.

End to end, a `OP_RUN` command's first result appears on `out_*`
**2N + 5 clocks** after the command is accepted. That is 2N − 1 clocks in the
array, plus 6 clocks for the cache read, the queue write, the skew entry, the
accumulator, the ReLU register and the output-queue write. After that one vector
completes per clock, unless the output stalls.

### Weight loading

Weights are shifted in from the top edge, like data, instead of being written to
each cell. When `OP_LOAD_W` is accepted and the weight queue holds N rows,
`weight_fetch` raises `wg_set` for N clocks and presents one row per clock. Each
cell passes its current weight to the cell below, so the first row pushed ends up
in the bottom row. **Push weight rows bottom row first**: `W[N-1]`, then
`W[N-2]`, …, and `W[0]` last. Weights cannot be loaded while a RUN is in
progress.

### Stalls

The compute path (input-queue pop, skew network, array, alignment, accumulator,
ReLU) moves on one shared enable, `advance`. The output queue drives it low only
while it is full and `out_ready` is low. Everything in flight then freezes, so no
result is lost and none is duplicated. `ev_stall` shows these clocks.

## Using the top level

`cnn_accelerator` parameters (defaults): `N` 64, `IQ_DEPTH` 8, `OQ_DEPTH` 8,
`ACC_DEPTH` 128, `CACHE_BYTES` 16384, `IMG_PIXELS` 16384, `SHIFT` 8, `SIGNED` 0,
`INIT_FILE` `"rtl/image_pixels.hex"`.

1. **Image load.** Release `rst_n`. The main memory streams pixel `a` into cache
   byte `a` (word `a / N`, byte `a % N`), one pixel per clock. `img_loaded` goes
   high after `IMG_PIXELS + 1` clocks. With N = 64, each 128-pixel image row takes
   two cache words: the left half is the even word, the right half the odd word.
2. **Weights.** Push N rows on `wt_valid`/`wt_row` (`wt_ready` is the handshake),
   then send `OP_LOAD_W`.
3. **Run.** Send `OP_RUN` with these fields:
   * `src_base`, `src_stride`: cache words to read.
   * `nvec`: the number of vectors.
   * `accumulate`: 0 stores sums into bank entry k; 1 adds to bank entry k.
   * `write_back`, `dst_base`, `dst_stride`: where results go back into the cache.

   Results arrive in order on `out_valid`/`out_data`/`out_ready`. A write-back
   happens as a result leaves the output port, so the consumer must accept results
   for the command to finish. `cmd_ready` is high when the controller is idle.

To multiply with an inner dimension of 2N, run the vectors of the first N input
elements with `accumulate = 0`. Then load the second weight tile and run the
vectors of the other N elements with `accumulate = 1` and the same `nvec`. The bank holds `ACC_DEPTH` vectors, and an
assertion flags an accumulating RUN with a larger `nvec`. A write-back region that
overlaps words still to be read in the same RUN is not protected against. Results
are written several dozen clocks after the matching inputs were read.

**Activation / requantisation (`relu`).** With `SIGNED = 1`, a negative sum
becomes 0 and `ev_relu_clamp` flags it. The sum is then shifted right by `SHIFT`
and saturated to 255 (127 when signed); `ev_relu_sat` flags saturation. In the
default unsigned mode every sum is non-negative, so ReLU only rescales.

## Main memory

`input_memory` contains `counter_14` (instance `ADDR`) and `image_rom` (instance
`IMAGE`). The counter is a free-running 14-bit counter, reset to 0 by the
active-low `rst`. The ROM has one clock of read latency, like an FPGA block RAM.
So pixel `a` is on `memory_out` after the (a+1)-th rising clock edge. The counter
wraps after 16383.

The real image is not included. The ROM is filled with the placeholder pattern
`pixel(a) = 0x80 + ((a[6:0] ^ a[13:7]) & 0x3f)`. The file `INIT_FILE` (hex, one
pixel per line, may be shorter than 16384 lines) then overwrites the leading
addresses. The shipped file holds the 19 known leading pixels of the reference
image: 9e 9d 9b 9d 9d 99 9a 9d 9a 99 9a 97 9a 9e 9e 9a 9c 9d 9b. To use a real
picture, point `INIT_FILE` at a 16384-line file, row-major, 128 pixels per row.

## Departures and own choices

* **Accumulator width.** The published design names 32-bit accumulation for the
  64 × 64 array but builds a MAC cell with 16-bit `acc_in`/`acc_out`. This RTL
  uses the 16-bit cell (`sa_pkg::ACC_W`). Sums of 64 products of full-range 8-bit
  values can reach 22 bits and then wrap modulo 2^16. Raising `ACC_W` in `sa_pkg`
  to 32 is a one-line change; the default tests use small weights.
* **Extra port.** `w_out` on the MAC cell does not exist on the published cell's
  port list. It implements the stated rule that every cell hands its weight to its
  neighbour during loading.
* **Weight source.** The published block diagram feeds the weight fetch unit from
  main memory. Here the main memory holds only the image, and weights come in on
  the `wt_*` port.
* **Input queue and cache.** The 16 KB store in front of the array is the
  `activation_cache` RAM. The queue in front of the array is a small FIFO
  (`IQ_DEPTH` vectors) followed by a shared skew network, not N separate row
  FIFOs. The behaviour is the same.
* **This design's own parts.** The command set, the stall rule, the accumulator
  bank (`ACC_DEPTH` = 128, one entry per image row), `SHIFT` = 8, the saturation,
  the automatic image load after reset and the two-port cache organisation are not
  specified by the original design.
* **Not modelled.** The FPGA vendor primitives (ROM IP core, clock buffer) and the
  offline image-to-hex conversion.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. Build and run
one with plain Verilator from the directory that holds `rtl/` and `tb/` (the ROM
reads `rtl/image_pixels.hex` by that relative path):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cnn_accelerator \
  -y rtl -y tb +libext+.sv -Irtl rtl/sa_pkg.sv tb/tb_cnn_accelerator.sv -o sim
./obj_dir/sim
```

* `tb_mac_cell`: the reference operations, plus random operands in both modes.
* `tb_systolic_array`: the full product and exact output timing, including
  2N − 1, for N = 4, 8 and 64.
* `tb_input_queue`, `tb_weight_fetch`, `tb_accumulator`, `tb_relu`,
  `tb_output_queue`, `tb_activation_cache`: each unit's timing and function.
* `tb_counter_14`, `tb_image_rom`, `tb_input_memory`: address sequence, ROM
  content and latency.
* `tb_cnn_accelerator`: end to end at N = 8, signed, with small queues. It loads
  the image, runs three weight loads and three RUNs (overwrite, accumulate +
  write-back, second layer on the written-back results) with a random
  `out_ready`, and checks every result against a reference model. It also checks
  the 2N + 5 latency and that stalls, ReLU clamping, saturation, accumulation and
  reuse all occur.
* `tb_cnn_full`: the same flow at the default configuration (64 × 64 array,
  128 image rows per RUN, the whole 16 KB image). It takes about a minute to
  build and run.

Every testbench has been run against deliberately broken copies of its block and
detects them. The stated 2N − 1 latency and the wrap-around 16-bit accumulation
are the points to watch when changing `N` or `ACC_W`.
