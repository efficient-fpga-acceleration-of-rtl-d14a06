# ICAN: a convolution accelerator built on a 3D array of MAC units

This RTL computes one convolutional layer of a neural network at a time:

    B[m][r][c] = sum over z, i, j of  W[m][z][i][j] * A[z][r*S + i - P][c*S + j - P]

It reads the input feature maps A and the weights W from external memory and
writes the output feature maps B back. Several numbers describe a layer:

- Z input maps of Y x X.
- M output maps of R x C.
- A K x K kernel, stride S and zero padding P.

These change a lot from one layer of a network to the next. The design has
to keep its multipliers busy for all of them with a single build.

The main idea is to make the multiplier array three-dimensional and to
match it to the output, not to the kernel:

- The **compute tile** has T_M x T_R x T_C MAC units, one per output neuron
  of a T_M-map, T_R-row, T_C-column block of B. The default is 11 x 7 x 7 =
  539 units.
- All units of one map plane (an "RC plane") multiply by the same weight in
  a given cycle.
- All units at one (r, c) position multiply the same input value. The array
  therefore runs as SIMD in two directions.
- A pass runs for K*K cycles. In each cycle every unit adds one product to
  its accumulator. After the pass, each unit holds one input map's
  contribution to its neuron.

Nothing in the array depends on Z, M or the image size, so any layer with
K <= K_MAX and S <= S_MAX maps onto it. Utilisation only drops at the
partial tiles at the layer's edges.

## The input reuse network

This is the part that is hardest to see from the code.

Over a pass, each of the T_R x T_C positions needs the K x K input window
under its output neuron. Reading that from a buffer every cycle would need
T_R*T_C independent reads per cycle. Instead, the window is loaded once
into a register array (`input_reuse_network`), and the array itself is
moved.

**Shape.** The array has H x W registers:

    H = (T_R - 1)*S_MAX + K_MAX
    W = (T_C - 1)*S_MAX + K_MAX

This is 35 x 35 by default. Compute position (r, c) is wired to register
(r*S, c*S). A multiplexer per position chooses S at run time.

**Walk.** After the load, the whole array shifts in a serpentine:

- west K-1 times, then north once;
- east K-1 times, then north once;
- and so on, for K*K cycles in all.

Every register value visits each of the K x K offsets under its tap exactly
once.

**Wrap-around and fill.** Rows wrap around horizontally, so the array is a
torus in that direction only. An eastward sweep therefore brings back what
the westward sweep pushed out. The southern row fills with zeros on a
northward shift.

**Weight order.** The weight applied in each cycle follows the walk. Kernel
column j runs 0..K-1 on even kernel rows and K-1..0 on odd ones;
`compute_controller` generates this order.

**Loading.** The window reaches the array through the **shape adapter**, a
second H x W register array:

- The **read controller** fills it one window row per cycle from the input
  buffer.
- The input buffer returns T_R*T_C consecutive words from any (unaligned)
  address, by interleaving words over T_R*T_C columns and rotating the
  read result.
- The read controller zeroes words that fall in the padding, per word.
- The adapter is copied into the reuse network in a single cycle.

A fill takes H + 1 cycles. The first row is read in the cycle the fill
starts, and each row is written one cycle after its read. A fill may start
in the cycle the previous window is copied out, so a new window is ready
every max(K*K, H + 1) cycles. For K = 5 and K = 11 at the default sizes
the fill is hidden behind the pass. For K = 3 (H = 9) it is one cycle
longer than the 9-cycle pass.

## Tiling and the loop nest

The layer is covered by **output tiles** of D_M*T_M x D_R*T_R x D_C*T_C
neurons. The default is (18*11) x (2*7) x (2*7) = 198 x 14 x 14. An output
tile stays in the output buffer until every input map has been added to
it, so partial sums never leave the chip. `window_sequencer` issues one
descriptor per pass, in this order:

    for each output tile (mb, rb, cb)            -- row-major over the layer
      for z in 0..Z-1                            -- one input slice per z
        for dm in 0..D_M-1                       -- one weight tile per dm
          for dr in 0..D_R-1
            for dc in 0..D_C-1                   -- one pass = K*K MAC cycles

- Inner loops stop early at the layer's edge, so no pass computes only
  out-of-range neurons.
- One z-slice of input (the input tile for one map) serves all D_M*D_R*D_C
  passes of that z.
- One weight tile (T_M x K x K weights for one dm and one z) serves D_R*D_C
  passes.
- Output buffer line (dm*D_R + dr)*D_C + dc holds the T_M x T_R x T_C
  partial sums of one pass. At the start of a pass these are loaded into
  the accumulators, and at the end they are stored back.

## Buffers and the double-buffer handshake

Each of the three buffers has two banks, and each bank has a full flag:

| buffer | bank holds | filled by | emptied by |
|---|---|---|---|
| `input_buffer` | one z-slice, up to 81*49 = 3969 words | `fetch_engine` | `read_controller`, after the slice's last window |
| `weight_buffer` | T_M lanes of K_MAX^2 words | `fetch_engine` | `compute_controller`, after the tile's last pass |
| `output_buffer` | D_M*D_R*D_C lines of T_M x T_R*T_C words | `compute_controller` | `drain_engine`, after write-back |

**Ownership of the flags.**

- The producer sets a bank's full flag, and only the consumer releases it.
- The fetch engine owns the input and weight flags. It runs ahead by up to
  one bank of each.
- The compute controller claims an output bank at the first pass of an
  output tile. At the tile's last pass it hands the bank to the drain
  engine (`ob_mark`).
- The drain engine writes the tile back while the next output tile
  accumulates in the other bank.

**Output buffer ports.** The output buffer reads and writes a whole line
(T_M*T_R*T_C words) in one cycle on the compute side. It also has a separate
T_C-word read port for the drain.

**Back-to-back passes.**

- The next pass starts in the last MAC cycle of the current one. Its window
  copy and partial-sum load happen in that cycle.
- The finished pass stores its results one cycle later, while the new pass
  runs its first MAC cycle.
- If the new pass needs the very line being stored, the accumulators start
  from their own value instead of the buffer (`mac_bypass`). This happens
  when an output tile has only one line and the next input slice is
  already there.

With full buffers and a ready memory, the compute tile never idles between
passes.

## Memory interface

Both channels move beats of BUS_WORDS (8) consecutive 32-bit words, each
with a per-word mask.

**Read channel.**

- A request carries `rd_req_valid`/`rd_req_ready`, a word address and a
  `fetch_tag_t`.
- Responses (`rd_resp_valid`, data, tag) come back in request order, with
  any latency, and cannot be stalled.
- The tag tells the accelerator where the words go and which of them are
  wanted.
- Only masked words need to be valid, so the memory may ignore the address
  of the others.
- The fetch engine never requests a beat whose mask is empty: a row wholly
  in the padding, or the weights of maps past M.

**Write channel.**

- `wr_valid`/`wr_ready`, the address of word 0, 8 data words and `wr_mask`.
- One beat carries one T_C-word row segment of one output map. Words past
  the layer edge are masked off.

**Memory layout** (word addresses, row-major):

    A[z][y][x] at in_base  + (z*Y + y)*X + x
    W[m][z][i][j] at w_base + ((m*Z + z)*K + i)*K + j
    B[m][r][c] at out_base + (m*R + r)*C + c

**Starting a layer.**

- Fill `cfg` (`layer_cfg_t`) and pulse `start` for one cycle while `busy` is
  low. Keep `cfg` stable until `done`.
- `done` rises once the last output beat has been accepted, and stays high
  until the next start.
- Limits: 2 <= K <= K_MAX, 1 <= S <= S_MAX, P <= 15.
- Dimensions are 16-bit. Z and M have no other limit.

## Number format

Words are signed Q16.16 fixed point. A MAC computes

    acc <= acc + ((x * w) >>> 16)

using the full 64-bit product, truncated back to 32 bits. Nothing saturates,
so overflow wraps.

## Performance at the default size

`tb_ican_alexnet` runs the five convolutional layers of AlexNet (one of
its two partitions) on the default build: 539 MAC units and an 8-word bus.
The memory model answers after 20 cycles and never stalls.

| layer | (Z,Y,X) -> (M,R,C), K, S | cycles | MAC utilisation |
|---|---|---|---|
| 1 | (3,224,224) -> (48,55,55), 11, 4 | 119,364 | 81.9% |
| 2 | (48,27,27) -> (128,27,27), 5, 1 | 237,182 | 87.6% |
| 3 | (256,13,13) -> (192,13,13), 3, 1 | 208,705 | 66.5% |
| 4 | (192,13,13) -> (192,13,13), 3, 1 | 159,041 | 65.4% |
| 5 | (192,13,13) -> (128,13,13), 3, 1 | 106,753 | 65.0% |

The whole network takes 831,045 cycles. That is 74% MAC utilisation, or
128 GOPS at a 160 MHz clock. The remaining losses fall into three groups:

- **Edge tiles.** About 16% is lost on every layer, because 13 or 55
  outputs do not divide evenly into 7-wide compute tiles.
- **Window fill, K = 3.** The fill takes 10 cycles against a 9-cycle pass.
- **Weight look-ahead, K = 3.** A weight tile serves D_R*D_C = 4 passes,
  about 40 cycles. Fetching the next tile takes 11 lanes * 2 beats, plus
  the memory latency, plus a few cycles of hand-over. With only two weight
  banks, the compute tile waits for the difference.

Layers 1 and 2 are close to their tiling limit. Input fetch and write-back
stay hidden behind compute on all layers. With a one-word bus, input fetch
would instead dominate by a factor of three to four.

## Where this RTL departs from the reference architecture, or fills gaps

**Datapath.**

- **MAC.** A single-cycle multiply-accumulate with one register. The
  reference build uses a 5-DSP pipelined 32-bit MAC at 160 MHz. A pipelined
  MAC would need the bypass and the back-to-back store timing reworked.
- **Fixed-point split.** Q16.16 is this design's choice.
- **Layer operations.** No bias, pooling or activation. The accelerator
  does convolution only; these are left to the host or a later stage.

**Memory and buffers.**

- **Bus.** The bus width (8 words), the tag/mask read protocol and the
  write protocol are this design's. The reference design sits behind a
  multi-port memory controller that is not described here.
- **Weight buffer ports.** The write port is one bus beat wide. The read
  port is T_M words wide, one per RC plane, and is combinational.
- **Buffer sizing.** Buffers are sized for the largest layer the
  parameters allow: a square input slice of side
  `(max(D_R*T_R, D_C*T_C)-1)*S_MAX + K_MAX`. The reference instead sizes
  buffers for a given network by a design-space search.
- **Drain.** The drain port of the output buffer and the drain engine are
  this design's. The reference does not say how tiles leave the chip.

**Control.**

- **Loop order.** The order z -> dm -> dr -> dc inside an output tile, the
  early exits at the edges, and the descriptor handshake are this design's
  reading of the reference loop nest.
- **Weight refetch.** Output tiles form the outermost loop, so a weight
  tile is fetched once per output tile:
  Z * ceil(M/T_M) * ceil(R/(D_R*T_R)) * ceil(C/(D_C*T_C)) times per
  layer. The reference counts Z * ceil(M/T_M), which is the same only when
  one output tile covers all of R x C (true for AlexNet layers 3 to 5, not
  for layers 1 and 2). Weight tiles are small, and at the 8-word bus this
  traffic stays hidden behind compute.
- **Pass timing.** The bypass and the one-cycle load/store overlap are
  this design's. The reference only states that a load and a store can
  happen in the same cycle.

## Files

**Package.**

- `ican_pkg.sv`: word type, `layer_cfg_t`, `win_desc_t` (one pass),
  `fetch_tag_t`, `fx_mul`.

**Compute.**

- `mac_unit.sv`: one MAC unit.
- `compute_tile.sv`: the T_M x T_R x T_C array of MAC units.
- `input_reuse_network.sv`: the shifting register array and stride
  multiplexers.
- `shape_adapter.sv`: the staging register array with its zero mask.

**Buffers.**

- `input_buffer.sv`, `weight_buffer.sv`, `output_buffer.sv`: the
  double-buffered memories.

**Control.**

- `window_sequencer.sv`: the loop nest; one descriptor per pass.
- `read_controller.sv`: input buffer to shape adapter, and padding.
- `compute_controller.sv`: pass schedule, serpentine shifts and weight
  addresses, output load/store, bank hand-over.
- `fetch_engine.sv`: input slices and weight tiles from memory.
- `drain_engine.sv`: output tiles to memory.

**Top.**

- `ican_accel.sv`: wires it all together.

## Verification

Each block has a self-checking testbench in `tb/`:

- It compares the block's outputs with values computed independently in
  the testbench.
- It has a watchdog.
- It prints `TB_RESULT checks=N failures=M`.

`tb/dram_model.sv` is a behavioural memory with a fixed read latency. It
withholds ready at random on both channels.

**End-to-end tests.**

- `tb_ican_accel` builds a small accelerator: (2,3,3) x (2,2,2), K <= 5,
  S <= 2, 8-word bus beats.
  - It runs four layers with padding, stride 2, several kernel sizes and
    partial tiles in every dimension.
  - It checks every output word against a convolution computed in the
    testbench, checks that nothing is written outside the output, and
    checks that MAC cycles = passes * K*K.
  - It counts how often each mechanism happens: compute stalls, padded rows,
    fetch overlapping compute, write-back overlapping compute, stride-2
    passes and partial map tiles. It fails if any of them never occurs.
  - The bypass needs an input slice to arrive within one pass. The memory
    model is too slow for that, so the bypass is exercised in
    `tb_compute_controller` instead.
- `tb_ican_accel_full` runs the default-size accelerator (no parameter
  overrides) on two layers:
  - a 3 x 16 x 16 input with 12 maps, K=3, P=1;
  - a 2 x 31 x 31 input with 4 maps, K=11, S=4.

- `tb_ican_alexnet` runs the five AlexNet layers at the default size (about
  0.8 million cycles) and checks every output word. It also checks each
  layer's cycle count against the timing model described under
  Performance, with 10% tolerance.

**Running a test with plain Verilator:**

    verilator --binary --timing --assert -Irtl -Itb rtl/ican_pkg.sv \
        tb/tb_ican_accel.sv --top-module tb_ican_accel -Mdir obj -o sim
    ./obj/sim +verilator+rand+reset+2

**Changing the build.** The parameters of `ican_accel` are the tile sizes
(TM, TR, TC, DM, DR, DC), K_MAX, S_MAX and BUS_WORDS.

- BUS_WORDS must be at least T_C.
- BUS_WORDS must be at most T_R*T_C.
- The window row width `(T_C-1)*S_MAX + K_MAX` must not exceed T_R*T_C.

Assertions in the RTL check these rules.
