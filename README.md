# Edge-sensing front end and systolic neural multiprocessor

This is a two-chip machine-vision pipeline written in SystemVerilog.

The first chip finds edges where the image is formed. Each pixel is a
photocurrent cell. Each cell computes a discrete Laplacian of the light
falling on it and its four neighbours, using currents and not numbers. A
comparator turns the result into one bit per pixel: edge or no edge. Only
that binary edge map leaves the chip, one byte (eight pixels) per clock.
This cuts the data the digital side must handle by a factor of eight
against 8-bit grey levels.

The second chip is a lock-step array of 20 small processors (PEs). They
run neural-network arithmetic on the edge map and on data from a
system memory. Each PE does one 8 × 8-bit multiply-accumulate per clock.
At a 100 MHz bus clock, 20 PEs give 2 × 10⁹ connections per second. One
array controller broadcasts the same microinstruction to every PE each
clock. The PEs form either a one-dimensional systolic ring or a
two-dimensional mesh.

The top module, `vision_system`, joins the two chips:

```
 photocurrents ─► edge_chip ─► image buffer SRAM ─► neural_mp_chip ◄─► system memory SRAM ◄─► host
  (66 x 50)      (64 x 48 bits)   (384 bytes/frame)   (20 PEs, ring/mesh)  (64 KB, two-port)
```

The host is outside the design. It starts frames, sets the edge
threshold, fills the control store, issues macroinstructions, and reads
and writes the system memory. All of its signals are ports of
`vision_system`.

## The Laplacian cell array

`laplacian_cell_array` is a behavioural model of an analog array of
66 rows × 50 columns. It is not synthesizable logic in the usual
sense, although it does elaborate. Each cell mirrors its photocurrent
`I` to its four neighbours. It collects theirs, and outputs

    I_out(i,j) = I(i-1,j) + I(i+1,j) + I(i,j-1) + I(i,j+1) − 4·I(i,j)

This is the 3 × 3 stencil `0 1 0 / 1 −4 1 / 0 1 0`. A neighbour outside
the array contributes zero, as if its input were grounded. The outermost
ring of cells therefore gives distorted results, and only the inner
64 × 48 cells are read.

- **Inputs.** Photocurrents are unsigned integers in picoamperes, 16 bits
  wide.
- **Outputs.** Column currents are signed, 24 bits wide.
- **Row select.** A row-select line switches a cell's output onto its
  column line. Selected cells in a column add their currents, as they
  would on a wire.

`row_decoder` raises one select line. Effective row `n` is physical row
`n+1`.

## Sense amplifiers and read-out

There are 48 `sense_amp` models, one per inner column. Each is a
behavioural model of the two-stage analog amplifier:

- **Stage S0** converts current to voltage through `R_OHM` = 5000 Ω.
  Voltages are integers in picovolts.
- **Stage S1** compares that voltage with an external threshold `vth_pv`.
  A pixel is an edge when `I_out·R ≥ vth_pv`. Because of the sign
  convention above, edges mark the darker side of a brightness step.

The digital read-out path follows the amplifiers:

1. `edge_buffer_reg` is a two-stage 48-bit register. Stage 1 captures a
   row from the amplifiers. Stage 2 holds the row being sent.
2. `group_mux` picks one of six 8-bit groups per clock.
3. `output_reg` holds the byte with its buffer address (`row·6 + group`)
   and a one-clock write strobe. This strobe writes the image buffer
   directly.

`edge_readout_ctrl` sequences all of this. For each of the 64 rows it:

1. selects the row;
2. waits `SETTLE` clocks for the analog column lines, then loads stage 1;
3. moves the row to stage 2 as soon as the output side has finished the
   previous row, so the next row settles while this one is sent.

**Timing.** A frame takes `64·(SETTLE+1) + 6` clocks. At the default
`SETTLE` = 10 this is 710 clocks. A column line settles in about 1 µs,
which is 10 clocks at an assumed 10 MHz. With `SETTLE` below 5 the output
side becomes the bottleneck. The controller then holds a settled row and
raises `stall` until stage 2 is free.

## Inside a processing element

`processing_element` follows a four-bus datapath. All bus and unit widths
are in the table below.

| unit | size | writes back over |
|---|---|---|
| `data_cache` | 256 × 8 bits, combinational read | (CPU1 bus) |
| `register_file` | 8 × 20 bits; `r0` reads as 0 | — |
| `wallace_mult8` | signed 8 × 8 → 16 | REG1 port |
| `adder20` | 20 bits, add/subtract, sign flag | REG2 port |
| `pe_io_unit` | 8-bit input and output buffers | — |

The buses carry the following:

- **CPU1** carries the cache byte at the effective address.
- **CPU2** carries the input buffer, which holds the word last received
  from a neighbour.
- **REG1 and REG2** are the two register read ports.

Each arithmetic unit takes operand A from CPU1 or REG1, and operand B from
CPU2 or REG2.

The multiplier is built from four 4 × 4 partial-product blocks. The
blocks are summed by two carry-save levels and one final adder. It works
on magnitudes, and the sign is restored at the end. It is purely
combinational, so there is no pipeline stage.

One microinstruction can therefore do all of the following in the same
clock:

- multiply a cache weight by the word that has just arrived from a
  neighbour;
- add the previous product into an accumulator;
- forward the arrived word to the next PE.

This is the whole inner loop of a systolic matrix-vector product.

Other features:

- **Table look-up.** Setting `cache_ind` adds `REG2[7:0]` to the cache
  address. This reads a table stored in the cache, which is how nonlinear
  activation functions are evaluated.
- **Conditional writes.** An adder result can set a per-PE flag (its
  sign). Later words with `cond` set write registers and cache only in PEs
  whose flag is 1. This gives data-dependent behaviour, such as picking a
  winner, without branching.
- **Cache writes.** A cache write stores `fmt(REG1)`: the register shifted
  right arithmetically by `shamt` and saturated to a signed byte. This is
  the fixed-point rescale from a 20-bit accumulator back to 8-bit data.

## The microinstruction

The 43-bit broadcast word (`mp_pkg::mcode_t`, most significant field
first) is:

| field | bits | meaning |
|---|---|---|
| `mul_en`, `mul_a_cpu`, `mul_b_cpu`, `mul_dst` | 1+1+1+3 | multiply; A from CPU1 (else REG1), B from CPU2 (else REG2); destination register |
| `add_en`, `add_sub`, `add_a_cpu`, `add_b_cpu`, `add_dst` | 1+1+1+1+3 | the same for the adder; `add_sub` gives A − B |
| `flag_wr`, `cond` | 1+1 | flag ← sign of the adder result; make writes conditional on the flag |
| `ra`, `rb` | 3+3 | register read addresses for REG1 and REG2 |
| `cache_wr`, `cache_ind`, `cache_addr` | 1+1+8 | cache ← fmt(REG1); indexed addressing; address |
| `send_en`, `send_fwd` | 1+1 | load the output buffer with fmt(REG1), or forward the word received this clock |
| `recv_en`, `recv_dir` | 1+2 | load the input buffer from the N/E/S/W port |
| `shamt` | 4 | shift for `fmt` |
| `idx_add` | 1 | the controller adds its loop index to `cache_addr` |
| `spare` | 2 | unused |

**Timing.** Every field acts on the next rising edge. Reads happen in the
same clock: cache, registers and buffers are all read combinationally.

## Array controller and macroinstructions

Programming has two levels. The host writes microroutines into the
controller's writable control store (`UCODE_DEPTH` = 256 words). It then
pushes 43-bit macroinstructions (`mp_pkg::macro_t`: `op`, `a`, `b`,
`len`) into an 8-deep FIFO (`macro_valid` / `macro_ready`).

| op | effect |
|---|---|
| `M_EXEC` | runs control-store words `a[7:0]` … `+b−1`, `len` times. Words with `idx_add` get the repetition index added to their cache address |
| `M_LOAD` | copies `len` bytes from system-memory address `a` to PE address `b` |
| `M_LOADIMG` | the same, but reading the image buffer |
| `M_STORE` | copies `len` bytes from PE address `b` to system memory `a` |

A PE address is `{PE index, cache address}`, so one long copy runs
through consecutive PEs. Copies move one byte per clock over a peripheral
bus that selects one PE at a time. During a copy the controller
broadcasts no-ops.

**Timing.** An EXEC's first microword appears on `mc` two clocks after
the host writes the macro. After that, one word per clock, with no gaps
between repetitions. An assertion flags any control-store write during
an EXEC.

## Ring and mesh

`pe_array` wires the 20 PEs in one of two ways, chosen by `mesh_mode`.

- **Ring** (`mesh_mode = 0`). PE k's west port sees PE k−1, and PE 0 sees
  PE 19. Its east port sees PE k+1. North and south read 0.
- **Mesh** (`mesh_mode = 1`). Four rows of five PEs. North and south wrap
  around between the top and bottom rows. The west port of column 0 and
  the east port of column 4 are array I/O: `west_in` / `east_in` /
  `west_out` / `east_out`, one byte per row.

Every PE offers its single output buffer on all four sides.

## A layer on the ring

The end-to-end tests run one fully connected layer `a_out = f(W a)` with
20 neurons, one per PE:

1. **Initialise** (2 words). Each PE puts its own activation `a_i` into
   its output buffer and clears its accumulator.
2. **Step** (1 word, run N+1 = 21 times). Every PE receives from the west
   and forwards the same word east. It multiplies the received word by
   `cache[k]` (the repetition index is added to the cache address) and
   accumulates the previous product.
   - After k shifts, PE i holds `a_((i−k) mod N)`.
   - Therefore PE i's cache must hold `w(i, (i−k) mod N)` at address k.
   - The extra step drains the last product.
3. **Activate** (6 words).
   1. Add the last product, then rescale the sum into a byte.
   2. Use that byte as an index into a 32-entry table in the cache.
   3. Undo the index, which the same word also adds through REG2.
   4. Store the result.

**Throughput.** 400 multiply-accumulates take 21 clocks. That is
1.90 × 10⁹ connections per second at 100 MHz, against 2.0 × 10⁹ in
steady state.

## Back-propagation on the ring

`tb_backprop_ring` runs the backward pass of a 20 × 20 layer. PE j holds
row j of the weights, in the same skewed order as the forward pass. It
also holds its error term `δ_j`, supplied by the host, and the activation
`a_j`. The pass has two systolic loops:

1. **Error.** `e_i = Σ_j δ_j w(j,i)`, 3 clocks per step. A partial sum
   moves east one PE per step. Each PE adds its `w(j, j−k)·δ_j` to the
   partial it receives. After 20 steps the partial for column i is
   complete and sits in PE i. Partials travel as saturated bytes.
2. **Update.** `w(j,i) −= sat((δ_j·a_i) >>> 2)`, 7 clocks per step. This
   is a learning rate of 1/4 applied as a shift. The activations
   circulate as in the forward pass.

The error loop uses the weights before the update. The test checks all
20 errors and all 400 weights, and the number of steps in each loop.

## Competitive learning on the ring

`tb_competitive_learning` trains a vector-quantiser codebook. It shows
how the flag and conditional writes replace branching. Each PE holds one
code vector. For every training vector `x`, which the host copies into
all caches, one microprogram does the following:

1. **Distortion.** Each PE accumulates `Σ (c_d − x_d)²`, squaring with
   the multiplier on two register operands. It then rescales the sum to a
   byte `e`.
2. **Minimum.** A running minimum passes 19 times round the ring. Each
   step takes 5 words: receive; copy the received word to a register (the
   input buffer can only be a B operand); set the flag where it is
   smaller; copy it under the flag; send.
3. **Winner.** Each PE computes `own e − minimum − 1`. Its sign is set
   only in the PE that holds the minimum, so exactly one flag is set.
4. **Update.** `c += sat((x − c) >>> 1)`, with conditional cache writes.
   Only the winner's vector changes.

The test checks the flags and all 80 code bytes after each of six
training vectors.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Run one with
plain Verilator, for example:

```
verilator --binary -Wno-fatal --top-module tb_vision_system \
    rtl/mp_pkg.sv rtl/*.sv tb/tb_prog_pkg.sv tb/tb_vision_system.sv
./obj_dir/Vtb_vision_system
```

List `mp_pkg.sv` first, and `tb_prog_pkg.sv` before the chip-level
tests. `tb_<module>` tests module `<module>`.

- **Leaf tests** compare outputs with independent reference computations.
  For example, the multiplier test is exhaustive over all 65 536 operand
  pairs.
- **`tb_edge_chip` and `tb_laplacian_cell_array`** run the full 66 × 50
  array. The edge-chip test checks every pixel of two images and the
  710-clock frame time.
- **`tb_processing_element`** runs random microinstructions against a
  model, plus a directed dot product.
- **`tb_neural_mp_chip`** runs the ring layer above, then a mesh shift.
- **`tb_backprop_ring`** and **`tb_competitive_learning`** run the two
  learning programs above.
- **`tb_vision_system`** runs at the default sizes with no parameter
  overrides. It covers one frame; host writes to system memory; LOAD,
  LOADIMG, the layer, STORE, a mesh shift, and a compare step with
  conditional writes. It counts every mechanism: frames, each macro type,
  FIFO-full clocks, ring shifts, mesh shifts, table look-ups and
  conditional writes. It fails if any count is zero. The read-out stall
  cannot occur at the default `SETTLE`. It is exercised in
  `tb_edge_readout_ctrl`, which uses a shorter settle time.

Synthesising the full analog array model is slow, because it has 3300
cells each with a 24-bit adder tree, but it completes.

## Where this departs from the source design, and what is missing

- **Widths.** The processor block diagram labels 16-bit multiplier
  inputs, a 32-bit product, 40-bit adder and register paths, and 35
  control lines. The written description and the processor floor plan
  give an 8-bit multiplier, a 20-bit adder, 16-bit products and
  43 control lines. This design uses the latter.
- **Own choices.** The following are this design's own: the
  microinstruction layout, the macro opcode set, the compare flag and
  conditional writes, indexed addressing, and the fixed-point `fmt` step.
  The source names the buses, units and two-level control, but does not
  give encodings.
- **One clock.** The source runs the global bus at 100 MHz and a
  segmented internal bus at twice that, multiplexed onto an internal data
  bus. Here everything runs on one clock, and each bus is a set of
  dedicated wires into the units, so there is no bus multiplexer and
  no second bus phase.
- **System memory path.** In the source's mesh, data reach the system
  memory only through the left-most and right-most columns. Here the
  controller's LOAD and STORE reach every PE cache over the peripheral
  bus, in ring and mesh mode alike.
- **Mesh shape and I/O.** How 20 PEs form a mesh is not specified; 4 × 5
  was chosen. The mesh edge ports are brought out as top-level ports,
  not wired to the system memory.
- **Not built:**
  - the memory management unit and the fault detection and recovery
    module that belong in the controller (only their existence is
    described);
  - the optional pipeline stage in the multiplier;
  - the processor pins READY, INT, INTA and NMI;
  - the cache's tag block.
- **Analog parts are idealised.** The cell array and sense amplifiers
  are integer models. They have no mismatch, no settling waveform and no
  amplifier gain limit. The phototransistor is not modelled: its current
  is an input.
- **Edge side.** The source says an edge is marked on the brighter side
  of a step, but also gives the test `I_out ≥ I_th` with the Laplacian
  above. For a step with a threshold near zero, that test marks the darker
  side. This design implements the test as written.
- **Array size.** The edge array has only 64 × 48 effective pixels.
  Larger images, such as 256 × 256 or video-rate 1024 × 1024, need tiling
  that the design does not provide.
- **Back-propagation.** The source's mapping uses two 4 × 4 weight arrays
  with one weight per PE, 32 PEs in all. It does not fit one 20-PE chip
  as drawn. The included program runs the back-propagation phase of one
  layer on the ring instead (see above).
- **Competitive learning.** The source maps it onto the mesh and passes
  a winner index from PE to PE. The included program runs on the ring
  instead (see above).
- **Memory sizes.** The two SRAMs are written as plain arrays with a
  one-clock registered read. The image buffer is 512 bytes and the
  system memory is 64 KB. Both sizes are choices.
