# MISCA — mixed-size crossbar RRAM CNN accelerator

This is synthesizable SystemVerilog for a CNN inference accelerator. The CNN weights are held
as conductances in RRAM crossbars of three sizes: 512×512, 256×256 and 128×128. Convolutions
are mapped with an *overlapped mapping* method. Each kernel is written several times into one
crossbar column stack, and each copy is shifted down by one window step. One long input
vector then gives the outputs of several neighbouring window positions in a single read. The
crossbar model is behavioural: an exact integer multiply–accumulate with 8-bit saturation.
Everything around it is cycle-accurate RTL.

## Block diagram

```
 host CPU (not part of the design)
   | instr_valid[b], instr, instr_wdata        host_req/we/addr/wdata -> gnt, rvalid, rdata
   v                                             |
 misca_top ------------------------------------- | -------------------------------
 |  rram_bank x8  --- bus master 0..7 ---+       |  master 8                      |
 |                                       v       v                                |
 |                                  shared_bus (round robin) --> global_buffer    |
 ---------------------------------------------------------------------------------

 rram_bank
   bank_ctrl ---- layer settings, routing table, weight writes, fetch/write-back loop
      | bus read data
      v
   idrc (block queue + row counter) --> merged vector vec[VEC_LEN]
      |                  |                   |
   xb_sel (512)      xb_sel (256)        xb_sel (128)     decoder + one MUX per crossbar
   pea 64x512x512    pea 64x256x256      pea 64x128x128   rram_crossbar x64 each
      \__________________|___________________/
                 sum_circuits   ADD decoders -> adders -> encoder
                    |                 \
               pool_relu               \ (dest = bus)
                    \_____ result FIFO in bank_ctrl --> shared bus --> global buffer
```

| File | Role |
|---|---|
| `rtl/misca_pkg.sv` | Data type (`elem_t`, signed 8 bit), routing entry, layer settings, instruction format, `sat8` |
| `rtl/misca_top.sv` | 8 banks, shared bus, global buffer, host ports |
| `rtl/rram_bank.sv` | One bank |
| `rtl/bank_ctrl.sv` | Bank controller |
| `rtl/idrc.sv` | Input data rearrangement circuits (IDRC) |
| `rtl/xb_sel.sv` | Crossbar selection for one array |
| `rtl/pea.sv` | Process element array of 64 crossbars |
| `rtl/rram_crossbar.sv` | Crossbar with DACs and ADCs (behavioural) |
| `rtl/sum_circuits.sv` | Adds the crossbars of each output lane and routes the result |
| `rtl/pool_relu.sv` | ReLU, max pooling, average pooling |
| `rtl/shared_bus.sv` | Round-robin bus, one transfer per cycle |
| `rtl/global_buffer.sv` | Single-port buffer memory, 16384 words of 512 bytes |

## Default sizes

| Parameter | Default | Origin |
|---|---|---|
| Banks | 8 | from the published design |
| Crossbar sizes SL/SM/SS | 512/256/128 | from the published design |
| Crossbars per array | 64 (32×2) | from the published design; 3 arrays per bank, so 512 crossbars of each size |
| Data width | 8 bits | from the published design (8-bit adders) |
| Pooling groups × window | 64 × 4 | from the published design (64 4×4 averaging crossbars) |
| IDRC queue, `VEC_LEN` | 16384 | own choice: a column of 32 large crossbars |
| Bus / result lanes, `LANES` | 512 elements | own choice: the width of a large crossbar |
| Buffer address width, `AW` | 14 (8 MiB) | own choice; the published design uses off-chip DDR4 |
| Result FIFO per bank | 4 | own choice |
| ADC shift | 0 | own choice |

## How a layer runs

The host programs a bank with four instructions (`instr_t`):

- `OP_WR_ROW` writes one row of weights into crossbar (`pea`, `xb`) from `instr_wdata`. One row is written per cycle.
- `OP_CFG_XB` writes the routing entry of one crossbar:
  - `en` says whether the crossbar is used.
  - `in_seg` picks which S-element slice of the merged vector drives its rows.
  - `out_off` places its S columns on the sum lanes, starting at lane `out_off·S`.
- `OP_CFG_LAYER` loads the layer settings (`layer_cfg_t`):
  - `vec_len` is the merged vector length.
  - `push_len` is the number of elements per block.
  - `step_pushes` is the number of blocks per window step.
  - `row_pushes` is the number of blocks per feature-map row strip.
  - `n_push` is the number of blocks in the whole run.
  - `rd_base` and `wr_base` are the global-buffer addresses.
  - `dest` selects either the bus or the pooling circuits.
  - `pool_mode` selects none, ReLU, max or average.
- `OP_RUN` starts the layer. `busy` stays high until the last result has been written. `done` then pulses for one cycle.

During a run, the controller behaves as follows:

- It reads `n_push` words from `rd_base` onwards.
- It pushes each word into the IDRC.
- It writes each result vector to `wr_base`, `wr_base+1`, and so on.
- A result waiting in the FIFO has priority over the next fetch.
- A fetch is only issued while the FIFO has room for every result that could still come back. The pipeline behind the IDRC therefore never has to stop.
- When another bank holds the bus, the fetch waits.

### Overlapped mapping in this RTL

Take a K×K kernel with C_in input channels, stride st, and s_p window positions per read. The
merged vector holds `(s_p − 1)·st·K·C_in + K²·C_in` elements.

The host stores each feature-map row strip (K rows high) in the global buffer as a stream of
window columns, one after another. Each window column holds K·C_in elements. Every push adds
the next `push_len` elements, and the IDRC shifts out the oldest `push_len`. When the queue
holds `vec_len` elements and a window step is complete, the IDRC presents the vector for one
cycle.

After `row_pushes` pushes, the row counter flushes the queue, and the next strip starts from
empty. If the first vector of a strip should start at window position 0, the host puts a
leading zero column in front of the strip.

Kernel copy p (p = 0 … s_p−1) is written into output lanes `p·C_out … p·C_out+C_out−1`. Its
rows are moved down by `p·st·K·C_in`. When the vector is taller than one crossbar, its slices
are spread over several crossbars with the same `out_off`. The SUM circuits add those
crossbars together. This is how mixed-size mapping is expressed. For example:

- A 288-row vector can use rows 0–255 of a 256×256 crossbar.
- The remaining rows 256–287 then go on a 128×128 crossbar.

The routing entries make these choices. No extra hardware is needed. The same entries cover two
other mappings:

- **Unbalanced output channels.** Kernels that do not fit the overlapped copies (for example
  when C_out does not divide the crossbar width) go on extra crossbars with their own
  `out_off`.
- **Duplicated 1×1 kernels.** For 1×1 convolutions, several crossbars can hold the same
  weights. Each takes a different pixel's slice of the vector (`in_seg`) and writes its own
  lanes. The host pads each pixel's channels to a slice boundary for this.

### Timing

- Every flop uses the rising edge. The one exception is the crossbar output register, which updates at the falling edge, when the crossbars are read.
- A block pushed at edge n gives a vector at edge n.
- The crossbars are read at the falling edge in that cycle.
- The sum is registered at edge n+1.
- Pooling adds one more edge.
- A bank that has the bus to itself alternates one fetch and one result write. It finishes a run in about 2 cycles per block plus a fixed latency.
- The global buffer returns read data one cycle after the grant.

## Differences from the described accelerator

- **The crossbar is behavioural.** Conductances are signed 8-bit integers and the product is exact. The ADC output is `sat8(Σ g·v >>> ADC_SHIFT)`. Device noise, write latency and energy are not modelled.
- **Average pooling is digital.** It uses an arithmetic right shift by 2 (a floor). The described design uses crossbars with cells of 1/4 instead.
- **Max pooling includes ReLU.** A pooling window is 4 adjacent lanes.
- **No return path from pooling into the IDRC.** The IDRC only takes blocks from the global buffer. Every layer's output goes back through the buffer.
- **The global buffer is on-chip SRAM**, not DDR4. It is large enough for the largest feature map of VGG-D (224×224×64).
- **The instruction set and the bus are this design's own.** This covers the instruction set and encoding, the bus handshake and arbitration, the host port, the result FIFO and the fetch credit rule.
- **The mapping algorithm is not implemented.** Crossbar allocation (square-coverage greedy method, area-constrained search, FC split) is offline software. Its output reaches the chip as `OP_WR_ROW`, `OP_CFG_XB` and `OP_CFG_LAYER` instructions.
- **Partial sums of two runs are not accumulated.** A fully connected layer with more than 16384 inputs (VGG-D FC1: 25088) cannot run as built.

## Networks

| Network | Runs as built | Limiting size |
|---|---|---|
| AlexNet | yes | FC6 has 9216 inputs and conv2 windows have 2400, both ≤ 16384 |
| VGG-D | no | FC1 has 25088 inputs, more than the 16384-element queue |
| ResNet-18/34/50 | yes | largest window 3×3×512 = 4608; largest map 112×112×64 = 1568 buffer words |

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench:

- prints `TB_RESULT checks=N failures=M`,
- has a watchdog,
- checks against a reference model.

What they cover:

- `tb_rram_crossbar`, `tb_pea`, `tb_xb_sel`, `tb_sum_circuits` and `tb_pool_relu` use random vectors against a behavioural reference.
- `tb_idrc` checks queue contents, vector timing, flushes, and multi-push steps.
- `tb_bank_ctrl` models the rest of the bank and the bus, and refuses bus grants at random.
- `tb_rram_bank` runs a 2×2×2→3 convolution with s_p = 2. It uses one large crossbar, then mixed sizes with ReLU, max and average pooling.
- `tb_shared_bus` and `tb_global_buffer` test the bus and the buffer.

The top testbench `tb_misca_top` covers the whole chip at reduced sizes, with all 8 banks:

- The host loads a feature map.
- Four banks run the same overlapped convolution at the same time, each in a different mode.
- The host reads back every result and compares it with a direct convolution.
- It counts bus stalls, IDRC flushes, vectors holding two window positions, mixed-size runs and each pooling mode. A count of zero fails the test.

`tb_misca_top_full` runs the same scenario on the top with every parameter at its default:

- 8 banks.
- 64 crossbars of each size per bank.
- A 16384-element queue and 512 lanes.
- C_in = 48, so the 288-element vector spans a medium and a small crossbar.

It needs about 4.3 GB of memory and two minutes of C++ build time.

`tb_resnet18_conv2` runs a real layer shape on one bank at full size: the second convolution
of ResNet-18 (3×3, 64→64 channels, stride 1) on a 5×8 slice of the feature map, with s_p = 3.
The 960-element vector is split over one 512×512 crossbar (rows 0–511), one 256×256 crossbar
(rows 512–767) and four 128×128 crossbars (rows 768–959, two lane groups). Each window step
brings 576 elements, so it takes two 288-element pushes. The test checks every lane of every
result against a reference that saturates each crossbar's partial sum. It also checks that the
run takes at most 2 cycles per push plus 8.

Run a testbench with Verilator 5 (the package comes first):

```
verilator --binary --timing --assert -Irtl -Itb rtl/misca_pkg.sv \
  $(ls rtl/*.sv | grep -v misca_pkg) tb/tb_rram_bank.sv --top-module tb_rram_bank
./obj_dir/Vtb_rram_bank
```
