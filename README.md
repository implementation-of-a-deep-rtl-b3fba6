# An int8 CNN inference engine in the small NVDLA configuration

This is synthesizable SystemVerilog for a convolutional-network inference accelerator. It follows
the organisation of NVIDIA's Deep Learning Accelerator (NVDLA) in its smallest configuration,
`nv_small`, as integrated on a Zynq UltraScale+ board:

- an 8 x 8 array of int8 multiply-accumulate cells (64 MACs);
- a 128 KiB convolution buffer;
- separate engines for post-processing (SDP), pooling (PDP) and local response normalisation (CDP);
- one 64-bit AXI4 master to external memory;
- a 32-bit register bus, reached over APB;
- one level-sensitive interrupt line.

The host CPU does not move data. It writes a layer's description into registers, sets an enable
bit, and waits for the interrupt. The engines fetch the input, compute and write the output cube
to memory themselves. Every engine has **two register groups**, so the host can describe the next
layer while the current one runs. This ping-pong scheme is what keeps the engines busy between
layers, and it is the part most worth understanding first.

It is not the NVIDIA RTL. The function of each unit follows the published description of the
architecture. Everything inside the units was designed here for simplicity: datapaths, schedules,
memory layout and register map. It is not register- or bit-compatible with NVDLA software. See
"Where this departs from NVDLA" below.

## Block diagram

```
          APB                                         AXI4 (64-bit data, 32-bit address)
           |                                                 ^
      +----v----+   CSB   +-----+        +------------------+-----------------+
      | apb2csb |-------->| CSB |--regs->| MCIF: 3 read clients, 3 write clients |
      +---------+         +-----+        +--^-------------^--------------^-----+
                            |              |rd           rd|  wr      rd|  wr
   +------------------------+-----+    +---+---+       +---+---+   +----+--+
   | GLB (interrupts) -> dla_intr |    | CDMA  |       |  PDP  |   |  CDP  |
   | CFGROM (configuration words) |    +---+---+       +-------+   +-------+
   +------------------------------+        | writes
                                       +---v---+  reads +-----+      +------+      +-----+ wr
                                       | CBUF  |------->| CSC |----->| CMAC |----->|CACC |---> SDP ---> MCIF
                                       +-------+        +-----+ wts, +------+ psum +-----+
                                                                data
```

`nvdla_wrapper` is the top level. It holds the APB bridge and `nvdla_core`, and every core pin is
brought out. `nvdla_core` instantiates all the units above, plus one `nvdla_reg_dual` (register
groups) for each of CONV, PDP and CDP.

## How a layer is run: register groups and interrupts

Each processing unit (CONV, PDP, CDP) has two groups of sixteen 32-bit D registers. There are two
pointers:

- The **producer** pointer (`S_POINTER` bit 0) chooses which group the host's writes go to.
- The **consumer** pointer (`S_POINTER` bit 16, read-only) is the group the unit executes.

The sequence for one unit:

1. The host sets the producer pointer and writes D1..D15 of that group. Then it writes 1 to D0,
   the group's `OP_ENABLE`. From then on the group is locked: D-register writes to it are ignored.
2. If the consumer group is enabled and the unit is idle, the unit starts. It reads its whole
   configuration from that group for the whole layer.
3. When the layer is finished, the unit pulses `done`. That has three effects:
   - the consumer group's `OP_ENABLE` clears;
   - a one-cycle event for that group goes to GLB;
   - the consumer pointer flips.
4. If the other group was enabled in the meantime, the unit starts it in the next cycles, with no
   host involvement.

So the host can always stay one layer ahead. Program group 0 and enable it. Switch the producer to
group 1 and program the next layer while the first runs. Then wait for the interrupt of group 0.
Program group 0 again and wait for group 1, and so on. `S_STATUS` shows both `OP_ENABLE` bits, so
software can tell which groups are still busy.

GLB turns events into a level interrupt. Its `INTR_STATUS` register has one bit per unit and
group:

| bit | event |
|-----|-------|
| 0, 1 | CDMA finished loading the buffer (group 0, 1) |
| 2, 3 | convolution layer finished: all SDP writes acknowledged by memory |
| 4, 5 | PDP layer finished |
| 6, 7 | CDP layer finished |

How the bits behave:

- A bit sets when its event fires, or when the host writes 1 to it in `INTR_SET`.
- A bit clears when the host writes 1 to it in `INTR_STATUS` (write-one-to-clear).
- `dla_intr` is high one cycle after any bit that is not masked in `INTR_MASK` is set.
- Clearing a bit in the same cycle its event fires loses that event.

A layer counts as done only after its memory writes have been acknowledged. An interrupt
therefore means the output is in memory and the next layer may read it.

CONV, PDP and CDP run independently. A pooling layer and a normalisation layer can run while a
convolution is in flight, sharing the memory port. The hardware checks no dependency between
them: software orders dependent layers by waiting for interrupts.

## The convolution pipeline

One CONV layer runs in two phases.

**Load (CDMA).** CDMA copies the layer's input into the buffer. It reads `in_w*in_h*cg` feature
atoms from `src_addr` into buffer entries 0, 1, 2, .... It then reads `kg*kh*kw*cg*8` weight
atoms from `wt_addr` into the entries from bank `wt_bank` on, that is from entry `wt_bank*512`.

- It issues one 8-byte read per cycle while the memory interface accepts it, with up to 64 in
  flight.
- Each returning word is written into the buffer in the cycle it arrives.
- When the last word is in, CDMA raises its interrupt bit and the compute phase starts.

The whole layer must fit in the buffer at once. Software chooses `wt_bank` so that the feature
data stays below it.

**Image input.** A network's first layer usually reads an image, not a feature cube. With D6 bit 8
set (and `cg` = 1), CDMA takes the input as 8-bit pixels of 4 bytes, for example R, G, B and a pad
byte, or Y, U, V and a pad byte. Two pixels are packed in each 64-bit word. Each pixel becomes one
feature atom: its bytes go to channels 0..3, and channels 4..7 are zero. CDMA reads the word that
holds a pixel once for each of its two pixels and keeps the right half. That keeps one buffer
write per memory response, at the cost of reading each word twice.

**Compute (CSC -> CMAC -> CACC -> SDP).** The schedule is weight-stationary. For each kernel group
(8 output channels) and each kernel step (one tap r, s of the kernel and one group of 8 input
channels), CSC does two things:

1. It loads the 8 weight atoms of that step into the 8 MAC cells. Each atom holds 8 input-channel
   weights of one output channel. This takes 8 cycles.
2. It streams one feature atom per cycle for every output pixel (oy, ox). That atom is input pixel
   (oy*stride + r - pad_top, ox*stride + s - pad_left), channel group cg.

The buffer has a one-cycle read. CSC therefore issues addresses one cycle ahead and delays its
valid signals and tags by one cycle.

CMAC forms 8 dot products of 8 signed int8 pairs in the cycle the atom arrives. It registers them
with the atom's tag, so the results appear one cycle later.

The tag carries the output pixel index, the kernel group, and two flags, `first` and `last`, which
mark the first and last kernel step. CACC keeps one 32-bit sum per output channel for every output
pixel of the plane (up to 4096 pixels):

- a `first` partial sum overwrites the pixel's entry;
- every other partial sum adds to it.

When the `last` partial sum of the final pixel arrives, the plane is complete. CACC then drains it
in pixel order over a valid/ready stream to SDP.

SDP handles one element per cycle, so it accepts a pixel (8 channels) every 8 cycles. When the
drain ends, CACC pulses `drained`. CSC waits for that pulse before it loads the first weights of
the next kernel group, because the accumulator holds only one kernel group's plane.

Cost in cycles of the compute phase, for `P = out_w*out_h` output pixels and `T = kh*kw*cg` kernel
steps:

```
per kernel group:  T * (8 + P)      weight loads and feature streaming
                 + 8 * P            drain through SDP at one element per cycle
                 + a few cycles of pipeline and handshake
layer:             kg * (the above), plus the load phase (one word per cycle at best)
```

For example, a 35x35 tile of AlexNet's first layer has 11x11 kernels over one channel group, so T = 121. With stride 4 it gives 49 output pixels, and 16 kernels make 2 kernel groups. The formula gives 14,578 cycles. Simulation measures 14,592, plus 5,288 cycles for loading with 3,161 reads through a memory that is ready 60% of the time.

While streaming, the array does 64 MACs per cycle. The weight loads and the drain are the
overhead of this simple schedule.

**Zero padding** is done in CSC, not in memory. D7 sets the left and top padding. Where the input
pixel of a step falls outside the input, CSC makes no buffer read and sends an all-zero atom to the
array, in the same cycle slot. The right and bottom padding follow from the output size the host
programs: `out = (in + pad_before + pad_after - k) / stride + 1`. Padding costs no extra cycles and
no buffer space.

Output atoms go to `dst_addr + ((pix*kg + g) * 8)`, which is the same cube layout as the input.
A convolution's output can therefore feed the next convolution, or PDP or CDP, directly.

Limits of the convolution unit:

- same stride in x and y, at most 15;
- zero padding of at most 15 pixels per side (see below);
- no dilation, no batching;
- `out_w*out_h` at most 4096;
- feature data plus weights at most 16,384 atoms.

The unit does not check these limits. Assertions in CACC flag a plane that is too large.

## Data layout

An **atom** is one 64-bit word: 8 int8 values, byte i in bits [8i+7:8i]. It is also the unit of a
buffer entry, a memory beat and a MAC operand.

- **Feature cube.** W x H pixels, C = 8*cg channels. Atoms are stored in order [y][x][cg]. The
  atom of pixel (x, y) and channel group g is at `base + ((y*W + x)*cg + g) * 8`. Channel
  8g + i is byte i. A cube with a channel count that is not a multiple of 8 is padded with zero
  channels.
- **Image.** W x H pixels of 4 bytes each, in row order. Pixel p is at `base + 4*p`, so bytes
  0..3 of a word are pixel 2k and bytes 4..7 are pixel 2k + 1. Only CONV reads this layout, in
  image mode.
- **Weights.** K = 8*kg kernels of R x S taps over C = 8*cg channels. Atoms are stored in order
  [kg][r][s][cg][k]. Each atom holds the 8 input channels (group cg) of kernel 8*kg + k at tap
  (r, s). Read in storage order, this is exactly the order CSC loads the MAC cells.
- **Buffer.** Entry e is bank e/512, row e%512. Feature atoms sit from entry 0, weights from
  entry `wt_bank*512`.

## Register map

CSB addresses are 16-bit word addresses. Over APB, the byte address is the word address times
four: the bridge uses `paddr[17:2]`. The whole map fits in a 64 KiB APB window. Bits [15:8] select
the unit:

| unit | [15:8] | contents |
|------|--------|----------|
| GLB  | 0x00 | 0x00 VERSION (0x00010000), 0x01 INTR_MASK, 0x02 INTR_SET (write), 0x03 INTR_STATUS (write 1 to clear) |
| CFGROM | 0x01 | 0x00..0x0A: Atomic-C, Atomic-K, banks, bank bytes, bank depth, memory width, address width, read clients, write clients, reads in flight, feature mask |
| CONV | 0x10 | register groups, see below |
| PDP  | 0x20 | register groups |
| CDP  | 0x30 | register groups |
| CDP table | 0x31 | 0x00..0x3F: the 64 16-bit entries of the normalisation table |

Inside CONV, PDP and CDP: 0x00 `S_STATUS` (read-only), 0x01 `S_POINTER`, 0x10 + i = D register i
of the producer group. D0 bit 0 is `OP_ENABLE`.

| D | CONV | PDP | CDP |
|---|------|-----|-----|
| 1 | source address | source address | source address |
| 2 | weight address | destination address | destination address |
| 3 | destination address | {in_h, in_w} | pixels (W*H) |
| 4 | {in_h, in_w} (16 bits each) | {out_h, out_w} | [7:0] channel groups, [11:8] window n |
| 5 | [7:0] kw, [15:8] kh, [23:16] cg, [31:24] kg | [7:0] kw, [15:8] kh, [19:16] sx, [23:20] sy, [31:24] cg | [4:0] table shift, [12:8] output shift |
| 6 | [4:0] first weight bank, [8] image input | [15:0] reciprocal, [17:16] mode (0 max, 1 min, 2 avg) | |
| 7 | [3:0] stride, [11:8] left padding, [15:12] top padding | | |
| 8 | {out_h, out_w} | | |
| 9 | bias (signed 32) | | |
| 10 | [15:0] scale (signed), [21:16] shift | | |
| 11 | [1:0] activation (0 none, 1 ReLU, 2 PReLU), [15:8] PReLU slope (signed), [20:16] PReLU shift | | |

Output sizes are programmed, not computed: `out = (in - k) / stride + 1` for PDP, and the padded form above for CONV. The CDP table is a
plain register file, shared by both groups.

## Arithmetic of the post-processing engines

Everything is int8 in and int8 out. Every result is saturated to [-128, 127].

**SDP** (after the convolution), per element x (a 32-bit sum):

```
v = ((x + bias) * scale) >>> shift          64-bit intermediate, arithmetic shift
v = v                                       activation none
v = max(v, 0)                               ReLU
v = v < 0 ? (v * slope) >>> pshift : v      PReLU
y = sat8(v)
```

Bias, scale and slope are single values for the whole layer. An atom is written once all 8 of its
elements are done. While the write request is pending, SDP holds back the accumulator.

**PDP** produces one output atom at a time. It reads the kw x kh window of input atoms, issuing
all reads back to back and folding results in as they return. Then it writes the result. The 8
lanes are reduced independently:

- max and min are exact;
- average is `sat8((sum * recip + 32768) >>> 16)`, with `recip = round(65536 / (kw*kh))`
  programmed by the host.

Windows may overlap (stride smaller than the window).

**CDP** normalises each channel by the energy of its neighbours,
`b_c = a_c / (k + alpha * sum a_j^2)^beta`. The sum runs over the n channels centred on c that
exist. Instead of computing a power and a division, the host fills a 64-entry table with the
factor `(k + alpha*s)^-beta` in fixed point, sampled at `s = i << table_shift`. For each pixel:

1. Read its cg atoms.
2. For each of the 8*cg channels, one per cycle:
   - `s` = exact sum of squares over the window;
   - `f = table[min(s >> table_shift, 63)]`;
   - `b = sat8((a * f) >>> out_shift)`.
3. Write its cg atoms.

A pixel may have up to 64 channels and the window up to 9 channels. Accuracy depends on how
finely the host samples the table. The hardware only indexes and scales.

## Memory interface

MCIF shares the single AXI4 master between the read clients (CDMA, PDP, CDP) and the write
clients (SDP, PDP, CDP).

- Every access is one 64-bit beat: `arlen`/`awlen` 0, size 3, all strobes set. The configuration
  allows bursts of one beat only.
- **Reads.** A round-robin arbiter sends one read per cycle onto AR. The AXI ID is the client
  number, so the R channel is routed back by ID. Up to 64 reads may be in flight. Clients must
  take a response in any cycle: `rready` is tied high. Responses to one client come back in its
  request order, because AXI keeps same-ID reads in order.
- **Writes.** One write at a time. AW and W are presented together. The client is released once
  both handshakes are done, and B, again routed by ID, acknowledges it.

Engines count their acknowledgements to know when a layer's output is in memory.

The read port peaks at one beat per cycle: 0.8 GB/s at 100 MHz.

## Pins and integration

`nvdla_wrapper` has these pins:

- an APB slave: `psel`, `penable`, `pwrite`, `paddr`, `pwdata`, `prdata`, `pready`, `pslverr`;
- the core's pins, as below.

`nvdla_core` has these pins:

- **Clocks and resets:** `dla_core_clk`, `dla_csb_clk`, `dla_reset_rstn`, `direct_reset_`.
- **Register bus (CSB):** `csb2nvdla_valid`/`ready`/`addr[15:0]`/`wdat[31:0]`/`write`/`nposted`
  and `nvdla2csb_valid`/`data`/`wr_complete`.
- **AXI master:** `nvdla_core2dbb_{aw,w,b,ar,r}_*`.
- **Interrupt:** `dla_intr`.
- **Clock-gating, power and test:** `global_clk_ovr_on`, `tmc2slcg_disable_clock_gating`,
  `test_mode`, `nvdla_pwrbus_ram_*_pd`.

Integration notes:

- Use one clock for `pclk`, `dla_core_clk` and `dla_csb_clk`. Everything runs on `dla_core_clk`;
  `dla_csb_clk` is unused.
- The reset is the AND of `dla_reset_rstn` and `direct_reset_`, both active low. Each register
  resets asynchronously and releases synchronously to the clock edge.
- The clock-gating, power-bus and test inputs have no function. An FPGA build ties them to 0.
- **APB bridge.** Writes are posted: `pready` rises when the CSB accepts the write. Reads hold
  `pready` low until the read data comes back, one cycle after acceptance. `pslverr` is always 0.
- **CSB.** The core always accepts a request. A read returns its data one cycle later. A write
  with `nposted` set pulses `wr_complete` one cycle later.

In a Zynq system the wrapper sits behind a vendor AXI-to-APB bridge. Its AXI master goes to a
high-performance port of the processing system, and `dla_intr` goes to a PL-to-PS interrupt. The
reference system clocks everything at 100 MHz. No frequency is built into the RTL, and it has not
been through FPGA timing closure.

## Where this departs from NVDLA

The published NVDLA design has much that is not here:

- Dilation and batching.
- Padding with a value other than zero, and padding on PDP and CDP.
- Per-channel bias and scale in SDP.
- The SDP look-up table and element-wise operations. These are also disabled in `nv_small`.
- Streaming of SDP results straight into PDP.
- Tiling of layers larger than the buffer: CDMA loads a whole layer, and CSC assumes it is there.
- Image input in any format but 4-byte pixels; no planar or semi-planar YUV, no colour conversion or mean subtraction.
- Weight compression and Winograd. These are disabled in `nv_small`.
- Separate weight and data read ports in CDMA: here one client reads both, one after the other.
  `nv_small` has seven read clients; this design has three.
- Error interrupts: only completion raises interrupt bits.
- The secondary SRAM interface, the RUBIK reshaping engine and the bridge DMA. All three are
  disabled in `nv_small`.
- Clock gating, RAM power gating and test logic. These are disabled on FPGA builds, and the pins
  remain.

One thing is added: PDP has a min mode next to max and average. It costs one comparator per
lane.

The register map, the field layouts, the memory layout and all fixed-point formats are this
design's own. NVDLA's compiler and drivers cannot drive it.

The published figures for `nv_small` disagree on two sizes:

- **Convolution buffer.** The configuration file and the implementation report give 128 KiB
  (32 x 512 x 8 bytes), which is what is built. Other sources give 32 KB and 512 KB.
- **MAC array.** The configuration gives Atomic-C = Atomic-K = 8, which is built. One description
  speaks of 16 cells of 64 multipliers.

A complete AlexNet does not run as built:

- its first layer needs about 63,000 buffer entries against 16,384;
- its fully connected layers hold megabytes of weights.

Software could split each layer into pieces that fit, but that is not provided. Tiles of its first layers do run, as `tb_alexnet_slice` shows.

## Verification

Every unit has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog that fails it if it hangs. The testbenches
use random data and random stalls. They are written for a two-state simulator: no X or Z is
relied on.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_nvdla_wrapper` | End to end over APB, at the top's default parameters. Two convolution layers are programmed ping-pong (the second written while the first runs; ReLU, then PReLU with stride 2). Max pooling and normalisation run concurrently, then average pooling in the other register group, then min pooling with its interrupt masked. Every output byte is compared with a reference model. It counts, at the pins only, the mechanisms it exercised, and each must occur: a group switch with no host action, memory write back-pressure, two read clients served back to back, AXI read stalls, ReLU, PReLU, saturation and a masked interrupt. |
| `tb_alexnet_slice` | AlexNet's first stage on a 35x35 tile, layer after layer through memory: the 11x11 stride-4 convolution with ReLU on an RGB image read in image mode (16 kernels), normalisation across 5 channels with a table of `(2 + 1e-4*s)^-0.75`, 3x3 stride-2 max pooling, and a 5x5 convolution with 2 pixels of zero padding, and a 16-neuron fully connected slice written as a convolution. Each output is checked against a reference. It also times the convolution from the interrupt pin: compute must cost what the schedule formula above gives, within 200 cycles. |
| `tb_nvdla_core` | The core alone: CSB posted and non-posted writes, one 3x3 convolution and a 2x2 max pooling through memory, interrupts, the direct reset. |
| `tb_apb2csb` | Address translation, posted writes, read wait states. |
| `tb_nvdla_csb` | Unit decode, read latency, write completion only when non-posted. |
| `tb_nvdla_reg_dual` | Producer/consumer pointers, write lock, done events, automatic start of the other group. |
| `tb_nvdla_glb` | Events, mask, set, write-one-to-clear of single bits, interrupt timing. |
| `tb_nvdla_cfgrom` | Every configuration word. |
| `tb_nvdla_mcif` | Three readers and three writers at once against a randomly stalling AXI memory: routing by ID, per-client order, write acknowledgements, reads in flight. |
| `tb_nvdla_cdma` | Buffer contents after loads of several shapes and weight banks, in feature and image mode; reads pipelined. |
| `tb_nvdla_cbuf` | Random writes in all banks, back-to-back reads with one-cycle latency. |
| `tb_nvdla_csc` | The exact sequence of weight loads and feature atoms (addresses and tags) for seven layer shapes, three of them padded (zero atoms in the padding), and one atom per cycle within a plane. |
| `tb_nvdla_cmac` | Dot products, including -128 x -128 extremes, one-cycle latency, tag passing. |
| `tb_nvdla_cacc` | Overwrite-then-accumulate over 1 to 9 steps, drain order under random back-pressure, drained pulse. |
| `tb_nvdla_sdp` | All activation modes against a reference; the rate of one element per cycle. |
| `tb_nvdla_pdp` | Max, min and average with overlapping and non-overlapping windows. |
| `tb_nvdla_cdp` | Table write and readback; windows of 1 to 9 channels, 1 to 8 channel groups. |

Support files: `tb_axi_mem` is a behavioural AXI memory with random ready signals and latency.
`tb_memsys` joins it to MCIF for the engine-level tests.

Every flop has an asynchronous reset. Every memory read is written first, or is initialised by the
testbench. Assertions, run with `--assert`, check these points:

- the memory interface holds a write request stable while it waits;
- the in-flight read limit is respected;
- CACC never accumulates while draining;
- CACC never receives a pixel beyond its depth;
- CDMA keeps feature data below the weight banks;
- CDP gets a channel-group count it supports.

What to trust. The units are checked against independent reference models on small layers of up
to a few hundred pixels. Large layers, extreme register values (zero sizes, a kernel larger than
the input) and every interleaving of concurrent units are not covered. Illegal configurations are
not rejected by the hardware.

### Running a testbench

With Verilator 5 (the `--timing` flag is required):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nvdla_pkg.sv tb/tb_nvdla_wrapper.sv --top-module tb_nvdla_wrapper -o sim
./obj_dir/sim
```

Replace `tb_nvdla_wrapper` with any testbench name. Each runs in seconds. For linting, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/nvdla_pkg.sv rtl/<module>.sv`. It reports unused
package constants and the clock-gating pins that have no function. Both are expected.

## Files

`rtl/`:

- `nvdla_pkg.sv`: configuration constants, types, register decoding.
- `nvdla_wrapper.sv`: the top level.
- `nvdla_core.sv`: the core.
- `apb2csb.sv`: the APB bridge.
- `nvdla_csb.sv`, `nvdla_reg_dual.sv`, `nvdla_glb.sv`, `nvdla_cfgrom.sv`: the register side.
- `nvdla_mcif.sv`: the memory interface.
- `nvdla_cdma.sv`, `nvdla_cbuf.sv`, `nvdla_csc.sv`, `nvdla_cmac.sv`, `nvdla_cacc.sv`,
  `nvdla_sdp.sv`: the convolution pipeline.
- `nvdla_pdp.sv`, `nvdla_cdp.sv`: the other engines.

`tb/`: one testbench per module, plus the memory models. The constants in `nvdla_pkg.sv` set the
configuration. The buffer, memory interface and MAC array sizes are package constants, not
module parameters, so change them there.
