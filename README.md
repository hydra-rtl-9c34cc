# Hydra: a CNN inference accelerator inside the DRAM chips of a hybrid memory

Hydra puts a small convolution engine into every DRAM chip of a DRAM module
that sits next to PCM in a hybrid main memory. The trained model lives in the
dense PCM, which is then only ever read; every intermediate value of the
inference (input maps, partial sums, output maps) is written to DRAM, so the PCM
sees no inference writes and keeps its limited write endurance. Because the
engines sit behind each chip's I/O, the chips of a rank work in parallel on
different input channels (inter-chip parallelism), and inside each chip 32
multiply-accumulate lanes work on 32 neighbouring output positions of one
channel (intra-chip parallelism). The arithmetic is plain 16-bit fixed point
with real multiplications, not a binary or ternary network.

This repository holds synthesizable SystemVerilog for the DRAM-side part of that
system: the Hydra unit, the per-chip glue (chip I/O and the chip's internal
shared bus) and the result accumulation unit that the design places in the
memory controller. The DRAM arrays, the PCM, the memory controller's scheduler
and the host CPU are not part of the RTL.

## System organisation

```
 memory controller ──cmd/addr (per rank)──┬──────────────┬─── ... 8 chips per rank, 2 ranks
   │   result accumulation unit           │              │
   │   (sums chips + ranks, ReLU)   16-bit lane     16-bit lane
   │                                      │              │
   │                               ┌──────┴──────┐
   │                               │  chip_io    │  address decode
   │                               └──┬───────┬──┘
   │                        AB/WB/regs/OB     bank traffic (master 0)
   │                                  │       │
   │                           ┌──────┴──┐  ┌─┴──────────────────┐
   │                           │ hydra   │──│ shared_bus_arbiter │── banks of the chip
   │                           │ unit    │  └────────────────────┘   (outside the RTL)
   │                           └─────────┘  master 1: command generator loads AB
```

`hydra_top` builds `N_RANKS x CHIPS_PER_RANK` chips (2 x 8 = 16 Hydras). All
chips of a rank see the same command and address; each has its own 16-bit data
lane. So one WRITE command fills the same weight-buffer word in eight chips with
eight different kernels, and one READ returns the same output-buffer word from
eight chips at once. That is how one input channel per chip is handled: chip
`r*8+c` holds channel `r*8+c`.

## Inside one Hydra unit

| part | size | role |
|---|---|---|
| register stack | 14 registers | layer mode, input height/width, kernel size, stride, bias, bank source address/length of map and kernel, AB/WB base, start, status |
| activation buffer (AB) | 512 x 16 bit (1 KB) | one input channel (or one tile of it) |
| weight buffer (WB) | 64 x 16 bit (128 B) | the kernel of that channel, row-major, up to 8 x 8 |
| controller and command generator | FSM | loads AB from the banks, schedules lanes, fetches and broadcasts, drains results |
| streaming buffers | 32 FIFOs of 4 `<W,A>` pairs | keep each lane supplied |
| MAC lanes | 32 | FX16 multiply, 40-bit accumulate, bias once |
| pool unit | 32 comparators | max pooling, one window per lane |
| output mux + output buffer (OB) | 512 x 16 bit | results, read by the memory controller |

### How a layer is scheduled (the part worth reading twice)

A run of `hydra_controller` takes one channel: an `H x W` map in AB, a `K x K`
kernel in WB, stride `S`, no padding. The output is `OH x OW` with
`OH = (H-K)/S+1`, `OW = (W-K)/S+1`.

Output positions are handed out in groups: lane `j` of a group takes output
column `ocol0 + j` of output row `orow`, for up to 32 lanes. If `OW > 32`, a row
needs more than one group. For every kernel row `kr` of the group:

1. **KLOAD** (convolution only). The K weights of kernel row `kr` are read from
   WB, one per cycle, into a K-entry row latch. Different lanes need different
   weights in the same cycle, and this latch provides them.
2. **SWEEP**. The controller walks input row `orow*S + kr` from column
   `ocol0*S` to `(ocol0+n-1)*S + K-1`, reading **each activation exactly once**.
   The word read is broadcast. Every lane `j` whose window covers that column
   takes it, that is every lane with `off = c - (ocol0+j)*S` in `0..K-1`. The
   lane pushes the pair `<row_latch[off], A>` into its streaming buffer. With
   stride 1 and K = 3, one AB read feeds up to three lanes.
   A pair is tagged `first` for `kr = 0, off = 0` and `last` for
   `kr = K-1, off = K-1`.

A read from AB or WB takes one cycle, so there is a one-cycle pipeline between
the read and the broadcast. A fetch is issued only while every streaming buffer
has at least two free entries (one pair may already be in flight); otherwise the
controller stalls. Each lane pops one pair per cycle into its MAC, or into its
pool comparator in pooling mode. On `first` the MAC loads `bias << 8 + w*a`. On
`last` it writes `sat16(acc >>> 8)` to its result register and reports done.

When every active lane has reported, **DRAIN** writes the results one per cycle
through the output mux into OB at `orow*OW + ocol0 + j`. Then the next group
starts. When the last row is drained, `done` is set in the status register.

Before this, **FETCH** has the command generator read `REG_SRC_LEN` words
starting at `REG_SRC` from the chip's own banks over the internal shared bus
and write them into AB in order from the AB base. It then reads `REG_WSRC_LEN`
words from `REG_WSRC` into WB from the WB base. A length of zero skips that
load; the memory controller must then have written the buffer with WRITE
commands. With both lengths zero, FETCH is skipped.

**Throughput.** AB has one read port, so at most one activation enters the lanes
per cycle. A group of 32 lanes at stride 1 with a 3 x 3 kernel takes about
3 x (3 + 34) cycles of loading and sweeping plus 32 cycles of draining, for
288 multiplications. That is about 2 MACs per cycle per Hydra, not 32. The MAC
lanes are idle most of the time. Widening the AB read port, or overlapping the
drain with the next group, is the obvious next step; both are outside what is
built here.

## Programming model

Chip address (16 bits): `addr[15:13]` selects the region, and the low bits are
the word address within it.

| region | `addr[15:13]` | WRITE | READ |
|---|---|---|---|
| banks | 0 | bank word, via the shared bus (`bank_busy` until granted) | bank word, returns when the banks deliver |
| AB | 1 | activation word | – |
| WB | 2 | weight word (kernel row-major) | – |
| OB | 3 | – | result word, 1 cycle later |
| registers | 4 | see below | register value, 1 cycle later |

Registers: 0 mode (0 conv, 1 max pool), 1 H, 2 W, 3 K, 4 S, 5 bias (FX16),
6 bank source address, 7 source length (0: AB already written), 8 start
(write only), 9 status `{done, busy}`, 10 AB base (first AB word of the map),
11 WB base (first WB word of the kernel), 12 kernel bank source address,
13 kernel source length (0: WB already written).

The base registers let the memory controller prefetch. While a layer runs on
one part of AB and WB, the controller can write the next layer's map and
kernel into the free part. The next layer then only needs new base values and
a start. The buffer writes from chip I/O and the controller's reads of AB and
WB use separate ports, so they do not disturb each other.

A convolution layer of 16 input channels, as driven by the end-to-end
testbench:

1. Write WB (K*K words), each chip's kernel on its own lane, or set registers
   12/13 so that the Hydras load it from their banks (rank 1 in the testbench).
2. Write AB, or set registers 6/7 so that the Hydras load it from their banks.
3. Write registers 0 to 4. Write the bias only to the chip of the first channel,
   so that it is added once, and 0 to the others.
4. Write register 8 in both ranks. Wait for `hydra_done`, or poll register 9.
5. For each output word `p`, READ OB `p` from rank 0 with `acc_first = 1`,
   then from rank 1 with `acc_last = 1` and `relu_en = 1`. The result
   accumulation unit adds the lanes selected by `acc_mask`. The rank-0 pass
   starts a new partial sum, and the rank-1 pass finishes it. The finished
   neuron comes out on `res_valid/res_addr/res_data` one cycle after the
   second read returns. More than 16 input channels work the same way: leave
   both flags clear on the passes in between.

OB reads of the two ranks must not return in the same cycle. A bank command must
not be sent while `bank_busy` is set for that rank. Assertions check both rules.

## Numbers

* FX16 throughout. This RTL uses Q8.8 (`hydra_pkg::FRAC = 8`).
* The MAC accumulates exact products in 40 bits. It truncates by an arithmetic
  shift and saturates to 16 bits once per output position.
* Each Hydra saturates its own partial result to FX16. The accumulation unit
  adds the FX16 partial results in 32 bits and saturates once more. It then
  applies ReLU, or the identity when `relu_en` is clear.

## Where this RTL departs from, or adds to, the design it implements

These parts follow the design as proposed:

* 16 Hydras, one per chip, in 2 ranks of 8 chips.
* 32 MAC lanes working on 32 neuron positions.
* The AB, WB and OB buffers.
* A register stack that holds the hyperparameters and a bias added once per
  position.
* 32 small streaming buffers of `<W,A>` pairs.
* A pool unit with 32 comparators.
* Fetch-once-and-broadcast filling of the streaming buffers.
* Loading AB and WB through an arbitrated internal bus or with WRITE commands.
* A result accumulation unit with a linear function in the memory controller.
* FX16 precision.

This implementation's own choices:

* the address map, the register list (including the AB/WB base registers) and
  the command encoding;
* the accumulation flags that ride with a READ;
* the round-robin arbiter;
* the Q8.8 format and the 40-bit accumulator;
* streaming buffers 4 deep and an OB of 512 words;
* the group and row schedule, the kernel-row latch and the stall rule;
* no padding, and max pooling only;
* reading the "linear function" as ReLU;
* the bias is written only to one chip to add it once per output channel.

Not built:

* the DRAM and PCM arrays (the testbenches use a behavioural bank model with a
  5-cycle read latency);
* the memory controller's FR-FCFS scheduler and the PCM-to-DRAM prefetch path;
* the host;
* splitting maps larger than 512 words into tiles. The evaluated networks
  (VGG-16/19, ResNet-34 on 224 x 224 images) have maps of up to 50,176 words,
  so their early layers need tiling by the memory controller.
* residual additions and batch normalisation of ResNet.

## Files

| file | content |
|---|---|
| `rtl/hydra_pkg.sv` | types, command and region encodings, register indices, `sat16` |
| `rtl/hydra_top.sv` | ranks and chips, accumulation unit |
| `rtl/chip_io.sv` | per-chip command decode |
| `rtl/shared_bus_arbiter.sv` | per-chip internal bus |
| `rtl/hydra_unit.sv` | one Hydra |
| `rtl/hydra_controller.sv` | controller and command generator |
| `rtl/register_stack.sv`, `rtl/buffer_ram.sv`, `rtl/stream_buffer.sv`, `rtl/mac_unit.sv`, `rtl/pool_unit.sv` | Hydra parts |
| `rtl/result_accumulation_unit.sv` | accumulation and ReLU |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_workload_layers.sv` | VGG-16 and ResNet-34 layer shapes on the full-size top |
| `tb/dram_bank_model.sv` | behavioural DRAM banks for the testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog fails it if it hangs. For example, the whole design at full size:

```
verilator --binary --timing --assert -Wno-fatal rtl/hydra_pkg.sv tb/tb_hydra_top.sv \
          -y rtl -y tb --top-module tb_hydra_top -Mdir obj -o sim && obj/sim
```

`tb_hydra_top` uses the default parameters (16 Hydras of 32 lanes). It runs a
3 x 3 convolution of 16 channels of 8 x 36 into a 6 x 34 map, accumulated across
chips and ranks with ReLU; rank 1 loads its maps and kernels from its banks.
It then runs 2 x 2 / stride-2 max pooling of 16 maps
of 14 x 16 at AB word 288. Rank 0 gets those maps written into AB while the
convolution is still running. Rank 1 loads them from its banks. It checks every
result against a model in the testbench. It also counts the following mechanisms, and fails if one of
them never happens:

* broadcasts to several lanes;
* a second lane group in a row;
* bank loads of maps and of kernels;
* bus contention;
* buffer writes overlapped with a running layer;
* accumulation;
* ReLU clamping;
* the bias;
* pooling.

It finishes in well under a second of simulation after about a minute of
compilation.

`tb_workload_layers` runs, at the same full size, the layers of VGG-16 and
ResNet-34 (224 x 224 inputs) whose maps fit AB whole: a VGG-16 conv5 layer
(14 x 14, padded to 16 x 16 by the host, 3 x 3), pool5 (2 x 2 / 2), a ResNet-34
conv5_1 layer (3 x 3, stride 2) and a slice of VGG-16 fc6 (a 7 x 7 map with a
7 x 7 kernel). Each takes 16 channels and is checked against a model. The
larger early layers need tiling, which is not built. `tb_hydra_unit` runs with 2-deep streaming buffers so that the
controller stalls. `tb_hydra_controller` also checks that every needed
activation is read from AB exactly once per group and kernel row.

To change the size, override the parameters of `hydra_top`: `N_RANKS`,
`CHIPS_PER_RANK`, `N_MAC`, `AB_DEPTH`, `WB_DEPTH`, `OB_DEPTH` and `SB_DEPTH`.
The register fields limit a map to 10-bit dimensions, and kernels to at most
`K_MAX = 8` (the WB holds 64 words).
