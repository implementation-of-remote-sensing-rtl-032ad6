# In-storage processing logic for a remote-sensing SSD

Remote-sensing archives are large, and moving every image from the SSD to the
host just to compress, classify or search it ties up the host interface and
the host processor. This design moves the work into the drive. The SSD controller
FPGA gets three pieces of logic:

- a **command front end**. It accepts ordinary NVMe I/O plus four vendor
  commands that control an in-drive processing system. It then decides, task by
  task, whether the drive should run the task or give it back to the host.
- an **inter-core block I/O handler**. It lets the in-drive Linux cores read and
  write flash through the firmware cores' flash translation layer (FTL).
- a **convolution accelerator**. It runs the CNN layers of detection and
  classification tasks on data that never leaves the drive, followed by
  2×2 max pooling.

The processors (ARM cores running the firmware and Linux), the PCIe/NVMe DMA
engine, the interrupt controller, DRAM and the NAND flash controllers are not
part of this RTL. The top module (`csrspp_top`) reaches each of them through
ports.

```
 host ── doorbell / fetch ──► nvme_sq_doorbell ─► nvme_cmd_parser ─┬─► fw_*      standard I/O to firmware
                                                                   ├─► task_scheduler ◄─► task_* / done_* / load_*
                                                                   │          │            (Linux cores)
 host ◄── cqw_* entries, cq_irq ── nvme_cq_poster ◄── merge ◄──────┴──────────┴── fw_cpl_* (firmware)
 host ── cq_hd_* head doorbell ──►
 Linux cores ── msg_* ─► ipc_handler ── mem_* (shared DRAM) ── ftl_* (FTL queue) ── ipi_* ─► Linux cores
 Linux cores ── fm_* wl_* bp_* acc_* ─► rsdpa ── rr_* (result RAM) ──► Linux cores
                                          └── act_* ─► max_pool ── pool_* ─► next layer
```

## Command front end

**Doorbell (`nvme_sq_doorbell`).** The host writes 64-byte commands into a
circular submission queue in its own memory and then writes the new tail
index to the doorbell. The block fetches entries one at a time, from the head
up to the tail, at `sq_base + head*64`. A tail value outside the queue
(`>= QSIZE`) is ignored and raises `db_error` for one cycle.

**Parser (`nvme_cmd_parser`).** The parser splits the entry into its fields.
Byte 0 is at bit 0, and `csrspp_pkg::nvme_sqe_t` gives the layout: opcode,
flags, command id, namespace, PRP pointers, and the LBA in dwords 10–11. It
routes each command by opcode:

| opcode | meaning | goes to |
|---|---|---|
| `0x02`, `0x01`, other `< 0x80` | read, write, other standard commands | `fw_*` port |
| `0x81` | heartbeat: report the processing load | scheduler |
| `0x82` / `0x83` | processing off / on | scheduler |
| `0x84` | compute-task delivery (type in dword 12 [7:0], argument in [31:8], length in dword 13) | scheduler |
| other `>= 0x80` | unknown vendor command | completed at once, status `0x01` |

The vendor opcode numbers and the way the task fields sit in dwords 12 and 13
are choices of this implementation. NVMe only reserves `0x80` and up for
vendors.

**Scheduler (`task_scheduler`).** This is the admission-control policy of the
design. A compute task is returned to the host at once in three cases:

- processing is off: status `0xC0`;
- the waiting queue already holds `QTHRESH` tasks: status `0xC1`;
- the last load report shows CPU or memory usage above `CPU_MAX` / `MEM_MAX`
  percent: status `0xC2`.

The checks are made in that order. A task that passes all three goes into a
FIFO, and the Linux side takes it from there (`task_*`). Returning a task lets
the host run it itself or retry later, so a busy or misbehaving processing
system cannot delay host I/O indefinitely. The Linux side reports its
load periodically (`load_*`); a heartbeat command returns the last report and
the on/off bit in completion dword 0 (`{15'b0, on, mem%, cpu%}`). A queued task
is completed to the host only when the Linux side reports it done (`done_*`),
with its 32-bit result in dword 0. A done report wins over a pending immediate
completion.

**Completion queue (`nvme_cq_poster`).** Completions come from three sources:
the scheduler, the firmware finishing standard I/O (`fw_cpl_*`), and the
parser's unknown-opcode rejections. The top merges them in that order of
priority. The poster turns each one into a standard 16-byte NVMe completion
entry, holding:

- dword 0;
- the current submission-queue head and queue id 1;
- the command id;
- the status.

Vendor codes `0xC0` and up are posted with status code type 7 (vendor
specific); the others use type 0. The poster writes the entry at
`cq_base + tail*16` through the DMA engine's write port (`cqw_*`) and then
pulses `cq_irq` to request the host interrupt.

The phase tag is 1 on the first pass round the ring and flips at every wrap.
This lets the host spot new entries without reading a register. The host
returns entries by writing the head doorbell (`cq_hd_*`). When the tail is one
entry behind the head, the ring is full. No completion is accepted then, and
the back-pressure reaches the scheduler and parser.

## Inter-core block I/O (`ipc_handler`)

The SSD's cores share one DRAM. The low addresses belong to the firmware and
the high ones to Linux. When the Linux block driver needs flash I/O, it
interrupts a firmware core. The data register that travels with an interrupt
is small, so the message carries only a magic number and the DRAM address of a
request packet:

```
packet A (msg_*):   magic = 0x4C525344, address of packet B
packet B (DRAM):    word 0  = {opcode[7:0], 8'h0, N[15:0]}
                    then N x { LBA, DRAM data address, sector count }   (32-bit words)
```

If the magic number does not match, the handler drops the message and pulses
`bad_magic`. Otherwise it reads the header and each element (1 + 3N word reads
over `mem_*`). It passes the elements to the FTL queue one at a time
(`ftl_*`). Once the FTL has reported all N complete (`ftl_done` pulses), it
raises `ipi_out` with N and the opcode. Completions may arrive while later
elements are still being read. The handler takes one message at a time.

## Convolution accelerator (`rsdpa`)

The accelerator is the hardest part to follow. It computes one
convolution layer as a series of **batches**. A batch is `N` output channels
(one kernel per core) for `W` neighbouring output pixels.

**Data layout.** The Linux side lays out the input as im2col columns. For pixel
lane `w`, tap `t` (0 ≤ t < K·C_in) is the input value that kernel tap `t` sees.
`fmap_buffer` stores tap `t` for all `W` lanes in one word, so it is
`TAPS × (W×8 bit)`. Every kernel is likewise a list of `T` 8-bit weights.

**The daisy chain (`conv_core`).** The `N` cores form a chain. Each core adds
one register stage to two streams:

- the **feature-map stream**: one buffer word (W values) per cycle, with
  first/last flags and the tap number;
- the **weight stream**: words of `WPL` weights (default 8), holding
  consecutive taps of one kernel. Each word is tagged with a kernel serial
  number and a word address. Byte `j` of word `a` is tap `a·WPL + j`.

Core `n` keeps only the weight words whose serial number is `n`. After a full
load, core `n` holds the whole of kernel `n`. For each tap, the core
multiplies the W feature values by its weight and adds the products to W
32-bit accumulators. On the last tap it copies the sums to result registers,
which hold until the next batch ends. Core `n` sees every tap `n` cycles after
core 0, so the cores finish one after another.

**Double buffering.** Each core has two weight banks. The running batch
reads one bank, and loading writes the other. `start` sends a swap token down
the weight stream one cycle ahead of the first feature word. Both streams move
one core per cycle, so the token reaches every core just before that core's
first tap. The weights for the next batch can therefore be loaded while the
current batch runs, and the next `start` switches to them with no pause.
`wl_ready` is low only in the cycle a start is taken.

**Batch normalisation and output (`bn_unit`).** When the last core has
finished, a multiplexer feeds the `N×W` sums through the M-lane BN unit, M at a
time (`N·W/M` cycles). The unit computes

```
y = clamp( (acc * scale + shift) >>> FRAC , 0, 127 )
```

The scale is 16-bit signed and the shift is 32-bit signed, both per channel
and in the same Q.FRAC format as the product. The clamp at 0 is the ReLU; the
clamp at 127 makes the result a signed 8-bit activation for the next layer.
The activations leave on `act_*`, the input of a following block. They are
also written to the result RAM at word `channel·(W/M) + group`, with byte `i`
of the word being lane `group·M + i`. The Linux side reads that RAM through
`rr_*` (one cycle latency). `done` is the end-of-batch signal.

**Using it.**

1. Write the feature map (`fm_*`), the BN parameters (`bp_*`) and the first
   batch's weights (`wl_*`).
2. Pulse `start` with `ntaps = K·C_in` and `ch_base`, the first output channel
   of the batch.
3. While the batch runs, load the next batch's weights.
4. After `done`, read the results and start the next batch.

**Timing.** `done` rises exactly `T + N + N·W/M + 4` cycles after the cycle in
which `start` is taken. With the defaults (`T = 576`, `N = W = M = 8`) that is
596 cycles, for 64 × 576 = 36,864 MACs. Loading a full batch of weights takes
`N·T/WPL` = 576 cycles, which fits inside the batch. So when the next batch's
weights are streamed during the current batch, batches follow each other
with no gap. The 8-weight load word is what makes this work. With one weight
per word, loading would take 4,608 cycles, and a 3×3, 64-channel layer ran at
7 MACs per cycle instead of 48.

## Pooling (`max_pool`)

The activation stream also feeds a 2×2, stride-2 max-pooling block. The
pooled values leave on `pool_*`, towards the next layer. Each activation group
holds M neighbouring pixels of one row. The block first takes the maximum of
lane pairs (2i, 2i+1) within the group. The first row of a pair of rows
(`pool_row_odd = 0`) only fills a row buffer, one word per channel and group.
When the same channel and group arrive for the second row, the block outputs
the maximum of the stored word and the new pair maxima: M/2 values, one cycle
later. With the default sizes, one output row is CH/N = 8 batches. The
software therefore sets `pool_row_odd` for every second group of eight
batches. The row buffer is not reset, so a second row must always follow a
first row of the same channels.

## Number formats and sizes

| item | format |
|---|---|
| feature values, weights | signed 8-bit |
| accumulators | signed 32-bit |
| BN scale / shift | signed 16-bit / signed 32-bit, `FRAC = 8` |
| activations | 0..127, stored as signed 8-bit |

The source design gives the precisions (8-bit MACs; 16- and 32-bit fixed-point
BN) but none of the array sizes. The defaults below are this implementation's
own.

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | computing cores = kernels per batch |
| `W` | 8 | pixel lanes |
| `M` | 8 | BN lanes (must divide `W`) |
| `TAPS` | 576 | taps per kernel, 3×3 × 64 input channels |
| `CH` | 64 | output channels per layer (BN table, result RAM) |
| `WPL` | 8 | weights per weight-load word (must divide `TAPS`) |
| `SQ_SIZE`, `CQ_SIZE` | 64, 64 | submission- and completion-queue entries |
| `QDEPTH`, `QTHRESH` | 16, 12 | waiting-queue size and return threshold |
| `CPU_MAX`, `MEM_MAX` | 80, 80 | load limits in percent |

At these sizes the design uses about 7,000 flip-flops and 120 kbit of memory.
Most of the memory is the 16 weight banks (8 cores × 2 × 576 bytes), the
feature-map buffer and the result RAM.

## Where this departs from, or stops short of, the source design

- In the source design the task scheduler and the FTL-side message handling
  are firmware on an ARM core. Here they are logic that follows the rules that
  firmware applies.
- The source design says the convolution output passes through a pooling
  layer, but its circuit diagram shows none and no type or window is given.
  The 2×2 max pooling is this design's choice. It sits outside the
  accelerator, on its activation stream, so the result RAM holds the
  unpooled activations.
- The source's circuit diagram shows N×W FIFOs between the MAC array and the
  BN multiplexer. Here each core holds one set of result registers, which is
  enough because the BN pass (`N·W/M` cycles) is shorter than any batch. The W
  input and output FIFOs to neighbouring blocks are left outside, as ports.
- The feature-map buffer is single-buffered. Only the weights are double
  buffered, as in the source.
- The source design reports both "8-bit" MACs and, in one place, 32-bit
  floating point on the accelerator. The 8-bit integer MAC with fixed-point BN
  is built.
- Not built:
  - the image-compression engine, whose structure the source does not give;
  - the application manager, which is operating-system software;
  - more than one queue pair. NVMe allows one per CPU; each extra pair would
    need its own doorbell and completion-poster instance.
- There is no heartbeat timeout: a stale load report is used as is.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and ends with `$finish`. Each has a cycle
watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_rsdpa \
    rtl/fmap_buffer.sv rtl/conv_core.sv rtl/bn_unit.sv rtl/rsdpa.sv tb/tb_rsdpa.sv
./obj_dir/Vtb_rsdpa
```

Put `rtl/csrspp_pkg.sv` first for any module that imports it. Those are the
doorbell, parser, scheduler, completion poster, IPC handler and top. The
scheduler also needs `rtl/sync_fifo.sv`. For the top, list the package once,
then the other files:

```
verilator --binary --timing --assert --top-module tb_csrspp_top rtl/csrspp_pkg.sv \
    $(ls rtl/*.sv | grep -v csrspp_pkg) tb/tb_csrspp_top.sv
./obj_dir/Vtb_csrspp_top
```

The block testbenches use reduced sizes so that they finish quickly.
`tb_csrspp_top` runs the whole design at its default sizes. A host model
issues 90 commands through the doorbell, with the submission queue wrapping
around.
A model of the Linux side processes 13 tasks. For each task it runs a full
576-tap batch or a shorter one, checks the result RAM against a software
model, writes results to flash through the IPC path and reports the task
done. The test counts each mechanism and fails if any never happened:

- a task returned because processing is off, because the queue is over its
  threshold, or because the load is heavy;
- an unknown opcode, a heartbeat and forwarded reads;
- the completion queue wrapping and running full while the host is not
  reading it, with one interrupt per completion;
- a bad magic number and a bad doorbell;
- weights loaded during a batch;
- 2×2 max pooling over two rows of eight batches each;
- ReLU zeroing and clamping.

It finishes in a few seconds.

`tb_conv_layer` runs a real layer on the accelerator at its default sizes: a
3×3 convolution from 64 to 64 channels, two output rows of 8 pixels, 16
batches. It lays out the im2col words as the Linux side would, streams each
batch's weights during the previous batch, and compares all 1,024 outputs
with a direct convolution followed by BN and ReLU. It prints the cycle count
and the achieved MAC rate (48 of 64 per cycle). The time not spent on MACs
goes to reloading the feature map and reading back results between rows.

## Files

| file | contents |
|---|---|
| `rtl/csrspp_pkg.sv` | NVMe entry layout, opcodes, command/task/completion structs, IPC constants |
| `rtl/nvme_sq_doorbell.sv` | submission-queue doorbell and fetch |
| `rtl/nvme_cmd_parser.sv` | command decode and routing |
| `rtl/task_scheduler.sv`, `rtl/sync_fifo.sv` | admission control and its waiting queue |
| `rtl/nvme_cq_poster.sv` | completion-queue entries, phase tag, head doorbell |
| `rtl/ipc_handler.sv` | inter-core block I/O |
| `rtl/fmap_buffer.sv`, `rtl/conv_core.sv`, `rtl/bn_unit.sv`, `rtl/rsdpa.sv` | convolution accelerator |
| `rtl/max_pool.sv` | 2×2 max pooling of the activation stream |
| `rtl/csrspp_top.sv` | top level |
| `tb/tb_*.sv` | one testbench per module, `tb_csrspp_top` end to end, `tb_conv_layer` a full convolution layer |
