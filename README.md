# Equinox: an inference accelerator that trains in its idle cycles

An inference accelerator in a datacenter is sized for peak load, and it must
meet a latency target. So it spends much of its time partly idle. Equinox uses
those cycles for DNN training. The inference datapath (systolic arrays, on-chip
buffers, a vector unit) is kept. Three things are added:

- **Training data types:** block floating point for matrix products and
  bfloat16 for everything else.
- **A second hardware context:** a training program can be interleaved with
  the inference program, instruction by instruction.
- **A priority scheduler:** training gets out of the way as soon as the
  inference queue grows.

This repository is a synthesizable SystemVerilog model of that accelerator. It
takes its configuration from the Equinox design point with a 500 µs latency
bound and hbf8 arithmetic:

- a batch, or tile height, of n = 143;
- 20 MB of activation buffer and 50 MB of weight buffer;
- 32 KB of instruction buffer;
- a 5 MB SIMD register file.

Everything except the host and DRAM (HBM) interfaces is RTL. Those two are
brought out as ports, and the end-to-end testbench models them.

```
 inference requests ─┐                        ┌──────────── instruction buffer (32 KB)
 training requests ──┤ request dispatcher ───►│ instruction dispatcher ──► commands to MMU, SIMD, DRAM, host
                     └ (batching, queues)     └ (2 contexts, scheduler, decoder, completion unit)

 host port ─┐  ┌► weight buffer (M banks) ───────────────┐
            ├X─┤                                         ▼
 DRAM port ─┘  └► activation buffer ──► im2col ──► MMU: M systolic arrays of N×N w-wide PEs
                        ▲                                │ bfloat16 vectors
                        └── block FP quantizer ◄── SIMD unit (bfloat16, 5 MB register file)
```

## Number formats and tile layout

This is the part to understand first. Every unit depends on it.

**Block floating point (hbf8).** A block of signed 8-bit mantissas shares one
12-bit two's-complement exponent. An element is worth `mantissa * 2^exponent`.

- A block is one whole *tile*.
- Mantissas are kept in the symmetric range −127..127, so a product fits in 15
  bits.
- An N·W-term dot product stays below 2²⁴, so the 25-bit accumulators never
  overflow.

**Activation tile.** An activation tile is N batch rows by N·W inputs. It is
stored as N consecutive words of the activation buffer. With the defaults,
N·W·8 + 12 = 4588 bits per word:

```
word t of an activation tile:  [4587:4576] exponent | row N-1: W mantissas | ... | row 0: W mantissas
                                                      (row i, lane k = input t*W + k, bits (i*W+k)*8 +: 8)
```

**Weight tile.** A weight tile is N·W inputs by N output columns. It is stored
as N words of one weight-buffer bank. Word t holds, for each output column j,
the W mantissas of inputs t·W … t·W+W−1, plus the exponent.

**Matrix multiply.** One MMU command multiplies one activation tile by M weight
tiles, one per bank at the same address. It gives M output tiles of N×N. A
larger matrix product is cut into such tiles. The program adds up partial tiles
in the SIMD unit.

**bfloat16.** All other arithmetic is bfloat16 (1 sign, 8 exponent bits, 7
fraction bits). Conversions truncate, subnormals become zero, and
NaN/infinity are not produced.

## Matrix multiply unit (`eqx_mmu`, `eqx_systolic_array`, `eqx_pe`)

**Arrays and PEs.** The MMU has M output-stationary systolic arrays. Each is
N×N PEs, and each PE multiplies W mantissa pairs per cycle into a 25-bit
accumulator.

- Activations enter on the left, with row i delayed i cycles, and move right.
- Weights enter at the top, with column j delayed j cycles, and move down.
- Activation rows are broadcast to all M arrays.
- Each array has its own weight bank.

**Timing.** A command is accepted only when the previous result has been
drained; while it waits, `stall` is high. The MMU then:

1. reads one activation word and M weight words per cycle for N cycles;
2. sends the two tile exponents to each array's exponent adder, which feeds a
   2-entry FIFO;
3. pulses `done_valid` 3N+1 cycles after the command handshake.

**Drain.** The accumulators then shift toward column 0. The result leaves as
M·N bfloat16 vectors, in the order array 0 column 0 … array M−1 column N−1.
Each vector holds the N batch rows of one output column. `eqx_bfp_to_bf16`
converts them, using the summed exponent.

**Accumulator clear.** A PE clears its accumulator on the first word of a tile.
The drain also shifts zeros in from the right, so the accumulators are zero
after every drain anyway.

**Only one mode is built.** This is the vector-matrix mode: activations
broadcast, weights unicast. The published design also has a second mode, with
weights broadcast and activations unicast, for tall activation matrices. It is
not built: it needs M activation tiles read per cycle.

## im2col (`eqx_im2col`)

**Placement.** The im2col unit sits on the read path from the activation
buffer to the MMU. It lowers a convolution on the fly, so no lowered copy of
the input is stored.

**Feature-map layout.** A feature map is stored pixel by pixel, row-major, with
`cw` words per pixel. Each word holds W channels of all N batch rows.

**Window addresses.** An MMU activation address with bit 19 clear passes
through unchanged. With bit 19 set, it is a *window address*:

```
addr[18:0] = { oy | ox (lox bits) | ky (lky bits) | kx (lkx bits) | c (lcw bits) }
read word  = base + ((oy*stride + ky - pad) * fw + (ox*stride + kx - pad)) * cw + c
```

**Padding.** Some field values give a padding word instead of a real one:

- a pixel outside the map;
- `kx`, `ky` or `c` beyond the kernel or channel count.

A padding word has zero mantissas and the map's exponent.

**Using it.** One MMU command over a window address of output pixel (oy, ox)
multiplies that pixel's kernel window by the weights. The geometry (`cfg_conv`,
type `conv_cfg_t`) is set at installation time, as are the field widths. A
feature map must share one block exponent, because the unit does not
re-quantize.

## SIMD unit and quantizer (`eqx_simd_unit`, `eqx_bf16_to_bfp`, `eqx_bfp_to_bf16`)

**Structure.** The SIMD unit has N bfloat16 lanes and a 5 MB register file of
N-lane vectors (18,331 vectors).

**Commands.** A command names:

- an operation: PASS, ADD, SUB, MUL, MAX, RELU, or DRELU, where DRELU is
  `b > 0 ? a : 0`, the ReLU derivative times a gradient;
- where operand A comes from: the MMU output stream or the register file;
- operand B, read from the register file;
- a vector count;
- a destination: the register file, or the activation buffer through the
  quantizer.

**Timing.** The unit takes two cycles per vector.

**Quantizer.** The quantizer (`eqx_bf16_to_bfp`) collects N·W result vectors,
which is one tile, while it tracks the largest bfloat16 exponent. It then
writes N activation words:

- The shared exponent is `maxe − 133`, so the largest magnitude lands in the
  7 magnitude bits of the mantissa.
- Mantissas are truncated toward zero.

Vector v of a drained MMU result becomes input column v of the next activation
tile. So the outputs of one layer are the inputs of the next without any
reshuffling.

**Done.** A SIMD command reports done only after the quantizer has written its
last word. The next MMU command can then read the new tile safely.

## Buffers and crossbar (`eqx_act_buffer`, `eqx_weight_buffer`, `eqx_crossbar`, `eqx_instr_buffer`)

**Activation buffer.** 20 MiB, 36,567 words, in 4 banks interleaved on the low
address bits. It has three ports:

- an MMU read port;
- an external read/write port from the crossbar;
- a SIMD/quantizer write port.

If the SIMD port and the external port write the same word in the same cycle,
the SIMD write wins.

**Weight buffer.** 50 MiB in M banks. All banks are read at the same address
for the MMU.

**Timing.** Reads of both buffers take one cycle.

**Crossbar.** A 2×2 crossbar connects the DRAM and host ports to the two
buffers' external ports. If both want the same buffer, DRAM wins.

**Instruction buffer.** 32 KiB of 96-bit words, 2,730 entries.

## Front end: requests, contexts and the scheduler

**Request dispatcher** (`eqx_request_dispatcher`: `eqx_batch_formation` and
`eqx_request_controller`).

- Inference requests are queued (1024 entries) and grouped into batches of N.
- *Adaptive batching:* if a batch has waited `cfg_batch_timeout` cycles, it is
  issued incomplete, padded with dummy rows (`batch_padded`). A timeout of 0
  means static batching: always wait for N requests.
- Training requests are whole batches and skip batch formation.
- The request controller starts a program when its context is free, inference
  first.
- It reports the inference queue size: queued requests plus those held in
  batch formation.

**Instruction dispatcher** (`eqx_instr_dispatcher`: `eqx_instr_controller`,
`eqx_decoder`, `eqx_completion_unit`).

- *Contexts:* there are two hardware contexts, 0 for inference and 1 for
  training. Each has a program counter that starts at `cfg_prog_start[ctx]`.
- *Issue:* each context has at most one instruction in flight. Contexts are
  served round-robin, one instruction per fetch.
- *Load spike:* when the inference queue size exceeds `cfg_qsize_threshold`,
  only inference issues (`inf_only`).
- *Exception:* while the MMU stalls on undrained results, training may still
  issue. Without this, a training result left in the MMU would block the next
  inference matrix product for good. The end-to-end test hits this case.
- *Decoder:* it pushes each instruction into the 2-entry command queue of its
  unit (MMU, SIMD, DRAM or host). NOP completes at once, and END finishes the
  program (`prog_done`, `prog_done_ctx`).
- *Completion unit:* it collects per-unit done pulses in 2-entry queues and
  returns them round-robin.

## Instruction set (`eqx_pkg`)

The encoding is this design's own. The published design defers its ISA to a
separate reference.

Each instruction is 96 bits. Fields:

- `[95:92]` opcode
- `[91:88]` sub
- `[87:84]` flags
- `[83:64]` a
- `[63:44]` b
- `[43:24]` c
- `[23:0]` d

Opcodes:

| Opcode | Fields | Operation |
|---|---|---|
| `OP_MMU` | a = activation tile or window address, b = weight address | One tile multiply. |
| `OP_SIMD` | sub = operation; flags[0] = A from MMU, flags[1] = to activation buffer; a, b, d = addresses; c = count | One SIMD command. |
| `OP_DRAM`, `OP_HOST` | sub[0] = store, sub[1] = weight buffer; flags = bank; a = buffer address; c = word count; d = external address | A transfer command to the DRAM or host interface. |
| `OP_NOP` | | Completes at once. |
| `OP_END` | | Ends the batch's program. |

## Top level (`equinox_top`)

Ports:

| Group | Ports |
|---|---|
| Requests | `inf_req_*`, `trn_req_*` (valid/ready + 16-bit ID) |
| Installation | `ib_wr_*` (instructions), `cfg_batch_timeout`, `cfg_qsize_threshold`, `cfg_prog_start`, `cfg_conv` |
| DRAM interface | `dram_cmd_*` (`xfer_cmd_t` commands), `dram_done`/`dram_done_tag`, `dram_buf_*` (crossbar port) |
| Host interface | the same set, `host_*` |
| Status | `batch_start`/`batch_info`/`batch_padded`/`inf_batch_ids`, `prog_done`/`prog_done_ctx`, `ctx_active`, `inf_only`, `mmu_stall`, `completed` |

**External interfaces.** An external interface takes a command, moves its
words through its `*_buf_*` port, and then pulses `*_done` with the command's
tag. Weights and instructions are installed through these ports before any
request arrives.

**Reset.** Reset is asynchronous and active low (`rst_n`). Verilator reports
SYNCASYNCNET on `rst_n`. The warning comes from the `disable iff` clauses of
the assertions, not from the logic.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| N (tile height, batch, array size) | 143 | the 500 µs hbf8 design point |
| M (systolic arrays), W (PE width) | 4, 4 | inferred: the design point's 390 TOP/s at 610 MHz needs m·w ≈ 15.6; 2·4·4·143²·610 MHz = 399 TOP/s |
| ACT_BYTES, WGT_BYTES | 20 MiB, 50 MiB | published SRAM split |
| INSTR_BYTES, RF_BYTES | 32 KiB, 5 MiB | published SRAM split |
| ACT_BANKS | 4 | own choice |
| QDEPTH | 1024 | own choice |
| mantissa / exponent / accumulator bits | 8 / 12 / 25 | published (hbf8) |

## Departures from the published design and open points

- **MMU mode:** only the first mode (activations broadcast) is built.
- **External interfaces:** the host (PCIe) and DRAM (HBM) interfaces are
  outside the RTL.
- **Own choices:** the following are this design's own, not published:
  - instruction encoding;
  - command queues of depth 2;
  - one instruction in flight per context;
  - the MMU-stall exception to inference-only scheduling;
  - activation broadcast (the published block diagram draws the arrays
    as a chain);
  - drain order;
  - truncating conversions;
  - the quantizer's exponent rule;
  - im2col's window-address scheme.
- **Buffer space per context:** each service is meant to own its own region
  of the buffers, fixed at installation. Here that is a convention of the
  installed programs' addresses; the hardware does not check it.
- **Inferred sizes:** M = W = 4 is inferred from the published throughput, not
  stated.
- **Performance and power:** none of the published performance or power
  numbers have been measured on this RTL.

Capacity against the published workloads, at the default sizes:

| Workload | Weights | Fits? |
|---|---|---|
| DeepBench LSTM, 2048 hidden units | 4·4096·2048 ≈ 33.6 MB | Yes, in the 52.4 MB weight buffer. |
| DeepBench GRU, 2816 hidden units | ≈ 47.7 MB | Yes, in the 52.4 MB weight buffer. |
| ResNet-50 | 25.7 MB | Weights fit, but its first-layer activations for 143 images (115 MB) exceed the activation buffer. The program must stage layers through DRAM. |

## Verification

Each testbench is self-checking. It ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. Inputs are
driven on the falling clock edge.

| Testbench | Covers | Sizes |
|---|---|---|
| `tb_eqx_mmu` | PE, systolic array, exponent path, bf16 conversion, drain order, stall, 3N+1 latency; results against a real-arithmetic model | N=4, M=2, W=2 |
| `tb_eqx_simd_unit` | all SIMD operations, register file, MMU stream source, quantizer output words | N=4, W=2 |
| `tb_eqx_buffers` | both buffers, bank interleaving, SIMD-write priority, crossbar routing and arbitration | small buffers |
| `tb_eqx_im2col` | all window addresses of random geometries, padding, pass-through | 12-bit buffer address |
| `tb_eqx_request_dispatcher` | static and adaptive batching, padding, priority, queue size | N=4, 16-entry queues |
| `tb_eqx_instr_dispatcher` | two interleaved programs against unit models, issue order, `inf_only`, completion | default instruction buffer |
| `tb_equinox_top` | the whole accelerator, end to end (below) | N=4, M=2, W=2, small buffers |

**The end-to-end scenario** (`tb_equinox_top`):

- **Programs:** an inference program runs two layers. It takes input from the
  host, applies ReLU in the SIMD unit, requantizes into the activation buffer,
  runs the second layer, and sends the result to the host. A training program
  loads a feature map from DRAM, runs a padded 2×2 convolution through im2col,
  goes through the register file, and stores to DRAM.
- **Checks:** every result tile is compared word for word with a
  real-arithmetic model.
- **Mechanisms:** the test counts each of the following and fails if any
  never happens:
  - padded and full batches;
  - both contexts active at once;
  - a load spike that holds training;
  - MMU stalls;
  - host/DRAM contention at the crossbar;
  - im2col padding words.

**To run a testbench** with plain Verilator from the repository root:

```
verilator --binary --timing -Wno-fatal -y rtl -Irtl rtl/eqx_pkg.sv tb/tb_equinox_top.sv --top-module tb_equinox_top
./obj_dir/Vtb_equinox_top
```

**Full size.** At the full size (N=143, about 82,000 PEs), a lint pass with
Verilator alone takes more than ten minutes and several GB of memory. No
full-size simulation is included. The largest configuration simulated end to
end is N=4, M=2, W=2. To try other sizes, change the parameters on the
`equinox_top` instance in `tb/tb_equinox_top.sv`. The reference model follows
the parameters.

## Files

- `rtl/eqx_pkg.sv`: shared types, constants, ISA and bfloat16 helpers.
- `rtl/eqx_fifo.sv`: the small FIFO behind all command and completion queues.
- `rtl/equinox_top.sv`: the top level.
- `rtl/eqx_*.sv`: one unit each, named as in the sections above.
- `tb/tb_*.sv`: the testbenches listed above.
