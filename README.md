# Column-parallel JPEG2000 tier-1 coder with an AXI IP-core wrapper

JPEG2000 spends most of its encoding time in tier-1 coding, also called EBCOT.
Tier-1 turns each code block of wavelet coefficients into an arithmetic-coded byte stream.
On a processor this is slow for two reasons:

- every sample of every bit plane goes through data-dependent branches;
- the arithmetic coder handles one binary decision at a time.

This design does that work in hardware, in two stages:

- a **bit-plane coder (BPC)** looks at a whole 4-sample column of a stripe in one clock cycle and produces all the context/decision (CX/D) pairs of that column at once;
- a chain of FIFOs keeps the **MQ arithmetic coder** fed with one pair at a time, and it turns them into bytes.

An IP-core wrapper adds what a Zynq-class SoC needs around the coder:

- AXI4 burst transfers between DDR and two block RAMs;
- a small register file;
- a fallback that stores a block uncompressed when coding would make it larger.

The target use is on-board compression of hyperspectral images. Spectral decorrelation is done beforehand, so each band arrives as ordinary wavelet subbands.

The wavelet transform, tier-2 (packet formation), the decoder and the processor system are not part of this RTL.

## Data path

```
DDR --AXI4 read bursts--> in_ram --load--> code block memory (sign + NBP magnitude planes)
                                                  |
             stripe generator (rows 4s-1 .. 4s+4) + state memories (sigma, sigma', eta)
                                                  |
                   column information generator (column + both neighbour columns)
                                                  |
                context modeler: SPP | MRP | CUP units (ZC, SC, MRC, RLC primitives)
                                                  |
             context sequencer (0..10 pairs per column -> 1 pair per cycle)
                                                  |
                           CX/D FIFO  -->  MQ coder  -->  byte-out FIFO
                                                  |
                  out_ram --(coded or raw)--> header + payload --AXI4 write bursts--> DDR
```

| File | Role |
|---|---|
| `rtl/jp2k_pkg.sv` | Shared types: `cxd_t` (5-bit CX, 1-bit D), `pass_e`, `band_e`, `col_info_t`, `col_result_t`. |
| `rtl/code_block_mem.sv` | Sign and magnitude storage. Returns six rows at once at a selected bit plane. Finds the most significant non-zero plane while loading. |
| `rtl/state_mem.sv` | Three state arrays: sigma (significant), sigma' (refined) and eta (visited in this plane). Writes one column per cycle and reads six rows at a time. |
| `rtl/stripe_generator.sv` | Builds the six-row window around a stripe. Rows outside the block read as zero and are flagged invalid. |
| `rtl/column_info_gen.sv` | Cuts one column and its left and right neighbours out of the window. |
| `rtl/zc_lut.sv`, `sc_lut.sv`, `mrc_lut.sv`, `rlc_unit.sv` | The four coding primitives: zero coding, sign coding, magnitude refinement, run-length. |
| `rtl/sample_nbrs.sv` | Neighbour counts and sign/significance views for one row of the column. |
| `rtl/spp_unit.sv`, `mrp_unit.sv`, `cup_unit.sv` | The three passes, each a combinational function of one column. |
| `rtl/context_modeler.sv` | Selects the active pass's result. |
| `rtl/context_sequencer.sv` | Serialises a column's pairs into the CX/D FIFO. |
| `rtl/bpc_controller.sv` | Sequences planes, passes, stripes and columns, and the state clears. |
| `rtl/sync_fifo.sv` | First-word fall-through FIFO, used for CX/D pairs and for output bytes. |
| `rtl/mq_ilt_ram.sv` | Per-context state index I(CX) and MPS(CX) for 19 contexts. |
| `rtl/mq_pet_rom.sv` | The 47-entry probability table (Qe, NMPS, NLPS, Switch). |
| `rtl/mq_coder.sv` | The arithmetic coder state machine. |
| `rtl/tier1_coder.sv` | Code block memory + BPC + FIFOs + MQ coder. |
| `rtl/axi_burst_master.sv` | AXI4 master issuing N bursts of 16 beats x 4 bytes. |
| `rtl/jp2k_ip_core.sv` | Top level: registers, block RAMs, the sequencing of read → load → code → decide → write, and the raw fallback. |

Default size: a 32 x 32 code block with 9 magnitude bit planes plus a sign bit, so 10 bits per sample.

## Column-parallel bit-plane coding

Tier-1 visits samples in stripe order:

- stripes of four rows, from top to bottom;
- within a stripe, columns from left to right;
- within a column, rows from top to bottom.

Every bit plane gets up to three passes:

- **significance propagation (SPP)** codes insignificant samples that already have a significant neighbour;
- **magnitude refinement (MRP)** codes samples that were already significant before this plane;
- **cleanup (CUP)** codes everything left, with a run-length shortcut for empty columns.

The first plane with a 1 bit gets only the cleanup pass. Planes that are all zero above it are skipped.

### Why one column per cycle is hard

The hard part is coding four rows in one cycle while keeping the result identical to the sequential algorithm. Sample *j* of a column can depend on rows 0..*j*−1 of the same column in two ways:

- if row *j*−1 became significant a moment earlier in SPP, row *j* now has a significant neighbour, so it is coded in this pass;
- the same newly significant neighbour changes row *j*'s zero-coding context.

### How the pass units handle it

Each pass unit (`spp_unit`, `cup_unit`) therefore has a short combinational chain down the column. Every row receives the significance bits produced by the rows above it (`cs_in`) and passes on its own (`cs_out`). Each row gets its own signals in a generate loop, so the chain is acyclic.

Neighbours in the columns to the left and right come from the state memories:

- the left column was written the cycle before, so its new state is already in memory;
- the right column still holds its old state, as the sequential algorithm requires.

The rows above and below the stripe (4s−1 and 4s+4) come in through the six-row window.

### Cleanup and run-length mode

In cleanup, a column is in run mode when all four samples are insignificant, unvisited and have no significant neighbour. A run-mode column that stays zero costs one pair (RL context 17, D = 0). Otherwise the column emits:

- RL with D = 1;
- two UNIFORM-context (18) bits giving the row of the first 1, most significant bit first;
- that sample's sign;
- normal coding for the rows below it.

A column can therefore produce 0 to 10 pairs. Ten is the case of a broken run with three more rows that each code a significance bit and a sign.

The `context_sequencer` keeps the column's pairs and writes one per cycle into the CX/D FIFO. It takes the next column in the same cycle as it writes the last pair of the current one. When the FIFO is full it holds, which stalls the controller.

### Pass order

Passes run one after the other over the whole block: SPP, then MRP, then CUP. This is the standard order, so the coded stream is the normal JPEG2000 tier-1 stream.

## MQ coder

`mq_coder` implements the standard encoder with:

- registers A and C (C as 32 bits), the shift counter CT and the output byte B;
- a byte buffer whose first, dummy byte is discarded.

The coder handles one pair per cycle. In the `S_CODE` cycle of a pair, all of the following happen combinationally:

- `mq_ilt_ram` gives I(CX) and MPS(CX), and `mq_pet_rom` gives Qe, NMPS, NLPS and Switch for that index;
- D is compared with the MPS, which flags the LPS case;
- CODEMPS or CODELPS is applied, including the conditional exchange;
- the first renormalisation step is done;
- the next pair is taken from the CX/D FIFO.

At the clock edge that ends the cycle, the coder writes the new index back (when it renormalised) and inverts the MPS (on an LPS whose Switch is 1). The next pair reads the ILT RAM after that edge, so two consecutive pairs of the same context need no forwarding path.

**Fused renormalisation.** A leading-zero count of the new A gives the number of shifts needed. A barrel shifter moves A and C by that number, or by CT if that is smaller. Only when CT reaches zero does the coder spend an extra cycle on a byte-out step. That step propagates a carry into the previous byte and inserts a stuffed 0 bit after every 0xFF. If A is still below 0x8000 after the byte-out, one more fused shift step follows. The coder then goes back to idle, which costs one cycle before it takes the next pair.

`end_i` starts the flush: set the low bits of C, do two byte-outs, and emit the last byte unless it is 0xFF.

**Cost with a continuous input:**

- 1 cycle per pair;
- 1 per byte-out;
- 1 per shift step resumed after a byte-out;
- 1 to take the first pair, and 1 for the first pair after each byte-out;
- a fixed 5 for the flush.

`mq_coder_tb` checks this count exactly.

Event strobes count LPS, MPS switch, carry and bit stuffing for test coverage: `ev_lps`, `ev_switch`, `ev_carry` and `ev_stuff`.

### Throughput

The MQ coder is the bottleneck. It takes at most one pair per cycle, while the BPC can deliver up to ten pairs per cycle.

Measured from start to interrupt, including the DDR transfers:

| Data | Cycles per sample | Msample/s at 320 MHz |
|---|---|---|
| Image-like subband blocks (`jp2k_workload_tb`) | about 9 | about 36 |
| Dense uniform random 9-plane blocks | about 18 | about 18 |

One instance therefore codes a 1920 x 1080 band in about 60 ms. At the lower sensor rate of 30 Msample/s, one coder keeps up on image-like data. At 72 Msample/s, two to four coders would be needed, working on different code blocks.

The clock rate depends on the critical path through the `S_CODE` cycle: ILT read → PET ROM → subtract and compare → leading-zero count → shift. It has not been timed here. If it is too long, a register after the PET ROM would split it, at the cost of a forwarding path for back-to-back pairs of the same context.

## IP core and raw fallback

`jp2k_ip_core` is the unit the CPU sees. It has word-addressed registers:

| Addr | Name | Use |
|---|---|---|
| 0 | CTRL | Write bit 0 = start. |
| 1 | STATUS | bit 0 busy, bit 1 done, bit 2 raw. |
| 2 | SRC | DDR address of the original block, 64-byte aligned. |
| 3 | DST | DDR address for the result, 64-byte aligned. |
| 4 | BAND | Subband: 0 LL, 1 HL, 2 LH, 3 HH. Selects the zero-coding table. |
| 5 | PAYLOAD_LEN | Bytes of payload written after the header. |
| 6 | CODED_LEN | Length of the MQ stream, even when raw was chosen. |

`irq` pulses for one cycle when a block is finished.

### Sample format

The input block is W·H samples of `SAMPLE_BYTES` little-endian bytes, in sign-magnitude form:

- the sign is the top bit of the sample;
- the magnitude is the low NBP bits.

### Sequence

1. Read ⌈bytes/64⌉ bursts into `in_ram`.
2. Load the tier-1 coder, one sample per cycle.
3. Code the block.
4. Decide:
   - as soon as the coded length passes W·H·`SAMPLE_BYTES`, the block is marked raw;
   - a raw block's payload is the original `in_ram` contents.
5. Write a 32-bit header `{raw, 15'b0, payload_len[15:0]}` followed by the payload. This uses ⌈(4 + payload)/64⌉ bursts, and byte strobes mask everything past the payload.

`axi_burst_master` issues fixed bursts, one outstanding at a time: AxLEN = 15, AxSIZE = 2, INCR. It fetches each write beat from the block-RAM side by beat index. It ignores RRESP and BRESP.

## Departures and choices

These points differ from the architecture this design implements, or fill gaps in it.

- **Pass order.** The original architecture processes refinement and cleanup concurrently. Here the three passes run one after another. This keeps the output identical to the standard order and costs one extra scan of the columns per plane.
- **Pairs per column.** The original architecture quotes one to eight CX/D pairs per column. Ten are possible here, because a broken cleanup run adds RL and two UNIFORM pairs, so the sequencer holds ten.
- **MQ state machine.** The original coder is described as a fourteen-state, pipelined machine with fused interval updates. This coder has nine states and codes one pair per cycle, with update and renormalisation fused as described above. Its internal pipeline stages are this design's own. The cycle cost is exact and tested.
- **Sizes, tables and formats.**
  - The 32 x 32 block with 9 + 1 bits, the 19 contexts, the 47-entry probability table, the 16 x 4-byte bursts and the two block RAMs follow the original.
  - The table contents and start states are the JPEG2000 standard's: context 0 starts at index 4, RL at 3, UNIFORM at 46.
  - FIFO depths (32 each), reset style (asynchronous, active low), register map, header layout and sample format are this design's own.
- **Memory style.** The code block memory and the three state memories are register arrays, because the stripe window reads six rows in one cycle. A generic synthesis of the top gives about 13,800 flip-flop bits, about 10,000 of them in the code block memory. The original FPGA build reports about 4,200 flip-flops and 21 block RAMs, so it evidently keeps more of this storage in RAM. Packing each row's bit plane into a RAM word, with one RAM bank per row of the window, would move it there. Only the two AXI-side block RAMs are written as RAM-style arrays here.
- **Clock rate.** The 320 MHz figure comes from the original build. This RTL has not been timed on an FPGA.
- **Decoder.** Not built. Neither is the DMA or interconnect fabric of the SoC; `jp2k_ip_core` has its own AXI4 master instead.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints `TB_RESULT checks=N failures=M` and stops itself after a fixed number of cycles if it hangs.

The reference models live in `tb/t1_ref_pkg.sv`:

- `ebcot_ref`, a sequential, sample-by-sample tier-1 coder;
- `mq_ref`, a software MQ encoder.

The pass-unit and full-coder tests compare the hardware against these, pair by pair and byte by byte.

Example with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/jp2k_pkg.sv tb/t1_ref_pkg.sv tb/tier1_coder_tb.sv \
  --top-module tier1_coder_tb -o sim
./obj_dir/sim
```

Replace `tier1_coder_tb` with any other `<block>_tb`. The `-I` paths let Verilator find the sub-modules.

### End-to-end and full-size tests

- **`jp2k_ip_core_tb`** runs two cores side by side through `ip_core_harness`, a CPU driver plus a DDR AXI slave with random ready delays:
  - one core at the default size;
  - one with 7 planes and 1-byte samples.

  Blocks are dense random, sparse, all-zero, and incompressible noise, which makes the raw fallback trigger. Every mechanism must happen at least once, or the test fails: each pass, run mode, LPS, switch, carry, stuffing, FIFO-full stalls, raw fallback and multi-burst transfers. The testbench counts them all.
- **`jp2k_ip_core_full_tb`** takes the default-parameter core through complete operations.
- **`tier1_coder_tb`** also stalls the byte reader, to fill the byte-out FIFO.
- **`jp2k_workload_tb`** runs the default core on eight blocks tiled from a synthetic 1920 x 1080 wavelet-transformed band, including the partial block at the bottom-right corner. It checks them like the other core tests and prints the throughput figures above.

### Changing the design

The defaults of W, H and NBP carry through every level:

- W and H should be multiples of 4 (only powers of two have been simulated);
- NBP may be up to 15.

The block RAMs size themselves from W·H·`SAMPLE_BYTES`. The 16-bit length field in the header limits a payload to 65535 bytes.
