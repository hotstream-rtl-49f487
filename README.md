# HotStream streaming accelerator in SystemVerilog

HotStream feeds data to a set of accelerator kernels (Processing Elements, PEs)
as streams. The data can follow complex access patterns, such as a transpose, a
diagonal sweep, a zig-zag scan or a stencil cross, and still leave the memory at
close to one word per clock. It uses two levels of access patterns:

- **Coarse-grained (host side).** A DMA engine moves rectangular blocks of host
  memory into or out of the accelerator. Each block is one 2D descriptor.
- **Fine-grained (inside the accelerator).** Every Core has a small programmable
  Data Fetch Controller (DFC) that works out each address of its stream in the
  shared memory.

A pattern is not a list of descriptors. It is a short program on a 16-bit
microcontroller, the Micro16. The Micro16 hands parameter sets for nested loops
to a hardware Address Generation Core (AGC), and the AGC emits one address per
cycle. While the AGC runs one set, the Micro16 computes the next set in a
second, shadow copy of the AGC registers, so irregular patterns cost only a
few idle cycles.

This RTL implements that architecture:

- the 2D DMA controller;
- the Data Stream Switch (DSS);
- a crossbar backplane linking the Cores;
- 16 Cores, each with a read DFC, a write DFC and a Bus Master Controller
  (BMC) that turns address streams into burst transactions;
- round-robin arbitration for the shared memory.

Three things sit outside the RTL and connect through ports: the PEs
themselves, the PCIe bridge to the host, and the DDR memory.

```
 host memory  <-- host_req/host_rsp --  dma_controller  <-->  dss  <--> backplane node 16
                                                               |
                                                               +--> shared-memory master 16
 Core c (c = 0..15):
   read DFC  --addr-->  bmc  --data-->   pe_in_*   (to PE c)
   write DFC --addr-->  bmc  <--data--   pe_out_*  (from PE c)
   PE c  <-- bp_rx_* / bp_tx_* -->  backplane node c
 mem_arbiter (17 masters, round robin) --> sm_req/sm_rsp --> shared memory
```

## The Data Fetch Controller: AGC, ERF and Micro16

This is the heart of the design and the part that needs the most care. A DFC
(`rtl/dfc.sv`) has three parts:

- its own instruction memory (`instr_mem`, 1024 words of 32 bits, written by
  the host);
- a Micro16 (`micro16`);
- an AGC (`agc`).

### Address generation (AGC)

The AGC emulates a nest of up to `N_LOOPS` (default 3) counted loops:

- **Loopbody.** The innermost body is a `loopbody` unit. It steps an address
  `y <- y*m + i` once per accepted address. `m` is unsigned 16-bit and `i` is
  signed 16-bit.
- **Loop levels.** Each loop level is a `loopcontrol` unit. It counts down
  from its *count* register and raises an interrupt on the step that finishes
  the level.
- **Chaining.** Level 1 counts addresses. Level k+1 counts the completions of
  level k. The interrupt of one level enables the next, as in a daisy chain.
- **Start increments.** Each level also holds a signed *start increment*. Say
  levels 1..j complete on the same address. The next address is then
  `start_j + inc_j`, where `start_j` is the address at which level j last
  began. That address becomes the new start of levels 1..j.
- **End of pattern.** The pattern ends when the outermost configured level
  completes.

A 2D tile, for example, is: count(1) = width, inc(1) = row pitch,
count(2) = height, `m = 1`, `i = 1`.

**Timing.** One address leaves per cycle while the consumer is ready. When a
loop level changes, one cycle with no address is inserted, because the
interrupt is registered and the start-address mux is applied in the next
cycle. So the next start address comes two cycles after the last address of
the row. The same single idle cycle occurs when the AGC takes a new parameter
set. This timing reproduces the published address rates:

| pattern (size) | addresses / cycle, this RTL | published |
|---|---|---|
| linear (1024) | 1.00 | 1 |
| tiled 128×72 in a 512-word row pitch | 9216/9287 = 0.99 | 0.99 |
| Greek cross (8×8 squares, rows 1024 apart) | 0.89 | 0.89 |
| zig-zag 8×8 | 64/176 = 0.36 | 0.36 |
| diagonal 1024×1024 | 0.998 | 1 |

`tb_agc`, `tb_dfc` and `tb_patterns` check these cycle counts. `tb_patterns`
runs all five benchmark patterns at their evaluation sizes and checks every
address against a reference model:

- the Greek cross steps over a 1024 × 1024 matrix: 16,128 addresses in 18,143
  cycles;
- the diagonal covers all 2,047 anti-diagonals of a 1024 × 1024 matrix:
  1,048,576 addresses in 1,050,678 cycles, 0.998 per cycle (published: 1).

Each anti-diagonal is its own parameter set, which costs about one idle cycle.
On the shortest diagonals the Micro16 takes longer to prepare the next set
than the AGC takes to emit the current one.

### The External Register File (ERF) and double buffering

The AGC's configuration is visible to the Micro16 as 16 registers of 16 bits,
the ERF:

| ERF | meaning | reset |
|---|---|---|
| 0 | Loopbody multiplier `m` | 1 |
| 1 | Loopbody increment `i` (signed) | 1 |
| 2, 3 | initial address, low and high half | 0 |
| 4 + 2k | count of loop level k+1 (0 is taken as 1) | 1 |
| 5 + 2k | start increment of loop level k+1 (signed) | 0 |

The ERF is the **shadow** copy. The AGC runs from a separate **active** copy.
The handshake between the two sides is:

- **Done.** The Micro16 executes `DONE` to say the ERF holds a complete set.
  The AGC then raises **Wait**.
- **Copy.** As soon as the AGC is idle, or finishes its running pattern, it
  copies the ERF into its active registers and drops Wait.
- **WAIT.** The Micro16 instruction `WAIT` stalls until Wait is low.
- **Overlap.** The Micro16 then edits the ERF for the *next* set while the AGC
  is still emitting the current one.

Writing the ERF while Wait is high is a protocol error. An assertion in `agc`
flags it.

The ERF keeps its contents after a copy. A following set therefore only
rewrites the registers that change. An `ADDI` to the initial address is enough
to move a whole tile. The ERF is not cleared by `start`, only by reset.

### Micro16

The Micro16 is a single-cycle RISC. Its instruction memory has a synchronous
read, so the core fetches the *next* PC and each instruction arrives in the
cycle it executes. Register numbers work as follows:

- R0 reads as zero.
- R1–R15 are general registers.
- Numbers 16–31 are the ERF. Any ALU instruction can read or write the ERF
  with no extra latency.

Instruction words are 32 bits:

| bits | field |
|---|---|
| [31:27] | opcode |
| [26:22] | rd |
| [21:17] | rs |
| [15:0] | imm (for register-register instructions, rt = imm[4:0]) |

| op | effect |
|---|---|
| NOP | — |
| ADD, SUB, AND, OR, XOR | rd = rs op rt (ADD sets carry) |
| ADDI, LDI | rd = rs + imm (sets carry) / rd = imm |
| ADC, ADCI | add with carry, so 32-bit addresses can span ERF 2/3 |
| SLL, SRL | shift by imm[3:0] |
| BEQ, BNE, BLT, JMP | branch to imm if rd ==, !=, < (signed) rs; JMP always |
| DONE | hand the ERF to the AGC |
| WAIT | stall while the AGC still holds a pending set |
| HALT | stop until the next start |

The encoding and opcode values are in `hs_pkg::op_t`. `tb/m16_asm_pkg.sv` is a
small assembler (one function per instruction). It also holds the benchmark
programs.

For example, a tile of `w` × `h` words in rows `stride` apart is:

```
LDI  E_MULT,1 ; LDI E_INC,1 ; LDI E_INIT_LO,0 ; LDI E_INIT_HI,0
LDI  LC0_COUNT,w ; LDI LC0_INC,stride ; LDI LC1_COUNT,h
DONE ; HALT
```

Program sizes of the benchmark patterns, with 4-byte words:

| pattern | this RTL | published |
|---|---|---|
| linear | 24 B | 24 B |
| tiled | 36 B | 40 B |
| diagonal | 76 B | 44 B |
| zig-zag | 120 B | 48 B |
| cross | 88 B | 132 B |

The instruction set is this design's own, so the sizes differ.

**Busy.** A DFC is busy from `start` until the Micro16 has halted and the AGC
has emitted its last address.

## Bus Master Controller: bursts, prefetch and the synchronizer

Each Core's `bmc` converts the two DFC address streams into transactions on
one memory-mapped port.

### Memory-mapped bus

The bus is this design's own simplified, AXI-like burst bus (`hs_pkg`):

- **Request** (`mm_req_t`): a command {write, word address, beats−1}, then the
  write beats (`wvalid`, `wdata`, `wlast`).
- **Response** (`mm_rsp_t`): `cmd_ready`, `wready`, and the read beats
  (`rvalid`, `rdata`, `rlast`).
- **One transaction at a time.** A port has at most one transaction in flight.
- **Read beats are never refused.** The requester must be able to take every
  beat it asked for.

### Read unit (`bmc_read`)

- Collects consecutive addresses into one burst as long as they are contiguous.
- Closes the burst when any of these happens:
  - the next address breaks the increment;
  - the burst reaches `MAX_BURST` = 16 beats;
  - the data buffer has no room for another beat;
  - no address has arrived for `FLUSH_WAIT` = 4 cycles.
- Issues the burst only after reserving buffer space for all its beats.
- Keeps the data in a `BUF_DEPTH` = 32 word FIFO until the PE takes it. This
  is the prefetch: reads keep going while the PE stalls.

### Write unit (`bmc_write`)

- Has a synchronizer. It takes an address and a data word only *together*, so
  addresses never run ahead of the PE's results.
- Merges contiguous pairs into a burst in the same way as the read unit.
- Sends the burst once it is complete.

### Sharing the port

The two units share the BMC port through a two-input `mem_arbiter`.

## Shared memory arbitration

`mem_arbiter` puts N masters on one port: the 16 Core BMCs, plus the DSS as
master 16.

- **Round robin.** `rr_arbiter` is a work-conserving arbiter: it grants
  whichever master is requesting, starting after the last winner. No master
  can starve.
- **Locking.** The winner holds the port from its command to its last beat.
  Transactions are therefore never interleaved.
- **Latency.** A new command can be granted the cycle after a last beat.

## Backplane

`backplane` is a full crossbar over `P` nodes. In the top, these are the 16
Cores plus the DSS, at index 16.

- **Routes.** For each output, the host sets a source node and an enable.
- **Concurrency.** Several routes can be active at once.
- **Multicast.** One input may feed several outputs. It advances only when
  every destination has accepted the word.
- **Registering.** Each output has one register stage.

## Data Stream Switch

The `dss` connects the DMA stream to the engine. It has two mode bits:

- **`in_to_mem`** picks the destination of host data:
  - 0: backplane node 16;
  - 1: shared memory, at consecutive addresses starting from a base that
    the host writes.
- **`out_from_mem`** picks the source of data back to the host:
  - 0: backplane node 16;
  - 1: a block of `rd_count` words read from shared memory at `rd_base`.

Its memory side is an ordinary `bmc` fed by simple linear counters.

## DMA controller (host side)

`dma_controller` runs a chain of descriptors from a 16-entry table. Each entry
holds:

| field | meaning |
|---|---|
| OFFSET | first word of the block |
| HSIZE | words per row |
| STRIDE | distance between row starts |
| VSIZE | number of rows |
| CTRL | bit 0: direction, engine → host; bit 1: last descriptor |

The engine works as follows:

- Rows are cut into bursts of at most 16 beats.
- In the host → engine direction, a read burst is issued only when its data
  fits in the 32-word buffer.
- In the other direction, write beats come straight from the engine's stream.
- The engine starts at descriptor 0 and stops after the one marked last.

## Top level and host register map

`hotstream_top` has these parameters:

| parameter | default |
|---|---|
| `NUM_CORES` | 16 |
| `N_LOOPS` | 3 |
| `IMEM_DEPTH` | 1024 |
| `MAX_BURST` | 16 |
| `BUF_DEPTH` | 32 |
| `DESC_N` | 16 |

All configuration is done by host register writes (`cfg_we`, `cfg_addr[23:0]`,
`cfg_wdata[31:0]`):

| `cfg_addr` | meaning |
|---|---|
| [23] = 1 | instruction word: Core [22:11], DFC [10] (0 read, 1 write), word [9:0] |
| region [15:12] = 0 | DMA: bit 11 set → start chain; else descriptor [10:3], field [2:0] |
| region 1, reg 0 | DSS mode {out_from_mem, in_to_mem} |
| region 1, reg 1 | DSS write base; restarts the write counter |
| region 1, reg 2 / 3 | DSS read base / read count; writing the count starts the read |
| region 2, reg o | backplane output o: [31] enable, [7:0] source node |
| region 3, reg c | Core c: bit 0 starts the read DFC, bit 1 the write DFC |

Status outputs are `dma_busy`, `dss_busy` and `core_busy[c]`.

Every Core brings its PE ports out of the top:

- `pe_in_*`: data from shared memory;
- `pe_out_*`: results to shared memory;
- `bp_tx_*` / `bp_rx_*`: to and from the backplane.

The DMA's host-memory port (`host_req`/`host_rsp`) and the shared-memory port
(`sm_req`/`sm_rsp`) use the burst bus described above.

At the default size, synthesis with yosys gives:

- about 15,000 coarse cells;
- 29,000 flip-flop bits;
- 1 Mbit of instruction memory (32 DFCs × 1024 × 32 bits).

## How far it follows the HotStream architecture

**Taken from the architecture:**

- the block structure: HIB with a DMA controller, DSS, backplane crossbar,
  Cores with read and write DFCs and a BMC, and a shared memory under
  round-robin arbitration;
- the 2D descriptor {OFFSET, HSIZE, STRIDE, VSIZE};
- the Loopcontrol/Loopbody AGC with `y = y*m + i`, up to three levels and a
  two-cycle restart;
- the double-buffered ERF with Wait/Done;
- a 16-bit single-cycle Micro16 that uses ERF registers as operands;
- burst merging up to a break in the increment;
- read prefetch and the write synchronizer;
- 16 Cores and 16-bit stream elements.

**This design's own choices:**

- the Micro16 instruction set and encoding;
- the ERF register map;
- the bus protocol and burst limits;
- FIFO depths;
- the rule for start addresses when several levels complete at once;
- the DSS address counters;
- the register map;
- attaching the DSS as an extra backplane node.

**Departures:**

- **Instruction memory.** Each DFC has its own instruction memory. The block
  diagram of a Core draws one memory shared by both DFCs.
- **Program sizes** differ, as shown in the table above.
- **External parts.** The PEs (matrix multiply and accumulate units), the PCIe
  bridge and the DDR3 controller are not part of the RTL.
- **Host software.** The API, driver and gather call are not part of the RTL.
- **Diagonal rate.** The diagonal pattern reaches 0.998 addresses per cycle
  rather than a full 1, because each diagonal is a new parameter set.
- **Loop counters.** A Loopcontrol counts down to 1 rather than to 0, and
  signals completion in the cycle of its last count. The number of iterations
  is the same; this only saves the cycle of a zero state.
- **Memory interface.** The interface to the shared memory is a simple burst
  bus, not full AXI4: there are no IDs, no outstanding transactions and no
  byte strobes.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.

- **Behavioural memory.** `tb/mm_mem_model.sv` is a memory for the burst
  port, with set latency and random stalls.
- **Assembler.** `tb/m16_asm_pkg.sv` holds the Micro16 assembler and the
  reference address models.

From the project root, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hotstream_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/hs_pkg.sv tb/m16_asm_pkg.sv tb/tb_hotstream_top.sv
./obj_dir/Vtb_hotstream_top
```

Replace the top module and file name to run any other testbench. Run the
simulator with `+verilator+rand+reset+2` to start undriven state at random
values.

`tb_hotstream_top` runs the whole accelerator at its default parameters
(16 Cores), with behavioural PEs on Cores 0–3. The run has five steps:

1. **DMA into shared memory.** A 2D DMA descriptor copies an 8×8 block out of
   a 32-word-wide host matrix into shared memory.
2. **Two Cores in parallel.**
   - Core 0 reads the block transposed and computes 3x+1.
   - Core 2 reads it in two double-buffered parameter sets and adds 5.
   - Both write their results back to shared memory.
3. **Backplane to host.** Core 1 streams Core 0's results through the
   backplane to the DSS and the DMA, which writes them into host memory as a
   2D block.
4. **Shared memory to host.** The DSS reads Core 2's results and sends them to
   the host.
5. **Host to a PE.** Host data goes through the backplane to Core 3's PE.

Every word is checked. The run also counts these mechanisms, and fails if any
of them never occurs:

- DMA bursts;
- merged memory bursts;
- arbitration contention;
- prefetch while the PE stalls;
- synchronizer waits;
- loop-level changes;
- double-buffered overlap;
- each backplane route and DSS direction.

It takes about 1,200 cycles.

The counters reach inside the design by hierarchical name, so this testbench
builds only against the real top.

`tb_matmul` runs a block matrix multiplication C = A × B through the whole
accelerator at its default size, with N = 64 and 32 × 32 sub-blocks:

1. The DMA copies A and B into shared memory.
2. Core 0's read DFC walks the 2D tiles A[i][k] and B[k][j], one
   double-buffered parameter set per tile.
3. A behavioural multiplier PE on Core 0 returns each product block, and
   Core 0's write DFC stores the partial products.
4. Core 1's accumulator PE adds the two partial blocks of each result block.
5. Four 2D descriptors bring C back to the host row-major.

Every element of C is compared with a product computed in the testbench.

`tb_patterns` runs the five benchmark patterns on one DFC at their evaluation
sizes (see the rate table above). It takes about 1.1 million cycles, under a
second in Verilator.
