# Microcode control for a pulsed radar SoC

A pulsed coherent radar front end is driven by a stream of 32-bit control
words ("microcode"). A sweep over distance is built from a handful of short
microcode chunks. Most of them are repeated many times: once per measured
point, times the number of hardware-averaged samples per point. The radar
takes at most one word per clock cycle and raises `cmd_req` while it wants
more. The control system's job is to keep that stream going at close to one
word per cycle, even while the host processor is busy with interrupts.

This repository has RTL for two ways of doing that. They are placed side by
side in one top-level module, `ctrl_seq_top`:

* **DMA path.** A peripheral, the *wrapper*, holds a small FIFO of chunk
  start addresses. Its DMA reads each chunk from a dedicated 8 KB microcode
  memory in bursts of eight words and pushes the words to the radar. The
  processor only keeps the FIFO filled.
* **Command-pipeline path.** A second, very small instruction pipeline sits
  next to the main RISC-V core and runs a program made of *push*
  instructions. Each push instruction carries one microcode word in its
  immediate. A *chunk sequence accelerator* in the register file replays a
  sequence of chunk functions with inner and outer repeat counts, so moving
  to the next chunk costs a single jump. A lock module lets the two
  pipelines meet at synchronisation points.

Both paths end in the same decompression stage. It adds a 48-bit expanded
word (`dec_cmd`) to every 32-bit word.

The main core, the rest of the SoC (bus bridges, other interconnects,
peripherals) and the radar itself are not included. Their connections are
ports of `ctrl_seq_top`.

## The microcode word

| bits  | field   | used by the hardware for |
|-------|---------|--------------------------|
| 31:29 | field 8 | carried unchanged |
| 28:27 | field 7 | carried unchanged |
| 26    | field 6 | carried unchanged |
| 25:24 | field 5 | carried unchanged |
| 23:22 | field 4 | carried unchanged |
| 21:20 | field 3 | carried unchanged |
| 19    | field 2 | carried unchanged |
| 18:13 | field 1 | carried unchanged |
| 12:8  | field B | index into decompression table B |
| 7:2   | field A | index into decompression table A |
| 1     | c_end   | last word of a chunk |
| 0     | type    | 0 = type A, 1 = type B |

The type is needed for decompression. `c_end` is what both paths use to find
chunk boundaries. The struct is `ucode_t` in `rtl/ctrl_seq_pkg.sv`.

## Module map

```
ctrl_seq_top
├── DMA path
│   ├── acc_wrapper  (HAS_DMA = 1)
│   │   ├── wrapper_apb_regs   APB registers, table window, FIFO input
│   │   ├── chunk_fifo         4 chunk start addresses
│   │   ├── ucode_dma          burst reader, TCDM master
│   │   └── decomp_lut         32 -> 32 + 48 bit expansion, one register stage
│   ├── tcdm_rr_xbar (3 masters: CPU, DMA, debug)
│   └── tcdm_sram    (microcode memory, 2048 x 32)
└── command-pipeline path
    ├── cmd_pipeline
    │   ├── cmd_mux            push instruction -> microcode word
    │   ├── cmdp_controller    Idle / Dump-1 / Dump-2 / Auto / Jump / Stall
    │   └── chunk_seq_acc      registers 16..31: the chunk sequence accelerator
    ├── cmdp_csr               CSR 0x800: bit 0 idle (read only), bit 1 stall
    ├── sync_lock              synch_p locks of both pipelines
    ├── tcdm_rr_xbar (2 masters: main core, command pipeline fetch)
    ├── tcdm_sram    (command program memory, 2048 x 32)
    └── acc_wrapper  (HAS_DMA = 0: decompression only)
```

All memory ports use a TCDM-style request/grant protocol. Each master drives
a request bundle `tcdm_req_t` (`req`, `addr`, `wen`, `wdata`, `be`) and gets
back `gnt`, then `rvalid` and `rdata` one cycle later. A request that is not
granted must stay up with the same address. The response signals are kept
separate on purpose: grant depends on the request in the same cycle, but the
read data do not.

## DMA path

### Wrapper registers

The offsets are relative to the wrapper base, 0x1A10C000. Only address bits
11:0 are decoded.

| offset      | register |
|-------------|----------|
| 0x000       | control. Bit 0 enables the DMA. |
| 0x00C       | status. Bit 0 = FIFO full, bit 1 = FIFO empty. |
| 0x100–0x3FC | decompression tables (192 words) |
| 0x400       | FIFO input. A write pushes a chunk start address. |

APB transfers never wait: `pready` is always 1. Software polls the full bit
before each FIFO write. A write while the FIFO is full is dropped.

### DMA timing

The DMA has four states: Idle, Init burst, In burst and Finish burst.

1. In **Idle** it waits until three things are true: it is enabled, the FIFO
   is not empty, and `cmd_req` is high. It then pops a chunk address.
2. **Init burst** issues the first read of a burst. Nothing can be pushed in
   this cycle, because read data arrive one cycle after the request.
3. **In burst** issues one read per cycle and pushes each word as it
   arrives. It stops issuing at the c_end word, or after eight reads.
4. **Finish burst** waits for the last word. It then starts the next burst,
   or the next chunk if that word had c_end set.

Reads are only issued while `cmd_req` is high. Each read that is issued is
pushed a cycle later. When c_end arrives and the FIFO holds another address,
the DMA goes straight to the next chunk without passing through Idle.

With no contention, the timing at the DMA output is:

* 8 words every 9 cycles inside a chunk;
* a 12-word chunk spans 12 cycles from its first to its last word;
* a 36-word chunk spans 39 cycles;
* the next chunk's first word comes 2 cycles after the previous c_end.

On the sweep's chunk mix this is about 0.88 words per cycle. The
decompression stage delays everything by one more cycle but does not change
the rate.

When the processor reads the microcode memory at the same time, the
round-robin interconnect makes the DMA wait. In that case the held request
simply stays up until it is granted.

### Decompression tables (this implementation's choice)

The exact expansion is not known. What is known is the 192-word table
window, the 48-bit output, and that fields A and B drive it. The choice
made here fills that window exactly:

* Table A has 64 entries and is indexed by field A. Type-A words use it.
* Table B has 32 entries and is indexed by field B. Type-B words use it.
* Each entry is 48 bits, stored as two words. The low 32 bits are at the
  even word. Bits 47:32 are in the low half of the odd word.
* Table A occupies window words 0–127 and table B words 128–191.

Replacing `decomp_lut` is the place to change this.

## Command-pipeline path

### Instructions

The command pipeline fetches from its own memory. That memory is shared with
the main core through a two-master round-robin interconnect, so the main
core loads the program. The pipeline decodes:

| instruction | encoding | effect |
|-------------|----------|--------|
| ppA / ppB   | opcode 0x0B / 0x2B | push one word (pp format) |
| pcA / pcB   | opcode 0x5B / 0x7B | push one word (pc format) |
| fjr         | opcode 0x67, funct3 7 | r28 ← PC+4, jump to the accelerator's next chunk |
| jalr        | opcode 0x67, funct3 0 | jump to r28 |
| synch_p     | opcode 0x1B, funct3 1, id in rd | meet the main pipeline (see *Synchronisation*) |
| wfi         | 0x10500073 | return to Idle |

Everything else is a no-operation. `start_p` (opcode 0x1B, funct3 0) is
executed by the main core. It reaches this block as `start_p_i` and starts
the pipeline at the address in r27.

A push with c_end set also asks the accelerator for the next chunk. This
works like fjr, but does not save a return address. If the accelerator is
empty, the request is ignored and execution falls through. Each chunk
function is therefore a run of push instructions followed by one `jalr`.
That `jalr` is reached only after the last chunk of the sequence.

The two push formats differ in which word fields they can carry. The
immediate is instruction bits 31:7.

* **pp** (most chunks):
  * [31] c_end
  * [30:29] field 5
  * [28:24] field B
  * [23:22] field 4
  * [21:16] field 1
  * [15] field 2
  * [14:13] field 3
  * [12:7] field A
* **pc** (the set-up and final chunks):
  * [22:18] field B
  * [17] c_end
  * [16] field 2
  * [15] low bit of field 7
  * [14:13] field 3
  * [12:7] field A

Fields an instruction does not carry are zero in the rebuilt word. The bit
ranges follow the reference encoding. The assignment of c_end and field 5
in the pp format is this implementation's reading of it.

### Pipeline and controller

There are two stages.

* **IF.** The PC mux chooses the next address: hold, PC+4, the jump target,
  or r28. That address goes to the memory in the same cycle.
* **ID.** The instruction arrives one cycle later. The PC register is always
  the address of the instruction being decoded.

An instruction in decode *retires* unless one of these holds:

* the controller marks it invalid;
* the fetch was not granted;
* the CSR stall bit or the lock is set;
* it is a push while `cmd_req` is low.

If it does not retire, the PC holds and the same instruction is fetched
again.

The controller is a Moore machine with six states:

| state  | PC mux | decode | next state |
|--------|--------|--------|------------|
| Idle   | r27    | invalid | Dump-1 on start |
| Dump-1 | hold   | invalid | Dump-2 |
| Dump-2 | hold   | invalid | Auto |
| Auto   | PC+4 (hold if not retired) | valid | Stall on stall/lock; Jump on a jump; Idle on wfi or a new start |
| Jump   | target or r28 | invalid | Dump-1 |
| Stall  | hold   | invalid | Auto when the stall clears |

The rate is one word per cycle inside a chunk. A jump to the next chunk
costs three empty cycles: Jump, Dump-1 and Dump-2. A 36-word chunk
therefore takes 39 cycles, or 0.92 words per cycle. The reference reports
0.947 words per cycle for this architecture, which is 36/38, i.e. two empty
cycles per chunk. This implementation keeps the state sequence as described
and accepts the extra cycle. Shortening it would mean issuing the target
fetch in the same cycle as the jump decision.

### Chunk sequence accelerator

This is the least obvious part of the design. It sits in registers 16–31 of
the register file. The main core loads it with ordinary register writes, and
the command pipeline only ever asks it "where next?".

| register | content |
|----------|---------|
| 16–20 | the *addressed shift register* (ASR). One entry per chunk function. Bits 15:0 are the low half of the chunk address; bits 31:16 are the inner count. |
| 27 | start address of the command program |
| 28 | return address (written by fjr) |
| 29 | shift ring counters, read only. SRC A is in bits 4:0, SRC B in bits 20:16. |
| 30 | copy of r16 as it was loaded, read only |
| 31 | bits 31:16 are the high half shared by all chunk addresses; bits 15:0 are the outer count |

Both counters are thermometer codes: shifting left counts up. Each write to
an ASR register counts both of them up. SRC B is the number of entries in
the ring. SRC A is the number of entries still to visit in the current
pass.

Each jump request made while SRC B is not empty returns
`{r31[31:16], r16[15:0]}` as the target, and then updates the state:

* If r16's inner count is not zero, it is decremented. The same chunk runs
  again.
* If it is zero, the ASR shifts down by one and SRC A counts down.
  * If the outer count is not zero, the entry's original value (r30) is
    written back at the end of the ring.
  * Otherwise the ring shrinks: SRC B counts down.
* When SRC A reaches zero and entries remain, the outer count is decremented
  and a new pass starts.

An entry with inner count *n* therefore runs *n*+1 times, and the whole
sequence runs outer+1 times. The jump into the very last run empties the
ring. The c_end at the end of that run is then ignored, and the `jalr`
after it returns to the caller.

Example: r16 = {1, C1}, r17 = {0, C2}, r31 = {hi, 1}, then `fjr` gives
C1 C1 C2 C1 C1 C2, and execution then continues after the `fjr`.

Where the register roles are described inconsistently, this implementation
uses:

* five ASR entries (registers 16 to 20);
* r27 as the start address and r28 as the return address.

### Synchronisation

`synch_p id` sets a lock register in the pipeline that executes it. Each
lock keeps the id. When the other pipeline executes `synch_p` with the same
id, both locks clear. If both pipelines execute it in the same cycle, no
lock is set.

While the main core handles an interrupt (`pending_irq_i` until
`irq_done_i`), a machine-mode flag masks the main pipeline's lock, so the
interrupt handler can run.

## What follows the reference and what does not

Taken from the reference design:

* the word format;
* the register map and FIFO depth;
* the eight-word bursts and the three burst states;
* the round-robin memory arbitration;
* the opcodes;
* the register roles of the accelerator;
* the six controller states and their transitions;
* the stall causes of the fetch stage;
* the lock and machine-mode behaviour.

Chosen here:

* the decompression tables;
* the pp-format positions of c_end and field 5;
* the exact cycle timing of both paths, including the three-cycle jump
  bubble (one more than the reference's throughput implies);
* the "count n more times" reading of the repeat counters;
* the layout of register 29;
* the size of the command program memory (8 KB, the same as the microcode
  memory);
* the reset values;
* the dropped FIFO write when full.

Conflicting statements were resolved as follows:

* fjr uses funct3 7 (one listing uses 6);
* the pipeline CSR is at 0x800 (once given as 0x801);
* bit 0 of that CSR reads `pipe_idle`, so it is 1 when the pipeline is idle.
  The port table says this. The prose says bit 0 shows that code is
  executing, which is the opposite sense.
* a jump costs three lost cycles (Jump, Dump-s1, Dump-s2). This follows
  the controller description, in which the Jump state is followed by two
  states that discard fetched instructions. The reported throughput
  (36 words in 38 cycles), and the remark that this pipeline needs one
  cycle more per jump than the single-pipeline accelerator, suggest two.

## Sizes and workloads

| parameter | default | meaning |
|-----------|---------|---------|
| `ctrl_seq_top.UCODE_WORDS` | 2048 | microcode memory, 8 KB |
| `ctrl_seq_top.IMEM_WORDS`  | 2048 | command program memory, 8 KB |
| `chunk_fifo.DEPTH`         | 4    | FIFO entries |
| `ucode_dma.BURST_LEN`      | 8    | words per burst |
| `chunk_seq_acc.N_ENTRIES`  | 5    | ASR entries |
| `tcdm_rr_xbar.N_MASTERS`   | 3    | masters per memory |

The reference sweeps use eight chunks, 192 stored words in total:

* four chunks of 12 words (set-up and data storage);
* four chunks of 36 words (measurement).

They fit the microcode memory many times over. A linear sweep of 100 points
pushes 28836 words and an exponential sweep of 10 points pushes 927036. In
both cases the words are streamed, not stored. On the command-pipeline side
the same chunks become about 210 instructions. A sweep's measurement chunks
take four ASR entries. The largest repeat count (8⁴ = 4096 runs, so an inner
count of 4095) fits the 16-bit count field.

### Measured throughput

`tb_sweep_workload` runs both sweeps completely on the default-size top,
through both paths. It uses the chunk order
C1 C2 {C3 C4×h C5×h C6 per point} C7 C8, where h is the number of samples
of that point. This order is an assumption: the reference gives only the
totals. It pushes 28848 and 926688 words, against the reference's 28836
and 927036.

| path | measured (words/cycle) | reference |
|------|------------------------|-----------|
| DMA, dedicated microcode memory | 0.878 | 0.876 |
| command pipeline with accelerator | 0.923 | 0.947 |

For the command pipeline, the measurement counts only cycles in which the
pipeline is running and not waiting at a synch_p. The remaining gap comes
from the third jump bubble described above.

On the command-pipeline side the main core must reload the ASR before each
point of the exponential sweep, because the repeat count changes from point
to point. The program therefore alternates `synch_p k` and `fjr`, and the
main core fills the ASR while the command pipeline waits at the synch_p.

### Under interrupts

The reference stresses the system with a timer interrupt every 1, 10 or
100 µs. Both architectures built here are reported to keep their
interrupt-free throughput even at 1 µs. `tb_sweep_workload` repeats the
exponential sweep with an interrupt every 125 cycles, which is 1 µs at
125 MHz. During each interrupt:

* the processor feeding the DMA FIFO stops polling for 45 cycles;
* the main core stops loading the ASR and issuing synch_p for 66 cycles;
* the main core reports entry to and return from its handler to the
  synchronization module.

These durations are the reference's handler lengths. Over 8444
interrupts, neither path's throughput changes by more than 0.1 %:

* the DMA path gets enough time from the four-entry FIFO;
* the command pipeline never needs the main core in the middle of a point.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. To run one
with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/ctrl_seq_pkg.sv tb/tb_ctrl_seq_top.sv --top-module tb_ctrl_seq_top
./obj_dir/Vtb_ctrl_seq_top
```

| testbench | what it covers |
|-----------|----------------|
| `tb_chunk_fifo` | random push/pop against a queue; full/empty |
| `tb_ucode_dma` | chunk streams with random grant stalls and `cmd_req`; burst timing (12/36-word chunks, gap after c_end) |
| `tb_decomp_lut` | table write/read back; expansion of both word types |
| `tb_wrapper_apb_regs` | register map, FIFO and table strobes |
| `tb_tcdm_sram` | reads, writes, byte enables against a model |
| `tb_tcdm_rr_xbar` | random traffic from all masters; fairness; response routing |
| `tb_cmd_mux` | all four push opcodes against an independent encoder |
| `tb_chunk_seq_acc` | loading, inner/outer repeats, recirculation, empty ring, r28 port |
| `tb_cmdp_controller` | every state transition and the outputs in each state |
| `tb_cmdp_csr` | writes at 0x800 and elsewhere, stall bit, read-only idle bit, zero read value at other addresses |
| `tb_sync_lock` | either pipeline first, same cycle, different ids, interrupt bypass; 5000 random cycles against a model |
| `tb_cmd_pipeline` | a full program with fjr, c_end jumps and jalr; one word per cycle; three-cycle jump bubble; random stalls |
| `tb_acc_wrapper` | both variants: APB set-up, six chunks through the FIFO, word and `dec_cmd` checks |
| `tb_ctrl_seq_top` | both paths end to end at the default sizes |
| `tb_sweep_workload` | complete linear and exponential sweeps through both paths, the exponential one also under 1 µs interrupts; throughput |

`tb_ctrl_seq_top` loads both memories through their ports. It runs a short
sweep (C1 C2 (C3 C4 C5 C6)×3 C7 C8) through the DMA, and a program with an
accelerator sequence through the command pipeline. The two output streams
are checked word by word.

The testbench counts every mechanism and fails if one never happened:

* the DMA losing arbitration;
* bursts;
* chunk switches without passing through Idle;
* the FIFO being full;
* radar back-pressure on both paths;
* both decompression tables;
* jumps, fjr and jalr;
* the Stall state and the CSR stall, set by writes to CSR 0x800 (its read value is checked every cycle);
* both locks;
* the interrupt bypass;
* wfi;
* the instruction fetch losing arbitration.

## Not included

* The main RISC-V core and its decoder changes for start_p, synch_p, the
  modified `addi` that loads the ASR. The pipeline CSR is included; the
  top has a plain write strobe, address and data port for it in place of
  the core's CSR file.
* The rest of the SoC.
* The radar modules.

The top-level ports stand in for all of these.
