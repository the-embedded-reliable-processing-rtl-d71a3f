# TERPS: a processor that survives near-continuous EMI by checkpointing every 128 cycles

Strong electromagnetic interference, for example RF coupled into the clock network, can corrupt almost every flip-flop in a processor at once. Hardening the whole core against that is impractical. Noticing that interference is *present* is easy, though. TERPS builds on that asymmetry. The hardware takes a checkpoint of the processor's precise state every few microseconds and stores it in a small, hardened **safe storage**. Whenever an EMI detector fires, it rolls back to a checkpoint that is known to be good. Rollback is cheap enough to do on every suspicion, false alarms included. Memory is kept consistent by holding stores back in **write buffers** until they can no longer be rolled back. Software never sees any of this, except for one interrupt handler that reconfigures I/O devices after each rollback.

This repository is synthesizable SystemVerilog for that system. It has a 16-bit five-stage core with precise interrupts, three write-buffer levels, a checkpoint latch, two-bank safe storage, the checkpoint/rollback controller, a memory controller and a 16450-style UART receiver. Self-checking testbenches come with it.

## Timing: FCLK, SCLK and the three instants

The core runs on FCLK. `sclk_gen` divides it into SCLK: one SCLK period is `DIV` = 128 FCLK cycles, low for 100 cycles and high for 28. Everything runs on FCLK, and the two SCLK edges are one-cycle strobes:

| instant | what happens |
|---|---|
| SCLK falling edge (*checkpoint*) | The core is frozen for one cycle. Its precise state, WB0 and WB1 are copied into the checkpoint latch. At the same time WB0→WB1, WB1→WB2 and WB2→memory controller are promoted, and WB0 is emptied. |
| SCLK rising edge, no EMI since the last rising edge | The latch is written into the *older* safe-storage bank, which then becomes the newer one. |
| SCLK rising edge, EMI seen (*decision*) | A rollback starts (see below). |

The 28-cycle high phase is this implementation's reading of the prototype's timing figures. With it, the worst-case age of a read before it is safe is 2·128 + 100 = 356 cycles, and a rollback takes 128 + 28 = 156 cycles. Change `SCLK_HIGH` and `DIV` together if you want other numbers.

## Why two banks and three write-buffer levels

The detector may report EMI up to one SCLK period late. The write into safe storage at a rising edge may itself be corrupted. So the newest checkpoint is always **speculative**, and only the one before it is trusted. A rollback therefore reloads the **older** bank (`ss_sel`). A checkpoint becomes trusted when the next one has been written without EMI being reported.

Stores follow the same two-checkpoint rule, which is why there are three buffer levels:

* WB0 holds the stores of the current interval.
* WB1 and WB2 hold the stores of the two previous intervals.
* Only WB2 is released to the memory controller, at the next checkpoint. By then no rollback can undo those stores.

A checkpoint holds WB0 and WB1 as well as the registers. After a rollback the reloaded buffers write their stores to DRAM again. This repairs any DRAM write that the EMI corrupted while it was being committed. Stores already in the memory controller are committed and are never rolled back.

Loads must see the stores that are still buffered. They search WB0, WB1, WB2, the memory controller's queue and then DRAM, and the youngest match wins.

## Rollback sequence (`ckpt_ctrl`)

1. **Decision edge R0.** `rollback_start` pulses. The core is held (`hold`, `rmode`), the checkpoint latched at the previous falling edge is discarded, and the safe storage drives the older bank (`ss_oe_n` low).
2. **Next rising edge R1.** The latch takes the safe-storage output (`latch_from_ss`). If EMI was reported again in between, the rollback starts over from step 1 and reads the same bank.
3. **Following falling edge.** `restore` pulses. The core reloads its PC, registers and control registers and squashes everything in flight. WB0 and WB1 reload from the latch and WB2 is emptied. Execution resumes. No checkpoint is taken at this edge.

From R0 to resume takes `DIV + SCLK_HIGH` = 156 cycles. After a rollback the restored bank stays the read bank until a newer checkpoint has been written. Repeated EMI therefore keeps reloading the same good state.

Forward progress needs enough quiet time. One event discards up to 356 cycles of work and costs 156 cycles of rollback, 512 in all, counted from the rising edge that acts on it. An event can wait up to 127 cycles for that edge. So, counted from the events themselves, periodic EMI must be more than 640 cycles apart. Even then, only one new checkpoint becomes trusted between events, so each event can keep just one interval of work. That interval can be empty. WB0 is reloaded with the stores it held at the checkpoint. If it was full, the core spends the whole first interval after the reload stalled. The store burst in the test program does exactly this with events every 640 cycles, and the program stops advancing. At 704 cycles and above it completes.

## The core and what "precise" means here

`cpu_core` is a classic IF/ID/EX/MEM/WB pipeline. Branches resolve in EX, results forward from MEM and WB, and a load-use hazard costs one bubble. The prototype's core is only described as a 16-bit DLX/MIPS-like five-stage machine, so the instruction set below is this design's own (`terps_pkg`):

| op | meaning | op | meaning |
|---|---|---|---|
| 0 ALU | rd = rs fn rt (ADD SUB AND OR XOR SLT SLL SRL) | 6 BEQ / 7 BNE | if rd ==/!= rs: pc += 1 + imm6 |
| 1 ADDI | rd = rs + imm6 | 8 JAL | rd = pc+1; pc += 1 + imm9 |
| 2 LI / 3 LUI | rd = imm9 / imm8 << 8 | 9 JR | pc = rs |
| 4 LW / 5 SW | rd ↔ mem[rs + imm6] | A ORI, F HALT | rd = rs \| imm6; halt (spins) |
| B RETI | pc = epc, ie = 1 | C EI/DI | ie = bit 0 |

Fields: `[15:12]` op, `[11:9]` rd, `[8:6]` rs, `[5:3]` rt, `[2:0]` fn or the low bits of an immediate. There are 8 registers and r0 reads as zero. Addresses are 16-bit word addresses.

Precision comes from committing everything in WB. The register write happens there, and so does a store's entry into WB0. The checkpoint PC is the PC of the oldest valid instruction in the pipeline, which is the next one to complete. Squashing the pipeline and refetching from that PC is then an exact rollback. A store sitting in WB that has not yet reached WB0 is forwarded to a load in MEM. When WB0 is full, the whole pipeline stalls until the next checkpoint empties it.

### Interrupts

The checkpoint includes two control registers besides the PC and the registers: `epc`, the interrupted PC, and `ie`, the interrupt enable. Interrupts are taken precisely too. When `ie` is set and an interrupt is pending, the core replaces the instruction in ID with an internal TRAP that carries that instruction's PC. Fetch continues at the vector. The TRAP sets `epc` and clears `ie` only when it reaches WB. A checkpoint therefore never holds a half-taken interrupt. No new TRAP is injected while a TRAP, RETI or EI/DI is still in the pipeline.

There are two sources:

* **Rollback interrupt**, vector 0x0080. Every state reload makes it pending, and it has priority. Its handler is the place where the operating system reconfigures devices after a rollback.
* **Device interrupt** `irq`, vector 0x0090. In the system it is the UART's receive interrupt.

## I/O: the baseline (unmodified UART) configuration

`uart_rx` behaves like a plain 16450 receiver. A frame is a start bit, 7 data bits, even parity and a stop bit. Each bit is decided by a majority vote of three samples. Its registers are memory-mapped:

| address | register |
|---|---|
| 0xFF00 | RxDATA |
| 0xFF01 | RxSTAT: data ready, overrun, parity error, framing error; writing 1 to bit 0 acknowledges the byte |
| 0xFF02 | CTRL: interrupt enable; bit 7 resets the receiver |

Reading RxDATA clears data-ready, exactly as the commercial part does. Because of this, a read that gets rolled back loses the byte. In this configuration a received byte is only safe once the read instruction is more than about 356 cycles old. I/O writes travel through the write buffers like memory writes, so they reach the device only after three checkpoints, when they leave WB2.

The test program is interrupt driven. Its UART handler saves two registers, reads RxDATA, stores the byte and sets a flag that the main program waits on. Its rollback handler re-enables the UART receive interrupt, which is this UART's entire configuration. It does not reset the receiver, because that would also drop a byte that has already arrived. In the system test, the handler reads RxDATA 7 cycles after the UART interrupt. The budget assumed for this delay is 40 cycles.

### Option: a UART without read side effects

`terps_top #(.UART_READ_CLEARS(0))` builds the receiver differently. Reading RxDATA leaves data-ready set, and the handler acknowledges the byte by writing RxSTAT instead. That write is an ordinary store. It reaches the UART only after it has passed all three write-buffer levels, when no rollback can undo it any more. Until then, a rolled-back handler simply reads the same byte again.

The cost is that the interrupt stays raised while the acknowledge is in flight, so the handler runs several times, 8 to 10 in the test. Each run stores the same byte, so the result is the same. `tb_terps_safeio` repeats the EMI of run D (below) against this UART, and the byte is kept.

A real device of this kind would also have to keep its state through EMI. That is a circuit property, and nothing here models it.

Two further options are not built. In one, the device state is checkpointed with the CPU. In the other, ECC and retransmission are added on the serial link.

## Files

| file | block |
|---|---|
| `rtl/terps_pkg.sv` | widths, buffer depth, address map, structs (`wb_level_t`, `cpu_state_t`, `ckpt_t`), ISA enums and encoders |
| `rtl/sclk_gen.sv` | FCLK→SCLK step-down and edge strobes |
| `rtl/ckpt_ctrl.sv` | checkpoint/rollback controller and bank bookkeeping |
| `rtl/cpu_core.sv` | 5-stage core with state export and reload |
| `rtl/write_buffer.sv` | one write-buffer level (instantiated three times) |
| `rtl/checkpoint_latch.sv` | CPU ↔ safe-storage holding register |
| `rtl/safe_storage.sv` | two checkpoint banks with output enable |
| `rtl/memory_controller.sv` | commit queue to DRAM / I/O, load path |
| `rtl/uart_rx.sv` | UART receiver |
| `rtl/terps_top.sv` | the system |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_terps_top` (whole system), `tb_terps_avail` (availability under periodic EMI), `tb_terps_intervals` (other checkpoint intervals) and `tb_terps_safeio` (UART without read side effects) |
| `tb/tb_prog_pkg.sv` | test program and its expected memory image |
| `tb/dram_model.sv` | DRAM model used by the system testbench |

The top leaves the following outside, as ports: the EMI detector (`sensor_in`, an analog RF sensor in the prototype), the DRAM (`dram_*`), the instruction memory (`imem_*`) and the serial line.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/terps_pkg.sv rtl/*.sv tb/tb_prog_pkg.sv tb/dram_model.sv tb/tb_terps_top.sv \
  --top-module tb_terps_top && ./obj_dir/Vtb_terps_top
```

For a unit testbench, list `rtl/terps_pkg.sv`, the block's file and `tb/tb_<block>.sv`. `tb_cpu_core` also needs `tb/tb_prog_pkg.sv`.

`tb_terps_top` runs at the default sizes and takes about a second. It runs the test program four times. The first two runs are:

* **Run A, no EMI.** It reports the checkpointing overhead: about 6.8 % on this store-heavy program. The figure is checkpoint freezes plus cycles stalled on a full WB0.
* **Run B, with EMI.** The events are:
  * one that overlaps a DRAM commit and is reported late, while the testbench corrupts the DRAM writes it overlaps;
  * one that strikes during a rollback;
  * one right after a rollback.

  These events are closer together than the spacing that guarantees progress (see the rollback section). That is deliberate: the close ones only repeat the rollback to the same trusted checkpoint.

In both runs the final DRAM image must match an independently computed one, including the byte received over the UART. The testbench also checks:

* checkpoint spacing;
* the 156-cycle rollback latency;
* that every mechanism occurred: checkpoints, safe-storage writes, rollbacks, a rollback restart, a repeated reload, a WB0-full stall, corrupted-then-repaired DRAM words, a UART frame, the UART handler and the rollback handler;
* the interrupt latency against the 40-cycle budget.

Two more runs test what this I/O configuration promises. A received byte is safe once it has been in the UART for 396 cycles. That is 356 cycles for the read to pass two checkpoints, plus a 40-cycle budget for interrupt latency and handler preamble.

* **Run C** injects EMI 400 cycles after the byte arrives. The byte must survive.
* **Run D** injects EMI 5 cycles after the handler reads RxDATA. The rollback returns to a state before the read, but the UART has already cleared data-ready. The byte must be lost, and the program must still be waiting 3000 cycles later. Devices with checkpointed state or side-effect-free reads remove this loss; they are not built here.

`tb_terps_avail` measures forward progress under periodic EMI at the default sizes. The program takes 1088 cycles undisturbed. With an event every S cycles, the share of time that goes into kept work is:

| S (cycles) | 704 | 768 | 1280 | 2560 |
|---|---|---|---|---|
| availability | 16.8 % | 27.0 % | 51.4 % | 68.0 % |

Each run must still halt with the exact memory image.

`tb_terps_intervals` builds three systems side by side, with checkpoint intervals of 64, 256 and 512 cycles. Their high phases are 14, 56 and 112 cycles, the same share of the period as 28 of 128. Each system runs the program with one EMI event. The checks are the exact memory image, the checkpoint spacing and a rollback time of `DIV + SCLK_HIGH`. The write buffers stay at 12 entries. At the long intervals the program's 16-store burst therefore waits a long time for a checkpoint to empty WB0. To run a long interval efficiently, raise `WB_DEPTH` in `terps_pkg` with it.

`tb_terps_safeio` runs the system with the side-effect-free UART, once without EMI and once with EMI 5 cycles after the handler's read. In both runs the program must halt with the exact image, including the byte.

`tb_cpu_core` also runs the interrupt-driven program on the core alone. It raises the device interrupt in the middle of the computation and rolls back at random, dozens of times, to snapshots taken at random.

## Departures and limits

* **Checkpoint transfer.** The WB2 hand-over and the latch copy take one frozen cycle. The prototype's 5–6 % overhead came partly from a longer transfer and from its own benchmark kernels, which are not available here.
* **Safe storage.** It is ordinary storage. Its EMI tolerance, which in the prototype comes from being a separate chip in an older process, is a physical property that RTL does not capture. The same holds for the controller, which in a real system must be built from hardened cells or run on a clean clock.
* **Reset.** Reset writes the all-zero reset state into both banks, so an early rollback restarts the program.
* **Own choices.** The SCLK duty cycle, the instruction set, the control registers, the interrupt vectors and priority, the register count, the UART register map and parity, and the single-clock implementation of the SCLK edges are this design's choices.
