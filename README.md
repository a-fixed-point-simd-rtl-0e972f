# PULSE: a 16-bit fixed-point SIMD array processor in SystemVerilog

PULSE is a small SIMD machine built for image and video work such as block-matching motion estimation, the 8x8 DCT and small 2-D filters. One controller fetches a 64-bit instruction each cycle and broadcasts it to four processing elements (PEs). Each PE has its own registers, its own memories and its own arithmetic. Neighbouring PEs are joined by two 16-bit shift-register chains and by a 32-bit accumulate chain. Chips chain end to end, so four chips behave as one 16-PE array that runs a single instruction stream.

The RTL here models one chip (`pulse_chip`) and the four-chip array (`pulse_system`, the top). The host processor, glue logic, DRAMs and oscillator of a complete board are outside the RTL. Their signals are ports of the top.

## The machine at a glance

| Part | Size | Module |
|---|---|---|
| PEs per chip | 4 | `pe_array`, `pe` |
| Register files per PE | 2 × 32 words × 16 bit (regA, regB) | `pe_regfile` |
| Data memories per PE | 2 × 256 words × 16 bit (memA, memB) | `pe_mem` |
| Modulo counters per PE | 4: read and write counters for each memory (mcar, mcaw, mcbr, mcbw) | `mod_counter` |
| Multiplier-adder | signed 16×16 + 32 | `pe_madd` |
| Accumulator | 33-bit inside, 32 bits visible, sticky overflow flag, saturation modes | `pe_accum` |
| Barrel shifter | 32 bits; shl, shr, sar, rol | `pe_shifter` |
| ALU | 3 operands; add/sub/abs/logic, max, min, med, rank, clip, coring | `pe_alu3` |
| Chains | north and south, 16 bit, one stage per PE | `comm_chain` |
| Program memory | 256 × 64 bit, or an external 64-bit program bus | `prog_mem` |
| Constant memory | 256 × 16 bit, a broadcast operand | `const_mem` |
| Address ports | 2 × 24 bit, each driven by a modulo counter (mccr, mccw) | `addr_ports` |
| Controller | loops, calls, branches, activity mask, if/else | `pulse_ctrl` |
| Host interface | 10 registers of 32 bits | `cpu_if` |

All shared types and the instruction encoding are in `pulse_pkg`.

## The instruction word

Every instruction is 64 bits. A single PE instruction holds one computation plus several "parallel" data moves that run in the same cycle. For example, one word can compute `ra3 = |memA[mcar] - memB[mcbr]|` while it also shifts the north chain, reads external memory and copies a chain stage into memory. The original machine's mnemonics are kept. Their binary layout is this design's own:

| Bits | Field | Meaning |
|---|---|---|
| 63:58 | `opc` | operation (`opc_e` in `pulse_pkg`) |
| 57:51 | `dst` | destination operand code |
| 50:44 | `s1` | source 1 |
| 43:37 | `s2` | source 2 |
| 36:30 | `s3` | source 3 (third ALU operand, or the 32-bit addend of MADD) |
| 29:27 | `fwd` | forward a chain stage into memory: [2] enable, [1] north/south, [0] memA via mcaw / memB via mcbw |
| 26 | `nsr` | shift the north chain by one PE |
| 25 | `ssr` | shift the south chain by one PE |
| 24 | `io_rd` | external read at address port 0 (mccr); the data enters the north chain input |
| 23 | `io_wr` | external write at address port 1 (mccw); the data is the south chain output |
| 22:19 | `mstep` | signed post-step for modulo-counter memory operands |
| 18:16 | `aux` | condition code for IF; register select for LDCR |
| 15:0 | `imm` | immediate, direct memory address, branch target, loop count or constant address |

Operand codes (7 bits) are the same for sources and the destination:

| Code | Operand |
|---|---|
| 0–31, 32–63 | regA[n], regB[n] |
| 64, 65 | memA[imm], memB[imm] (direct) |
| 66, 67 | memA[addra], memB[addrb] (register indirect) |
| 68, 69 | memA / memB through the modulo counters: mcar/mcbr when read, mcaw/mcbw when written; each access steps its counter by `mstep` |
| 70 | the immediate |
| 71, 72 | this PE's north / south chain stage (written as a destination, it loads the stage) |
| 73, 74 | low / high half of the saturated accumulator |
| 75, 76 | the memory address registers addra, addrb |
| 77 | constant memory word `imm[7:0]` (the same value in every PE) |
| 78 | PE index in the whole array |
| 79, 80 | as `s3` only: the previous PE's accumulator (the accumulate chain), or this PE's own accumulator |
| 81 | zero |

Two formats differ from the layout above:
- `LDIAMC` sets one PE memory counter in every PE: [57:56] selects the counter, followed by start, min, max and stride, one byte each.
- `LDEAMC` sets one field (min, max, stride or start, chosen by [17:16]) of both address-port counters. The value for mccr is in [57:34], and the value for mccw is in {[33:26], imm}.

`pulse_pkg::enc()`, `enc_ldiamc()` and `enc_ldeamc()` assemble words. The testbenches write their programs with them.

## Pipeline and timing

A PE runs a four-stage pipeline: read, execute, execute, write. The operands are read in the issue cycle t, and the result is written at the end of t+3. There is no interlock and no forwarding. The first instruction that sees a result is the one issued at t+4, so dependent code needs three instructions or `nop`s between the producer and the consumer. This is the `#3 nop` pattern of PULSE assembly, and the testbench programs follow it.

Some operations act in the issue cycle:
- Chain shifts (`nsr`, `ssr`), the forward (`fwd`), external I/O and counter post-steps take one cycle.
- Accumulating operations (`MACC`, `MADDACC`) and accumulator shifts read the accumulator at write-back time. A chain of `MACC`s can therefore issue back to back, with one product per cycle.

The controller issues an instruction in the same cycle that it fetches it. A branch, `DBR` or `CALL` takes effect on the next fetch, with no delay slot. A `PUSH n … DBR label` loop therefore costs one extra instruction per pass.

External memory reads have a one-cycle latency. The word addressed by `io_rd` appears on the north chain input in the next cycle, so the usual input loop is `nsr || io_rd` repeated, followed by `fwd` into memory. `tb_pulse_system` runs this with 16 PEs.

## Moving data: chains, forward, I/O

Each chip's north chain runs from port 1 through PE0…PE3 to port 3. The south chain runs from port 2 to port 4. One `nsr` moves every stage one PE along and takes a new word from the input port. A PE can:
- read its own stage as an operand (`NPORT`, `SPORT`);
- overwrite its stage as a destination, which wins over a shift in the same cycle;
- copy its stage into memory with `fwd`, at the memory's write counter.

A reduction over the array is therefore: load the partial result into the south stage, then repeat `ssr` with `add` of `SPORT` (see the distortion sum in `tb_pulse_system`).

The accumulate chain feeds each PE's saturated accumulator into the next PE's `CHAIN` operand. `MADD x, y, CHAIN` computes `x*y + acc[i-1]` in one step.

## Accumulator, overflow and saturation

The multiplier-adder produces a 33-bit sum. The accumulator keeps 33 bits and sets a sticky overflow flag when its value leaves the signed 32-bit range. `CLRACC` zeroes the accumulator and clears the flag; `CLROVF` clears only the flag, so a program can test a block of work for overflow without losing the running sum. What the PE reads back (`ACCL`, `ACCH`, `CHAIN`) is limited by the mode that `LDCR` sets:
- no saturation: the value wraps to 32 bits;
- signed: [−2³¹, 2³¹−1];
- unsigned: [0, 2³¹−1].

The host reads every PE's overflow flag through the host interface.

## Conditional execution

All PEs run the same instruction. The controller decides which PEs may write, in two ways:

- **Activity mask.** `LDCR aux=0, imm=mask` sets `acm`. A 1 bit switches that PE off, so `1110b` leaves only PE0 running.
- **if / else / restore.** `IF s1 ? s2` compares in every enabled PE, saves the current enable set on a stack and keeps only the PEs where the compare held. `ELSE` switches to the PEs of the saved set where it failed. `RESTORE` returns to the saved set.

`BPA label` branches if any PE is still enabled. Together with a one-PE mask, this turns one PE's condition into a program branch. A branch out of a hardware loop must be followed by `POP`, which drops that loop's entry from the loop stack.

A disabled PE issues nothing: no write, no counter step and no forward. An instruction already in its pipeline still completes. Chain shifts and I/O belong to the chip, so they happen regardless of the mask.

## Cascading chips

`pulse_system` puts `NCHIPS` (4) chips in a line:
- Each chip's port 3 and port 4 drive the next chip's port 1 and port 2.
- The accumulate chain runs on across chip borders.
- Every chip fetches the same word from the common external program bus, which chip 0's program counter addresses.
- Each chip gets a chip index, so the PE index operand counts 0…15 across the array.
- The host bus has one select line per chip. A write reaches every selected chip, so a program or coefficient table can be broadcast. A read returns the lowest selected chip.
- Local memory connects to chip 0's address ports and north input, and to the last chip's south output.

## Host interface (`cpu_if`)

| Addr | Register |
|---|---|
| 0 | CTRL: bit 0 start (pulse), bit 1 fetch from the external program bus |
| 1 | STATUS: bit 0 running, bit 1 halted, bit 2 interrupt pending (write 1 to clear), bits 31:16 pc |
| 2 | PM_ADDR: program memory load address |
| 3 / 4 | PM_LO / PM_HI: writing PM_HI stores the 64-bit word and increments PM_ADDR |
| 5 / 6 | CM_ADDR / CM_DATA: constant memory load; writing CM_DATA increments CM_ADDR |
| 7 | START_PC |
| 8 | CYCLES run since the last start |
| 9 | per-PE overflow flags |

The `INT` instruction raises `irq`, which stays high until the host clears it. `HALT` stops the controller.

## Departures from the original chip and open points

- **Encoding.** The original's instruction set is known only through its mnemonics. The bit layout, the operand codes and the opcode numbers here are new.
- **Read ports.** The original register files have one read and one write port, and its memories are single-ported. Here each register file and memory has three read ports, so any three operands can be read in one cycle. That is simpler to program, but larger.
- **Data ports.** The four data ports are plain synchronous 16-bit ports. The asynchronous and pseudo-synchronous modes, and compatibility with the host DSP's communication ports, are not modelled.
- **IF timing.** IF evaluates its compare on operands read in its own issue cycle. The mask applies from the next instruction, with no wait cycles.
- **Guessed semantics.** Coring (`COR`) returns 0 when s1 lies in [s2, s3] and s1 otherwise. `CLIP` limits s1 to [s2, s3]. The exact definitions of these two operations are this design's own.
- **Instruction groups not modelled.** The original also has vector instructions and an `stc` one-cycle instruction. Their function is not defined well enough to build, so they are not included.
- **Index ranking.** The original ALU is described as also returning rank indices. Its output format is not given, so only the value rank (max, med, min to three registers) is built.
- **Stacks.** The loop, call and if stacks are 4 deep. Overflowing them is an assertion failure in simulation.
- **Performance limits.** Four chips do not give real-time motion estimation at 768×480 and 30 frames/s. Software estimates for that workload call for about 68 chips, and for real-time DCT about 19. The array here is the four-chip configuration.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/pulse_pkg.sv tb/tb_pulse_system.sv \
          --top-module tb_pulse_system -Mdir obj_sys -o sim
obj_sys/sim
```

Replace `pulse_system` with any block name to run that block's test. The remaining lint warnings are for unused package constants and signals, and for the asynchronous reset that the controller's stack assertions use.

- `tb_pulse_system` runs the full four-chip array at its default size, and finishes in a few seconds. It loads 128 pixels through the chains (an 8×8 block and an 8×8 candidate) and computes the block distortion in a subroutine. It sums the distortion across 16 PEs with the south chain and writes it out. It marks PEs with if/else and `BPA`, computes a dot product with the constant table, takes one accumulate-chain step across chip borders, saturates the accumulators, clears the overflow flag alone and overflows again, leaves a loop early with `BPA` and `POP`, and ends with an interrupt. It counts each of these mechanisms and fails if one never happened.
- Three workload testbenches run complete algorithms on the four-chip array:
  - `tb_motion_search` searches all 81 positions of an 8×8 block in a 16×16 area. Each PE owns one horizontal displacement and keeps its best match with if/restore. It takes about 7000 cycles.
  - `tb_dct8x8` computes the 2-D DCT of two 8×8 blocks. The 64-entry cosine table is in the constant memory, and the column pass reads the row results back transposed through the address-port stride. The results match a floating-point DCT to within rounding.
  - `tb_conv3x3` filters a 258-column image band with a 3×3 kernel into 256 output columns. It works 16 columns at a time, one per PE, at about 6 cycles per output pixel. Input, compute and output are not overlapped.
- `tb_pulse_chip` loads a program through the host interface into one chip's program memory, and checks the results and the cycle count.
- `tb_pulse_ctrl` checks the controller's pc trace cycle by cycle for loops, calls, branches, the if/else/BPA paths and leaving a loop with `POP`.
- `tb_pe` checks the pipeline latency (a result visible four issues later) and the PE's operations.
- The remaining testbenches check their units against reference models: exhaustive or random operands for the ALU, shifter, multiplier and accumulator, and full address sweeps for the memories.

To write a program, build an array of words with `enc()` as the testbenches do. Then either load it through PM_LO/PM_HI, or drive it on `prog_data` and set CTRL bit 1.
