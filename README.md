# LC-3 system: memory map, memory-mapped I/O, traps, interrupts and exceptions

The LC-3 is a 16-bit teaching processor with a 64k-word address space. This
RTL models the parts of the machine that all depend on one idea: **an address
kept in memory**. Each one works this way:

* A **TRAP** instruction carries only an 8-bit number. That number picks a
  word in the trap vector table, and the word holds the full 16-bit start
  address of the OS routine. The OS can move its routines by rewriting the
  table.
* **LDI** and **STI** use a pointer. They fetch a word at `PC+offset`, then
  use that word as the address of the data.
* **Interrupts and exceptions** also jump through the vector table. They are
  not instructions, though. The running program has no warning, so the
  hardware must save the program's state (PSR and PC) before it jumps. It
  saves them on a separate supervisor stack.
* **Device registers** are also just addresses, at the top of the map. The
  memory ignores an access there, and the device answers instead.

The system is a multi-cycle processor (`lc3_cpu`) on one bus with a 64k×16
memory (`lc3_memory`), an address decoder (`addr_decode`) and a keyboard
(`kbd_device`), all in `lc3_top`.

## The memory map

| Address range   | Size        | Contents                                               |
|-----------------|-------------|--------------------------------------------------------|
| x0000 – x00FF   | 2^8 words   | trap vector table                                      |
| x0100 – x017F   | 2^7 words   | exception vector table                                 |
| x0180 – x01FF   | 2^7 words   | interrupt vector table                                 |
| x0200 – x2FFF   | ~12k words  | OS: boot, trap, exception and interrupt routines, OS data, OS stack (grows down from x2FFF) |
| x3000 – xFFDF   | ~52k words  | user space: program text at x3000, data, user stack    |
| xFFE0 – xFFFF   | 32 words    | I/O device registers                                   |

The I/O page is exactly the set of addresses whose bits [15:5] are all ones.
`addr_decode` tests just that. On a hit it raises `io_sel`, and `addr[4:0]`
picks one of 32 device registers. `lc3_memory` then drops the request: it
does not write and does not answer. The device supplies the read data and the
ready signal. Because of this, the memory words behind xFFE0–xFFFF can never
be reached from the processor. Only the loader port can write them.

## Bus and timing

The processor uses MAR as the bus address and MDR as the write data. A
memory state raises `mem_en` (and `mem_we` for a write) and holds them until
`mem_ready`. Both the memory and the device answer one clock after the
request, so every access takes two cycles. An assertion in `lc3_cpu` checks
that a request and its address stay stable until ready.

Cycle counts with this memory:

| Sequence                                    | Cycles |
|---------------------------------------------|--------|
| fetch + decode (18, 33, 35, 32)             | 5      |
| ADD / AND / NOT / LEA                       | 6      |
| LD / LDR                                    | 9      |
| LDI                                         | 12     |
| TRAP                                        | 9      |
| interrupt entry, from state 18 to the first fetch of the handler | 13     |
| RTI                                         | 14     |

## The controller

The states use the numbers of the LC-3 state machine (`lc3_pkg::state_e`),
so a trace of the `state` output can be read against the usual LC-3 state
diagram. Every instruction starts in state 18 (MAR ← PC, PC ← PC+1). It then
reads the instruction word (33), loads IR (35) and dispatches on the opcode
(32).

* **TRAP** (15 → 28 → 30): R7 ← PC, MAR ← ZEXT(IR[7:0]), MDR ← Mem, PC ← MDR.
  A trap is a plain call: it changes neither the mode nor the stack. The
  calling code knows the jump is coming, so it can save what it needs first.
* **LDI** (10 → 24 → 26 → 25 → 27): MAR ← PC+off9, MDR ← Mem, MAR ← MDR,
  MDR ← Mem, DR ← MDR. **STI** follows the same path into the store states
  (11 → 29 → 31 → 23 → 16).
* **JSRR** writes R7 and reads its base register in the same cycle. `JSRR R7`
  therefore jumps to the old R7, which the usual compiled start-up code needs
  (`LDR R7, R4, #1` then `JSRR R7`).
* The stack pointer is R6. Push and pop are ordinary instruction pairs
  (`ADD R6,R6,#-1; STR Rx,R6,#0` and `LDR Rx,R6,#0; ADD R6,R6,#1`). Only the
  interrupt and RTI sequences move R6 in hardware.

## Interrupts, exceptions and saving state

This is the part that is easiest to get wrong, so here it is step by step.

**When the event is seen.** An interrupt request is tested in state 18. It is
accepted only if the device's priority level is greater than PSR[10:8]. At
that point PC has already been incremented, which is why PC−1 is pushed
below. Exceptions are found during execution. Opcode 1101 is illegal and is
caught in decode (state 32 → 13). An RTI in user mode goes to state 44. In
each case the vector ROM (`vect_rom`) maps the cause to a vector-table
address, and the controller loads it into Vect_Reg:

| Cause                   | Vect_Reg |
|-------------------------|----------|
| illegal opcode (13)     | x0100    |
| privilege violation (44)| x0101    |
| keyboard interrupt (18) | x0180    |

**Entry sequence**, shared by all three causes:

| State      | Transfer                                                                    |
|------------|-----------------------------------------------------------------------------|
| 49         | MDR ← PSR; PSR[10:8] ← 7; PSR[15] ← 0 (supervisor); if the old PSR[15] was 1: Saved_USP ← R6, R6 ← Saved_SSP |
| 37, 41     | push PSR: R6 ← R6−1, MAR ← R6−1, Mem ← MDR                                  |
| 43, 47, 48 | push PC: MDR ← PC−1, R6 ← R6−1, MAR ← R6−1, Mem ← MDR                        |
| 50, 52, 54 | jump: MAR ← Vect_Reg, MDR ← Mem, PC ← MDR                                   |

After entry the supervisor stack holds the PC at its top and the PSR just
above it. For the first event after reset these are at x2FFE and x2FFF. The
handler can read and change them with `LDR/STR Rx, R6, #0/#1`. The exception
handlers in the system test use this to step the saved PC past the faulting
instruction.

**Why the stack switch exists.** The handler cannot trust the user's R6.
Also, pushing state onto the user stack would let user code see or corrupt
it. So `sp_switch` keeps two registers:

* Saved_SSP holds the supervisor stack pointer. It resets to x3000, so the
  first push lands at x2FFF.
* Saved_USP holds the user's R6 while the supervisor runs.

The switch happens only when the event arrives in user mode. A nested event,
already in supervisor mode, keeps pushing on the same stack.

**RTI** (supervisor mode only):

| State      | Transfer                                                        |
|------------|-----------------------------------------------------------------|
| 8          | MAR ← R6 (or to state 44 if PSR[15] = 1)                        |
| 36, 38, 39 | pop PC: MDR ← Mem, PC ← MDR, R6 ← R6+1, MAR ← R6+1               |
| 40, 42     | pop PSR: MDR ← Mem, PSR ← MDR, R6 ← R6+1                         |
| 34         | if the popped PSR[15] = 1: Saved_SSP ← R6, R6 ← Saved_USP        |

The service routine must save and restore any general registers it uses.
The hardware saves only PSR, PC and the stack pointer.

PSR layout: bit 15 is the privilege bit (1 = user), bits 10:8 are the
priority, and bits 2:0 are the condition codes N, Z, P.

## Keyboard device

`kbd_device` has two registers in the I/O page:

* KBSR at xFFE0. Bit 15 is ready, and bit 14 is the interrupt enable. Only
  bit 14 can be written.
* KBDR at xFFE1 holds the last key.

A key event stores the character and sets ready. Reading KBDR clears ready.
The device requests an interrupt at priority 4 while ready and the enable
are both set.

## What is the LC-3's and what is this design's own

These follow the LC-3:

* the memory map and the I/O-page decode;
* the register transfers of TRAP, LDI, the interrupt entry and RTI, with
  their state numbers;
* PC−1 being pushed, and priority 7 on entry;
* vectors x0100 (illegal opcode) and x0180 (keyboard);
* the instruction encodings.

TRAP has the simple form shown above: it does not switch to supervisor mode.

These are choices of this design:

* **Vector x0101 for the privilege exception.** It is the next exception
  vector.
* **Exceptions use the interrupt entry sequence.** They also pass through
  state 49, so they raise the priority to 7 like an interrupt. The pushed PC
  is the address of the faulting instruction, because PC−1 is pushed. A
  handler that returns must advance it, or the instruction will fault again.
* **Memory handshake.** One wait state per access, and a loader write port
  on the memory.
* **Keyboard registers.** Their addresses, bit layout and priority 4 were
  picked inside the device page.
* **Reset state.** PC = x3000, PSR = x8002 (user mode, priority 0, Z set),
  Saved_SSP = x3000, and all general registers zero. The memory is not
  reset.
* **LEA sets the condition codes.**
* **A single interrupt source.** There is no interrupt arbiter.

Not modelled: any device other than the keyboard, and the machine control
register, so the processor never halts. The test programs end in a branch to
itself instead.

## Files

| File                    | Contents                                                     |
|-------------------------|--------------------------------------------------------------|
| `rtl/lc3_pkg.sv`        | word type, memory-map constants, opcodes, causes, state numbers |
| `rtl/addr_decode.sv`    | memory-map decoder                                           |
| `rtl/lc3_memory.sv`     | 64k×16 RAM, ignores I/O addresses, loader port               |
| `rtl/vect_rom.sv`       | cause → vector-table address                                 |
| `rtl/sp_switch.sv`      | Saved_SSP / Saved_USP and the R6 swap                        |
| `rtl/lc3_regfile.sv`    | R0–R7                                                        |
| `rtl/lc3_alu.sv`        | ADD, AND, NOT, pass                                          |
| `rtl/kbd_device.sv`     | keyboard registers and interrupt request                     |
| `rtl/lc3_cpu.sv`        | controller and datapath                                      |
| `rtl/lc3_top.sv`        | the system                                                   |
| `tb/<module>_tb.sv`     | one self-checking testbench per module                       |

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lc3_pkg.sv \
          tb/lc3_top_tb.sv --top-module lc3_top_tb -o sim
./obj_dir/sim
```

Put another testbench's name in place of `lc3_top_tb` to run that one.

`lc3_top_tb` runs the whole system at its default parameters, with the full
64k-word memory. It takes about 600 cycles. It loads:

* **A small OS:** the vector table, the keyboard service routine, two
  exception handlers and a halt loop.
* **A user program laid out the way a compiler sets one up.** R4 points to a
  global data block holding the stack bottom (xF000), the address of main,
  two integers and the address of a function.

The program then does the following:

1. It calls main and then the function through JSRR.
2. It enables keyboard interrupts by an STI through a pointer to KBSR.
3. It spins until the interrupt handler sets a flag. The testbench presses a
   key while it spins.
4. It runs an illegal opcode and a user-mode RTI.
5. It returns and executes TRAP x25.

The testbench checks the results in memory and on the stacks. It also counts
each mechanism and fails if any never occurred:

* the interrupt;
* both exceptions;
* TRAP, LDI, STI, JSRR and RTI;
* both directions of the stack switch;
* device accesses, and accesses the memory ignored;
* memory wait states.

`lc3_cpu_tb` drives the processor with a memory model in the testbench. It
checks the exact state sequences 49-37-41-43-47-48-50-52-54 and
8-36-38-39-40-42-34. It checks that the entry takes 12 cycles from state
49 to the handler's first fetch. It also checks that a priority-4 request is ignored
while the processor runs at priority 7.
