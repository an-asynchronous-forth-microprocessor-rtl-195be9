# MSL16A: a minimal 16-bit Forth stack processor

MSL16A is a tiny processor for battery-powered embedded systems. It saves
power and memory in two ways.

- **Dense code.** It is a two-stack machine that executes Forth primitives
  directly. Most instructions are 4 bits long, and four of them are packed
  into one 16-bit memory word. Operands are implicit: they sit on the top of
  the data stack. A program therefore needs few memory fetches, and memory
  traffic is where an embedded system spends much of its energy.
- **No global timing.** The original chip is asynchronous. Each part
  signals when it has finished instead of waiting for a worst-case clock
  edge. An addition with a short carry chain finishes sooner than one with
  a long chain. A fast memory shortens the fetch, and a slow memory simply
  makes the fetch wait.

This repository holds a synthesizable SystemVerilog model of that
processor. It keeps the structure of the original: concurrent units that
only talk through request/acknowledge handshakes, two arbiters for the
shared resources, a carry-completion ALU, pointer-based stacks,
dual-rail/single-rail converters and C-element completion trees. It is
written as **clocked** logic. Every unit advances on one clock edge, but
none of them assumes a fixed latency of another. So the cycle count of an
instruction still depends on the instruction, its operands and the memory
speed, as it does in the self-timed original. Where a decision here is
this design's own, it is marked *design choice* below.

## Programmer's model

| Name | Width | Role |
|---|---|---|
| T | 16 | top of the data stack, held in its own register |
| DS | 32 × 16 | rest of the data stack; its top is the second operand of the ALU |
| RS | 32 × 16 | return stack, also usable as scratch (`>R`, `R>`) |
| WPC | 14 | word program counter |
| LPC | 2 | nibble counter: which of the four slots of the current word runs |
| psw | 16 | processor status word; an input port here |

### Instruction word

If bit 15 of a word is 1, the word is a **CALL** and bits 13..0 are the
target word address. Otherwise the word holds four 4-bit slots. Slot 0 is
bits 15..12 and slot 3 is bits 3..0. Because bit 15 selects CALL, slot 0
can only hold opcodes 0–7.

| Op | Name | Effect |
|---|---|---|
| 0 | NOP | nothing |
| 1 | AND | T := T & DS, pop DS |
| 2 | XOR | T := T ^ DS, pop DS |
| 3 | + | T := T + DS, pop DS |
| 4 | 0= | T := all ones if T = 0, else 0 |
| 5 | LIT | push T on DS, then load T (see below) |
| 6 | 2/ | T := T shifted right by one, sign kept |
| 7 | − | T := DS − T, pop DS |
| 8 | DUP | push T on DS |
| 9 | DROP | T := DS, pop DS |
| 10 | GOTO | if T ≠ 0, jump to T; in both cases T := DS, pop DS |
| 11 | R> | push T on DS, T := RS, pop RS |
| 12 | >R | push T on RS, T := DS, pop DS |
| 13 | @ | T := mem[T] |
| 14 | ! | mem[DS] := T, then T := DS, pop DS |
| 15 | SWAP | exchange T and DS |
| — | CALL | push the PC on RS, jump to the target |

LIT takes its operand from the low byte of the same word, so what it loads
depends on its slot:

- In slot 0, T := byte << 8. The rest of the word is skipped.
- In slot 1, T := byte. The rest of the word is skipped.
- In slot 3, T := psw.
- In slot 2, T := psw. This is a *design choice*; the original defines only
  slots 0, 1 and 3.

To build a full 16-bit constant, place `LIT hi` in slot 0 of one word,
`LIT lo` in slot 1 of the next word, and follow it with XOR.

### Addresses and control flow

These conventions are this design's reading of the original's example
program. They matter when you write code for it.

- **Fetch address.** A fetch reads `mem[WPC + 1]` and then increments WPC.
  WPC resets to 0, so the first word executed is at address **1**.
- **GOTO.** A GOTO with T = n continues at word **n + 1**. To jump to
  label `b`, load `b − 1`. A branch target of 0 is impossible, because
  T = 0 means "do not jump".
- **CALL.** A CALL pushes the address of the CALL word itself and continues
  at target + 1. The return sequence `R> GOTO` therefore resumes at the word
  after the CALL.
- **The LPC** returns to 0 after slot 3, after a LIT in slot 0 or 1, after
  a taken GOTO and after a CALL. The next word is then started.
- **Stack limits.** Both stacks are rings of 32 entries with no overflow or
  underflow detection. The 33rd push overwrites the oldest entry.
- **No interrupts.** There are no interrupts or exceptions.

## How an instruction flows

```
            +-----------+  word   +---------+ slot  +-----------+
 memory --->| fetch_unit|-------->| ir_unit |------>| exec_unit |--- T
   ^        |  (JR)     |         | IR, LPC |<------|           |
   |        +-----------+         +---------+ done/ +-----------+
   |          |    |                          skip    |  |  |  |
   |          |    +------- pc arbiter --- wpc -------+  |  |  |
   |          +------------ mem arbiter ------------------+  |  |
   +-- mem_if <---------------(address mux)                  |  |
                                          alu, DS, RS <------+--+
```

The machine is a two-stage pipeline: fetch and execute.

- **fetch_unit** fills JR, a one-word holding register, whenever JR is
  empty. So the next word is fetched while the current word's four
  instructions execute.
- **ir_unit** takes the word from JR and hands the execute unit one slot
  at a time.
- **exec_unit** runs each instruction and pulses `done` when it finishes.
  It adds `skip` if the rest of the word must be dropped.

### Who may touch the PC and the memory

Two resources are shared by the fetch side and the execute side. Each has
a two-way **arbiter**.

- **Memory port.** Fetches share it with `@` and `!`.
- **Word PC.** The fetch side increments it. A taken GOTO and a CALL
  overwrite it.

A fetch holds the PC arbiter from before it reads the address until the
PC has been incremented. When the execute side wins the PC arbiter, no
fetch can be half done. Then:

- **Taken GOTO.** While it holds the PC, the execute unit writes T to WPC
  and discards the word that was prefetched into JR (`flush`).
- **CALL.** The fetch unit recognises a CALL word as it arrives (bit 15).
  It then stops prefetching, because a word fetched after the CALL would
  come from the wrong place and would also move the return address. The
  execute unit pushes WPC onto RS, writes the target, and releases the
  fetch unit (`call_resume`).

No instruction needs both arbiters, so they cannot deadlock. When two new
requests arrive in the same cycle, the client that was *not* served last
wins (*design choice*). The original resolves a tie with an analogue
mutual-exclusion element and leaves fairness to how the processes use it.

### Execute timing

| Instruction class | Time in the execute unit |
|---|---|
| NOP, LIT, DUP, DROP, SWAP, R>, >R, GOTO not taken | 1 cycle |
| AND, XOR, 2/, 0= | 1 dispatch cycle, then the ALU's 1-cycle latency |
| +, − | 1 dispatch cycle, then max(1, ⌈L/4⌉) ALU cycles, where L is the carry chain length |
| @, ! | 1 dispatch cycle, then the memory arbiter and a full memory handshake |
| GOTO taken, CALL | 1 dispatch cycle, then the PC arbiter; the PC is written in the cycle it is granted |

Words are fetched in parallel with execution. A fetch stalls only when JR
is already full, during a CALL, or while `@`/`!` hold the memory.

## The ALU and its carry completion

The adder is a plain 16-bit ripple-carry chain, and its completion is
sensed rather than timed.

- Where the two operand bits below a position are equal, the carry into
  that position is known at once. Both 0 kills the carry; both 1
  generates one.
- Where the bits differ, the carry only passes along, and the position
  must wait for the carry from below.

The unit keeps a "known" flag and a value for each carry. It resolves
`CARRY_STEPS` positions of every waiting chain per clock, and it finishes
when all 16 carries are known. An addition therefore takes
max(1, ⌈L / CARRY_STEPS⌉) cycles, where L is the longest run of
"propagate" positions (operand bits differ) among bits 0..14.

- Subtraction is computed as DS + ~T + 1.
- 1 − 1 is the worst case: L = 15, which is 4 cycles with the default
  `CARRY_STEPS = 4`.
- A typical addition with chains of 4 bits or less completes in one cycle.
- `CARRY_STEPS` is a *design choice*. It stands in for the gate delay of
  four ripple stages per clock.

**0=** and the GOTO condition use a **quick-decision zero checker**. It
works on the dual-rail form of T, in which every bit has a "1" wire and a
"0" wire.

- It answers **non-zero** as soon as any bit's "1" wire is up.
- It answers **zero** only when every bit's "0" wire is up.
- A plain delay-insensitive checker would wait for all bits in both cases.

## Pointer stacks

Each stack (`pointer_stack`) is a ring of 32 `pointer_stack_element`
cells. Exactly one cell holds a **pointer** bit, and that cell is the top
of the stack.

- **Push.** The cell above the pointer takes the new data and the pointer.
- **Pop.** The pointer moves to the cell below.
- **Push and pop together.** They replace the top in place.

Nothing is ever shifted between cells. Only the pointed cell and its
neighbour do anything, so the energy and the time of an operation do not
depend on how full the stack is. Every cell drives zero except the pointed
one, so the top of the stack is the OR of all cell outputs. An assertion
checks that the pointer is always one-hot.

The original evaluated two other stack organisations: an eager stack and a
lazy stack, which shift data. They are not part of this design.

## Handshake primitives

These parts mirror the circuit style of the original chip.

| Module | What it does |
|---|---|
| `c_element` | Muller C-element: the output follows the inputs when all agree and holds otherwise |
| `completion_tree` | a tree of 4-input C-elements that merges many completion signals into one |
| `single_to_dual` | turns bundled single-rail data plus a strobe into dual-rail code (`rail1 = d & strobe`, `rail0 = ~d & strobe`) |
| `dual_to_single` | recovers the bits from dual-rail code; a completion tree reports when every bit is valid, and again when every bit has returned to empty |
| `zero_checker` | the quick-decision zero test described above |
| `arbiter` | two-way mutual exclusion with registered state |

## The memory port

`mem_if` is the only connection to memory. It uses **bundled data** with a
four-phase handshake:

1. The processor raises `mem_req`, with `mem_addr`, `mem_we` and
   `mem_wdata` stable.
2. The memory raises `mem_ack`. For a read, `mem_rdata` is valid with it.
3. The processor lowers `mem_req`.
4. The memory lowers `mem_ack`.

Read data enters through `single_to_dual`, using `mem_ack` as its strobe,
and leaves through `dual_to_single`. The access ends when the completion
tree reports every bit present. The interface takes the next request only
after the completion tree reports the bits empty again. Using the
converters on the read path is this design's arrangement of the parts the
original describes at its pins. An assertion checks the handshake order.

The address bus is 16 bits wide.

- Instruction fetches put the 14-bit word address on bits 13..0.
- `@` and `!` may use the full 16 bits.
- The memory itself is not part of the design.

## Top level

`msl16a` connects all of the above. Its ports:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous active-low reset |
| psw | in | 16 | processor status word, read by LIT in slot 2 or 3 |
| mem_req, mem_we | out | 1 | memory request and write enable |
| mem_addr, mem_wdata | out | 16 | address and write data |
| mem_ack | in | 1 | memory acknowledge |
| mem_rdata | in | 16 | read data, valid while `mem_ack` is high |
| t | out | 16 | the T register, for observation |

Shared constants are in `msl16_pkg`: `DATA_W = 16`, `WPC_W = 14`,
`STACK_D = 32`, the opcode enum and the instruction struct.

## Where this model departs from the original

- **Clocked, not self-timed.** Handshakes are level signals sampled on a
  clock, and C-elements and arbiters are registers. Relative timing
  (which unit waits for which) is kept; absolute delays are not.
- **Carry speed.** `CARRY_STEPS = 4` positions per clock is an assumed rate.
- **Program-counter conventions.** The fetch-address, GOTO and CALL
  conventions above are inferred from the original's example program and
  its simulation trace. They were not stated as rules.
- **GOTO with T = 0.** Here it pops DS into T, as the instruction table
  says. One process-level description of the original shows no pop in
  that case.
- **The `!` instruction.** It also moves DS (the address) into T and
  pops, so a following `@` reads back the value just stored. To continue
  with the item below, follow `!` with DROP.
- **LIT in slot 2.** It loads psw.
- **psw.** Its contents are not defined, so it is an input port.
- **Stacks.** They wrap silently.
- **Eager and lazy stacks.** The alternative stack designs, the FPGA
  version of the same instruction set, the pads and the layout are not
  modelled.
- **Example program.** The example program in the test bench differs from
  the original in two places:
  - It ends in a loop to itself instead of returning to its start, which
    would need a jump target of 0.
  - The words that the test GOTO jumps over are filled with instructions
    that must never run.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench ends
with a line `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_c_element`, `tb_arbiter`, `tb_single_to_dual`, `tb_dual_to_single`, `tb_zero_checker` | primitives against truth tables and random sequences, including mutual exclusion, tie-breaking and early zero/non-zero answers |
| `tb_alu` | all functions against a reference, and the cycle count of each addition against ⌈L/4⌉ |
| `tb_pointer_stack` | random push/pop/replace against a reference stack, with wrap-around |
| `tb_wpc`, `tb_ir_unit`, `tb_fetch_unit`, `tb_mem_if` | sequencing, skip, flush, CALL stall and the four-phase protocol, against a memory model with random wait states |
| `tb_exec_unit` | random instructions against an instruction-level model, with contention on both arbiters |
| `tb_msl16a` | the whole processor at default sizes, in two phases (below) |
| `tb_forth_primitives` | the instruction sequences that stand in for Forth words the set lacks (2\*, DDROP, OVER, EXIT, BRANCH, 0BRANCH taken and not taken), assembled, run on the processor and checked for their stack effect and size in bits |

`tb_msl16a` runs in two phases.

- **Phase 1.** It runs the example program: 1 − 1, XOR/DUP, `>R R>`, 0=,
  a taken GOTO, `!` and `@` at FF00h, and a CALL and its return. It
  checks the T values of the original's trace and checks that mem[FF00h]
  = 000Ah.
- **Phase 2.** It runs 20,000 random instructions in lock step with a
  reference model.
- **Mechanisms.** It counts each mechanism and fails if any never
  occurred:
  - prefetch discard;
  - CALL stall;
  - LIT skip;
  - psw load;
  - contention on each arbiter;
  - the worst-case carry chain;
  - multi-cycle additions;
  - memory wait states;
  - stack wrap;
  - every opcode.

`tb/msl16_mem_model.sv` is a behavioural memory with random wait states.
It is used only by the testbenches.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/msl16_pkg.sv tb/tb_msl16a.sv --top-module tb_msl16a -Mdir obj_tb
./obj_tb/Vtb_msl16a
```

Replace `tb_msl16a` with any other testbench name. The full-size
end-to-end run takes well under a second.
