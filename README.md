# NSR: a decoupled 16-bit RISC processor

The NSR ("Non-Synchronous RISC") is a small 16-bit processor built as five
units that run independently and meet only at first-in first-out queues. The
original machine was a self-timed FPGA prototype. It had no global clock, and
its units talked over two-phase request/acknowledge channels. This
SystemVerilog keeps that architecture: the same units, the same queues and the
same instruction set. It renders every channel as a clocked valid/ready
handshake, so the design can be simulated with Verilator and synthesized like
any other synchronous design.

The main idea is **decoupling**. Nothing in the machine waits for a fixed
number of cycles. Instead, values that one unit makes for another go through
a queue, and a consumer that finds its queue empty simply waits:

* A compare instruction puts one bit into the **CC-Queue**. A later
  conditional branch, any number of instructions further on, takes one bit
  from it.
* `SJMP` puts a computed target into the **Jmp-Queue**. A later `JMP` takes
  it.
* `LDA`/`STA` put an address into the **Address Queue**. Data reach memory by
  writing register R1 (which feeds the **Store Data Queue**). Data come back
  by reading R1 (which drains the **Load Data Queue**).

Delay slots, load delays and pipeline interlocks all become "wait until the
queue has something". No unit has explicit pipeline control.

## Units and the queues between them

```
             +--------------------- Jmp-Queue (1) -----------------+
             |   +----------------- CC-Queue (8) ----------------+ |
             v   v                                               | |
  memory <-> IF --(2)--> ID --(2)--> EX ---------------------------+
    ^        ^            |           ^  |--(1) results--> RF      |
    |        |            +--(2)--> RF --(2) operands--> EX        |
    |        |                        ^                            |
    |    arbiter <--> MEM: AQ (4), SDQ (4) <-----------------------+
    +------------------    LDQ (4) -----> RF (reads of R1)
```

Numbers are queue lengths, the defaults of the `nsr_top` parameters. The
register file also holds a 2-entry destination queue.

| unit | module | what it does |
|---|---|---|
| IF, instruction fetch | `nsr_if` | Holds the PC and fetches one word per memory access. Executes `JMP` and `BCND` itself and drops them. Sends `MVPC` followed by the computed PC value. Passes every other instruction on. |
| ID, instruction decode | `nsr_id` | Sends a 14-bit *usage word* to RF (which registers to read and write). Sends a one-hot 16-bit *operation word* to EX (what to compute and where the result goes). Some instructions also get one extra word. |
| RF, register file | `nsr_rf` | A source process sends operands to EX under a scoreboard. A result process writes EX results back. |
| EX, execute | `nsr_ex` | Collects 0-2 operands over one 16-bit path and computes. Sends the result to any mix of RF, AQ, SDQ, Jmp-Queue and CC-Queue. |
| MEM, memory interface | `nsr_mem` | Holds AQ, SDQ and LDQ. Runs the memory cycles in address-queue order. |
| memory arbiter | `nsr_arbiter` | A token passed between IF and MEM shares the single memory port between them. |
| queues | `chan_fifo` | Every queue above. |
| debug | `nsr_step_gate`, `nsr_busmon` | Step gates, pending-request lights and a hex bus display. |

## Instruction set

Each instruction is one 16-bit word: opcode in bits 15:12, then `Rd` (11:8),
`Ra` (7:4) and `Rb` (3:0).

| opcode | instruction | effect |
|---|---|---|
| `1111` | `STA Rd,Ra,Rb` | `Rd`, AQ (store) ← Ra + Rb |
| `1110` | `LDA Rd,Ra,Rb` | `Rd`, AQ (load) ← Ra + Rb |
| `1101` | `SJMP Rd,Ra,Rb` | `Rd`, Jmp-Queue ← Ra + Rb |
| `1100` | `ADD` | Rd ← Ra + Rb |
| `1011` / `1010` / `1001` / `1000` | `XNOR` / `XOR` / `OR` / `AND` | Rd ← Ra op Rb |
| `0111` | `MVPC Rd,off8` | Rd ← address of the MVPC + sign-extended off8 |
| `0110` | `SHLL` / `SHRL` / `SHRA Rd,Rb` | Rd ← Rb shifted by one bit. Bits 7:4 are `0001` (left), `0010` (right logical) or `0100` (right arithmetic). |
| `0101` | `SEQ`/`SGT`/`SGE`/`SNE Ra,Rb` | CC-Queue ← comparison. Bits 11:10 are `00` EQ, `01` GT, `10` GE, `11` NE. |
| `0100` | `SUB` | Rd ← Ra − Rb |
| `0011` | `MVIL Rd,v8` | Rd ← {00, v8} |
| `0010` | `MVIH Rd,v8` | Rd ← {v8, 00} |
| `0001` | `BCND off12` | Takes a bit from the CC-Queue. If it is 1, PC ← address of the BCND + sign-extended off12. Otherwise PC ← PC + 1. |
| `0000` | `JMP` | PC ← head of the Jmp-Queue |

The registers fall into three groups:

* R0, R14 and R15 always read 0, 1 and −1. Writes to them do nothing.
* R1 is the memory port described above.
* R2–R13 are ordinary registers.

Execution starts at address 0. A program normally ends with a `JMP` that no
`SJMP` has fed. The machine then waits forever, which is its way of halting.
The same wait is a deadlock when it happens by mistake. For example, reading
R1 before any `LDA` waits forever for data that will never come.

## What travels on each channel

**IF → ID** carries instruction words. After an `MVPC` comes one more word,
the computed PC value.

**ID → RF**: the usage word, `{dest[13:10], srcA[9:6], vA[5], srcB[4:1], vB[0]}`.
`dest` is 0 when no register is written. That covers Rd = R0, and also
Rd = R1, because such a result goes to the store data queue directly. A
source is used only if its valid bit is set. Register 0 is a legal source,
so the field alone cannot mean "none". A shift sends its single source as
source B.

**ID → EX**: one operation word, with one bit per instruction class:

| bit | 15 | 14 | 13 | 12 | 11 | 10 | 9 | 8 | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| class | STA | LDA | SJMP | ADD | XNOR | XOR | OR | AND | MVPC | Shift | SetCC | SUB | MVIL | MVIH | R1 | R0 |

Bit 1 sends the result to the store data queue. Bit 0 discards it. With
neither set, the result goes to RF. Compares always set bit 0. Four classes
get one extra word after the operation word:

* MVIL/MVIH: the 8-bit value in bits 15:8.
* Shift: the shift code in bits 15:12.
* Compare: the condition in bits 15:14.
* MVPC: the PC value from IF, unchanged.

**RF → EX** carries operands on one 16-bit path. With two sources, A comes
first, then B.

**EX → MEM**: AQ entries are `{store, addr[15:0]}`. SDQ entries are data
words.

## The register file scoreboard

This is the part that keeps the decoupled pipeline correct, so it repays a
careful read (`rtl/nsr_rf.sv`).

The RF runs ahead of EX. It takes usage words as fast as ID produces them and
sends operands into the RF→EX queue, while EX may still be several
instructions behind. To avoid reading a stale value, each register has a
scoreboard bit. The source process handles each usage word in three steps:

1. **Source A, then source B** (each only if valid).
   * For R1, it takes a word from the load data queue, waiting if that queue
     is empty. R1 has no scoreboard.
   * For R0, R14 and R15, it sends the constant.
   * For any other register, it waits until the register's scoreboard bit is
     clear, then sends the value.
2. **Destination** (if non-zero). It waits until that register's scoreboard
   bit is clear. It then sets the bit and pushes the register number into the
   destination queue.
3. It takes the next usage word.

The result process pairs results with destinations. When a result from EX
and a register number at the head of the destination queue are both present,
it writes the register and clears its bit.

Two rules follow:

* An instruction reads its sources before it claims its destination. So
  `ADD r2,r2,r14` reads the old r2.
* A later reader of r2 waits until the new value is written.

A second claim on a register that is still claimed also waits (step 2). That
keeps the destination queue and the result stream in the same order. EX sends
results to RF only for instructions whose usage word had a non-zero
destination, and it does so in program order, so the i-th result always
belongs to the i-th queued destination.

## Memory ordering and the arbiter

There is one Address Queue, and MEM serves only its head:

* A **load** at the head starts a read once the load data queue has room. The
  word read goes into that queue.
* A **store** at the head waits for a word at the head of the store data
  queue, then writes it.

Loads and stores therefore reach memory in program order. A load can never
overtake an earlier store. `STA r1,Ra,Rb` puts its sum into both AQ (as the
address) and SDQ (as the data). `ADD r1,r1,r1` takes two loaded words and
stores their sum.

IF and MEM share one memory port. A single token moves between them:

* A side that holds the token and is requesting keeps it for exactly one
  memory cycle, then passes it on.
* A side that is not requesting passes it on at once (one clock per hop).

Under load, accesses therefore alternate fetch, data, fetch, data. Reset puts
the token at IF.

The memory port (`sram_*` on `nsr_top`) is word-addressed, 64K × 16. A
request (address, write flag, write data) is held until a one-cycle
`sram_ack`, and that ack carries the read data. The memory itself, and the
delay that times its cycle, are outside the design. The testbenches use
`tb/nsr_sram_model.sv`.

## Debug features

The original board could freeze and single-step the machine, and it had
lights showing which unit a deadlock was stuck in. `nsr_top` keeps these:

* `dbg_hold[i]` holds the incoming channel of a unit: bit 0 ID, 1 EX, 2 RF
  usage, 3 MEM address, 4 IF fetch. While held, each one-cycle pulse on
  `dbg_step[i]` lets exactly one transfer through.
* `dbg_led[4:0]` lights while a request at one of those gates is not taken.
  `dbg_led[5]` and `dbg_led[6]` show where the token is (MEM, IF).
* `dbg_sel` selects a bus to show as four hex digits on `dbg_seg`, with
  segments a–g in bits 0–6, active high:

  | `dbg_sel` | bus |
  |---|---|
  | 0 | IF→ID |
  | 1 | ID→EX |
  | 2 | ID→RF |
  | 3 | RF→EX |
  | 4 | EX→RF |
  | 5 | memory address |
  | 6 | memory data |
  | 7 | PC |

## Timing of this implementation

Every unit is a small state machine. A word moves on a clock edge where
valid and ready are both high. A queue's `in_ready` means "not full", so
ready never depends combinationally on the reader, and a length-1 queue
passes a word every other cycle. Fetch reads one word at a time, with no
prefetch.

The benchmark kernels run with a 2-cycle memory. They take these numbers of
clocks per executed instruction (`tb_nsr_kernels` prints them):

| kernels | clocks per instruction |
|---|---|
| ALU kernels (`ADD0`–`ADD5`, `OR0`, `OR1`) | 6.0, bound by fetch |
| compare + branch, `MVPC`/`SJMP`/`JMP` | 7.0 |
| memory kernels | 6.5–9.0 |

The original self-timed machine ran these kernels at 1.10–1.34 million
instructions per second. Clock rates do not map onto that figure.
The ranking differs too. In the self-timed machine the `SJMP`/`JMP` loop
was the fastest kernel and the ALU kernels came next. Here every instruction
costs at least one memory fetch, so kernels that only pass instructions on
are the fastest, and anything that waits on another queue costs extra
clocks.

## Where this design departs from, or fills in, the original

* **Clocked channels.** The two-phase bundled-data channels and micropipeline
  queues (C-elements, transition latches) become clocked valid/ready
  handshakes and register FIFOs. Behaviour at the instruction level is the
  same. Timing is not comparable.
* **Fetch bus.** The original instruction bus multiplexed address and opcode
  on 16 wires. Here they are separate, with one request/acknowledge pair.
* **Register file and MEM in one piece.** Each was split over two 8-bit-slice
  chips with a master/slave pin. Here each is one 16-bit unit.
* **Arbiter details.** The token arbiter's gate-level form is not reproduced.
  In the original a request could be missed on the first pass of the token and served on the second.
  Here a request present when the token arrives is served on that pass.
* **Choices where the original is silent:**
  * BCND and MVPC offsets are relative to the instruction's own address.
  * `SGT`/`SGE` are signed.
  * Shifts move by one bit.
  * Extra words are left-aligned as described above.
  * Registers reset to 0.
  * A load starts only when the load data queue has room.
  * The placement of the step gates and the step-pulse mechanism.
* **Queue lengths** follow the original's queue map: IF→ID 2, ID→RF 2, ID→EX
  2, RF→EX 2, EX→RF 1, CC-Queue 8, Jmp-Queue 1, destination queue 2,
  AQ/SDQ/LDQ 4. Lengths affect speed only, never results.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_chan_fifo` | Random traffic against a reference queue. |
| `tb_nsr_if` | Branch and jump targets, the MVPC word, the fetch address sequence, and a stall on an empty Jmp-Queue. |
| `tb_nsr_id` | One instruction of every class, with random back-pressure. |
| `tb_nsr_ex` | 3000 random operations, with results checked per destination. |
| `tb_nsr_rf` | Constants, R1 reads, scoreboard holds, and a random run against a reference register file. |
| `tb_nsr_mem` | Store waits for data, load-after-store, a full load queue, and random loads and stores. |
| `tb_nsr_arbiter` | Data, and strict alternation under contention. |
| `tb_nsr_step_gate`, `tb_nsr_busmon` | The debug gate and the segment patterns. |
| `tb_nsr_top` | The whole processor at default sizes: a feature program, the original Fibonacci program, and a single-stepped run. |
| `tb_nsr_kernels` | The 21 benchmark kernels, in loops of about 1000 instructions. |

In `tb_nsr_top` and `tb_nsr_kernels`:

* Registers and all of memory are compared with a reference instruction-set
  model (`tb/nsr_tb_pkg.sv`). That package also holds assembler helpers.
* `tb_nsr_top` counts each mechanism and fails if one never happens: queue
  stalls, a full CC-Queue, taken and not-taken branches, jumps, MVPC,
  scoreboard holds, R1 waits, stores waiting for data, memory-unit grants and
  discarded results.

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/nsr_pkg.sv tb/nsr_tb_pkg.sv \
    tb/tb_nsr_top.sv --top-module tb_nsr_top -Mdir obj_top -o sim
./obj_top/sim
```

Swap the testbench name for any other test. The unit tests need only
`rtl/nsr_pkg.sv` and their own file. Any run finishes within seconds.

## Not included

* The system SRAM and its timing delay line: a behavioural model lives in
  `tb/`.
* The host PC and prototype-board logic that load programs.
* The two-phase macro library of the original.
* The signal-level protocol of the multiplexed fetch bus, which is not known.
