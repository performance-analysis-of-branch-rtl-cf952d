# An 8-bit pipelined processor with a two-bit branch prediction unit

In a pipelined processor, a branch's direction and target are not known until it
reaches the execute stage. The fetch stage has to wait that long or guess. This
design is a small 8-bit RISC processor built to measure what a branch
prediction unit saves. The unit has three parts:

* a **branch target buffer (BTB)**: eight entries, each holding a branch
  instruction's 16-bit address and its 16-bit target (32 bytes in all);
* a **pattern history**: one two-bit state machine per BTB entry (strongly not
  taken, weakly not taken, weakly taken, strongly taken);
* **selection logic**: it picks the next fetch address. This is the BTB target
  when the branch hits and its state machine says "taken". Otherwise it is the
  sequential address.

The same RTL also builds without the unit (`USE_BPU = 0`), so both versions
can run the same program. They give identical results but different cycle
counts. A 32-bit counter, `cycle`, records how many clock cycles a program
took. On the FPGA, the count is shown on the board's character LCD and any of
four registers can be shown on the LEDs.

The structure, the BTB size and organisation, the four-state predictor and the
branch latencies come from a published design for a Virtex-5 FPGA (a
"processor with branch prediction unit" evaluated against one without it).
That source does not give the instruction set, the register count, the stack
or the display driver. For those, this RTL makes its own choices, listed in
the last section.

## How a branch moves through the pipeline

The core has three stages:

* **fetch (IF)**: reads instruction memory at `pc`;
* **decode (ID)**: decodes the instruction and looks it up in the BTB;
* **execute (EX)**: reads the registers, runs the ALU or the data memory, and
  writes the result back in the same cycle.

An ordinary instruction takes one cycle in execute. Because reading and
writing happen in the same stage, no operand bypass is needed.

Here, an instruction's *latency* is the number of cycles from the cycle it
enters execute to the cycle the next instruction on the correct path enters
execute. The testbenches measure exactly this number.

| situation | what the hardware does | latency |
|---|---|---|
| ordinary instruction | — | 1 |
| branch, no prediction unit (or BTB miss, or RET) | Fetching stops and younger instructions are dropped. The branch holds execute for *L*−2 cycles. On its last cycle, the resolved address is loaded into `pc`. | *L* (see below) |
| BTB hit, predicted taken, correct | In decode, the selection logic loads `pc` with the BTB target. The fall-through instruction already fetched is dropped (`redirect`). Execute confirms the prediction in one cycle. | 2 |
| BTB hit, predicted not taken, correct | The fall-through path continues. | 1 |
| BTB hit, wrong direction or wrong target | `wp` pulses. The wrong-path instructions are dropped. The branch then completes like an unpredicted one, and fetching restarts from the resolved address. | *L* |

The unpredicted latency *L* depends on the opcode. These numbers come from the
original measurements:

| branch | CALL | JZNE | ICALL | JZ | RJMP | JMP | BREQ | BRNE | RET | BRGE | BRLE |
|---|---|---|---|---|---|---|---|---|---|---|---|
| without prediction | 4 | 5 | 3 | 5 | 3 | 4 | 5 | 5 | 3 | 5 | 5 |
| predicted correctly (taken) | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 3 | 2 | 2 |

RET is never kept in the BTB, because its target comes from the return stack.
The *L* values are the table's. How they arise, by holding execute for *L*−2
cycles, is this design's own mechanism, and `bpu_pkg::nopred_latency()` holds
the table. A mispredicted branch costs its full *L*; the source does not give a
separate misprediction penalty.

When a predictable branch completes execute, the prediction unit is updated:

* **miss**: the branch address and target go into the next BTB slot
  (round-robin, so the oldest entry is replaced when all eight are full). The
  slot's state machine starts at *weakly taken* if the branch was taken, and
  at *weakly not taken* if not.
* **hit**: the state machine takes one saturating step towards the outcome. If
  the target changed (only possible for ICALL), the stored target is
  rewritten.

A branch's first execution therefore always costs *L*. From its second
execution on, it costs 2 while it keeps being taken.

## Branch target buffer and pattern history

* `btb` compares the looked-up address with all eight stored branch addresses
  in the same cycle (fully associative), and gives `hit`, the slot number and
  the stored target combinationally. Each entry has a valid bit, cleared by
  reset.
* `pht` holds the eight `twobit_fsm` instances. The BTB's hit index selects
  one, so a branch's history lives in the same slot as its addresses.
* `bpu` joins the two and adds the selection multiplexer
  `next_pc = redirect ? pred_target : seq_pc`.

## Instruction set

Each instruction is 32 bits: opcode `[31:24]`, `rd` `[22:20]`, `rs` `[18:16]`
and a 16-bit operand `[15:0]`. The byte holding the opcode comes first in
memory. `pc` is a byte address that steps by 4. Instruction memory holds 512
bytes (128 instructions) and data memory 256 bytes. There are eight 8-bit
registers, `r0`–`r7`.

| opcode | mnemonic | effect |
|---|---|---|
| 00 | NOP | — |
| 01 | LDI rd, imm8 | rd = imm |
| 02 | MOV rd, rs | rd = rs |
| 03 / 04 | ADD / SUB rd, rs | rd = rd ± rs, sets flags |
| 05 / 06 / 07 | AND / OR / XOR rd, rs | sets Z, N; C = V = 0 |
| 08 / 09 | ADDI / SUBI rd, imm8 | sets flags |
| 0A / 0B | SHL / SHR rd | shift by one; C = bit shifted out |
| 0C | CMP rd, rs | flags of rd − rs |
| 0D | LD rd, imm8(rs) | rd = mem[imm + rs] |
| 0E | ST rd, imm8(rs) | mem[imm + rs] = rd |
| 0F | IN rd | rd = switches |
| 10 | JMP a16 | pc = a |
| 11 / 12 | JZ / JZNE rd, a16 | branch if rd == 0 / rd != 0 |
| 13 | RJMP off16 | pc = pc + off |
| 14 / 15 | BRNE / BREQ a16 | branch if !Z / Z |
| 16 / 17 | BRGE / BRLE a16 | signed ≥ (N == V) / signed ≤ (Z or N != V) |
| B0 | CALL a16 | push pc+4, pc = a |
| B1 | ICALL rd, rs | push pc+4, pc = {rd, rs} |
| B2 | RET | pc = pop |
| F0 | HALT | stops the core; `cycle` freezes |

Unknown opcodes act as NOP. Return addresses go to an 8-entry hardware stack,
which wraps round on overflow.

## Board top level

`bpu_fpga_top` connects:

* the eight switches `sw` to the input port (the `IN` instruction);
* the two select inputs `sel` to the LED register: `sel` = 0..3 shows r1..r4
  on `led`, registered;
* `cycle` to `lcd_ctrl`.

`lcd_ctrl` drives an HD44780-type 16×2 display over its 4-bit bus:

* It waits at power-up, then sends the wake-up nibbles 3, 3, 3, 2.
* It then sends the commands 28, 0C, 06 and 01.
* After that it loops forever: cursor home (80), then the eight hexadecimal
  digits of the count.
* Its delays are parameters. The defaults assume a 100 MHz clock.

A program is written into instruction memory one byte per clock through the
`imem_we/imem_waddr/imem_wdata` port while `rst` is high. Alternatively, `imem`
can preload it from a hex file (`INIT_FILE`). Release `rst` and the program
starts at address 0. The status outputs include:

* `branch`, `btbhit`, `redirect`, `wp`;
* `state` (the opcode in execute);
* the BTB and state-machine contents.

## Files

| file | contents |
|---|---|
| `rtl/bpu_pkg.sv` | types, opcodes, predictor states, latency table |
| `rtl/twobit_fsm.sv`, `rtl/pht.sv`, `rtl/btb.sv`, `rtl/bpu.sv` | branch prediction unit |
| `rtl/imem.sv`, `rtl/dmem.sv`, `rtl/regfile.sv`, `rtl/alu.sv`, `rtl/ret_stack.sv`, `rtl/decoder.sv` | processor parts |
| `rtl/cpu.sv` | the pipeline and its branch control |
| `rtl/lcd_ctrl.sv`, `rtl/bpu_fpga_top.sv` | board level |
| `tb/tb_model_pkg.sv` | assembler functions, instruction-level reference model with cycle model, and the workload program |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_branch_latency.sv` | latency of every branch instruction, with and without prediction |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
For example, with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bpu_pkg.sv tb/tb_model_pkg.sv tb/tb_cpu.sv --top-module tb_cpu
./obj_dir/Vtb_cpu
```

Swap in `tb_bpu_fpga_top` for the end-to-end test at default parameters. It
simulates about two million cycles, mostly the LCD's power-up delay, and runs
in seconds.

To write a program, use the assembler functions in `tb_model_pkg`
(`LDI(1, 5)`, `BRNE(72)`, ...), which return instruction words. The class
`iss` runs a program and predicts its final registers and its exact cycle
count, with or without prediction.

## Verification

* `tb_cpu` runs every program on two cores side by side, one with the
  prediction unit and one without. The programs are:
  * a loop through eight branch types;
  * a loop with JZ/JZNE and branches that are never taken;
  * eleven branches chasing each other through the eight-entry BTB;
  * a workload: a sum loop, a multiply subroutine, and a bubble sort of eight
    bytes, for several inputs.
* For each program, `tb_cpu` checks:
  * the registers and the exact cycle count against the reference model;
  * the misprediction count;
  * the BTB contents;
  * the latency of every executed instruction against the tables above.
* Measured cycles, with prediction against without:

  | program | with prediction | without |
  |---|---|---|
  | branch-type loop | 135 | 186 |
  | workload, n = 5 | 764 | 1043 |
  | workload, n = 15 | 804 | 1113 |
  | workload, n = 200 | 1536 | 2408 |

  The eleven-branch loop gains nothing (142 both ways): every lookup misses.
* `tb_branch_latency` runs each of the eleven branches three times in a
  loop, on both cores, and checks each timing against the latency tables
  above. With prediction, each branch costs its unpredicted latency on the
  first run (a BTB miss) and 2 cycles on the later runs; RET costs 3 every
  time.
* `tb_bpu_fpga_top` checks the whole board design at default parameters:
  * workload results and cycle count;
  * the LEDs for each select value;
  * the LCD characters showing the final count.

  It also counts the following, and fails if any of them never happens:
  * redirects;
  * correct not-taken predictions;
  * mispredictions;
  * held execute cycles;
  * BTB allocations and replacements;
  * calls, returns and halt.
* The block testbenches compare each module with a model under random
  stimulus. Each testbench was also run against a deliberately broken copy of
  its module, and failed.

## Where this design departs from or adds to the source

* **Pipeline.** The source names four stages (IF, ID, EX, WB). Here, write
  back is merged into execute. The branch latencies are still the source's
  numbers.
* **Unpredicted latency.** It is produced by holding execute for *L*−2 cycles.
  The source gives only the cycle counts.
* **Encodings.** Only JZNE = 0x12, CALL = 0xB0, BREQ = 0x15, BRGE = 0x16 and
  HALT = 0xF0 follow the source. All other encodings, the operand layout, the
  ALU operations and flags, and the branch conditions are this design's.
  Reading JZ/JZNE as register tests and BRxx as flag tests is an
  interpretation of the names.
* **Storage.** The register count (8), the return stack (a separate 8-entry
  stack) and the load port are this design's.
* **BTB.** Replacement is round-robin. The source shows slots filling in
  order, but says nothing about what happens when the buffer is full.
* **Initial predictor state.** This is *weakly taken* / *weakly not taken*
  from the first outcome, as the source describes. The reset state is
  *weakly not taken*.
* **Mispredictions.** A mispredicted branch costs its full unpredicted
  latency. A hit predicted not taken costs nothing when correct.
* **Board I/O.** The LCD format (eight hex digits), the controller type and
  its timing are assumptions. So is which registers the two select inputs
  reach.
* **Source's results.** The source reports 470 against 585 cycles for its own
  test program, which it does not list, so that experiment cannot be
  repeated exactly. The workloads here show the same effect.
* **Not covered.** Timing closure and FPGA resource use were not measured.
  The source reports about 15k LUTs and a 119.6 MHz maximum frequency on a
  Virtex-5 XC5VLX50T for its version.
