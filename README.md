# TOY: one instruction set, two ways to clock it

A processor repeats one loop: fetch an instruction, update the PC, decode it,
execute it, until a halt. This RTL builds that loop in hardware twice for
the same small 16-bit machine, TOY:

* **`toy_single_cycle`** does the whole loop body in one clock cycle. It is
  simple, but its clock period has to fit the slowest instruction: fetch,
  register read, ALU, data-memory access and write-back, one after the other.
* **`toy_multicycle`** cuts the same datapath into five stages (fetch,
  decode, execute, memory, write-back). It adds temporary registers between
  the stages and a counter that tells the control which stage is running.
  The clock period only has to fit one stage, and short instructions skip
  the stages they do not need.

The main point of the pair is to separate **datapath** from **control**. The
datapath is the registers, muxes, ALU and memories that move and combine
words. The control is the logic that sets the mux selects and write enables.
In the single-cycle machine the control is a function of the instruction
only. In the multicycle machine it is a function of the instruction *and
time*.

Two small teaching circuits stand next to the processors in the top level:
a one-port register file and a register → mux → register example. Both
show how a control signal decides what a clock edge copies.

## The machine

| item | size |
|---|---|
| word, ALU, busses | 16 bits |
| general-purpose registers | 8 × 16 bits, selected by 3-bit numbers |
| PC, memory addresses | 8 bits |
| instruction memory | 256 × 16 bits |
| data memory | 256 × 16 bits, separate from instruction memory |

An instruction is one word with four 4-bit fields:

```
 15    12 11     8 7      4 3      0
+--------+--------+--------+--------+
| opcode |   r0   |   r1   |   r2   |
+--------+--------+--------+--------+
                  |<----- imm8 ---->|
```

A register number is the low three bits of its field. For loads and stores,
bit 11 (the top bit of the r0 field) selects **indexed addressing**. With
bit 11 = 0 the effective address `ea` is `imm8`. With bit 11 = 1 it is
`R[r1] + R[r2]`, computed by the ALU.

| op | name | effect | multicycle stages | cycles |
|---|---|---|---|---|
| 0 | halt | stop | F D | 2 |
| 1 | add | R[r0] = R[r1] + R[r2] | F D E W | 4 |
| 2 | sub | R[r0] = R[r1] − R[r2] | F D E W | 4 |
| 3 | mul | R[r0] = low 16 bits of R[r1] × R[r2] | F D E W | 4 |
| 4 | xor | R[r0] = R[r1] ^ R[r2] | F D E W | 4 |
| 5 | and | R[r0] = R[r1] & R[r2] | F D E W | 4 |
| 6 | shr | R[r0] = R[r1] >> R[r2][3:0] (logical) | F D E W | 4 |
| 7 | shl | R[r0] = R[r1] << R[r2][3:0] | F D E W | 4 |
| 8 | lda | R[r0] = imm8, zero-extended | F D W | 3 |
| 9 | ld | R[r0] = M[ea] | F D E M W | 5 |
| A | st | M[ea] = R[r0] | F D E M | 4 |
| B | bz | if R[r0] = 0: PC = imm8 | F D E M | 4 |
| C | bp | if R[r0] > 0 (signed): PC = imm8 | F D E M | 4 |
| D | jr | PC = R[r1] + R[r2] | F D E M | 4 |
| E | jl | R[r0] = PC + 1, PC = imm8 | F D W | 3 |
| F | jmp | PC = imm8 | F D E M | 4 |

The source material fixes several things: the field layout, the 3-bit
register selects, the seven ALU operations (+ − × ^ & >> <<), the names and
widths of the control signals, and an indexed-addressing bit taken from the
r0 field. It leaves the opcode numbers to the reader. The numbering above,
the meaning of each branch and jump, and the stage schedule are choices of
this design. All of them live in `toy_pkg` (`opcode_e`, `alu_op_e`, the select
enums) and in the two control modules.

## Single-cycle datapath

In one cycle the signals flow through these parts:

1. **Fetch (`toy_fetch_unit`).** The PC addresses the instruction memory
   (`toy_imem`). The memory's output word is the current instruction. It
   is not a separately clocked register, because that would cost a second
   cycle. A dedicated adder forms PC + 1. The next-PC mux, under the 2-bit
   `nPCsel`, chooses one of these:
   * PC + 1;
   * `imm8`, the jump target carried in the instruction;
   * the ALU output, for `jr`;
   * the PC itself, which is how the machine stops at `halt`.
2. **Register read (`toy_regfile`, inside `toy_arith_path`).** The r1 and
   r2 fields drive `bus1` and `bus2`. The r0 field names the register to write. When the register file
   is not writing, the register r0 names appears on `bus0`. That is how a
   store gets its data and a branch gets the register it tests. The source
   draws `bus0` as one two-way bus. Here it is split into `bus0_in` and
   `bus0_out`, so no tristate is needed.
3. **Execute (`toy_alu`).** The ALU combines `bus1` and `bus2` under the
   3-bit `ALUctr`.
4. **Memory (`toy_dmem`).** `AddrSel` chooses the address, `imm8` or the ALU
   sum. The memory is read combinationally. It is written at the clock edge
   when `MemWr` is on.
5. **Write-back.** The 2-bit `WBsel` chooses the value written to R[r0] at
   the clock edge: the ALU result, the memory word, PC + 1 (for `jl`) or
   `imm8` (for `lda`).

The register file and the ALU form one block, `toy_arith_path`. In it, the
ALU output is fed back on `bus0`, so that block alone executes
`R[r0] = R[r1] op R[r2]` in one cycle. Its `ext_sel`/`ext_data` input lets
the other write-back sources use the same loop.

Reads of the register file and of both memories are combinational. Every
state change (PC, register, memory word) happens at one rising clock edge.

### Control as a decoder and OR gates (`toy_sc_control`)

The control of the single-cycle machine is one combinational circuit, and
it is built in the classic textbook way:

* **A 7-to-128 decoder.** Its 7 inputs are the opcode (4 bits), the
  indexed-addressing bit and the two **Cond** flags from the datapath.
  `Cond[0]` means R[r0] = 0. `Cond[1]` means R[r0] > 0 as a signed number.
  Exactly one of the 128 decoder outputs is on. An output that is on means
  "this instruction is running and these conditions hold".
* **One OR gate per control bit** (`nPCsel`, `RegWr`, `ALUctr`, `MemWr`,
  `AddrSel`, `WBsel`, `halt`). Each gate ORs together the decoder lines for
  which that bit must be 1.

The RTL keeps this structure literally: a one-hot `dec_out` vector and, for
each bit, `|(dec_out & MASK[b])`. The masks are not typed in as 128-bit
literals. They are computed at elaboration by the function `word_for`, which
states the control word of every decoder line in terms of the instruction
set. To change an instruction's behaviour, edit `word_for`. The OR plane
follows automatically. The conditional branches are where the Cond inputs
matter: for `bz` and `bp`, the decoder lines with the flag set go into the
`nPCsel = imm8` gate, and the lines without it do not. An assertion checks
that the decode is one-hot.

## Multicycle datapath

`toy_multicycle` uses the same register file, ALU and memories. It puts a
temporary register at the end of each stage:

| stage (counter) | work | loads |
|---|---|---|
| 0 fetch | read instruction memory at PC; PC + 1 in its own adder | IR, NPC |
| 1 decode | read R[r0], R[r1], R[r2]; zero-extend imm8 (Ext) | R0, R1, R2, Imm |
| 2 execute | ALU on R1, R2; flags of R0 | Result, Cond |
| 3 memory | read or write data memory at Imm or Result; next-PC mux | MData |
| 4 write-back | write R[r0] from Result, MData, NPC or Imm | register file |

The stage counter (`stage_counter`) is the new input to the control. The
control (`toy_mc_control`) is a case on the stage that looks at the
instruction in IR and, in the memory stage, at the **Cond register** (the
flags of R0 captured in execute). For each stage it produces:

* the enables of the temporary registers that stage fills;
* the ALU, address and write-back selects;
* `MemWr` and `RegWr`;
* whether the PC is written, and from where (NPC, Imm or Result);
* the counter's next value.

The counter counts up by itself. The control loads it only to skip stages or
to end an instruction early, which gives the cycle counts in the table above.
For example, an ALU operation goes from execute straight to write-back, and
`lda` and `jl` go from decode to write-back. The PC is written in an
instruction's **last** stage. Until then, PC still points at the running
instruction, and NPC holds PC + 1.

Two details differ from the single-cycle machine, and from what a reader of
the standard diagram might expect:

* **Branches resolve in the memory stage.** Cond is only a register after
  execute, so `bz`, `bp`, `jr` and `jmp` take four cycles. This matches the
  diagram, which puts the next-PC mux in the memory stage.
* **The PC has its own adder in the fetch stage**, as the diagram draws
  it. Borrowing the idle ALU for PC + 1 is mentioned as a possible saving,
  but it is not done here.

The write-back mux has four inputs. The diagram shows three; NPC is added so
that `jl` works the same way as in the single-cycle machine.

Assertions in the multicycle machine check three things:

* the counter stays in 0..4;
* no stage writes both memory and a register;
* a halted machine keeps its PC.

## The two teaching circuits

* **`regfile_1port`**: N words of K bits behind a single address. The output
  shows the addressed word. With `write` on, the clock edge stores the input
  there. With one address, a cycle cannot read one word and write another.
  That limitation is why the TOY register file has three register numbers.
  The defaults are 8 × 16 bits; the source only gives the symbols n and k.
* **`reg_mux_example`**: Reg1 and Reg2 each load their input when their
  write enable is on. A mux picks one of them by `select`. Reg3 loads the
  mux output when `write_enable3` is on, and keeps its value when it is
  off. The circuit that would drive these four control inputs is left out,
  because it is not specified, so they are ports. Two other choices are this
  design's own: the bus width (16) and which input `select = 0` picks
  (Reg1).

## Using the processors

Both processors have the same interface:

* `prog_we`, `prog_addr`, `prog_data` write the instruction memory.
* `dmem_host_we`, `dmem_host_addr`, `dmem_host_wdata` write the data memory,
  and `dmem_host_rdata` reads it. When the processor and the host write the
  same word in one cycle, the processor wins.
* `run` must be high for the machine to advance.
* `halted` rises after `halt` executes. From then on the machine holds
  every state.
* Active-low `rst_n` (asynchronous) clears the PC, `halted` and the stage
  counter.

Registers and memories are not cleared by reset, so a program must set up
every register it reads. The usual sequence is:

1. Hold `rst_n` low.
2. Load both memories.
3. Release `rst_n`.
4. Raise `run`.
5. Wait for `halted`.
6. Read the results through the host port.

`toy_top` instantiates both processors and both teaching circuits side by
side. They share `clk` and `rst_n`; their ports carry the prefixes `sc_`,
`mc_`, `rf_` and `ex_`. The parameters (`WIDTH` 16, `NREGS` 8, `PC_W` 8) are
the machine's real sizes. The ISA encoding assumes 16-bit instructions with
3-bit register numbers, so changing them is only meaningful for the
stand-alone blocks (ALU, register files, memories).

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The processor
tests share `tb/toy_tb_pkg.sv`, which contains:

* an instruction-level **reference model** of the ISA above. It also adds up
  the expected cycle count: one per instruction for the single-cycle
  machine, and the stage counts from the table for the multicycle machine;
* an assembler (`enc_r`, `enc_i`, `enc_x`);
* a **directed program**. It sums an array with indexed loads in a counted
  loop, calls a subroutine with `jl` that uses mul, xor, and, shl and shr,
  returns with `jr`, and ends with a taken `bp`. Its results are also
  checked against hand-computed values: sum 14, square 196, 51 cycles
  single-cycle, 202 cycles multicycle;
* **random programs** that always terminate. Their branches and calls only
  jump forward, and a closing sequence stores all registers to memory.

After each program, all 256 data words, the final PC and the exact cycle
count are compared with the model. `tb_toy_multicycle` also measures every
instruction's length from the stage counter.

`tb_toy_top` runs both processors on the same 21 programs at the default
sizes, with random traffic on the two teaching circuits at the same time.
It counts each mechanism and fails if any of them never happened:

* branch taken and not taken;
* indexed addressing;
* `jl` and `jr`;
* halt;
* instructions of 2, 3, 4 and 5 cycles;
* one-port register file reads and writes;
* Reg3 copy and hold.

To run a test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/toy_pkg.sv tb/toy_tb_pkg.sv tb/tb_toy_top.sv --top-module tb_toy_top
./obj_dir/Vtb_toy_top
```

For a single block, swap in its testbench, e.g. `tb/tb_toy_alu.sv` with
`--top-module tb_toy_alu`. Only the processor tests need `toy_tb_pkg.sv`.

## Files

| file | contents |
|---|---|
| `rtl/toy_pkg.sv` | opcodes, ALU codes, select encodings, control-word structs |
| `rtl/toy_top.sv` | both processors and both teaching circuits side by side |
| `rtl/toy_single_cycle.sv` | single-cycle processor |
| `rtl/toy_fetch_unit.sv` | PC, PC + 1 adder, next-PC mux, instruction memory |
| `rtl/toy_arith_path.sv` | register file + ALU in their write-back loop |
| `rtl/toy_sc_control.sv` | single-cycle control: 7-to-128 decoder and OR plane |
| `rtl/toy_multicycle.sv` | multicycle processor with its temporary registers |
| `rtl/toy_mc_control.sv` | multicycle control: instruction × stage |
| `rtl/stage_counter.sv` | stage counter with load for skipping |
| `rtl/toy_regfile.sv` | 8 × 16 register file, ports r0/r1/r2, bus0/1/2 |
| `rtl/toy_alu.sv` | 16-bit ALU, 7 operations |
| `rtl/toy_imem.sv`, `rtl/toy_dmem.sv` | instruction and data memories with host ports |
| `rtl/regfile_1port.sv` | one-port register file |
| `rtl/reg_mux_example.sv` | register → mux → register example |
| `tb/toy_tb_pkg.sv` | reference model, assembler, program generators |
| `tb/tb_*.sv` | one testbench per module |

## Limits

* No input or output devices. The machine talks to the outside only through
  the memory host ports.
* Registers and memories have no reset.
* `jr` jumps to `R[r1] + R[r2]`. To jump to a single register, name a zero
  register as r2, as the directed test does.
* The multicycle machine does not overlap instructions: it is not a
  pipeline.
