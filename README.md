# RV32IM core on a transport-triggered datapath

This is a small in-order RISC-V core (RV32I plus the M extension) whose
datapath is not a classic RISC pipeline but a *transport triggered
architecture* (TTA): a set of function units connected by a few buses, where
every action is a *move* of a value from an output port to an input port, and
an operation starts when its triggering input port is written. RISC-V
software cannot drive such a datapath directly, so a hardware front end,
called the *microcode unit* here, translates each RISC-V instruction on the
fly into TTA moves. The front end also does what a TTA leaves to the
compiler: it detects data hazards, forwards results, stalls for multi-cycle
operations and handles control flow. All of it follows the RISC-V
instruction semantics.

The design is a configurable template. Its parameters set:

- the number of pipeline stages (3 or 4);
- whether the bypass (forwarding) connections exist;
- the operation latencies;
- whether the M extension is present.

The default is the three-stage core with bypass connections.

## Datapath: three units and four buses

| bus | carries | drivers | receivers |
|-----|---------|---------|-----------|
| rs2 | second register operand | register file read port 2; M.out / C.ra / C.auipc (bypass) | M.in1, C.in2 |
| rs1 | first register operand | register file read port 1; M.out / C.ra / C.auipc (bypass) | M.trigger, C.in1 |
| rd  | result | M.out, C.ra, C.auipc | register file write port |
| imm | immediate | immediate from the front end | M.in1, M.in2, C.trigger |

The units are:

- **R**: the register file. It has two asynchronous read ports, one synchronous write port, and x0 wired to zero (`rv_regfile`).
- **M**: the ALU, load/store unit, multiplier and divider (`rv_fu_m`). The ALU computes `trigger op in1`. A memory access uses the address `trigger + in2`, and `in1` is the store data. The single output port `out` is registered, so a result is read in the cycle after the operation.
- **C**: the control unit (`rv_fu_c`). It evaluates branch conditions (`in1` vs `in2`) and computes branch and JALR targets. It has two registered output ports: the return address (`ra`, pc+4) and the AUIPC result (`auipc`, pc+imm).

Every bus is a multiplexer (`rv_interconnect`), and an undriven bus reads zero. Without bypass, the unit outputs reach only the rd bus. Then a dependent instruction must wait until the result is in the register file.

Each bus has one move slot in the internal instruction (`tta_instr_t` in `rv_pkg`). A slot holds:

- a source socket;
- a destination socket;
- an opcode, used when the destination is a triggering port;
- a register index, used when one end is the register file.

The decoder (`rv_decoder`) turns the four slots into a registered control word for the execute stage. An assertion checks every move against the connectivity of the chosen configuration.

## Pipeline

With `PIPELINE_STAGES = 3`:

1. **Fetch, translate, decode.** The fetched word goes through the microcode unit and the decoder in one combinational path and ends in the decode registers.
2. **Execute.** The register file is read, operands travel over the buses, and the triggered unit computes its result into its output register.
3. **Result move.** The rd bus carries the result from the unit's output port to the register file.

A TTA has no write-back stage of its own. The third stage exists because the front end always schedules the move that writes the result.

`PIPELINE_STAGES = 4` adds an instruction register in the fetch unit (`rv_ifetch`, parameter `INSTR_REG`). This shortens the fetch path and costs one cycle on every redirect.

## Turning one RISC-V instruction into moves (`rv_microcode`)

The front end has these parts:

- **Format decoding** (`rv_format_decode`). Maps the opcode to the R/I/S/B/U/J format.
- **Immediate handling** (`rv_imm_gen`). Assembles and sign-extends the immediate. The immediate bypasses the tables and goes straight to the decoder as the value of the imm bus.
- **Lookup tables** (`rv_translate`). They are indexed only by opcode and function fields, because register indexes and immediates never pass through them. For each operation they give:
  - the move template for each bus;
  - the operation latency;
  - the unit output port its result will appear on.

  Examples:

  | instruction | rs1 bus | rs2 bus | imm bus | rd bus |
  |---|---|---|---|---|
  | `sub rd,rs1,rs2` | R → M.trigger:sub | R → M.in1 | | M.out → R |
  | `addi` | R → M.trigger:add | | imm → M.in1 | M.out → R |
  | `lw` | R → M.trigger:lw | | imm → M.in2 | M.out → R |
  | `sw` | R → M.trigger:sw | R → M.in1 | imm → M.in2 | |
  | `blt` | R → C.in1 | R → C.in2 | imm → C.trigger:blt | |
  | `jal` | | | imm → C.trigger:jal | C.ra → R |
  | `auipc` | | | imm → C.trigger:auipc | C.auipc → R |

  `lui` is an add of x0 and the U-immediate through the ALU. It therefore needs no immediate path to the register file and is sequenced like any ALU operation.
- **Index merging** (`rv_uop_seq`). Copies rs1, rs2 and rd from the instruction word into the template.
- **Hazard detection** (`rv_hazard_detect`). Compares rs1/rs2 with the destination of the previous issued instruction.
- **Controller** (`rv_controller`). Decides each cycle whether to issue, to bubble, or to hold the fetch unit.

Unknown encodings (FENCE, ECALL, EBREAK, CSR instructions) become no-operations.

## The delayed result move

This is the central trick of the front end. The input-operand moves of an instruction go to the decoder at once. Its result move is cut out of the translated instruction and parked in a register, `rd_move_q`.

The parked move is emitted together with the *next* instruction's operand moves, one cycle later. By then the operation has executed and its result sits in the unit's output register. The rd bus is reserved for result moves, so the two never collide.

Take an operation of latency L issued in cycle t:

- Cycles t+1 … t+L−1 are bubbles. No operand moves are issued and the fetch unit is held.
- In cycle t+L the controller *releases*: the next instruction issues and the parked result move goes out with it.
- In cycle t+L+1 the result move executes and the register file is written.

The latency lookup table makes this work for any mix of latencies. The multiplier and divider hold their result until the latency has elapsed. The default latencies are: ALU, load, store and MUL 1 cycle; MULH/MULHSU/MULHU 4; DIV/DIVU/REM/REMU 35.

## Hazards and forwarding

A result is in the register file one cycle after its result move is issued. So only the instruction immediately before can still be in flight, and only that one is compared.

**With bypass connections:**

- The previous operation's output port is kept in a register. It comes from the output-port table and is updated only when an instruction issues.
- On a hazard, the register-file source of the affected operand move is replaced by that port: M.out, C.ra or C.auipc.
- No cycle is lost, even for a load followed by a use. The load data returns one cycle after the address and is driven onto the M output port directly.

**Without bypass connections:**

- A hazard turns the cycle into a bubble. The parked result move is still emitted in that bubble, so the value is written.
- The dependent instruction issues one cycle later and reads the register file.

## Control flow

| instruction | how it is handled | cycles from issue to next issue (3 / 4 stages) |
|---|---|---|
| JAL | Decided at translate time: the fetch unit jumps to its own pc + J-immediate in the cycle the JAL issues. C still produces the return address for the result move. | 2 / 3 |
| branch, taken or not | No prediction: the fetch unit is held and one bubble follows. In the next cycle C compares the operands and redirects the fetch unit to the target or to pc+4. | 3 / 4 |
| JALR | Same as a branch, with target (rs1+imm) & ~1. | 3 / 4 |

The branch cost is the bubble plus the N−1 cycles needed to refill an N-stage front end. Since every branch redirects the fetch, no instruction is ever flushed.

## Timing summary (defaults)

| operation | cycles until the next instruction issues |
|---|---|
| integer, load, store, MUL, LUI, AUIPC | 1 |
| MULH, MULHSU, MULHU | `LAT_MULH` = 4 |
| DIV, DIVU, REM, REMU | `LAT_DIV` = 35 |
| branch (taken or not), JALR | 3 (4 with four stages) |
| JAL | 2 (3 with four stages) |
| dependent instruction, no bypass | +1 |

## Top level: `rv_core`

| parameter | default | meaning |
|---|---|---|
| `PIPELINE_STAGES` | 3 | 3, or 4 with the fetch instruction register |
| `BYPASS` | 1 | unit outputs connected to the rs1/rs2 buses |
| `NREGS` | 32 | 32, or 16 for an RV32E-sized register file |
| `ENABLE_M` | 1 | multiplier and divider present (else M encodings are no-operations) |
| `LAT_MUL`, `LAT_MULH`, `LAT_DIV` | 1, 4, 35 | latencies (`LAT_DIV` ≥ 34 for the iterative divider) |
| `BOOT_ADDR` | 0 | first fetch address |

**Instruction and data memories** are outside the core (Harvard: separate ports). Both are synchronous with one cycle of latency and no wait states:

- The instruction memory returns the word for `imem_addr_o` in the next cycle on `imem_rdata_i`.
- A data access asserts `dmem_req_o` with a word-aligned byte address, `dmem_we_o` and `dmem_be_o` (byte lanes). Store data is already shifted to its lanes.
- Load data is expected on `dmem_rdata_i` in the next cycle. Misaligned accesses are not supported.

**Observation ports**, used by the testbenches to count mechanisms; they need no connection:

- `trace_valid_o`, `trace_pc_o`, `trace_instr_o`: one pulse per issued instruction.
- `rf_we_o`, `rf_wa_o`, `rf_wd_o`: register writes.
- `stat_*`: bubbles, forwards, hazard stalls, redirects and taken branches.

Reset `rst_ni` is asynchronous and active low. Register file contents are not reset.

## Files

| file | content |
|---|---|
| `rtl/rv_pkg.sv` | buses, sockets, opcodes, move and control-word types, connectivity rules |
| `rtl/rv_core.sv` | top: fetch → microcode → decoder → interconnect, R, M, C |
| `rtl/rv_ifetch.sv` | PC, stall hold register, optional instruction register, jump/redirect |
| `rtl/rv_microcode.sv` | front end, built from the next six modules |
| `rtl/rv_format_decode.sv`, `rv_imm_gen.sv` | format decoding and immediate handling |
| `rtl/rv_hazard_detect.sv` | previous-destination comparison |
| `rtl/rv_translate.sv` | instruction, latency, output-port and bypass lookup tables |
| `rtl/rv_controller.sv` | issue / bubble / fetch-hold decisions |
| `rtl/rv_uop_seq.sv` | index merging and the parked result move |
| `rtl/rv_decoder.sv`, `rv_interconnect.sv` | control word and bus multiplexers |
| `rtl/rv_regfile.sv`, `rv_fu_m.sv`, `rv_divider.sv`, `rv_fu_c.sv` | the units |

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each compares against values computed independently in the testbench and prints `TB_RESULT checks=N failures=M`.

The core-level tests use `tb/tb_core_env.sv`. It holds 32 KiB instruction and data memories and builds a program in up to three parts:

- a directed part: forwarding from every output port, load-use, multi-cycle operations, a loop, a call and a return;
- optionally, a workload kernel: 32 pseudo-random words (from a multiply-based generator) bubble-sorted with two nested backward loops, then summed by a subroutine that ends in a remainder and returns through JALR; the sorted order is checked at the end;
- random RV32IM instructions with forward branches and jumps.

It runs the program against an instruction-set model (`tb/tb_rv_asm_pkg.sv`) and checks:

- every issued pc and instruction;
- the number of cycles between consecutive issues, against the table above;
- every register write, in order;
- the final data memory;
- the core's own event outputs.

It also fails if a mechanism never occurred: forwarding (including from a load and from C), hazard stall, multi-cycle operation, taken and not-taken branch, JAL, JALR.

The core-level testbenches are:

- `tb_rv_core` runs five configurations side by side: three stages with bypass, three without, four with bypass, a 16-register core without the M extension, and a four-stage core without bypass with latencies MUL 2, MULH 6, DIV 40.
- `tb_rv_core_full` runs the default core on the kernel plus a 3000-instruction random program (about 12,000 cycles).

All core-level runs include the kernel.

The same program is used for the four RV32IM configurations of `tb_rv_core`: the directed part, the kernel and 400 random instructions, 4427 issued instructions in all. On that program they show the expected ranking:

| configuration | cycles | cycles per instruction |
|---|---|---|
| 3 stages, bypass | 7183 | 1.62 |
| 4 stages, bypass | 8348 | 1.89 |
| 3 stages, no bypass | 8431 | 1.90 |
| 4 stages, no bypass, MUL 2 / MULH 6 / DIV 40 | 9735 | 2.20 |

The missing bypass costs about as much as the extra stage. Without bypass, all 1248 extra cycles are hazard stalls. About 500 of them come from a load feeding the next instruction, mostly the compare in the sort loop.

To simulate with Verilator 5 (example for the core):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/rv_pkg.sv tb/tb_rv_asm_pkg.sv \
  -y rtl -y tb tb/tb_rv_core.sv --top-module tb_rv_core
./obj_dir/Vtb_rv_core
```

Unit testbenches work the same way, with their `tb_` module as the top.

## Where this RTL departs from, or goes beyond, the original description

The original design is produced by a processor generator from an architecture description. Here the configuration choices are module parameters instead.

- **Lookup tables.** They are written as case statements, not as generated tables. The choice of which unit port receives which operand follows the bus connections of the minimal RISC-V datapath, but the exact assignment is this design's own.
- **Bubbles and the result move.** In the original block diagram the bubble replaces the whole sequencer output. Here a bubble clears only the operand moves, and a parked result move still goes out. This is what gives the no-bypass core its one-cycle hazard stall without losing a write.
- **JAL target.** The JAL target adder sits in the fetch unit, so the jump takes effect when the JAL issues. Return-address generation stays in C.
- **Unit internals.** The multiplier is a combinational 32×32 product whose result is held until its latency expires. The divider is an iterative radix-2 restoring divider. The original gives only the latencies.
- **Memory system.** The memory interface is a plain synchronous port. The original was integrated into an SoC with an AXI4 interconnect, and that part is not reproduced.
- **Not implemented.** Unsupported system instructions are no-operations: there are no CSRs, exceptions or interrupts. These are outside the original design as well.
