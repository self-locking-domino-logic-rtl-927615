# Self-locking domino control for a multicycle RISC-V CPU

A multicycle processor normally gives every step of every instruction the
same clock period, sized for the slowest step. This design instead lets each
step take as long as the units it uses actually need. It does that with
*self-locking dual-rail domino logic*:

- every self-timed block has a small **pulse circuit** at its input;
- a request makes the pulse circuit precharge the block's domino gates and
  then start their evaluation;
- each gate has two output rails, so a **completion detector** can tell when
  every gate has finished;
- completion re-opens (unlocks) the input and acknowledges the request.

Two blocks work this way:

- **the control unit.** It is a six-stage domino pipeline whose one-hot
  stages are the states of the multicycle automaton.
- **the ALU.** It is 32 bit-gates evaluated in parallel.

Both sit in an otherwise ordinary synchronous RV32 datapath. The datapath
loads its registers when a step's handshakes have completed.

All RTL here is synthesizable SystemVerilog. The asynchronous parts are
written as a **synchronous rendering**: one fast clock `clk` acts as the time
base, and the self-reset delay τΔ of the pulse circuit is `DELTA` cycles of
that clock. The next section explains what that means. It is the main
departure from a real self-timed implementation, so read it first.

## The synchronous rendering of self-timed logic

A real self-locking domino circuit uses combinational loops and relies on
gate and routing delays. Neither can be written as portable synthesizable
RTL, and neither can be simulated by a two-state cycle-based simulator. Here:

| Self-timed element | How it is written |
|---|---|
| τΔ delay line of the pulse circuit | `DELTA`-stage shift register clocked by `clk` |
| state latch Q of the pulse circuit | a flip-flop, set/cleared by the signal-flow rules below |
| domino gate (precharge / evaluate) | combinational: both rails 0 when `dc_n = 0`, one rail 1 when `dc_n = 1` |
| domino evaluation delay | none: rails settle in the cycle `dc_n` rises |
| "rising / falling edge of dc̄" clocking of registers | clock enable in the cycle before `dc_n` changes (`rise_next`, `fall_next`) |
| completion detection | real logic: XOR of each rail pair, AND over all gates |

Consequences:

- The handshake order is exactly that of the self-timed circuit:
  request → lock → precharge → evaluate → completion → unlock/acknowledge.
  Every handshake of a unit takes the same number of `clk` cycles, though.
- The speed-up the self-timed design gets from data-dependent evaluation time
  is therefore **not reproduced**. Cycle counts from these models say nothing
  about nanoseconds on an FPGA.
- What *is* reproduced is the variable number of steps per instruction and
  the protocol. Every step waits for the acknowledges of exactly the units it
  uses.

## Pulse circuit (`pulse_circuit`)

The pulse circuit has an input request `P`, an enable/acknowledge `En`, a
state `Q` and a delayed copy `Δ(Q)`. Its rules:

```
Q  -> 0   when Q · En · P · Δ(Q)     (fire: lock the input, start precharge)
Q  -> 1   when ¬Q · ¬Δ(Q)            (self-reset once the delay has elapsed)
Q  holds  otherwise
Y  = P · En,  dc_n = Q
```

`Δ(Q)` stays low for τΔ after Q rises again. So the input remains locked until
then, even if `P` is still high.

In `clk` edges, counting the firing edge as 0 and with `DELTA = d`:

| Edges after firing | What happens |
|---|---|
| 0 … d | `dc_n` (= Q) is low: this is precharge |
| d+1 | `dc_n` is high again: evaluation starts |
| 2d+1 | `ready` (= Q · Δ(Q)) is high again |

Outputs:

- `fall_next` says that `dc_n` falls at the next edge.
- `rise_next` says that `dc_n` rises at the next edge.

Blocks that the self-timed original clocks on an edge of dc̄ use these two
signals as clock enables.

## Dual-rail domino gate and completion (`drdl_gate`, `completion_detector`)

`drdl_gate #(N, FUNC)` is one LUT-style gate. `FUNC` is its truth table,
indexed by the input vector, as in an FPGA LUT's INIT value. The default is
the AND of all inputs. Its behaviour:

- when `dc_n = 0`, both rails `f` and `f_n` are 0;
- when `dc_n = 1`, `f = FUNC[x]` and `f_n = ¬FUNC[x]`.

`completion_detector` computes `en = AND over i of (f[i] XOR f_n[i])`. It is 0
while any gate is precharged or still switching. Every gate is checked, not
just the last one of a chain.

## Domino ALU (`domino_alu`)

The ALU works as one handshake stage:

1. A request enters the ALU's own pulse circuit.
2. At the rising edge of `dc_n`, the operand registers load `a`, `b` and the
   operation.
3. All 32 result gates evaluate in parallel.
4. The completion detector over the 32 result bits drives the pulse
   circuit's `En`.
5. `ack = en · ready` acknowledges the request.

The live result stays valid until the next request. The output register
`f_q` captures it at the falling edge of `dc_n`, just before the next
precharge.

Only the bitwise AND is specified in the design this follows. To run real
programs the ALU here also does `add`, `sub`, `or`, `xor` and `slt` in the same
style:

- Each result bit is a 6-input dual-rail gate over `(sel[2:0], carry, b, a)`.
- A dual-rail domino ripple-carry chain (`drdl_carry`, majority gates with
  dual-rail carry) feeds add and sub.
- Arithmetic bit gates evaluate only once their carry-in is valid.
- A separate gate forms the `slt` bit from the sign bits and the carry into
  bit 31.

Operation codes are in `slp_pkg::alu_op_e`: add 000, sub 001, and 010, or 011,
xor 100, slt 101.

Timing: `ack` returns `2·DELTA+2` edges after the request is accepted. The
result and `en` are valid from `DELTA+1` edges after it.

## The domino controller (`domino_controller`)

### States and transitions

The automaton of the multicycle RV32 controller has six state bits `z0..z5`
plus a rest state `000000`. Each state bit is the register behind one domino
stage:

```
F0 = (z == 000000)   F1 = z0        F2 = z1
F3 = z2 · ¬A         F4 = z3 · ¬B   F5 = z4 · ¬C
A = beq,  B = R-type | I-type | jal,  C = sw
```

An instruction walks `000001 → 000010 → 000100 → …`. It returns to `000000`
by one of four exits:

- edge A after `000100`;
- edge B after `001000`;
- edge C after `010000`;
- after `100000`, for a load.

| State | lw | sw | R-type | I-type | jal | beq |
|---|---|---|---|---|---|---|
| z0 `000001` | fetch | fetch | fetch | fetch | fetch | fetch |
| z1 `000010` | decode | decode | decode | decode | decode | decode |
| z2 `000100` | address | address | execute | execute | jump | compare (exit A) |
| z3 `001000` | read | write set-up | write-back (exit B) | write-back (exit B) | link write-back (exit B) | |
| z4 `010000` | 2nd read cycle | write (exit C) | | | | |
| z5 `100000` | load write-back | | | | | |
| States | 6 | 5 | 4 | 4 | 4 | 3 |

The second memory cycles (z4 of a load, z3 of a store) exist because the
block RAM needs two cycles per access.

### One step of the controller

1. The request fires the pulse circuit.
2. At that falling edge of `dc_n`, the state registers take the evaluated
   rails `F0..F5`. This is the step to the next state.
3. All stages precharge.
4. At the rising edge, the input register X takes opcode bits 6:2, `funct3`
   and `funct7[5]`. Opcode bits 1:0 are always `11` and are not decoded.
5. The stages evaluate the *following* state.
6. Completion over all six stages gives `en`, and `ack = en · ready`.

### Control outputs and constraints

The control outputs (`ctrl_t`) are a Mealy function of `z` and X:

- `pc_write`, `adr_src`, `mem_write`, `ir_write`;
- `res_src[1:0]`;
- `alu_ctrl = {src_a[1:0], src_b[1:0], op[2:0]}`;
- `imm_src[1:0]`, `reg_write`;
- `uses_alu`, which says the state needs an ALU handshake.

The values per state are those of the usual multicycle RISC-V controller.

The output function is itself a self-locked dual-rail stage. Every output bit
has a true rail and a false rail. Both rails are 0 during precharge, and one
of them rises in evaluation. The completion of these pairs is part of `en`.
The datapath therefore sees all-zero (inactive) controls while the
controller precharges, and never sees half-switched values. The branch
condition is the one exception. Lambda produces a "branch" bit, and that bit
is ANDed with the ALU's zero flag after lambda. The zero flag settles only
after the ALU handshake, and the ALU handshake follows the controller's.

- **beq:** during the compare step, `pc_write` follows the ALU's zero flag.
- **jal:** the jump target is computed at decode (OldPC + imm). The jump step
  then writes PC from ALUOut while the ALU computes OldPC + 4 for the link
  register.

Two constraints on the timing:

- The opcode must be stable at the controller's input before each request.
  In the CPU it comes from IR, which changes only at the end of fetch.
- Output values are valid while `ack` is high, and they stay valid until the
  next request.

## The processor (`riscv_async_cpu`)

### Datapath

The datapath is the classic multicycle one. Its registers are PC, OldPC, IR,
A, B, ALUOut and Data.

Multiplexers:

| Multiplexer | Inputs |
|---|---|
| ALU A | PC, OldPC, A |
| ALU B | B, immediate, 4 |
| Result | ALUOut, Data, ALU result |
| Memory address (AdrSrc) | PC, ALUOut |

Other parts:

- register file `regfile`: 32 × 32, two asynchronous read ports and a debug
  port;
- immediate generator `imm_extend`: I, S, B and J formats;
- memory `unified_memory`: 1024 words, with an instruction port and a data
  port. Reads take two cycles.

### Sequencing a step

`step_sequencer` runs one controller state at a time:

```
CREQ   hold ctrl_req until the controller accepts it
CWAIT  wait for ctrl_ack: state and control outputs valid
AREQ   (only if uses_alu) hold alu_req until the ALU accepts it
AWAIT  wait for alu_ack: ALU result valid
COMMIT one cycle: PC/IR/OldPC/register file/memory write by their enables,
       A, B, Data always, ALUOut if the ALU was used
```

Each state therefore lasts one controller handshake, plus one ALU handshake if
it uses the ALU, plus one commit cycle. States that do not use the ALU skip
the ALU handshake. A state takes exactly `2·DELTA + 4` clk cycles without
the ALU and `4·DELTA + 7` with it: 8 and 15 cycles at `DELTA = 2`.

Every state lasts more than the memory's two-cycle read latency, so memory
states do not need their own acknowledge.

### Supported instructions and ports

Supported instructions:

- `lw`, `sw`;
- `add sub and or xor slt`;
- `addi andi ori xori slti`;
- `beq`, `jal`.

Unsupported opcodes execute as I-type. Only word accesses exist. There is no
`bne`, shift, `lui`, `auipc` or `jalr`.

Ports of the top:

| Port | Purpose |
|---|---|
| `clk`, `rst_n` | clock and reset |
| `run` | start at PC 0; deassert to stop after the current state |
| `prog_we`, `prog_addr` (word address), `prog_wdata` | load program and data while `run` is low |
| `dbg_reg` → `dbg_reg_data` | read any register |
| `pc`, `state` | program counter, controller state |
| `step` | commit of each state |
| `instr_done` | commit of the rest state, i.e. an instruction finished |

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `XLEN` | 32 | ALU, register file, CPU |
| `DELTA` | 2 | pulse circuits (precharge length in clk cycles) |
| `NSTATES` | 6 | controller one-hot stages |
| `MEM_WORDS` / `WORDS` | 1024 | memory size |
| `READ_LATENCY` | 2 | memory read cycles |
| `N`, `FUNC` | 5, AND | domino gate inputs and truth table |

Which values come from the design being followed:

- `XLEN = 32`, six one-hot states and the two-cycle memory are its values.
- No value of τΔ or of the memory size is given, so `DELTA` and the memory
  size are this implementation's choice.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    --top-module tb_riscv_async_cpu rtl/slp_pkg.sv tb/tb_riscv_async_cpu.sv \
    -Mdir obj -o sim && obj/sim
```

Block testbenches:

| Testbench | What it checks |
|---|---|
| `tb_pulse_circuit` | precharge length, lock-out, re-arm |
| `tb_drdl_gate` | all input vectors, both phases |
| `tb_completion_detector` | valid, empty and illegal rail pairs |
| `tb_domino_alu` | all operations against a reference, handshake latency, `f_q` |
| `tb_domino_controller` | state sequence and exit edge of each class, control outputs, step latency |
| `tb_regfile`, `tb_imm_extend`, `tb_unified_memory` | datapath parts, including the two-cycle read |
| `tb_step_sequencer` | the handshake order against random-latency partners |

Whole-processor testbenches:

- **`tb_riscv_async_cpu`** runs a program using every instruction at the
  default parameters. It:
  - checks registers and memory;
  - checks the number of states of every instruction;
  - checks the clk-cycle length of every state (8 or 15 cycles);
  - counts each mechanism: handshakes, precharges, the four exits, taken and
    not-taken branches, jumps, each ALU operation.

  It fails if any mechanism never occurs.
- **`tb_spec_mix`** runs a 100-instruction loop three times. The loop has the
  SPECint2000 instruction-class mix: 25 % loads, 10 % stores, 11 % branches,
  2 % jumps, 52 % ALU. The testbench:
  - compares every register and stored word with an instruction-set model in
    the testbench;
  - checks the state count, 549 states per 100 instructions including rest
    states.

  It measures 5.50 controller states and about 65 clk cycles per instruction
  at `DELTA = 2`.
- **`tb_cpu_delta_sweep`** runs two processors side by side, one with
  `DELTA = 1` and one with `DELTA = 5`, on a summing loop with a store and a
  load. Both must reach the same register values. Every state must last the
  cycle count its `DELTA` predicts. A longer precharge stretches the
  handshakes but does not change the order of events.

## How far it can be trusted, and where it departs

Followed closely:

- the pulse circuit's state rules and its input gating;
- the dual-rail gate behaviour, including the LUT table of the AND gate;
- completion by XOR/AND over all gates;
- the ALU's structure: input registers at the rising edge of dc̄, parallel
  bit gates, completion, output register at the falling edge;
- the six-state one-hot automaton with its exit edges A/B/C and load path;
- the control-signal names and widths of the multicycle datapath.

Own choices, all visible in the file headers:

- the clocked rendering of τΔ and of the edge-clocked registers;
- the state registers capture at the falling edge of dc̄ (the evaluated rails
  are empty at the rising edge);
- the ALU's arithmetic, logic and slt operations beyond AND, and their
  encodings;
- the `ImmSrc` encoding; `ALUCtrl[6:0]` read as `{ALUSrcA, ALUSrcB, ALUControl}`;
- the zero-flag input of the controller;
- the step sequencer;
- memory size and ports, the loader and debug ports.

Not included:

- the FPGA-specific realisation: LUT6/LUT6_2 primitives, placement, and the
  don't-touch and combinational-loop constraints;
- the synchronous Moore controller that serves as the comparison baseline;
- the fully asynchronous CPU in which every datapath unit would handshake,
  which exists only as a blueprint.

No power or timing results should be read from these models. In particular,
speed in clk cycles says little about the self-timed original. Here every
delay element is a whole number of clk cycles. Every handshake also crosses
registers. So one controller step costs 8 to 15 cycles, and a typical
instruction about 65 cycles at `DELTA = 2`. In a self-timed circuit, a step
lasts only as long as its gates actually take. That is on the order of one
period of a 100 MHz clock. What carries over is the order of events and the relative cost of
steps: steps without the ALU are cheaper, and branches need the fewest steps.
