# Pipelined Y86-64 processor with forwarding, prediction and squashing

A pipelined processor overlaps instructions: while one instruction adds, the next
is reading its registers and the one after that is being fetched. Two problems
come with that. An instruction may need a value that an instruction a few
stages ahead of it has computed but not yet written back (a **data hazard**).
And the processor must fetch the next instruction before it knows where a
conditional jump or a `ret` is going (a **control hazard**).

This RTL contains two pipelines that show how these problems are solved:

* `y86_pipe` is a five-stage Y86-64 processor (fetch, decode, execute, memory,
  writeback). **Forwarding** removes most data hazards, so it completes one
  instruction per cycle except in three cases:
  * a load followed straight away by a use of the loaded register costs **one
    stall cycle**;
  * a conditional jump is **predicted taken**, and a wrong guess costs **two
    cycles**, during which the wrongly fetched instructions are **squashed**
    into bubbles;
  * `ret` **stalls fetch for three cycles** until the return address has been
    read from memory.
* `addq_cpu` is a four-stage pipeline (fetch, decode, execute, writeback) that
  only executes `addq`. It shows the data hazard in its simplest form. With
  `FORWARDING=0` it cures the hazard by stalling: it holds the PC and inserts
  no-ops. With `FORWARDING=1` (the default) it forwards results instead and
  never stalls.

`pipelining_top` instantiates the Y86-64 pipeline and both addq variants side
by side. Their ports are prefixed `y_`, `a_` (forwarding) and `s_` (stalling).
They share only clock and reset.

## The pipeline register: stall and bubble

Every pipeline register (`pipe_reg`) has two control inputs in front of its
flip-flops:

| stall | bubble | next value            | effect on the stage behind it          |
|-------|--------|-----------------------|----------------------------------------|
| 0     | 0      | input                 | normal                                  |
| 1     | 0      | old value (kept)      | repeats the same instruction next cycle |
| 0     | 1      | `DEFAULT` (a no-op)   | does nothing next cycle                 |

All hazard handling comes down to setting these two bits on the five
registers (F = predicted PC, D, E, M, W). `pipe_reg` takes the stored type as a
type parameter, so each stage register is one packed struct from `y86_pkg`.
Each struct has a bubble constant (`D_BUBBLE`, ...): icode `nop`, register
numbers 0xF ("no register"). Asserting stall and bubble together is an error,
and an assertion reports it. Its default configuration (8 bits, default 0xFF)
reproduces a worked example: with inputs 0x01, 0x02, ... and stall in cycles 1,
6 and 7 and bubble in cycle 3, the output is 0xFF, 0x01, 0x01, 0x03, 0xFF, 0x05,
0x06, 0x06, 0x06.

## Hazard control (`hazard_ctl`)

| situation (detected in this cycle)                              | F     | D      | E      | M      | W     | cost |
|-----------------------------------------------------------------|-------|--------|--------|--------|-------|------|
| load/use: `mrmovq`/`popq` in E writes a register that D reads   | stall | stall  | bubble |        |       | 1    |
| mispredicted jump: `jXX` in E is not taken                      |       | bubble | bubble |        |       | 2    |
| `ret` in D, E or M (and no load/use)                            | stall | bubble |        |        |       | 3    |
| exception (halt, bad address, bad instruction) in M or W        |       |        |        | bubble |       | stops |
| exception in W                                                  |       |        |        |        | stall | stops |

Things to note:

* The load/use stall is needed because forwarding reaches only the end of
  decode. A loaded value exists at the end of the memory stage. That is one
  cycle too late for the instruction directly behind the load, which is then
  in execute.
* A mispredicted jump is found when the jump is in execute: its condition codes
  are ready then. The two instructions behind it (in fetch and decode) have
  changed nothing yet. Only execute and later stages change state: condition
  codes in execute, memory in memory, registers in writeback. So turning those
  two instructions into bubbles undoes them completely.
* If a `ret` in decode is itself waiting on a load (for example `popq %rsp;
  ret`), the load/use stall takes precedence.
* Once an exception reaches memory, no later instruction may write memory or
  condition codes. The writeback register then holds the faulting instruction,
  and `stat` reports it.

## PC selection and prediction (`pc_select`, `fetch_split`)

The PC register holds a *prediction*. At the start of each cycle the fetch PC
is chosen:

1. A jump in the memory stage that was not taken: its fall-through address. This
   is the jump's `valP`, carried down the pipeline in `valA`.
2. Otherwise, a `ret` in writeback: the return address it has just loaded
   (`W_valM`).
3. Otherwise, the prediction.

The next prediction is `valC` for `call` and every `jXX` (jumps are predicted
taken). It is PC + instruction length for everything else, and the PC itself
after a `halt` or a bad fetch, so that fetch repeats. During a stall the PC
register keeps its value through its stall input. `fetch_split` decodes the
fetched bytes into icode, ifun, rA, rB and valC. It computes `valP` and the
fetch status.

This arrangement corrects the PC at the *beginning* of fetch, from the
pipeline registers of the jump or `ret`. Another arrangement, which corrects
the prediction before it is written into the PC register, is equivalent but is
not the one used here.

## Forwarding (`fwd_select`)

Destination registers are decided in decode (`dstE` for ALU results, `dstM`
for loaded values) and travel with the instruction. The forwarding logic
therefore only compares register numbers. For each source register that is not
0xF, decode takes the newest value in flight, in this order:

1. `e_valE`: the ALU output in execute, going to `e_dstE`. A `cmovXX` whose
   condition fails gets `e_dstE = 0xF`.
2. `m_valM`: the value being loaded in memory (`M_dstM`).
3. `M_valE`: the ALU result in the memory register (`M_dstE`).
4. `W_valM`: the loaded value in writeback (`W_dstM`).
5. `W_valE`: the ALU result in writeback (`W_dstE`).
6. Otherwise the register file output.

`call` and `jXX` pass `valP` as `valA` instead. The register file writes at the
clock edge that ends writeback and has no internal bypass. A register written
in cycle *n* is readable in cycle *n*+1. That is why writeback is a forwarding
source.

Values are forwarded only into decode. So `mrmovq` followed directly by an
`rmmovq` that stores the loaded register also takes the one-cycle load/use
stall. Forwarding into the memory stage would avoid that stall, but this design
does not have it.

## The addq pipeline (`addq_cpu`)

Its stages:

* fetch: PC, instruction memory, split, and the PC + 2 adder;
* fetch/decode register: `rA`, `rB`;
* decode: register read, with `srcA = rA`, `srcB = rB`, `dstE = rB`;
* decode/execute register: `R[srcA]`, `R[srcB]`, `dstE`;
* execute: ADD;
* execute/writeback register: `next R[dstE]`, `dstE`;
* writeback: register write. The `dstM` port is unused by the program; it
  carries the register preload.

Every instruction is `addq rA, rB`, two bytes long, with rA:rB in byte 1.
Start with `R[i] = 100*i`. The sequence "r9 += r8, then r8 += r9, then
r11 += r10" leaves r9 = 1700, r8 = 2500 and r11 = 2100. The table shows how
it runs in the stalling variant. The values are the pipeline register contents
during each cycle, and F means a no-op (register 0xF):

| cycle | PC  | fetch/decode rA rB | decode/execute R[srcA] R[srcB] dstE | execute/writeback next R[dstE], dstE |
|-------|-----|--------------------|-------------------------------------|--------------------------------------|
| 0     | 0x0 | F F                | F                                   | F                                    |
| 1     | 0x2 | 8 9                | F                                   | F                                    |
| 2     | 0x2 | F F                | 800 900 9                           | F                                    |
| 3     | 0x2 | F F                | F                                   | 1700 9                               |
| 4     | 0x4 | 9 8                | F                                   | F                                    |
| 5     |     | 10 11              | 1700 800 8                          | F                                    |
| 6     |     |                    | 1000 1100 11                        | 2500 8                               |
| 7     |     |                    |                                     | 2100 11                              |

The forwarding variant runs "r9 += r8, rax += rax, r10 += r9, r8 += r10"
(rax = 0) without a stall. The third instruction takes r9 = 1700 from the
execute/writeback register. The fourth takes r10 = 2700 straight from the
adder output.

The stalling variant detects the hazard *in fetch*. It compares the fetched
instruction's registers with the destinations of the instructions in decode
and execute, then holds the PC and puts a no-op into the fetch/decode register.
The forwarding variant takes an operand from the ADD output (producer one
instruction ahead) or from the execute/writeback register (producer two
ahead).

## Instruction set and interfaces

The Y86-64 encoding is the standard one:

| icode | instructions    | length (bytes) |
|-------|-----------------|----------------|
| 0     | halt            | 1              |
| 1     | nop             | 1              |
| 2     | rrmovq / cmovXX | 2              |
| 3     | irmovq          | 10             |
| 4     | rmmovq          | 10             |
| 5     | mrmovq          | 10             |
| 6     | OPq             | 2              |
| 7     | jXX             | 9              |
| 8     | call            | 9              |
| 9     | ret             | 1              |
| A     | pushq           | 2              |
| B     | popq            | 2              |

* OPq functions: add 0, sub 1, and 2, xor 3.
* Conditions: always 0, le 1, l 2, e 3, ne 4, ge 5, g 6.
* Register 4 is `%rsp`, and 0xF means "no register".
* Byte 1 holds rA:rB when the instruction has registers. The 8-byte
  little-endian constant follows.

`y86_pipe` ports:

* `prog_we/prog_addr/prog_data`: a byte-wide program load port into the
  instruction memory.
* `dbg_reg/dbg_val`: read any register.
* `stat`: the status of the instruction in writeback (0 AOK, 1 HLT, 2 ADR,
  3 INS). The processor stops when it is not AOK.
* `retire`: pulses per completed instruction other than a nop or bubble.
* `ev_*`: flag each hazard mechanism as it acts, and report the forwarding
  source chosen for `valA`/`valB`.

Reset is synchronous and active high. It sets the PC to 0, clears the
registers, and sets the condition codes to ZF=1, SF=0, OF=0.

Instruction memory (`imem`) and data memory (`dmem`) are separate byte arrays
of 1024 bytes each (`IMEM_BYTES`, `DMEM_BYTES`):

* Both read combinationally.
* The instruction memory returns ten bytes at the PC.
* The data memory reads and writes 8-byte little-endian words at any byte
  address. Writes happen at the clock edge.
* An access that does not fit in the array raises status ADR.

Programs cannot modify their own code.

`addq_cpu` has the same program port and a register preload port
(`init_we/init_reg/init_val`). Its register file is not reset, so it can be
preloaded while `rst` holds the pipeline. It also brings out its pipeline
register contents, for comparison with tables like the one above.

## Where this design departs from or adds to its source

This design follows a lecture on pipeline hazards for the Y86-64 teaching
processor. The lecture gives the hazard rules, the stall/bubble mechanism, the
PC update cases and the addq pipeline. It does not give:

* The instruction encoding, lengths and register usage of each instruction. The
  standard Y86-64 ones are used.
* Exception handling. The usual textbook rules are used. Register writes of a
  faulting instruction are suppressed.
* The forwarding priority below the execute and memory ALU results. The
  textbook order is used.
* Memory sizes and organisation. Two 1024-byte arrays with load ports were
  chosen.
* Reset values, except the initial flags ZF=1, SF=0, which are given.
* The addq instruction byte layout and its register preload port.

Not built:

* A variant that stalls on every conditional jump instead of predicting. It
  costs 3 cycles per jump and 1.19 cycles per instruction on the example mix,
  against 1.09 here.
* The six-stage F/D/E1/E2/M/W and four-stage F/D/EM/W pipelines. They appear
  only in exercises, as stage lists without a datapath.
* An addq pipeline extended with `subq`, `je` and flags. It only shows a jump
  waiting two cycles for the flags.
* Path delays in picoseconds. These depend on the technology and have no RTL
  counterpart.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

* `tb_y86_pipe` assembles programs with the helper package `y86_asm_pkg` and
  runs them to halt. It compares all registers, the halt status and the
  **cycle count** against an instruction-level reference model. The model
  predicts the cycles as instructions + 4 + 1 per load/use + 2 per
  not-taken jump + 3 per ret. The programs are the lecture's examples plus 40
  random programs with loads, stores, pushes, pops, conditional moves, forward
  jumps and calls. Each hazard mechanism and each forwarding source must occur.
* `tb_pipe_reg` also drives a bank of five registers with two mixed
  stall/bubble patterns. Starting from E D C B A, they must give E nop C nop B
  and F E C nop B.
* `tb_addq_cpu` checks both addq variants cycle by cycle against the table
  above and the forwarding table. It then runs random dependent chains, counting
  stall cycles against a dependence model.
* `tb_instr_mix` runs a 100-instruction program with the lecture's hypothetical
  mix: 3% not-taken jumps, 5% taken jumps, 1% ret, 91% others. It measures
  109 cycles, i.e. 1.09 cycles per instruction.
* `tb_pipelining_top` runs all three pipelines end to end at default parameters.
  It requires every mechanism to occur at least once: load/use stall, squash,
  ret stall, each Y86-64 forwarding source, both addq forwarding paths and the
  addq stall. The stalling variant's stall count must match the dependence
  model.
* The unit testbenches (`tb_pipe_reg`, `tb_regfile`, `tb_y86_alu`,
  `tb_cond_eval`, `tb_imem`, `tb_dmem`, `tb_fetch_split`, `tb_pc_select`,
  `tb_fwd_select`, `tb_hazard_ctl`) use random stimulus against independent
  models, plus directed cases.

To simulate one with Verilator (the package files must come first):

    verilator --binary --timing --assert -Wno-fatal --top-module tb_y86_pipe \
        -y rtl -y tb +libext+.sv rtl/y86_pkg.sv tb/y86_asm_pkg.sv tb/tb_y86_pipe.sv
    ./obj_dir/Vtb_y86_pipe

Every testbench runs in well under a second.

## Files

* `rtl/y86_pkg.sv`: types, encodings, pipeline register structs and bubble
  constants.
* `rtl/pipe_reg.sv`, `hazard_ctl.sv`, `fwd_select.sv`, `pc_select.sv`,
  `fetch_split.sv`, `regfile.sv`, `y86_alu.sv`, `cond_eval.sv`, `imem.sv`,
  `dmem.sv`: the building blocks.
* `rtl/y86_pipe.sv`: the five-stage processor.
* `rtl/addq_cpu.sv`: the four-stage addq pipeline.
* `rtl/pipelining_top.sv`: all three pipelines side by side.
* `tb/`: testbenches, plus `y86_asm_pkg.sv`, the assembler and reference model.
