# Pipeline hazards in RTL: forwarding, stalling and branch prediction for Y86-64

A five-stage pipeline (fetch, decode, execute, memory, writeback) keeps five
instructions in flight. Two problems arise from this:

- **Data hazards.** An instruction may need a register value that an older
  instruction has computed but not yet written back.
- **Control hazards.** A conditional jump is resolved only in execute, and a
  `ret` learns its return address only in memory. Until then fetch does not
  know which instruction comes next.

Stalling alone solves both, but it is slow: up to 3 extra cycles per data
dependency, 2 extra per conditional jump and 3 extra per `ret`. This design
shows the standard remedies in synthesizable SystemVerilog:

- **Forwarding.** A value waiting in a pipeline register, on its way to the
  register file, is routed straight to the instruction that needs it.
- **Stalling only where forwarding cannot help.** That leaves two cases: a
  load followed immediately by a use, and `ret`.
- **Always-taken prediction with squashing.** Fetch guesses that every jump is
  taken. A wrong guess is noticed one stage later, and the two wrongly fetched
  instructions are turned into bubbles before they change anything.

Four pipelines are provided, side by side in `hazards_top`:

| pipeline | module | what it shows |
|---|---|---|
| Y86-64, 5 stages | `y86_pipe` | full hazard handling: forwarding from five sources, load/use stall, `ret` stall, taken-prediction with squash, predicted-PC register, exceptions and the Stat register |
| addq only, 4 stages | `addq_fwd_pipe` | the smallest pipeline with a data hazard, and the forwarding multiplexer that removes it |
| Y86-64 subset, 4 stages | `em4_pipe` | execute and memory merged: the same dependency can be a hazard in one pipeline and not in another |
| Y86-64 subset, 6 stages | `e1e2_pipe` | execute split into E1 and E2: where a longer execute forces stalls, and a value forwarded into a later stage instead of stalling |

## Instruction set in brief

The Y86-64 pipeline runs the usual Y86-64 instruction set. Each instruction is
1, 2, 9 or 10 bytes long:

- The first byte holds `icode` in its upper nibble and `ifun` in its lower
  nibble.
- An optional register byte holds `rA` and `rB`.
- An optional 8-byte little-endian constant follows.

Register number `0xF` means "no register". The instructions and their codes:

| icode | instruction | icode | instruction |
|---|---|---|---|
| 0 | `halt` | 6 | `OPq` (`ifun` 0 add, 1 sub, 2 and, 3 xor) |
| 1 | `nop` | 7 | `jXX` (`ifun` 0 jmp, 1 le, 2 l, 3 e, 4 ne, 5 ge, 6 g) |
| 2 | `rrmovq` / `cmovXX` | 8 | `call` |
| 3 | `irmovq` | 9 | `ret` |
| 4 | `rmmovq` | A | `pushq` |
| 5 | `mrmovq` | B | `popq` |

Status codes are AOK=1, HLT=2, ADR=3 (bad address) and INS=4 (bad
instruction). Value 0 marks a bubble inside the pipeline. All of these are in
`rtl/y86_pkg.sv`.

## The five-stage pipeline (`y86_pipe`)

```
          F reg        D reg          E reg          M reg          W reg
   +---> [predPC] --> [fetch] -----> [decode] -----> [execute] ---> [memory] ----> [writeback]
   |        |      y86_fetch      y86_decode      y86_execute     y86_dmem       regfile write,
   |        |      y86_imem       y86_regfile     (ALU, CC)                      Stat register
   |        +-- stall/bubble for every register: y86_hazard_ctrl --+
```

Each stage changes state only at its own point:

| stage | changes | module |
|---|---|---|
| fetch | nothing | `y86_fetch`, `y86_imem` |
| decode | nothing | `y86_decode`, read ports of `y86_regfile` |
| execute | condition codes | `y86_execute` |
| memory | memory writes | `y86_dmem` |
| writeback | register writes and the Stat register | `y86_regfile`, inside `y86_pipe` |

An instruction that has not yet reached execute has therefore changed nothing.
To cancel it, the pipeline only has to overwrite its pipeline register with a
bubble. All branch recovery rests on this rule.

Every pipeline register is a `y86_pipe_reg` holding one struct from `y86_pkg`
(`freg_t` … `wreg_t`). Each has two controls:

- **stall**: hold the current contents.
- **bubble**: load a no-op whose status is "bubble".

### Forwarding (in `y86_decode`)

Decode reads `srcA` and `srcB` from the register file. It then replaces each
value with a newer one if an older instruction still in flight will write that
register. The candidates are checked youngest first, and the first match wins:

| priority | source | where the value is | for |
|---|---|---|---|
| 1 | `e_valE` | ALU output, end of execute | the instruction one ahead |
| 2 | `m_valM` | data-memory output, end of memory | a load two ahead |
| 3 | `M_valE` | execute→memory register | ALU result two ahead |
| 4 | `W_valM` | memory→writeback register | a load three ahead |
| 5 | `W_valE` | memory→writeback register | ALU result three ahead |
| 6 | register file | | otherwise |

Youngest first matters when several instructions in flight write the same
register. For example, after `addq %r10,%r8; addq %r11,%r8; addq %r12,%r8`,
the third instruction must see the result of the second, not the first.

A source of `0xF` never matches. `jXX` and `call` put `valP` in `valA`
instead of a register, because that value must reach later stages:

- For a jump, `valP` is the fall-through address needed for recovery.
- For a call, `valP` is the return address to push.

Writes happen at the clock edge that ends writeback. A read in the same cycle
therefore still sees the old value, which is why `W_valE` and `W_valM` are
forwarding sources.

Example: a back-to-back dependency.

```
                     cycle: 0  1  2  3  4  5
addq %r8,%r9               F  D  E  M  W
addq %r9,%r8                  F  D  E  M  W     decode in cycle 2 takes e_valE
```

### Load/use: the one data hazard forwarding cannot hide

A load's value exists only at the end of its memory stage. If the next
instruction needs it in decode, the two would have to happen in the same
cycle, which is impossible. `y86_hazard_ctrl` detects this case: a `mrmovq` or
`popq` in execute whose `dstM` is a register the instruction in decode reads.
It then:

- holds F and D;
- puts a bubble into E.

One cycle later the value is forwarded from `m_valM`. The cost is one cycle.

### Conditional jumps: predict taken, squash on a wrong guess

Fetch always predicts that a jump is taken and fetches its target next. The
jump evaluates its condition in execute, using the codes written by the `OPq`
ahead of it at the end of the previous cycle. The outcome `Cnd` travels on in
the M register.

If the condition fails while the jump is in execute, two wrongly fetched
instructions are in flight: one in decode, one in fetch. Neither has changed
anything. The control logic puts bubbles into D and E, so both become
"nothing". In the next cycle fetch picks the fall-through address, which the
jump carries in `M_valA`.

```
time  fetch        decode       execute         memory      writeback
1     subq
2     jne          subq
3     target+0     jne          subq (sets ZF)
4     target+1     target+0     jne (ZF: not taken)  subq
5     fall-through bubble       bubble          jne         subq
```

A correctly predicted jump costs 1 cycle and a mispredicted one costs 3.

### The predicted-PC register ("rearranged" PC update)

The F register does not hold "the PC". It holds the *predicted* next PC:

- `valC` for `jXX` and `call`;
- `valP` for everything else.

Here `valP` is the PC plus the instruction length (1, 2, 9 or 10), which is
computed from `icode`. The address actually sent to instruction memory is
chosen at the start of the next cycle (`y86_fetch`):

1. `M_icode == jXX && !M_Cnd`: take `M_valA`. The jump was mispredicted, so
   fetch its fall-through address.
2. `W_icode == ret`: take `W_valM`, the return address just loaded.
3. Otherwise: take `F_predPC`.

Correcting the PC at the start of the cycle gives the same machine as
correcting it at the end. The corrective inputs simply come from one pipeline
register further on.

### `ret`

The return address is known only once the `ret` has read the stack in its
memory stage. While a `ret` is in decode, execute or memory, the control
logic:

- holds F;
- puts bubbles into D.

When the `ret` reaches writeback, fetch takes `W_valM`. A `ret` costs 4
cycles in all.

### Exceptions and the Stat register

`halt`, an invalid instruction (INS) and a fetch or data address error (ADR)
travel down the pipeline as a status value. The machine must stop only after
every older instruction has finished, and before any younger one changes
anything:

- Once an exception is in memory or writeback, the condition codes are frozen
  and the M register receives bubbles. Younger instructions therefore cannot
  store to memory.
- Once the exception reaches W, the W register is held.
- The instruction in W writes no register if its status is an exception.
- The Stat register is loaded from W's status at the end of writeback, so
  `stat` leaves AOK exactly when the stopping instruction completes.

Assertions in `y86_pipe` check three rules in simulation:

- D is never stalled and bubbled in the same cycle.
- Nothing is stored once Stat has left AOK.
- W keeps holding an exception once it has one.

### Control summary (`y86_hazard_ctrl`)

| condition | F | D | E | M | W |
|---|---|---|---|---|---|
| load/use | stall | stall | bubble | | |
| `ret` in D, E or M (no load/use) | stall | bubble | | | |
| mispredicted jump in E | | bubble | bubble | | |
| exception in M or W | | | | bubble | |
| exception in W | | | | | stall |

When a load/use hazard and a `ret` in decode occur together, the load/use
action wins. The `ret` cannot be decoded correctly until its stack-pointer
operand is available.

### Cost per instruction

| kind | cycles with prediction | cycles with stalling only |
|---|---|---|
| conditional jump, not taken | 3 | 3 |
| conditional jump, taken | 1 | 3 |
| `ret` | 4 | 4 |
| load followed at once by a use | 2 | up to 4 |
| anything else | 1 | 1 (+ stalls for data dependences) |

For a mix of 3% not-taken jumps, 5% taken jumps, 1% `ret` and 91% others, this
gives 1.09 cycles per instruction. Stalling alone would give 1.19. The
end-to-end testbench runs exactly such a 100-instruction mix (543 bytes of
code) and measures 109 cycles.

## The addq-only pipeline (`addq_fwd_pipe`)

This is a four-stage pipeline that executes only `addq rA, rB`. Each
instruction is 2 bytes: opcode, then `rA:rB`. The stages are:

- **fetch**: PC register, "+2", instruction memory, split of the register
  byte;
- **decode**: register file read of `R[rA]` and `R[rB]`, with `dstE = rB`;
- **execute**: one adder;
- **writeback**: register file write.

Without forwarding, `addq %r8,%r9; addq %r9,%r8` with r8=800 and r9=900 goes
wrong. The second instruction reads r9 = 900 in decode while 1700 is only just
leaving the adder.

A multiplexer in front of each operand of the decode→execute register fixes
this:

- If the source register equals the `dstE` of the instruction in execute,
  take the adder output.
- Otherwise, if it equals the `dstE` in the execute→writeback register, take
  that value. This second path covers a dependency two instructions apart,
  because the register file is written only at the end of writeback.
- Otherwise, take the register file output.

Expected pipeline-register contents for that example (checked cycle by cycle
in `tb_addq_fwd_pipe`):

| cycle | PC | rA | rB | R[srcA] | R[srcB] | dstE (D→E) | next R[dstE] | dstE (E→W) |
|---|---|---|---|---|---|---|---|---|
| 0 | 0x0 | | | | | | | |
| 1 | 0x2 | 8 | 9 | | | | | |
| 2 | | 9 | 8 | 800 | 900 | 9 | | |
| 3 | | | | **1700** (forwarded) | 800 | 8 | 1700 | 9 |
| 4 | | | | | | | 2500 | 8 |

The register file's `dstM` port is unused while the pipeline runs. It serves
as a preload port (`rf_load_*`) for setting initial register values during
reset. `rst` does not clear the registers of this pipeline.

## Which dependencies are hazards depends on the pipeline

A dependency is a hazard only if the consumer reads the register before the
producer has written it. How far apart the two must be depends on the stages.
Two further pipelines show this on a Y86-64 subset: `halt`, `nop`, `irmovq`,
`OPq`, `rmmovq` and `mrmovq`. There are no jumps, so fetch just steps through
memory. Any other instruction stops the machine with INS.

Both pipelines share the five-stage pipeline's rules:

- status travels with each instruction;
- the Stat register is written in the last stage;
- a faulting instruction writes no register;
- no store happens after an exception.

Neither has condition codes, because no instruction in the subset reads them.

### Fewer stages: execute and memory merged (`em4_pipe`)

`em4_pipe` has four stages: F, D, EM and W. The ALU computes the address and
the data memory is read or written in the same stage. As a result, every
value, including a load's, exists at the end of EM. Decode forwards from the
EM stage (the instruction directly ahead) and from the W register (two
ahead), and never stalls: not even a load followed at once by a use costs a
cycle. An instruction three behind its producer reads the register file.

```
                    4 stages    5 stages
addq %rax,%r8       (done)      W
subq %rax,%r9       W           M
xorq %rax,%r10      EM          E
andq %r8,%r11       D           D
```

In five stages the `andq` must take r8 from the W register. In four stages the
`addq` has already written it, so there is no hazard. `tb_hazards_top` runs
this sequence on both pipelines and checks two things:

- `y86_pipe` forwards from W exactly once;
- `em4_pipe` forwards nothing.

The price of the merge is a longer stage: address addition plus memory access
in one cycle.

### More stages: execute split in two (`e1e2_pipe`)

What if the ALU needs two cycles? `e1e2_pipe` runs the same subset with
execute split into E1 and E2, giving the stages F, D, E1, E2, M, W. Its 64-bit
ALU works in two halves:

- E1 computes the low 32 bits and the carry out of them;
- E2 computes the high 32 bits.

A result therefore exists only at the end of E2.

Decode forwards from the E2 ALU output, the data-memory output, the M register
and the W register, youngest first. Some values cannot be forwarded yet:

- **The writer is in E1.** An ALU operation or `irmovq` directly ahead has no
  result yet. Decode stalls for one cycle (F and D hold, a bubble enters E1).
- **The writer is a load in E1 or E2.** The value exists only at the end of
  M, so decode waits up to two cycles.
- **The value is the data of a store.** `rmmovq` needs its stored value only
  in M, so decode never stalls for it. When the `rmmovq` is in E2, it takes
  the value again from whichever writer is youngest: the instruction directly
  ahead (M register or memory output) or the one two ahead (W register).

The standard example, with the decode stage of each instruction:

```
cycle               0  1  2  3  4  5  6  7  8
addq %rcx,%r9       F  D  E1 E2 M  W
addq %r9,%rbx          F  D  D  E1 E2 M  W        waits for r9 (writer in E1)
addq %rax,%r9             F  F  D  E1 E2 M  W
rmmovq %r9,(%rbx)               F  D  E1 E2 M     rbx from E2 output in decode;
                                                  r9 picked up in E2 from the M register
```

The first `addq` is only one instruction ahead of the second, so it costs
exactly one stall cycle. The `rmmovq` is not delayed: its address base `rbx`
is ready in time, and its data `r9` is collected late. Both `tb_e1e2_pipe` and
`tb_hazards_top` check this timing.

## Interfaces and timing

All four pipelines use one clock (rising edge) and a synchronous, active-high
`rst`.

`y86_pipe` / `hazards_top` `y86_*` ports:

- `load_en`, `load_addr`, `load_data`: write one instruction-memory byte per
  clock. Use this while `rst` is high. The instruction and data memories are
  separate, 1024 bytes each by default (parameters `IMEM_BYTES`,
  `DMEM_BYTES`). Data memory is not cleared at reset.
- After `rst` falls, fetch starts at address 0.
- `stat`: the Stat register. It reads AOK while running and HLT, ADR or INS
  once the machine has stopped.
- `cc`: the condition codes ZF, SF, OF. They reset to ZF=1, SF=0, OF=0.
- `ev_load_use`, `ev_ret_stall`, `ev_mispredict`: high in each cycle the
  hazard is being handled.
- `ev_fwd[4:0]`: which forwarding sources fed decode this cycle
  (e_valE, m_valM, M_valE, W_valM, W_valE).

A lone `halt` sets `stat` to HLT 5 cycles after reset is released. Each
further instruction adds its cost from the table above.

`addq_fwd_pipe` / `hazards_top` `aq_*` ports:

- `load_*`: write the instruction memory, as above.
- `rf_load_*`: preload a register while `rst` is high.
- `pc`: the current PC.
- `ev_fwd_e`, `ev_fwd_w`: high when an operand is forwarded from execute or
  from writeback.

`em4_pipe` / `hazards_top` `e4_*` ports:

- `load_*` and `stat`: as for `y86_pipe`. The memories are 1024 bytes each
  by default.
- `ev_fwd[1:0]`: an operand came from the EM stage or the W register.

A lone `halt` sets `stat` 4 cycles after reset is released. Each further
instruction adds exactly one cycle.

`e1e2_pipe` / `hazards_top` `x6_*` ports:

- `load_*` and `stat`: as for `y86_pipe`. The memories are also 1024 bytes
  each by default.
- `ev_stall`: high in each decode stall cycle.
- `ev_fwd[3:0]`: an E1 operand came from the E2 ALU output, the memory
  output, the M register or the W register.
- `ev_fwd_late`: an `rmmovq` took its value again in E2.

A lone `halt` sets `stat` 6 cycles after reset is released. Each further
instruction adds one cycle, plus its stall cycles.

## Files

| file | content |
|---|---|
| `rtl/y86_pkg.sv` | encodings, status codes, pipeline-register structs and their bubble values |
| `rtl/y86_fetch.sv` | PC selection, split, instruction length, prediction |
| `rtl/y86_imem.sv`, `rtl/y86_dmem.sv` | memories |
| `rtl/y86_decode.sv` | register selection and forwarding |
| `rtl/y86_regfile.sv` | 15 × 64-bit register file, 2 read and 2 write ports |
| `rtl/y86_execute.sv` | ALU, condition codes, condition evaluation |
| `rtl/y86_hazard_ctrl.sv` | stall and bubble logic |
| `rtl/y86_pipe_reg.sv` | pipeline register with stall and bubble |
| `rtl/y86_pipe.sv` | the five-stage pipeline |
| `rtl/addq_fwd_pipe.sv` | the addq-only pipeline |
| `rtl/em4_pipe.sv` | the four-stage pipeline with execute and memory merged |
| `rtl/e1e2_pipe.sv` | the six-stage split-execute pipeline |
| `rtl/hazards_top.sv` | all four side by side |
| `tb/y86_tb_pkg.sv` | a small assembler, and an instruction-level reference model that also predicts cycle counts |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench ends by printing `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/y86_pkg.sv tb/y86_tb_pkg.sv tb/tb_hazards_top.sv --top-module tb_hazards_top
./obj_dir/Vtb_hazards_top
```

Replace `tb_hazards_top` with any other `tb_*` name to run that testbench.
What each one checks:

- `tb_hazards_top` runs all four pipelines at their default sizes. It covers:
  - a hazard program compared with the reference model, including the exact
    cycle count;
  - the instruction-mix workload (109 cycles);
  - an address error;
  - the addq example;
  - the split-execute example (one stall, store not delayed, 19 cycles);
  - the four-against-five-stage example.

  It fails if any mechanism never occurs: each forwarding source, load/use,
  `ret`, misprediction, halt, address error, both addq paths, and the
  six-stage stall, forwarding and late store value.
- `tb_em4_pipe` runs the four-stage example, loads used at once by ALU
  operations and by stores, both forwarding sources, errors and 200 random
  programs. It checks that every instruction enters EM exactly one cycle after
  the one before.
- `tb_y86_pipe` runs directed programs, then 300 random programs with forward
  jumps, calls and returns, loads, stores, push/pop and cmov. It compares registers, all of data
  memory, the condition codes, Stat and the exact cycle count with the
  reference model. It also runs the standard forwarding examples and checks,
  for each instruction, which sources its decode used. For example, in
  `addq %r8,%r9; subq %r9,%r11; mrmovq 4(%r11),%r10; rmmovq %r9,8(%r11);
  xorq %r10,%r9`, the `rmmovq` takes r9 from `W_valE` and r11 from `M_valE`.
- `tb_e1e2_pipe` runs the split-execute example, each forwarding source, the
  load cases, an address error, an invalid instruction and 200 random
  programs. It compares with the reference model and checks the cycle in
  which every instruction enters E1 against a separate timing model.
- The unit testbenches check each module against independently written
  expectations (tables, 128-bit overflow arithmetic, plain arrays).

To change a size, override `IMEM_BYTES` / `DMEM_BYTES` on `y86_pipe`, `em4_pipe` or
`e1e2_pipe`, or
`IMEM_BYTES` on `addq_fwd_pipe`.

## How far to trust it, and where it goes beyond the lecture design

The stage split and the forwarding multiplexers come from the lecture design
this RTL follows. So do the always-taken prediction, squashing into bubbles,
the predicted-PC register with its recovery paths, the costs per instruction
kind, and the addq pipeline's structure and example values.

The design fills in everything that design leaves open, using the usual
Y86-64 conventions:

- instruction and status encodings;
- the full list and order of forwarding sources;
- the exact stall and bubble equations;
- exception handling, including the Stat register as a real register and
  "no register write by a faulting instruction";
- ALU flags and condition codes;
- separate instruction and data memories, 1024 bytes each;
- reset values.

Two choices are specific to the addq pipeline:

- the second forwarding path from writeback;
- the register preload port.

For the six-stage pipeline, only the stage split, the timing rule "result
only after E2" and the example's timing are given. These parts are this
design's own:

- the instruction subset;
- the halved adder;
- the late pickup of the stored value, the simplest mechanism that matches
  the example's timing.

For the four-stage pipeline, only the stage split and the example are given.
The forwarding sources follow from it.

The stall-only pipeline is not built. It serves only as the baseline the
costs are compared with.

The plain PC update is not built either. It is a real PC register that is
corrected at the end of the cycle, from the execute stage's branch outcome
and the memory stage's return address. It would behave the same, cycle for
cycle, as the predicted-PC register used here.

Limits to be aware of:

- There is no self-modifying code, because the memories are separate.
- In `y86_pipe`, an `OPq` whose `ifun` is not 0–3 is not rejected. It adds,
  and leaves the overflow flag clear. The smaller pipelines reject it as an
  invalid instruction.
- Random programs jump forward only, apart from calls to three subroutines
  and their returns. Backward jumps (loops) are tested only in directed
  programs.
