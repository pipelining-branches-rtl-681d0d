# A five-stage Y86-64 pipeline that guesses its jumps

A pipelined processor fetches a new instruction every cycle, but for a
conditional jump it does not know which instruction comes next until the jump
has reached the execute stage and read the condition codes. A `ret` is worse:
its target is a value in memory, known only after the memory stage. This
design keeps the pipeline busy anyway:

* **conditional jumps are guessed taken.** Fetch goes on at the jump target at
  once. If the guess was right nothing is lost; if it was wrong the two
  instructions fetched in the meantime are thrown away ("squashed") before
  they have changed anything, and fetch restarts at the fall-through address.
* **`ret` waits.** Fetch stops and no-ops are fed into the pipeline until the
  return address has been loaded.
* **data dependences** are handled by forwarding results to the end of the
  decode stage, plus a one-cycle stall when a loaded value is needed by the very
  next instruction.

All of this is built from one primitive: a pipeline register bank that, each
cycle, either takes its new input, keeps its old value (**stall**), or loads a
no-op (**bubble**).

The repository also holds the much simpler four-stage pipeline that only
executes `addq` and has no forwarding. It is the starting point from which the
five-stage design grows, and it shows the data hazard that forwarding removes.

The RTL is SystemVerilog (IEEE 1800-2017). It passes Verilator lint and the
Yosys/slang front end, and every module has a self-checking testbench.

---

## 1. The pipeline

| stage | does | changes state outside the pipeline registers |
|---|---|---|
| F fetch | selects the PC, reads the instruction, splits it, predicts the next PC | – |
| D decode | reads registers, forwards newer values | – |
| E execute | ALU, evaluates jump / cmov conditions | condition codes |
| M memory | loads and stores | data memory |
| W writeback | writes registers, reports status | registers, status |

The stages are separated by five register banks (`pipe_reg`), each holding
one packed struct from `y86_pkg`:

| bank | holds | bubble value |
|---|---|---|
| F | predicted PC | (never bubbled; reset to 0) |
| D | stat, icode, ifun, rA, rB, valC, valP | `nop`, rA = rB = 0xF |
| E | stat, icode, ifun, valC, valA, valB, dstE, dstM | `nop`, no destinations |
| M | stat, icode, cnd, valE, valA, dstE, dstM | `nop` |
| W | stat, icode, valE, valM, dstE, dstM | `nop` |

Register number 0xF means "no register". Because nothing but the condition
codes, memory and the register file holds architectural state, an
instruction can be cancelled at no cost while it is still in fetch or
decode. In execute it can still be cancelled if its condition-code write is
suppressed. Replacing it in its pipeline register with the bubble value is
enough.

## 2. Stall and bubble (`pipe_reg`, `hazard_ctl`)

`pipe_reg` is parameterised by the struct type and its default value:

```
rst    -> q <= DEFAULT
stall  -> q <= q          the stage repeats the same instruction next cycle
bubble -> q <= DEFAULT    a no-op enters the stage next cycle
else   -> q <= d
```

`stall` and `bubble` together is a control error. An assertion catches it.

`hazard_ctl` drives these inputs. The three hazards, with `d_srcA/d_srcB` the
registers the instruction in decode reads:

| condition | F | D | E | M | W |
|---|---|---|---|---|---|
| **load/use**: `mrmovq`/`popq` in E and its `dstM` is `d_srcA` or `d_srcB` | stall | stall | bubble | | |
| **mispredict**: `jXX` in E whose condition is false | | bubble | bubble | | |
| **ret**: `ret` in D, E or M (and no load/use) | stall | bubble | | | |
| **bad status** in M (from the memory) or in W | | | | bubble | stall |

A `ret` that is waiting in decode behind a load of `%rsp` is stalled, not
bubbled, so that it is not lost. The condition codes are written only for an
`OPq` in execute while no later instruction has a bad status.

## 3. Picking the fetch PC (`pc_update`)

The PC register is replaced by a *predicted-PC* register, the F bank. Two
multiplexers surround it:

```
            end of fetch                              start of fetch
 valC  (jmp, jXX, call) ─┐                    ┌─ M_valA  if jXX in M was not taken
 own PC (halt)          ─┼─► [F: predicted PC]─┼─ W_valM  if ret in W
 valP = PC + length     ─┘   (stall = repeat)  └─ else predicted PC  ──► f_pc ─► instruction memory
```

* **Prediction** (end of fetch). `jmp`, `call` and every conditional jump go
  to their immediate. A `halt` repeats its own PC. Everything else goes on to
  `valP`. The instruction length follows from the icode alone: 1, 2, 9 or 10
  bytes (`fetch_split`).
* **Stall**. While F is stalled (load/use, or a `ret` in flight) the
  predicted PC is kept and fetched again.
* **Correction** (start of the next fetch). The corrections come from the
  pipeline-register outputs of the instruction that caused them. A mispredicted
  jump carries its own fall-through address in `valA`, and it is used while the
  jump is in M. The return address is used when the `ret` is in W, as the
  `valM` it loaded. The jump correction has priority, although the two cannot
  happen at once.

Doing the correction at the start of fetch, from the later stages' register
outputs, is one of two equivalent arrangements, and the default. Setting
`PC_CORRECT_AT_END = 1` on `y86_pipe` selects the other. There the F bank holds
the real PC, and the correction is written into it at the end of the cycle
before it is used:

```
 prediction (as above)                ─┐
 E_valA  if jXX in E is not taken now  ─┼─► [F: PC] ──► f_pc ─► instruction memory
 m_valM  if ret in M is loading it now ─┘
```

The inputs are the same values one stage earlier: the jump's condition as
execute computes it, and the return address as memory reads it. A correction
is loaded even while fetch is stalled; without that, a `ret` in M would lose
its address. The work moves from the start of fetch to the end of the previous
cycle, and the fetch sequence stays the same. `tb_y86_pipe` runs both versions
side by side and requires the same fetch PC in every cycle.

## 4. What a jump or a `ret` costs

Mispredicted `jne`:

| cycle | fetch | decode | execute | memory | writeback |
|---|---|---|---|---|---|
| 1 | subq | | | | |
| 2 | jne | subq | | | |
| 3 | target instr 1 (guess) | jne | subq (sets ZF) | | |
| 4 | target instr 2 (guess) | target instr 1 | jne (reads ZF: not taken) | subq | |
| 5 | fall-through instr | bubble | bubble | jne | subq |

In cycle 4 `hazard_ctl` bubbles D and E, which squashes both guesses. In cycle
5 `pc_update` fetches from the jump's `valA`. The next real instruction
arrives 3 cycles after the jump, compared with 1 when the guess is right.

`ret` (after `call f`, where `f: ret`):

| cycle | fetch | decode | execute | memory | writeback |
|---|---|---|---|---|---|
| 2 | ret | call | | | |
| 3 | (stalled) | ret | call | | |
| 4 | (stalled) | bubble | ret | call (stores return address) | |
| 5 | (stalled) | bubble | bubble | ret (loads it) | call |
| 6 | instruction after the call | bubble | bubble | bubble | ret |

That is 4 cycles in total per `ret`. A load followed at once by a use of the
loaded register costs 2 cycles (1 stall). Every other instruction costs 1.

For a program of *n* instructions, the cycles from reset to `halted` are

```
n + 3  +  2·(not-taken conditional jumps)  +  3·(rets)  +  1·(load/use pairs)
```

The testbenches check this count exactly, against an independent
instruction-level model.

With the mix of 3 % not-taken jumps, 5 % taken jumps, 1 % `ret` and 91 % other
instructions, guessing "taken" gives 3·0.03 + 1·0.05 + 4·0.01 + 1·0.91 = 1.09
cycles per instruction. Stalling on every conditional jump would give 1.19.
`tb_instr_mix` runs a loop with exactly this mix and measures 1.091.

## 5. Forwarding (`fwd_unit`)

Each operand read in decode is compared with the destinations of the older
instructions still in flight. The youngest match wins:

1. `e_dstE` / `e_valE`: ALU result being computed now. For a `cmovXX` whose
   condition is false, `dstE` is already 0xF.
2. `M_dstM` / `m_valM`: value being loaded now.
3. `M_dstE` / `M_valE`
4. `W_dstM` / `W_valM`
5. `W_dstE` / `W_valE`
6. otherwise the register file.

For `call` and `jXX`, operand A is `valP` instead. It is carried down the
pipeline in `valA`, which is how a mispredicted jump knows its fall-through
address. The one case forwarding cannot cover, a value loaded in M that is
needed in decode in the same cycle, is the load/use stall above.

## 6. The addq pipeline (`addq_pipe`)

This is four stages, with no control logic at all:

```
PC (+2) → instr. mem → split {rA,rB} ─►[fetch/decode]─► reg read ─►[decode/execute: R[rA], R[rB], dstE]─► add ─►[execute/writeback: sum, dstE]─► reg write
```

Every instruction is 2 bytes. `60 rA:rB` is `addq rA, rB`; any other first
byte makes the instruction a no-op. A result is written at the end of the
fourth cycle after its fetch, so an instruction sees the results of
instructions up to three before it, but not of the two just before it. With `%r8 = 800`, `%r9 = 900`, the program `addq %r8,%r9 ; addq %r9,%r8`
leaves `%r9 = 1700` but `%r8 = 900 + 800 = 1700`, not 2500. The testbench
checks this hazard as the intended behaviour. An addq-only machine cannot load
constants, so the register file's otherwise unused second write port serves as
an initialisation port (`rf_init_*`). `rst` clears the PC and the pipeline
registers but not the register file.

## 7. Instruction set, memories, status

* **Instructions:** the standard Y86-64 set and byte encodings. These are
  `halt 00`, `nop 10`, `rrmovq/cmovXX 2f rArB`, `irmovq 30 FrB V`,
  `rmmovq 40 rArB D`, `mrmovq 50 rArB D`, `OPq 6f rArB` (add, sub, and, xor),
  `jXX 7f Dest`, `call 80 Dest`, `ret 90`, `pushq A0 rAF` and `popq B0 rAF`.
  Immediates are 8-byte little-endian. The conditions are always, le, l, e,
  ne, ge and g (0–6).
* **Memories:** separate instruction memory (`imem`, combinational read of
  10 bytes, 2 for the addq pipeline) and data memory (`dmem`, 8-byte
  little-endian words at any byte address, combinational read, write on the
  clock edge). Each is 1 KiB by default (`IMEM_BYTES`, `DMEM_BYTES`). The
  program is loaded byte by byte through `imem_we/imem_waddr/imem_wdata`,
  normally while `rst` is held. The data memory is not cleared by reset.
* **Status** (`stat_t`): AOK, HLT, ADR (instruction or data address out of
  range) and INS (invalid icode). It travels with the instruction and takes
  effect in writeback. `halted` rises when the instruction in W is not AOK. At
  that point M is being bubbled and W stalled, so nothing after it changes
  state. The failing instruction itself writes no register either. After
  `rst` the condition codes are ZF=1, SF=0, OF=0 and all registers are 0.
* **Clocking:** one clock, rising edge, synchronous active-high reset.

## 8. Modules

| file | role |
|---|---|
| `rtl/y86_pkg.sv` | encodings, `stat_t`, `cc_t`, pipeline-register structs and their bubble values |
| `rtl/pipe_reg.sv` | register bank with stall/bubble (type-parameterised) |
| `rtl/pc_update.sv` | fetch-PC select and next-PC prediction, in either arrangement |
| `rtl/fetch_split.sv` | instruction split, length, valP, fetch status |
| `rtl/imem.sv`, `rtl/dmem.sv` | memories |
| `rtl/regfile.sv` | 15 × 64-bit, 2 read + 2 write ports (+ debug read) |
| `rtl/fwd_unit.sv` | decode forwarding |
| `rtl/alu.sv`, `rtl/cond_codes.sv` | ALU with flags; CC register and condition test |
| `rtl/hazard_ctl.sv` | stall/bubble/CC-write control |
| `rtl/y86_pipe.sv` | the five-stage processor |
| `rtl/addq_pipe.sv` | the four-stage addq processor |
| `rtl/pipeline_top.sv` | both processors side by side (`y86_*` and `addq_*` ports) |

`y86_pipe` brings out per-cycle event flags so that a testbench can see each
mechanism at work. They are `ev_load_use`, `ev_mispredict`, `ev_ret_bubble`,
`ev_fwd`, `ev_cc_write`, `ev_pc_from_jump` and `ev_pc_from_ret`. It also
brings out the condition codes, the fetch PC and a register read port
(`dbg_sel/dbg_val`).

## 9. Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. To build and
run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/y86_pkg.sv tb/tb_y86_pipe.sv --top-module tb_y86_pipe
./obj_dir/Vtb_y86_pipe
```

| testbench | what it shows |
|---|---|
| `tb_pipeline_top` | both processors at the default sizes. Directed and random Y86 programs are checked against the reference model for registers, status and exact cycles, and every mechanism is counted, including stops on a bad status. The addq hazard is also shown. |
| `tb_y86_pipe` | 10 directed + 60 random programs. The directed ones include an invalid instruction byte, a load and a store outside data memory, and a jump outside instruction memory; each must stop with the right status and no later change. The distance from jump/ret fetch to the true successor is checked: 3 cycles for a mispredicted jump, 1 for a correctly predicted one, 4 for a ret. For `addq; jne (not taken); subq; call; pushq` the first fetch of each instruction must come 0, 1, 4, 5 and 6 cycles after the `addq`. A second copy built with `PC_CORRECT_AT_END = 1` runs alongside and must match in every cycle. |
| `tb_instr_mix` | the 3/5/1/91 % mix, measured at 1.09 cycles per instruction |
| `tb_addq_pipe` | addq timing model, the worked 800/900 example cycle by cycle, random programs with some non-addq words |
| `tb_<module>` | unit tests of each block |

The helper packages in `tb/` are a small assembler (`y86_asm_pkg`), an
instruction-at-a-time reference model that also predicts the cycle count
(`y86_iss_pkg`), and the directed and random test programs (`y86_prog_pkg`).

## 10. Core scheme and implementation choices

The core is the classic control scheme for this pipeline: five stages, each
with a fixed place where it changes state; predict-taken for conditional jumps;
squashing with bubbles in D and E when the jump in E turns out not taken;
bubbles while a `ret` is in D, E or M; the load/use stall (stall F and D,
bubble E); the stall/bubble register-bank semantics; the PC update (predict
from length and immediate, repeat on stall, correct from the jump's or the
ret's pipeline registers at the start of fetch, or in the alternative
arrangement at the end of the cycle before); forwarding to the end of decode
with the most recent value winning; the cycle costs (1/3/4); and the addq
pipeline it grows from.

Choices made in this implementation: the standard Y86-64 byte encoding;
separate 1 KiB memories with a load port; the status handling (a failing
instruction and everything after it change nothing) and the halt behaviour;
the reset values; write-port priority (M over E); the debug and event ports;
the addq register-initialisation port and its no-op rule for other opcodes.

Not built: stall-only jump handling (the slower baseline in section 4),
longer variants with split execute or split memory stages, and any gate-delay
timing model.
