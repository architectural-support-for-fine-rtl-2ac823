# Cheap thread switching on a SPARC-style integer unit

Fine-grain multithreaded programs of the Threaded Abstract Machine (TAM) kind spend a large
share of their instructions on scheduling. They fork threads, decrement entry counters, and
pop the next enabled thread from a stack in the activation frame. That stack is the *local
continuation vector*, or LCV. On a stock RISC processor, a synchronising fork that fails
costs a load, a decrement, a branch, a store-back, and then a whole STOP: load from the LCV,
bump the pointer, jump.

This design is a small SPARC V8 integer-unit subset with two added instructions:

* **cdbp** ("conditional double branch and pop"). If its condition holds, it branches
  PC-relative to a thread. Otherwise it jumps to the thread held in register `r_lcv`, which
  caches the top of the LCV. It also pops the next LCV entry from memory into `r_lcv`.
* **std** (store and decrement). It pushes an LCV entry and moves the pointer in one
  instruction.

Because the top of the LCV lives in a register, a failed synchronisation becomes a direct
jump with no separate STOP. A STOP becomes a two-instruction idiom.

The RTL is synthesizable SystemVerilog. It runs the scheduling code sequences with the same
cycle costs as the reference cost model for the extended SPARC. For example, a failed
synchronising branch costs 9 cycles instead of 13.

## Software conventions the hardware relies on

Three registers of the single register window have fixed roles. They are set in
`tam_pkg` and can be changed through the `inst_decode` parameters.

| register | number | meaning |
|---|---|---|
| `lcv` | `%l0` (r16) | address of the next free LCV slot; the LCV grows downward |
| `cbbase` | `%l1` (r17) | base address of the current code-block |
| `r_lcv` | `%l2` (r18) | the top LCV entry, as a 16-bit offset from `cbbase` |

LCV entries are 16-bit code-block offsets stored big-endian at even addresses. After a push,
`[lcv+2]` holds the entry that was the top before `r_lcv` was overwritten. Software should
keep a continuation at the bottom of the LCV that leads to the frame-switch routine, so that
a pop from an empty LCV lands somewhere meaningful.

The scheduling idioms (`fp` is the frame pointer and `t1` a scratch register):

```
; branch to a synchronising thread            ; push an unsynchronising thread
ldub  [fp+cnt], t1                            std   r_lcv, [lcv]
subcc t1, 1, t1                               or    %g0, thr-cbbase, r_lcv
cdbp,e thr          ; zero: go to thr, slot annulled
stb   t1, [fp+cnt]  ; else: go to r_lcv, pop, store count

; push a synchronising thread                  ; STOP
ldub  [fp+cnt], t1                            orcc  %g0, %g0, %g0   ; Z = 1
subcc t1, 1, t1                               cdbp,ne anywhere       ; always pops
bne,a cont                                    <delay slot, always executed>
stb   t1, [fp+cnt]  ; only if count still > 0
std   r_lcv, [lcv]
or    %g0, thr-cbbase, r_lcv
cont:
```

## The two instructions

Both instructions use encodings that SPARC V8 leaves free.

**cdbp**: format 2 with `op=0` and `op2=3`. The fields are `a`[29], `cond`[28:25],
`op2`[24:22] and `disp22`[21:0]. `cond` is evaluated exactly like a Bicc condition; the `a`
bit is ignored.

* **Condition true.** Control goes to `pc + 4*disp22` and the delay slot is annulled. This
  takes 2 cycles, one of which is the annulled slot.
* **Condition false.** The instruction runs for three execute cycles:
  1. `PC <- r_lcv + cbbase`
  2. `lcv <- lcv + 2`
  3. the halfword at `[lcv+2]` is read, and in write-back it becomes the new `r_lcv`.

  The delay slot executes on this path. It is normally the store-back of the entry count.

**std**: format 3 with `op=3` and `op3=0x0E`, written `std rd, [rs1 + op2]`. It stores the
low halfword of `rd` at the address, then writes `rs1 - 2` back to `rs1`. It takes 3 cycles,
like a store. The name collides with SPARC's store-double mnemonic. The encoding does not:
store-double (`op3=0x07`) is untouched. It is simply not part of this subset.

## Pipeline and where the cycle costs come from

`tam_core` has four stages: fetch (F), decode (D), execute (E) and write-back (W).

* **Fetch.** F reads an asynchronous instruction memory.
* **Decode.** D decodes the instruction and reads three register ports. It also computes
  `pc + disp`.
* **Execute.** E is `exec_ctrl`. An instruction stays there for a number of cycles set by
  its class, and while it does, D and F are frozen:

  | class | E cycles | parameter |
  |---|---|---|
  | load | 2 | `LD_CYCLES` |
  | store | 3 | `ST_CYCLES` |
  | std | 3 | `STDEC_CYCLES` |
  | cdbp, pop path | 3 | fixed by its micro-steps |
  | everything else | 1 | |

  The data memory is accessed in the last E cycle.
* **Write-back.** W performs one register write per cycle. A multi-cycle instruction can
  send several writes to W; cdbp writes `lcv` and then `r_lcv`.

**Operand bypassing.** D re-reads its operands in every cycle it is frozen. When it hands an
instruction to E, it takes each operand from the first of these that has it:

1. the register write E is producing this cycle;
2. the write in W;
3. the register file.

So a load followed immediately by its use costs no extra cycle. This matches the costs used
by the sequences above, such as `ldub` (2) followed by `subcc` (1).

**Control transfers.** Every transfer has one delay slot. The slot is in D while the
transfer is in E.

* **Bicc and the taken path of cdbp.** These are resolved in E against the condition codes
  that the previous instruction has just written. The outcome selects the fetch address of
  the same cycle: the target, or `pc+8` if the branch is not taken. There are no
  misprediction bubbles. The only lost cycle is an annulled delay slot. Costs:
  * taken: 1 cycle;
  * not taken, annulling (`a=1`): 2 cycles;
  * `cdbp` with condition true: 2 cycles.
* **jmpl and the pop path of cdbp.** The target is a register sum, so it is loaded into the
  fetch PC at the next edge and the word fetched meanwhile is squashed. jmpl therefore
  costs 2 cycles. cdbp hides the redirect under its 3 cycles.

**Resulting costs.** Each number includes the instructions of the sequence and any annulled
slot, up to the first instruction of the thread that runs next. All of them are checked in
simulation.

| sequence | cycles |
|---|---|
| branch to unsynchronising thread | 1 |
| branch to synchronising thread, count reaches 0 | 5 |
| branch to synchronising thread, count not 0 (includes the pop) | 9 |
| push unsynchronising thread | 4 |
| push synchronising thread, count reaches 0 / not 0 | 9 / 7 |
| SWITCH variants (annulling conditional branch first) | the above + 2 |
| STOP | 4 |

Weighted by the control-instruction mixes of the Paraffins and Gamteb benchmarks, these
give average costs of 6.02 and 7.14 cycles per scheduling instruction. Without the extension
the averages are 7.34 and 8.05.

## Where the design departs from the reference cost model

* **Non-annulling untaken branch.** A non-annulling conditional branch that is not taken
  costs 1 cycle here. The reference model for stock SPARC counts 2. No sequence of the
  extended instruction set uses that case. Sequences written for the unmodified processor
  (`be` not taken, with a plain store in the slot) therefore run one cycle faster here.
* **STOP condition.** STOP is described as "clear the zero flag, then cdbp". On SPARC,
  `orcc %g0,%g0,%g0` *sets* Z. STOP is therefore written with `cdbp,ne`, which always takes
  the pop path and has the same 1+3 cycle cost.

The following are this design's own choices:

* the encoding of std;
* the register numbers of `lcv`, `cbbase` and `r_lcv`;
* the halfword size and step of std;
* the memory sizes (1024 instruction words, 4 KiB data);
* the separate instruction and data memories;
* the bypass network;
* reset behaviour: PC 0, all registers and the condition codes cleared.

**Unmodified code.** Code written for the unmodified processor still runs, with these costs:

* push: 5 cycles;
* STOP through `lduh`/`jmpl`/`add`: 5 cycles;
* successful synchronising branch with `be,a`: 4 cycles;
* failed push: 7 cycles.

## What is not here

These parts are outside the subset:

* register windows (save/restore), traps and CALL;
* multiply/divide and floating point;
* caches and a bus interface.

Undefined opcodes execute as no-ops. A control transfer placed in the delay slot of another
control transfer is not supported.

Frame switching (SWAP through the ready-frame link, remote continuation vectors) is software
and has no hardware support here. There is no network or message interface: TAM inlets,
SEND and I-structure requests are software on a multi-node machine, and only one node is
modelled here.

## Files

| file | contents |
|---|---|
| `rtl/tam_pkg.sv` | opcodes, condition codes, implied-register numbers, `dec_t`, `ex_t`, `wb_t`, `events_t` |
| `rtl/tam_node.sv` | top: core + instruction memory + data memory, loader/host ports |
| `rtl/tam_core.sv` | fetch, decode, bypass, pipeline registers, write-back |
| `rtl/exec_ctrl.sv` | execute stage: occupancy, cdbp micro-steps, std, branch resolution, icc |
| `rtl/inst_decode.sv` | decoder (formats 2 and 3, cdbp, std) |
| `rtl/alu.sv`, `rtl/cond_eval.sv` | ALU with flags; Bicc/cdbp condition table |
| `rtl/regfile.sv` | 32 x 32 register window, 3 read ports, 1 write port |
| `rtl/imem.sv`, `rtl/dmem.sv` | asynchronous-read memories (data memory big-endian, byte enables) |
| `tb/sparc_asm_pkg.sv` | instruction encoders used to write test programs |
| `tb/*_tb.sv` | one self-checking testbench per module |

**Top-level interface (`tam_node`).**

* **Loading code.** `ld_we`/`ld_addr`/`ld_data` write instruction words.
* **Host access to data memory.** While `host_we` is high, the host owns the data-memory
  write port. Use it while `rst_n` holds the core in reset. `host_addr`/`host_rdata` is an
  independent read port.
* **Start.** After `rst_n` rises, the core fetches from address 0.
* **Observation.** `dbg_ex_start` and `dbg_ex_pc` mark each instruction's first execute
  cycle. `ev` carries one-cycle event strobes: cdbp branch, cdbp pop, std push, annulled
  slot, execute stall, the two bypasses, jmpl, taken and untaken Bicc, load and store.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/tam_pkg.sv tb/sparc_asm_pkg.sv rtl/*.sv tb/tam_node_tb.sv \
    --top-module tam_node_tb -o sim
./obj_dir/sim
```

* **`tam_node_tb`** runs a small code-block at the default sizes. Thread T0 pushes two
  threads and stops. The two threads add frame slots into an accumulator and synchronise on
  a third thread: one fails and pops, the other succeeds. The third thread stores the sum
  and pushes a synchronising fourth thread twice, failing once and then succeeding. The
  fourth thread leaves through `jmpl` to the LCV bottom. The testbench checks:
  * memory and register state;
  * the order in which the threads ran;
  * two sequence costs (12 and 8 cycles);
  * that each event above happened at least once.
* **`tam_core_tb`** runs every scheduling sequence, checks its cost and effects, and checks
  the two weighted averages. It also runs the unmodified-processor sequences.
* **Unit testbenches.** The remaining testbenches exercise the leaf modules exhaustively or
  with random stimulus, against reference models written independently of the RTL.

## Changing it

* **Instruction latencies.** Change the parameters of `tam_core` or `exec_ctrl`. The
  execute cycle counter is 2 bits wide, so each value must be 1 to 4.
* **Implied registers.** Change the `tam_pkg` constants or the `inst_decode` parameters.
* **Memory sizes.** Change the `tam_node` parameters; powers of two are expected.
* **Adding an instruction.** Add its decode in `inst_decode` and its execute behaviour in
  `exec_ctrl`. If it writes more than one register, emit the writes from successive execute
  cycles, as cdbp does.
