# Register renaming in a single-issue out-of-order pipeline

A pipeline that issues instructions out of order runs into two kinds of
hazard that carry no data. A write-after-write (WAW) hazard is a younger write
to a register that an older write has not reached yet. A write-after-read
(WAR) hazard is a write that could overwrite a value an older instruction
still needs to read. Both exist only because the instruction set has few
register names. This RTL removes them in hardware. Each architectural
register (areg) is mapped, at decode, to a fresh storage location, called a
"physical register" (preg). Only true read-after-write (RAW) dependences
remain, and they are resolved by a scoreboard and a bypass network.

Three processors are provided. They share one pipeline and instruction set,
and differ only in where not-yet-committed values live:

| instance in `io2l_top` | module | where future values live | how a name is obtained |
|---|---|---|---|
| `u_ptr` | `io2l_ptr_core` (`UNIFIED=0`) | physical register file (PRF); committed values copied to an architectural register file (ARF) | free list (FL) |
| `u_urf` | `io2l_ptr_core` (`UNIFIED=1`) | one unified register file (URF); an architectural rename table (ART) records which preg is committed | free list |
| `u_val` | `io2l_val_core` | the reorder buffer (ROB) itself; committed values copied to the ARF | the ROB entry number |

## Pipeline and instruction set

```
F | D | I |- X ------------------|- W | C
          |- Y0 - Y1 - Y2 - Y3 --|
```

* **F** fetches one word per cycle at `pc` and then does `pc += 4`. No
  instruction changes the pc.
* **D** decodes, renames and allocates an issue queue (IQ) entry and a ROB
  entry, in program order. D stalls when a structure is full.
* **I** issues one ready instruction per cycle from the IQ, out of order,
  and reads its operands.
* **X** is a one-cycle adder for `addu`/`addiu`. **Y0-Y3** is a four-stage
  pipelined multiplier for `mul`.
* **W** writes the result. There is one W port, shared by X and Y3.
* **C** commits the oldest ROB entry, in program order, one per cycle.

Only three instructions exist, with MIPS32 encodings:

| instruction | encoding |
|---|---|
| `addu rd, rs, rt` | `000000 rs rt rd 00000 100001` |
| `addiu rt, rs, imm` | `001001 rs rt imm` (imm is sign-extended) |
| `mul rd, rs, rt` | `011100 rs rt rd 00000 000010` (low 32 bits of the product) |

D drops any other word without effect. There is no hard-wired zero register.
r0 is renamed like any other register and reads 0 only as long as nothing
writes it.

### Timing, shown on the reference sequence

Cycle 0 is the cycle in which `a` is in F. The pointer-based and value-based
processors give identical cycles.

| instr | D | I | X / Y0..Y3 | W | C |
|---|---|---|---|---|---|
| a: `mul r1, r2, r3` | 1 | 2 | 3-6 | 7 | 8 |
| b: `mul r4, r1, r5` | 2 | 6 | 7-10 | 11 | 12 |
| c: `addiu r6, r4, 1` | 3 | 10 | 11 | 12 | 13 |
| d: `addiu r4, r7, 1` | 4 | 7 | 8 | 9 | 14 |

This short sequence shows all the timing rules:

* **b issues while a is in Y3.** A result can be bypassed into I in the
  cycle its producer is in the last execute stage (X or Y3). It can also be
  bypassed from W. After W it is read from storage.
* **d is ready in cycle 5 but waits.** If it issued in 5 it would reach W in
  cycle 7, together with `a`. The scoreboard keeps a reservation of the
  single W port.
* **b issues before d in cycle 6.** When several entries are ready, the
  oldest one goes first.
* **d issues in cycle 7, ahead of the older c.** This is the out-of-order
  issue.
* **d writes r4 before b does.** With renaming this WAW case is harmless:
  the two writes go to different names, and C copies them to the
  architectural state in program order (b, then d).

## Pointer-based renaming (`io2l_ptr_core`)

Values live only in the PRF and in the bypass network. All I, X, Y and W
stages handle preg numbers only.

**Free list.** The FL has one bit per preg, set when the preg is free. A
priority encoder hands out the lowest-numbered free preg. After reset,
`r_i` maps to `p_(i-1)` for i = 1..31, r0 maps to `p63`, and `p31..p62`
are free.

**Rename table.** The rename table (RT) has one entry per areg: a pending
bit `p` and `preg`. In D:

1. Both sources are looked up. Their `{p, preg}` goes into the IQ.
2. The destination's current mapping is read out as `ppreg`, the previous
   preg.
3. The destination is remapped to the new preg, with `p = 1`.

In W, `p` is cleared only if the areg still maps to the preg being
written. A younger rename of the same areg must keep its pending bit.

**Issue queue.** An IQ entry holds op, immediate, destination preg, ROB
entry number and two sources, each with valid, pending and preg fields.
When W writes a preg, every matching pending source clears `p`. An entry
inserted in that same cycle is matched too.

**Reorder buffer.** A ROB entry holds `p`, `v`, `preg`, `areg` and `ppreg`.
When the head entry is valid and no longer pending, C does three things:

* copies `PRF[preg]` into `ARF[areg]`;
* returns `ppreg` to the free list;
* releases the entry.

### When a preg may be freed

This is the subtle part of the scheme. Take a preg `pj` that holds areg `ri`.
The hardware cannot free `pj` when its own writer commits, because younger
instructions may still have to read it. It also cannot free `pj` when the
last reader issues, because the hardware does not count readers. Instead,
`pj` is freed when the next instruction that writes `ri` commits. At that
point `pj` is that instruction's `ppreg`.

This rule is safe for three reasons:

* Every instruction that reads `pj` is older than that next writer.
* Commit is in order, so every such reader has committed by then.
* Each of those readers read its operands in I, long before it committed.

Freeing any earlier could let D hand `pj` to a new instruction whose W
overwrites a value that a waiting reader still needs.

`io2l_ptr_core_tb` checks this rule directly on the sequence
`addu r1,r2,r3; addu r4,r1,r5; addu r1,r6,r7; addu r8,r9,r10`. The preg of
the first `r1` must be returned to the free list by the commit of the second
write of `r1`, and by no other commit.

A freed preg can be allocated again from the next cycle. With 64 pregs and a
4-entry ROB, at most 36 pregs are ever in use, so the free list never runs
dry at the default size.

### Unified register file (`UNIFIED=1`)

The PRF becomes the URF, which holds both committed and future values. The
ARF is replaced by a 32-entry ART of preg numbers (`arch_rename_table`).
At commit, C writes `ART[areg] = preg` instead of copying a value. The ART
resets to the same mapping as the RT. The committed value of an areg is
read as `URF[ART[areg]]`, on a fourth URF read port used by `arch_raddr`.
Everything else is unchanged.

## Value-based renaming (`io2l_val_core`)

Results are written into the ROB entry of the producing instruction. The
ROB entry number therefore serves as the "preg". Names are allocated and
released with the ROB, and no free list is needed.

**Rename table.** Each RT entry holds `v`, `p` and `preg`, where preg is a
ROB entry number. An entry is valid only while a write to that areg is in
flight:

* D sets the entry: `v = 1`, `p = 1`, `preg =` the ROB tail.
* W clears `p`.
* C clears `v`, but only if the entry still maps to the committing ROB
  entry.

**Source resolution in D.** Each source is resolved once, in D:

| RT entry | operand source | IQ source field |
|---|---|---|
| not valid | ARF | the value, `p = 0` |
| valid, not pending | completed result, read from the ROB | the value, `p = 0` |
| valid and pending | none yet | the ROB entry number, `p = 1` |

**Wakeup.** A pending source is satisfied in one of two ways. If it issues
while its producer is at the end of X, the end of Y3 or in W, it takes the
bypass. Otherwise, when the producer is in W, the IQ entry captures the
broadcast value and clears `p`.

Capturing the value matters. Once the producer commits, its ROB entry may
be handed to a new instruction. A source that still held only the entry
number would then point at the wrong value.

**Reorder buffer.** A ROB entry holds `p`, `v`, `value` and `areg`. C copies
`value` into `ARF[areg]`.

## Scoreboard and bypassing

The scoreboard is indexed by tag: a preg in the pointer scheme, a ROB entry
number in the value scheme. Each tag has three fields:

* `pending`: set in D, cleared in W;
* `issued`: whether the producer has issued;
* a countdown that reaches zero when the result is at the end of X or Y3.

A pending IQ source is ready when its tag is `pending && issued &&
countdown == 0`. The operand is then taken, in priority order, from:

1. the end of X;
2. the end of Y3;
3. W;
4. the register file (pointer scheme) or the IQ's own value field (value
   scheme).

W-port reservations are a 5-bit shift register. A `mul` issued in cycle t
reserves W in t+5, and an `addu`/`addiu` reserves t+2. An `addu`/`addiu` may
not issue if t+2 is already reserved. A `mul` can never collide: any later
ALU operation that would meet it in W checks the reservation first.
`exec_pipes` asserts that X and Y3 never hand over to W in the same cycle.

## Interface

`io2l_top` has clock `clk` and a synchronous, active-high reset `rst`. For
each processor (prefix `ptr_`, `urf_`, `val_`) it has these ports:

| port | dir | meaning |
|---|---|---|
| `*_imem_addr[31:0]` | out | fetch address (byte address, word aligned) |
| `*_imem_data[31:0]` | in | instruction at that address, combinational |
| `*_imem_valid` | in | an instruction exists at that address; F waits while low |
| `*_commit_valid` | out | an instruction commits this cycle |
| `*_commit_areg[4:0]`, `*_commit_value[31:0]` | out | its destination and result |
| `*_commit_preg` / `val_commit_rob` | out | its preg / ROB entry |
| `ptr_/urf_commit_ppreg` | out | the previous preg it returns to the free list |
| `*_arch_raddr[4:0]` | in | architectural register to read |
| `*_arch_rdata[31:0]` | out | its committed value, combinational (ARF, or URF through the ART) |
| `*_ev` | out | `io2l_pkg::events_t`, one pulse per mechanism per cycle |

The `events_t` pulses are: commit, issue, out-of-order issue, D stall on
full IQ, full ROB or empty FL, W-port hold-back, bypass from X, Y3 or W, ROB
read and ARF read in D (value scheme), preg freed, and writeback. A pulse
that a scheme cannot produce is constant 0. For example, the pointer scheme
never reads the ROB in D.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NPREG` | 64 | pregs (pointer schemes). Must be at least 33: 32 are mapped at reset. |
| `IQ_DEPTH` | 4 | issue queue entries |
| `ROB_DEPTH` | 4 | ROB entries, a power of two. In the value scheme this is also the number of names. |

With `IQ_DEPTH == ROB_DEPTH`, the ROB always fills no later than the IQ.
The tests therefore use an 8-entry ROB to make the IQ-full stall happen.

## Design choices and limits

These points are choices made for this RTL, not part of the scheme itself:

* **Instruction set.** The encodings, the 32-bit data width, and the
  handling of r0 and illegal words.
* **Reset state.** The reset mapping and free pregs. Register files reset to
  zero, so programs must load their initial values (for example with
  `addiu`).
* **Issue queue.** Oldest-ready-first selection in a collapsing queue.
* **Scoreboard.** The form of the scoreboard entries and the separate W-port
  reservation vector.
* **Value scheme.** IQ entries capture values from the W broadcast, and the
  ARF and ROB are read in D.
* **Multiplier.** The product is formed in Y0 and carried through Y1-Y3.
* **Timing of d.** A common way of drawing this example lists `d` in I in
  cycle 8, but in W in cycle 9. The two cannot both hold with a one-cycle X
  stage. This RTL issues `d` in cycle 7, which matches the W and C cycles.
* **Preg numbers.** All 32 aregs are mapped at reset, so the first free preg
  is p31. A hand trace with only r1..r7 mapped would start at p7. Pregs are
  still handed out in the same order.

Not modelled: branches, loads and stores, exceptions and precise-state
recovery (the ARF/ART is only read through the `arch_raddr` debug port,
never to restore the RT), multi-issue.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `free_list_tb` | allocation order p7, p8, p9, p10 from the reference reset state; empty; reuse; random traffic against a model |
| `rename_table_tb` | both RT forms against a model, including the "only if still mapped" W and C rules |
| `issue_queue_tb` | oldest-ready selection, W-port hold-back, wakeup/capture (also on insert), against a list model |
| `reorder_buffer_tb` | in-order commit, out-of-order completion, full, read ports |
| `scoreboard_tb` | bypass readiness by cycle number, W-port reservations, no W collisions |
| `regfile_tb`, `exec_pipes_tb` | storage; X/Y3/W latencies and results |
| `arch_rename_table_tb` | reset mapping, commit writes and reads against a model |
| `inst_decoder_tb` | field-by-field built words of all three instructions; random illegal words |
| `io2l_ptr_core_tb` | the reference sequence cycle by cycle (commit 8/12/13/14, issue 2/6/7/10, out-of-order issue in 7, W-port hold in 5); the preg-freeing rule; random programs against a sequential model, including all 32 committed registers read through `arch_raddr` at the end; default, 34-preg, 8-entry-ROB and unified instances |
| `io2l_val_core_tb` | the same for the value scheme |
| `io2l_top_tb` | all three processors end to end, at default sizes and at 34 pregs / 8-entry ROB; every mechanism in `events_t` must occur at least once |
| `io2l_top_full_tb` | the top at default parameters, no overrides |

To run a testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/io2l_pkg.sv tb/io2l_tb_pkg.sv tb/io2l_top_tb.sv \
  --top-module io2l_top_tb -o sim
./obj_dir/sim
```

Replace `io2l_top_tb` with any other testbench name. All testbenches finish
in seconds.

## Files

* `rtl/io2l_pkg.sv`: shared types, encoders, `events_t`.
* `rtl/inst_decoder.sv`: the D-stage decoder.
* Structures: `rtl/free_list.sv`, `rtl/rename_table.sv`,
  `rtl/issue_queue.sv`, `rtl/reorder_buffer.sv`, `rtl/scoreboard.sv`,
  `rtl/regfile.sv`, `rtl/arch_rename_table.sv`.
* Execution: `rtl/exec_pipes.sv` (X and Y0-Y3 pipes, W register).
* Processors: `rtl/io2l_ptr_core.sv`, `rtl/io2l_val_core.sv`.
* Top: `rtl/io2l_top.sv`.
* `tb/io2l_tb_pkg.sv`: reference model and program generators used by the
  processor testbenches.
