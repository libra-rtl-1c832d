# Libra front end: slice-granular fetch for folded, balanced code

Programs that branch on secrets can be hardened in two ways. *Linearisation*
removes the branch and computes both sides with masks, which costs extra
instructions and registers. *Balancing* keeps the branch but pads both sides
so that they look the same to an attacker: same instruction classes, same
operand patterns, same timing. Balancing is cheaper, but on a processor with
an instruction cache, a prefetcher and branch predictors it leaks anyway,
because those structures remember *which addresses* were fetched or
predicted, and the two sides of a branch live at different addresses.

Libra closes that gap with a memory layout and two new instructions:

* **Folding.** The basic blocks of a secret-dependent region are grouped by
  their distance from the region entry (*levels*). The blocks of one level
  are interleaved instruction by instruction, so the k-th instructions of
  all blocks of a level sit next to each other in memory. Such a group is a
  *slice*. A level with `bbc` blocks has slices `bbc` instructions wide, and
  a block is identified by its *level offset* `off` inside the slice.
* **Walking a folded region.** With a *Libra context* `(bbc, off)` the
  processor advances by `bbc` instructions instead of one, so it stays in its
  own block while moving slice by slice. Outside folded code the context is
  `(1, 0)` and nothing changes.
* **`lo.br c, off_t:off_f:bbc`** (level-offset branch) ends a level: it jumps
  to the start of the next slice plus `off_t` or `off_f` depending on `c`,
  and sets the new level width `bbc`. **`tlo.br`** additionally carries the
  number of slices of the following (last) level, after which execution
  leaves the region by itself. **`lo.call b, f`** calls a function that was
  folded together with a dummy twin, running the real one (`b` true, offset
  0) or the dummy (offset 1) with context `(2, off)`.

The hardware's part of the contract is that the PC never shows at a finer
grain than a slice. The front end in this repository provides that: it
always fetches every cache line of the current slice, in the same order, so
the instruction memory sees the same addresses whichever block executes. It
also never asks or trains the branch predictor inside folded code.

## What the RTL contains

| File | Module | Role |
|---|---|---|
| `rtl/libra_pkg.sv` | package | context type `libra_ctx_t`, decoded-instruction type `dec_t`, limits and opcode constants |
| `rtl/libra_decoder.sv` | `libra_decoder` | combinational; recognises `lo.br`, `tlo.br`, `lo.call` and ordinary control flow, extracts the level fields |
| `rtl/libra_next_pc.sv` | `libra_next_pc` | combinational; the Libra PC/context update rules |
| `rtl/libra_ctx_stack.sv` | `libra_ctx_stack` | current and caller context (two-level stack) |
| `rtl/libra_slice_fetch.sv` | `libra_slice_fetch` | fetches all lines of a slice, in order, for every instruction |
| `rtl/libra_frontend.sv` | `libra_frontend` | **top**: the Libra-aware fetch unit built from the above |

The core around the front end is not part of this RTL: execution units, the
instruction cache and prefetcher, the branch predictor and the data side.
The front end talks to them through plain valid/ready ports. The testbenches
contain small behavioural stand-ins for each of them.

## The address arithmetic

All addresses are byte addresses and instructions are 4 bytes. For an
instruction at `pc` executing in context `(bbc, off)`:

```
slice_addr = pc - 4*off            first instruction of the current slice
next_slice = slice_addr + 4*bbc    first instruction of the following slice
```

| Instruction | Next PC | Context afterwards |
|---|---|---|
| not a control transfer | `pc + 4*bbc` | unchanged |
| `lo.br c, ot:of:b'` | `next_slice + 4*(c ? ot : of)` | `(b', c ? ot : of)` |
| `tlo.br c, ot:of:b':n` | as `lo.br` | as `lo.br`, plus `rem = n` |
| last slice of a `tlo.br` level (`rem == 1`) | `next_slice` | `(1, 0)` |
| `lo.call b, l` | `l + 4*(b ? 0 : 1)` | `(2, b ? 0 : 1)`; caller context pushed |
| ordinary call (`jal`/`jalr`, `rd != x0`) | target | `(1, 0)`; caller context pushed |
| `ret` (`jalr x0, 0(x1)`) | resolved target | caller context popped |
| ordinary branch, taken | `pc + imm` | unchanged |
| ordinary branch, not taken | as a non-control instruction | |

A call writes the *fall-through address in the caller's level* to `rd`, not
`pc + 4`. This is `pc + 4*bbc`, or `next_slice` when the call sits in the last
slice of a terminating level. The front end computes the value and hands it
to the back end as `out_link`. A return therefore lands in the caller's next
slice at the caller's own offset.

Worked example: the two-block region `if (secret) s1 = s2+s3 else s2 = s3+s4`,
folded at address 0x100:

```
0x100  lo.br  a0!=0, 0:1:2     secret -> 0x104 (ctx 2,0)   else -> 0x108 (ctx 2,1)
0x104  add s1, s2, s3          then-block          } one slice
0x108  add s2, s3, s4          else-block          }
0x10C  lo.br  zero, 0:0:1      from 0x104: -> 0x114 (ctx 1,0)
0x110  lo.br  zero, 0:0:1      from 0x108: slice_addr 0x10C -> 0x114
0x114  ...
```

Both paths execute the same number of instructions, of the same kinds, from
the same slices. The instruction cache sees lines 0x100..0x114 in the same
order either way. With `tlo.br a0!=0, 0:1:2:1` at 0x100, the two closing
`lo.br` disappear and execution leaves at 0x10C by itself.

## Instruction encoding

The Libra instructions reuse the RISC-V branch and JAL opcodes. They are
marked by the two lowest bits, which a standard 32-bit instruction sets to
`11`:

| `inst[1:0]` | on a branch opcode | on JAL |
|---|---|---|
| `11` | ordinary branch | ordinary `jal` |
| `01` | `lo.br` | `lo.call` real (`b` = true) |
| `10` | `tlo.br` | `lo.call` dummy (`b` = false) |
| `00` | illegal | illegal |

For `lo.br`/`tlo.br`, `rs1`, `rs2` and `funct3` keep their branch meaning.
So any RISC-V comparison can be the condition. The twelve immediate bits
`{inst[31:25], inst[11:7]}` hold the level fields:

```
lo.br   [11:8] off_t  [7:4] off_f  [3:0] bbc-1                (up to 16 blocks per level)
tlo.br  [11:9] off_t  [8:6] off_f  [5:3] bbc-1  [2:0] n-1     (up to 8 blocks, 8 slices)
```

An offset at or beyond the level width is flagged `out_illegal`. So is a
Libra prefix on any other opcode.

The use of the prefix bits and the 16/8-block limits match the original
prototype. The exact bit assignment above is this design's own.

## Fetch: why every line of a slice, every time

`libra_slice_fetch` receives `pc` and the context. It computes the first and
last line of `[slice_addr, slice_addr + 4*bbc)` and requests each line in
ascending order, one request outstanding at a time. It keeps the word at
`pc` from whichever line holds it. The request sequence and its timing
depend only on `slice_addr` and `bbc`, never on `off`. A slice may straddle
a line boundary (up to 64 bytes for 16 blocks), and then each instruction
costs several line requests. That cost buys offset-independence. Outside
folded code `bbc = 1`, so a fetch is one line, as in an ordinary front end.

The unit refetches the lines for every instruction. It does not keep a line
buffer, which keeps it simple and keeps the pattern trivially
offset-independent. It relies on the instruction cache for speed.

## Control flow and stalls

`libra_frontend` holds one fetched instruction at a time and offers it to
the back end (`out_valid`/`out_ready`). It then does one of three things:

* **Direct transfers** (`jal`, `lo.call`) and non-control instructions are
  followed at once. Calls push the caller context.
* **Ordinary branches outside folded code** ask the external direction
  predictor (`bp_lookup_*`, answered combinationally) and fetch along the
  prediction. The first predicted-path instruction is fetched but held back
  until the branch resolves. A wrong prediction drops it, pulses `fe_flush`
  and refetches. The predictor is trained on resolution (`bp_upd_*`).
* **`lo.br`, `tlo.br`, ordinary branches inside folded code, `mret` and every
  `jalr`** stop fetch until the back end pulses `res_valid` with the
  condition (`res_taken`) or target (`res_target`). `lobr_stall` is high
  while a level-offset branch is waited on: the back end's resolution
  latency plus one cycle, the same for either outcome. A predictor that learned `lo.br`
  targets or directions would reveal the offset, so inside folded code
  (context other than `(1, 0)`) it is neither looked up nor trained.

The back end must resolve, in order, exactly the instructions that wait.
These are ordinary branches, `lo.br`, `tlo.br`, `jalr` and `mret`. The front end
offers nothing while one is outstanding. Assertions in the RTL check both
rules.

`folded` is exported so that the rest of a core can switch off, inside
folded code, any optimisation that would otherwise reveal the offset. Such
optimisations include silent stores, cache-bank conflicts and a μop cache.
No such optimisation exists in this RTL.

## The context stack and deep calls

`libra_ctx_stack` keeps the current context and one saved caller context.
A call pushes and a return pops. Two levels cover a call from folded code
into a leaf function. For deeper nesting, software must spill the saved
level before making another call and restore it before returning. The port
`csr_prev_we/wdata/rdata` is meant to be mapped to a CSR for this.
`csr_prev_live` tells whether the saved level is in use. `stack_ovf` pulses
when a push overwrites a saved context that was still live, which is the
case software has to handle. The end-to-end test does exactly this: it
spills through a CSR, makes a nested call and restores.

The context is 13 bits: `bbc` (5), `off` (4) and `rem` (4). `rem` counts
the slices left in a `tlo.br` level. It belongs to the context so that a
call made inside a terminating level returns into the right count.

### Traps

An exception or interrupt can arrive in the middle of a folded region, so
the context must survive the handler. The back end raises `trap_valid` with
the handler address (`trap_pc`) and the context of the first instruction
that did not execute (`trap_ctx`). It already received that context as
`out_ctx` with the instruction. The resume PC stays in the back end, as
usual. The front end drops everything in flight, pushes `trap_ctx`, and
starts the handler in `(1, 0)`. `mret` waits, like a `jalr`, for the back
end to return the resume PC on `res_target`, then pops the context. The
interrupted block continues at its own offset. A trap taken inside a
function entered by `lo.call` overflows the two-level stack (`stack_ovf`),
so a handler that can be entered from such code must spill the saved level
first.

## Where this design departs from, or adds to, the original

* Taken from the original: the folded layout; the `lo.br`/`tlo.br`/`lo.call`
  semantics and the address arithmetic; the 16/8-block limits; the
  two-level context stack; fetching all lines of a slice in a fixed order;
  disabling the predictor in folded code; stalling after `lo.br` until it
  resolves.
* This design's choices: the bit encoding; the `rem` counter mechanics of
  `tlo.br`; the link value and the saved context being the post-instruction
  fall-through; ascending line order with one request in flight; a 32-byte
  line; speculation limited to one predicted branch outside folded code;
  the software port of the saved context; trap entry/`mret` handling; the handling of ordinary branches
  inside folded code (taken keeps the context, not taken walks on); reset
  PC 0 and a synchronous active-low reset.
* Not built: the out-of-order core, instruction cache, prefetcher, branch
  predictor and data side; the leakage contract (a software-facing
  classification of instructions); the folding compiler pass. The front end
  does not prefetch the next slice while a `lo.br` waits. That is left to
  the cache's prefetcher, which sees an offset-independent access stream.
  Whether an instruction traps is left to software balancing: the scheme
  treats instructions that may trap as unsafe. The hardware only saves and
  restores the context across the trap.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_libra_decoder`: random encodings of every instruction kind against
  the fields they were built from, plus the illegal cases.
* `tb_libra_next_pc`: the examples above worked by hand (two-block, nested
  four-block, terminating level, `lo.call`, `ret`, ordinary call), and
  random PCs/contexts against the formulas.
* `tb_libra_ctx_stack`: random push/pop/set/software-write sequences
  against a reference model, cycle by cycle.
* `tb_libra_slice_fetch`: for random slices, fetches every offset and
  checks the word, the exact line sequence, and that trace and cycle count
  are identical across offsets. It also checks a flush mid-fetch.
* `tb_libra_frontend` (top, default parameters): a small in-order back end with an interrupt source,
  a fixed-latency instruction cache and a 2-bit predictor run five programs:
  * the folded two-block region;
  * its nested four-block version;
  * the `tlo.br` form;
  * a `lo.call` of a function folded with its dummy;
  * a predicted loop followed by a two-deep call chain with a software
    spill.

  The two-block and nested regions also run once with an interrupt taken
  in the middle of the region.

  Each folded program runs with every secret value. The results must be
  right, and the instruction-cache request trace (address and cycle) and
  the run time must be identical across secrets. This is the non-interference
  test applied to the fetch path. The test also counts every mechanism
  (stall, terminating exit, `lo.call`, pop, push, overflow, software
  restore, flush, predictor lookup, multi-line slice, trap in folded code).
  Every `lo.br` stall must last exactly the back end's resolution latency
  plus one cycle. It fails if any of
  them never happened, and also if the predictor was consulted inside
  folded code.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/libra_pkg.sv tb/libra_asm_pkg.sv tb/tb_libra_frontend.sv \
    --top-module tb_libra_frontend -o sim && ./obj_dir/sim
```

Replace the testbench name for the others. `tb/libra_asm_pkg.sv` holds the
small assembler (encoders for the instructions above) the tests use to
write programs; it is the quickest way to try a folded region of your own.

The front end synthesises (generic, before technology mapping) to about 240
word-level cells and 475 flip-flop bits, almost all of them address and
instruction registers: the fetch PC, the held and the waiting instruction
with their PCs, the predicted-branch record, the two contexts, and in the
fetch sequencer the line range, the requested PC and the captured word.
