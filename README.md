# Register-program execution front end for a 16-bit DSP core

In a DSP system running one embedded application, most of the time goes into a
few loops. Every pass through them fetches the same instructions again over the
program address and data buses. These wide, heavily loaded buses toggle on
every fetch, and the two fetch stages lengthen every taken branch.

Register-program execution copies such a loop, once, into a small
register-program table (RPT) inside the CPU, and then runs it from there. While
the loop runs from the table:

* the program address and data buses are put in high impedance, so they do not
  toggle at all;
* the table is read in the predecode stage, addressed directly by the program
  counter, so the Initiate-Fetch and Complete-Fetch stages are skipped and a
  taken branch costs one bubble instead of three.

The RPT is not a cache. It has no tags and no hit logic. An instruction at
program address `A` always lives in table location `A mod N` (the low bits of
the PC), and software decides with four instructions what is copied and when it
is executed. This repository holds synthesizable SystemVerilog for the
instruction front end that implements the scheme, testbenches for every block,
and an end-to-end test that runs the intended usage patterns against an
instruction-level reference model.

## The four instructions and three state bits

| Instruction | Effect |
|---|---|
| `SEGST` | Sets **LCF** (loop control function bit) and loads **SEREG** with the address after the `SEGST`. From now on the words fetched from memory are copied into the RPT instead of being executed. |
| `SEGED` | If LCF is set, it ends the copy: LCF is cleared and the PC is loaded from SEREG, so execution restarts right after the `SEGST`. If LCF is clear it is a no-operation. `SEGED` itself is never copied. |
| `HBUS` | Sets the **H bit**. The program buses are floated, and instructions now come from `RPT[PC mod N]`. |
| `RBUS` | Clears the H bit. The buses are driven again, and the next instruction is fetched from program memory. |

Encodings (`rpx_pkg`): `SEGST = 0xFF00`, `SEGED = 0xFF01`, `HBUS = 0xFF02`,
`RBUS = 0xFF03`. The front end executes these itself. It still passes them to
the core's decoder, which must treat them as no-operations.

## How a segment is used

The canonical pattern is a loop wrapped as follows (addresses in hex):

```
8012  SEGST          memory     LCF=1, SEREG=8013
8013  HBUS           memory     (first pass: copied to RPT[013])
8014  loop: ...      copied     RPT[014] ...
8021  BANZ loop      copied
8022  RBUS           copied     RPT[022]
8023  SEGED          memory     ends copy, PC <- 8013
```

The timeline of one run is:

1. **Copy pass.** `SEGST` executes from memory. The words 8013..8022 are then
   fetched one per cycle and written into RPT locations 013..022, but they are
   not executed.
2. **Restart.** `SEGED` reloads the PC with 8013, and `HBUS` executes from
   memory.
3. **Table execution.** Every iteration of the loop, and the final `RBUS`, come
   from the table. There is no bus activity during this phase.
4. **Fall-through.** After `RBUS`, execution continues from memory at 8023. That
   `SEGED` now meets LCF clear, so it is a no-operation, and the program goes on.

Three variants are built on the same pattern:

* **Run-time configured.** A program reloads the table for each of its loops as
  it reaches them. A loop that several code segments branch to, with `SEGST` at
  the branch target, is copied again on every entry.
* **Repeated calls.** A subroutine starts with `firstcal: SEGST` and
  `reptcal: HBUS`, and ends with `RBUS, RET, SEGED`. The first call goes to
  `firstcal`, which copies the body. Later calls go straight to `reptcal` and
  run from the table without copying again. This is valid only while nothing
  else has overwritten those locations.
* **Pre-configured.** A whole endless application that fits in the table is
  copied once at start-up. After `HBUS` it never touches program memory again.

### Rules software must keep

* A segment must fit in the table: from the word after `SEGST` up to the word
  before `SEGED`, at most N words. Two resident segments must not share
  low-address bits.
* While H is set, every branch target is read from the table. A branch that
  leaves the segment must therefore follow an `RBUS`, or be a return placed
  after the `RBUS`, as in the repeated-calls pattern.
* Nothing checks that the table holds the segment the PC points at. Table
  contents are not reset.

## Pipeline and timing

```
 PC ──► Initiate-Fetch ──► Complete-Fetch ──► [fetch reg] ──► 0 ┐
  │      (pm_ab, pm_req)     (pm_db)                            MUX ─► [decoder reg] ─► dec_*
  └──────────────────────────────────────────► RPT[PC mod N] ─► 1 ┘        ▲
                                                                  select = H bit
```

| Event | From memory (H=0) | From the table (H=1) |
|---|---|---|
| Address/PC to `dec_*` | 3 cycles | 1 cycle |
| Sequential throughput | 1 instruction/cycle | 1 instruction/cycle |
| Taken branch (redirect) | 3 bubbles | 1 bubble |
| `HBUS` (switch to table) | 0 bubbles | — |
| `RBUS` (switch to memory) | — | 2 bubbles |
| `SEGED` ending a copy | 3 bubbles, then refetch at SEREG | — |
| Copy pass | 1 cycle per copied word | — |

The control decision is made in the predecode stage, on the word the
multiplexer selects:

* A copied word (LCF set, from memory) is written to the RPT and not issued.
* `HBUS` and `RBUS` reload the PC with the next address and flush the fetch
  stages, so the next word comes from the new source.
* A branch, call or return of the core (`redirect_valid`, given in the same
  cycle as the `dec_*` word) takes priority. It squashes the younger word in
  predecode, even if that word is a special instruction, and refetches from
  `redirect_pc`.

A loop of K instructions, closed by a taken branch, therefore takes K+1 cycles
per iteration from the table and K+3 from memory. The testbench checks these
periods exactly. The copy itself costs about one cycle per word plus about six
cycles of restart, so a loop has to iterate a few times before the table pays
off in time. It pays off in bus activity from the first table iteration.

Measured in the end-to-end test on a 14-instruction loop run 40 times:

| | Cycles | Program-memory reads | Address and data bus toggles |
|---|---|---|---|
| Plain loop | 688 | 649 | about 3400 |
| Configured loop | 635 | 33 | 193 |

### Table size against a multi-loop program

`tb_rpx_table_sizes` runs one program with four loops through the front end:

| Loop | Body (instructions) | Iterations |
|---|---|---|
| 1 | 100 | 200 |
| 2 | 200 | 100 |
| 3 | 450 | 40 |
| 4 | 900 | 20 |

The program runs once unconfigured, then at each table size. At each size,
software configures every loop that fits:

| Table size | Loops held | Cycles vs. plain (77453) | Memory reads | Bus toggles |
|---|---|---|---|---|
| plain | 0 | — | 77093 | 609067 |
| 128 | 1 | −286 | 56604 | −27 % |
| 256 | 2 | −272 | 36515 | −52 % |
| 512 | 3 | +112 | 18856 | −75 % |
| 1024 | 4 | +986 | 1707 | −97 % |
| 2048 | 4 | +986 | 1707 | −97 % |

Bus activity falls steeply with table size. The cycle count barely moves. In
this pipelined front end, executing from the table saves only the extra branch
bubbles: exactly `S + 12 − 2·(IT − 1)` cycles change per configured loop of S
words run IT times. So a loop repays its copy only after about S/2 iterations.
Larger time savings need branch-dense code, such as short polling loops, where
the bubbles are a large share of each iteration. A design that counted the two
skipped fetch stages as saved time on every instruction would report far more.
The pipeline here overlaps those stages, so only the bubbles are real savings.

## Modules (`rtl/`)

| Module | Role |
|---|---|
| `rpx_pkg` | Instruction width, the four encodings, `special_e`, `decode_special()` |
| `rpx_frontend` | Top. Wires everything below. Parameters `RPT_DEPTH` (1024), `PC_W` (16), `RESET_PC` (0) |
| `rpx_pc` | Program counter. Load (redirect, SEREG, restart) beats advance. It advances on every memory strobe, or every cycle while H is set |
| `rpx_fetch` | Initiate-Fetch / Complete-Fetch stages, read strobe, fetch pipeline register, flush |
| `tristate_buf` | Two instances, on the address and data buses. Active-low enable driven by H |
| `rpx_predecode` | The RPT, the H-selected multiplexer and the register towards the decoder |
| `rpt` | `RPT_DEPTH` x 16 register file: synchronous write, combinational read |
| `rpt_write_ctrl` | Write enable, address and data of the RPT while LCF is set. Excludes `SEGED` and squashed words |
| `rpx_ctrl` | Timing and control unit: LCF, H, SEREG; issue, flush, PC load |

Top-level ports of `rpx_frontend`:

* Program memory side:
  * `pm_ab` is the tri-state address bus.
  * `pm_req` is the read strobe.
  * `pm_db` returns the word one cycle after `pm_req`.
* Decoder side:
  * `dec_valid`, `dec_instr` and `dec_pc` present one instruction per cycle.
  * `redirect_valid` and `redirect_pc` come back from the core.
* Status outputs: `h_bit`, `lcf` and `sereg`.

Reset is asynchronous and active low. It clears H, LCF and SEREG and sets the
PC to `RESET_PC`.

The top carries three assertions:

* no memory strobe while H is set;
* table writes only while copying from memory;
* a copied word is never issued.

The table size can be set to any power of two with `RPT_DEPTH`. The scheme was
evaluated with 128 to 2048 entries. 1024 entries, addressed by PC bits 9..0, is
the default. At that size, the table is 16 Kbit of storage, and the rest of the
front end is about 120 flip-flops.

## Design choices beyond the scheme

The scheme defines the table, its PC-based addressing, the four instructions,
LCF/SEREG/H, the bus buffers and the multiplexer in predecode. The following
are this implementation's own choices:

* **Instruction encodings.** The codes `0xFF00..0xFF03`.
* **Pipeline timing.** The exact timing, the one-word-per-cycle synchronous
  program memory with no wait states, and the same-cycle redirect interface.
  A real core's prefetch queue, wait states and delayed branches are not
  modelled.
* **Read strobe.** `pm_req` is added because memory cannot see from a floating
  address bus when to read.
* **Restart on HBUS and RBUS.** Both reload the PC and flush the fetch stages,
  so the next word comes from the new source without mixing the two paths.
* **Where copied words are taken.** The write controller takes the word in the
  predecode stage, one register after the data bus, rather than directly from
  the bus. This makes it simple to leave out `SEGED` and words on a squashed
  path.
* **SEGED when LCF is clear.** `SEGED` is a no-operation then. The
  walk-through above needs this: the same `SEGED` is passed again after the
  loop.
* **Special instructions executed from the table.** Only `HBUS` and `RBUS` are
  meant to run there. A `SEGST` read from the table would set LCF, but nothing
  is copied while H is set.

## Verification (`tb/`)

Every block has a self-checking testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_rpt` | All 1024 locations against a shadow copy, read-during-write, write enable |
| `tb_rpt_write_ctrl` | Copy rules (LCF, source, squash, `SEGED` excluded), 2000 random vectors |
| `tb_rpx_pc` | Reset value, load/advance/hold and priority, 3000 random steps |
| `tb_rpx_fetch` | Strobe, address, two-cycle capture and flush against a model, random stimulus |
| `tb_rpx_predecode` | Multiplexer in both positions, table read at the PC, decoder register |
| `tb_rpx_ctrl` | Each special instruction, copy mode, `SEGED` both ways, squashing by a branch |
| `tb_tristate_buf` | Driven vs. released bus (released reads the pull-up) |
| `tb_rpx_frontend` | End to end at the default size (see below) |
| `tb_rpx_table_sizes` | The table-size workload above: results, loops held, exact cycle counts, fewer reads per size |

`tb_rpx_frontend` connects the front end to two behavioural models:

* `prog_mem_model`: 64K x 16 words. It counts reads and bus toggles.
* `host_core_model`: a stand-in core with a small instruction set from
  `host_isa_pkg`. It provides add, xor, branch, call, return, two counted
  branches and halt.

The testbench runs six programs:

* the walk-through loop, next to the same loop unconfigured;
* the repeated-calls subroutine;
* a loop reconfigured on every entry;
* a branch that squashes an `HBUS` on the wrong path;
* a 1000-instruction loop that fills most of the table;
* an endless pre-configured program.

It checks the following:

* Final results and instruction counts against an instruction-level reference
  model of the scheme.
* Exact loop periods (K+1 from the table, K+3 from memory) and the number of
  copied words.
* That program memory sees no strobe while H is set.
* That each mechanism happened at least once: copy, `SEGED` ending a copy,
  `SEGED` as a no-op, `HBUS`, `RBUS`, branches in both modes, squashed special
  instruction, and issue from the table.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/rpx_pkg.sv tb/host_isa_pkg.sv tb/tb_rpx_frontend.sv \
    --top-module tb_rpx_frontend -o sim
./obj_dir/sim
```

For the unit testbenches, replace the last file and `--top-module` with the
testbench's name (`tb/host_isa_pkg.sv` is then not needed).

## Limits

* **The core is not included.** Only the instruction front end is here. The
  decoder, execution units, call stack and the real instruction set of the DSP
  core it would attach to are outside it, and are stood in for by a testbench
  model.
* **Program memory is not included.** It exists only as a behavioural model
  with a fixed one-cycle read.
* **The published measurements are not reproduced.** They come from benchmark
  programs that are not available, so the RPT-size sweeps of execution time,
  bus toggles and energy are absent. So are the estimates of table access time
  for 0.18, 0.13 and 0.09 µm processes. The only numbers here are the cycle,
  read and toggle counts that the testbench measures itself.
