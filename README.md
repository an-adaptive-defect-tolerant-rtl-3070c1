# Defect-tolerant multiprocessor array

A chip with several identical processor cores usually loses a whole core when
one of its pipeline stages has a manufacturing defect. This design keeps the
healthy stages in use. Four 5-stage RISC pipelines sit in four rows. Every
link between two pipeline stages runs through a small switch. When a stage is
broken, its row can borrow the same stage from another row, routing through
the switches of the rows in between. The routes are pipelined: each row
crossed adds one register, so a repaired core has a longer pipeline. No
signal anywhere depends on the pipeline length. Every hazard is resolved
locally, inside the stage that sees it.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, in `rtl/`.
Self-checking testbenches and a reference model are in `tb/`.

## Array structure

Each row holds one core, split into four physical stages:

| Stage | Contents |
|---|---|
| IF  | PC, stream-ID register, program memory |
| DEC | decoder, 16 x 32 register file; write-back ends here |
| EX  | ALU, branch resolution, state-saving buffer |
| MEM | data memory, second state-saving buffer |

Write-back needs no logic of its own. It is only the wires from MEM back to
the register file in DEC, so it is treated as one more link. A core therefore
has six links:

| Index | Link | Carries |
|---|---|---|
| 0 | IF→DEC | valid, stream ID, PC, instruction |
| 1 | DEC→EX | decoded instruction with its register values |
| 2 | EX→MEM | result or address, store data |
| 3 | MEM→WB | register write (into DEC) |
| 4 | EX→IF  | feedback: branch target or reload address |
| 5 | MEM→EX | feedback: load values |

Every stage registers its output. Every link of every row passes through one
`ic_switch`. The switches of one link type form a column (`link_column`).
Between two neighbouring rows, each column has one `bidir_reg`: a register
whose 1-bit direction selects whether it carries data down or up.

### Switch codes

| Code | Routing | Typical use |
|---|---|---|
| 000 | In → Out | normal core |
| 001 | In → North | send this row's stage output upward |
| 010 | In → South | send it downward |
| 011 | North → Out | receive from above |
| 100 | In → Out, and North → South | this row works normally and lets a route pass downward |
| 101 | South → Out | receive from below |
| 110 | In → Out, and South → North | this row works normally and lets a route pass upward |
| 111 | as 000 | |

Codes 100 and 110 are what make two broken outer rows useful. For example,
rows 0 and 3 can form a new core through rows 1 and 2 while rows 1 and 2 keep
running their own programs.

### Configuring a route

The configuration is static: change `sw_ctrl` and `reg_dir` only while
`rst_n` is low. To send link `L` from row `a` down to row `b` (`a < b`):

- `sw_ctrl[a][L] = 010`
- `sw_ctrl[r][L] = 100` for every row between them
- `sw_ctrl[b][L] = 011`
- `reg_dir[g][L] = 0` for gaps `a … b-1`

Upward is the mirror image: 001 at the source, 110 in between, 101 at the
destination, and `reg_dir = 1`.

Only one route can use a given switch column segment. The MEM→EX load
feedback must follow the same rows as EX→MEM, in the opposite direction.

Example: row 0 uses the MEM stage of row 3 (worst case 1 in
`tb_workloads`):

| Link | Row 0 | Row 1 | Row 2 | Row 3 | reg_dir |
|---|---|---|---|---|---|
| EX→MEM (2) | 010 | 100 | 100 | 011 | 0, 0, 0 |
| MEM→WB (3) | 101 | 110 | 110 | 001 | 1, 1, 1 |
| MEM→EX (5) | 101 | 110 | 110 | 001 | 1, 1, 1 |

Row 0's data memory is then the one in row 3: read it with `dbg_row = 3`.

Stages of a broken row that no core uses keep running. Give their row a
program that is a single HALT so they stay idle. In particular, an EX stage
whose loads never return would otherwise trip the buffer assertions.

Choosing which stages to combine after a fault is left to software outside
the array. So is testing the stages to find the faults. The array only
provides the switches.

## Working with a variable-length pipeline

A repaired core can have up to three extra registers on each link. Four
mechanisms keep it correct without any global stall or flush.

### Stream IDs (control hazards)

Branches are predicted not taken. IF tags each instruction with a 1-bit
stream ID. EX keeps its own copy and drops every instruction whose tag
differs. A dropped instruction changes no state.

When EX takes a branch or jump:

1. EX flips its ID.
2. EX sends the target over EX→IF.
3. IF flips its own ID and fetches the target in the same cycle.

Everything fetched on the wrong path still carries the old ID. It drains
through DEC and is discarded in EX, however many registers lie on the way.

### Flush/reload instead of stalls (load hazards)

An instruction in EX may need a register whose value is still being loaded
in MEM. It is not held in EX. Instead:

1. It is dropped, and EX flips its stream ID.
2. IF is asked, over the same EX→IF link, to re-fetch it from its own PC.
3. By the time it returns, the value has normally arrived.

No stage ever stalls. Back-pressure would need signals that cross every
stage, which is what this design avoids.

Cost on a core with no extra registers:
- A taken branch loses 1 cycle.
- A reload loses 2 cycles, where a stalling pipeline would lose 1.

Measured exactly: cycles = instructions + taken branches + 2 × reloads + 2.

### State-saving buffers (bypassing)

EX cannot use forwarding wires from later stages, because their distance
changes with the configuration. Instead EX keeps `state_fifo`, a record of
the instructions that left it. Each cycle the buffer shifts by one entry and
takes the outgoing instruction's entry:

- 2-bit type: no result, ALU result, load pending, load arrived
- destination register
- value

Slot k therefore stands for "k+1 cycles downstream of EX".

For each source register, EX looks for the youngest entry that writes it:
- ALU result or arrived load: use its value (bypass).
- Pending load: flush/reload.
- No entry: the value DEC read from the register file is already current.

The MEM→EX feedback carries every load value back. It fills the oldest
pending load entry. Loads complete in order, and dropped instructions never
reach MEM, so no tag is needed. The code "load arrived" is the otherwise
unused fourth type value.

### Store data from a load

A store whose data register is still being loaded is not reloaded. EX passes
it on, marked to take its data in MEM. MEM holds a second `state_fifo`, as
deep as the one in EX, which mirrors the results leaving MEM. The store takes
its data from there.

### Buffer depth

A value must stay in the EX buffer until every instruction that could miss it
in the register file has passed EX. Let b1, b2 and b3 be the extra registers
on DEC→EX, EX→MEM and MEM→WB. With the registered stage outputs used here,
this window is

    2 + b1 + b2 + b3 cycles.

The three distances are measured between rows on a line, so
`b1 + b2 + b3 ≤ 2(N−1)`. That gives `2N` entries: 8 for 4 rows. This is one
more than the `2N−1` of the original design, which counted from a different
reference point.

`FIFO_DEPTH` defaults to `2*N_CORES`. With depth 7, `tb_dt_core` fails in
worst case 1: a load entry is dropped before its value arrives, and a wrong
result is stored.

## Instruction set

The encoding is this design's own. It is documented in `rtl/dt_pkg.sv`.
Instructions are 32 bits. There are 16 registers, and r0 is zero.

| Class | Instructions |
|---|---|
| Register ALU | ADD, SUB, AND, OR, XOR, SLL, SRL, SRA, SLT, SLTU |
| Immediate ALU | ADDI, ANDI, ORI, XORI, SLLI, SRLI, SRAI, SLTI, LUI |
| Memory | LD, ST (base + word offset) |
| Branch | BEQ, BNE, BLT, BGE (PC-relative, in words) |
| Jump | JAL, JR |
| Other | HALT, NOP |

- Jumps resolve in EX, like branches.
- HALT makes EX ignore everything after it and raises `halted`.
- Memories are word-addressed, 1024 words each. Addresses wrap.

## Top level: `dt_array`

| Parameter | Default | Meaning |
|---|---|---|
| `N_CORES` | 4 | rows |
| `IMEM_WORDS` | 1024 | program memory words per row |
| `DMEM_WORDS` | 1024 | data memory words per row |
| `FIFO_DEPTH` | 2·N_CORES | state-saving buffer entries |

| Port | Meaning |
|---|---|
| `sw_ctrl[row][link]` | 3-bit switch code |
| `reg_dir[gap][link]` | register direction: 0 down, 1 up; gap g lies between rows g and g+1 |
| `prog_we`, `prog_row`, `prog_addr`, `prog_data` | write a word of a row's program memory (hold `rst_n` low) |
| `dbg_row`, `dbg_addr` → `dbg_data` | read a row's data memory (asynchronous) |
| `halted[row]` | EX of that row has executed HALT |
| `ex_ev[row]`, `mem_ev[row]` | one-cycle event pulses: execute, drop, branch flush, reload, ALU bypass, load bypass, load fill, store deferred; load, store, store data from buffer |

After reset, IF starts at address 0.

Synthesis (generic cells, memories kept as memories) gives about 2400 cells
and 7000 flip-flops for the default array. No timing or area figure of a
real technology is claimed.

## Files

| File | Contents |
|---|---|
| `rtl/dt_pkg.sv` | types, opcodes, link payloads, switch codes |
| `rtl/dt_array.sv` | top level |
| `rtl/link_column.sv` | one link type across all rows |
| `rtl/ic_switch.sv` | interconnect switch |
| `rtl/bidir_reg.sv` | direction-controlled interconnect register |
| `rtl/if_stage.sv`, `rtl/prog_mem.sv` | fetch stage and its memory |
| `rtl/dec_stage.sv`, `rtl/regfile.sv` | decode stage and register file |
| `rtl/ex_stage.sv`, `rtl/state_fifo.sv` | execute stage and its buffer |
| `rtl/mem_stage.sv`, `rtl/data_mem.sv` | memory stage and its memory |
| `tb/dt_tb_pkg.sv` | encoders, instruction-set reference model, program generators |
| `tb/dt_core.sv`, `tb/pipe_delay.sv` | one core with fixed register counts per link (no switches), used as a reference |
| `tb/tb_*.sv` | testbenches |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ic_switch`, `tb_bidir_reg`, `tb_regfile`, `tb_prog_mem`, `tb_data_mem` | every routing code and direction; register file and memories against models |
| `tb_state_fifo` | youngest-match lookup, fills, arrived-load type, against a queue model |
| `tb_if_stage`, `tb_dec_stage`, `tb_ex_stage`, `tb_mem_stage` | each stage alone, including drop, reload, bypass, fill and store data from the buffer |
| `tb_dt_core` | random and benchmark programs on five cores with different register counts per link, including both worst cases; compared with the reference model; exact cycle formula |
| `tb_dt_array` | full-size array: four independent cores; then a core built from rows 0 and 3 through pass-through switches while rows 1 and 2 keep working; then a row borrowing its neighbour's MEM. Results are compared with the reference model, and cycle counts with `dt_core` set to the same register counts. It counts every switch code, both register directions and every hazard mechanism, and fails if one never occurs. |
| `tb_workloads` | the four benchmark kinds, sized to 1000–2000 cycles, in three configurations |

Cycle counts from `tb_workloads`:

| Benchmark | Fault-free | Worst case 1 | Worst case 2 | Flush/reload vs. a stalling pipeline |
|---|---|---|---|---|
| argument-heavy calls | 1312 | 2392 (+82%) | 2938 (+124%) | +15.9% |
| read-after-write chains | 1419 | 1419 (+0%) | 1659 (+17%) | 0 |
| non-taken branches | 1279 | 1279 (+0%) | 1639 (+28%) | 0 |
| empty for-loop, counter in memory | 1520 | 3320 (+118%) | 4220 (+178%) | +24.6% |

- Worst case 1: row 0 uses MEM of row 3.
- Worst case 2: row 0 uses DEC and MEM of row 3.
- The last column is the overhead of flush/reload on the fault-free core,
  compared with a core that stalls one cycle per load-use.

Run a testbench with plain Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        --top-module tb_dt_array rtl/dt_pkg.sv tb/dt_tb_pkg.sv tb/tb_dt_array.sv
    obj_dir/Vtb_dt_array

Leave out `tb/dt_tb_pkg.sv` for the unit testbenches that do not import it.
Assertions inside `state_fifo` and `mem_stage` stop the simulation in two
cases:
- a load value arrives with no pending entry;
- a pending load would leave the buffer before its value arrives.

Verilator reports three kinds of lint warnings. None is a circuit problem:
- unused package constants;
- unused bits of the feedback payload and of the outer North/South ports;
- `rst_n` used both as an asynchronous reset and as the disable condition of
  these assertions.

## Departures from the original design

- **No tri-states.** The original design built the vertical switch ports as
  tri-stated in/out wires. Here each is a pair of one-way signals; an unused
  output drives zero, which means "no valid data". The register between two
  switches picks the direction, so the behaviour is the same.
- **18 registers, not 24.** The original count for four rows is 24
  bidirectional register arrays. This RTL has one register per link type per
  gap: 6 × 3 = 18. The switch counts match: 16 on the forward links and 8 on
  the feedback links.
- **Buffer depth 2N, not 2N−1** (see "Buffer depth").
- **Own details.** The instruction encoding, memory sizes, host ports, HALT,
  the reset values and the one-cycle redirect timing are this design's own.
- **Not included.** The reconfiguration search (software); the baseline
  pipeline and the redundant-core arrays (used only for comparison); and the
  frequency, area and power results of a commercial standard-cell flow.
