# Split-issue SMT VLIW DSP

This is a four-thread simultaneous-multithreading (SMT) version of a
TMS320C6201-style VLIW DSP. The threads share eight functional units and can
issue operations in the same cycle.

A VLIW compiler schedules against *execute packets* (EPs): groups of
operations that start together. The program assumes that the result of an
operation with latency N+1 appears in its register exactly N EPs later:

- not earlier, so an older value may still be read in between;
- not later, so no interlock is needed.

A plain VLIW keeps this promise by issuing each EP whole, one per cycle. The
core described here drops that rule and issues any part of an EP whose
functional units are free. The rest of the EP waits. Units left idle by one
thread are filled with operations of other threads, and a unit can stand in
for two ISA units.

The compiler's timing still holds because results are not written to the
register file when a unit produces them:

1. Each result waits in a per-thread **delay buffer**.
2. A **copy-back unit** writes it into the register file at the thread's Nth
   **EP boundary** after issue. An EP boundary is the cycle in which the last
   operation of an EP is issued.

Latency is therefore counted in EPs, not cycles. An EP spread over three
cycles is still one step of the program's clock.

Thread 0 has the highest priority. It sees every unit free every cycle, so it
runs cycle for cycle as it would on the single-threaded machine. The end-to-end
test checks this: thread 0 reaches its 40th EP in the same cycle whether it
runs alone or with three other threads. The lower threads use what is left.

The same mechanism separates the hardware from the ISA. The number of L, S,
M and D units is a parameter. With one multiplier, an EP that names both
multipliers issues over two cycles, and the program's results do not change.

## Execute packets and why splitting them is safe

The program is fetched in 8-operation **fetch packets** (FPs). Bit 31 of each
operation (`p`) says whether the next operation belongs to the same EP, so an
FP holds one to eight EPs. In this design an EP never crosses an FP.

`NOP n` inside an EP adds n−1 empty EPs after it. These count as EPs: they
advance the thread's EP clock one per cycle.

Take an EP k that holds `MPY A1,A2,A3` (latency 2) and `ADD A4,A1,A5`
(latency 1):

- The ADD reads the *old* A1.
- The ADD's result is visible to EP k+1.
- The product is visible from EP k+2 on.

In this core, both results go to delay-buffer entries. The entry of the ADD
is tagged "commit at EP k", and that of the MPY "commit at EP k+1". The
commit happens at the end of the boundary cycle of the EP with that number.

The thread's EP k may be split across cycles c, c+1 and c+3. Another thread
may take the multiplier in c+1. Even so:

- Every operation of EP k reads its sources before EP k's boundary, so before
  any result of EP k is written.
- Every operation of EP k+1 is issued after that boundary.

So each operation of the thread sees exactly the register state the compiler
assumed. A result arriving early waits in its entry. A result arriving late is
impossible: a unit of latency L needs L cycles, and L EPs take at least L
cycles.

## Delay buffers and the copy-back unit

Each thread has 18 delay-buffer entries, one per operation that can be in
flight: 2×1 (L) + 2×1 (S) + 2×2 (M) + 2×5 (D). When a class has a unit count
other than two, one unit may take both operations of an EP, so that class
gets twice its latency per unit.

Each unit owns a fixed group of entries and hands them out round-robin in the
E1 stage. An entry holds:

- valid and ready flags;
- the commit tag: the EP number at which it is written back;
- the destination register;
- the data.

The copy-back unit keeps a per-thread counter `cur_ep`: the number of the EP
whose operations are now in E1. It advances on the E1-aligned EP-boundary
signal from DC.

- An operation of latency L, issued in EP k, is tagged k + L − 1.
- On each boundary of thread t, every valid entry of t tagged `cur_ep[t]` is
  written into t's register file, and the counter advances.

A result that arrives in the commit cycle itself is bypassed straight to the
register write port. This covers a D-unit load whose E5 falls in that cycle,
for example.

A latency-1 operation in the last part of an EP commits in its own E1 cycle.
It is written straight from the unit to the register file ("direct commit")
and takes no entry. The register file therefore has 18 + 8 write ports per
thread. Entries are never allocated over a waiting entry; an assertion checks
this.

`ev_late_commit` in the top marks commits from an entry: results that waited
at least one EP boundary.

## Issue: DP stages and EP-combine

Each thread has a **DP stage** (`dp_stage`). It finds the current EP in the
head FP of the thread's PR buffer. It offers EP-combine the EP's operations
with a mask of the ones not yet issued. It also counts completed EPs and pops
the FP after its last EP.

**EP-combine** (`ep_combine`) serves the threads in fixed priority, thread 0
first. Within a thread it takes the operations in slot order:

1. The operation goes to the unit its encoding names: side 1 or 2 of its
   class.
2. If the hardware has a unit count other than two for that class, it goes to
   any free unit of the class instead. The unit then reaches either register
   file, since operands are read by a per-unit mux.
3. Operations that find no free unit stay pending for the next cycle.

A thread issues from one EP per cycle. Its boundary is the cycle in which its
last pending operation is granted.

The granted operations are registered into **DC** (`dc_stage`). DC decodes
registers and constants, tags each operation with its thread, and delays the
boundary flags by one cycle so they line up with E1.

## Pipeline timing

| cycle | stage | what happens |
|---|---|---|
| 0 | PG | fetch unit picks a thread and its PC |
| 1 | PS | program memory address |
| 2 | PW | program memory read (synchronous) |
| 3 | PR | FP pushed into the thread's PR buffer |
| ≥4 | DP / EP-combine | EP extracted; any subset issued (combinational in one cycle) |
| +1 | DC | decode, registered |
| +2 | E1 | operands read, predicate tested, delay-buffer entry allocated; L and S results, branch resolved, store written, load address formed |
| +3 | E2 | M result |
| +6 | E5 | load data |
|  | boundary | commits for tag `cur_ep` at the end of the thread's E1 boundary cycle |

Predicated operations whose condition fails get no entry and write nothing.
They still belong to their EP.

## Fetch

One FP is fetched per cycle, for one thread. PG picks the highest-priority
enabled thread whose PR buffer can take another packet. It counts packets
already in PS, PW and PR as a credit. The buffer holds four FPs by default.

When thread 0's buffer is full, for instance while it works through a packet
of several EPs, the fetch slot goes to the next thread. This is how the lower
threads get fetch bandwidth without slowing thread 0.

With fixed priority, a higher thread that never stalls can starve the lower
ones, in fetch as in issue. The test programs therefore disable a thread once
it reaches its final idle loop.

## Branches

`B` is resolved in E1 of an S unit and has five delay slots counted in EPs:
the target's first EP is the branch's EP + 6. The S unit passes the thread's
DP stage the target and the EP number `cur_ep + 6`. DP numbers the thread's
EPs the same way, only a few cycles earlier, so it has not yet issued EP + 6
when the number arrives.

When DP's EP count reaches that number, DP does the following:

- stops the thread;
- flushes its PR buffer;
- redirects its fetch to the target, discarding its packets in flight by an
  epoch number;
- drops any `NOP n` remainder.

The target is an absolute word address and may be in the middle of an FP.
Execution then starts at that slot.

The delay is counted in EPs rather than cycles because the branch's thread
may be split and interleaved arbitrarily. The delay-slot EPs must all execute,
however long they take.

## Instruction encoding

The TI binary encoding is not reproduced. Operations use this 32-bit format:

| bits | field |
|---|---|
| 31 | p: next operation is in the same EP |
| 30 | predicated |
| 29 | execute when the predicate register is zero |
| 28, 27:26 | predicate register: file, index 0–3 |
| 25:24 | class: 0 L, 1 S, 2 M, 3 D |
| 23 | ISA unit side (unit 1 or 2) |
| 22:19 | opcode |
| 18:14 | destination {file, index}; store data for STW |
| 13:9 | source 1 {file, index} |
| 8 | second operand is the signed constant [7:0] |
| 7:3 | source 2 {file, index} |
| 13:0 | signed constant of MVK, absolute word target of B |

Opcodes:

| class | operations |
|---|---|
| L | ADD, SUB, AND, OR, XOR, CMPEQ, CMPGT, CMPLT, NOP n (n in [3:0]) |
| S | ADD, SUB, SHL, SHRU, SHRA, MVK, B |
| M | MPY (signed 16×16), MPYU |
| D | LDW base+offset, STW (word addresses) |

`smt_vliw_pkg` has builder functions (`op_rrr`, `op_rri`, `op_k14`, `op_nop`,
`with_pred`) for writing programs in a testbench.

## Parameters (smt_vliw_top)

| name | default | meaning |
|---|---|---|
| NT | 4 | hardware threads |
| NL, NS, NM, ND | 2, 2, 2, 2 | units of each class; `NM=1` is the one-multiplier configuration, `NL=3, NM=1` adds an ALU, `NL=3, NS=3, NM=1` also a shifter |
| FPAW | 11 | program memory of 2^11 FPs (64 KB) |
| DAW | 14 | data memory of 2^14 words (64 KB) |
| FPBUF | 4 | PR-buffer FPs per thread |

## Modules

| module | role |
|---|---|
| `smt_vliw_top` | wires everything; operand muxes, predicate test, branch resolution |
| `fetch_unit`, `program_memory`, `fp_buffer` | PG–PR and the per-thread PR buffers |
| `dp_stage` | per-thread EP extraction, EP count, branch stop |
| `ep_combine` | split issue across threads and units |
| `dc_stage` | decode, E1-aligned boundary |
| `fu_alu`, `fu_shift`, `fu_mult`, `fu_ldst` | L, S, M, D units |
| `data_memory` | two-port data memory for the D units |
| `regfile` | per-thread A and B files, many write ports |
| `delay_buffer`, `copyback_unit` | per-thread result buffering and EP-counted commit |
| `smt_vliw_pkg` | types, encoding, unit layout helpers |

## Where it departs from the TMS320C6201

- 32-bit datapath. There are no 40-bit L/S modes, and only the small
  instruction set above in its own encoding. Real C6000 binaries do not run.
- No cross-path limits: any unit may read any register of its thread.
  Predicates are A0–A3 / B0–B3.
- Stores write memory in E1. Loads return in E5 from a two-port on-chip
  memory, with no cache and no memory stalls.
- The branch delay is enforced by counting EPs in the DP stage. This replaces
  the rule that a thread may dispatch only with four FPs buffered.
- Not built:
  - stalling a thread on a cache miss;
  - early results for older-binary compatibility;
  - issue policies other than fixed priority;
  - the variant that alternates threads between the A and B unit sides.

## Verification and simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

The unit testbenches compare against reference models written in the
testbench. Examples:

- EP extraction, including NOP EPs and branch stops;
- the EP-combine allocator in the 2/2/2/2 and 3/3/1/2 configurations;
- delay-buffer commit sets;
- copy-back tags;
- fetch priority and latency;
- unit arithmetic and latencies.

The end-to-end testbenches share `tb_smt_run`. It assembles a program for
each of four threads:

- a dependence chain of loads, multiplies, adds and subtracts whose EPs rely
  on the EP-counted latencies;
- a predicated loop with a delayed branch and stores;
- an idle loop.

The run checks every result in registers and memory, first with thread 0
alone and then with all four threads. It also counts each mechanism:

- split EPs;
- deferred operations;
- low-priority fetches;
- redirects;
- delayed commits;
- NOP EPs;
- operations moved to a non-ISA unit.

There are four of these testbenches:

- `tb_smt_vliw_top` (default parameters);
- `tb_smt_vliw_minus_m` (one multiplier);
- `tb_smt_vliw_ml` (3 L, 1 M);
- `tb_smt_vliw_mls` (3 L, 3 S, 1 M).

With plain Verilator, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl rtl/smt_vliw_pkg.sv \
  tb/tb_smt_vliw_top.sv tb/tb_smt_run.sv --top-module tb_smt_vliw_top -o sim
obj_dir/sim
```

A unit test works the same way, e.g. with `tb/tb_delay_buffer.sv` and
`--top-module tb_delay_buffer`.
