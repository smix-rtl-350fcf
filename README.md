# SMIX: an out-of-order issue interface for multi-operand custom operators

Custom operators often need many inputs and return several results. A GEMV
step, an AES round or a Smith-Waterman cell are examples. A RISC-V style
instruction has only two source registers and one destination, so it cannot
name all of them. SMIX solves this with a small **grouped custom register
file (CRF)** next to the core, plus four ordinary two-input/one-output
instructions that move data in, start the operator and move results out.
Each of these instructions names its register group and operand positions
explicitly. Because of that, both the compiler and an out-of-order core can
reorder them. The only ordering the hardware has to enforce is tracked with
a few small counters per group, not with a full dependency matrix.

This repository holds synthesizable SystemVerilog for the SMIX hardware of an
out-of-order core: the CRF, the pipelined SMIX functional unit, one issue
queue per register group with the counter-based dependency logic, and the
issue arbiter. `smix_top` ties these together. Its ports connect to the rest
of the core (ROB, physical register file, other wake-up sources) and to the
operator itself.

## The instructions and the register file

The CRF has `N_GROUPS` groups. Each group has `N_IN` input registers
`I[0..N_IN-1]` and `N_OUT` output registers `O[0..N_OUT-1]`, and each group
feeds its own operator invocation. Defaults: 2 groups, 4 inputs, 2 outputs,
64-bit words.

| instruction | operands | effect |
|---|---|---|
| `fill` | rs1, rs2, gid, idx_in | `I[2*idx_in] <= rs1`, `I[2*idx_in+1] <= rs2` in group gid |
| `pick` | rd, gid, idx_out | `rd <= O[idx_out]` of group gid |
| `fillpick` | rd, rs1, rs2, gid, idx_in, idx_out | a `fill` and a `pick` in one instruction |
| `exec` | rd, rs1, rs2, gid, idx_in, idx_out | a `fill`; then run the operator on all of `I`, write all of `O`; then `rd <= O[idx_out]` of the new result |

A three-input, two-output operator `(r0, r1) = OpA(a0, a1, a2, a2)` on
group 0 becomes `fill a2,a2,0,1 ; exec r1,a0,a1,0,0,1 ; pick r0,0,0`. In a
loop, a compiler merges each trailing `pick` into the next iteration's `fill`
as a `fillpick`. It also alternates groups, so two iterations can be in
flight at once (see `tb/tb_smix_opa_loop.sv`).

The RTL takes instructions already decoded into `smix_pkg::smix_uop_t`
(opcode, group, indices, physical register tags, ROB index). No bit-level
instruction encoding is defined here.

## Ordering within a group: the counters

The four instructions of one group conflict only through the CRF:

* an `exec` reads every input register, so it must come after every older
  `fill`/`fillpick`/`exec` of its group;
* an `exec` overwrites every output register, so it must also come after every
  older `pick`/`fillpick`;
* a `fill` or `pick` must come after the youngest older `exec` of its group.
  The `fill` must not overwrite inputs that exec still needs. The `pick` must
  read that exec's result.

Fills and picks that sit between the same two execs may go in any order.
Instructions of different groups never wait for each other.

Each group queue (`smix_issue_queue`) enforces this with two counters and one
`pre_counter` per entry:

* `inst_counter`: how many of the group's instructions are dispatched but not
  yet issued.
* `last_exec_counter`: the `pre_counter` of the youngest waiting exec. The RTL
  stores it as `last_exec_counter + 1` (`lec_p1`), which is 0 when no exec
  is waiting.
* At dispatch, an `exec` gets `pre_counter = inst_counter` and becomes the
  last exec (`lec_p1 = pre_counter + 1`). Any other instruction gets
  `pre_counter = last_exec_counter + 1`, which is `lec_p1`.
* When any instruction of the group issues, every non-zero `pre_counter` in
  the group, `inst_counter` and `lec_p1` all drop by one.
* An entry may issue when its `pre_counter` is 0, its GPR operands are ready,
  and its ROB index is not younger than `wait_ptr`.

A `pre_counter` therefore counts exactly the older instructions that must
issue first. No younger instruction can issue before it, because a younger
instruction's count is never smaller. Example, for one group, in program
order:

| instr | F1 | F2 | E1 | P1 | F3 | E2 |
|---|---|---|---|---|---|---|
| pre_counter at dispatch | 0 | 0 | 2 | 3 | 3 | 5 |

F1 and F2 may issue in either order. E1 becomes free after both have issued.
P1 and F3 become free when E1 issues, in either order, and E2 becomes free
after all of them.

Two things follow that the user of the interface must know:

* **Fill each input pair at most once between two execs of a group.** Two
  fills of the same pair inside one exec window may issue in either order,
  so the later one in program order is not guaranteed to win.
* Issue order alone keeps the CRF correct. This holds because the SMIX FU is
  a single in-order pipeline with a fixed latency. Inputs are read and
  written in its first stage, and outputs in its last.

## Speculation and branch recovery

A `fill` changes architectural CRF state immediately, so SMIX instructions
never issue speculatively. The ROB supplies `wait_ptr`, and an entry issues
only if its ROB index is at or before `wait_ptr`, measured as age from
`rob_head`. This is meant to be the youngest non-speculative position, for
example the entry just before the oldest unresolved branch. Computing it is
the ROB's job and is outside this RTL.

On a mispredict, `flush_valid`/`flush_rob_idx` removes every entry younger
than the branch. None of them can have issued. The surviving entries'
`pre_counter`s stay valid, because they only count older instructions. No
counter snapshot is needed: `inst_counter` becomes the number of survivors,
and `lec_p1` is reset to that same number. A fill or pick dispatched after
the flush therefore waits for every survivor. This is conservative but
always safe, and the next dispatched `exec` restores exact tracking.

## Pipeline and timing

```
 dispatch ──► smix_issue_queue (group 0) ─┐
   (demux     smix_issue_queue (group 1) ─┼─► smix_issue_arbiter ─► reg-read ─► smix_fu ─► wb_*
    by gid)          ▲   ▲                │     (oldest first,        (rr_*)    (CRF, OP_LAT   │
                     │   └ host_wake_*    │      1 per cycle)                    stages)       │
                     └────────────────────┴──────────── SMIX write-back wakes dependents ◄─────┘
```

* cycle t: queue entries compute eligibility; the arbiter grants the oldest
  eligible instruction (`iss_valid`, `iss_uop`).
* cycle t+1: register read (`rr_prs1/2` out, `rr_rs1/2_data` in,
  combinational) and FU stage 0. A fill writes the CRF at the end of this
  cycle. An exec sends all inputs of its group, with its own pair bypassed
  in, to the operator (`op_start`, `op_gid`, `op_in`).
* cycle t+1+OP_LAT: last FU stage. The operator answers (`op_done`,
  `op_out`) and an exec's result overwrites the group's output registers.
  Picks read here. `wb_valid` is raised for every instruction, fills
  included, so the ROB can complete them. `wb_wen`, `wb_prd` and `wb_data`
  are the GPR write. The same `wb_prd` broadcast wakes waiting SMIX entries,
  which can issue from cycle t+2+OP_LAT.
* A dispatched instruction can issue in the cycle after dispatch at the
  earliest. Wake-ups take effect one cycle after the broadcast.

The operator port expects a fully pipelined operator with a fixed latency of
exactly `OP_LAT` cycles, accepting one launch per cycle. An assertion in
`smix_fu` checks that `op_done` lines up with the exec in the last stage.

## Parameters

| where | name | default | meaning |
|---|---|---|---|
| `smix_pkg` | `XLEN` | 64 | GPR and CRF word width (RV64; 32 for an RV32 core) |
| `smix_pkg` | `N_GROUPS` | 2 | register groups |
| `smix_pkg` | `N_IN`, `N_OUT` | 4, 2 | input/output registers per group (`N_IN` even) |
| `smix_pkg` | `PREG_W`, `ROB_W` | 7, 6 | physical register tag and ROB index widths |
| `smix_top` | `IQ_DEPTH` | 8 | entries per group queue |
| `smix_top` | `NHWAKE` | 2 | wake-up ports from the core's other units |
| `smix_top` | `OP_LAT` | 2 | operator latency = FU depth |

The two groups and the 64-bit width are the evaluated configuration of the
scheme. Four inputs and two outputs match the worked example operator.
Everything else (tag and ROB widths, queue depth, wake-up ports, latency) is
a choice of this implementation, because the scheme does not fix it. The
package constants are shared by every module, so change them there.

## Design choices beyond the scheme

* The counters drop when an instruction issues, not when it completes. This
  is enough because the FU is one fixed-latency in-order pipeline.
* Selection is oldest-first by ROB age, both inside a queue and in the
  arbiter. One SMIX instruction issues per cycle.
* The register-read stage sits between issue and the FU. The register-file
  read port is asynchronous.
* The CRF resets to zero. A flush cycle blocks dispatch.
* `wait_ptr` is compared as ROB age, so `ROB_W` must match a power-of-two
  ROB.

## What is not here

* **The operators.** What a group's operator computes depends on the kernel
  (GEMV, 1-D convolution, YUV-to-RGB, Rijndael, Smith-Waterman were the
  targets), and none is specified. `smix_top` exposes the operator port
  instead. The testbenches use an arbitrary mixing function
  (`tb/smix_tb_pkg.sv`, `tb/smix_op_model.sv`).
* **Instruction decoding.** There is no bit-level encoding; dispatch takes
  decoded micro-ops.
* **The host core.** The ROB (including how `wait_ptr` advances), rename,
  the base issue queue, the register file, the other FUs and commit are not
  included. The same applies to the in-order integrations: an in-order core
  would issue directly into `smix_fu` in program order, with no queues or
  counters.
* **The compiler flow** that allocates groups and merges picks into fills.
  It is software.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_smix_crf` | random reads and writes of both ports against an array model, and the reset value |
| `tb_smix_fu` | for operator latencies 1, 2 and 3, random fill/pick/fillpick/exec streams over both groups against a sequential model: data, tags, ROB index, and exactly `OP_LAT` cycles from issue to response; exec immediately followed by a pick of the same group is forced often |
| `tb_smix_issue_queue` | cycle by cycle against a counter-free model of the ordering rule: the request appears exactly when an entry is eligible and is the oldest eligible one; `inst_counter`, `lec_p1` and `disp_ready` are checked every cycle, across wait_ptr stalls, flushes, a full queue and ROB index wrap-around |
| `tb_smix_issue_arbiter` | oldest-first grant and micro-op forwarding |
| `tb_smix_top` | the whole unit at default parameters, with a modelled core (renaming, register file, host wake-ups, branches that resolve or flush) and a golden in-order model with a CRF snapshot per branch; every write-back value is checked, and it fails unless inter-group and intra-group overtaking, pre_counter waits, both wake-up sources, wait_ptr stalls, flushes, a full queue and all four instructions occurred |
| `tb_smix_opa_loop` | a 300-iteration software-pipelined `fillpick`/`exec` loop over both groups, fed by loads of random latency; checks every result and reports cycles and how often one group overtook the other |

To run one with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_smix_top rtl/smix_pkg.sv tb/smix_tb_pkg.sv tb/tb_smix_top.sv
./obj_dir/Vtb_smix_top
```

Replace the top module and the last file to run another testbench
(`tb/smix_tb_pkg.sv` is only needed by testbenches that import it).
Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/smix_pkg.sv rtl/smix_top.sv`.

## Files

* `rtl/smix_pkg.sv`: constants, opcode enum, micro-op struct, helpers.
* `rtl/smix_crf.sv`: grouped custom register file.
* `rtl/smix_fu.sv`: pipelined SMIX functional unit (contains the CRF).
* `rtl/smix_issue_queue.sv`: per-group issue queue with counter-based
  ordering.
* `rtl/smix_issue_arbiter.sv`: oldest-first selection among group queues.
* `rtl/smix_top.sv`: the out-of-order SMIX unit.
* `tb/`: testbenches, the test operator and the shared reference function.
