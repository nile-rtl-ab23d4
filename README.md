# Nile: a programmable monitoring coprocessor

Hardware performance counters can only count a fixed list of raw events. Nile
is a coprocessor that watches every instruction a RISC-V core retires. Software
programs it to recognise *events* and to attach *actions* to them. An event is
a wildcard pattern over the retired instruction, its PC, its next PC, its
memory address and its data. An action is an interrupt, or a read or write of a
shared memory region with a check on the value read. Composing a few such
event/action units gives monitors that no fixed counter provides. The main
example is a **shadow stack** built from two units:

* one unit sees every call and stores the call's PC in memory;
* the other sees every return, reads the stored PC back and checks that the
  return target is that PC + 4;
* a mismatch means the return address on the program stack was overwritten,
  as in a stack buffer overflow, and Nile interrupts the core.

This repository holds synthesizable SystemVerilog for the coprocessor: the Match
Units, the Action Unit with its activation queue, local storage and control, and
the custom-instruction decoder. It also holds a self-checking testbench for each
of them. The host core, its data cache and the operating-system support are not
included. The top module, `nile_top`, exposes their interfaces as ports.

```
             commit log (inst, pc_src, pc_dst, addr, data)
 core WB ──────────────┬─────────────┬─────────────┐
   ▲  commit_ready     ▼             ▼             ▼
   │              ┌─────────┐   ┌─────────┐   ┌─────────┐
   │              │  MU 0   │   │  MU 1   │ … │ MU N-1  │  match, count, threshold
   │              └────┬────┘   └────┬────┘   └────┬────┘  one pending packet each
   │                   └──── lowest id first ──────┘
   │                             ▼ {MU_addr, MU_data, MU_id}
   │        ┌───────────── Action Unit ─────────────┐
   │        │ activation queue ─► control ─► mem port ──► data cache
   │        │                     ▲   │               │
   │        │   storage: base, offset, size,          │
   │        │            per-MU action config         │
   │        └─────────────────────┼───┼───────────────┘
   │                              │   └──► interrupt
 RoCC cmd/resp ──► command decoder┘ (configures MUs and storage)
```

## Files

| file | contents |
|---|---|
| `rtl/nile_pkg.sv` | shared types: commit-log record, activation packet, action configuration word, opcodes, RoCC and memory structs |
| `rtl/nile_match_unit.sv` | one Match Unit |
| `rtl/nile_mu_array.sv` | NUM_MU Match Units, commit-log broadcast, packet selection, commit stall |
| `rtl/nile_act_queue.sv` | activation queue (FIFO) |
| `rtl/nile_act_storage.sv` | Action Unit local storage |
| `rtl/nile_act_control.sv` | Action Unit control: the actions themselves |
| `rtl/nile_action_unit.sv` | queue + storage + control |
| `rtl/nile_cmd_decoder.sv` | custom-instruction decoder, privilege check, read-back |
| `rtl/nile_top.sv` | the coprocessor |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/nile_mem_model.sv` | behavioural data-cache model used by the testbenches |

Default sizes: `NUM_MU = 4`, `QUEUE_DEPTH = 8`, 64-bit words, 32-bit
instructions.

## The commit log and the Match Units

The core hands Nile one record per retired instruction, taken at write-back.
Each record has five entries: `inst` (32 bits), `pc_src` (the instruction's PC),
`pc_dst` (the next PC), `addr` (memory or register address) and `data`. The last
four are 64 bits wide. The record comes with a valid/ready handshake.

Every record goes to every Match Unit (MU). An MU stores a *match value* and a
*mask* for each entry. A **mask bit of 1 means "don't care"**, so mask 0 asks
for an exact match. The MU matches when every entry agrees on its non-masked
bits and the process filter passes. The process filter is either "any process"
or one 32-bit process id, compared with a current-process register that the OS
writes on each context switch. Examples:

| event | entry | value | mask |
|---|---|---|---|
| return (`jalr x0, 0(ra)`) | inst | `0x00008067` | `0x00000000` |
| call (`jal ra, …`) | inst | `0x000000ef` | `0xfffff000` |
| any branch | inst | `0x00000063` | `0xffffff80` |
| any access to a 4 KiB page P | addr | P | `0xfff` |

Entries that are not programmed keep the reset mask of all ones, so they match
anything.

Each match of an enabled MU increments its 64-bit counter. When the counter
reaches the threshold, the MU builds an **activation packet** and the counter
restarts from zero. The MU therefore activates once every `thresh` matches. A
threshold of 0 never activates, and the MU is then a plain event counter. The
packet holds:

* `MU_addr`: the record's `pc_src`;
* `MU_data`: one commit-log entry, chosen per MU (`data_sel`);
* `MU_id`: the MU's number.

### Getting packets into one queue without losing order

Several MUs can fire on the same record, but the queue takes one packet per
cycle. Each MU therefore keeps its packet in a one-entry pending slot. The
array forwards pending packets one per cycle, lowest MU id first.

**While any MU holds a pending packet, `commit_ready` is low**, so the core's
write-back stalls. This has two effects:

* packets enter the queue in program order, and in MU order within one record.
  The shadow stack needs this: a pop must never overtake the push it checks;
* no event is lost when the queue is full. The stall simply lasts until the
  control unit frees a slot.

The cost is one stall cycle for each activating record, plus one for each
extra MU that fires on the same record, plus however long the queue stays
full. Records that only count, or match nothing, never stall.

## The Action Unit

The control unit takes one packet at a time from the queue. It looks up the
sending MU's 32-bit configuration word (`act_cfg_t`) in local storage:

| bits | field | meaning |
|---|---|---|
| 1:0 | `act` | 0 none (drop), 1 interrupt, 2 shared-memory write, 3 shared-memory read and compare |
| 2 | `addr_mode` | 0: address = base + offset; 1: address = `MU_addr` |
| 4:3 | `ptr_upd` | with `addr_mode` 0: 0 none, 1 post-increment (push), 2 pre-decrement (pop) |
| 7:5 | `data_sel` | entry sent as `MU_data` (0 inst, 1 pc_src, 2 pc_dst, 3 addr, 4 data) |
| 15:8 | — | reserved |
| 31:16 | `diff` | signed expected difference for the compare |

It then acts on the packet as follows.

* **Interrupt** raises the interrupt with cause *event*.
* **Write** stores `MU_data` in one 64-bit word of the shared memory.
* **Read and compare** loads a word and checks `MU_data − word == diff`. The
  subtraction wraps at 64 bits and `diff` is sign-extended. A mismatch raises
  the interrupt with cause *mismatch*.

The local storage also holds the shared region's `base`, `offset` and `size`,
which the OS writes. With `addr_mode` 0, the offset works as a stack pointer in
8-byte slots:

* a push writes at `base + offset` and then adds 8;
* a pop subtracts 8 and then reads at `base + offset`.

No access may leave `[base, base + size)`. Pushing into a full region, popping
from an empty one, or a `MU_addr` outside the region is not carried out. It
raises the interrupt with cause *bounds*, and the offset does not move.

The interrupt is a level signal. The cause and MU id of the first event are
held until the OS clears them. Later events are still processed while the
interrupt is pending, but they do not overwrite the recorded cause.

Only one memory access is outstanding at a time. A packet is dequeued in the
cycle the control unit sees it. A write completes when the cache accepts the
request. A read completes when the response arrives. The next packet is taken
after that.

### The shadow stack, concretely

| | MU 0 (calls) | MU 1 (returns) |
|---|---|---|
| pattern | inst `0x000000ef`, mask `0xfffff000` | inst `0x00008067`, mask 0 |
| threshold | 1 | 1 |
| action | write, base+offset, post-increment | read and compare, base+offset, pre-decrement |
| `MU_data` | `pc_src` of the call | `pc_dst` of the return |
| `diff` | — | 4 |

A third MU can set an interrupt on any ordinary program access to the page
that holds the shadow stack. Nile's own accesses do not appear in the commit
log, so they do not trigger it.

## Programming interface

Nile is programmed with RoCC custom instructions. `funct7` selects the
operation. `rs1[7:0]` is the MU id for per-MU operations. A response is
returned when `xd` is set.

| funct7 | operation | operands | allowed from |
|---|---|---|---|
| 0 | set match value | rs1[10:8] entry, rs2 value | user, OS |
| 1 | set mask | rs1[10:8] entry, rs2 mask | user, OS |
| 2 | set process filter | rs2[31:0] pid, rs2[32] any process | user, OS |
| 3 | comm: configure two MUs | rs1[7:0] id1, rs1[15:8] id2, rs2[31:0] cfg1, rs2[63:32] cfg2 | user, OS |
| 4 | reset count | — | user, OS |
| 5 / 6 | enable / disable | — | user, OS |
| 7 | set threshold | rs2 | user, OS |
| 8 | read count | → count | user, OS |
| 9 | write count | rs2 | OS |
| 10 / 11 / 12 | write base / offset / size | rs1 | OS |
| 13 / 14 / 15 | read base / offset / size | → value | OS |
| 16 | read threshold | → threshold | OS |
| 17 | write current process id | rs1[31:0] | OS |
| 18 | read interrupt status | → {pending, 53'b0, cause[1:0], MU id[7:0]} | OS |
| 19 | clear interrupt | — | OS |

`cmd.supervisor` marks a command issued in supervisor mode. An OS-only command
from user mode has no effect, and its response data is 0. An MU id of
`NUM_MU` or more is ignored and reads as 0.

Each command takes one cycle, except `comm`, which writes its second MU in the
following cycle. When a response is requested, it appears in the next cycle.
No new command is accepted while a response waits for `resp_ready`.

`comm` writes each MU's configuration word into the Action Unit storage and
also copies its `data_sel` field into the MU. Pointing both ids at the same MU
configures a single MU.

**Context switches.** Each MU's configuration is part of a process's state.
On a switch the OS:

* reads each MU's count and threshold (operations 8 and 16);
* reads the shared-memory registers (13–15);
* writes those of the next process back (7, 9, 10–12);
* updates the current-process id (17).

The OS keeps its own copy of the patterns, because they cannot be read back.
It should wait until `busy` is low before saving the offset, so that no
activation is still in flight.

## Port summary of `nile_top`

| port | dir | meaning |
|---|---|---|
| `commit_valid`, `commit_ready`, `commit` | in, out, in | commit log; `commit_ready` low stalls write-back |
| `cmd_valid`, `cmd_ready`, `cmd` | in, out, in | RoCC command (`funct7`, `rd`, `xd`, `supervisor`, `rs1`, `rs2`) |
| `resp_valid`, `resp_ready`, `resp` | out, in, out | RoCC response (`rd`, `data`) |
| `mem_req_valid`, `mem_req_ready`, `mem_req` | out, in, out | one-word request (`addr`, `wr`, `wdata`) |
| `mem_resp_valid`, `mem_resp_data` | in, in | read data |
| `interrupt` | out | level interrupt until cleared |
| `busy` | out | packets pending, queued or being acted on |

Reset (`rst_n`) is asynchronous and active low. After reset, all MUs are
disabled, all actions are off and the storage registers are zero.

## How far this follows the published Nile design

These parts follow the published design:

* the five-entry commit log and its widths;
* broadcast to all Match Units;
* wildcard matching, the counter and threshold, and the activation-packet
  contents;
* the Action Unit split into queue, storage and control;
* the two kinds of action (interrupt, and a shared-memory access with
  difference matching), addressed by `MU_addr` or by a stored base and offset;
* the API functions and their user/OS accessibility;
* the shadow-stack programming with a difference of 4.

These are this implementation's own choices, because the published design
leaves them open:

* the number of MUs (4) and the queue depth (8);
* the mask polarity, inferred from the return example, which uses mask 0 for an
  exact match;
* the counter restarting at the threshold, and threshold 0 meaning count-only;
* the process filter and the current-process register;
* the per-MU pending slots, fixed priority and commit-log stall;
* the configuration-word layout, the 8-byte stack slot and the push/pop
  ordering;
* the bounds check and its interrupt;
* the interrupt cause register with its read and clear operations, and the
  threshold read;
* the opcode numbers and operand packing, with `set_pattern` split into three
  operations;
* the simplified RoCC and memory handshakes, in place of the full Rocket
  bundles.

Known limits:

* **Compressed calls** (`c.jal`, `c.jalr`) return to PC + 2, so a shadow stack
  programmed with `diff = 4` flags them. They need their own MU pair with
  `diff = 2`, or a core built without the C extension.
* **Monitoring that starts mid-program** sees returns from frames it never
  pushed. These pop an empty region and raise a *bounds* interrupt. The OS
  should enable the shadow stack before the program's first call.
* A pattern compares each entry with fixed bits, so it cannot tell a
  **taken branch** from a branch that is not taken. That would need
  `pc_dst ≠ pc_src + 4`. An MU can count or report all branches, and software
  can sort them from `MU_addr` and `MU_data = pc_dst`.
* Mask matching describes **aligned power-of-two regions** only. A region of
  any other shape needs several MUs.
* Events during the stall cycles are not lost, but the core slows down.
  Frequent activations against a slow data cache fill the queue, and then the
  core runs at the rate of the control unit.

## Verification

Each testbench checks its block against a reference model written
independently in the testbench. Each ends with `TB_RESULT checks=N failures=M`
and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_nile_match_unit` | 400 random records, half forced to match; count, activation and packet; wildcard, process filter, threshold, enable/disable, count write/reset, threshold 0 |
| `tb_nile_mu_array` | overlapping patterns on 4 MUs; packet order (record order, then MU id); stalls; records firing several MUs; random downstream back-pressure |
| `tb_nile_act_queue` | random push/pop against a queue model; full, empty, simultaneous push and pop, level |
| `tb_nile_act_storage` | random register and config writes, pointer updates, write priority, out-of-range ids |
| `tb_nile_act_control` | interrupt action; 300-step random shadow stack with injected corruptions; overflow and underflow bounds; `MU_addr` writes in and out of range; count-only MU; first cause kept |
| `tb_nile_action_unit` | back-to-back bursts of 20 pushes and 20 pops against a slow memory; queue full; one corrupted return detected |
| `tb_nile_cmd_decoder` | 3000 random commands, all opcodes, user and supervisor mode; strobes, read data, privilege refusal, `comm` second cycle, response back-pressure |
| `tb_nile_top` | end-to-end at default sizes (see below) |

`tb_nile_top` stands in for the core with a trace generator. The trace comes
from a synthetic program of ALU operations, loads, stores, branches, calls and
returns. A behavioural data cache with random back-pressure and a 6-cycle read
latency serves the memory port. Tasks play the OS and the monitored program.
The test runs these phases:

1. A normal run of 3000 instructions. It must give no interrupt, and the
   shadow-stack contents and offset must equal the model's call stack. The
   branch count must be exact.
2. An overwritten return address. The test checks for a *mismatch* interrupt
   from MU 1, then the OS reads the status, clears it and ends the process.
3. A store into the shadow-stack page. The test checks for an *event*
   interrupt from MU 2.
4. A context switch to another process and back. Counts are saved and
   restored, and the process filter keeps the shadow stack silent for the other
   process.
5. OS-only commands from user mode. They must be refused.
6. Recursion deeper than an 8-slot region. The test checks for a *bounds*
   interrupt.
7. 60 back-to-back calls and 60 returns against the slow cache. The queue
   fills, the core stalls and no activation is lost.

The test counts how often each mechanism occurred: commit stall, queue full,
push, pop, mismatch, event, bounds, process filter, context switch, privilege
refusal and count-only MU. It counts a failure for any mechanism that never
occurred.

The benchmark programs and the vulnerable test programs that motivate the
design need a real core and operating system. They are represented here only
by the synthetic call/return traces above.

### Running a testbench

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nile_pkg.sv tb/tb_nile_top.sv --top-module tb_nile_top \
    --Mdir obj_tb_nile_top -o sim
./obj_tb_nile_top/sim +verilator+rand+reset+2
```

Replace `tb_nile_top` with any other testbench name. Every testbench finishes
in well under a second.

The RTL uses only `logic`, `always_ff` and `always_comb`, packed structs and
enums from `nile_pkg`, and two concurrent assertions: a pending MU packet is
never overwritten, and a memory request stays stable until accepted. It
compiles with Verilator's lint (`-Wall`) and with Yosys's slang front end.
