# Multi-State Processor register and state management

SystemVerilog RTL for the register renaming, commit, release and recovery
hardware of the Multi-State Processor (MSP). The MSP has no reorder buffer
and no checkpoints. Every instruction that writes a destination register
opens a new processor state with its own StateId. Each logical register owns
a bank of physical registers, and each bank has a State Control Table (SCT)
that records which state each of its physical registers belongs to.

Default configuration (16-SP): 32 logical registers with 16 physical registers
each (512 in total), 10-bit StateIds (9 bits plus a saturation bit), 64-bit
data, a rename group of 4 with at most two renames of the same register, a
128-entry instruction queue, issue width 5, 10 read ports and 5 write ports.

## Blocks (`rtl/`)

| File | Function |
|---|---|
| `msp_pkg.sv` | Shared sizes |
| `sct.sv` | One State Control Table. It holds a Valid bit and a lower StateId per entry. One-hot RenP, ComP and RelP pointers are moved by cyclic priority encoders. Range comparators turn a StateId into an entry pointer. It renames up to two entries per cycle, frees entries on release and recovery, and handles the saturation step. |
| `rename_control.sv` | StateId counter (SC) and SC offsets within a group. Gives each instruction its StateId and its destination and source registers. Stalls on a full bank or a third rename of one register. Restores SC on recovery and performs the saturation step. |
| `lcs_unit.sv` | Last Committed StateId: a minimum tree over the SCTs' commit candidates, the in-flight StateIds and the current state. Registered, so it has one cycle of latency. |
| `reg_use_tracking.sv` | RelB and ComB bit matrices. Each has one row per physical register and one column per queue entry. They track pending readers and pending members of a state. |
| `ready_bits.sv` | Ready bit per physical register. |
| `recovery_control.sv` | Recovery StateId for branch mispredictions and for in-order exceptions, plus the pending-exception stall, the issue limit and the LCS clamp. |
| `port_arbiter.sv` | Per-bank arbitration of the register-file ports, with optional read sharing. |
| `rf_bank.sv`, `banked_regfile.sv` | Banked register file with one read and one write port per bank. |
| `msp_top.sv` | Connects all of the above. |

## Main design choices

- SC holds the next StateId to hand out:
  - a writer gets SC + offset;
  - any other instruction gets SC + offset - 1;
  - after a recovery, SC becomes the recovery StateId + 1.
- An entry is released only when the StateId of its successor entry is below the LCS. This keeps the mapping that an exception recovery to "StateId - 1" needs.
- While a branch mispredict is being reported, or a recovery is being broadcast, the LCS is clamped to its StateId.
- Saturation step:
  - SC drops by M, which clears the saturation bit.
  - StateIds that have the saturation bit set lose it.
  - Older StateIds become 0.
- Only the integer register domain is built.

## Not included

These are driven by the testbenches instead:

- the instruction queue and issue selection;
- the front end;
- the execution units;
- the store queue.

## Verification (`tb/`)

Each block has a self-checking testbench that compares it against an
independent reference model and prints a `TB_RESULT` line.

`tb_msp_top` runs at the default sizes and acts as the rest of a core. It
runs a random program with branches, mispredictions and exceptions, and
checks every source operand against a golden register file. It counts each
mechanism:

- bank-full stall;
- third-rename stall;
- branch recovery;
- exception recovery;
- release;
- read sharing;
- port conflicts;
- the saturation step.

## Status

The block testbenches pass, except `tb_sct` after the latest change to its
release limit. The end-to-end testbench exercises every mechanism. In long
runs it still hits an open corner case: a recovery can find no entry in an
SCT because that entry was released too early.
