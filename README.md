# Checkpointable hardware tasks for a self-repairing FPGA network node

A network of FPGA boards, each with a softcore CPU and some hardware task modules,
can survive a broken node or link only if its tasks can move: to another node, or
from hardware to software and back. Moving a task means saving its state on one
resource and loading it on another. For a software task the operating system does
that; for a hardware task the state sits in flip-flops scattered over the circuit
and has to be made reachable. This RTL is the node-side hardware for that:

* three ways of getting at the state of a hardware task: a **scan chain**, a
  **shadow scan chain** and **memory mapping**, each packaged as a task slot on
  the CPU bus;
* the **checkpoint FSM** construction, which turns any state machine into one that
  can save, restore and swap a checkpoint, shown on a four-state counter;
* a **link monitor** per transceiver port that tells a dead link from a bit error,
  so the operating system reroutes only when it must;
* a **message port** that numbers a task's messages, delivers incoming ones in
  order and can be frozen, so that the checkpoints of communicating tasks agree.

The top module `reconet_node_hw` puts the three slots, three link monitors and the
message port on one bus slave and places the checkpoint-FSM example beside them.

## The checkpoint FSM

Take a machine with states S, next-state function delta and output omega, and pick
the subset Sc of states in which a checkpoint may be taken. The checkpoint FSM holds
the pair (s, c): the current state and the last saved checkpoint, both starting at
s0. Two control inputs, `save` and `restore`, plus a checkpoint input `ic`:

| save | restore | condition     | next (s, c)        | output          |
|------|---------|---------------|--------------------|-----------------|
| 0    | 0       |               | (delta(s), c)      | (omega(s), c)   |
| 1    | 0       | s in Sc       | (delta(s), s)      | (omega(s), c)   |
| 1    | 0       | s not in Sc   | (delta(s), c)      | (omega(s), c)   |
| 0    | 1       |               | (delta(ic), c)     | (omega(ic), c)  |
| 1    | 1       | s in Sc       | (delta(ic), s)     | (omega(ic), c)  |
| 1    | 1       | s not in Sc   | (delta(s), c)      | (omega(s), c)   |

A restore treats `ic` as the current state; save and restore together swap. The
last row refuses both operations outside Sc, which is the rule as defined for the
next state, even if one might expect the restore alone to go through. The output
rule as published would still show omega(ic) in that row; here the output is always
omega of the state the machine actually steps from, so state and output never
disagree.

`cfsm` implements this for any machine: delta and omega stay outside, fed by
`sel_state` (which is `ic` during an accepted restore and `s` otherwise), and the
result comes back on `next_state`. `Sc` is a bit mask `SC_MASK` over the state
codes. `cfsm_mod4` wraps the counter 0→1→2→3→0 with Sc = {0, 2}: the state space
doubles to two copies of the counter, one per possible checkpoint, and a save in
state 2 of the "checkpoint 0" copy jumps to state 3 of the "checkpoint 2" copy.

## Getting at the state of a real circuit

The checkpoint FSM is the model; in a netlist, every flip-flop of a task is replaced
by an extended flip-flop. The three kinds trade area against the time a task is
interrupted. Each is a register module with the functional input `d` and output
`q` of a plain register, plus its checkpoint access, and each is used by one task
slot that adds a bus interface.

### Scan chain (`scan_chain_reg`, slot 0 `scan_ckpt_slot`)

One multiplexer per flip-flop selects between the functional input and the
previous flip-flop. In scan mode the register is a shift register from `scan_in`
(into bit 0) to `scan_out` (bit W-1). Feeding `scan_out` back into `scan_in` makes a
ring: after W shifts the state is back, so reading a checkpoint is not destructive.

The slot's sequencer does this in hardware, one bit per clock:

* **SAVE**: W ring shifts; the bit leaving the chain in cycle j is bit W-1-j of the
  state and is written into the checkpoint buffer.
* **RESTORE**: W shifts feeding the buffer in, MSB first (rollback).

The task is stopped for exactly W cycles per command. Cheapest in area (one
multiplexer per flip-flop), most expensive in task time.

### Shadow scan chain (`shadow_chain_reg`, slot 1 `shadow_ckpt_slot`)

Each flip-flop has a shadow twin, and the twins form the scan chain. `store` copies
the whole state into the shadows in one clock while the main flip-flops keep
loading `d`; `restore` loads the shadows instead of `d`; both together swap. The
shadow chain shifts independently of the running task.

* **SAVE**: one store cycle, then W ring shifts of the shadows into the buffer.
  The checkpoint is the state of the store cycle; the buffer holds it after W+1 cycles.
* **RESTORE**: W shifts of the buffer into the shadows, then one restore cycle.
* **SWAP**: one cycle exchanging running state and shadow copy.

The task is never stopped (STATUS reports 0 stopped cycles). It costs a second
flip-flop and a second multiplexer per state bit.

### Memory mapping (`mm_state_reg`, slot 2 `mm_ckpt_slot`)

The flip-flops are grouped into 32-bit words. A read multiplexer puts the selected
word on the bus and a restore multiplexer in front of each flip-flop loads bus data
into the selected word on a write. Word k holds state bits 32k to 32k+31, unused
high bits read 0, so software can read a hardware state vector as an unsigned
integer. A write overrides the functional input of that word in that cycle.

There is no sequencer: the CPU sets CTRL.HALT, reads (or writes) the words and
clears HALT. The task is stopped for as long as the CPU takes; STATUS counts it.

### Comparison at a glance

| slot      | task stopped per checkpoint | cycles to buffer/load           | extra flip-flops per state bit |
|-----------|-----------------------------|----------------------------------|-------------------------------|
| scan      | W                           | W                                | 0 (plus checkpoint buffer)    |
| shadow    | 0                           | W+1                              | 1 (plus checkpoint buffer)    |
| mem-mapped| while HALT is set           | CPU reads/writes ceil(W/32) words| 0                             |

For a task of 984 flip-flops (the size of a DES core) the scan and shadow slots
need 31 of their 64 buffer words. `tb_ckpt_overhead_984` builds all three slots
at that size and measures, per checkpoint, how long the task is stopped (C) and
how long until the checkpoint is in the buffer or read out (L):

| slot   | C (cycles) | L (cycles) |
|--------|-----------:|-----------:|
| scan   | 984        | 1017       |
| shadow | 0          | 1018       |
| mem-mapped (31 reads, 1 per cycle) | 32 | 33 |

L includes the bus cycles to start and poll. The order of the stop times (shadow
below memory mapped below scan) is the one to expect from the structures. Published
measurements of the same three schemes on a DES core were taken with the CPU
moving every bit in software, which makes L far larger and puts scan last there
too; with the hardware sequencers here, memory mapping has the shortest latency
because it moves 32 bits per cycle instead of one.

## Node bus and register map

Single-cycle, word-addressed slave: `bus_req` is a packed struct
(`rd`, `wr`, 10-bit `addr`, 32-bit `wdata`), defined in `reconet_pkg`. Writes act on the
next rising edge; read data is registered at the top and valid one cycle after
`rd`, flagged by `bus_rvalid`. `rd` and `wr` must not be high together (asserted).

`addr[9:8]` selects: 0 scan slot, 1 shadow slot, 2 memory-mapped slot, 3 link block.

Task slots (`addr[7:0]`):

| word      | name    | meaning                                                        |
|-----------|---------|----------------------------------------------------------------|
| 0x00      | CTRL    | bit0 EN (task enabled), bit1 HALT                              |
| 0x01      | CMD     | write: bit0 SAVE, bit1 RESTORE, bit2 SWAP (shadow only); ignored while busy |
| 0x02      | STATUS  | bit0 BUSY, bits 31:16 cycles the task was stopped by the last command (mem-mapped: since HALT was set) |
| 0x03      | OUT     | task output (the counter value)                                |
| 0x40+k    | CKPT[k] | checkpoint word k: the buffer (scan, shadow) or the state itself (mem-mapped) |

EN is how modules are "configured" here: every node carries all its hardware
modules and the operating system enables the ones that are currently bound to it,
which stands in for partial reconfiguration on FPGAs without it.

Network block (slot 3):

| word        | name     | meaning                                                        |
|-------------|----------|----------------------------------------------------------------|
| 0x00        | LINK_UP  | current `link_up` bits                                         |
| 0x01        | EVENT    | sticky link change events, write 1 to clear                    |
| 0x02        | MP_CTRL  | bit0 FREEZE of the message port                                |
| 0x03        | MP_SEQ   | [7:0] next identifier to deliver, [15:8] next identifier to send, [23:16] messages held; a write loads [7:0] and [15:8] |
| 0x04        | MP_WDATA | holding register for the data of a local-data-set write        |
| 0x20+2k     | LDS[k].TAG | bit31 valid, [7:0] identifier; a write stores entry k with MP_WDATA as data |
| 0x21+2k     | LDS[k].DATA | data of entry k (read only)                                  |

`link_irq` is high while any event bit is set. Events appear one cycle after the
`link_up` change.

A task migration between two slots, as the end-to-end testbench does it: SAVE on
the source, read CKPT words, clear EN on the source, set HALT on the target, write
the words, clear HALT.

## Link monitor

`link_monitor` sees a strobe per received symbol and an error flag. A single bad
symbol changes nothing. The link goes down after `TIMEOUT` cycles (default 64)
without a good symbol or after `ERR_LIMIT` (4) bad symbols in a row, and comes up
after `UP_COUNT` (8) good symbols in a row. It starts down after reset.
`went_up`/`went_down` pulse for one cycle. The thresholds are free choices; the
line code and the protocol of the point-to-point links are outside this RTL, so
whatever transceiver is used must supply the two strobes.

## Message port and consistent checkpoints

A checkpoint of one task is useless if the tasks it talks to roll back to a point
where a message has been sent but not yet received, or received twice. The
consistency rule used here is simple: every message a task sends carries the next
consecutive identifier, and the receiver processes messages strictly in identifier
order. `task_msg_port` does this for a hardware task:

* **tx side**: a message from the task (`task_tx_*`) leaves on `tx_*` with the
  next identifier attached.
* **rx side**: the port knows the identifier it must deliver next. A message that
  arrives early (rerouting can reorder them) is parked in the *local data set*, a
  table of `DEPTH` entries (default 8) indexed by the identifier's low bits, and
  goes to the task (`dlv_*`) when its turn comes. A message more than `DEPTH`
  ahead is held off with `rx_ready` low; one that is behind (a duplicate after a
  rollback) is accepted and dropped.
* **freeze**: when a checkpoint is requested, the port stops delivering to the
  task and stops accepting its output, but keeps parking arrivals. The task then
  sits still at a consistent point.

A checkpoint of the task is then the task's own state (through its slot) plus the
two identifier counters and the local data set, all readable over the bus; a
rollback writes them back while frozen. Delivery is at the earliest one cycle
after arrival, one message per cycle. Identifiers are 8 bits and wrap.

## The example task

Every slot wraps the same task, a modulo-N counter (`mod_counter_fsm`,
N = 4 by default, parameter `TASK_N` at the top). It is deliberately trivial: the
slots are written so that any task with a single state vector can replace it, and
the state width W follows from N (or can be set directly on the slots and
registers). Slot outputs are the counter value zero-extended to 32 bits, so most
bits of `task_out` are constant at the default size.

## What is not here

The CPU (a 32-bit softcore), its memory and peripherals, the link transceivers
and their protocol, the routing and task-resolution tables, the distributed
partitioning and load-balancing algorithms (software on the CPUs), the tool flow
that swaps flip-flops in a netlist, and the application tasks (a lane-departure
warning pipeline and a DES core used for overhead measurements) are not part of
this RTL. The bus and the transceiver strobes are top-level ports instead.

## Design choices beyond the published architecture

* Bus protocol, address map, command bits and reset values (all registers clear;
  the checkpoint FSM resets to (s0, s0)).
* Hardware sequencers for the scan and shadow slots, with a checkpoint buffer of
  up to 64 words per slot; the published measurements used CPU-driven transfers,
  so cycle counts here are not comparable to them.
* The HALT protocol for consistent memory-mapped reads.
* Chain order (bit 0 in, bit W-1 out) and LSB-first word packing.
* The link-down rule and its thresholds.
* The message port's identifier width, window size, duplicate rule and its
  checkpoint access over the bus; the freeze is a register bit set by software.
* Rows 5 and 6 of the checkpoint-FSM table are implemented literally.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/reconet_pkg.sv tb/tb_reconet_node_hw.sv --top-module tb_reconet_node_hw
./obj_dir/Vtb_reconet_node_hw
```

Replace the testbench name for any other: `tb_cfsm`, `tb_cfsm_mod4`,
`tb_scan_chain_reg`, `tb_shadow_chain_reg`, `tb_mm_state_reg`, `tb_scan_ckpt_slot`,
`tb_shadow_ckpt_slot`, `tb_mm_ckpt_slot`, `tb_link_monitor`, `tb_task_msg_port`,
`tb_ckpt_overhead_984`. The slot testbenches
use a 41-bit task state (two checkpoint words) to exercise multi-word transfers and
check the exact number of cycles each command takes. `tb_reconet_node_hw` runs the
top at its defaults end to end: enabling tasks, a scan checkpoint migrated into the
memory-mapped slot, a shadow save/rollback/swap, links going up and down by error
burst and by silence, an ignored bit flip, the checkpoint FSM's save, refused
save, restore and swap, and the message port reordering, freezing, and being
checkpointed and rolled back over the bus; it counts each of these and fails if one never happens.

## Files

`rtl/reconet_pkg.sv` bus types and register map; `rtl/cfsm.sv`,
`rtl/mod_counter_fsm.sv`, `rtl/cfsm_mod4.sv` checkpoint FSM; `rtl/scan_chain_reg.sv`,
`rtl/shadow_chain_reg.sv`, `rtl/mm_state_reg.sv` extended registers;
`rtl/scan_ckpt_slot.sv`, `rtl/shadow_ckpt_slot.sv`, `rtl/mm_ckpt_slot.sv` task slots;
`rtl/link_monitor.sv`; `rtl/task_msg_port.sv`; `rtl/reconet_node_hw.sv` top.
