# AuRORA hardware layer: virtual accelerators for multi-tenant SoCs

A SoC with many accelerator tiles and several CPUs has a sharing problem.
When an accelerator is tied to one core, or is reached through memory-mapped
registers and an IOMMU that software must set up, moving it from one tenant
to another is slow. So accelerators tend to be partitioned coarsely and sit
idle. AuRORA fixes this with two small hardware agents and a message protocol
between them:

* an **AuRORA client** on every CPU's RoCC port (RoCC is the Rocket core's
  custom-instruction accelerator interface);
* an **AuRORA manager** in front of every accelerator.

A thread *acquires* any free accelerator in the SoC with one instruction. It
then drives the accelerator with ordinary custom instructions, as if the
accelerator were attached to its own core, and *releases* it when it is done.
The accelerator runs in the thread's address space because the manager keeps
a shadow copy of the thread's architectural state, namely its page-table root
`satp` and status word. That removes the need for software to program an
IOMMU. A software runtime (not part of this RTL) decides which accelerator each
tenant acquires and when. It does this between DNN layers, so running work is
never preempted.

This repository holds synthesizable SystemVerilog for the client, the manager,
the crossbar that carries their messages, and a top level that joins 4 clients
and 10 managers. The CPUs and accelerators are outside the top level: their
RoCC ports are brought out as arrays.

## Block overview

```
 CPU0..3 RoCC ─► aurora_client ──► aurora_xbar (requests, 4→10) ──► aurora_manager ─► accelerator RoCC
                        ▲                                                 │             (x10)
                        └──────── aurora_xbar (responses, 10→4) ◄─────────┘
```

| file | what it is |
|---|---|
| `rtl/aurora_pkg.sv` | shared types: RoCC command/response, thread state, message flit, opcodes |
| `rtl/aurora_client.sv` | CPU-side agent: ISA decode, virtual-slot table, state synchronisation |
| `rtl/aurora_manager.sv` | accelerator-side agent: ownership FSM, shadow state, forwarding |
| `rtl/aurora_xbar.sv` | message crossbar, one register stage, round-robin per output |
| `rtl/rr_arbiter.sv` | round-robin arbiter used by the crossbar |
| `rtl/aurora_soc.sv` | top: 4 clients, 10 managers, two crossbars |
| `tb/accel_model.sv` | behavioural RoCC accelerator used by the testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per block |

## The message protocol

Clients and managers only talk through messages. Each message is a single
flit of type `msg_t`: a kind, a source id, a destination id and one RoCC
command (instruction word and two 64-bit operands). Clients and managers have
separate id spaces, and each flit travels on one of two crossbars, so `dst`
needs no other qualifier.

| kind | direction | payload | meaning |
|---|---|---|---|
| `MSG_ACQ_REQ` | client → manager | `cmd.rs1` = satp, `cmd.rs2` = status | ask for the accelerator; carries the thread state |
| `MSG_ACQ_RESP` | manager → client | `cmd.rs1[0]` = granted | answer to an acquire |
| `MSG_REL_REQ` | client → manager | – | give the accelerator back |
| `MSG_REL_ACK` | manager → client | `cmd.rs1[0]` = released | sent once the accelerator has drained |
| `MSG_STATE` | client → manager | `cmd.rs1` = satp, `cmd.rs2` = status | the thread state changed |
| `MSG_CMD` | client → manager | the RoCC command | a forwarded accelerator instruction |
| `MSG_ACC_RESP` | manager → client | `cmd.inst.rd`, `cmd.rs1` = data | the accelerator's result |

Correctness depends on one ordering rule: **flits from one source to one
destination arrive in order.** The crossbar guarantees it because each source
has a single output register and each output serves one flit at a time. The
rule is what makes these sequences safe:

* **Forward, then release.** The last instructions reach the manager before
  the release does. The manager then waits for the accelerator to finish
  before it acknowledges.
* **State update, then instruction.** After `satp` or `status` changes, the
  client sends `MSG_STATE` to every manager it holds, and only then accepts
  the next instruction. So no instruction can run with a stale address space.

The case that takes the most care is a state change while an acquire is in
flight. The acquire carried the old state, and the slot was not bound yet when
the change was seen. The client keeps the state it sent with the acquire. If
that state differs from the CPU's state when the grant arrives, the client
marks the new slot as needing an update, and the update follows at once.

## The client (`aurora_client`)

**Instruction set.** All encodings here are this implementation's choice.

| opcode | funct7 | operands | effect | rd |
|---|---|---|---|---|
| custom0 | 0 `ACQUIRE` | rs1 = slot, rs2 = physical manager id | bind slot to that accelerator | 1 granted / 0 denied |
| custom0 | 1 `RELEASE` | rs1 = slot | unbind, free the accelerator after it drains | 1 |
| custom1 / custom2 / custom3 | any | any | accelerator instruction for virtual slot 0 / 1 / 2 | the accelerator's result |

Software therefore sees three virtual accelerators per thread. The client's
table maps each bound slot to a physical manager id. Forwarded instructions
keep all their fields; the manager rewrites only the opcode (see below), so
the accelerator's own `funct7` command set passes through unchanged.

**Blocking.** `ACQUIRE` and `RELEASE` hold the client (`cmd_ready` low, `busy`
high) until the manager answers. Forwarded instructions are pipelined: the
client accepts one per cycle as long as its output register drains.

**Local refusals.** Some instructions never leave the client:

* an instruction for an unbound slot;
* an `ACQUIRE` of a slot that is already bound;
* an `ACQUIRE` with an id not below `N_MANAGERS`;
* an `ACQUIRE` of an accelerator that the client already holds in another
  slot;
* a `RELEASE` of an unbound slot;
* an unknown `funct7` on custom0.

For these, `bad_cmd` pulses and, if the instruction writes rd, the value 0 is
returned.

**State synchronisation.** The client keeps the last `cpu_state` it saw. When
the input changes, every bound slot is marked dirty. Dirty slots are sent
`MSG_STATE` one per cycle, lowest slot first, and new instructions wait until
all are clean.

**Response path.** A manager's answer or accelerator response goes straight
through, combinationally, to the CPU's response port. A local refusal comes
from a one-entry register and takes priority.

## The manager (`aurora_manager`)

```
          ACQ_REQ (grant)                REL_REQ from owner
  IDLE ───────────────────► ACQUIRED ─────────────────────► DRAINING
   ▲                                                           │
   └─────────── accelerator not busy, no response left: REL_ACK┘
```

* `IDLE`: an acquire from any client is granted. The sender becomes the
  owner, and the carried state goes into the shadow registers (`acc_state`).
* `ACQUIRED`:
  * The owner's `MSG_CMD` flits go to the accelerator's RoCC command port,
    with the opcode rewritten to `ACCEL_OPCODE` (custom3 by default).
  * The owner's `MSG_STATE` flits update the shadow registers.
  * The accelerator's responses go back to the owner.
  * Another client's acquire is denied. An acquire from the owner itself is
    granted again and refreshes the shadow state.
* `DRAINING`: entered on the owner's release. Nothing new is accepted for the
  accelerator. The acknowledgement is sent once `acc_busy` is low and no
  response is waiting. The manager then returns to `IDLE`.

Commands and state updates from a client that is not the owner never reach
the accelerator. They are dropped, and `prot_err` pulses. A release from a
non-owner is answered with `rs1[0] = 0`.

Replies leave through a one-flit output register, with this priority:
release acknowledgement, then accelerator response, then acquire and release
answers. An incoming flit that needs a reply waits while the register is
taken.

## Transport (`aurora_xbar`)

The crossbar has `N_IN` inputs and `N_OUT` outputs, and `dst` selects the
output. Each output has:

* a round-robin arbiter (`rr_arbiter`), so a requester that keeps asking is
  served within `N_IN` grants;
* a one-flit register, which gives one cycle per crossing and full throughput
  per output.

An assertion flags a flit whose `dst` does not exist. The published design was
also evaluated over a generated network-on-chip. That network is not part of
this RTL. A NoC could replace the two crossbars, provided it keeps per-pair
ordering.

## Timing at the top level

The cycle counts below are for an idle system and are checked by
`tb_aurora_soc`:

* **Acquire or release round trip.** The CPU's response becomes valid 3
  cycles after the clock edge that accepted the instruction. Along the way
  there are four registers: client output, request crossbar, manager output
  and response crossbar.
* **Forwarded instruction.** It is offered to the accelerator one edge after
  the CPU handshake, and is taken at the next edge (2 register stages).
* **Accelerator response.** It reaches the CPU's response port 2 cycles after
  the accelerator hands it over.

Contention adds one cycle per flit that wins arbitration first.

## Parameters

| parameter | default | source |
|---|---|---|
| `aurora_soc.N_MANAGERS` | 10 | the evaluated SoC has 10 accelerator tiles |
| `aurora_soc.N_CLIENTS` | 4 | own choice; the CPU count is not given |
| `aurora_pkg::N_VSLOTS` | 3 | own choice, tied to the custom1..3 encoding |
| `aurora_pkg::XLEN` | 64 | RV64 Rocket cores |
| `aurora_pkg::ID_W` | 4 | own choice; at most 16 clients and 16 managers |
| `aurora_manager.ACCEL_OPCODE` | custom3 | own choice; the opcode a Gemmini accelerator decodes |

In the evaluated SoC each accelerator is a Gemmini tile:

* a 16×16 systolic array;
* a 128 KiB scratchpad and a 128 KiB accumulator;
* a 2 MB shared L2 in 8 banks;
* 32 GB/s of DRAM bandwidth;
* a 1 GHz clock.

None of those parts is in this RTL. They matter only in that the manager's
RoCC port must match the accelerator's.

## What follows the published design and what is this implementation's own

**From the published design:**

* a client per CPU on RoCC and a manager per accelerator;
* acquire and release;
* the manager's idle and acquired states;
* shadowed thread state in place of an IOMMU;
* instruction forwarding from client to manager;
* client–manager synchronisation;
* a crossbar as one of the transports;
* 10 accelerator tiles.

**This implementation's own choices:**

* the message format and encodings;
* the instruction encoding and the three virtual slots;
* the `DRAINING` state and the acknowledged release;
* the policy of sending updates when the state changes;
* the treatment of non-owners and refused instructions;
* the opcode rewrite;
* the crossbar's arbitration and register stage;
* four CPUs.

The published area figures (client about 2K µm², manager about 22K µm² in a
16 nm process) suggest a manager with more storage than this one. For example,
it may queue forwarded instructions or hold more architectural state. Those
insides are not known, so the manager here holds only what the protocol above
needs.

Not built:

* the CPU and the accelerators, which are existing designs;
* the generated NoC transport;
* the L2 and DRAM;
* the software runtime that chooses accelerators against latency targets.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/aurora_pkg.sv tb/tb_aurora_soc.sv --top-module tb_aurora_soc
./obj_dir/Vtb_aurora_soc
```

Replace `tb_aurora_soc` with `tb_aurora_client`, `tb_aurora_manager` or
`tb_aurora_xbar` to test one block. For lint, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/aurora_pkg.sv rtl/aurora_soc.sv`.

The testbenches:

* **`tb_aurora_xbar`**
  * a one-cycle crossing;
  * 1200 random flits under back-pressure, each checked for delivery, order,
    loss and duplication;
  * output contention.
* **`tb_aurora_manager`**
  * grant and denial;
  * the shadow state, and results computed with it;
  * opcode rewrite;
  * non-owner messages dropped;
  * release held back until the accelerator drains;
  * hand-over to another client.
* **`tb_aurora_client`**
  * message content and one-cycle latency;
  * grant and denial;
  * local refusals;
  * state updates, including a change that races an acquire;
  * response pass-through under back-pressure;
  * release.
* **`tb_aurora_soc`** runs the full-size top with default parameters:
  * the latencies above;
  * four CPUs racing for one accelerator (exactly one must win);
  * ten rounds per CPU of acquire, compute, state change, refusal and release,
    run concurrently.

  Every result is checked against `rs1 + rs2 + satp`, which the behavioural
  accelerator computes from its shadowed `satp`. A monitor checks that an
  accelerator only runs instructions of its current owner. The testbench
  counts grants, denials, forwards, responses, state updates, drain waits,
  crossbar contention and refusals, and fails if any of them never happened.

* **`tb_aurora_multitenant`** runs a multi-tenant scenario on the full-size
  top: 200 inference tasks over four CPUs.
  * Each task runs two to five layers.
  * Before each layer, the CPU acquires one to three accelerators, taking
    whatever is free.
  * It then issues several instructions to every slot back to back.
  * It collects the results, which return out of order across accelerators,
    and matches them by rd.
  * It releases everything at the end of the layer, and uses a new `satp`
    for every task.

  The testbench reports the total cycles, acquire attempts and denials.

## Limits

* Only the number of accelerator tiles comes from the published design. The
  message format, the instruction encoding and every widths is this
  implementation's own. The published design did not give them, so software
  written for the published AuRORA will not run unchanged.
* The client's `busy` covers only its own outstanding messages, not work still
  running on acquired accelerators. A fence that must wait for accelerators
  has to use the accelerator's own completion mechanism, or release it.
* Releasing a slot while the CPU still expects responses from it is allowed.
  Those responses still reach the CPU before the release acknowledgement.
* The number of clients and managers is limited by `ID_W` (4 bits, so 16
  each). Widen `ID_W` in `aurora_pkg` for larger systems.
