# PSCoP: a planning-scheduler coprocessor for FTT-CAN

FTT-CAN (Flexible Time-Triggered communication on CAN) puts one master node in
charge of the time-triggered traffic on a CAN bus. Bus time is cut into
elementary cycles (ECs) of fixed length. At the start of each EC the master
broadcasts an *EC trigger message* whose data field is a bit map: bit *k* set
means "the producer of synchronous message *k* transmits in this EC". The
producers then send, and CAN's own bitwise arbitration sorts out the order.

The master decides those bit maps with a *planning scheduler*. Instead of
picking the next message at every EC, it periodically computes a whole *plan*
of W consecutive ECs in one go, while the previous plan is being dispatched.
Doing this in software on a small microcontroller limits how short a plan can
be, and therefore how quickly the message set can be changed on line.

This RTL moves the planning scheduler into hardware. The CPU writes, for each
variable (periodic message), its period, initial phase and transmission time,
plus the EC length, and sets a run bit. From then on the coprocessor produces
plans back to back into a two-bank plan memory. The CPU reads one EC word at a
time and copies it into the trigger message; while it dispatches one bank, the
other is being filled. At the default size (64 variables, 8-bit parameters,
20-EC plans) a plan with 22 transactions in every EC, the densest that a 1 ms
EC at 1 Mbit/s allows, is built in 2700 clocks: 225 µs at 12 MHz, about 1 % of
the 20 ms the plan lasts on the bus.

## Architecture

```
              +---------------------------------------------------+
              |  chain_head          daisy chain          chain_tail
              v                                                   |
  +-----+   +-------+   +-------+          +---------+            |
  | SPB |-->| VPT 0 |-->| VPT 1 |-- ... -->| VPT N-1 |------------+
  +-----+   +-------+   +-------+          +---------+
   ^  |  ^      |  ^        |  ^               |  ^
   |  |  |      |  | init, ec_next, ack (from the SPB, to every VPT)
   |  |  +------+--+--------+--+---------------+  |  slot-number bus (OR)
   |  |                                           |
   |  |    configuration bus (write, and read as OR of the owners)
   |  |  +---------+--------------------------------+
   |  v  |         |
  +-----+|      +-----+
  | SPM | ------| CCU |<---- CPU register port (cpu_we, cpu_addr, cpu_wdata, cpu_rdata)
  +-----+       +-----+
     |
     +----> plan port (plan_word, plan_valid, plan_last, plan_pop)
```

| Unit | Module | Holds / does |
|---|---|---|
| VPT, Variable's Production Timer | `pscop_vpt` | One per variable. Period P and phase Ph; an EC down-counter; the allocation request; one link of the daisy chain. |
| SPB, Schedule Plan Builder | `pscop_spb` | Table of transmission times C (one per slot) and the EC length. Serves requests, decides accept or reject, assembles the EC word, drives the VPTs' EC timing. |
| SPM, Schedule Plan Memory | `pscop_spm` | Two banks, each a FIFO of `PLAN_ECS` words of `N_VPT` bits. |
| CCU, Configuration Control Unit | `pscop_ccu` | The CPU register port: control/status register, routing of parameter reads and writes. |
| Top | `pscop` | Wires the above; the VPTs are a generate loop. |
| Package | `pscop_pkg` | Register map, status bit positions, SPB state encoding. |

The variable in slot 0 has the highest priority, slot `N_VPT-1` the lowest.
Priority is fixed by the slot the CPU puts a variable in: there is no priority
or deadline register. A variable's deadline is its period.

## How one EC is scheduled

**Release.** Each VPT counts ECs. The variable is released in ECs Ph, Ph+P,
Ph+2P, … counted from the start. In hardware, `init` loads the counter
from Ph, and each `ec_next` pulse counts it down. When it reaches zero the
VPT raises `req` and reloads P−1. A VPT with P = 0 is unused and never
requests.

**Arbitration.** The daisy chain runs from the SPB through VPT 0 to VPT N−1 and
back to the SPB: `chain_out = chain_in & ~req`. The one VPT that has a request
and still sees `chain_in` high is granted, and it puts its slot number on the
shared bus. All other VPTs drive zeros, so the bus is the OR of all VPT
outputs. A high `chain_tail` at the SPB means no request is left.

**Accept or reject.** The SPB keeps the EC time still free (`rem`), starting at
the EC length. In state `SEL` it looks up the granted slot's C and compares it
with `rem`:

* `C <= rem`: the transaction is accepted. `rem` drops by C, the slot's bit is
  set in the EC word, and the VPT is acknowledged and drops its request. The
  chain then moves on to the next requester.
* `C > rem`: the transaction is rejected and the EC is closed at once, even if
  a lower-priority variable with a smaller C would still fit. The rejected
  request stays pending and competes first in the next EC.
* No request left: the EC is closed.

Closing an EC writes the word into the SPM and pulses `ec_next`, so that all
VPTs advance to the next EC and release what is due there. After `PLAN_ECS`
ECs the plan is complete, and the SPB moves to the other bank.

**Deadline miss.** If a variable is released again while its previous request
is still pending, it has missed its deadline. The two releases merge into one
request, and the VPT sets a sticky `miss` flag, which status bit 5 reports as an
OR over all slots. The flag clears on the next start.

### Clock budget

| Step | Clocks | States |
|---|---|---|
| accepted transaction | 6 | `SEL` (decide, latch slot and C), `A1` (rem −= C), `A2` (set bit), `A3` (ack), `A4`, `A5` (request drops, chain ripples, next slot settles on the bus) |
| end of EC (no request left, or a rejection) | 3 | `SEL` (decide), `E1` (write SPM), `E2` (`ec_next`, reload rem) |

A plan of W ECs with A accepted transactions therefore takes exactly
**3·W + 6·A** clocks, rejections included. The 6 and 3 are the budget the
architecture was specified with. How the work is split across those clocks is
this implementation's: the whole decision is made in the first clock, and
`A4`/`A5` only let the combinational chain settle. A faster variant could drop
those two clocks.

Worst case at the default size: 64 variables with P = 1 and the shortest
CAN 2.0A frame (44 µs at 1 Mbit/s), and a 1 ms EC. In 4 µs units that is
C = 11 and EC = 250, so 22 transactions fit in every EC (242 ≤ 250 < 253):
3·20 + 6·440 = 2700 clocks. The end-to-end testbench runs this case and
checks the count.

### Timing of the EC and C values

C and the EC length share one unit, which the user chooses. With 8-bit
registers the unit must be at least EC/255. A 1 ms EC needs a unit of 4 µs or
more, and an 8.9 ms EC a unit of 35 µs or more. The EC register holds the time
*available to synchronous transactions* in an EC. If the trigger message and
an asynchronous window are to be kept free, program the EC register with what
is left.

## The plan memory and the CPU

The SPM has two banks of `PLAN_ECS` × `N_VPT` bits. The SPB writes the EC
words of a plan into the *write bank*. When the last word is in, the bank is
marked full and writing moves to the other bank. The CPU reads the *read
bank* through the plan port:

* `plan_valid` is high while the read bank holds a plan.
* `plan_word` is the head word, read asynchronously.
* `plan_last` marks the plan's last EC.
* `plan_pop` (one clock) takes the head word. Taking the last word frees the
  bank, and reading moves on to the other bank.

If both banks are full, the SPB finishes the plan it has built and waits in
`WAIT` until the CPU frees a bank. Its VPT timing waits with it: the plans
stay contiguous in EC time no matter how slowly they are read. The normal
rhythm is that the CPU pops one word per EC, while the SPB fills the other bank
in a small fraction of a plan.

Bit *s* of a plan word is slot *s*. In the trigger message, bit *k* stands for
message *k*. The CPU keeps the mapping from slots to message identifiers. It
can copy the word unchanged by placing message *k* in slot *k*, and then
slot 0 is the highest-priority message.

## CPU register map

Addresses are `{sel[1:0], slot[SLOT_W-1:0]}`, with `SLOT_W = clog2(N_VPT)`
(8-bit addresses at the default size). Data is `PARAM_W` bits wide. A write
happens at the clock edge where `cpu_we` is high. `cpu_rdata` follows
`cpu_addr` combinationally.

| sel | slot | Register | Owner |
|---|---|---|---|
| 0 | s | P of slot s (ECs; 0 = unused) | VPT s |
| 1 | s | Ph of slot s (ECs) | VPT s |
| 2 | s | C of slot s (time units) | SPB |
| 3 | 0 | EC length (time units) | SPB |
| 3 | 1 | write: control (bit 0 = run); read: status | CCU |

Status bits: 0 run, 1 building a plan, 2 bank 0 full, 3 bank 1 full, 4 bank
the CPU reads next, 5 some variable missed its deadline.

**Start and stop.** Setting run starts the plans at EC 0, with every VPT loading
its phase. Clearing run stops the SPB at once, and plans in the memory are
discarded. Setting run again restarts from EC 0.

**Changing parameters on line.** Writes are accepted while the coprocessor
runs, and act at once:

* C and the EC length apply to the next decision the SPB makes.
* A new P applies at the variable's next release.
* A new Ph only matters at the next start.

To make a change land exactly on a plan boundary, write while status bit 1
(building) is low, that is, while the SPB waits for a free bank. The
end-to-end testbench changes parameters in that window.

**C table.** The C table is a memory without reset. Write every slot's C
before the first start, including unused slots, or at least set P = 0 in every
slot you do not use. Also keep every used C at or below the EC length:
otherwise that variable's request can never be accepted. Once its phase comes
due, it closes every EC as soon as it wins the chain, which starves all
lower-priority slots.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N_VPT` | 64 | variables (VPTs), and bits per plan word |
| `PARAM_W` | 8 | width of P, Ph, C, EC length and CPU data |
| `PLAN_ECS` | 20 | ECs per plan, and words per SPM bank |

The defaults are those of the intended first prototype, an XC4010XL-class FPGA
clocked at 12 MHz. With N VPTs, the chain and the OR bus are combinational
through all N VPTs, so a large N lengthens the critical path rather than the
clock count.

## What is specified and what was chosen here

These parts follow the architecture as specified:

* the four units and their roles;
* P and Ph in the VPTs, with C and the EC length reached through the CCU;
* the daisy chain from the highest- to the lowest-priority VPT;
* the accept/reject rule that closes the EC at the first rejection;
* the 6- and 3-clock costs;
* two plan banks of 20 × 64 bits, used in turn;
* EC words coded like the trigger message;
* 64 variables with 8-bit parameters.

These are choices made for this implementation:

* C lives in the SPB, as a table indexed by the granted slot's number, not in
  the VPT;
* the release counter and P = 0 for an unused slot;
* rejected requests carry over to the next EC;
* the deadline-miss flag, and merging of the overdue release;
* the register map, status bits and the plan-port handshake;
* whole-plan bank hand-over;
* stop discarding the plan memory;
* the OR-bus in place of tri-state lines;
* the split of the 6 and 3 clocks into states;
* the event outputs `ev_alloc`, `ev_reject`, `ev_ec_done` and
  `ev_plan_done`, which are one-clock pulses for monitoring.

Not in this RTL:

* the master CPU and its dispatcher, which sends the trigger messages;
* the CAN controllers;
* the slave nodes' synchronous and asynchronous messaging. This includes
  placing the synchronous phase at the end of the EC and announcing the
  asynchronous window length in the trigger message, which are jobs for
  master and node software.

Priorities are static: the slot order. No RM/DM policy switching is built.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and stops; a watchdog ends a run that
hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/pscop_pkg.sv rtl/pscop_vpt.sv rtl/pscop_spb.sv rtl/pscop_spm.sv \
  rtl/pscop_ccu.sv rtl/pscop.sv tb/tb_pscop.sv --top-module tb_pscop
./obj_dir/Vtb_pscop
```

For a block, compile `rtl/pscop_pkg.sv`, the block's file and its testbench
(`tb/tb_pscop_vpt.sv`, `tb_pscop_spb.sv`, `tb_pscop_spm.sv` or
`tb_pscop_ccu.sv`).

| Testbench | What it establishes |
|---|---|
| `tb_pscop` | Runs the full default size. A reference model of the planning scheduler predicts every EC word. The test checks every word the CPU reads and the 3·W + 6·A clock count of every plan. It covers the 22-per-EC worst case (2700 clocks), an 8.9 ms EC with 125 kbit/s frames, three random variable sets (one sparse enough to leave ECs empty, one read slowly so that the builder waits, one with an on-line parameter change), stop and restart, read-back and status. It fails unless each of these mechanisms occurs at least once: allocation, rejection, empty EC, chain contention, bank swap, builder wait, deadline miss, on-line change, restart. |
| `tb_pscop_vpt` | Release pattern against Ph + kP, chain and bus behaviour under grant, ack only while granted, the miss flag, and P = 0 and P = 1. |
| `tb_pscop_spb` | Builder against a model of the requester chain: words, the 3 + 6·A clocks of every EC, a wait for a free bank, stop, and C/EC read-back. |
| `tb_pscop_spm` | Bank fill and hand-over, full-bank write refused, simultaneous read and write, flush. |
| `tb_pscop_ccu` | Routing of writes and reads, the run bit, and status bit positions. |

The block testbenches use smaller sizes (8 slots and 4-EC plans for the SPB,
16-bit words and 4-EC plans for the SPM). `tb_pscop` uses the defaults and
runs in well under a second.
