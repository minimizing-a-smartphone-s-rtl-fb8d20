# Split-trust hardware: delegable mailboxes, reset guard, domain-bound DMA

A smartphone normally runs security-critical code (banking, health, an
insulin-pump controller) on the same processor, memory and kernel as everything
else, so all of that hardware and software must be trusted. The split-trust
machine takes the other route. It splits the phone into physically isolated
**trust domains**, each with its own processor and memory:

- a resource manager;
- an untrusted domain running the commodity OS;
- TEE domains for security-critical programs;
- one domain per I/O device.

No bus, memory or processor is shared. The domains can meet in only four kinds of
small hardware blocks, and those blocks are the only hardware a security-critical
program has to trust besides its root of trust:

| Block | What it guarantees |
|---|---|
| **Verifiably delegable mailbox** | A domain can get *exclusive*, *time- and message-limited*, *irrevocable* use of a channel to another domain, and can *check* that it has it. |
| **Reset guard** | A domain cannot be reset while it takes part in such a session. |
| **DMA arbiter** | The fast DMA path of an I/O device is open only while the untrusted domain is the one using that device. |
| **Lockable ROM** | Holds each domain's bootloader and can be made read-only for good. |

This repository is synthesizable SystemVerilog for that trusted fabric. The
top-level module wires the parts together as in the reference prototype, which has
nine domains: resource manager, untrusted, TEE 1, TEE 2, serial input (keyboard),
serial output, storage, network, and a TPM mediator. The processors, memories,
I/O controllers, DMA engine and TPM are outside this RTL. Their connections are
the ports of `split_trust_hw`.

## The delegable mailbox

A mailbox is a message queue with two ends, and the two ends are not alike.

- The **fixed end** is hard-wired to one domain. An example is the serial-output
  domain, which reads everything sent to the terminal.
- The **delegable end** is wired to several domains. In this design those are the
  resource manager, the untrusted domain, TEE 1 and TEE 2, on ports 0 to 3 of
  every mailbox. A multiplexer lets exactly one of them, the *owner*, use this
  end.

`mailbox_fr` has a fixed reader and a delegable writer. `mailbox_fw` is the
mirror image: a fixed writer and a delegable reader. Both are built from the same
two parts:

- `mbox_ctrl`: ownership, quotas and the status register.
- `msg_queue`: a FIFO that can wipe itself.

### Ownership and sessions

After reset, the resource manager (port 0) owns the delegable end.

**Delegation.** The resource manager gives the end away with a one-cycle
`MBOX_DELEGATE` command. The command carries three things:

- the target domain;
- a message quota;
- a time limit in ticks.

A **session** is the time from that command until the session ends. While it
lasts:

- only the delegate can move data through the delegable end;
- no command from anyone changes the owner or the remaining quota. The resource
  manager cannot take the end back; it can only wait.

**Ending a session.** A session ends, and the end returns to the resource manager,
in exactly three ways:

- the delegate sends `MBOX_YIELD`;
- the message quota reaches zero;
- the time limit reaches zero.

**Commands that are refused** (ignored):

- a delegation while a session is running;
- a delegation from anyone but port 0;
- a delegation to port 0 itself;
- a delegation with a zero quota or a zero time limit.

**Quota rules.**

- A quota of `QUOTA_INFINITE` (all ones) removes the message limit.
- There is no unlimited time limit. Every session therefore ends, and a stuck or
  malicious delegate cannot keep a device forever.
- Quota and time are 16 bits. A tick is `TICK_CYCLES` clock cycles. The default of
  100,000 cycles is 1 ms at 100 MHz, so the longest session is about 65 s.

**When a message counts.** A message counts against the quota when the reader has
taken its *last word*. So the final message of a session is always delivered
before the session ends and the queue is wiped.

A delegate on the writer side is also stopped from *starting* more messages than
its quota. Without that rule, surplus messages would sit in the queue and then be
wiped.

**Expiry timing.** A session expires one clock after a counter reaches zero. With
time limit `T`, the owner is back to the resource manager `T*TICK_CYCLES + 1`
cycles after the delegation edge.

### Verifying a delegation: the status register

Every domain connected to a mailbox can read its status register
(`mbox_status_t`). It has four fields:

- `valid`;
- `owner`;
- remaining `quota`;
- remaining time `tleft`.

Only two readers get the real value:

- the current owner, on `status_o[p]`;
- the fixed end, on `fixed_status_o`.

Every other port reads `STATUS_DUMMY`: `valid` is 0, `owner` is `DOM_NONE`, and
the quota and time fields are zero. This includes the resource manager while it
has delegated the end away. So a TEE can check that it really holds the keyboard
mailbox for enough time, without trusting the resource manager that arranged it.
Other domains, meanwhile, cannot learn who is talking to whom.

The fixed end always reads the real value, so `fixed_status_o.valid` is constant 1.

### Wiping

Every change of owner wipes the queue so that no data crosses from one session to
the next. That means delegation, yield, expiry and reset.

- `mbox_ctrl` raises `wipe_o` in the cycle the owner changes.
- `msg_queue` then empties its pointers at once.
- It then zeroes one entry per cycle, so the wipe lasts `DEPTH` cycles.

While wiping, the queue is `busy`: both ready and valid are low. A domain that has
just been given a mailbox simply sees back-pressure for up to 64 cycles (control
plane) or 512 cycles (data plane).

### Control plane and data plane

All mailboxes behave the same. Only their sizes differ:

| Type | Message | Queue | `MSG_WORDS` | Queue depth (words) |
|---|---|---|---|---|
| control plane | 64 B | 4 messages | 16 | 64 |
| data plane | 512 B | 4 messages | 128 | 512 |

Words are 32 bits and move with valid/ready handshakes. Word counters on both
sides find message boundaries.

A word written in one cycle is readable in the next. A mailbox moves one word per
cycle, which is 400 MB/s at 100 MHz.

## The twelve mailboxes and eleven permanent queues

`octo_pkg` holds the wiring map.

| Index | Mailbox | Fixed end | Type |
|---|---|---|---|
| FR 0 | serial output | serial-out domain reads | control |
| FR 1 / FR 2 | storage command / data in | storage reads | control / data |
| FR 3 / FR 4 | network command / data in | network reads | control / data |
| FR 5 / FR 6 | IPC into TEE 1 / TEE 2 | TEE reads | control |
| FW 0 | keyboard | serial-in domain writes | control |
| FW 1 / FW 2 | storage response / data out | storage writes | control / data |
| FW 3 / FW 4 | network response / data out | network writes | control / data |

The **permanent queues** (`hw_queue`) are ordinary FIFOs of 64 words. They connect
fixed pairs of domains and are never delegated:

- queues 0 to 7: from each of the eight other domains to the TPM mediator;
- queues 8 to 10: from TEE 1, TEE 2 and the untrusted domain to the resource
  manager, for asking it for resources.

## Reset guard

The resource manager asks for domain resets (`rst_req_i`). `reset_guard` decides
which of them reach the domains (`dom_rst_o`). A request for domain *d* is blocked
while any mailbox is in session and either of these holds:

- *d* is on its fixed end, because someone else is using *d*'s mailbox;
- *d* is its delegate, because *d* is using another domain's mailbox.

A blocked request raises `rst_blocked_o[d]`. The output is registered: one cycle
from request to reset.

A forwarded reset also resets what belongs to the domain:

- the mailboxes the domain is the fixed end of;
- every permanent queue the domain is an end of;
- for the network domain, its arbiter and packet FIFOs.

The reset guard is what turns a mailbox session into *session availability*. While
a TEE holds the keyboard and display mailboxes, neither those I/O domains nor the
TEE itself can be restarted under it.

## Domain-bound DMA: the network arbiter

Copying every packet through a mailbox is acceptable for a TEE but too slow for the
commodity OS. `dma_arbiter` is a switch between three parties:

- the network controller's transmit and receive streams;
- the DMA engine, which can reach only the untrusted domain's memory;
- two FIFOs that only the network domain's processor can reach (512 words each,
  each word carrying a `last` flag).

The switch has two modes:

- **Trusted mode** (the default): the device talks to the FIFOs. `net_irq_o`
  interrupts the network processor while the receive FIFO holds data.
- **Untrusted mode**: the device streams straight to and from the DMA engine.

One bit of state chooses the mode. Only the control interface changes it:
`net_arb_wr_i` loads `net_arb_untrusted_i`. The network domain drives that
interface.

`net_dma_permit_o` guards the switch. It is true only while both network
control-plane mailboxes (command and response) are delegated to the untrusted
domain.

- A request for untrusted mode without the permit is refused.
- If the permit falls while in untrusted mode, both sides stall until the mode is
  switched back.

So the DMA path can never carry data while a TEE is the network domain's client.

## Bootloader ROMs

Each microcontroller domain has a `boot_rom` of 4096 words (16 KB).

- It can be written through a load port until `lock_i` is pulsed.
- After that, writes are ignored until power-on reset (`rst_n` of the top).
- Reads are registered: data appears one cycle after `rd_en_i`.

## Top level: `split_trust_hw`

The top level instantiates all of the blocks above:

- 7 `mailbox_fr`;
- 5 `mailbox_fw`;
- 11 `hw_queue`;
- `reset_guard`;
- `dma_arbiter` with two `hw_queue` packet FIFOs;
- 8 `boot_rom`.

Its ports are plain arrays indexed by mailbox, queue, domain or ROM number (see
`octo_pkg`). There is one clock and one active-low system reset.

Parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `TICK_CYCLES` | 100000 | clock cycles per time-limit tick |
| `HQ_DEPTH` | 64 | words per permanent queue |
| `NET_FIFO_DEPTH` | 512 | words per network packet FIFO |
| `ROM_DEPTH` | 4096 | words per bootloader ROM |

## What follows the original design and what is chosen here

**Taken from the original design:**

- the four kinds of trusted block and what each guarantees;
- the delegation model: RM default owner, message and time quota, unlimited
  messages but never unlimited time, yield, expiry back to the RM, irrevocability;
- the status register with a dummy value for other domains;
- wiping on delegation, yield and expiry;
- the two reset-guard rules;
- the arbiter's two modes and its single control interface;
- the irreversible ROM lock;
- 12 mailboxes and 11 permanent queues;
- the 64 B and 512 B message sizes and the 4-message queues.

**Chosen here:**

- All encodings and widths: 32-bit words, 16-bit quota and time, 4-bit domain
  numbers.
- The 1 ms tick.
- That a message counts when delivered, and the writer-side budget.
- That zero limits are refused.
- Which four domains reach the delegable ends.
- Which domains each mailbox and queue connect. The split between storage,
  network, serial and TEE IPC mailboxes, and the queue list, fill in a map the
  original gives only in outline.
- The DMA permit condition. The original says only "while the I/O domain is used
  by the untrusted domain".
- The stall on loss of permit, and the interrupt condition.
- That a reset also resets the domain's mailboxes, queues and FIFOs.
- All depths of queues, FIFOs and ROMs.
- The registered reset-guard output.
- That the ROM lock is cleared only by power-on reset.

**Not built**, because it is outside the trusted fabric or not specified:

- the processors and their memories;
- the TPM;
- the power-management unit, including voltage and frequency scaling;
- the DMA engine;
- the I/O controllers;
- DMA for the storage domain. The original mentions it only as a possible
  improvement.

## Testbenches and simulation

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it exercises |
|---|---|
| `tb_msg_queue` | FIFO order, back-pressure, wipe duration and that wiped entries read zero |
| `tb_hw_queue` | random traffic against a reference model, full/empty, reset |
| `tb_mbox_ctrl` | delegation rules, refused commands, quota and time expiry at the exact cycle, yield, irrevocability, dummy status |
| `tb_mailbox_fr`, `tb_mailbox_fw` | the multiplexer, the write budget, delivery of the last message, wipes on every owner change, time-limited sessions |
| `tb_reset_guard` | every request against random session/owner states, compared with the two rules |
| `tb_dma_arbiter` | both modes, refused and revoked permit, stream routing, the interrupt |
| `tb_boot_rom` | load, lock, ignored writes after lock, lock kept after `lock_i` falls and cleared only by power-on reset |
| `tb_split_trust_hw` | the full fabric at default parameters, end to end |
| `tb_workload_mailbox` | 10,000 messages of 512 B through a data-plane mailbox; round trip of a 64 B message and answer through a control-plane pair; a 1 MB file (2048 messages) from storage to a TEE whose quota ends exactly with the file |

`tb_split_trust_hw` takes the fabric through one complete use, with every
parameter at its default:

- the ROMs are loaded and locked;
- a TEE obtains keyboard and serial-output sessions, verifies them, and exchanges
  data;
- resets are tried during and after sessions;
- sessions end by yield, by time and by quota;
- the network switches between FIFO and DMA mode.
- each of the twelve mailboxes, at its real message size, carries one message
  between its fixed end and a delegate holding a quota of one, and then returns
  to the resource manager.

It counts how often each of these happened and fails if one never did: ROM lock,
permanent-queue traffic, forwarded and blocked resets, delegation, refused
commands, status reads, dummy reads, yield, wipe, time expiry, quota expiry, DMA
traffic, DMA stall, FIFO traffic, interrupt and back-pressure.

The workload testbench measures:

- 1,280,001 cycles for 10,000 × 512 B, one word per cycle, 400 MB/s at 100 MHz;
- 34 cycles (340 ns) for a 64 B round trip;
- 262,145 cycles for the 1 MB file, after which the session ends by quota one
  cycle later.

The RTL also carries concurrent assertions of its safety rules. They are active
in every simulation built with `--assert`:

| Module | Assertion | Rule |
|---|---|---|
| `mbox_ctrl` | `a_irrevocable` | during a session only yield or expiry changes the owner |
| `mbox_ctrl` | `a_expiry_returns` | expiry always hands the end back to the resource manager |
| `mbox_ctrl` | `a_change_wipes` | the owner never changes without a wipe |
| `mbox_ctrl` | `a_quota_falls` | remaining quota and time never grow during a session |
| `mbox_ctrl` | `a_dummy` | every port but the owner reads the dummy status |
| `mailbox_fr`, `mailbox_fw` | `a_mux_exclusive` | only the owner's port is offered the queue |
| `reset_guard` | `a_no_reset_in_session` | no domain reset while the domain is in a session |
| `dma_arbiter` | `a_ctrl_only` | the mode changes only through the control interface |
| `dma_arbiter` | `a_dma_bound` | no data reaches or leaves the DMA side without the permit |
| `boot_rom` | `a_lock_sticky` | once locked, locked until power-on reset |
| `msg_queue`, `hw_queue` | `a_no_overflow` | the count never exceeds the depth |

Running a testbench with Verilator (package first):

```sh
verilator --binary --timing --assert -Wno-fatal -j 0 --top-module tb_split_trust_hw \
    rtl/octo_pkg.sv rtl/msg_queue.sv rtl/hw_queue.sv rtl/mbox_ctrl.sv \
    rtl/mailbox_fr.sv rtl/mailbox_fw.sv rtl/reset_guard.sv rtl/dma_arbiter.sv \
    rtl/boot_rom.sv rtl/split_trust_hw.sv tb/tb_split_trust_hw.sv
./obj_dir/Vtb_split_trust_hw
```

For a single block, list only `octo_pkg.sv`, the block and the blocks it
instantiates. The block testbenches shrink message sizes and ticks through
parameters to stay short. The top-level and workload testbenches use the real
sizes and finish in a few seconds.

Lint gives only warnings:

- unused package constants;
- unconnected debug outputs;
- a note that the reset is also read synchronously. The wipe and the guarded
  domain resets use the reset as data as well as asynchronously, and this is
  intended.
