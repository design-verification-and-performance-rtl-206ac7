# Thin-AXI: a narrow serial link that carries a full AXI4 port

A large SoC has many subsystems, and each one needs a path to the memory
controllers. If each of those paths is a full AXI4 bus of 200 to 300 wires in each
direction, the top level cannot be routed. Thin-AXI (T-AXI) keeps AXI at both ends of
each path but replaces the wires in between with a word bus in each direction,
16 bits wide here. That bus runs on its own fast, synchronous link clock. All five AXI
channels (AR, AW, W, R, B) are cut into packets and time-multiplexed onto the narrow
bus. Three mechanisms carry the protocol:

- a one-bit **stall** keeps the shared receive FIFO from overflowing;
- per-channel **credit** keeps a blocked AXI channel from blocking the others;
- **link commands** sent between the packets carry credit, QoS and link state.

This repository holds SystemVerilog RTL for one complete link, made of:

- two link ends;
- repeater stages in both directions;
- the central clock and reset controller;
- a self-checking testbench for every block and one for the whole link.

```
              subsystem side                                        fabric side
 AXI master ─► s_* ┌────────────┐ upstream words  ┌─────┐   ┌─────┐  ┌────────────┐ m_* ─► AXI slave
 AXI slave  ◄─ m_* │  taxi_end  │ ──────────────► │ rep │ ► │ rep │► │  taxi_end  │ s_* ◄─ AXI master
 APB        ──────►│   (u_up)   │ ◄────────────── │ rep │ ◄ │ rep │◄ │   (u_dn)   │◄────── APB
                   └─────┬──────┘ downstream words└─────┘   └─────┘  └─────┬──────┘
                         │ clkreq_u        ┌──────────┐        clkreq_d    │
                         └────────────────►│ taxi_cpr │◄───────────────────┘
                                           └──────────┘ clk_taxi, rst_taxi_n to everything on the link
```

Each end has an AXI **slave** port (`s_*`) for a master on its own side. It also has
an AXI **master** port (`m_*`) that replays the commands arriving from the far end.
Masters and slaves can therefore sit on either side. In the usual set-up the
subsystem's DMA or CPU uses `u_s_*` and the memory sits on `d_m_*`.

## Carried AXI subset

| Field | Carried | Note |
|---|---|---|
| A*ID | 10 bits | also RID, BID |
| A*ADDR | 36 bits | 64 GB |
| A*LEN | 4 bits | bursts of at most 16 beats |
| A*SIZE, A*BURST | full | |
| A*PROT | bit 1 only | two security levels |
| A*LOCK, A*CACHE | no | |
| A*QOS | not per command | forwarded as a link command, see below |
| WDATA, WSTRB | 32 + 4 bits | AXI data width 32 (`taxi_pkg::AXI_DW`) |
| WLAST | no | rebuilt at the receiver from AWLEN |
| RDATA, RRESP, RLAST | yes | |
| BRESP | yes | |

All shared types and constants are in `rtl/taxi_pkg.sv`:

- the structs `axi_a_t`, `axi_w_t`, `axi_r_t` and `axi_b_t`;
- the channel and link-command enums and the link-state enum;
- the pack/unpack functions.

## Words on the wire

Each direction has three signals, all on `clk_taxi`:

- `valid`, driven by the sender;
- `data[TAXI_DW-1:0]`, driven by the sender;
- `stall`, driven back from the receiver.

Each clock carries one of three things:

| Cycle | valid | data |
|---|---|---|
| AXI word | 1 | part of a packet |
| link command | 0 | `{cmd[2:0], arg[12:0]}`, never zero |
| idle | 0 | all zero |

An AXI packet is `{channel[2:0], payload}`. It is sent most significant word first.
The first word therefore names the channel, and the receiver knows from the channel
how many words follow. At 16 bits:

| Channel | Code | Payload | Words |
|---|---|---|---|
| AR | 0 | id, addr, len, size, burst, prot (56 bits) | 4 |
| AW | 1 | same as AR | 4 |
| WD (write data beat) | 2 | data, strb (36 bits) | 3 |
| RR (read data beat) | 3 | id, data, resp, last (45 bits) | 3 |
| BR (write response) | 4 | id, resp (12 bits) | 1 |

A 16-beat write therefore takes 4 + 16×3 = 52 link words, and a 16-beat read returns
48. The packet vector is 96 bits, so every packet is a whole number of words when
`TAXI_DW` is 16, 32 or 48. Only 16 has been simulated.

## Stall: the receive FIFO must never overflow

Every end writes all arriving words into one **receive FIFO** of 32 words
(`RXFIFO_AWIDTH = 5`). The FIFO is written on the link clock and read on the AXI clock.
If the AXI clock is slow, the FIFO fills faster than it drains. The receiver then
raises `stall`, and the words already in flight must still find room. The stall
rules used throughout are:

- A stage may put a word on the wires in cycle *t+1* only if the stall it sees was
  low in cycle *t*. `taxi_out_stage` follows this rule.
- `taxi_in_stage` registers the incoming word and the stall. It raises stall while
  fewer than `STALL_MARGIN` (4) FIFO entries are free. That covers the word in its
  input register, the word on the wires and the stall's own register delay. An
  assertion checks that the FIFO is never written when full.
- `taxi_repeater` is a pipeline register with a two-word holding buffer:
  - With no stall and nothing held, a word passes in one cycle.
  - While the next stage stalls, arriving words go into the buffer.
  - While anything is held, the repeater stalls its own source.
  - When the stall drops, the oldest held word leaves first.
  - Two words are enough for a one-cycle stall delay in each stage, however many
    repeaters are chained. An assertion checks this.

Idle cycles are never stored.

## Credit: a blocked channel must not block the link

The stall alone cannot prevent head-of-line blocking. If the slave behind the
receiver stops accepting writes, write data would fill the shared FIFO, and read
data could no longer get through. Each end therefore keeps five transmit credit
counters, one each for AR, AW, WD, RR and BR, in `taxi_tx`:

- **Load.** A counter is loaded with its starting credit from the credit registers
  while the link is DISABLED, and again on every link reset.
- **Spend.** One credit is spent for each AR command, AW command, write-data beat,
  read-data beat and write response. A channel with no credit left drops its AXI
  `ready`.
- **Store.** The far end (`taxi_rx`) stores each arriving packet in a per-channel
  storage FIFO. The default depths are 8 for AR, AW and BR, and 32 for WD and RR.
  The credit for a channel should equal the far end's depth for that channel. A
  sender can then never send more of one channel than the far end can hold, and a
  stalled AXI channel is caught in its own storage, not in the shared FIFO.
- **Return.** When a stored transfer is issued on the far end's AXI port, its entry
  is counted in `cred_acc`. `taxi_link_cmd` sends the count back in an `LC_CREDIT`
  link command, and the sender adds it to its counter.
  - Exception: AW credit comes back when the **last write-data beat** of the burst
    has been issued, not when the AW itself is issued. The receiver keeps each AW's
    burst length in a queue to rebuild WLAST, and that queue is only as deep as the
    AW storage. Returning AW credit earlier would let a master that sends many AW
    commands ahead of their data overflow the queue.
- **Status.** `all_back` is high when every counter is back at its loaded value.
  Idle and the clock request use it.

The reset values of the credit registers give half of each maximum credit: 4, 4, 16,
16 and 4. To raise them, program the registers at both ends, then reset the link
(CTRL.Reset) to load the new values.

## Link commands

`taxi_link_cmd` sends one command at a time. `taxi_tx` gives a pending command
priority over AXI packets into the transmit FIFO. Commands, in priority order:

| Command | Code | Argument | Sent when |
|---|---|---|---|
| `LC_STATE` | 3 | own link state | the state changed |
| `LC_CTRL` | 4 | `{reset, enable}` | the link master's CTRL.Enable or CTRL.Reset changed |
| `LC_QOS` | 2 | highest QoS in the link | it changed |
| `LC_CREDIT` | 1 | `{channel[2:0], count[9:0]}` | credit is waiting; lowest channel first |

Link commands flow in every state, including DISABLED, so the two ends can agree to
enable.

## QoS forwarding

AXI puts a QoS value on each command. A command waiting behind a less urgent one
cannot use that value to get ahead. The link therefore does not send QoS with the
commands. `taxi_tx_qos` keeps the QoS of every AR and AW command still in the link,
meaning accepted and with its credit not yet back. It keeps one small circular queue
per channel, and credit comes back in order, so the oldest values drop out. Whenever
the maximum changes, `LC_QOS` sends it. With CTRL.QosForwardEnable set, the far end
drives that value on ARQOS and AWQOS of every command it issues. Otherwise it drives
0.

## Link state machine: enable, disable, reset

Each end runs `taxi_link_ctrl`. Its states are the eight of the LinkState status
field:

| State | Code | Meaning and exit |
|---|---|---|
| DISABLED | 0 | Dummy slave connected. Exits on an enable request. |
| WAIT_DS_IDLE | 1 | The dummy slave takes no new commands. Goes to READY when the dummy slave is idle. |
| READY | 2 | Goes to ACTIVE when the far end is READY or ACTIVE. Goes back to DISABLED if enable drops. |
| ACTIVE | 3 | Traffic flows. Goes to WAIT_IDLE on a reset request or when enable drops. |
| WAIT_IDLE | 4 | No new AR/AW accepted. Goes to IDLE once nothing is outstanding and all credit is back. |
| IDLE | 5 | Waits until the far end is neither ACTIVE nor WAIT_IDLE. Then goes to RESET if a reset was requested, else to DISABLED. |
| RESET | 6 | One-cycle synchronous reset of the control logic: credit reloads and queues empty. Then RESET_CLEAR. |
| RESET_CLEAR | 7 | Goes to READY if still enabled, else to DISABLED. |

Master and follower:

- The **link master** uses its own CTRL.Enable and CTRL.Reset. The master is the end
  with CTRL.LinkCtrlMaster set; at reset that is the fabric end (`MASTER_RST`).
- The **follower** uses the enable and reset requests that arrive in `LC_CTRL`.
- Software must set LinkCtrlMaster at one end only. To move the master role:
  1. disable the link from the current master;
  2. clear the bit at that end and set it at the other;
  3. enable the link from the new master.

  The link testbench does exactly this.
- ForceLinkCtrl with ForceLinkCtrlState puts an end's state machine straight into
  a chosen state, as a way out of a lock-up.

**Dummy slave.** While DISABLED, the AXI slave port is not connected to the link.
It goes to `taxi_dummy_slave`:

- Writes get an OKAY response and are dropped.
- Reads get OKAY with pseudo-random data from a 32-bit LFSR (x³²+x²²+x²+x+1 in
  Galois form, constant 0x80200003).
- Any access sets STATUS.DummyAccessed.

This keeps a master from hanging on a link that is off. `taxi_axi_iso` does the
switching and counts outstanding reads and writes for STATUS.

**Typical bring-up:**

1. Program the credit registers.
2. Set CTRL.Enable at the master end.
3. Wait for STATUS.RemoteStatusActive.

CTRL.Reset drains the link, resets both ends, reloads credit and returns to ACTIVE.
Software does not have to clear the bit.

## Link clock and resets

`taxi_cpr` sits in the middle of the link. It runs the link clock while either
end's `clkreq` is high:

- The requests are asynchronous. They pass a two-flop synchroniser.
- After the last request drops, the clock runs for another 8 cycles (`CLK_HOLD`).
- The gate enable is retimed on the falling edge, so the gated clock has no short
  pulses.
- `rst_taxi_n` is released two source-clock edges after `por_n`.

An end raises `clkreq` in two cases:

- it is not quiet: a read or write started here is outstanding, credit is not all
  back, a link command is waiting, or a word is waiting in its transmit FIFO,
  receive FIFO or channel storage;
- it is in any state other than DISABLED and ACTIVE.

CTRL.DisableTaxiClkGate keeps the request high permanently.

Each end also has its own AXI clock and reset. Only three parts run on the link
clock: the output stage, the input stage and one side of each dual-clock FIFO. These
FIFOs (`taxi_async_fifo`) use Gray-coded pointers.

## Registers (APB, per end)

| Offset | Name | Fields |
|---|---|---|
| 0x00 | CTRL | [8] DisableTaxiClkGate, [7:5] ForceLinkCtrlState, [4] ForceLinkCtrl, [3] QosForwardEnable, [2] LinkCtrlMaster, [1] Reset (clears itself), [0] Enable. Reset value 0x08, or 0x0C at the link master. |
| 0x04 | STATUS | [31] RemoteStatusActive, [30] RemoteStatusShutdown, [28:21] outstanding writes, [20:13] outstanding reads, [8] DummyAccessed (any write clears it), [3:1] LinkState, [0] Idle. Reads 0x80000006 on an active link. |
| 0x0C | AR credit | [15:8] credit. Reset value 0x00000401. |
| 0x10 | AW credit | [15:8] AW credit, [23:16] write-data credit. Reset value 0x00100401. |
| 0x14 | RR credit | [15:8] credit. Reset value 0x00001001. |
| 0x18 | BR credit | [15:8] credit. Reset value 0x00000401. |
| 0x20 | PARAM0 | {TAXI_DW, TX_AWIDTH, RXFIFO_AWIDTH, CREDW}, one byte each |
| 0x24 | PARAM1 | {RX_RR_AWIDTH, RX_WD_AWIDTH, RX_AW_AWIDTH, RX_AR_AWIDTH} |
| 0x28 | PARAM2 | RX_BR_AWIDTH |
| 0x2C | PARAM3 | {AXI_DW, AXI_IDW} |
| 0x7C | ID | `TAXI_ID` parameter |

The maximum credit for a channel is `1 << RX_*_AWIDTH` of the **far** end.

## Module map

| File | Clock | Role |
|---|---|---|
| `taxi_pkg` | | types, constants, packing |
| `taxi_link` | | top: two ends, `N_REP` repeaters each way, `taxi_cpr` |
| `taxi_end` | | one end: everything below |
| `taxi_axi_iso` | AXI | slave port to link or dummy slave; outstanding counters |
| `taxi_dummy_slave` | AXI | answers while disabled |
| `taxi_tx` | AXI | packing, credit counters, arbitration into the transmit FIFO |
| `taxi_tx_qos` | AXI | highest QoS held in the link |
| `taxi_link_cmd` | AXI | chooses the next link command |
| `taxi_async_fifo` | both | transmit FIFO (4 packets) and receive FIFO (32 words) |
| `taxi_out_stage` | link | packet to words; obeys stall |
| `taxi_repeater` | link | pipeline stage with a two-word buffer |
| `taxi_in_stage` | link | input register, receive FIFO, stall |
| `taxi_rx` | AXI | decode, per-channel storage, WLAST, credit accumulation, received commands |
| `taxi_link_ctrl` | AXI | state machine |
| `taxi_regs` | AXI | APB registers |
| `taxi_cpr` | source | clock gate and link reset |
| `taxi_sync_fifo` | AXI | helper FIFO used by `taxi_rx` |

Main parameters and their defaults (the `taxi_end`/`taxi_link` defaults):

| Parameter | Default |
|---|---|
| `TAXI_DW` | 16 |
| `TX_AWIDTH` | 2 |
| `RXFIFO_AWIDTH` | 5 |
| `CREDW` | 8 |
| `RX_AR_AWIDTH` | 3 |
| `RX_AW_AWIDTH` | 3 |
| `RX_WD_AWIDTH` | 5 |
| `RX_RR_AWIDTH` | 5 |
| `RX_BR_AWIDTH` | 3 |
| `N_REP` | 2 |

## Where this design departs from the T-AXI description it follows

- **Link commands.** They enter the same transmit FIFO as AXI packets, on the AXI
  clock. The original places a link arbiter after the transmit FIFO, on the link
  clock. On the receive side they also pass through the receive FIFO; the original
  splits them off before it. This keeps all control logic on the AXI clock.
- **Receive rate.** The receiver reads one word from the receive FIFO per AXI clock.
  The original reads enough words per clock for up to two channels at once. With a
  slow AXI clock this design therefore stalls more often.
- **Formats.** Packet and link-command formats, channel codes and the command set
  beyond credit, QoS and control are this design's own.
- **State transitions.** They are this design's reading of the state descriptions.
  The LinkState codes and meanings follow the original.
- **WLAST.** The original does not carry WLAST. Here it is rebuilt at the receiver,
  so the local slave sees proper AXI4 bursts.
- **AW credit.** It returns at the end of the burst's write data (see Credit).
- **Credit registers, bit 0.** Bit 0 is set in every reset value. Its meaning is not
  known, so it is kept as a plain read/write bit.
- **Parameter registers.** Their offsets and layout are this design's own.
- **Extra status flags.** The original's status also reports flags for write-data
  mismatch, an illegal remote state, an illegal link command and an illegal AXI
  command. Their bits and exact conditions are not defined, so they are left out.
- **Write strobes.** They are sent with every write-data beat. The original sends
  them only for writes whose strobes mark a partial write.
- **Moving the link master.** The original's register description says to move the
  master role while the link is active. Its test procedure disables the link first.
  The testbench follows the procedure.
- **Data width and repeaters.** The AXI data width is fixed at 32. The repeater count
  defaults to 2.
- **Clock during reset.** The original runs the link clock slower during reset; this
  is not modelled.
- **Not included:**
  - the PLL;
  - the FPGA DDR transport used for prototyping;
  - the main fabric, memory controller, bridges and sizers;
  - the subsystem masters.

## How far it can be trusted

Every block has its own self-checking testbench in `tb/`, named `tb_<module>`. Each
one compares the block against an independent model with random traffic and stalls.
Examples:

- every word through a repeater or the input stage, in order, under random stalls;
- every packet through the transmitter, with in-flight transfers never exceeding
  credit;
- every transfer out of the receiver, with WLAST and QoS, and all credit returned;
- the state machine's paths;
- register reset values and fields;
- the clock gate having no short pulses.

Each testbench was also run against a deliberately broken copy of its block, and
every one of them caught its fault.

`tb_taxi_link` runs the whole link at the default parameters:

- register defaults;
- reads through the dummy slave while disabled;
- raising the credits and enabling the link;
- writes and read-back of bursts of every length;
- 24 outstanding reads against a slow memory;
- QoS forwarding;
- traffic in the reverse direction;
- clock gating off and on;
- a link reset under load;
- moving the link-master role to the other end.

It counts each mechanism (link stall, repeater holding, credit exhaustion, QoS,
dummy slave, reset, clock gating, outstanding count, master swap) and fails if any
never happened. It passes with 773 checks.

`tb_taxi_credit_sweep` measures how credit limits throughput. It sets one
channel's credit at a time to 1, 2, 4 and so on up to the maximum. The others stay
at their maximum. For each setting, it resets the link to load the credit, then
moves a fixed mix of 32 reads and 16 writes, each an 8-beat burst. It checks all
data and reports the AXI cycles taken:

| Credit | 1 | 2 | 4 | 8 | 16 | 32 |
|---|---|---|---|---|---|---|
| RR (read data) | 4611 | 2432 | 1371 | 1029 | 980 | 976 |
| WD (write data) | 2677 | 1669 | 1165 | 958 | 970 | 976 |
| AR | 1019 | 974 | 968 | 976 | | |
| AW | 924 | 916 | 974 | 976 | | |
| BR | 923 | 940 | 976 | 976 | | |

With every credit at its maximum, the mix moves 1.59 bytes per AXI clock.

- **Data channels.** With a credit of 1 on RR or WD, only one beat can be in flight.
  Each beat then waits a full credit round trip, which is why these rows are slow.
  About 8 credits reach full speed here. The testbench checks that credit 1 is
  slower than the maximum for both channels.
- **Command and response channels.** AR, AW and BR carry one item per 8 beats of
  data, so their credit hardly matters.
- **Single-beat writes.** A second mix of 64 single-beat writes has one write
  response per data beat. There BR credit matters: 1039 cycles at credit 1, 579 at
  2, 436 at 4 and 424 at 8. The testbench checks that credit 1 is slower here too.
  WD credit gives 1279 cycles at 1, 431 at 4 and 424 at 16.
- **Against the original.** Its measurements show the same pattern: read-data and
  write-response credit matter, AR credit hardly does.
- **Memory model.** The test memory serves one read at a time, which hides most of
  the AR effect.

All RTL builds under Verilator with its lint warnings turned on, and none of the
remaining warnings points at a circuit problem. The link also goes through Yosys
generic synthesis without latches. One complete link comes to about:

- 2,160 cells;
- 1,616 flip-flop bits;
- 19,900 bits of FIFO memory.

It has not been mapped to a cell library or run on an FPGA, and its timing has not
been closed. The state machine has only been exercised by the scenarios above.

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_taxi_link \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/taxi_pkg.sv tb/tb_taxi_link.sv -o sim
./obj_dir/sim
```

To build another testbench, change the top module and the file. Each testbench:

- prints `TB_RESULT checks=<n> failures=<m>` at the end;
- prints a `FAIL` line for each failed check;
- has a watchdog that ends the run with a failure if it hangs.

`tb/tb_axi_mem.sv` is the behavioural AXI memory that the link and end testbenches
use as a slave.
