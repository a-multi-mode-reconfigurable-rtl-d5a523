# Run-time mode switching for a two-node OFDM link

A wireless link that always runs at one modulation is either too slow when the
channel is clean or too fragile when it is noisy. This RTL lets two SISO-OFDM
nodes change payload modulation while running, between **QPSK** (robust, lower
bandwidth) and **QAM-16** (faster, more errors). They measure the channel
together and agree on the new mode with a small handshake protocol, which has
to keep working over the same bad link it is trying to repair.

The design follows a published multi-mode reconfigurable OFDM system built on
an FPGA board with an embedded processor. There the protocol ran as processor
software on top of hardware timers. Here the same protocol is a set of
hardware state machines around those timers, so one `ms_node` is a complete
node controller between a wired packet port and an OFDM PHY. The OFDM
transceiver, the radio and the Ethernet MAC are not part of this RTL. They
connect through byte-stream ports.

```
                 wired side (Ethernet MAC)
             eth_in_*  |            ^  eth_out_*
                       v            |
   +-------------------------------------------------------------+
   | ms_node           loss_buffer   pkt_parser ---> err_meter    |
   |  mode_trigger --> server_fsm  <--+    |                      |
   |  (server only)    client_fsm  <--+----+---> rollback_unit    |
   |                       |   mode_table (in each FSM)    |      |
   |                       v                               v      |
   |           arbiter: rollback > server > client > data         |
   |                       |                                      |
   |                  pkt_framer          phy_mode register       |
   +-------------------------------------------------------------+
             phy_tx_*  |            ^  phy_rx_*, phy_rx_payload_ok
                       v            |
                  SISO-OFDM PHY (external), BPSK header,
                  QPSK or QAM-16 payload chosen by phy_mode
```

## The handshake

One node is the **server** and the other the **client** (`cfg.is_server`).
Every node contains both engines, and only the selected one runs. Only the
server has a trigger. The exchange has three phases:

```
   server                                   client
     | --- Start (re-sent on server timer) --> |   initiation
     | <-- Ack_Start (re-sent on client timer) |
     | --- Measurement 0 .. N_MEAS-1 --------> |   measurement: client counts
     | --- End (re-sent on server timer) ----> |   good packets
     | <-- Result_End(count) (client timer) -- |
  switch mode, fall silent                     |   synch
     |        (no End arrives for quiet_timeout: quiescence)
     |                                   switch mode
     | <-- Synch (re-sent on client timer) --- |
     | --- Ack_Synch ------------------------> |
  normal                                    normal
```

The hard part is the end of the exchange. When the server receives
Result_End it switches at once. From then on a client that has not switched
cannot exchange data with it, and the client cannot be told directly whether
the server got the result. The answer is **quiescence**. After switching, the
server sends nothing at all. The client keeps re-sending Result_End and runs a
quiescence timer, which it restarts whenever another End arrives. The server
only stops sending End once it has the result, so a silent period of
`quiet_timeout` cycles tells the client the server has switched. The client
then applies the same table to the same count and sends Synch until Ack_Synch
returns. `quiet_timeout` must therefore be longer than the server's End
re-send period (`srv_timeout`).

**Two timers.** Both ends re-send. The server re-sends Start and End every
`srv_timeout`. The client re-sends its answers (Ack_Start, Result_End, Synch)
on a shorter `cli_timeout`. On a link where packets and their
acknowledgements often collide, this gets an answer through sooner than
server re-sends alone. The Resend header field carries the re-send count.
The two timeouts are configuration inputs, and keeping `cli_timeout` shorter
is up to the user.

**Retry limits (own addition).** Every re-send loop, except the client's
Result_End loop, gives up after `MAX_RETRY` re-sends and returns to the
normal state. The quiescence timer ends the Result_End loop. The server's
silent period is bounded the same way, and a client that hears nothing for
`quiet_timeout` during measurement also gives up. Without these limits, a
lost partner would leave a node in the handshake forever.

**What "normal" means.** Outside the handshake, wired packets are sent as
Data packets in the current mode. During the handshake only protocol packets
are sent, and wired traffic waits in the loss buffer.

## The mode table

Both ends hold the same table (`mode_table`), so they reach the same decision
from the same count without sending the decision itself.
`errors = N_MEAS - good`:

| current mode | condition              | new mode |
|--------------|------------------------|----------|
| QPSK         | errors < ERR_THRESH    | QAM-16   |
| QAM-16       | errors > ERR_THRESH    | QPSK     |
| otherwise    |                        | unchanged|

The measurement counts the short Measurement packets that arrive with a good
header checksum and a decoded payload. Duplicate sequence numbers are not
counted. The default of 2000 packets is the size used on the original
system. The threshold of 100 errors (5 %) is this design's choice.

## Rollback: repairing a split

If a handshake breaks at the wrong moment, one end can switch and the other
not. Headers always go in BPSK, so a node can still read the source address of
a packet whose payload it cannot demodulate. `rollback_unit` tallies such
packets from one source. Measurement packets are not counted, and a decoded
packet resets the tally. Once the tally exceeds `RB_THRESH`, the unit aborts
any handshake and sends Rollback to that source until Ack_Rollback comes back.
Both ends then return to their **common mode**, the mode recorded when their
last handshake completed (server on Synch, client on Ack_Synch). On the server
a rollback then starts a fresh handshake.

To make this safe, a server in the normal state answers a late Synch only if
its own last handshake completed. Otherwise a client that switched alone
would record its new mode as common, and the rollback could not bring the two
ends back together.

## Packet format

Every packet starts with a 64-byte header sent in BPSK, most significant
field first:

| bytes  | field    | use here |
|--------|----------|----------|
| 0      | Fullrate | payload modulation: 1 BPSK, 2 QPSK, 4 QAM-16 |
| 1-2    | Length   | payload bytes after the header (0 for protocol packets) |
| 3      | PktType  | 0 Data, 1 Ack, 2 Start, 3 Ack_Start, 4 Measurement, 5 End, 6 Result_End, 7 Synch, 8 Ack_Synch, 9 Rollback, 10 Ack_Rollback |
| 4-9    | DstAddr  | all ones = broadcast, used by the protocol packets |
| 10-15  | SrcAddr  | sender |
| 16     | Resend   | re-send count |
| 17-61  | Reserved | 17-20 measurement result, 21-22 measurement sequence, rest zero |
| 62-63  | Checksum | CRC-16/CCITT (init 0xFFFF, poly 0x1021) over bytes 0-61 |

The original system fixes the field order, the 64-byte size, the one-byte
type, the six-byte broadcast address and the use of Reserved for the result.
The other widths, the CRC and the codes in Fullrate are this design's
choices. Measurement packets carry `MEAS_LEN` payload bytes, byte i being
`seq + i`. The PHY checks payloads, and the node learns the result from
`phy_rx_payload_ok`.

## Loss buffer

`loss_buffer` stands for the second 2 MB SRAM bank of the original board. It
is a circular byte array plus a FIFO of packet lengths. A packet becomes
readable only once its last byte is in. The wired input cannot be stalled, so
when the array or the length FIFO is full, the packet being written is
dropped whole and counted in `buf_overflow_cnt`. The array is written as an
on-chip memory with asynchronous read. An implementation that uses real
external SRAM would replace it with an SRAM controller behind the same ports.

## Modules

| file | role |
|------|------|
| `ms_pkg.sv`        | packet types, modulation codes, header struct, request and configuration structs, CRC function |
| `ms_node.sv`       | top: one node, arbiter, mode and common-mode registers |
| `mode_trigger.sv`  | periodic trigger and manual button, sharing one timer |
| `hw_timer.sv`      | one-shot countdown timer with expiry pulse |
| `server_fsm.sv`    | server handshake |
| `client_fsm.sv`    | client handshake, short and quiescence timers |
| `mode_table.sv`    | switching rule |
| `err_meter.sv`     | good-packet counter |
| `rollback_unit.sv` | split detection and Rollback exchange |
| `loss_buffer.sv`   | packet FIFO with overflow drop |
| `pkt_framer.sv`    | request to header and payload byte stream |
| `pkt_parser.sv`    | byte stream to header, checksum, address filter, payload forwarding |

## Interface and timing of `ms_node`

* **Configuration** (`cfg`, a `node_cfg_t`): role, automatic trigger on/off,
  own and peer address, and five periods in clock cycles: `auto_period`,
  `manual_period` (shorter, so a press starts the handshake almost at once),
  `srv_timeout`, `cli_timeout` and `quiet_timeout`. `trig_enable` turns the
  trigger off completely, and `manual_btn` is the button (rising edge).
* **Wired side.** `eth_in_*` carries one byte per valid cycle with `last`
  and has no back-pressure. `eth_out_*` delivers received Data payloads, with
  `eth_out_good` beside `eth_out_last`. Drop the packet if it is low.
* **PHY side.** `phy_tx_*` is valid/ready, one byte per cycle. `phy_rx_*`
  is valid only, with `phy_rx_payload_ok` beside `phy_rx_last`. `phy_mode`
  selects the payload modulation of the OFDM core. Protocol packets are
  marked BPSK in Fullrate, and Measurement and Data packets are marked with
  `phy_mode`.
* **Timing.** A timer loaded on a clock edge fires `period` edges later. An
  automatic trigger repeats every `auto_period + 1` cycles. A re-send goes
  out `timeout + 2` cycles after the previous one was accepted when the PHY
  is ready. A header-only packet takes 64 cycles on the PHY port.
* **Reset.** `rst_n` is asynchronous and active low. Both nodes start in QPSK.
* **Status.** State of both FSMs, last result, buffer level, and one-cycle
  event pulses for trigger (with source), re-send, quiescence, mode change,
  rollback, give-up and overflow.

| parameter  | default | origin |
|------------|---------|--------|
| N_MEAS     | 2000    | measurement size used on the original system |
| BUF_DEPTH  | 2097152 | 2 MB SRAM bank of the original board |
| MEAS_LEN   | 32      | own choice ("short packets") |
| ERR_THRESH | 100     | own choice |
| MAX_RETRY  | 16      | own choice |
| RB_THRESH  | 8       | own choice |
| LEN_DEPTH  | 4096    | own choice |

## Where this departs from the original system

* The protocol is hardware. The original ran it as processor software, with
  the timers raising interrupts. Here the timer expiries go straight to the
  state machines, and there is no processor or interrupt controller.
* The retry limits, the inactivity timeout, the Synch rule above, the tally
  reset rule and all numeric thresholds are additions or choices. The
  original gives no values for them.
* Not included: the OFDM PHY (header in BPSK, payload in QPSK or QAM-16), the
  AGC, the radio controller and packet detector, the radio and clock boards,
  the Ethernet MAC, and the platform's BRAM packet buffers. Also absent are
  the plain data-acknowledgement exchange of the underlying MAC (type 1 Ack
  is defined but never sent) and the platform's hardware bit-error-rate unit.
  The original offers that unit as an alternative to counting packets but
  does not use it. Switching by partial reconfiguration is likewise only an
  alternative there. Here, as there, switching is a control register in a
  core that holds both modes.
* One peer per node. The original notes the scheme extends to one server with
  several clients, and this RTL does not.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

* `tb_ms_node`: two nodes and a behavioural link model (`ofdm_link_model`),
  with 50 measurement packets and a 4 KiB buffer. It runs a manual switch up
  with lost Start and Ack_Start, in which no wired packet is lost. It then
  runs an automatic switch down under QAM-16 interference, a forced split
  repaired by rollback, and a traffic burst that overflows the buffer. It
  counts every mechanism and fails if any never happened.
* `tb_ms_node_full`: the same pair at the default sizes (2000 measurement
  packets, 2 MB buffer). It runs one complete switch with wired traffic
  flowing, which takes about 205,000 cycles.
* `tb_workload_buffer`: the buffer sizing case, at the default sizes. The
  original system moved up to 7 Mbit/s and switched in up to 0.6 s, which
  leaves about 525 kB waiting. The timers here stretch one switch to about
  647,000 cycles while 1500-byte frames arrive at 0.8 byte per cycle. The
  buffer peaks at 522,000 bytes, nothing overflows, and all 351 frames come
  out intact and in order.
* Unit tests: `tb_hw_timer`, `tb_mode_trigger`, `tb_pkt_framer` and
  `tb_pkt_parser` (against an independent header model in `tb_ref_pkg`),
  `tb_mode_table`, `tb_err_meter`, `tb_loss_buffer` (against a reference
  model of which packets must be dropped), `tb_server_fsm`, `tb_client_fsm`
  and `tb_rollback_unit`, which script the other end at packet level.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ms_pkg.sv tb/tb_ref_pkg.sv tb/tb_ms_node.sv --top-module tb_ms_node -o sim
./obj_dir/sim
```

Replace `tb_ms_node` with any other testbench name. Lint:
`verilator --lint-only -Wall -Irtl -y rtl rtl/ms_pkg.sv rtl/ms_node.sv`. The
remaining lint warnings are unused header bits (each engine reads only the
fields it needs) and `SYNCASYNCNET` from `disable iff (!rst_n)` in the
handshake assertions.

The link model decides payload decoding from the receiver's mode and a
per-mode error rate, so results depend on that model, not on a real OFDM
channel. Nothing here has been run on hardware.
