# FTCP slave station for a fault-tolerant model railway controller

A model railway with about 70 drive and sensor signals is run by a single
**slave station**. Two **master stations** can command it, and they reach it
over links that share no hardware:

* **master 1**, a PC, over a full-duplex RS-422 serial line;
* **master 2**, a PLC, over a conventional parallel data bus (through optical
  isolation and an SPI/PSI module on the slave side).

If one link or one master fails, the other can still control the model. The
**Fault Tolerant Control Protocol (FTCP)** settles which master is in charge:
master 1, master 2, or both together. It also makes the slave fall back to a
safe state when a message arrives corrupted. This repository holds
synthesizable SystemVerilog for the slave station:

* the FTCP protocol engine and its CRC;
* the serial link that carries the PC's messages;
* the shift-register (SPI/PSI) links to the railway and to the PLC bus;
* the framing that carries PLC messages over that bus.

```
            m1_rxd / m1_txd                              plc_to_slave / slave_to_plc
 master 1 ──(RS-422 driver)─────┐                ┌──── parallel bus ──── master 2 (PLC)
                                │                │
                          ┌─────┴────────────────┴──────────────────────────┐
                          │ slave_station                                   │
                          │ ┌───────────────┐                               │
                          │ │serial_msg_port│ rfm1/srtm1                    │
                          │ └──────┬────────┘                               │
                          │   ┌────▼─┐ rfm2/srtm2 ┌────────────┐  ┌───────┐ │
                          │   │ rail │◄──────────►│bus_msg_port│◄►│sio +  │ │
                          │   │(FTCP)│            └────────────┘  │spi_psi│ │
                          │   └──┬───┘                            └───────┘ │
                          │ ACTION│▲ READ                                   │
                          │   ┌──▼┴─────────────┐                           │
                          │   │ sio + spi_psi   │                           │
                          │   └──┬───────▲──────┘                           │
                          └──────┼───────┼──────────────────────────────────┘
                      rail_drives│       │rail_sensors
                              railway model (32 drives, 48 sensors)
```

## Messages

Every message carries an 8-bit CRC over its data field. Both record types are
defined in `rtl/ftcp_pkg.sv` as packed structs, header first:

| record | header | data | crc | bits |
|---|---|---|---|---|
| `rfm_t`, master → slave | `mfm_e`: STOP, INI, TAKE, HAND, JOIN, REQ, DATA (codes 0–6) | 32 | 8 | 43 |
| `rtm_t`, slave → master | `mtm_e`: ERROR, JOIN, DATA, ACK (codes 0–3) | 48 | 8 | 58 |

What each master header means:

* **INI**: restart negotiation.
* **TAKE**: ask to take control.
* **HAND**: offer control to the other master.
* **JOIN**: ask for joint control.
* **REQ**: read the 48-bit measurement word.
* **DATA**: write the 32-bit ACTION word that drives the model.
* **STOP**: switch all drives off.

STOP and DATA are not allowed during negotiation.

An ACK reply carries a fixed acknowledge word in its data field:

| ACK for | INI | TAKE | HAND | JOIN | STOP | DATA |
|---|---|---|---|---|---|---|
| data word | `AA0000000000` | `BB0000000000` | `CC0000000000` | `DD0000000000` | `EE0000000000` | `FF0000000000` |

A DATA reply carries the measurement word (READ). An ERROR reply means the
message was refused. A JOIN reply goes to the *other* master and invites it
to join. The CRC is CRC-8 with generator x⁸+x²+x+1 (0x07), initial value 0,
MSB first and no final XOR. Its check value is CRC("123456789") = 0xF4.
Because the initial value is 0, leading zero bits do not change the result.

## Negotiating control: the slave state machine

The slave holds one state of type `iostate_e`. States 0–4 make up the
**initialisation phase** and states 5–7 the **execution phase**. The engine
relies on this order: "state ≤ M2JOIN" is the test for the initialisation
phase.

| code | state | meaning |
|---|---|---|
| 0 | NONE | nobody in control |
| 1 | M1M2 | master 1 has offered control to master 2 |
| 2 | M2M1 | master 2 has offered control to master 1 |
| 3 | M1JOIN | master 1 asks for joint control |
| 4 | M2JOIN | master 2 asks for joint control |
| 5 | M1CNTRL | master 1 controls the model |
| 6 | M2CNTRL | master 2 controls the model |
| 7 | M1M2CNTRL | both control the model jointly |

The tables below give the rules for a message from master 1. Master 2 follows
the same rules with the roles of the masters exchanged.

**Initialisation phase.** Every message in this phase switches ACTION off.
Both masters' reply headers are first set to ERROR. If the CRC is good:

| message | condition | new state | reply to sender |
|---|---|---|---|
| INI | any | NONE | ACK / ACKINI |
| REQ | any | unchanged | DATA / READ |
| TAKE | NONE or M2M1 | M1CNTRL | ACK / ACKTAKE |
| TAKE | otherwise | NONE | ERROR |
| HAND | NONE | M1M2 | ACK / ACKHAND |
| HAND | otherwise | NONE | ERROR |
| JOIN | M2JOIN | M1M2CNTRL | ACK / ACKJOIN |
| JOIN | otherwise | M1JOIN | ERROR; master 2 gets a JOIN invitation |
| STOP, DATA | (prohibited) | unchanged | ERROR |

A message with a bad CRC changes no state and gets the ERROR header.

**Execution phase.**

* **Bad CRC:** the slave returns to NONE. This is the fault-tolerance fallback.
* **Master 2 in sole control (M2CNTRL):** master 1 has no access right, and
  nothing changes.
* **Master 1 in control (M1CNTRL) or joint control (M1M2CNTRL):** the sender's
  message is handled as follows.

| message | effect | reply to sender |
|---|---|---|
| STOP | ACTION = 0 | ACK / ACKSTOP |
| INI | state NONE | ACK / ACKINI |
| TAKE, HAND, JOIN | state NONE | unchanged |
| REQ | none | DATA / READ |
| DATA, sole control | ACTION = data | ACK / ACKDATA |
| DATA, joint control | ACTION = data, but only if it equals the data of the other master's last message; both masters then get ACK / ACKDATA | — |

In joint control, two masters that agree on a command must both send it, and
the second DATA message applies it. A DATA message that does not agree leaves
ACTION and both replies unchanged.

Fields that a rule does not mention keep their previous value. For example,
after a bus error in the execution phase, each master's reply record still
holds its last reply.

**Implementation.** `rtl/rail.sv` holds one decision table written from the
view of the master being served. Before the table is applied, the state is
mapped into that view: for master 2 the pairs M1M2↔M2M1, M1JOIN↔M2JOIN and
M1CNTRL↔M2CNTRL are swapped. After the table, the result is mapped back and
the "me" and "other" replies are routed to the right master. The reply CRCs
come from two `crc8` instances on the next reply data. Two more instances
check the held incoming messages; their results appear as `ebm1` and `ebm2`.

**Handshake and ordering.** A master presents a message with a one-cycle
`rfmN_valid` pulse, and may do so only while `rfmN_ready` is high.
Assertions check this rule. The engine serves one pending message per clock.
When both masters have a message pending, they take turns, so the shared
state is changed by one master at a time.

After a message is served:

* `srtmN_ans` pulses for the master that sent it;
* `srtmN_valid` pulses for every master whose reply record was updated,
  including a master that was only notified of a JOIN.

A message that arrives with a valid pulse at clock edge k is answered at edge
k+1, or at edge k+2 when the other master's message goes first.

## SPI/PSI links: reaching the railway and the PLC bus

The wide parallel ports hang off the slave's CPU through SPI/PSI
shift-register modules, driven by three CPU lines: CLK, SH/LD and DI/DO.
Two modules do this:

* **`spi_psi`** is the module itself. It holds a parallel-in/serial-out input
  register and a serial-in/parallel-out output register with an output latch.
  * **Load (`sh_ld` = 0):** the input register samples `par_in`, and the latch
    copies the word shifted in so far. `par_out` changes only at a load.
  * **Shift (`sh_ld` = 1 and `sclk` = 1):** both registers move one bit. The
    input MSB is on `sdo`, and `sdi` enters the output register's LSB.
* **`sio_master`** is the CPU side. A scan runs like this:
  1. one load cycle;
  2. N = max(IN_W, OUT_W) shift cycles that send N−OUT_W zero bits and then
     `out_data`, MSB first, while they collect the first IN_W bits from
     `sdo` as `in_data`;
  3. one idle cycle.

  `done` pulses when `in_data` is new. With `start` held high, the port scans
  without a break.

`sclk` acts as a clock enable inside the single `clk` domain, and the DI/DO
line is split into `sdi` and `sdo`.

The slave station runs two such links, both scanning continuously:

| link | IN_W | OUT_W | scan length |
|---|---|---|---|
| railway (READ in, ACTION out) | 48 | 32 | 50 cycles |
| PLC bus (message in, reply out) | 44 | 59 | 61 cycles |

A word sent in one scan reaches `par_out` at the load of the next scan.
A new ACTION word therefore appears on `rail_drives` within two railway
scans (≤ 100 cycles). The READ word seen by the engine is at most two scans
old.

## Master 1 messages on the serial line

`serial_msg_port` carries the PC's records over the CPU's RxD/TxD lines.
The RS-422 driver and receiver sit outside the chip. The line uses 8N1
characters: 8 data bits, no parity, one stop bit. `CLKS_PER_BIT` defaults to
434, which gives 115200 bit/s from a 50 MHz clock. Frames are sent most
significant byte first:

* PC → slave, 6 bytes: `{5'b0, header}`, 4 data bytes, CRC.
* slave → PC, 8 bytes: `{ans, 5'b0, header}`, 6 data bytes, CRC.

The `ans` bit is 1 for the answer to the PC's own message. It is 0 for a
reply record that changed because of master 2, such as a JOIN invitation or a
joint ACKDATA.

The receiver drops a partial frame in two cases:

* a character arrives with a bad stop bit (`m1_frame_err` pulses);
* the line pauses for more than `GAP_BITS` (30) bit times inside a frame.

Dropping on a pause lets the receiver fall back into step after a lost byte.
A corrupted data or CRC byte inside a complete frame is caught by the FTCP
CRC. The header byte is not covered, because the protocol's CRC protects only
the data field.

The transmitter sends every reply update. An update that arrives while an
older one is still waiting replaces it, so the PC always ends up with the
latest record. A master 1 request takes 60 bit times on the line, and its
answer 80 more.

## Master 2 messages on the parallel bus

`bus_msg_port` gives the PLC a simple bus framing:

* The PLC writes `{seq, rfm_t}` (44 bits) on its output modules and toggles
  `seq` for every new message.
* After each bus scan, a word whose `seq` differs from the last one taken is
  passed to the engine. If the engine is busy, the word is retried at the
  next scan.
* The slave writes `{ack_seq, rtm_t}` (59 bits) back. `ack_seq` becomes the
  message's `seq` once the engine has answered it. When `ack_seq` equals its
  own `seq`, the PLC knows that the reply belongs to its latest message.

After reset both bits are 0, so the PLC's first message must carry `seq` = 1.
A full round trip takes two to four bus scans. The end-to-end test saw up to
243 cycles.

## Files and ports

| file | contents |
|---|---|
| `rtl/ftcp_pkg.sv` | enums, message records, acknowledge words, CRC generator |
| `rtl/crc8.sv` | combinational CRC-8, width parameter `W` |
| `rtl/rail.sv` | FTCP protocol engine |
| `rtl/spi_psi.sv` | SPI/PSI shift-register module, `IN_W`, `OUT_W` |
| `rtl/sio_master.sv` | CPU side of an SPI/PSI link, `IN_W`, `OUT_W` |
| `rtl/bus_msg_port.sv` | master 2 message framing on the parallel bus |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | 8N1 serial receiver and transmitter, `CLKS_PER_BIT` |
| `rtl/serial_msg_port.sv` | master 1 message framing on the serial line |
| `rtl/slave_station.sv` | top level, parameter `CLKS_PER_BIT` |
| `tb/ftcp_ref_pkg.sv` | reference model: long-division CRC and a per-master decision table |
| `tb/tb_*.sv` | one self-checking testbench per module |

Top-level ports of `slave_station`, all synchronous to `clk`, with
synchronous active-low `rst_n`:

* **Master 1:** `m1_rxd`, `m1_txd` and `m1_frame_err`.
* **Master 2:** `plc_to_slave` [43:0] and `slave_to_plc` [58:0].
* **Railway:** `rail_sensors` [47:0] and `rail_drives` [31:0].
* **Monitoring:** `st`, `ebm1`, `ebm2`.

After reset:

* the state is NONE;
* ACTION and the drive outputs are 0;
* both replies are ERROR with zero data.

The whole station synthesizes to roughly 810 word-level cells and 1170
flip-flops. Most of the flip-flops are in the held messages, the reply
records, the serial frame buffers and the shift registers.

## How far to trust it, and where it departs from the protocol description

The following parts are taken from the published protocol description:

* the message set, record layouts and acknowledge words;
* the state set and its order;
* every initialisation-phase rule;
* the sole-control rules;
* the bus-error fallback;
* joint control's data comparison.

Master 2's rules were described only as "the same structure" as master 1's.
Here they are the exact mirror image.

The following are this design's own choices:

* **CRC generator.** The protocol names a CRC but not its polynomial.
* **Other messages in joint control.** The published behaviour for joint
  control covers only the data comparison. Here STOP, INI, TAKE, HAND, JOIN
  and REQ act as they do in sole control. This follows the general message
  definitions, under which INI restarts negotiation in either phase and STOP
  blocks all drives during execution. Without it, joint control could only be left
  through a corrupted message.
* **Clocked operation.** The protocol was described as event-driven software
  processes sharing variables. This design uses a clocked engine with one
  message per cycle, valid/ready handshakes and alternating priority.
* **SPI/PSI internals and scan sequence.** The split of DI/DO into two wires
  and the reset values are also this design's.
* **Both message framings and the bit rate.** The serial frames and the bus
  framing for the PLC are this design's.
* **Protocol in hardware.** In the original system the protocol runs as
  software on the slave's CPU. Here it is a hardware engine.
* **Parts not modelled.** The RS-422 driver, the optical isolation, the PLC,
  the PC and the CPU are not modelled.
* **Signal split.** The design provides 32 drive and 48 sensor bits, 80 in
  all, for a railway with about 70 signals. The split between drives and
  sensors of the real model is not known.

Verification: each module has a self-checking testbench. The engine is
compared message by message with an independently written reference model:

* a directed walk through every negotiation path;
* then 4000 random messages from both masters, 4% with a corrupted CRC.

The top-level test plays the PC (over the serial line, at the default bit
rate), the PLC and the railway at full size. It
checks the replies, the state and the drive outputs after about 280
messages, and it requires every mechanism to occur at least once:
take-over, hand-over, joint control with agreeing and disagreeing data, STOP,
REQ over both links, refused access, prohibited messages, bus errors,
notification frames to the PC and a serial framing error.

## Simulating

All testbenches print `TB_RESULT checks=N failures=M` and stop on their own.
With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ftcp_pkg.sv tb/ftcp_ref_pkg.sv tb/tb_slave_station.sv \
    --top-module tb_slave_station -Mdir obj_top
./obj_top/Vtb_slave_station
```

To run another testbench, replace `tb_slave_station` with `tb_rail`,
`tb_crc8`, `tb_spi_psi`, `tb_sio_master`, `tb_bus_msg_port` or
`tb_serial_msg_port`. The packages must come first on the command line. The
top-level test simulates about 10 million cycles, which takes a few seconds
because of the serial line.

## Changing it

* **Different railway I/O counts:** change `IN_W` and `OUT_W` of the railway
  `sio_master` and `spi_psi` instances. Also change `DATA_W` and `READ_W` in
  the package if the ACTION or READ words change. A master's records grow with
  them, and so does the PLC bus word.
* **Another CRC:** change `CRC_POLY` in `ftcp_pkg`, and `ref_crc` in the
  testbench package.
* **Protocol rules:** every rule lives in the single `always_comb` decision
  table in `rail.sv`, so a change there applies to both masters.
  `tb/ftcp_ref_pkg.sv` must be changed to match.
