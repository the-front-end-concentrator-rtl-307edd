# FEC firmware: a front-end concentrator for a scalable detector readout

A front-end concentrator card sits between a detector's digitizers and the
data-acquisition PCs. It takes samples from many ADC channels and packs each
trigger window into an event. It keeps every event in a large memory buffer
and also scans each event for something interesting. When it finds a
possible trigger, it tells a central trigger card over a serial link. If the
trigger card confirms, the event is read back from the buffer and sent to the
PC over gigabit Ethernet as UDP. Events that are never confirmed stay in the
buffer until they are overwritten.

This repository holds synthesizable SystemVerilog for that firmware, in the
configuration used for photomultiplier readout with a 16-channel, 12-bit ADC
card. It also holds a self-checking testbench for every block and an
end-to-end testbench for the whole chip.

## Data flow

```
 ADC card (16 serial lanes + frame)
        |
  aci_card_if ----> aci_data_in_ctrl --(raw events)--> [src 0]
                        ^  trigger (NIM in)                |
                                                   fec_interconnect
   [sink 0] --> data_format_unit --(events)--> [src 1]     (4 sources x 4 sinks,
                        |                                   a FIFO per sink,
                        +--> data_system_processor          route register)
                              (snoops the stream) --(candidates)--> [src 3]
   [sink 1] --> ddr2_write_ctrl --+
                                   +--> ddr2_port_arb --> DDR2 controller port
   ddr2_read_ctrl ----------------+
        |  ^ accepted triggers (event numbers)
        +--(events read back)--> [src 2]
   [sink 2] --> gbe_data_out_ctrl --> gbe_interface --> GMII
   [sink 3] --> dtc_data_out_ctrl --> dtc_lvds_nim_if --> DTC data line
   DTC command line --> dtc_lvds_nim_if --> dtc_data_in_ctrl --> command_unit
                                                  |--> config_unit (registers)
                                                  |--> system_unit (timestamp)
                                                  +--> ddr2_read_ctrl (triggers)
```

The chip is built from seven groups of blocks:

| Group | Modules | Role |
|---|---|---|
| Adapter Card Interface | `aci_card_if`, `aci_data_in_ctrl` | deserialise ADC lanes and cut trigger windows into raw events |
| Process Unit | `data_format_unit`, `data_system_processor` | add the event header; find trigger candidates |
| DDR2 Interface | `ddr2_write_ctrl`, `ddr2_read_ctrl`, `ddr2_port_arb` | ring buffer of events in external DDR2 |
| GbE Interface | `gbe_data_out_ctrl`, `gbe_interface` | UDP/IPv4/Ethernet framing and transmit MAC |
| DTC Interface | `dtc_lvds_nim_if`, `dtc_data_out_ctrl`, `dtc_data_in_ctrl` | serial link to the trigger card, NIM trigger I/O |
| Control Unit | `command_unit`, `config_unit`, `system_unit` | commands, registers, reset and timestamp |
| Configurable Interconnect | `fec_interconnect`, `sync_fifo` | programmable FIFO streams between the groups |

`fec_top` wires them together. `fec_pkg` holds the shared codes, the
configuration struct and the CRC functions.

All blocks exchange 16-bit words with valid/ready handshakes. A word moves
on a clock edge where both are high. Streams between groups also carry a
`last` flag on the final word of an event or frame, so they fit the
interconnect's 17-bit `{last, word}` FIFOs.

## The interconnect and its routes

`fec_interconnect` has four sources and four sinks. Each sink has a 16-word
FIFO and a 2-bit field in the route register (register 0, bits 7:0) that
names its source:

| Source | Stream | Sink | Consumer |
|---|---|---|---|
| 0 | raw events from `aci_data_in_ctrl` | 0 | `data_format_unit` |
| 1 | formatted events | 1 | `ddr2_write_ctrl` |
| 2 | events read from DDR2 | 2 | `gbe_data_out_ctrl` |
| 3 | trigger candidates | 3 | `dtc_data_out_ctrl` |

If several sinks name the same source, its words are broadcast. A word moves
only when every sink that wants it has room, and then goes to all of them at
once. A source that no sink names is simply held.

- **Default route, `0xE4` (sink d takes source d).** Events go to DDR2 and
  reach Ethernet only on a confirmed trigger.
- **Bypass route, `0xD4` (sink 2 takes source 1).** Every formatted event
  goes to Ethernet directly, while still being stored in DDR2. Events read
  from DDR2 are then held back.

Change the route only between events. A change in the middle of an event
splits it.

## Events

A NIM trigger input (or `trigger` at `aci_data_in_ctrl`) starts a window of
`EVENT_SAMPLES` = 32 sample times. The trigger only counts while acquisition
is on. A trigger that arrives while a window is being recorded or sent is
ignored and counted as busy. The ADC lanes bring one bit per clock, so a
16-channel sample vector arrives every 12 clocks.

The raw event is: timestamp[31:16], timestamp[15:0], then the samples. Each
sample word is `{channel[3:0], sample[11:0]}`, all 16 channels of time 0
first, then time 1, and so on.

`data_format_unit` turns this into the stored event:

| Word | Content |
|---|---|
| 0 | marker `0xEB90` |
| 1 | event number (16 bits; cleared when acquisition is switched on) |
| 2, 3 | timestamp high, low |
| 4 | number of sample words (`NWORDS` = 16 × 32 = 512) |
| 5… | sample words, `last` on the final one |

The timestamp is a 32-bit counter in `system_unit`. It counts clocks and can
be loaded over the command line.

## Trigger candidates

`data_system_processor` watches the raw events as they enter the format
unit, without stalling them. For each sample time it adds the 16 channel
values. If any sum exceeds the threshold (register 1, default 20000), the
event is marked. When a marked event ends, a three-word candidate is sent:
`{event number, timestamp high, timestamp low}`. It goes through sink 3 to
the DTC data line as a frame with identifier 8.

Each candidate that leaves also gives a pulse on the NIM output. Only one
candidate can wait at a time; a further one is dropped and counted.

## The DTC link

The link to the trigger card (or to a concentrator unit) has a data line
out and a command line in. Each line carries 200 Mb/s against a 100 MHz link
clock. The logic therefore moves two bits per clock on `[1:0]` (bit 1 is
sent first), and one 16-bit word every 8 clocks, MSB first. The LVDS
buffers and the DDR input/output registers are outside this RTL.

Both lines use the same frame format of 16-bit words:

```
 0xA55A | id[15:12] len[11:0] | len data words | (CRC-16) | 0x5AA5
```

- The line sends `0x0000` between frames.
- The CRC word is optional and off by default (`CRC_EN`). When on, it is
  CRC-16-CCITT (polynomial 0x1021, start value 0xFFFF) over the id/length
  word and the data words.

**Receiving.** The receiver in `dtc_lvds_nim_if` first hunts for `0xA55A`
at both possible bit offsets, then locks on. `dtc_data_in_ctrl` checks each
frame: trailer in place, length within `MAX_LEN`, and the CRC if it is on.
A bad frame is dropped and counted, and the receiver is told to re-align.

**Commands.** Command frames on the command line:

| id | Command | Data words |
|---|---|---|
| 1 | acquisition on (also clears the event number) | none |
| 2 | acquisition off | none |
| 3 | timestamp sync | timestamp[31:16], timestamp[15:0] |
| 4 | trigger: read event N out of DDR2 and send it | N |
| 5 | configuration write | register, value[31:16], value[15:0] |

A command whose id or length is wrong is counted in `bad_cmds`.

## The DDR2 ring buffer

The DDR2 memory is 256 MB of 16-bit words, so `ADDR_W` = 27. It is split
into slots of `SLOT_WORDS` = 2048 words (65536 slots). Event N goes to slot
`N mod 65536`, starting at the slot base. A longer event is cut off at the
slot end, and the dropped words are counted.

Since the slot depends only on the event number, a trigger command needs
nothing but N. `ddr2_read_ctrl` queues up to 8 trigger requests. For each
one it:

1. reads words 0, 1 and 4 of the slot;
2. checks the marker and the event number; a slot that was never written,
   or was overwritten by a later event, counts as a miss and sends nothing;
3. reads the event out from word 0, with up to 16 reads in flight.

A credit count (reads in flight plus words already in the output FIFO) keeps
returning data from ever overflowing. With a short memory latency, it
streams one word per clock.

**Memory port.** The port is the user side of a DDR2 controller: word
requests (`mem_req`, `mem_we`, `mem_addr`, `mem_wdata`) that are taken when
`mem_ready` is high. Read data returns in order on `mem_rvalid`/`mem_rdata`
some clocks later. `ddr2_port_arb` shares the port between the write and
read controls and alternates priority, so neither can starve the other.

## Ethernet output

`gbe_data_out_ctrl` buffers the words of one event, then sends a complete
frame as bytes: Ethernet II header, IPv4 header and UDP header, then the
payload.

- **IPv4 header:** checksum computed in the block, DF set, TTL 64,
  identification counting frames.
- **UDP header:** checksum 0.
- **Payload:** each word high byte first.
- **Size:** the buffer holds `MAX_WORDS` = 4486 words (8972 bytes), so a
  full IP packet is 9000 bytes, the usual jumbo size. A longer event is
  split over several frames.

Addresses and ports come from configuration registers. The defaults are
10.0.0.2:6006 → 10.0.0.3:6006, MAC 02:50:C2:00:00:02 → 02:50:C2:00:00:03.

`gbe_interface` is the transmit MAC. It adds 7 preamble bytes and the SFD,
pads to 60 bytes, appends the CRC-32 FCS and keeps a 12-byte gap between
frames. It drives a byte-wide GMII-style port (`gmii_txd`, `gmii_tx_en`).

**Two clocks.** The Ethernet byte side is the one part of the chip on its
own clock: `gmii_tx_clk`, 125 MHz, one byte per clock for 1 Gb/s.

- `gbe_data_out_ctrl` writes the payload buffer on the 100 MHz clock and
  reads it on the GMII clock.
- When a frame is complete, the word side flips a request toggle and waits.
  The byte side sees the toggle through two flip-flops, sends the frame,
  then flips an acknowledge toggle back.
- The frame length and the buffer do not change during that exchange, so
  they need no synchroniser.
- The address and port registers are treated as static. Change them only
  while no frame is in flight.
- `fec_top` makes a separate reset for the GMII domain.
- The MAC's frame count comes out as `gmii_frames`, a counter in that clock
  domain.

## Registers

Registers are written with command 5 and read through `reg_rd_addr` /
`reg_rd_data`, with data one clock after the address.

| Addr | Configuration (32-bit) | Reset |
|---|---|---|
| 0 | route, bits 7:0 | `0xE4` |
| 1 | candidate threshold, bits 17:0 | 20000 |
| 2 | source IP | 10.0.0.2 |
| 3 | destination IP | 10.0.0.3 |
| 4 | {source port, destination port} | 6006, 6006 |
| 5 | source MAC[47:16] | |
| 6 | {source MAC[15:0], destination MAC[47:32]} | |
| 7 | destination MAC[31:0] | |

Status counters, read-only, at addresses 8 to 24 in this order:

1. events recorded
2. busy triggers
3. trigger candidates
4. events written to DDR2
5. events read from DDR2
6. DDR2 misses
7. UDP frames
8. command frames received
9. command frame errors
10. DTC data frames sent
11. bad commands
12. ADC frame errors
13. trigger commands dropped
14. DTC receiver locked
15. current event number
16. candidates dropped
17. DDR2 words truncated

## What this RTL does not contain, and where it departs

**Not built (outside the design):**

- the DDR2 memory controller/PHY and the DDR2 device;
- the clock manager (the card has a 200 MHz oscillator);
- the SFP transceiver, the LVDS and NIM level translators and the connectors.

Their logic-side signals are the ports of `fec_top`.

**Not built (function unknown):** the adapter-card output path and the
Ethernet receive path. Nothing is known about what they should do.

**Clocks.** Apart from the Ethernet byte side, everything runs on one
100 MHz clock, the DTC link clock. The DDR2 controller is assumed to present
its user port on that clock.

The ADC lanes are taken at one bit per clock, about 8.3 MS/s per channel.
The card's ADCs run at 40–50 MS/s, which needs a faster deserialiser in
front of `aci_card_if`.

**Naming triggers.** A trigger command names the event by its event number,
the one the candidate reported. A trigger source that only knows a
timestamp would need a search by timestamp, which is not built.

**Link rate.** The DTC link runs at the nominal 200 Mb/s. A 352 Mb/s mode
would need a 176 MHz link clock. Only one DTC link is built.

**This design's own choices.** None of these are given by the source
description; change them freely:

- the ADC lane format;
- all code values (frame words, command ids, the event marker);
- the event layout and the register map;
- the slot-per-event DDR2 scheme;
- the channel-sum trigger algorithm;
- the route encoding;
- all FIFO depths.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops, and a watchdog ends a run
that hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
    -y rtl -y tb rtl/fec_pkg.sv tb/tb_fec_top.sv --top-module tb_fec_top
./obj_dir/Vtb_fec_top
```

Replace `tb_fec_top` with any other testbench in `tb/`. `tb/ddr2_mem_model.sv`
is a behavioural DDR2 controller model for simulation: a sparse word array
with random `mem_ready` and a fixed read latency.

**Block testbenches.** These use smaller sizes where that keeps them fast.
Where a rate matters they check it; for example, the link testbench checks
one received word every 8 clocks.

**End-to-end testbench.** `tb_fec_top` runs the top at its default sizes in
a few seconds. It plays the ADC card, the NIM trigger, the trigger card on
the DTC link, the DDR2 controller and an Ethernet receiver. It:

- configures the chip over the command line;
- records eight events and lets three of them become candidates;
- answers the candidates plus one extra event with trigger commands, and
  also asks for an event that was never stored;
- checks every event that arrives on Ethernet, sample by sample, against
  what the ADC sent;
- switches to the bypass route, then turns acquisition off;
- reads the status registers.

Busy triggers, misses, candidates, the bypass and every command type must
all occur, or the run fails.

**Jumbo-frame testbench.** `tb_wl_jumbo` runs the Ethernet path at its
default size. It sends:

- one event of exactly 4486 words;
- one event of 5000 words, which must be split into 4486 + 514 words;
- one short event.

It checks that each full 9000-byte IP packet takes exactly 9026 GMII clocks
(preamble, header, payload and FCS at one byte per clock). It also checks
the checksums and every payload word.

**Link testbench.** `tb_wl_dtc_prbs` sends 40 frames of 256 PRBS-31 words
over the DTC data line without the CRC word. The path is the frame builder,
the serialiser, a wire that shifts the stream by one bit, the deserialiser
and the frame checker. It checks:

- every word arrives intact;
- received words are exactly 8 clocks apart (200 Mb/s);
- frames come every 256 + 259 × 8 = 2328 clocks.

That frame period shows the builder's one limit: it does not take in the
next frame while sending. So a stream of 256-word frames uses about 89 % of
the line.

**Changing the design.** Parameters are at the top of each module, with the
sizes used above as defaults. `fec_top` passes the main ones down. Keep
`EVENT_SAMPLES × NCH + 5` within `SLOT_WORDS`, or events are cut off.
