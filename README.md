# sTGC DAQ prototype: FPGA readout logic for two VMM2 front-end chips over Gigabit Ethernet

This is the FPGA logic of a small data-acquisition board for small-strip
Thin Gap Chamber (sTGC) test stands. Two VMM2 front-end ASICs, connected as a
daisy chain, digitise the charge pulses of the chamber strips. A host computer
controls the board over Gigabit Ethernet. The FPGA in between does four jobs:

1. It decodes command frames from the host, and answers status requests.
2. It shifts the configuration bit sequence into both VMM2s.
3. It provides the chips' bunch-crossing clock `ckbc`. The source is either an
   internal divider or a 40 MHz clock brought in on a mini-SAS connector.
4. It reads the hits the chips send on their data lines. It packs them 15 at a
   time into Ethernet packets and sends them to the host. In external-trigger
   mode, each hit is followed by a 3-byte event number counted from the trigger
   input on the same connector.

The Ethernet MAC, the PHY chip, the VMM2s themselves, the configuration flash
and the connector are outside this RTL. The top level therefore exposes the
MAC's user side as two byte streams, and the chip and connector signals as
plain ports.

```
   Ethernet MAC (outside)   rx byte stream                       tx byte stream
        ───────────────────────► cmd_decoder                          ▲
                                  │   │   │  status request          │
                     config bytes │   │   └──────────────► status_tx ┘
                                  ▼   │ mode, run, reset,      ▲ data packets
                         vmm2_config  │ host MAC               │
            ckdt,cktk,di ◄──────┘     ▼                        │
                                     data_upload ──────────────┘
                                      ├─ vmm_synch x2   ◄── vmm_data0/1[1:0]
  ckbc_ext (40 MHz) ──► ckbc_sel      ├─ event_id       ◄── ext_trigger
                          │ ckbc ────►├─ fifo_ctrl  (builds packets)
                          ▼           └─ sync_fifo  (4096 x 9)
                      to both VMM2s
```

## Host commands

The host sends Ethernet frames without preamble and FCS, in this order:
destination MAC (6 bytes), source MAC (6 bytes), a 2-byte *token*, then the
payload. Multi-byte fields are sent MSB first.

The token does one of two jobs:

- A token **above 1000** marks the frame as a command. The token value is the
  command code.
- A token of 1000 or less is an ordinary length. Such frames are ignored and
  counted in `status.ignored`.

The board only accepts frames sent to its own address (parameter `MY_MAC`) or
to the broadcast address. Frames sent to any other address are also counted in
`status.ignored`.

| token | command | payload | effect (in the cycle after the last byte) |
|------:|---------|---------|--------------------------------|
| 1001 | reset  | any | one-cycle reset of the whole data path: FIFO, packet builder, event counter, drop counters. Also stops the run |
| 1002 | config | configuration bytes, byte 0 first | bytes are written into the 404-byte configuration memory as they arrive. At the end of the frame the shift-out starts |
| 1003 | mode   | byte 0: bit 0 = external-trigger mode, bit 1 = `ckbc` from the external clock | updates the mode register |
| 1004 | start  | any | `run` = 1 |
| 1005 | stop   | any | `run` = 0. Hits that arrive while stopped are discarded |
| 1006 | status | any | the board replies with a status frame (see *Status*) |

A command needs at least one payload byte. Real frames are padded to the
Ethernet minimum of 60 bytes anyway.

Every command also stores its source MAC as `host_mac`. Data packets are
addressed to that MAC, so the board replies to whichever computer commanded it
last.

## Data packets

`fifo_ctrl` writes each packet straight into the byte FIFO. The ninth FIFO bit
marks the last byte of a packet. The packet layout:

| bytes | content |
|-------|---------|
| 0–5   | host MAC (destination) |
| 6–11  | board MAC `MY_MAC` (source) |
| 12–13 | token = payload length: 75 in self-trigger mode, 120 in external-trigger mode |
| 14…   | 15 hit records |

Each hit record has 5 bytes, plus 3 more in external-trigger mode:

```
byte 0   {3'b000, vmm, hit[35:32]}       (hit[35:32] = chan[5:2])
byte 1-4 hit[31:0], MSB first
byte 5-7 event ID[23:0], MSB first        (external-trigger mode only)

hit[35:0] = {chan[5:0], pdo[9:0], tdo[7:0], bcid[11:0]}
```

The hit fields are:

- `chan`: channel number 0–63.
- `pdo`: the 10-bit peak amplitude.
- `tdo`: the 8-bit peak timing.
- `bcid`: the chip's 12-bit Gray-coded bunch-crossing counter. It is passed on
  without conversion.
- `vmm`: 0 for the first chip of the chain (VMM2-1), 1 for the second.

The trigger mode is latched when a packet is opened, so a packet never mixes
the two record sizes.

**When a packet may be sent.** The transmit side offers a packet to the MAC
only after all of its bytes are in the FIFO. A frame then goes out without
gaps at one byte per cycle, as long as `tx_ready` stays high. A count of
complete packets, fed by `pkt_done` and reduced by each sent last byte,
controls `tx_valid`.

**Overflow.** The first hit of a new packet opens it only if the FIFO has room
for the whole packet: 89 or 134 bytes. If it does not, that hit is dropped and
`status.dropped` counts it. Once a packet is open, its remaining hits always
fit. The default FIFO of 4096 entries, plus the output register, holds 46
self-trigger packets.

**Order.** When both chips have a hit waiting, they are taken in round-robin
order. Hits from one chip always keep their order.

## VMM2 signalling

**Configuration** (`vmm2_config`). The memory contents are shifted out as one
bit sequence of `CFG_BITS` bits: byte 0 first, MSB first within each byte.

1. For each bit, `di` is set while `ckdt` is low for `HALF` clk cycles.
2. `ckdt` is then high for `HALF` cycles. The chips shift on its rising edge.
3. After the last bit, `cktk` is high for `HALF` cycles. This latches the
   sequence in both chips.

Because of the chain, the first bits sent end up in the far chip (VMM2-2), and
the last `CFG_BITS/2` bits end up in VMM2-1.

At 160 MHz and `HALF` = 4, the 3232 bits take about 162 µs. `status.cfg_busy`
and `status.cfg_done` show progress.

The line roles, the bit order and the chip length of 1616 bits are this
design's reading of the chip interface. Adjust `CFG_BITS` and `vmm2_config` if
your chip revision differs.

**Hits** (`vmm_synch`). Each chip has two data lines. In this design a chip
sends a hit as a frame on its lines, synchronous to `ckbc`:

1. The lines are idle low.
2. One `ckbc` cycle has both lines high. This is the start marker.
3. The next 18 cycles carry two bits each: `data1` the higher bit, `data0` the
   lower, most significant pair first.

The chip changes the lines on the falling edge of `ckbc`. The FPGA samples them
at the rising edge. A hit therefore takes 19 `ckbc` cycles (475 ns at 40 MHz),
and the two chips can send at the same time.

This frame format is this design's choice. The FPGA sees the two lines, but the
line protocol of the real chip is not reproduced here. It is the first thing to
check before connecting real hardware. `tb/vmm2_model.sv` implements the same
format from the chip side.

## Clocks and synchronisation

All logic runs on one clock, `clk`. The intended clock is 160 MHz: with
`CKBC_DIV` = 4 this gives a 40 MHz internal `ckbc`.

`ckbc`, the chip data lines and the external trigger pass two flip-flops each
into the `clk` domain. `vmm_synch` detects the rising edge of the synchronised
`ckbc` and takes the data bits sampled in the same cycle. This needs `clk` to
be at least about three times the `ckbc` frequency.

The trigger must be high and low for at least two `clk` cycles to be counted.
The event counter is 24 bits wide and wraps.

`ckbc_sel` picks the `ckbc` source with a plain multiplexer. A switch of
source can therefore produce one short pulse on `ckbc`. On an FPGA, replace it
with the device's glitch-free clock-buffer multiplexer.

If the design is run at the 125 MHz of a GMII MAC, use `CKBC_DIV` = 4 (31.25
MHz internal `ckbc`) or the external 40 MHz clock. That keeps the ratio above
three.

## Status

`daq_top.status` (`daq_pkg::daq_status_t`, 109 bits) holds the following. It
is brought out as a port, and the host can also read it over the link:

- the mode bits, `run`, and the configuration busy and done flags;
- the current event ID;
- counters of dropped hits, lost hits, sent packets, executed commands and
  ignored frames.

A *lost* hit is one that a synchroniser had to overwrite because the previous
hit had not been taken yet. This cannot happen at the default rates.

**Status reply** (`status_tx`). The status command (token 1006) makes the board
send one 60-byte frame, laid out as follows:

- host MAC, board MAC;
- token 1006;
- the status word, zero-extended to 14 bytes, MSB first;
- zero padding.

The reply carries a token above 1000, so the host can tell it from a data
packet, whose token is a length. `status_tx` sits between `data_upload` and the
Ethernet core and never splits a frame. At a frame boundary a waiting reply
goes first, then the next complete data packet. The status word is copied when
the reply starts. Requests that arrive while a reply is still waiting are
answered together by one reply.

## Parameters

| parameter (daq_top) | default | meaning |
|---|---|---|
| `MY_MAC` | `48'h000A35000001` | board address |
| `CFG_BITS` | 3232 | configuration bits of the whole chain (2 × 1616) |
| `CFG_HALF` | 4 | clk cycles per half period of `ckdt`/`cktk` |
| `FIFO_DEPTH` | 4096 | FIFO words (one 36 Kb block RAM as 4K × 9) |
| `CKBC_DIV` | 4 | clk cycles per internal `ckbc` period |

The following values are fixed by the data format and are set in `daq_pkg`:

- 15 hits per packet;
- 36-bit hits;
- 3-byte event IDs;
- the 1000 token threshold;
- the command codes.

## What comes from the source description and what does not

The following are taken from the description of the prototype:

- the block structure;
- the configuration state machine on `ckdt`/`cktk`/`di`;
- the two data lines per chip and the synchroniser;
- the trigger-driven event counter;
- the FIFO control and the FIFO;
- a command and status register reached over Ethernet;
- 15 events per packet;
- the 3-byte event ID after each event in external-trigger mode;
- the token rule (above 1000 a command, otherwise a length);
- the 40 MHz external clock option;
- the hit field widths: 64 channels, 10-bit amplitude, 8-bit timing, 12-bit
  Gray counter.

The following are choices made here:

- the command codes and payloads;
- the hit frame on the data lines and the configuration line timing;
- the byte layout of a hit record;
- whole-packet space reservation and dropping;
- round-robin arbitration;
- the status command and the reply frame;
- all sizes not listed above.

The description also gives a hit size of 35 bits. That does not match its own
field widths, which add up to 36 bits. This design uses 36.

The description also mentions 1422 bytes of data per packet. That cannot be
matched with 15 events of this size, so packets here carry exactly 15 hit
records (75 or 120 bytes).

The host GUI of the prototype is not part of this RTL.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The testbenches use two shared helpers:

- `tb/vmm2_model.sv`: a behavioural VMM2 with a configuration shift register
  and a hit sender.
- `tb/tb_util.svh`: frame and packet builders, included into the testbenches.

`tb_daq_top` runs the whole design at its default parameters and checks every
packet byte by byte. It runs these steps in order:

1. configure the 3232-bit chain;
2. two self-trigger packets, with random transmit back-pressure;
3. external-trigger packets, first with the internal `ckbc` and then with the
   external one;
4. ignored frames, then a status read with every field checked;
5. a FIFO overflow, holding `tx_ready` low for 700 hits, and a status read
   while the 46 buffered packets drain;
6. stop;
7. reset.

It takes a few seconds.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb rtl/daq_pkg.sv tb/tb_daq_top.sv --top-module tb_daq_top
./obj_dir/Vtb_daq_top
```

Replace `tb_daq_top` to run any other testbench. The simulator must support
`--timing`: the testbenches use delays and a `fork`/`join` in the chip model.

The RTL is synthesizable SystemVerilog-2017. The FIFO and the configuration
memory are written as arrays with synchronous read, so they map to block RAM.
