# Microphone Array Mark III: FPGA logic

A 64-microphone array for speech capture. It digitises every microphone
at 22.05 kHz (or 44.1 kHz) with 24-bit resolution and streams the samples
to a PC as UDP datagrams over 100 Mbit/s Ethernet. No audio card or DSP
board is needed in the PC. This repository holds the SystemVerilog for
the one FPGA on the array's motherboard. The FPGA does four jobs:

- It clocks 32 stereo delta-sigma converters (PCM1802) and collects their
  serial outputs.
- It packs five sample frames into one 960-byte packet.
- It keeps the last 2048 packets in a 2 MB external SRAM, so that the host
  can ask again for any packet it lost.
- It runs a small network stack: BOOTP to obtain an IP address, ARP
  replies, and a UDP control protocol.

Several arrays can run from one capture clock. One board is the master and
sends its clock and three synchronisation pulses to the others.

## Data path at a glance

```
 32 x DOUT ──► capture ──(1 KB dual-port buffer, packet_ready)──► sram_interface ◄──► 4 x 512Kx8 SRAM
 SCKI/BCK/LRCK ◄─┘   (cap_clk domain)                             │ (two 1 KB halves)
                                                                  ▼
 bootp ─┐                                                 capture_udp_frame
 arp ───┼──► mux4_1 ──► crc32 ──► tx_frame ──► MII TX          │
 response_status ─┘        ▲                                    │
                           └────────── (input 3) ───────────────┘

 MII RX ──► incoming_message ──(512-byte frame buffer)──► read_incoming_message
                                                           │ control, ARP/BOOTP, responses,
                                                           └ old-packet requests
```

`mk3_top` connects the blocks. It also counts seconds and produces the
byte strobe `ce`. It runs the start-up state machine, which sends a BOOTP
request every `BOOTP_RETRY_S` seconds until a reply gives it an address.

### Clock domains

| clock | frequency | used by |
|---|---|---|
| `cap_clk` or `cap_clk_slave` | 33.8688 MHz | converter clocks, deserialisers, capture buffer write side |
| `clk` | 25 MHz | everything else; it is also the MII transmit clock |
| `rx_clk` | 25 MHz from the PHY | MII receive and the frame buffer write side |

Data crosses between domains only through dual-port memories. Each memory
has a one-bit "full" event that is passed across by a toggle and a
three-flop synchroniser (`toggle_sync`). Level controls pass through
two-flop synchronisers (`bit_sync`).

The byte-wide transmit path moves one byte every second `clk` cycle, on
the `ce` strobe, because the MII carries a nibble per clock.

## Capture: converter clocks and the packet buffer

All converter clocks are divided from the 33.8688 MHz capture clock:

| | base rate | `double_frq_ad` = 1 |
|---|---|---|
| LRCK (fs) | ÷1536 = 22.05 kHz | ÷768 = 44.1 kHz |
| BCK (64 fs) | ÷32 = 1.058 MHz | ÷16 = 2.117 MHz |
| SCKI | ÷3 = 11.29 MHz (512 fs) | ÷2 = 16.93 MHz (384 fs) |

The converters run in slave mode with the left-justified 24-bit format.
While LRCK is high, each DOUT line carries the left sample, MSB first,
followed by 8 idle bits. While LRCK is low it carries the right sample.
The FPGA samples DOUT on the rising edge of BCK. After the 24th bit of a
half frame it copies all 32 shift registers into a holding register. It
then writes the 96 bytes into the buffer, one byte per capture clock.

Buffer layout, by byte address:

```
address = frame * 192 + mic * 3 + k      frame 0..4, mic 0..63, k 0..2 (MSB first)
mic     = 2 * line + channel             line = DOUT line 0..31, channel 0 = left
```

The buffer is read as 16-bit words. The byte with the lower address is in
bits 15:8. Exactly these 960 bytes become the data of a UDP packet.

A pulse on `packet_ready` (in the reader's clock domain) marks five
complete frames. The next packet is then written over the same buffer,
starting with frame 0. The reader therefore has one frame period to stay
ahead of the writer: 11.3 µs at 44.1 kHz.

**Start, stop and synchronisation.** A rising `start_capture` makes the
master do two things. It resets the dividers and emits a sync "top" on
`sync_cap_clk_master`. `SYNC_GAP` cycles later it emits a second top and
starts recording. A falling `start_capture` emits the third top and stops
recording. A slave board (`sync_slave` = 1) runs from `cap_clk_slave` and
treats the tops it receives as reset, start and stop in turn. Its
`start_capture_slv` shows that its capture is running.

The divider reset parks the clocks two BCK periods before a frame. The
converters then see LRCK low for one full BCK period before frame 0
begins. Without this pause, the first left word after a reset comes out
shifted. Frame 0 is then complete, and every board records the same
frames.

## SRAM ring and retransmission (`sram_interface`)

The four 8-bit SRAMs act as one 512K × 32 memory. The address is
`{packet number (11 bits), word (8 bits)}`. Each packet fills 240 of the
256 words of its slot. The ring keeps 2048 packets, which is 0.46 s at
22.05 kHz.

For every packet, the block does the following:

1. **Copy.** It copies the packet from the capture buffer into the next
   slot. This costs 4 clocks per 32-bit word: a set-up cycle, a two-cycle
   write pulse (80 ns for 70 ns parts) and a hold cycle. The next capture
   word is fetched during the write. The copy keeps ahead of the capture
   block, which starts overwriting frame 0 right after `packet_ready`.
2. **Read back.** It reads the newest packet back into one half of a
   2 × 1 KB byte buffer (3 clocks per word).
3. **Hand over.** When `capture_udp_frame` is idle, it hands that half
   over with `packet_ready_capture_udp` and the packet number. It then
   fills the other half next time.

Old packets asked for by the host (`request_old_packet`, acknowledged by a
one-cycle `select_request_old_packet`) are read back the same way, with
lower priority than new data. A read-back still running when a new
capture packet arrives is abandoned and restarted after the copy. Captured
data is never lost.

The two-half buffer is what makes 44.1 kHz work. The numbers per packet:

- a packet arrives every 2834.5 clocks;
- sending one frame takes about 2060 clocks;
- copy plus read-back take 1680 clocks.

With one buffer, read-back and transmission would add up to more than a
packet period.

## Network side

### Transmit path

Four frame generators are built on one sequencer (`frame_seq`). Each
raises a request and, once granted, sends its frame one byte per `ce`:

| mux input | generator | frame |
|---|---|---|
| 0 (highest priority) | `bootp` | BOOTP request, 342 bytes, broadcast, ports 68→67 |
| 1 | `arp` | ARP reply, padded to 60 bytes |
| 2 | `response_status` | UDP response, 14-byte payload, padded to 60 bytes |
| 3 | `capture_udp_frame` | data packet, 1006 bytes |

- `mux4_1` grants a new request only when `tx_frame_ready` shows that the
  previous frame and its inter-frame gap are over. It holds the grant
  until the generator drops its request.
- `crc32` appends the inverted CRC-32, LSB first.
- `tx_frame` sends 7 bytes of 0x55, then 0xD5, then the frame as nibbles,
  low nibble first. It then waits a 96-bit gap.

All IP headers have TTL 64 and the DF bit set, and carry a correct header
checksum. The UDP checksum is 0, which means "not computed".

**Data packet payload** (964 bytes, UDP port 32767 to 32767):

| byte | content |
|---|---|
| 0 | 0x86 |
| 1, 2 | packet number (0..2047), low byte first |
| 3 | reserved (0) |
| 4..963 | the 960 sample bytes in the buffer layout above |

The IP identification field also carries the packet number. Packets go to
the MAC and IP address of the computer that last switched capture on.

### Receive path and control protocol

`incoming_message` accepts frames addressed to the array's MAC address or
to broadcast. A frame must be at least 64 bytes long and have a good FCS,
checked by its residue. The frame is stored (up to 512 bytes) in a dual-port
memory, and `recv_packet` is raised in the `clk` domain.

`read_incoming_message` then reads the first 64 bytes and decodes three
kinds of frame:

- **ARP request** for the array's IP address: triggers the ARP reply.
- **BOOTP reply** (UDP to port 68, op 2) carrying the array's transaction
  id: its `yiaddr` becomes the array's address.
- **Control request**: UDP to port 32767 at the array's address. Byte 1 is
  the request number. Bytes 2-3 hold the argument, low byte first. On/off
  requests treat a non-zero low byte as "on".

| req | meaning | answer (type, value) |
|---|---|---|
| 01 | slave mode on/off | none |
| 02 | slave status | 2, 1 if slave |
| 03 | array ID | 3, MAC address bits 9:0, plus an 8-character version string in payload bytes 6-13 |
| 04 | capture on/off; "on" makes the sender the data destination | none |
| 05 | capture status | 5, 1 if capturing |
| 06 | resend packet N (bytes 2-3) | error if capture is off |
| 07 | double sampling rate on/off | none |
| 08 | rate status | 7, 1 if doubled |
| 09 | resend packets first (bytes 2-3) to last (bytes 4-5) | error if capture is off |

The response payload has the type in byte 0 and the 10-bit value in bytes
2 (bits 7:0) and 3 (bits 9:8). The error response has type 6 and value
0x06E (ASCII 'n').

While the ARP or response generator is busy, a newly received frame is
dropped. A range request without an end, or with an end below its start,
resends one packet. A second 06/09 that arrives while a range is still
being served is ignored.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `mk3_top` | `CLK_HZ` | 25 000 000 | system clock, sets the length of a second |
| `mk3_top` | `BOOTP_RETRY_S` | 4 | seconds between BOOTP requests until a reply arrives |
| `capture` | `SYNC_GAP` | 4 | capture clocks between the reset and start tops |
| `sram_interface` | `ACC_CYCLES` | 2 | SRAM write pulse and read access, in `clk` cycles |
| `tx_frame` | `IFG_CLKS` | 24 | inter-frame gap in nibble clocks |

The fixed numbers of the format are in `mk3_pkg`:

- channel count, bytes per frame, payload sizes;
- port numbers, packet type 0x86;
- the BOOTP transaction id and the version string.

`mk3_pkg` also holds the CRC-32 step and the header-building functions.

## Files

- `rtl/mk3_top.sv` is the top level. One block per file:
  - `capture`, `sram_interface`;
  - `capture_udp_frame`, `bootp`, `arp`, `response_status`;
  - `mux4_1`, `crc32`, `tx_frame`;
  - `incoming_message`, `read_incoming_message`.
- Helpers:
  - `frame_seq` is the request/grant/byte-index sequencer that all the
    generators share;
  - `dpram` is a dual-port RAM with a registered read;
  - `bit_sync` and `toggle_sync` are the synchronisers.
- `tb/tb_<block>.sv` holds one self-checking testbench per block.
  - `tb_mk3_top` runs the whole design end to end with a short "second".
  - `tb_mk3_full` runs the top at its default parameters.
- Shared testbench parts:
  - `tb_util_pkg` has the reference CRC, frame builders and the expected
    value of every sample;
  - `pcm1802_model` is the converter's serial output;
  - `sram_model` is the asynchronous SRAM. It counts write-timing
    violations.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. It also
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/mk3_pkg.sv tb/tb_util_pkg.sv tb/tb_mk3_top.sv \
    --top-module tb_mk3_top -o sim
obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_mk3_top` with any other testbench name. Variables start at
random values (`+verilator+rand+reset+2`), so the tests also show that
reset initialises everything that matters.

### What the testbenches check

- **`tb_capture`**
  - The LRCK, BCK and SCKI periods at both rates.
  - Every sample of several packets. Each converter model sends a word
    that encodes its line, its channel and a frame counter.
  - Packet period, sync pulses and stop.
  - A slave board clocked and synchronised by the master.
- **`tb_sram_interface`**
  - The slot contents in the SRAM model and the read-back buffer.
  - The per-packet clock budget.
  - Blocking while the frame generator is busy, old packets, and an
    interrupted read-back.
- **Generator testbenches**
  - Every byte, compared with a frame built independently (headers, IP
    checksum, padding).
- **`tb_crc32`, `tb_tx_frame`, `tb_mux4_1`**
  - FCS values, preamble and nibble order, inter-frame gap, grant rules
    and random request patterns.
- **`tb_incoming_message`**
  - Address filtering, broadcast, a bad FCS, runt frames and the memory
    contents.
- **`tb_read_incoming_message`**
  - Every request, both error responses, the busy-drop rule, ARP, and
    BOOTP with a right and a wrong transaction id.
- **`tb_mk3_top`** runs the whole system:
  - BOOTP request, a retry after 4 "seconds" and the reply;
  - ARP;
  - all status requests and the error response;
  - capture at 22.05 kHz and 44.1 kHz, with every sample of every packet
    checked, packet numbers and frame counters continuous, and intervals
    of 5669 and 2834.5 clocks;
  - a single old packet and a range of five, both compared with the
    originals; while the range is resent, live packets are delayed by less
    than one period and none is lost;
  - slave capture driven by external sync pulses.

  The testbench counts each mechanism and fails if one never happened.
- **`tb_mk3_full`**
  - At the default 25 MHz parameters: BOOTP, capture on, and four data
    packets checked.

## Design decisions to be aware of

The description this design follows gives each block's interface and
function, but little of its insides. The following points are this
design's own choices:

- **Clocking.**
  - The original implementation ran the SRAM side on a half-rate clock
    and a 90° clock. Here everything except capture and MII receive runs
    on one 25 MHz clock with a byte strobe.
  - The capture clock multiplexer is written as plain logic. On an FPGA
    it belongs in a clock-buffer multiplexer.
- **Throughput.**
  - The two-half read-back buffer, the prefetching copy, the priority
    order in `sram_interface` and the fixed priority of `mux4_1` are not
    in the original description. They are what lets 44.1 kHz run without
    dropped packets.
- **Formats not given in detail.**
  - The byte order of the packet number.
  - The IP header fields.
  - The response payload layout, which matches the host control program.
  - The BOOTP transaction id and the version string.
  - The doubled-rate SCKI of 384 fs.
- **Filtering and decoding.**
  - Broadcast frames are accepted, because ARP and BOOTP need them.
  - Frames under 64 bytes are dropped.
  - Request arguments are taken low byte first.
- **Ports.**
  - Status outputs replace the board LEDs.
  - `read_incoming_message` takes the array ID as an input.
  - `incoming_message` has a reset.
  - The SRAM data bus is split into in, out and enable.

Not included:

- the PHY management (MDC/MDIO) interface, which the board does not use
  because the PHY auto-negotiates;
- the analog parts of the boards (preamplifiers, converters, regulators,
  oscillators, clock buffers). Only their digital interfaces appear, as
  top-level ports and testbench models.

The design has been verified in simulation only. Nothing here was checked
on hardware timing or on the original board.
