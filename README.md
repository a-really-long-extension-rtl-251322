# NES remote play over UDP: a really long extension cord

Two FPGA boards let someone play an NES console that sits somewhere else.
The board next to the console (the **N-side**) films the TV picture with a
camera and sends it out line by line. The board next to the player (the
**R-side**, for remote) shows that picture on a VGA monitor. It also reads
a real NES controller and sends the button state back. The N-side then
plays the part of a controller towards the console.

Both directions use the same hand-written network stack: UDP over IPv4 over
100 Mb/s Ethernet, through a 2-bit RMII PHY interface. There is no CPU and
no vendor MAC. Every header, checksum and CRC is produced or checked in
logic, as the bytes stream past.

```
  camera ──► linebuffer ──► net_tx ══ Ethernet ══► net_rx ──► pixel_decoder ──► framebuffer ──► VGA
  (N-side)                                                      (R-side)          ▲ vga_timing
  NES console ◄── nes_ctrl_emulator ◄── ctrl_rx_check ◄── net_rx ◄══ Ethernet ══ net_tx ◄── ctrl_repeat_tx ◄── nes_ctrl_reader ◄── NES controller
```

`nes_link_top` holds both boards side by side: `n_fpga` and `r_fpga`.
Each board's RMII pins are brought out, because the network between the
boards is not part of the design. For a direct cable, connect `n_eth_tx*`
to `r_eth_rx*` and `r_eth_tx*` to `n_eth_rx*`.

Clocks:

- `clk`: 50 MHz, the RMII reference clock. Each board's network stack and
  controller logic run on it.
- `cam_clk`: 16.67 MHz, the camera pixel clock.
- `vga_clk`: 65 MHz, for 1024×768 at 60 Hz.

## Fixed addresses

There is no ARP and no configuration. Every frame goes to the broadcast MAC
address. Each receiver filters by IPv4 destination address.

| | N-side | R-side |
|---|---|---|
| IPv4 address | 10.0.0.1 | 10.0.0.2 |
| source MAC | 02:00:00:00:00:01 | 02:00:00:00:00:02 |
| UDP source and destination port | 4660 | 4660 |

All of these are parameters of `n_fpga`, `r_fpga`, `net_tx` and `net_rx`.

## Sending a frame without stopping: `net_tx`

The hardest part of the design is the transmit stack. Two rules from the
standards pull against each other:

- An RMII transmitter must produce a dibit on every cycle, from the
  preamble to the end of the FCS.
- Both checksums are sent *before* the data they cover:
  - the IPv4 header checksum covers the header, whose last 8 bytes are the
    addresses, which come after the checksum field;
  - the UDP checksum covers the UDP header and the data, and
  - it also covers a pseudo-header with the addresses and the length.

`net_tx` gets around this by doing all the summing that depends on
"future" bytes beforehand.

1. **Fill.** While `ready` is high, the application writes its datagram
   as 16-bit words.
   - Each word goes into the send buffer `data_store` (320×16).
   - At the same time it goes into `data_ck_sum`. That block keeps the
     running one's-complement sum of the words and the byte count.
2. **Start.** The word marked `axii_last` ends the fill. The next cycle
   starts the frame.
   - By then the data sum and the length are known.
   - The address part of both checksums is a constant (`ADDR_SUM`,
     worked out at elaboration from the two IP addresses).
3. **Send.** `tx_pre_mux` takes bytes from these sources in turn:
   - the Ethernet header source `ether_tx` (preamble, SFD, broadcast
     destination, own MAC, EtherType 0x0800);
   - the IPv4 header source `ip_tx`;
   - the UDP header source `udp_tx`;
   - the data buffer;
   - then zero padding, up to the 60-byte Ethernet minimum.

   Each byte leaves as four dibits, least significant first. Meanwhile:
   - `ip_ck_sum` adds up the IPv4 header words, starting from the address
     sum. By the time the checksum field is due, all ten header words are
     accounted for. The address bytes that are still to come are already
     inside `ADDR_SUM`, so the checksum field can be sent as soon as it is
     reached.
   - `transport_ck_sum` starts from address sum + data sum + UDP length.
     It then adds the ports and the length field as they go out, and has
     the UDP checksum ready when its field is reached. A computed 0 is
     sent as 0xFFFF (RFC 768).
4. **FCS and gap.** `crc32_bzip2` runs over every symbol after the SFD.
   - `tx_out_mux` then appends the complemented CRC, bit 31 first
     (16 dibits).
   - It then holds the line idle for the 96-bit inter-frame gap
     (48 cycles).
   - `ready` returns after the gap.

Each header source is a small state machine whose states are the header
fields. Both the IPv4 transmitter and the receiver use these field states.
The transmitted IPv4 header fields:

- version 4 and IHL 5;
- TTL 64;
- Don't Fragment set;
- protocol 17;
- an identification number that counts up per packet.

**Timing.** The frame's `txen` rises 5 cycles after the clock edge that
accepts the last word. A datagram of *d* data bytes occupies
(22 + 20 + 8 + max(*d*, 18) + 4) × 4 cycles on the wire, plus 48 cycles
of gap. The video and controller datagrams work out as follows:

| Datagram | Data bytes | Frame length | Frame time with gap | Rate |
|---|---|---|---|---|
| Video line | 640 | 2776 cycles | 56.5 µs | up to ≈17,700 lines/s |
| Controller | 2 (frame padded to 60 bytes) | 288 cycles | 6.7 µs (6.8 µs back to back, including the fill and start latency) | up to ≈146,000 datagrams/s |

## Receiving: `net_rx`

Receiving is a chain of layers. Each layer passes its payload bytes up with
a valid strobe:

- **`ether_rx`** waits for preamble dibits and the end of the SFD.
  - It checks the FCS with a running CRC. When the whole frame, FCS
    included, has been shifted in, the register must hold the constant
    residue 0xC704DD7B.
  - It drops the 14-byte MAC header. It does not filter MAC addresses.
  - The receiver cannot see where the FCS starts until the carrier drops.
    So the payload is held back by 4 bytes, and the FCS is never passed
    up.
  - At the end of the carrier it pulses `done`, plus `kill` for a bad
    FCS or a frame that is not a whole number of bytes.
- **`ip_rx`** walks the 20-byte header through one state per field.
  - It adds the header words in one's complement as they arrive.
  - It enters `INVALID` if any of these hold:
    - the version is not 4, or IHL is not 5;
    - the packet allows fragmenting (DF clear);
    - the protocol is not UDP;
    - the destination is not its own address;
    - the checksum sum is not 0xFFFF.
  - From `INVALID` nothing is passed up until the frame ends.
  - Otherwise it passes up the total length minus 20 bytes. Ethernet
    padding is therefore never taken for data.
- **`udp_rx`** drops the 8-byte header and passes up `length − 8` bytes.
  - It signals `complete` when they have all arrived.
  - It signals `kill` for a length below 8.
  - The UDP checksum is not checked.
- **`rx_data`** packs the bytes into 16-bit words in a 320-word buffer.
  - At the end of the frame, a frame is **committed** only if all of
    these hold:
    - no layer killed it;
    - UDP was complete;
    - nothing overflowed.
  - A committed frame is read out as one word per cycle.
  - Any other frame is forgotten and counted in `frames_bad`.

The Ethernet `done`/`kill` pulses come straight from the wire, so they are
early. They are delayed by 3 cycles so that they reach `rx_data` after the
last payload byte has passed the IP and UDP register stages. Only a whole,
checked datagram ever reaches the application. A corrupted frame costs its
datagram and nothing else.

## Video path

**`linebuffer` (N-side).** The camera writes 16-bit RGB565 pixels on
`cam_clk`. The buffer has two 320×16 RAMs used in turn:

- One RAM fills while the other is read out on the 50 MHz side into
  `net_tx`.
- Only the hand-over crosses clock domains. Each side owns one toggle and
  passes it to the other through a two-flop synchroniser: "line full" goes
  one way and "line read" comes back.
- Reading stalls while `net_tx` is busy sending the previous line.
- If a camera line completes while the previous full line is still waiting
  to be read, the new line is dropped and counted (`lines_dropped`). The
  RAM it was written into is reused, so the waiting line is never
  overwritten.

The camera needs about 19 µs to deliver a line, and sending one takes
56.5 µs. So a camera that sends lines back to back loses lines, and one
with enough horizontal blanking loses none.

**`pixel_decoder` (R-side)** keeps the top four bits of each colour:
`{R[4:1], G[5:2], B[4:1]}`.

**`framebuffer` (R-side)** is a 76,800×12 two-clock RAM.

- It is written on `clk` at a counter that advances once per pixel and
  wraps after 320×240 pixels.
- It is read on `vga_clk` at `vcount*320 + hcount`.
- The picture sits unscaled in the top-left corner of the 1024×768
  screen. Outside it the output is black.

Lines carry no line number, so the placement depends only on how many
pixels have arrived. **A lost line therefore shifts the rest of the picture
up by one line until the counter wraps.** The counter wraps after one
picture's worth of pixels, so the shift persists rather than healing at
the next picture.

**`vga_timing`** runs 1344×806 counters with negative sync pulses, for
1024×768 at 60 Hz with a 65 MHz clock. `r_fpga` delays the syncs and the
blanking by one cycle to line them up with the registered RAM output.

## Controller path

**`nes_ctrl_reader` (R-side)** acts as the console towards a real
controller, `POLL_HZ` (60) times a second:

1. a 12 µs latch pulse;
2. 6 µs later, eight clock pulses, each 6 µs low and 6 µs high;
3. the data line is sampled in the middle of each low half.

The button bits are collected with A in bit 7. A high data line is taken as
"pressed". It flags `changed` when the state differs from the last poll
(and after reset).

**`ctrl_repeat_tx` (R-side).** The network may corrupt or lose single
packets. So for every change, the state is sent in 20 separate datagrams.
Each datagram carries one 16-bit word holding the state twice,
`{state, state}`.

**`ctrl_rx_check` (N-side)** accepts a word only when its two bytes agree.
It then holds that state until a different good word arrives. It counts
`accepted` and `rejected`.

**`nes_ctrl_emulator` (N-side)** acts as a controller towards the console:

- While latch is high it drives the first button.
- On each rising edge of pulse it shifts to the next button.
- Latch and pulse come from another clock domain, so they are synchronised
  first.

At 60 polls per second and 20 copies per change, the controller traffic
peaks at 1200 datagrams per second. That is under 1% of the link.

## Where this design departs from, or fills in, the source

- **Pixels travel as 16 bits.** The send and receive buffers are
  320×16, so one line is 640 data bytes in a 668-byte IPv4 packet. That
  is above 576 bytes, the size every IPv4 host must accept without
  fragmentation. This does not matter on a direct cable, but a routed
  path could fragment such packets, and this receiver rejects fragments.
  Packing the pixels as 12 bits (480 bytes) would need a different
  buffer layout.
- **Buffer depth 320.** One block diagram of the original shows the
  send buffer as 256×16. 320 is used so that a whole line fits.
- **IPv4 field sizes** follow RFC 791 (protocol 1 byte, header checksum
  2 bytes).
- **Every IPv4 check is enforced on receive.** This includes Don't
  Fragment and the header checksum. The UDP checksum is generated on
  transmit but not checked on receive.
- **No MAC filtering.** Frames are addressed to broadcast and every
  frame is passed to IP.
- **Reset.** Every block uses a synchronous, active-high reset in its
  own clock domain.
- **Handshakes** are choices of this implementation:
  - the valid/ready hand-over from the line buffer to `net_tx`;
  - the 3-cycle delay of `done`/`kill` in `net_rx`;
  - the one-word controller datagram.
- **Not implemented:**
  - 4-bit (MII-style) Ethernet: only the 2-bit RMII interface is built;
  - ARP and routing;
  - the camera, console, controller, PHY and TV themselves. The
    testbenches model the controller (`tb/nes_controller_model.sv`) and
    the RMII wire (`tb/rmii_bfm.sv`).

## Files

| Area | Modules (`rtl/`) |
|---|---|
| shared | `nes_net_pkg` (constants, one's-complement helpers), `crc32_bzip2` |
| receive stack | `ether_rx`, `ip_rx`, `udp_rx`, `rx_data`, `net_rx` |
| transmit stack | `ether_tx`, `ip_tx`, `ip_ck_sum`, `udp_tx`, `transport_ck_sum`, `data_store`, `data_ck_sum`, `tx_pre_mux`, `tx_out_mux`, `net_tx` |
| video | `linebuffer`, `pixel_decoder`, `framebuffer`, `vga_timing` |
| controller | `nes_ctrl_reader`, `ctrl_repeat_tx`, `ctrl_rx_check`, `nes_ctrl_emulator` |
| boards and top | `n_fpga`, `r_fpga`, `nes_link_top` |

Every file opens with a comment on what the module does, its interface and
its timing. The comment also says which parts follow the original design
and which are choices made here.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
ends by printing `TB_RESULT checks=N failures=M`. The testbenches share:

- `tb_net_pkg`: reference CRC, checksum and frame builders written
  independently of the RTL;
- `rmii_bfm`: an RMII driver and monitor;
- `tb_common.svh`: the check macros.

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_net_tx -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/nes_net_pkg.sv tb/tb_net_pkg.sv tb/tb_net_tx.sv
./obj_dir/Vtb_net_tx
```

The time unit matters: the testbenches write their delays in ns.

Three testbenches go beyond single blocks.

**`tb_nes_link_top`** runs the complete system with the controller poll sped up
so that controller changes come quickly. It forces every mechanism at
least once and counts it:

- a line-buffer stall, and two dropped camera lines;
- a frame whose FCS fails (a bit flipped on the cable);
- a forged frame with mismatched copies;
- a forged frame to a wrong IP address;
- padded controller frames;
- two bursts of 20 controller datagrams;
- console reads through the emulated controller.

It then checks the frame buffer against exactly the lines that arrived
intact.

**`tb_nes_link_full`** runs `nes_link_top` with every parameter at its
default:

- a whole 320×240 camera picture crosses the link;
- one complete VGA refresh is compared pixel by pixel (all 1024×768);
- one button change goes through the real 60 Hz poll, 20 copies and the
  console read.

It simulates about 50 ms of time, which takes about 10 s.

**`tb_ctrl_traffic`** joins a transmitting stack to a receiving stack and
offers 50 controller datagrams back to back. Each one must arrive and be
accepted with its state. Each frame must be exactly 288 cycles on the
wire, and each datagram must take at most 350 cycles, start to start
(341 measured). At that period, 20 copies take well under one 60 Hz poll
period.
