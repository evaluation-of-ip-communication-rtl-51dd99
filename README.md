# IP packetization datapath for an FPGA camera with a built-in Ethernet switch

A broadcast camera that sends its video over IP, rather than over SDI cables,
needs three things on the FPGA: something that turns raw video payload into
Ethernet/IP packets, something that turns received packets back into payload,
and a switch that shares the 10 Gbit/s optical links among video, control
traffic and devices attached to the camera. This design provides the first
two, and the plumbing between them and a switch core. It adapts bus widths,
crosses clock domains toward the MACs, and keeps the one-cycle pause a 10G
MAC needs after every frame. A test data generator and a packet monitor stand
in for the camera's image chain, so the whole path can run and be measured
without a sensor.

The switch, the 10G Ethernet MACs, the 10GBASE-R PHYs and the SFP+ modules
are vendor parts. They are not included. The top module brings out their
ports.

The design follows the prototype described in F. Lampe, *Evaluation of IP
Communication in FPGA-based Camera Platforms*, TU München, 2017. The module
structure, the header format, the Packetizer's timing and the data widths
come from that work. The internal micro-architecture of every module, the
handshake and the choices listed under "Departures and own choices" below are
this implementation's own.

## Data paths

```
 video transmit   test_data_generator --64--> width_adapter_64to32 --32--> packetizer
                  --32--> width_adapter_32to64 --64--> sw_vid_in_*        (to switch)

 video receive    sw_vid_out_* --64--> width_adapter_64to32 --32--> depacketizer
   (from switch)  --32--> width_adapter_32to64 --64--> packet_monitor

 external port p  sw_eg_*[p] --64--> width_adapter_64to32 --32--> dual_clock_fifo
   (from switch)  (EOP_GAP=1, clk -> mac_tx_clk[p]) --32--> mac_tx_*[p]   (to MAC)

                  mac_rx_*[p] --32--> dual_clock_fifo (mac_rx_clk[p] -> clk)
   (from MAC)     --32--> width_adapter_32to64 --64--> sw_in_*[p]        (to switch)
```

`camera_ip_subsystem` is the top. It has `NUM_EXT_PORTS` external ports (2 by
default, as in the prototype; a production camera would use 3) and one video
port. In the full system the switch would also have a port toward the camera
CPU. The prototype leaves the CPU out, and so does this design.

## Stream convention

Every arrow above is the same kind of packet stream, 32 or 64 bits wide:

| signal  | meaning |
|---------|---------|
| `valid` | the word on `data` is meaningful |
| `ready` | the sink takes the word; a word moves when `valid && ready` |
| `data`  | payload bytes, **first byte in the most significant bits** |
| `sop`   | first word of a packet |
| `eop`   | last word of a packet |
| `empty` | number of unused bytes at the low end of the `eop` word (0 otherwise) |

Network byte order is used from end to end. A header field can therefore be
read off a word in a waveform as printed (`001B21BC` begins with the
destination MAC 00:1B:21:BC:…). No byte swapping is needed anywhere in this
design. A MAC core that presents bytes in the opposite order must be wired to
this order at its boundary.

The shared types are in `rtl/ipcam_pkg.sv`:
- `eth_ipv4_hdr_t`: the 34-byte Ethernet + IPv4 header record.
- `gen_mode_t`: the generator content modes.
- The DSCP code points EF (46) and Best Effort (0).

## Packetizer: header insertion and realignment

This is the part that takes the most care.

The Packetizer holds the header as one 272-bit packed struct. It emits the
header 32 bits at a time, counting bits and ignoring field boundaries. The
header is 14 + 20 = 34 bytes long, which is not a whole number of 32-bit
words. The output therefore goes like this:

- Output words 1 to 8 carry header bytes 0 to 31.
- Output word 9 carries header bytes 32–33 and then payload bytes 0–1.
- Every later output word carries the last two bytes of one input word and
  the first two bytes of the next.
- If the final input word has few enough valid bytes, the packet ends without
  an extra word.

The implementation keeps a *residue* register of up to three bytes. It also
has a small payload FIFO (`BUF_DEPTH` words, 16 by default), which absorbs the
input while the header is being sent. Each output word is
`{residue, head_of_fifo}` shifted by the residue length. The residue length is
`34 mod 4 = 2` throughout a packet. The only exception is at the end, where the
`empty` of the last input word decides whether one more word is needed for the
leftover bytes.

Timing, with the output never stalled:

- A payload `sop` accepted in cycle 0 puts the first header word on `out_*` in
  cycle 2.
- The header takes nine output cycles, the ninth of which is shared with
  payload.
- A packet of P payload bytes leaves in `ceil((34 + P) / 4)` cycles.
- The header record is sampled at `sop`, so changing it mid-packet is
  harmless.

No checksums are computed:
- The IPv4 header checksum is a field of the record and must be configured
  together with the other fields. For fixed traffic it is a constant.
- The Ethernet FCS is appended by the MAC.

`tb_packetizer` replays a worked example with a 26-byte UDP payload (ports
0x17E0/0x17E1). It checks all twelve leading output words, the 2-cycle start
latency and the shared ninth word. In that example the header checksum field
is used exactly as configured (0x25BF), whether or not it is arithmetically
correct for the other fields.

## Depacketizer: stripping without knowing the end

The Depacketizer drops the first `cfg_hdr_len` bytes (any value 0–255). When
`cfg_strip_fcs` is set, it also drops the last four bytes of every packet.

The difficulty is that the receiver only learns a packet has ended when it
sees `eop`. By then it must not have sent the four bytes that turn out to be
the FCS. Payload bytes therefore go into a 16-byte accumulator, and a word is
released only while more than 4 bytes (8 with FCS stripping) are waiting. On
`eop` the module stops taking input (`in_ready` low) for the one or two cycles
it needs to flush the rest. The last word carries the `eop` and the correct
`empty`.

A packet that has no payload left after stripping produces no output at all.

## Clocking

| domain | used by | prototype frequency |
|--------|---------|---------------------|
| `clk` | generator, monitor, adapters, (De)Packetizer, switch side of the FIFOs | 322.265625 MHz |
| `mac_tx_clk[p]`, `mac_rx_clk[p]` | MAC side of each port's FIFOs | the MAC's own clocks |

In the prototype, the 64-bit modules and the switch interfaces run at half the
32-bit clock (161.13 MHz). Here the 64-bit streams stay on `clk` and carry one
word every second cycle. The data rate is the same, and there is one fewer
clock crossing to get right. To move them to a real half-rate clock, put a
dual-clock FIFO where an adapter meets the switch. The switch core's own
internal clock is inside the switch.

`dual_clock_fifo` is a conventional asynchronous FIFO:
- Gray-coded pointers with two-flop synchronisers.
- First-word-fall-through read side.
- `DEPTH` of 64 words by default.

With `EOP_GAP = 1` it leaves one read cycle idle after every word that ends a
packet. This is the pause a 10G MAC needs to append its CRC. The FIFOs toward
the MACs are built this way, so the switch does not need to know about the
rule.

Resets are active low and asserted asynchronously. Each clock domain has its
own reset input.

## Test data generator and monitor

`test_data_generator` emits chunks of `cfg_len` bytes on a 64-bit stream:
- The first 12 bytes come from two 48-bit registers (`cfg_dst_addr`, then
  `cfg_src_addr`). On the IP path these carry a UDP header or similar
  layer-4 fields.
- The rest of the chunk depends on `cfg_mode`:
  - incrementing bytes;
  - a 64-bit xorshift sequence seeded from `cfg_pattern`;
  - `cfg_pattern` repeated.
- After each chunk the generator is idle for exactly `cfg_gap` cycles. This
  sets the offered rate: at 322 MHz, a 1404-byte chunk with a gap of 475
  cycles gives 4.5 Gbit/s of 1442-byte frames.
- `cfg_start` starts a run of `cfg_num_pkts` chunks (0 means endless).
  `cfg_stop` ends the run after the current chunk.

`packet_monitor` always accepts input. It counts chunks, words, payload bytes
and framing errors. A framing error is a word outside a chunk, or a `sop`
inside one. It also keeps the last word it saw.

## Departures and own choices

- **Handshake.** The prototype's vendor interfaces are of the same style:
  start/end flags plus a byte-valid count. Here it is a plain ready/valid
  stream with an `empty` count. Error flags are not carried.
- **Byte order.** Network order everywhere. The prototype had to reorder
  bytes between its MAC cores and its switch. This design needs no such
  rewiring, provided each vendor core is connected in this order.
- **64-bit clock.** The 64-bit side runs on `clk` at half utilisation (see
  Clocking above).
- **Width adapters and FIFOs.** The prototype used vendor cores for these.
  The ones here are minimal equivalents. Each adapter adds one or two cycles
  of latency.
- **Depacketizer trailer.** Whether the trailer is stripped is a
  configuration bit (`cfg_strip_fcs`). It depends on whether the receiving
  MAC forwards the FCS.
- **Header.** Only Ethernet and IPv4 headers are inserted. UDP, RTP and
  HBRMT headers travel as the first bytes of the generator's chunk, through
  the 12 address bytes and the chunk content.
- **Not built** (a MAC/switch model would be needed to run them):
  - Automatic header-length detection in the Depacketizer.
  - Padding of the last chunk of a video frame.
  - A CPU DMA port.
- **Sizes with no source** (assumed):
  - Packetizer buffer: 16 words.
  - FIFO depth: 64 words.
  - Counter widths.
  - The generator's xorshift recurrence.

## Simulating

Everything is plain SystemVerilog-2017 and runs on Verilator 5 (`--timing`).
Each testbench prints `TB_RESULT checks=N failures=M` and finishes. Each also
has a watchdog that ends the run with a failure if the design hangs.

```
verilator --binary --timing -Irtl rtl/ipcam_pkg.sv rtl/*.sv tb/tb_packetizer.sv \
          --top-module tb_packetizer
./obj_dir/Vtb_packetizer
```

| testbench | what it shows |
|-----------|---------------|
| `tb_packetizer` | worked example word by word, start latency, random packets under stalls |
| `tb_depacketizer` | header lengths 0–60, FCS stripping, empty packets, stalls |
| `tb_width_adapter_64to32`, `tb_width_adapter_32to64` | byte-exact conversion, full rate |
| `tb_dual_clock_fifo` | two unrelated clocks, full condition, idle cycle after `eop` |
| `tb_test_data_generator` | all three modes against a reference model, exact pauses, stop |
| `tb_packet_monitor` | counters and framing errors |
| `tb_camera_ip_subsystem` | whole design at default parameters (see below) |
| `tb_throughput` | video transmit path against 10G line rate, paced streams, constant latency |

`tb_camera_ip_subsystem` stands in for the switch and the MACs:
- The packets that the Packetizer hands to the switch are checked byte for
  byte.
- Those packets are then looped back toward the Depacketizer, once with a
  4-byte trailer.
- Random traffic goes through both external ports in both directions, on
  separate clocks.

Each mechanism is counted, and the run fails if any of them never happens:
- Packetizer buffer stall.
- The shared header/payload word.
- Switch backpressure.
- Generator pauses.
- Each content mode.
- Trailer stripping.
- The idle cycle before the MAC.
- A full FIFO.

`tb_throughput` runs the RFC 2544 frame sizes from 64 to 1518 bytes with no
generator pause. The transmit video path needs `ceil((F-4)/4) + 1` cycles per
F-byte frame, against `(F+20)/4` cycles of 10G line time. For example, it
needs 16 against 21 cycles at 64 bytes and 380 against 384.5 at 1518 bytes,
so the path never limits the link. It also sets 3.0 and 4.5 Gbit/s
video-sized streams through the pause register and checks that each rate
comes within 1 %. Finally it sends a flow of 128-byte frames and measures how
long the first word of each chunk takes to go from the generator output to the
switch port. The result is 5 cycles (15.5 ns at 322 MHz), and it must be the
same for every packet of the flow.

## Changing it

- **Header layout.** To add or change a header field, edit `eth_ipv4_hdr_t`
  and `HDR_BYTES` in `ipcam_pkg.sv`. The Packetizer serialises whatever the
  record holds. A header length that is not 2 mod 4 changes the residue
  length, and the realignment handles any value.
- **More external ports.** Set `NUM_EXT_PORTS`. Each port gets its own
  adapters, FIFOs and clock inputs.
- **Vendor cores.** To use a vendor switch or MAC, connect the `sw_*` and
  `mac_*` ports. Keep network byte order at that boundary, or swap bytes in a
  wrapper there.
