# Uncompressed HD-SDI video over 10 Gb Ethernet, one row per packet

This RTL moves several uncompressed HD-SDI video channels across a 10 Gb
Ethernet link with very little delay. Each input uses the same idea: drop the
blanking, and send every active picture row as one UDP/IPv4 packet. The
packet's header describes the raster (lines per frame, words per line, active
sizes) and says where the row belongs (channel, frame, line). The receiver
needs no other side information. Its frame generator runs a free raster in its
own output clock and fills each active line from the matching packet. A row
that arrives too late is discarded. A row that never arrives becomes a black
line. The picture keeps running either way.

The network side is a small packet-switched core. It has two slots for
processing modules (for example encryption or compression) and three switches
around them. Changing the switch setting turns one device into one of three
things:

| mode | value | path |
|---|---|---|
| network to network | 0 | MAC in → PM2 → PM1 → MAC out (a packet processor in the network) |
| full duplex (reset default) | 1 | video in → PM1 → MAC out, and at the same time MAC in → PM2 → video out |
| video to video | 2 | video in → PM2 → PM1 → video out (local processing, no network) |

Both processing slots can work on one stream. They can also be split between
the two directions. The modules that go in the slots are not part of this RTL:
their packet streams are top-level ports.

## Block diagram

```
 sdi_rx_word[i] ─ sdi_rx_if ─ frame_decoder ─ async_pkt_fifo ─┐   (one chain per input,
   (vid_rx_clk[i])                                            │    own recovered clock)
                                                 pkt_rr_mux ◄─┘
                                                     │ video in
 mac_rx ─ net_if: pkt_classifier ─► VPM ──► pkt_core (3 switches, PM1/PM2 ports)
                        │                      │ net out        │ video out
                        └► RX FIFO ─► bus      ▼                ▼
 mac_tx ◄─ net_if: pkt_rr_mux(2) ◄─ TX FIFO ◄─ bus        output_demux
                                                                │ by channel
 sdi_tx_word[i] ◄─ sdi_tx_if ◄─ frame_generator ◄─ async_pkt_fifo ◄┘
   (vid_tx_clk)
                  plb_bridge: registers, rules, counters, CPU FIFO windows
```

All files are in `rtl/`, one module or package per file.

| file | role |
|---|---|
| `mvtp_pkg.sv` | packet word type, header layout, header and checksum functions |
| `sdi_rx_if.sv` | NRZI decoding and descrambling, word alignment on TRS, F/V/H decoding |
| `frame_decoder.sv` | measures the raster, locks, and packs each active row into a packet |
| `async_pkt_fifo.sv` | store-and-forward, dual-clock packet FIFO that drops whole packets |
| `pkt_rr_mux.sv` | round-robin merge of packet streams, one whole packet at a time |
| `pkt_switch.sv` | 2:1 packet selector used by the core |
| `pkt_core.sv` | the three switches and the mode switch-over |
| `output_demux.sv` | sends each row packet to the output FIFO of its channel |
| `frame_generator.sv` | rebuilds the raster from row packets and fills missing lines with black |
| `sdi_tx_if.sv` | scrambling and NRZI coding for the transmitter |
| `pkt_classifier.sv` | four-rule classifier: video packets to the core, others to the CPU |
| `net_if.sv` | classifier, CPU RX and TX FIFOs, and the transmit merge |
| `plb_bridge.sv` | processor-bus register window |
| `mvtp_top.sv` | the whole device |

## Packet stream and row packet format

All packet streams in the network domain are 64 bits wide and use valid/ready.
A word (`pkt_word_t`) carries:

- `sop` and `eop`;
- `empty`, the number of unused bytes in the last word;
- `data`, with the first byte of the packet in `data[63:56]`.

A video row packet is `7 + ceil(AW/3)` words long:

| word | contents |
|---|---|
| 0–4 | Ethernet II (type 0800), IPv4 (protocol 17, DF set, TTL 64, header checksum computed), UDP header with checksum 0 |
| 5 | `{16'h0000 (UDP checksum), channel[7:0], frame[7:0], line[15:0], active_lines[15:0]}` |
| 6 | `{total_lines, total_words, active_words, 16'h0000}` |
| 7… | payload: three 20-bit `{Y[9:0],C[9:0]}` words per 64-bit word, in bits 59:40, 39:20 and 19:0 |

Words 5 and 6 start 42 bytes into the packet, so the UDP payload begins with a
2-byte pad:

| UDP payload bytes | field |
|---|---|
| 0–1 | pad |
| 2–15 | video header |
| 16… | pixels |

The remaining field meanings:

- `line` counts active rows from 0 at the top of the picture.
- `frame` counts frames modulo 256.
- The lengths are `udp_len = 22 + 8·payload_words` and `ip_len = udp_len + 20`.

Addresses and ports come from registers. The reset values are:

| field | reset value |
|---|---|
| source MAC | 02:00:00:00:00:01 |
| destination MAC | …:02 |
| source IP | 10.0.0.1 |
| destination IP | 10.0.0.2 |
| UDP ports | 5004 → 5004 |

## HD-SDI side

The transceivers themselves are outside this RTL. Each side carries 20
parallel bits per word clock, and bit 0 is the first bit on the line.

- **Transmit** (`sdi_tx_if`):
  - applies the SMPTE 292 coding: scrambler `x^9+x^4+1`, then NRZI `x+1`;
  - one clock of latency.
- **Receive** (`sdi_rx_if`):
  - undoes both codes;
  - searches a 100-bit history at all 20 bit offsets for the TRS preamble (20 ones, then 40 zeros) and locks the word boundary there;
  - reports each TRS on its first word, with the F, V and H bits of its XYZ word;
  - five clocks of latency.

A raster is modelled as follows:

- A frame has lines `0..TL-1`.
- The last `AL` of those lines are active (V=0).
- A line has words `0..TW-1`: EAV on words 0..3, SAV on the four words before the active part, and the active part on the last `AW` words.

### frame_decoder

- **Measuring.** The decoder measures TW, AW, TL and AL from the TRS flags. A frame starts at the first V=1 line that follows a V=0 line.
- **Locking.** After one whole measured frame it locks. From then on every active row becomes a packet.
- **Header timing.** The seven header words go out during words 4..10 of the line.
- **Payload timing.** Payload words leave as they fill. One word is always held back so that the last one can carry `eop` when the next EAV arrives.
- **Losing lock.** A change of format drops the lock until the new format has been measured.
- **Output.** The decoder has no back-pressure. The FIFO behind it absorbs bursts, and it drops whole packets when full.

### frame_generator

The frame generator is the hardest part to follow.

**Locking.** While not running, it discards packets until one with `line = 0`
is at the head of its FIFO. That header sets the raster size and the frame
number. The raster then starts `START_DELAY` lines before the first active
line, so `START_DELAY` (register 008h, default 2) is the buffer depth, in
lines, that absorbs network jitter. It is also the added latency.

The rows waiting for their line sit in the output packet FIFO. So
`START_DELAY + 1` rows must fit in `FIFO_DEPTH`. The default of 4096 words
holds 6 rows of 1080p (647 words each) or 5 rows of 2K (690 words). 6 rows is about 90 µs at 1080p30. Buffering a whole frame (about 30 ms), for a network with
more delay variation, needs a frame-sized FIFO. That means external memory,
which this RTL does not have.

**Matching rows to lines.** While running, the generator compares each packet's
(frame, line) with the next active line it still has to send:

- **Older than that line:** the packet is dropped and `late_count` is counted.
- **The same line:** the packet fills that line.
- **Newer than that line:** the packet waits.
- **More than two frames ahead:** the generator locks again from that packet.

An active line with no packet ready is sent as black (Y 040h, C 200h) and
counted in `miss_count`.

**Limitations.** Only progressive rasters (F=0) are produced. Line-number and
CRC words are not inserted after EAV.

## Clock crossing: async_pkt_fifo

Every clock crossing is a packet FIFO:

- video input clock to network clock;
- network clock to video output clock;
- the two CPU FIFOs in the network clock.

The write side keeps two pointers: a running pointer and a commit pointer. The
commit pointer jumps to the running pointer only when the `eop` word is
written. Only the commit pointer crosses to the reader, Gray coded through two
flip-flops. The reader therefore sees only whole packets and never waits
inside one.

The writer never stalls, because live video cannot wait. A packet that does
not fit is rewound and counted in `drop_count`. A packet whose `sop` arrives
before the previous `eop` is handled the same way. Reads fall through: the
head word is on `rd_data` whenever `rd_valid` is high. The default depth is
4096 words. An output FIFO holds `START_DELAY + 1` rows in steady state.
At 2048 words, 2K rows with a delay of 2 lines already overflow.

## Processing core: pkt_core

Three `pkt_switch` instances set the paths:

- switch 1 feeds PM2 from the network or the video input;
- switch 3 feeds PM1 from PM2 or the video input;
- switch 2 feeds the video output from PM2 or PM1.

PM1's output is always the network output.

When a source is not used by the current mode, its packets are drained and
discarded. An output the mode does not use stays idle.

A newly written mode is taken over only when no packet is in flight on any of
the four core inputs. So a packet is never split across two configurations.
`switch_count` counts switch-overs.

## Network interface: net_if and pkt_classifier

**Receive path.** Received packets go to the classifier. It has four rules,
and each rule has:

- an enable bit;
- two destination flags: "to video processing" and "to CPU RX FIFO";
- three terms, each `(word index 0..7, 64-bit mask, 64-bit value)`.

A term with mask 0 is always true. A packet takes the OR of the flags of every
rule it matches. A packet that matches no rule is dropped and counted.

The decision is made once word 4 has arrived (word 4 holds the UDP
destination port) or at an earlier `eop`. The words wait in an 8-word buffer
in the meantime. After that first wait the classifier passes one word per
clock.

A typical rule set:

| rule | terms | destination |
|---|---|---|
| 0 | word 1 `[31:16]` = 0800, word 2 `[7:0]` = 11h, word 4 `[31:16]` = 5004 | video |
| 1 | word 1 `[31:16]` = 0806 (ARP) | CPU |
| 2 | word 1 = 0800, word 2 protocol = 1 (ICMP) | CPU |

**CPU FIFOs.** The RX and TX FIFOs connect to the CPU through the register
window. Both drop whole packets when full, so a slow CPU cannot stall video.

**Transmit path.** A two-input round-robin merge combines the core's output
and the TX FIFO.

## Register map (plb_bridge)

The bus is a simple strobe/acknowledge bus in the network clock:

- a write or read starts with `bus_wr`/`bus_rd` together with a byte address;
- `bus_ack` follows one clock later;
- read data is valid with `bus_ack`.

| address | register |
|---|---|
| 000 | mode request `[1:0]`; the value 3 is ignored |
| 004 | status: `[1:0]` active mode, `[8+i]` decoder i locked, `[16+i]` generator i running |
| 008 | START_DELAY `[7:0]`, in lines (default 2) |
| 010 / 014 | destination MAC `[47:32]` / `[31:0]` |
| 018 / 01C | source MAC |
| 020 / 024 | source IP / destination IP |
| 028 | `{udp_src, udp_dst}` |
| 300 + 4·k | counter k (see below) |
| 100 + 80h·r | rule r control: `[2]` enable, `[1]` to video, `[0]` to CPU |
| 110 + 80h·r + 20h·t | term t of rule r: +0 word index, +4/+8 mask hi/lo, +C/+10 value hi/lo |
| 400 | RX status: `[31]` word available, `[30]` sop, `[29]` eop, `[26:24]` empty |
| 404 / 408 | RX data hi / lo; reading 408 pops the word |
| 410 | TX control for the next word: `[4]` sop, `[3]` eop, `[2:0]` empty |
| 414 / 418 | TX data hi / lo; writing 418 pushes the word |

The counters are:

| k | counter |
|---|---|
| 0 | classifier drops |
| 1 | RX FIFO drops |
| 2 | TX FIFO drops |
| 3 | output demux bad packets |
| 4 | mode switch-overs |
| 5 + i | input FIFO drops, channel i |
| 5 + N_CH + i | output FIFO drops, channel i |
| 5 + 2·N_CH + i | late rows, channel i |
| 5 + 3·N_CH + i | missing (black) rows, channel i |

The window holds 64 counters, so `N_CH` can grow to 14. The status word shows
lock and running bits for the first eight channels only.

The rules reset to disabled. Software must write at least the video rule
before any network-to-video traffic flows.

Configuration registers are used in the video clock domains without
synchronisers. They are meant to be written while the affected path is idle.
Counters from the video domains are sampled without synchronisation and are
for diagnostics only.

## Top level: mvtp_top

| parameter | default | meaning |
|---|---|---|
| `N_CH` | 8 | HD-SDI inputs and outputs |
| `FIFO_DEPTH` | 4096 | words per row FIFO |
| `CPU_FIFO_DEPTH` | 1024 | words per CPU FIFO |

The ports are:

- one recovered clock, reset and 20-bit word per input (`vid_rx_clk`, `vid_rx_rst_n`, `sdi_rx_word`);
- one output clock shared by all outputs (`vid_tx_clk`), and the 20-bit coded output words;
- the MAC receive and transmit packet streams;
- the two processing-module slots (`pm1_*`, `pm2_*`; connect `in` to `out` for a pass-through);
- the register bus;
- per-channel `dec_locked` and `gen_running`.

## Capacity

At 64 bits per word, a row of AW active words costs `7 + ceil(AW/3)` words.
Another 24 bytes per row go to the Ethernet FCS, preamble and inter-frame gap.
For eight channels against one 10 Gb/s port (64 bits at 156.25 MHz):

| format | words per row | Gb/s per channel | eight channels | fits |
|---|---|---|---|---|
| 2K/24 (2048×1080) | 690 | 1.15 | 9.2 | yes |
| 1080/24 | 647 | 1.08 | 8.6 | yes |
| 1080/25 | 647 | 1.12 | 9.0 | yes |
| 1080/30 | 647 | 1.35 | 10.8 | no: crop needed |
| 720/50 | 434 | 1.01 | 8.1 | yes |
| 720/60 | 434 | 1.21 | 9.7 | yes |

The 20-in-64 packing wastes 4 bits per payload word. That adds about 6% over
a tightly packed stream.

## What is not in this RTL

- **10G MAC/PHY, HD-SDI transceivers and cable equalisers.** The streams to and from them are ports.
- **The embedded processor and its software** (address configuration, ARP/ICMP replies). The processor sees the register window.
- **The processing modules** (encryption, compression and the like). Only their slots exist.
- **Splitting the core across two FPGAs.** The link that would move processing modules to a second device is not built.
- **Interlaced output, 3G-SDI and dual-link formats, audio or ancillary data in blanking.** The decoder carries only active rows.

## Own choices, beyond the architecture

The architecture is: rows as packets with a format header, dual-port packet
FIFOs between clock domains, round-robin input multiplexing, an output
demultiplexer by channel, three switches with two processing slots, a
four-rule classifier with video/CPU flags, CPU RX/TX FIFOs, a transmit packet
multiplexer, and a bus bridge to the processor.

Everything below is this design's own:

- the packet layout and header fields;
- the FIFO drop policy and depths;
- the classifier's rule encoding and the OR of flags;
- the mode switch-over rule and draining of unused sources;
- the frame generator's lock, late and missing-row rules, and the start delay as the buffering control;
- the register map and bus protocol;
- one shared output clock.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Shared reference models are in
`tb/tb_pkg.sv`: a bit-serial SDI coder and decoder, the raster generator, and
a byte-level row packet builder. Example:

```
verilator --binary --timing -Wno-fatal --top-module tb_mvtp_top \
  -y rtl -y tb +libext+.sv rtl/mvtp_pkg.sv tb/tb_pkg.sv tb/tb_mvtp_top.sv
./obj_dir/Vtb_mvtp_top
```

**`tb_mvtp_top`** is the end-to-end test. It uses a small raster (64×12 words,
30×6 active), four channels and 64-word FIFOs, and runs all three modes:

- **Network to network:** UDP frames pass through unchanged. An ARP frame is read by the CPU over the bus. A CPU packet leaves through the TX FIFO.
- **Video to video:** every output shows its own input's picture.
- **Full duplex over a MAC loopback:** one row is dropped and shows up as a black line. A stalled MAC makes the input FIFOs overflow. The picture then recovers.

The test counts each of these events and fails if one never happens.

**`tb_mvtp_top_full`** runs the top with its default parameters. It carries
eight 1080-line rasters (2200×1125 words) in video-to-video mode and checks
one whole frame on every output, word by word. It takes about two minutes in
Verilator.

**`tb_mvtp_top_formats`** also runs at the defaults, with four different
rasters on the eight channels at once:

| channels | format | words × lines |
|---|---|---|
| 0–1 | 720p60 | 1650×750 |
| 2–3 | 720p50 | 1980×750 |
| 4–5 | 2K/24 | 2750×1125, 2048 active |
| 6–7 | 1080/25 | 2640×1125 |

All outputs share one clock. Every output must show clean frames.
