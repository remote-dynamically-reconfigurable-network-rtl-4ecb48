# A network middlebox that rewrites itself over the network

This is synthesizable SystemVerilog for a network-processing middlebox that
can be updated remotely while it runs. It follows the architecture described
in the thesis "Remote Dynamically Reconfigurable Network Processing
Middlebox" (Tan Tze Hon, Universiti Teknologi Malaysia), built for a
NetFPGA-10G board.

A middlebox sits in Ethernet links and inspects or filters the traffic that
passes through it. Its filtering logic, and even its forwarding logic,
must change after deployment: new threats, new rules, better algorithms.
On an FPGA that means loading a partial bitstream into a region of the
device while the rest keeps running. Such platforms usually hand the job
to an embedded processor or a host PC, which is slow and costs logic.
Here the bitstream travels to the box as ordinary UDP packets on the same
links it protects. A small controller built from fabric logic feeds those
packets straight into the FPGA's Internal Configuration Access Port
(ICAP). No processor and no host take part.

The thesis fixes the system-level facts:
- Two reconfigurable parts: packet forwarding and network protection.
- Protection is a port-based firewall or a stateless intrusion prevention
  system (NIPS).
- Packets of up to 2048 bytes.
- Bitstream packets of up to 1016 bytes.
- A customized controller driving ICAP, with no processor.
- 1 Gb/s Ethernet transport.
- A measured reconfiguration throughput of 350 Mb/s.

It describes these blocks by what they do. How each one works inside is
this implementation's own design, and every file says which is which.
Authentication and bitstream encryption are left out, as they are in the
thesis. The thesis asks for forwarding updates "through the Ethernet
connection" and protection updates through UDP/IP. Here both go the same
way, as UDP over Ethernet, and a target byte in the bitstream header picks
the region.

## The two paths through the box

```
rx ──► hdr_parser ─┐
       pkt_fifo (2048 B, store-and-forward, header record kept per packet)
                   │
             pkt_dispatch ──(UDP to DEVICE_IP:RECONF_UDP_PORT)──► reconf_rx
                   │                                              │
                   ▼                                      sync_fifo (bitstream FIFO, 1 KiB)
              fwd_region  ◄── iso / load ──┐                      │
          (pairing | fwd_learn)            ├──────────────── reconf_ctrl ──► ICAP
                   │                       │
                   ▼                       │
              app_region  ◄── iso / load ──┘
   (port_firewall | nips + 2048 B verdict buffer)
                   │
                   ▼
                   tx
```

All blocks share one clock and pass 64-bit beats (`mb_pkg::beat_t`)
with valid/ready handshakes. Byte *i* of a packet is byte *i mod 8* of
beat *i div 8*, and `keep` marks valid bytes. Each beat also carries a
one-hot `src_port` and `dst_port`, like the sideband of the NetFPGA
pipeline, for the board's four ports. The Ethernet MACs, PHYs and the ICAP
primitive are outside `mb_top`. The top exposes one receive stream, one
transmit stream and the ICAP pins.

**Input buffer.** `pkt_fifo` stores whole packets, 256 beats = 2048 bytes.
A packet becomes visible downstream only after its last beat has been
written. In the cycle after the last beat (the *commit cycle*, in which no
beat is accepted), the buffer samples a drop flag and a metadata word.
At the input the metadata is the parsed header (`hdr_t`). A packet that
alone fills the whole buffer can never fit, so the rest of it is swallowed
and discarded (`stat_rx_oversize`).

**Dispatch.** The header record travels with the packet. `pkt_dispatch`
sends IPv4/UDP packets for `DEVICE_IP`:`RECONF_UDP_PORT` to the bitstream
receiver and everything else to the forwarding region. Steering is
combinational, with no added latency.

## Bitstream packets

A bitstream is cut into UDP datagrams that each carry at most 1016 bytes.
After the UDP header (frame bytes 42–47) comes a 6-byte reconfiguration
header, so the bitstream starts on a beat boundary at byte 48:

| byte | field |
|------|-------|
| 42 | flags: bit 0 START (isolate the region first), bit 1 END (bitstream complete) |
| 43 | target region: 0 forwarding, 1 application |
| 44 | module number the bitstream contains |
| 45–47 | reserved |

Bitstream byte 48 is the least significant byte of the first 32-bit word.
The first packet of a bitstream has START. The last packet has END, and a
bitstream that fits in one packet has both.

`reconf_rx` takes the payload length from the UDP length field. It rejects
a packet whose bitstream is over 1016 bytes or not a whole number of words,
and nothing of it is written (`stat_rcfg_bad`). Otherwise it writes these
entries into the bitstream FIFO, in order:
- a command entry (START, target, module);
- one entry per beat of bitstream (two words, or one for a final half beat);
- after the last beat, if END was set, a separate END entry.

The separate END entry lets the controller see the end after the last word.
A packet shorter than its UDP length promised gets no END entry and is
counted as bad.

The bitstream FIFO (`sync_fifo`) has 128 entries of 8 bytes. That is one
full packet's 127 bitstream entries plus its command entry. This design
reads the 1016-byte limit as a 1 KiB FIFO less one 8-byte header word.
Packets longer than that are not lost: the receiver simply waits for space.

## The reconfiguration controller and the regions

`reconf_ctrl` is a four-state machine:

1. **IDLE**: waits for a command with START. Words or END that arrive first
   are refused and counted (`stat_ctrl_err`).
2. **ISOLATE**: raises `iso_req` for the target region and waits for
   `iso_ack`. The region lets the packet in flight finish. At the next
   packet boundary with no beat waiting, it stops taking beats and
   acknowledges.
3. **WRITE**: writes one 32-bit word per cycle to ICAP while `icap_busy` is
   low. `icap_csib` and `icap_rdwrb` are both low for a write, and the
   outputs are registered. With `BIT_SWAP=1` (default), the bits of each
   byte are reversed, as the Virtex-5 ICAP expects of bitstream-file
   bytes. The END entry moves on to DONE.
4. **DONE**: pulses `load` with target and module, and drops `iso_req`.

**What `load` means.** In silicon, writing the bitstream through ICAP *is*
the update: the region's logic has been replaced. RTL cannot express that.
So each region here instantiates every module it can hold, plus a module
register that `load` sets. `fwd_region` holds port pairing and `fwd_learn`;
`app_region` holds `port_firewall` and `nips`. The register selects which
module's output counts. A simulation can then watch a real functional
update happen: firewall → NIPS, port pairing → learning switch. For synthesis onto a
partially reconfigurable floorplan, keep one module per region and drop
the register.

**Traffic during an update.** Bitstream packets and traffic share the
input buffer, which is first-in first-out. If traffic waited for an
isolated region, it would block the bitstream packets queued behind it, and
the update could never finish. So while `iso_req` is up, `pkt_dispatch`
discards any traffic packet that reaches the head of the buffer
(`stat_down_drops`). A packet that has already started is finished
normally. This is the device downtime the thesis aims to shorten. Which
packets are lost, rather than held, is this design's choice.

## Protection and forwarding modules

- **`port_firewall`**: rejects IPv4 TCP/UDP packets whose source or
  destination port is on a list built into the module (parameter
  `BLOCKED`, default 23, 135, 445, 3389). Other frames pass. A new rule
  set is a new bitstream.
- **`nips`**: rejects any packet that contains one of `NUM_SIGS` byte
  signatures of 1–8 bytes (defaults: `/bin/sh`, `cmd.exe`, `root:`, eight
  0x90 bytes). It keeps the previous beat, so for each byte position of the
  current beat it can compare every signature ending there. That catches
  signatures that straddle beats at full rate. Each packet is judged alone
  (stateless).
- `app_region` writes every beat into its own 2048-byte `pkt_fifo`. The
  selected module's verdict, valid in the commit cycle, keeps or removes
  the packet. A match in the last byte can therefore still stop a packet.
- **Port pairing** (forwarding module 0, the reset one) sends a packet out
  on the partner port (0↔1, 2↔3): a transparent bump in two links. It is a
  fixed rewiring of the port sideband, so it is written inside
  `fwd_region`.
- **`fwd_learn`** (forwarding module 1) is a learning switch. A 16-entry,
  fully associative table maps Ethernet source addresses to ports. The
  destination address fills bytes 0–5, so it is looked up on the first
  beat, and that decision holds for the whole packet. The source address
  is complete on the second beat. It then updates its entry or takes a
  new one, replacing entries round-robin when the table is full. Unknown,
  broadcast and multicast destinations are flooded to every port but the
  source. A packet is never sent back out of its source port: if the
  destination sits behind that port, `dst_port` is 0. There is no ageing.
  Loading the module clears the table.
- Both forwarding modules only rewrite `dst_port`.

The rules, signatures and forwarding algorithms are examples chosen here.
The thesis names the applications but not their contents.

## Timing and rates

- Each buffer moves one beat per cycle, with one idle cycle per packet for
  the commit. A packet can leave a buffer two cycles after its last beat
  went in.
- The dispatcher, the forwarding region and the region muxes add no
  cycles.
- The controller writes one ICAP word per cycle: 3.2 Gb/s at the 100 MHz
  ICAP limit. That is well above the 350 Mb/s the thesis measured, which
  the 1 Gb/s link and the sender bound. The end-to-end test delivers a
  2600-byte bitstream, with traffic in between, in 873 cycles: 3.8 Gb/s at
  a 160 MHz clock.
- At 160 MHz the 64-bit datapath carries 10 Gb/s, or about 9 Gb/s with
  minimum-size frames. The clock frequency is an assumption; nothing in the
  RTL depends on it.

## Status outputs of `mb_top`

- `reconf_active`: a reconfiguration is in progress.
- `bs_fifo_level`: entries in the bitstream FIFO.
- `fwd_module`, `app_module`: the module each region holds.
- 32-bit event counters, cleared by reset:
  - `stat_rx_pkts`: packets buffered.
  - `stat_traffic_pkts`: packets sent to the processing path.
  - `stat_rx_oversize`: oversize frames dropped at the input.
  - `stat_down_drops`: traffic dropped during updates.
  - `stat_rcfg_pkts`, `stat_rcfg_bad`: bitstream packets accepted and
    rejected.
  - `stat_reconfigs`: completed reconfigurations.
  - `stat_icap_words`: words written to ICAP.
  - `stat_ctrl_err`: entries refused by the controller.
  - `stat_app_drops`, `stat_app_pass`: verdicts of the protection module.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `mb_top` | `IN_DEPTH`, `OUT_DEPTH` | 256 | packet buffers in 8-byte beats (2048 bytes, from the thesis); power of two |
| `mb_top` | `BS_FIFO_DEPTH` | 128 | bitstream FIFO entries |
| `mb_top` | `DEVICE_IP`, `RECONF_UDP_PORT` | 192.168.1.100, 10000 | address of bitstream packets (chosen here) |
| `reconf_rx` | `MAX_BYTES` | 1016 | bitstream bytes per packet (from the thesis) |
| `reconf_ctrl` | `BIT_SWAP` | 1 | reverse bits within bytes for ICAP |
| `port_firewall` | `NUM_RULES`, `BLOCKED` | 4, {3389,445,135,23} | blocked ports |
| `nips` | `NUM_SIGS`, `SIGS`, `SIG_LEN` | 4 signatures | signature bytes (first byte in bits 7:0) and lengths |
| `fwd_learn` | `TABLE_SIZE` | 16 | Ethernet addresses the learning switch remembers |

Beat width, port count and the header layout are constants in `rtl/mb_pkg.sv`.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. The shared helpers are:
- `tb/tb_pkt_pkg.sv`: builds frames;
- `tb/tb_common.svh`: clock, check counters, watchdog;
- `tb/icap_model.sv`: a behavioural ICAP that records words and counts
  sync/desync commands.

To run one testbench, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mb_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/mb_pkg.sv tb/tb_pkt_pkg.sv tb/tb_mb_top.sv
./obj_dir/Vtb_mb_top
```

`tb_mb_top` runs the top at its default parameters through four steps:
1. Traffic under the reset configuration, including an oversize frame.
2. A three-packet bitstream that loads the NIPS, with traffic interleaved;
   a rejected 1020-byte bitstream packet; a START-less packet.
3. Traffic under the NIPS.
4. A one-packet bitstream that loads the learning switch, then traffic
   between four hosts, one behind each port. Each destination is flooded
   until that host has sent a packet, then sent to its port only.

It checks each delivered packet byte for byte, along with its output port
and every ICAP word. It counts each mechanism and fails if one never
happened: oversize drop, firewall drop, NIPS drop, downtime drop, bad
packet, refused entries, ICAP busy hold, both reconfigurations, and the
learning switch both flooding and forwarding to a learned port. It
finishes in under a second.

## How far to trust it

- All 12 modules pass Verilator lint and Yosys/slang elaboration. Their
  testbenches pass, and each testbench fails against a deliberately broken
  copy of its module.
- Hardware has not been tested. In particular, ICAP timing and the
  requirements of a real partial-reconfiguration flow (decoupling at the
  region's physical boundary, one module per region) are only modelled.
- Not covered:
  - IPv4 options, VLAN tags and checksums.
  - Authentication, ordering or loss detection of bitstream packets: a lost
    middle packet gives a corrupt bitstream, which only ICAP's own CRC
    would catch.
  - Multiple clock domains: the MACs on the board run on their own clocks
    and would need clock-crossing FIFOs in front of `rx`/`tx`.
