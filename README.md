# rrBox Core — a middlebox that is reprogrammed through its own network ports

rrBox is a packet-forwarding middlebox for an FPGA network board (the
NetFPGA 10G, a Virtex-5 with four Ethernet ports). The forwarding algorithm is
in a *partial reconfigurable region* of the FPGA. A remote client can replace
that algorithm while the box runs. It sends a partial bitstream as ordinary UDP
packets to one of the box's Ethernet ports. Logic in the static part of the chip
recognises these packets, checks that the segments arrive complete and in
order, acknowledges each one, and feeds the bitstream straight into the FPGA's
Internal Configuration Access Port (ICAP). No processor or host computer is
involved. While the new module is being written, the box keeps forwarding
traffic. When loading is done, the new module is initialised and takes over.

This repository holds SystemVerilog RTL for the rrBox Core: everything between
the board's receive stream and its transmit stream, plus the ICAP driver. All
of it simulates with plain Verilator. The testbenches carry out complete remote
reconfigurations, with bitstreams of up to 684 kB.

## Blocks and data flow

```
 receive stream (64-bit AXI4-Stream, 100 MHz)
        |
   header_parser ---------> In_fifo (sync_fifo: whole packets)
        |                          |
        +-----> Hdr_fifo (sync_fifo: one header entry per packet)
                                   |
                            packet_manager  (takes one entry at a time)
               bitstream packet /         \ data packet
      bitstream_packet_handler             header_processor --> Dst_port_fifo
        |                 |                (switch/hub/loopback)       |
    Bit_fifo         Bit_stat_fifo                         data_packet_handler
  (bit_fifo, CDC)         |                                            |
        |           ack_generator ---------> tx_arbiter <--------------+
  icap_interface (50 MHz)                        |
        |                                transmit stream
   ICAP primitive (outside this RTL)
```

| file | role |
|---|---|
| `rrbox_pkg.sv` | stream beat, header entry, status entry and algorithm types; packet-layout constants |
| `header_parser.sv` | copies packets into In_fifo and extracts the header fields; tells bitstream packets from data packets |
| `sync_fifo.sv` | In_fifo, Hdr_fifo, Bit_stat_fifo and Dst_port_fifo |
| `packet_manager.sv` | coordinator: dispatches each packet to a handler and waits for it; forwards data itself during reconfiguration; initialises the new module |
| `bitstream_packet_handler.sv` | moves bitstream data into Bit_fifo, checks segment order and decides marked or unmarked |
| `bit_fifo.sv` | dual-clock bitstream buffer; a segment becomes readable only after it is verified |
| `icap_interface.sv` | 64-bit Bit_fifo words to 32-bit ICAP writes, one per 50 MHz clock |
| `ack_generator.sv` | builds the acknowledgement packet sent back to the client |
| `header_processor.sv` | forwarding decision (reconfigurable): learning switch, hub, loopback |
| `data_packet_handler.sv` | moves a data packet out with its destination ports, or drops it (reconfigurable) |
| `tx_arbiter.sv` | merges forwarded packets and acknowledgements, one packet at a time |
| `sync2.sv` | two-flop synchroniser |
| `rrbox_core.sv` | top level |

Of these, `header_processor` and `data_packet_handler` form the reconfigurable
region. Everything else is static.

## Moving a bitstream: segments, verification and acknowledgements

This is the part of the design that takes the most care.

### Packet format

A bitstream packet is an Ethernet / IPv4 (no options) / UDP frame addressed to
UDP port `BIT_UDP_PORT`. Its payload starts with a small header:

| bytes | field |
|---|---|
| 42–45 | device ID. A box accepts only its own `DEVICE_ID`, so one client can address many boxes on the same network. |
| 46–47 | type: 1 = segment, 2 = termination, 3 = acknowledgement |
| 48–49 | segment number (16 bits) |
| 50 | in an acknowledgement: 1 = marked, 0 = unmarked |
| 51 | in an acknowledgement: 1 = answers a termination packet |
| 52–55 | reserved |
| 56… | bitstream data, a whole number of 64-bit words |

The bitstream data starts at byte 56, which is the start of beat 7. So the
handler copies whole beats into Bit_fifo with no realignment. The client picks
how much data goes in each packet. A full 1512-byte frame carries 1456 bytes.

A packet that fails any of these tests is a normal data packet and is
forwarded: wrong port, wrong device ID, not IPv4/UDP, or an unknown type.

### Verification rule

The client sends one segment at a time and waits for its acknowledgement.
A segment is *not* loaded into the ICAP as soon as it is stored. It stays in
Bit_fifo until the *next* segment arrives. That arrival proves the client has
seen the acknowledgement and moved on. For the last segment, the termination
packet does the same job. So the configuration port only ever receives
segments that both sides agree on, in order.

The handler keeps `exp`, the number of the segment it expects next:

| arriving packet | action | answer |
|---|---|---|
| segment = `exp` | release the previous segment (**commit**), then store this one; `exp` + 1 | marked |
| segment = `exp`, Bit_fifo fills while storing | discard what was stored of it (**rollback**) | unmarked, client resends |
| segment < `exp` | a resend after a lost ack; data ignored | marked |
| segment > `exp` | out of order; data ignored | unmarked |
| termination = `exp` | release the last segment; transfer complete | marked |
| same termination again | — | marked |
| any other termination | — | unmarked |

Segment 0 starts a transfer.

### Bit_fifo's three write pointers

`bit_fifo` makes the rule above cheap to build. It has three write pointers:

* `wp`: where the next word goes;
* `mp` (mark): the end of the last fully stored segment;
* `cp` (commit): the end of the data the reader may take.

`mark` sets `mp` to `wp`. `rollback` sets `wp` back to `mp`. `commit` sets
`cp` to `mp`. The reader runs on the 50 MHz clock and sees only data below
`cp`. When checking for "full", the write side counts every word still in the
FIFO, committed or not. Rollback therefore frees space at once.

`cp` can jump by a whole segment at once, so it cannot cross clock domains as
a Gray code directly. Instead, a published pointer `pp` walks towards `cp` one
step per 100 MHz clock, and that pointer crosses in Gray code. A commit of *n*
words becomes visible to the reader after about *n* + 3 fast clocks. That is
well within the time the next segment takes to arrive.

### Acknowledgements

Each handled bitstream packet leaves one entry in Bit_stat_fifo. The entry holds
the marked flag, the segment, the client's MAC, IP and UDP port, and the input
port. `ack_generator` turns each entry into a 64-byte UDP frame back to the
client, sent out of the port the segment came in on. The IPv4 header checksum
is computed; the UDP checksum is zero.

### End of a reconfiguration

The termination packet releases the last segment. After that, the Packet
Manager waits for two signals to stay high for 8 consecutive clocks:
Bit_fifo `drained` (the reader has taken everything committed) and the ICAP
Interface's `idle` (synchronised). Then it holds `prm_init` for `INIT_CYCLES`
clocks, which clears the new module's state (the switch's address table). After
that, data packets go to the reconfigurable region again.

## Forwarding and the reconfigurable region

For a data packet, the Packet Manager first starts the Header Processor. The
Header Processor writes a destination port mask into Dst_port_fifo. Then the
Packet Manager starts the Data Packet Handler, which takes the mask and moves
the packet from In_fifo to the transmit stream, with the mask in `tuser`. A
zero mask drops the packet. The Packet Manager handles one packet at a time
and waits for each handler to finish.

Three forwarding algorithms exist:

* **switch**: a learning Ethernet switch with a `TABLE_SIZE`-entry table of
  MAC address and port, replaced round robin. Broadcast, multicast and unknown
  destinations are flooded. A packet whose destination sits behind its own
  input port is dropped.
* **hub**: send to every port except the input port.
* **loopback**: send back out of the input port.

On the FPGA, each algorithm would be a separate partial bitstream. Simulation
cannot rewrite configuration memory. So `header_processor` contains all three,
and the top-level input `prm_algo` stands for "what configuration memory holds
now". In the testbenches, `tb/icap_model.sv` drives `prm_algo`. It watches the
words written to the ICAP and, when a complete bitstream has been loaded,
switches to the algorithm that bitstream names. This toy bitstream carries the
algorithm ID in the word after the sync word.

**During a reconfiguration** the region is being rewritten and cannot be used.
This lasts from the first accepted segment until `prm_init` ends. In that time
the Packet Manager forwards data packets itself, flooding each one to every
port except its input port. Traffic keeps flowing, and the `reconfiguring`
output is high.

## Clocks, widths, rates

* Packet clock: 100 MHz. Stream: 64-bit AXI4-Stream, first byte of the packet
  in `tdata[63:56]`, `tkeep` marks valid bytes. `tuser` is a one-hot 4-bit
  port mask: the source port on receive, the destination ports on transmit.
* Reconfiguration clock: 50 MHz. ICAP: 32 bits, one word per clock
  (1.6 Gbit/s). That is faster than a 1 Gbit/s Ethernet link, so Bit_fifo only
  fills if the ICAP is stalled.
* Bitstream handling runs at one beat per clock, plus two clocks per packet.
  The Header Processor takes one clock per decision.
* Reconfiguration throughput, measured in `tb_rrbox_workload`: a client with no
  processing delay, 1 Gbit/s pacing with preamble and inter-frame gap,
  stop-and-wait with 1456-byte segments. Result: about 731–732 Mbit/s for
  bitstreams of 255, 334, 512 and 684 kB (684 kB in 7.47 ms). The published
  hardware measured 352 Mbit/s (684 kB in 15.54 ms) with a real client
  computer. The test requires at least that figure.

## Top-level interface (`rrbox_core`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | 100 MHz clock, asynchronous active-low reset |
| `icap_clk`, `icap_rst_n` | in | 50 MHz clock and its reset |
| `s_valid`, `s_ready`, `s_beat` | in/out/in | receive stream (`beat_t`: tdata, tkeep, tlast, tuser) |
| `m_valid`, `m_ready`, `m_beat` | out/in/out | transmit stream |
| `icap_ce_n`, `icap_wr_n`, `icap_i` | out | to the ICAP primitive (active-low enable and write) |
| `icap_busy` | in | ICAP BUSY; the current word is held |
| `prm_algo` | in | algorithm the reconfigurable region currently holds |
| `prm_init` | out | initialisation pulse for the new module |
| `reconfiguring` | out | reconfiguration in progress |
| `n_*` | out | counters: bitstream, data and bypassed packets, reconfigurations, marked and unmarked acks, ICAP words |

Parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `DEVICE_ID` | `32'h1` | this box's device ID |
| `BIT_UDP_PORT` | 5000 | UDP port for bitstream traffic |
| `MY_MAC`, `MY_IP` | — | source addresses of acknowledgements |
| `IN_FIFO_DEPTH` | 1024 beats | In_fifo depth |
| `HDR_FIFO_DEPTH` | 32 | Hdr_fifo depth |
| `BIT_FIFO_DEPTH` | 2048 × 64 bit | Bit_fifo depth |
| `STAT_FIFO_DEPTH`, `DST_FIFO_DEPTH` | 16 | Bit_stat_fifo and Dst_port_fifo depths |
| `TABLE_SIZE` | 16 | switch table entries |
| `BITSWAP` | 0 | reverse the bits of each byte before the ICAP |

All FIFO depths must be powers of two. Bit_fifo must hold at least two of the
client's segments. Otherwise every segment after the first is refused.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rrbox_pkg.sv tb/rrbox_tb_pkg.sv tb/tb_rrbox_core.sv \
    --top-module tb_rrbox_core -o sim && ./obj_dir/sim
```

* `tb_rrbox_core` runs end to end with a small Bit_fifo (64 words) so that it
  can be filled. It forwards traffic with the hub, then loads a loopback
  module. During that load it sends a repeated segment, an out-of-order
  segment and a data packet, which must be bypassed. Next it loads a switch
  module with the ICAP held busy until Bit_fifo refuses a segment, and the
  client resends it. Finally it checks switch learning, and checks that a
  bitstream packet for another device is forwarded as data. Every ICAP word
  and every forwarded frame is compared with what was sent, and every one of
  these mechanisms must actually occur.
* `tb_rrbox_workload` uses all default parameters. It transfers 255, 334, 512
  and 684 kB bitstreams at line rate and checks the ICAP contents, the
  configured module and the throughput (about 2 s of simulation).
* The block testbenches (`tb_sync_fifo`, `tb_bit_fifo`, `tb_header_parser`,
  `tb_bitstream_packet_handler`, `tb_icap_interface`, `tb_header_processor`,
  `tb_data_packet_handler`, `tb_packet_manager`, `tb_ack_generator`) test each
  block on its own, against models in the testbench.

Verilator has only two states, so every flop read by the design has a reset.
The top-level testbenches give the asynchronous resets a falling edge at
time 1, so no flop starts with a random value.

## How this differs from the published design

* **Forwarding variants in one module.** In hardware they are separate
  partial bitstreams. Here one module holds all three and `prm_algo` selects
  the active one (see above). The optional *Payload Processor*, named as a
  third reconfigurable module, is not built, because its function is not
  described.
* **This design's own choices** (the published description gives only the
  function):
  * the transfer packet layout, device-ID and port values;
  * the rules for resent, out-of-order and repeated-termination packets;
  * the acknowledgement frame;
  * flooding during reconfiguration;
  * the end-of-load detection;
  * FIFO depths and the switch table size.
* **FIFO memories** are read synchronously into an output register that is
  prefetched (first-word-fall-through), so they map to block RAM. How the
  published core arranged its 14 block RAMs is not known; here the In_fifo
  (1024 x 77 bits) and Bit_fifo (2048 x 64 bits) dominate. The In_fifo must
  hold the largest packet (1024 beats = 8 kB), since a packet is processed only
  once it has been received completely.
* **ICAP details**: Virtex-5 signal polarity, holding a word while busy, and
  optional per-byte bit reversal come from general knowledge of the device.
  By default the client is expected to send ICAP-ready words.
* **Not included**: the board framework around the core (Ethernet MACs and
  PHYs, input arbiter, output queues), the ICAP primitive itself, the client
  software (modelled in the testbenches, including resending), client-side
  timeouts, and the optional flow-management FIFO in the Data Packet Handler.
  Resource figures of the published implementation (slices, block RAMs) were
  not reproduced.
