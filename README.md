# Slotted optical switching with flow control and a distributed clock

This RTL models a small data-centre cluster. Its racks exchange traffic through one optical
switch that has no buffer at all. Three ideas make this work without losing frames:

1. **Slotted, aggregated transfers.** Each top-of-rack node (ToR) collects Ethernet frames in
   one electrical buffer block per destination rack. Once per time slot it packs frames into
   a fixed-size optical packet for the rack whose block is fullest.
2. **Label control with flow control.** On a separate label channel, each ToR asks the switch
   controller for an output. The controller resolves contention by a fixed priority, sets
   the switch gates, and answers every ToR with ACK (you got your output) or NACK (you did
   not). A ToR frees the frames only on ACK. On NACK it sends the same packet again in the
   next slot. Contention therefore costs time, not data.
3. **One clock for everyone.** The controller's clock reaches every ToR over the label
   channel, so all nodes run at the same frequency. A receiver does not need clock recovery
   at the start of each packet; it finds the packet start within one word. The label channel
   also carries the controller's time, so each ToR can launch its packet early enough to
   make up for its own fiber length.

The default configuration has 4 racks with 2 servers each, a 4 x 4 switch, 8192-byte buffer
blocks, 2600-byte optical packets, a 4096-byte receive buffer, and a 32-bit word every
3.1 ns (322 MHz).

## Time slot

All timing is in cycles of 3.1 ns. One slot is `SLOT = PKT_BYTES/4 + IPG = 650 + 14 = 664`
cycles, which is 2058.4 ns. Offsets below are positions inside a slot, as seen at the
switch.

| offset | event |
|---|---|
| 663 (previous slot) | label requests of all ToRs arrive at the controller together |
| 2 | controller decides (`DECIDE_OFF`) |
| 3 | new gate pattern drives the switch: 4 cycles = 12.4 ns after the requests |
| 12-13 | start words of the data packets reach the switch |
| 332 | controller sends its time to every ToR (`TIME_OFF`) |

The 14-cycle gap (43.4 ns) between packets covers the label processing, the switch driver
delay and the rise and fall times of the optical gates. The optical switch model itself has
no delay, so this design only checks the 4-cycle processing part. Packet words per slot are
650/664 = 97.9 %. The one start word inside the packet is the only overhead of burst
reception.

## Synchronisation (`tor_label_unit`, `switch_controller`)

After reset a ToR sends a timestamp request on its label channel. The controller echoes it
after a fixed `CTRL_ECHO_LAT = 2` cycles, and the ToR computes the one-way channel delay:

    d = (rtt - TOR_TX_LAT - CTRL_ECHO_LAT) / 2

This assumes both directions of a channel are equally long. Halfway through each slot the
controller broadcasts `{slot index, offset}`. A ToR receiving it sets its local time to that
value plus `d + CTRL_TX_LAT + 1`, and from then on counts in step with the controller. It
starts its own slot, meaning it sends the request and begins the packet, at local offset

    launch_off = (2*SLOT - 1 - REQ_LAT - TOR_TX_LAT - d) mod SLOT

so that its request arrives at the controller at offset SLOT-1, whatever its fiber length.
The packet goes out on the data fiber at the same moment. The data fiber of a ToR is taken
to be as long as its label fiber, so the packets of all ToRs also meet at the switch. The
system model uses channel delays of 103, 110, 118 and 125 cycles: about 64 m of fiber plus
some unequal lengths.

## Label words

Every label-channel word is `{type[3:0], payload[27:0]}` (`ofc_pkg::label_word_t`). An idle
channel carries the 1010... pattern, so the line never stops toggling.

| type | payload | direction |
|---|---|---|
| `L_REQ` | destination rack, priority | ToR -> controller |
| `L_RESP` | output the packet was actually sent to | controller -> ToR |
| `L_TS_REQ` / `L_TS_ECHO` | - | delay measurement |
| `L_TIME` | slot index (16 b), offset (10 b) | controller -> ToR |
| `L_IDLE` | `AAAAAAA` | both |

A response equal to the requested rack is an ACK. Any other value is a NACK. A missing
response is also treated as a NACK.

## Contention resolution (`contention_resolver`)

Each slot the controller sees at most one request per input. For every output:

1. Among the inputs that asked for it, the one with the lowest priority value wins. A tie
   goes to the lower port number.
2. If no input asked for an output, it is not left dark. If the output belongs to a losing
   ToR, that ToR's own packet is sent there (loop-back). Otherwise the lowest-numbered loser
   is sent there too (multicast). Otherwise the stream of an input that made no request is
   sent there.

Every output therefore sees a continuous stream of packets. A rack that receives a packet
meant for another rack checks the address word and throws the packet away. The losing ToR
gets a NACK, because its packet did not reach the rack it asked for, and sends it again.
ToR `t` has priority `t` (ToR 0 highest).

## Optical packet and its receiver

Packet format, one 32-bit word per cycle:

| word | content |
|---|---|
| 0 | `0xAAAAAAAB`: three preamble bytes and a start delimiter |
| 1 | `{source rack[15:0], destination rack[15:0]}` |
| 2 .. 648 | payload: frames, then idle words `0xAAAAAAAA` |
| 649 | inverted CRC-32 (polynomial 04C11DB7, MSB first, preset all-ones) over words 1..648 |

Inside the payload each frame is one header word `{0xFD, 0x00, length in bytes}` followed by
`ceil(length/4)` data words. An idle word ends the frame list. Between packets, and in slots
with nothing to send, the ToR transmits idle words.

`packet_receiver` locks onto the start word in the cycle it arrives. It checks the
destination rack and the CRC, and writes the payload into a 4096-byte receive buffer. The
packet is committed only if both checks pass; otherwise the buffer's write pointer is rolled
back. If the buffer fills up part-way through a packet, the packet is dropped and counted.
The read side splits the payload back into frames and passes them to the ToR's Ethernet
switch while the next packet is still arriving.

## ToR datapath (`tor`)

    servers --> eth_switch --+--> servers in the same rack
                             +--> buffer_block (one per other rack) --> packet_aggregator --> data fiber
    data fiber --> packet_receiver --> eth_switch --> servers

* `eth_switch` routes on the destination MAC. This design uses the convention
  `02:00:<rack>:<server>:..`, so the route is in the frame's first word. Each output takes
  whole frames. Frames from the packet receiver go first, because an optical packet cannot
  be held back at its source. The servers share what is left round-robin.
* `buffer_block` keeps `NSUB = 4` sub-buffers, one per frame-length class. `size_filter`
  picks the class: under 100 bytes, 100-200, 201-1000, over 1000. Each sub-buffer is a word
  RAM plus a queue of frame lengths, each with a write, read and commit pointer. Reading a
  frame does not free it. ACK moves the commit pointers up to the read pointers; NACK moves
  the read pointers back. A new frame that would take the block past `BLOCK_BYTES` is
  discarded whole.
* `packet_aggregator` works one slot at a time. It picks the block with most bytes stored
  and requests that rack. It then fills the packet greedily from the longest-frame class
  down, taking any frame that still fits. After a NACK it replays exactly the same number of
  frames per class, so the retransmitted packet is identical.

## Files

| file | what it is |
|---|---|
| `rtl/ofc_pkg.sv` | constants, frame beat and label word types, CRC function |
| `rtl/ofc_system.sv` | top: ToRs, fibers, controller, optical switch |
| `rtl/tor.sv` | one top-of-rack node |
| `rtl/eth_switch.sv`, `rtl/size_filter.sv`, `rtl/buffer_block.sv` | ToR ingress |
| `rtl/packet_aggregator.sv`, `rtl/packet_receiver.sv` | optical packet TX and RX |
| `rtl/tor_label_unit.sv` | ToR side of the label channel: delay, time, slot start |
| `rtl/switch_controller.sv`, `rtl/contention_resolver.sv` | controller |
| `rtl/optical_switch_model.sv`, `rtl/fiber_link.sv` | behavioural models of the SOA switch and of fiber plus transceiver latency |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_ofc_workloads.sv`, `tb/tb_ofc_buffer_sizes.sv` | whole-cluster runs with the traffic mixes and buffer sizes described below |

Frame streams between servers, Ethernet switch, buffers and receiver use a valid/ready
handshake. One beat is `{data[31:0], last, len}`, and `len` (the frame length in bytes) is
valid on every beat.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. Example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_ofc_system \
        rtl/ofc_pkg.sv tb/tb_ofc_system.sv -Mdir obj_sys
    ./obj_sys/Vtb_ofc_system

The other modules are found through `-Irtl`. Replace `tb_ofc_system` with any other
testbench to run it. Verilator prints some width and style warnings. `-Wno-fatal` keeps them from stopping the
build; none of them are errors.

`tb_ofc_system` runs the whole cluster with default parameters for about 110 slots, in
about a second. It checks the following:

* every frame is delivered intact exactly once, or counted as dropped by a full buffer
  block;
* each channel delay is measured correctly;
* no output ever takes two inputs at once;
* no CRC error occurs.

It also requires each mechanism to occur at least once: synchronisation, contention, NACK,
retransmission ending in ACK, misrouted-packet discard, multicast fill, idle-stream fill,
intra-rack forwarding and buffer overflow. `tb_switch_controller` checks the 4-cycle
(12.4 ns) gap from request arrival to gate change. `tb_packet_aggregator` checks the
packet's length, start position and CRC.

`tb_ofc_workloads` runs the same cluster with four traffic mixes in turn: 50, 65, 85 and
100 % of frames staying inside the rack. Every server offers a load of 0.5, with random
frames of 64-1518 bytes, for 150 slots per mix. It prints frames sent, received and
dropped, and the mean and largest latency from frame generation to delivery. One run gave
these mean latencies:

| mix (intra-rack share) | mean latency | losses |
|---|---|---|
| 50 % | 10.3 us | 44 frames dropped by full buffer blocks; 4 packets lost to a full receive buffer |
| 65 % | 5.1 us | 2 frames dropped by full buffer blocks |
| 85 % | 2.4 us | none |
| 100 % | 1.7 us | none (no optical packets) |

A last phase of the same test sends from one server in each of racks 0, 1 and 2 to a
single server of rack 3. Each sender offers about 3.2 Gb/s, so together they nearly fill the
one optical link into rack 3. Rack 0 has the highest priority, so it wins every
contention: it lost no frame and its mean latency was 5.2 us. Rack 1 lost 8 frames.
Rack 2 is mostly shut out: 21 frames arrived and 138 were dropped by its full buffer
block. The flow control keeps the optical path loss-free. Fairness between senders is
left to the end hosts.

`tb_ofc_buffer_sizes` runs four copies of the cluster side by side with block sizes of
2048, 4096, 8192 and 16384 bytes. Each copy gets the same kind of traffic: load 0.6, half
of it leaving the rack. Larger blocks drop fewer frames but keep frames waiting longer:

| `BLOCK_BYTES` | frames dropped (of about 2400) | mean latency |
|---|---|---|
| 2048 | 424 | 4.9 us |
| 4096 | 165 | 7.0 us |
| 8192 | 114 | 11.9 us |
| 16384 | 51 | 18.7 us |

## Where this design departs from, or goes beyond, the original system

* **Transceivers, MAC and clock recovery are not modelled.** Frames enter as word streams
  with a length sideband, and all nodes share one `clk` input. In the real system the clock
  is recovered from the label channel. `fiber_link` lumps fiber and serializer latency into
  a whole number of cycles.
* **Switch gate timing.** The optical switch model is ideal: there is no 3 ns driver delay and
  no 6 ns rise or fall time. These fit inside the 14-cycle gap but are not checked.
* **Label processing latency.** This design uses 4 cycles (12.4 ns) from request arrival to
  gate change. That matches the 43.4 ns gap budget. A separate latency table in the original
  system gives 12.8 ns for contention resolution with gate control.
* **Own choices where the original system is not specific:**
  * label word encoding;
  * packet start word and address word layout;
  * frame delimiting inside the packet;
  * CRC details;
  * three of the four size-class boundaries (only 100-200 bytes is given);
  * the order in which free outputs are filled;
  * tie-breaking;
  * treating a missing response as a NACK;
  * sending the time broadcast once per slot;
  * the MAC address convention.
* **Pipeline latencies are this design's own.** The original FPGA nodes had measured
  processing delays, for example 36 ns through the Ethernet switch and 25.6 ns to build a
  label packet. Those figures belong to that implementation. Here the same steps take one
  or a few cycles. The `fiber_link` delays of 103-125 cycles (320-390 ns) stand for fiber
  plus transceivers. The slot alignment works for any delay, because each ToR measures
  its own.
* **Receive buffer overflow.** The receive buffer holds 4096 bytes, which is 1.5 packets.
  It empties into the servers at one word per cycle. A long same-rack frame can hold a
  server port for up to 380 cycles, and then the next packet may not fit. That packet is
  discarded and counted in `rx_overflow`, although it was ACKed. With half the traffic
  leaving the rack, this already happens a few times at load 0.5. The original system
  reports no loss on the optical links below a load of 0.6. Setting `RXBUF_BYTES` to 8192
  removed these losses in the same test.
* **Buffer block RAM.** Each sub-buffer RAM is as large as the whole block, so one class can
  use all of it. The byte limit applies to the block as a whole.
* **Sizes are parameters.** The other buffer sizes the original system was measured with
  (2048, 4096 and 16384 bytes) come from `BLOCK_BYTES`, which must be a power of two. Larger
  networks made of many such clusters are not modelled; `ofc_system` is one cluster.
* **Traffic and measurements.** Server traffic generators, TCP sources and throughput or
  latency measurements over long runs are not part of the RTL. The testbenches generate
  their own random frames.
