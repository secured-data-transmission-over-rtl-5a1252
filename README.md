# A covert timing channel across an untrusted Network-on-Chip

When the network-on-chip of an SoC is bought from a third party, a hardware Trojan in one
of its routers can read, copy or change any payload that passes through it. Encrypting the
payload does not help much: the Trojan can still see who talks to whom and tamper with the
data. This design sends secret bits without putting them in any packet at all. The
transmitter node sends ordinary data packets to the receiver node and chooses **the gaps
between them**. The receiver timestamps the arrivals and reads the bits back from those
inter-packet delays (IPDs). To the network the packets look like normal traffic.

The RTL implements the two network-interface endpoints of such a channel, the transmitter
and the receiver, with:

* **1B2T block coding.** Each secret bit becomes two ternary symbols (trits), and each
  trit becomes one of three delay levels. The spread of gaps then looks less like a
  two-peaked "secret channel" histogram. The code also corrects a one-level timing slip.
* **A reliable-delivery protocol** on top of the timing channel. It has session set-up
  and tear-down, a congestion probe, a lifetime timer per covert packet, ACK/NACK, and
  retransmission. The timing channel on its own is lossy: a malicious router can drop or
  delay packets, and other traffic moves the gaps.

The network itself, the processor cores, and the attacker's detection logic are not part
of the RTL. The endpoints' injection and ejection ports are brought out at the top, and
the testbenches use a behavioural model of a network path.

## The timing channel

A burst of K delays is sent as K+1 *carrier* packets. Carriers are ordinary data packets
whose two flag fields are set:

| field       | width  | meaning                                                   |
|-------------|--------|-----------------------------------------------------------|
| `flag_addr` | 6      | the transmitter's node address (log2 of 64 nodes)         |
| `flag_tag`  | 1      | 1 = the arrival time of this packet carries information   |

The first carrier of a burst is the **reference**, and it carries no delay. Every later
carrier leaves exactly `d_i` cycles after the previous one was accepted by the network.
The receiver measures `t_{i+1} - t_i` between consecutive carriers from the same
transmitter address. It maps each received delay to a trit with two thresholds:

| delay level (transmit) | received delay `d`  | trit |
|------------------------|---------------------|------|
| l'0 = 10 cycles        | d < T1 = 20         | 0    |
| l'1 = 30 cycles        | 20 ≤ d < T2 = 40    | 1    |
| l'2 = 50 cycles        | d ≥ 40              | 2    |

Carriers reuse the application's real packets to the peer when there are any. When the
application has nothing to send at the moment a gap ends, a *dummy* packet with an
all-zero payload goes out instead, so the timing never waits for traffic. Outside a burst,
application packets pass through with the tag cleared. The receiver gives every data
packet to its application, tagged or not. The levels and thresholds are run-time inputs
(`levels[3]`, `thresh[2]`, 16 bits each). They can be raised when the network stays busy
for a long time.

## 1B2T coding

| bit | code word (first trit, second trit) | delays sent  |
|-----|-------------------------------------|--------------|
| 0   | 2, 0                                | 50, then 10  |
| 1   | 0, 1                                | 10, then 30  |

So the bits `0 1 0` become the delays `50 10 10 30 50 10`. A covert packet of 8 bits needs
16 delays and 17 carriers. A burst takes exactly 60 cycles per 0 bit and 40 per 1 bit, and
the end-to-end test checks this at the injection port.

The decoder collects two trits and picks the code word with the smallest **sum of
absolute trit differences**. This is a deliberate choice. The two code words are only two
trits apart in Hamming terms, so a Hamming decoder would tie on every single error. With
level distance, every one-level slip of either trit is corrected. As an example, "21" or
"10" decode to 0, and "11" or "02" decode to 1. Two pairs, "12" and "22", are two steps
from both code words. They are flagged *uncorrectable*, and the receiver answers the whole
covert packet with NACK. A pair is reported *corrected* when it was not an exact code word.

The encoder and decoder are generic nBmT blocks (`N` bits to `M` trits, any code-book).
If the covert packet length is not a multiple of `N`, the transmitter pads the last group
with zero bits and the receiver drops them. Both ends must use the same code-book. It is a
parameter that the top passes to both endpoints, so it is fixed when the design is built.
Setting `N=1, M=1`, code-book `{0, 1}`, two levels (10, 50) and one threshold (30) gives
the plain binary IPD channel, which is the usual point of comparison. The default is the
block-coded channel.

## The protocol

The transmitter controller (`ipd_tx_ctrl`) runs a stop-and-wait protocol. It has one
covert packet in flight:

```
 IDLE --cv_valid--> REQ --> wait ACK --(LIFETIME, resend REQ)
                              |
                              v
        +--------------> PROBE --> wait PROBE_ACK
        |                   | rtt > CONG_RTT: wait BACKOFF cycles, probe again
        |                   | no answer within LIFETIME: probe again
        |                   v
        |                 SEND 8 bits as 16 delays  (lifetime timer starts)
        |                   v
        |                 wait verdict
        +-- NACK, or no ACK within LIFETIME: send the same covert packet again
        +-- ACK: next covert packet; after the one marked last -> TER -> IDLE
```

The receiver controller (`ipd_rx_ctrl`):

* answers REQ with ACK and opens a session. TER closes the session.
* echoes every PROBE with PROBE_ACK at once, so that the probe measures the network.
* collects decoded groups into a covert packet. After 8 bits it either delivers the packet
  on `cv_*` and sends ACK, or, if any pair was uncorrectable, discards it and sends NACK.

The hardest part is **finding where a covert packet starts**, because carriers carry no
sequence number. The receiver's extractor is *armed*: the next carrier it sees becomes a
reference, not a delay. It becomes armed in three cases:

1. after reset;
2. when the controller finishes a covert packet, whether ACKed or NACKed (`rearm`);
3. when no carrier has arrived for `GAP_LIMIT` = 512 cycles. This also reports a *gap*,
   and any half-built covert packet is dropped.

If the network drops a carrier, the receiver gets too few delays. It stays silent and
never ACKs. The gap rule then resynchronises it, and the transmitter's lifetime timer
sends the packet again. The timers must be ordered for this to work:

```
largest level + jitter  <  GAP_LIMIT           (no false gap inside a burst)
burst (<= 16 x 50 = 800) + GAP_LIMIT + round trip  <  LIFETIME = 4096
uncongested round trip (about 2 x 41 cycles on an 8x8 mesh)  <  CONG_RTT = 256
```

The transmitter's injection port is shared between the pacer and control packets. During
a burst the pacer owns the port, so that a REQ or PROBE cannot stretch a gap. Between
bursts, a waiting control packet goes before untagged application traffic.

## Blocks

| module                  | what it does                                                                   |
|-------------------------|--------------------------------------------------------------------------------|
| `ipd_pkg`               | packet struct `pkt_t`, packet types, the default code-book, levels, thresholds |
| `nbmt_encoder`          | N-bit group to M trits, first trit first                                       |
| `ipd_generator`         | trit to delay, from the `levels` table (one register stage)                    |
| `ipd_pacer`             | sends the reference and the carriers spaced by the delays; uses dummies; pass-through |
| `ipd_tx_ctrl`           | transmitter protocol FSM (above)                                               |
| `ipd_tx`                | transmitter endpoint: controller, encoder, generator, pacer, injection mux     |
| `ipd_extractor`         | picks carriers of one transmitter, measures delays, reference/re-arm/gap       |
| `ipd_threshold_decoder` | delay to trit by counting the thresholds at or below it                        |
| `nbmt_decoder`          | M trits to N bits, nearest code word, corrected/uncorrectable flags            |
| `ipd_rx_ctrl`           | receiver protocol, covert-packet assembly, ACK/NACK/PROBE_ACK                  |
| `ipd_rx`                | receiver endpoint: extractor, threshold decoder, decoder, controller           |
| `ipd_link_top`          | both endpoints, with each node's injection and ejection ports brought out     |

All streams use valid/ready. Ejection ports are always accepted. The reset is
asynchronous and active low. Packets carry a 3-bit type, a 6-bit destination, the flag
bits, and a single 256-bit flit as payload. Modelling the network's 5-flit packets as
one word at the interface is a simplification. The `ev_*` outputs of the top pulse once
per event: retransmission by timeout, retransmission by NACK, congestion seen, packet
ACKed, dummy sent, pair corrected, NACK sent, and partial packet dropped.

## Parameters (top `ipd_link_top`)

| parameter   | default   | origin                                               |
|-------------|-----------|------------------------------------------------------|
| `N`, `M`    | 1, 2      | 1B2T coding                                          |
| `CODEBOOK`  | 0→"20", 1→"01" | published code-book                             |
| `NL`        | 3         | three delay levels                                   |
| `CBITS`     | 8         | covert bits per covert packet                        |
| `MAX_CORR`  | 1         | largest level distance still corrected               |
| `LIFETIME`  | 4096      | chosen here                                          |
| `CONG_RTT`  | 256       | chosen here                                          |
| `BACKOFF`   | 1024      | chosen here                                          |
| `GAP_LIMIT` | 512       | chosen here                                          |
| `ADDR_W` (package) | 6  | 8x8 mesh. Use 8 for 12x12 or 16x16 meshes            |

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb rtl/ipd_pkg.sv \
          tb/ipd_link_top_tb.sv --top-module ipd_link_top_tb -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. `-Wno-fatal` keeps the width warnings of
the testbenches from stopping the build.

* `ipd_link_top_tb` runs the top at its default parameters. It uses nodes 2 and 63 of an
  8x8 mesh, and the path model adds 3 cycles per hop plus 5 cycles of serialisation.
  It sends 12 covert bytes and makes each mechanism happen at least once: a corrected
  pair, NACK and retransmission, a dropped carrier followed by a gap and a lifetime
  timeout, congestion back-off, large jitter, dummies and pass-through. It checks exact
  delivery and the burst lengths.
* `ipd_workload_tb` sends 1000 covert packets of 8 bits over an 8x8 mesh and over a 4x4
  mesh, under two levels of noise. `ipd_baseline_workload_tb` runs the same workload over
  the plain binary channel (delays 10/50, threshold 30), using the same RTL with `N=1, M=1`.
  Both print the packet error rate and the effective throughput:

  * PER counts every erroneous covert packet: NACKed, timed out or delivered wrong. It is
    divided by all transmission attempts.
  * Effective throughput is correctly delivered covert bits per 1000 cycles.

  Typical results from two seeds:

  | channel   | mesh | noise | cycles  | PER        | of which delivered wrong | good bits / 1000 cycles |
  |-----------|------|-------|---------|------------|--------------------------|-------------------------|
  | 1B2T      | 8x8  | light | ≈ 608 k | 0.0–0.1%   | 0                        | 13 |
  | 1B2T      | 4x4  | light | ≈ 520 k | 0.1–0.3%   | 0                        | 15 |
  | 1B2T      | 8x8  | heavy | ≈ 620 k | 7–8%       | 67–73                    | 11–12 |
  | 1B2T      | 4x4  | heavy | ≈ 528 k | 7%         | 61–65                    | 14 |
  | binary    | 8x8  | light | ≈ 450 k | 0.0–0.1%   | 0                        | 17 |
  | binary    | 4x4  | light | ≈ 355 k | 0.0–0.1%   | 0                        | 22 |
  | binary    | 8x8  | heavy | ≈ 460 k | 23–24%     | 226–238                  | 13 |
  | binary    | 4x4  | heavy | ≈ 357 k | 16–17%     | 157–171                  | 18 |

  * Light noise is 0..6 cycles of jitter, plus 0..3 extra cycles on 2% of packets, plus
    occasional carrier loss. Every packet must arrive exactly.
  * Heavy noise is 0..30 extra cycles on 2% of packets. All packets must arrive. Fewer
    than 10% may be wrong on the 1B2T channel, and fewer than 40% on the binary one.

  Under heavy noise the block code cuts the PER to about a third. In this network model
  the binary channel still moves more good bits per cycle. Its average gap is 30 cycles
  per bit, against 50 per bit for 1B2T, and both channels wait for an ACK after every
  covert packet.
* `ipd_link_3b2t_tb` configures the endpoints for 3B2T coding, with eight of the nine trit
  pairs as code words. An 8-bit covert packet is then three groups, the last one padded.
  The test sends 200 covert packets end to end and checks them exactly.
* `noc_path_model` (testbench only) is the network stand-in. Each packet gets a fixed
  latency, a random jitter and an optional extra delay. Packets stay in order, and the
  model can drop the next tagged packet.

## Limits and departures

* **The code corrects one slip per pair, not one late packet.** A single late packet
  lengthens one delay and shortens the next. If both delays fall in the same code word,
  "01" reads as "10", which is nearer to "20". The packet is then delivered wrong with
  an ACK, and no error is detected. This is why the heavy-noise workload shows about 7%
  of packets delivered wrong against about 1% NACKed or timed out. The protocol has no checksum
  over a covert packet. Adding one would change the packet format.
* **No sequence numbers.** If an ACK is lost or arrives after `LIFETIME`, the
  transmitter sends the same covert packet again, and the receiver delivers it twice. The
  tests never drop control packets.
* **One stream per endpoint pair.** A receiver endpoint watches one transmitter address,
  and a transmitter endpoint sends to one peer at a time. The peer address is an input, so
  it can change between sessions. Streams that share network paths are told apart by the
  address in the flag bits. Running several streams at once, such as one node to two
  receivers, takes one endpoint per stream at each node, plus an arbiter on the injection
  port that is not included here.
* **Congestion handling** waits and probes again without limit, and nothing adapts the
  thresholds automatically. The thresholds are inputs, so software can raise them.
* **The transmitter and receiver are built as logic** at the network interface. The
  scheme can equally run as software on the two cores. Done in software, encoding and
  decoding take tens of cycles per bit. Here a received delay becomes a trit within two
  cycles of the packet's arrival, and each code word is decoded when its last trit
  arrives, one cycle later. Decoding therefore never limits how short the delay levels can be.
* **Not built:** the mesh network itself, the attacker's detector (a KL-divergence test
  on arrival-time histograms), and the processor and chiplet platforms used to evaluate
  the scheme.
