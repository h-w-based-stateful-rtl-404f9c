# Hardware session table for stateful TCP inspection

A stateful intrusion detection system has to know, for every packet, whether
it belongs to a TCP connection that was properly opened, and in which direction
it travels. Software session tables cannot keep up with gigabit links once they
hold a million sessions. This RTL keeps the whole session table in two
external SRAMs. It labels each packet with its connection state in a fixed
22 clock cycles, whatever the number of sessions.

The architecture follows Yoon, Kim, Oh and Jang, *"H/W based Stateful Packet
Inspection using a Novel Session Architecture"*. That paper describes an
FPGA module plus two 72-Mbit SRAMs. This is an independent SystemVerilog
implementation. Some details the paper leaves open, and those are filled in
here. Each one is listed in the section on departures below.

Here is the main idea:

- Each session takes one 36-bit word. The table is **set-associative**: a
  hash of the connection picks a set of 32 words.
- A second, independent hash identifies the session inside that set.
- Both directions of a connection map to the same entry. This works because
  the addresses are put in a fixed order before hashing.
- A 1-bit flag records whether the order was swapped. Combined with one bit
  stored in the entry, it gives the direction of every packet.

## Data path

```
32-bit packet words
   |
packet_parser  -> 4-tuple, protocol, TCP flags
   |
packet_filter  -> drops packets matching protocol/port rules
   |
state_manager  -> hash_key_gen, set scan, session_detect, session_mgmt, timer, sweep
   |      \__________ session_sram  x2 (SRAM#1 = ways 0..15, SRAM#2 = ways 16..31)
   |
state_info_gen -> state information (handshake phase / established + direction)
   |
descriptor to the intrusion detection engine (ide_*), copy for TCP reassembly (sess_res_o)

32-bit packet words -> packet_buffer -> packet words with state information (pd_*)
```

`spi_ids_top` wires these blocks together. The following are not part of this
RTL: IP de-fragmentation (packets must arrive whole), TCP reassembly, the
pattern-matching engine, and the management CPU. Their connections are the
top's ports.

## The session entry

```
 35   33 32        25 24                         0
+-------+------------+----------------------------+
| state | time stamp |  hash address (Hash2)      |
|  (3)  |    (8)     |          (25)              |
+-------+------------+----------------------------+
```

- **state** is the connection state (see below). `000` means the entry is
  free; the table has no separate valid bit.
- **time stamp** is the 8-bit internal timer value at the last access. It is
  used both for timeouts and for choosing an entry to replace.
- **hash address** is Hash2 of the session. With Hash1 (17 bits) choosing the
  set, 42 hash bits identify a session. Two sessions that agree in all 42 bits
  would share an entry. Nothing detects this; the design accepts it by
  construction.

## Hash key generator (`hash_key_gen`)

1. **Ordering.** If `src_ip < dst_ip`, the tuple is kept and
   `Position_change_flag` (PCF) = 0. Otherwise both the IPs and the ports are
   swapped, and PCF = 1.
2. **Hash1** is the low 17 bits of CRC-32 (polynomial 0x04C11DB7, initial value
   all ones, MSB first) over the 96-bit ordered tuple. It is the set index.
3. **Hash2** is the low 25 bits of CRC-32C (polynomial 0x1EDC6F41) over the
   same 96 bits.

The paper only asks for "two different hash functions such as XOR or CRC". The
two polynomials are this implementation's choice. If the two IPs are equal,
the tuple is swapped in both directions, so such a connection hashes
differently per direction. This follows the ordering rule exactly as the paper
gives it.

## Connection states (`session_fsm`) and direction (`state_info_gen`)

```
000 --SYN--> 001 --SYN/ACK--> 010 --ACK, PCF=0--> 100 --FIN--> 101 --FIN--> 000
                                  \--ACK, PCF=1--> 110 --FIN--> 111 --FIN--> 000
RST in 100, 101, 110 or 111 --> 000
```

The middle bit of an established state stores the PCF of the packet that
completed the handshake. That packet always travels from client to server.
So for any later packet, `PCF xor state[1]` gives the direction:

- 0 means client to server;
- 1 means server to client.

The state information sent with each packet takes one of six values: not
established, SYN received, SYN/ACK received, reserved (011, never used),
established client-to-server, and established server-to-client.

Packets are classified in this order:

- RST: the RST bit is set.
- SYN: SYN is set and ACK is clear.
- SYN/ACK: both SYN and ACK are set.
- FIN: FIN is set (ACK may be set or clear).
- ACK: only ACK is set among SYN, FIN, RST and ACK.

Any other packet leaves the state unchanged. An RST during the handshake is
ignored, as is a SYN on an established session.

## Finding, creating and replacing sessions (`state_manager`)

This is the part with the most timing detail. Each TCP packet goes through
these steps:

1. **Accept** the descriptor and latch Hash1, Hash2 and PCF. This takes 1 cycle.
2. **Scan.** Words `{Hash1, w}` are read from both SRAMs for w = 0..15, one
   pair per cycle. The SRAMs have a one-cycle read latency. `session_detect`
   folds each pair in and keeps three results:
   - the first *live* entry whose hash address equals Hash2 (a **hit**);
   - the first non-live way (**free**);
   - the live way with the greatest age, `timer − time stamp` mod 256
     (the **LRU** way).

   An entry is live if its state is not 000 and its age does not exceed its
   timeout: `cfg_emb_timeout_i` for states 001/010, `cfg_est_timeout_i` for
   established states.
3. **Decide and write.** This is one cycle, handled by `session_mgmt`:
   - *Hit:* the entry is rewritten with the next state and the current timer.
     If the next state is 000, this deletes the session.
   - *Miss and the packet is a SYN:* a new entry `{001, timer, Hash2}` is
     written to the free way. If the set has no free way, it goes to the LRU
     way, and `replaced` is flagged.
   - *Miss and any other packet:* nothing is written. The packet is reported
     as not established. It is flagged `drop` if `cfg_drop_unmatched_i` is set.
4. **Respond.** `out_valid` rises WAYS_PER_SRAM + 2 = 18 cycles after the
   accepting edge. The result is held until it is taken.
5. **Sweep step.** This takes 2 cycles (described below).

Throughput is one TCP packet every 22 cycles (176 ns at 125 MHz). Non-TCP
packets skip the table and are answered in the next cycle.

The state information is computed from the state *after* the packet.
Consequently, the packet that closes a session (the second FIN, or an RST) is
itself reported as "not established".

### Timeouts and the background sweep

A timed-out entry stops matching immediately and becomes a free way. It must
also be cleared, because the 8-bit time stamp wraps: an old entry would
otherwise look young again.

A sweep pointer walks the whole table, one word pair per step. Each step reads
the pair and writes 000 into any non-free entry that has timed out. It runs
one step after every packet, and one step every two cycles while no packet is
waiting. Each step covers one word of each SRAM, so a full pass over the 2^21 word
addresses takes at least 2^21 steps: about 4.2 M cycles when idle, or 2^21
packets under load. This must be shorter than `(256 − timeout)` timer
ticks; the default tick of 125 M cycles (1 s) satisfies it comfortably.

`sweep_remove_o` pulses when the sweep removes an entry.

### Reset

SRAM contents are undefined at power-up. After reset the manager writes zero
to every word of both SRAMs, which takes 2^(SET_BITS+4) cycles (2,097,152 at
the defaults). `init_done_o` then rises, and only after that are packets
accepted.

## Parser and filter

- **`packet_parser`** takes IPv4 packets as big-endian 32-bit words with
  `sop`/`eop` and a valid/ready handshake. It honours the IHL field. For TCP
  it extracts the ports and the flag byte (bits 23:16 of the fourth TCP header
  word); for UDP it extracts the ports only.
- **`packet_filter`** holds `N_RULES` rules. Each rule is
  `{valid, proto_en, proto, port_en, port}`, and the port matches either the
  source or the destination port. A packet matching any rule is dropped, with
  a `filt_drop_o` pulse. Everything else passes.

## Packet buffer (`packet_buffer`)

Every packet word that enters the top is also written into a word FIFO. Two
small in-order queues collect each packet's fate:

- the filter verdict: passed or dropped;
- for passed packets, the state manager's result: the state information and
  the drop flag of the unmatched-packet policy.

When the oldest stored packet has both, it is either sent out on `pd_*`
(one word per cycle, `pd_info_o` held for the whole packet) or discarded.
A packet's verdict exists only after its last word is stored, because the
parser reports a packet at its last word. So the packet at the head is
always complete.

The FIFO holds 2^`BUF_AW` words (512 = 2048 bytes by default) and at most
`BUF_PKTS` packets (8). A packet must fit in the FIFO. While the FIFO is full,
or `BUF_PKTS` packets are waiting, the top stops taking input. The `pd_*` and
`ide_*` outputs are independent. If the engine stops taking packet words,
though, input soon stops as well.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `SET_BITS` | 17 | Hash1 width; 2^17 sets |
| `WAYS_PER_SRAM` | 16 | ways per SRAM; the set is 2 × 16 = 32 ways |
| `TICK_CYCLES` | 125,000,000 | clocks per time-stamp tick (1 s at 8 ns) |
| `N_RULES` | 8 | filter rules |
| `BUF_AW` | 9 | packet buffer holds 2^9 words |
| `BUF_PKTS` | 8 | packets the buffer holds (a power of two) |

At the defaults each SRAM is 2^21 × 36 bits (72 Mbit), for 4,194,304 session
entries in total. The timeouts are ports, in ticks, because they are
administrator settings.

## Departures from the paper, and choices it leaves open

- **RST transitions.** The state diagram in the paper draws RST only from 100
  and 110, but its text lists 100, 101, 110 and 111. The text is followed.
- **SRAM model.** The SRAMs are modelled as generic synchronous single-port
  memories with one-cycle read latency, not as the pipelined bus of the real
  parts.
- **Own choices.** These are additions of this implementation:
  - the sweep;
  - the table clear after reset;
  - the tick length;
  - the hash polynomials;
  - the packet classification order;
  - the state-information codes;
  - the word-stream packet interface;
  - the rule format;
  - every handshake.
- **One packet at a time.** The state manager has a single packet in flight.
  The paper gives no pipeline structure, and 22 cycles per packet is well
  inside the 2 Gbit/s budget (42 cycles per minimum-size frame at 8 ns).
- **Packet data.** The paper only says that the state information goes to
  the detection engine "with packet data". Here the engine gets both a
  descriptor and the packet words. The packet buffer, its sizes and the
  discarding of dropped packets are this implementation's choices.
- **Not implemented:**
  - IP de-fragmentation and TCP reassembly: only named in the paper, with
    one-line descriptions.
  - The pattern-matching engine, alert manager and response logic.
  - The board-level parts: CPU, Ethernet devices and TCAMs.

## Capacity and rate

- **1,000,000 sessions** average 7.6 per set (measured with random
  connections: at most 22 in any set). Even 1,500,000 sessions average
  11.4 per set, against 32 ways, so LRU replacement of live sessions is very
  rare at these loads.
- **40,000 connections per second** at about 7 packets per connection is
  280,000 lookups/s. The design does 5.68 M lookups/s, or about 710,000
  eight-packet connections per second.
- **2 Gbit/s** of minimum-size frames is 2.98 M packets/s, which also fits.
  At 2 Gbit/s *per direction* it would not: that is 5.95 M packets/s.

## Verification

Every block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line. `tb_ref_pkg` provides reference models
written independently of the RTL:

- CRC by polynomial long division;
- the transition table and the state-information table;
- an IPv4 packet builder.

The end-to-end and workload testbenches are:

- **`tb_spi_ids_top`** (reduced to 8 sets × 8 ways, with a 200-cycle tick)
  drives packets through the whole module. It makes every
  mechanism happen and counts each one: table clear, filter drop, non-TCP
  bypass, session creation, both registration orientations, both directions,
  half-close, FIN close, RST, unmatched packets passed and dropped, LRU
  replacement, embryonic and established timeouts, the sweep, and
  back-pressure. It also checks the packet data output word by word, taking
  it with random back-pressure. Only packets that were neither filtered nor
  dropped may appear, each with the right state information.
- **`tb_spi_ids_full`** runs at the default size. After the 2^21-cycle table
  clear it takes two sessions through their whole life. It also checks the
  18-cycle result latency.
- **`tb_spi_ids_mcs`** runs at the default size. It opens one session, then
  1,500,000 more at line rate, and checks three things: the first session is
  still found as established, no live entry was replaced, and the packet
  period is at most 42 cycles (measured: 22). At one million sessions it also
  histograms the sessions per set: mean 7.63, standard deviation 2.76, and
  at most 22 in any set. A full set (32) is 8.8 standard deviations above the
  mean. It runs for under a minute.
- **`tb_spi_ids_cps`** runs at the default size. It takes 50,000 complete
  connections (handshake, data both ways, two FINs, a late ACK) through the
  design, 64 open at once with their packets interleaved. Every result is
  checked, every session must be created and removed once, and the measured
  rate must reach 40,000 connections per second at 8 ns (measured: about
  710,000).
- **`tb_state_manager_rand`** drives 4,000 random TCP packets over 14
  connections into a 2-set, 4-way table with short timeouts. It compares every
  result with a behavioural model of the table, covering hits, creation,
  replacement, removal and expiry. It ends by letting the timer wrap with no
  traffic, and checks that the sweep has cleared every old session.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/spi_pkg.sv tb/tb_ref_pkg.sv tb/tb_spi_ids_top.sv --top-module tb_spi_ids_top
./obj_dir/Vtb_spi_ids_top
```

The same command works for any other testbench: replace the file and top
name. Simulation state that nothing resets may start random. All state that
the design reads is reset or cleared, except the SRAM arrays, which the
manager clears itself.
