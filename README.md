# Secure Access Node (SecAN) in SystemVerilog

An access node (a DSLAM linecard, for example) sits between many subscriber
lines and the provider's network. The Secure Access Node puts security
features at that point, in hardware, for both directions of a line:

- a packet filter on OSI layers 2 to 4, driven by a rule set chosen per flow;
- signature recognition on the payload with a Bloom filter;
- a web filter that blocks HTTP requests to listed domains.

Each subscriber flow can have its own rule set. The node finds a flow's
rule set without a CAM: a CRC32 of the flow id indexes a map in SRAM, and
the rule sets themselves live in DDR2. Frames move through the chip as
32-bit words, one per cycle. Two 1 Gbit/s directions need 16 bits per
cycle at 125 MHz, so there is headroom for the per-frame work.

```
 upstream   ──►┌───────────┐   ┌────────────────────┐   ┌──────────────────────────┐   ┌─────────────┐──► upstream
               │ frame_mux ├──►│ pce                ├──►│ ppe                      ├──►│ frame_demux │
 downstream ──►└───────────┘   │  frame buffer      │   │  6 x control_stage       │   └─────────────┘──► downstream
                               │  frame_parser      │   │  dpi_bloom               │
                               │  CRC32             │   │  web_filter              │
                               │      ▲ ▼           │   └──────────────────────────┘
                               │  rse ── SRAM port  │
                               │      └─ DDR2 port  │   configurator ◄── TLV bytes from the host
                               └────────────────────┘
```

## The frame path

1. **`frame_mux`** packs the bytes of each receiving direction into words.
   It stores them frame by frame in a 1024-word buffer per direction. When
   the classification engine is free, it sends the next frame from the
   buffer with the higher fill level (upstream wins a tie), together with
   the frame's direction. A frame that does not fit is dropped whole and
   counted.
2. **`pce`** (packet classification engine) writes the frame into its frame
   buffer (`pkt_fifo`). Meanwhile `frame_parser` extracts the ten frame
   parameters:

   | index | parameter | width |
   |---|---|---|
   | 0 | destination MAC | 48 |
   | 1 | source MAC | 48 |
   | 2 | first VLAN tag (TPID 8100 or 88A8) | 16 |
   | 3 | second VLAN tag | 16 |
   | 4 | EtherType | 16 |
   | 5 | IPv4 source address | 32 |
   | 6 | IPv4 destination address | 32 |
   | 7 | IP protocol | 8 |
   | 8 | TCP/UDP source port | 16 |
   | 9 | TCP/UDP destination port | 16 |

   Each direction has a 10-bit *flow id trigger*. Bit *i* selects parameter
   *i*. The flow id is the 248-bit parameter vector with the unselected
   fields cleared, padded to 256 bits. CRC32 (polynomial 04C11DB7, MSB
   first, start value all ones, no final inversion) runs over its eight
   words, one per cycle. If a selected parameter is missing from the frame
   (for example the ports of a non-IP frame), the flow id is incomplete and
   the standard rule set is requested instead.
3. **`rse`** (rule set engine) looks up the rule set in two stages
   (described below). It returns up to 16 rule words.
4. The PCE then sends the frame to the PPE. The first beat carries the
   *descriptor*: the parameter set, the offsets and checksums needed for
   rewriting, the payload offset, and the rule set. A stage therefore
   knows its decision before the frame data arrives. Sending, rule set
   lookup and classification of three successive frames overlap (see
   "Throughput and timing").
5. **`ppe`** (packet processing engine) is a chain of stages, one beat per
   cycle and no back-pressure:
   - six `control_stage`s, two each for layers 2, 3 and 4 (ids 2, 2, 3, 3,
     4, 4);
   - `dpi_bloom`;
   - `web_filter`.

   A stage never removes a frame. It sets a *drop* mark that travels with
   the frame and is final on its last beat.
6. **`frame_demux`** writes each frame into the output buffer of its
   direction. Upstream frames leave on the network side, downstream frames
   on the subscriber side. A buffer releases a frame only after its last
   beat has arrived unmarked (store and forward). A marked frame is rewound
   out of the buffer. Each buffer drains at one byte per cycle.

## Rule set lookup

```
SRAM word at CRC32(flow id)[17:0]:   [31] valid | [30:24] rule words n | [23:0] pointer p
DDR2 record at word 8*p:             8 words stored flow id | n rule words
```

- The SRAM holds 2^18 32-bit words (1 MB).
- The DDR2 port has 32-bit word addresses. A 24-bit pointer in 32-byte
  units covers 512 MB.
- The RSE reads the map entry, then streams the record from DDR2 with
  several reads in flight.
- It compares the stored flow id with the requested one. A mismatch
  (another flow with the same CRC index) or an invalid entry gives the
  *standard rule set*. The standard set is described by the RSE's default
  entry register, in the same entry format; its record's flow id words are
  skipped.
- A flow id that was incomplete goes straight to the standard set.

The map is direct-mapped with no chaining. When two active flows share an
index, only the one whose record is stored gets its own rules; the other
uses the standard set. With 32k flows in 256k slots, about 6 % of the flows
collide this way. The rule sets are stored uncompressed.

## Rules and control stages

A rule set is a list of rules in type-length-value form:

```
header word: [31:24] type = control stage id   [23:16] value length in bytes
             [15:12] parameter index            [11:8] compare op   [7:0] action
value:       compare value [63:32], compare value [31:0],
             replace only: new IPv4 address, or new MAC address [47:32] (low 16 bits) and [31:0]
```

| field | values |
|---|---|
| type | 2 = layer 2 stage, 3 = layer 3 stage, 4 = layer 4 stage |
| op | 0 = equal, 1 = not equal |
| action | 0 = forward, 1 = discard, 2 = replace |

How a stage handles a frame:

- It looks only at the **first** rule. If that rule's type is not its own
  id, the frame and its descriptor pass unchanged.
- Otherwise the stage removes the rule (header plus `length/4` words), so
  the next stage again finds its rule in front.
- It compares the selected parameter, zero-extended to 64 bits, with the
  value. A parameter the frame does not have never matches.
- On a match it executes the action.

The order of the rules must therefore follow the order of the stages:
layer 2 rules first, then layer 3, then layer 4, at most two per layer.

*Replace* rewrites an address as the frame streams through, and updates
the descriptor too:

- For the IPv4 source or destination address, the IPv4 header checksum and
  the TCP/UDP checksum are updated incrementally (RFC 1624). A UDP datagram
  without a checksum keeps it at zero.
- For the destination or source MAC address, no checksum is involved.

Rules cover the usual access-network measures on a per-flow basis. Some
examples:

| measure | rule |
|---|---|
| MAC anti-spoofing | a layer 2 rule: source MAC not equal to the subscriber's, discard |
| IP anti-spoofing | a layer 3 rule: source IPv4 not equal to the assigned address, discard |
| MAC address translation | a layer 2 rule: source MAC equal to the subscriber's, replace with a provider MAC |
| blocking a local service | a layer 4 rule: destination port equal to, for example, 445, discard |

## Signature recognition (`dpi_bloom`)

- Scanning starts at the first payload byte after the TCP/UDP header.
  Frames without such a payload are not scanned.
- Every payload byte ends a window of the last four bytes. Four windows are
  tested per cycle.
- A window is hashed by three H3 functions into a 4096-bit vector:
  `h_i(x) = XOR over set bits j of x of row(i, j)`, where `row(i, j)` is the
  upper 12 bits of `(i*64 + j + 1) * 0x9E3779B1` (32-bit product). The
  newest byte is in bits 7:0 of `x`.
- The frame is marked for discarding if all three bits are set for any
  window.
- The host loads the vector: configuration word `a` holds bits
  `[32a+31:32a]`. For each signature (its first four bytes), it sets the
  three bits of that window.

## Web filter (`web_filter`)

- The filter searches the payload for a header line starting with `Host:`
  (any letter case) and skips blanks.
- It hashes the domain, lower-cased, up to CR, LF, `:` or the end of the
  frame. The hash is CRC64 (ECMA-182 polynomial 42F0E1EBA9EA3693, MSB
  first, start value all ones).
- It looks the hash up in a binary search tree of up to 1023 nodes, held
  as an array. Node `i` has the smaller keys below it at `2i+1` and the
  larger at `2i+2`. An empty node ends the search.
- The search visits one node per cycle. The frame is delayed by
  `DELAY = depth + 4` cycles so the verdict can join the frame's last beat.
- The host writes node `i` at words `4i` (key high), `4i+1` (key low) and
  `4i+2` (bit 0 = valid). It must write a sorted, level-ordered tree.

## Configuration

The host sends a byte stream of records: `type`, `length`, `value`.

- `type = {component id, read}`. Component ids: 1 = system, 2 = PCE,
  3 = RSE, 4 = DPI, 5 = web filter.
- `length` counts the value bytes; 0 means 256.
- **Write**: the value is a 32-bit start word address (big-endian)
  followed by data words, written to consecutive addresses.
- **Read**: the value is an address and a word count (one byte, at most
  63). The answer on the output stream is a record with the read type,
  length `4*count`, and the words.
- Unknown types are skipped.

| component | word address | contents |
|---|---|---|
| system | 0 | bit 0 `run` |
| PCE | 0, 1 | upstream trigger, downstream trigger (bits 9:0) |
| RSE | `00` + any | default entry register (standard rule set) |
| RSE | `01` + 30-bit address | SRAM word |
| RSE | `10` + 30-bit address | DDR2 word |
| DPI | 0..127 | Bloom vector |
| web | `4i`..`4i+2` | tree node `i` |

(For the RSE, the two-bit prefix is bits 31:30 of the address.)

Starting and stopping:

- No frame enters the engines until `run` has been written.
- From the type byte of each record to its end, `hold` stops the
  multiplexer from starting frames. Frames keep collecting in the input
  buffers.
- Before its first access, a record also waits until no frame is left in
  the PCE, RSE and PPE. Configuration therefore never changes the tables
  under a frame in flight, and rules can be replaced while traffic runs.

## Top level (`secan_top`)

| ports | purpose |
|---|---|
| `rx_*[2]`, `tx_*[2]` | one byte per cycle per direction, `valid`/`last`; index 0 upstream (subscriber side in, network side out), 1 downstream |
| `cfg_in_*`, `cfg_out_*` | configuration byte streams with valid/ready |
| `sram_*`, `ddr_*` | word request (`mem_req_t`: valid, we, addr, wdata) with `ready`; read data returns in order with `rvalid` |
| `running`, `stats` | status and event counters: input and output overflows, incomplete flow ids, standard rule sets, discards, replaces, DPI matches, web hits, frames forwarded per direction, frames dropped |

Parameters and their defaults:

| parameter | default |
|---|---|
| `BUF_DEPTH` | 1024 words |
| `SRAM_AW` | 18 |
| `NUM_CS` | 6 |
| `BLOOM_BITS` | 4096 |
| `WEB_NODES` | 1023 |

The shared types are in `secan_pkg`.

## Throughput and timing

The datapath moves one 32-bit word per cycle. Two 1 Gbit/s lines need half
of that at 125 MHz. The tighter limit is the fixed work per frame:

- 8 cycles to hash the flow id;
- an SRAM read;
- 8 + n DDR2 words.

The PCE therefore works on three frames at once:

- it receives and hashes frame n+2;
- the RSE searches the rule set of frame n+1;
- it sends frame n to the PPE.

With a 3-cycle SRAM and a 9-cycle DDR2, a frame costs about 32 cycles of
classification. Minimum-size frames on both lines at once arrive every
42 cycles.

`tb_throughput` offers back-to-back frames of 60 to 1514 bytes on both
lines at once. It loses no frame. For minimum-size frames the input buffers
never hold more than one frame.

The RTL uses a single clock. It has not been timed on an FPGA.

## Not included

- **Rule set compression**: rule sets are stored uncompressed.
- **Match analyzer**: Bloom and web filter hits are not re-checked against
  full signatures or domains, so a false positive discards a frame.
- **DDR2 check of web filter hits**: same consequence as above.
- **Off-chip parts**: memory controllers, Ethernet PHYs and the host
  software. The SRAM, DDR2 and Ethernet sides are simple ports. The
  testbenches use a behavioural memory model (`tb/mem_model.sv`).
- **Connection tracking**: not part of the design.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb --top-module tb_secan_top \
    rtl/secan_pkg.sv tb/tb_util_pkg.sv tb/tb_secan_top.sv -o sim
./obj_dir/sim
```

`tb/tb_util_pkg.sv` builds Ethernet/IPv4/TCP/UDP frames with correct
checksums. It also holds independent reference models (bit-serial CRC32
and CRC64, checksum recomputation, the H3 hash).

| testbench | what it checks |
|---|---|
| `tb_pkt_fifo` | commit, discard and overflow of whole frames, random traffic |
| `tb_crc32_unit` | against a bit-serial reference |
| `tb_frame_parser` | all parameters for VLAN/IP/TCP/UDP mixes, presence bits, offsets |
| `tb_rse` | map hit, empty entry, collision fallback, standard set, memory stalls, configuration access |
| `tb_pce` | flow ids, hashes and triggers per direction, incomplete ids, frame order and overlap |
| `tb_control_stage` | each op and action, rule removal, IPv4 replace with checksum check, MAC replace |
| `tb_dpi_bloom` | signatures at all byte positions and across beats, no scan before the payload |
| `tb_web_filter` | Host header parsing, case, tree search over many keys, latency |
| `tb_ppe` | rule sets across layers, DPI and web verdicts, rewritten frames |
| `tb_frame_mux` | hold while disabled, fill-level choice, tie, overflow, random traffic with back-pressure |
| `tb_frame_demux` | per-direction output, dropped frames removed, overflow, no gaps on transmit |
| `tb_configurator` | writes, reads, `run`, 256-byte records, unknown types, `hold`, wait for idle |
| `tb_secan_top` | whole node at default sizes: configuration and read-back over TLV, then traffic in both directions (see below) |
| `tb_throughput` | whole node at default sizes, both lines at full rate for several frame lengths: loss, rate, buffer fill |
| `tb_random_flows` | whole node at default sizes: random rule sets for 24 flows and random traffic in both directions, checked byte for byte against a reference model of the rule semantics |

`tb_secan_top` sends frames in both directions that exercise:

- per-flow MAC and IPv4 replace, and discard;
- a map collision;
- the standard rule set;
- an incomplete flow id;
- a DPI signature and a blocked domain;
- input overflow and the fill-level choice;
- frames held before start;
- reconfiguration while traffic flows.

It counts each of these mechanisms and fails if one never happens.

`tb_random_flows` gives each flow up to two rules per layer, with random
fields, operators, compare values and actions. A few sets put layer-2 rules
after layer-3 rules, so those rules are never reached. The standard rule set
and the per-direction triggers also differ. The testbench sends 300 frames:
known flows, unknown flows and non-IPv4 frames, with random lengths, VLAN
tags and gaps. A model in the testbench applies the rules stage by stage and
predicts each frame's fate and exact output bytes. Any seed can be used
(`+verilator+seed+N`).
