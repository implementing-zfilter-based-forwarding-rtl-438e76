# zFilter forwarding node

A packet forwarding node in which the route travels in the packet. Every
directed link in the network has a name, a *Link ID*: a long bit string
(248 bits here) with only a few bits set (typically 5). The sender ORs
together the Link IDs of all links of a delivery tree (unicast or multicast)
and puts the result, a Bloom filter called the *zFilter*, into the packet
header. A node needs no routing table: for each of its outgoing links it
tests

    zFilter & LinkID == LinkID

and sends a copy of the packet on every link that passes. Links that were not
put into the filter can pass by chance (a false positive); that costs extra
traffic, never a lost packet.

Two extensions are built in:

- **Link ID Tags (LITs).** Each link has `NUM_LITS` alternative names
  instead of one. The packet carries an index `d` that says which of the
  `NUM_LITS` tables was used to build its zFilter, so a sender can pick the
  candidate filter with the fewest false positives.
- **Virtual links.** Management can give a whole sub-tree a Link ID of its
  own and configure it on every node it crosses. The node matches these
  virtual Link IDs exactly like real ones; an interface forwards if its real
  Link ID or any of its virtual Link IDs matches.

- **Slow path.** The node has local Link IDs of its own (one real, plus
  `NUM_VLINKS` virtual ones, each with `NUM_LITS` LITs) that name the way
  from the switching fabric to the node's control processor. A packet whose
  zFilter matches one of them is also sent to the CPU (`out_cpu`). Each local
  Link ID can additionally be marked as blocking: a packet that matches it then
  goes only to the CPU and to no interface.

The node also refuses packets that are obviously wrong: a foreign ethertype,
an expired TTL, a zFilter with too many ones (setting all bits would
otherwise flood the whole network), a `d` beyond the configured tables, or a
packet that ends inside the zFilter.

The RTL targets a NetFPGA-style 64-bit packet stream at 125 MHz. The
default configuration is 4 interfaces, each with 4 real and 4 virtual LITs of
248 bits.

## Packet format

Packets are 64-bit words with an 8-bit control byte. Word 0 is the NetFPGA
module header (`ctrl = 0xFF`), the last word has a non-zero `ctrl`, all others
`ctrl = 0`. Byte order is big-endian: bits 63:56 are the first byte.

| word | bits | field |
|---|---|---|
| 0 | 63:48 | destination queues, one-hot; written by the node (bit `2p` = interface `p`, bit 1 = CPU) |
| 0 | 31:16 | source port (kept for the status registers) |
| 1 | 63:0 | destination MAC, upper 16 bits of source MAC |
| 2 | 63:32 | lower 32 bits of source MAC |
| 2 | 31:16 | ethertype, must be `0xACDC` |
| 2 | 15:8 | `d`, the LIT table index |
| 2 | 7:0 | TTL; packets arriving with 0 are dropped, forwarded packets leave with TTL-1 |
| 3..6 | | zFilter, most significant bit first; 248 bits used, bits 7:0 of word 6 are padding and ignored |
| 7.. | | payload |

The ethertype, the 64-bit word and the use of d and TTL come from the
NetFPGA implementation this design follows; the exact byte positions of d,
TTL and the zFilter are this design's choice (they sit right after the
ethertype, before the filter, as the original places the index "before the
zFilter").

## How a decision is made

The node does not wait for the whole packet. Every word that enters is
written into the packet buffer (`store_packet`) and, in the same cycle, seen
by the decision logic (`output_port_selector`). With back-to-back words:

| cycle | word | what happens |
|---|---|---|
| 0 | module header | every matcher's forwarding bit is set to 1, ones count cleared, source port stored |
| 1 | Ethernet | nothing |
| 2 | ethertype/d/TTL | ethertype and TTL checked and stored; `d` goes straight from the bus to the LIT memories, which read chunk 0 of table `d` |
| 3–6 | zFilter chunk 0–3 | each matcher ANDs the chunk with its LIT chunk and clears its bit on a mismatch; the ones of the chunk are added to the count; the memories read the next chunk |
| 7 | (next packet may start) | all per-packet results final; `combine_results` samples them |
| 8 | | `dec_valid`: port bit-vector and CPU bit, or nothing plus the drop reasons |
| 9 | | earliest cycle the packet's first word leaves on `out_*` |

The decision therefore takes 8 cycles (64 ns at 125 MHz), the figure
reported for the original matcher, and the whole design runs at one word per
cycle with no stall of its own.

The subtle part is the LIT read. Each Link ID has its own memory
(`id_store`) so all matchers read in parallel at line rate. These memories
read synchronously (block RAM or distributed RAM), so the address for zFilter
chunk *j* must be presented one cycle before that chunk is on the bus. The
selector computes the address from its word counter with a one-word lookahead:
on the header word it uses `d` from the bus, on a zFilter word that is being
accepted it already asks for the next chunk, and in an idle cycle it asks
again for the chunk that is still awaited. Gaps in the input stream are
therefore harmless.

Each matcher (`zfilter_match`) holds a single bit of the forwarding
bit-vector, one per Link ID. The node does not test the LIT against the whole
filter at once; it starts from "forward" and can only lose it chunk by chunk.
A LIT that has no bit set never matches, so a link whose table was never
written stays silent.

The ones counter (`bit_counter`) is a combinational adder tree over one
64-bit word; the selector adds its result into a register per chunk. Padding
bits are masked before counting and matching.

The matchers of the local Link IDs go through `slow_path_select`: any match
sets the CPU bit, and a match on a local Link ID whose blocking bit is set
(register 11) clears all interface bits.

`combine_results` forwards the bit-vector (with the CPU bit) only if the ethertype is right,
the TTL is above zero, the ones count is at most the configured limit, `d` is
below `NUM_LITS` and the zFilter was complete. A short packet (ending before
word 6) is decided two cycles after its last word.

## Packet buffer and output

`store_packet` keeps the packets in arrival order in a FIFO of `BUF_WORDS`
words (512 = 4 KiB by default, enough for two full-size Ethernet frames).
Decisions arrive in the same order and wait in a small FIFO. The packet at the
head leaves as soon as its decision is there:

- if the decision has ports or the CPU bit, the packet goes out on
  `out_data/out_ctrl` with `out_wr`, held by `out_rdy`; `out_ports` and
  `out_cpu` carry the destinations for the whole packet, the module header destination field is rewritten with it,
  and the TTL byte is decremented;
- if it has none, the packet is discarded at one word per cycle.

`in_rdy` falls when the buffer is full, or when a new packet would start
while `DEC_DEPTH` (16) packets are already in the buffer; that keeps the
decision FIFO from overflowing. The original node writes packets into the
board SRAM of the reference output queues; here the queues themselves are
outside the design, and `out_*` is the interface to them.

## Registers

A simple 32-bit register port (`reg_req` strobe with `reg_wr`, `reg_addr`,
`reg_wdata`; `reg_ack` with `reg_rdata`) replaces the NetFPGA register bus.
Wait for `reg_ack` before the next request.

`reg_addr[15] = 0`: control and status (`status_regs`), acknowledged after
one cycle; only the low four address bits are decoded.

| addr | access | content |
|---|---|---|
| 0 | RO | number of interfaces |
| 1 | RO | LITs per link (`NUM_LITS`) |
| 2 | RO | virtual LITs per interface (`NUM_VLINKS * NUM_LITS`) |
| 3 | RO | LIT length in bits |
| 4 | RW | maximum number of ones in a zFilter (reset: `LIT_BITS/2` = 124) |
| 5–8 | RO | last forwarded packet: ones count, d, TTL as received, source port |
| 9 | RO | last forwarded packet: port bit-vector |
| 10 | RO | virtual links per interface |
| 11 | RW | slow path blocking: bit 0 = real local Link ID, bit `v` = virtual local Link ID `v` (reset 0) |

`reg_addr[15] = 1`: LIT tables (`lit_regs`), acknowledged after two cycles.
The low bits are `{set, link, d, chunk, half}`: 3 + 1 + 2 + 2 + 1 bits by
default. `set` 0..3 are the interfaces, set 4 the node's local (slow path)
Link IDs. `link` 0 is the set's real Link ID, 1 its virtual one; `chunk`
0 holds LIT bits 247:184 (the first zFilter word); `half` 1 is the upper 32
bits of the chunk. Unwritten padding bits should be zero. Writing a LIT is
possible while traffic flows; a packet being matched at that moment may see
the old or the new chunk for the word being rewritten.

LIT memories are not reset; write every table in use after power-up.

Because a LIT that is all zero never matches, management can keep a spare
virtual Link ID unused and bring it to life later with one set of register
writes, e.g. to switch a pre-planned backup path on when a link fails, with
no change to the zFilters the senders use.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_PORTS` | 4 | interfaces (bits of the forwarding bit-vector) |
| `NUM_LITS` | 4 | LIT tables per link, i.e. values of `d` |
| `NUM_VLINKS` | 1 | virtual Link IDs per interface, each with `NUM_LITS` LITs |
| `LIT_BITS` | 248 | LIT and zFilter length |
| `ETHERTYPE` | `16'hACDC` | accepted ethertype |
| `BUF_WORDS` | 512 | packet buffer size in 64-bit words |
| `DEC_DEPTH` | 16 | packets that may wait in the buffer |

Changing `LIT_BITS` changes the number of zFilter words
(`ceil(LIT_BITS/64)`) and with it the decision latency (4 + words cycles).
The LIT register address must fit in 15 bits; elaboration stops with an
error otherwise.

## Files

`rtl/` (one module or package per file):

- `zfilter_node` – top: selector and packet buffer.
- `output_port_selector` – parsing, the checks, one `id_store` and one
  `zfilter_match` per Link ID (10 by default: 4 interfaces and the local set,
  each real + virtual), `slow_path_select`, `combine_results`, both register
  blocks.
- `slow_path_select` – CPU copy and blocking from the local Link IDs.
- `zfilter_match`, `bit_counter`, `ethertype_check`, `ttl_check`,
  `combine_results` – the per-packet functions above.
- `id_store` – dual-port LIT memory: 64-bit read port for the matcher, 32-bit
  read/write port for management.
- `lit_regs`, `status_regs` – register blocks.
- `store_packet` – packet buffer and output.
- `zf_pkg` – shared constants (field positions), `drop_t` and `pkt_info_t`.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`) and
`tb_zf_pkg.sv` with the packet builder and the reference zFilter test.
`tb_zfilter_node` runs the whole node at its default parameters: it writes
all 40 LITs, sends about 600 random packets (unicast and multicast trees over
real and virtual links, packets for the local Link IDs with and without
blocking, and every kind of bad packet), stalls the output until
both buffer limits are hit, rewrites LITs during traffic, compares every
output word with a reference, checks the 8-cycle decision latency, and fails
if any of these events never happened.
`tb_selector_large` runs the decision logic of a bigger node: 8 interfaces,
each with one real and 15 virtual Link IDs (128 interface Link IDs), `d` up
to 8, and 16 local Link IDs, i.e. 144 LIT memories holding 1152 LITs. It
checks that decisions stay correct and still take 8 cycles.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/zf_pkg.sv tb/tb_zf_pkg.sv tb/tb_zfilter_node.sv \
        --top-module tb_zfilter_node -o sim
    ./obj_dir/sim

Every testbench ends with a line `TB_RESULT checks=N failures=M`. The
other testbenches are built the same way with their own top module. All of
them finish in well under a second.

## Where this design departs from the original, and how far to trust it

Taken from the original implementation: the datapath of 64-bit words at one
word per cycle; the matching method (bit-vector set to one, cleared on a
chunk mismatch); one matcher and one dual-port LIT store per Link ID, with a
64-bit read port and a 32-bit management port; the three checks and their
drop rule (ethertype `0xACDC`, TTL at zero, ones above a configurable limit);
4 interfaces with 4 real and 4 virtual LITs; 248-bit Link IDs; an 8-cycle
decision; status registers with the constants, the last forwarded packet's
ones count, d, TTL and incoming port, and the writable ones limit. From the
architecture description: local Link IDs (real and virtual) that pass a
packet to the control processor, optionally blocking it from all interfaces.

Choices of this design, where the original gives no detail: the byte
positions of d, TTL and the zFilter; one virtual Link ID per interface
holding that interface's 4 virtual LITs; the register port and both register
maps; dropping packets with an out-of-range `d` or a cut-short zFilter;
never matching an all-zero LIT; the TTL decrement on output; the ones limit
reset value; an on-chip packet buffer instead of SRAM output queues; the
bit-`2p` destination encoding in the module header, with CPU queue 0
(bit 1) for the slow path; the blocking bits in register 11. The incoming interface is
not excluded from the output set.

Not included: a sparse LIT store (keeping only the positions of the ones,
which would shrink the tables at the cost of decoding logic); the input
arbiter, the output queues and their SRAM, the
Ethernet MACs and PHYs and the host bus, all of which belong to the NetFPGA
reference platform, and the host management software.

All modules pass Verilator lint and a Yosys/slang elaboration and are checked
in simulation only; no FPGA timing closure has been done, so the 125 MHz
figure is the target, not a measured result.
