# MAToC: a match-action router offload for an 8 x 25G NIC

This RTL turns a multi-port NIC into an IP router in hardware. Packets arriving on
eight 25 Gbit/s ports are classified by their destination address and rewritten:
TTL is decremented, MAC addresses are replaced, and a VLAN tag is inserted, changed or
stripped. Each packet then leaves on the Ethernet port its route selects. Packets
the table cannot handle go to a slow path: software on an attached processor.

The main idea is that **only the header travels through the processing pipeline**.
Each channel cuts its packets into 64-byte (512-bit) frames. The first frame is the
header. It goes to one match-action pipeline shared by all eight channels, while the
whole packet waits in a FIFO for its channel. When the processed header comes back,
a deparser joins it to the rest of the packet. The header may have grown or shrunk
by a few bytes. The shared pipeline takes one header per clock. At 250 MHz that is
250 million packets per second for all channels together, and it costs only one
table.

The match table is a ternary CAM built from small LUT RAMs rather than block RAM or
flip-flops. It is rewritten at run time through an AXI4-Lite register port. Searches
always take priority over rule updates, so reprogramming never slows the traffic.

```
 rx[0..7] 128b ─► adapter_in ─► parser ──header──► ┐                  ┌─► deparser[c] ─► adapter_out ─┐
   (per channel)   (x4 wide)      │                hdr_mux ─► MAT ─► hdr_demux                         │
                                  └──frames──► packet_buffer ───────────────────► deparser[c]         │
                                                                                                      ▼
 tx[0..7] (host) ────────────────────────────────────────────────────────────────────────────► axis_switch ─► eth[0..7]
 pktout (slow path) ─────────────────────────────────────────────────────────────────────────►  17 x 9     ─► pktin
```

Everything runs in one clock domain. Clock and reset are `clk` and `rst`; the reset
is synchronous and active high.

## Pipeline and timing

With no contention, a packet's first 128-bit beat on `rx_*` appears as the first
beat on `eth_*` **19 cycles** later (76 ns at 250 MHz):

| Step | Block | Cycles | What happens |
|---|---|---|---|
| 1 | `adapter_in` | 4 | gathers four 128-bit beats into one 512-bit frame (fewer at the end of a packet) |
| 2 | `parser` | 1 | registers the first frame as the header; classifies it |
| 3 | `hdr_mux` | 1 | round-robin over the 8 header streams; can grant the same channel every cycle |
| 4 | `match_stage` | 4 | key build, TCAM search, instruction fetch, output register |
| 5 | `action_stage` | 5 | TTL, MAC, VLAN, channel, output register |
| 6 | `hdr_demux` | 1 | returns the header to its source channel |
| 7 | `deparser` | 1 | merges header and buffered frames |
| 8 | `adapter_out` | 1 | splits 512-bit frames into 128-bit beats |
| 9 | `axis_switch` | 1 | forwards to the chosen port (more under contention) |

All interfaces use valid/ready handshakes. The header pipeline (match plus action)
advances as a block: it stalls only when its output is not taken.

The payload path never waits for the header path in the other direction. A channel
can accept frames while the buffer has room. The buffer holds 512 frames: 32 KiB,
enough for many full-size packets.

## What the parser hands to the table

The header bus is `hdr_t` in `matoc_pkg`. It carries:

- the header bytes: 64 plus 15 bytes wide, so the actions can make it longer;
- the number of valid bytes;
- whether the frame is the whole packet;
- the source channel;
- a destination channel. It starts as channel 8, the slow path.

`pkt_type` holds four flags:

| Bit | Flag | Meaning |
|---|---|---|
| 0 | IPv4 | EtherType is 0x0800 |
| 1 | IPv6 | EtherType is 0x86DD |
| 2 | VLAN | an 802.1Q tag is present; the other offsets then move by 4 |
| 3 | SHORT | the frame is too short to contain the IP header it announces |

The match stage builds a **35-bit search key**:

```
key[34:32] = {VLAN, IPv6, IPv4}
key[31:0]  = IPv4 destination address (bytes 30..33)
           | first 32 bits of the IPv6 destination (bytes 38..41)
           (offsets +4 behind a VLAN tag; 0 for other packets)
```

A rule can therefore match on protocol, on tagged versus untagged traffic, and on
any prefix of the address. A rule can also ignore all of these.

## The TCAM

`tcam` is a ternary CAM, `KEY_W` x `DEPTH` (35 x 1024 by default). It is built from
one small unit (`tcam_unit`) repeated many times.

**Unit.** A unit is a 32-deep by 8-bit LUT RAM. It answers one question for 8 rules
at once: "does rule *i* accept this 5-bit key piece?" The 5-bit piece is the address.
Bit *i* of the word read out is the answer for rule *i*.

**Array.** The key is cut into `KEY_W/5` pieces, 7 for 35 bits. The rules are grouped
into rows of 8, giving 128 rows for 1024 rules. Each (piece, row) pair is one unit, so
the array has 896 units.

**Search.** Every unit of column *c* is addressed by key piece *c*. The 7 outputs of a
row are ANDed bit by bit into 8 match lines. A priority encoder returns the **lowest**
matching index. The search is combinational from the key to the registered result:
one search per cycle, with a latency of 1 cycle.

**Write.** A rule is written as data, care and valid bits. In the care mask,
1 = compare the bit. A valid bit of 0 means the rule never matches. The write stores
the rule's truth table for every piece: for each address *a* of a unit, the
"accepted" bit says whether *a* agrees with the rule's data on all the cared bits of
that piece. The whole row is written together. It takes `32 x 2 + 1` cycles:

1. **Preparation (32 cycles).** A counter sweeps 0..31 and computes the accepted bit
   of every (column, entry) pair into a 32-bit shift register. These registers map
   to SRL32 primitives. This phase does not touch the RAM, so searches go on
   unaffected.
2. **Writing (32 cycles).** The counter sweeps again and shifts the bits into the
   RAMs, one address per cycle.
3. One more cycle signals `done`.

**Read.** To read a rule back, the 32 addresses of its row are walked. At each address
where the rule accepts, its address is ANDed and ORed into two running values.
At the end:

- `care = ~(AND ^ OR)`: the bits that never changed;
- `data = AND & care`.

A read takes 32 + 1 cycles.

**Search first.** In phase 2 and during reads, the unit's address port is needed by
the update. In any cycle with a valid search, the search gets the address port and
the update counter simply waits. Updates therefore stretch under load, but traffic
is never stalled. At packet sizes above about 80 bytes the pipeline has spare cycles,
so updates do finish.

After reset the array clears itself for 32 cycles; `s_ready` is low during that time.

## Actions and the instruction word

The matched index addresses a 1024-entry instruction table (block RAM, one
register of latency). A miss passes an all-zero instruction, which does nothing.
The instruction is 122 bits, `instr_t`; the staging registers take it LSB first:

| Bits | Field | Meaning |
|---|---|---|
| 121:118 | `out_ch` | output channel: 0..7 Ethernet, 8 slow path |
| 117:102 | `vlan_tci` | tag control information for insert / modify |
| 101:54 | `smac` | new source MAC |
| 53:6 | `dmac` | new destination MAC |
| 5:4 | `vlan_op` | 0 none, 1 insert, 2 modify, 3 remove |
| 3 | `set_ch` | use `out_ch` |
| 2 | `set_smac` | replace the source MAC |
| 1 | `set_dmac` | replace the destination MAC |
| 0 | `dec_ttl` | decrement TTL / hop limit |

The action stage applies the enabled actions in this order, one register each.

1. **TTL / hop limit.** IPv4 TTL is at byte 22 (26 when tagged). The header checksum
   is patched incrementally:

   `HC' = ~(~HC + ~m + m')`

   Here *m* is the 16-bit TTL/protocol word, and the sums are ones'-complement
   additions. IPv6 hop limit is at byte 21 (25 when tagged).

   A packet whose TTL is already 0 or 1 is **not** changed. It is marked for the slow
   path, and the later steps leave it untouched, so the host can answer it (for
   example with an ICMP message).
2. **MAC rewrite.** Destination bytes 0..5 and source bytes 6..11.
3. **VLAN.**
   - Insert shifts bytes 12 and up by 4 and writes `0x8100` plus the TCI. If the
     packet already has a tag, only its TCI is replaced.
   - Remove shifts the header down by 4.
   - Length and the VLAN flag follow the change.
4. **Channel.** The output channel is chosen in this order:
   - an expired TTL → slow path;
   - a miss → `MISS_CH` (reset value 8, the slow path);
   - a hit with `set_ch` → `out_ch`;
   - otherwise the slow path.
5. **Output register.**

## The deparser: joining a resized header to its packet

This is the least obvious block. After the actions, the header may be up to
`VAR_BYTES` (15) bytes longer or shorter than the 64-byte frame it replaces.
Everything after it must move by that many bytes. A general shifter over header,
payload and leftover bytes would be large. But the shift is fixed for the whole
packet, so the deparser picks a **select value** once per packet, from the length
difference *v*. Every output byte is then a multiplexer over only `2*VAR_BYTES + 2`
candidate sources:

| `sel` | Case | Output frame |
|---|---|---|
| 0 | first frame of the packet | the header's first 64 bytes |
| *v* (1..15) | header shrank by *v* | `{payload[v-1:0], temp[63-v:0]}` |
| 31 − *v* | header grew by *v* | `{payload[63-v:0], temp[v-1:0]}` |
| 31 | same length | payload passes through |

`temp` holds the bytes left over from the previous output: first the header's tail,
then the unused top of each payload frame.

The original first frame of the packet still sits in the buffer. The deparser reads
and drops it, since the header replaces it. If the packet's last frame leaves more
bytes in `temp` than the output has room for, one extra flush beat follows; during
it the payload input is held.

A packet that fits in one frame is sent from the header alone. The cost in logic
grows with `VAR_BYTES`, which is why the range is a parameter. VLAN handling needs
only ±4.

The destination channel travels with the packet: `m_tdest` leaves the deparser, and
the top keeps it beside the output adapter.

## The switch and the slow path

`axis_switch` has 17 inputs:

- 0..7: processed receive traffic;
- 8..15: host transmit traffic, sent to the Ethernet port of the same channel;
- 16: `pktout`, from the slow-path processor, with its own `tdest`.

It has 9 outputs: Ethernet ports 0..7, and `pktin` to the processor. The `pktin`
`tdest` carries the channel the packet came in on.

Each output arbitrates round-robin among the inputs that request it. It stays with
the winner until that packet's `tlast`, so packets never interleave.

## Programming (AXI4-Lite)

| Address | Access | Register |
|---|---|---|
| 0x000 | W | CMD: bit0 write TCAM row `INDEX[9:3]` from the 8 staged rules; bit1 read TCAM rule `INDEX`; bit2 write instruction `INDEX` from staging; bit3 read instruction `INDEX` |
| 0x004 | RW | INDEX |
| 0x008 | R | STATUS: bit0 busy, bit1 valid bit of the last rule read |
| 0x00C | RW | MISS_CH |
| 0x010–0x01C | RW | instruction staging, word 0 = bits 31:0 |
| 0x020–0x02C | R | instruction read back |
| 0x030–0x03C | R | rule read back: data low/high, care low/high |
| 0x100 + 16·e | RW | staged rule e (0..7): +0 data[31:0], +4 data[34:32], +8 care[31:0], +C {valid (bit 31), care[34:32]} |

To add a route:

1. Stage the instruction.
2. Write INDEX and `CMD = 4`.
3. Stage all 8 rules of its row. Rules you are not changing must be staged with
   their current contents.
4. Write INDEX and `CMD = 1`.
5. Poll STATUS until it is not busy.

TCAM commands issued while busy are ignored. The register file answers every
access with OKAY.

## Sizes and throughput

All sizes are parameters whose defaults are those of the reference design.

| Quantity | Value |
|---|---|
| Pipeline rate | 1 header / cycle = 250 Mpps at 250 MHz |
| Line rate of 8 x 25G | 200e9 / ((PL + 20) x 8) packets/s, where 20 B = gap + preamble + SFD |
| Line rate reached for | PL >= 80 B; with VLAN insertion counted on the egress side the limit is 76 B |
| At 64-byte packets | 297.6 Mpps are offered, so about 84 % are processed |
| Per-port datapath | 128 bit x 250 MHz = 32 Gbps per port; 128 Gbps inside a channel |
| TCAM | 35 x 1024 = 896 units of 32 x 8 LUT RAM |
| Instruction table | 1024 x 122 bit, about four 36-kbit block RAMs |
| Packet buffer | 512 x 577 bit per channel, about 8 block RAMs |

## Departures from the original architecture, and limits

- **One match-action pipeline.** The reference block diagram shows two MAT instances,
  but its text describes a single shared pipeline, and that is what is built here.
  Two pipelines, each for four channels, would be the way to line rate at 64 bytes.
- **Destination address offset.** The original text places the destination IPv4
  address at byte 26. That is the source address. The standard offset, 30, is used.
- **Mux.** Headers are single transfers here, so the round-robin mux naturally
  re-grants the same channel without a bubble. No special "predicted grant" logic
  is needed.
- **Only the receive side is offloaded.** Host transmit traffic goes straight to the
  port of its own channel.
- **Not included:**
  - the NIC itself: DMA, queues, MACs, transceivers. Its streams are the top-level
    `rx_*`, `tx_*` and `eth_*` ports and the AXI4-Lite port;
  - the slow-path software (`pktin` / `pktout` ports);
  - the asynchronous FIFO for running the pipeline on a faster clock;
  - a FIFO behind the output adapters to absorb switch stalls.
- **Not covered by this design:** packet validity checks beyond the length test,
  IPv4 options (the header length is assumed to be 20 bytes), fragmentation and
  error handling. These are slow-path work.
- **Design choices** (the reference description is silent on them): the register
  map, the instruction layout, the handling of an expired TTL, lowest index as
  highest priority, and the TCAM clearing itself after reset.

## Files

- `rtl/matoc_pkg.sv`: constants, `hdr_t`, `instr_t`, `meta_t`.
- `rtl/matoc_top.sv`: the complete design (no parameters need setting).
- `rtl/adapter_in.sv`, `rtl/parser.sv`, `rtl/packet_buffer.sv`, `rtl/hdr_mux.sv`,
  `rtl/hdr_demux.sv`, `rtl/deparser.sv`, `rtl/adapter_out.sv`, `rtl/axis_switch.sv`:
  the datapath.
- `rtl/mat.sv` = `rtl/mat_csr.sv` + `rtl/match_stage.sv` (with `rtl/tcam.sv`,
  `rtl/tcam_unit.sv`, `rtl/instr_table.sv`) + `rtl/action_stage.sv`.

Each file opens with a description of its interface and timing.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if something hangs.

- `tb_matoc_top` runs the **whole design at its default sizes**:
  - it loads a route table over AXI4-Lite;
  - it sends random IPv4 (with valid checksums), IPv6 and non-IP packets of 60..300
    bytes on all eight ports at once, plus host and slow-path traffic, with random
    back-pressure on the outputs;
  - it rewrites a TCAM row while traffic flows;
  - it checks every packet on every port, byte for byte, against a reference model.

  It also checks the 19-cycle latency, and counts and requires each mechanism: TTL
  decrement, expiry, miss, MAC rewrite, VLAN insert / modify / remove, single-frame
  packets, host and slow-path pass-through, mux contention, back-pressure, and
  updates stretched by searches.
- `tb_mat`, `tb_match_stage`, `tb_action_stage`, `tb_tcam`, `tb_mat_csr`: the
  table and its control.
- `tb_deparser` tries every length change from −4 to +4 bytes on a reduced frame.
- The adapter, parser, buffer, mux, demux and switch testbenches check data
  integrity, back-pressure and latency.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/matoc_pkg.sv rtl/*.sv \
          tb/tb_matoc_top.sv --top-module tb_matoc_top -j 0
./obj_dir/Vtb_matoc_top
```

`matoc_pkg.sv` must come first. The full-size top-level test builds in about a minute
and runs in seconds.
