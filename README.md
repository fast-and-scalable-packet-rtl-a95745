# Perfect-hash packet classifier

A five-field packet classifier (source/destination IPv4 address, source/destination
port, protocol) that always needs exactly **two external memory reads per packet**,
whatever the rule set. Algorithmic classifiers usually need a number of memory
accesses that depends on the rules and the traffic. This design has a fixed cost,
like a TCAM, but it runs on an FPGA with one commodity SRAM.

The method splits classification into three steps:

1. **Longest prefix match (LPM) per field.** Each field is reduced to a *label*, the
   index of its longest matching prefix among the prefixes that field's rules use.
2. **Perfect hash to a rule number.** The concatenated labels form a key. A perfect
   hash function, built offline for this rule set, maps the key straight to the
   number of the highest-priority matching rule. It does this with two ordinary
   hashes, two reads from a *Vertex Table* in external SRAM, and one addition.
3. **Check.** The rule with that number is read from on-chip tables and compared
   with the packet. A packet that matches no rule still hashes to *some* number,
   and the check turns that false positive into "no match".

Rules that would make step 2 expensive ("spoilers") are kept in a small on-chip
TCAM instead. The match-all rule is never hashed: it is returned when nothing
else matches.

## Pipeline and timing

```
           +--> lpm src_ip  --+
           +--> lpm dst_ip  --+
in_hdr ----+--> lpm src_port--+--key--> phf --rule#--> rule_check --> result_select --> out
           +--> lpm dst_port--+         |  ^               |  Rule Table      ^
           +--> lpm proto   --+         v  |               |  4 Prefix Tables |
           +--> spoiler_tcam ---------- SRAM (Vertex Table) --- delay line ---+
```

| stage | module | cycles |
|---|---|---|
| LPM of all five fields, TCAM search in parallel | `lpm` x5, `spoiler_tcam` | 1 |
| f1/f2 hash, vertex read 1, vertex read 2, SRAM latency, add | `phf` | SRAM_LAT + 3 |
| Rule Table read, Prefix Table reads, compare | `rule_check` | 3 |
| priority select | `result_select` | 1 |

The latency is **SRAM_LAT + 8 cycles**: 10 with the default SRAM_LAT = 2. This is
counted from the cycle in which a header is accepted to the cycle in which its
`out_valid` is high. The SRAM takes one read command per cycle and each packet
needs two, so the classifier accepts **one header every two cycles**. `in_ready`
drops for the cycle after each accept. At an SRAM command rate of 300 MHz
(a DDR SRAM with bursts of two words, where one burst returns one 18-bit vertex),
that is 150 million packets/s: 100 Gb/s of minimum-size packets. At 125 MHz it is
62.5 million packets/s. Both rates are independent of the rule set and of how
complex the rules are.

With `NSRAM = 2`, two SRAM chips each hold a full copy of the Vertex Table.
The f1 read goes to chip 0 and the f2 read to chip 1 in the same cycle, so the
classifier accepts **one header every cycle** (300 million packets/s at a 300 MHz
command rate).
The `phf` stage then takes SRAM_LAT + 2 cycles, and the total latency is
**SRAM_LAT + 7**. Vertex writes go to both chips.

With `VPW` = 2 or 4, one SRAM word of `VPW` x 18 bits holds that many vertices.
The vertex index is the word address times `VPW` plus the part number, so the
same number of SRAM addresses holds `VPW` times more vertices. `phf` carries the
part number of each read alongside it for `SRAM_LAT` cycles and picks the vertex
out of the returned word. A vertex write enables only its part (`sram_wpart`),
the way byte writes work on a commodity SRAM.

Results come out in order, one per accepted header, with no back-pressure.
The header is delayed alongside the result (`out_hdr`), so a downstream
block can act on the pair. The delay line is sized from `SRAM_LAT`, and an
assertion checks that the Vertex Table data really arrives `SRAM_LAT` cycles
after each read.

## The perfect hash and its intended collisions

This is the part that makes the design work, and the part that is easiest to get
wrong when changing it.

**Keys and pseudorules.** After LPM, a packet is described by one label per
field. A rule is also such a tuple, using the labels of its own prefixes. A packet
can match a rule without having the same tuple. For example, rule `R1 = (1*, *)`
matches a packet whose longest prefixes are `(101, 100)`. The host therefore
enumerates every label tuple that some rule covers. Each such tuple is either a
rule or a *pseudorule*, and its *target* is the highest-priority rule that
covers it. A rule covers a tuple if, in every field, the rule's prefix is equal to
or shorter than the tuple's prefix and contains it. Example with three rules in two
fields:

| key | f1 | f2 | target |
|---|---|---|---|
| R1 `<1*, *>` | 0 | 7 | 1 |
| R2 `<1*, 00*>` | 6 | 0 | 2 |
| R3 `<101, 100>` | 5 | 4 | 3 |
| P1 `<1*, 100>` | 0 | 4 | 1 |
| P2 `<101, 00*>` | 1 | 3 | 2 |
| P3 `<101, *>` | 3 | 2 | 1 |

**Graph.** Each key is an edge between vertex `f1(key)` and vertex `f2(key)` of
a graph with N vertices. If the graph is acyclic (a forest), values can be given
to the vertices so that, for every edge, the two vertex values add up to the
edge's target. Walk each tree from an arbitrary root with value 0 and set each
new vertex to `target - value(parent)`. For the table above, the values
`[1, 0, -1, 2, 0, 3, 1, 0]` for vertices 0..7 work. For P3, `v[3] + v[2] = 2 + (-1) = 1`.

**Lookup** is then just `rule = V[f1(key)] + V[f2(key)]`. Rules and all of their
pseudorules hash to the same number *on purpose*. The pseudorules are never
stored: they exist only as edges that shaped the vertex values. An acyclic graph
needs more vertices than edges. About twice that minimum is needed in practice.

**In this RTL:**

* `f1` and `f2` are Bob Jenkins' lookup3 `hashword()` over the 36-bit key
  (`{src_ip, dst_ip, src_port, dst_port}` labels of 8 bits and a 4-bit protocol
  label, bits 35..0). They differ only in their 32-bit seeds, which the host
  writes. If a graph turns out cyclic, the host picks new seeds and tries again.
  The vertex index is the low `VADDR_W` + log2(`VPW`) bits of the hash, so
  N = 262144 at the defaults.
* Vertex values are 18-bit words. The adder keeps only the low `RULE_W` (10) bits
  of the sum. The host may therefore store every value modulo 2^18 (or
  2^10). Signed values such as -1 work as plain two's complement.
* Keys of packets that match no rule hash to arbitrary vertices, including ones
  the host never wrote. Whatever the sum is, `rule_check` rejects it unless the
  packet really matches that rule. Unused Rule Table entries are invalid after reset.

The testbench `tb/pkt_classifier_tb.sv` contains a complete host-side builder:
pseudorule expansion, the acyclicity test with re-seeding, and the tree walk. It is
the reference for how the tables must be filled.

## Compressed rule storage and the check

The rule itself never leaves the chip. A Rule Table entry (`rule_entry_t`, 42 bits)
holds four 8-bit indices into four Prefix Tables (source/destination address,
source/destination port), the 8-bit protocol with a wildcard bit, and a valid bit.
Rule sets use few distinct prefixes per field, so the Prefix Tables are small
and the Rule Table stays at a few kilobytes for 1024 rules. Port ranges are
converted to prefixes by the host, as for LPM. The index a rule stores for a field
is the same index the LPM unit returns as that prefix's label. `rule_check` reads the
entry, reads the four Prefix Tables in parallel, and compares each field with
`(field ^ prefix) & top_len_bits == 0`.

## Spoilers and the universal rule

* `spoiler_tcam`: 16 entries of value/mask over the whole 104-bit header plus a rule
  number. Among the hits, the smallest rule number wins. A spoiler whose port
  range is not a single prefix needs several entries.
* `result_select`: rules are numbered in priority order (smaller = higher
  priority). The hash result, if confirmed, competes with the TCAM result by rule
  number. If neither matched and the universal rule is enabled, its number is
  returned. `out_src` reports which source produced the result: 0 none, 1 hash,
  2 TCAM, 3 universal.

## Interfaces

| port | dir | width | meaning |
|---|---|---|---|
| `in_valid`, `in_ready`, `in_hdr` | in/out/in | 1/1/104 | header (`header_t`: src_ip, dst_ip, src_port, dst_port, proto) |
| `out_valid`, `out_src`, `out_rule`, `out_hdr` | out | 1/2/10/104 | result |
| `cfg_valid`, `cfg_ready`, `cfg_sel`, `cfg_addr`, `cfg_data` | in/out/in/in/in | 1/1/4/20/256 | host table writes, one entry per accepted write |
| `sram_rd`, `sram_wr`, `sram_addr`, `sram_wdata`, `sram_wpart` | out | `NSRAM` x 1/1/18/18·`VPW`/`VPW` | SRAM command per chip, at most one per cycle; `sram_wpart` enables the word parts a write changes |
| `sram_rvalid`, `sram_rdata` | in | `NSRAM` x 1/18·`VPW` | read data per chip, exactly `SRAM_LAT` cycles after `sram_rd` |

The SRAM ports are packed arrays with one element per chip, so with the default
`NSRAM = 1` each is an ordinary vector.

Configuration targets (`cfg_sel`, `pc_pkg::cfg_sel_e`). Values are zero-extended to 32 bits:

| sel | target | `cfg_addr` | `cfg_data` |
|---|---|---|---|
| 0-4 | LPM src_ip, dst_ip, src_port, dst_port, proto | prefix index | `{valid[38], len[37:32], value[31:0]}`, value left-aligned in its field |
| 5-8 | Prefix Table src_ip, dst_ip, src_port, dst_port | prefix index | `{len[37:32], value[31:0]}` |
| 9 | Rule Table | rule number | `rule_entry_t` |
| 10 | spoiler TCAM | entry | `tcam_entry_t` |
| 11 | Vertex Table (external SRAM) | vertex index | value `[17:0]` |
| 12 | hash seeds | - | `{seed2[63:32], seed1[31:0]}` |
| 13 | universal rule | - | `{enable[10], rule[9:0]}` |

`cfg_ready` is 1 for all targets except the Vertex Table. Its writes share
the SRAM port and wait for a cycle with no read. While such a write is pending,
`in_ready` is held low, so it is granted within three cycles. Table updates
are meant to be done between packets. The design does not make an update atomic
for packets in flight.

## Parameters

| parameter | default | where |
|---|---|---|
| `VADDR_W` | 18 (262144 SRAM words) | `pkt_classifier`, `phf` |
| `SRAM_LAT` | 2 | `pkt_classifier` |
| `TCAM_N` | 16 | `pkt_classifier` |
| `NSRAM` | 1 (1 or 2 SRAM chips) | `pkt_classifier`, `phf` |
| `VPW` | 1 (1, 2 or 4 vertices per SRAM word) | `pkt_classifier`, `phf` |
| `VERT_W` | 18 | `pc_pkg` |
| `RULE_W` | 10 (1024 rules) | `pc_pkg` |
| `PFX_IDX_W` / `PROTO_IDX_W` | 8 / 4 (256 / 16 prefixes per field) | `pc_pkg` |

Published rule sets of 32 to 171 rules, with at most 85 distinct prefixes per field
and vertex tables of at most about 250 kB, fit these defaults.

## What follows the original method and what is this design's own

The following follow the original method: the three steps, the two seeded Jenkins
hashes, the Vertex Table in external SRAM with 18-bit vertices, intended collisions
instead of stored pseudorules, the on-chip Rule Table that holds indices into Prefix
Tables, the spoiler TCAM with 16 entries, the universal rule held outside the hash,
the two-cycle packet rate with one SRAM chip, a higher rate from more chips, and
several vertices per word of a wider SRAM.

The following are this design's own choices:

* The LPM engine. The method works with any LPM. Here it is a simple parallel search
  of all stored prefixes, which is easy to verify but large in logic. A faster or
  smaller engine with the same interface can replace it.
* The protocol is stored directly in the Rule Table, with a wildcard bit, and the
  ports go through Prefix Tables. Port ranges must become prefixes anyway.
* The hash-to-address reduction (low bits, so N is a power of two), the runtime
  seed registers, and re-seeding instead of enlarging the graph (the SRAM size is
  fixed).
* With two chips, a full copy of the Vertex Table in each, one read per chip.
  The original method only says that more or faster SRAM chips raise the rate.
* With several vertices per word, the order of the parts and the per-part write
  enables.
* Priority as smaller rule number, the pipeline staging, the configuration bus,
  the SRAM port protocol, the fixed read latency, and the absence of output
  back-pressure.

The following are not included: the DDR SRAM I/O logic, network and host interfaces,
and the four extra fields (MAC addresses, TCP flags, input port) of one
board-level build of the method. Adding a field means one more LPM and label,
a wider key, and one more Prefix Table or a direct field in the Rule Table.
The two external reads per packet stay the same.

## Files

`rtl/`: `pc_pkg` (types, widths, configuration layout), `lpm`, `jenkins_hash`, `phf`,
`rule_table`, `prefix_table`, `rule_check`, `spoiler_tcam`, `result_select`,
`pkt_classifier` (top).

`tb/`: one self-checking testbench per module (`<module>_tb.sv`), `tb_ref_pkg`
(an independent lookup3 model and prefix helpers), and `sram_model`, a
behavioural fixed-latency SRAM. `pkt_classifier_tb` runs the top at its default
sizes. It builds two random rule sets with pseudorules, builds their perfect hashes
(re-seeding at least once), loads everything through the configuration port, and
streams 3200 packets against a linear-search reference. It also checks the
latency, the one-in-two-cycles accept rate and two SRAM reads per packet. It counts that each of
these cases occurred at least once: hash hits, pseudorule hits, TCAM hits, TCAM
beating the hash path and the reverse, false positives rejected, no match with the
universal rule disabled, Vertex Table writes held off by traffic, re-seeding, and a
full reload.

`pkt_classifier_dual_tb` runs the same sequence on a top with `NSRAM = 2` and
`VPW = 2` (2**19 vertices in 36-bit words). It checks the one-per-cycle rate, the SRAM_LAT + 7 latency and one read per chip per
packet. `phf_tb` covers both `NSRAM` values, the second unit with `VPW = 2`.

`pkt_classifier_workload_tb` loads a rule set the size of a published firewall
rule set into the top at its default parameters. It uses 171 rules over 84/84/1/6
distinct address and port prefixes and 3 protocols. The 16 broadest rules go to the
TCAM. The result is about 24000 keys on about 44000 of the 262144 vertices. It
then checks 3500 packets as above.

Run any testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pc_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv \
  tb/sram_model.sv tb/pkt_classifier_tb.sv --top-module pkt_classifier_tb -o sim
./obj_dir/sim
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`.
