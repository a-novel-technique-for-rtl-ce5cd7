# FPPC: a pipelined hierarchical packet classifier with a Bloom-filter Top-N check

This is synthesizable SystemVerilog for a multi-field IPv4 packet classifier
built after the scheme called *Fast Parallel Packet Classification* (FPPC).
A packet is matched against a rule set on five header fields: source and
destination address prefixes (S_ad, D_ad), source and destination port
(S_pn, D_pn) and protocol (P_tcl). The best-priority matching rule is found
without any backtracking, at one packet per clock, by splitting the rules into C clusters
whose source prefixes never overlap and searching all clusters in parallel
pipelines. Each cluster is a binary search tree on S_ad followed by
destination-address tries with bounded node size (T_eps tries). The winning
rule is then checked in a k-stage pipelined Bloom filter that holds the
*Top-N* rules, the N rules with the highest hit rates. Each stage of that
filter hashes only if all earlier stages found their bit set, so most
non-members cost one hash and one bit lookup.

```
 pkt_hdr (64 bytes)
     |
 header_extractor ---- 5-tuple ---+-------------------+----- ... ----+
                                  |                   |              |
                             sad_tree (c=0)      sad_tree (c=1)   sad_tree (c=C-1)
                                  |                   |              |
                             dad_trie (c=0)      dad_trie (c=1)   dad_trie (c=C-1)
                                  |                   |              |
                                  +-------- result_merge ------------+
                                               |
                                   pipelined_bloom_filter  (k stages)
                                               |
                    out_hit / out_rule_id / out_action / out_member
                                               |
                                          hit_counter
```

## Why clusters remove backtracking

In a classic hierarchical trie, a source prefix such as `0*` and a longer
one such as `00*` both match an address starting with `00`, so after
searching the destination trie under `00*` the search must back up and also
search the one under `0*`. Here the source prefixes are split offline into C
clusters, each holding only prefixes that are pairwise disjoint. One split
that works: put the leaves of the source-prefix trie (the prefixes with
no longer prefix under them) into cluster 1, remove them, and put the new
leaves into cluster 2, and so on. A set whose prefixes nest at most C deep
fits into C clusters. In a cluster at most one source prefix can match a
packet, so each cluster makes exactly one tree lookup and one trie walk. The C clusters run side by side and a final
priority compare (`result_merge`) picks the overall winner.

Because the prefixes of a cluster are disjoint, they can be ordered by
their first address. The S_ad stage is therefore an ordinary binary search
tree (`sad_tree`). A node holds the prefix, its length, left and right
pointers and the root of its destination trie. At a node the search stops if
the address lies inside the prefix. Otherwise it goes left when the address
is smaller and right when it is larger, and it misses at a missing child.

## The T_eps tries (`dad_trie`)

Every source prefix owns a binary trie built on the destination prefixes
of its rules. A rule sits at the node its D_ad prefix spells. Every rule
met on the walk already matches S_ad (the trie hangs from the matching
prefix) and D_ad (the path is a prefix of the address). So a node only needs
to store S_pn, D_pn, P_tcl and the priority PT, and the walk checks just
those fields.

Many rules can share one destination prefix, which would make nodes of
unbounded size. The T_eps trie bounds a node to `R_TRIE` rules. When a node
is full, the builder turns it into an *epsilon node*: its 0/1 children
move to a new node, the full node keeps a single epsilon branch to the new
node, and the new rule goes into the new node. Following an epsilon branch
consumes no address bit. A node therefore has either one epsilon branch or
0/1 branches, never both. In the stored format (`trie_node_t`), `eps=1`
means `left` is the epsilon branch and `right` is unused. Otherwise `left`
is the 0 branch and `right` the 1 branch.

Pipelining: stage `s` of `dad_trie` holds the nodes at depth `s` of all
tries of the cluster, and an epsilon branch also counts as one level. Each
stage has its own node memory of `TRIE_NODES` entries and a rule memory of
`R_TRIE` rules per entry. A walk visits at most one node per stage. At each
node it compares the stored rules with the header and keeps the best one.
Then it follows the epsilon branch, or the branch chosen by the next D_ad
bit, or it ends. With 32 address bits a path has up to 33 nodes plus its
epsilon nodes, so `TRIE_STAGES=40` leaves room for 7 epsilon levels on one
path.

Priority: a smaller PT wins; equal PT values go to the smaller rule number.
Every compare in the design (trie, merge) uses `fppc_pkg::better`, so the
winner is unique and the result is the same as a linear search.

## The k-stage pipelined Bloom filter and Top-N

Only some rules carry most of the traffic. A control plane ranks rules by
hit rate, read from the per-rule counters in `hit_counter`, and selects the
Top-N list. It writes the rule numbers of that list into the Bloom filter
with `bf_prog_valid`/`bf_prog_key`. Each write sets the k bits
`h_1(key)..h_k(key)` of a `BF_BITS`-bit array in one clock. The result of
the search is then queried with the number of the winning rule.

- Stage 1 hashes with h_1 and reads one bit, but only if the search found a
  rule.
- Stage i+1 runs only if stage i's bit was set (the enable chain).
- The enable that leaves stage k is the AND of all k bits, and it drives
  `out_member`.

`out_lookups` counts the stages that did hash and read. Nothing stored is ever reported absent. A rule outside the Top-N set can
be reported present with probability (1 - e^(-k·n/b))^k after n keys: 0.022
for n = 2000 and 0.00008 for n = 400 at the default b = 16384, k = 4.

The hash functions are multiplicative. `h_i(key)` is the top log2(b) bits of
`(key * M_i) mod 2^32`, with eight fixed odd constants `M_i`, so k can be at
most 8.

What the filter's answer is used for is the integrator's decision. The
classifier reports both `out_hit` (rule found, with number, action and
priority) and `out_member` (the rule is in the Top-N set).

## Interfaces

All modules share `fppc_pkg` (types `five_tuple_t`, `rule_t`, `match_t`,
`sad_node_t`, `trie_node_t`, and the functions `prefix_match`,
`rule_fields_match` and `better`). The clock is single, reset `rst_n` is
asynchronous and active low. Reset clears pipeline valids, tree node valid
bits, the Bloom filter and the hit counters. Trie memories are not reset;
only nodes reached through written pointers are read.

`fppc_top` ports:

| group | ports | notes |
|---|---|---|
| packets | `pkt_valid`, `pkt_hdr[511:0]` | first 64 bytes of an IPv4 packet, byte 0 in bits 511:504; one per clock |
| | `hdr_drop` | pulses for a header that is not IPv4 (or IHL < 5) |
| result | `out_valid`, `out_hit`, `out_rule_id[10:0]`, `out_action[7:0]`, `out_pt[15:0]` | best rule, exactly 57 cycles after `pkt_valid` at the defaults |
| | `out_member`, `out_lookups` | Bloom filter verdict and number of stages used |
| tree load | `sad_wr_en`, `sad_wr_cluster`, `sad_wr_level`, `sad_wr_addr`, `sad_wr_valid`, `sad_wr_node` | level l has 2^l nodes; node at level 0 address 0 is the root |
| trie load | `trie_wr_en`, `trie_wr_cluster`, `trie_wr_stage`, `trie_wr_addr`, `trie_wr_node`, `trie_wr_rules` | trie roots live in stage 0 |
| Top-N | `bf_clear`, `bf_prog_valid`, `bf_prog_key` | one key per clock |
| counters | `hc_clear`, `hc_rd_addr`, `hc_rd_data[31:0]` | combinational read, saturating 32-bit counts |

Latency is `1 + S_LEVELS + TRIE_STAGES + 1 + BF_K`: header register, one
cycle per tree level, one per trie stage, the merge register and one per
Bloom filter stage. The pipeline never stalls.

The header extractor takes protocol and addresses from their IPv4 offsets.
It takes the ports from the transport header at byte IHL×4, but only for
TCP and UDP packets whose fragment offset is zero. For all other packets
the ports are 0.

Table updates may be written while traffic flows. A packet in flight during
an update can see a mix of old and new nodes; write the new nodes before
changing the pointers that lead to them.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `C` | 4 | clusters, that is parallel tree/trie pipelines; the source prefixes may nest at most this deep |
| `S_LEVELS` | 11 | tree levels; 2047 source prefixes per cluster |
| `TRIE_STAGES` | 40 | trie pipeline stages |
| `TRIE_NODES` | 2048 | nodes per trie stage and cluster; a stage never needs more nodes than the cluster has rules |
| `R_TRIE` | 2 | rules per trie node |
| `BF_K` | 4 | Bloom filter stages (hash functions), 1..8 |
| `BF_BITS` | 16384 | Bloom filter bits, a power of two |

Rule numbers are 11 bits, so 2048 rules; the widths are in `fppc_pkg`.
The defaults hold any rule set of up to 2000 rules whose source prefixes
nest at most 4 deep. That covers the 500 to 2000-rule sets the scheme was
evaluated with. Storage at the defaults is about 4 × 40 × 2048 trie
entries of roughly 250 bits, about 82 Mbit, most of it in the trie rule
memories. These are written as plain arrays with asynchronous read. An
FPGA or ASIC mapping would move the read address one stage earlier to use
synchronous RAM.

## What is this design's own

The overall structure follows the FPPC description. It has a header
extractor, C parallel source-tree/destination-trie pipelines, and a k-stage
pipelined Bloom filter with an enable chain. The tree node and T_eps node
contents, the R_trie bound and the epsilon split also follow it, as does the
clustering into disjoint prefix sets. The description leaves the following
open, and they were chosen here:

- all sizes: C, R_trie, k, b, and the widths of priority, rule number and action;
- the key of the Bloom filter, which is the number of the best matching
  rule, so that the filter answers "is this rule in the Top-N set";
- the hash functions;
- the priority merge of the C cluster results;
- the descent rule of the source tree;
- port ranges and a protocol wildcard in the stored rules;
- the header format and IPv4 parsing;
- the table write ports;
- the hit counters, which are only named as the source of the hit rates.

Not built:

- Top-N selection with dependency resolution, clustering and T_eps
  construction. These are control-plane software; the hardware only
  receives their results.
- Path compression (skip value and bit string).
- Spilling rules to a secondary memory.
- The leaf-push step for source prefixes nested deeper than C.

## Verification

Each block has a self-checking testbench in `tb/`, and each ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it does |
|---|---|
| `tb_header_extractor` | random headers with every IHL, with and without ports, and non-IPv4 headers; the expected fields come from the values the header was built from |
| `tb_sad_tree` | 100 random disjoint prefixes in a 7-level tree; the expected result is a linear scan of the prefixes |
| `tb_dad_trie` | one trie of 120 rules on 25 shared destination prefixes, so dozens of epsilon nodes; the expected result is a linear-search reference |
| `tb_result_merge` | random cluster results with ties on PT |
| `tb_pipelined_bloom_filter` | b = 1024, so false positives and stops at every stage happen; the expected result is a reference bit array, and no programmed key may be missed |
| `tb_hit_counter` | 4-bit counters driven to saturation, then read and cleared |
| `tb_fppc_top` | default size, end to end (below) |
| `tb_fppc_workloads` | default size, rule sets of 500, 1000, 1500 and 2000 rules through the whole Top-N flow (below) |

`tb_fppc_top` runs in three phases:

1. It loads the 17-rule example classifier and puts the 8 rules with the
   highest hit counts into the Bloom filter (R8, R12, R16, R17, R7, R11,
   R15, R9). Three rules share the destination prefix `10*` under source
   prefix `0*`, so with R_TRIE = 2 one of them lands in an epsilon node.
2. After a reset, it loads a random 2000-rule set (about 30000 trie
   nodes, about 1200 in the fullest stage). It puts 400 random rules
   into the filter.
3. It adds 1100 more rules to the filter and sends packets aimed at its
   false positives.

Every result is compared with a linear-search classifier and a reference
Bloom filter. The testbench also checks the exact latency and reads back
the hit counters. It counts each mechanism and fails if one never occurs:
hit, miss, Top-N member, false positive, a stop after filter stage 1 and
one after a later stage, a
winner in an epsilon node, several clusters matching the same packet,
dropped headers, packets without ports, and back-to-back packets.

`tb_fppc_workloads` runs the rule-set sizes the scheme was evaluated on.
For each size it loads a random rule set and sends skewed warm-up traffic.
It then reads the hit counters, programs the 10 % most-hit rules as the
Top-N set, and sends skewed traffic again, checking every result. Typical
output:

| rules | tree nodes | trie nodes | fullest trie stage | table bytes per rule | results per clock | hits served by Top-N |
|---|---|---|---|---|---|---|
| 500 | 83 | 8293 | 357 | 530 | 1.000 | 32 % |
| 1000 | 163 | 15078 | 596 | 482 | 1.000 | 33 % |
| 1500 | 243 | 22306 | 904 | 476 | 1.000 | 29 % |
| 2000 | 319 | 28019 | 1213 | 448 | 1.000 | 29 % |

The table memory per rule is high because every trie node is a full-width
entry with room for R_TRIE rules, and no path compression is used. The
rule sets are random sets with shared prefixes, not real filter sets, so
these numbers show capacity and function, not the memory efficiency of
real rule sets.

`tb/fppc_tb_pkg.sv` holds the reference classifier and a table builder.
The builder models the control plane: it clusters the prefixes, builds the
balanced trees and the T_eps tries, maps them onto the stages and lists the
writes. It can be used to load real rule sets.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/fppc_pkg.sv tb/fppc_tb_pkg.sv rtl/*.sv tb/tb_fppc_top.sv \
  --top-module tb_fppc_top -o sim
./obj_dir/sim
```

Replace `tb_fppc_top` with another testbench name to run that one. Both
full-size testbenches build in under a minute; `tb_fppc_top` runs in about
a second and `tb_fppc_workloads` in a few seconds.
