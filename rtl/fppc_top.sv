// fppc_top: fast parallel packet classifier.
//
// Data path (one packet per clock, fully pipelined):
//   header_extractor -> C x (sad_tree -> dad_trie) -> result_merge
//   -> pipelined_bloom_filter -> result, with hit_counter counting hits.
// The header extractor pulls the 5-tuple out of the first 64 header bytes
// and hands it to all C cluster pipelines at once. Cluster c searches its
// S_ad binary search tree (disjoint prefixes, at most one match), then the
// D_ad T_eps trie hanging from the matched prefix, and returns its best
// rule. The merge picks the overall best rule. Its rule number is then
// queried in the k-stage pipelined Bloom filter, which holds the Top-N rule
// set chosen by the control plane from the hit counts: out_member tells
// whether the matched rule is one of the Top-N rules. The search walk alone
// gives out_hit, out_rule_id, out_action and out_pt.
//
// Latency from pkt_valid to out_valid:
//   1 + S_LEVELS + TRIE_STAGES + 1 + BF_K cycles (57 at the defaults).
//
// Tables are loaded by the control plane (clustering, T_eps construction
// and Top-N selection run in software): sad_wr_* writes S_ad tree nodes,
// trie_wr_* writes trie nodes with their rules, bf_prog_* adds a rule
// number to the Bloom filter (bf_clear empties it), hc_* reads and clears
// the hit counters. Writes may happen while packets flow; a packet sees a
// mix of old and new tables only if it is in flight during the update.
//
// The structure follows the document (header extractor, C parallel tree and
// trie pipelines, k-stage pipelined Bloom filter at the end). The merge,
// the Bloom filter key (the matched rule number), the hit counter and all
// sizes are this design's choices; see each block.
module fppc_top
  import fppc_pkg::*;
#(
  parameter int unsigned C           = 4,
  parameter int unsigned S_LEVELS    = 11,
  parameter int unsigned TRIE_STAGES = 40,
  parameter int unsigned TRIE_NODES  = 2048,
  parameter int unsigned R_TRIE      = 2,
  parameter int unsigned BF_K        = 4,
  parameter int unsigned BF_BITS     = 16384
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // packets
  input  logic                           pkt_valid,
  input  logic [HDR_BYTES*8-1:0]         pkt_hdr,
  output logic                           hdr_drop,
  // classification result
  output logic                           out_valid,
  output logic                           out_hit,
  output logic                           out_member,
  output logic [RULE_ID_W-1:0]           out_rule_id,
  output logic [ACTION_W-1:0]            out_action,
  output logic [PRIO_W-1:0]              out_pt,
  output logic [$clog2(BF_K+1)-1:0]      out_lookups,
  // S_ad tree writes
  input  logic                           sad_wr_en,
  input  logic [$clog2(C)-1:0]           sad_wr_cluster,
  input  logic [$clog2(S_LEVELS)-1:0]    sad_wr_level,
  input  logic [PTR_W-1:0]               sad_wr_addr,
  input  logic                           sad_wr_valid,
  input  sad_node_t                      sad_wr_node,
  // D_ad trie writes
  input  logic                           trie_wr_en,
  input  logic [$clog2(C)-1:0]           trie_wr_cluster,
  input  logic [$clog2(TRIE_STAGES)-1:0] trie_wr_stage,
  input  logic [PTR_W-1:0]               trie_wr_addr,
  input  trie_node_t                     trie_wr_node,
  input  rule_t [R_TRIE-1:0]             trie_wr_rules,
  // Bloom filter programming
  input  logic                           bf_clear,
  input  logic                           bf_prog_valid,
  input  logic [RULE_ID_W-1:0]           bf_prog_key,
  // hit counters
  input  logic                           hc_clear,
  input  logic [RULE_ID_W-1:0]           hc_rd_addr,
  output logic [31:0]                    hc_rd_data
);

  logic        hx_valid;
  five_tuple_t hx_tuple;

  header_extractor u_hdr (
    .clk, .rst_n,
    .in_valid      (pkt_valid),
    .hdr           (pkt_hdr),
    .out_valid     (hx_valid),
    .out_tuple     (hx_tuple),
    .out_has_ports (),
    .drop          (hdr_drop)
  );

  logic   tr_valid [C];
  match_t tr_match [C];

  for (genvar c = 0; c < C; c++) begin : g_cluster
    logic             sv, sfound;
    five_tuple_t      stuple;
    logic [PTR_W-1:0] sroot;

    sad_tree #(.S_LEVELS(S_LEVELS)) u_tree (
      .clk, .rst_n,
      .in_valid  (hx_valid),
      .in_tuple  (hx_tuple),
      .out_valid (sv),
      .out_tuple (stuple),
      .out_found (sfound),
      .out_root  (sroot),
      .wr_en     (sad_wr_en && (32'(sad_wr_cluster) == c)),
      .wr_level  (sad_wr_level),
      .wr_addr   (sad_wr_addr),
      .wr_valid  (sad_wr_valid),
      .wr_node   (sad_wr_node)
    );

    dad_trie #(.TRIE_STAGES(TRIE_STAGES), .TRIE_NODES(TRIE_NODES), .R_TRIE(R_TRIE)) u_trie (
      .clk, .rst_n,
      .in_valid  (sv),
      .in_tuple  (stuple),
      .in_found  (sfound),
      .in_root   (sroot),
      .out_valid (tr_valid[c]),
      .out_match (tr_match[c]),
      .wr_en     (trie_wr_en && (32'(trie_wr_cluster) == c)),
      .wr_stage  (trie_wr_stage),
      .wr_addr   (trie_wr_addr),
      .wr_node   (trie_wr_node),
      .wr_rules  (trie_wr_rules)
    );
  end

  logic   mg_valid;
  match_t mg_match;

  result_merge #(.C(C)) u_merge (
    .clk, .rst_n,
    .in_valid  (tr_valid[0]),
    .in_match  (tr_match),
    .out_valid (mg_valid),
    .out_match (mg_match)
  );

  match_t bf_payload;

  pipelined_bloom_filter #(.K(BF_K), .B(BF_BITS), .KEY_W(RULE_ID_W)) u_bf (
    .clk, .rst_n,
    .clear      (bf_clear),
    .prog_valid (bf_prog_valid),
    .prog_key   (bf_prog_key),
    .q_valid    (mg_valid),
    .q_en       (mg_match.hit),
    .q_key      (mg_match.id),
    .q_payload  (mg_match),
    .r_valid    (out_valid),
    .r_member   (out_member),
    .r_payload  (bf_payload),
    .r_lookups  (out_lookups)
  );

  assign out_hit     = bf_payload.hit;
  assign out_rule_id = bf_payload.id;
  assign out_action  = bf_payload.action;
  assign out_pt      = bf_payload.pt;

  hit_counter #(.RULES(1 << RULE_ID_W), .CNT_W(32)) u_hc (
    .clk, .rst_n,
    .clear     (hc_clear),
    .inc_valid (out_valid && out_hit),
    .inc_id    (out_rule_id),
    .rd_addr   (hc_rd_addr),
    .rd_data   (hc_rd_data)
  );

endmodule
