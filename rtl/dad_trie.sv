// dad_trie: stage two of a cluster pipeline, the pipelined walk of the
// D_ad T_eps tries of one cluster.
//
// Every S_ad prefix of the cluster owns one T_eps trie built on the D_ad
// prefixes of its rules. A trie node is either a binary node ('0' branch in
// 'left', '1' branch in 'right') or an epsilon node whose single branch
// ('left') is followed without consuming an address bit. Each node stores
// up to R_TRIE overlapping rules; when more rules share a node, the
// construction splits it into a chain of nodes linked by epsilon branches.
// A rule stored at a node already matches S_ad (the trie hangs from the
// matching S_ad prefix) and D_ad (the path spells its prefix), so the walk
// only checks ports and protocol of the stored rules and keeps the best one
// in priority order (fppc_pkg::better). No backtracking is ever needed.
//
// Stage s holds the nodes at depth s (epsilon branches count as a level)
// of all tries of the cluster in a memory of TRIE_NODES nodes; a walk visits
// one node per stage. Interface: one header per clock with the S_ad result
// (in_found, in_root); out_valid/out_match follow TRIE_STAGES cycles later.
// Nodes are written through wr_* one per clock. Trie memories have no reset:
// only nodes reached through written pointers are ever read.
//
// From the document: the T_eps node kinds, the R_trie bound on rules per
// node, the epsilon split and the stored fields (S_pn, D_pn, P_tcl, PT).
// The node-per-stage memory mapping, port ranges, rule number and action
// fields, and parameter values are this design's choices.
module dad_trie
  import fppc_pkg::*;
#(
  parameter int unsigned TRIE_STAGES = 40,   // 33 bit levels plus 7 epsilon levels
  parameter int unsigned TRIE_NODES  = 2048, // nodes per stage, >= rules per cluster
  parameter int unsigned R_TRIE      = 2     // rules per node
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  five_tuple_t                    in_tuple,
  input  logic                           in_found,
  input  logic [PTR_W-1:0]               in_root,
  output logic                           out_valid,
  output match_t                         out_match,
  input  logic                           wr_en,
  input  logic [$clog2(TRIE_STAGES)-1:0] wr_stage,
  input  logic [PTR_W-1:0]               wr_addr,
  input  trie_node_t                     wr_node,
  input  rule_t [R_TRIE-1:0]             wr_rules
);

  localparam int unsigned AW = $clog2(TRIE_NODES);

  typedef struct packed {
    logic             valid;
    five_tuple_t      tuple;
    logic             active;  // walk still inside the trie
    logic [PTR_W-1:0] ptr;
    logic [5:0]       depth;   // D_ad bits consumed
    match_t           best;
  } stage_t;

  stage_t st [TRIE_STAGES+1];

  always_comb begin
    st[0]        = '0;
    st[0].valid  = in_valid;
    st[0].tuple  = in_tuple;
    st[0].active = in_valid && in_found;
    st[0].ptr    = in_root;
  end

  for (genvar s = 0; s < TRIE_STAGES; s++) begin : g_stage
    trie_node_t         node_mem [TRIE_NODES];
    rule_t [R_TRIE-1:0] rule_mem [TRIE_NODES];
    trie_node_t         node;
    rule_t [R_TRIE-1:0] rules;
    match_t             cand;
    logic               bit_v;
    stage_t             nxt;

    always_ff @(posedge clk) begin
      if (wr_en && (32'(wr_stage) == s) && (32'(wr_addr) < TRIE_NODES)) begin
        node_mem[AW'(wr_addr)] <= wr_node;
        rule_mem[AW'(wr_addr)] <= wr_rules;
      end
    end

    always_comb begin
      node  = node_mem[AW'(st[s].ptr)];
      rules = rule_mem[AW'(st[s].ptr)];
      nxt   = st[s];
      cand  = '0;
      bit_v = st[s].tuple.dad[5'(31 - 32'(st[s].depth))];
      if (st[s].active) begin
        for (int unsigned r = 0; r < R_TRIE; r++) begin
          cand.hit    = (r < 32'(node.count)) && rule_fields_match(rules[r], st[s].tuple);
          cand.pt     = rules[r].pt;
          cand.id     = rules[r].id;
          cand.action = rules[r].action;
          if (better(cand, nxt.best)) nxt.best = cand;
        end
        if (node.eps) begin
          nxt.active = node.left_v;
          nxt.ptr    = node.left;
        end else if (st[s].depth == 6'd32) begin
          nxt.active = 1'b0;
        end else begin
          nxt.active = bit_v ? node.right_v : node.left_v;
          nxt.ptr    = bit_v ? node.right   : node.left;
          nxt.depth  = st[s].depth + 6'd1;
        end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) st[s+1] <= '0;
      else        st[s+1] <= nxt;
    end
  end

  assign out_valid = st[TRIE_STAGES].valid;
  assign out_match = st[TRIE_STAGES].best;

endmodule
