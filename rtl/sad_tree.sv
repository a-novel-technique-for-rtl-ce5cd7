// sad_tree: stage one of a cluster pipeline, a pipelined binary search tree
// over the S_ad prefixes of one cluster.
//
// Within a cluster all S_ad prefixes are pairwise disjoint, so at most one
// of them matches a source address and the prefixes can be ordered by their
// first address. Each tree node holds a prefix (low bits zero), its length,
// a left and a right pointer and the root of the D_ad trie that belongs to
// the prefix. Tree level l sits in pipeline stage l with its own memory of
// 2**l nodes. At a node the search stops with 'found' when the address lies
// in the prefix; otherwise it goes left when the address is below the
// prefix and right when above, and ends without a match at a missing child.
//
// Interface: one header per clock on in_valid/in_tuple; after S_LEVELS
// cycles out_valid/out_tuple return with out_found and out_root (trie root
// address in trie stage 0). Nodes are written one per clock through wr_*;
// rst_n empties the tree (node valid bits cleared). Memories are read
// asynchronously and every stage registers its result.
//
// From the document: the node contents (value, prefix length, left and
// right pointer), one tree per cluster, each node leading to a D_ad trie,
// and the linear pipeline. The one-level-per-stage mapping, the ordering
// rule used to descend and the write port are this design's choices.
module sad_tree
  import fppc_pkg::*;
#(
  parameter int unsigned S_LEVELS = 11  // 2**11-1 = 2047 nodes per cluster
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  five_tuple_t                 in_tuple,
  output logic                        out_valid,
  output five_tuple_t                 out_tuple,
  output logic                        out_found,
  output logic [PTR_W-1:0]            out_root,
  input  logic                        wr_en,
  input  logic [$clog2(S_LEVELS)-1:0] wr_level,
  input  logic [PTR_W-1:0]            wr_addr,
  input  logic                        wr_valid,
  input  sad_node_t                   wr_node
);

  typedef struct packed {
    logic             valid;
    five_tuple_t      tuple;
    logic             active;  // still descending
    logic [PTR_W-1:0] ptr;
    logic             found;
    logic [PTR_W-1:0] root;
  } stage_t;

  stage_t st [S_LEVELS+1];

  always_comb begin
    st[0]        = '0;
    st[0].valid  = in_valid;
    st[0].tuple  = in_tuple;
    st[0].active = in_valid;
  end

  for (genvar l = 0; l < S_LEVELS; l++) begin : g_level
    localparam int unsigned DEPTH = 1 << l;
    localparam int unsigned AW    = (l == 0) ? 1 : l;

    sad_node_t        mem   [DEPTH];
    logic [DEPTH-1:0] nvalid;
    sad_node_t        node;
    logic             node_v, hit;
    logic [AW-1:0]    raddr;
    stage_t           nxt;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) nvalid <= '0;
      else if (wr_en && (32'(wr_level) == l) && (32'(wr_addr) < DEPTH))
        nvalid[AW'(wr_addr)] <= wr_valid;
    end

    always_ff @(posedge clk) begin
      if (wr_en && (32'(wr_level) == l) && (32'(wr_addr) < DEPTH))
        mem[AW'(wr_addr)] <= wr_node;
    end

    always_comb begin
      raddr  = (l == 0) ? '0 : AW'(st[l].ptr);
      node   = mem[raddr];
      node_v = nvalid[raddr];
      hit    = prefix_match(st[l].tuple.sad, node.prefix, node.len);
      nxt    = st[l];
      if (st[l].active) begin
        if (!node_v) begin
          nxt.active = 1'b0;
        end else if (hit) begin
          nxt.active = 1'b0;
          nxt.found  = 1'b1;
          nxt.root   = node.trie_root;
        end else if (st[l].tuple.sad < node.prefix) begin
          nxt.active = node.left_v;
          nxt.ptr    = node.left;
        end else begin
          nxt.active = node.right_v;
          nxt.ptr    = node.right;
        end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) st[l+1] <= '0;
      else        st[l+1] <= nxt;
    end
  end

  assign out_valid = st[S_LEVELS].valid;
  assign out_tuple = st[S_LEVELS].tuple;
  assign out_found = st[S_LEVELS].found;
  assign out_root  = st[S_LEVELS].root;

endmodule
