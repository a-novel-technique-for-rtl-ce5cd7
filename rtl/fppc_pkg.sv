// fppc_pkg: types, widths and helper functions shared by the fast parallel
// packet classifier.
//
// The classifier works on the IPv4 5-tuple: source address (S_ad, 32 bits),
// destination address (D_ad, 32 bits), source port (S_pn, 16 bits),
// destination port (D_pn, 16 bits) and protocol (P_tcl, 8 bits). A rule
// stored in a D_ad trie node keeps only the fields that the tree and trie
// walk do not already check: the two port fields, the protocol, the
// priority PT, plus the rule number and the action the rule selects.
// Ports are stored as inclusive ranges, which covers both an exact port and
// the wildcard '*'; the protocol is either exact or '*'.
//
// Priority order (a design choice): the smaller PT value wins, and equal PT
// values are broken by the smaller rule number, so that every stage of the
// design agrees on a single winner.
//
// Node pointers are 16 bits wide in the stored node formats so that these
// types do not depend on module parameters; each module uses only the low
// bits its memory depth needs.
package fppc_pkg;

  localparam int unsigned IP_W      = 32;
  localparam int unsigned PORT_W    = 16;
  localparam int unsigned PROTO_W   = 8;
  localparam int unsigned PRIO_W    = 16;
  localparam int unsigned RULE_ID_W = 11;  // 2048 rules, the largest set evaluated is 2000
  localparam int unsigned ACTION_W  = 8;
  localparam int unsigned PTR_W     = 16;
  localparam int unsigned HDR_BYTES = 64;  // IPv4 header up to 60 bytes plus the 4 port bytes

  localparam logic [PROTO_W-1:0] PROTO_TCP = 8'd6;
  localparam logic [PROTO_W-1:0] PROTO_UDP = 8'd17;

  // Header fields separated by the header extractor.
  typedef struct packed {
    logic [IP_W-1:0]    sad;
    logic [IP_W-1:0]    dad;
    logic [PORT_W-1:0]  spn;
    logic [PORT_W-1:0]  dpn;
    logic [PROTO_W-1:0] ptcl;
  } five_tuple_t;

  // Rule fields kept in a D_ad trie node.
  typedef struct packed {
    logic [PORT_W-1:0]    spn_lo;
    logic [PORT_W-1:0]    spn_hi;
    logic [PORT_W-1:0]    dpn_lo;
    logic [PORT_W-1:0]    dpn_hi;
    logic [PROTO_W-1:0]   ptcl;
    logic                 ptcl_any;
    logic [PRIO_W-1:0]    pt;
    logic [RULE_ID_W-1:0] id;
    logic [ACTION_W-1:0]  action;
  } rule_t;

  // Result of a search: the best rule found so far.
  typedef struct packed {
    logic                 hit;
    logic [PRIO_W-1:0]    pt;
    logic [RULE_ID_W-1:0] id;
    logic [ACTION_W-1:0]  action;
  } match_t;

  // Node of an S_ad binary search tree: prefix value (low bits zero),
  // prefix length, left and right pointers into the next tree level, and the
  // root of the D_ad trie hanging from this prefix.
  typedef struct packed {
    logic [IP_W-1:0]  prefix;
    logic [5:0]       len;
    logic             left_v;
    logic [PTR_W-1:0] left;
    logic             right_v;
    logic [PTR_W-1:0] right;
    logic [PTR_W-1:0] trie_root;
  } sad_node_t;

  // Node of a T_eps trie. With eps set, 'left' is the epsilon branch (no
  // address bit consumed) and 'right' is unused; otherwise 'left' is the
  // '0' branch and 'right' the '1' branch. 'count' rules are stored.
  typedef struct packed {
    logic             eps;
    logic             left_v;
    logic [PTR_W-1:0] left;
    logic             right_v;
    logic [PTR_W-1:0] right;
    logic [3:0]       count;
  } trie_node_t;

  function automatic logic [IP_W-1:0] prefix_mask(input logic [5:0] len);
    logic [IP_W-1:0] m;
    m = '0;
    for (int unsigned b = 0; b < IP_W; b++)
      if (b < 32 - 32'(len)) m[b] = 1'b0; else m[b] = 1'b1;
    return m;
  endfunction

  function automatic logic prefix_match(input logic [IP_W-1:0] addr,
                                        input logic [IP_W-1:0] prefix,
                                        input logic [5:0]      len);
    return ((addr ^ prefix) & prefix_mask(len)) == '0;
  endfunction

  // Port and protocol check of one stored rule against a header.
  function automatic logic rule_fields_match(input rule_t r, input five_tuple_t h);
    return (h.spn >= r.spn_lo) && (h.spn <= r.spn_hi) &&
           (h.dpn >= r.dpn_lo) && (h.dpn <= r.dpn_hi) &&
           (r.ptcl_any || (h.ptcl == r.ptcl));
  endfunction

  // True when a is a hit that takes precedence over b.
  function automatic logic better(input match_t a, input match_t b);
    return a.hit && (!b.hit || (a.pt < b.pt) || ((a.pt == b.pt) && (a.id < b.id)));
  endfunction

endpackage
