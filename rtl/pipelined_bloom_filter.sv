// pipelined_bloom_filter: k-stage pipelined Bloom filter over a B-bit array.
//
// Programming (BFAdd): prog_valid with prog_key sets the K bits
// h_1(key) .. h_K(key) of the array in one clock, using all K hash
// functions at once. 'clear' empties the array; so does reset.
//
// Query (BFQuery): stage i computes h_i(key) and looks up that bit only when
// its enable (En) is set, i.e. when every earlier stage found its bit set.
// Stage 1 is enabled by q_en. The enable leaving stage K is the AND of all
// K looked-up bits, so r_member is 1 only when all K bits are set: the key
// is (probably) in the set, with the usual false-positive chance
// (1 - e^(-K*n/B))^K after n keys. After the first unset bit the later
// stages do no hashing and no lookup, which is where the power saving comes
// from; r_lookups reports how many of the K stages were used.
//
// Hash functions (this design's choice): multiplicative hashing,
// h_i(key) = bits [31 -: log2(B)] of (key * M_i) mod 2**32 with a distinct
// odd constant M_i per stage.
//
// Interface: one query per clock; r_valid/r_member/r_payload/r_lookups
// appear K cycles after q_valid. The payload travels alongside unchanged.
// From the document: the K stages, the En chain from each stage to the
// next, the bit array, the AND of the K bits, programming with all K
// hashes. B, K, the hash functions and the payload path are assumed.
module pipelined_bloom_filter
  import fppc_pkg::*;
#(
  parameter int unsigned K     = 4,
  parameter int unsigned B     = 16384,
  parameter int unsigned KEY_W = RULE_ID_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   prog_valid,
  input  logic [KEY_W-1:0]       prog_key,
  input  logic                   q_valid,
  input  logic                   q_en,
  input  logic [KEY_W-1:0]       q_key,
  input  match_t                 q_payload,
  output logic                   r_valid,
  output logic                   r_member,
  output match_t                 r_payload,
  output logic [$clog2(K+1)-1:0] r_lookups
);

  localparam int unsigned BW = $clog2(B);
  localparam int unsigned LW = $clog2(K + 1);

  localparam logic [31:0] MULT [8] = '{32'h9E3779B1, 32'h85EBCA77, 32'hC2B2AE3D, 32'h27D4EB2F,
                                       32'h165667B1, 32'hD3A2646D, 32'hFD7046C5, 32'hB55A4F09};

  function automatic logic [BW-1:0] bf_hash(input int unsigned i, input logic [KEY_W-1:0] key);
    logic [31:0] p;
    p = 32'(key) * MULT[i];
    return p[31 -: BW];
  endfunction

  logic [B-1:0] bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bits <= '0;
    else if (clear) bits <= '0;
    else if (prog_valid)
      for (int unsigned i = 0; i < K; i++) bits[bf_hash(i, prog_key)] <= 1'b1;
  end

  typedef struct packed {
    logic             valid;
    logic             en;
    logic [KEY_W-1:0] key;
    match_t           payload;
    logic [LW-1:0]    lookups;
  } stage_t;

  stage_t st [K+1];

  always_comb begin
    st[0]         = '0;
    st[0].valid   = q_valid;
    st[0].en      = q_valid && q_en;
    st[0].key     = q_key;
    st[0].payload = q_payload;
  end

  for (genvar i = 0; i < K; i++) begin : g_stage
    stage_t nxt;
    always_comb begin
      nxt = st[i];
      if (st[i].en) begin
        nxt.en      = bits[bf_hash(i, st[i].key)];
        nxt.lookups = st[i].lookups + LW'(1);
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) st[i+1] <= '0;
      else        st[i+1] <= nxt;
    end
  end

  assign r_valid   = st[K].valid;
  assign r_member  = st[K].en;
  assign r_payload = st[K].payload;
  assign r_lookups = st[K].lookups;

  initial assert (K >= 1 && K <= 8) else $error("K must be 1..8");
  initial assert (B == (1 << BW)) else $error("B must be a power of two");

endmodule
