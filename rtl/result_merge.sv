// result_merge: joins the C cluster pipelines into one search result.
//
// Every cluster returns at most one rule, the best one its S_ad tree and
// D_ad trie found. Because the clusters split the rules by disjoint S_ad
// prefixes, several clusters can match the same packet; the final result is
// the one that takes precedence in fppc_pkg::better (smaller PT, then
// smaller rule number). The comparison is a linear chain over the C inputs,
// registered once.
//
// Interface: in_valid qualifies all C inputs together (the pipelines run in
// lock step); out_valid/out_match follow one cycle later.
// The document shows the C pipeline outputs joining before the Bloom filter;
// the priority choice and its single register stage are this design's.
module result_merge
  import fppc_pkg::*;
#(
  parameter int unsigned C = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  match_t in_match [C],
  output logic   out_valid,
  output match_t out_match
);

  match_t best;

  always_comb begin
    best = '0;
    for (int unsigned c = 0; c < C; c++)
      if (better(in_match[c], best)) best = in_match[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_match <= '0;
    end else begin
      out_valid <= in_valid;
      out_match <= best;
    end
  end

endmodule
