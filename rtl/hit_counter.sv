// hit_counter: per-rule hit counts, the raw data of the hit-rate table.
//
// Each classified packet whose search found a rule increments that rule's
// counter (inc_valid, inc_id); counters saturate at all ones. A host reads
// any counter combinationally through rd_addr/rd_data, and 'clear' (or
// reset) zeroes all of them. The Top-N selection reads these counts to rank
// rules by hit rate and decides which rules go into the Bloom filter.
//
// Interface: one increment per clock, counters written on the clock edge.
// The document only names hit counts kept in switches as the source of the
// hit rates; the counter width, saturation and read port are this design's
// choices.
module hit_counter
  import fppc_pkg::*;
#(
  parameter int unsigned RULES = 1 << RULE_ID_W,
  parameter int unsigned CNT_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 inc_valid,
  input  logic [RULE_ID_W-1:0] inc_id,
  input  logic [RULE_ID_W-1:0] rd_addr,
  output logic [CNT_W-1:0]     rd_data
);

  logic [CNT_W-1:0] cnt [RULES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < RULES; r++) cnt[r] <= '0;
    end else if (clear) begin
      for (int unsigned r = 0; r < RULES; r++) cnt[r] <= '0;
    end else if (inc_valid && (32'(inc_id) < RULES) && (cnt[inc_id] != '1)) begin
      cnt[inc_id] <= cnt[inc_id] + CNT_W'(1);
    end
  end

  assign rd_data = (32'(rd_addr) < RULES) ? cnt[rd_addr] : '0;

endmodule
