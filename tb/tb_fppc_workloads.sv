// tb_fppc_workloads: the classifier at its default size on rule sets of
// 500, 1000, 1500 and 2000 random rules, run through the Top-N flow.
//
// For each size: reset, build and load the tables, send skewed warm-up
// traffic (a few rules carry most packets), read every hit counter back
// through the counter port and compare it with the expected count, pick the
// N = size/10 rules with the highest counts as the Top-N set and program
// them into the Bloom filter, then send skewed traffic again. Every result
// is compared with the linear-search reference and a reference Bloom
// filter, and the latency must be exactly 57 cycles. Reported per size:
// memory used per rule by the loaded tables, sustained rate (results per
// clock over the measured burst), share of hits served by Top-N rules.
module tb_fppc_workloads;
  import fppc_pkg::*;
  import fppc_tb_pkg::*;

  localparam int C = 4, S_LEVELS = 11, TRIE_STAGES = 40, TRIE_NODES = 2048, R_TRIE = 2;
  localparam int BF_K = 4, BF_BITS = 16384;
  localparam int LAT = 1 + S_LEVELS + TRIE_STAGES + 1 + BF_K;
  localparam logic [31:0] MULT [8] = '{32'h9E3779B1, 32'h85EBCA77, 32'hC2B2AE3D, 32'h27D4EB2F,
                                       32'h165667B1, 32'hD3A2646D, 32'hFD7046C5, 32'hB55A4F09};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                           pkt_valid;
  logic [HDR_BYTES*8-1:0]         pkt_hdr;
  logic                           hdr_drop;
  logic                           out_valid, out_hit, out_member;
  logic [RULE_ID_W-1:0]           out_rule_id;
  logic [ACTION_W-1:0]            out_action;
  logic [PRIO_W-1:0]              out_pt;
  logic [$clog2(BF_K+1)-1:0]      out_lookups;
  logic                           sad_wr_en, sad_wr_valid;
  logic [$clog2(C)-1:0]           sad_wr_cluster;
  logic [$clog2(S_LEVELS)-1:0]    sad_wr_level;
  logic [PTR_W-1:0]               sad_wr_addr;
  sad_node_t                      sad_wr_node;
  logic                           trie_wr_en;
  logic [$clog2(C)-1:0]           trie_wr_cluster;
  logic [$clog2(TRIE_STAGES)-1:0] trie_wr_stage;
  logic [PTR_W-1:0]               trie_wr_addr;
  trie_node_t                     trie_wr_node;
  rule_t [R_TRIE-1:0]             trie_wr_rules;
  logic                           bf_clear, bf_prog_valid;
  logic [RULE_ID_W-1:0]           bf_prog_key;
  logic                           hc_clear;
  logic [RULE_ID_W-1:0]           hc_rd_addr;
  logic [31:0]                    hc_rd_data;

  fppc_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  tb_rule_t     rules[$];
  table_builder bld;
  bit           bf_model [BF_BITS];
  int           hc_model[int];
  int           n_out, n_hits, n_member;
  longint       first_out, last_out;

  typedef struct { longint t_in; match_t exp; bit member; } exp_t;
  exp_t expq[$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic int bf_hash(input int i, input logic [RULE_ID_W-1:0] key);
    logic [31:0] p;
    p = 32'(key) * MULT[i];
    return int'(p >> (32 - $clog2(BF_BITS)));
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = expq.pop_front();
      check(cycle - e.t_in == LAT, "latency");
      check(out_hit == e.exp.hit, "hit");
      if (e.exp.hit) check(out_rule_id == e.exp.id && out_action == e.exp.action, "rule");
      check(out_member == e.member, "member");
      if (n_out == 0) first_out = cycle;
      last_out = cycle;
      n_out++;
      if (out_hit) n_hits++;
      if (out_member) n_member++;
    end
  end

  // Skewed choice: low rule indices are much more likely.
  function automatic int pick(input int n);
    int a;
    a = $urandom % n;
    return (a * int'($urandom % n)) / n;
  endfunction

  task automatic burst(input int npkts);
    for (int p = 0; p < npkts; p++) begin
      exp_t e;
      five_tuple_t t;
      @(negedge clk);
      t = tuple_for(rules[pick(rules.size())]);
      pkt_valid = 1;
      pkt_hdr = make_hdr(t, 5, 0, 4);
      e.t_in = cycle;
      e.exp = ref_classify(rules, t);
      e.member = e.exp.hit;
      if (e.exp.hit) begin
        for (int i = 0; i < BF_K; i++) if (!bf_model[bf_hash(i, e.exp.id)]) e.member = 0;
        if (!hc_model.exists(int'(e.exp.id))) hc_model[int'(e.exp.id)] = 0;
        hc_model[int'(e.exp.id)]++;
      end
      expq.push_back(e);
    end
    @(negedge clk) pkt_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    check(expq.size() == 0, "results missing");
  endtask

  task automatic run_size(input int n);
    int cnt[$], order[$], topn;
    longint bits_used;
    real rate;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (bf_model[i]) bf_model[i] = 0;
    hc_model.delete();
    gen_rules(rules, n);
    bld = new(C, S_LEVELS, TRIE_STAGES, TRIE_NODES, R_TRIE);
    bld.build(rules);
    check(bld.ok, {"table build: ", bld.err});
    foreach (bld.sad_wr[i]) begin
      @(negedge clk);
      sad_wr_en = 1; sad_wr_valid = 1;
      sad_wr_cluster = $bits(sad_wr_cluster)'(bld.sad_wr[i].cluster);
      sad_wr_level = $bits(sad_wr_level)'(bld.sad_wr[i].level);
      sad_wr_addr = PTR_W'(bld.sad_wr[i].addr);
      sad_wr_node = bld.sad_wr[i].node;
    end
    @(negedge clk) sad_wr_en = 0;
    foreach (bld.trie_wr[i]) begin
      @(negedge clk);
      trie_wr_en = 1;
      trie_wr_cluster = $bits(trie_wr_cluster)'(bld.trie_wr[i].cluster);
      trie_wr_stage = $bits(trie_wr_stage)'(bld.trie_wr[i].stage);
      trie_wr_addr = PTR_W'(bld.trie_wr[i].addr);
      trie_wr_node = bld.trie_wr[i].node;
      for (int k = 0; k < R_TRIE; k++) trie_wr_rules[k] = bld.trie_wr[i].rules[k];
    end
    @(negedge clk) trie_wr_en = 0;
    // warm-up traffic feeds the hit counters
    burst(2000);
    // read the hit-rate table and select the Top-N rules
    for (int r = 0; r < n; r++) begin
      int expc;
      expc = hc_model.exists(r) ? hc_model[r] : 0;
      @(negedge clk) hc_rd_addr = RULE_ID_W'(r);
      #1 check(hc_rd_data == 32'(expc), $sformatf("hit count %0d", r));
      cnt.push_back(int'(hc_rd_data));
      order.push_back(r);
    end
    // selection of the highest counts (ties to the smaller rule number)
    for (int i = 0; i < n / 10; i++) begin
      int b, t;
      b = i;
      for (int j = i + 1; j < n; j++) if (cnt[order[j]] > cnt[order[b]]) b = j;
      t = order[i]; order[i] = order[b]; order[b] = t;
    end
    topn = n / 10;
    for (int i = 0; i < topn; i++) begin
      @(negedge clk);
      bf_prog_valid = 1; bf_prog_key = RULE_ID_W'(order[i]);
      for (int k = 0; k < BF_K; k++) bf_model[bf_hash(k, RULE_ID_W'(order[i]))] = 1;
    end
    @(negedge clk) bf_prog_valid = 0;
    // measured traffic, one packet per clock
    n_out = 0; n_hits = 0; n_member = 0;
    burst(3000);
    rate = real'(n_out) / real'(last_out - first_out + 1);
    bits_used = longint'(bld.sad_wr.size()) * $bits(sad_node_t) +
                longint'(bld.trie_wr.size()) * ($bits(trie_node_t) + R_TRIE * $bits(rule_t));
    $display("rules=%0d tree_nodes=%0d trie_nodes=%0d eps_nodes=%0d fullest_stage=%0d deepest_stage=%0d bytes_per_rule=%0.1f results_per_clock=%0.3f latency=%0d top_n=%0d hits=%0d served_by_top_n=%0.1f%%",
             n, bld.sad_wr.size(), bld.trie_wr.size(), bld.eps_nodes, bld.max_nodes_per_stage,
             bld.max_trie_stage, real'(bits_used) / 8.0 / real'(n), rate, LAT, topn, n_hits,
             100.0 * real'(n_member) / real'(n_hits));
    check(rate > 0.99, "not one result per clock");
    check(n_member > 0, "no Top-N hits");
  endtask

  initial begin
    pkt_valid = 0; pkt_hdr = '0;
    sad_wr_en = 0; sad_wr_valid = 0; sad_wr_cluster = '0; sad_wr_level = '0; sad_wr_addr = '0;
    sad_wr_node = '0; trie_wr_en = 0; trie_wr_cluster = '0; trie_wr_stage = '0;
    trie_wr_addr = '0; trie_wr_node = '0; trie_wr_rules = '0;
    bf_clear = 0; bf_prog_valid = 0; bf_prog_key = '0; hc_clear = 0; hc_rd_addr = '0;
    run_size(500);
    run_size(1000);
    run_size(1500);
    run_size(2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
