// tb_fppc_top: end-to-end test of the packet classifier at its default size.
//
// Phase 1 loads the 17-rule example classifier, puts the 8 rules with the
// highest hit counts into the Bloom filter (the Top-N set) and classifies
// directed and random packets. Phase 2 (after a reset) loads a random
// 2000-rule set with a random 400-rule Top-N set and classifies random
// packets. Phase 3 adds 1100 more rule numbers to the Bloom filter and
// sends packets for rules that are false positives of the filter. Packets are sent back to back, one per clock, with idle gaps.
// Every result is compared with a linear-search reference classifier and a
// reference Bloom filter; the latency must be exactly
// 1 + S_LEVELS + TRIE_STAGES + 1 + BF_K cycles. Hit counters are read back
// and compared at the end of each phase. Each mechanism (search hit and
// miss, Top-N member, early Bloom filter stop at each stage, false
// positive, epsilon chain, several clusters matching, header drop, packet
// without ports, back-to-back input) is counted and must occur.
module tb_fppc_top;
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

  // mechanism counters
  int n_hit, n_miss, n_member, n_fp, n_drop, n_noports, n_eps, n_multi, n_b2b;
  int n_stop [BF_K+1];

  tb_rule_t     rules[$];
  table_builder tb_build;
  bit           topn[int];
  bit           bf_model [BF_BITS];
  int           hc_model[int];

  typedef struct {
    longint      t_in;
    match_t      exp;
    bit          member;
    int          lookups;
  } exp_t;
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

  task automatic idle_inputs();
    pkt_valid = 0; pkt_hdr = '0;
    sad_wr_en = 0; sad_wr_valid = 0; sad_wr_cluster = '0; sad_wr_level = '0; sad_wr_addr = '0;
    sad_wr_node = '0; trie_wr_en = 0; trie_wr_cluster = '0; trie_wr_stage = '0;
    trie_wr_addr = '0; trie_wr_node = '0; trie_wr_rules = '0;
    bf_clear = 0; bf_prog_valid = 0; bf_prog_key = '0; hc_clear = 0; hc_rd_addr = '0;
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (bf_model[i]) bf_model[i] = 0;
    hc_model.delete();
    topn.delete();
  endtask

  task automatic load_tables();
    tb_build = new(C, S_LEVELS, TRIE_STAGES, TRIE_NODES, R_TRIE);
    tb_build.build(rules);
    check(tb_build.ok, {"table build: ", tb_build.err});
    $display("tables: %0d tree nodes, %0d trie nodes, %0d epsilon nodes, deepest trie stage %0d, deepest tree level %0d, most nodes in a stage %0d",
             tb_build.sad_wr.size(), tb_build.trie_wr.size(), tb_build.eps_nodes,
             tb_build.max_trie_stage, tb_build.max_tree_level, tb_build.max_nodes_per_stage);
    foreach (tb_build.sad_wr[i]) begin
      @(negedge clk);
      sad_wr_en = 1; sad_wr_valid = 1;
      sad_wr_cluster = $bits(sad_wr_cluster)'(tb_build.sad_wr[i].cluster);
      sad_wr_level = $bits(sad_wr_level)'(tb_build.sad_wr[i].level);
      sad_wr_addr = PTR_W'(tb_build.sad_wr[i].addr);
      sad_wr_node = tb_build.sad_wr[i].node;
    end
    @(negedge clk) sad_wr_en = 0;
    foreach (tb_build.trie_wr[i]) begin
      @(negedge clk);
      trie_wr_en = 1;
      trie_wr_cluster = $bits(trie_wr_cluster)'(tb_build.trie_wr[i].cluster);
      trie_wr_stage = $bits(trie_wr_stage)'(tb_build.trie_wr[i].stage);
      trie_wr_addr = PTR_W'(tb_build.trie_wr[i].addr);
      trie_wr_node = tb_build.trie_wr[i].node;
      for (int k = 0; k < R_TRIE; k++) trie_wr_rules[k] = tb_build.trie_wr[i].rules[k];
    end
    @(negedge clk) trie_wr_en = 0;
  endtask

  task automatic program_bf(input int id);
    @(negedge clk);
    bf_prog_valid = 1; bf_prog_key = RULE_ID_W'(id);
    for (int i = 0; i < BF_K; i++) bf_model[bf_hash(i, RULE_ID_W'(id))] = 1;
    topn[id] = 1;
    @(negedge clk) bf_prog_valid = 0;
  endtask

  // Send one packet header (called at a negedge) and record the expected result.
  task automatic send(input five_tuple_t t, input int ihl, input int frag, input int version,
                      input bit back_to_back);
    exp_t e;
    five_tuple_t seen;
    int nclusters;
    bit cl_seen[int];
    pkt_valid = 1;
    pkt_hdr = make_hdr(t, ihl, frag, version);
    if (version != 4 || ihl < 5) begin
      n_drop++;
      return;
    end
    seen = t;
    if (frag != 0 || (t.ptcl != PROTO_TCP && t.ptcl != PROTO_UDP)) begin
      seen.spn = 0; seen.dpn = 0;
      n_noports++;
    end
    if (back_to_back) n_b2b++;
    e.t_in = cycle;
    e.exp = ref_classify(rules, seen);
    e.member = e.exp.hit;
    e.lookups = 0;
    if (e.exp.hit) begin
      for (int i = 0; i < BF_K; i++) begin
        e.lookups++;
        if (!bf_model[bf_hash(i, e.exp.id)]) begin e.member = 0; break; end
      end
      if (!hc_model.exists(int'(e.exp.id))) hc_model[int'(e.exp.id)] = 0;
      hc_model[int'(e.exp.id)]++;
      if (tb_build.rule_in_eps.exists(int'(e.exp.id))) n_eps++;
    end
    foreach (rules[i])
      if (rule_matches(rules[i], seen)) cl_seen[tb_build.rule_cluster[int'(rules[i].r.id)]] = 1;
    nclusters = cl_seen.num();
    if (nclusters > 1) n_multi++;
    expq.push_back(e);
  endtask

  // Output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (expq.size() == 0) begin
        check(0, "unexpected output");
      end else begin
        e = expq.pop_front();
        check(cycle - e.t_in == LAT, $sformatf("latency %0d, expected %0d", cycle - e.t_in, LAT));
        check(out_hit == e.exp.hit, $sformatf("hit %0d expected %0d", out_hit, e.exp.hit));
        if (e.exp.hit) begin
          check(out_rule_id == e.exp.id && out_action == e.exp.action && out_pt == e.exp.pt,
                $sformatf("rule %0d expected %0d", out_rule_id, e.exp.id));
          n_hit++;
        end else n_miss++;
        check(out_member == e.member, $sformatf("member %0d expected %0d (rule %0d)", out_member, e.member, e.exp.id));
        check(int'(out_lookups) == e.lookups, $sformatf("lookups %0d expected %0d", out_lookups, e.lookups));
        if (out_member) begin
          n_member++;
          if (!topn.exists(int'(e.exp.id))) n_fp++;
        end else if (e.exp.hit) n_stop[e.lookups]++;
      end
    end
  end

  always @(posedge clk) if (rst_n && hdr_drop) checks++;

  task automatic traffic(input int npkts);
    bit prev;
    prev = 0;
    for (int p = 0; p < npkts; p++) begin
      five_tuple_t t;
      int kind;
      @(negedge clk);
      if ($urandom % 8 == 0) begin
        pkt_valid = 0;
        prev = 0;
        continue;
      end
      kind = $urandom % 100;
      if (kind < 75) t = tuple_for(rules[$urandom % rules.size()]);
      else begin
        t.sad = $urandom; t.dad = $urandom; t.spn = 16'($urandom); t.dpn = 16'($urandom);
        t.ptcl = ($urandom % 2) ? PROTO_TCP : PROTO_UDP;
      end
      if (kind >= 95 && kind < 97) send(t, 5, 0, 6, prev);           // not IPv4
      else if (kind >= 97) begin t.ptcl = 8'd1; send(t, 5, 0, 4, prev); end  // ICMP
      else if (kind == 94) send(t, 5, 100, 4, prev);                 // later fragment
      else send(t, 5 + ($urandom % 11), 0, 4, prev);
      prev = 1;
    end
    @(negedge clk) pkt_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    check(expq.size() == 0, "results missing");
  endtask

  task automatic check_counters();
    foreach (rules[i]) begin
      int id, expc;
      id = int'(rules[i].r.id);
      expc = hc_model.exists(id) ? hc_model[id] : 0;
      @(negedge clk) hc_rd_addr = RULE_ID_W'(id);
      #1 check(hc_rd_data == 32'(expc), $sformatf("hit count rule %0d: %0d expected %0d", id, hc_rd_data, expc));
    end
  endtask

  initial begin
    int hc_tbl[17] = '{2, 3, 1, 3, 1, 0, 6, 7, 5, 5, 6, 7, 5, 5, 6, 7, 7};
    int order[$];
    idle_inputs();
    do_reset();

    // ---- phase 1: example classifier, Top-8 by hit count ----
    example_rules(rules);
    load_tables();
    for (int i = 0; i < 17; i++) order.push_back(i);
    // highest hit counts first, ties to the lower rule number
    for (int i = 0; i < 17; i++)
      for (int j = i + 1; j < 17; j++)
        if (hc_tbl[order[j]] > hc_tbl[order[i]] ||
            (hc_tbl[order[j]] == hc_tbl[order[i]] && order[j] < order[i])) begin
          int t;
          t = order[i]; order[i] = order[j]; order[j] = t;
        end
    $display("Top-8 rules: R%0d R%0d R%0d R%0d R%0d R%0d R%0d R%0d", order[0] + 1, order[1] + 1,
             order[2] + 1, order[3] + 1, order[4] + 1, order[5] + 1, order[6] + 1, order[7] + 1);
    for (int i = 0; i < 8; i++) program_bf(order[i] + 1);
    // directed: every rule a few times, back to back
    for (int r = 0; r < 17; r++)
      for (int k = 0; k < 3; k++) begin
        @(negedge clk);
        send(tuple_for(rules[r]), 5, 0, 4, (r + k) > 0);
      end
    traffic(600);
    check_counters();
    // clear the hit counters and check they read zero
    @(negedge clk) hc_clear = 1;
    @(negedge clk) hc_clear = 0;
    hc_model.delete();
    check_counters();

    // ---- phase 2: 2000 random rules, random Top-400 ----
    do_reset();
    gen_rules(rules, 2000);
    load_tables();
    for (int i = 0; i < 400; i++) program_bf(int'($urandom % 2000));
    traffic(3000);
    check_counters();

    // ---- phase 3: fill the Bloom filter further and aim at false positives ----
    for (int i = 0; i < 1100; i++) program_bf(int'($urandom % 2000));
    begin
      int fp_ids[$];
      for (int id = 0; id < 2000; id++) begin
        bit all;
        all = 1;
        for (int i = 0; i < BF_K; i++) if (!bf_model[bf_hash(i, RULE_ID_W'(id))]) all = 0;
        if (all && !topn.exists(id)) fp_ids.push_back(id);
      end
      $display("rule numbers that are Bloom filter false positives: %0d", fp_ids.size());
      foreach (fp_ids[i])
        for (int k = 0; k < 4; k++) begin
          @(negedge clk);
          send(tuple_for(rules[fp_ids[i]]), 5, 0, 4, 1);
        end
    end
    traffic(500);
    check_counters();

    $display("mechanisms: hit=%0d miss=%0d member=%0d false_pos=%0d stop1=%0d stop2=%0d stop3=%0d stop4=%0d eps=%0d multi_cluster=%0d drop=%0d no_ports=%0d back_to_back=%0d",
             n_hit, n_miss, n_member, n_fp, n_stop[1], n_stop[2], n_stop[3], n_stop[4], n_eps,
             n_multi, n_drop, n_noports, n_b2b);
    check(n_hit > 0, "no search hit");
    check(n_miss > 0, "no search miss");
    check(n_member > 0, "no Top-N member");
    check(n_fp > 0, "no false positive");
    check(n_stop[1] > 0, "no stop after stage 1");
    check(n_stop[2] + n_stop[3] + n_stop[4] > 0, "no stop after a later stage");
    check(n_eps > 0, "no epsilon chain winner");
    check(n_multi > 0, "no multi-cluster match");
    check(n_drop > 0, "no header drop");
    check(n_noports > 0, "no packet without ports");
    check(n_b2b > 0, "no back-to-back packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
