// tb_dad_trie: one T_eps trie (all rules share the S_ad wildcard) of 120
// rules whose D_ad prefixes are drawn from 25 shared prefixes, so that many
// nodes hold more than R_TRIE=2 rules and epsilon chains appear. The table
// builder lays the trie out over the stages. Headers that match a random
// rule, and random headers, are walked back to back with in_found set (and
// sometimes clear, which must give no hit). The expected best rule comes
// from a linear search over the rules. Checks the TRIE_STAGES-cycle latency.
module tb_dad_trie;
  import fppc_pkg::*;
  import fppc_tb_pkg::*;

  localparam int TRIE_STAGES = 40, TRIE_NODES = 256, R_TRIE = 2, NR = 120;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                           in_valid, in_found, out_valid, wr_en;
  five_tuple_t                    in_tuple;
  logic [PTR_W-1:0]               in_root, wr_addr;
  match_t                         out_match;
  logic [$clog2(TRIE_STAGES)-1:0] wr_stage;
  trie_node_t                     wr_node;
  rule_t [R_TRIE-1:0]             wr_rules;

  dad_trie #(.TRIE_STAGES(TRIE_STAGES), .TRIE_NODES(TRIE_NODES), .R_TRIE(R_TRIE)) dut (.*);

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_eps = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint t; match_t m; } exp_t;
  exp_t q[$];
  tb_rule_t rules[$];
  table_builder bld;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = q.pop_front();
      check(cycle - e.t == TRIE_STAGES, "latency");
      check(out_match.hit == e.m.hit, $sformatf("hit %0d exp %0d", out_match.hit, e.m.hit));
      if (e.m.hit) begin
        check(out_match == e.m, $sformatf("rule %0d exp %0d", out_match.id, e.m.id));
        n_hit++;
        if (bld.rule_in_eps.exists(int'(e.m.id))) n_eps++;
      end else n_miss++;
    end
  end

  initial begin
    tb_rule_t pool[$];
    in_valid = 0; in_found = 0; in_tuple = '0; in_root = '0;
    wr_en = 0; wr_addr = '0; wr_stage = '0; wr_node = '0; wr_rules = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    gen_rules(pool, 25);
    gen_rules(rules, NR);
    foreach (rules[i]) begin
      int j;
      j = $urandom % 25;
      rules[i].sad = 0; rules[i].sad_len = 0;
      rules[i].dad = pool[j].dad; rules[i].dad_len = pool[j].dad_len;
    end
    bld = new(1, 11, TRIE_STAGES, TRIE_NODES, R_TRIE);
    bld.build(rules);
    check(bld.ok, bld.err);
    $display("trie: %0d nodes, %0d epsilon nodes, deepest stage %0d",
             bld.trie_wr.size(), bld.eps_nodes, bld.max_trie_stage);
    foreach (bld.trie_wr[i]) begin
      @(negedge clk);
      wr_en = 1; wr_stage = $bits(wr_stage)'(bld.trie_wr[i].stage);
      wr_addr = PTR_W'(bld.trie_wr[i].addr); wr_node = bld.trie_wr[i].node;
      for (int k = 0; k < R_TRIE; k++) wr_rules[k] = bld.trie_wr[i].rules[k];
    end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < 3000; i++) begin
      exp_t e;
      @(negedge clk);
      if ($urandom % 6 == 0) begin in_valid = 0; continue; end
      in_valid = 1;
      in_found = ($urandom % 10 != 0);
      in_root = PTR_W'(bld.sad_wr[0].node.trie_root);
      if ($urandom % 5 != 0) in_tuple = tuple_for(rules[$urandom % NR]);
      else begin
        in_tuple = {$urandom, $urandom, $urandom, $urandom};
        in_tuple.ptcl = PROTO_UDP;
      end
      e.t = cycle;
      e.m = in_found ? ref_classify(rules, in_tuple) : '0;
      q.push_back(e);
    end
    @(negedge clk) in_valid = 0;
    repeat (TRIE_STAGES + 3) @(posedge clk);
    check(q.size() == 0, "results missing");
    check(bld.eps_nodes > 0 && n_eps > 0 && n_miss > 0, "epsilon winner or miss not seen");
    $display("hit=%0d miss=%0d epsilon_winner=%0d", n_hit, n_miss, n_eps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
