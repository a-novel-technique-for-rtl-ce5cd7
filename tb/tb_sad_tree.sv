// tb_sad_tree: a 7-level tree (127 nodes) loaded with 100 random pairwise
// disjoint S_ad prefixes of lengths 1..32, laid out as a balanced search
// tree by the table builder. Random and in-prefix addresses are searched
// back to back; the expected result is a linear scan of the prefix list
// (found, and the trie root of the one prefix that holds the address).
// Checks the S_LEVELS-cycle latency and that the header passes through.
module tb_sad_tree;
  import fppc_pkg::*;
  import fppc_tb_pkg::*;

  localparam int S_LEVELS = 7, NPFX = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                        in_valid, out_valid, out_found, wr_en, wr_valid;
  five_tuple_t                 in_tuple, out_tuple;
  logic [PTR_W-1:0]            out_root, wr_addr;
  logic [$clog2(S_LEVELS)-1:0] wr_level;
  sad_node_t                   wr_node;

  sad_tree #(.S_LEVELS(S_LEVELS)) dut (.*);

  int checks = 0, failures = 0, n_found = 0, n_miss = 0, n_deep = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint t; five_tuple_t tup; bit found; logic [PTR_W-1:0] root; } exp_t;
  exp_t q[$];
  tb_rule_t rules[$];
  table_builder bld;
  int level_of[int];  // trie root -> tree level of its prefix

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
      check(cycle - e.t == S_LEVELS, "latency");
      check(out_tuple == e.tup, "tuple");
      check(out_found == e.found, $sformatf("found %0d exp %0d for %h", out_found, e.found, e.tup.sad));
      if (e.found) begin
        check(out_root == e.root, $sformatf("root %0d exp %0d", out_root, e.root));
        n_found++;
        if (level_of[int'(e.root)] == S_LEVELS - 1) n_deep++;
      end else n_miss++;
    end
  end

  initial begin
    tb_rule_t x;
    in_valid = 0; in_tuple = '0; wr_en = 0; wr_valid = 0; wr_addr = '0; wr_level = '0; wr_node = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // an empty tree finds nothing
    @(negedge clk) in_valid = 1; in_tuple = '0; in_tuple.sad = $urandom;
    q.push_back('{cycle, in_tuple, 0, '0});
    @(negedge clk) in_valid = 0;
    // random disjoint prefixes
    while (rules.size() < NPFX) begin
      bit clash;
      x = '{default: 0};
      x.sad_len = 1 + int'($urandom % 32);
      x.sad = $urandom & mask_of(x.sad_len);
      clash = 0;
      foreach (rules[i]) begin
        int m;
        m = (rules[i].sad_len < x.sad_len) ? rules[i].sad_len : x.sad_len;
        if (((rules[i].sad ^ x.sad) & mask_of(m)) == 0) clash = 1;
      end
      if (clash) continue;
      x.r.id = RULE_ID_W'(rules.size());
      rules.push_back(x);
    end
    bld = new(1, S_LEVELS, 40, 256, 2);
    bld.build(rules);
    check(bld.ok, bld.err);
    foreach (bld.sad_wr[i]) begin
      @(negedge clk);
      wr_en = 1; wr_valid = 1; wr_level = $bits(wr_level)'(bld.sad_wr[i].level);
      wr_addr = PTR_W'(bld.sad_wr[i].addr); wr_node = bld.sad_wr[i].node;
      level_of[int'(bld.sad_wr[i].node.trie_root)] = bld.sad_wr[i].level;
    end
    @(negedge clk) wr_en = 0;
    repeat (S_LEVELS + 2) @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      exp_t e;
      @(negedge clk);
      if ($urandom % 6 == 0) begin in_valid = 0; continue; end
      in_valid = 1;
      in_tuple = {$urandom, $urandom, $urandom, $urandom};
      if ($urandom % 4 != 0) begin
        int j;
        j = $urandom % NPFX;
        in_tuple.sad = rules[j].sad | ($urandom & ~mask_of(rules[j].sad_len));
      end
      e.t = cycle; e.tup = in_tuple; e.found = 0; e.root = '0;
      foreach (bld.sad_wr[k])
        if (prefix_match(in_tuple.sad, bld.sad_wr[k].node.prefix, bld.sad_wr[k].node.len)) begin
          e.found = 1; e.root = bld.sad_wr[k].node.trie_root;
        end
      q.push_back(e);
    end
    @(negedge clk) in_valid = 0;
    repeat (S_LEVELS + 3) @(posedge clk);
    check(q.size() == 0, "results missing");
    check(n_found > 0 && n_miss > 0 && n_deep > 0, "found, miss or deepest level not seen");
    $display("found=%0d miss=%0d deepest_level=%0d", n_found, n_miss, n_deep);
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
