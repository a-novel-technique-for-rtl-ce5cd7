// tb_result_merge: random per-cluster results, often with equal priorities,
// into a 4-input merge. The expected winner is found by sorting the hits on
// (PT, rule number); the output must follow one cycle later.
module tb_result_merge;
  import fppc_pkg::*;

  localparam int C = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   in_valid, out_valid;
  match_t in_match [C];
  match_t out_match;

  result_merge #(.C(C)) dut (.*);

  int checks = 0, failures = 0, n_tie = 0, n_none = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    match_t hits[$], e;
    in_valid = 0;
    foreach (in_match[c]) in_match[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      hits.delete();
      in_valid = ($urandom % 4 != 0);
      for (int c = 0; c < C; c++) begin
        in_match[c].hit    = ($urandom % 3 != 0);
        in_match[c].pt     = 16'($urandom % 4);
        in_match[c].id     = RULE_ID_W'($urandom);
        in_match[c].action = 8'($urandom);
        if (in_match[c].hit) hits.push_back(in_match[c]);
      end
      for (int a = 0; a < hits.size(); a++)
        for (int b = a + 1; b < hits.size(); b++)
          if ({hits[b].pt, hits[b].id} < {hits[a].pt, hits[a].id}) begin
            match_t t;
            t = hits[a]; hits[a] = hits[b]; hits[b] = t;
          end
      e = (hits.size() > 0) ? hits[0] : '0;
      if (hits.size() > 1 && hits[1].pt == hits[0].pt) n_tie++;
      if (hits.size() == 0) n_none++;
      @(posedge clk);
      #1;
      check(out_valid == in_valid, "valid");
      check(out_match.hit == e.hit, "hit");
      if (e.hit) check(out_match == e, $sformatf("got %h exp %h", out_match, e));
    end
    check(n_tie > 0 && n_none > 0, "ties or empty inputs never seen");
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
