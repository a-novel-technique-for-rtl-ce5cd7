// tb_pipelined_bloom_filter: K=4 stages over a 1024-bit array (small, so
// that false positives and late stops happen). Programs a random key set,
// then queries members and non-members back to back. A reference bit array
// gives the expected membership and the number of stages that look up a
// bit; programmed keys must never be reported absent. Checks the K-cycle
// latency, the payload, q_en=0 (no lookups) and clear.
module tb_pipelined_bloom_filter;
  import fppc_pkg::*;

  localparam int K = 4, B = 1024, KEY_W = RULE_ID_W;
  localparam logic [31:0] MULT [8] = '{32'h9E3779B1, 32'h85EBCA77, 32'hC2B2AE3D, 32'h27D4EB2F,
                                       32'h165667B1, 32'hD3A2646D, 32'hFD7046C5, 32'hB55A4F09};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                   clear, prog_valid, q_valid, q_en, r_valid, r_member;
  logic [KEY_W-1:0]       prog_key, q_key;
  match_t                 q_payload, r_payload;
  logic [$clog2(K+1)-1:0] r_lookups;

  pipelined_bloom_filter #(.K(K), .B(B), .KEY_W(KEY_W)) dut (.*);

  int checks = 0, failures = 0, n_fp = 0, n_member = 0;
  int n_stop [K+1];
  bit model [B];
  bit inset [int];
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint t; bit member; int lookups; match_t pay; bit truly; } exp_t;
  exp_t q[$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int h(input int i, input logic [KEY_W-1:0] key);
    logic [31:0] p;
    p = 32'(key) * MULT[i];
    return int'(p >> (32 - $clog2(B)));
  endfunction

  always @(posedge clk) begin
    if (rst_n && r_valid) begin
      exp_t e;
      e = q.pop_front();
      check(cycle - e.t == K, "latency");
      check(r_member == e.member, $sformatf("member %0d exp %0d", r_member, e.member));
      check(int'(r_lookups) == e.lookups, "lookups");
      check(r_payload == e.pay, "payload");
      if (e.truly) check(r_member, "false negative");
      if (r_member) begin n_member++; if (!e.truly) n_fp++; end
      else if (e.lookups > 0) n_stop[e.lookups]++;
    end
  end

  task automatic query(input logic [KEY_W-1:0] key, input bit en);
    exp_t e;
    q_valid = 1; q_en = en; q_key = key;
    q_payload = match_t'({$urandom, $urandom});
    e.t = cycle; e.pay = q_payload; e.member = en; e.lookups = 0;
    e.truly = en && inset.exists(int'(key));
    if (en)
      for (int i = 0; i < K; i++) begin
        e.lookups++;
        if (!model[h(i, key)]) begin e.member = 0; break; end
      end
    q.push_back(e);
  endtask

  initial begin
    clear = 0; prog_valid = 0; prog_key = '0; q_valid = 0; q_en = 0; q_key = '0; q_payload = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 150; i++) begin
      logic [KEY_W-1:0] k;
      k = KEY_W'($urandom);
      @(negedge clk) prog_valid = 1; prog_key = k;
      inset[int'(k)] = 1;
      for (int j = 0; j < K; j++) model[h(j, k)] = 1;
    end
    @(negedge clk) prog_valid = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom % 5 == 0) begin q_valid = 0; continue; end
      query(KEY_W'($urandom), ($urandom % 10) != 0);
    end
    @(negedge clk) q_valid = 0;
    // clear, then nothing is a member
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    foreach (model[i]) model[i] = 0;
    inset.delete();
    for (int i = 0; i < 50; i++) begin
      @(negedge clk) query(KEY_W'($urandom), 1);
    end
    @(negedge clk) q_valid = 0;
    repeat (K + 3) @(posedge clk);
    check(q.size() == 0, "results missing");
    $display("member=%0d false_pos=%0d stop1=%0d stop2=%0d stop3=%0d stop4=%0d",
             n_member, n_fp, n_stop[1], n_stop[2], n_stop[3], n_stop[4]);
    check(n_fp > 0 && n_stop[1] > 0 && n_stop[2] > 0 && n_stop[3] > 0, "mechanism not seen");
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
