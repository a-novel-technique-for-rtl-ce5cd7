// tb_hit_counter: 64 counters of 4 bits so that saturation is reached.
// Random increments are mirrored in a model; every counter is read back,
// then cleared and read again.
module tb_hit_counter;
  import fppc_pkg::*;

  localparam int RULES = 64, CNT_W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 clear, inc_valid;
  logic [RULE_ID_W-1:0] inc_id, rd_addr;
  logic [CNT_W-1:0]     rd_data;

  hit_counter #(.RULES(RULES), .CNT_W(CNT_W)) dut (.*);

  int checks = 0, failures = 0, n_sat = 0;
  int model [RULES];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic read_all();
    for (int r = 0; r < RULES; r++) begin
      @(negedge clk) rd_addr = RULE_ID_W'(r);
      #1 check(int'(rd_data) == model[r], $sformatf("rule %0d: %0d exp %0d", r, rd_data, model[r]));
      if (model[r] == 15) n_sat++;
    end
  endtask

  initial begin
    clear = 0; inc_valid = 0; inc_id = '0; rd_addr = '0;
    foreach (model[r]) model[r] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    read_all();
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      inc_valid = ($urandom % 4 != 0);
      inc_id = RULE_ID_W'(($urandom % 2) ? $urandom % 8 : $urandom % RULES);
      if (inc_valid && model[inc_id] < 15) model[inc_id]++;
    end
    @(negedge clk) inc_valid = 0;
    read_all();
    check(n_sat > 0, "no counter saturated");
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    foreach (model[r]) model[r] = 0;
    read_all();
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
