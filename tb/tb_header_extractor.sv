// tb_header_extractor: random IPv4 and non-IPv4 headers with every IHL from
// 5 to 15, TCP, UDP and other protocols, first and later fragments. The
// expected 5-tuple is taken from the values the header was built from, not
// from its bytes. Checks the 1-cycle latency, drop of non-IPv4 headers and
// zero ports where the packet has no transport ports.
module tb_header_extractor;
  import fppc_pkg::*;
  import fppc_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                   in_valid;
  logic [HDR_BYTES*8-1:0] hdr;
  logic                   out_valid, out_has_ports, drop;
  five_tuple_t            out_tuple;

  header_extractor dut (.*);

  int checks = 0, failures = 0;
  int n_ports = 0, n_noports = 0, n_drop = 0, n_ihl[16];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    five_tuple_t t, e;
    int ihl, ver, frag;
    bit ok, ports;
    in_valid = 0; hdr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      t.sad = $urandom; t.dad = $urandom; t.spn = 16'($urandom); t.dpn = 16'($urandom);
      case ($urandom % 4)
        0: t.ptcl = PROTO_TCP;
        1: t.ptcl = PROTO_UDP;
        2: t.ptcl = 8'($urandom);
        default: t.ptcl = PROTO_UDP;
      endcase
      ihl  = ($urandom % 20 == 0) ? int'($urandom % 5) : 5 + int'($urandom % 11);
      ver  = ($urandom % 10 == 0) ? 6 : 4;
      frag = ($urandom % 10 == 0) ? 1 + int'($urandom % 8000) : 0;
      in_valid = ($urandom % 8 != 0);
      hdr = make_hdr(t, ihl, frag, ver);
      ok = (ver == 4) && (ihl >= 5);
      ports = ok && frag == 0 && (t.ptcl == PROTO_TCP || t.ptcl == PROTO_UDP);
      e = t;
      if (!ports) begin e.spn = 0; e.dpn = 0; end
      @(posedge clk);
      #1;
      check(out_valid == (in_valid && ok), "out_valid");
      check(drop == (in_valid && !ok), "drop");
      if (in_valid && ok) begin
        check(out_tuple == e, $sformatf("tuple ihl=%0d got %h exp %h", ihl, out_tuple, e));
        check(out_has_ports == ports, "has_ports");
        if (ports) begin n_ports++; n_ihl[ihl]++; end else n_noports++;
      end
      if (in_valid && !ok) n_drop++;
    end
    for (int i = 5; i < 16; i++) check(n_ihl[i] > 0, $sformatf("IHL %0d never tested", i));
    check(n_noports > 0 && n_drop > 0, "no drop or no port-less packet");
    $display("ports=%0d no_ports=%0d drop=%0d", n_ports, n_noports, n_drop);
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
