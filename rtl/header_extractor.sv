// header_extractor: separates the 5-tuple of an incoming IPv4 packet.
//
// The first HDR_BYTES bytes of a packet arrive in parallel on 'hdr', byte 0
// (the IPv4 version/IHL byte) in the most significant byte. The extractor
// reads protocol, source and destination address from their fixed offsets,
// and finds the transport header at byte IHL*4 to read the source and
// destination ports. Ports are only taken for TCP and UDP packets that are
// the first fragment (fragment offset zero); otherwise they are 0.
// A header that is not IPv4 (version != 4) or whose IHL is below 5 is not
// passed on: 'drop' pulses instead of 'out_valid'.
//
// Timing: one header per clock, result registered, latency 1 cycle.
// The document names this block and says that it separates the header
// fields that all cluster pipelines then search; the parallel header bus,
// the IPv4 checks and the port rules are this design's own choices.
module header_extractor
  import fppc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [HDR_BYTES*8-1:0] hdr,
  output logic                   out_valid,
  output five_tuple_t            out_tuple,
  output logic                   out_has_ports,
  output logic                   drop
);

  function automatic logic [7:0] byte_at(input logic [HDR_BYTES*8-1:0] h, input int unsigned i);
    return h[(HDR_BYTES-1-i)*8 +: 8];
  endfunction

  logic [3:0]  version, ihl;
  logic [12:0] frag_off;
  logic        ok, has_ports;
  five_tuple_t t;

  always_comb begin
    version  = byte_at(hdr, 0)[7:4];
    ihl      = byte_at(hdr, 0)[3:0];
    frag_off = {byte_at(hdr, 6)[4:0], byte_at(hdr, 7)};
    ok       = (version == 4'd4) && (ihl >= 4'd5);
    t.ptcl   = byte_at(hdr, 9);
    t.sad    = {byte_at(hdr, 12), byte_at(hdr, 13), byte_at(hdr, 14), byte_at(hdr, 15)};
    t.dad    = {byte_at(hdr, 16), byte_at(hdr, 17), byte_at(hdr, 18), byte_at(hdr, 19)};
    has_ports = ok && (frag_off == '0) && ((t.ptcl == PROTO_TCP) || (t.ptcl == PROTO_UDP));
    t.spn = '0;
    t.dpn = '0;
    // Transport header starts at IHL*4 bytes (20..60).
    for (int unsigned w = 5; w < 16; w++) begin
      if (has_ports && (32'(ihl) == w)) begin
        t.spn = {byte_at(hdr, 4*w),     byte_at(hdr, 4*w + 1)};
        t.dpn = {byte_at(hdr, 4*w + 2), byte_at(hdr, 4*w + 3)};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      drop          <= 1'b0;
      out_tuple     <= '0;
      out_has_ports <= 1'b0;
    end else begin
      out_valid     <= in_valid && ok;
      drop          <= in_valid && !ok;
      out_tuple     <= t;
      out_has_ports <= has_ports;
    end
  end

endmodule
