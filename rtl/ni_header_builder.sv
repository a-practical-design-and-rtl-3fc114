// ni_header_builder -- assembles the header flit of an outgoing packet.
//
// The header is one 32-bit flit: the header marker (5 bits), the packet
// length taken from the request's a_len (4 bits), the credit this NI reports
// to the remote NI (5 bits) and the routing path from the deterministic
// routing table (18 bits). The layout is the design's; there are no
// service-type or tail bits, since the NI always uses guaranteed-throughput
// source routing and the AXI length already tells where a packet ends.
//
// Timing: combinational. While `en_hdr_gen` is high (the cycle in which the
// flit controller selects the header), `header` carries the assembled flit
// and the output register of the kernel captures it at the next rising
// edge of the network clock. While `en_hdr_gen` is low the output is zero.
module ni_header_builder
  import ni_pkg::*;
(
  input  logic        en_hdr_gen,
  input  logic [3:0]  pkt_len,
  input  logic [4:0]  credit,
  input  logic [17:0] route,
  output logic [31:0] header
);

  hdr_t hdr;

  always_comb begin
    hdr = '0;
    if (en_hdr_gen) begin
      hdr.marker  = HDR_MARKER;
      hdr.pkt_len = pkt_len;
      hdr.credit  = credit;
      hdr.route   = route;
    end
  end

  assign header = hdr;

endmodule
