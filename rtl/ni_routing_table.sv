// ni_routing_table -- deterministic source-routing table.
//
// For every destination node the table holds the complete path from this NI
// to that node, as the 18-bit routing-path field of the packet header. The
// header builder copies the entry of the packet's destination into the
// header, so the routers need no routing decisions of their own (guaranteed
// throughput by deterministic source routing). The table is fixed at build
// time through the ROUTES parameter, one table per NI instance; the encoding
// of a path (which bits select which router port) belongs to the routers and
// is not interpreted here. By default every entry holds 0x000FA, the path
// seen in the design's example waveform; a real system overrides ROUTES
// with the paths of its own topology.
//
// Interface: `dest` in, `route` out, combinational. An out-of-range
// destination returns path 0.
module ni_routing_table #(
  parameter int unsigned NUM_DEST = 4,
  parameter logic [17:0] ROUTES [NUM_DEST] = '{default: 18'h000FA},
  localparam int unsigned DEST_W = (NUM_DEST > 1) ? $clog2(NUM_DEST) : 1
) (
  input  logic [DEST_W-1:0] dest,
  output logic [17:0]       route
);

  always_comb begin
    route = '0;
    for (int i = 0; i < int'(NUM_DEST); i++)
      if (DEST_W'(i) == dest) route = ROUTES[i];
  end

endmodule
