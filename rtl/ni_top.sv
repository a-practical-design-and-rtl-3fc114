// ni_top -- network interface for one bus-based node of an on-chip network.
//
// The NI lets an AXI master that lives on a conventional local bus reach
// other nodes over a packet-switched network-on-chip. It is split into a
// protocol-specific shell and a protocol-independent kernel:
//
//   AXI master --(IP clock)--> ni_shell_axi --messages--> ni_kernel --packets--> router
//                                          <--messages--           <--packets--
//
// The shell turns AXI requests into messages (control, address, data) and
// response messages back into AXI B and R beats. The kernel packetizes the
// messages (header with length, credit and a source route), moves them from
// the IP clock to the network clock and back through dual-clock FIFOs, and
// runs end-to-end credit flow control with the NI at the other end. The
// shell/kernel split, the message and header formats and the clock boundary
// between the two follow the design; the router and the remote NI are
// outside this block and connect through `packet_out`/`pkt_vld` and
// `packet_in`/`packet_in_vld`.
//
// Clocks: `clk_in` is the IP clock, `clk_out` the network clock; they may
// be unrelated. `rstn` is an asynchronous active-low reset for both.
module ni_top
  import ni_pkg::*;
#(
  parameter int unsigned TX_DEPTH        = 32,
  parameter int unsigned RX_DEPTH        = 32,
  parameter int unsigned DESC_DEPTH      = 4,
  parameter int unsigned NUM_DEST        = 4,
  parameter logic [17:0] ROUTES [NUM_DEST] = '{default: 18'h000FA},
  parameter int unsigned REMOTE_CAPACITY = 32
) (
  input  logic        clk_in,
  input  logic        clk_out,
  input  logic        rstn,
  // AXI write address channel
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] awaddr,
  input  logic [3:0]  awlen,
  input  logic [2:0]  awsize,
  input  logic [1:0]  awburst,
  input  logic [3:0]  awid,
  // AXI write data channel
  input  logic        wvalid,
  output logic        wready,
  input  logic [31:0] wdata,
  input  logic        wlast,
  // AXI read address channel
  input  logic        arvalid,
  output logic        arready,
  input  logic [31:0] araddr,
  input  logic [3:0]  arlen,
  input  logic [2:0]  arsize,
  input  logic [1:0]  arburst,
  input  logic [3:0]  arid,
  // AXI read data channel
  output logic        rvalid,
  input  logic        rready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic [3:0]  rid,
  output logic        rlast,
  // AXI write response channel
  output logic        bvalid,
  input  logic        bready,
  output logic [1:0]  bresp,
  output logic [3:0]  bid,
  // network side (clk_out)
  output logic [31:0] packet_out,
  output logic        pkt_vld,
  input  logic [31:0] packet_in,
  input  logic        packet_in_vld,
  output logic        slave_fifo_full,
  output logic        hdr_err,
  output logic        rx_overflow,
  output logic        tx_stall
);

  logic        out_vld, fifo_full, in_vld, in_rd;
  logic [31:0] message_out, message_in;
  logic [$clog2(TX_DEPTH):0] tx_room;

  ni_shell_axi u_shell (
    .clk_in (clk_in), .rstn (rstn),
    .awvalid (awvalid), .awready (awready), .awaddr (awaddr), .awlen (awlen),
    .awsize (awsize), .awburst (awburst), .awid (awid),
    .wvalid (wvalid), .wready (wready), .wdata (wdata), .wlast (wlast),
    .arvalid (arvalid), .arready (arready), .araddr (araddr), .arlen (arlen),
    .arsize (arsize), .arburst (arburst), .arid (arid),
    .rvalid (rvalid), .rready (rready), .rdata (rdata), .rresp (rresp),
    .rid (rid), .rlast (rlast),
    .bvalid (bvalid), .bready (bready), .bresp (bresp), .bid (bid),
    .out_vld (out_vld), .msg_out (message_out), .fifo_full (fifo_full),
    .tx_room (5'(tx_room > 18 ? 18 : tx_room)), .in_vld (in_vld), .msg_in (message_in), .in_rd (in_rd)
  );

  ni_kernel #(
    .TX_DEPTH (TX_DEPTH), .RX_DEPTH (RX_DEPTH), .DESC_DEPTH (DESC_DEPTH),
    .NUM_DEST (NUM_DEST), .ROUTES (ROUTES), .REMOTE_CAPACITY (REMOTE_CAPACITY)
  ) u_kernel (
    .clk_in (clk_in), .clk_out (clk_out), .rstn (rstn),
    .msg_in (message_out), .write_to_stack (out_vld), .master_fifo_full (fifo_full),
    .tx_room (tx_room),
    .msg_out (message_in), .msg_out_vld (in_vld), .read_from_stack (in_rd),
    .to_router (packet_out), .pkt_vld (pkt_vld),
    .from_router (packet_in), .from_router_vld (packet_in_vld),
    .slave_fifo_full (slave_fifo_full),
    .hdr_err (hdr_err), .rx_overflow (rx_overflow), .tx_stall (tx_stall)
  );

endmodule
