// ni_kernel -- protocol-independent part of the network interface.
//
// Transmit path: the shell writes messages (`msg_in`, `write_to_stack`, IP
// clock) into a dual-clock FIFO. The request generator watches the same
// writes, recognises the control message of each request, and passes a
// descriptor (message count, a_len, destination) into the network clock
// domain. When the remote NI has room (Space counter), the flit controller
// sends the header, built from a_len, the credit owed to the remote NI and
// the path from the deterministic routing table, then the request's
// messages straight out of the FIFO. A multiplexer (`sel`) in front of an
// enabled output register chooses header or FIFO data; the register drives
// `to_router`, and `pkt_vld` marks each cycle that carries a flit.
//
// Receive path: the packet analyzer strips the header of each packet from
// the router, returns its credit to the Space counter, and writes the
// messages into the receive FIFO, which the shell reads in the IP clock
// domain (`msg_out`, `msg_out_vld`, `read_from_stack`). The Credit block
// counts the entries the shell has drained and reports them in the next
// outgoing header; it also reserves receive-FIFO room for the response of
// every request before the request may leave, so that credit for responses
// never runs dry.
//
// Block structure and signal names follow the design's NI kernel; the
// FIFO construction, descriptor queue and credit counting are this
// implementation's. `master_fifo_full`: the shell must not start a new
// request (transmit FIFO or descriptor queue full).
// `tx_room`: free transmit FIFO entries; the shell starts a request only
// when all of its messages fit, so TX_DEPTH must be at least 18 (control,
// address and 16 data beats).
// `slave_fifo_full`: the receive FIFO is full (status to the network side).
// Latency: a request's header leaves about two network clocks after the
// descriptor is pushed (falling-edge plus rising-edge synchronizer, then
// one cycle in the output register); its messages follow one per cycle as
// fast as the FIFO delivers them.
module ni_kernel
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
  // from / to the shell (IP clock)
  input  logic [31:0] msg_in,
  input  logic        write_to_stack,
  output logic        master_fifo_full,
  output logic [$clog2(TX_DEPTH):0] tx_room,
  output logic [31:0] msg_out,
  output logic        msg_out_vld,
  input  logic        read_from_stack,
  // to / from the router (network clock)
  output logic [31:0] to_router,
  output logic        pkt_vld,
  input  logic [31:0] from_router,
  input  logic        from_router_vld,
  output logic        slave_fifo_full,
  // status (network clock)
  output logic        hdr_err,
  output logic        rx_overflow,
  output logic        tx_stall
);

  localparam int unsigned SPACE_W = 8;
  localparam int unsigned DEST_W  = (NUM_DEST > 1) ? $clog2(NUM_DEST) : 1;

  // ---------------- transmit path ----------------
  logic              tx_full, desc_full, tx_empty, tx_read;
  logic [31:0]       tx_dout;
  logic [SPACE_W-1:0] space;
  logic              pkt_start, pkt_ack;
  logic [3:0]        pkt_len;
  logic [4:0]        pkt_msgs, pkt_resp_msgs;
  logic              rsv_ok;
  logic [DEST_W-1:0] pkt_dest;
  logic [17:0]       route;
  logic [4:0]        credit_out;
  logic [31:0]       header;
  logic              en_hdr_gen, sel, out_en;

  ni_async_fifo #(.WIDTH(32), .DEPTH(TX_DEPTH)) u_tx_fifo (
    .wclk (clk_in), .rclk (clk_out), .rstn (rstn),
    .we (write_to_stack), .wdata (msg_in), .full (tx_full), .rd_count_w (),
    .wr_free (tx_room),
    .re (tx_read), .rdata (tx_dout), .empty (tx_empty)
  );

  assign master_fifo_full = tx_full || desc_full;

  ni_request_generator #(
    .NUM_DEST (NUM_DEST), .DESC_DEPTH (DESC_DEPTH), .SPACE_W (SPACE_W)
  ) u_reqgen (
    .clk_in (clk_in), .clk_out (clk_out), .rstn (rstn),
    .write_to_stack (write_to_stack), .msg_in (msg_in),
    .desc_full (desc_full), .pkt_start_in (),
    .space (space), .rsv_ok (rsv_ok), .pkt_start (pkt_start), .pkt_len (pkt_len),
    .pkt_msgs (pkt_msgs), .pkt_resp_msgs (pkt_resp_msgs), .pkt_dest (pkt_dest), .pkt_ack (pkt_ack)
  );

  ni_routing_table #(.NUM_DEST (NUM_DEST), .ROUTES (ROUTES)) u_route (
    .dest (pkt_dest), .route (route)
  );

  ni_header_builder u_hdr (
    .en_hdr_gen (en_hdr_gen), .pkt_len (pkt_len), .credit (credit_out),
    .route (route), .header (header)
  );

  ni_flit_controller u_flitctl (
    .clk_out (clk_out), .rstn (rstn),
    .pkt_start (pkt_start), .pkt_msgs (pkt_msgs), .fifo_empty (tx_empty),
    .pkt_ack (pkt_ack), .en_hdr_gen (en_hdr_gen), .sel (sel),
    .read_from_stack (tx_read), .encnt (), .rst_cnt (), .out_en (out_en),
    .cnt (), .stall (tx_stall)
  );

  // Output register with enable, fed by the header / data multiplexer.
  always_ff @(posedge clk_out or negedge rstn) begin
    if (!rstn) begin
      to_router <= '0;
      pkt_vld   <= 1'b0;
    end else begin
      pkt_vld <= out_en;
      if (out_en) to_router <= sel ? header : tx_dout;
    end
  end

  // ---------------- receive path ----------------
  logic        rx_write, rx_full;
  logic [31:0] rx_msg;
  logic        credit_vld;
  logic [4:0]  credit_in;
  logic [$clog2(RX_DEPTH):0] rx_rd_count;
  logic        rx_empty;

  ni_packet_analyzer u_analyzer (
    .clk_out (clk_out), .rstn (rstn),
    .in_vld (from_router_vld), .from_router (from_router), .fifo_full (rx_full),
    .write_to_stack (rx_write), .msg (rx_msg),
    .credit_vld (credit_vld), .credit (credit_in),
    .hdr_err (hdr_err), .rx_overflow (rx_overflow), .pkt_done ()
  );

  ni_async_fifo #(.WIDTH(32), .DEPTH(RX_DEPTH)) u_rx_fifo (
    .wclk (clk_out), .rclk (clk_in), .rstn (rstn),
    .we (rx_write), .wdata (rx_msg), .full (rx_full), .rd_count_w (rx_rd_count),
    .wr_free (),
    .re (read_from_stack), .rdata (msg_out), .empty (rx_empty)
  );

  assign msg_out_vld     = !rx_empty;
  assign slave_fifo_full = rx_full;

  ni_space #(.SPACE_W (SPACE_W), .REMOTE_CAPACITY (REMOTE_CAPACITY)) u_space (
    .clk_out (clk_out), .rstn (rstn),
    .credit_vld (credit_vld), .credit_in (credit_in),
    .consume (pkt_ack), .consume_n (pkt_msgs), .space (space)
  );

  ni_credit #(.RX_DEPTH (RX_DEPTH)) u_credit (
    .clk_out (clk_out), .rstn (rstn),
    .rd_count (rx_rd_count), .take (en_hdr_gen),
    .resp_need (pkt_resp_msgs), .rsv_ok (rsv_ok), .credit (credit_out)
  );

  initial assert (TX_DEPTH >= 18) else $error("ni_kernel: TX_DEPTH must hold an 18-message request");

  a_shell_respects_full : assert property (@(posedge clk_in) disable iff (!rstn)
                                           write_to_stack |-> !tx_full)
    else $error("ni_kernel: shell wrote while the transmit FIFO was full");

endmodule
