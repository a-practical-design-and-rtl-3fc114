// ni_request_generator -- finds the start of each request and hands it to the
// network clock domain.
//
// The shell writes a request into the transmit FIFO as a control message, an
// address message and, for a write, awlen+1 data messages. This block snoops
// those writes in the IP clock domain. The first message after a finished
// request is a control message: its r/w bit and a_len give the length of the
// request (`ni_pkg::req_msgs`). The next message is the address, whose top
// bits select the destination node. With the address, a descriptor
// {messages, a_len, destination} is complete and is pushed into a small
// dual-clock queue: that push is the start-of-packet event (`pkt_start_in`).
// The queue's pointers cross into the network domain through the
// falling-edge synchronizer, which is how start-of-packet is made safe
// against metastability.
//
// In the network domain, `pkt_start` is raised when a descriptor is waiting
// and the remote NI has room for its messages (`space` >= messages, from the
// Space counter) and this NI has room reserved for the response (`rsv_ok`
// from the Credit block, judged on `pkt_resp_msgs`); the flit controller answers with `pkt_ack`, which pops the
// descriptor. `desc_full` tells the shell, through master_fifo_full, to hold
// off; the shell may not write while it is high. Detecting requests from the
// message stream and the use of a descriptor queue are this implementation's
// choices; the design names the function (extract packet length, raise
// pkt_start) and the Space input.
module ni_request_generator
  import ni_pkg::*;
#(
  parameter int unsigned NUM_DEST   = 4,
  parameter int unsigned DESC_DEPTH = 4,
  parameter int unsigned SPACE_W    = 8,
  localparam int unsigned DEST_W    = (NUM_DEST > 1) ? $clog2(NUM_DEST) : 1
) (
  input  logic               clk_in,
  input  logic               clk_out,
  input  logic               rstn,
  // IP clock domain: snooped FIFO writes
  input  logic               write_to_stack,
  input  logic [31:0]        msg_in,
  output logic               desc_full,
  output logic               pkt_start_in,
  // network clock domain
  input  logic [SPACE_W-1:0] space,
  input  logic               rsv_ok,
  output logic               pkt_start,
  output logic [3:0]         pkt_len,
  output logic [4:0]         pkt_msgs,
  output logic [4:0]         pkt_resp_msgs,
  output logic [DEST_W-1:0]  pkt_dest,
  input  logic               pkt_ack
);

  typedef struct packed {
    logic              rw;
    logic [4:0]        msgs;
    logic [3:0]        len;
    logic [DEST_W-1:0] dest;
  } desc_t;

  typedef enum logic [1:0] {EXPECT_CTRL, EXPECT_ADDR, EXPECT_DATA} snoop_e;

  snoop_e     snoop;
  ctrl_send_t ctrl_q;
  logic [4:0] remaining;   // messages of the current request still to come
  desc_t      desc_w, desc_r;
  logic       desc_empty;
  logic       push;

  ctrl_send_t ctrl_in;
  assign ctrl_in = ctrl_send_t'(msg_in);

  always_ff @(posedge clk_in or negedge rstn) begin
    if (!rstn) begin
      snoop     <= EXPECT_CTRL;
      ctrl_q    <= '0;
      remaining <= '0;
    end else if (write_to_stack) begin
      unique case (snoop)
        EXPECT_CTRL: begin
          ctrl_q    <= ctrl_in;
          remaining <= req_msgs(ctrl_in.rw, ctrl_in.len) - 5'd2;
          snoop     <= EXPECT_ADDR;
        end
        EXPECT_ADDR: snoop <= (remaining == 5'd0) ? EXPECT_CTRL : EXPECT_DATA;
        EXPECT_DATA: begin
          remaining <= remaining - 5'd1;
          if (remaining == 5'd1) snoop <= EXPECT_CTRL;
        end
        default: snoop <= EXPECT_CTRL;
      endcase
    end
  end

  assign push         = write_to_stack && (snoop == EXPECT_ADDR);
  assign pkt_start_in = push;

  always_comb begin
    desc_w.rw   = ctrl_q.rw;
    desc_w.msgs = req_msgs(ctrl_q.rw, ctrl_q.len);
    desc_w.len  = ctrl_q.len;
    if (NUM_DEST > 1) desc_w.dest = msg_in[31 -: DEST_W];
    else              desc_w.dest = '0;
  end

  ni_async_fifo #(.WIDTH($bits(desc_t)), .DEPTH(DESC_DEPTH)) u_desc_q (
    .wclk       (clk_in),
    .rclk       (clk_out),
    .rstn       (rstn),
    .we         (push),
    .wdata      (desc_w),
    .full       (desc_full),
    .rd_count_w (), .wr_free (),
    .re         (pkt_ack),
    .rdata      (desc_r),
    .empty      (desc_empty)
  );

  assign pkt_len   = desc_r.len;
  assign pkt_msgs  = desc_r.msgs;
  assign pkt_dest  = desc_r.dest;
  // A write is answered by one message, a read by control + a_len+1 data.
  assign pkt_resp_msgs = resp_msgs((desc_r.rw == RW_WRITE) ? RB_BRESP : RB_READ, desc_r.len);
  assign pkt_start     = !desc_empty && (space >= SPACE_W'(desc_r.msgs)) && rsv_ok;

  a_ack_only_on_start : assert property (@(posedge clk_out) disable iff (!rstn) pkt_ack |-> pkt_start)
    else $error("ni_request_generator: pkt_ack without pkt_start");

endmodule
