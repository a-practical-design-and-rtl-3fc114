// ni_shell_axi -- AXI-specific part of the network interface (NI shell).
//
// Sits in the IP clock domain between an AXI master and the NI kernel. It is
// one Mealy machine with the states IDLE, SEND_CTRL, SEND_ADDR, SEND_DATA,
// RCV_RESP and RCV_DATA.
//
// Sending a write: in IDLE, awvalid makes the shell emit the control message
// {r/w=1, awburst, awsize, awlen, awid, fill} and move to SEND_CTRL. In
// SEND_CTRL awready is high for one cycle while the address message (awaddr)
// is emitted, so the master holds the address for two cycles, control then
// address, and cannot issue the next address after only one. SEND_ADDR and
// SEND_DATA take the write data beats (wready high) and emit one data message
// each; the beat with wlast returns the machine to IDLE. A read request
// (arvalid in IDLE, taken when no write address is waiting) emits the
// control message {r/w=0, ...} and, in SEND_CTRL with arready high, the
// address message, then returns to IDLE. The state names, the awready
// timing and the wlast exit are the design's; the read-address path and the
// write-before-read priority are this implementation's choices.
//
// Receiving: in IDLE with no request waiting and a message from the kernel,
// the shell goes to RCV_RESP and looks at the response control message
// {r/b, resp, a_len, a_id}. A write response (r/b=1) is presented on the B
// channel and dropped on bready. For read data (r/b=0) the control message is
// dropped and RCV_DATA forwards the a_len+1 data messages on the R channel,
// with rid and rresp from the control message and rlast on the last one.
//
// A request is started only when the transmit FIFO has room for all of its
// messages (`tx_room`, saturated at 18 by the caller) and the kernel can
// take a new request (`fifo_full` low); otherwise waiting responses are
// served first. Once started, a request never waits for FIFO space. Without that rule the one
// machine could wait inside a request for FIFO space that only frees up
// once it has taken the responses. This rule is this implementation's.
//
// The kernel side is `out_vld`/`msg_out` (written into the transmit FIFO
// when high) and `in_vld`/`msg_in`/`in_rd`
// (show-ahead receive FIFO, `in_rd` pops). Outputs towards the kernel are
// combinational from the AXI inputs and the state, as in a Mealy machine.
module ni_shell_axi
  import ni_pkg::*;
(
  input  logic        clk_in,
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
  // kernel, transmit
  output logic        out_vld,
  output logic [31:0] msg_out,
  input  logic        fifo_full,
  input  logic [4:0]  tx_room,
  // kernel, receive
  input  logic        in_vld,
  input  logic [31:0] msg_in,
  output logic        in_rd
);

  typedef enum logic [2:0] {
    IDLE, SEND_CTRL, SEND_ADDR, SEND_DATA, RCV_RESP, RCV_DATA
  } shell_state_e;

  shell_state_e state, state_n;
  logic         is_read;      // request in flight is a read
  logic [3:0]   r_len, r_cnt, r_id;
  logic [1:0]   r_resp;
  ctrl_send_t   ctrl_msg;
  logic         room_ok;
  ctrl_recv_t   resp_msg;

  assign resp_msg = ctrl_recv_t'(msg_in);

  always_comb begin
    ctrl_msg.fill = SEND_FILL;
    if (awvalid) begin
      ctrl_msg.rw    = RW_WRITE;
      ctrl_msg.burst = awburst;
      ctrl_msg.size  = awsize;
      ctrl_msg.len   = awlen;
      ctrl_msg.id    = awid;
    end else begin
      ctrl_msg.rw    = RW_READ;
      ctrl_msg.burst = arburst;
      ctrl_msg.size  = arsize;
      ctrl_msg.len   = arlen;
      ctrl_msg.id    = arid;
    end
  end

  // Start a request only when all of its messages fit into the transmit
  // FIFO, so that the machine never waits inside a request while responses
  // (and the credit they free) are waiting to be taken.
  assign room_ok = !fifo_full && (tx_room >= req_msgs(ctrl_msg.rw, ctrl_msg.len));

  always_comb begin
    state_n = state;
    out_vld = 1'b0;
    msg_out = '0;
    awready = 1'b0;
    arready = 1'b0;
    wready  = 1'b0;
    in_rd   = 1'b0;
    bvalid  = 1'b0;
    bresp   = resp_msg.resp;
    bid     = resp_msg.id;
    rvalid  = 1'b0;
    rdata   = msg_in;
    rresp   = r_resp;
    rid     = r_id;
    rlast   = (r_cnt == r_len);
    unique case (state)
      IDLE: begin
        if ((awvalid || arvalid) && room_ok) begin
          out_vld = 1'b1;
          msg_out = ctrl_msg;
          state_n = SEND_CTRL;
        end else if (in_vld) begin
          state_n = RCV_RESP;
        end
      end
      SEND_CTRL: begin
        out_vld = 1'b1;
        msg_out = is_read ? araddr : awaddr;
        awready = !is_read;
        arready = is_read;
        state_n = is_read ? IDLE : SEND_ADDR;
      end
      SEND_ADDR, SEND_DATA: begin
        wready = 1'b1;
        if (wvalid) begin
          out_vld = 1'b1;
          msg_out = wdata;
          state_n = wlast ? IDLE : SEND_DATA;
        end
      end
      RCV_RESP: begin
        if (in_vld) begin
          if (resp_msg.rb == RB_BRESP) begin
            bvalid = 1'b1;
            if (bready) begin
              in_rd   = 1'b1;
              state_n = IDLE;
            end
          end else begin
            in_rd   = 1'b1;
            state_n = RCV_DATA;
          end
        end
      end
      RCV_DATA: begin
        if (in_vld) begin
          rvalid = 1'b1;
          if (rready) begin
            in_rd = 1'b1;
            if (r_cnt == r_len) state_n = IDLE;
          end
        end
      end
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk_in or negedge rstn) begin
    if (!rstn) begin
      state   <= IDLE;
      is_read <= 1'b0;
      r_len   <= '0;
      r_cnt   <= '0;
      r_id    <= '0;
      r_resp  <= '0;
    end else begin
      state <= state_n;
      if (state == IDLE && out_vld) is_read <= !awvalid;
      if (state == RCV_RESP && in_rd && resp_msg.rb == RB_READ) begin
        r_len  <= resp_msg.len;
        r_id   <= resp_msg.id;
        r_resp <= resp_msg.resp;
        r_cnt  <= '0;
      end
      if (state == RCV_DATA && in_rd) r_cnt <= r_cnt + 4'd1;
    end
  end

  // AXI rules: once valid, the master holds it until the handshake.
  a_aw_stable : assert property (@(posedge clk_in) disable iff (!rstn)
                                 (awvalid && !awready) |=> awvalid)
    else $error("ni_shell_axi: awvalid dropped before awready");
  a_w_stable : assert property (@(posedge clk_in) disable iff (!rstn)
                                (wvalid && !wready) |=> wvalid)
    else $error("ni_shell_axi: wvalid dropped before wready");
  a_b_stable : assert property (@(posedge clk_in) disable iff (!rstn)
                                (bvalid && !bready) |=> bvalid)
    else $error("ni_shell_axi: bvalid dropped before bready");
  a_r_stable : assert property (@(posedge clk_in) disable iff (!rstn)
                                (rvalid && !rready) |=> rvalid)
    else $error("ni_shell_axi: rvalid dropped before rready");

endmodule
