// ni_flit_controller -- sequences an outgoing packet onto the network link.
//
// Network clock domain. When the request generator raises `pkt_start` (a
// request is waiting and the remote NI has room for it), the controller
// spends one cycle on the header: `sel`/`en_hdr_gen` select the header
// builder in front of the output register and `pkt_ack` takes the request.
// It then raises `encnt`/`read_from_stack` in every cycle in which the
// transmit FIFO is not empty, so the output register takes one message per
// cycle, and counts the messages in `cnt`. When the count reaches the
// request's message count, `rst_cnt` clears the counter and the controller
// is ready for the next packet; a waiting request gets its header in the
// very next cycle, with no idle flit in between. If the FIFO runs empty in
// the middle of a packet (the shell is slower than the network), the
// controller stalls and `out_en` is low for that cycle.
//
// The signal names and the order header / count / reset-count are the
// design's. The design counts to the packet length; here the count is the
// number of messages of the request (control + address + a_len+1 data words
// for a write), which is what the design's example packets hold.
//
// `out_en` is the enable of the kernel's output register and marks each
// cycle that launches a flit; `sel` is 1 for the header, 0 for FIFO data.
module ni_flit_controller (
  input  logic       clk_out,
  input  logic       rstn,
  input  logic       pkt_start,
  input  logic [4:0] pkt_msgs,
  input  logic       fifo_empty,
  output logic       pkt_ack,
  output logic       en_hdr_gen,
  output logic       sel,
  output logic       read_from_stack,
  output logic       encnt,
  output logic       rst_cnt,
  output logic       out_en,
  output logic [4:0] cnt,
  output logic       stall
);

  typedef enum logic {FC_IDLE, FC_BODY} fc_state_e;

  fc_state_e  state;
  logic [4:0] target;

  always_comb begin
    pkt_ack         = 1'b0;
    en_hdr_gen      = 1'b0;
    sel             = 1'b0;
    read_from_stack = 1'b0;
    rst_cnt         = 1'b0;
    stall           = 1'b0;
    unique case (state)
      FC_IDLE: begin
        if (pkt_start) begin
          pkt_ack    = 1'b1;
          en_hdr_gen = 1'b1;
          sel        = 1'b1;
        end
      end
      FC_BODY: begin
        if (!fifo_empty) begin
          read_from_stack = 1'b1;
          if (cnt == target - 5'd1) rst_cnt = 1'b1;
        end else begin
          stall = 1'b1;
        end
      end
      default: ;
    endcase
  end

  assign encnt  = read_from_stack;
  assign out_en = en_hdr_gen || read_from_stack;

  always_ff @(posedge clk_out or negedge rstn) begin
    if (!rstn) begin
      state  <= FC_IDLE;
      target <= '0;
      cnt    <= '0;
    end else begin
      unique case (state)
        FC_IDLE: if (pkt_start) begin
          target <= pkt_msgs;
          cnt    <= '0;
          state  <= FC_BODY;
        end
        FC_BODY: begin
          if (rst_cnt) begin
            cnt   <= '0;
            state <= FC_IDLE;
          end else if (encnt) begin
            cnt <= cnt + 5'd1;
          end
        end
        default: state <= FC_IDLE;
      endcase
    end
  end

  a_no_read_when_empty : assert property (@(posedge clk_out) disable iff (!rstn) read_from_stack |-> !fifo_empty)
    else $error("ni_flit_controller: read from empty FIFO");

endmodule
