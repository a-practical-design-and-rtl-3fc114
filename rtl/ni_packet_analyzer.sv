// ni_packet_analyzer -- takes packets from the router apart.
//
// Network clock domain. The first flit of a packet must carry the header
// marker; the analyzer peels the header off, passes its credit field to the
// Space counter (`credit_vld`/`credit`) and keeps its packet length. The
// messages behind it are pushed into the receive FIFO (`write_to_stack`,
// `msg`): first the response control message, whose r/b bit says whether a
// write response (nothing follows) or read data (pkt_len+1 data messages
// follow) is coming, then the data. The design gives the function (strip
// the header, push the AXI messages forward, hand the credit on) and the
// formats; the three-state parser is this implementation's.
//
// Errors: a first flit without the marker is dropped and pulses `hdr_err`.
// A message that arrives while the receive FIFO is full is dropped and
// pulses `rx_overflow`; with credit flow control at the remote end this
// cannot happen. Input flits come with `in_vld`; there is no back-pressure
// towards the router (guaranteed-throughput network).
module ni_packet_analyzer
  import ni_pkg::*;
(
  input  logic        clk_out,
  input  logic        rstn,
  input  logic        in_vld,
  input  logic [31:0] from_router,
  input  logic        fifo_full,
  output logic        write_to_stack,
  output logic [31:0] msg,
  output logic        credit_vld,
  output logic [4:0]  credit,
  output logic        hdr_err,
  output logic        rx_overflow,
  output logic        pkt_done
);

  typedef enum logic [1:0] {PA_HDR, PA_CTRL, PA_DATA} pa_state_e;

  pa_state_e  state;
  logic [3:0] len_q;
  logic [4:0] remaining;
  hdr_t       hdr_in;
  ctrl_recv_t ctrl_in;

  assign hdr_in  = hdr_t'(from_router);
  assign ctrl_in = ctrl_recv_t'(from_router);
  assign msg     = from_router;

  always_comb begin
    write_to_stack = 1'b0;
    credit_vld     = 1'b0;
    credit         = hdr_in.credit;
    hdr_err        = 1'b0;
    rx_overflow    = 1'b0;
    pkt_done       = 1'b0;
    if (in_vld) begin
      unique case (state)
        PA_HDR: begin
          if (hdr_in.marker == HDR_MARKER) credit_vld = 1'b1;
          else                             hdr_err    = 1'b1;
        end
        PA_CTRL, PA_DATA: begin
          write_to_stack = !fifo_full;
          rx_overflow    = fifo_full;
          pkt_done       = (state == PA_CTRL) ? (ctrl_in.rb == RB_BRESP)
                                              : (remaining == 5'd0);
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk_out or negedge rstn) begin
    if (!rstn) begin
      state     <= PA_HDR;
      len_q     <= '0;
      remaining <= '0;
    end else if (in_vld) begin
      unique case (state)
        PA_HDR: if (hdr_in.marker == HDR_MARKER) begin
          len_q <= hdr_in.pkt_len;
          state <= PA_CTRL;
        end
        PA_CTRL: begin
          if (ctrl_in.rb == RB_BRESP) begin
            state <= PA_HDR;
          end else begin
            remaining <= 5'(len_q);
            state     <= PA_DATA;
          end
        end
        PA_DATA: begin
          if (remaining == 5'd0) state <= PA_HDR;
          else                   remaining <= remaining - 5'd1;
        end
        default: state <= PA_HDR;
      endcase
    end
  end

endmodule
