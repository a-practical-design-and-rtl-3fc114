// ni_pkg -- shared types and constants of the network interface (NI).
//
// Every word that crosses the NI is a 32-bit flit. A packet on the network is
// one header flit followed by messages. The field layouts below follow the
// packet specification of the design: a header of marker(5) / pkt_len(4) /
// credit(5) / routing path(18); a request control message of r/w(1) /
// a_burst(2) / a_size(3) / a_len(4) / a_id(4) / fill(18); a response control
// message of r/b(1) / resp(2) / a_len(4) / a_id(4) / fill. Address and data
// messages are the raw 32-bit AXI address or data word.
//
// Own choices, not fixed by the specification: the marker value (1), the
// polarity of r/b (1 = write response, 0 = read data, by analogy with r/w
// where 1 = write), the width of the response fill field (21 bits so that
// the message is 32 bits wide) and the fill values (1).
package ni_pkg;

  // Header marker that opens every packet.
  localparam logic [4:0] HDR_MARKER = 5'd1;

  // r/w bit of a request control message.
  localparam logic RW_READ  = 1'b0;
  localparam logic RW_WRITE = 1'b1;
  // r/b bit of a response control message.
  localparam logic RB_READ  = 1'b0;
  localparam logic RB_BRESP = 1'b1;

  localparam logic [17:0] SEND_FILL = 18'd1;
  localparam logic [20:0] RECV_FILL = 21'd1;

  typedef struct packed {
    logic [4:0]  marker;
    logic [3:0]  pkt_len;
    logic [4:0]  credit;
    logic [17:0] route;
  } hdr_t;

  typedef struct packed {
    logic        rw;
    logic [1:0]  burst;
    logic [2:0]  size;
    logic [3:0]  len;
    logic [3:0]  id;
    logic [17:0] fill;
  } ctrl_send_t;

  typedef struct packed {
    logic        rb;
    logic [1:0]  resp;
    logic [3:0]  len;
    logic [3:0]  id;
    logic [20:0] fill;
  } ctrl_recv_t;

  // Messages that follow the header of a request packet: control and
  // address, plus awlen+1 data words for a write.
  function automatic logic [4:0] req_msgs(logic rw, logic [3:0] len);
    return (rw == RW_WRITE) ? 5'(len) + 5'd3 : 5'd2;
  endfunction

  // Messages that follow the header of a response packet: control, plus
  // arlen+1 data words for a read.
  function automatic logic [4:0] resp_msgs(logic rb, logic [3:0] len);
    return (rb == RB_READ) ? 5'(len) + 5'd2 : 5'd1;
  endfunction

endpackage
