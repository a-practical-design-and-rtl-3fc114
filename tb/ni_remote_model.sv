// ni_remote_model -- behavioural model of the far end of the network: the
// router path, the slave-side NI and an AXI slave memory, lumped together.
// Not synthesizable; testbench use only.
//
// It takes request packets flit by flit from the NI under test (network
// clock), executes them on a word memory (FIXED bursts hit one address, INCR
// bursts step by 1<<size bytes; unwritten words read as ~address), and
// answers with response packets in the same format the NI expects: header
// {marker, pkt_len=a_len, credit, route 0}, control {r/b, resp=OKAY, a_len,
// a_id, fill}, then the read data. It runs the same end-to-end credit
// protocol as the NI: it sends a response only while the NI under test has
// room for it (starting from NI_RX_DEPTH and growing by the credit in each
// request header), and it reports in each response header the request
// messages it has consumed since its previous report. `hold` keeps it from
// answering (to build up back-pressure); `bad_hdr` makes it send one flit
// without the header marker.
module ni_remote_model
  import ni_pkg::*;
#(
  parameter int unsigned NI_RX_DEPTH = 32,
  parameter int unsigned RESP_DELAY  = 3
) (
  input  logic        clk,
  input  logic        rstn,
  input  logic [31:0] req_flit,
  input  logic        req_vld,
  output logic [31:0] resp_flit,
  output logic        resp_vld,
  input  logic        hold,
  input  logic        bad_hdr
);

  logic [31:0] mem [logic [31:0]];
  logic [31:0] req_words [$];
  int unsigned req_need;
  logic [31:0] out_words [$];
  int unsigned out_lens [$];
  int unsigned ni_space_left;
  int unsigned owed_credit;
  int unsigned delay_cnt;
  int unsigned pkt_left;
  bit          bad_pending;
  bit          bad_done;

  function automatic logic [31:0] rd_word(logic [31:0] a);
    if (mem.exists(a)) return mem[a];
    return ~a;
  endfunction

  // Execute one complete request (header stripped) and queue its response.
  function automatic void execute(logic [31:0] w [$]);
    ctrl_send_t c;
    ctrl_recv_t r;
    hdr_t       h;
    logic [31:0] a;
    c = ctrl_send_t'(w[0]);
    a = w[1];
    r = '{rb: (c.rw == RW_WRITE) ? RB_BRESP : RB_READ, resp: 2'b00,
          len: c.len, id: c.id, fill: RECV_FILL};
    h = '{marker: HDR_MARKER, pkt_len: c.len, credit: 5'd0, route: 18'd0};
    out_words.push_back(h);
    out_words.push_back(r);
    for (int i = 0; i <= int'(c.len); i++) begin
      logic [31:0] ai;
      ai = (c.burst == 2'd0) ? a : a + (32'(i) << c.size);
      if (c.rw == RW_WRITE) mem[ai] = w[2+i];
      else                  out_words.push_back(rd_word(ai));
    end
    out_lens.push_back((c.rw == RW_WRITE) ? 2 : 3 + int'(c.len));
  endfunction

  // Receive requests.
  always @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      req_words = {};
      req_need  = 0;
    end else if (req_vld) begin
      if (req_need == 0) begin
        hdr_t h;
        h = hdr_t'(req_flit);
        ni_space_left += int'(h.credit);
        req_need = 1;               // control message comes next
        req_words = {};
      end else begin
        req_words.push_back(req_flit);
        owed_credit++;
        if (req_words.size() == 1) begin
          ctrl_send_t c;
          c = ctrl_send_t'(req_flit);
          req_need = int'(req_msgs(c.rw, c.len));
        end
        if (req_words.size() == req_need) begin
          execute(req_words);
          req_need = 0;
        end
      end
    end
  end

  // Send responses.
  always @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      resp_vld      <= 1'b0;
      resp_flit     <= '0;
      out_words      = {};
      out_lens       = {};
      ni_space_left  = NI_RX_DEPTH;
      owed_credit    = 0;
      delay_cnt      = 0;
      pkt_left       = 0;
      bad_pending    = 0;
      bad_done       = 0;
    end else begin
      resp_vld <= 1'b0;
      if (bad_hdr && !bad_done) bad_pending = 1;
      if (pkt_left > 0) begin
        resp_vld  <= 1'b1;
        resp_flit <= out_words.pop_front();
        pkt_left--;
      end else if (bad_pending) begin
        resp_vld    <= 1'b1;
        resp_flit   <= 32'h0000_0000;   // marker 0: not a header
        bad_pending  = 0;
        bad_done     = 1;
      end else if (out_lens.size() > 0 && !hold) begin
        if (delay_cnt < RESP_DELAY) delay_cnt++;
        else if (ni_space_left >= out_lens[0] - 1) begin
          hdr_t h;
          int unsigned cr;
          cr = (owed_credit > 31) ? 31 : owed_credit;
          owed_credit -= cr;
          h = hdr_t'(out_words.pop_front());
          h.credit = 5'(cr);
          resp_vld  <= 1'b1;
          resp_flit <= h;
          pkt_left   = out_lens[0] - 1;
          ni_space_left -= out_lens[0] - 1;
          void'(out_lens.pop_front());
          delay_cnt = 0;
        end
      end
    end
  end

endmodule
