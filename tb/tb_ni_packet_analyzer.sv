// tb_ni_packet_analyzer -- sends random response packets (write responses
// and read data of 1 to 16 beats, with idle cycles in between and inside)
// plus the occasional flit without a header marker, and checks that the
// analyzer writes exactly the messages behind each header to the FIFO, in
// order, passes each header's credit on in the header's own cycle, flags
// the bad flits, and reports an overflow instead of writing while the FIFO
// is full.
module tb_ni_packet_analyzer;
  import ni_pkg::*;
  logic        clk = 0, rstn = 0;
  logic        in_vld = 0, fifo_full = 0;
  logic [31:0] flit = 0, msg;
  logic        wr, credit_vld, hdr_err, rx_overflow, pkt_done;
  logic [4:0]  credit;
  int checks = 0, failures = 0;
  int n_err = 0, n_ovf = 0, n_read = 0, n_write = 0;

  always #5 clk = ~clk;

  ni_packet_analyzer dut (
    .clk_out (clk), .rstn (rstn), .in_vld (in_vld), .from_router (flit),
    .fifo_full (fifo_full), .write_to_stack (wr), .msg (msg),
    .credit_vld (credit_vld), .credit (credit), .hdr_err (hdr_err),
    .rx_overflow (rx_overflow), .pkt_done (pkt_done)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Send one flit; kind: 0 header, 1 message, 2 bad header.
  task automatic send(logic [31:0] f, int kind, logic [4:0] cr, bit last, bit full);
    while ($urandom % 3 == 0) begin
      @(negedge clk);
      in_vld = 0;
      #1 check(!wr && !credit_vld && !hdr_err, "quiet while idle");
    end
    @(negedge clk);
    in_vld = 1; flit = f; fifo_full = full;
    #1;
    case (kind)
      0: check(credit_vld && credit == cr && !wr && !hdr_err, "header consumed");
      1: begin
        check(wr == !full && rx_overflow == full && msg == f, "message written");
        check(pkt_done == last, "pkt_done on last message");
        if (full) n_ovf++;
      end
      default: begin
        check(hdr_err && !credit_vld && !wr, "bad header flagged");
        n_err++;
      end
    endcase
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rstn = 1;
    for (int p = 0; p < 300; p++) begin
      hdr_t       h;
      ctrl_recv_t c;
      bit         rd;
      logic [3:0] len;
      if ($urandom % 20 == 0) send(32'h0000_1234, 2, 0, 0, 0);
      rd  = 1'($urandom);
      len = 4'($urandom);
      h = '{marker: HDR_MARKER, pkt_len: len, credit: 5'($urandom), route: 18'($urandom)};
      c = '{rb: rd ? RB_READ : RB_BRESP, resp: 2'($urandom), len: len, id: 4'($urandom),
            fill: RECV_FILL};
      send(h, 0, h.credit, 0, 0);
      send(c, 1, 0, !rd, 0);
      if (rd) begin
        n_read++;
        for (int i = 0; i <= int'(len); i++) send($urandom, 1, 0, i == int'(len), ($urandom % 16) == 0);
      end else begin
        n_write++;
      end
    end
    @(negedge clk) in_vld = 0;
    check(n_err > 0 && n_ovf > 0 && n_read > 0 && n_write > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
