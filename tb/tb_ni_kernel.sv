// tb_ni_kernel -- runs the NI kernel between a message source/sink in the
// IP clock domain (100 MHz) and a behavioural remote node in the network
// clock domain (about 143 MHz), with four destinations that each have their
// own path and a remote buffer of only 20 messages, so that end-to-end
// credit runs out often. Checks every outgoing packet flit by flit (header
// marker, length, route of the destination given by the address, control,
// address and data messages), every message that comes back (response
// control word and read data against a reference memory), the header
// latency after an idle link (at most three network clocks after the
// address message is written) and that credit blocks, FIFO-empty stalls
// and credit returns all happened.
module tb_ni_kernel;
  import ni_pkg::*;
  localparam logic [17:0] R [4] = '{18'h000FA, 18'h01234, 18'h2BEEF, 18'h3C0DE};

  logic        clk_in = 0, clk_out = 0, rstn = 0;
  logic [31:0] msg_in = 0, msg_out, to_router, from_router;
  logic        write_to_stack = 0, master_fifo_full, msg_out_vld, read_from_stack = 0;
  logic [5:0]  tx_room;
  logic        pkt_vld, from_router_vld, slave_fifo_full, hdr_err, rx_overflow, tx_stall;
  int checks = 0, failures = 0;

  always #5   clk_in  = ~clk_in;
  always #3.5 clk_out = ~clk_out;

  ni_kernel #(.NUM_DEST (4), .ROUTES (R), .REMOTE_CAPACITY (20)) dut (.*);

  ni_remote_model #(.NI_RX_DEPTH (32), .RESP_DELAY (8)) u_remote (
    .clk (clk_out), .rstn (rstn), .req_flit (to_router), .req_vld (pkt_vld),
    .resp_flit (from_router), .resp_vld (from_router_vld), .hold (1'b0), .bad_hdr (1'b0)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [31:0] ref_mem [logic [31:0]];
  logic [31:0] exp_tx [$];
  int          exp_n [$], exp_len [$], exp_route [$];
  logic [31:0] exp_rx [$];
  int n_block = 0, n_stall = 0, n_credit = 0;

  // Outgoing packet checker.
  int left = 0;
  realtime t_addr = 0, t_hdr = 0;
  always @(negedge clk_out) begin
    if (rstn) begin
      if (tx_stall) n_stall++;
      if (!dut.u_reqgen.desc_empty && !dut.u_reqgen.pkt_start) n_block++;
      if (pkt_vld) begin
        if (left == 0) begin
          hdr_t h;
          h = hdr_t'(to_router);
          t_hdr = $realtime;
          if (h.credit != 0) n_credit++;
          check(h.marker == HDR_MARKER && exp_n.size() > 0, "header marker");
          if (exp_n.size() > 0) begin
            check(int'(h.pkt_len) == exp_len.pop_front(), "header length");
            check(int'(h.route) == exp_route.pop_front(), "header route");
            left = exp_n.pop_front();
          end
        end else begin
          check(exp_tx.size() > 0 && to_router == exp_tx.pop_front(), "packet message");
          left--;
        end
      end
    end
  end

  // Response sink.
  always @(negedge clk_in) begin
    read_from_stack = msg_out_vld && ($urandom % 3 != 0);
    if (read_from_stack) check(exp_rx.size() > 0 && msg_out == exp_rx.pop_front(), "response message");
  end

  task automatic put(logic [31:0] m);
    @(negedge clk_in);
    while ($urandom % 3 == 0) begin
      write_to_stack = 0;
      @(negedge clk_in);
    end
    write_to_stack = 1; msg_in = m;
  endtask

  task automatic request(bit rw, logic [31:0] a, logic [3:0] len, logic [1:0] burst, logic [3:0] id);
    ctrl_send_t c;
    int n;
    c = '{rw: rw, burst: burst, size: 3'd2, len: len, id: id, fill: SEND_FILL};
    n = int'(req_msgs(rw, len));
    @(negedge clk_in);
    while (master_fifo_full || int'(tx_room) < n) @(negedge clk_in);
    exp_n.push_back(n); exp_len.push_back(int'(len)); exp_route.push_back(int'(R[a[31:30]]));
    exp_tx.push_back(c); exp_tx.push_back(a);
    write_to_stack = 1; msg_in = c;
    @(negedge clk_in);
    write_to_stack = 1; msg_in = a;
    t_addr = $realtime + 5;
    if (rw) begin
      exp_rx.push_back({RB_BRESP, 2'b00, len, id, RECV_FILL});
      for (int i = 0; i <= int'(len); i++) begin
        logic [31:0] d;
        d = $urandom;
        ref_mem[(burst == 0) ? a : a + 32'(4 * i)] = d;
        exp_tx.push_back(d);
        put(d);
      end
    end else begin
      exp_rx.push_back({RB_READ, 2'b00, len, id, RECV_FILL});
      for (int i = 0; i <= int'(len); i++) begin
        logic [31:0] ai;
        ai = (burst == 0) ? a : a + 32'(4 * i);
        exp_rx.push_back(ref_mem.exists(ai) ? ref_mem[ai] : ~ai);
      end
    end
    @(negedge clk_in);
    write_to_stack = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk_in);
    rstn = 1;
    repeat (5) @(posedge clk_in);
    // Idle link: header latency.
    request(1, 32'h0000abcd, 4'd3, 2'd0, 4'd6);
    repeat (10) @(posedge clk_in);
    check(t_hdr > t_addr && t_hdr - t_addr <= 3 * 7.0 + 3.5, "header latency after address write");
    for (int k = 0; k < 150; k++)
      request(1'($urandom), {2'($urandom), 20'd0, 8'($urandom) & 8'hFC}, 4'($urandom),
              2'($urandom % 2), 4'($urandom));
    repeat (3000) @(posedge clk_in);
    check(exp_tx.size() == 0 && exp_n.size() == 0 && left == 0, "all packets sent");
    check(exp_rx.size() == 0, "all responses received");
    $display("block=%0d stall=%0d credit=%0d", n_block, n_stall, n_credit);
    check(n_block > 0 && n_stall > 0 && n_credit > 0, "credit block, stall and credit return seen");
    check(!hdr_err && !rx_overflow, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk_in);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
