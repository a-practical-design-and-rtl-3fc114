// tb_ni_shell_axi -- drives the AXI shell from an AXI master model and a
// model of the kernel (a message sink with a random room count and a queue
// of response messages). Checks:
//  * the reference write (awaddr 0000abcd, awlen 3, awsize 2, awburst 0,
//    awid 6, data 0000dcba 0000aaaa 0000bbbb 00007777) becomes exactly the
//    messages 88d80001, 0000abcd, then the four data words;
//  * awready (arready) is high in exactly one cycle, the one right after
//    the control message, in which the address message is emitted;
//  * random reads and writes produce the right control/address/data
//    messages, and a request never starts unless the room count covers it;
//  * write responses appear on B with their id and resp; read responses on
//    R with data in order, id, resp and rlast on the last beat.
module tb_ni_shell_axi;
  import ni_pkg::*;
  logic        clk = 0, rstn = 0;
  logic        awvalid = 0, awready, wvalid = 0, wready, wlast = 0;
  logic [31:0] awaddr = 0, wdata = 0, araddr = 0;
  logic [3:0]  awlen = 0, awid = 0, arlen = 0, arid = 0;
  logic [2:0]  awsize = 0, arsize = 0;
  logic [1:0]  awburst = 0, arburst = 0;
  logic        arvalid = 0, arready;
  logic        rvalid, rready = 0, rlast, bvalid, bready = 0;
  logic [31:0] rdata;
  logic [1:0]  rresp, bresp;
  logic [3:0]  rid, bid;
  logic        out_vld, fifo_full = 0, in_vld, in_rd;
  logic [31:0] msg_out, msg_in;
  logic [4:0]  tx_room = 18;
  int checks = 0, failures = 0;
  int n_room_block = 0, n_b = 0, n_r = 0;

  always #5 clk = ~clk;

  ni_shell_axi dut (.clk_in (clk), .fifo_full (fifo_full), .tx_room (tx_room), .*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [31:0] exp_msgs [$];
  logic [31:0] resp_q [$];
  logic [31:0] exp_r [$];
  int          exp_b_id [$];
  int          rhead = 0;
  assign in_vld = rhead < resp_q.size();
  assign msg_in = (rhead < resp_q.size()) ? resp_q[rhead] : 32'd0;
  always @(posedge clk) if (in_rd) rhead <= rhead + 1;

  // Kernel model and message checker.
  bit prev_ctrl = 0;
  logic [31:0] prev_msg = 0;
  always @(negedge clk) begin
    if (rstn) begin
      #1;
      check(!(awready && arready), "one address ready at a time");
      if (awready || arready) begin
        check(prev_ctrl, "address ready right after the control message");
        check(out_vld && msg_out == (awready ? awaddr : araddr), "address message with ready");
      end
      if (out_vld) begin
        check(exp_msgs.size() > 0 && msg_out == exp_msgs.pop_front(), "message content");
      end
      prev_ctrl = out_vld && dut.state == dut.IDLE;
      if (prev_ctrl) begin
        ctrl_send_t c;
        c = ctrl_send_t'(msg_out);
        check(int'(tx_room) >= int'(req_msgs(c.rw, c.len)), "request started only with room");
      end
      if (dut.state == dut.IDLE && (awvalid || arvalid) && !out_vld) n_room_block++;
      if (bvalid && bready) begin
        n_b++;
        check(exp_b_id.size() > 0 && int'(bid) == exp_b_id.pop_front() && bresp == 2'b10, "B beat");
      end
      if (rvalid && rready) begin
        n_r++;
        check(exp_r.size() > 0 && rdata == exp_r.pop_front(), "R data");
        check(rid == 4'd9 && rresp == 2'b01, "R id/resp");
        check(rlast == (exp_r.size() == 0 || dut.r_cnt == dut.r_len), "rlast");
      end
    end
  end

  always @(posedge clk) begin
    #2;
    tx_room = ($urandom % 2) ? 5'd18 : 5'($urandom % 19);
    bready  = ($urandom % 3) != 0;
    rready  = ($urandom % 3) != 0;
  end

  task automatic write(logic [31:0] a, logic [3:0] len, logic [2:0] sz, logic [1:0] b,
                       logic [3:0] id, logic [31:0] d [$]);
    exp_msgs.push_back({RW_WRITE, b, sz, len, id, SEND_FILL});
    exp_msgs.push_back(a);
    foreach (d[i]) exp_msgs.push_back(d[i]);
    @(posedge clk); #1;
    awvalid = 1; awaddr = a; awlen = len; awsize = sz; awburst = b; awid = id;
    do @(posedge clk); while (!awready);
    #1 awvalid = 0;
    foreach (d[i]) begin
      wvalid = 1; wdata = d[i]; wlast = (i == d.size() - 1);
      do @(posedge clk); while (!wready);
      #1;
    end
    wvalid = 0; wlast = 0;
  endtask

  task automatic read(logic [31:0] a, logic [3:0] len, logic [3:0] id);
    exp_msgs.push_back({RW_READ, 2'd1, 3'd2, len, id, SEND_FILL});
    exp_msgs.push_back(a);
    @(posedge clk); #1;
    arvalid = 1; araddr = a; arlen = len; arsize = 3'd2; arburst = 2'd1; arid = id;
    do @(posedge clk); while (!arready);
    #1 arvalid = 0;
  endtask

  initial begin
    logic [31:0] d [$];
    repeat (2) @(posedge clk);
    rstn = 1;
    check(32'({RW_WRITE, 2'd0, 3'd2, 4'd3, 4'd6, SEND_FILL}) == 32'h88d80001, "reference control word");
    d = '{32'h0000dcba, 32'h0000aaaa, 32'h0000bbbb, 32'h00007777};
    write(32'h0000abcd, 4'd3, 3'd2, 2'd0, 4'd6, d);
    repeat (3) @(posedge clk);
    check(exp_msgs.size() == 0, "reference write complete");
    for (int k = 0; k < 100; k++) begin
      if ($urandom % 2) begin
        d = {};
        for (int i = 0; i <= int'(k % 16); i++) d.push_back($urandom);
        write($urandom, 4'(k % 16), 3'd2, 2'd1, 4'($urandom), d);
      end else begin
        read($urandom, 4'($urandom), 4'($urandom));
      end
      // Responses from the kernel side.
      if ($urandom % 2) begin
        int id;
        id = int'($urandom % 16);
        exp_b_id.push_back(id);
        resp_q.push_back({RB_BRESP, 2'b10, 4'd0, 4'(id), RECV_FILL});
      end else begin
        logic [3:0] len;
        len = 4'($urandom);
        resp_q.push_back({RB_READ, 2'b01, len, 4'd9, RECV_FILL});
        for (int i = 0; i <= int'(len); i++) begin
          logic [31:0] w;
          w = $urandom;
          resp_q.push_back(w);
          exp_r.push_back(w);
        end
      end
    end
    repeat (400) @(posedge clk);
    check(exp_msgs.size() == 0 && rhead == resp_q.size() && exp_r.size() == 0 && exp_b_id.size() == 0,
          "all traffic done");
    check(n_room_block > 0 && n_b > 0 && n_r > 0, "room block, B and R seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
