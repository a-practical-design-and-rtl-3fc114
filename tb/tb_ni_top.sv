// tb_ni_top -- end-to-end test of the network interface at its default
// parameters.
//
// An AXI master model drives the NI in the IP clock domain; a behavioural
// remote node (ni_remote_model) takes the request packets on the network
// side, executes them on a memory and returns response packets. The test
// runs twice, once with a 100 MHz IP clock and a 500 MHz network clock and
// once with 100 MHz and 75 MHz. Each run starts with the reference
// transaction: a 4-beat (awlen=3), 4-byte (awsize=2), FIXED (awburst=0)
// write of 0000dcba, 0000aaaa, 0000bbbb, 00007777 to 0000abcd with ID 6,
// whose control message must be 88d80001. It then reads that address
// back, runs random reads and writes, holds the remote node back so that
// end-to-end credit runs out and the transmit FIFO fills, and injects one
// flit without a header marker.
//
// Checks: every flit of every request packet (header fields, control,
// address, data), every B and R beat against a reference memory, the
// header latency of the reference write (at most three network clocks
// after its address is taken), a gap-free packet at 75 MHz, and that each
// mechanism (FIFO-empty stall, back-to-back packets, credit block, FIFO
// full, credit return both ways, header error, read and write responses)
// occurred at least once.
`timescale 1ns/1ps
module tb_ni_top;
  import ni_pkg::*;

  real t_in_half  = 5.0;
  real t_out_half = 1.0;

  logic clk_in = 0, clk_out = 0, rstn = 0;
  always #(t_in_half)  clk_in  = ~clk_in;
  always #(t_out_half) clk_out = ~clk_out;

  logic        awvalid = 0, awready;
  logic [31:0] awaddr = 0;
  logic [3:0]  awlen = 0, awid = 0;
  logic [2:0]  awsize = 0;
  logic [1:0]  awburst = 0;
  logic        wvalid = 0, wready, wlast = 0;
  logic [31:0] wdata = 0;
  logic        arvalid = 0, arready;
  logic [31:0] araddr = 0;
  logic [3:0]  arlen = 0, arid = 0;
  logic [2:0]  arsize = 0;
  logic [1:0]  arburst = 0;
  logic        rvalid, rready = 0, rlast;
  logic [31:0] rdata;
  logic [1:0]  rresp, bresp;
  logic [3:0]  rid, bid;
  logic        bvalid, bready = 0;
  logic [31:0] packet_out, packet_in;
  logic        pkt_vld, packet_in_vld, slave_fifo_full, hdr_err, rx_overflow, tx_stall;
  logic        hold = 0, bad_hdr = 0;

  ni_top dut (.*);

  ni_remote_model u_remote (
    .clk (clk_out), .rstn (rstn), .req_flit (packet_out), .req_vld (pkt_vld),
    .resp_flit (packet_in), .resp_vld (packet_in_vld), .hold (hold), .bad_hdr (bad_hdr)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- reference model ----------------
  logic [31:0] ref_mem [logic [31:0]];
  function automatic logic [31:0] ref_rd(logic [31:0] a);
    if (ref_mem.exists(a)) return ref_mem[a];
    return ~a;
  endfunction

  logic [31:0] exp_req [$];     // request messages, in order
  int unsigned exp_req_n [$];   // messages per request
  logic [3:0]  exp_req_len [$];
  bit          exp_is_read [$];
  logic [3:0]  exp_id [$];
  logic [31:0] exp_rdata [$];

  // ---------------- mechanism counters ----------------
  int n_hdr = 0, n_stall = 0, n_b2b = 0, n_space_block = 0, n_full = 0;
  int n_credit_out = 0, n_credit_in = 0, n_hdr_err = 0, n_bresp = 0, n_rbeat = 0;

  // ---------------- request packet monitor (network side) ----------------
  int unsigned mon_left = 0;
  bit          prev_vld = 0;
  int unsigned prev_left = 0;
  realtime     t_hdr = 0;
  int          run_len = 0, max_run = 0;
  always @(negedge clk_out) begin
    if (rstn && pkt_vld) begin
      if (mon_left == 0) begin
        hdr_t h;
        h = hdr_t'(packet_out);
        n_hdr++;
        if (prev_vld && prev_left == 0) n_b2b++;
        if (h.credit != 0) n_credit_out++;
        t_hdr = $realtime - t_out_half;
        check(h.marker == HDR_MARKER, "header marker");
        check(h.route == 18'h000FA, "header route");
        check(exp_req_n.size() > 0, "unexpected packet");
        if (exp_req_n.size() > 0) begin
          check(h.pkt_len == exp_req_len.pop_front(), "header pkt_len");
          mon_left = exp_req_n.pop_front();
        end
        run_len = 1;
      end else begin
        check(exp_req.size() > 0 && packet_out == exp_req.pop_front(), "request message");
        mon_left--;
        run_len++;
        if (run_len > max_run) max_run = run_len;
      end
    end else begin
      run_len = 0;
    end
    prev_vld  = rstn && pkt_vld;
    prev_left = mon_left;
  end

  always @(negedge clk_out) begin
    if (rstn) begin
      if (tx_stall) n_stall++;
      if (!dut.u_kernel.u_reqgen.desc_empty && !dut.u_kernel.u_reqgen.pkt_start) n_space_block++;
      if (hdr_err) n_hdr_err++;
      if (dut.u_kernel.u_analyzer.credit_vld && dut.u_kernel.u_analyzer.credit != 0) n_credit_in++;
      check(!rx_overflow, "receive FIFO overflow");
    end
  end

  always @(negedge clk_in) if (rstn && dut.fifo_full && (awvalid || wvalid || arvalid)) n_full++;

  // ---------------- AXI master ----------------
  realtime t_push = 0;

  task automatic axi_write(logic [31:0] a, logic [3:0] len, logic [2:0] sz,
                           logic [1:0] burst, logic [3:0] id, logic [31:0] d [$], int gap);
    ctrl_send_t c;
    c = '{rw: RW_WRITE, burst: burst, size: sz, len: len, id: id, fill: SEND_FILL};
    exp_req.push_back(c);
    exp_req.push_back(a);
    for (int i = 0; i <= int'(len); i++) begin
      exp_req.push_back(d[i]);
      ref_mem[(burst == 2'd0) ? a : a + (32'(i) << sz)] = d[i];
    end
    exp_req_n.push_back(int'(len) + 3);
    exp_req_len.push_back(len);
    exp_is_read.push_back(0);
    exp_id.push_back(id);
    @(negedge clk_in);
    awvalid = 1; awaddr = a; awlen = len; awsize = sz; awburst = burst; awid = id;
    forever begin
      #1;
      if (awready) break;
      @(negedge clk_in);
    end
    @(posedge clk_in);
    t_push = $realtime;
    for (int i = 0; i <= int'(len); i++) begin
      @(negedge clk_in);
      awvalid = 0;
      repeat (($urandom % 4 == 0) ? gap : 0) begin
        wvalid = 0;
        @(negedge clk_in);
      end
      wvalid = 1; wdata = d[i]; wlast = (i == int'(len));
      forever begin
        #1;
        if (wready) break;
        @(negedge clk_in);
      end
      @(posedge clk_in);
    end
    @(negedge clk_in);
    wvalid = 0; wlast = 0;
  endtask

  task automatic axi_read(logic [31:0] a, logic [3:0] len, logic [2:0] sz,
                          logic [1:0] burst, logic [3:0] id);
    ctrl_send_t c;
    c = '{rw: RW_READ, burst: burst, size: sz, len: len, id: id, fill: SEND_FILL};
    exp_req.push_back(c);
    exp_req.push_back(a);
    exp_req_n.push_back(2);
    exp_req_len.push_back(len);
    exp_is_read.push_back(1);
    exp_id.push_back(id);
    for (int i = 0; i <= int'(len); i++)
      exp_rdata.push_back(ref_rd((burst == 2'd0) ? a : a + (32'(i) << sz)));
    @(negedge clk_in);
    arvalid = 1; araddr = a; arlen = len; arsize = sz; arburst = burst; arid = id;
    forever begin
      #1;
      if (arready) break;
      @(negedge clk_in);
    end
    @(posedge clk_in);
    @(negedge clk_in);
    arvalid = 0;
  endtask

  // ---------------- response collector ----------------
  int unsigned beat = 0;
  always @(negedge clk_in) begin
    bready = ($urandom % 4) != 0;
    rready = ($urandom % 4) != 0;
    #1;
    if (rstn && bvalid && bready) begin
      n_bresp++;
      check(exp_is_read.size() > 0 && exp_is_read[0] == 0, "B response order");
      check(exp_id.size() > 0 && bid == exp_id[0] && bresp == 2'b00, "B id/resp");
      void'(exp_is_read.pop_front());
      void'(exp_id.pop_front());
    end
    if (rstn && rvalid && rready) begin
      n_rbeat++;
      check(exp_is_read.size() > 0 && exp_is_read[0] == 1, "R order");
      check(exp_id.size() > 0 && rid == exp_id[0] && rresp == 2'b00, "R id/resp");
      check(exp_rdata.size() > 0 && rdata == exp_rdata.pop_front(), "R data");
      if (rlast) begin
        void'(exp_is_read.pop_front());
        void'(exp_id.pop_front());
      end
    end
  end

  task automatic wait_idle();
    int guard = 0;
    while ((exp_is_read.size() > 0 || exp_req_n.size() > 0 || mon_left != 0) && guard < 200000) begin
      @(posedge clk_in);
      guard++;
    end
    check(guard < 200000, "transactions complete");
    if (guard >= 200000)
      $display("pending: resp=%0d req=%0d mon_left=%0d space=%0d", exp_is_read.size(),
               exp_req_n.size(), mon_left, dut.u_kernel.space);
  endtask

  task automatic run_phase(real in_half, real out_half, bit slow_net);
    logic [31:0] d [$];
    t_in_half = in_half; t_out_half = out_half;
    rstn = 0;
    repeat (4) @(posedge clk_in);
    rstn = 1;
    repeat (4) @(posedge clk_in);

    // Reference transaction.
    d = '{32'h0000dcba, 32'h0000aaaa, 32'h0000bbbb, 32'h00007777};
    max_run = 0;
    check(ctrl_send_t'{rw: RW_WRITE, burst: 2'd0, size: 3'd2, len: 4'd3, id: 4'd6,
                       fill: SEND_FILL} == 32'h88d80001, "reference control message");
    axi_write(32'h0000abcd, 4'd3, 3'd2, 2'd0, 4'd6, d, 0);
    wait_idle();
    $display("reference write: header %0.2f ns after the address was taken (network period %0.2f ns)",
             t_hdr - t_push, 2.0 * out_half);
    check(t_hdr > t_push && t_hdr - t_push <= 6.0 * out_half + 0.01, "header latency");
    if (slow_net) check(max_run == 7, "reference packet without gaps");
    axi_read(32'h0000abcd, 4'd3, 3'd2, 2'd0, 4'd7);
    wait_idle();

    $display("phase ref done at %0t", $time);
    // Random traffic.
    for (int k = 0; k < 40; k++) begin
      logic [31:0] a;
      logic [3:0]  len;
      a   = {$urandom} & 32'hC000_0FFC;
      len = 4'($urandom);
      if ($urandom % 2) begin
        d = {};
        for (int i = 0; i <= int'(len); i++) d.push_back($urandom);
        axi_write(a, len, 3'd2, 2'($urandom % 2), 4'($urandom), d, 2);
      end else begin
        axi_read(a, len, 3'd2, 2'($urandom % 2), 4'($urandom));
      end
    end
    wait_idle();

    $display("random done at %0t", $time);
    // Back-pressure: the remote node stops answering.
    hold = 1;
    for (int k = 0; k < 10; k++) begin
      d = '{32'h1111_0000 + k, 32'h2222_0000 + k, 32'h3333_0000 + k, 32'h4444_0000 + k};
      fork
        axi_write(32'h0000_0100 + 32'(k) * 16, 4'd3, 3'd2, 2'd1, 4'(k), d, 0);
        begin
          repeat (200) @(posedge clk_in);
          hold = 0;
        end
      join_any
    end
    hold = 0;
    wait_idle();
    for (int k = 0; k < 10; k++) axi_read(32'h0000_0100 + 32'(k) * 16, 4'd3, 3'd2, 2'd1, 4'(k));
    wait_idle();

    // One flit without a header marker.
    @(posedge clk_out); bad_hdr = 1;
    repeat (4) @(posedge clk_out); bad_hdr = 0;
    repeat (20) @(posedge clk_out);
  endtask

  initial begin
    run_phase(5.0, 1.0, 0);        // 100 MHz IP clock, 500 MHz network clock
    u_remote.bad_done = 0;
    run_phase(5.0, 20.0 / 3.0, 1); // 100 MHz IP clock, 75 MHz network clock
    $display("mechanisms: headers=%0d stall=%0d back_to_back=%0d space_block=%0d fifo_full=%0d credit_out=%0d credit_in=%0d hdr_err=%0d bresp=%0d rbeats=%0d",
             n_hdr, n_stall, n_b2b, n_space_block, n_full, n_credit_out, n_credit_in, n_hdr_err, n_bresp, n_rbeat);
    check(n_hdr > 0, "packets sent");
    check(n_stall > 0, "FIFO-empty stall seen");
    check(n_b2b > 0, "back-to-back packets seen");
    check(n_space_block > 0, "credit block seen");
    check(n_full > 0, "transmit FIFO full seen");
    check(n_credit_out > 0, "credit returned in request header");
    check(n_credit_in > 0, "credit received in response header");
    check(n_hdr_err == 2, "header errors detected");
    check(n_bresp > 0 && n_rbeat > 0, "responses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
