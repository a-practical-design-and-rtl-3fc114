// tb_ni_flit_controller -- offers random packets (2 to 18 messages) to the
// flit controller while the transmit FIFO randomly runs empty, and checks
// the cycle-level sequence: one header cycle (sel, en_hdr_gen and pkt_ack
// together), then exactly as many FIFO reads as the packet has messages,
// never a read while the FIFO is empty (that cycle is a stall), the count
// `cnt` stepping 0,1,2,..., and rst_cnt on the last read only. With the
// FIFO never empty, a packet of N messages must take N+1 consecutive cycles
// and the next header must follow at once.
module tb_ni_flit_controller;
  logic       clk = 0, rstn = 0;
  logic       pkt_start = 0, fifo_empty = 1;
  logic [4:0] pkt_msgs = 0, cnt;
  logic       pkt_ack, en_hdr_gen, sel, rd, encnt, rst_cnt, out_en, stall;
  int checks = 0, failures = 0;
  int n_stall = 0, n_b2b = 0;
  bit always_full = 0;

  always #5 clk = ~clk;

  ni_flit_controller dut (
    .clk_out (clk), .rstn (rstn), .pkt_start (pkt_start), .pkt_msgs (pkt_msgs),
    .fifo_empty (fifo_empty), .pkt_ack (pkt_ack), .en_hdr_gen (en_hdr_gen), .sel (sel),
    .read_from_stack (rd), .encnt (encnt), .rst_cnt (rst_cnt), .out_en (out_en),
    .cnt (cnt), .stall (stall)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Stimulus and checking at the falling edge; the design moves at the rising edge.
  int unsigned pend [$];
  int cur_left = 0, cur_idx = 0, cycles = 0, pkt_cycles = 0;
  initial begin
    repeat (2) @(posedge clk);
    rstn = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i == 1500) always_full = 1;
      if (pend.size() < 3 && $urandom % 3 == 0) pend.push_back(2 + ($urandom % 17));
      pkt_start  = pend.size() > 0;
      pkt_msgs   = pend.size() > 0 ? 5'(pend[0]) : 5'd0;
      fifo_empty = always_full ? 1'b0 : ($urandom % 3 == 0);
      #1;
      if (cur_left == 0) begin
        check(!rd && !rst_cnt, "no read outside a packet");
        check(pkt_ack == pkt_start && en_hdr_gen == pkt_start && sel == pkt_start,
              "header cycle signals");
        check(out_en == pkt_start, "out_en on header");
        if (pkt_ack) begin
          if (cycles == 0 && always_full) n_b2b++;
          cur_left = int'(pend.pop_front());
          cur_idx = 0;
          pkt_cycles = 1;
        end
      end else begin
        check(!pkt_ack && !en_hdr_gen && !sel, "no header inside a packet");
        check(rd == !fifo_empty, "read exactly when FIFO not empty");
        check(stall == fifo_empty, "stall when FIFO empty");
        check(encnt == rd && out_en == rd, "encnt/out_en follow read");
        if (stall) n_stall++;
        if (rd) begin
          check(int'(cnt) == cur_idx, "counter value");
          check(rst_cnt == (cur_left == 1), "rst_cnt on last message");
          cur_idx++;
          cur_left--;
          pkt_cycles++;
          if (cur_left == 0 && always_full)
            check(pkt_cycles == cur_idx + 1, "packet without gaps");
        end
      end
      cycles = (cur_left == 0) ? 0 : cycles + 1;
    end
    check(n_stall > 0, "stall seen");
    check(n_b2b > 0, "back-to-back packets seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
