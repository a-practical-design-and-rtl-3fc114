// tb_ni_request_generator -- writes random request message streams (reads
// and writes of 1 to 16 beats to random destinations) in the IP clock
// domain and takes the descriptors out in an unrelated network clock
// domain with random Space and reservation verdicts. Checks: pkt_start_in
// pulses on the address message of each request and never elsewhere; the
// descriptors arrive in order with the right a_len, message count
// (control + address + a_len+1 for a write, 2 for a read), response size
// (1 for a write, a_len+2 for a read) and destination (top address bits);
// pkt_start is withheld while Space or the reservation does not allow the
// packet; and every request is delivered.
module tb_ni_request_generator;
  import ni_pkg::*;
  logic        clk_in = 0, clk_out = 0, rstn = 0;
  logic        wr = 0;
  logic [31:0] msg = 0;
  logic        desc_full, pkt_start_in, rsv_ok = 1, pkt_start, pkt_ack = 0;
  logic [7:0]  space = 0;
  logic [3:0]  pkt_len;
  logic [4:0]  pkt_msgs, pkt_resp_msgs;
  logic [1:0]  pkt_dest;
  int checks = 0, failures = 0, n_blocked = 0, n_got = 0, n_sent = 0;
  int exp_len [$], exp_msgs [$], exp_resp [$], exp_dest [$];

  always #5 clk_in  = ~clk_in;
  always #3 clk_out = ~clk_out;

  ni_request_generator #(.NUM_DEST (4), .DESC_DEPTH (4), .SPACE_W (8)) dut (
    .clk_in (clk_in), .clk_out (clk_out), .rstn (rstn),
    .write_to_stack (wr), .msg_in (msg), .desc_full (desc_full), .pkt_start_in (pkt_start_in),
    .space (space), .rsv_ok (rsv_ok), .pkt_start (pkt_start), .pkt_len (pkt_len),
    .pkt_msgs (pkt_msgs), .pkt_resp_msgs (pkt_resp_msgs), .pkt_dest (pkt_dest), .pkt_ack (pkt_ack)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic put(logic [31:0] m, bit is_addr);
    @(negedge clk_in);
    while (desc_full || $urandom % 4 == 0) begin
      wr = 0;
      @(negedge clk_in);
    end
    wr = 1; msg = m;
    #1 check(pkt_start_in == is_addr, "pkt_start_in on the address message only");
  endtask

  // Network side consumer.
  always @(negedge clk_out) begin
    if (rstn) begin
      space  = 8'($urandom % 24);
      rsv_ok = ($urandom % 4) != 0;
      #1;
      if (!dut.desc_empty && !pkt_start) n_blocked++;
      check(pkt_start == (!dut.desc_empty && space >= 8'(pkt_msgs) && rsv_ok), "pkt_start gating");
      pkt_ack = pkt_start && ($urandom % 2 == 0);
      if (pkt_ack) begin
        check(exp_len.size() > 0, "descriptor expected");
        if (exp_len.size() > 0) begin
          check(int'(pkt_len) == exp_len.pop_front(), "descriptor a_len");
          check(int'(pkt_msgs) == exp_msgs.pop_front(), "descriptor message count");
          check(int'(pkt_resp_msgs) == exp_resp.pop_front(), "descriptor response size");
          check(int'(pkt_dest) == exp_dest.pop_front(), "descriptor destination");
        end
        n_got++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk_in);
    rstn = 1;
    for (int r = 0; r < 200; r++) begin
      ctrl_send_t c;
      logic [31:0] a;
      c = '{rw: 1'($urandom), burst: 2'($urandom), size: 3'($urandom), len: 4'($urandom),
            id: 4'($urandom), fill: SEND_FILL};
      a = $urandom;
      exp_len.push_back(int'(c.len));
      exp_msgs.push_back(c.rw ? int'(c.len) + 3 : 2);
      exp_resp.push_back(c.rw ? 1 : int'(c.len) + 2);
      exp_dest.push_back(int'(a[31:30]));
      put(c, 0);
      put(a, 1);
      if (c.rw) for (int i = 0; i <= int'(c.len); i++) put($urandom, 0);
      n_sent++;
    end
    @(negedge clk_in) wr = 0;
    repeat (400) @(negedge clk_in);
    check(n_got == n_sent, "every request delivered");
    check(n_blocked > 0, "gating seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk_in);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
