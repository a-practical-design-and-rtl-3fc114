// tb_ni_async_fifo -- writes random words at one clock and reads them at an
// unrelated clock, both sides with random enables, and checks that every
// word comes out once and in order. It also checks: empty after reset;
// full after exactly DEPTH writes with no reads; `wr_free` counting down
// while filling; `rd_count_w` catching up with the number of reads; and
// that the first word is readable within three read-clock periods of its
// write.
module tb_ni_async_fifo;
  localparam int DEPTH = 8;
  logic        wclk = 0, rclk = 0, rstn = 0;
  logic        we = 0, re = 0, full, empty;
  logic [31:0] wdata = 0, rdata;
  logic [3:0]  rd_count_w, wr_free;
  logic [31:0] exp_q [$];
  int checks = 0, failures = 0, n_read = 0;

  always #7 wclk = ~wclk;
  always #3 rclk = ~rclk;

  ni_async_fifo #(.WIDTH (32), .DEPTH (DEPTH)) dut (
    .wclk (wclk), .rclk (rclk), .rstn (rstn), .we (we), .wdata (wdata), .full (full),
    .rd_count_w (rd_count_w), .wr_free (wr_free), .re (re), .rdata (rdata), .empty (empty)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  bit reader_on = 0;
  // Reader
  always @(negedge rclk) begin
    re = reader_on && !empty && ($urandom % 2 == 0);
    if (re) begin
      check(exp_q.size() > 0 && rdata == exp_q.pop_front(), "read data in order");
      n_read++;
    end
  end

  initial begin
    time t_w;
    repeat (3) @(posedge wclk);
    rstn = 1;
    @(negedge rclk);
    check(empty, "empty after reset");
    // Fill without reads.
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge wclk);
      check(!full && int'(wr_free) == DEPTH - i, "free count while filling");
      we = 1; wdata = $urandom; exp_q.push_back(wdata);
      if (i == 0) t_w = $time;
      @(posedge wclk);
      if (i == 0) begin
        fork
          begin
            @(negedge rclk);
            while (empty) @(negedge rclk);
            check($time - t_w <= 7 + 3 * 6, "first word latency");
          end
        join_none
      end
    end
    @(negedge wclk);
    we = 0;
    check(full && wr_free == 0, "full after DEPTH writes");
    reader_on = 1;
    // Random traffic.
    for (int i = 0; i < 2000; i++) begin
      @(negedge wclk);
      we = !full && ($urandom % 3 != 0);
      if (we) begin
        wdata = $urandom;
        exp_q.push_back(wdata);
      end
    end
    @(negedge wclk) we = 0;
    repeat (40) @(negedge wclk);
    check(exp_q.size() == 0 && empty, "everything read");
    check(int'(rd_count_w) == (n_read % (2 * DEPTH)), "read count seen by writer");
    check(wr_free == 4'(DEPTH), "all free at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
