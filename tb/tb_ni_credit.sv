// tb_ni_credit -- drives the receive FIFO read count and header events into
// the Credit block and checks, every cycle, the credit it offers (entries
// drained and not yet reported, at most 31) and the reservation verdict
// (outstanding - credit + response size <= RX_DEPTH) against a reference.
module tb_ni_credit;
  localparam int RX = 32;
  logic       clk = 0, rstn = 0;
  logic [5:0] rd_count = 0;
  logic       take = 0;
  logic [4:0] resp_need = 0, credit;
  logic       rsv_ok;
  int drained = 0, reported = 0, outstanding = 0;
  int checks = 0, failures = 0;
  int n_cap = 0, n_block = 0;

  always #5 clk = ~clk;

  ni_credit #(.RX_DEPTH (RX)) dut (
    .clk_out (clk), .rstn (rstn), .rd_count (rd_count), .take (take),
    .resp_need (resp_need), .rsv_ok (rsv_ok), .credit (credit)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rstn = 1;
    for (int i = 0; i < 2000; i++) begin
      int owed, exp_credit, n;
      @(negedge clk);
      // Drain a message only if it was reserved and not yet reported.
      if ((drained - reported) < outstanding && ($urandom % 3 == 0)) begin
        drained++;
        rd_count = 6'(drained);
      end
      #1;
      owed = drained - reported;
      exp_credit = (owed > 31) ? 31 : owed;
      if (owed > 31) n_cap++;
      check(int'(credit) == exp_credit, "credit value");
      n = ($urandom % 2) ? 1 : 2 + int'($urandom % 16);
      resp_need = 5'(n);
      #1;
      check(rsv_ok == (outstanding - exp_credit + n <= RX), "reservation verdict");
      if (!rsv_ok) n_block++;
      take = rsv_ok && ($urandom % 4 == 0);
      @(posedge clk);
      if (take) begin
        reported    += exp_credit;
        outstanding  = outstanding - exp_credit + n;
      end
      #1 take = 0;
    end
    check(n_block > 0, "reservation blocked at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
