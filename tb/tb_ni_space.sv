// tb_ni_space -- drives random credit returns and packet launches into the
// Space counter and compares it every cycle with a reference count that
// starts at REMOTE_CAPACITY. Launches are only made when the reference says
// they fit, and returns never exceed what has been used.
module tb_ni_space;
  logic       clk = 0, rstn = 0;
  logic       credit_vld = 0, consume = 0;
  logic [4:0] credit_in = 0, consume_n = 0;
  logic [7:0] space;
  int ref_space = 32;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ni_space #(.SPACE_W (8), .REMOTE_CAPACITY (32)) dut (
    .clk_out (clk), .rstn (rstn), .credit_vld (credit_vld), .credit_in (credit_in),
    .consume (consume), .consume_n (consume_n), .space (space)
  );

  initial begin
    repeat (2) @(posedge clk);
    rstn = 1;
    @(negedge clk);
    checks++; if (space != 8'd32) begin failures++; $display("FAIL reset value"); end
    for (int i = 0; i < 500; i++) begin
      int n, c;
      n = 2 + int'($urandom % 17);
      consume   = ($urandom % 2) && (n <= ref_space);
      consume_n = 5'(n);
      c = int'($urandom % 32);
      if (c > 32 - ref_space) c = 32 - ref_space;
      credit_vld = ($urandom % 2) && c > 0;
      credit_in  = 5'(c);
      @(posedge clk);
      if (credit_vld) ref_space += c;
      if (consume)    ref_space -= n;
      @(negedge clk);
      checks++;
      if (int'(space) != ref_space) begin
        failures++;
        $display("FAIL space %0d expected %0d", space, ref_space);
      end
    end
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
