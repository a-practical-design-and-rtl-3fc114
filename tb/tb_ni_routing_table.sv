// tb_ni_routing_table -- checks that every destination returns its own
// path, for a table of four distinct paths, and that the default table
// returns 0x000FA.
module tb_ni_routing_table;
  localparam logic [17:0] R [4] = '{18'h00011, 18'h2A5C3, 18'h3FFFF, 18'h10204};
  logic [1:0]  dest;
  logic [17:0] route, route_def;
  int checks = 0, failures = 0;

  ni_routing_table #(.NUM_DEST (4), .ROUTES (R)) dut (.dest (dest), .route (route));
  ni_routing_table dut_def (.dest (dest), .route (route_def));

  initial begin
    for (int rep = 0; rep < 3; rep++)
      for (int d = 0; d < 4; d++) begin
        dest = 2'(d);
        #1;
        checks++;
        if (route != R[d]) begin failures++; $display("FAIL dest %0d: %h", d, route); end
        checks++;
        if (route_def != 18'h000FA) begin failures++; $display("FAIL default dest %0d", d); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
