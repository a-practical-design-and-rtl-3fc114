// tb_ni_header_builder -- checks the header layout: marker in bits 31:27,
// packet length in 26:23, credit in 22:18, routing path in 17:0, and a zero
// word while the builder is not enabled. Includes the header of the
// reference write (length 3, credit 9, path 0x000FA), which must read
// 0x09A400FA.
module tb_ni_header_builder;
  logic        en;
  logic [3:0]  len;
  logic [4:0]  credit;
  logic [17:0] route;
  logic [31:0] header;
  int checks = 0, failures = 0;

  ni_header_builder dut (.en_hdr_gen (en), .pkt_len (len), .credit (credit),
                         .route (route), .header (header));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    en = 1; len = 4'd3; credit = 5'd9; route = 18'h000FA;
    #1 check(header == 32'h09A4_00FA, "reference header");
    for (int i = 0; i < 200; i++) begin
      en = 1'($urandom); len = 4'($urandom); credit = 5'($urandom); route = 18'($urandom);
      #1;
      if (en) begin
        check(header[31:27] == 5'd1, "marker");
        check(header[26:23] == len, "pkt_len");
        check(header[22:18] == credit, "credit");
        check(header[17:0] == route, "route");
      end else begin
        check(header == 32'd0, "disabled header");
      end
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
