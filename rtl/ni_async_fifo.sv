// ni_async_fifo -- dual-clock FIFO between the IP clock and the network clock.
//
// The NI keeps one such FIFO for the messages the AXI shell sends (written
// with the IP clock, read with the network clock) and one for the messages
// it receives (written with the network clock, read with the IP clock).
// The design asks for a FIFO that crosses clock domains without
// metastability and with little stall; how it is built is this
// implementation's choice: a classic Gray-code pointer FIFO. Each side keeps
// a binary pointer one bit wider than the address and its Gray image; the
// Gray pointer of the other side comes through an `ni_sync` (falling then
// rising edge of the local clock). `full` and `empty` are therefore
// pessimistic for about two clock periods after the other side moved, never
// optimistic.
//
// Interface: write side `we`/`wdata`/`full` on `wclk`; read side
// `re`/`rdata`/`empty` on `rclk`; `rdata` shows the oldest word (show-ahead)
// and `re` pops it. `we` with `full`, or `re` with `empty`, is a protocol
// error (asserted). `rd_count_w` is the read pointer as seen in the write
// domain: the number of words read so far, modulo 2*DEPTH; the credit logic
// uses it to learn how much space the reader has freed. `wr_free` is the
// number of free entries as seen by the writer. DEPTH must be a
// power of two, at least 4. One asynchronous active-low reset for both
// sides.
module ni_async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wclk,
  input  logic             rclk,
  input  logic             rstn,
  // write side (wclk)
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic [$clog2(DEPTH):0] rd_count_w,
  output logic [$clog2(DEPTH):0] wr_free,
  // read side (rclk)
  input  logic             re,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_r;   // write pointer seen in the read domain
  logic [AW:0] rgray_w;   // read pointer seen in the write domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  always_ff @(posedge wclk or negedge rstn) begin
    if (!rstn) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (we && !full) begin
      wbin  <= wbin + 1'b1;
      wgray <= bin2gray(wbin + 1'b1);
    end
  end

  always_ff @(posedge wclk) begin
    if (we && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  ni_sync #(.WIDTH(AW + 1)) u_sync_r2w (
    .clk (wclk), .rstn (rstn), .d (rgray), .q (rgray_w)
  );

  // Full: the write pointer is one lap ahead of the read pointer.
  assign full       = (wgray == {~rgray_w[AW:AW-1], rgray_w[AW-2:0]});
  assign rd_count_w = gray2bin(rgray_w);
  assign wr_free    = (AW+1)'(DEPTH) - (wbin - rd_count_w);

  // ---------------- read side ----------------
  always_ff @(posedge rclk or negedge rstn) begin
    if (!rstn) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (re && !empty) begin
      rbin  <= rbin + 1'b1;
      rgray <= bin2gray(rbin + 1'b1);
    end
  end

  ni_sync #(.WIDTH(AW + 1)) u_sync_w2r (
    .clk (rclk), .rstn (rstn), .d (wgray), .q (wgray_r)
  );

  assign empty = (rgray == wgray_r);
  assign rdata = mem[rbin[AW-1:0]];

  // ---------------- protocol checks ----------------
  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("ni_async_fifo: DEPTH must be a power of two, at least 4");
  end

  a_no_overflow : assert property (@(posedge wclk) disable iff (!rstn) !(we && full))
    else $error("ni_async_fifo: write while full");
  a_no_underflow : assert property (@(posedge rclk) disable iff (!rstn) !(re && empty))
    else $error("ni_async_fifo: read while empty");

endmodule
