// ni_sync -- two-stage synchronizer into the clock `clk`.
//
// The first stage samples on the falling edge of `clk`, the second on the
// rising edge. The signal is therefore usable on the rising edge one and a
// half periods after it changed, instead of two periods, while the first
// flop still has half a period to resolve. Sampling on the falling edge of
// the network clock is what the design uses to take start-of-packet into
// the network domain; using the same cell for the FIFO pointers is this
// implementation's choice.
//
// Interface: `d` from another clock domain, `q` in the `clk` domain. Only a
// bus in which one bit changes at a time (a Gray-coded pointer) may be
// passed through this cell. Asynchronous active-low reset clears both stages.
module ni_sync #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rstn,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] stage1;

  always_ff @(negedge clk or negedge rstn) begin
    if (!rstn) stage1 <= '0;
    else       stage1 <= d;
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) q <= '0;
    else       q <= stage1;
  end

endmodule
