// ni_space -- how many messages the remote NI can still take.
//
// End-to-end credit flow control, sending side. The counter starts at the
// size of the remote NI's receive buffer (REMOTE_CAPACITY messages). Each
// packet this NI launches uses up as many credits as it carries messages
// (`consume` with `consume_n`, at the header). Each packet header that
// arrives from the remote NI returns the credits in its credit field
// (`credit_vld` with `credit_in`): the number of messages the remote NI has
// drained from its receive buffer since its previous report. The request
// generator starts a packet only while `space` covers it, so the remote
// receive buffer can never overflow.
//
// The design names this block and says that the credit in a header tells
// the other NI how much it may send; counting credits as increments
// (returned entries) rather than an absolute level is this implementation's
// choice, because it stays exact while packets are in flight.
//
// Network clock domain; both updates may happen in the same cycle.
module ni_space #(
  parameter int unsigned SPACE_W         = 8,
  parameter int unsigned REMOTE_CAPACITY = 32
) (
  input  logic               clk_out,
  input  logic               rstn,
  input  logic               credit_vld,
  input  logic [4:0]         credit_in,
  input  logic               consume,
  input  logic [4:0]         consume_n,
  output logic [SPACE_W-1:0] space
);

  logic [SPACE_W-1:0] add, sub;

  assign add = credit_vld ? SPACE_W'(credit_in) : '0;
  assign sub = consume    ? SPACE_W'(consume_n) : '0;

  always_ff @(posedge clk_out or negedge rstn) begin
    if (!rstn) space <= SPACE_W'(REMOTE_CAPACITY);
    else       space <= space + add - sub;
  end

  a_no_underflow : assert property (@(posedge clk_out) disable iff (!rstn) consume |-> (space + add >= sub))
    else $error("ni_space: more messages sent than the remote NI can take");
  a_no_overflow : assert property (@(posedge clk_out) disable iff (!rstn)
                                   (32'(space) + 32'(add) - 32'(sub) <= 32'(REMOTE_CAPACITY)))
    else $error("ni_space: more credit returned than the remote buffer holds");

endmodule
