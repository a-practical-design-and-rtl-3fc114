// ni_credit -- credit this NI reports to the remote NI.
//
// End-to-end credit flow control, receiving side. The shell drains the
// receive FIFO in the IP clock domain; the FIFO hands its read pointer,
// Gray-coded and synchronized, to the network domain as `rd_count` (words
// read so far, modulo 2*RX_DEPTH). This block remembers how many of those
// reads it has already reported; the difference is the credit still owed
// to the remote NI, capped at 31 because the header's credit field has five
// bits. Whenever a header is built (`take`, i.e. en_hdr_gen), the current
// `credit` value goes into it and counts as reported; the rest waits for
// the next header.
//
// Response reservation. Credits for this NI's receive FIFO travel only in
// the headers of its own requests, so the remote NI could be left holding
// a response it has no credit for while this NI has nothing more to send.
// To rule that out, this block also counts `outstanding`: response messages
// of launched requests plus received messages not yet reported as credit.
// A request may start only if its response still fits (`rsv_ok`:
// outstanding - credit + resp_need <= RX_DEPTH, where `credit` is what its
// own header will report). Then the remote NI always holds enough credit for
// every response it owes. This reservation is this implementation's
// addition; the design only says that the credit tells the other side how
// much this NI can receive.
//
// Network clock domain. Credits are increments: the remote NI adds them to
// its Space counter. RX_DEPTH must be a power of two.
module ni_credit #(
  parameter int unsigned RX_DEPTH = 32,
  localparam int unsigned CW = $clog2(RX_DEPTH) + 1
) (
  input  logic          clk_out,
  input  logic          rstn,
  input  logic [CW-1:0] rd_count,
  input  logic          take,
  input  logic [4:0]    resp_need,
  output logic          rsv_ok,
  output logic [4:0]    credit
);

  logic [CW-1:0] reported;
  logic [CW-1:0] owed;
  logic [CW:0]   outstanding;
  logic [CW:0]   after_take;

  assign owed   = rd_count - reported;
  assign credit = (32'(owed) > 31) ? 5'd31 : 5'(owed);

  assign after_take = outstanding - (CW+1)'(credit) + (CW+1)'(resp_need);
  assign rsv_ok     = (32'(after_take) <= 32'(RX_DEPTH));

  always_ff @(posedge clk_out or negedge rstn) begin
    if (!rstn) begin
      reported    <= '0;
      outstanding <= '0;
    end else if (take) begin
      reported    <= reported + CW'(credit);
      outstanding <= after_take;
    end
  end

  a_take_only_if_room : assert property (@(posedge clk_out) disable iff (!rstn) take |-> rsv_ok)
    else $error("ni_credit: request launched without room for its response");

endmodule
