# AXI network interface for bus-based IP on a network-on-chip

This RTL is a network interface (NI) that connects an AXI master, one that sits on a
conventional local bus with its memories, to a packet-switched network-on-chip. The
bus side and the network side run on unrelated clocks. The NI turns each AXI burst
into one packet and sends it with a source route. It carries the response back as a
packet and replays it on the AXI B or R channel. End-to-end credits make sure
neither end overruns the other's buffers.

The design is based on the NI described in *A Practical Design and Implementation
of On-Chip NI for Integrating Bus Based IP Legacies*. That design drops two fields
that general-purpose NIs carry with every flit:

- **No service-type bits.** The network is assumed to give guaranteed throughput
  through deterministic source routing.
- **No tail marker.** The AXI burst length is known when the address is issued, so
  the length of every packet is known before its data arrives.

The section [Where this RTL departs from the original design](#where-this-rtl-departs-from-the-original-design)
lists every place where this implementation adds to or differs from that
description.

## Structure

```
            IP clock (clk_in)          |            network clock (clk_out)
                                       |
 AXI  ---> ni_shell_axi --messages--> [TX FIFO] --> flit controller --> mux --> reg --> packet_out
 master     (Mealy FSM)          \        |        ^        ^        ^
                                  \--> request generator ---+  header builder <- routing table
                                         (descriptor queue) |        ^
                                                    Space --+     Credit
                                                      ^              ^
 AXI  <--- ni_shell_axi <--messages-- [RX FIFO] <-- packet analyzer <------------- packet_in
```

| Module | Clock | Role |
|---|---|---|
| `ni_top` | both | Shell plus kernel; the unit you instantiate per node. |
| `ni_shell_axi` | IP | AXI-specific: AXI channels to messages and back. |
| `ni_kernel` | both | Protocol-independent: packetizing, clock crossing, flow control. |
| `ni_async_fifo` | both | Dual-clock Gray-pointer FIFO (TX, RX and descriptor queue). |
| `ni_sync` | – | Two-stage synchronizer: falling edge, then rising edge. |
| `ni_request_generator` | both | Finds each request in the message stream and passes it into the network domain. |
| `ni_routing_table` | – | Destination to 18-bit source-route path. |
| `ni_header_builder` | – | Packs the header flit. |
| `ni_flit_controller` | network | Sends the header, then the request's messages from the TX FIFO. |
| `ni_space` | network | Credits held for the remote NI's receive buffer. |
| `ni_credit` | network | Credit owed to the remote NI, and the response reservation. |
| `ni_packet_analyzer` | network | Strips headers, hands credit on, fills the RX FIFO. |
| `ni_pkg` | – | Field layouts (structs) and length functions. |

## Messages and packets

Every word is a 32-bit flit. The shell and the kernel exchange *messages*. On the
network, a packet is one header flit followed by the messages of one request or
one response. Fields are listed from bit 31 down.

| Word | Fields (width) |
|---|---|
| Header | marker (5) = 1 · pkt_len (4) = a_len · credit (5) · routing path (18) |
| Request control | r/w (1), 1 = write · a_burst (2) · a_size (3) · a_len (4) · a_id (4) · fill (18) = 1 |
| Address | AXI address (32) |
| Write data | AXI write data (32), one message per beat |
| Response control | r/b (1), 1 = write response, 0 = read data · resp (2) · a_len (4) · a_id (4) · fill (21) = 1 |
| Read data | AXI read data (32), one message per beat |

What each packet holds:

- **Write request:** header, control, address, then a_len+1 data messages.
- **Read request:** header, control, address.
- **Write response:** header, control.
- **Read response:** header, control, then a_len+1 data messages.

The header's pkt_len is the burst's a_len. A receiver can therefore work out where
every packet ends without a tail bit.

Worked example, the reference transaction used throughout the tests: a write with
awaddr `0000abcd`, awlen 3, awsize 2, awburst 0 (FIXED) and awid 6. It leaves as the
following flits:

1. A header `09A400FA` when the credit field is 9, or `098000FA` when it is 0.
2. The control message `88D80001`.
3. The address `0000ABCD`.
4. The four data words.

## The AXI shell

`ni_shell_axi` is a single Mealy machine with six states:

| State | What happens |
|---|---|
| `IDLE` | Accepts a new request, or goes to serve a waiting response. |
| `SEND_CTRL` | Emits the address message. `awready` (`arready` for a read) is high for exactly this cycle. |
| `SEND_ADDR` | Emits the first write-data message. |
| `SEND_DATA` | Emits the remaining write-data messages. |
| `RCV_RESP` | Reads the response control message. |
| `RCV_DATA` | Forwards read data on the R channel. |

**Address handshake.** In `IDLE`, `awvalid` makes the shell emit the control
message. The address message follows in `SEND_CTRL`, the only cycle in which
`awready` is high. The master therefore holds the address for two cycles, one for
the control message and one for the address, and cannot present the next address
after only one.

**Write data.** Write-data beats are accepted one per cycle. The beat with `wlast`
returns the machine to `IDLE`.

**Reads.** A read runs through `IDLE` and `SEND_CTRL` in the same way, with
`arready`, and returns to `IDLE` after the address. A waiting write address wins
over a waiting read address.

**Responses.**
- A write response is shown on B until `bready`.
- For read data, the shell drops the control message. It then forwards a_len+1 beats
  on R with the `rid` and `rresp` from the control message, and `rlast` on the last
  beat.

**When a request may start.** A request starts only when both of these hold:
- The kernel can take a new request: `fifo_full` is low.
- The TX FIFO has room for the whole request: `tx_room` ≥ a_len+3 for a write, ≥ 2
  for a read.

Once started, the machine never waits for FIFO space, so `wready` is simply high in
the data states. This rule matters because of flow control; see below.

AXI3 `wid` is not used. Write data is expected in address order.

## Transmit path and the clock crossing

The **request generator** watches the shell's writes into the TX FIFO in the IP clock
domain:

1. The first message after a complete request is a control message. Its r/w and
   a_len give the request's length.
2. The next message is the address. Its top log2(NUM_DEST) bits pick the destination.
3. When the address is written, a descriptor {r/w, message count, a_len, destination}
   goes into a 4-entry dual-clock queue. This push is the start-of-packet event.

Every pointer that crosses a clock boundary uses `ni_sync`. Its first flop samples
on the **falling** edge of the receiving clock and its second on the rising edge. A
new request is therefore visible to the network domain one and a half network
periods after it was queued, instead of two.

**Flit controller** (network domain):

1. When a descriptor is waiting and flow control allows it (`pkt_start`), it spends
   one cycle on the header. In that cycle `sel`/`en_hdr_gen` steer the header builder
   into the output register.
2. It then pops one message per cycle from the TX FIFO and counts them (`encnt`,
   `cnt`).
3. `rst_cnt` marks the last message.
4. A queued packet gets its header in the very next cycle, so back-to-back packets
   leave with no gap.

If the FIFO runs dry inside a packet, the controller stalls (`tx_stall`) and sends
no flit in that cycle. This happens when the network clock is much faster than the
IP clock. `packet_out` comes from a register; `pkt_vld` marks each cycle that carries
a flit.

Measured timing for the reference write, from the clock edge that takes the address
to the header on `packet_out`:

| IP clock | Network clock | Header latency | Rest of the packet |
|---|---|---|---|
| 100 MHz | 500 MHz | 4 ns (2 network clocks) | Follows as the data beats arrive. |
| 100 MHz | 75 MHz | 27.7 ns | Leaves as 7 consecutive flits. |

## End-to-end flow control (the subtle part)

Routers have no back-pressure here. Whatever a packet carries must fit into the
receiving NI's RX FIFO. Two counters in the kernel enforce this, counted in messages
(flits after the header).

**Space (`ni_space`): what the remote NI can still take.**
- It starts at `REMOTE_CAPACITY`, the remote RX FIFO depth.
- Each packet sent subtracts its message count.
- Each received header adds its credit field.
- A request leaves only while Space covers it.

**Credit (`ni_credit`): what this NI owes the remote NI.**
- The RX FIFO's read pointer is synchronized into the network domain.
- The number of entries the shell has drained since the last report goes into the
  next outgoing header, up to 31 (the field has 5 bits).
- Credits are increments, not levels, so they stay exact while packets are in flight.

**Response reservation.** This NI's credits travel only inside the headers of its
own requests, so there is a trap. Suppose the remote NI holds a response it has no
credit for. If this NI has no further request to send, the credit never arrives and
the system deadlocks. `ni_credit` therefore also reserves room:

- `outstanding` counts response messages of launched requests plus received messages
  not yet reported.
- A request may leave only if its response still fits:
  `outstanding − credit_now + response_size ≤ RX_DEPTH`. Here `credit_now` is what
  its own header will report.

Under this rule the remote NI always holds enough credit for every response it owes,
whatever the order and size of requests. The shell-side rule above (start a request
only when all of it fits in the TX FIFO) closes the second loop. Without it, the one
shell state machine could wait inside a request for TX space, while the responses
that would free that space wait for the same state machine.

A node that talks to this NI must follow the same conventions:
- Put in every header the messages it drained since its last header.
- Send a packet only while it holds credit for all of its messages.
- Start from credit = this NI's `RX_DEPTH`.

The behavioural remote node in `tb/ni_remote_model.sv` shows exactly that.

## Receive path

**`ni_packet_analyzer`:**
1. Checks the marker of each packet's first flit. A flit without the marker is
   dropped and pulses `hdr_err`.
2. Passes the header's credit to Space.
3. Writes the following messages into the RX FIFO: the control message and, for read
   data, pkt_len+1 data words.

A message that meets a full RX FIFO is dropped and pulses `rx_overflow`. With the
credit rules above this cannot happen. `slave_fifo_full` shows the RX FIFO state.

## Parameters (`ni_top`, `ni_kernel`)

| Parameter | Default | Meaning |
|---|---|---|
| `TX_DEPTH` | 32 | TX FIFO, in messages. Must be ≥ 18, the largest request: control + address + 16 beats. |
| `RX_DEPTH` | 32 | RX FIFO, in messages. Must be ≥ 17, the largest response. |
| `DESC_DEPTH` | 4 | Requests that may wait for the network. |
| `NUM_DEST` | 4 | Destinations; the top address bits select one. |
| `ROUTES` | all `18'h000FA` | Source-route path per destination. Set it per node for your topology; the path encoding belongs to the routers. |
| `REMOTE_CAPACITY` | 32 | RX depth of the NI at the other end (initial Space). |

All depths must be powers of two.

## Interface of `ni_top`

| Signals | Domain | Meaning |
|---|---|---|
| `clk_in`, `clk_out`, `rstn` | – | IP clock, network clock, asynchronous active-low reset for both. |
| `aw*`, `w*`, `ar*`, `r*`, `b*` | IP | AXI slave port for one master. Burst length 1–16 beats, 32-bit data, 4-bit IDs. Responses return in request order. |
| `packet_out`, `pkt_vld` | network | To the router: one 32-bit flit per cycle while `pkt_vld`. |
| `packet_in`, `packet_in_vld` | network | From the router. Must follow the credit rules. |
| `slave_fifo_full`, `hdr_err`, `rx_overflow`, `tx_stall` | network | Status. |

## Simulating

Each testbench is self-checking and ends with `TB_RESULT checks=N failures=M`. It
also has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
          --top-module tb_ni_top rtl/ni_pkg.sv tb/tb_ni_top.sv
obj_dir/Vtb_ni_top
```

Replace `tb_ni_top` with any other testbench.

| Testbench | What it checks |
|---|---|
| `tb_ni_top` | The whole NI at default parameters against `ni_remote_model`, at 100/500 MHz and 100/75 MHz. |
| `tb_ni_kernel` | The kernel with four routes, a 20-message remote buffer and the remote model. |
| `tb_ni_shell_axi` | Shell message streams, the `awready` timing, B and R replay. |
| `tb_ni_async_fifo` | Ordering, full and empty, free count, first-word latency. |
| `tb_ni_request_generator` | Descriptors, `pkt_start` gating. |
| `tb_ni_flit_controller` | The cycle-level sequence, stalls, back-to-back packets. |
| `tb_ni_packet_analyzer` | Parsing, credit, header errors, overflow. |
| `tb_ni_space`, `tb_ni_credit`, `tb_ni_header_builder`, `tb_ni_routing_table` | Against reference arithmetic. |

`tb_ni_top` covers the following:

- **Reference transaction:** its exact flits, and its header latency (at most three
  network clocks).
- **Traffic:** a read-back, then 40 random reads and writes (FIXED and INCR, 1–16
  beats).
- **Back-pressure:** a phase in which the remote node stops answering, so credit runs
  out and the TX FIFO fills.
- **Header error:** one flit without a marker.

It also counts each mechanism and fails if one never happens: FIFO-empty stall,
back-to-back packets, credit block, TX FIFO full, credit returned in both
directions, header error, B and R responses.

The simulator used has two-state logic. Everything that is read is reset.

## Where this RTL departs from the original design

- **Start of packet.** The original raises start-of-packet with the control message.
  Here it comes one message later, with the address, because the destination (and
  so the route) is read from the address. How the original picks the destination is
  not described.
- **What is counted.** The original describes the flit counter as counting to the
  packet length: 4 flits for awlen 3. Its example waveforms, however, show the header
  followed by six messages (control, address, four data). The counter here counts all
  messages of the request.
- **Credit.** The original says the credit field tells the other NI how much it may
  send, without fixing units or semantics. Here credit counts messages and is
  incremental (entries freed since the last report).
- **Example header.** The original's example header shows credit 9 on the first
  packet; here the first packet reports what has been drained so far, which is 0
  after reset.
- **Additions.** The response reservation in `ni_credit`, the "whole request fits"
  start rule in the shell, and the descriptor queue are additions. They are what
  makes the flow control free of deadlock.
- **Read address handling.** Read addresses are handled in the same shell states as
  write addresses. The original's state diagram shows only the write address channel.
- **Response control fill field.** Its width is taken as 21 bits so that the message
  is 32 bits wide.
- **r/b polarity** (1 = write response) is this implementation's choice.
- **Idle flits.** The original's 75 MHz waveform shows an idle network cycle between
  the header and the control message. Here they are back to back.
- **Not built:**
  - The data-integrity check the original lists among NI functions. Its packets have
    no check field, and no code is described.
  - The routers.
  - The slave-side NI: request packet to AXI slave transactions. Only its behaviour is
    modelled, in `tb/ni_remote_model.sv`.
- **Assumed sizes.** FIFO depths, destination count and routes are not given by the
  original and are assumptions.
