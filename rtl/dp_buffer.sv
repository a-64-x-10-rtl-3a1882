// dp_buffer: clock-switched output buffer of one 10 Mb/s output channel of
// the depacketizer/demultiplexer.
//
// The mirror image of the multiplexer's cs_buffer: a 35-bit body register
// feeds one of two 9-bit head registers (A, B) whose end is the output. A
// packet's 44 data bits are loaded at 50 MHz into the body and one head
// (bank), so that its first 9 bits end up in the head. While that happens
// the other head still sends the last 9 bits of the previous packet at
// 10 MHz. Then the bank toggles and the loaded chain (body + head) is sent
// at 10 MHz: 35 bits until the next packet arrives, the last 9 during its
// load. Per 220-cycle frame: 44 bits in, 44 bits out, no gap.
// The document states only that the depacketizer uses the same
// clock-switched buffer technique; this arrangement of it, the clock
// enables in place of switched clocks and the interface are this design's.
//
// Interface: load is high on the 44 cycles that carry this channel's data
// bits, load_end on the cycle after (the spacer), where the bank toggles.
// tick10 is the 10 MHz output shift enable. dout is a register bit and
// changes only after a tick or a bank toggle. Packets must come one per
// frame, in a fixed slot; a missing packet leaves zeros, a second one in the
// same frame replaces the chain being sent.
module dp_buffer
  import pm_pkg::*;
#(
  parameter int unsigned HEAD = HEAD_BITS,
  parameter int unsigned BODY = TAIL_BITS
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      tick10,
  input  logic      load,
  input  logic      load_end,
  input  logic      din,
  output logic      dout,
  output cs_state_e state    // {head chained to the body, sending}: RX_x = loading
);

  logic [HEAD-1:0] head_a, head_b;
  logic [BODY-1:0] body;
  logic            bank;     // head that is sent: 0 = A, 1 = B

  // While a packet loads, the head not being sent is chained to the body;
  // afterwards the bank toggles and the loaded chain is the one sent.
  logic loading, chain_b;
  assign loading = load | load_end;
  assign chain_b = bank ^ loading;

  assign state = cs_state_e'({chain_b, !loading});

  // Loading: body + chained head run at 50 MHz, the sent head drains at
  // 10 MHz. Otherwise: body + sent head drain together at 10 MHz.
  logic en_chain, en_other;
  assign en_chain = load | (tick10 & !loading);
  assign en_other = loading & tick10;

  logic body_in;
  assign body_in = load ? din : 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      head_a <= '0;
      head_b <= '0;
      body   <= '0;
      bank   <= 1'b1;      // the first packet loads into A
    end else begin
      if (en_chain) begin
        body <= {body[BODY-2:0], body_in};
        if (chain_b) head_b <= {head_b[HEAD-2:0], body[BODY-1]};
        else         head_a <= {head_a[HEAD-2:0], body[BODY-1]};
      end
      if (en_other) begin
        if (bank) head_b <= {head_b[HEAD-2:0], 1'b0};
        else      head_a <= {head_a[HEAD-2:0], 1'b0};
      end
      if (load_end) bank <= ~bank;
    end
  end

  assign dout = bank ? head_b[HEAD-1] : head_a[HEAD-1];

  assert property (@(posedge clk) disable iff (rst) !(load && load_end))
    else $error("dp_buffer: load and load_end together");

endmodule
