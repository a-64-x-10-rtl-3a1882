// cs_buffer: clock-switched input/output buffer of one 10 Mb/s channel.
//
// The buffer is a 44-bit serial FIFO built from two 9-bit head registers
// (A and B) and one 35-bit tail register. A head register chained to the
// tail forms the packet being assembled or sent; the other head register
// catches the input bits that arrive while a packet is being sent. The
// buffer cycles through the four states of the document's Fig. 4:
//   RX_A  A + tail shift at 10 MHz, input enters A, B idle
//   TX_A  A + tail shift at 50 MHz and are emptied, B takes input at 10 MHz
//   RX_B  B + tail shift at 10 MHz, input enters B, A idle
//   TX_B  mirror of TX_A
// The structure and the four states follow the document. In the document the
// registers get a switched 10/50 MHz clock; here every register runs on the
// 50 MHz clock and the switched clock becomes a clock enable (tick10 for
// 10 MHz, always for 50 MHz), which is the synthesizable equivalent.
//
// Interface: din is sampled on cycles with tick10 high. tx is high for the
// 45 cycles of this channel's transmit window (44 data bits and the spacer);
// tx_last marks its final cycle, after which the bank toggles (A <-> B).
// dout is the serial end of the tail register: during the window it shows
// the oldest buffered bit first, one new bit per cycle, no extra latency.
// Bits shifted into a head register while it empties are zeros.
module cs_buffer
  import pm_pkg::*;
#(
  parameter int unsigned HEAD = HEAD_BITS,
  parameter int unsigned TAIL = TAIL_BITS
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      tick10,
  input  logic      tx,
  input  logic      tx_last,
  input  logic      din,
  output logic      dout,
  output cs_state_e state
);

  logic [HEAD-1:0] head_a, head_b;
  logic [TAIL-1:0] tail;
  logic            bank;     // 0: A is chained to the tail, 1: B is

  assign state = cs_state_e'({bank, tx});

  // Switched clocks, as enables: the chained pair runs at 50 MHz while
  // transmitting and at 10 MHz otherwise; the other head register runs at
  // 10 MHz while transmitting and is idle otherwise.
  logic en_chain, en_other;
  assign en_chain = tx | tick10;
  assign en_other = tx & tick10;

  logic chain_out;           // serial output of the chained head register
  assign chain_out = bank ? head_b[HEAD-1] : head_a[HEAD-1];

  logic chain_in;            // input of the chained head register
  assign chain_in = tx ? 1'b0 : din;

  always_ff @(posedge clk) begin
    if (rst) begin
      head_a <= '0;
      head_b <= '0;
      tail   <= '0;
      bank   <= 1'b0;
    end else begin
      if (en_chain) begin
        tail <= {tail[TAIL-2:0], chain_out};
        if (bank) head_b <= {head_b[HEAD-2:0], chain_in};
        else      head_a <= {head_a[HEAD-2:0], chain_in};
      end
      if (en_other) begin
        if (bank) head_a <= {head_a[HEAD-2:0], din};
        else      head_b <= {head_b[HEAD-2:0], din};
      end
      if (tx && tx_last) bank <= ~bank;
    end
  end

  assign dout = tail[TAIL-1];

  // The window end is only meaningful inside a window.
  assert property (@(posedge clk) disable iff (rst) tx_last |-> tx)
    else $error("cs_buffer: tx_last outside a transmit window");

endmodule
