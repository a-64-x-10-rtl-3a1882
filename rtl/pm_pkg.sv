// pm_pkg: types and constants shared by the packetizer/multiplexer (PM) blocks.
//
// Frame arithmetic: each 50 Mb/s output carries four channels in turn.
// One channel slot is 10 header bits + 44 data bits + 1 spacer bit = 55 bit
// times of the 50 MHz clock, i.e. exactly 11 periods of the 10 MHz clock.
// Four slots make a 220-cycle frame (4.4 us), in which each 10 Mb/s input
// delivers exactly 44 bits: the buffers neither fill up nor run dry.
// The 44/9/35/10/1 sizes and the 4:1 ratio follow the document; the header
// bit order and the three fixed control bits are this design's choice.
package pm_pkg;

  localparam int unsigned N_CH       = 4;    // channels per datapath block
  localparam int unsigned HEAD_BITS  = 9;    // double-buffered head of a channel buffer
  localparam int unsigned TAIL_BITS  = 35;   // single tail shift register
  localparam int unsigned DATA_BITS  = HEAD_BITS + TAIL_BITS;  // 44
  localparam int unsigned HDR_BITS   = 10;   // packet header length
  localparam int unsigned SPACER_BITS = 1;
  localparam int unsigned SLOT_CYC   = HDR_BITS + DATA_BITS + SPACER_BITS; // 55
  localparam int unsigned RATIO      = 5;    // 50 MHz / 10 MHz
  localparam int unsigned PROG_BITS  = 7;    // programmable header bits
  localparam int unsigned ADDR_BITS  = 6;    // destination address bits

  // Three header control bits are hard-wired; they are sent first.
  // The leading 1 marks the start of a packet after the 0 spacer bit.
  localparam logic [2:0] HDR_FIXED = 3'b100;

  // Output selection of the header-or-data multiplexer.
  typedef enum logic [1:0] {
    OUT_IDLE   = 2'd0,   // before the first 10 MHz edge after reset
    OUT_HDR    = 2'd1,
    OUT_DATA   = 2'd2,
    OUT_SPACER = 2'd3
  } out_sel_e;

  // Buffer state of Fig. 4, encoded as {bank, transmit}.
  typedef enum logic [1:0] {
    RX_A = 2'b00,
    TX_A = 2'b01,
    RX_B = 2'b10,
    TX_B = 2'b11
  } cs_state_e;

  // Control bundle broadcast from the central control to every datapath block.
  typedef struct packed {
    logic            running;  // started after reset on a 10 MHz phase-1 edge
    logic            sop;      // first header bit of a packet is being selected
    logic            tick10;   // 10 MHz shift enable (one 50 MHz cycle in five)
    logic [1:0]      slot;     // channel being sent on the output
    out_sel_e        out_sel;  // header / data / spacer
    logic [N_CH-1:0] tx;       // buffer of channel c shifts at 50 MHz
    logic            tx_last;  // last cycle of a transmit window
    logic [N_CH-1:0] hdr_rot;  // header rotator of channel c rotates
  } pm_ctrl_t;

  // Control bundle of the depacketizer side, derived from the slot count.
  typedef struct packed {
    logic running;    // slot timing locked to the incoming sop
    logic tick10;     // 10 MHz output shift enable
    logic hdr_last;   // last header bit is on the input (pos 9)
    logic load;       // data bits are on the input (pos 10..53)
    logic load_end;   // spacer bit is on the input (pos 54)
  } dp_ctrl_t;

  // Header as sent, first bit at the MSB: fixed control bits, the programmable
  // control bit, then the destination address, most significant bit first.
  function automatic logic [HDR_BITS-1:0] make_header(logic [PROG_BITS-1:0] prog);
    return {HDR_FIXED, prog};
  endfunction

endpackage
