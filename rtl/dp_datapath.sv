// dp_datapath: one input of the depacketizer/demultiplexer: strips the
// header of each packet arriving at 50 Mb/s and hands its 44 data bits to
// one of four adjacent 10 Mb/s output channels.
//
// The header bits are shifted into a small register as they arrive. On the
// last header bit the two low destination address bits select the output
// channel, as the document describes; the packet is taken only if its
// three fixed control bits read 1,0,0 (an idle input carries zeros, so
// nothing is taken). The data bits then go to that channel's dp_buffer,
// which turns them into a continuous 10 Mb/s stream. The validity test and
// the interface are this design's choices.
//
// Timing: comes from the shared dp_ctrl_t bundle. din is the serial input;
// dout[c] is channel c's 10 Mb/s output.
module dp_datapath
  import pm_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  dp_ctrl_t        ctrl,
  input  logic            din,
  output logic [N_CH-1:0] dout
);

  logic [HDR_BITS-2:0] hdr;     // header bits 0..8, the first at the MSB
  logic                valid;   // the current packet is taken
  logic [1:0]          dest;    // its output channel

  always_ff @(posedge clk) begin
    if (rst) begin
      hdr   <= '0;
      valid <= 1'b0;
      dest  <= '0;
    end else begin
      hdr <= {hdr[HDR_BITS-3:0], din};
      if (ctrl.hdr_last) begin
        valid <= hdr[HDR_BITS-2 -: 3] == HDR_FIXED;
        dest  <= {hdr[0], din};
      end
    end
  end

  cs_state_e buf_state [N_CH];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic mine;
    assign mine = valid && dest == 2'(c);
    dp_buffer u_buf (
      .clk      (clk),
      .rst      (rst),
      .tick10   (ctrl.tick10),
      .load     (ctrl.load && mine),
      .load_end (ctrl.load_end && mine),
      .din      (din),
      .dout     (dout[c]),
      .state    (buf_state[c])
    );
  end

  // Slot timing only once locked; at most one output loads at a time.
  assert property (@(posedge clk) disable iff (rst) ctrl.load |-> ctrl.running)
    else $error("dp_datapath: load before the slot timing is locked");
  assert property (@(posedge clk) disable iff (rst)
                   $countones({buf_state[3] inside {RX_A, RX_B}, buf_state[2] inside {RX_A, RX_B},
                               buf_state[1] inside {RX_A, RX_B}, buf_state[0] inside {RX_A, RX_B}}) <= 1)
    else $error("dp_datapath: two outputs loading at once");

endmodule
