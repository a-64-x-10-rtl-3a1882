// tdm_datapath: 4-to-1 time-domain multiplexer and packetizer (one of the
// 16 identical datapath blocks of the PM chip).
//
// Four clock-switched channel buffers (cs_buffer) and four 10-bit header
// rotators (header_rotator) feed two 4:1 channel-select multiplexers, one
// for data and one for headers, and a header-or-data multiplexer drives the
// 50 Mb/s output. Each packet on the output is: 10 header bits, the
// channel's 44 buffered data bits (oldest first), one spacer bit (0). The
// four channels follow one another in slot order 0,1,2,3. This arrangement
// is that of the document's Fig. 3b; the spacer value and the output
// register are this design's choices.
//
// Timing: all sequencing comes from the shared control bundle ctrl
// (pm_control). dout is registered: it shows the bit selected in the
// previous cycle. Header writes (hdr_we, hdr_ch, hdr_wdata) go to the
// rotator of channel hdr_ch and must not hit a rotator that is turning.
module tdm_datapath
  import pm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  pm_ctrl_t             ctrl,
  input  logic [N_CH-1:0]      din,
  input  logic                 hdr_we,
  input  logic [1:0]           hdr_ch,
  input  logic [PROG_BITS-1:0] hdr_wdata,
  output logic                 dout
);

  logic [N_CH-1:0] buf_out, hdr_out;
  cs_state_e       buf_state [N_CH];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    cs_buffer u_buf (
      .clk     (clk),
      .rst     (rst),
      .tick10  (ctrl.tick10),
      .tx      (ctrl.tx[c]),
      .tx_last (ctrl.tx_last && ctrl.tx[c]),
      .din     (din[c]),
      .dout    (buf_out[c]),
      .state   (buf_state[c])
    );
    header_rotator u_hdr (
      .clk   (clk),
      .rst   (rst),
      .rot   (ctrl.hdr_rot[c]),
      .we    (hdr_we && hdr_ch == 2'(c)),
      .wdata (hdr_wdata),
      .dout  (hdr_out[c])
    );
  end

  logic out_bit;
  always_comb begin
    unique case (ctrl.out_sel)
      OUT_HDR:  out_bit = hdr_out[ctrl.slot];
      OUT_DATA: out_bit = buf_out[ctrl.slot];
      default:  out_bit = 1'b0;   // idle and spacer
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) dout <= 1'b0;
    else     dout <= out_bit;
  end

  // A packet starts with its header, and nothing is sent before the start.
  assert property (@(posedge clk) disable iff (rst) ctrl.sop |-> ctrl.out_sel == OUT_HDR)
    else $error("tdm_datapath: packet start outside a header");
  assert property (@(posedge clk) disable iff (rst) !ctrl.running |-> ctrl.out_sel == OUT_IDLE)
    else $error("tdm_datapath: output selected before the start");

  // Only the selected channel's buffer may be transmitting while data is sent.
  assert property (@(posedge clk) disable iff (rst)
                   ctrl.out_sel == OUT_DATA |-> buf_state[ctrl.slot] inside {TX_A, TX_B})
    else $error("tdm_datapath: data selected from a buffer that is not transmitting");

endmodule
