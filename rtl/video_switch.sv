// video_switch: the two chips of a 64 x 64 hierarchical-multiplexing video
// switch, the packetizer/multiplexer (pm_chip) and the depacketizer/
// demultiplexer (dp_chip), with the 16 x 16 packet switch that sits between
// them left outside.
//
// 64 continuous 10 Mb/s inputs are packetized and multiplexed four to one
// onto 16 x 50 Mb/s links (pm_dout, with pm_sop on each first header bit).
// An external packet switch routes each packet by the high four bits of its
// 6-bit destination address and returns slot-aligned streams (dp_din,
// dp_sop). The depacketizer routes each packet by the low two address bits
// to one of four adjacent outputs and restores 64 continuous 10 Mb/s
// streams (dp_dout, advancing on dp_tick10). Headers are programmed through
// the 14-line port (prog_*). The system arrangement follows the document;
// leaving the switch outside is because its design is not part of this one.
//
// Both chips share the 50 MHz clock clk and reset rst; strobe10 marks the
// 10 MHz phase-1 edges for the multiplexer. The cs_* ports belong to the
// multiplexer's clock-switching cell.
module video_switch
  import pm_pkg::*;
#(
  parameter int unsigned N_BLK = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   strobe10,
  input  logic [N_BLK*N_CH-1:0]  pm_din,
  input  logic [ADDR_BITS-1:0]   prog_addr,
  input  logic [PROG_BITS-1:0]   prog_data,
  input  logic                   prog_strobe,
  output logic [N_BLK-1:0]       pm_dout,
  output logic                   pm_sop,
  input  logic [N_BLK-1:0]       dp_din,
  input  logic                   dp_sop,
  output logic [N_BLK*N_CH-1:0]  dp_dout,
  output logic                   dp_tick10,
  input  logic                   cs_ph1_50,
  input  logic                   cs_ph2_50,
  input  logic                   cs_ph1_10,
  input  logic                   cs_ph2_10,
  input  logic                   cs_sel,
  output logic                   cs_sw_ph1,
  output logic                   cs_sw_ph2
);

  pm_chip #(.N_BLK(N_BLK)) u_pm (
    .clk         (clk),
    .rst         (rst),
    .strobe10    (strobe10),
    .din         (pm_din),
    .prog_addr   (prog_addr),
    .prog_data   (prog_data),
    .prog_strobe (prog_strobe),
    .dout        (pm_dout),
    .sop         (pm_sop),
    .cs_ph1_50   (cs_ph1_50),
    .cs_ph2_50   (cs_ph2_50),
    .cs_ph1_10   (cs_ph1_10),
    .cs_ph2_10   (cs_ph2_10),
    .cs_sel      (cs_sel),
    .cs_sw_ph1   (cs_sw_ph1),
    .cs_sw_ph2   (cs_sw_ph2)
  );

  dp_chip #(.N_BLK(N_BLK)) u_dp (
    .clk    (clk),
    .rst    (rst),
    .din    (dp_din),
    .sop_in (dp_sop),
    .dout   (dp_dout),
    .tick10 (dp_tick10)
  );

endmodule
