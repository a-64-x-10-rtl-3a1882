// pm_chip: packetizer / time-domain multiplexer chip, 64 x 10 Mb/s in,
// 16 x 50 Mb/s out.
//
// Sixteen identical datapath blocks (tdm_datapath) each take four
// continuous 10 Mb/s inputs, cut each into 44-bit packets, put a programmed
// 10-bit header in front of each and a spacer bit behind it, and send the
// four channels' packets one after another on one 50 Mb/s output. One
// central controller (pm_control) sequences all blocks in lock step, and the
// programming port (hdr_prog) writes the headers. This structure follows
// the document.
//
// Clocking: clk is the 50 MHz clock. strobe10 is high for one clk cycle at
// each rising edge of the 10 MHz phase-1 clock; after reset the chip starts
// on the first one. Input bit din[n] (channel n = 4*block + channel in the
// block) is sampled on every fifth cycle from then on (the cycles on which
// strobe10 is high). dout[b] is block b's packet stream; sop is high with the
// first header bit of the packets that start on all outputs at once. Frame:
// 220 cycles, four packets of 55 bits per output.
//
// The clock-switching cell (clk_switch) of the document's two-phase clocking
// scheme is brought out on its own ports (cs_*) for characterisation; in this
// synthesizable version the channel buffers use clock enables in place of
// switched clocks, so the cell does not drive them.
module pm_chip
  import pm_pkg::*;
#(
  parameter int unsigned N_BLK = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   strobe10,
  input  logic [N_BLK*N_CH-1:0]  din,
  input  logic [ADDR_BITS-1:0]   prog_addr,
  input  logic [PROG_BITS-1:0]   prog_data,
  input  logic                   prog_strobe,
  output logic [N_BLK-1:0]       dout,
  output logic                   sop,
  // clock-switching cell
  input  logic                   cs_ph1_50,
  input  logic                   cs_ph2_50,
  input  logic                   cs_ph1_10,
  input  logic                   cs_ph2_10,
  input  logic                   cs_sel,
  output logic                   cs_sw_ph1,
  output logic                   cs_sw_ph2
);

  pm_ctrl_t ctrl;

  pm_control u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .strobe10 (strobe10),
    .ctrl     (ctrl)
  );

  logic                     wr;
  logic [$clog2(N_BLK)-1:0] wr_blk;
  logic [1:0]               wr_ch;
  logic [PROG_BITS-1:0]     wr_data;

  hdr_prog #(.N_BLK(N_BLK)) u_prog (
    .clk         (clk),
    .rst         (rst),
    .prog_addr   (prog_addr),
    .prog_data   (prog_data),
    .prog_strobe (prog_strobe),
    .busy        (ctrl.hdr_rot),
    .wr          (wr),
    .wr_blk      (wr_blk),
    .wr_ch       (wr_ch),
    .wr_data     (wr_data)
  );

  for (genvar b = 0; b < N_BLK; b++) begin : g_blk
    tdm_datapath u_dp (
      .clk       (clk),
      .rst       (rst),
      .ctrl      (ctrl),
      .din       (din[b*N_CH +: N_CH]),
      .hdr_we    (wr && wr_blk == $clog2(N_BLK)'(b)),
      .hdr_ch    (wr_ch),
      .hdr_wdata (wr_data),
      .dout      (dout[b])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) sop <= 1'b0;
    else     sop <= ctrl.sop;
  end

  clk_switch u_clk_switch (
    .ph1_50 (cs_ph1_50),
    .ph2_50 (cs_ph2_50),
    .ph1_10 (cs_ph1_10),
    .ph2_10 (cs_ph2_10),
    .sel    (cs_sel),
    .sw_ph1 (cs_sw_ph1),
    .sw_ph2 (cs_sw_ph2)
  );

endmodule
