// hdr_prog: header programming port of the PM chip.
//
// The document's 14 programming inputs: a 6-bit channel number, 7 header data
// lines and a programming strobe. Each rising edge of prog_strobe captures
// the channel number and data. The write is then issued to the header
// rotator of that channel, except while that rotator is sending a header
// (it is turning and a parallel load would misplace the bits); it is held
// until the header has been sent, at most 10 cycles. A later strobe
// overwrites a write still held. Channel number n is input n, i.e. datapath
// block n/4, channel n%4. The inputs are assumed synchronous to the 50 MHz
// clock; the capture register, the hold rule and the channel mapping are
// this design's choices.
//
// Outputs: wr (one cycle), wr_blk (datapath block), wr_ch (channel in the
// block), wr_data. Latency from the strobe edge to wr: 1 cycle if the
// target is idle.
module hdr_prog
  import pm_pkg::*;
#(
  parameter int unsigned N_BLK = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [ADDR_BITS-1:0]     prog_addr,
  input  logic [PROG_BITS-1:0]     prog_data,
  input  logic                     prog_strobe,
  input  logic [N_CH-1:0]          busy,      // rotator of channel c is turning
  output logic                     wr,
  output logic [$clog2(N_BLK)-1:0] wr_blk,
  output logic [1:0]               wr_ch,
  output logic [PROG_BITS-1:0]     wr_data
);

  logic                 strobe_q;
  logic                 pend;
  logic [ADDR_BITS-1:0] pend_addr;
  logic [PROG_BITS-1:0] pend_data;

  assign wr_ch   = pend_addr[1:0];
  assign wr_blk  = pend_addr[2 +: $clog2(N_BLK)];
  assign wr_data = pend_data;
  assign wr      = pend && !busy[wr_ch];

  always_ff @(posedge clk) begin
    if (rst) begin
      strobe_q  <= 1'b0;
      pend      <= 1'b0;
      pend_addr <= '0;
      pend_data <= '0;
    end else begin
      strobe_q <= prog_strobe;
      if (prog_strobe && !strobe_q) begin
        pend      <= 1'b1;
        pend_addr <= prog_addr;
        pend_data <= prog_data;
      end else if (wr) begin
        pend <= 1'b0;
      end
    end
  end

endmodule
