// header_rotator: storage for the 10-bit packet header of one channel.
//
// A 10-bit rotator: while rot is high it rotates by one bit per 50 MHz cycle
// and dout shows the bit being sent, first header bit first. After the ten
// cycles of a header it is back where it started, so the stored header is
// never lost and no separate copy or bit counter is needed. The rotator and
// its 50 MHz clock follow the document (Fig. 3b); the write port is this
// design's own: when we is high (and rot is low) the header is replaced by
// the three hard-wired control bits followed by the 7 programmed bits.
// Reset loads the fixed bits and zeros.
module header_rotator
  import pm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 rot,
  input  logic                 we,
  input  logic [PROG_BITS-1:0] wdata,
  output logic                 dout
);

  logic [HDR_BITS-1:0] hdr;

  always_ff @(posedge clk) begin
    if (rst)
      hdr <= make_header('0);
    else if (rot)
      hdr <= {hdr[HDR_BITS-2:0], hdr[HDR_BITS-1]};
    else if (we)
      hdr <= make_header(wdata);
  end

  assign dout = hdr[HDR_BITS-1];

  assert property (@(posedge clk) disable iff (rst) !(we && rot))
    else $error("header_rotator: write while rotating");

endmodule
