// dp_control: slot timing of the depacketizer/demultiplexer.
//
// The incoming packet streams are assumed to be slot-aligned with each
// other and to come with a start-of-packet marker (sop_in) on the first
// header bit, as the multiplexer sends them; the packet switch in between
// is assumed to keep this alignment with a fixed delay. The controller
// waits for the first sop_in after reset, then counts pos 0..54 on its own
// and derives: hdr_last (pos 9), load (pos 10..53), load_end (pos 54,
// the spacer) and the 10 MHz output tick on pos 4, 9, ..., 54. An
// assertion checks that later markers agree with the count. This
// controller is this design's own; the document gives only the function of
// the depacketizer.
module dp_control
  import pm_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     sop_in,
  output dp_ctrl_t ctrl
);

  logic       running;
  logic [5:0] pos;
  logic [2:0] ph;

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      pos     <= '0;
      ph      <= '0;
    end else if (!running) begin
      if (sop_in) begin
        running <= 1'b1;
        pos     <= 6'd1;
        ph      <= 3'd1;
      end
    end else begin
      pos <= (pos == 6'(SLOT_CYC - 1)) ? '0 : pos + 6'd1;
      ph  <= (ph == 3'(RATIO - 1))     ? '0 : ph + 3'd1;
    end
  end

  // Before the first marker, the marker cycle itself is pos 0.
  logic [5:0] cur_pos;
  assign cur_pos = running ? pos : 6'd0;

  always_comb begin
    ctrl.running  = running;
    ctrl.tick10   = running && ph == 3'(RATIO - 1);
    ctrl.hdr_last = running && cur_pos == 6'(HDR_BITS - 1);
    ctrl.load     = running && cur_pos >= 6'(HDR_BITS) && cur_pos < 6'(HDR_BITS + DATA_BITS);
    ctrl.load_end = running && cur_pos == 6'(SLOT_CYC - 1);
  end

  assert property (@(posedge clk) disable iff (rst || !running) sop_in |-> pos == '0)
    else $error("dp_control: packet marker out of step with the slot count");

endmodule
