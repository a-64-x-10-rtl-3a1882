// pm_control: central control logic of the PM chip.
//
// One instance sequences all 16 datapath blocks, which run in lock step.
// After reset it waits for the first rising edge of the 10 MHz phase-1 clock
// (strobe10, a one-cycle marker in the 50 MHz domain), as the document
// requires, so that every state machine starts at a known position relative
// to the 10 MHz clock. From then on it counts 50 MHz cycles:
//   pos  0..54 within a channel slot, slot 0..3 within a 220-cycle frame,
//   ph   0..4 within a 10 MHz period; tick10 is high when ph = 4, which is
//        the cycle of the following 10 MHz edges.
// Per slot: pos 0-9 header (the slot's rotator turns), pos 10-53 data,
// pos 54 spacer; the slot's buffer is in a transmit state for pos 10-54
// (45 cycles, exactly nine 10 MHz periods, so the switched clocks change
// only at 10 MHz period boundaries, as the document prescribes).
// The counters and this slot layout are this design's choice; the 10/44/1
// bit counts and the reset behaviour follow the document.
// An assertion checks that strobe10 stays aligned with tick10.
module pm_control
  import pm_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     strobe10,
  output pm_ctrl_t ctrl
);

  logic       running;
  logic [5:0] pos;
  logic [1:0] slot;
  logic [2:0] ph;

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      pos     <= '0;
      slot    <= '0;
      ph      <= '0;
    end else if (!running) begin
      if (strobe10) running <= 1'b1;
    end else begin
      ph <= (ph == 3'(RATIO - 1)) ? '0 : ph + 3'd1;
      if (pos == 6'(SLOT_CYC - 1)) begin
        pos  <= '0;
        slot <= slot + 2'd1;
      end else begin
        pos <= pos + 6'd1;
      end
    end
  end

  logic in_hdr, in_data, in_tx;
  assign in_hdr  = pos < 6'(HDR_BITS);
  assign in_data = !in_hdr && pos < 6'(HDR_BITS + DATA_BITS);
  assign in_tx   = !in_hdr;

  always_comb begin
    ctrl.running = running;
    ctrl.sop     = running && pos == '0;
    ctrl.tick10  = running && ph == 3'(RATIO - 1);
    ctrl.slot    = slot;
    if (!running)     ctrl.out_sel = OUT_IDLE;
    else if (in_hdr)  ctrl.out_sel = OUT_HDR;
    else if (in_data) ctrl.out_sel = OUT_DATA;
    else              ctrl.out_sel = OUT_SPACER;
    ctrl.tx_last = running && pos == 6'(SLOT_CYC - 1);
    for (int c = 0; c < N_CH; c++) begin
      ctrl.tx[c]      = running && in_tx  && slot == 2'(c);
      ctrl.hdr_rot[c] = running && in_hdr && slot == 2'(c);
    end
  end

  assert property (@(posedge clk) disable iff (rst || !running) strobe10 == ctrl.tick10)
    else $error("pm_control: 10 MHz edge out of step with the 50 MHz count");

endmodule
