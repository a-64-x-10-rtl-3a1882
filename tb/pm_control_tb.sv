// pm_control_tb: self-checking test of the central control logic.
//
// Holds reset, releases it, and delays the first 10 MHz edge by a random
// number of cycles: the controller must stay idle (no tick, no transmit,
// output idle) until that edge. Afterwards strobe10 is given every fifth
// cycle and each control output is compared every cycle with a schedule
// computed here from the cycle count k since the start:
//   slot = (k / 55) % 4, pos = k % 55, tick10 when k % 5 == 4,
//   header for pos < 10, data for 10..53, spacer at 54, transmit from 10.
// It also counts per frame: 44 ticks, 4 sop, 45 transmit cycles per channel.
module pm_control_tb;
  import pm_pkg::*;

  logic     clk = 1'b0;
  logic     rst = 1'b1;
  logic     strobe10 = 1'b0;
  pm_ctrl_t ctrl;
  int checks = 0, failures = 0;

  pm_control dut (.clk, .rst, .strobe10, .ctrl);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp, int k);
    checks++;
    if (got != exp) begin
      failures++;
      $display("cycle %0d: %s got %0d exp %0d", k, what, got, exp);
    end
  endtask

  initial begin
    int ticks, sops;
    int txc[4];
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat ($urandom_range(3, 12)) begin
      @(negedge clk);
      expect_eq("idle running", int'(ctrl.running), 0, -1);
      expect_eq("idle tick", int'(ctrl.tick10), 0, -1);
      expect_eq("idle tx", int'(ctrl.tx), 0, -1);
      expect_eq("idle out_sel", int'(ctrl.out_sel), int'(OUT_IDLE), -1);
    end
    strobe10 = 1'b1;
    @(negedge clk);
    ticks = 0; sops = 0; txc = '{default: 0};
    for (int k = 0; k < 3 * 220; k++) begin
      int slot, pos;
      out_sel_e es;
      slot = (k / 55) % 4;
      pos  = k % 55;
      es = pos < 10 ? OUT_HDR : (pos < 54 ? OUT_DATA : OUT_SPACER);
      strobe10 = (k % 5) == 4;
      #1;
      expect_eq("running", int'(ctrl.running), 1, k);
      expect_eq("tick10", int'(ctrl.tick10), int'((k % 5) == 4), k);
      expect_eq("slot", int'(ctrl.slot), slot, k);
      expect_eq("out_sel", int'(ctrl.out_sel), int'(es), k);
      expect_eq("sop", int'(ctrl.sop), int'(pos == 0), k);
      expect_eq("tx_last", int'(ctrl.tx_last), int'(pos == 54), k);
      expect_eq("tx", int'(ctrl.tx), pos >= 10 ? (1 << slot) : 0, k);
      expect_eq("hdr_rot", int'(ctrl.hdr_rot), pos < 10 ? (1 << slot) : 0, k);
      ticks += int'(ctrl.tick10);
      sops  += int'(ctrl.sop);
      for (int c = 0; c < 4; c++) txc[c] += int'(ctrl.tx[c]);
      if (k % 220 == 219) begin
        expect_eq("ticks per frame", ticks, 44, k);
        expect_eq("sop per frame", sops, 4, k);
        for (int c = 0; c < 4; c++) expect_eq("tx cycles", txc[c], 45, k);
        ticks = 0; sops = 0; txc = '{default: 0};
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
