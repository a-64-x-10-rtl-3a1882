// dp_control_tb: self-checking test of the depacketizer slot timing.
//
// After reset, sop_in is withheld for a random time (all outputs must stay
// low), then given once and every 55 cycles after. Each output is compared
// every cycle with a schedule computed from the cycle count k since the
// first marker: hdr_last at pos 9, load at 10..53, load_end at 54,
// tick10 when k % 5 == 4, with pos = k % 55; 11 ticks per slot.
module dp_control_tb;
  import pm_pkg::*;
  logic     clk = 1'b0;
  logic     rst = 1'b1;
  logic     sop_in = 1'b0;
  dp_ctrl_t ctrl;
  int checks = 0, failures = 0;

  dp_control dut (.clk, .rst, .sop_in, .ctrl);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp, int k);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s got %0d exp %0d", k, what, got, exp);
    end
  endtask

  initial begin
    int ticks;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat ($urandom_range(2, 20)) begin
      @(negedge clk);
      expect_eq("idle", int'(ctrl), 0, -1);
    end
    ticks = 0;
    for (int k = 0; k < 20 * 55; k++) begin
      int pos;
      pos = k % 55;
      sop_in = pos == 0;
      #1;
      if (k > 0) expect_eq("running", int'(ctrl.running), 1, k);
      expect_eq("hdr_last", int'(ctrl.hdr_last), int'(pos == 9), k);
      expect_eq("load", int'(ctrl.load), int'(pos >= 10 && pos < 54), k);
      expect_eq("load_end", int'(ctrl.load_end), int'(pos == 54), k);
      expect_eq("tick10", int'(ctrl.tick10), int'(k % 5 == 4), k);
      ticks += int'(ctrl.tick10);
      if (pos == 54) begin
        expect_eq("ticks per slot", ticks, 11, k);
        ticks = 0;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
