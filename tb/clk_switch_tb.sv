// clk_switch_tb: self-checking test of the two-phase clock-switching cell.
//
// Generates non-overlapping two-phase clocks on a 1-unit grid:
//   50 MHz: period 20, phase 1 high at 0..7, phase 2 high at 10..17
//   10 MHz: period 100, phase 1 high at 0..47, phase 2 high at 50..97
// The clock select is changed 2 units into a 50 MHz phase-1 pulse at
// offset 80 of a 10 MHz period, the window in which both 10 MHz phases are
// low when the multiplexers switch. Checked every unit: the switched phases
// never overlap (no feedthrough); phase 1 follows the new clock from the
// next phase-2 pulse (offset 90) and phase 2 from the next phase-1 pulse
// (offset 100); every switched pulse is at least 8 units wide (no glitch);
// and each 10 MHz period has 5 rising edges at 50 MHz and 1 at 10 MHz.
module clk_switch_tb;
  logic ph1_50 = 1'b0, ph2_50 = 1'b0, ph1_10 = 1'b0, ph2_10 = 1'b0;
  logic sel = 1'b0;
  logic sw_ph1, sw_ph2;
  int checks = 0, failures = 0;

  clk_switch dut (.ph1_50, .ph2_50, .ph1_10, .ph2_10, .sel, .sw_ph1, .sw_ph2);

  localparam int PERIODS = 60;

  initial begin : watchdog
    #(2 * 100 * (PERIODS + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what, int t);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("t=%0d: %s", t, what);
    end
  endtask

  initial begin
    bit old_sel, new_sel;
    int t_sel;          // time of the last select change
    int w1, w2;         // current high-pulse widths
    int r1, r2;         // rising edges in the current 10 MHz period
    bit p1, p2;
    int switches;
    old_sel = 1'b0; new_sel = 1'b0; t_sel = -1000;
    w1 = 0; w2 = 0; r1 = 0; r2 = 0; p1 = 1'b0; p2 = 1'b0; switches = 0;
    for (int t = 0; t < 100 * PERIODS; t++) begin
      int m50, m10;
      bit e1, e2;
      m50 = t % 20;
      m10 = t % 100;
      ph1_50 = m50 < 8;
      ph2_50 = m50 >= 10 && m50 < 18;
      ph1_10 = m10 < 48;
      ph2_10 = m10 >= 50 && m10 < 98;
      if (m10 == 82 && t > 200 && (t / 100) % 3 == 0) begin
        old_sel = new_sel;
        new_sel = !new_sel;
        sel = new_sel;
        t_sel = t;
        switches++;
      end
      #1;
      if (t >= 40) begin
        // expected sources
        e1 = ((t >= t_sel + 8) ? new_sel : old_sel) ? ph1_10 : ph1_50;
        e2 = ((t >= t_sel + 18) ? new_sel : old_sel) ? ph2_10 : ph2_50;
        check(sw_ph1 == e1, "phase 1 does not follow the selected clock", t);
        check(sw_ph2 == e2, "phase 2 does not follow the selected clock", t);
        check(!(sw_ph1 && sw_ph2), "clock feedthrough: both phases high", t);
        if (sw_ph1) w1++;
        else begin
          if (p1) check(w1 >= 8, "glitch on switched phase 1", t);
          w1 = 0;
        end
        if (sw_ph2) w2++;
        else begin
          if (p2) check(w2 >= 8, "glitch on switched phase 2", t);
          w2 = 0;
        end
        if (sw_ph1 && !p1) r1++;
        if (sw_ph2 && !p2) r2++;
        if (m10 == 99) begin
          // a period that contains no switch runs wholly at one rate
          if (t >= 199 && t - t_sel > 120) begin
            check(r1 == (new_sel ? 1 : 5), "phase 1 rate", t);
            check(r2 == (new_sel ? 1 : 5), "phase 2 rate", t);
          end
          r1 = 0; r2 = 0;
        end
      end
      p1 = sw_ph1; p2 = sw_ph2;
      #1;
    end
    check(switches >= 4, "too few clock switches", 0);
    $display("clock switches: %0d", switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
