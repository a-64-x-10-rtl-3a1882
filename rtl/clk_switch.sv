// clk_switch: glitch-free switching of one two-phase clock between its
// 50 MHz and its 10 MHz version (the document's Fig. 5).
//
// A chain of three latches carries the clock select: the first is open
// while 50 MHz phase 1 is high, the second while 50 MHz phase 2 is high, the
// third while 50 MHz phase 1 is high again. The second latch steers the
// phase-1 multiplexer and the third the phase-2 multiplexer, so the signal
// that gates a phase only changes while the 50 MHz version of that phase is
// low, and phase 1 always switches half a 50 MHz cycle before phase 2. The
// latch chain and the multiplexer arrangement follow the document.
// This design's choices: latches are open while their clock is high, and
// sel = 1 selects the 10 MHz clocks.
//
// The caller (a state machine) must change sel only in a window in which the
// 10 MHz clock of each phase is low when that phase's multiplexer switches;
// then no output pulse is cut short and the two switched phases never
// overlap. The latches have no reset: the chain settles within one 50 MHz
// cycle after the clocks start. This cell is meant for a two-phase
// full-custom clocking scheme; the synthesizable datapath of this design
// replaces switched clocks by clock enables.
module clk_switch (
  input  logic ph1_50,
  input  logic ph2_50,
  input  logic ph1_10,
  input  logic ph2_10,
  input  logic sel,       // 1: 10 MHz, 0: 50 MHz
  output logic sw_ph1,
  output logic sw_ph2
);

  logic l1, l2, l3;

  always_latch if (ph1_50) l1 = sel;
  always_latch if (ph2_50) l2 = l1;
  always_latch if (ph1_50) l3 = l2;

  assign sw_ph1 = l2 ? ph1_10 : ph1_50;
  assign sw_ph2 = l3 ? ph2_10 : ph2_50;

endmodule
