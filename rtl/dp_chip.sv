// dp_chip: depacketizer/demultiplexer chip, 16 x 50 Mb/s packet inputs to
// 64 x 10 Mb/s continuous outputs.
//
// Each of the 16 inputs (dp_datapath) strips the 10-bit headers of its
// packets and, by the two low destination address bits, delivers each
// packet's 44 data bits to one of its four adjacent outputs, where a
// clock-switched buffer (dp_buffer) sends them on as a continuous stream.
// Output n = 4 * input + low address bits. One controller (dp_control)
// derives the slot timing from sop_in, the first-header-bit marker of the
// slot-aligned inputs. The document gives this chip's function and says it
// uses the multiplexer's buffer technique; the rest is this design's.
//
// Timing: clk is the 50 MHz clock; tick10 marks the cycles on which the
// outputs advance (every fifth cycle, from the first sop_in on). Each output
// channel must receive exactly one packet per 220-cycle frame, always in the
// same slot, as the multiplexer chip and a fixed-delay switch deliver them.
module dp_chip
  import pm_pkg::*;
#(
  parameter int unsigned N_BLK = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [N_BLK-1:0]      din,
  input  logic                  sop_in,
  output logic [N_BLK*N_CH-1:0] dout,
  output logic                  tick10
);

  dp_ctrl_t ctrl;

  dp_control u_ctrl (
    .clk    (clk),
    .rst    (rst),
    .sop_in (sop_in),
    .ctrl   (ctrl)
  );

  assign tick10 = ctrl.tick10;

  for (genvar b = 0; b < N_BLK; b++) begin : g_blk
    dp_datapath u_dp (
      .clk  (clk),
      .rst  (rst),
      .ctrl (ctrl),
      .din  (din[b]),
      .dout (dout[b*N_CH +: N_CH])
    );
  end

endmodule
