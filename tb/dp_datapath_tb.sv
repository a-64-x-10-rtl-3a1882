// dp_datapath_tb: self-checking test of one depacketizer input together with
// its slot controller; the same test as the chip test, for one input.
//
// Feeds the input with slot-aligned packet streams and a sop marker:
// first one idle frame (zeros, which must be ignored), then one packet per
// slot, each input using a random assignment of its four slots to its four
// outputs (the low two address bits), random upper address and control bits
// and random data. For every output the test samples the stream on each
// output tick after the output's first packet has been loaded, and expects
// the data bits of the packets sent to it, in order and with no gap: 44
// bits per 220-cycle frame, i.e. 10 Mb/s.
module dp_datapath_tb;
  import pm_pkg::*;

  localparam int NB     = 1;
  localparam int NCH    = 4 * NB;
  localparam int FRAMES = 8;

  logic           clk = 1'b0;
  logic           rst = 1'b1;
  logic [NB-1:0]  din = '0;
  logic           sop_in = 1'b0;
  logic [NCH-1:0] dout;
  logic           tick10;
  dp_ctrl_t       ctrl;
  assign tick10 = ctrl.tick10;
  int checks = 0, failures = 0;

  dp_control  u_ctrl (.clk, .rst, .sop_in, .ctrl);
  dp_datapath dut (.clk, .rst, .ctrl, .din(din[0]), .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((FRAMES + 2) * 220 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit         exp_q [NCH][$];
  bit         active [NCH];
  int         perm [NB][4];
  logic [9:0] hdr [NB];
  bit         pkt [NB][44];

  initial begin
    int nsamp;
    nsamp = 0;
    for (int b = 0; b < NB; b++) begin
      for (int s = 0; s < 4; s++) perm[b][s] = s;
      perm[b].shuffle();
    end
    for (int c = 0; c < NCH; c++) active[c] = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (7) @(negedge clk);
    for (int k = 0; k < (FRAMES + 1) * 220; k++) begin
      int f, s, pos;
      f = k / 220; s = (k / 55) % 4; pos = k % 55;
      sop_in = pos == 0;
      for (int b = 0; b < NB; b++) begin
        if (f == 0) din[b] = 1'b0;                 // idle frame
        else begin
          if (pos == 0) begin
            hdr[b] = {3'b100, 1'($urandom), 4'($urandom), 2'(perm[b][s])};
            for (int i = 0; i < 44; i++) pkt[b][i] = 1'($urandom);
          end
          if (pos < 10) din[b] = hdr[b][9 - pos];
          else if (pos < 54) begin
            din[b] = pkt[b][pos - 10];
            exp_q[4 * b + perm[b][s]].push_back(pkt[b][pos - 10]);
          end else din[b] = 1'b0;
        end
      end
      #1;
      checks++;
      if (tick10 != ((k % 5) == 4)) begin failures++; $display("cycle %0d: tick10", k); end
      if ((k % 5) == 4)
        for (int c = 0; c < NCH; c++)
          if (active[c]) begin
            checks++;
            nsamp++;
            if (dout[c] !== exp_q[c][0]) begin
              failures++;
              if (failures < 20) $display("cycle %0d: output %0d got %b exp %b", k, c, dout[c], exp_q[c][0]);
            end
            void'(exp_q[c].pop_front());
          end
      // an output starts sending after the spacer of its first packet
      if (f >= 1 && pos == 54)
        for (int b = 0; b < NB; b++) active[4 * b + perm[b][s]] = 1'b1;
      @(negedge clk);
    end
    checks++;
    if (nsamp < NCH * 44 * (FRAMES - 1)) begin failures++; $display("only %0d bits out", nsamp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
