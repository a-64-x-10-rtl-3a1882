// tdm_datapath_tb: self-checking test of one 4-to-1 multiplexer and
// packetizer block, sequenced by the central controller.
//
// Random bits enter the four channels at 10 Mb/s; random headers are
// written while the block runs, only to channels whose header is not being
// sent. A reference predicts every output bit: per 55-cycle slot, the slot
// channel's 10 header bits {1,0,0, data}, its 44 most recent input bits at
// the start of its data window (oldest first; 44 zeros before the first
// input), then a 0 spacer; the output is registered one cycle.
module tdm_datapath_tb;
  import pm_pkg::*;

  localparam int FRAMES = 10;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       strobe10 = 1'b0;
  pm_ctrl_t   ctrl;
  logic [3:0] din = '0;
  logic       hdr_we = 1'b0;
  logic [1:0] hdr_ch = '0;
  logic [6:0] hdr_wdata = '0;
  logic       dout;
  int checks = 0, failures = 0;

  pm_control   u_ctrl (.clk, .rst, .strobe10, .ctrl);
  tdm_datapath dut (.clk, .rst, .ctrl, .din, .hdr_we, .hdr_ch, .hdr_wdata, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (FRAMES * 220 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit         hist [4][$];
  bit         snap [4][44];
  logic [9:0] ref_hdr [4];

  initial begin
    int writes;
    writes = 0;
    for (int c = 0; c < 4; c++) begin
      ref_hdr[c] = 10'b100_0000000;
      for (int i = 0; i < 44; i++) hist[c].push_back(1'b0);
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (4) begin
      @(negedge clk);
      checks++;
      if (dout !== 1'b0) failures++;
    end
    strobe10 = 1'b1;
    @(negedge clk);
    for (int k = 0; k < FRAMES * 220; k++) begin
      int pos, slot;
      if (k >= 1) begin
        bit e;
        pos = (k - 1) % 55; slot = ((k - 1) / 55) % 4;
        if (pos < 10)      e = ref_hdr[slot][9 - pos];
        else if (pos < 54) e = snap[slot][pos - 10];
        else               e = 1'b0;
        checks++;
        if (dout !== e) begin
          failures++;
          if (failures < 20) $display("cycle %0d: slot %0d bit %0d got %b exp %b", k - 1, slot, pos, dout, e);
        end
      end
      pos = k % 55; slot = (k / 55) % 4;
      if (pos == 10)
        for (int i = 0; i < 44; i++) snap[slot][i] = hist[slot][hist[slot].size() - 44 + i];
      // header write, never to the channel whose header is being sent
      hdr_we = 1'b0;
      if ($urandom_range(0, 7) == 0) begin
        hdr_ch = 2'($urandom);
        if (!(pos < 10 && int'(hdr_ch) == slot)) begin
          hdr_wdata = 7'($urandom);
          hdr_we = 1'b1;
          ref_hdr[hdr_ch] = {3'b100, hdr_wdata};
          writes++;
        end
      end
      strobe10 = (k % 5) == 4;
      if ((k % 5) == 4) begin
        din = 4'($urandom);
        for (int c = 0; c < 4; c++) hist[c].push_back(din[c]);
      end
      @(negedge clk);
    end
    checks++;
    if (writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
