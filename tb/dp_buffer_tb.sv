// dp_buffer_tb: self-checking test of one depacketizer output buffer.
//
// Loads one random 44-bit packet per 220-cycle frame in slot SLOT (data on
// pos 10..53, load_end on pos 54, 10 MHz tick on every fifth cycle) and
// samples the output on every tick from the first bank toggle on. The
// samples must be the packets' data bits, back to back in order with no
// gap or repeat (44 per frame), which also checks the 10 Mb/s rate. The
// state must follow load A, send A / load B, send B order.
module dp_buffer_tb;
  import pm_pkg::*;

  localparam int SLOT   = 1;
  localparam int FRAMES = 12;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic tick10 = 1'b0, load = 1'b0, load_end = 1'b0, din = 1'b0;
  logic dout;
  cs_state_e state;
  int checks = 0, failures = 0;

  dp_buffer dut (.clk, .rst, .tick10, .load, .load_end, .din, .dout, .state);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (FRAMES * 220 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp_q[$];

  initial begin
    bit sending;
    int nsamp, banks_seen;
    sending = 1'b0; nsamp = 0; banks_seen = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < FRAMES * 220; k++) begin
      int pif;
      pif = k % 220;
      load     = pif >= SLOT * 55 + 10 && pif < SLOT * 55 + 54;
      load_end = pif == SLOT * 55 + 54;
      tick10   = (k % 5) == 4;
      if (load) begin
        din = 1'($urandom);
        exp_q.push_back(din);
      end
      #1;
      if (load_end) begin
        checks++;
        if (state != (banks_seen % 2 == 0 ? RX_A : RX_B)) begin
          failures++;
          $display("cycle %0d: state %s", k, state.name());
        end
        banks_seen++;
      end
      if (tick10 && sending) begin
        checks++;
        nsamp++;
        if (dout !== exp_q[0]) begin
          failures++;
          if (failures < 20) $display("cycle %0d: bit %0d got %b exp %b", k, nsamp - 1, dout, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
      if (load_end) sending = 1'b1;
      @(negedge clk);
    end
    checks++;
    if (nsamp < 44 * (FRAMES - 2)) begin failures++; $display("only %0d bits sent", nsamp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
