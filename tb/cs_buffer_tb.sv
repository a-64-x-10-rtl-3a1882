// cs_buffer_tb: self-checking test of one clock-switched channel buffer.
//
// Drives the buffer with the PM schedule (220-cycle frame, 10 MHz tick on
// every fifth cycle, 45-cycle transmit window in slot SLOT) and random
// input bits. A reference keeps every sampled input bit (preceded by 44
// zeros, the reset contents) and expects each window to send the 44 most
// recent bits, oldest first. It also checks the Fig. 4 state order, the
// window length, and that exactly 44 bits arrive per frame.
module cs_buffer_tb;
  import pm_pkg::*;

  localparam int SLOT   = 2;
  localparam int FRAMES = 12;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic tick10 = 1'b0, tx = 1'b0, tx_last = 1'b0, din = 1'b0;
  logic dout;
  cs_state_e state;

  int checks = 0, failures = 0;

  cs_buffer dut (.clk, .rst, .tick10, .tx, .tx_last, .din, .dout, .state);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (FRAMES * 220 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit        hist[$];
  bit        snap[44];
  cs_state_e prev_state;
  int        win_len, tx_packets, samples_in_frame;

  function automatic cs_state_e next_of(cs_state_e s);
    case (s)
      RX_A: return TX_A;
      TX_A: return RX_B;
      RX_B: return TX_B;
      default: return RX_A;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 44; i++) hist.push_back(1'b0);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    prev_state = RX_A;
    win_len = 0; tx_packets = 0; samples_in_frame = 0;
    // cycle k runs between this negedge and the next posedge
    for (int k = 0; k < FRAMES * 220; k++) begin
      int f, pos_in_frame, wstart;
      f = k / 220;
      pos_in_frame = k % 220;
      wstart = SLOT * 55 + 10;
      // outputs of the previous posedge are visible now
      if (pos_in_frame >= wstart && pos_in_frame < wstart + 44) begin
        if (pos_in_frame == wstart)
          for (int i = 0; i < 44; i++) snap[i] = hist[hist.size() - 44 + i];
        checks++;
        if (dout !== snap[pos_in_frame - wstart]) begin
          failures++;
          $display("cycle %0d: data bit %0d got %b exp %b", k, pos_in_frame - wstart,
                   dout, snap[pos_in_frame - wstart]);
        end
      end
      // drive the cycle
      tx      = pos_in_frame >= wstart && pos_in_frame < wstart + 45;
      tx_last = pos_in_frame == wstart + 44;
      tick10  = (k % 5) == 4;
      if (tx) win_len++;
      if (tx_last) begin
        tx_packets++;
        checks++;
        if (win_len != 45) begin failures++; $display("window length %0d", win_len); end
        win_len = 0;
      end
      if (tick10) begin
        din = 1'($urandom);
        hist.push_back(din);
        samples_in_frame++;
      end
      if (pos_in_frame == 219) begin
        checks++;
        if (samples_in_frame != 44) begin failures++; $display("frame %0d: %0d samples", f, samples_in_frame); end
        samples_in_frame = 0;
      end
      #1;
      checks++;
      if (state != prev_state && state != next_of(prev_state)) begin
        failures++;
        $display("cycle %0d: state %s after %s", k, state.name(), prev_state.name());
      end
      prev_state = state;
      @(negedge clk);
    end
    checks++;
    if (tx_packets != FRAMES) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
