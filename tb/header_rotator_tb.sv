// header_rotator_tb: self-checking test of the 10-bit header rotator.
//
// Repeats: maybe write a random 7-bit value, wait a random idle time, then
// rotate for 10 cycles and compare the 10 bits sent with the expected header
// {1,0,0, value}, first bit first. Headers that were not rewritten must come
// out unchanged, which shows that a full turn restores the register.
module header_rotator_tb;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       rot = 1'b0, we = 1'b0;
  logic [6:0] wdata = '0;
  logic       dout;
  int checks = 0, failures = 0;

  header_rotator dut (.clk, .rst, .rot, .we, .wdata, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] exp_hdr;

  initial begin
    exp_hdr = 10'b100_0000000;   // reset contents
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      if ($urandom_range(0, 1) == 1) begin
        wdata = 7'($urandom);
        we = 1'b1;
        exp_hdr = {3'b100, wdata};
        @(negedge clk);
        we = 1'b0;
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      rot = 1'b1;
      for (int b = 0; b < 10; b++) begin
        checks++;
        if (dout !== exp_hdr[9 - b]) begin
          failures++;
          $display("header %0d bit %0d: got %b exp %b", n, b, dout, exp_hdr[9 - b]);
        end
        @(negedge clk);
      end
      rot = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
