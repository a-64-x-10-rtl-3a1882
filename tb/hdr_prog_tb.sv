// hdr_prog_tb: self-checking test of the header programming port.
//
// Busy follows the PM schedule (channel c's rotator turns for 10 of every
// 220 cycles, starting at 55*c). Strobes of 1 to 4 cycles with random
// channel numbers and data are given at random times, some of them timed to
// fall inside the target's busy window. The expected write is one pulse, in
// the first cycle after the strobe's rising edge in which the target channel
// is not busy, with the block and channel decoded from the channel number.
// The test counts writes that had to be held, and fails if none was.
module hdr_prog_tb;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [5:0] prog_addr = '0;
  logic [6:0] prog_data = '0;
  logic       prog_strobe = 1'b0;
  logic [3:0] busy = '0;
  logic       wr;
  logic [3:0] wr_blk;
  logic [1:0] wr_ch;
  logic [6:0] wr_data;
  int checks = 0, failures = 0;

  hdr_prog dut (.clk, .rst, .prog_addr, .prog_data, .prog_strobe, .busy,
                .wr, .wr_blk, .wr_ch, .wr_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] busy_at(int k);
    int pos = k % 55;
    int slot = (k / 55) % 4;
    return pos < 10 ? 4'(1 << slot) : 4'b0;
  endfunction

  initial begin
    int k, writes, held;
    logic [5:0] a;
    logic [6:0] d;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    k = 0; writes = 0; held = 0;
    for (int n = 0; n < 300; n++) begin
      int len, waited;
      bit seen;
      a = 6'($urandom);
      d = 7'($urandom);
      // half the time, aim the strobe just before the target's busy window
      if (n % 2 == 0)
        while (((k + 1) % 220) != 55 * a[1:0]) begin
          busy = busy_at(k); @(negedge clk); k++;
        end
      prog_addr = a; prog_data = d; prog_strobe = 1'b1;
      busy = busy_at(k);
      #1;
      checks++;
      if (wr) begin failures++; $display("write in the strobe cycle"); end
      @(negedge clk); k++;
      len = $urandom_range(1, 4);
      seen = 1'b0; waited = 0;
      for (int c = 0; c < 20; c++) begin
        if (c + 1 >= len) prog_strobe = 1'b0;
        busy = busy_at(k);
        #1;
        checks++;
        if (!seen && !busy[a[1:0]]) begin
          if (!(wr && wr_blk == a[5:2] && wr_ch == a[1:0] && wr_data == d)) begin
            failures++;
            $display("write %0d: expected in cycle %0d: wr=%b blk=%0d ch=%0d data=%h", n, c, wr,
                     wr_blk, wr_ch, wr_data);
          end
          seen = 1'b1;
          writes++;
          if (waited > 0) held++;
        end else begin
          if (wr) begin failures++; $display("write %0d: unexpected pulse in cycle %0d", n, c); end
          if (!seen) waited++;
        end
        @(negedge clk); k++;
      end
    end
    checks++;
    if (held == 0) begin failures++; $display("no write was held"); end
    $display("writes %0d, held %0d", writes, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
