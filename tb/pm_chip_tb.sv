// pm_chip_tb: end-to-end test of the whole PM chip at its default size
// (16 datapath blocks, 64 inputs, 16 outputs).
//
// After reset the first 10 MHz edge is delayed by a random number of
// cycles; until then every output must stay 0. All 64 headers are then
// programmed, and further header writes are made while the chip runs, some
// aimed at a channel whose header is being sent so that the write must be
// held. Random bits are fed to all 64 inputs at 10 Mb/s (every fifth cycle).
// A reference model, written from the packet format alone, predicts every
// output bit of every cycle: 10 header bits, the 44 most recent input bits of
// the channel at the start of its data window (oldest first, 44 zeros
// before the first input bit), one 0 spacer; channels 4b..4b+3 in turn on
// output b; outputs registered one cycle. It also checks sop and the
// 55-cycle packet and 220-cycle frame timing, and drives the clock-switching
// cell with two-phase clocks, checking that its switched phases never
// overlap. Mechanisms counted (each must occur): waiting for the first
// 10 MHz edge, packets sent from head register A and from head register B,
// header writes before and during operation, writes held during a header,
// spacer bits, clock switches.
module pm_chip_tb;
  import pm_pkg::*;

  localparam int NB     = 16;
  localparam int NCH    = 4 * NB;
  localparam int FRAMES = 8;

  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic             strobe10 = 1'b0;
  logic [NCH-1:0]   din = '0;
  logic [5:0]       prog_addr = '0;
  logic [6:0]       prog_data = '0;
  logic             prog_strobe = 1'b0;
  logic [NB-1:0]    dout;
  logic             sop;
  logic cs_ph1_50 = 1'b0, cs_ph2_50 = 1'b0, cs_ph1_10 = 1'b0, cs_ph2_10 = 1'b0, cs_sel = 1'b0;
  logic cs_sw_ph1, cs_sw_ph2;

  int checks = 0, failures = 0;

  pm_chip dut (
    .clk, .rst, .strobe10, .din, .prog_addr, .prog_data, .prog_strobe, .dout, .sop,
    .cs_ph1_50, .cs_ph2_50, .cs_ph1_10, .cs_ph2_10, .cs_sel, .cs_sw_ph1, .cs_sw_ph2
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (FRAMES * 220 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what, int k);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", k, what);
    end
  endtask

  // ---------------- clock-switching cell ----------------
  // Two-phase clocks on a 1-unit grid (50 MHz period 20, 10 MHz period 100);
  // the select toggles at offset 82 of every third 10 MHz period.
  int cs_switches = 0;
  initial begin : clock_switch_driver
    for (int t = 0; ; t++) begin
      cs_ph1_50 = (t % 20) < 8;
      cs_ph2_50 = (t % 20) >= 10 && (t % 20) < 18;
      cs_ph1_10 = (t % 100) < 48;
      cs_ph2_10 = (t % 100) >= 50 && (t % 100) < 98;
      if ((t % 100) == 82 && (t / 100) % 3 == 1) begin
        cs_sel = !cs_sel;
        cs_switches++;
      end
      #1;
      if (t >= 40) check(!(cs_sw_ph1 && cs_sw_ph2), "clock feedthrough in the switching cell", -1);
      #1;
    end
  end

  // ---------------- reference model ----------------
  bit         hist [NCH][$];
  bit         snap [NCH][44];
  logic [9:0] ref_hdr [NCH];

  function automatic bit busy_ch(bit started, int k, logic [1:0] ch);
    return started && (k % 55) < 10 && ((k / 55) % 4) == int'(ch);
  endfunction

  initial begin
    bit   started, pend, strobe_next_low;
    int   k, p, p_s, wait_cycles, n_prog, pre_writes, run_writes, held;
    int   bank_a, bank_b, spacers, sops, last_sop;
    logic [5:0] pa;
    logic [6:0] pd;

    for (int c = 0; c < NCH; c++) begin
      ref_hdr[c] = 10'b100_0000000;
      for (int i = 0; i < 44; i++) hist[c].push_back(1'b0);
    end
    started = 1'b0; pend = 1'b0; strobe_next_low = 1'b0;
    k = 0; p = 0; p_s = 0; wait_cycles = 0; n_prog = 0; pre_writes = 0; run_writes = 0;
    held = 0; bank_a = 0; bank_b = 0; spacers = 0; sops = 0; last_sop = -1;

    repeat (3) @(negedge clk);
    rst = 1'b0;
    p = 0;

    while (!started || k < FRAMES * 220) begin
      // 1. outputs of the cycle that just ended
      if (started && k >= 1) begin
        int kk, pos, slot;
        kk = k - 1; pos = kk % 55; slot = (kk / 55) % 4;
        for (int b = 0; b < NB; b++) begin
          int  ch;
          bit  e;
          ch = 4 * b + slot;
          if (pos < 10)      e = ref_hdr[ch][9 - pos];
          else if (pos < 54) e = snap[ch][pos - 10];
          else               e = 1'b0;
          check(dout[b] == e, $sformatf("output %0d bit %0d of slot %0d", b, pos, slot), kk);
        end
        check(sop == (pos == 0), "sop", kk);
        if (pos == 54) spacers++;
        if (sop) begin
          if (last_sop >= 0) check(kk - last_sop == 55, "packet spacing", kk);
          last_sop = kk;
          sops++;
        end
      end else begin
        check(dout == '0 && !sop, "output before the first 10 MHz edge", -1);
      end

      // 2. data windows start: freeze what each channel must send
      if (started && (k % 55) == 10) begin
        int slot;
        slot = (k / 55) % 4;
        for (int b = 0; b < NB; b++)
          for (int i = 0; i < 44; i++)
            snap[4 * b + slot][i] = hist[4 * b + slot][hist[4 * b + slot].size() - 44 + i];
        if (((k / 220) % 2) == 0) bank_a++; else bank_b++;
      end

      // 3. a held header write lands at the end of this cycle
      if (pend && p >= p_s + 1) begin
        if (!busy_ch(started, k, pa[1:0])) begin
          ref_hdr[pa] = {3'b100, pd};
          pend = 1'b0;
          if (started) run_writes++; else pre_writes++;
          if (p > p_s + 1) held++;
        end
      end

      // 4. drive this cycle
      if (strobe_next_low) begin
        prog_strobe = 1'b0;
        strobe_next_low = 1'b0;
      end else if (!pend) begin
        bit go;
        if (!started) go = n_prog < NCH;
        else go = $urandom_range(0, 15) == 0;
        if (go) begin
          if (!started) pa = 6'(n_prog);
          else if ($urandom_range(0, 1) == 1)
            pa = {4'($urandom), 2'(((k + 1) / 55) % 4)};   // target is busy next cycle
          else pa = 6'($urandom);
          pd = 7'($urandom);
          n_prog++;
          prog_addr = pa; prog_data = pd; prog_strobe = 1'b1;
          pend = 1'b1; p_s = p; strobe_next_low = 1'b1;
        end
      end
      if (!started) begin
        // start once all headers are in and a few idle cycles have passed
        if (n_prog >= NCH && !pend && wait_cycles > 2 * NCH + 5) strobe10 = 1'b1;
        wait_cycles++;
      end else begin
        strobe10 = (k % 5) == 4;
        if ((k % 5) == 4) begin
          din = {$urandom, $urandom};
          for (int c = 0; c < NCH; c++) hist[c].push_back(din[c]);
        end
      end

      @(negedge clk);
      p++;
      if (started) k++;
      else if (strobe10) begin started = 1'b1; k = 0; strobe10 = 1'b0; end
    end

    $display("start wait %0d, headers before start %0d, during run %0d, held %0d",
             wait_cycles, pre_writes, run_writes, held);
    $display("packets from head A %0d, head B %0d, spacers %0d, sop %0d, clock switches %0d",
             bank_a * NB, bank_b * NB, spacers, sops, cs_switches);
    check(wait_cycles > 0, "never waited for the 10 MHz edge", 0);
    check(pre_writes == NCH, "headers programmed before start", 0);
    check(run_writes > 0, "no header write during operation", 0);
    check(held > 0, "no header write was held", 0);
    check(bank_a > 0 && bank_b > 0, "both head registers used", 0);
    check(spacers > 0, "no spacer", 0);
    check(sops == 4 * FRAMES - 1 || sops == 4 * FRAMES, "packet count", 0);
    check(cs_switches > 0, "clock never switched", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
