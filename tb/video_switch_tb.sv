// video_switch_tb: end-to-end test of the video switch at its default size:
// 64 x 10 Mb/s inputs -> packetizer/multiplexer -> 16 x 16 packet switch
// (a behavioural model in this testbench) -> depacketizer/demultiplexer ->
// 64 x 10 Mb/s outputs.
//
// Every input channel n = 4b + s is given a destination d(n) =
// 4 * ((b + R[s]) % 16) + P[s], with random R and a random slot permutation
// P, so that the connection is one-to-one and no two packets of a slot
// compete for a switch output. The headers are programmed through the
// 14-line port before the start; while running, the control bit of random
// headers is rewritten (same destination), some of these writes aimed at a
// header being sent, so that they are held. The switch model reads each
// packet's high four address bits and forwards the packet after DLY cycles;
// in the first frame it forwards nothing, so the depacketizer must ignore
// idle inputs. Random bits enter all 64 inputs at 10 Mb/s.
//
// Check: each output d(n), sampled on every depacketizer tick from its first
// packet on, must reproduce input n's stream bit for bit, with the same
// delay for every bit (continuous 10 Mb/s, nothing lost or repeated). The
// multiplexer's packet timing (55-cycle packets) and the clock-switching
// cell (no feedthrough) are checked on the way. Counted mechanisms, each
// of which must occur: waiting for the first 10 MHz edge, A and B head
// registers in both chips, header writes before and during operation, held
// writes, idle slots ignored, clock switches.
module video_switch_tb;
  import pm_pkg::*;

  localparam int NB     = 16;
  localparam int NCH    = 4 * NB;
  localparam int FRAMES = 8;
  localparam int DLY    = 17;

  logic           clk = 1'b0;
  logic           rst = 1'b1;
  logic           strobe10 = 1'b0;
  logic [NCH-1:0] pm_din = '0;
  logic [5:0]     prog_addr = '0;
  logic [6:0]     prog_data = '0;
  logic           prog_strobe = 1'b0;
  logic [NB-1:0]  pm_dout;
  logic           pm_sop;
  logic [NB-1:0]  dp_din = '0;
  logic           dp_sop = 1'b0;
  logic [NCH-1:0] dp_dout;
  logic           dp_tick10;
  logic cs_ph1_50 = 1'b0, cs_ph2_50 = 1'b0, cs_ph1_10 = 1'b0, cs_ph2_10 = 1'b0, cs_sel = 1'b0;
  logic cs_sw_ph1, cs_sw_ph2;

  int checks = 0, failures = 0;

  video_switch dut (
    .clk, .rst, .strobe10, .pm_din, .prog_addr, .prog_data, .prog_strobe, .pm_dout, .pm_sop,
    .dp_din, .dp_sop, .dp_dout, .dp_tick10,
    .cs_ph1_50, .cs_ph2_50, .cs_ph1_10, .cs_ph2_10, .cs_sel, .cs_sw_ph1, .cs_sw_ph2
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((FRAMES + 2) * 220 + 1000) @(posedge clk);
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

  // ---------------- packet switch model ----------------
  // The multiplexer's output of every cycle is kept. A slot's route is read
  // from its header (positions 4..9 are the address, MSB first); output o
  // carries, DLY cycles later, the input whose high address bits are o.
  logic [NB-1:0] pm_at   [int];
  bit            sop_at  [int];
  int            start_at[int];    // first cycle of the slot holding cycle u, -1: none
  int            slot_no [int];    // slot number (0, 1, ...) of the slot starting at u
  int            route   [int][NB];

  function automatic void make_route(int u0);
    for (int o = 0; o < NB; o++) route[u0][o] = -1;
    for (int b = 0; b < NB; b++) begin
      logic [5:0] a;
      for (int i = 0; i < 6; i++) a[5 - i] = pm_at[u0 + 4 + i][b];
      route[u0][int'(a[5:2])] = b;
    end
  endfunction

  // ---------------- reference ----------------
  int         dest   [NCH];
  bit         hist   [NCH][$];
  int         hist_t [NCH][$];     // cycle in which each input bit was sampled
  bit         exp_q  [NCH][$];
  int         exp_t  [NCH][$];
  int         lat    [NCH];
  bit         active [NCH];
  logic [6:0] prog_of[NCH];

  initial begin
    int   R[4], P[4];
    bit   started, pend, strobe_next_low;
    int   g, k, g_s, n_prog, pre_writes, run_writes, held, wait_cycles;
    int   bank_a, bank_b, dp_bits, last_sop, cur_start, n_slots, idle_fwd, dp_banks;
    logic [5:0] pa;
    logic [6:0] pd;

    for (int s = 0; s < 4; s++) begin R[s] = $urandom_range(0, 15); P[s] = s; end
    P.shuffle();
    for (int b = 0; b < NB; b++)
      for (int s = 0; s < 4; s++) dest[4 * b + s] = 4 * ((b + R[s]) % 16) + P[s];
    for (int c = 0; c < NCH; c++) begin
      for (int i = 0; i < 44; i++) begin hist[c].push_back(1'b0); hist_t[c].push_back(-1); end
      prog_of[c] = {1'($urandom), 6'(dest[c])};
      lat[c] = -1; active[c] = 1'b0;
    end
    started = 0; pend = 0; strobe_next_low = 0;
    g = 0; k = 0; g_s = 0; n_prog = 0; pre_writes = 0; run_writes = 0; held = 0; wait_cycles = 0;
    bank_a = 0; bank_b = 0; dp_bits = 0; last_sop = -1; cur_start = -1; n_slots = 0; idle_fwd = 0;
    dp_banks = 0;

    repeat (3) @(negedge clk);
    rst = 1'b0;

    // g: cycle now running (between this negedge and the next posedge)
    while (!started || k < (FRAMES + 1) * 220) begin
      // ---- multiplexer output of cycle g-1 ----
      if (g >= 1) begin
        pm_at[g - 1]  = pm_dout;
        sop_at[g - 1] = pm_sop;
        if (pm_sop) begin
          if (last_sop >= 0) check(g - 1 - last_sop == 55, "packet spacing", g - 1);
          last_sop = g - 1;
          cur_start = g - 1;
          slot_no[g - 1] = n_slots++;
        end
        start_at[g - 1] = cur_start;
        if (cur_start >= 0 && g - 1 == cur_start + 9) make_route(cur_start);
      end

      // ---- payloads frozen at the start of each data window ----
      if (started && (k % 55) == 10) begin
        int slot;
        slot = (k / 55) % 4;
        for (int b = 0; b < NB; b++) begin
          int n;
          n = 4 * b + slot;
          if (k / 220 >= 1)      // the switch drops the first frame
            for (int i = 0; i < 44; i++) begin
              exp_q[dest[n]].push_back(hist[n][hist[n].size() - 44 + i]);
              exp_t[dest[n]].push_back(hist_t[n][hist_t[n].size() - 44 + i]);
            end
        end
        if (((k / 220) % 2) == 0) bank_a++; else bank_b++;
      end

      // ---- header writes land ----
      if (pend && g >= g_s + 2) begin
        bit busy;
        busy = started && (k % 55) < 10 && ((k / 55) % 4) == int'(pa[1:0]);
        if (!busy) begin
          pend = 1'b0;
          if (started) run_writes++; else pre_writes++;
          if (g > g_s + 2) held++;
        end
      end

      // ---- drive the multiplexer for cycle g ----
      if (strobe_next_low) begin
        prog_strobe = 1'b0;
        strobe_next_low = 1'b0;
      end else if (!pend) begin
        bit go;
        go = !started ? (n_prog < NCH) : ($urandom_range(0, 15) == 0);
        if (go) begin
          if (!started) pa = 6'(n_prog);
          else if ($urandom_range(0, 1) == 1) pa = {4'($urandom), 2'(((k + 1) / 55) % 4)};
          else pa = 6'($urandom);
          if (started) prog_of[pa][6] = 1'($urandom);   // new control bit, same address
          pd = prog_of[pa];
          n_prog++;
          prog_addr = pa; prog_data = pd; prog_strobe = 1'b1;
          pend = 1'b1; g_s = g; strobe_next_low = 1'b1;
        end
      end
      if (!started) begin
        if (n_prog >= NCH && !pend && wait_cycles > 2 * NCH + 5) strobe10 = 1'b1;
        wait_cycles++;
      end else begin
        strobe10 = (k % 5) == 4;
        if ((k % 5) == 4) begin
          pm_din = {$urandom, $urandom};
          for (int c = 0; c < NCH; c++) begin hist[c].push_back(pm_din[c]); hist_t[c].push_back(g); end
        end
      end

      // ---- switch model output for cycle g ----
      dp_sop = 1'b0;
      dp_din = '0;
      if (g - DLY >= 0 && start_at.exists(g - DLY) && start_at[g - DLY] >= 0) begin
        int u, u0, pos;
        u = g - DLY; u0 = start_at[u]; pos = u - u0;
        dp_sop = sop_at[u];
        if (slot_no[u0] >= 4) begin
          for (int o = 0; o < NB; o++)
            if (route[u0][o] >= 0) dp_din[o] = pm_at[u][route[u0][o]];
        end else if (pos == 0) idle_fwd++;
      end

      // ---- depacketizer outputs in cycle g ----
      #1;
      if (dp_tick10) begin
        for (int d = 0; d < NCH; d++)
          if (active[d]) begin
            checks++;
            dp_bits++;
            if (exp_q[d].size() == 0) begin
              failures++;
              if (failures < 20) $display("cycle %0d: output %0d sends more than it received", g, d);
            end else begin
              if (dp_dout[d] !== exp_q[d][0]) begin
                failures++;
                if (failures < 20) $display("cycle %0d: output %0d got %b exp %b", g, d, dp_dout[d], exp_q[d][0]);
              end
              if (lat[d] < 0) lat[d] = g - exp_t[d][0];
              else check(g - exp_t[d][0] == lat[d], $sformatf("output %0d delay changed", d), g);
              void'(exp_q[d].pop_front());
              void'(exp_t[d].pop_front());
            end
          end
      end
      // an output starts sending once its first forwarded packet is in
      if (g - DLY >= 0 && start_at.exists(g - DLY) && start_at[g - DLY] >= 0) begin
        int u0;
        u0 = start_at[g - DLY];
        if (g - DLY - u0 == 54 && slot_no[u0] >= 4) begin
          for (int o = 0; o < NB; o++)
            if (route[u0][o] >= 0) begin
              int b, s;
              b = route[u0][o]; s = slot_no[u0] % 4;
              if (!active[dest[4 * b + s]]) dp_banks++;
              active[dest[4 * b + s]] = 1'b1;
            end
        end
      end

      @(negedge clk);
      g++;
      if (started) k++;
      else if (strobe10) begin started = 1'b1; k = 0; strobe10 = 1'b0; end
    end

    for (int d = 0; d < NCH; d++) check(active[d] && lat[d] > 0, $sformatf("output %0d never sent", d), g);
    $display("start wait %0d, headers before start %0d, during run %0d, held %0d",
             wait_cycles, pre_writes, run_writes, held);
    $display("multiplexer packets from head A %0d, head B %0d; idle slots forwarded %0d",
             bank_a * NB, bank_b * NB, idle_fwd);
    $display("depacketizer output bits checked %0d, outputs started %0d, clock switches %0d",
             dp_bits, dp_banks, cs_switches);
    $display("end-to-end delay of output 0: %0d cycles", lat[0]);
    check(wait_cycles > 0, "never waited for the 10 MHz edge", 0);
    check(pre_writes == NCH, "headers programmed before start", 0);
    check(run_writes > 0, "no header write during operation", 0);
    check(held > 0, "no header write was held", 0);
    check(bank_a > 0 && bank_b > 0, "both head registers used", 0);
    check(idle_fwd > 0, "no idle slot reached the depacketizer", 0);
    check(dp_bits >= NCH * 44 * (FRAMES - 2), "too few output bits", 0);
    check(cs_switches > 0, "clock never switched", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
