// End-to-end testbench of the chip, reduced to one module of 8 channels
// (NMODULES = 1) with 256 cells each, with the lane rebuilt by lane_rx.  Each channel gets
// random front-end levels below its threshold; a pulse is made by raising a
// channel's level above the threshold for one slot.  Every event received is
// checked sample by sample against the reference conversion of the levels
// written into its cells (taking offset calibration into account).
//
// Phases: sparse mode, 12 bits (one channel's own trigger); imaging mode
// with fast OR, 8 bits, 8 x 32 cells (all channels follow one pulse);
// topological trigger (an isolated pulse is ignored, two neighbours trigger
// the chip); external trigger with discriminator triggers disabled; a burst
// that fills all segments of a channel (lost triggers); offset calibration
// and offset-subtracted data at 10 bits, 4 x 64 cells; and finally the full
// operation: all channels, 12 bits, 256 cells, 8 events per lane read out in
// about 31 us.
// Each mechanism is counted and one that never happened is a failure.
module tb_waveform_asic_top;
  import asic_pkg::*;
  import tb_pkg::*;

  localparam int NM = 1;                 // modules simulated
  localparam int NC = NM * CH_PER_MOD;    // channels simulated

  logic clk = 0, rst_n = 0;
  chip_cfg_t cfg;
  logic [NC-1:0] ch_mask = '1;
  logic acq_en = 0, ext_trig = 0;
  level_t vfe [NC], thr [NC];
  logic [NC-1:0] prim_disc, ch_full, ch_trig_lost, ch_trig_taken;
  logic prim_or, prim_topo;
  logic [1:0] lane_dq [NM];
  logic [NM-1:0] lane_valid;
  int checks = 0, failures = 0;

  waveform_asic_top #(.NMODULES(NM)) dut (.*);

  always #1.25 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- stimulus
  // The design's 200 MHz enable toggles every clock after reset; the testbench
  // keeps its own copy in step with it.
  logic ce_tb = 0;
  always @(posedge clk) ce_tb <= rst_n ? !ce_tb : 1'b0;

  int     ovr [NC];          // forced level for the next slot, -1: random
  bit     steady = 0;
  int     v0 = 150;
  int     hist [NC][$];
  longint tslot [NC][$];
  int     tfresh[NC][$];
  bit     tcal  [NC][$];
  bit     tsub  [NC][$];
  int     fresh [NC];
  longint clk_no = 0, t_first_bit = -1, t_last_bit = 0;
  int     n_taken = 0, n_lost = 0, max_busy = 0;

  always @(posedge clk) begin
    clk_no++;
    if (rst_n && ce_tb) begin
      for (int c = 0; c < NC; c++) begin
        hist[c].push_back(int'(vfe[c]));
        if (acq_en && !ch_full[c]) fresh[c]++;
        if (ch_trig_taken[c]) begin
          tslot[c].push_back(hist[c].size() - 1);
          tfresh[c].push_back(fresh[c]);
          tcal[c].push_back(cfg.cal_mode);
          tsub[c].push_back(cfg.sub_offset);
          fresh[c] = 0;
          n_taken++;
          if (tslot[c].size() > max_busy) max_busy = tslot[c].size();
        end
        if (ch_trig_lost[c]) n_lost++;
      end
      #0.1;
      for (int c = 0; c < NC; c++) begin
        if (ovr[c] >= 0) vfe[c] = level_t'(ovr[c]);
        else if (steady) vfe[c] = level_t'(v0);
        else vfe[c] = level_t'($urandom_range(0, 2000));
        ovr[c] = -1;
      end
    end
  end

  // ---------------------------------------------------------------- checking
  int cal_off [NC][NCELL];
  int n_events = 0, n_stale = 0;
  int n_res [13];
  int n_seg [3];
  int n_cal = 0, n_sub = 0;

  task automatic check_event(event_t e);
    int c, base;
    c = e.ch;
    check(tslot[c].size() > 0, $sformatf("event of channel %0d matches a trigger", c));
    if (tslot[c].size() == 0) return;
    base = (e.start / e.len) * e.len;
    for (int j = 0; j < e.len; j++) begin
      int cidx, lvl, x;
      cidx = base + (e.start - base + j) % e.len;
      lvl  = hist[c][tslot[c][0] - e.len + 1 + j];
      x    = adc(lvl + ped(c, cidx), e.res);
      if (tcal[c][0]) cal_off[c][cidx] = x;
      else if (tsub[c][0]) x = (x > cal_off[c][cidx]) ? x - cal_off[c][cidx] : 0;
      if (j < e.len - tfresh[c][0]) begin
        n_stale++;
        continue;
      end
      check(e.s[j] == x, $sformatf("ch %0d ev %0d sample %0d got %0d exp %0d", c, e.evno, j, e.s[j], x));
    end
    n_res[e.res]++;
    n_seg[e.segm]++;
    if (tcal[c][0]) n_cal++;
    else if (tsub[c][0]) n_sub++;
    void'(tslot[c].pop_front());
    void'(tfresh[c].pop_front());
    void'(tcal[c].pop_front());
    void'(tsub[c].pop_front());
    n_events++;
  endtask

  for (genvar m = 0; m < NM; m++) begin : g_lane
    lane_rx rx (.clk, .rst_n, .dq(lane_dq[m]), .valid(lane_valid[m]));
    always @(posedge clk) begin
      if (lane_valid[m]) begin
        if (t_first_bit < 0) t_first_bit = clk_no;
        t_last_bit = clk_no;
      end
      while (rx.events.size() > 0) begin
        event_t e;
        e = rx.events.pop_front();
        check(e.ch / CH_PER_MOD == m, "event on its module's lane");
        check_event(e);
      end
    end
  end

  // ---------------------------------------------------------------- helpers
  task automatic slots(int n);
    repeat (n) @(posedge clk iff ce_tb);
  endtask

  task automatic pulse(int c);
    ovr[c] = 3900;
  endtask

  task automatic drain();
    int busy;
    do begin
      slots(50);
      busy = 0;
      for (int c = 0; c < NC; c++) busy += tslot[c].size();
    end while (busy > 0);
    slots(20);
  endtask

  task automatic set_mode(seg_mode_e sm, int res);
    acq_en = 0;
    slots(4);
    cfg.seg_mode = sm;
    cfg.res_sel  = 3'(res - 8);
    acq_en = 1;
    slots(300);
  endtask

  int n_sparse = 0, n_or = 0, n_topo = 0, n_topo_rej = 0, n_ext = 0, n_masked = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_prev;
    for (int c = 0; c < NC; c++) begin
      vfe[c] = '0; thr[c] = level_t'(3000 + c); ovr[c] = -1; fresh[c] = 0;
      for (int i = 0; i < NCELL; i++) cal_off[c][i] = 0;
    end
    for (int r = 0; r <= 12; r++) n_res[r] = 0;
    for (int s = 0; s < 3; s++) n_seg[s] = 0;
    cfg = '0;
    cfg.int_trig_en = 1;
    cfg.ext_trig_en = 1;
    repeat (4) @(posedge clk); #0.2;
    rst_n = 1;

    // 1: sparse mode, 12 bits, one buffer: two channels trigger themselves
    set_mode(SEG_256, 12);
    n_prev = n_taken;
    pulse(5); pulse(2);
    slots(3);
    check(n_taken - n_prev == 2 && tslot[5].size() == 1 && tslot[2].size() == 1, "sparse: only the pulsed channels");
    if (n_taken - n_prev == 2) n_sparse++;
    drain();

    // 2: imaging mode, fast OR, 8 bits, 8 x 32 cells
    cfg.imaging = 1; cfg.topo_sel = 0;
    set_mode(SEG_32, 8);
    n_prev = n_taken;
    pulse(6);
    slots(3);
    check(n_taken - n_prev == NC, "fast OR triggers all channels");
    if (n_taken - n_prev == NC) n_or++;
    drain();

    // 3: topological trigger
    cfg.topo_sel = 1;
    slots(40);
    n_prev = n_taken;
    pulse(0);
    slots(40);
    check(n_taken == n_prev, "isolated pulse ignored");
    if (n_taken == n_prev) n_topo_rej++;
    pulse(3); pulse(4);                       // neighbours
    slots(3);
    check(n_taken - n_prev == NC, "neighbours trigger all channels");
    if (n_taken - n_prev == NC) n_topo++;
    drain();

    // 4: external trigger only
    cfg.int_trig_en = 0;
    slots(40);
    n_prev = n_taken;
    pulse(3); pulse(4);
    slots(40);
    check(n_taken == n_prev, "discriminator triggers disabled");
    if (n_taken == n_prev) n_masked++;
    @(negedge clk); ext_trig = 1;
    slots(3);
    @(negedge clk); ext_trig = 0;
    check(n_taken - n_prev == NC, "external trigger reaches all channels");
    if (n_taken - n_prev == NC) n_ext++;
    drain();

    // 5: sparse burst on one channel: all 8 segments fill, triggers are lost
    cfg.imaging = 0; cfg.int_trig_en = 1;
    slots(40);
    for (int i = 0; i < 10; i++) begin
      pulse(7);
      slots(12);
    end
    drain();

    // 6: offset calibration with a steady input, then corrected data
    cfg.imaging = 1; cfg.int_trig_en = 0;
    set_mode(SEG_64, 10);
    steady = 1; cfg.cal_mode = 1;
    for (int i = 0; i < 4; i++) begin       // one calibration per segment
      slots(80);
      @(negedge clk); ext_trig = 1; slots(2); @(negedge clk); ext_trig = 0;
    end
    slots(2);
    steady = 0;
    drain();
    cfg.cal_mode = 0; cfg.sub_offset = 1;
    slots(100);
    @(negedge clk); ext_trig = 1; slots(2); @(negedge clk); ext_trig = 0;
    drain();

    // 7: full operation: all channels, 12 bits, 256 cells
    cfg.sub_offset = 0;
    set_mode(SEG_256, 12);
    t_first_bit = -1;
    @(negedge clk); ext_trig = 1; slots(2); @(negedge clk); ext_trig = 0;
    drain();
    $display("full readout: lanes busy for %0d clocks (%0.2f us)",
             t_last_bit - t_first_bit + 1, (t_last_bit - t_first_bit + 1) * 2.5e-3);
    check(t_last_bit - t_first_bit + 1 >= 8 * 1550 && t_last_bit - t_first_bit + 1 <= 8 * 1550 + 64,
          "8 events of 3099 bits per lane in about 31 us");

    $display("events %0d (12 bit %0d, 10 bit %0d, 8 bit %0d; 256/64/32 cells %0d/%0d/%0d), stale samples skipped %0d",
             n_events, n_res[12], n_res[10], n_res[8], n_seg[0], n_seg[1], n_seg[2], n_stale);
    $display("mechanisms: sparse %0d, fast OR %0d, topological %0d, topological reject %0d, external %0d, internal disabled %0d",
             n_sparse, n_or, n_topo, n_topo_rej, n_ext, n_masked);
    $display("triggers taken %0d, lost %0d, most segments busy %0d, calibration events %0d, corrected events %0d",
             n_taken, n_lost, max_busy, n_cal, n_sub);
    check(n_sparse > 0, "sparse trigger happened");
    check(n_or > 0, "fast OR trigger happened");
    check(n_topo > 0 && n_topo_rej > 0, "topological trigger happened");
    check(n_ext > 0 && n_masked > 0, "external trigger happened");
    check(n_lost > 0 && max_busy == 8, "multi-buffer filled and triggers lost");
    check(n_cal > 0 && n_sub > 0, "offset calibration and subtraction happened");
    check(n_res[8] > 0 && n_res[10] > 0 && n_res[12] > 0, "resolutions 8, 10, 12");
    check(n_seg[0] > 0 && n_seg[1] > 0 && n_seg[2] > 0, "all partitionings");
    check(n_events == n_taken, "every trigger taken gave an event");
    check(n_stale <= 8 * 32, "stale samples only in the burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
