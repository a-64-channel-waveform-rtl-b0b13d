// Testbench of readout_module (8 channels, arbiter, serializer) with the lane
// rebuilt by lane_rx.  Every channel sees its own random front-end levels.
// Scenario 1: 12 bits, 256-cell buffer, all 8 channels triggered together;
// the 8 events of 3099 bits must leave the lane back to back in about
// 8 x 1550 clocks (31 us at 400 MHz) after a 20.5 us conversion.  Scenario 2:
// 8 bits, 8 x 32 cells, two staggered triggers per channel, so several
// channels compete for the lane.  Every sample of every event is compared with
// the reference conversion of the level written into its cell.
module tb_readout_module;
  import asic_pkg::*;
  import tb_pkg::*;

  localparam int MOD = 1;
  logic clk = 0, rst_n = 0, ce = 0, acq_en = 0;
  chip_cfg_t cfg;
  level_t vfe [CH_PER_MOD], thr [CH_PER_MOD];
  logic [CH_PER_MOD-1:0] disc, trig = '0, full, trig_lost, trig_taken;
  logic [1:0] dq;
  logic lane_valid;
  int checks = 0, failures = 0;

  readout_module #(.MOD_ID(MOD)) dut (.*);
  lane_rx rx (.clk, .rst_n, .dq, .valid(lane_valid));

  always #1.25 clk = ~clk;
  always @(posedge clk) ce <= rst_n ? !ce : 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  int     hist [CH_PER_MOD][$];
  longint tslot[CH_PER_MOD][$];
  longint clk_no = 0, t_trig = 0;

  always @(posedge clk) begin
    clk_no++;
    if (rst_n && ce) begin
      for (int c = 0; c < CH_PER_MOD; c++) begin
        hist[c].push_back(int'(vfe[c]));
        if (trig_taken[c]) tslot[c].push_back(hist[c].size() - 1);
      end
      #0.1;
      for (int c = 0; c < CH_PER_MOD; c++) vfe[c] = level_t'($urandom_range(0, 4080));
    end
  end

  int n_checked = 0, last_ch = -1, switches = 0;
  task automatic check_events(int n_expected);
    while (rx.events.size() > 0) begin
      event_t e;
      int c, base;
      e = rx.events.pop_front();
      c = e.ch - MOD * CH_PER_MOD;
      check(c >= 0 && c < CH_PER_MOD, $sformatf("channel %0d in module", e.ch));
      if (c < 0 || c >= CH_PER_MOD) continue;
      if (c != last_ch) switches++;
      last_ch = c;
      check(tslot[c].size() > 0, "event matches a trigger");
      if (tslot[c].size() == 0) continue;
      base = (e.start / e.len) * e.len;
      for (int j = 0; j < e.len; j++) begin
        int cidx = base + (e.start - base + j) % e.len;
        int lvl  = hist[c][tslot[c][0] - e.len + 1 + j];
        int x    = adc(lvl + ped(MOD * CH_PER_MOD + c, cidx), e.res);
        check(e.s[j] == x, $sformatf("ch %0d sample %0d got %0d exp %0d", e.ch, j, e.s[j], x));
      end
      void'(tslot[c].pop_front());
      n_checked++;
    end
    check(n_checked == n_expected, $sformatf("%0d events checked, %0d expected", n_checked, n_expected));
    check(rx.pad_errors == 0, "padding bits are 0");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_first, t_last;
    for (int c = 0; c < CH_PER_MOD; c++) begin
      vfe[c] = '0;
      thr[c] = level_t'(1000 + 300 * c);
    end
    cfg = '0;
    cfg.seg_mode = SEG_256;
    cfg.res_sel  = 3'd4;
    repeat (4) @(posedge clk); #0.2;
    rst_n = 1; acq_en = 1;
    // scenario 1
    repeat (300) @(posedge clk iff ce);
    @(negedge clk); while (!ce) @(negedge clk);
    trig = '1; t_trig = clk_no;
    @(negedge clk); trig = '0;
    wait (rx.events.size() == 8);
    t_first = rx.events[0].t_first;
    t_last  = rx.events[7].t_last;
    $display("conversion to first bit %0d clocks, 8 events on the lane in %0d clocks (%0.2f us)",
             t_first - t_trig, t_last - t_first + 1, (t_last - t_first + 1) * 2.5e-3);
    check(t_first - t_trig >= 2 * 4099 && t_first - t_trig < 2 * 4099 + 10, "conversion time");
    check(t_last - t_first + 1 >= 8 * 1550 && t_last - t_first + 1 <= 8 * 1550 + 8 * 8, "lane time");
    for (int i = 0; i < 8; i++) check(rx.events[i].t_last - rx.events[i].t_first + 1 == 1550, "event occupies 1550 clocks");
    check_events(8);
    for (int c = 0; c < CH_PER_MOD; c++) begin
      #0.1 check(disc[c] == (vfe[c] > thr[c]), "discriminator");
    end
    // scenario 2
    acq_en = 0;
    repeat (4) @(posedge clk iff ce);
    cfg.seg_mode = SEG_32; cfg.res_sel = 3'd0;
    acq_en = 1;
    repeat (40) @(posedge clk iff ce);
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < CH_PER_MOD; c++) begin
        repeat (5) @(posedge clk iff ce);
        @(negedge clk); while (!ce) @(negedge clk);
        trig[c] = 1;
        @(negedge clk); trig = '0;
      end
    wait (rx.events.size() == 16);
    repeat (10) @(posedge clk);
    check_events(24);
    $display("events %0d, lane hand-overs %0d", n_checked, switches);
    check(switches >= 16, "lane shared between channels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
