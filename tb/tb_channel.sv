// Testbench of one complete channel (cell models, Gray counter, ramp,
// controller and readout).  A new random front-end level is applied in every
// 200 MHz slot and remembered; each event read out is compared sample by
// sample with the levels of the slots before its trigger, converted by an
// independent model of the single-slope ADC (code = min(2**N - 1,
// ceil((level + pedestal) / 2**(12-N)))).  Covered: 12-bit conversion of the
// full 256-cell buffer with its trigger-to-data latency of 3 + 4096 slots,
// offset calibration with a steady input followed by offset-subtracted data,
// multi-buffering in 4 x 64 and 8 x 32 cell segments at 10 and 8 bits
// including lost triggers while all segments are busy, back-pressure on the
// output, and the discriminator output.
module tb_channel;
  import asic_pkg::*;

  localparam int SEED = 3;
  logic clk = 0, rst_n = 0, ce = 0;
  chip_cfg_t cfg;
  logic acq_en = 0, trig = 0, disc, out_valid, out_ready = 1, full, trig_lost, trig_taken;
  level_t vfe = 0, thr = 2000;
  stream_word_t out_word;
  int checks = 0, failures = 0;

  channel #(.PED_SEED(SEED)) dut (
    .clk, .rst_n, .ce, .cfg, .chan_id(6'd21), .acq_en, .vfe, .thr, .disc, .trig,
    .out_valid, .out_word, .out_ready, .full, .trig_lost, .trig_taken
  );

  always #1.25 clk = ~clk;
  always @(posedge clk) ce <= rst_n ? !ce : 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic int ped(int cidx);
    return (37 * cidx + 11 * SEED + 5) % 13;
  endfunction

  function automatic int adc(int level, int n);
    int step, k;
    step = 4096 >> n;
    k = (level + step - 1) / step;
    return (k > (1 << n) - 1) ? (1 << n) - 1 : k;
  endfunction

  // history of levels per slot, triggers taken
  int hist[$];
  longint trig_slot[$];
  longint trig_clk[$];
  longint clk_no = 0;
  int n_lost = 0, n_taken = 0;
  int fresh = 0, n_stale = 0;   // slots written since the segment started
  int trig_fresh[$];
  bit steady = 0;
  int v0 = 100;

  always @(posedge clk) begin
    clk_no++;
    if (rst_n && ce) begin
      check(disc == (vfe > thr), "discriminator");
      hist.push_back(int'(vfe));
      if (acq_en && !full) fresh++;
      if (trig_taken) begin
        trig_fresh.push_back(fresh);
        fresh = 0;
        trig_slot.push_back(hist.size() - 1);
        trig_clk.push_back(clk_no);
        n_taken++;
      end
      if (trig_lost) n_lost++;
      #0.1;
      vfe = steady ? level_t'(v0) : level_t'($urandom_range(0, 4080));
    end
  end

  // event receiver and checker
  int ev_words = 0, n_events = 0, len = 0, res = 12, start = 0;
  int cal_off [NCELL];       // expected offset codes after calibration
  longint lat, last_end = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      if (ev_words == 0) begin
        header_t h;
        h = header_t'(out_word.data);
        check(out_word.nbits == 5'(HDR_BITS), "header first");
        check(h.channel == 6'd21, "channel number");
        check(trig_slot.size() > 0, "event has a trigger");
        len   = seg_len(seg_mode_e'(h.seg_mode));
        res   = 8 + h.res_sel;
        start = h.start_cell;
        check(h.event_no == 8'(n_events), "event number");
        lat = clk_no - trig_clk[0];
        if (trig_clk[0] > last_end) check(lat >= 2 * (3 + (1 << res)) && lat <= 2 * (3 + (1 << res)) + 3,
              $sformatf("latency %0d clocks", lat));
      end else begin
        int j, cidx, lvl, e;
        j    = ev_words - 1;
        cidx = (start / len) * len + (start % len + j) % len;
        lvl  = hist[trig_slot[0] - len + 1 + j];
        if (cfg.cal_mode) begin
          e = adc(lvl + ped(cidx), res);
          cal_off[cidx] = e;
        end else if (cfg.sub_offset) begin
          e = adc(lvl + ped(cidx), res) - cal_off[cidx];
          if (e < 0) e = 0;
        end else e = adc(lvl + ped(cidx), res);
        // cells of a segment re-used less than a full turn before its
        // trigger still hold older samples: only the written part is checked
        if (j < len - trig_fresh[0]) begin
          n_stale++;
          e = int'(out_word.data);
        end
        check(int'(out_word.data) == e && out_word.nbits == 5'(res),
              $sformatf("event %0d sample %0d cell %0d level %0d: got %0d exp %0d", n_events, j, cidx, lvl, out_word.data, e));
      end
      if (out_word.last) begin
        check(ev_words == len, "event length");
        last_end = clk_no;
        ev_words = 0;
        n_events++;
        void'(trig_slot.pop_front());
        void'(trig_fresh.pop_front());
        void'(trig_clk.pop_front());
      end else ev_words++;
    end
    out_ready <= ($urandom_range(0, 4) != 0);
  end

  task automatic wait_slots(int n);
    repeat (n) @(posedge clk iff ce);
  endtask

  // trigger held from a falling edge to the next, around one enabled edge
  task automatic fire();
    @(negedge clk);
    while (!ce) @(negedge clk);
    trig = 1;
    @(negedge clk);
    trig = 0;
  endtask

  task automatic wait_drained(int expect_events);
    while (n_events < expect_events) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    cfg.int_trig_en = 1;
    cfg.seg_mode = SEG_256;
    cfg.res_sel  = 3'd4;
    repeat (4) @(posedge clk); #0.2;
    rst_n = 1;
    acq_en = 1;
    // 1: 12 bits, 256 cells, raw
    wait_slots(300);
    fire();
    wait_drained(1);
    // 2: calibration with a steady input, all cells of the buffer
    steady = 1; cfg.cal_mode = 1;
    wait_slots(300);
    fire();
    wait_drained(2);
    steady = 0; cfg.cal_mode = 0; cfg.sub_offset = 1;
    wait_slots(300);
    fire();
    wait_drained(3);
    // 3: 10 bits, 4 x 64 cells, five triggers in a row (the fifth finds no free segment)
    acq_en = 0;
    wait_slots(4);
    cfg.seg_mode = SEG_64; cfg.res_sel = 3'd2; cfg.sub_offset = 0;
    acq_en = 1;
    for (int i = 0; i < 5; i++) begin
      wait_slots(70);
      fire();
    end
    wait_drained(7);
    // 4: 8 bits, 8 x 32 cells, ten triggers in a row (two find no free segment)
    acq_en = 0;
    wait_slots(4);
    cfg.seg_mode = SEG_32; cfg.res_sel = 3'd0;
    acq_en = 1;
    for (int i = 0; i < 10; i++) begin
      wait_slots(35);
      fire();
    end
    wait_slots(600);
    wait_drained(n_taken);
    check(n_lost >= 2 && n_taken + n_lost == 18 && n_events == n_taken, $sformatf("taken %0d lost %0d", n_taken, n_lost));
    $display("events %0d, lost triggers %0d, unchecked stale samples %0d", n_events, n_lost, n_stale);
    check(n_stale < 64, "few stale samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
