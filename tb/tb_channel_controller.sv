// Testbench of channel_controller, with a model of the 8-bit Gray counter's
// terminal count.  In each partitioning (256, 4 x 64, 8 x 32 cells) triggers
// arrive at random times while the readout side releases segments slowly,
// so that the buffers fill up.  Checked on every 200 MHz slot: the written
// cell walks the active segment as a ring and moves to the next segment after
// a trigger; a trigger while all segments are busy is reported lost; every
// conversion has 2 power-up slots and 256 counts on the right cell groups;
// segments are offered for readout in trigger order with the cell after the
// last written one as oldest sample and consecutive event numbers; and the
// trigger-to-readout latency of an idle channel is 3 + 256 slots.
module tb_channel_controller;
  import asic_pkg::*;

  localparam int NBITS = 8;
  logic clk = 0, rst_n = 0, ce = 0;
  seg_mode_e seg_mode = SEG_256;
  logic acq_en = 0, trig = 0, rd_done = 0;
  logic wr_en, conv_pwrup, conv_clear, conv_count, cnt_clear, cnt_run, rd_req;
  logic full, trig_lost, trig_taken;
  logic [7:0] wr_cell, conv_grp, rd_start, rd_event;
  logic cnt_tc;
  int cnt;
  int checks = 0, failures = 0;
  int n_lost = 0, n_full = 0, n_taken = 0, n_read = 0;

  channel_controller dut (.*);

  always #1.25 clk = ~clk;
  always @(posedge clk) ce <= rst_n ? !ce : 1'b0;

  // Gray counter terminal-count model
  always @(posedge clk)
    if (!rst_n) cnt <= 0;
    else if (ce && cnt_clear) cnt <= 0;
    else if (ce && cnt_run) cnt <= (cnt + 1) % (1 << NBITS);
  assign cnt_tc = (cnt == (1 << NBITS) - 1);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  int len, nseg;
  assign len  = seg_len(seg_mode);
  assign nseg = seg_count(seg_mode);

  // expected segments in trigger order
  int q_start[$], q_event[$], q_seg[$];
  int conv_idx, ev_next;
  int prev_cell, last_seg;
  bit expect_new;
  int pw, cc;
  longint slot_no, t_trig;

  always @(posedge clk) begin
    if (!rst_n) begin
      q_start.delete(); q_event.delete(); q_seg.delete();
      conv_idx = 0; ev_next = 0; prev_cell = -1; last_seg = -1; expect_new = 1;
      pw = 0; cc = 0; slot_no = 0;
    end else if (ce) begin
      slot_no++;
      if (wr_en) begin
        if (expect_new) begin
          automatic int s = (last_seg + 1) % (NCELL / len);
          if (last_seg >= 0)
            check(wr_cell == 8'(s * len), $sformatf("new segment starts at %0d, got %0d len=%0d last=%0d mode=%0d", s * len, wr_cell, len, last_seg, seg_mode));
        end else begin
          automatic int b = (prev_cell / len) * len;
          check(wr_cell == 8'(b + (prev_cell - b + 1) % len), $sformatf("ring step %0d -> %0d", prev_cell, wr_cell));
        end
        prev_cell  = wr_cell;
        expect_new = 0;
      end
      check(trig_lost == (trig && acq_en && !wr_en), "lost flag");
      check(trig_taken == (trig && wr_en), "taken flag");
      if (trig && wr_en) begin
        automatic int b = (wr_cell / len) * len;
        q_start.push_back(b + (wr_cell - b + 1) % len);
        q_event.push_back(ev_next % 256);
        q_seg.push_back(wr_cell / len);
        last_seg = wr_cell / len;
        ev_next++;
        expect_new = 1;
        n_taken++;
      end
      if (trig && acq_en && !wr_en) n_lost++;
      if (full && acq_en) n_full++;
      // conversion
      if (conv_pwrup && !conv_count) begin
        check(conv_clear == (pw == 0), "clear in first power-up slot");
        pw++;
      end
      if (conv_count) begin
        logic [7:0] g;
        g = '0;
        for (int i = 0; i < 8; i++) if ((i * 32) / len == q_seg[conv_idx]) g[i] = 1;
        check(conv_grp == g, $sformatf("groups %b exp %b", conv_grp, g));
        cc++;
        if (cnt_tc) begin
          check(pw == PWRUP_CYC && cc == (1 << NBITS), $sformatf("conversion length pw=%0d cc=%0d", pw, cc));
          pw = 0; cc = 0; conv_idx++;
        end
      end
    end
  end

  // readout side: releases segments after 'hold' clocks
  int hold = 10;
  always @(posedge clk) begin
    if (rst_n && rd_req && !rd_done) begin
      repeat (hold) @(posedge clk);
      #0.1;
      check(q_start.size() > 0, "readout has a segment");
      check(int'(rd_start) == q_start[0] && int'(rd_event) == q_event[0],
            $sformatf("readout start %0d exp %0d, event %0d exp %0d", rd_start, q_start[0], rd_event, q_event[0]));
      rd_done = 1;
      @(posedge clk); #0.1;
      rd_done = 0;
      void'(q_start.pop_front()); void'(q_event.pop_front()); void'(q_seg.pop_front());
      conv_idx--;
      n_read++;
    end
  end

  task automatic wait_slots(int n);
    repeat (n) begin
      @(posedge clk iff ce); #0.1;
    end
  endtask

  // trigger held from a falling edge to the next, around one enabled edge
  task automatic fire();
    @(negedge clk);
    while (!ce) @(negedge clk);
    trig = 1;
    @(negedge clk);
    trig = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 3; m++) begin
      rst_n = 0; acq_en = 0;
      seg_mode = seg_mode_e'(m);
      repeat (4) @(posedge clk); #0.1;
      rst_n = 1;
      hold = 10;
      acq_en = 1;
      wait_slots(300);
      // latency of an idle channel
      fire();
      t_trig = slot_no;
      @(posedge clk iff rd_req);
      check(slot_no - t_trig == 3 + (1 << NBITS), $sformatf("latency %0d slots", slot_no - t_trig));
      wait_slots(20);
      // bursts with slow readout
      hold = 2000;
      for (int t = 0; t < 30; t++) begin
        wait_slots($urandom_range(5, 60));
        fire();
      end
      hold = 10;
      wait_slots(6000);
      acq_en = 0;
      wait_slots(3000);
      check(q_start.size() == 0 && !rd_req, "all segments read");
    end
    $display("taken %0d, lost %0d, full slots %0d, read %0d", n_taken, n_lost, n_full, n_read);
    check(n_lost > 0 && n_full > 0 && n_read == n_taken, "buffers filled and drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
