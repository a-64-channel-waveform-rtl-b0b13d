// Testbench of channel_readout with a model of the cell memories.  For random
// resolutions, partitionings, start cells and modes (raw, offset subtracted,
// calibration) it reads events with random back-pressure and checks the
// header fields, the number and width of the sample words, the sample order
// (oldest first, wrapping inside the segment), the Gray-to-binary conversion,
// the saturating offset subtraction and the 'rd_done' pulse.  With the
// output always ready an event takes one clock per word.
module tb_channel_readout;
  import asic_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [5:0] chan_id = 0;
  seg_mode_e seg_mode = SEG_256;
  logic [2:0] res_sel = 4;
  logic cal_mode = 0, sub_offset = 0, rd_req = 0, rd_done, out_valid, out_ready = 1;
  logic [7:0] rd_start = 0, rd_event = 0, cell_addr;
  code_t cell_data, cell_offset;
  stream_word_t out_word;
  int checks = 0, failures = 0;

  int data_b [NCELL];   // binary values held by the cells
  int off_b  [NCELL];

  channel_readout dut (.*);

  always #1.25 clk = ~clk;

  assign cell_data   = code_t'(data_b[cell_addr] ^ (data_b[cell_addr] >> 1));
  assign cell_offset = code_t'(off_b[cell_addr] ^ (off_b[cell_addr] >> 1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #0.1;
    for (int t = 0; t < 40; t++) begin
      int n, len, base, start, words, cycles, sat;
      bit bp;
      res_sel  = 3'($urandom_range(0, 4));
      n        = 8 + res_sel;
      seg_mode = seg_mode_e'($urandom_range(0, 2));
      len      = seg_len(seg_mode);
      base     = $urandom_range(0, NCELL / len - 1) * len;
      start    = base + $urandom_range(0, len - 1);
      chan_id  = 6'($urandom);
      rd_event = 8'($urandom);
      rd_start = 8'(start);
      cal_mode   = (t % 4 == 3);
      sub_offset = (t % 4 == 1 || t % 4 == 2);
      bp = (t % 2 == 1);
      for (int i = 0; i < NCELL; i++) begin
        data_b[i] = $urandom_range(0, (1 << n) - 1);
        off_b[i]  = (i % 7 == 0) ? data_b[i] + 3 : $urandom_range(0, 40);
        if (off_b[i] > (1 << n) - 1) off_b[i] = (1 << n) - 1;
      end
      rd_req = 1;
      words = 0; cycles = 0; sat = 0;
      while (words < len + 1) begin
        out_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;
        #0.2;
        if (out_valid) cycles++;
        if (out_valid && out_ready) begin
          if (words == 0) begin
            header_t h;
            h = header_t'(out_word.data);
            check(out_word.nbits == 5'(HDR_BITS) && !out_word.last, "header width");
            check(h.channel == chan_id && h.res_sel == res_sel && h.seg_mode == seg_mode &&
                  h.start_cell == rd_start && h.event_no == rd_event, "header fields");
          end else begin
            int c, e;
            c = base + (start - base + words - 1) % len;
            if (cal_mode)        e = off_b[c];
            else if (sub_offset) e = (data_b[c] > off_b[c]) ? data_b[c] - off_b[c] : 0;
            else                 e = data_b[c];
            if (sub_offset && data_b[c] <= off_b[c]) sat++;
            check(out_word.nbits == 5'(n), "sample width");
            check(int'(out_word.data) == e, $sformatf("sample %0d cell %0d got %0d exp %0d", words - 1, c, out_word.data, e));
            check(out_word.last == (words == len), "last flag");
          end
          words++;
        end
        @(posedge clk); #0.1;
        if (words == len + 1) check(rd_done, "done pulse");
      end
      rd_req = 0;
      @(posedge clk); #0.1;
      check(!rd_done && !out_valid, "idle after event");
      if (!bp) check(cycles == len + 1, $sformatf("one word per clock: %0d cycles", cycles));
      if (sub_offset) check(sat > 0, "saturation exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
