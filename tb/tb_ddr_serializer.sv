// Testbench of ddr_serializer.  Sends events made of a 27-bit header and
// 8..12-bit samples, first with the source always ready, then with random
// gaps and short events, and rebuilds the bit stream from the lane (two bits
// per valid clock, first bit on dq[1]).  Checks: every bit in order, odd
// events padded with one 0, with a continuous source each event is one
// unbroken run of valid clocks, and a full 12-bit, 256-sample event of
// 3099 bits occupies exactly 1550 clocks (800 Mbit/s at 400 MHz).
module tb_ddr_serializer;
  import asic_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  stream_word_t in_word;
  logic [1:0] dq;
  logic lane_valid;
  int checks = 0, failures = 0;

  bit exp_bits[$];
  int rx = 0, runs = 0, run_len = 0, last_run = 0;
  logic prev_valid = 0;

  ddr_serializer dut (.*);

  always #1.25 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (lane_valid) begin
      for (int b = 1; b >= 0; b--) begin
        if (exp_bits.size() == 0) check(0, "unexpected bit");
        else begin
          check(dq[b] == exp_bits[0], $sformatf("bit %0d got %0b exp %0b", rx, dq[b], exp_bits[0]));
          void'(exp_bits.pop_front());
        end
        rx++;
      end
      run_len++;
    end else if (prev_valid) begin
      runs++;
      last_run = run_len;
      run_len = 0;
    end
    prev_valid <= lane_valid;
  end

  task automatic send_word(logic [26:0] d, int nb, bit last, bit gaps);
    @(negedge clk);
    in_word.data = d; in_word.nbits = 5'(nb); in_word.last = last;
    in_valid = 1;
    #0.1;
    while (!in_ready) begin
      @(negedge clk); #0.1;
    end
    @(posedge clk); #0.1;
    in_valid = 0;
    if (gaps) repeat ($urandom_range(0, 12)) @(posedge clk);
  endtask

  task automatic send_event(int nsamp, int n, bit gaps);
    logic [26:0] h;
    int bits;
    h = 27'({$urandom} & 32'h7ff_ffff);
    for (int i = 26; i >= 0; i--) exp_bits.push_back(h[i]);
    bits = 27;
    send_word(h, 27, 0, gaps);
    for (int s = 0; s < nsamp; s++) begin
      automatic logic [26:0] d = 27'($urandom_range(0, (1 << n) - 1));
      for (int i = n - 1; i >= 0; i--) exp_bits.push_back(d[i]);
      bits += n;
      if (s == nsamp - 1 && bits % 2 == 1) exp_bits.push_back(1'b0);   // padding
      // set a stray high bit above the field, it must be ignored
      send_word(d | (27'(s & 1) << n), n, s == nsamp - 1, gaps);
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
    int ev;
    in_word = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #0.1;
    // full-size 12-bit event, continuous source
    send_event(256, 12, 0);
    wait (exp_bits.size() == 0);
    repeat (5) @(posedge clk);
    check(runs == 1 && last_run == 1550, $sformatf("3099-bit event took %0d clocks in %0d runs", last_run, runs));
    // continuous events of all resolutions
    ev = 0;
    for (int n = 8; n <= 12; n++) begin
      send_event(32 + 7 * n, n, 0);
      ev++;
    end
    wait (exp_bits.size() == 0);
    repeat (5) @(posedge clk);
    check(runs == 1 + ev, $sformatf("one run per event: %0d runs", runs));
    // random gaps and lengths
    for (int t = 0; t < 30; t++) send_event($urandom_range(1, 20), $urandom_range(8, 12), 1);
    wait (exp_bits.size() == 0);
    repeat (5) @(posedge clk);
    check(exp_bits.size() == 0 && !lane_valid, "all bits sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
