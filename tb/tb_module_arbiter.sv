// Testbench of module_arbiter with 8 event sources and a sink with random
// back-pressure.  Every word carries its source, event and position, so the
// checker can see that events arrive whole and never interleaved, that every
// event is delivered once and in order per source, and, while all sources
// are busy, that the lane rotates 0, 1, ..., 7, 0, ...
module tb_module_arbiter;
  import asic_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid [N], in_ready [N];
  stream_word_t in_word [N];
  logic out_valid, out_ready = 1;
  stream_word_t out_word;
  int checks = 0, failures = 0;

  int ev_len  [N][$];   // pending events per source: length
  int sent_ev [N];      // events of each source completed at the source
  int pos     [N];      // next word index of the current event
  int rx_ev   [N];      // events received per source
  int cur_src = -1, cur_pos = 0, last_src = -1;
  bit strict = 1;

  module_arbiter #(.N(N)) dut (.*);

  always #1.25 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always_comb
    for (int s = 0; s < N; s++) begin
      in_valid[s] = (ev_len[s].size() > 0);
      in_word[s]  = '0;
      in_word[s].data  = HDR_BITS'((s << 20) | ((sent_ev[s] & 255) << 10) | pos[s]);
      in_word[s].nbits = 5'd12;
      in_word[s].last  = (ev_len[s].size() > 0) && (pos[s] == ev_len[s][0] - 1);
    end

  always @(posedge clk) if (rst_n) begin
    // sink side
    if (out_valid && out_ready) begin
      int s, e, p;
      s = int'(out_word.data) >> 20;
      e = (int'(out_word.data) >> 10) & 255;
      p = int'(out_word.data) & 1023;
      if (cur_src < 0) begin
        if (strict && last_src >= 0)
          check(s == (last_src + 1) % N, $sformatf("rotation %0d after %0d", s, last_src));
        cur_src = s; cur_pos = 0;
      end
      check(s == cur_src, "no interleaving");
      check(p == cur_pos && e == (rx_ev[s] & 255), $sformatf("word order src %0d ev %0d pos %0d", s, e, p));
      cur_pos++;
      if (out_word.last) begin
        rx_ev[s]++;
        last_src = cur_src;
        cur_src  = -1;
      end
    end
    // source side
    for (int s = 0; s < N; s++)
      if (in_valid[s] && in_ready[s]) begin
        if (pos[s] == ev_len[s][0] - 1) begin
          void'(ev_len[s].pop_front());
          pos[s] = 0;
          sent_ev[s]++;
        end else pos[s]++;
      end
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int s = 0; s < N; s++) begin
      sent_ev[s] = 0; pos[s] = 0; rx_ev[s] = 0;
    end
    // phase 1: every source busy
    for (int s = 0; s < N; s++)
      repeat (6) ev_len[s].push_back($urandom_range(1, 8));
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ev_len[0].size() + ev_len[7].size() == 0);
    repeat (50) @(posedge clk);
    // phase 2: random arrivals
    strict = 0;
    for (int t = 0; t < 200; t++) begin
      @(posedge clk); #0.1;
      ev_len[$urandom_range(0, N - 1)].push_back($urandom_range(1, 8));
      repeat ($urandom_range(0, 6)) @(posedge clk);
    end
    repeat (3000) @(posedge clk);
    total = 0;
    for (int s = 0; s < N; s++) begin
      check(rx_ev[s] == sent_ev[s] && ev_len[s].size() == 0, $sformatf("source %0d delivered", s));
      total += rx_ev[s];
    end
    check(total == 6 * N + 200, $sformatf("%0d events", total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
