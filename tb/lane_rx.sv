// Receiver model of one serial lane: collects two bits per valid clock
// (dq[1] first), cuts the stream into events using the header (resolution
// and partitioning give the length, odd lengths carry one padding bit) and
// queues each event with the clock numbers of its first and last bit.
module lane_rx
  import tb_pkg::*;
(
  input logic       clk,
  input logic       rst_n,
  input logic [1:0] dq,
  input logic       valid
);

  event_t events [$];
  bit     bits   [$];
  longint clk_no = 0, t_first = -1;
  int     pad_errors = 0;

  function automatic int take(int n);
    int v = 0;
    for (int i = 0; i < n; i++) begin
      v = (v << 1) | int'(bits[0]);
      void'(bits.pop_front());
    end
    return v;
  endfunction

  always @(posedge clk) begin
    clk_no++;
    if (rst_n && valid) begin
      if (bits.size() == 0 && t_first < 0) t_first = clk_no;
      bits.push_back(dq[1]);
      bits.push_back(dq[0]);
      if (bits.size() >= 27) begin
        int res, segm, len, total;
        res   = 8 + ((bits[6] ? 4 : 0) | (bits[7] ? 2 : 0) | (bits[8] ? 1 : 0));
        segm  = (bits[9] ? 2 : 0) | (bits[10] ? 1 : 0);
        len   = seg_len_of(segm);
        total = 27 + len * res;
        if (total % 2 == 1) total++;
        if (bits.size() >= total) begin
          event_t e;
          e.ch    = take(6);
          e.res   = 8 + take(3);
          e.segm  = take(2);
          e.start = take(8);
          e.evno  = take(8);
          e.len   = len;
          for (int i = 0; i < len; i++) e.s[i] = take(e.res);
          if ((27 + len * res) % 2 == 1)
            if (take(1) != 0) pad_errors++;
          e.t_first = t_first;
          e.t_last  = clk_no;
          t_first   = bits.size() > 0 ? clk_no : -1;
          events.push_back(e);
        end
      end
    end
  end

endmodule
