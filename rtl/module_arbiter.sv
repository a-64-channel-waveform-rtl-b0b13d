// Module arbiter: shares one serializer lane among the channels of a module.
//
// The chip is split into modules of 8 channels, each with its own serializer,
// so that modules are independent of each other.  Inside a module the
// channels with an event ready compete for the lane.  A round-robin choice,
// starting after the channel served last, grants the lane to one channel,
// which then keeps it until the last word of its event has been accepted;
// events are never interleaved.  Choosing takes one clock after an event.
//
// Interface: valid/ready stream per channel in, one stream out.  The
// round-robin policy is this design's choice.
//
// Lint note: the loop index of the round-robin search is an int of which only
// the low bits address a channel.
module module_arbiter
  import asic_pkg::*;
#(
  parameter int unsigned N = CH_PER_MOD
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid [N],
  input  stream_word_t in_word  [N],
  output logic         in_ready [N],
  output logic         out_valid,
  output stream_word_t out_word,
  input  logic         out_ready
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          locked;
  logic [IW-1:0] grant, last_grant, pick;
  logic          any;

  always_comb begin
    pick = last_grant;
    any  = 1'b0;
    for (int k = 1; k <= N; k++) begin
      int unsigned c;
      c = (int'(last_grant) + k) % N;
      if (!any && in_valid[c]) begin
        any  = 1'b1;
        pick = IW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked     <= 1'b0;
      grant      <= '0;
      last_grant <= IW'(N - 1);
    end else if (!locked) begin
      if (any) begin
        locked <= 1'b1;
        grant  <= pick;
      end
    end else if (out_valid && out_ready && out_word.last) begin
      locked     <= 1'b0;
      last_grant <= grant;
    end
  end

  always_comb begin
    out_valid = locked && in_valid[grant];
    out_word  = in_word[grant];
    for (int c = 0; c < N; c++) in_ready[c] = locked && (grant == IW'(c)) && out_ready;
  end

  // an event, once started, keeps the lane until its last word
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (locked && !(out_valid && out_ready && out_word.last)) |=> locked && $stable(grant));

endmodule
