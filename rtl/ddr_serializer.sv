// DDR serializer of one module lane.
//
// Accepts stream words of 8 to 27 bits and sends them MSB first, two bits per
// 400 MHz clock: dq[1] is the bit for the first (rising-edge) half of the
// cycle and dq[0] the bit for the second (falling-edge) half, 800 Mbit/s per
// lane.  The output DDR register and pad are outside this module.  A 64-bit
// buffer absorbs the word widths; bits sit MSB-aligned in it.  'lane_valid'
// marks clocks that carry data.  An event whose length is odd gets one
// 0 bit of padding, and the next event is not accepted until the previous one
// has left, so that each event is one uninterrupted run of valid clocks when
// its words arrive fast enough (one 12-bit word per 6 clocks suffices).
//
// The buffer, the padding rule and the valid strobe are this design's
// choices; the 400 MHz DDR lane is the architecture's.
module ddr_serializer
  import asic_pkg::*;
(
  input  logic         clk,        // 400 MHz
  input  logic         rst_n,
  input  logic         in_valid,
  input  stream_word_t in_word,
  output logic         in_ready,
  output logic [1:0]   dq,         // {rising-edge bit, falling-edge bit}
  output logic         lane_valid
);

  localparam int unsigned BW = 64;

  logic [BW-1:0] buffer;
  logic [6:0]    cnt;          // valid bits in the buffer
  logic          tail;         // the last word of an event is in the buffer

  logic [1:0]    shift;
  logic          take;

  assign in_ready = (cnt <= 7'(BW - HDR_BITS - 1)) && !tail;
  assign take     = in_valid && in_ready;

  always_comb begin
    if (cnt >= 7'd2)            shift = 2'd2;
    else if (cnt == 7'd1 && tail) shift = 2'd1;
    else                        shift = 2'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buffer     <= '0;
      cnt        <= '0;
      tail       <= 1'b0;
      dq         <= '0;
      lane_valid <= 1'b0;
    end else begin
      logic [BW-1:0] nb;
      logic [6:0]    nc;
      lane_valid <= (shift != 2'd0);
      dq         <= (shift == 2'd2) ? buffer[BW-1 -: 2] :
                    (shift == 2'd1) ? {buffer[BW-1], 1'b0} : 2'b00;
      nb = buffer << shift;
      nc = cnt - 7'(shift);
      if (take) begin
        logic [BW-1:0] w;
        w  = BW'(in_word.data) & ~({BW{1'b1}} << in_word.nbits);
        w  = w << (7'(BW) - nc - 7'(in_word.nbits));
        nb = nb | w;
        nc = nc + 7'(in_word.nbits);
      end
      buffer <= nb;
      cnt    <= nc;
      if (take && in_word.last)  tail <= 1'b1;
      else if (nc == 7'd0)       tail <= 1'b0;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cnt <= 7'(BW));

endmodule
