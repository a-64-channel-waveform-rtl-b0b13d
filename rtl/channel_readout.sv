// Channel readout: turns one converted segment into an event stream.
//
// An event is a 27-bit header (channel, resolution, partitioning, cell of the
// oldest sample, event number; layout in asic_pkg::header_t) followed by one
// N-bit word per cell of the segment, oldest sample first, N being the ADC
// resolution.  With 12 bits and the full 256-cell buffer an event is
// 27 + 256 * 12 = 3099 bits.  Each cell's Gray code is converted to binary
// and, if enabled, the cell's stored offset is subtracted (saturating at 0).
// In calibration mode the offset memory itself is sent.
//
// Interface: 'rd_req' from the channel controller starts an event; cells are
// addressed through 'cell_addr' and their two memories read combinationally
// on 'cell_data'/'cell_offset'.  Words leave on a valid/ready stream, one per
// clock at most; 'rd_done' pulses for one clock after the last word.  The
// header layout and the offset saturation are this design's choices.
module channel_readout
  import asic_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [5:0]    chan_id,
  input  seg_mode_e     seg_mode,
  input  logic [2:0]    res_sel,
  input  logic          cal_mode,
  input  logic          sub_offset,
  input  logic          rd_req,
  input  logic [7:0]    rd_start,
  input  logic [7:0]    rd_event,
  output logic          rd_done,
  output logic [7:0]    cell_addr,
  input  code_t         cell_data,
  input  code_t         cell_offset,
  output logic          out_valid,
  output stream_word_t  out_word,
  input  logic          out_ready
);

  typedef enum logic [1:0] {R_IDLE, R_HDR, R_DATA} rd_state_e;

  rd_state_e   state;
  logic [8:0]  idx;          // sample number inside the event
  logic [8:0]  len;
  logic [7:0]  base;         // first cell of the segment
  logic [8:0]  off0;         // offset of the oldest sample in the segment
  logic [4:0]  nbits;
  header_t     hdr;
  code_t       d_bin, o_bin, value;

  always_comb begin
    logic [8:0] pos;
    len   = 9'(seg_len(seg_mode));
    nbits = 5'(RES_MIN) + 5'((res_sel > 3'd4) ? 3'd4 : res_sel);
    base  = 8'((9'(rd_start) / len) * len);
    off0  = 9'(rd_start) - 9'(base);
    pos   = off0 + idx;
    if (pos >= len) pos = pos - len;
    cell_addr = base + 8'(pos);
  end

  always_comb begin
    d_bin = gray2bin(cell_data);
    o_bin = gray2bin(cell_offset);
    if (cal_mode)                 value = o_bin;
    else if (!sub_offset)         value = d_bin;
    else if (d_bin > o_bin)       value = d_bin - o_bin;
    else                          value = '0;
  end

  always_comb begin
    hdr.channel    = chan_id;
    hdr.res_sel    = 3'(nbits - 5'(RES_MIN));
    hdr.seg_mode   = seg_mode;
    hdr.start_cell = rd_start;
    hdr.event_no   = rd_event;
  end

  always_comb begin
    out_valid = (state != R_IDLE);
    out_word  = '0;
    if (state == R_HDR) begin
      out_word.data  = hdr;
      out_word.nbits = 5'(HDR_BITS);
    end else begin
      out_word.data  = HDR_BITS'(value);
      out_word.nbits = nbits;
      out_word.last  = (idx == len - 9'd1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= R_IDLE;
      idx     <= '0;
      rd_done <= 1'b0;
    end else begin
      rd_done <= 1'b0;
      unique case (state)
        R_IDLE: if (rd_req && !rd_done) begin
          state <= R_HDR;
          idx   <= '0;
        end
        R_HDR:  if (out_ready) state <= R_DATA;
        R_DATA: if (out_ready) begin
          if (idx == len - 9'd1) begin
            state   <= R_IDLE;
            rd_done <= 1'b1;
          end
          idx <= idx + 9'd1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
