// Channel controller: the FSMs that run one channel's 256-cell analog memory.
//
// Sampling.  While 'acq_en' is high one cell is written per 200 MHz enable
// ('ce'), cycling through the active segment as a ring buffer.  The array is
// used as one 256-cell buffer or as 4 x 64 or 8 x 32 cell segments
// (cfg.seg_mode).  A trigger pulse freezes the active segment, with the cell
// written in that slot as its newest sample, and sampling carries on at once
// in the next segment if one is free (multi-buffering derandomises events).
// If every segment is waiting for conversion or readout, sampling stops and
// triggers are counted as lost ('trig_lost' pulse).
//
// Digitisation.  Frozen segments are converted one at a time, oldest first:
// PWRUP_CYC (2) enable cycles power up the comparators and switch the bottom
// plates to the ramp, then the shared Gray counter and ramp run for 2**N
// counts.  Segments are converted while other segments keep sampling.
//
// Readout.  Converted segments are offered to the channel readout, oldest
// first, with the cell that holds their oldest sample and their event number;
// 'rd_done' (any clock cycle) releases the segment for sampling again.
//
// Segments are always taken in round-robin order, so three counters describe
// the state: the segment being read, how many are frozen (n_busy) and how many
// of those are converted (n_conv).  Triggers are sampled on 'ce' only.  The
// immediate stop on trigger (no post-trigger delay) and the round-robin order
// are this design's choices.  Sampling restarts at the first cell of the
// segment whenever 'acq_en' has been low; the partitioning may only be
// changed while 'acq_en' is low and no event is pending.
module channel_controller
  import asic_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,          // 200 MHz enable
  input  seg_mode_e  seg_mode,
  input  logic       acq_en,      // sampling enabled
  input  logic       trig,        // trigger, sampled on ce
  // sampling
  output logic       wr_en,       // a cell is written in this slot
  output logic [7:0] wr_cell,     // cell written in this slot
  // conversion
  output logic [7:0] conv_grp,    // 32-cell groups in the converting segment
  output logic       conv_pwrup,  // comparators powered, bottom plates on ramp
  output logic       conv_clear,  // first power-up cycle: re-arm the cells
  output logic       conv_count,  // counter and ramp running
  output logic       cnt_clear,   // Gray counter and ramp clear
  output logic       cnt_run,     // Gray counter and ramp run
  input  logic       cnt_tc,      // last count
  // readout
  output logic       rd_req,      // a converted segment is waiting
  output logic [7:0] rd_start,    // cell with its oldest sample
  output logic [7:0] rd_event,    // its event number
  input  logic       rd_done,     // segment read out, release it
  // status
  output logic       full,        // no segment free for sampling
  output logic       trig_lost,   // trigger arrived while full (one clock)
  output logic       trig_taken   // trigger froze a segment (one clock)
);

  typedef enum logic [1:0] {C_IDLE, C_PWRUP, C_COUNT} conv_state_e;

  localparam int unsigned NSEG_MAX = NCELL / 32;

  conv_state_e cstate;
  logic [3:0]  n_busy, n_conv;
  logic [2:0]  rd_seg, conv_seg;
  logic [7:0]  wr_ptr;                 // position inside the sampling segment
  logic [0:0]  pw_cnt;
  logic [7:0]  start_cell [NSEG_MAX];
  logic [7:0]  event_no   [NSEG_MAX];
  logic [7:0]  ev_cnt;

  logic [8:0]  len;
  logic [3:0]  nseg;
  logic [2:0]  samp_seg;
  logic        sampling, take, conv_done, conv_start;

  always_comb begin
    len  = 9'(seg_len(seg_mode));
    nseg = 4'(seg_count(seg_mode));
  end

  // Round-robin segment index arithmetic modulo nseg.
  function automatic logic [2:0] seg_add(logic [2:0] a, logic [3:0] b, logic [3:0] n);
    logic [4:0] s;
    s = 5'(a) + 5'(b);
    if (s >= 5'(n)) s = s - 5'(n);
    return s[2:0];
  endfunction

  assign samp_seg   = seg_add(rd_seg, n_busy, nseg);
  assign full       = (n_busy >= nseg);
  assign sampling   = acq_en && !full;
  assign wr_en      = sampling;
  assign wr_cell    = 8'((9'(samp_seg) * len) + 9'(wr_ptr));
  assign take       = ce && trig && sampling;
  assign trig_taken = take;
  assign trig_lost  = ce && trig && acq_en && full;

  assign conv_start = ce && (cstate == C_IDLE) && (n_conv < n_busy);
  assign conv_done  = ce && (cstate == C_COUNT) && cnt_tc;

  // sampling pointer, trigger bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      ev_cnt <= '0;
      for (int i = 0; i < NSEG_MAX; i++) begin
        start_cell[i] <= '0;
        event_no[i]   <= '0;
      end
    end else if (ce && !acq_en) begin
      wr_ptr <= '0;                      // sampling restarts at the segment start
    end else if (ce && sampling) begin
      if (trig) begin
        start_cell[samp_seg] <= 8'((9'(samp_seg) * len) +
                                   ((9'(wr_ptr) + 9'd1 == len) ? 9'd0 : 9'(wr_ptr) + 9'd1));
        event_no[samp_seg]   <= ev_cnt;
        ev_cnt               <= ev_cnt + 8'd1;
        wr_ptr               <= '0;
      end else begin
        wr_ptr <= (9'(wr_ptr) + 9'd1 >= len) ? 8'd0 : wr_ptr + 8'd1;
      end
    end
  end

  // occupancy counters and read pointer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_busy <= '0;
      n_conv <= '0;
      rd_seg <= '0;
    end else begin
      n_busy <= n_busy + 4'(take)      - 4'(rd_done);
      n_conv <= n_conv + 4'(conv_done) - 4'(rd_done);
      if (rd_done) rd_seg <= seg_add(rd_seg, 4'd1, nseg);
    end
  end

  // conversion FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate   <= C_IDLE;
      conv_seg <= '0;
      pw_cnt   <= '0;
    end else if (ce) begin
      unique case (cstate)
        C_IDLE: if (conv_start) begin
          cstate   <= C_PWRUP;
          conv_seg <= seg_add(rd_seg, n_conv, nseg);
          pw_cnt   <= '0;
        end
        C_PWRUP: begin
          pw_cnt <= pw_cnt + 1'b1;
          if (pw_cnt == 1'(PWRUP_CYC - 1)) cstate <= C_COUNT;
        end
        C_COUNT: if (cnt_tc) cstate <= C_IDLE;
        default: cstate <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    conv_grp = '0;
    for (int g = 0; g < NSEG_MAX; g++)
      if (cstate != C_IDLE && (9'(g) * 9'd32) / len == 9'(conv_seg)) conv_grp[g] = 1'b1;
  end

  assign conv_pwrup = (cstate != C_IDLE);
  assign conv_clear = (cstate == C_PWRUP) && (pw_cnt == 1'b0);
  assign conv_count = (cstate == C_COUNT);
  assign cnt_clear  = (cstate == C_PWRUP);
  assign cnt_run    = (cstate == C_COUNT);

  assign rd_req   = (n_conv != 0);
  assign rd_start = start_cell[rd_seg];
  assign rd_event = event_no[rd_seg];

  // a segment is released only after it was converted
  a_done_after_conv: assert property (@(posedge clk) disable iff (!rst_n)
                                      rd_done |-> n_conv != 0);
  a_busy_bound:      assert property (@(posedge clk) disable iff (!rst_n)
                                      n_busy <= nseg && n_conv <= n_busy);

endmodule
