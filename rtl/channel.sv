// One readout channel: discriminator, 256-cell analog memory with an ADC in
// every cell, shared Gray counter and ramp, controller and event formatter.
//
// The front-end output level 'vfe' is written into one cell per 200 MHz
// enable while sampling.  On a trigger the controller freezes the active
// segment and later digitises all of its cells in parallel: every cell
// compares its stored voltage with the common ramp and latches the common
// Gray count when its comparator flips, so a segment takes 2 + 2**N counts
// whatever its length (20.49 us at 12 bits).  The readout then streams a
// 27-bit header and one N-bit sample per cell.  'disc' is the channel's
// trigger primitive, to the chip trigger unit; 'trig' comes back from it.
//
// Parameter PED_SEED varies the pedestals of the cell models from channel to
// channel (cell pedestal = (37 * cell + 11 * PED_SEED + 5) mod 13 steps); it
// only affects the behavioural analog models.
//
// Lint notes: the Gray counter's binary output is left unconnected because
// the cells latch the Gray code; the configuration bits that only the chip
// trigger unit uses (mode and trigger enables) are not read here.
module channel
  import asic_pkg::*;
#(
  parameter int unsigned PED_SEED = 0
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  chip_cfg_t    cfg,
  input  logic [5:0]   chan_id,
  input  logic         acq_en,
  input  level_t       vfe,        // front-end output level
  input  level_t       thr,        // discriminator threshold
  output logic         disc,
  input  logic         trig,
  output logic         out_valid,
  output stream_word_t out_word,
  input  logic         out_ready,
  output logic         full,
  output logic         trig_lost,
  output logic         trig_taken
);

  logic       wr_en;
  logic [7:0] wr_cell, conv_grp, cell_addr, rd_start, rd_event;
  logic       conv_pwrup, conv_clear, conv_count, cnt_clear, cnt_run, cnt_tc;
  logic       rd_req, rd_done;
  code_t      gray, cell_data, cell_offset;
  level_t     ramp;
  code_t      data_mem [NCELL];
  code_t      off_mem  [NCELL];

  discriminator u_disc (.vfe(vfe), .thr(thr), .fire(disc));

  channel_controller u_ctrl (
    .clk, .rst_n, .ce,
    .seg_mode(cfg.seg_mode),
    .acq_en, .trig,
    .wr_en, .wr_cell,
    .conv_grp, .conv_pwrup, .conv_clear, .conv_count,
    .cnt_clear, .cnt_run, .cnt_tc,
    .rd_req, .rd_start, .rd_event, .rd_done,
    .full, .trig_lost, .trig_taken
  );

  gray_counter u_cnt (
    .clk, .rst_n, .ce, .clear(cnt_clear), .run(cnt_run),
    .res_sel(cfg.res_sel), .gray, .bin(), .tc(cnt_tc)
  );

  ramp_generator u_ramp (
    .clk, .rst_n, .ce, .clear(cnt_clear), .run(cnt_run),
    .res_sel(cfg.res_sel), .ramp
  );

  for (genvar i = 0; i < NCELL; i++) begin : g_cell
    logic in_conv, cmp;
    assign in_conv = conv_grp[i / 32];

    cell_analog #(.OFFSET((37 * i + 11 * PED_SEED + 5) % 13)) u_ana (
      .clk, .ce,
      .sample(wr_en && wr_cell == 8'(i)),
      .vin(vfe),
      .to_ramp(in_conv && conv_pwrup),
      .pwr_up(in_conv && conv_pwrup),
      .ramp, .cmp
    );

    cell_logic u_logic (
      .clk, .rst_n, .ce,
      .conv_clear(in_conv && conv_clear),
      .counting(in_conv && conv_count),
      .cal(cfg.cal_mode),
      .cmp, .gray,
      .data(data_mem[i]), .offset(off_mem[i])
    );
  end

  assign cell_data   = data_mem[cell_addr];
  assign cell_offset = off_mem[cell_addr];

  channel_readout u_rd (
    .clk, .rst_n, .chan_id,
    .seg_mode(cfg.seg_mode), .res_sel(cfg.res_sel),
    .cal_mode(cfg.cal_mode), .sub_offset(cfg.sub_offset),
    .rd_req, .rd_start, .rd_event, .rd_done,
    .cell_addr, .cell_data, .cell_offset,
    .out_valid, .out_word, .out_ready
  );

endmodule
