// Readout module: 8 channels sharing one DDR serializer lane.
//
// The chip is divided into 8 such modules, independent of each other, so a
// fault in one lane costs only its 8 channels.  The channels' event streams
// are merged by the module arbiter, one whole event at a time, and sent on the
// lane at 800 Mbit/s.  With 12-bit samples and 256-cell events an event is
// 3099 bits (3100 on the lane, odd lengths being padded), so reading all 8
// channels takes 8 x 1550 clocks, about 31 us at 400 MHz.
//
// Channel numbers are MOD_ID * 8 + local index.  Trigger pulses and
// discriminator outputs pass to and from the chip trigger unit.
//
// Lint note: 'rst_n' also reaches the 'disable iff' of the assertions in the
// channels and the arbiter, so it shows up as a synchronous net as well; the
// flip-flops themselves use it only as an asynchronous reset.
module readout_module
  import asic_pkg::*;
#(
  parameter int unsigned MOD_ID = 0
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,
  input  chip_cfg_t             cfg,
  input  logic                  acq_en,
  input  level_t                vfe  [CH_PER_MOD],
  input  level_t                thr  [CH_PER_MOD],
  output logic [CH_PER_MOD-1:0] disc,
  input  logic [CH_PER_MOD-1:0] trig,
  output logic [CH_PER_MOD-1:0] full,
  output logic [CH_PER_MOD-1:0] trig_lost,
  output logic [CH_PER_MOD-1:0] trig_taken,
  output logic [1:0]            dq,
  output logic                  lane_valid
);

  logic         ch_valid [CH_PER_MOD];
  stream_word_t ch_word  [CH_PER_MOD];
  logic         ch_ready [CH_PER_MOD];
  logic         s_valid, s_ready;
  stream_word_t s_word;

  for (genvar c = 0; c < CH_PER_MOD; c++) begin : g_ch
    channel #(.PED_SEED(MOD_ID * CH_PER_MOD + c)) u_ch (
      .clk, .rst_n, .ce, .cfg,
      .chan_id(6'(MOD_ID * CH_PER_MOD + c)),
      .acq_en, .vfe(vfe[c]), .thr(thr[c]),
      .disc(disc[c]), .trig(trig[c]),
      .out_valid(ch_valid[c]), .out_word(ch_word[c]), .out_ready(ch_ready[c]),
      .full(full[c]), .trig_lost(trig_lost[c]), .trig_taken(trig_taken[c])
    );
  end

  module_arbiter #(.N(CH_PER_MOD)) u_arb (
    .clk, .rst_n,
    .in_valid(ch_valid), .in_word(ch_word), .in_ready(ch_ready),
    .out_valid(s_valid), .out_word(s_word), .out_ready(s_ready)
  );

  ddr_serializer u_ser (
    .clk, .rst_n,
    .in_valid(s_valid), .in_word(s_word), .in_ready(s_ready),
    .dq, .lane_valid
  );

endmodule
