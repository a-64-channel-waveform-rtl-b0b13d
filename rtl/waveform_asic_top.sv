// 64-channel SiPM waveform sampling chip, digital top.
//
// Each channel stores its front-end waveform at 200 MS/s in a 256-cell analog
// memory and digitises it only after a trigger, with a single-slope ADC in
// every cell, so that a 12-bit conversion of a whole event takes about 20 us
// while no power is spent converting between the rare events.  The memory is
// one ring buffer or 4 x 64 / 8 x 32 cell segments for multi-buffering.  A
// chip trigger unit triggers channels one by one (sparse mode) or all
// together (imaging mode), from the discriminators or an external input, and
// offers its primitives to an external trigger processor.  Events leave on
// 8 DDR lanes at 400 MHz, one per module of 8 channels.
//
// Clocking: a single 400 MHz clock 'clk'.  The 200 MHz sampling and counting
// rate is an enable 'ce' on every second clock, generated here; using one
// clock with an enable instead of two clocks is this design's choice.
//
// Analog ports: the front-end amplifiers are outside the digital design; their
// outputs arrive as level codes 'vfe' (12-bit ADC steps above the reference),
// the thresholds 'thr' as codes of the threshold DACs.  Configuration is a
// static record 'cfg' (asic_pkg::chip_cfg_t) plus a channel trigger mask.
//
// NMODULES (default 8, the chip's 64 channels) sets the number of modules;
// smaller values give a chip slice for faster simulation.
module waveform_asic_top
  import asic_pkg::*;
#(
  parameter int unsigned NMODULES = NMOD,                 // modules of 8 channels
  localparam int unsigned NCHAN   = NMODULES * CH_PER_MOD // channels
)(
  input  logic              clk,           // 400 MHz
  input  logic              rst_n,
  input  chip_cfg_t         cfg,
  input  logic [NCHAN-1:0]  ch_mask,
  input  logic              acq_en,        // sampling enabled
  input  logic              ext_trig,      // external trigger
  input  level_t            vfe [NCHAN],   // front-end outputs
  input  level_t            thr [NCHAN],   // discriminator thresholds
  output logic [NCHAN-1:0]  prim_disc,     // trigger primitives
  output logic              prim_or,
  output logic              prim_topo,
  output logic [NCHAN-1:0]  ch_full,       // channel has no free segment
  output logic [NCHAN-1:0]  ch_trig_lost,  // trigger lost (pulse)
  output logic [NCHAN-1:0]  ch_trig_taken, // trigger accepted (pulse)
  output logic [1:0]        lane_dq    [NMODULES],
  output logic [NMODULES-1:0] lane_valid
);

  logic             ce;
  logic [NCHAN-1:0] disc, ch_trig;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ce <= 1'b0;
    else        ce <= !ce;

  trigger_unit #(.N(NCHAN), .COLS(8)) u_trig (
    .clk, .rst_n, .ce,
    .imaging(cfg.imaging), .topo_sel(cfg.topo_sel),
    .int_trig_en(cfg.int_trig_en), .ext_trig_en(cfg.ext_trig_en),
    .ch_mask, .disc, .ext_trig,
    .ch_trig, .prim_disc, .prim_or, .prim_topo
  );

  for (genvar m = 0; m < NMODULES; m++) begin : g_mod
    level_t vfe_m [CH_PER_MOD];
    level_t thr_m [CH_PER_MOD];
    for (genvar c = 0; c < CH_PER_MOD; c++) begin : g_map
      assign vfe_m[c] = vfe[m * CH_PER_MOD + c];
      assign thr_m[c] = thr[m * CH_PER_MOD + c];
    end

    readout_module #(.MOD_ID(m)) u_mod (
      .clk, .rst_n, .ce, .cfg, .acq_en,
      .vfe(vfe_m), .thr(thr_m),
      .disc(disc[m*CH_PER_MOD +: CH_PER_MOD]),
      .trig(ch_trig[m*CH_PER_MOD +: CH_PER_MOD]),
      .full(ch_full[m*CH_PER_MOD +: CH_PER_MOD]),
      .trig_lost(ch_trig_lost[m*CH_PER_MOD +: CH_PER_MOD]),
      .trig_taken(ch_trig_taken[m*CH_PER_MOD +: CH_PER_MOD]),
      .dq(lane_dq[m]), .lane_valid(lane_valid[m])
    );
  end

endmodule
