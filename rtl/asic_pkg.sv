// Shared constants and types of the 64-channel SiPM waveform sampling chip.
//
// Sizes that come from the architecture: 64 channels, 256 memory cells per
// channel, 12-bit maximum ADC resolution (programmable 8..12), segments of
// 32 or 64 cells for multi-buffering, a 27-bit event header and modules of
// 8 channels sharing one DDR serializer lane.  The field layout of the header,
// the configuration record and the encoding of analog levels as integer codes
// are this design's own choices.
//
// Analog levels (front-end output, stored cell voltage, ramp) travel between
// the behavioural models as unsigned codes in units of one 12-bit ADC step,
// measured from the reference voltage of the sampling phase.
package asic_pkg;

  localparam int unsigned NCH        = 64;   // channels per chip
  localparam int unsigned NCELL      = 256;  // analog memory cells per channel
  localparam int unsigned NMOD       = 8;    // serializer modules per chip
  localparam int unsigned CH_PER_MOD = 8;    // channels per module
  localparam int unsigned RES_MAX    = 12;   // maximum ADC resolution
  localparam int unsigned RES_MIN    = 8;    // minimum ADC resolution
  localparam int unsigned HDR_BITS   = 27;   // event header length
  localparam int unsigned PWRUP_CYC  = 2;    // comparator power-up cycles before the ramp
  localparam int unsigned LVL_W      = 14;   // width of an analog level code

  typedef logic [LVL_W-1:0]   level_t;       // analog level code
  typedef logic [RES_MAX-1:0] code_t;        // ADC code (Gray or binary)

  // Partitioning of the cell array.
  typedef enum logic [1:0] {
    SEG_256 = 2'd0,    // one ring buffer of 256 cells
    SEG_64  = 2'd1,    // four segments of 64 cells
    SEG_32  = 2'd2     // eight segments of 32 cells
  } seg_mode_e;

  // Chip-wide configuration (static during acquisition).
  typedef struct packed {
    logic      imaging;      // 1: all channels share one trigger; 0: sparse mode
    logic      topo_sel;     // imaging mode: 1 topological trigger, 0 fast OR
    logic      int_trig_en;  // allow discriminator triggers to start a readout
    logic      ext_trig_en;  // allow the external trigger
    seg_mode_e seg_mode;     // cell array partitioning
    logic [2:0] res_sel;     // ADC resolution = 8 + res_sel (0..4)
    logic      cal_mode;     // conversions load the offset memory
    logic      sub_offset;   // subtract the stored offset at readout
  } chip_cfg_t;

  // One word of an event stream: 'nbits' bits, right aligned in 'data'.
  typedef struct packed {
    logic [HDR_BITS-1:0] data;
    logic [4:0]          nbits;
    logic                last;   // final word of the event
  } stream_word_t;

  // Event header, 27 bits, sent first.
  typedef struct packed {
    logic [5:0] channel;     // channel number 0..63
    logic [2:0] res_sel;     // resolution - 8
    logic [1:0] seg_mode;    // partitioning, gives the number of samples
    logic [7:0] start_cell;  // cell holding the oldest sample
    logic [7:0] event_no;    // per-channel event counter
  } header_t;

  function automatic int unsigned seg_len(seg_mode_e m);
    case (m)
      SEG_64:  return 64;
      SEG_32:  return 32;
      default: return 256;
    endcase
  endfunction

  function automatic int unsigned seg_count(seg_mode_e m);
    return NCELL / seg_len(m);
  endfunction

  function automatic code_t bin2gray(code_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic code_t gray2bin(code_t g);
    code_t b;
    b[RES_MAX-1] = g[RES_MAX-1];
    for (int i = RES_MAX - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
