// Behavioural model of the analog part of one memory cell.
//
// Models the storage capacitor, its switches and the comparator of the
// in-cell single-slope ADC.  While the cell is written ('sample' high on a
// 200 MHz enable) the capacitor takes the front-end voltage relative to the
// reference, here 'vin', plus a fixed per-cell offset OFFSET that stands for
// the pedestal the offset calibration removes.  During digitisation
// ('to_ramp') the bottom plate follows the channel ramp; the comparator
// output goes high once the ramp reaches the stored level.  The comparator
// has a low-power and a full-power state (a quarter and all of the bias
// current); its output is only meaningful at full power ('pwr_up'), which the
// controller applies two cycles before the ramp starts.  Levels are codes in
// 12-bit ADC steps, so this is an ideal, noise-free converter.
//
// Lint note: the stored level starts at 0 through its declaration so that a
// cell converted before it was ever written reads as an empty cell; this is
// a simulation model and the initial value stands for the discharged
// capacitor.
module cell_analog
  import asic_pkg::*;
#(
  parameter int unsigned OFFSET = 0      // cell pedestal, 12-bit ADC steps
)(
  input  logic   clk,
  input  logic   ce,
  input  logic   sample,   // sampling switch closed for this 5 ns slot
  input  level_t vin,      // front-end output level
  input  logic   to_ramp,  // bottom plate switched from reference to ramp
  input  logic   pwr_up,   // comparator in full-power mode
  input  level_t ramp,     // channel ramp level
  output logic   cmp       // comparator output
);

  level_t vstore = '0;

  always_ff @(posedge clk)
    if (ce && sample) vstore <= vin + level_t'(OFFSET);

  assign cmp = pwr_up && to_ramp && (ramp >= vstore);

endmodule
