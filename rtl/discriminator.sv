// Behavioural model of the channel discriminator (analog comparator).
//
// Compares the front-end output with the channel's programmable threshold and
// gives the trigger primitive of the channel: high while the front-end level
// is above the threshold.  Both are level codes in 12-bit ADC steps above the
// reference.  The output is asynchronous; the trigger unit samples it on the
// 200 MHz enable.  An ideal comparator without hysteresis is assumed.
module discriminator
  import asic_pkg::*;
(
  input  level_t vfe,   // front-end output level
  input  level_t thr,   // programmable threshold
  output logic   fire   // trigger primitive
);

  assign fire = (vfe > thr);

endmodule
