// Behavioural model of the channel ramp generator (analog part).
//
// A single voltage ramp per channel is applied to the bottom plates of the
// storage capacitors of the cells being digitised; charge conservation moves
// their floating top plates by the same amount until each comparator reaches
// its threshold.  This model represents the ramp voltage as a level code in
// 12-bit ADC steps.  The ramp starts at the reference level (0) on 'clear' and
// rises by 2**(12-N) steps per 200 MHz count, so that it spans the full input
// range in the 2**N counts of an N-bit conversion and stays aligned with the
// Gray counter (ramp = count * 2**(12-N)).  The step law is this design's
// idealisation of a linear analog ramp.
module ramp_generator
  import asic_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       clear,     // return to the reference level
  input  logic       run,       // ramp up
  input  logic [2:0] res_sel,   // resolution N = 8 + res_sel
  output level_t     ramp       // ramp level, 12-bit ADC steps
);

  level_t step;

  logic [3:0] n;    // resolution in bits

  assign n    = 4'(RES_MIN) + ((res_sel > 3'd4) ? 4'd4 : 4'(res_sel));
  assign step = level_t'(1) << (4'(RES_MAX) - n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          ramp <= '0;
    else if (ce) begin
      if (clear)         ramp <= '0;
      else if (run)      ramp <= ramp + step;
    end
  end

endmodule
