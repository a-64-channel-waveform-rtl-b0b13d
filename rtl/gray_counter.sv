// Channel Gray counter of the single-slope (Wilkinson) converters.
//
// One counter per channel; its Gray-coded output is broadcast to all 256
// memory cells, each of which latches the code present when its comparator
// flips.  Gray coding means that a cell latching while the count changes can
// be off by at most one step.  The resolution is programmable from 8 to 12
// bits: the counter wraps at 2**N and 'tc' marks the last count 2**N - 1, so a
// full conversion lasts 2**N counts of the 200 MHz sampling clock (20.48 us at
// 12 bits).  The binary value is also output, for the ramp generator.
//
// Timing: the count advances on clock edges where both 'ce' (200 MHz enable)
// and 'run' are high; 'clear' (with 'ce') returns it to zero.  The outputs are
// registered.  The binary-plus-converter structure is this design's choice.
module gray_counter
  import asic_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,        // 200 MHz count enable
  input  logic       clear,     // synchronous clear to 0
  input  logic       run,       // count
  input  logic [2:0] res_sel,   // resolution N = 8 + res_sel
  output code_t      gray,      // Gray code of the count, upper bits 0
  output code_t      bin,       // binary count
  output logic       tc         // count is 2**N - 1
);

  code_t cnt;
  code_t mask;

  logic [3:0] n;    // resolution in bits

  assign n    = 4'(RES_MIN) + ((res_sel > 3'd4) ? 4'd4 : 4'(res_sel));
  assign mask = code_t'((13'd1 << n) - 13'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      gray <= '0;
    end else if (ce) begin
      if (clear) begin
        cnt  <= '0;
        gray <= '0;
      end else if (run) begin
        cnt  <= (cnt + 1'b1) & mask;
        gray <= bin2gray((cnt + 1'b1) & mask);
      end
    end
  end

  assign bin = cnt;
  assign tc  = (cnt == mask);

endmodule
