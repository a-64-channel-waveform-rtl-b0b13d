// Digital control logic of one memory cell: the converter's output latches.
//
// Each cell owns a data memory and an offset memory, each wide enough for a
// 12-bit Gray code.  A conversion starts with 'conv_clear', which re-arms the
// cell.  During counting ('counting' high on a 200 MHz enable) the latch
// follows the channel Gray counter until the comparator has flipped: the code
// present on the first count at which 'cmp' is high is kept, and a cell whose
// comparator never flips keeps the last code, 2**N - 1.  With 'cal' high the
// result goes to the offset memory (offset calibration with a steady input),
// otherwise to the data memory.  Both memories are read out in parallel.
//
// The latches are written here as enabled flip-flops; the re-arm and
// full-scale behaviour are this design's own choices.
module cell_logic
  import asic_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,
  input  logic  conv_clear,  // re-arm at the start of a conversion
  input  logic  counting,    // Gray counter is running for this cell
  input  logic  cal,         // store into the offset memory
  input  logic  cmp,         // comparator output
  input  code_t gray,        // channel Gray counter
  output code_t data,        // data memory
  output code_t offset       // offset memory
);

  logic frozen;   // comparator has flipped during this conversion

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frozen <= 1'b0;
      data   <= '0;
      offset <= '0;
    end else if (ce) begin
      if (conv_clear) begin
        frozen <= 1'b0;
      end else if (counting && !frozen) begin
        if (cal) offset <= gray;
        else     data   <= gray;
        frozen <= cmp;
      end
    end
  end

endmodule
