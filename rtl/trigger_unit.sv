// Chip trigger unit.
//
// Takes the 64 discriminator outputs and the external trigger and produces one
// trigger pulse per channel.  In sparse mode each channel is triggered by its
// own discriminator.  In imaging mode all channels are triggered together, so
// that the whole chip records the same time frame, by either a fast OR of the
// channels or a topological trigger that requires two neighbouring channels
// to fire at once.  The external trigger (background monitoring) triggers
// every channel in both modes.  'int_trig_en' = 0 leaves only the external
// trigger, for systems where an off-chip trigger processor decides from the
// primitives this unit outputs (discriminator states, fast OR, topological).
//
// Timing: inputs are sampled on the 200 MHz enable; a trigger is the rising
// edge of its source and lasts one enable period (two clocks).  Channel masks,
// the 8 x 8 neighbourhood (channel = 8 * row + column, 4 neighbours) and the
// edge detection are this design's choices.
module trigger_unit
  import asic_pkg::*;
#(
  parameter int unsigned N    = NCH,
  parameter int unsigned COLS = 8      // channels per row of the sensor map
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         imaging,
  input  logic         topo_sel,
  input  logic         int_trig_en,
  input  logic         ext_trig_en,
  input  logic [N-1:0] ch_mask,     // 1: channel may take part in triggers
  input  logic [N-1:0] disc,        // discriminator outputs
  input  logic         ext_trig,    // external trigger input
  output logic [N-1:0] ch_trig,     // trigger pulse per channel
  output logic [N-1:0] prim_disc,   // primitives: sampled discriminators
  output logic         prim_or,     // primitive: fast OR
  output logic         prim_topo    // primitive: two neighbours fired
);

  logic [N-1:0] d_q, d_q2;
  logic         ext_q, ext_q2, or_q, topo_q;
  logic         fast_or, topo;

  always_comb begin
    logic [N-1:0] d;
    d       = disc & ch_mask;
    fast_or = |d;
    topo    = 1'b0;
    for (int i = 0; i < N; i++) begin
      if ((i % COLS) != COLS - 1 && i + 1 < N && d[i] && d[i+1]) topo = 1'b1;
      if (i + COLS < N && d[i] && d[i+COLS])                       topo = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q <= '0; d_q2 <= '0;
      ext_q <= 1'b0; ext_q2 <= 1'b0;
      or_q <= 1'b0; topo_q <= 1'b0;
      prim_or <= 1'b0; prim_topo <= 1'b0;
    end else if (ce) begin
      d_q    <= disc & ch_mask;
      d_q2   <= d_q;
      ext_q  <= ext_trig;
      ext_q2 <= ext_q;
      prim_or   <= fast_or;
      prim_topo <= topo;
      or_q   <= prim_or;
      topo_q <= prim_topo;
    end
  end

  assign prim_disc = d_q;

  always_comb begin
    logic ext_p, img_p;
    ext_p = ext_trig_en && ext_q && !ext_q2;
    img_p = topo_sel ? (prim_topo && !topo_q) : (prim_or && !or_q);
    if (imaging) ch_trig = {N{(int_trig_en && img_p) || ext_p}};
    else         ch_trig = ({N{int_trig_en}} & d_q & ~d_q2) | {N{ext_p}};
  end

endmodule
