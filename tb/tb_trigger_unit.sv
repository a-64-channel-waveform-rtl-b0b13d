// Testbench of trigger_unit: random discriminator patterns, external
// triggers and configurations, checked every 200 MHz slot against a reference
// model of sparse mode, imaging mode with fast OR and with the topological
// trigger on the 8 x 8 map, masks and trigger enables.  Directed cases make
// sure the topological trigger both fires on neighbours (also vertical ones)
// and ignores channels that are adjacent only in numbering across a row end.
module tb_trigger_unit;
  import asic_pkg::*;

  localparam int N = 64;
  logic clk = 0, rst_n = 0, ce = 0;
  logic imaging = 0, topo_sel = 0, int_trig_en = 1, ext_trig_en = 1, ext_trig = 0;
  logic [N-1:0] ch_mask = '1, disc = '0, ch_trig, prim_disc;
  logic prim_or, prim_topo;
  int checks = 0, failures = 0;
  int n_topo = 0, n_or_only = 0, n_sparse = 0, n_ext = 0;

  // reference state
  logic [N-1:0] p_d = '0;
  logic p_or = 0, p_topo = 0, p_ext = 0;

  trigger_unit #(.N(N), .COLS(8)) dut (.*);

  always #1.25 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic bit ref_topo(logic [N-1:0] d);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        if (c < 7 && d[8*r+c] && d[8*r+c+1]) return 1;
        if (r < 7 && d[8*r+c] && d[8*(r+1)+c]) return 1;
      end
    return 0;
  endfunction

  // one 200 MHz slot with the given inputs, then compare
  task automatic slot(logic [N-1:0] d, bit e);
    logic [N-1:0] md, exp_t;
    bit cor, ctopo, img;
    disc = d; ext_trig = e;
    ce = 1;
    @(posedge clk); #0.1;
    ce = 0;
    md    = d & ch_mask;
    cor   = |md;
    ctopo = ref_topo(md);
    img   = topo_sel ? (ctopo && !p_topo) : (cor && !p_or);
    if (imaging) exp_t = {N{(int_trig_en && img) || (ext_trig_en && e && !p_ext)}};
    else         exp_t = ({N{int_trig_en}} & md & ~p_d) | {N{ext_trig_en && e && !p_ext}};
    check(ch_trig == exp_t, $sformatf("trig img=%0b topo=%0b got %h exp %h", imaging, topo_sel, ch_trig, exp_t));
    check(prim_disc == md && prim_or == cor && prim_topo == ctopo, "primitives");
    if (exp_t != 0) begin
      if (ext_trig_en && e && !p_ext) n_ext++;
      else if (imaging && topo_sel) n_topo++;
      else if (imaging) n_or_only++;
      else n_sparse++;
    end
    p_d = md; p_or = cor; p_topo = ctopo; p_ext = e;
    @(posedge clk); #0.1;
    check(ch_trig == exp_t, "trigger lasts one slot");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #0.1;
    // directed: topological trigger
    imaging = 1; topo_sel = 1;
    slot(64'h0, 0);
    slot(64'h1 << 7 | 64'h1 << 8, 0);                 // 7 and 8: different rows
    check(ch_trig == 0, "row end is not a neighbour");
    slot(64'h0, 0);
    slot(64'h1 << 9 | 64'h1 << 17, 0);                // vertical neighbours
    check(ch_trig == '1, "vertical neighbours fire");
    slot(64'h0, 0);
    slot(64'h1 << 20 | 64'h1 << 21, 0);               // horizontal neighbours
    check(ch_trig == '1, "horizontal neighbours fire");
    slot(64'h0, 0);
    // random
    for (int t = 0; t < 4000; t++) begin
      logic [N-1:0] d;
      if (t % 50 == 0) begin
        imaging     = $urandom_range(0, 1);
        topo_sel    = $urandom_range(0, 1);
        int_trig_en = ($urandom_range(0, 5) != 0);
        ext_trig_en = $urandom_range(0, 1);
        ch_mask     = (t % 200 == 0) ? {$urandom, $urandom} : '1;
      end
      d = '0;
      for (int i = 0; i < N; i++) d[i] = ($urandom_range(0, 40) == 0);
      slot(d, $urandom_range(0, 7) == 0);
    end
    $display("triggers: sparse %0d, fast OR %0d, topological %0d, external %0d",
             n_sparse, n_or_only, n_topo, n_ext);
    check(n_sparse > 0 && n_or_only > 0 && n_topo > 0 && n_ext > 0, "all trigger kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
