// Testbench of cell_analog: samples random levels and checks that the
// comparator flips exactly when the ramp reaches level + OFFSET, that it
// stays low in low-power mode or with the bottom plate on the reference, and
// that a slot without 'sample' or without 'ce' does not disturb the stored
// voltage.
module tb_cell_analog;
  import asic_pkg::*;

  localparam int OFF = 5;
  logic clk = 0, ce = 0, sample = 0, to_ramp = 0, pwr_up = 0;
  level_t vin = 0, ramp = 0;
  logic cmp;
  int checks = 0, failures = 0;

  cell_analog #(.OFFSET(OFF)) dut (.*);

  always #1.25 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      automatic int v = $urandom_range(0, 4000);
      vin = level_t'(v); sample = 1; ce = 1;
      @(posedge clk); #0.1;
      sample = 0;
      vin = level_t'($urandom_range(0, 4000));   // later slots must not matter
      @(posedge clk); #0.1;
      ce = 0;
      sample = 1;                                 // no ce: must not sample
      @(posedge clk); #0.1;
      sample = 0;
      // ramp sweep around the threshold
      to_ramp = 1; pwr_up = 0; ramp = 4095;
      #0.1 check(cmp == 0, "low power");
      pwr_up = 1; to_ramp = 0;
      #0.1 check(cmp == 0, "bottom plate on reference");
      to_ramp = 1;
      for (int d = -3; d <= 3; d++) begin
        automatic int r = v + OFF + d;
        if (r < 0) continue;
        ramp = level_t'(r);
        #0.1 check(cmp == (d >= 0), $sformatf("v=%0d d=%0d cmp=%0b", v, d, cmp));
      end
      to_ramp = 0; pwr_up = 0; ramp = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
