// Testbench of ramp_generator: for every resolution checks that the ramp
// starts at the reference level after 'clear' and rises by 2**(12-N) steps
// per enabled count, reaching 4096 - 2**(12-N) on the last of 2**N counts.
module tb_ramp_generator;
  import asic_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0, clear = 0, run = 0;
  logic [2:0] res_sel = 0;
  level_t ramp;
  int checks = 0, failures = 0;

  ramp_generator dut (.*);

  always #1.25 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic tick(bit en);
    ce = en;
    @(posedge clk); #0.1;
    ce = 0;
    @(posedge clk); #0.1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r <= 4; r++) begin
      automatic int n = 8 + r;
      res_sel = 3'(r);
      run = 1; tick(1); run = 0;
      clear = 1; tick(1); clear = 0;
      check(ramp == 0, "clear");
      run = 1;
      for (int k = 0; k < (1 << n); k++) begin
        check(int'(ramp) == k * (4096 >> n), $sformatf("N=%0d k=%0d ramp=%0d", n, k, ramp));
        tick(1);
      end
      run = 0;
      tick(0);
      check(int'(ramp) == 4096, "end of ramp");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
