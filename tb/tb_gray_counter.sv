// Testbench of gray_counter: for every resolution (8..12 bits) clears the
// counter, runs it through a full conversion and one wrap, and checks the
// Gray output against k ^ (k >> 1), the one-bit change between counts, the
// terminal count at 2**N - 1 and that nothing moves without 'ce' or 'run'.
module tb_gray_counter;
  import asic_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0, clear = 0, run = 0;
  logic [2:0] res_sel = 0;
  code_t gray, bin;
  logic tc;
  int checks = 0, failures = 0;

  gray_counter dut (.*);

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
      int k;
      res_sel = 3'(r);
      clear = 1; tick(1); clear = 0;
      check(gray == 0 && bin == 0, "clear");
      run = 1;
      k = 0;
      for (int i = 0; i < (1 << n) + 3; i++) begin
        code_t prev;
        int exp_g;
        exp_g = k ^ (k >> 1);
        check(gray == code_t'(exp_g), $sformatf("N=%0d k=%0d gray=%h", n, k, gray));
        check(tc == (k == (1 << n) - 1), $sformatf("tc N=%0d k=%0d", n, k));
        prev = gray;
        tick(1);
        k = (k + 1) % (1 << n);
        check($countones(prev ^ gray) == 1, "one bit change");
      end
      // hold without ce / run
      begin
        automatic code_t g0 = gray;
        tick(0);
        run = 0; tick(1);
        check(gray == g0, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
