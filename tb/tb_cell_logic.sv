// Testbench of cell_logic: runs conversions in which the comparator flips at
// a chosen count (or never) and checks that the data or offset memory holds
// the Gray code of that count (or of the last count), that the other memory
// is untouched and that 'conv_clear' re-arms the cell.
module tb_cell_logic;
  import asic_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0, conv_clear = 0, counting = 0, cal = 0, cmp = 0;
  code_t gray = 0, data, offset;
  int checks = 0, failures = 0;

  cell_logic dut (.*);

  always #1.25 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic code_t g(int k);
    return code_t'(k ^ (k >> 1));
  endfunction

  // one conversion of 2**n counts; comparator high from count 'flip' on
  task automatic convert(int n, int flip, bit c);
    cal = c;
    ce = 1; conv_clear = 1;
    @(posedge clk); #0.1;
    conv_clear = 0; ce = 0;
    @(posedge clk); #0.1;
    for (int k = 0; k < (1 << n); k++) begin
      gray = g(k); cmp = (flip >= 0 && k >= flip); counting = 1; ce = 1;
      @(posedge clk); #0.1;
      ce = 0;
      @(posedge clk); #0.1;
    end
    counting = 0; cmp = 0;
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
    for (int t = 0; t < 30; t++) begin
      automatic int n = 8 + $urandom_range(0, 4);
      automatic int flip = (t % 5 == 4) ? -1 : int'($urandom_range(0, (1 << n) - 1));
      automatic bit c = (t % 3 == 2);
      automatic code_t d0 = data, o0 = offset;
      automatic code_t exp_v = (flip < 0) ? g((1 << n) - 1) : g(flip);
      convert(n, flip, c);
      if (c) begin
        check(offset == exp_v, $sformatf("offset n=%0d flip=%0d got %h exp %h", n, flip, offset, exp_v));
        check(data == d0, "data kept during calibration");
      end else begin
        check(data == exp_v, $sformatf("data n=%0d flip=%0d got %h exp %h", n, flip, data, exp_v));
        check(offset == o0, "offset kept");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
