// Testbench of discriminator: random and boundary level/threshold pairs; the
// output must be high exactly when the level is above the threshold.
module tb_discriminator;
  import asic_pkg::*;

  level_t vfe = 0, thr = 0;
  logic fire;
  int checks = 0, failures = 0;

  discriminator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic int a = $urandom_range(0, 4095);
      automatic int b = (t % 3 == 0) ? a + int'($urandom_range(0, 2)) - 1 : int'($urandom_range(0, 4095));
      if (b < 0) b = 0;
      vfe = level_t'(a); thr = level_t'(b);
      #1;
      checks++;
      if (fire != (a > b)) begin
        failures++;
        $display("FAIL vfe=%0d thr=%0d fire=%0b", a, b, fire);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
