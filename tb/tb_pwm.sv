// tb_pwm: loads several samples and checks, cycle by cycle, that the output is
// high exactly when the free-running 8-bit counter is below the sample, and
// that the number of high cycles in one 256-cycle period equals the sample.
module tb_pwm;
  import omnichord_pkg::*;
  logic clk = 0, rst = 1, sample_valid = 0, pwm_out;
  sample_t sample = '0;
  int checks = 0, failures = 0;

  pwm dut (.clk, .rst, .sample, .sample_valid, .pwm_out);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t values [6] = '{8'd0, 8'd1, 8'd128, 8'd200, 8'd255, 8'd37};
    repeat (2) @(posedge clk);
    rst <= 0;
    foreach (values[i]) begin
      int highs;
      @(posedge clk);
      sample <= values[i];
      sample_valid <= 1;
      @(posedge clk);
      sample_valid <= 0;
      repeat (3) @(posedge clk);
      highs = 0;
      for (int c = 0; c < 256; c++) begin
        @(posedge clk); #1;
        if (pwm_out) highs++;
      end
      checks++;
      if (highs != int'(values[i])) begin
        failures++;
        $display("sample %0d: %0d high cycles", values[i], highs);
      end
    end
    // exact phase: after reset the counter is t-1 at the t-th edge
    rst <= 1;
    @(posedge clk);
    rst <= 0;
    sample <= 8'd10;
    sample_valid <= 1;
    @(posedge clk);   // counter 0 -> 1, level <= 10
    sample_valid <= 0;
    for (int t = 1; t < 300; t++) begin
      @(posedge clk); #1;
      // pwm_out registered from the counter value t (mod 256)
      checks++;
      if (pwm_out !== ((t % 256) < 10)) begin
        failures++;
        $display("t=%0d pwm_out=%0b", t, pwm_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
