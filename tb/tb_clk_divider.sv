// tb_clk_divider: checks that the divider produces a 50% clock of period DIV
// input cycles (DIV = 4, the 25 MHz SD clock from 100 MHz) and that reset
// holds it low.
module tb_clk_divider;
  localparam int unsigned DIV = 4;
  logic clk = 0, rst = 1, clk_out;
  int checks = 0, failures = 0;

  clk_divider #(.DIV(DIV)) dut (.clk, .rst, .clk_out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_cnt;
    repeat (3) @(posedge clk);
    checks++; if (clk_out !== 1'b0) failures++;
    rst <= 0;
    ref_cnt = 0;
    // reference: out toggles after every DIV/2 cycles following reset
    for (int t = 1; t <= 200; t++) begin
      @(posedge clk); #1;
      checks++;
      if (clk_out !== 1'((t / (DIV / 2)) % 2 == 1)) begin
        failures++;
        $display("t=%0d clk_out=%0b", t, clk_out);
      end
    end
    // count rising edges over 400 cycles: expect 400/DIV
    begin
      int rises = 0;
      logic prev = clk_out;
      for (int t = 0; t < 400; t++) begin
        @(posedge clk); #1;
        if (clk_out && !prev) rises++;
        prev = clk_out;
      end
      checks++;
      if (rises != 400 / DIV) begin failures++; $display("rises=%0d", rises); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
