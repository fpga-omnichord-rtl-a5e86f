// tb_ribbon_decoder: connects the decoder to an MCP3008 model and sets the
// ribbon voltage to a series of values. It checks the five command bits sent
// (11001: channel 1, single ended), the 10-bit reading, the section number
// floor(v*13/1024), the spacing of results (one per 20 SPI clocks, i.e.
// 10 kHz at the full-speed 200 kHz clock) and that chip select is high for the
// last four SPI clocks of each frame.
module tb_ribbon_decoder;
  import omnichord_pkg::*;
  localparam int HALF = 4;
  localparam int FRAME = 20;
  logic clk = 0, rst = 1;
  logic adc_cs_n, adc_sclk, adc_din, adc_dout, valid;
  logic [9:0] reading, ch1_value = '0;
  ribbon_level_t level;
  logic [4:0] last_cmd;
  int conversions;
  int checks = 0, failures = 0;

  ribbon_decoder #(.HALF_PERIOD(HALF), .FRAME_CYCLES(FRAME)) dut (
    .clk, .rst, .adc_cs_n, .adc_sclk, .adc_din, .adc_dout, .reading, .level, .valid);

  mcp3008_model adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .din(adc_din), .dout(adc_dout),
                     .ch1_value, .last_cmd, .conversions);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SPI clocks per chip-select-high stretch
  int sclk_rises_cs_high = 0;
  always @(posedge adc_sclk) if (adc_cs_n) sclk_rises_cs_high++;

  initial begin
    logic [9:0] values [$] = '{10'd0, 10'd1023, 10'd512, 10'd78, 10'd79, 10'd157, 10'd158, 10'd945, 10'd946};
    longint last_valid;
    int n_frames = 0;
    for (int i = 0; i < 20; i++) values.push_back(10'($urandom));
    repeat (3) @(posedge clk);
    rst <= 0;
    foreach (values[i]) begin
      ch1_value = values[i];
      // skip the result of a frame that may have started before the change
      @(posedge clk iff valid);
      last_valid = $time / 10;
      @(posedge clk iff valid);
      n_frames += 2;
      #1;
      checks++;
      if (reading !== values[i] || level !== ribbon_level_t'((int'(values[i]) * 13) / 1024)) begin
        failures++;
        $display("value %0d: reading %0d level %0d", values[i], reading, level);
      end
      checks++;
      if (last_cmd !== 5'b11001) begin failures++; $display("command %b", last_cmd); end
      checks++;
      if ($time / 10 - last_valid != longint'(2 * FRAME * HALF)) begin
        failures++;
        $display("result spacing %0d cycles", $time / 10 - last_valid);
      end
    end
    // 4 SPI clocks with CS high per frame
    checks++;
    if (sclk_rises_cs_high < 4 * (n_frames - 1) || sclk_rises_cs_high > 4 * (n_frames + 1)) begin
      failures++;
      $display("sclk rises with CS high: %0d over %0d frames", sclk_rises_cs_high, n_frames);
    end
    checks++;
    if (conversions < n_frames) begin failures++; $display("conversions %0d", conversions); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
