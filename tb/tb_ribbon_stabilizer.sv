// tb_ribbon_stabilizer: feeds random section numbers with random gaps and
// checks that one result appears after every WINDOW readings and that it is
// the largest reading of that window.
module tb_ribbon_stabilizer;
  import omnichord_pkg::*;
  localparam int WINDOW = 16;
  logic clk = 0, rst = 1, level_valid = 0, stable_valid;
  ribbon_level_t level = '0, stable;
  int checks = 0, failures = 0;

  ribbon_stabilizer #(.WINDOW(WINDOW)) dut (.clk, .rst, .level, .level_valid, .stable, .stable_valid);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int results = 0;
  always @(posedge clk) if (!rst && stable_valid) results++;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    checks++; if (stable !== 0) failures++;
    for (int w = 0; w < 30; w++) begin
      int mx, limit;
      mx = 0;
      limit = (w % 3 == 0) ? 4 : 13;   // some windows with small values only
      for (int i = 0; i < WINDOW; i++) begin
        ribbon_level_t v;
        v = ribbon_level_t'($urandom_range(limit - 1, 0));
        if (w == 5 && i == WINDOW - 1) v = 4'd12;   // maximum in the last reading
        if (w == 6 && i == 0) v = 4'd11;            // maximum in the first reading
        if (int'(v) > mx) mx = int'(v);
        @(posedge clk);
        level <= v;
        level_valid <= 1;
        @(posedge clk);
        level_valid <= 0;
        repeat ($urandom_range(3, 0)) @(posedge clk);
        #1;
        if (i < WINDOW - 1) begin
          checks++;
          if (results != w) begin failures++; $display("early result in window %0d", w); end
        end
      end
      @(posedge clk); #1;
      checks++;
      if (results != w + 1 || int'(stable) != mx) begin
        failures++;
        $display("window %0d: stable %0d expected %0d (results %0d)", w, stable, mx, results);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
