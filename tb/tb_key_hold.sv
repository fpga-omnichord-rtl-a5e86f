// tb_key_hold: feeds make and break codes and checks that the held key is the
// last pressed key, that 0xF0 never replaces it, and that key_valid pulses
// only when a key is stored.
module tb_key_hold;
  import omnichord_pkg::*;
  logic clk = 0, rst = 1, code_valid = 0, key_valid;
  scan_code_t code = '0, key;
  int checks = 0, failures = 0;

  key_hold dut (.clk, .rst, .code, .code_valid, .key, .key_valid);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input scan_code_t c, input scan_code_t expect_key, input logic expect_valid);
    @(posedge clk);
    code <= c;
    code_valid <= 1;
    @(posedge clk);
    code_valid <= 0;
    #1;
    checks++;
    if (key !== expect_key || key_valid !== expect_valid) begin
      failures++;
      $display("code %h: key=%h valid=%b, expected %h %b", c, key, key_valid, expect_key, expect_valid);
    end
    @(posedge clk); #1;
    checks++;
    if (key_valid !== 1'b0 || key !== expect_key) begin failures++; $display("pulse too long"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    checks++; if (key !== 8'h00) failures++;
    send(8'h3C, 8'h3C, 1);   // U pressed
    send(8'hF0, 8'h3C, 0);   // released: break prefix ignored
    send(8'h3C, 8'h3C, 1);   // released key code: same key
    send(8'h1C, 8'h1C, 1);   // A pressed
    send(8'hF0, 8'h1C, 0);
    send(8'hF0, 8'h1C, 0);
    send(8'h49, 8'h49, 1);
    // code present but not valid: no change
    @(posedge clk);
    code <= 8'h15;
    repeat (3) @(posedge clk); #1;
    checks++; if (key !== 8'h49) begin failures++; $display("changed without valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
