// tb_ps2_decoder: drives PS/2 frames the way a keyboard does (data changes
// while the clock is high, clock period 2*HALF system clocks) and checks that
// good frames give their byte once, that frames with a wrong parity, start or
// stop bit give nothing, and that a frame cut short is dropped after the
// timeout so the next frame is received correctly.
module tb_ps2_decoder;
  import omnichord_pkg::*;
  localparam int HALF = 40;
  localparam int TIMEOUT = 2000;
  logic clk = 0, rst = 1, ps2_clk = 1, ps2_data = 1, code_valid;
  scan_code_t code;
  int checks = 0, failures = 0;
  scan_code_t got[$];

  ps2_decoder #(.TIMEOUT(TIMEOUT)) dut (.clk, .rst, .ps2_clk, .ps2_data, .code, .code_valid);

  always #5 clk = ~clk;

  always @(posedge clk) if (code_valid) got.push_back(code);

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bits: 0 start, 1..8 data, 9 parity, 10 stop; nbits < 11 cuts the frame
  task automatic send_bits(input logic [10:0] bits, input int nbits);
    for (int i = 0; i < nbits; i++) begin
      ps2_data = bits[i];
      repeat (HALF) @(posedge clk);
      ps2_clk = 0;
      repeat (HALF) @(posedge clk);
      ps2_clk = 1;
    end
    ps2_data = 1;
    repeat (4 * HALF) @(posedge clk);
  endtask

  function automatic logic [10:0] frame(input scan_code_t b);
    return {1'b1, ~^b, b, 1'b0};
  endfunction

  task automatic expect_bytes(input scan_code_t exp[$]);
    checks++;
    if (got != exp) begin
      failures++;
      $display("received %p, expected %p", got, exp);
    end
    got.delete();
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    send_bits(frame(8'h3C), 11);
    expect_bytes('{8'h3C});
    send_bits(frame(8'hF0), 11);
    send_bits(frame(8'h3C), 11);
    expect_bytes('{8'hF0, 8'h3C});
    for (int i = 0; i < 20; i++) begin
      scan_code_t b;
      b = 8'($urandom);
      send_bits(frame(b), 11);
      expect_bytes('{b});
    end
    // wrong parity
    send_bits(frame(8'h1C) ^ 11'b010_0000_0000, 11);
    expect_bytes('{});
    // wrong start bit, wrong stop bit
    send_bits(frame(8'h55) | 11'b1, 11);
    expect_bytes('{});
    send_bits(frame(8'h55) & ~11'h400, 11);
    expect_bytes('{});
    // cut-short frame, then wait past the timeout, then a good frame
    send_bits(frame(8'hAA), 5);
    repeat (TIMEOUT + 100) @(posedge clk);
    send_bits(frame(8'h2B), 11);
    expect_bytes('{8'h2B});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
