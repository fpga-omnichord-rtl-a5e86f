// ps2_keyboard_model: behavioural PS/2 keyboard. The task send(code) clocks one
// 11-bit frame (start, data LSB first, odd parity, stop) to the host, changing
// data while the clock is high; the clock period is 2*HALF cycles of clk.
// press(code) sends the make code, release(code) sends 0xF0 and the code.
module ps2_keyboard_model #(
  parameter int HALF = 50
) (
  input  logic clk,
  output logic ps2_clk,
  output logic ps2_data
);
  initial begin
    ps2_clk = 1'b1;
    ps2_data = 1'b1;
  end

  task automatic send(input logic [7:0] code);
    logic [10:0] bits;
    bits = {1'b1, ~^code, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = bits[i];
      repeat (HALF) @(posedge clk);
      ps2_clk = 1'b0;
      repeat (HALF) @(posedge clk);
      ps2_clk = 1'b1;
    end
    ps2_data = 1'b1;
    repeat (4 * HALF) @(posedge clk);
  endtask

  task automatic press(input logic [7:0] code);
    send(code);
  endtask

  task automatic release_key(input logic [7:0] code);
    send(8'hF0);
    send(code);
  endtask
endmodule
