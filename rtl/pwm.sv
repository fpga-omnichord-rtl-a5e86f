// pwm: pulse-width modulator for the mono audio output.
//
// An 8-bit counter advances by one every clock and wraps after 255, giving a
// 256-cycle PWM period. The most recent audio sample (loaded when
// sample_valid is high) is compared with the counter: the output is low when
// counter >= sample and high otherwise, so the duty cycle is sample/256.
// The comparison and counter follow the instrument's description; latching
// the sample in a register (so it holds between sample updates) and
// resetting it to 0 are this design's choices. pwm_out is registered.
module pwm
  import omnichord_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t sample,
  input  logic    sample_valid,
  output logic    pwm_out
);
  logic [7:0] counter;
  sample_t    level;

  always_ff @(posedge clk) begin
    if (rst) begin
      counter <= '0;
      level   <= '0;
      pwm_out <= 1'b0;
    end else begin
      counter <= counter + 8'd1;
      if (sample_valid) level <= sample;
      pwm_out <= (counter < level);
    end
  end
endmodule
