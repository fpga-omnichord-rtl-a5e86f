// key_hold: keeps the chord key selected after the key is released.
//
// A PS/2 keyboard sends the key's scan code when it is pressed and the
// break prefix 0xF0 followed by the same code when it is released. This block
// stores every received code except 0xF0, so the stored key stays that of the
// last key pressed until another key is pressed (the code after 0xF0 is the
// released key, which is already stored). key_valid pulses for one cycle,
// one cycle after code_valid, whenever key is written. Ignoring 0xF0 follows
// the instrument's description; the reset value 0 (no key) is this design's
// choice.
module key_hold
  import omnichord_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  scan_code_t code,
  input  logic       code_valid,
  output scan_code_t key,
  output logic       key_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      key       <= '0;
      key_valid <= 1'b0;
    end else begin
      key_valid <= 1'b0;
      if (code_valid && code != BREAK_CODE) begin
        key       <= code;
        key_valid <= 1'b1;
      end
    end
  end
endmodule
