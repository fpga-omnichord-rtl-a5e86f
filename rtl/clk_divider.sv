// clk_divider: divides the system clock by an even factor DIV and produces a
// 50% duty-cycle clock. In the synthesizer it makes the 25 MHz clock of the
// SD-card controller from the 100 MHz board clock (DIV = 4).
//
// A counter runs from 0 to DIV/2-1 and the output flip-flop toggles each time
// it wraps, so clk_out has period DIV input cycles and changes right after a
// rising edge of clk. Reset holds clk_out low. The division into a 25 MHz SD
// clock follows the instrument's description; the counter structure is a
// plain choice of this design.
module clk_divider #(
  parameter int unsigned DIV = 4   // even, >= 2
) (
  input  logic clk,
  input  logic rst,
  output logic clk_out
);
  localparam int unsigned HALF = DIV / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else if (cnt == CW'(HALF - 1)) begin
      cnt     <= '0;
      clk_out <= ~clk_out;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  initial assert (DIV >= 2 && DIV % 2 == 0) else $error("clk_divider: DIV must be even and >= 2");
endmodule
