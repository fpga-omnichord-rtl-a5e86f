// ribbon_stabilizer: removes jitter from the ribbon position.
//
// It takes the section numbers produced by the ribbon decoder (one per valid
// pulse) and, for each window of WINDOW consecutive readings, outputs the
// largest one. At the end of a window stable is updated and stable_valid
// pulses for one clock; then a new window starts. With WINDOW = 4096 and a
// 10 kHz reading rate the position is updated about 2.44 times a second.
//
// Taking the maximum over 4096 readings follows the document. It counts the
// window in readings, matching its 2.44 updates per second; the reset value 0
// is this design's choice.
module ribbon_stabilizer
  import omnichord_pkg::*;
#(
  parameter int unsigned WINDOW = 4096
) (
  input  logic          clk,
  input  logic          rst,
  input  ribbon_level_t level,
  input  logic          level_valid,
  output ribbon_level_t stable,
  output logic          stable_valid
);
  localparam int unsigned CW = (WINDOW > 1) ? $clog2(WINDOW) : 1;

  logic [CW-1:0] count;
  ribbon_level_t max_so_far;
  ribbon_level_t max_next;

  // the first reading of a window replaces the old maximum
  assign max_next = (count == '0 || level > max_so_far) ? level : max_so_far;

  always_ff @(posedge clk) begin
    if (rst) begin
      count        <= '0;
      max_so_far   <= '0;
      stable       <= '0;
      stable_valid <= 1'b0;
    end else begin
      stable_valid <= 1'b0;
      if (level_valid) begin
        max_so_far <= max_next;
        if (count == CW'(WINDOW - 1)) begin
          count        <= '0;
          stable       <= max_next;
          stable_valid <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end
endmodule
