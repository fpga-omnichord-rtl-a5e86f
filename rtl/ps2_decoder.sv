// ps2_decoder: receiver for the PS/2 keyboard port.
//
// The keyboard sends 11-bit frames (start 0, eight data bits LSB first, odd
// parity, stop 1), changing data while its clock is high; the host samples
// data on the falling edge of the keyboard clock. Both lines are brought into
// the system clock domain with two flip-flops, a falling edge of the clock is
// detected, and the bits are shifted in. When the eleventh bit arrives the
// frame is checked (start, stop, parity); a good frame gives the data byte on
// code with a one-cycle pulse on code_valid. A frame that stalls for more than
// TIMEOUT system clocks is dropped, so a lost edge cannot shift every later
// frame by one bit.
//
// The document only says a PS/2 decoder outputs the key codes; the frame
// checks and the idle timeout are this design's choices.
module ps2_decoder
  import omnichord_pkg::*;
#(
  parameter int unsigned TIMEOUT = 200_000   // 2 ms at 100 MHz
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output scan_code_t code,
  output logic       code_valid
);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  logic [2:0]  clk_sync;
  logic [1:0]  dat_sync;
  logic [10:0] shreg;
  logic [3:0]  nbits;
  logic [TW-1:0] idle;

  wire fall = clk_sync[2] & ~clk_sync[1];
  wire [10:0] frame = {dat_sync[1], shreg[10:1]};  // frame once this bit is in

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync   <= 3'b111;
      dat_sync   <= 2'b11;
      shreg      <= '0;
      nbits      <= '0;
      idle       <= '0;
      code       <= '0;
      code_valid <= 1'b0;
    end else begin
      clk_sync   <= {clk_sync[1:0], ps2_clk};
      dat_sync   <= {dat_sync[0], ps2_data};
      code_valid <= 1'b0;
      if (fall) begin
        idle  <= '0;
        shreg <= frame;
        if (nbits == 4'd10) begin
          nbits <= '0;
          // frame[0]=start, [8:1]=data, [9]=parity, [10]=stop
          if (!frame[0] && frame[10] && (^frame[9:1])) begin
            code       <= frame[8:1];
            code_valid <= 1'b1;
          end
        end else begin
          nbits <= nbits + 4'd1;
        end
      end else if (nbits != 0) begin
        if (idle == TW'(TIMEOUT)) begin
          nbits <= '0;
          idle  <= '0;
        end else begin
          idle <= idle + 1'b1;
        end
      end
    end
  end
endmodule
