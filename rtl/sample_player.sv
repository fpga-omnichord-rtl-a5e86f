// sample_player: releases audio samples from the two FIFOs at the sample rate
// and mixes them.
//
// A counter produces a tick every SAMPLE_PERIOD clocks (2268 cycles of
// 100 MHz, i.e. 44.09 kHz). At a tick the player reads one byte from each
// FIFO, but only if both hold data; otherwise the tick is skipped, the output
// keeps its last sample and underrun pulses. One clock after the read the new
// sample is presented with sample_valid high for one clock:
//   dual = 0: the byte of FIFO 0 (both FIFOs then hold the same note)
//   dual = 1: fifo0/2 + fifo1/2, the two notes halved and added
// dual is the mode tag read from FIFO 0 together with the byte, so it must be
// valid one clock after rd_en, like the data.
// The 2268-cycle period, the all-FIFOs-have-data rule and the halve-and-add
// mix come from the document; the one-clock read latency and holding the last
// sample on an underrun are this design's choices.
module sample_player
  import omnichord_pkg::*;
#(
  parameter int unsigned SAMPLE_PERIOD = 2268
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    dual,        // mode of the samples just read
  // FIFO read side
  input  logic    empty0,
  input  logic    empty1,
  input  sample_t data0,
  input  sample_t data1,
  output logic    rd_en,       // read both FIFOs
  // audio out
  output sample_t sample,
  output logic    sample_valid,
  output logic    underrun
);
  localparam int unsigned PW = $clog2(SAMPLE_PERIOD);

  logic [PW-1:0] tick_cnt;
  logic          tick;
  logic          pending;

  assign tick  = (tick_cnt == PW'(SAMPLE_PERIOD - 1));
  assign rd_en = tick && !empty0 && !empty1;

  always_ff @(posedge clk) begin
    if (rst) begin
      tick_cnt     <= '0;
      pending      <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
      underrun     <= 1'b0;
    end else begin
      tick_cnt     <= tick ? '0 : tick_cnt + 1'b1;
      pending      <= rd_en;
      underrun     <= tick && !rd_en;
      sample_valid <= pending;
      if (pending)
        sample <= dual ? sample_t'((data0 >> 1) + (data1 >> 1)) : data0;
    end
  end
endmodule
