// ribbon_decoder: SPI master that reads the ribbon (softpot) sensor through an
// MCP3008 10-bit A/D converter and turns the reading into a section number.
//
// The SPI clock (sclk) is made from the system clock: it toggles every
// HALF_PERIOD system clocks (250 at 100 MHz gives 200 kHz). A conversion frame
// is FRAME_CYCLES (20) SPI clock cycles long; cycle k begins with a falling
// edge of sclk:
//   k = 0..4    cs_n low, din carries CMD (5'b11001: start, single-ended,
//               channel 001) MSB first, sampled by the converter on the
//               rising edges
//   k = 5       the converter drives its null bit (ignored)
//   k = 6..15   the converter drives B9..B0, sampled here on rising edges
//   k = 16..19  cs_n high (spare cycles before the next request)
// After B0 is sampled the 10-bit reading is complete; it is presented on
// reading together with level = floor(reading * 13 / 1024), a section number
// from 0 to 12, and valid pulses for one system clock. One reading is made per
// frame: 200 kHz / 20 = 10 kHz.
//
// From the document: the 200 kHz clock, the 20-cycle frame, the 5'b11001
// command sent MSB first, the null bit followed by ten bits MSB first, and a
// value from 0 to 12. This design chooses SPI mode 0 timing, a single system
// clock with an sclk generated by counting, the 16-cycle chip-select window and
// the scaling of the reading into 13 equal steps.
module ribbon_decoder
  import omnichord_pkg::*;
#(
  parameter int unsigned HALF_PERIOD  = 250,       // system clocks per sclk half period
  parameter int unsigned FRAME_CYCLES = 20,        // sclk cycles per conversion
  parameter logic [4:0]  CMD          = 5'b11001   // start, SGL, D2..D0 = channel 1
) (
  input  logic          clk,
  input  logic          rst,
  // MCP3008 pins
  output logic          adc_cs_n,
  output logic          adc_sclk,
  output logic          adc_din,
  input  logic          adc_dout,
  // result
  output logic [9:0]    reading,
  output ribbon_level_t level,
  output logic          valid
);
  localparam int unsigned HW = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;
  localparam int unsigned KW = $clog2(FRAME_CYCLES);
  localparam int unsigned CS_CYCLES = 16;   // 5 command + 1 null + 10 data

  logic [HW-1:0] half_cnt;
  logic [KW-1:0] k;
  logic [9:0]    shreg;
  logic [1:0]    dout_sync;

  wire half_tick = (half_cnt == HW'(HALF_PERIOD - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      half_cnt  <= '0;
      k         <= KW'(FRAME_CYCLES - 1);
      adc_sclk  <= 1'b0;
      adc_cs_n  <= 1'b1;
      adc_din   <= 1'b0;
      shreg     <= '0;
      dout_sync <= '0;
      reading   <= '0;
      level     <= '0;
      valid     <= 1'b0;
    end else begin
      valid     <= 1'b0;
      dout_sync <= {dout_sync[0], adc_dout};
      half_cnt  <= half_tick ? '0 : half_cnt + 1'b1;
      if (half_tick) begin
        if (!adc_sclk) begin
          // rising edge: sample the converter's output
          adc_sclk <= 1'b1;
          if (k >= KW'(6) && k < KW'(CS_CYCLES)) begin
            shreg <= {shreg[8:0], dout_sync[1]};
            if (k == KW'(CS_CYCLES - 1)) begin
              reading <= {shreg[8:0], dout_sync[1]};
              level   <= ribbon_level_t'((14'({shreg[8:0], dout_sync[1]}) * 14'd13) >> 10);
              valid   <= 1'b1;
            end
          end
        end else begin
          // falling edge: start SPI cycle k+1
          logic [KW-1:0] kn;
          kn = (k == KW'(FRAME_CYCLES - 1)) ? '0 : k + 1'b1;
          adc_sclk <= 1'b0;
          k        <= kn;
          adc_cs_n <= !(kn < KW'(CS_CYCLES));
          adc_din  <= (kn < KW'(5)) ? CMD[3'd4 - 3'(kn)] : 1'b0;
        end
      end
    end
  end

  initial assert (FRAME_CYCLES >= CS_CYCLES) else $error("ribbon_decoder: frame too short");
endmodule
