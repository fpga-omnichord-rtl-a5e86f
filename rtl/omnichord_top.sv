// omnichord_top: a keyboard-and-ribbon chord synthesizer.
//
// A PS/2 keyboard picks one of 27 chords; a resistive ribbon, read through an
// MCP3008 A/D converter, picks one of 12 notes of that chord. The note's
// samples (8-bit unsigned PCM, 44.1 kHz, 0.25 s per note) are stored on an SD
// card. The SD reader streams them into two FIFOs, the player takes one byte
// every SAMPLE_PERIOD clocks, and a PWM drives the board's mono audio pin. With
// sw[1:0] = 1 or 2 a second note (the chord's next note, or the one after)
// is read into the second FIFO, sector by sector in turn with the first, and
// the two are mixed.
//
//   ps2 -> ps2_decoder -> key_hold --------------\
//   adc -> ribbon_decoder -> ribbon_stabilizer ---> note_selector -> sd_reader
//   sd_reader <-> external SD controller (sd_*) ;  sd_reader -> 2 x sample_fifo
//   sample_fifo -> sample_player -> pwm -> aud_pwm
//
// Everything runs on the 100 MHz clock clk; the 200 kHz ADC clock is
// generated by counting, and sd_clk is the 25 MHz clock for the SD controller,
// which is not part of this RTL: its rd/address/ready/byte_available/dout
// signals are ports. aud_pwm is driven open-drain: 0 when the PWM is low,
// high impedance when it is high; aud_level gives the same PWM level as a
// plain signal. rst is synchronous and active high. Parameters default to the
// instrument's sizes and rates.
module omnichord_top
  import omnichord_pkg::*;
#(
  parameter int unsigned ADC_HALF_PERIOD  = 250,    // 100 MHz / (2*250) = 200 kHz
  parameter int unsigned ADC_FRAME        = 20,     // SPI clocks per reading
  parameter int unsigned STAB_WINDOW      = 4096,   // readings per stable value
  parameter int unsigned SECTORS_PER_NOTE = 22,
  parameter int unsigned FIFO_DEPTH       = 2048,
  parameter int unsigned SAMPLE_PERIOD    = 2268,   // clocks per audio sample
  parameter int unsigned SD_CLK_DIV       = 4,      // 100 MHz / 4 = 25 MHz
  parameter int unsigned PS2_TIMEOUT      = 200_000
) (
  input  logic       clk,
  input  logic       rst,
  // PS/2 keyboard
  input  logic       ps2_clk,
  input  logic       ps2_data,
  // harmony switches
  input  logic [1:0] sw,
  // MCP3008 A/D converter (ribbon sensor on channel 1)
  output logic       adc_cs_n,
  output logic       adc_sclk,
  output logic       adc_din,
  input  logic       adc_dout,
  // external SD-card controller
  output logic       sd_clk,
  output logic       sd_rd,
  output sd_addr_t   sd_address,
  input  logic       sd_ready,
  input  logic       sd_byte_available,
  input  sample_t    sd_dout,
  // audio
  output wire        aud_pwm,
  output logic       aud_level,
  // status
  output chord_idx_t chord,
  output note_pos_t  note_position
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  // keyboard
  scan_code_t code, key;
  logic       code_valid, key_valid;

  ps2_decoder #(.TIMEOUT(PS2_TIMEOUT)) u_ps2 (
    .clk, .rst, .ps2_clk, .ps2_data, .code, .code_valid);

  key_hold u_key (
    .clk, .rst, .code, .code_valid, .key, .key_valid);

  // ribbon
  logic [9:0]    reading;
  ribbon_level_t level, section;
  logic          level_valid, section_valid;

  ribbon_decoder #(.HALF_PERIOD(ADC_HALF_PERIOD), .FRAME_CYCLES(ADC_FRAME)) u_ribbon (
    .clk, .rst, .adc_cs_n, .adc_sclk, .adc_din, .adc_dout,
    .reading, .level, .valid(level_valid));

  ribbon_stabilizer #(.WINDOW(STAB_WINDOW)) u_stab (
    .clk, .rst, .level, .level_valid, .stable(section), .stable_valid(section_valid));

  // note selection
  sd_addr_t addr_main, addr_harm;
  logic     dual_req;

  note_selector #(.SECTORS_PER_NOTE(SECTORS_PER_NOTE)) u_sel (
    .clk, .rst, .key, .section, .sw,
    .chord, .position(note_position), .addr_main, .addr_harm, .dual(dual_req));

  // SD controller clock
  clk_divider #(.DIV(SD_CLK_DIV)) u_div (.clk, .rst, .clk_out(sd_clk));

  // SD reader and FIFOs
  logic [CW-1:0] count0, count1;
  logic [1:0]    fifo_wr;
  sample_t       fifo_wdata;
  logic [8:0]    rdata0, rdata1;  // {mode tag, byte}
  logic          empty0, empty1, full0, full1;
  logic          fifo_rd, fifo_wdual, dual, note_start, zero_skip;

  sd_reader #(.SECTORS_PER_NOTE(SECTORS_PER_NOTE), .FIFO_DEPTH(FIFO_DEPTH)) u_reader (
    .clk, .rst, .addr_main, .addr_harm, .dual_req,
    .sd_rd, .sd_address, .sd_ready, .sd_byte_available, .sd_dout,
    .fifo_count0(count0), .fifo_count1(count1), .fifo_wr, .fifo_wdata, .fifo_wdual,
    .dual, .note_start, .zero_skip);

  // each entry is a byte plus the mode it was read in (2048 x 9 bits)
  sample_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH)) u_fifo0 (
    .clk, .rst, .wr_en(fifo_wr[0]), .wr_data({fifo_wdual, fifo_wdata}), .rd_en(fifo_rd),
    .rd_data(rdata0), .count(count0), .empty(empty0), .full(full0));

  sample_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH)) u_fifo1 (
    .clk, .rst, .wr_en(fifo_wr[1]), .wr_data({fifo_wdual, fifo_wdata}), .rd_en(fifo_rd),
    .rd_data(rdata1), .count(count1), .empty(empty1), .full(full1));

  // playback
  sample_t sample;
  logic    sample_valid, underrun;

  sample_player #(.SAMPLE_PERIOD(SAMPLE_PERIOD)) u_player (
    .clk, .rst, .dual(rdata0[8]), .empty0, .empty1, .data0(rdata0[7:0]), .data1(rdata1[7:0]),
    .rd_en(fifo_rd), .sample, .sample_valid, .underrun);

  pwm u_pwm (.clk, .rst, .sample, .sample_valid, .pwm_out(aud_level));

  // open-drain audio pin
  assign aud_pwm = aud_level ? 1'bz : 1'b0;
endmodule
