// tb_omnichord_full: one complete operation of the synthesizer at its real
// sizes and rates (100 MHz clock, 200 kHz ADC clock, 4096-reading stabilizer,
// 22-sector notes, 2048-byte FIFOs, one sample every 2268 clocks).
//
// With the switches at 0, U is pressed and released and the ribbon is held at
// section 2. The testbench checks that
//   - the first stabilized ribbon value appears after 4096 readings at 10 kHz
//     (the 4096th reading comes 4095 * 10000 clocks after the first);
//   - the chord becomes A major, the position 2, and the reader requests the
//     note at byte address 0x5800 and its following sectors;
//   - every sample played equals the next non-zero byte of the sectors read,
//     through the whole of the selected note (11025 bytes of audio);
//   - samples leave at 2268-clock intervals while the FIFOs hold data.
module tb_omnichord_full;
  import omnichord_pkg::*;
  import tb_sd_data_pkg::*;
  localparam int NOTE_BYTES = 22 * 512;
  localparam int PCM_BYTES = 11025;

  logic clk = 0, rst = 1;
  logic ps2_clk, ps2_data;
  logic [1:0] sw = '0;
  logic adc_cs_n, adc_sclk, adc_din, adc_dout;
  logic sd_clk, sd_rd, sd_ready, sd_byte_available;
  sd_addr_t sd_address;
  sample_t sd_dout;
  wire aud_pwm;
  logic aud_level;
  chord_idx_t chord;
  note_pos_t note_position;
  logic [9:0] ribbon = 10'd200;   // section floor(200*13/1024) = 2
  logic [4:0] last_cmd;
  int conversions, requests, misaligned;
  logic [31:0] last_address;
  logic req_event;
  int checks = 0, failures = 0;

  omnichord_top dut (
    .clk, .rst, .ps2_clk, .ps2_data, .sw,
    .adc_cs_n, .adc_sclk, .adc_din, .adc_dout,
    .sd_clk, .sd_rd, .sd_address, .sd_ready, .sd_byte_available, .sd_dout,
    .aud_pwm, .aud_level, .chord, .note_position);

  ps2_keyboard_model #(.HALF(2500)) kbd (.clk, .ps2_clk, .ps2_data);

  mcp3008_model adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .din(adc_din), .dout(adc_dout),
                     .ch1_value(ribbon), .last_cmd, .conversions);

  sd_card_model #(.NOTE_BYTES(NOTE_BYTES), .PCM_BYTES(PCM_BYTES)) card (
    .clk25(sd_clk), .rd(sd_rd && !rst), .address(sd_address), .ready(sd_ready),
    .byte_available(sd_byte_available), .dout(sd_dout),
    .requests, .misaligned, .last_address, .req_event);

  always #5 clk = ~clk;

  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    #1_000_000_000;   // 100 M clocks
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // predicted FIFO contents: single note, every sector to both FIFOs
  sample_t q0[$];
  int seen_req = 0;
  int target_bytes_queued = 0;    // non-zero bytes of note 0x5800 put in the queue
  int target_bytes_played = 0;
  int target_tags[$];             // 1 where the queued byte belongs to note 0x5800
  longint first_target_req = -1;

  always @(requests) if (!rst && requests > seen_req) begin
    logic is_target;
    seen_req = requests;
    is_target = (last_address >= 32'h5800) && (last_address < 32'h5800 + NOTE_BYTES);
    if (last_address == 32'h5800 && first_target_req < 0) first_target_req = cycle;
    for (int i = 0; i < 512; i++) begin
      sample_t b;
      b = sd_byte(longint'(last_address) + i, NOTE_BYTES, PCM_BYTES);
      if (b != 0) begin
        q0.push_back(b);
        target_tags.push_back(int'(is_target));
        if (is_target) target_bytes_queued++;
      end
    end
  end

  int samples = 0, spacing_ok = 0;
  longint last_sample = -1;
  always @(posedge clk) if (!rst && dut.sample_valid) begin
    sample_t e;
    int tag;
    e = q0.pop_front();
    tag = target_tags.pop_front();
    samples++;
    checks++;
    if (dut.sample !== e) begin
      failures++;
      if (failures < 10) $display("sample %0d: %h expected %h", samples, dut.sample, e);
    end
    if (tag == 1) target_bytes_played++;
    if (last_sample >= 0) begin
      checks++;
      if ((cycle - last_sample) % 2268 != 0) begin
        failures++;
        $display("sample spacing %0d clocks", cycle - last_sample);
      end else if (cycle - last_sample == 2268) spacing_ok++;
    end
    last_sample = cycle;
  end

  initial begin
    longint t_reset, t_stable;
    int expected_audio;
    repeat (10) @(posedge clk);
    rst = 0;
    t_reset = cycle;
    kbd.press(8'h3C);
    kbd.release_key(8'h3C);
    checks++;
    if (chord != 0) begin failures++; $display("chord %0d after U", chord); end
    // first stabilized ribbon value
    @(posedge clk iff dut.section_valid);
    t_stable = cycle - t_reset;
    checks++;
    if (t_stable < 4095 * 10000 || t_stable > 4096 * 10000) begin
      failures++; $display("first stable value after %0d clocks", t_stable);
    end
    repeat (2) @(posedge clk);
    checks++;
    if (note_position != 2 || dut.addr_main != 32'h5800) begin
      failures++; $display("position %0d address %h", note_position, dut.addr_main);
    end
    // the selected note is read and played to its end
    wait (first_target_req >= 0);
    // number of non-zero audio bytes in the note, computed from the card data
    expected_audio = 0;
    for (int i = 0; i < NOTE_BYTES; i++)
      if (sd_byte(longint'(32'h5800) + i, NOTE_BYTES, PCM_BYTES) != 0) expected_audio++;
    wait (target_bytes_played >= expected_audio);
    checks++;
    if (target_bytes_queued < expected_audio) begin failures++; $display("note not fully read"); end
    checks++;
    if (misaligned != 0 || last_cmd != 5'b11001) begin failures++; $display("bus error"); end
    checks++;
    if (spacing_ok < 10000) begin failures++; $display("only %0d samples at the 2268-clock rate", spacing_ok); end
    $display("stable after %0d clocks; note 0x5800 requested at clock %0d; %0d samples played",
             t_stable, first_target_req, samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
