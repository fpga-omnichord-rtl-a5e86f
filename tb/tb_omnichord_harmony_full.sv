// tb_omnichord_harmony_full: the two-note (third) harmony at the real sizes
// and rates. With sw = 1, U is pressed and the ribbon held at section 2, so the
// notes at 0x5800 (position 2) and 0x8400 (position 3) of A major are played
// together. The testbench checks that
//   - the reader requests the two notes' sectors in turn (0x5800, 0x8400,
//     0x5a00, 0x8600, ...), predicting the content of each FIFO from that;
//   - every sample played is fifo0/2 + fifo1/2 of the predicted bytes (the
//     first note after reset is single), through one whole note pair;
//   - once the pair has started, no sample tick finds a FIFO empty: the
//     alternating reader keeps both 44.1 kHz streams supplied (with the card
//     model delivering a byte every 16 system clocks).
module tb_omnichord_harmony_full;
  import omnichord_pkg::*;
  import tb_sd_data_pkg::*;
  localparam int NOTE_BYTES = 22 * 512;
  localparam int PCM_BYTES = 11025;

  logic clk = 0, rst = 1;
  logic ps2_clk, ps2_data;
  logic [1:0] sw = 2'd1;
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

  // predicted FIFO contents: the first note after reset is single (both
  // FIFOs); then note groups of 2*22 sectors alternate FIFO 0 / FIFO 1
  localparam int SPN = 22;
  sample_t q0[$], q1[$];
  logic tag0[$], tgt0[$];
  int seen_req = 0, grp_pos = 0, grp_len = SPN;
  logic grp_dual = 0, first_group = 1;
  int target_bytes_played = 0;
  longint first_target_req = -1;
  sd_addr_t exp_addr;

  always @(requests) if (!rst && requests > seen_req) begin
    logic is_target;
    seen_req = requests;
    if (grp_pos == 0) begin
      grp_dual = !first_group;
      grp_len = grp_dual ? 2 * SPN : SPN;
      first_group = 0;
    end
    is_target = grp_dual && (last_address >= 32'h5800) && (last_address < 32'h5800 + NOTE_BYTES);
    if (grp_dual && last_address == 32'h5800 && first_target_req < 0) first_target_req = cycle;
    // once the pair has started, requests must alternate between the notes
    if (first_target_req >= 0) begin
      exp_addr = ((grp_pos % 2 == 0) ? 32'h5800 : 32'h8400) + sd_addr_t'((grp_pos / 2) * 512);
      checks++;
      if (last_address !== exp_addr) begin
        failures++; $display("request %h, expected %h", last_address, exp_addr);
      end
    end
    for (int i = 0; i < 512; i++) begin
      sample_t b;
      b = sd_byte(longint'(last_address) + i, NOTE_BYTES, PCM_BYTES);
      if (b != 0) begin
        if (!grp_dual || grp_pos % 2 == 0) begin
          q0.push_back(b);
          tag0.push_back(grp_dual);
          tgt0.push_back(is_target);
        end
        if (!grp_dual || grp_pos % 2 == 1) q1.push_back(b);
      end
    end
    grp_pos = (grp_pos + 1 == grp_len) ? 0 : grp_pos + 1;
  end

  int underruns_in_pair = 0;
  logic pair_started = 0;
  always @(posedge clk) if (!rst && pair_started && dut.underrun) underruns_in_pair++;

  int samples = 0;
  always @(posedge clk) if (!rst && dut.sample_valid) begin
    sample_t a, b, e;
    logic mix, tgt;
    a = q0.pop_front();
    mix = tag0.pop_front();
    tgt = tgt0.pop_front();
    b = q1.pop_front();
    e = mix ? sample_t'((a >> 1) + (b >> 1)) : a;
    samples++;
    checks++;
    if (dut.sample !== e) begin
      failures++;
      if (failures < 10) $display("sample %0d: %h expected %h", samples, dut.sample, e);
    end
    if (tgt) begin
      target_bytes_played++;
      pair_started = 1;
    end
  end

  initial begin
    int expected_audio;
    repeat (10) @(posedge clk);
    rst = 0;
    kbd.press(8'h3C);
    kbd.release_key(8'h3C);
    @(posedge clk iff dut.section_valid);
    repeat (2) @(posedge clk);
    checks++;
    if (dut.addr_main != 32'h5800 || dut.addr_harm != 32'h8400 || !dut.dual_req) begin
      failures++; $display("addresses %h %h dual %b", dut.addr_main, dut.addr_harm, dut.dual_req);
    end
    wait (first_target_req >= 0);
    expected_audio = 0;
    for (int i = 0; i < NOTE_BYTES; i++)
      if (sd_byte(longint'(32'h5800) + i, NOTE_BYTES, PCM_BYTES) != 0) expected_audio++;
    wait (target_bytes_played >= expected_audio);
    checks++;
    if (underruns_in_pair != 0) begin failures++; $display("%0d underruns during the pair", underruns_in_pair); end
    checks++;
    if (misaligned != 0) begin failures++; $display("misaligned requests"); end
    $display("pair started at clock %0d; %0d samples played, %0d underruns during the pair",
             first_target_req, samples, underruns_in_pair);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
