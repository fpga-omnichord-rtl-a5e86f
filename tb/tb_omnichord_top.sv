// tb_omnichord_top: end-to-end test of the synthesizer at reduced sizes
// (2-sector notes, 4-reading stabilizer window, 48-clock sample period, fast
// ADC clock) with models of the keyboard, the MCP3008 with the ribbon, and the
// SD controller with its card.
//
// Three runs, each starting from reset: a single note (U, A major, then J
// pressed and released), a third harmony (J, A minor; then the switches are
// changed while it plays: to one note, to fifth, back to third) and a fifth harmony
// ('.', B seventh) with the ribbon at its top, where the partner note wraps an
// octave down. In each run the testbench
//   - computes from its own key table the note addresses it expects and checks
//     that the reader requests them;
//   - predicts the contents of both FIFOs from the sectors requested (single:
//     every sector to both; harmony: sectors alternate FIFO 0, FIFO 1) and the
//     card data, dropping zero bytes, and checks every sample the player emits
//     (single: FIFO 0's byte; harmony: a/2 + b/2). After reset the reader's
//     first note is the selector's reset note, read as a single note, so the
//     run's harmony starts with the second note;
//   - checks that the PWM output is high for exactly `sample` of 256 clocks
//     while a sample is held (at the end of each run the player is starved).
// It counts how often each mechanism happened: break code ignored, chord
// change, stabilizer update, single/third/fifth mode, octave wrap, zero byte
// dropped, reader waiting for FIFO room, player underrun, note change at a note
// boundary, switch change while playing, and counts a failure for any that
// never happened.
module tb_omnichord_top;
  import omnichord_pkg::*;
  import tb_sd_data_pkg::*;
  localparam int SPN = 2;
  localparam int NOTE_BYTES = SPN * 512;
  localparam int PCM_BYTES = 1000;
  localparam int PERIOD = 48;

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
  logic [9:0] ribbon = '0;
  logic card_hold = 0;   // card stops accepting requests, so the FIFOs run dry
  logic [4:0] last_cmd;
  int conversions, requests, misaligned;
  logic [31:0] last_address;
  logic req_event;
  int checks = 0, failures = 0;

  omnichord_top #(
    .ADC_HALF_PERIOD(4), .ADC_FRAME(20), .STAB_WINDOW(4), .SECTORS_PER_NOTE(SPN),
    .FIFO_DEPTH(1024), .SAMPLE_PERIOD(PERIOD), .SD_CLK_DIV(4), .PS2_TIMEOUT(2000)
  ) dut (
    .clk, .rst, .ps2_clk, .ps2_data, .sw,
    .adc_cs_n, .adc_sclk, .adc_din, .adc_dout,
    .sd_clk, .sd_rd, .sd_address, .sd_ready, .sd_byte_available, .sd_dout,
    .aud_pwm, .aud_level, .chord, .note_position);

  ps2_keyboard_model #(.HALF(50)) kbd (.clk, .ps2_clk, .ps2_data);

  mcp3008_model adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .din(adc_din), .dout(adc_dout),
                     .ch1_value(ribbon), .last_cmd, .conversions);

  sd_card_model #(.NOTE_BYTES(NOTE_BYTES), .PCM_BYTES(PCM_BYTES)) card (
    .clk25(sd_clk), .rd(sd_rd && !rst && !card_hold), .address(sd_address), .ready(sd_ready),
    .byte_available(sd_byte_available), .dout(sd_dout),
    .requests, .misaligned, .last_address, .req_event);

  always #5 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference: key table and note addresses ----------------
  function automatic int chord_of_key(input logic [7:0] k);
    case (k)
      8'h3C: return 0;   // U: A major
      8'h3B: return 1;   // J: A minor
      8'h49: return 8;   // .: B seventh (root B = 3rd in A Bb B ..., type 2)
      default: return -1;
    endcase
  endfunction

  function automatic int note_of(input int ch, input int pos);
    return ch * 12 + pos;
  endfunction

  // ---------------- FIFO prediction and sample check ----------------
  sample_t q0[$], q1[$];
  logic    dual_mode = 0;
  int      n_live_switch = 0;
  int      seen_req = 0;
  int      req_notes[$];

  // After reset the reader takes its first note from the note selector's reset
  // state (chord 0, position 0, one note); the run's settings apply from the
  // second note on. Each byte carries the mode of its sector, and the player
  // mixes according to the mode of the FIFO 0 byte.
  // Requests come in note groups: SPN sectors for one note, 2*SPN alternating
  // sectors for a pair. The mode of a group is the switch setting when its
  // first sector is requested (the testbench changes the switches only in the
  // middle of a note), except for the first group after reset, which is one
  // note.
  int grp_pos = 0, grp_len = SPN;
  logic grp_dual = 0, first_group = 1;
  always @(requests) if (!rst && requests > seen_req) begin
    seen_req = requests;
    if (grp_pos == 0) begin
      grp_dual = !first_group && (sw == 2'd1 || sw == 2'd2);
      grp_len = grp_dual ? 2 * SPN : SPN;
      first_group = 0;
    end
    req_notes.push_back(int'(last_address) / NOTE_BYTES);
    for (int i = 0; i < 512; i++) begin
      sample_t b;
      b = sd_byte(longint'(last_address) + i, NOTE_BYTES, PCM_BYTES);
      if (b != 0) begin
        if (!grp_dual || (grp_pos % 2 == 0)) begin
          q0.push_back(b);
          tag0.push_back(grp_dual);
        end
        if (!grp_dual || (grp_pos % 2 == 1)) q1.push_back(b);
      end
    end
    grp_pos = (grp_pos + 1 == grp_len) ? 0 : grp_pos + 1;
  end

  int samples_checked = 0;
  logic tag0[$];
  always @(posedge clk) if (!rst && dut.sample_valid) begin
    sample_t a, b, e;
    logic mix_mode;
    a = q0.pop_front();
    mix_mode = tag0.pop_front();
    b = q1.pop_front();
    e = mix_mode ? sample_t'((a >> 1) + (b >> 1)) : a;
    checks++;
    samples_checked++;
    if (dut.sample !== e) begin
      failures++;
      if (failures < 10) $display("sample %0d: %h expected %h", samples_checked, dut.sample, e);
    end
  end

  // ---------------- mechanism counters ----------------
  int n_break = 0, n_chord_change = 0, n_stable = 0, n_zero = 0, n_wait_room = 0;
  int n_underrun = 0, n_note_change = 0, n_single = 0, n_third = 0, n_fifth = 0, n_wrap = 0;
  chord_idx_t prev_chord;
  sd_addr_t prev_base;
  always @(posedge clk) if (!rst) begin
    if (dut.code_valid && dut.code == 8'hF0) n_break++;
    if (chord != prev_chord) n_chord_change++;
    prev_chord <= chord;
    if (dut.section_valid) n_stable++;
    if (dut.zero_skip) n_zero++;
    if (dut.u_reader.state == 1 && dut.u_reader.ready_s[1] && !dut.u_reader.room) n_wait_room++;
    if (dut.underrun) n_underrun++;
    if (dut.note_start) begin
      if (dut.u_reader.addr_main != prev_base) n_note_change++;
      prev_base <= dut.u_reader.addr_main;
    end
  end

  // PWM: high for `sample` of 256 cycles while the sample is held
  task automatic check_pwm_hold();
    int highs;
    sample_t s;
    // stop the card, wait for the FIFOs to run dry and the held sample to settle
    card_hold = 1;
    wait (dut.empty0 || dut.empty1);
    repeat (2 * PERIOD + 300) @(posedge clk);
    s = dut.sample;
    highs = 0;
    for (int c = 0; c < 256; c++) begin
      @(posedge clk); #1;
      if (aud_level) highs++;
    end
    checks++;
    if (highs != int'(s)) begin failures++; $display("PWM high %0d of 256, sample %0d", highs, s); end
  endtask

  function automatic int count_note(input int note);
    int n = 0;
    foreach (req_notes[i]) if (req_notes[i] == note) n++;
    return n;
  endfunction

  // one run: reset, settings, keys, play; returns after checking
  // change the switches in the middle of a note, without reset
  task automatic live_switch(input logic [1:0] s, input int play_cycles);
    int r;
    r = requests;
    wait (requests > r && grp_pos == 1);
    sw = s;
    n_live_switch++;
    repeat (play_cycles) @(posedge clk);
  endtask

  task automatic run(input logic [1:0] s, input logic [7:0] k, input logic [9:0] rib,
                     input int play_cycles, input logic change_key, input logic live = 0);
    int ch, sec, pos, hpos;
    rst = 1;
    card_hold = 0;
    sw = s;
    dual_mode = (s == 1 || s == 2);
    ribbon = rib;
    q0.delete();
    tag0.delete();
    q1.delete();
    req_notes.delete();
    seen_req = requests;
    grp_pos = 0;
    first_group = 1;
    repeat (10) @(posedge clk);
    rst = 0;
    kbd.press(k);
    kbd.release_key(k);
    repeat (play_cycles) @(posedge clk);
    ch = chord_of_key(k);
    sec = (int'(rib) * 13) / 1024;
    pos = sec > 11 ? 11 : sec;
    hpos = (s == 1) ? pos + 1 : (s == 2) ? pos + 2 : pos;
    if (hpos > 11) begin hpos -= 3; n_wrap++; end
    checks++;
    if (int'(chord) != ch || int'(note_position) != pos) begin
      failures++; $display("chord %0d pos %0d, expected %0d %0d", chord, note_position, ch, pos);
    end
    checks++;
    if (count_note(note_of(ch, pos)) < 2) begin
      failures++; $display("note %0d not read", note_of(ch, pos));
    end
    if (dual_mode) begin
      checks++;
      if (count_note(note_of(ch, hpos)) < 2) begin
        failures++; $display("harmony note %0d not read", note_of(ch, hpos));
      end else if (s == 1) n_third++;
      else n_fifth++;
    end else n_single++;
    if (change_key) begin
      kbd.press(8'h3B);
      kbd.release_key(8'h3B);
      repeat (play_cycles) @(posedge clk);
      checks++;
      if (count_note(note_of(1, pos)) < 1) begin failures++; $display("changed note not read"); end
    end
    if (live) begin
      live_switch(2'd0, play_cycles);   // harmony -> one note
      live_switch(2'd2, play_cycles);   // one note -> fifth
      live_switch(2'd1, play_cycles);   // fifth -> third
    end
    check_pwm_hold();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(2'd0, 8'h3C, 10'd200, 150_000, 1'b1);
    run(2'd1, 8'h3B, 10'd500, 200_000, 1'b0, 1'b1);
    run(2'd2, 8'h49, 10'd1023, 200_000, 1'b0);
    checks++;
    if (misaligned != 0) begin failures++; $display("misaligned requests"); end
    checks++;
    if (last_cmd != 5'b11001) begin failures++; $display("ADC command %b", last_cmd); end
    $display("mechanisms: break=%0d chord_change=%0d stable=%0d single=%0d third=%0d fifth=%0d wrap=%0d",
             n_break, n_chord_change, n_stable, n_single, n_third, n_fifth, n_wrap);
    $display("            zero_drop=%0d wait_room=%0d underrun=%0d note_change=%0d live_switch=%0d samples=%0d",
             n_zero, n_wait_room, n_underrun, n_note_change, n_live_switch, samples_checked);
    begin
      int m [12];
      m = '{n_break, n_chord_change, n_stable, n_single, n_third, n_fifth, n_wrap,
            n_zero, n_wait_room, n_underrun, n_note_change, n_live_switch};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    checks++;
    if (samples_checked < 1000) begin failures++; $display("only %0d samples", samples_checked); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
