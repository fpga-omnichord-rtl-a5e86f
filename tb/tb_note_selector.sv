// tb_note_selector: checks the chord and note addresses. The reference is
// written from the keyboard layout (three letter rows of nine keys; rows give
// major, minor and seventh chords; columns give the roots Eb Bb F C G D A E B)
// and the library order (roots A Bb B C D Eb E F G, chord = root*3 + type,
// 12 notes per chord, 22 sectors of 512 bytes per note). It includes the
// example U + section 2 -> 0x5800, every chord key with every section and
// every switch setting, and keys that must leave the chord unchanged.
module tb_note_selector;
  import omnichord_pkg::*;
  logic clk = 0, rst = 1;
  scan_code_t key = '0;
  ribbon_level_t section = '0;
  logic [1:0] sw = '0;
  chord_idx_t chord;
  note_pos_t position;
  sd_addr_t addr_main, addr_harm;
  logic dual;
  int checks = 0, failures = 0;

  note_selector dut (.clk, .rst, .key, .section, .sw, .chord, .position, .addr_main, .addr_harm, .dual);

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scan codes by row, columns left to right
  byte unsigned rows [3][9] = '{
    '{8'h15, 8'h1D, 8'h24, 8'h2D, 8'h2C, 8'h35, 8'h3C, 8'h43, 8'h44},  // Q W E R T Y U I O
    '{8'h1C, 8'h1B, 8'h23, 8'h2B, 8'h34, 8'h33, 8'h3B, 8'h42, 8'h4B},  // A S D F G H J K L
    '{8'h1A, 8'h22, 8'h21, 8'h2A, 8'h32, 8'h31, 8'h3A, 8'h41, 8'h49}}; // Z X C V B N M , .
  // semitone of each column's root above A: Eb Bb F C G D A E B
  int col_semitone [9] = '{6, 1, 8, 3, 10, 5, 0, 7, 2};
  // library root order A Bb B C D Eb E F G as semitones above A
  int lib_semitone [9] = '{0, 1, 2, 3, 5, 6, 7, 8, 10};

  function automatic int chord_of(int row, int col);
    foreach (lib_semitone[r]) if (lib_semitone[r] == col_semitone[col]) return r * 3 + row;
    return -1;
  endfunction

  task automatic apply_check(input int exp_chord, input int sec, input int s);
    int pos, hp;
    @(posedge clk);
    section <= ribbon_level_t'(sec);
    sw <= 2'(s);
    @(posedge clk); #1;
    pos = sec > 11 ? 11 : sec;
    hp = (s == 1) ? pos + 1 : (s == 2) ? pos + 2 : pos;
    if (hp > 11) hp -= 3;
    checks++;
    if (int'(chord) != exp_chord || int'(position) != pos ||
        addr_main != 32'((exp_chord * 12 + pos) * 22 * 512) ||
        addr_harm != 32'((exp_chord * 12 + hp) * 22 * 512) ||
        dual != (s == 1 || s == 2)) begin
      failures++;
      $display("chord %0d sec %0d sw %0d: got chord %0d pos %0d main %h harm %h dual %b",
               exp_chord, sec, s, chord, position, addr_main, addr_harm, dual);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // example: U (0x3C) and section 2 -> 0x5800
    key <= 8'h3C;
    section <= 4'd2;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (addr_main !== 32'h5800) begin failures++; $display("U/2 gives %h", addr_main); end
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 9; c++) begin
        @(posedge clk);
        key <= rows[r][c];
        for (int sec = 0; sec <= 12; sec++)
          for (int s = 0; s < 4; s++)
            apply_check(chord_of(r, c), sec, s);
        // keys that are not chord keys leave the chord as it is
        @(posedge clk);
        key <= (c % 2 == 0) ? 8'hF0 : 8'h29;   // break code, space bar
        apply_check(chord_of(r, c), 5, 0);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
