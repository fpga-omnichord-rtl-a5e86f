// note_selector: turns the chord key and the ribbon section into SD-card
// addresses of the note to play and of its harmony partner.
//
// Chord. 27 keys select the 27 chords, laid out like the chord buttons of an
// Omnichord: the top letter row Q..O gives major chords, the home row A..L
// minor chords and the bottom row Z.. '.' seventh chords, each row in the root
// order Eb Bb F C G D A E B. Chords are numbered in the audio library as
// root*3 + type, with roots in the order A Bb B C D Eb E F G and type 0 major,
// 1 minor, 2 seventh; so U (0x3C) is A major, chord 0. A key that is no chord
// key leaves the chord unchanged.
//
// Note. The ribbon section (0..12) gives the position in the chord's 12-note
// progression; section 12 plays position 11. The harmony partner is the next
// position (harmony = third) or the one after (harmony = fifth); past the top
// of the progression it wraps three positions down, to the same chord tone an
// octave lower. Each note occupies SECTORS_PER_NOTE sectors of 512 bytes, so
//   addr = (chord*12 + position) * SECTORS_PER_NOTE * 512.
// Example from the document: U with section 2 gives 0x5800.
//
// dual is high when a harmony is selected. Outputs are registered and follow
// the inputs one clock later. With 22-sector notes every address is a multiple
// of 11264 = 11*1024 below 2^22, so the ten low and ten high address bits are
// always 0; they are kept to give the SD controller a full 32-bit address. The address example, the 27x12 note library, the
// 22-sector note and the third/fifth switch codes come from the document; the
// key layout, chord numbering, section clamp and wrap-around are this design's
// choices.
module note_selector
  import omnichord_pkg::*;
#(
  parameter int unsigned SECTORS_PER_NOTE = 22
) (
  input  logic          clk,
  input  logic          rst,
  input  scan_code_t    key,
  input  ribbon_level_t section,
  input  logic [1:0]    sw,
  output chord_idx_t    chord,
  output note_pos_t     position,
  output sd_addr_t      addr_main,
  output sd_addr_t      addr_harm,
  output logic          dual
);
  localparam int unsigned NOTE_BYTES = SECTORS_PER_NOTE * SECTOR_BYTES;

  // root index (A Bb B C D Eb E F G) of each column Eb Bb F C G D A E B
  function automatic logic [3:0] column_root(input int unsigned col);
    case (col)
      0: return 4'd5;  // Eb
      1: return 4'd1;  // Bb
      2: return 4'd7;  // F
      3: return 4'd3;  // C
      4: return 4'd8;  // G
      5: return 4'd4;  // D
      6: return 4'd0;  // A
      7: return 4'd6;  // E
      default: return 4'd2;  // B
    endcase
  endfunction

  // returns {hit, chord index}
  function automatic logic [5:0] key_to_chord(input scan_code_t c);
    int unsigned row, col;
    logic hit;
    hit = 1'b1;
    row = 0;
    col = 0;
    case (c)
      8'h15: begin row = 0; col = 0; end  // Q
      8'h1D: begin row = 0; col = 1; end  // W
      8'h24: begin row = 0; col = 2; end  // E
      8'h2D: begin row = 0; col = 3; end  // R
      8'h2C: begin row = 0; col = 4; end  // T
      8'h35: begin row = 0; col = 5; end  // Y
      8'h3C: begin row = 0; col = 6; end  // U
      8'h43: begin row = 0; col = 7; end  // I
      8'h44: begin row = 0; col = 8; end  // O
      8'h1C: begin row = 1; col = 0; end  // A
      8'h1B: begin row = 1; col = 1; end  // S
      8'h23: begin row = 1; col = 2; end  // D
      8'h2B: begin row = 1; col = 3; end  // F
      8'h34: begin row = 1; col = 4; end  // G
      8'h33: begin row = 1; col = 5; end  // H
      8'h3B: begin row = 1; col = 6; end  // J
      8'h42: begin row = 1; col = 7; end  // K
      8'h4B: begin row = 1; col = 8; end  // L
      8'h1A: begin row = 2; col = 0; end  // Z
      8'h22: begin row = 2; col = 1; end  // X
      8'h21: begin row = 2; col = 2; end  // C
      8'h2A: begin row = 2; col = 3; end  // V
      8'h32: begin row = 2; col = 4; end  // B
      8'h31: begin row = 2; col = 5; end  // N
      8'h3A: begin row = 2; col = 6; end  // M
      8'h41: begin row = 2; col = 7; end  // ,
      8'h49: begin row = 2; col = 8; end  // .
      default: hit = 1'b0;
    endcase
    return {hit, 5'(column_root(col) * 3 + row)};
  endfunction

  function automatic sd_addr_t note_addr(input chord_idx_t ch, input note_pos_t pos);
    return sd_addr_t'((32'(ch) * NOTES_PER_CHORD + 32'(pos)) * NOTE_BYTES);
  endfunction

  logic [5:0] lookup;
  note_pos_t  pos_main, pos_harm;
  chord_idx_t chord_next;
  harmony_e   harm;

  always_comb begin
    lookup     = key_to_chord(key);
    chord_next = lookup[5] ? lookup[4:0] : chord;
    pos_main   = (section > 4'd11) ? 4'd11 : section;
    harm       = harmony_e'(sw);
    case (harm)
      HARM_THIRD: pos_harm = pos_main + 4'd1;
      HARM_FIFTH: pos_harm = pos_main + 4'd2;
      default:    pos_harm = pos_main;
    endcase
    if (pos_harm > 4'd11) pos_harm = pos_harm - 4'd3;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      chord     <= '0;
      position  <= '0;
      addr_main <= '0;
      addr_harm <= '0;
      dual      <= 1'b0;
    end else begin
      chord     <= chord_next;
      position  <= pos_main;
      addr_main <= note_addr(chord_next, pos_main);
      addr_harm <= note_addr(chord_next, pos_harm);
      dual      <= (harm == HARM_THIRD) || (harm == HARM_FIFTH);
    end
  end
endmodule
