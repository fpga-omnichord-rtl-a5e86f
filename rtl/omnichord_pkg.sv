// omnichord_pkg: types and constants shared by the omnichord synthesizer.
//
// The sample format is unsigned 8-bit PCM. The SD card is addressed in bytes
// and read in 512-byte sectors. The audio library holds 27 chords with 12
// notes each; every note is padded to a whole number of sectors (22 sectors
// for a 0.25 s note at 44.1 kHz), so a note's start address is
//   note_index * SECTORS_PER_NOTE * SECTOR_BYTES, note_index = chord*12 + position.
// The sector size, chord and note counts come from the description of the
// instrument; the 32-bit address width is this design's choice.
package omnichord_pkg;

  localparam int unsigned SECTOR_BYTES    = 512;
  localparam int unsigned NUM_CHORDS      = 27;
  localparam int unsigned NOTES_PER_CHORD = 12;
  localparam int unsigned NUM_NOTES       = NUM_CHORDS * NOTES_PER_CHORD;  // 324

  typedef logic [7:0]  sample_t;    // unsigned 8-bit PCM sample
  typedef logic [31:0] sd_addr_t;   // SD-card byte address
  typedef logic [7:0]  scan_code_t; // PS/2 set-2 scan code
  typedef logic [3:0]  ribbon_level_t; // discretized ribbon position, 0..12
  typedef logic [4:0]  chord_idx_t;    // 0..26
  typedef logic [3:0]  note_pos_t;     // 0..11, note within the chord

  // Harmony selection, taken from the two board switches sw[1:0].
  typedef enum logic [1:0] {
    HARM_NONE  = 2'd0,  // one note
    HARM_THIRD = 2'd1,  // note plus its neighbour in the chord progression
    HARM_FIFTH = 2'd2,  // note plus the note two places up
    HARM_RSVD  = 2'd3   // treated as HARM_NONE
  } harmony_e;

  localparam scan_code_t BREAK_CODE = 8'hF0;

endpackage
