// sd_reader: streams the selected note(s) from the SD card into the sample
// FIFOs.
//
// The SD-card controller reads whole 512-byte sectors: the reader raises rd
// with a sector-aligned byte address while the controller shows ready, and the
// controller then delivers the sector byte by byte, each byte on dout marked
// by a rising edge of byte_available. The controller runs on its own 25 MHz
// clock, so ready, byte_available and dout pass through two flip-flops here;
// rd is held until ready drops, so the slower side always sees it.
//
// A note is SECTORS_PER_NOTE sectors long. Two counters track the position:
// the byte counter (0..511) inside the sector and the sector counter inside the
// note; after each sector the address moves on by 512. At the start of every
// note the reader takes the note addresses and the harmony mode from the note
// selector, so a new note or mode starts on a note boundary (every 0.25 s).
//   single note: sectors 0,1,2.. of the note; every byte goes to both FIFOs.
//   harmony:     sector s of note 1 to FIFO 0, then sector s of note 2 to
//                FIFO 1, then sector s+1 of note 1, and so on.
// Every byte carries the mode it was read in (fifo_wdual), so the mixer at
// the far end of the FIFOs knows how to combine it even while the reader has
// already moved on to another mode.
// Zero bytes (the padding after a note's last whole wave period) are not
// written, so consecutive notes join without a gap. A sector is only
// requested when the FIFO(s) it goes to have room for all of its 512 bytes.
//
// From the document: sector-wise reading with rd/ready/byte_available/dout,
// the two counters, the rising-edge detection of byte_available, the
// per-sector alternation between two notes and two FIFOs, and the discarding
// of zero bytes. This design's choices: the synchronizers, the room check,
// writing both FIFOs in single-note mode, the mode tag and taking new notes
// only at note boundaries.
module sd_reader
  import omnichord_pkg::*;
#(
  parameter int unsigned SECTORS_PER_NOTE = 22,
  parameter int unsigned FIFO_DEPTH       = 2048
) (
  input  logic       clk,
  input  logic       rst,
  // from the note selector
  input  sd_addr_t   addr_main,
  input  sd_addr_t   addr_harm,
  input  logic       dual_req,
  // SD controller
  output logic       sd_rd,
  output sd_addr_t   sd_address,
  input  logic       sd_ready,
  input  logic       sd_byte_available,
  input  sample_t    sd_dout,
  // FIFOs
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count0,
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count1,
  output logic [1:0] fifo_wr,
  output sample_t    fifo_wdata,
  output logic       fifo_wdual,  // mode tag stored with the byte (1: harmony)
  // status
  output logic       dual,        // harmony mode of the note being read
  output logic       note_start,  // pulse: a new note (or pair) begins
  output logic       zero_skip    // pulse: a zero byte was discarded
);
  localparam int unsigned SW = $clog2(SECTORS_PER_NOTE + 1);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  typedef enum logic [2:0] {S_START, S_WAIT, S_REQ, S_READ, S_NEXT} state_e;
  state_e state;

  sd_addr_t      base0, base1;
  logic [SW-1:0] sector;
  logic [8:0]    byte_cnt;
  logic          which;        // 0: note 1 / FIFO 0, 1: note 2 / FIFO 1

  logic [1:0] ready_s, ba_s;
  logic       ba_prev;
  sample_t    dout_s0, dout_s1;

  wire ba_rise = ba_s[1] && !ba_prev;
  wire room0   = (fifo_count0 <= CW'(FIFO_DEPTH - SECTOR_BYTES));
  wire room1   = (fifo_count1 <= CW'(FIFO_DEPTH - SECTOR_BYTES));
  wire room    = dual ? (which ? room1 : room0) : (room0 && room1);

  always_ff @(posedge clk) begin
    if (rst) begin
      ready_s <= '0;
      ba_s    <= '0;
      ba_prev <= 1'b0;
      dout_s0 <= '0;
      dout_s1 <= '0;
    end else begin
      ready_s <= {ready_s[0], sd_ready};
      ba_s    <= {ba_s[0], sd_byte_available};
      ba_prev <= ba_s[1];
      dout_s0 <= sd_dout;
      dout_s1 <= dout_s0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_START;
      base0      <= '0;
      base1      <= '0;
      sector     <= '0;
      byte_cnt   <= '0;
      which      <= 1'b0;
      dual       <= 1'b0;
      sd_rd      <= 1'b0;
      sd_address <= '0;
      fifo_wr    <= '0;
      fifo_wdata <= '0;
      fifo_wdual <= 1'b0;
      note_start <= 1'b0;
      zero_skip  <= 1'b0;
    end else begin
      fifo_wr    <= '0;
      note_start <= 1'b0;
      zero_skip  <= 1'b0;
      case (state)
        S_START: begin
          base0      <= addr_main;
          base1      <= addr_harm;
          dual       <= dual_req;
          sector     <= '0;
          which      <= 1'b0;
          note_start <= 1'b1;
          state      <= S_WAIT;
        end
        S_WAIT: begin
          if (ready_s[1] && room) begin
            sd_rd      <= 1'b1;
            sd_address <= (which ? base1 : base0) + sd_addr_t'(sector) * SECTOR_BYTES;
            state      <= S_REQ;
          end
        end
        S_REQ: begin
          if (!ready_s[1]) begin
            sd_rd    <= 1'b0;
            byte_cnt <= '0;
            state    <= S_READ;
          end
        end
        S_READ: begin
          if (ba_rise) begin
            if (dout_s1 != '0) begin
              fifo_wr    <= dual ? (which ? 2'b10 : 2'b01) : 2'b11;
              fifo_wdata <= dout_s1;
              fifo_wdual <= dual;
            end else begin
              zero_skip <= 1'b1;
            end
            byte_cnt <= byte_cnt + 9'd1;
            if (byte_cnt == 9'(SECTOR_BYTES - 1)) state <= S_NEXT;
          end
        end
        S_NEXT: begin
          state <= S_WAIT;
          if (dual && !which) begin
            which <= 1'b1;
          end else begin
            which <= 1'b0;
            if (sector == SW'(SECTORS_PER_NOTE - 1)) state <= S_START;
            else sector <= sector + 1'b1;
          end
        end
        default: state <= S_START;
      endcase
    end
  end

  a_rd_only_when_ready: assert property (@(posedge clk) disable iff (rst)
      $rose(sd_rd) |-> ready_s[1])
    else $error("sd_reader: read requested while controller busy");
endmodule
