// sample_fifo: synchronous first-in first-out buffer for audio bytes.
//
// DEPTH entries of WIDTH bits are kept in a memory array (a block RAM after
// synthesis) addressed by a write and a read pointer. wr_en stores wr_data
// unless the FIFO is full; rd_en takes the oldest entry unless it is empty,
// and that entry appears on rd_data on the next clock (registered read, as a
// block RAM gives it). count is the number of entries held, so a writer can
// check that a whole sector fits before it starts one. Writing to a full or
// reading from an empty FIFO is a protocol error that the assertions report.
//
// The document gives the depth (2048 bytes) and the use of the FIFO as the
// buffer between SD card and audio output; the pointer structure, the
// registered read and the count output are this design's choices.
module sample_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 2048   // power of two
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       empty,
  output logic                       full
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
    if (do_rd) rd_data <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full))
    else $error("sample_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty))
    else $error("sample_fifo: read while empty");

  initial assert (DEPTH == (1 << AW)) else $error("sample_fifo: DEPTH must be a power of two");
endmodule
