// tb_sd_reader: connects the reader to a behavioural SD controller and card,
// with queues standing in for the two FIFOs. Notes are 3 sectors long here.
// The test plays two single notes, switches to harmony in the middle of a note,
// plays two note pairs, and switches back. It checks:
//   - the order of sector requests (single: A0 A1 A2; harmony: B0 C0 B1 C1 B2
//     C2), that new settings take effect only at a note boundary, and that
//     every request is sector aligned;
//   - the mode tag written with each byte (1 in harmony mode);
//   - that every non-zero byte of each sector reaches the right FIFO (both in
//     single mode) in order, and that each zero byte is dropped;
//   - that no sector is started while its FIFO lacks room for 512 bytes (the
//     FIFOs are not drained at first, so the reader must stop after 2 sectors).
module tb_sd_reader;
  import omnichord_pkg::*;
  import tb_sd_data_pkg::*;
  localparam int SPN = 3;
  localparam int DEPTH = 1024;
  localparam int NOTE_BYTES = SPN * 512;
  localparam int PCM_BYTES = 1400;
  localparam int CW = $clog2(DEPTH + 1);

  logic clk = 0, rst = 1, clk25 = 0;
  sd_addr_t addr_main = '0, addr_harm = '0;
  logic dual_req = 0;
  logic sd_rd, sd_ready, sd_byte_available;
  sd_addr_t sd_address;
  sample_t sd_dout, fifo_wdata;
  logic [CW-1:0] fifo_count0, fifo_count1;
  logic [1:0] fifo_wr;
  logic fifo_wdual;
  logic dual, note_start, zero_skip;
  int requests, misaligned;
  logic [31:0] last_address;
  logic req_event;
  int checks = 0, failures = 0;

  sd_reader #(.SECTORS_PER_NOTE(SPN), .FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst, .addr_main, .addr_harm, .dual_req,
    .sd_rd, .sd_address, .sd_ready, .sd_byte_available, .sd_dout,
    .fifo_count0, .fifo_count1, .fifo_wr, .fifo_wdata, .fifo_wdual, .dual, .note_start, .zero_skip);

  sd_card_model #(.NOTE_BYTES(NOTE_BYTES), .PCM_BYTES(PCM_BYTES)) card (
    .clk25, .rd(sd_rd && !rst), .address(sd_address), .ready(sd_ready),
    .byte_available(sd_byte_available), .dout(sd_dout),
    .requests, .misaligned, .last_address, .req_event);

  always #5 clk = ~clk;
  always @(posedge clk) begin : div4
    int c;
    c = (c + 1) % 2;
    if (c == 0) clk25 <= ~clk25;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // note start addresses
  localparam sd_addr_t A = 5 * NOTE_BYTES, B = 7 * NOTE_BYTES, C = 9 * NOTE_BYTES, D = 2 * NOTE_BYTES;

  // expected request order and FIFO contents
  sd_addr_t exp_req[$];
  sample_t  exp0[$], exp1[$];
  int       exp_zeros = 0;

  task automatic add_sector(input sd_addr_t a, input int target);  // 0, 1, or 2 = both
    exp_req.push_back(a);
    for (int i = 0; i < 512; i++) begin
      sample_t b;
      b = sd_byte(longint'(a) + i, NOTE_BYTES, PCM_BYTES);
      if (b == 0) exp_zeros++;
      else begin
        if (target != 1) exp0.push_back(b);
        if (target != 0) exp1.push_back(b);
      end
    end
  endtask

  // FIFO stand-ins
  int cnt0 = 0, cnt1 = 0, max0 = 0, max1 = 0;
  logic draining = 0;
  int zeros_seen = 0;
  assign fifo_count0 = CW'(cnt0);
  assign fifo_count1 = CW'(cnt1);

  always @(posedge clk) if (!rst) begin
    if (fifo_wr[0]) begin
      sample_t e;
      e = exp0.pop_front();
      checks++;
      if (fifo_wdata !== e) begin failures++; $display("FIFO 0 got %h expected %h", fifo_wdata, e); end
      // mode tag: harmony bytes go to one FIFO only
      checks++;
      if (fifo_wdual !== (fifo_wr != 2'b11)) begin failures++; $display("mode tag %b with write %b", fifo_wdual, fifo_wr); end
    end
    if (fifo_wr[1]) begin
      sample_t e;
      e = exp1.pop_front();
      checks++;
      if (fifo_wdata !== e) begin failures++; $display("FIFO 1 got %h expected %h", fifo_wdata, e); end
    end
    if (zero_skip) zeros_seen++;
    cnt0 = cnt0 + int'(fifo_wr[0]) - int'(draining && cnt0 > 0 && ($time / 10) % 8 == 0);
    cnt1 = cnt1 + int'(fifo_wr[1]) - int'(draining && cnt1 > 0 && ($time / 10) % 8 == 0);
    if (cnt0 > max0) max0 = cnt0;
    if (cnt1 > max1) max1 = cnt1;
  end

  // request order
  int nreq = 0;
  always @(requests) if (requests > nreq) begin
    checks++;
    if (nreq >= exp_req.size() || last_address !== exp_req[nreq]) begin
      failures++;
      $display("request %0d: address %h", nreq, last_address);
    end
    nreq++;
    // change the settings in the middle of a note
    if (nreq == 5) begin
      addr_main <= B; addr_harm <= C; dual_req <= 1;
    end else if (nreq == 15) begin
      addr_main <= D; addr_harm <= D + 512; dual_req <= 0;
    end
  end

  initial begin
    int i;
    for (i = 0; i < 2 * SPN; i++) add_sector(A + sd_addr_t'((i % SPN) * 512), 2);
    for (i = 0; i < 2 * SPN; i++) begin
      add_sector(B + sd_addr_t'((i % SPN) * 512), 0);
      add_sector(C + sd_addr_t'((i % SPN) * 512), 1);
    end
    for (i = 0; i < 2 * SPN; i++) add_sector(D + sd_addr_t'((i % SPN) * 512), 2);
    exp_req.push_back(D);   // the next request; the test ends when it is made
    addr_main = A;
    addr_harm = A + 512;
    repeat (4) @(posedge clk);
    rst <= 0;
    // no draining: the reader must stop after two sectors
    repeat (80_000) @(posedge clk);
    checks++;
    if (requests != 2) begin failures++; $display("%0d requests without draining", requests); end
    draining = 1;
    wait (requests == exp_req.size());
    @(posedge clk);
    checks++;
    if (exp0.size() != 0 || exp1.size() != 0) begin
      failures++; $display("bytes not written: %0d %0d", exp0.size(), exp1.size());
    end
    checks++;
    if (zeros_seen != exp_zeros) begin failures++; $display("zeros %0d expected %0d", zeros_seen, exp_zeros); end
    checks++;
    if (misaligned != 0 || max0 > DEPTH || max1 > DEPTH) begin
      failures++; $display("misaligned %0d max counts %0d %0d", misaligned, max0, max1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
