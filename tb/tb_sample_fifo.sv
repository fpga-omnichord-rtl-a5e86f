// tb_sample_fifo: random writes and reads against a queue model. Checks the
// data order, the one-clock read latency, count, empty and full. Like the
// real users it never writes a full or reads an empty FIFO.
module tb_sample_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0, empty, full;
  logic [7:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [7:0] model[$];

  sample_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.clk, .rst, .wr_en, .wr_data, .rd_en, .rd_data, .count, .empty, .full);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_data;
    logic [7:0] expected;
    int full_seen = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    expect_data = 0;
    for (int t = 0; t < 3000; t++) begin
      logic w, r;
      logic [7:0] d;
      int bias;
      bias = (t / 500) % 2;   // alternate filling and draining phases
      @(posedge clk); #1;
      if (expect_data) begin
        checks++;
        if (rd_data !== expected) begin failures++; $display("t=%0d read %h expected %h", t, rd_data, expected); end
      end
      checks++;
      if (int'(count) != model.size() || empty != (model.size() == 0) || full != (model.size() == DEPTH)) begin
        failures++;
        $display("t=%0d count %0d model %0d empty %b full %b", t, count, model.size(), empty, full);
      end
      if (full) full_seen++;
      w = ($urandom_range(99, 0) < (bias ? 30 : 70)) && (!full);
      r = ($urandom_range(99, 0) < (bias ? 70 : 30)) && (model.size() > 0);
      wr_en <= w;
      rd_en <= r;
      d = 8'($urandom);
      wr_data <= d;
      expect_data = r;
      if (r) expected = model.pop_front();
      if (w) model.push_back(d);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
