// tb_sample_player: stands in for the two FIFOs with queues and checks that a
// sample is taken exactly every SAMPLE_PERIOD clocks when both hold data, that
// the single-note output is FIFO 0's byte and the harmony output is
// a/2 + b/2, and that a tick with either FIFO empty reads nothing, reports an
// underrun and keeps the last sample.
module tb_sample_player;
  import omnichord_pkg::*;
  localparam int PERIOD = 12;
  logic clk = 0, rst = 1, dual = 0, rd_en, sample_valid, underrun;
  logic empty0, empty1;
  sample_t data0 = '0, data1 = '0, sample;
  int checks = 0, failures = 0;
  sample_t q0[$], q1[$];

  sample_player #(.SAMPLE_PERIOD(PERIOD)) dut (
    .clk, .rst, .dual, .empty0, .empty1, .data0, .data1, .rd_en, .sample, .sample_valid, .underrun);

  always #5 clk = ~clk;

  int sz0 = 0, sz1 = 0;   // queue sizes as plain variables for the assigns
  assign empty0 = (sz0 == 0);
  assign empty1 = (sz1 == 0);

  // FIFO behaviour: data appears one clock after the read
  always @(posedge clk) if (rd_en) begin
    data0 <= q0.pop_front();
    data1 <= q1.pop_front();
    sz0 = q0.size();
    sz1 = q1.size();
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t expected[$];
  longint cycle = 0;
  longint last_read = -1;
  int underruns = 0;
  always @(posedge clk) cycle++;
  always @(posedge clk) if (!rst && rd_en) begin
    if (last_read >= 0) begin
      checks++;
      if ((cycle - last_read) % PERIOD != 0) begin failures++; $display("read spacing %0d", cycle - last_read); end
    end
    last_read = cycle;
  end
  always @(posedge clk) if (!rst && underrun) underruns++;
  always @(posedge clk) if (!rst && sample_valid) begin
    sample_t e;
    e = expected.pop_front();
    checks++;
    if (sample !== e) begin failures++; $display("sample %h expected %h", sample, e); end
  end

  task automatic load(input int n, input logic both);
    for (int i = 0; i < n; i++) begin
      sample_t a = 8'($urandom), b = 8'($urandom);
      q0.push_back(a);
      q1.push_back(both ? b : a);
      expected.push_back(dual ? sample_t'((a >> 1) + (b >> 1)) : a);
    end
    sz0 = q0.size();
    sz1 = q1.size();
  endtask

  initial begin
    int u;
    repeat (3) @(posedge clk);
    rst <= 0;
    // single note
    dual = 0;
    load(20, 0);
    wait (sz0 == 0);
    repeat (2 * PERIOD) @(posedge clk);
    checks++;
    if (expected.size() != 0) begin failures++; $display("samples missing"); end
    // both empty: only underruns, output held
    u = underruns;
    repeat (3 * PERIOD) @(posedge clk);
    #1;
    checks++;
    if (underruns - u < 2 || sample_valid) begin failures++; $display("no underrun reported"); end
    // one FIFO empty: no read
    q0.push_back(8'h11);
    sz0 = q0.size();
    repeat (3 * PERIOD) @(posedge clk);
    checks++;
    if (q0.size() != 1) begin failures++; $display("read with FIFO 1 empty"); end
    void'(q0.pop_front());
    sz0 = q0.size();
    // harmony
    dual = 1;
    load(30, 1);
    wait (sz0 == 0);
    repeat (2 * PERIOD) @(posedge clk);
    checks++;
    if (expected.size() != 0) begin failures++; $display("harmony samples missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
