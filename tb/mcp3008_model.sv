// mcp3008_model: behavioural model of an MCP3008 A/D converter in SPI mode 0.
//
// A falling edge of cs_n starts a conversion. The converter takes five bits
// from din on rising edges of sclk (start, single/differential, D2..D0); on
// the following falling edges it drives a null bit (0) and then the ten result
// bits, most significant first. Only channel 1 in single-ended mode has an
// input connected (ch1_value, the ribbon sensor's voltage as a 10-bit number);
// any other channel reads 0. last_cmd holds the five command bits of the last
// conversion and conversions counts the conversions started.
module mcp3008_model (
  input  logic       cs_n,
  input  logic       sclk,
  input  logic       din,
  output logic       dout,
  input  logic [9:0] ch1_value,
  output logic [4:0] last_cmd,
  output int         conversions
);
  int         nin, nout;
  logic [4:0] cmd;
  logic [9:0] held;

  initial begin
    dout = 1'b0;
    nin = 0;
    nout = 0;
    cmd = '0;
    held = '0;
    last_cmd = '0;
    conversions = 0;
  end

  always @(negedge cs_n) begin
    nin = 0;
    nout = 0;
  end

  always @(posedge sclk) begin
    if (!cs_n && nin < 5) begin
      cmd = {cmd[3:0], din};
      nin++;
      if (nin == 5) begin
        last_cmd = cmd;
        conversions++;
        held = (cmd == 5'b11001) ? ch1_value : 10'd0;
      end
    end
  end

  always @(negedge sclk) begin
    if (!cs_n && nin == 5 && nout <= 10) begin
      dout = (nout == 0) ? 1'b0 : held[10 - nout];
      nout++;
    end
  end
endmodule
