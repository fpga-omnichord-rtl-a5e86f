// sd_card_model: behavioural model of an SPI SD-card controller together with
// its card, seen through the controller's read interface.
//
// It runs on the controller clock clk25. While idle it shows ready. When rd is
// high at a clock edge it takes address, drops ready, waits START_DELAY clocks
// and then delivers the 512 bytes of that sector: each byte is put on dout and
// byte_available is raised for one clock, one byte every BYTE_CYCLES clocks.
// After the last byte it waits END_DELAY clocks and shows ready again. The card
// contents come from tb_sd_data_pkg. Requests that are not sector aligned are
// counted in misaligned.
module sd_card_model
  import tb_sd_data_pkg::*;
#(
  parameter int unsigned NOTE_BYTES  = 22 * 512,
  parameter int unsigned PCM_BYTES   = 11025,
  parameter int unsigned START_DELAY = 20,
  parameter int unsigned BYTE_CYCLES = 4,
  parameter int unsigned END_DELAY   = 8
) (
  input  logic        clk25,
  input  logic        rd,
  input  logic [31:0] address,
  output logic        ready,
  output logic        byte_available,
  output logic [7:0]  dout,
  output int          requests,
  output int          misaligned,
  output logic [31:0] last_address,
  output logic        req_event       // toggles on every accepted request
);
  initial begin
    ready = 1'b1;
    byte_available = 1'b0;
    dout = 8'h00;
    requests = 0;
    misaligned = 0;
    last_address = '0;
    req_event = 1'b0;
    forever begin
      @(posedge clk25);
      if (rd && ready) begin
        last_address = address;
        requests++;
        req_event = ~req_event;
        if (address % 512 != 0) misaligned++;
        ready = 1'b0;
        repeat (START_DELAY) @(posedge clk25);
        for (int i = 0; i < 512; i++) begin
          dout = sd_byte(longint'(last_address) + i, NOTE_BYTES, PCM_BYTES);
          byte_available = 1'b1;
          @(posedge clk25);
          byte_available = 1'b0;
          repeat (BYTE_CYCLES - 1) @(posedge clk25);
        end
        repeat (END_DELAY) @(posedge clk25);
        ready = 1'b1;
      end
    end
  end
endmodule
