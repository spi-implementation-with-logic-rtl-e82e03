// spi_slave_bfm: behavioural SPI slave used to test the SPI master on its
// own (testbench only). It works on the SCLK edges directly, not on a
// system clock. Every frame's 16 MOSI bits are collected into last_frame
// and `frames` counts the frames. During the second byte of every frame it
// sends `reply` on MISO, MSB first; MISO is low during the first byte.
// CPOL/CPHA have the usual meaning: with CPHA = 0 bits are sampled on the
// leading edge and changed on the trailing one, with CPHA = 1 the reverse.
module spi_slave_bfm #(
  parameter bit CPOL = 1'b0,
  parameter bit CPHA = 1'b0
) (
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  output logic        miso,
  input  logic [7:0]  reply,
  output logic [15:0] last_frame,
  output int          frames
);
  logic [15:0] tx, rx;
  int          lead_cnt;

  assign miso = ~cs_n & tx[15];

  initial begin
    tx = '0; rx = '0; frames = 0; last_frame = '0; lead_cnt = 0;
  end

  always @(negedge cs_n) begin
    tx       = {8'h00, reply};
    rx       = '0;
    lead_cnt = 0;
  end

  always @(posedge cs_n) begin
    last_frame = rx;
    frames     = frames + 1;
  end

  always @(sclk) begin
    if (!cs_n) begin
      if (sclk != CPOL) begin            // leading edge
        if (!CPHA) rx = {rx[14:0], mosi};
        else if (lead_cnt != 0) tx = {tx[14:0], 1'b0};
        lead_cnt++;
      end else begin                     // trailing edge
        if (CPHA) rx = {rx[14:0], mosi};
        else      tx = {tx[14:0], 1'b0};
      end
    end
  end
endmodule
