// spi_slave: addressed SPI slave of the circuit under test.
//
// How it works: the slave runs on the system clock and finds the SCLK
// edges by comparing SCLK with its value one clock earlier. While CS is
// low it shifts MOSI into a receive shift register on every sample edge.
// After the command byte {rw, 1'b0, addr} it knows the operation:
//   write: the data byte that follows is stored in the register file at addr
//          once the last bit has arrived;
//   read:  at the next drive edge the word stored at addr, shifted right by
//          one place (zero into the MSB), is loaded into the transmit shift
//          register and sent MSB first on MISO during the data byte.
// The one-place shift is the "shift operation" of the slave: the word read
// back is the written word shifted once, as in the original design's SPI
// simulation (01010010 written, 00101001 read back).
// MISO is driven low when CS is high or no read data is being sent (a
// two-state stand-in for a released line).
//
// Interface and timing: CPOL/CPHA must match the master. The register file
// has 2^ADDR_W words of DATA_W bits and is cleared by the synchronous,
// active-high reset. A write lands one clock after the last sample edge.
// The 6-bit address and 8-bit words follow the original design; the frame
// layout, the edge detection on the system clock and the register-file
// reset are this design's own.
module spi_slave
  import bist_spi_pkg::*;
#(
  parameter bit CPOL = 1'b0,
  parameter bit CPHA = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic sclk,
  input  logic cs_n,
  input  logic mosi,
  output logic miso
);

  localparam int unsigned FRAME = CMD_W + DATA_W;
  localparam int unsigned DEPTH = 2 ** ADDR_W;
  localparam int unsigned CNT_W = $clog2(FRAME + 1);
  localparam int unsigned RX_W  = ((CMD_W > DATA_W) ? CMD_W : DATA_W) - 1;

  data_t            mem [DEPTH];
  logic             sclk_q;
  logic [CNT_W-1:0] bit_cnt;      // sample edges seen in this frame
  logic [RX_W-1:0]  rx_sr;        // bits before the current one
  logic [CMD_W-1:0] cmd_q;
  data_t            tx_sr;

  logic rise, fall, leading, trailing, sample_e, drive_e;
  logic [CMD_W-1:0] cmd_now;
  addr_t            cmd_addr;

  assign rise     = sclk & ~sclk_q;
  assign fall     = ~sclk & sclk_q;
  assign leading  = CPOL ? fall : rise;
  assign trailing = CPOL ? rise : fall;
  assign sample_e = CPHA ? trailing : leading;
  assign drive_e  = CPHA ? leading : trailing;
  assign cmd_now  = {rx_sr[CMD_W-2:0], mosi};
  assign cmd_addr = cmd_q[ADDR_W-1:0];

  assign miso = ~cs_n & tx_sr[DATA_W-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sclk_q  <= CPOL;
      bit_cnt <= '0;
      rx_sr   <= '0;
      cmd_q   <= '0;
      tx_sr   <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      sclk_q <= sclk;
      if (cs_n) begin
        bit_cnt <= '0;
        tx_sr   <= '0;
      end else begin
        if (sample_e) begin
          rx_sr   <= {rx_sr[RX_W-2:0], mosi};
          bit_cnt <= bit_cnt + 1'b1;
          if (bit_cnt == CNT_W'(CMD_W - 1)) cmd_q <= cmd_now;
          if (bit_cnt == CNT_W'(FRAME - 1) && !cmd_q[CMD_W-1])
            mem[cmd_addr] <= {rx_sr[DATA_W-2:0], mosi};
        end
        if (drive_e) begin
          if (bit_cnt == CNT_W'(CMD_W) && cmd_q[CMD_W-1])
            tx_sr <= slave_response(mem[cmd_addr]);
          else
            tx_sr <= {tx_sr[DATA_W-2:0], 1'b0};
        end
      end
    end
  end

endmodule
