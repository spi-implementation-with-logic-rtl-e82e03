// spi_cut: the SPI module that the logic BIST tests (circuit under test).
//
// An SPI master and N_SLAVES addressed SPI slaves (default 1) sharing
// SCLK, MOSI and MISO, each slave with its own chip select. A write request
// stores data_in at waddr in slave ssel; a read request fetches the word at
// raddr of slave ssel, which the slave returns shifted right by one place,
// into data_out. A request with both strobes writes first and then reads,
// so writing and reading the same address returns the written word shifted
// once: the behaviour the BIST checks. The bus wires are brought out for
// observation. Each slave may use its own SPI mode (bit i of SLAVE_CPOL /
// SLAVE_CPHA); the master switches to it for every request. A deselected
// slave drives MISO low, so the shared MISO is the OR of the slaves'
// outputs (a two-state stand-in for released lines).
//
// Interface and timing: requests are taken when ready is high;
// rdwr_done pulses when a request has finished. resp_valid/resp_bit carry
// each read-data bit as the master samples it from MISO, for the response
// analyzer. See spi_master for frame timing. The port set (clk, rst, we,
// re, data in/out, 6-bit write and read addresses, mosi, miso, cs) follows
// the original design; ready, rdwr_done, ssel and the response strobe are
// this design's additions for handshaking, slave selection and the
// signature register.
module spi_cut
  import bist_spi_pkg::*;
#(
  parameter bit                  CPOL       = 1'b0,
  parameter bit                  CPHA       = 1'b0,
  parameter int unsigned         SCLK_HALF  = 2,
  parameter int unsigned         N_SLAVES   = 1,
  parameter logic [N_SLAVES-1:0] SLAVE_CPOL = {N_SLAVES{CPOL}},
  parameter logic [N_SLAVES-1:0] SLAVE_CPHA = {N_SLAVES{CPHA}}
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                we,
  input  logic                re,
  input  ssel_t               ssel,
  input  addr_t               waddr,
  input  addr_t               raddr,
  input  data_t               data_in,
  output data_t               data_out,
  output logic                ready,
  output logic                rdwr_done,
  output logic                resp_valid,
  output logic                resp_bit,
  output logic                sclk,
  output logic [N_SLAVES-1:0] cs_n,
  output logic                mosi,
  output logic                miso
);

  logic [N_SLAVES-1:0] miso_s;

  spi_master #(.SCLK_HALF(SCLK_HALF), .N_SLAVES(N_SLAVES),
               .SLAVE_CPOL(SLAVE_CPOL), .SLAVE_CPHA(SLAVE_CPHA)) u_master (
    .clk, .rst, .we, .re, .ssel, .waddr, .raddr, .data_in,
    .ready, .data_out, .rdwr_done, .resp_valid, .resp_bit,
    .sclk, .cs_n, .mosi, .miso
  );

  for (genvar i = 0; i < N_SLAVES; i++) begin : g_slave
    spi_slave #(.CPOL(SLAVE_CPOL[i]), .CPHA(SLAVE_CPHA[i])) u_slave (
      .clk, .rst, .sclk, .cs_n(cs_n[i]), .mosi, .miso(miso_s[i])
    );
  end

  assign miso = |miso_s;

endmodule
