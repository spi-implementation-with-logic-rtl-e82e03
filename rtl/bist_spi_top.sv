// bist_spi_top: SPI module with logic built-in self-test.
//
// The SPI module (circuit under test, spi_cut) is wrapped by the blocks of
// a logic BIST: a BIST controller, an LFSR test pattern generator, an input
// multiplexer, a serial input signature register as response analyzer, a
// ROM with the golden signatures and a comparator that gives Good/Bad.
//
// Normal mode (t_sel = 1, or no session running): the primary inputs
// (we, re, ssel, waddr, raddr, data_in) pass through the multiplexer register to
// the SPI module and data_out is the primary output.
// Test mode (t_sel = 0 and bist_start high): the controller seeds the
// LFSR, then for each of NPAT patterns writes the pattern into the SPI
// slave and reads it back; every read-data bit the master samples from
// MISO enters the signature register. At the end the signature is compared
// with the ROM entry for the polynomial in use (poly_sel), er/good_bad are
// set and bist_done goes high until bist_start is released.
//
// Slaves: N_SLAVES addressed slaves (default 1), each with its own SPI
// mode (SLAVE_CPOL / SLAVE_CPHA, by default all CPOL / CPHA). In normal mode
// ssel picks the slave; a session sends pattern i to slave i mod N_SLAVES.
//
// Timing: one write-and-read request takes 2 frames of
// 2*SCLK_HALF*(16+1) clocks (gap included) plus 4 clocks of controller and
// multiplexer overhead (plus SCLK_HALF when SCLK changes its idle level for
// a slave of another polarity); a full session of 255 patterns at the
// default SCLK_HALF = 2 takes 35,703 clocks. Reset is synchronous and
// active high. Normal-mode strobes must be one clock long, given while
// ready is high, and the next one must wait for rdwr_done.
// The block structure and connections follow the original design's BIST
// diagram; sizes and protocol details are described in each block.
module bist_spi_top
  import bist_spi_pkg::*;
#(
  parameter bit          CPOL      = 1'b0,
  parameter bit          CPHA      = 1'b0,
  parameter int unsigned SCLK_HALF = 2,
  parameter int unsigned NPAT      = N_PATTERNS,
  parameter int unsigned N_SLAVES  = 1,
  parameter logic [N_SLAVES-1:0] SLAVE_CPOL = {N_SLAVES{CPOL}},
  parameter logic [N_SLAVES-1:0] SLAVE_CPHA = {N_SLAVES{CPHA}}
) (
  input  logic        clk,
  input  logic        rst,
  // BIST control
  input  logic        bist_start,   // Test Control
  input  logic        t_sel,        // 1: normal mode, 0: test mode
  input  logic        poly_sel,     // LFSR polynomial / golden entry
  output logic        bist_done,
  output logic        er,           // signature mismatch
  output logic        good_bad,     // 1: Good, 0: Bad (valid with bist_done)
  output bist_state_t ts,
  output sig_t        signature,
  output data_t       lfsr_data,
  output logic        lfsr_done,
  // primary inputs and outputs of the SPI module
  input  logic        we,
  input  logic        re,
  input  ssel_t       ssel,         // slave of the request
  input  addr_t       waddr,
  input  addr_t       raddr,
  input  data_t       data_in,
  output data_t       data_out,
  output logic        ready,
  output logic        rdwr_done,
  // SPI wires, for observation
  output logic        sclk,
  output logic [N_SLAVES-1:0] cs_n,
  output logic        mosi,
  output logic        miso
);

  logic     mux_sel, t_rst, lfsr_en, poly_sel_q;
  logic     test_we, test_re, sisr_gate, cmp_valid;
  addr_t    test_addr;
  ssel_t    test_ssel;
  cut_req_t s_req, t_req, cut_req;
  logic     resp_valid, resp_bit;
  sig_t     golden;

  bist_controller #(.NPAT(NPAT), .N_SLAVES(N_SLAVES)) u_ctrl (
    .clk, .rst, .bist_start, .t_sel, .poly_sel,
    .cut_ready(ready), .cut_done(rdwr_done),
    .mux_sel, .t_rst, .lfsr_en, .poly_sel_q,
    .test_we, .test_re, .test_addr, .test_ssel, .sisr_gate, .cmp_valid,
    .bist_done, .ts
  );

  lfsr #(.WIDTH(DATA_W), .TAPS0(LFSR_TAPS0), .TAPS1(LFSR_TAPS1)) u_lfsr (
    .clk, .rst, .seed_load(t_rst), .seed(LFSR_SEED), .enable(lfsr_en),
    .poly_sel(poly_sel_q), .q(lfsr_data), .done(lfsr_done)
  );

  assign s_req = '{ssel: ssel, we: we, re: re, waddr: waddr, raddr: raddr,
                   data: data_in};
  assign t_req = '{ssel: test_ssel, we: test_we, re: test_re,
                   waddr: test_addr, raddr: test_addr, data: lfsr_data};

  test_mux #(.T(cut_req_t)) u_mux (
    .clk, .rst, .sel(mux_sel), .s_data(s_req), .t_data(t_req),
    .data_out(cut_req)
  );

  spi_cut #(.SCLK_HALF(SCLK_HALF), .N_SLAVES(N_SLAVES),
            .SLAVE_CPOL(SLAVE_CPOL), .SLAVE_CPHA(SLAVE_CPHA)) u_cut (
    .clk, .rst,
    .we(cut_req.we), .re(cut_req.re), .ssel(cut_req.ssel), .waddr(cut_req.waddr),
    .raddr(cut_req.raddr), .data_in(cut_req.data),
    .data_out, .ready, .rdwr_done, .resp_valid, .resp_bit,
    .sclk, .cs_n, .mosi, .miso
  );

  sisr #(.WIDTH(SIG_W), .TAPS(SIG_TAPS)) u_sisr (
    .clk, .rst, .clear(t_rst), .en(resp_valid && sisr_gate), .din(resp_bit),
    .signature
  );

  golden_rom #(.TAPS0(LFSR_TAPS0), .TAPS1(LFSR_TAPS1), .SEED(LFSR_SEED),
               .NPAT(NPAT)) u_rom (
    .clk, .addr(poly_sel_q), .data(golden)
  );

  comparator #(.WIDTH(SIG_W)) u_cmp (
    .clk, .rst, .valid_in(cmp_valid), .s_out(golden), .t_out(signature),
    .er
  );

  assign good_bad = ~er;

endmodule
