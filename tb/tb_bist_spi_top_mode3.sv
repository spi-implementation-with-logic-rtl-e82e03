// tb_bist_spi_top_mode3: the full design with non-default parameters:
// two slaves, slave 0 in SPI mode 3 (CPOL = 1, CPHA = 1) and slave 1 in
// mode 1 (CPOL = 0, CPHA = 1), SCLK = clk/6 (SCLK_HALF = 3) and a
// 40-pattern session. Checks normal-mode requests to both slaves, that
// both sessions report Good with signatures equal to the testbench's own
// model of a 40-pattern session, the session length
// 3 + 40 * (2 * 102 + 4) + 39 * 3 clocks (the slaves take turns, so SCLK
// changes its idle level before every pattern but the first), that SCLK is
// at the selected slave's idle level whenever its chip select falls, and
// that each slave gets 40 frames per session.
module tb_bist_spi_top_mode3;
  import bist_spi_pkg::*;

  localparam int NPAT      = 40;
  localparam int H         = 3;
  localparam int FRAMEC    = (2 * (CMD_W + DATA_W) + 2) * H;
  localparam int SESSION_T = 3 + NPAT * (2 * FRAMEC + 4) + (NPAT - 1) * H;
  localparam int NS        = 2;
  localparam logic [NS-1:0] SCPOL = 2'b01;
  localparam logic [NS-1:0] SCPHA = 2'b11;

  logic        clk = 1'b0;
  logic        rst, bist_start, t_sel, poly_sel;
  logic        bist_done, er, good_bad, lfsr_done;
  bist_state_t ts;
  sig_t        signature;
  data_t       lfsr_data;
  logic        we, re;
  addr_t       waddr, raddr;
  data_t       data_in, data_out;
  logic        ready, rdwr_done, sclk, mosi, miso;
  ssel_t       ssel;
  logic [NS-1:0] cs_n, cs_q;
  int          nframe [NS];
  int checks = 0, failures = 0;

  bist_spi_top #(.SCLK_HALF(H), .NPAT(NPAT), .N_SLAVES(NS),
                 .SLAVE_CPOL(SCPOL), .SLAVE_CPHA(SCPHA)) dut (
    .clk, .rst, .bist_start, .t_sel, .poly_sel, .bist_done, .er, .good_bad,
    .ts, .signature, .lfsr_data, .lfsr_done,
    .we, .re, .ssel, .waddr, .raddr, .data_in, .data_out, .ready, .rdwr_done,
    .sclk, .cs_n, .mosi, .miso
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3 * SESSION_T + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SCLK must be at the slave's idle level when its chip select falls
  int bad_idle = 0;
  always @(posedge clk) begin
    cs_q <= cs_n;
    for (int s = 0; s < NS; s++)
      if (!rst && cs_q[s] && !cs_n[s]) begin
        nframe[s] <= nframe[s] + 1;
        if (sclk != SCPOL[s]) bad_idle <= bad_idle + 1;
      end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic sig_t model_sig(bit ps);
    data_t p, r;
    sig_t  s;
    logic  fb;
    p = 8'h01; s = '0;
    for (int i = 0; i < NPAT; i++) begin
      r = {1'b0, p[7:1]};
      for (int b = 7; b >= 0; b--) s = {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10] ^ r[b]};
      fb = ps ? ~(p[7] ^ p[5] ^ p[4] ^ p[2]) : ~(p[7] ^ p[5] ^ p[4] ^ p[3]);
      p = {p[6:0], fb};
    end
    return s;
  endfunction

  task automatic request(input int sl, input addr_t a, input data_t d);
    int guard;
    while (!ready) begin @(posedge clk); #1; end
    we = 1'b1; re = 1'b1; ssel = ssel_t'(sl); waddr = a; raddr = a; data_in = d;
    @(posedge clk); #1;
    we = 1'b0; re = 1'b0;
    guard = 0;
    while (!rdwr_done && guard < 2000) begin @(posedge clk); #1; guard++; end
    check(data_out == d >> 1, $sformatf("slave %0d write/read %h: %h", sl, d, data_out));
  endtask

  task automatic session(input bit ps);
    int cycles, f0 [NS];
    for (int s = 0; s < NS; s++) f0[s] = nframe[s];
    bist_start = 1'b1; t_sel = 1'b0; poly_sel = ps;
    @(posedge clk); #1;
    cycles = 0;
    while (!bist_done && cycles < 2 * SESSION_T) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(cycles == SESSION_T, $sformatf("session %0d clocks, expected %0d", cycles, SESSION_T));
    check(good_bad && !er, "Good");
    check(signature == model_sig(ps), $sformatf("signature %h expected %h", signature, model_sig(ps)));
    for (int s = 0; s < NS; s++)
      check(nframe[s] - f0[s] == NPAT, $sformatf("slave %0d: %0d frames", s, nframe[s] - f0[s]));
    bist_start = 1'b0; t_sel = 1'b1;
    @(posedge clk); #1;
  endtask

  initial begin
    rst = 1'b1; bist_start = 1'b0; t_sel = 1'b1; poly_sel = 1'b0;
    we = 1'b0; re = 1'b0; ssel = '0; waddr = '0; raddr = '0; data_in = '0;
    foreach (nframe[s]) nframe[s] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // normal requests to both slaves, the last one to slave 0 so that each
    // session starts with SCLK at slave 0's idle level
    for (int i = 0; i < 8; i++) request(i % NS, addr_t'($urandom), data_t'($urandom));
    request(0, addr_t'($urandom), data_t'($urandom));
    session(1'b0);
    for (int i = 0; i < 4; i++) request((i + 1) % NS, addr_t'($urandom), data_t'($urandom));
    request(0, addr_t'($urandom), data_t'($urandom));
    session(1'b1);
    check(bad_idle == 0, $sformatf("%0d chip select falls with SCLK off the slave's idle level", bad_idle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
