// tb_bist_spi_top: end-to-end test of the SPI module with logic BIST, at
// the default parameters (255 patterns, SCLK = clk/4, SPI mode 0).
//
// Sequence and checks:
//   1. normal mode: writes, reads and write-then-read requests through the
//      primary inputs, checked against a register-file model (a read
//      returns the stored word shifted right once);
//   2. bist_start while t_sel selects normal mode starts no session;
//   3. a BIST session with the default polynomial: Good, the signature
//      equals the testbench's own model of the fault-free session, the
//      LFSR is back at its seed, and the session takes
//      3 + NPAT * (2 * 68 + 4) clocks (4 clocks of controller and
//      multiplexer overhead per pattern);
//   4. back in normal mode: the slave now holds the last test pattern
//      written to each address, and normal requests work again;
//   5. a session with the second polynomial: Good, its own signature;
//   6. a session with MISO forced high (a stuck-at-1 on the response
//      wire): Bad.
// Each mechanism (normal write, normal read, mode switch, ignored start,
// Good session, Bad session, polynomial switch) is counted and a failure
// is counted for any that never happened.
module tb_bist_spi_top;
  import bist_spi_pkg::*;

  localparam int NPAT      = N_PATTERNS;
  localparam int FRAMEC    = (2 * (CMD_W + DATA_W) + 2) * 2;   // SCLK_HALF = 2
  localparam int PER_PAT   = 2 * FRAMEC + 4;
  localparam int SESSION_T = 3 + NPAT * PER_PAT;

  logic        clk = 1'b0;
  logic        rst, bist_start, t_sel, poly_sel;
  logic        bist_done, er, good_bad, lfsr_done;
  bist_state_t ts;
  sig_t        signature;
  data_t       lfsr_data;
  logic        we, re;
  addr_t       waddr, raddr;
  data_t       data_in, data_out;
  logic        ready, rdwr_done, sclk, cs_n, mosi, miso;
  int checks = 0, failures = 0;

  bist_spi_top dut (
    .clk, .rst, .bist_start, .t_sel, .poly_sel, .bist_done, .er, .good_bad,
    .ts, .signature, .lfsr_data, .lfsr_done,
    .we, .re, .ssel('0), .waddr, .raddr, .data_in, .data_out, .ready, .rdwr_done,
    .sclk, .cs_n, .mosi, .miso
  );

  always #5 clk = ~clk;

  initial begin
    repeat (4 * SESSION_T + 50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_wr = 0, n_rd = 0, n_mode_sw = 0, n_ignored = 0, n_good = 0, n_bad = 0,
      n_poly_sw = 0;
  data_t model [64];

  // the testbench's own model of a fault-free session
  function automatic sig_t expected_sig(bit ps, output data_t last [64]);
    data_t p, r;
    sig_t  s;
    logic  fb;
    p = 8'h01; s = '0;
    for (int i = 0; i < NPAT; i++) begin
      last[i % 64] = p;
      r = {1'b0, p[7:1]};
      for (int b = 7; b >= 0; b--) s = {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10] ^ r[b]};
      fb = ps ? ~(p[7] ^ p[5] ^ p[4] ^ p[2]) : ~(p[7] ^ p[5] ^ p[4] ^ p[3]);
      p = {p[6:0], fb};
    end
    return s;
  endfunction

  task automatic request(input bit w, input bit r, input addr_t wa, input addr_t ra,
                         input data_t d);
    int guard;
    while (!ready) begin @(posedge clk); #1; end
    we = w; re = r; waddr = wa; raddr = ra; data_in = d;
    @(posedge clk); #1;
    we = 1'b0; re = 1'b0;
    guard = 0;
    while (!rdwr_done && guard < 1000) begin @(posedge clk); #1; guard++; end
    check(rdwr_done, "request finished");
    if (w) begin model[wa] = d; n_wr++; end
    if (r) begin
      check(data_out == model[ra] >> 1,
            $sformatf("normal read %h: %h expected %h", ra, data_out, model[ra] >> 1));
      n_rd++;
    end
  endtask

  task automatic session(input bit ps, input bit expect_good, output int cycles);
    bist_start = 1'b1; t_sel = 1'b0; poly_sel = ps;
    @(posedge clk); #1;
    cycles = 0;
    while (!bist_done && cycles < 2 * SESSION_T) begin @(posedge clk); #1; cycles++; end
    check(bist_done, "session finished");
    check(good_bad == expect_good && er == !expect_good,
          $sformatf("poly %0d: good_bad=%0d expected %0d", ps, good_bad, expect_good));
    if (good_bad) n_good++; else n_bad++;
    bist_start = 1'b0; t_sel = 1'b1;
    @(posedge clk); #1;
    n_mode_sw++;
  endtask

  initial begin
    data_t last [64];
    sig_t  exp0, exp1;
    int    cyc;
    addr_t a;
    rst = 1'b1; bist_start = 1'b0; t_sel = 1'b1; poly_sel = 1'b0;
    we = 1'b0; re = 1'b0; waddr = '0; raddr = '0; data_in = '0;
    foreach (model[i]) model[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // 1. normal mode
    request(1, 1, 6'h0D, 6'h0D, 8'b01010010);
    check(data_out == 8'b00101001, "waveform case: 01010010 reads back as 00101001");
    request(1, 1, 6'h3E, 6'h3E, 8'b00110010);
    check(data_out == 8'b00011001, "waveform case: 00110010 reads back as 00011001");
    request(1, 1, 6'h2B, 6'h2B, 8'b10101010);
    check(data_out == 8'b01010101, "waveform case: 10101010 reads back as 01010101");
    for (int i = 0; i < 20; i++)
      request(1'($urandom_range(0, 1)), 1'b1, addr_t'($urandom), addr_t'($urandom),
              data_t'($urandom));

    // 2. bist_start in normal mode is ignored
    bist_start = 1'b1; t_sel = 1'b1;
    repeat (20) @(posedge clk);
    #1 check(ts == TS_IDLE && !bist_done, "no session in normal mode");
    if (ts == TS_IDLE) n_ignored++;
    bist_start = 1'b0;
    request(1, 1, 6'h05, 6'h05, 8'hC3);

    // 3. session with the default polynomial
    exp1 = expected_sig(1'b1, last);
    exp0 = expected_sig(1'b0, last);
    session(1'b0, 1'b1, cyc);
    check(cyc == SESSION_T, $sformatf("session took %0d clocks, expected %0d", cyc, SESSION_T));
    check(signature == exp0, $sformatf("signature %h expected %h", signature, exp0));
    check(lfsr_data == 8'h01 && lfsr_done, "LFSR back at its seed after 255 patterns");

    // 4. normal mode again: the slave holds the last test patterns
    foreach (last[i]) model[i] = last[i];
    for (int i = 0; i < 64; i += 9) request(1'b0, 1'b1, 6'h00, addr_t'(i), 8'h00);
    for (int i = 0; i < 10; i++)
      request(1'b1, 1'b1, addr_t'($urandom), addr_t'($urandom), data_t'($urandom));

    // 5. second polynomial
    session(1'b1, 1'b1, cyc);
    n_poly_sw++;
    check(signature == exp1 && exp1 != exp0, $sformatf("poly 1 signature %h expected %h", signature, exp1));

    // 6. faulty circuit: MISO stuck at 1
    force dut.u_cut.miso = 1'b1;
    session(1'b0, 1'b0, cyc);
    release dut.u_cut.miso;
    check(signature != exp0, "faulty signature differs");

    // and a good session again once the fault is gone
    session(1'b0, 1'b1, cyc);
    foreach (model[i]) model[i] = last[i];
    a = 6'h2A;
    request(1'b0, 1'b1, a, a, 8'h00);

    $display("mechanisms: normal writes %0d, normal reads %0d, mode switches %0d, ignored starts %0d, good sessions %0d, bad sessions %0d, polynomial switches %0d",
             n_wr, n_rd, n_mode_sw, n_ignored, n_good, n_bad, n_poly_sw);
    check(n_wr > 0, "normal write happened");
    check(n_rd > 0, "normal read happened");
    check(n_mode_sw > 0, "mode switch happened");
    check(n_ignored > 0, "ignored start happened");
    check(n_good > 0, "good session happened");
    check(n_bad > 0, "bad session happened");
    check(n_poly_sw > 0, "polynomial switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
