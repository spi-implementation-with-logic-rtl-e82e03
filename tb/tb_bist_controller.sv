// tb_bist_controller: self-checking test of the BIST controller.
// A simple model of the SPI module answers each test request with ready
// low and a rdwr_done pulse after a random delay. The testbench checks that
// bist_start in normal mode starts nothing, that a test session switches
// the multiplexer to test patterns, pulses t_rst, issues exactly NPAT
// write-and-read requests at addresses 0, 1, 2, ... (mod 64) to slaves
// 0, 1, 2, 0, ... (three slaves, pattern number mod 3), steps the
// LFSR NPAT times, never issues a request while the module is busy, gives
// one comparator pulse at the end, holds bist_done until bist_start falls,
// and latches poly_sel at the start.
module tb_bist_controller;
  import bist_spi_pkg::*;
  localparam int NPAT = 255;
  localparam int NS   = 3;

  logic        clk = 1'b0;
  logic        rst, bist_start, t_sel, poly_sel, cut_ready, cut_done;
  logic        mux_sel, t_rst, lfsr_en, poly_sel_q, test_we, test_re;
  logic        sisr_gate, cmp_valid, bist_done;
  addr_t       test_addr;
  ssel_t       test_ssel;
  bist_state_t ts;
  int checks = 0, failures = 0;

  bist_controller #(.NPAT(NPAT), .N_SLAVES(NS)) dut (
    .clk, .rst, .bist_start, .t_sel, .poly_sel, .cut_ready, .cut_done,
    .mux_sel, .t_rst, .lfsr_en, .poly_sel_q, .test_we, .test_re, .test_addr, .test_ssel,
    .sisr_gate, .cmp_valid, .bist_done, .ts
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model of the SPI module's handshake
  int n_req, n_step, n_cmp, n_trst, busy_cnt, bad_addr, busy_req;
  always @(posedge clk) begin
    cut_done <= 1'b0;
    if (rst) begin
      cut_ready <= 1'b1;
      busy_cnt  <= 0;
    end else if (!cut_ready) begin
      if (busy_cnt == 0) begin
        cut_ready <= 1'b1;
        cut_done  <= 1'b1;
      end else busy_cnt <= busy_cnt - 1;
    end else if (test_we) begin
      cut_ready <= 1'b0;
      busy_cnt  <= $urandom_range(1, 6);
    end
    if (!rst) begin
      if (test_we) begin
        if (!(test_re && test_addr == addr_t'(n_req) && test_ssel == ssel_t'(n_req % NS)))
          bad_addr++;
        if (!cut_ready) busy_req++;
        n_req++;
      end
      if (lfsr_en)   n_step++;
      if (cmp_valid) n_cmp++;
      if (t_rst)     n_trst++;
    end
  end

  task automatic session(input bit ps);
    int guard;
    n_req = 0; n_step = 0; n_cmp = 0; n_trst = 0; bad_addr = 0; busy_req = 0;
    poly_sel = ps; t_sel = 1'b0; bist_start = 1'b1;
    @(posedge clk); #1;
    poly_sel = ~ps;   // must not matter after the start
    check(ts == TS_RESET && t_rst && !mux_sel, "session starts with t_rst in test mode");
    guard = 0;
    while (!bist_done && guard < 20000) begin
      @(posedge clk); #1;
      guard++;
      if (!bist_done && ts != TS_RESET)
        check(!mux_sel, "multiplexer selects test patterns during the session");
    end
    check(bist_done, "bist_done reached");
    check(n_req == NPAT, $sformatf("%0d requests", n_req));
    check(n_step == NPAT, $sformatf("%0d LFSR steps", n_step));
    check(n_cmp == 1, "one comparison");
    check(n_trst >= 2, "t_rst held while settling");
    check(bad_addr == 0, "request addresses count up from zero, slaves take turns");
    check(busy_req == 0, "no request while busy");
    check(poly_sel_q == ps, "poly_sel latched at start");
    check(mux_sel, "normal mode again once done");
    repeat (5) @(posedge clk);
    #1 check(bist_done && ts == TS_DONE, "bist_done holds while bist_start is high");
    bist_start = 1'b0;
    @(posedge clk); #1;
    check(ts == TS_IDLE && !bist_done, "back to idle when bist_start falls");
  endtask

  initial begin
    rst = 1'b1; bist_start = 1'b0; t_sel = 1'b1; poly_sel = 1'b0;
    n_req = 0; n_step = 0; n_cmp = 0; n_trst = 0; bad_addr = 0; busy_req = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(ts == TS_IDLE && mux_sel, "idle in normal mode after reset");
    // bist_start in normal mode: nothing happens
    bist_start = 1'b1; t_sel = 1'b1;
    repeat (10) @(posedge clk);
    #1 check(ts == TS_IDLE && mux_sel && n_req == 0, "normal mode ignores bist_start");
    bist_start = 1'b0;
    session(1'b0);
    session(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
