// tb_spi_cut: self-checking test of the SPI module (master + slave).
// One instance per CPOL/CPHA mode. Random writes, reads and combined
// write-then-read requests are checked against a register-file model kept
// by the testbench: a read returns the stored word shifted right by one
// place. The first requests replay the original design's SPI waveform
// (01010010 at address 0x0D reads back as 00101001, 00110010 reads back as
// 00011001). Also checked: the number of CS frames per request, eight
// response strobes per read and the latency of (2*16 + 2) * SCLK_HALF
// clocks per frame.
// A second part tests a module with three slaves in different modes
// (slave 0 mode 0, slave 1 mode 3, slave 2 mode 1): random requests to
// random slaves against one model per slave, only the addressed slave's
// chip select falls, the master moves SCLK to the new slave's idle level
// (SCLK_HALF more clocks when the polarity changes) and the slaves keep
// separate contents.
module tb_spi_cut;
  import bist_spi_pkg::*;
  localparam int H      = 2;
  localparam int FRAMEC = (2 * (CMD_W + DATA_W) + 2) * H;

  logic  clk = 1'b0;
  logic  rst;
  logic  we [4], re [4], ready [4], rdwr_done [4], resp_valid [4], resp_bit [4];
  addr_t waddr [4], raddr [4];
  data_t data_in [4], data_out [4];
  logic  sclk [4], cs_n [4], mosi [4], miso [4];
  int    ncs [4], nresp [4];
  int checks = 0, failures = 0;

  for (genvar m = 0; m < 4; m++) begin : g_mode
    spi_cut #(.CPOL(m[1]), .CPHA(m[0]), .SCLK_HALF(H)) dut (
      .clk, .rst, .we(we[m]), .re(re[m]), .ssel('0), .waddr(waddr[m]), .raddr(raddr[m]),
      .data_in(data_in[m]), .data_out(data_out[m]), .ready(ready[m]),
      .rdwr_done(rdwr_done[m]), .resp_valid(resp_valid[m]), .resp_bit(resp_bit[m]),
      .sclk(sclk[m]), .cs_n(cs_n[m]), .mosi(mosi[m]), .miso(miso[m])
    );
    logic cs_q;
    always @(posedge clk) begin
      cs_q <= cs_n[m];
      if (cs_q && !cs_n[m]) ncs[m] <= ncs[m] + 1;
      if (resp_valid[m])    nresp[m] <= nresp[m] + 1;
    end
  end

  // three slaves, modes 0, 3 and 1
  localparam int            NS    = 3;
  localparam logic [NS-1:0] SCPOL = 3'b010;
  localparam logic [NS-1:0] SCPHA = 3'b110;
  logic          ms_we, ms_re, ms_ready, ms_done, ms_rv, ms_rb;
  ssel_t         ms_ssel;
  addr_t         ms_wa, ms_ra;
  data_t         ms_din, ms_dout;
  logic          ms_sclk, ms_mosi, ms_miso;
  logic [NS-1:0] ms_cs_n, ms_cs_q;
  int            ms_ncs [NS];
  int            ms_multi;

  spi_cut #(.SCLK_HALF(H), .N_SLAVES(NS), .SLAVE_CPOL(SCPOL), .SLAVE_CPHA(SCPHA)) dut_ms (
    .clk, .rst, .we(ms_we), .re(ms_re), .ssel(ms_ssel), .waddr(ms_wa), .raddr(ms_ra),
    .data_in(ms_din), .data_out(ms_dout), .ready(ms_ready), .rdwr_done(ms_done),
    .resp_valid(ms_rv), .resp_bit(ms_rb), .sclk(ms_sclk), .cs_n(ms_cs_n),
    .mosi(ms_mosi), .miso(ms_miso)
  );

  always @(posedge clk) begin
    ms_cs_q <= ms_cs_n;
    for (int s = 0; s < NS; s++)
      if (ms_cs_q[s] && !ms_cs_n[s]) ms_ncs[s] <= ms_ncs[s] + 1;
    if ($countones(~ms_cs_n) > 1) ms_multi <= ms_multi + 1;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic request(input int m, input bit w, input bit r, input addr_t wa,
                         input addr_t ra, input data_t d);
    int lat, c0, n0;
    c0 = ncs[m]; n0 = nresp[m];
    check(ready[m], "ready before a request");
    we[m] = w; re[m] = r; waddr[m] = wa; raddr[m] = ra; data_in[m] = d;
    @(posedge clk); #1;
    we[m] = 1'b0; re[m] = 1'b0;
    lat = 0;
    do begin
      @(posedge clk); #1;
      lat++;
    end while (!rdwr_done[m] && lat < 1000);
    check(lat == (int'(w) + int'(r)) * FRAMEC, $sformatf("mode %0d latency %0d", m, lat));
    check(ncs[m] == c0 + int'(w) + int'(r), "one CS frame per operation");
    check(nresp[m] == n0 + (r ? 8 : 0), "eight response strobes per read");
  endtask

  task automatic request_ms(input int sl, input bit w, input bit r, input addr_t wa,
                            input addr_t ra, input data_t d);
    int  lat, c0 [NS], exp_lat;
    for (int s = 0; s < NS; s++) c0[s] = ms_ncs[s];
    check(ms_ready && &ms_cs_n, "three slaves: ready and no chip select before a request");
    exp_lat = (int'(w) + int'(r)) * FRAMEC + ((ms_sclk != SCPOL[sl]) ? H : 0);
    ms_we = w; ms_re = r; ms_ssel = ssel_t'(sl); ms_wa = wa; ms_ra = ra; ms_din = d;
    @(posedge clk); #1;
    ms_we = 1'b0; ms_re = 1'b0;
    lat = 0;
    do begin
      @(posedge clk); #1;
      lat++;
    end while (!ms_done && lat < 1000);
    check(lat == exp_lat, $sformatf("slave %0d latency %0d expected %0d", sl, lat, exp_lat));
    for (int s = 0; s < NS; s++)
      check(ms_ncs[s] == c0[s] + ((s == sl) ? int'(w) + int'(r) : 0),
            $sformatf("slave %0d: chip select %0d frames", s, ms_ncs[s] - c0[s]));
    check(ms_sclk == SCPOL[sl], $sformatf("SCLK idles at slave %0d's CPOL", sl));
  endtask

  initial begin
    data_t model [4][64];
    data_t ms_model [NS][64];
    int    sl, nsw;
    addr_t a, b;
    data_t d;
    int    op;
    rst = 1'b1;
    for (int m = 0; m < 4; m++) begin
      we[m] = 0; re[m] = 0; waddr[m] = 0; raddr[m] = 0; data_in[m] = 0;
      ncs[m] = 0; nresp[m] = 0;
      foreach (model[m][i]) model[m][i] = '0;
    end
    ms_we = 0; ms_re = 0; ms_ssel = '0; ms_wa = 0; ms_ra = 0; ms_din = 0;
    ms_multi = 0; nsw = 0;
    for (int s = 0; s < NS; s++) begin
      ms_ncs[s] = 0;
      foreach (ms_model[s][i]) ms_model[s][i] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;

    for (int m = 0; m < 4; m++) begin
      request(m, 1, 1, 6'h0D, 6'h0D, 8'b01010010);
      check(data_out[m] == 8'b00101001, $sformatf("mode %0d: read back %b", m, data_out[m]));
      model[m][6'h0D] = 8'b01010010;
      request(m, 1, 1, 6'h3E, 6'h3E, 8'b00110010);
      check(data_out[m] == 8'b00011001, $sformatf("mode %0d: read back %b", m, data_out[m]));
      model[m][6'h3E] = 8'b00110010;
      for (int i = 0; i < 40; i++) begin
        a = addr_t'($urandom); b = addr_t'($urandom); d = data_t'($urandom);
        op = $urandom_range(0, 3);
        if (op == 3) b = a;
        unique case (op)
          0: begin request(m, 1, 0, a, b, d); model[m][a] = d; end
          1: begin
            request(m, 0, 1, a, b, d);
            check(data_out[m] == model[m][b] >> 1,
                  $sformatf("mode %0d read %h: %h expected %h", m, b, data_out[m], model[m][b] >> 1));
          end
          default: begin
            request(m, 1, 1, a, b, d);
            model[m][a] = d;
            check(data_out[m] == model[m][b] >> 1,
                  $sformatf("mode %0d write %h read %h: %h", m, a, b, data_out[m]));
          end
        endcase
      end
    end

    // three slaves in modes 0, 3 and 1
    for (int s = 0; s < NS; s++) begin
      request_ms(s, 1, 1, 6'h0D, 6'h0D, 8'h40 + 8'(s));
      ms_model[s][6'h0D] = 8'h40 + 8'(s);
      check(ms_dout == (8'h40 + 8'(s)) >> 1, $sformatf("slave %0d read back %h", s, ms_dout));
    end
    for (int i = 0; i < 90; i++) begin
      sl = $urandom_range(0, NS - 1);
      if (SCPOL[sl] != ms_sclk) nsw++;
      a = addr_t'($urandom); b = addr_t'($urandom); d = data_t'($urandom);
      op = $urandom_range(0, 3);
      if (i % 10 == 0) b = 6'h0D;
      unique case (op)
        0: begin request_ms(sl, 1, 0, a, b, d); ms_model[sl][a] = d; end
        1: begin
          request_ms(sl, 0, 1, a, b, d);
          check(ms_dout == ms_model[sl][b] >> 1,
                $sformatf("slave %0d read %h: %h expected %h", sl, b, ms_dout, ms_model[sl][b] >> 1));
        end
        default: begin
          request_ms(sl, 1, 1, a, b, d);
          ms_model[sl][a] = d;
          check(ms_dout == ms_model[sl][b] >> 1,
                $sformatf("slave %0d write %h read %h: %h", sl, a, b, ms_dout));
        end
      endcase
    end
    check(ms_multi == 0, "never more than one chip select low");
    check(nsw > 0, "SCLK polarity changed between slaves");
    $display("three slaves: %0d polarity changes", nsw);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
