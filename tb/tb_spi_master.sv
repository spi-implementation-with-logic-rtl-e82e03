// tb_spi_master: self-checking test of the SPI master.
// One master per CPOL/CPHA mode, each talking to a behavioural slave that
// works on the SCLK edges. The testbench checks the frame the slave
// received (command byte {rw, 0, addr}, then data), data_out after a read
// (the slave's reply), the eight resp_valid strobes and their bits, the
// write-then-read order of a combined request, SCLK and CS idle levels,
// and the request latency: (2*FRAME + 2) * SCLK_HALF clocks per frame.
module tb_spi_master;
  import bist_spi_pkg::*;
  localparam int H      = 2;
  localparam int FRAMEC = (2 * (CMD_W + DATA_W) + 2) * H;   // clocks per frame

  logic  clk = 1'b0;
  logic  rst;
  logic  we [4], re [4], ready [4], rdwr_done [4], resp_valid [4], resp_bit [4];
  addr_t waddr [4], raddr [4];
  data_t data_in [4], data_out [4];
  logic  sclk [4], cs_n [4], mosi [4], miso [4];
  logic [7:0]  reply [4];
  logic [15:0] last_frame [4];
  int          frames [4];
  int          nresp [4];
  logic [7:0]  resp_sr [4];
  int checks = 0, failures = 0;

  for (genvar m = 0; m < 4; m++) begin : g_mode
    spi_master #(.CPOL(m[1]), .CPHA(m[0]), .SCLK_HALF(H)) dut (
      .clk, .rst, .we(we[m]), .re(re[m]), .ssel('0), .waddr(waddr[m]), .raddr(raddr[m]),
      .data_in(data_in[m]), .ready(ready[m]), .data_out(data_out[m]),
      .rdwr_done(rdwr_done[m]), .resp_valid(resp_valid[m]), .resp_bit(resp_bit[m]),
      .sclk(sclk[m]), .cs_n(cs_n[m]), .mosi(mosi[m]), .miso(miso[m])
    );
    spi_slave_bfm #(.CPOL(m[1]), .CPHA(m[0])) bfm (
      .sclk(sclk[m]), .cs_n(cs_n[m]), .mosi(mosi[m]), .miso(miso[m]),
      .reply(reply[m]), .last_frame(last_frame[m]), .frames(frames[m])
    );
    always @(posedge clk) if (resp_valid[m]) begin
      nresp[m]   <= nresp[m] + 1;
      resp_sr[m] <= {resp_sr[m][6:0], resp_bit[m]};
    end
  end

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

  // Issue one request and return the clocks until rdwr_done.
  task automatic request(input int m, input bit w, input bit r, input addr_t wa,
                         input addr_t ra, input data_t d, output int lat);
    check(ready[m] && cs_n[m] && sclk[m] == m[1], "idle: ready, CS high, SCLK at CPOL");
    we[m] = w; re[m] = r; waddr[m] = wa; raddr[m] = ra; data_in[m] = d;
    @(posedge clk); #1;
    we[m] = 1'b0; re[m] = 1'b0;
    lat = 0;
    do begin
      @(posedge clk); #1;
      lat++;
    end while (!rdwr_done[m] && lat < 1000);
  endtask

  initial begin
    int    lat, f0, n0;
    addr_t a, b;
    data_t d, rp;
    rst = 1'b1;
    for (int m = 0; m < 4; m++) begin
      we[m] = 0; re[m] = 0; waddr[m] = 0; raddr[m] = 0; data_in[m] = 0; reply[m] = 0;
      nresp[m] = 0; resp_sr[m] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    for (int m = 0; m < 4; m++) begin
      for (int i = 0; i < 25; i++) begin
        a = addr_t'($urandom); b = addr_t'($urandom);
        d = data_t'($urandom); rp = data_t'($urandom);
        reply[m] = rp;
        f0 = frames[m]; n0 = nresp[m];
        unique case (i % 3)
          0: begin   // write only
            request(m, 1, 0, a, b, d, lat);
            check(lat == FRAMEC, $sformatf("mode %0d write latency %0d", m, lat));
            check(frames[m] == f0 + 1, "one frame");
            check(last_frame[m] == {2'b00, a, d},
                  $sformatf("mode %0d write frame %h", m, last_frame[m]));
            check(nresp[m] == n0, "no response strobes on a write");
          end
          1: begin   // read only
            request(m, 0, 1, a, b, d, lat);
            check(lat == FRAMEC, $sformatf("mode %0d read latency %0d", m, lat));
            check(last_frame[m][15:8] == {2'b10, b}, "read command byte");
            check(data_out[m] == rp, $sformatf("mode %0d read %h expected %h", m, data_out[m], rp));
            check(nresp[m] == n0 + 8 && resp_sr[m] == rp, "eight response strobes with the reply bits");
          end
          default: begin   // write then read
            request(m, 1, 1, a, b, d, lat);
            check(lat == 2 * FRAMEC, $sformatf("mode %0d write+read latency %0d", m, lat));
            check(frames[m] == f0 + 2, "two frames");
            check(last_frame[m][15:8] == {2'b10, b}, "read comes second");
            check(data_out[m] == rp, "combined request returns the reply");
            check(nresp[m] == n0 + 8, "eight response strobes");
          end
        endcase
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
