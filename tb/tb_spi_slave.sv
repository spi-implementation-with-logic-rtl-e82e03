// tb_spi_slave: self-checking test of the addressed SPI slave.
// The testbench bit-bangs the SPI wires itself, acting as the master, in
// all four CPOL/CPHA modes (one slave instance per mode). It writes random
// words to random addresses, keeps its own copy of the register file, and
// reads back: the reply on MISO must be the stored word shifted right by
// one place. The first operations replay the waveform case of the
// original design (01010010 written at 0x0D reads back as 00101001).
module tb_spi_slave;
  localparam int HALF = 3;   // clocks per SCLK half period

  logic clk = 1'b0;
  logic rst;
  logic sclk [4];
  logic cs_n [4];
  logic mosi [4];
  logic miso [4];
  int checks = 0, failures = 0;

  for (genvar m = 0; m < 4; m++) begin : g_mode
    spi_slave #(.CPOL(m[1]), .CPHA(m[0])) dut (
      .clk, .rst, .sclk(sclk[m]), .cs_n(cs_n[m]), .mosi(mosi[m]), .miso(miso[m])
    );
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

  task automatic wait_clks(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // One 16-bit frame, MSB first; returns the 16 bits seen on MISO.
  task automatic frame(input int m, input logic [15:0] out, output logic [15:0] in);
    bit cpol, cpha;
    cpol = m[1]; cpha = m[0];
    in = '0;
    sclk[m] = cpol;
    cs_n[m] = 1'b0;
    if (!cpha) mosi[m] = out[15];
    wait_clks(HALF);
    for (int i = 15; i >= 0; i--) begin
      // leading edge
      if (!cpha) in[i] = miso[m];
      else       mosi[m] = out[i];
      sclk[m] = ~cpol;
      wait_clks(HALF);
      // trailing edge
      if (cpha) in[i] = miso[m];
      sclk[m] = cpol;
      if (!cpha && i > 0) mosi[m] = out[i-1];
      wait_clks(HALF);
    end
    cs_n[m] = 1'b1;
    wait_clks(2 * HALF);
  endtask

  task automatic spi_write(input int m, input logic [5:0] a, input logic [7:0] d);
    logic [15:0] in;
    frame(m, {2'b00, a, d}, in);
    check(in == 16'h0000, "MISO stays low during a write");
  endtask

  task automatic spi_read(input int m, input logic [5:0] a, output logic [7:0] d);
    logic [15:0] in;
    frame(m, {2'b10, a, 8'h00}, in);
    check(in[15:8] == 8'h00, "MISO low during the command byte");
    d = in[7:0];
  endtask

  initial begin
    logic [7:0] model [4][64];
    logic [7:0] d, got;
    logic [5:0] a;
    rst = 1'b1;
    foreach (sclk[m]) begin sclk[m] = m[1]; cs_n[m] = 1'b1; mosi[m] = 1'b0; end
    wait_clks(3);
    rst = 1'b0;
    foreach (model[m, i]) model[m][i] = 8'h00;

    for (int m = 0; m < 4; m++) begin
      spi_write(m, 6'h0D, 8'b01010010);
      spi_read(m, 6'h0D, got);
      check(got == 8'b00101001, $sformatf("mode %0d: 0x0D read %b", m, got));
      model[m][6'h0D] = 8'b01010010;
      spi_write(m, 6'h3E, 8'b00110010);
      spi_read(m, 6'h3E, got);
      check(got == 8'b00011001, $sformatf("mode %0d: 0x3E read %b", m, got));
      model[m][6'h3E] = 8'b00110010;
      spi_read(m, 6'h01, got);
      check(got == 8'h00, "unwritten address reads zero after reset");
      for (int i = 0; i < 60; i++) begin
        a = 6'($urandom);
        if ($urandom_range(0, 2) != 0) begin
          d = 8'($urandom);
          spi_write(m, a, d);
          model[m][a] = d;
        end else begin
          spi_read(m, a, got);
          check(got == (model[m][a] >> 1),
                $sformatf("mode %0d addr %h: read %h expected %h", m, a, got, model[m][a] >> 1));
        end
      end
      for (int i = 0; i < 64; i += 7) begin
        spi_read(m, 6'(i), got);
        check(got == (model[m][i] >> 1), $sformatf("mode %0d final read %0d", m, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
