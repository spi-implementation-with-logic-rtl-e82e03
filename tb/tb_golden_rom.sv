// tb_golden_rom: self-checking test of the golden-signature ROM.
// Recomputes both fault-free signatures in the testbench with its own
// model of the session (LFSR patterns from seed 01, slave returns each
// pattern shifted right once, 16-bit SISR x^16+x^14+x^13+x^11+1 fed MSB first)
// and checks both ROM entries and the one-clock read latency, at the
// full 255 patterns and at a reduced pattern count.
module tb_golden_rom;
  logic       clk = 1'b0;
  logic       addr;
  logic [15:0] data_full, data_small;
  int checks = 0, failures = 0;

  golden_rom                 dut_full  (.clk, .addr, .data(data_full));
  golden_rom #(.NPAT(10))    dut_small (.clk, .addr, .data(data_small));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] model(bit ps, int n);
    logic [7:0] p, r;
    logic [15:0] s;
    logic       fb;
    p = 8'h01; s = 16'h0000;
    for (int i = 0; i < n; i++) begin
      r = {1'b0, p[7:1]};
      for (int b = 7; b >= 0; b--) s = {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10] ^ r[b]};
      fb = ps ? ~(p[7] ^ p[5] ^ p[4] ^ p[2]) : ~(p[7] ^ p[5] ^ p[4] ^ p[3]);
      p = {p[6:0], fb};
    end
    return s;
  endfunction

  initial begin
    logic [15:0] e0, e1;
    e0 = model(1'b0, 255);
    e1 = model(1'b1, 255);
    $display("golden signatures: poly0 %h poly1 %h", e0, e1);
    check(e0 != e1 && e0 != 0 && e1 != 0, "the two polynomials give different, non-zero signatures");
    addr = 1'b0;
    @(posedge clk); #1;
    check(data_full == e0, $sformatf("entry 0 = %h, expected %h", data_full, e0));
    check(data_small == model(1'b0, 10), "entry 0 at 10 patterns");
    addr = 1'b1;
    #1 check(data_full == e0, "read is registered");
    @(posedge clk); #1;
    check(data_full == e1, $sformatf("entry 1 = %h, expected %h", data_full, e1));
    check(data_small == model(1'b1, 10), "entry 1 at 10 patterns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
