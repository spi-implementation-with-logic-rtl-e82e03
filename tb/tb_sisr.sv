// tb_sisr: self-checking test of the serial input signature register.
// Feeds random bit streams and compares the signature with a reference
// model computed in the testbench (shift left, bit 0 = q15^q13^q12^q10^din).
// Also checks clear, reset, that en low holds the value, and that a single
// flipped bit in a stream changes the signature.
module tb_sisr;
  logic       clk = 1'b0;
  logic       rst, clear, en, din;
  logic [15:0] signature;
  int checks = 0, failures = 0;

  sisr dut (.clk, .rst, .clear, .en, .din, .signature);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] ref_step(logic [15:0] s, logic b);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10] ^ b};
  endfunction

  task automatic run_stream(input logic [63:0] bits, output logic [15:0] sig);
    clear = 1'b1;
    @(posedge clk); #1 clear = 1'b0;
    en = 1'b1;
    for (int i = 63; i >= 0; i--) begin
      din = bits[i];
      @(posedge clk); #1;
    end
    en = 1'b0;
    sig = signature;
  endtask

  initial begin
    logic [15:0]  exp, got, got2;
    logic [63:0] stream;
    rst = 1'b1; clear = 1'b0; en = 1'b0; din = 1'b0;
    @(posedge clk); #1 rst = 1'b0;
    check(signature == 16'h0000, "reset clears");
    for (int t = 0; t < 50; t++) begin
      stream = {$urandom, $urandom};
      exp = 16'h0000;
      for (int i = 63; i >= 0; i--) exp = ref_step(exp, stream[i]);
      run_stream(stream, got);
      check(got == exp, $sformatf("stream %0d: %h expected %h", t, got, exp));
      repeat (3) @(posedge clk);
      #1 check(signature == got, "en low holds");
      run_stream(stream ^ (64'd1 << $urandom_range(0, 63)), got2);
      check(got2 != got, "single bit error changes the signature");
    end
    // a known stream: 8 ones from zero
    exp = 16'h0000;
    for (int i = 0; i < 8; i++) exp = ref_step(exp, 1'b1);
    run_stream({56'd0, 8'hFF}, got);
    check(got == exp && got != 16'h0000, "eight ones from zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
