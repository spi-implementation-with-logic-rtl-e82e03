// tb_comparator: self-checking test of the BIST Good/Bad comparator.
// Replays the comparator waveform case (S_OUT = T_OUT = 11111110, then
// 00111100: no error) and random equal and unequal pairs, and checks that
// er follows valid_in one clock later and holds while valid_in is low.
module tb_comparator;
  logic       clk = 1'b0;
  logic       rst, valid_in, er;
  logic [7:0] s_out, t_out;
  int checks = 0, failures = 0;

  comparator dut (.clk, .rst, .valid_in, .s_out, .t_out, .er);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare(input logic [7:0] s, input logic [7:0] t);
    logic prev;
    prev = er;
    s_out = s; t_out = t; valid_in = 1'b1;
    #1 check(er == prev, "er changes only at the clock edge");
    @(posedge clk); #1 valid_in = 1'b0;
    check(er == (s != t), $sformatf("%h vs %h: er=%0d", s, t, er));
    s_out = ~s;   // no effect while valid_in is low
    @(posedge clk); #1;
    check(er == (s != t), "er holds while valid_in is low");
  endtask

  initial begin
    logic [7:0] a;
    rst = 1'b1; valid_in = 1'b0; s_out = '0; t_out = '0;
    @(posedge clk); #1 rst = 1'b0;
    check(er == 1'b0, "reset clears er");
    compare(8'b11111110, 8'b11111110);
    compare(8'b00111100, 8'b00111100);
    compare(8'b00111100, 8'b00111101);
    for (int i = 0; i < 300; i++) begin
      a = 8'($urandom);
      if ($urandom_range(0, 1)) compare(a, a);
      else compare(a, a ^ 8'(1 << $urandom_range(0, 7)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
