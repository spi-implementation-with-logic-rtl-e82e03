// tb_test_mux: self-checking test of the registered BIST input multiplexer.
// Drives random primary inputs and test patterns, switches between normal
// mode (sel = 1) and test mode (sel = 0), and checks that the output is the
// selected input one clock later and zero after reset.
module tb_test_mux;
  logic       clk = 1'b0;
  logic       rst, sel;
  logic [7:0] s_data, t_data, data_out;
  int checks = 0, failures = 0;

  test_mux #(.T(logic [7:0])) dut (.clk, .rst, .sel, .s_data, .t_data, .data_out);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] exp;
    rst = 1'b1; sel = 1'b1; s_data = 8'hAA; t_data = 8'h55;
    @(posedge clk); #1;
    check(data_out == 8'h00, "reset clears output");
    rst = 1'b0;
    // the waveform case: S_DATA 10101010 in normal mode reaches the CUT
    @(posedge clk); #1;
    check(data_out == 8'b10101010, "normal mode passes S_DATA");
    sel = 1'b0;
    @(posedge clk); #1;
    check(data_out == 8'h55, "test mode passes T_DATA");
    exp = 8'h55;
    for (int i = 0; i < 500; i++) begin
      sel = $urandom_range(0, 1);
      s_data = 8'($urandom);
      t_data = 8'($urandom);
      #1 check(data_out == exp, "output changes only at the clock edge");
      exp = sel ? s_data : t_data;
      @(posedge clk); #1;
      check(data_out == exp, $sformatf("sel=%0d got %h expected %h", sel, data_out, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
