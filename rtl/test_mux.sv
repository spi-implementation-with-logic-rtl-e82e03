// test_mux: the BIST input multiplexer in front of the circuit under test.
//
// A registered 2:1 multiplexer. In normal mode (sel = 1) the primary
// inputs s_data pass to the CUT; in test mode (sel = 0) the generated
// test stimulus t_data does. The output is registered and cleared by reset,
// so the CUT sees the selected value one clock after it is presented.
//
// The select polarity (1 = normal, 0 = test) and the clock and reset on
// the multiplexer follow the original design's simulation waveforms; the
// description in words states the opposite polarity, and this design keeps
// the waveforms' one. The payload type is a parameter: the BIST top uses
// it for the whole CUT request (strobes, addresses and data) so that they
// stay aligned through the register.
module test_mux #(
  parameter type T = logic [7:0]
) (
  input  logic clk,
  input  logic rst,
  input  logic sel,      // 1: normal mode (s_data), 0: test mode (t_data)
  input  T     s_data,   // primary inputs
  input  T     t_data,   // test patterns
  output T     data_out
);

  always_ff @(posedge clk) begin
    if (rst) data_out <= '0;
    else     data_out <= sel ? s_data : t_data;
  end

endmodule
