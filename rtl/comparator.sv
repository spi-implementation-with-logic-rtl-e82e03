// comparator: the BIST Good/Bad decision.
//
// When valid_in is high the signature of the test session (t_out) is
// compared with the golden signature (s_out) and the registered error flag
// `er` is set on any difference, cleared on a match. The flag holds its
// value until the next valid_in, so it can be read after the session ends.
// Good/Bad is therefore ~er once a comparison has been made.
//
// Port names follow the comparator waveform of the original design
// (S_OUT, T_OUT, VALID_IN, ER); the one-clock registered result and the
// holding behaviour are this design's choices.
module comparator #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             valid_in,
  input  logic [WIDTH-1:0] s_out,   // golden signature
  input  logic [WIDTH-1:0] t_out,   // signature under test
  output logic             er       // 1: mismatch (Bad)
);

  always_ff @(posedge clk) begin
    if (rst)           er <= 1'b0;
    else if (valid_in) er <= (s_out != t_out);
  end

endmodule
