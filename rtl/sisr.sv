// sisr: serial input signature register, the BIST response analyzer.
//
// The SPI circuit under test answers with a serial bit stream, so its
// response is compacted one bit at a time: on every clock with `en` high
// the register shifts left and bit 0 takes the XOR of the tapped bits and
// the incoming bit `din`. After a test session `signature` holds a short
// code of the whole stream, to be compared with the fault-free code.
//
// Interface and timing:
//   rst    synchronous, active high, clears the signature
//   clear  synchronous clear at the start of a test session
//   en     din is taken at this clock edge
// A serial-input compactor is what the original design calls for; the
// width (16) and polynomial (x^16 + x^14 + x^13 + x^11 + 1) are this
// design's choice. Aliasing probability for a long stream is about 2^-16.
module sisr #(
  parameter int unsigned      WIDTH = 16,
  parameter logic [WIDTH-1:0] TAPS  = 16'hB400
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             en,
  input  logic             din,
  output logic [WIDTH-1:0] signature
);

  always_ff @(posedge clk) begin
    if (rst || clear) signature <= '0;
    else if (en)      signature <= {signature[WIDTH-2:0], (^(signature & TAPS)) ^ din};
  end

endmodule
