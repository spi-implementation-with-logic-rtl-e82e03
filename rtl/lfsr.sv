// lfsr: the BIST test pattern generator, a seedable linear feedback shift
// register with XNOR feedback.
//
// Each enabled clock the register shifts left by one place and the XNOR of
// the tapped bits enters at bit 0. With the default polynomial
// x^8 + x^6 + x^5 + x^4 + 1 (tap mask 8'hB8) and seed 8'h01 it produces
// 01, 03, 07, 0F, 1E, 3D, 7A, F4, E8, ... and returns to the seed after
// 2^8 - 1 = 255 patterns; all-ones is the one state it never reaches.
// Two tap masks are built in and poly_sel picks one, so a second test
// session can run with a different characteristic polynomial.
//
// Interface and timing:
//   rst        synchronous, active high: register cleared to zero
//   seed_load  loads `seed` at the next edge (has priority over enable)
//   enable     advances one step per clock
//   q          current pattern, registered
//   done       high while q equals the seed again after at least one step,
//              i.e. one full period has been produced
// The XNOR feedback, the 8-bit width, the 255-pattern period and the seed
// follow the original design; the second tap mask and the done rule are
// this design's own choices.
module lfsr #(
  parameter int unsigned          WIDTH = 8,
  parameter logic [WIDTH-1:0]     TAPS0 = 8'hB8,
  parameter logic [WIDTH-1:0]     TAPS1 = 8'hB4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             seed_load,
  input  logic [WIDTH-1:0] seed,
  input  logic             enable,
  input  logic             poly_sel,
  output logic [WIDTH-1:0] q,
  output logic             done
);

  logic [WIDTH-1:0] taps;
  logic [WIDTH-1:0] seed_q;
  logic             stepped;

  assign taps = poly_sel ? TAPS1 : TAPS0;

  always_ff @(posedge clk) begin
    if (rst) begin
      q       <= '0;
      seed_q  <= '0;
      stepped <= 1'b0;
    end else if (seed_load) begin
      q       <= seed;
      seed_q  <= seed;
      stepped <= 1'b0;
    end else if (enable) begin
      q       <= {q[WIDTH-2:0], ~(^(q & taps))};
      stepped <= 1'b1;
    end
  end

  assign done = stepped && (q == seed_q);

endmodule
