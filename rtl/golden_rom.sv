// golden_rom: read-only store of the fault-free BIST signatures.
//
// One entry per test pattern polynomial: entry 0 for the default LFSR
// polynomial, entry 1 for the second one. The contents are worked out at
// elaboration time by running the fault-free session in
// bist_spi_pkg::golden_signature (N patterns from SEED, each stored in the
// slave and read back, the read word compacted MSB first), so they always
// agree with the polynomials, seed and pattern count chosen.
//
// Interface and timing: `addr` selects the entry, `data` is registered and
// valid one clock later. A ROM holding the golden signature is part of the
// original design; its depth, registered read and the way its contents are
// computed are this design's choices.
module golden_rom
  import bist_spi_pkg::*;
#(
  parameter data_t       TAPS0 = LFSR_TAPS0,
  parameter data_t       TAPS1 = LFSR_TAPS1,
  parameter data_t       SEED  = LFSR_SEED,
  parameter int unsigned NPAT  = N_PATTERNS
) (
  input  logic clk,
  input  logic addr,
  output sig_t data
);

  localparam sig_t ROM [2] = '{golden_signature(TAPS0, SEED, NPAT),
                               golden_signature(TAPS1, SEED, NPAT)};

  always_ff @(posedge clk) data <= ROM[addr];

endmodule
