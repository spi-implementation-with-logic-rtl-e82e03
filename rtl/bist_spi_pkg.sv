// bist_spi_pkg: types, sizes and reference functions shared by the SPI
// circuit under test and the logic BIST built around it.
//
// Sizes: the SPI moves 8-bit data words and the slave holds 64 of them
// (6-bit addresses), as in the simulation waveforms of the original design.
// An SPI frame is one command byte {rw, 0, addr[5:0]} followed by one data
// byte, most significant bit first; the frame layout is this design's own.
//
// The functions below describe the pattern generator, the signature
// register and the fault-free response of the slave. The golden-signature
// ROM evaluates them at elaboration time, so the stored signatures always
// match the chosen polynomials and seed; nothing is read from a file.
package bist_spi_pkg;

  localparam int unsigned DATA_W = 8;   // SPI data word
  localparam int unsigned ADDR_W = 6;   // slave register-file address
  localparam int unsigned CMD_W  = 8;   // command byte {rw, 1'b0, addr}
  localparam int unsigned SSEL_W = 4;   // slave select: up to 16 slaves

  // The slave returns a stored word shifted right by this many places.
  localparam int unsigned SLAVE_SHIFT = 1;

  // Test pattern generator: x^8 + x^6 + x^5 + x^4 + 1 with XNOR feedback
  // (tap mask bits 7,5,4,3), seed 8'h01, 255 patterns per period.
  localparam logic [DATA_W-1:0] LFSR_TAPS0  = 8'hB8;
  // Second characteristic polynomial: x^8 + x^6 + x^5 + x^3 + 1, also maximal.
  localparam logic [DATA_W-1:0] LFSR_TAPS1  = 8'hB4;
  localparam logic [DATA_W-1:0] LFSR_SEED   = 8'h01;
  localparam int unsigned       N_PATTERNS  = 255;

  // Signature register width and feedback polynomial
  // x^16 + x^14 + x^13 + x^11 + 1. Eight bits are not enough: with an
  // 8-bit maximal-length register (x^8 + x^4 + x^3 + x^2 + 1) the 2040
  // response bits of a full LFSR period compact to zero for both pattern
  // polynomials, which makes the signature useless.
  localparam int unsigned       SIG_W    = 16;
  localparam logic [SIG_W-1:0]  SIG_TAPS = 16'hB400;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [SIG_W-1:0]  sig_t;
  typedef logic [SSEL_W-1:0] ssel_t;

  // One request to the SPI circuit under test, addressed to slave ssel.
  // With both we and re set the write is carried out first, then the read.
  typedef struct packed {
    ssel_t ssel;
    logic  we;
    logic  re;
    addr_t waddr;
    addr_t raddr;
    data_t data;
  } cut_req_t;

  // BIST controller states (3 bits, shown as TS[2:0]).
  typedef enum logic [2:0] {
    TS_IDLE    = 3'd0,
    TS_RESET   = 3'd1,
    TS_APPLY   = 3'd2,
    TS_WAIT    = 3'd3,
    TS_NEXT    = 3'd4,
    TS_COMPARE = 3'd5,
    TS_DONE    = 3'd6
  } bist_state_t;

  // Next state of the XNOR-feedback LFSR: shift left, new bit 0 is the XNOR
  // of the tapped bits. All-ones is the lock-up state; zero is a valid state.
  function automatic data_t lfsr_next(data_t s, data_t taps);
    return {s[DATA_W-2:0], ~(^(s & taps))};
  endfunction

  // Next state of the serial input signature register: the XOR of the
  // tapped bits and the incoming bit enters at bit 0.
  function automatic sig_t sisr_next(sig_t s, sig_t taps, logic din);
    return {s[SIG_W-2:0], (^(s & taps)) ^ din};
  endfunction

  // Word the fault-free slave returns for a stored word.
  function automatic data_t slave_response(data_t d);
    return d >> SLAVE_SHIFT;
  endfunction

  // Signature of a fault-free test session: n patterns from seed, each
  // written and read back, the read word compacted MSB first from zero.
  function automatic sig_t golden_signature(data_t taps, data_t seed,
                                            int unsigned n);
    data_t p = seed;
    data_t r;
    sig_t  s = '0;
    for (int unsigned i = 0; i < n; i++) begin
      r = slave_response(p);
      for (int b = DATA_W - 1; b >= 0; b--) s = sisr_next(s, SIG_TAPS, r[b]);
      p = lfsr_next(p, taps);
    end
    return s;
  endfunction

endpackage
