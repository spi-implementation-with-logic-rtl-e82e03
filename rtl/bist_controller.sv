// bist_controller: sequencer of the logic BIST around the SPI module.
//
// How it works: outside a test session the controller keeps the input
// multiplexer in normal mode (mux_sel = 1) and the SPI module serves the
// primary inputs. A session starts when bist_start (the Test Control pin)
// is high while t_sel selects test mode (t_sel = 0). The controller then
//   RESET    switches the multiplexer to the test patterns, seeds the LFSR
//            and clears the signature register (t_rst), waits at least two
//            clocks (a normal-mode request may still be in the multiplexer
//            register) and until the SPI module is idle;
//   APPLY    issues one write-and-read request for the current pattern, at
//            address = pattern number mod 2^ADDR_W, to slave
//            pattern number mod N_SLAVES (so every slave is tested);
//   WAIT     waits for the SPI module to finish (rdwr_done); the read-data
//            bits are compacted meanwhile (sisr_gate is high);
//   NEXT     steps the LFSR; after NPAT patterns goes on to
//   COMPARE  one valid_in pulse to the comparator (signature against ROM);
//   DONE     bist_done stays high until bist_start is released.
// The state is visible as ts (3 bits). poly_sel is sampled at the start of
// a session and held, so the pattern polynomial and the golden signature
// stay consistent for the whole session.
//
// The modes, the multiplexer select, the LFSR/response analyzer/ROM
// control and the 3-bit state follow the original design; the order of
// states, the per-pattern write-then-read test and the handshake with the
// SPI module are this design's own.
module bist_controller
  import bist_spi_pkg::*;
#(
  parameter int unsigned NPAT     = N_PATTERNS,
  parameter int unsigned N_SLAVES = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bist_start,   // Test Control
  input  logic        t_sel,        // 1: normal mode, 0: test mode
  input  logic        poly_sel,     // pattern polynomial for the next session
  input  logic        cut_ready,
  input  logic        cut_done,
  output logic        mux_sel,      // 1: primary inputs, 0: test patterns
  output logic        t_rst,        // seed LFSR, clear signature register
  output logic        lfsr_en,
  output logic        poly_sel_q,
  output logic        test_we,
  output logic        test_re,
  output addr_t       test_addr,
  output ssel_t       test_ssel,
  output logic        sisr_gate,
  output logic        cmp_valid,
  output logic        bist_done,
  output bist_state_t ts
);

  localparam int unsigned CNT_W = $clog2(NPAT + 1);

  logic [CNT_W-1:0] pat_cnt;
  logic             settle;       // multiplexer already carries test side
  ssel_t            slave_cnt;    // pattern number mod N_SLAVES

  always_ff @(posedge clk) begin
    if (rst) begin
      ts         <= TS_IDLE;
      pat_cnt    <= '0;
      poly_sel_q <= 1'b0;
      settle     <= 1'b0;
      slave_cnt  <= '0;
    end else begin
      settle <= (ts == TS_RESET);
      unique case (ts)
        TS_IDLE:
          if (bist_start && !t_sel) begin
            ts         <= TS_RESET;
            poly_sel_q <= poly_sel;
            pat_cnt    <= '0;
            slave_cnt  <= '0;
          end
        TS_RESET:   if (settle && cut_ready) ts <= TS_APPLY;
        TS_APPLY:   ts <= TS_WAIT;
        TS_WAIT:    if (cut_done) ts <= TS_NEXT;
        TS_NEXT: begin
          pat_cnt   <= pat_cnt + 1'b1;
          slave_cnt <= (slave_cnt == SSEL_W'(N_SLAVES - 1)) ? '0 : slave_cnt + 1'b1;
          ts      <= (pat_cnt == CNT_W'(NPAT - 1)) ? TS_COMPARE : TS_APPLY;
        end
        TS_COMPARE: ts <= TS_DONE;
        TS_DONE:    if (!bist_start) ts <= TS_IDLE;
        default:    ts <= TS_IDLE;
      endcase
    end
  end

  always_comb begin
    mux_sel   = (ts == TS_IDLE) || (ts == TS_DONE);
    t_rst     = (ts == TS_RESET);
    lfsr_en   = (ts == TS_NEXT);
    test_we   = (ts == TS_APPLY);
    test_re   = (ts == TS_APPLY);
    test_addr = addr_t'(pat_cnt);
    test_ssel = slave_cnt;
    sisr_gate = (ts == TS_APPLY) || (ts == TS_WAIT);
    cmp_valid = (ts == TS_COMPARE);
    bist_done = (ts == TS_DONE);
  end

  // A test request is only issued while the SPI module is idle.
  a_req_when_ready: assert property (@(posedge clk) disable iff (rst)
                                     test_we |-> cut_ready);

endmodule
