// spi_master: four-wire SPI master (CS, SCLK, MOSI, MISO) for the
// addressed SPI slaves of the circuit under test.
//
// How it works: a request is taken in the IDLE state. A write sends one
// frame, a read sends one frame and captures the reply, and a request with
// both strobes does the write first and then the read. A frame is CMD_W +
// DATA_W bits, most significant bit first: the command byte
// {rw, 1'b0, addr} (rw = 1 for read) and then the data byte, which the
// master drives on a write and the slave drives on MISO on a read. The
// master divides the system clock to make SCLK (one SCLK half period is
// SCLK_HALF clocks), holds the selected slave's chip select low for the
// whole frame and then high for SCLK_HALF clocks between frames.
//
// Slaves and clock modes: there is one active-low chip select per slave
// (N_SLAVES, default 1) and the request's ssel picks one. Each slave has
// its own clock polarity and phase (bit i of SLAVE_CPOL / SLAVE_CPHA, all
// four modes possible); the master reconfigures itself for every request.
// With CPHA = 0 data is sampled on the leading SCLK edge and changed on the
// trailing one, with CPHA = 1 the other way round. When the new slave's
// CPOL differs from the present SCLK level, SCLK is first moved to the new
// idle level and held for SCLK_HALF clocks before chip select falls, so no
// slave sees a false edge.
//
// Interface and timing:
//   we/re, ssel, waddr, raddr, data_in   request, taken when ready is high
//   rdwr_done    one-clock pulse when the whole request has finished;
//                data_out is valid from then on after a read
//   resp_valid   one-clock strobe for every read-data bit sampled from
//                MISO, resp_bit is that bit (feeds the signature register)
// One frame takes 2 * SCLK_HALF * (CMD_W + DATA_W + 1) clocks, the
// SCLK_HALF gap included, plus SCLK_HALF when SCLK has to change its idle
// level first.
// SCLK_HALF must be at least 2 because the slaves work on the same system
// clock and see each SCLK edge one clock late.
// The four wires, the master clock generator, full duplex shifting, one
// chip select per slave and per-slave CPOL/CPHA follow the original
// design; the frame layout, the clock divider and the write-before-read
// order are this design's own.
module spi_master
  import bist_spi_pkg::*;
#(
  parameter bit                   CPOL       = 1'b0,
  parameter bit                   CPHA       = 1'b0,
  parameter int unsigned          SCLK_HALF  = 2,
  parameter int unsigned          N_SLAVES   = 1,
  parameter logic [N_SLAVES-1:0]  SLAVE_CPOL = {N_SLAVES{CPOL}},
  parameter logic [N_SLAVES-1:0]  SLAVE_CPHA = {N_SLAVES{CPHA}}
) (
  input  logic                clk,
  input  logic                rst,
  // request side
  input  logic                we,
  input  logic                re,
  input  ssel_t               ssel,
  input  addr_t               waddr,
  input  addr_t               raddr,
  input  data_t               data_in,
  output logic                ready,
  output data_t               data_out,
  output logic                rdwr_done,
  output logic                resp_valid,
  output logic                resp_bit,
  // SPI bus
  output logic                sclk,
  output logic [N_SLAVES-1:0] cs_n,
  output logic                mosi,
  input  logic                miso
);

  localparam int unsigned FRAME = CMD_W + DATA_W;
  localparam int unsigned EDGES = 2 * FRAME;
  localparam int unsigned DIV_W = $clog2(SCLK_HALF + 1);
  localparam int unsigned EDG_W = $clog2(EDGES + 1);

  typedef enum logic [1:0] {M_IDLE, M_SETUP, M_XFER, M_GAP} mstate_t;

  mstate_t          state;
  logic [DIV_W-1:0] div;
  logic [EDG_W-1:0] edge_cnt;     // SCLK edges produced in this frame
  logic [FRAME-1:0] tx_sr;
  data_t            rx_sr;        // last DATA_W bits from MISO
  logic             is_read;      // current frame is a read
  logic             pend_rd;      // a read follows the current write
  addr_t            rd_addr;
  ssel_t            ssel_q;       // slave of the current request
  logic             cpol_q;       // mode of the current request
  logic             cpha_q;
  logic             cs_act;       // chip select of ssel_q asserted

  logic half_tick, leading, sample_e, shift_e;
  logic new_cpol, new_cpha;

  assign half_tick = (div == DIV_W'(SCLK_HALF - 1));
  assign leading   = ~edge_cnt[0];
  assign sample_e  = cpha_q ? ~leading : leading;
  assign shift_e   = cpha_q ? (leading && edge_cnt != '0) : ~leading;

  assign mosi  = tx_sr[FRAME-1];
  assign ready = (state == M_IDLE);

  // Mode of the requested slave, and the chip select of the current one.
  always_comb begin
    new_cpol = SLAVE_CPOL[0];
    new_cpha = SLAVE_CPHA[0];
    cs_n     = '1;
    for (int i = 0; i < N_SLAVES; i++) begin
      if (ssel == SSEL_W'(i)) begin
        new_cpol = SLAVE_CPOL[i];
        new_cpha = SLAVE_CPHA[i];
      end
      if (cs_act && ssel_q == SSEL_W'(i)) cs_n[i] = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= M_IDLE;
      div        <= '0;
      edge_cnt   <= '0;
      tx_sr      <= '0;
      rx_sr      <= '0;
      is_read    <= 1'b0;
      pend_rd    <= 1'b0;
      rd_addr    <= '0;
      ssel_q     <= '0;
      cpol_q     <= SLAVE_CPOL[0];
      cpha_q     <= SLAVE_CPHA[0];
      cs_act     <= 1'b0;
      data_out   <= '0;
      rdwr_done  <= 1'b0;
      resp_valid <= 1'b0;
      resp_bit   <= 1'b0;
      sclk       <= SLAVE_CPOL[0];
    end else begin
      rdwr_done  <= 1'b0;
      resp_valid <= 1'b0;
      unique case (state)
        M_IDLE: begin
          div      <= '0;
          edge_cnt <= '0;
          if (we || re) begin
            ssel_q  <= ssel;
            cpol_q  <= new_cpol;
            cpha_q  <= new_cpha;
            pend_rd <= we && re;
            rd_addr <= raddr;
            is_read <= !we;
            if (we) tx_sr <= {1'b0, 1'b0, (CMD_W-2)'(waddr), data_in};
            else    tx_sr <= {1'b1, 1'b0, (CMD_W-2)'(raddr), DATA_W'(0)};
            if (sclk != new_cpol) begin
              // move SCLK to the new idle level before selecting the slave
              sclk  <= new_cpol;
              state <= M_SETUP;
            end else begin
              cs_act <= 1'b1;
              state  <= M_XFER;
            end
          end
        end

        M_SETUP: begin
          div <= half_tick ? '0 : div + 1'b1;
          if (half_tick) begin
            cs_act <= 1'b1;
            state  <= M_XFER;
          end
        end

        M_XFER: begin
          div <= half_tick ? '0 : div + 1'b1;
          if (half_tick) begin
            if (edge_cnt == EDG_W'(EDGES)) begin
              // last edge was half a period ago: end the frame
              cs_act <= 1'b0;
              state  <= M_GAP;
              if (is_read) data_out <= rx_sr;
            end else begin
              sclk     <= ~sclk;
              edge_cnt <= edge_cnt + 1'b1;
              if (sample_e) begin
                rx_sr <= {rx_sr[DATA_W-2:0], miso};
                if (is_read && (edge_cnt >> 1) >= EDG_W'(CMD_W)) begin
                  resp_valid <= 1'b1;
                  resp_bit   <= miso;
                end
              end
              if (shift_e) tx_sr <= {tx_sr[FRAME-2:0], 1'b0};
            end
          end
        end

        M_GAP: begin
          div <= half_tick ? '0 : div + 1'b1;
          if (half_tick) begin
            edge_cnt <= '0;
            if (pend_rd) begin
              tx_sr   <= {1'b1, 1'b0, (CMD_W-2)'(rd_addr), DATA_W'(0)};
              is_read <= 1'b1;
              pend_rd <= 1'b0;
              cs_act  <= 1'b1;
              state   <= M_XFER;
            end else begin
              rdwr_done <= 1'b1;
              state     <= M_IDLE;
            end
          end
        end

        default: state <= M_IDLE;
      endcase
    end
  end

  // Requests are only given while the master is idle, to an existing slave.
  a_req_when_ready: assert property (@(posedge clk) disable iff (rst)
                                     (we || re) |-> ready);
  a_ssel_range: assert property (@(posedge clk) disable iff (rst)
                                 (we || re) |-> (ssel < SSEL_W'(N_SLAVES)));

  // SCLK stays at its idle level and no slave is selected between requests.
  a_sclk_idle: assert property (@(posedge clk) disable iff (rst)
                                (state == M_IDLE) |-> (sclk == cpol_q && &cs_n));

  initial begin
    assert (SCLK_HALF >= 2)
      else $error("spi_master: SCLK_HALF must be at least 2");
    assert (N_SLAVES >= 1 && N_SLAVES <= 2 ** SSEL_W)
      else $error("spi_master: N_SLAVES out of range");
  end

endmodule
