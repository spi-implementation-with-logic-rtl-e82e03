# SPI link with logic built-in self-test

This design is a four-wire SPI link (a master and one or more addressed
slaves) that can test itself. In normal mode it is an ordinary SPI peripheral path:
a word written to a slave address can be read back from it. In test mode
an on-chip LFSR generates 255 pseudo-random words, each word is written
through the SPI link into the slave and read back over MISO, and every
returned bit is folded into a serial-input signature register (SISR). At
the end the signature is compared with a golden signature held in a ROM,
and a single Good/Bad flag says whether the SPI logic behaved exactly as a
fault-free copy would. No external tester is needed beyond a start pin and
the Good/Bad pin.

```
 Test Control (bist_start, t_sel, poly_sel)
        |
        v
  +-----------------+--------------------------------+-----------+
  | BIST controller |---------------+                |           |
  +-----------------+               |                v           v
     |        |                     |          +-----------+  +-----+
     v        v                     v          | SISR      |  | ROM |
  +------+  +-----+   +---------------------+  | response  |  +-----+
  | LFSR |->| MUX |-->| SPI CUT             |->| analyzer  |     |
  +------+  +-----+   | master --CS-------> |  +-----------+     v
   PI ------->^       |        --SCLK-----> slave  |         +-------+
                      |        --MOSI-----> (64x8) +-------->|  =    |--> Good/Bad
                      |        <-MISO------        |         +-------+
                      +---------------------+
                                 |
                                 v  PO (data_out)
```

## Files

| file | module | role |
|---|---|---|
| `rtl/bist_spi_pkg.sv` | package | sizes, request struct, controller state enum, reference functions for the LFSR, the SISR, the slave response and the golden signature |
| `rtl/bist_spi_top.sv` | `bist_spi_top` | the whole design |
| `rtl/bist_controller.sv` | `bist_controller` | mode control and test sequencing |
| `rtl/lfsr.sv` | `lfsr` | test pattern generator |
| `rtl/test_mux.sv` | `test_mux` | registered normal/test input multiplexer |
| `rtl/spi_cut.sv` | `spi_cut` | the circuit under test: master + slaves |
| `rtl/spi_master.sv` | `spi_master` | SPI master with clock generator and one chip select per slave |
| `rtl/spi_slave.sv` | `spi_slave` | addressed SPI slave with register file |
| `rtl/sisr.sv` | `sisr` | response compactor |
| `rtl/golden_rom.sv` | `golden_rom` | golden signatures |
| `rtl/comparator.sv` | `comparator` | signature comparison, error flag |

Each testbench `tb/tb_<module>.sv` checks one module; `tb/spi_slave_bfm.sv`
is a behavioural slave used only to test the master alone.

## The circuit under test: the SPI link

**Wires.** CS (active low, `cs_n`), SCLK, MOSI, MISO; one master and
`N_SLAVES` slaves (default 1). Both sides run on the system clock `clk`. The master makes SCLK by
dividing `clk`: one SCLK half period is `SCLK_HALF` clocks (default 2, so
SCLK = clk/4). The slave finds SCLK edges by comparing SCLK with its value
one clock earlier, which is why `SCLK_HALF` must be at least 2.

**Clock modes.** `CPOL` and `CPHA` are parameters of the master, slave,
`spi_cut` and top, and all four modes work (default mode 0). With CPHA = 0
data is sampled on the leading SCLK edge and changed on the trailing one;
with CPHA = 1 it is the other way round.

**Several slaves.** With `N_SLAVES` > 1 the slaves share SCLK, MOSI and
MISO and each has its own chip select, `cs_n[i]`. The 4-bit `ssel` of a
request picks the slave (up to 16). Each slave may use its own mode: bit i
of `SLAVE_CPOL` / `SLAVE_CPHA` (by default every bit is `CPOL` / `CPHA`).
The master switches to the addressed slave's mode for every request. When
the polarity changes, it first moves SCLK to the new idle level and waits
`SCLK_HALF` clocks before the chip select falls, so no slave sees a false
edge. A slave that is not selected drives MISO low, and the shared MISO is
the OR of all slaves' outputs.

**Frame.** 16 bits, most significant bit first:

| bits | content |
|---|---|
| 15 | rw: 0 write, 1 read |
| 14 | 0 |
| 13:8 | address (6 bits) |
| 7:0 | data: driven by the master on MOSI for a write, by the slave on MISO for a read |

During a write MISO stays low; during a read the command byte goes out on
MOSI and the slave answers in the second byte.

**The slave's "shift".** The slave holds 64 words of 8 bits (cleared by
reset). A write stores the data byte. A read returns the stored word
**shifted right by one place, zero into the MSB**: 01010010 written reads
back as 00101001, 10101010 as 01010101. This one-place shift is the
behaviour the published simulation of the original design shows, and it is
the function that the BIST checks. It is set by `SLAVE_SHIFT` in the
package.

**Requests.** `we`/`re` are one-clock strobes with `ssel`, `waddr`,
`raddr`, `data_in`, given while `ready` is high. With both strobes set, the write is
done first and then the read, so writing and reading the same address in
one request returns the written word shifted once. `rdwr_done` pulses when
the request is finished and `data_out` then holds the read word.

**Timing.** A frame occupies (2·16 + 2)·`SCLK_HALF` clocks including the
CS-high gap: 68 clocks at the default. A write-and-read request therefore
takes 136 clocks from the clock that accepts it to `rdwr_done`, plus
`SCLK_HALF` when SCLK must first change its idle level for another slave.

## Self-test

### Modes

`t_sel` selects the mode: **1 = normal, 0 = test**. In normal mode the
primary inputs (`we`, `re`, `ssel`, `waddr`, `raddr`, `data_in`) reach the SPI link
through the multiplexer register (one clock of latency) and `data_out` is
the primary output. Raising `bist_start` while `t_sel = 0` starts a test
session; `bist_start` in normal mode does nothing. The polarity is the one
the original design's waveforms show; its prose states the opposite
(0 = normal), so a user of the original description should check which one
they expect.

### A test session, clock by clock

The controller (`bist_controller`, state on `ts[2:0]`) runs:

| state | what happens |
|---|---|
| IDLE | normal mode, multiplexer on primary inputs |
| RESET | multiplexer switched to test side; `t_rst` seeds the LFSR with 8'h01 and clears the SISR; stays at least two clocks (a normal request may still sit in the multiplexer register) and until the SPI link is idle |
| APPLY | one write-and-read request: data = current LFSR word, both addresses = pattern number mod 64, slave = pattern number mod `N_SLAVES` |
| WAIT | until `rdwr_done`; each read-data bit the master samples from MISO is shifted into the SISR |
| NEXT | LFSR steps; after 255 patterns go to COMPARE, otherwise APPLY |
| COMPARE | one `valid_in` pulse: SISR signature against the ROM entry |
| DONE | `bist_done` high, `er`/`good_bad` valid; held until `bist_start` falls |

Each pattern costs 140 clocks at the default settings (136 for the two SPI
frames, plus APPLY, the multiplexer register, the clock that sees
`rdwr_done`, and NEXT). A full session takes 3 + 255·140 = 35,703 clocks.
With several slaves whose polarities differ, add `SCLK_HALF` clocks for
each pattern whose slave has a different CPOL from the one before.

`poly_sel` is sampled when the session starts and picks both the LFSR
polynomial and the ROM entry, so a session with the second polynomial is
compared with its own golden signature.

### Pattern generator

An 8-bit shift register moving left; the new bit 0 is the **XNOR** of bits
7, 5, 4 and 3 (x^8 + x^6 + x^5 + x^4 + 1). From seed 01 it gives
01, 03, 07, 0F, 1E, 3D, 7A, F4, E8, ... and returns to 01 after 255 steps;
all-ones is the one unreachable (lock-up) state. With `poly_sel = 1` the
taps are bits 7, 5, 4, 2 (x^8 + x^6 + x^5 + x^3 + 1), also maximal length.
The first polynomial reproduces the original design's LFSR waveform; the
second one is this design's choice, since the original only says another
polynomial was used.

### Response compaction and the golden signature

The SISR shifts left and takes, at bit 0, the XOR of the incoming bit and
bits 15, 13, 12, 10 (x^16 + x^14 + x^13 + x^11 + 1). Only the bits the
master samples in the data byte of read frames enter it: 8 per pattern,
2040 per session.

The signature is **16 bits**, although the original comparator waveform
shows 8-bit values. With an 8-bit maximal-length SISR
(x^8 + x^4 + x^3 + x^2 + 1) the 2040 response bits of a full session
compact to zero for both polynomials, so an 8-bit signature could not tell
a good circuit from many bad ones. At 16 bits the chance that a faulty
response stream gives the golden signature is about 2^-16.

The ROM does not hold typed-in numbers. `golden_rom` computes its two
entries at elaboration with `bist_spi_pkg::golden_signature`: run the
LFSR from the seed for `NPAT` patterns, take each pattern shifted right by
one (the fault-free slave's answer) and feed its bits MSB first into the
SISR model. Changing the polynomials, seed or pattern count therefore
keeps the ROM consistent.

The comparator registers `er = (golden != signature)` one clock after
`valid_in` and holds it; `good_bad = ~er`, meaningful while `bist_done` is
high.

### What a session does and does not cover

Each pattern exercises the master's command and data shifting, the
SCLK/CS generation, the slave's command decode, a register-file write and
read at one of the 64 addresses and the response shift. With several
slaves the patterns take turns over them, so every slave, every chip
select and every mode change is exercised; since all slaves behave alike,
the golden signature does not depend on `N_SLAVES`. Faults that only
affect normal-mode paths (the primary-input side of the multiplexer) are
not covered. A session overwrites the slaves' register files: afterwards
each address holds the last test pattern written to it.

## Top-level interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `bist_start` | in | 1 | start a session (with `t_sel = 0`); release to leave DONE |
| `t_sel` | in | 1 | 1 normal mode, 0 test mode |
| `poly_sel` | in | 1 | LFSR polynomial / golden entry for the next session |
| `bist_done`, `er`, `good_bad` | out | 1 | session finished; mismatch; 1 = Good |
| `ts` | out | 3 | controller state |
| `signature` | out | 16 | SISR contents |
| `lfsr_data`, `lfsr_done` | out | 8, 1 | current pattern; LFSR back at its seed |
| `we`, `re`, `ssel`, `waddr`, `raddr`, `data_in` | in | 1,1,4,6,6,8 | normal-mode request |
| `data_out`, `ready`, `rdwr_done` | out | 8,1,1 | read word; link idle; request finished |
| `sclk`, `cs_n`, `mosi`, `miso` | out | 1, `N_SLAVES`, 1, 1 | SPI wires, for observation |

Parameters of `bist_spi_top`: `CPOL` (0), `CPHA` (0), `SCLK_HALF` (2),
`NPAT` (255), `N_SLAVES` (1), `SLAVE_CPOL` and `SLAVE_CPHA` (every bit
`CPOL` / `CPHA`). Data width (8), address width (6), polynomials, seed and
SISR polynomial are constants in `bist_spi_pkg`.

## Relation to the original design

Follows the original: the block structure (controller, test generator,
multiplexer, SPI circuit under test, serial response analyzer, ROM,
comparator, Good/Bad), the four-wire SPI with selectable CPOL/CPHA, 8-bit
data and 6-bit addresses, the slave returning the written word shifted by
one place, the 8-bit XNOR LFSR with its pattern sequence and 255 patterns,
the second polynomial as a selectable option, a registered multiplexer,
one chip select per slave and a master that reconfigures its mode for each
slave,
the mode-select polarity of its waveforms, and the signal names where it
printed them.

This design's own choices, where the original says nothing: the SPI frame
format and chip-select polarity, the clock divider, write-before-read
ordering, the test procedure (write then read each pattern at address
pattern mod 64, slave pattern mod `N_SLAVES`), the way SCLK changes its
idle level between slaves, the shared MISO, compaction of read-data bits only, the controller's
states and handshake, the 16-bit SISR and its polynomial, the second
LFSR polynomial, computing the ROM contents, and reset behaviour
(synchronous, active high, register file cleared).

Not modelled: simultaneous transfers to several slaves (one frame at a
time), slaves on separate buses, and any speed figure: the original quotes up to 60 Mbps, which at SCLK = clk/4 would need
a 240 MHz system clock; no clock frequency is assumed here.

## Simulating

Every testbench is self-checking, prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/bist_spi_pkg.sv tb/tb_bist_spi_top.sv \
  --top-module tb_bist_spi_top
./obj_dir/Vtb_bist_spi_top
```

Replace `tb_bist_spi_top` with any other testbench name.

| testbench | what it shows |
|---|---|
| `tb_bist_spi_top` | full design at default parameters: normal requests against a model, an ignored start in normal mode, Good sessions with both polynomials with the signature equal to an independent model, exact session length, LFSR back at its seed, register-file contents after a session, and a Bad session with MISO forced stuck at 1; counts each of these and fails if one never happened |
| `tb_bist_spi_top_mode3` | full design with two slaves (mode 3 and mode 1), SCLK = clk/6 and 40-pattern sessions: normal requests to both slaves, Good with both polynomials, signatures and session length (with the SCLK level changes) against the model, SCLK at the slave's idle level whenever its chip select falls, 40 frames per slave |
| `tb_bist_controller` | sequencing against a model of the SPI handshake (three slaves): 255 requests at addresses 0, 1, 2, ... to slaves 0, 1, 2, 0, ..., 255 LFSR steps, one comparison, no request while busy, `poly_sel` latched |
| `tb_lfsr` | reset value, the printed start of the sequence, 255 distinct states per polynomial, `done`, hold |
| `tb_test_mux` | selection and one-clock latency |
| `tb_spi_cut`, `tb_spi_slave`, `tb_spi_master` | all four SPI modes; writes and reads against a register-file model; frame contents; response strobes; request latency; and (`tb_spi_cut`) three slaves in modes 0, 3 and 1 with random requests against one model per slave, one chip select at a time, SCLK level changes and their latency |
| `tb_sisr`, `tb_golden_rom`, `tb_comparator` | signatures against an independent model; single-bit errors change the signature; ROM contents; comparator timing and holding |

The full-design testbench runs three complete sessions and one faulty one
(about 150,000 clocks) in a few seconds.
