# Zigbee OQPSK transmitter: frame-buffered offset-QPSK modulator

IEEE 802.15.4 (Zigbee) in the 2.4 GHz band spreads every 4 data bits into a
32-chip pseudo-noise sequence and sends the chips with offset QPSK (OQPSK):
even-numbered chips go on the in-phase (I) channel, odd-numbered chips on the
quadrature (Q) channel, each chip lasts two chip periods (2Tc), and Q runs one
chip period (Tc) behind I. That offset means I and Q never change at the same
instant, so the carrier phase never jumps by 180 degrees.

This RTL implements the digital part of such a transmitter for one frame type,
the MAC acknowledgement frame. Its centrepiece is a modulator that does not
interleave chips on the fly. It buffers a whole frame, 704 chips, in a shift
register. It then splits the frame into I and Q registers that already hold the
output waveform, one register bit per Tc. After that, producing OQPSK is only a
matter of shifting both registers once per clock.

```
 PPDU header bits (72)                                               to a DAC
 ──► crc_fcs ──► bit_to_symbol ──► symbol_to_chip ──► oqpsk_modulator ──► pulse_shaper ──►
     +16 FCS      4 bits/symbol     32 chips/symbol     I/Q, Q lags Tc      half-sine
     (88 bits)    (22 symbols)      (704 chips)         data_out[1:0]       SPS samples/Tc
```

Everything runs on one clock whose period is Tc: 2 MHz, 500 ns, the nominal
2 Mchip/s chip rate.

## The acknowledgement frame

| field            | bits | value, in transmission order        |
|------------------|-----:|-------------------------------------|
| preamble         |   32 | all 0                               |
| SFD              |    8 | 1110 0101                           |
| PHR (length = 5) |    8 | 1010 0000                           |
| frame control    |   16 | 0100 0100 0000 0000                 |
| sequence number  |    8 | e.g. 1000 0000                      |
| FCS              |   16 | CRC-16 of frame control + sequence number |

That is 88 bits, i.e. 22 symbols and 704 chips. Each field is written least
significant bit first. With sequence number 1000 0000 the FCS is 0xA70A,
sent as 0101 0000 1110 0101.

## Modulator (`oqpsk_modulator`)

Ports: `clk`, `reset_mod`, `load_mod`, `data_in`, `process_start`, `shift_en`,
and `data_out[1:0]`, where bit 0 is I and bit 1 is Q. The parameter is
`N_CHIPS = 704`.

Storage is three registers, 2115 flip-flops after synthesis:

* input register, 704 bits. While `load_mod` is high, one chip per clock
  enters from `data_in`, frame chip c0 first.
* I register, 706 bits: `0, c0, c0, c2, c2, ..., c702, c702, 0`
* Q register, 706 bits: `0, 0, c1, c1, c3, c3, ..., c703, c703`

A `process_start` clock fills the I and Q registers from the input register in
one step. Each chip is written twice, so it lasts 2Tc once shifted out. Q has
one more leading zero than I, which gives the Tc offset. While `shift_en` is
high, both registers shift by one bit per clock. `data_out` is their lowest bit.

Counting the `shift_en` clocks after `process_start` as n = 1, 2, ...:

| n       | 1  | 2  | 3  | 4  | 5  | ... | 704  | 705  | 706 |
|---------|----|----|----|----|----|-----|------|------|-----|
| I (bit 0) | c0 | c0 | c2 | c2 | c4 | ... | c702 | 0    | 0   |
| Q (bit 1) | 0  | c1 | c1 | c3 | c3 | ... | c703 | c703 | 0   |

A frame therefore occupies 705 clocks, which is 352.5 us at 2 MHz. For the
preamble (symbol 0, chips 1101 1001 1100 0011 ...), the `data_out` values for
n = 1..16 are 1,3,2,2,3,1,0,2,3,3,2,0,0,0,1,3.

Control rules. These are this implementation's reading of the control pins,
not a documented protocol:

* `reset_mod` clears all three registers. It is synchronous and active high.
* `process_start` takes the input register as it will be after the current
  clock. `load_mod` can therefore fall in the same clock as `process_start`.
  `process_start` may also be held high through the whole load: the output
  registers keep following the input register, and `data_out` stays 0.
* `process_start` overrides `shift_en`. `shift_en` may stay high all the time,
  because before a frame the output registers only shift zeros.
* Dropping `shift_en` mid-frame freezes `data_out`. Shifting resumes where it
  stopped.
* After the frame, zeros shift in, so `data_out` returns to 0.

I and Q stay separate bits on `data_out`, and both shift out at the same
time, with Q one clock behind. Adding the two channels onto a carrier happens
after the DAC, in the analog stages.

## Front end: FCS, symbols, chips

Each stage passes data on with a valid/ready handshake, so a slow or stalling
source is harmless.

* `crc_fcs` passes the 72 header bits straight through (combinationally). Over
  the 24 MHR bits it runs the IEEE 802.15.4 CRC: G(x) = x^16 + x^12 + x^5 + 1,
  register starting at 0, bit-serial in its reflected form
  `fb = crc[0]^bit; crc = (crc>>1) ^ (fb ? 0x8408 : 0)`. It then sends the 16
  FCS bits, register bit 0 first. While the FCS goes out, the block holds its
  input off.
* `bit_to_symbol` packs 4 bits into a symbol, first bit as the least
  significant bit. For example, bits 1,0,0,0 give symbol 1.
* `symbol_to_chip` sends each symbol's 32-chip sequence, c0 first, one chip per
  clock. Back-to-back symbols give a gap-free chip stream. The table lives in
  `zigbee_pkg::chip_sequence`. It has a simple structure:
  * symbols 1 to 7 are symbol 0 rotated right by 4 chips per step;
  * symbols 8 to 15 are symbols 0 to 7 with every odd chip inverted.

  Symbol 0 is 11011001110000110101001000101110.

The front end is rate-limited by the spreader: 4 bits per 32 clocks. A frame
loads into the modulator in 704 consecutive clocks (352 us) if the bit source
keeps `ppdu_valid` high.

## Pulse shaper (`pulse_shaper`)

This stage turns every 2Tc chip into a half-sine pulse,
A*sin(pi*t/(2Tc)). The pulse is positive for chip 1 and negative for chip 0.
The shaper runs on the Tc clock and outputs `SPS` samples per channel per clock
as a parallel vector, meant for a DAC running SPS times faster (8 Msample/s at
the default SPS = 4).

* Sample m of a chip's first Tc is A*sin(pi*(m+0.5)/(2*SPS)), with
  A = 2^(AMP_W-1) - 1. Samples of the second Tc continue the same curve.
* With SPS = 4 and AMP_W = 8 the eight values are 25, 71, 106, 125, 125, 106,
  71, 25. They are computed at elaboration with `$sin`.
* The shaper works out which half of a chip is on the output by counting
  `shift_en` clocks from `process_start`: an I chip starts at odd counts, a Q
  chip at even counts.
* Outside a channel's chip window the samples are 0.
* Samples appear one clock after the `data_out` value they belong to.

## Top level (`zigbee_tx_top`)

The top wires the chain together. The chip stream's valid drives the
modulator's `load_mod`. `process_start` and `shift_en` stay top-level inputs,
as in the bench setup the modulator was designed for, where a pattern generator
drove them. The top brings `load_mod` and `chip` out so that an external
controller can count 704 loaded chips, then pulse `process_start` and raise
`shift_en`.

The DAC and the RF stage are not part of this RTL. `i_samples` and `q_samples`
are where they would connect.

Parameters: `N_CHIPS` (704), `SPS` (4) and `AMP_W` (8). All logic uses
synchronous, active-high reset `rst`.

## What follows the published design and what does not

Taken from the published modulator:

* the port list and clock;
* the 704 / 706 / 706 register sizes;
* the even/odd split and the 2Tc chip time;
* the Tc offset and the 352.5 us frame time;
* the frame contents and the chip table.

The synthesized flip-flop count, 2115, equals the count reported for the FPGA
implementation.

This design's own choices:

* the exact behaviour of `process_start`, the reset style, and the control
  priority;
* the CRC polynomial and bit order. The published design calls only for "a CRC
  over the MHR"; these come from IEEE 802.15.4.
* the valid/ready handshakes between the front-end stages;
* everything about the pulse shaper beyond "half-sine": its sample rate,
  sample width, polarity and interface.

Not covered:

* other frame types and frame lengths. The CRC block's field sizes are
  parameters, but the modulator buffers exactly `N_CHIPS` chips per frame;
* the DAC and the RF front end.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_oqpsk_modulator`, at full size:
  * the 16-value preamble pattern above;
  * every output clock of two frames against an index model;
  * the 352 500 ns frame time at a 500 ns clock;
  * `process_start` held through the load, a `shift_en` pause, and a reset
    mid-load.
* `tb_crc_fcs`: 20 frames with random stalls on both sides. It checks the
  pass-through and the FCS against a separately written, non-reflected CRC.
  That reference itself is checked against the CRC-16/KERMIT check value
  0x2189 and against 0xA70A.
* `tb_bit_to_symbol`: bit order, full rate, and back-pressure.
* `tb_symbol_to_chip`: all 16 symbols and 200 random symbols against the
  rotate/invert rule, plus printed table rows. It also checks that back-to-back
  symbols take exactly 32 clocks each.
* `tb_pulse_shaper`: every sample of two frames against the literal half-sine
  values.
* `tb_zigbee_tx_top`: the whole chain at default parameters, for two frames.
  It checks the loaded chips, `data_out`, and all samples against a model built
  independently from the header bits. It also checks the 704-clock load and the
  705-clock output, and counts that input back-pressure, FCS insertion, the
  I/Q split, the Q offset, a shift pause and a held `process_start` each occur.

Running one test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/zigbee_pkg.sv tb/tb_zigbee_tx_top.sv --top-module tb_zigbee_tx_top
./obj_dir/Vtb_zigbee_tx_top
```

Replace the testbench name to run another one. All tests finish in well under a
second.
