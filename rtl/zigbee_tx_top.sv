// zigbee_tx_top: digital part of a 2.4 GHz Zigbee (IEEE 802.15.4) transmitter.
//
// Chain, one clock of period Tc (500 ns at 2 MHz):
//   PPDU bits -> crc_fcs -> bit_to_symbol -> symbol_to_chip -> oqpsk_modulator
//             -> pulse_shaper -> samples for a DAC
// The 72 header bits of an acknowledgement frame (preamble, SFD, PHR, MHR) enter
// on ppdu_bit with a valid/ready handshake. crc_fcs appends the 16-bit FCS,
// bit_to_symbol packs 4 bits per symbol and symbol_to_chip spreads each symbol
// to 32 chips, one chip per clock. Every chip is written into the modulator at
// once: load_mod is the chip stream's valid, so 88 bits give 704 chips in 704
// load cycles (possibly with gaps if the bit source is slow).
//
// As in the published design, the modulator's process_start and shift_en come
// from outside; load_mod and the chip are brought out so a controller can count
// the 704 loaded chips before it pulses process_start and then holds shift_en.
// The I and Q chips (data_out[0], data_out[1]) and the shaped samples are
// outputs; the DAC and RF stage that follow are not part of this RTL.
// rst is synchronous, active high, and is the modulator's reset_mod.
// Timing: the first I chip shows one clock after the first shift_en clock that
// follows process_start, the frame takes N_CHIPS+1 clocks on data_out, and the
// samples lag data_out by one clock.
module zigbee_tx_top
  import zigbee_pkg::*;
#(
  parameter int unsigned N_CHIPS = ACK_FRAME_CHIPS,   // 704
  parameter int unsigned SPS     = 4,
  parameter int unsigned AMP_W   = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ppdu_bit,
  input  logic                    ppdu_valid,
  output logic                    ppdu_ready,
  input  logic                    process_start,
  input  logic                    shift_en,
  output logic                    load_mod,
  output logic                    chip,
  output logic [1:0]              data_out,
  output logic signed [AMP_W-1:0] i_samples [SPS],
  output logic signed [AMP_W-1:0] q_samples [SPS]
);

  logic    fcs_bit, fcs_valid, fcs_ready;
  symbol_t sym;
  logic    sym_valid, sym_ready;

  crc_fcs u_crc (
    .clk, .rst,
    .in_bit   (ppdu_bit),
    .in_valid (ppdu_valid),
    .in_ready (ppdu_ready),
    .out_bit  (fcs_bit),
    .out_valid(fcs_valid),
    .out_ready(fcs_ready)
  );

  bit_to_symbol u_b2s (
    .clk, .rst,
    .in_bit   (fcs_bit),
    .in_valid (fcs_valid),
    .in_ready (fcs_ready),
    .sym, .sym_valid, .sym_ready
  );

  symbol_to_chip u_s2c (
    .clk, .rst,
    .sym, .sym_valid, .sym_ready,
    .chip,
    .chip_valid(load_mod),
    .chip_ready(1'b1)
  );

  oqpsk_modulator #(.N_CHIPS(N_CHIPS)) u_mod (
    .clk,
    .reset_mod(rst),
    .load_mod,
    .data_in  (chip),
    .process_start,
    .shift_en,
    .data_out
  );

  pulse_shaper #(.N_CHIPS(N_CHIPS), .SPS(SPS), .AMP_W(AMP_W)) u_ps (
    .clk, .rst,
    .process_start,
    .shift_en,
    .chip_i(data_out[0]),
    .chip_q(data_out[1]),
    .i_samples,
    .q_samples
  );

endmodule
