// oqpsk_modulator: offset-QPSK chip modulator of the Zigbee transmitter.
//
// One frame of N_CHIPS chips (704 for the 88-bit acknowledgement frame) is
// shifted in serially on data_in while load_mod is high, chip c0 first. A
// process_start cycle then splits the frame: even-indexed chips go to the
// I-phase output register and odd-indexed chips to the Q-phase output register.
// While shift_en is high both registers shift by one position per clock and
// their low bits drive data_out[0] (I) and data_out[1] (Q).
//
// The clock period is Tc, the chip period (500 ns at 2 MHz). Each I or Q chip
// lasts 2Tc on its output, so every chip is written twice into its output
// register, and the Q register holds one extra leading zero so that Q lags I by
// exactly Tc. With N_CHIPS = 704 each output register is 706 bits wide:
//   I register: 0, c0, c0, c2, c2, ..., c702, c702, 0
//   Q register: 0, 0, c1, c1, c3, c3, ..., c703, c703
// Counting shift_en clocks after process_start, I carries chip c(2k) during
// shifts 2k+1 and 2k+2 and Q carries chip c(2k+1) during shifts 2k+2 and 2k+3,
// so the frame occupies N_CHIPS + 1 clocks (352.5 us at 2 MHz). Zeros shift in
// behind, so data_out returns to 0 afterwards.
//
// Control priority: reset_mod clears all registers (synchronous, active high);
// load_mod shifts the input register; process_start reloads the output
// registers from the input register as it will be after this clock (so the
// last chip may arrive in the same cycle) and overrides shift_en. shift_en may
// stay high during loading: the output registers then shift zeros.
//
// The port list, the 704-chip input register, the two 706-bit output
// registers, the even/odd split and the Tc offset follow the published design;
// the reset style, the control priority and the same-cycle transfer are this
// design's own choices.
module oqpsk_modulator #(
  parameter int unsigned N_CHIPS = 704
) (
  input  logic       clk,
  input  logic       reset_mod,
  input  logic       load_mod,
  input  logic       data_in,
  input  logic       process_start,
  input  logic       shift_en,
  output logic [1:0] data_out
);

  localparam int unsigned N_PHASE = N_CHIPS / 2;      // chips per phase (352)
  localparam int unsigned OUT_W   = 2 * N_PHASE + 2;  // output register width (706)

  logic [N_CHIPS-1:0] chips_q, chips_d;   // chips_q[k] = chip c(k) after a full load
  logic [OUT_W-1:0]   i_reg, q_reg;
  logic [OUT_W-1:0]   i_split, q_split;

  // Serial load: a new chip enters at the top, so the first chip ends at bit 0.
  always_comb begin
    chips_d = chips_q;
    if (load_mod) chips_d = {data_in, chips_q[N_CHIPS-1:1]};
  end

  // Even/odd split with each chip doubled to last 2Tc.
  always_comb begin
    i_split = '0;
    q_split = '0;
    for (int k = 0; k < int'(N_PHASE); k++) begin
      i_split[2*k+1] = chips_d[2*k];
      i_split[2*k+2] = chips_d[2*k];
      q_split[2*k+2] = chips_d[2*k+1];
      q_split[2*k+3] = chips_d[2*k+1];
    end
  end

  always_ff @(posedge clk) begin
    if (reset_mod) begin
      chips_q <= '0;
      i_reg   <= '0;
      q_reg   <= '0;
    end else begin
      chips_q <= chips_d;
      if (process_start) begin
        i_reg <= i_split;
        q_reg <= q_split;
      end else if (shift_en) begin
        i_reg <= {1'b0, i_reg[OUT_W-1:1]};
        q_reg <= {1'b0, q_reg[OUT_W-1:1]};
      end
    end
  end

  assign data_out = {q_reg[0], i_reg[0]};

  initial begin
    assert (N_CHIPS >= 2 && N_CHIPS % 2 == 0)
      else $error("oqpsk_modulator: N_CHIPS must be even and at least 2");
  end

endmodule
