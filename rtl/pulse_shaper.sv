// pulse_shaper: half-sine pulse shaping of the OQPSK I and Q chip streams.
//
// Each chip lasts 2Tc on its channel and is shaped as A*sin(pi*t/(2Tc)),
// 0 <= t < 2Tc, positive for chip 1 and negative for chip 0. The block runs on
// the chip-half clock (period Tc) and produces SPS samples per channel per
// clock, as a parallel vector, for a DAC running SPS times faster. Sample m of
// the first Tc of a chip is A*sin(pi*(m+0.5)/(2*SPS)); the second Tc uses
// m + SPS. A = 2^(AMP_W-1) - 1; the table is computed at elaboration.
//
// The block follows the modulator's control: process_start clears a counter n
// of shift_en clocks. After n shifts the modulator shows I chip c(2k) for
// n = 2k+1 (first half) and 2k+2 (second half), and Q chip c(2k+1) for
// n = 2k+2 and 2k+3. Outside 1..N_CHIPS (I) and 2..N_CHIPS+1 (Q) a channel is
// idle and its samples are 0. Samples are registered: they appear one clock
// after the modulator output they belong to.
//
// The published design only names the half-sine pulse shaping stage; the
// sample rate, the amplitude format and this parallel-sample interface are
// choices of this design (the pulse shape is the one IEEE 802.15.4 defines).
module pulse_shaper #(
  parameter int unsigned N_CHIPS = 704,
  parameter int unsigned SPS     = 4,
  parameter int unsigned AMP_W   = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    process_start,
  input  logic                    shift_en,
  input  logic                    chip_i,
  input  logic                    chip_q,
  output logic signed [AMP_W-1:0] i_samples [SPS],
  output logic signed [AMP_W-1:0] q_samples [SPS]
);

  typedef logic signed [AMP_W-1:0] samp_t;
  typedef samp_t half_sine_t [2*SPS];

  localparam real PI = 3.14159265358979323846;

  function automatic half_sine_t make_half_sine();
    half_sine_t t;
    for (int m = 0; m < int'(2 * SPS); m++)
      t[m] = samp_t'($rtoi($sin(PI * (real'(m) + 0.5) / real'(2 * SPS))
                            * real'((1 << (AMP_W - 1)) - 1) + 0.5));
    return t;
  endfunction

  localparam half_sine_t HALF_SINE = make_half_sine();
  localparam int unsigned N_W = $clog2(N_CHIPS + 3);

  logic [N_W-1:0] n;
  logic           i_active, q_active;
  logic           i_second, q_second;   // in the second Tc of the chip

  always_ff @(posedge clk) begin
    if (rst || process_start) n <= '0;
    else if (shift_en && n != N_W'(N_CHIPS + 2)) n <= n + 1'b1;
  end

  assign i_active = (n >= N_W'(1)) && (n <= N_W'(N_CHIPS));
  assign q_active = (n >= N_W'(2)) && (n <= N_W'(N_CHIPS + 1));
  assign i_second = !n[0];
  assign q_second = n[0];

  always_ff @(posedge clk) begin
    for (int m = 0; m < int'(SPS); m++) begin
      if (rst || !i_active) i_samples[m] <= '0;
      else i_samples[m] <= chip_i ? HALF_SINE[int'(i_second) * SPS + m]
                                  : -HALF_SINE[int'(i_second) * SPS + m];
      if (rst || !q_active) q_samples[m] <= '0;
      else q_samples[m] <= chip_q ? HALF_SINE[int'(q_second) * SPS + m]
                                  : -HALF_SINE[int'(q_second) * SPS + m];
    end
  end

endmodule
