// tb_pulse_shaper: self-checking test of the half-sine pulse shaper at its
// default size (704 chips, 4 samples per Tc, 8-bit samples).
//
// Drives process_start, shift_en and random I/Q chip bits, and keeps its own
// count n of shifts since process_start. One clock after each input the
// samples must be +/-HS[h*4+m], with the half-sine values
// HS = 25, 71, 106, 125, 125, 106, 71, 25 (127*sin(pi*(m+0.5)/8)) written out
// here, h = 0 in the first Tc of a chip and 1 in the second (I: first Tc at
// odd n, Q: at even n), sign + for chip 1, and 0 outside the chip window
// (I: 1 <= n <= 704, Q: 2 <= n <= 705). Each channel must be active for 704
// clocks, plus 3 in the frame that pauses shift_en for 3 clocks.
module tb_pulse_shaper;

  localparam int unsigned N = 704;
  localparam int unsigned SPS = 4;
  localparam int HS [8] = '{25, 71, 106, 125, 125, 106, 71, 25};

  logic clk = 1'b0, rst, process_start, shift_en, chip_i, chip_q;
  logic signed [7:0] i_samples [SPS];
  logic signed [7:0] q_samples [SPS];
  int checks = 0, failures = 0;
  int i_active_cycles = 0, q_active_cycles = 0;

  pulse_shaper dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(1ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n = 0;
  int exp_i [SPS], exp_q [SPS];

  function automatic int shaped(bit active, bit second, logic chip, int m);
    int v;
    if (!active) return 0;
    v = HS[(second ? SPS : 0) + m];
    return chip ? v : -v;
  endfunction

  // One clock: compare last clock's expectation, apply new inputs at the
  // falling edge, predict the samples the next rising edge will produce.
  task automatic step(logic ps, logic sh);
    bit ia, qa;
    for (int m = 0; m < int'(SPS); m++) begin
      checks += 2;
      if (int'(i_samples[m]) != exp_i[m] || int'(q_samples[m]) != exp_q[m]) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d m=%0d: I %0d/%0d Q %0d/%0d", n, m, i_samples[m], exp_i[m],
                   q_samples[m], exp_q[m]);
      end
    end
    process_start = ps;
    shift_en      = sh;
    chip_i        = 1'($urandom);
    chip_q        = 1'($urandom);
    ia = (n >= 1 && n <= N);
    qa = (n >= 2 && n <= N + 1);
    if (ia) i_active_cycles++;
    if (qa) q_active_cycles++;
    for (int m = 0; m < int'(SPS); m++) begin
      exp_i[m] = shaped(ia, (n % 2) == 0, chip_i, m);
      exp_q[m] = shaped(qa, (n % 2) == 1, chip_q, m);
    end
    if (ps) n = 0;
    else if (sh && n != N + 2) n++;
    @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; process_start = 1'b0; shift_en = 1'b0; chip_i = 1'b0; chip_q = 1'b0;
    for (int m = 0; m < int'(SPS); m++) begin exp_i[m] = 0; exp_q[m] = 0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 2; f++) begin
      i_active_cycles = 0;
      q_active_cycles = 0;
      repeat (5) step(1'b0, 1'b0);
      step(1'b1, 1'b1);
      for (int k = 0; k < int'(N) + 8; k++) step(1'b0, !(f == 1 && k >= 100 && k < 103));
      checks++;
      if (i_active_cycles != N + 3 * f || q_active_cycles != N + 3 * f) begin
        failures++;
        $display("FAIL active cycles I %0d Q %0d", i_active_cycles, q_active_cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
