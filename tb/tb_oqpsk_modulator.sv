// tb_oqpsk_modulator: self-checking test of the OQPSK modulator at its full
// size (704 chips) with a 500 ns clock (2 MHz).
//
// Frame 1 holds 8 preamble symbols (symbol 0) followed by random chips; it is
// loaded with shift_en already high and a separate process_start pulse. The
// first 16 output values are compared with the I/Q sequence that symbol 0
// gives (1,3,2,2,3,1,0,2,3,3,2,0,0,0,1,3), and the whole frame with a model:
// after n shifts I = c(2*floor((n-1)/2)) for 1 <= n <= 704 and
// Q = c(2*floor((n-2)/2)+1) for 2 <= n <= 705, else 0. The frame must take
// 705 clocks = 352 500 ns on data_out. Frame 2 (random) holds process_start
// high during the whole load and drops it with load_mod, and pauses shift_en
// for a few clocks mid-frame. A reset mid-load must clear the output.
module tb_oqpsk_modulator;

  localparam int unsigned N = 704;
  localparam realtime TC = 500ns;

  logic       clk = 1'b0;
  logic       reset_mod, load_mod, data_in, process_start, shift_en;
  logic [1:0] data_out;
  int         checks = 0, failures = 0;
  logic       chips [N];

  oqpsk_modulator dut (.*);

  always #(TC / 2) clk = ~clk;

  initial begin
    #(10ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] expect_out(int n);
    logic i, q;
    i = (n >= 1 && n <= N)     ? chips[2 * ((n - 1) / 2)]     : 1'b0;
    q = (n >= 2 && n <= N + 1) ? chips[2 * ((n - 2) / 2) + 1] : 1'b0;
    return {q, i};
  endfunction

  task automatic check(logic [1:0] got, logic [1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Load the frame; optionally hold process_start during the load.
  // Stimulus changes at the falling edge.
  task automatic load_frame(bit ps_during_load);
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      load_mod      = 1'b1;
      data_in       = chips[k];
      process_start = ps_during_load;
      @(negedge clk);
    end
    load_mod = 1'b0;
    data_in  = 1'b1;
    if (!ps_during_load) begin
      process_start = 1'b1;
      @(negedge clk);
    end
    process_start = 1'b0;
  endtask

  // Shift the frame out and compare every clock; returns clocks with data.
  task automatic shift_frame(int pause_at, int pause_len, output realtime t_first, output realtime t_last);
    int n = 0;
    shift_en = 1'b1;
    t_first = 0; t_last = 0;
    while (n < N + 4) begin
      if (n == pause_at && pause_len > 0) begin
        shift_en = 1'b0;
        repeat (pause_len) begin
          @(posedge clk); #1;
          check(data_out, expect_out(n), "hold during pause");
        end
        shift_en = 1'b1;
        pause_len = 0;
      end
      @(posedge clk); #1;
      n++;
      if (n == 1) t_first = $realtime - 1ns;
      if (n == N + 2) t_last = $realtime - 1ns;
      check(data_out, expect_out(n), $sformatf("shift %0d", n));
    end
  endtask

  initial begin
    realtime t0, t1;
    static logic [31:0] sym0 = 32'b11011001110000110101001000101110;
    static logic [1:0] fig_seq [16] = '{2'd1, 2'd3, 2'd2, 2'd2, 2'd3, 2'd1, 2'd0, 2'd2,
                                  2'd3, 2'd3, 2'd2, 2'd0, 2'd0, 2'd0, 2'd1, 2'd3};
    reset_mod = 1'b1; load_mod = 1'b0; data_in = 1'b0; process_start = 1'b0; shift_en = 1'b1;
    repeat (3) @(negedge clk);
    reset_mod = 1'b0;

    // Frame 1: preamble chips, then random.
    for (int k = 0; k < N; k++)
      chips[k] = (k < 8 * 32) ? sym0[31 - (k % 32)] : 1'($urandom);
    load_frame(1'b0);
    check(data_out, 2'b00, "idle after process_start");
    // Preamble pattern of the first 16 Tc.
    begin
      int n = 0;
      repeat (16) begin
        @(posedge clk); #1;
        check(data_out, fig_seq[n], $sformatf("preamble Tc %0d", n));
        n++;
      end
    end
    // Reload the same frame and check it in full with timing.
    load_frame(1'b0);
    shift_frame(-1, 0, t0, t1);
    checks++;
    if (t1 - t0 != 352500ns) begin
      failures++;
      $display("FAIL frame duration %0t", t1 - t0);
    end

    // Frame 2: random chips, process_start high during load, shift pause.
    for (int k = 0; k < N; k++) chips[k] = 1'($urandom);
    load_frame(1'b1);
    shift_frame(301, 3, t0, t1);

    // Reset mid-load: nothing may come out.
    for (int k = 0; k < N; k++) chips[k] = 1'b1;
    load_frame(1'b0);
    reset_mod = 1'b1;
    @(negedge clk);
    reset_mod = 1'b0;
    repeat (20) begin
      @(posedge clk); #1;
      check(data_out, 2'b00, "after reset");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
