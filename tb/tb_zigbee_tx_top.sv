// tb_zigbee_tx_top: end-to-end test of the transmitter with every parameter at
// its default (704 chips, 4 samples per Tc, 8-bit samples), clock 500 ns.
//
// Sends acknowledgement frames (72 header bits: 32 zero preamble bits, SFD
// 11100101, PHR 10100000, frame control 0100010000000000, sequence number)
// and acts as the controller: it counts load_mod cycles, pulses process_start
// after the 704th chip and holds shift_en while the frame goes out.
// Expected values are built here independently: FCS by a non-reflected CRC,
// symbols from 4-bit groups (first bit = LSB), chips from symbol 0's sequence
// by rotation and odd-chip inversion, then the I/Q schedule and half-sine
// samples (25, 71, 106, 125, 125, 106, 71, 25).
// Frame 1 uses the fixed header (FCS 0xA70A), a bit source that is always
// valid, and must load in 704 consecutive clocks (352 us) and send in 705
// clocks (352.5 us). Frame 2 has a random sequence number, random source gaps,
// process_start held high through the load, and a shift_en pause.
// Mechanisms counted, each must occur: input back-pressure, FCS insertion,
// chip load, I/Q split, Q offset by Tc, shift pause, held process_start.
module tb_zigbee_tx_top;

  localparam int unsigned N = 704;
  localparam int HS [8] = '{25, 71, 106, 125, 125, 106, 71, 25};

  logic clk = 1'b0, rst;
  logic ppdu_bit, ppdu_valid, ppdu_ready, process_start, shift_en, load_mod, chip;
  logic [1:0] data_out;
  logic signed [7:0] i_samples [4];
  logic signed [7:0] q_samples [4];

  int checks = 0, failures = 0;
  int n_backpressure = 0, n_fcs_bits = 0, n_loads = 0, n_split = 0, n_q_offset = 0,
      n_pause = 0, n_held_ps = 0;

  zigbee_tx_top dut (.*);

  always #250ns clk = ~clk;

  initial begin
    #(20ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- reference model ----
  function automatic logic [15:0] ref_fcs(logic bits [$]);
    logic [15:0] c = 16'h0000;
    logic [15:0] r;
    foreach (bits[k]) begin
      automatic logic fb = c[15] ^ bits[k];
      c = {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
    end
    for (int k = 0; k < 16; k++) r[k] = c[15 - k];
    return r;
  endfunction

  function automatic logic [0:31] ref_seq(int s);
    automatic logic [0:31] s0 = 32'b11011001110000110101001000101110;
    logic [0:31] r;
    for (int k = 0; k < 32; k++) r[k] = s0[(k - 4 * (s % 8) + 64) % 32];
    if (s >= 8) for (int k = 1; k < 32; k += 2) r[k] = ~r[k];
    return r;
  endfunction

  logic exp_chips [N];
  logic got_chips [$];
  int   load_first, load_last, cyc = 0, bits_in = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && load_mod) begin
      if (got_chips.size() == 0) load_first = cyc;
      load_last = cyc;
      got_chips.push_back(chip);
      n_loads++;
    end
    if (!rst && ppdu_valid && !ppdu_ready) n_backpressure++;
    if (!rst && ppdu_valid && ppdu_ready) bits_in++;
  end

  // Build the 72 header bits and the expected 704 chips.
  task automatic make_frame(logic [7:0] seq_num, output logic hdr [$]);
    automatic string hs = {"00000000000000000000000000000000", "11100101", "10100000", "0100010000000000"};
    logic mhr [$];
    logic all [$];
    logic [15:0] fcs;
    hdr = {};
    foreach (hs[i]) hdr.push_back(hs[i] == "1");
    for (int i = 0; i < 8; i++) hdr.push_back(seq_num[7 - i]);   // written b0 first as printed
    for (int i = 48; i < 72; i++) mhr.push_back(hdr[i]);
    fcs = ref_fcs(mhr);
    all = hdr;
    for (int i = 0; i < 16; i++) all.push_back(fcs[i]);
    for (int s = 0; s < 22; s++) begin
      automatic int sym = 8 * all[4*s+3] + 4 * all[4*s+2] + 2 * all[4*s+1] + all[4*s];
      automatic logic [0:31] seq = ref_seq(sym);
      for (int k = 0; k < 32; k++) exp_chips[32 * s + k] = seq[k];
    end
  endtask

  // Stimulus changes at the falling edge. Source of PPDU bits.
  task automatic send_bits(logic hdr [$], bit gaps);
    bit hs;
    foreach (hdr[k]) begin
      if (gaps) while ($urandom_range(0, 3) == 0) begin
        ppdu_valid = 1'b0;
        @(negedge clk);
      end
      ppdu_valid = 1'b1;
      ppdu_bit   = hdr[k];
      forever begin
        #1 hs = ppdu_ready;
        @(negedge clk);
        if (hs) break;
      end
    end
    ppdu_valid = 1'b0;
  endtask

  // Shift the frame out, comparing data_out and the samples every clock.
  task automatic shift_out(int pause_at, realtime t_ps);
    int n = 0;
    logic [1:0] prev = 2'b00;
    realtime t_first = 0, t_end = 0;
    shift_en = 1'b1;
    for (int c = 0; c < int'(N) + 8; c++) begin
      logic ei, eq;
      bit   shifting = !(pause_at >= 0 && c >= pause_at && c < pause_at + 3);
      shift_en = shifting;
      if (!shifting && c == pause_at) n_pause++;
      @(posedge clk);
      #1;
      if (shifting && n != int'(N) + 2) n++;
      ei = (n >= 1 && n <= int'(N))     ? exp_chips[2 * ((n - 1) / 2)]     : 1'b0;
      eq = (n >= 2 && n <= int'(N) + 1) ? exp_chips[2 * ((n - 2) / 2) + 1] : 1'b0;
      check(data_out == {eq, ei}, $sformatf("data_out after %0d shifts", n));
      if (n == 1 && t_first == 0) t_first = $realtime - 1ns;
      if (n == int'(N) + 2 && t_end == 0) t_end = $realtime - 1ns;
      if (n >= 2 && n <= int'(N) + 1 && (n % 2) == 0 && data_out[1] != prev[1] && shifting) n_q_offset++;
      prev = data_out;
      // Samples of the previous clock's output, checked at the next edge.
      fork
        begin
          automatic int nn = n;
          automatic logic ci = ei, cq = eq;
          @(posedge clk);
          #1;
          for (int m = 0; m < 4; m++) begin
            automatic int vi = (nn >= 1 && nn <= int'(N))     ? HS[((nn % 2) == 0 ? 4 : 0) + m] : 0;
            automatic int vq = (nn >= 2 && nn <= int'(N) + 1) ? HS[((nn % 2) == 1 ? 4 : 0) + m] : 0;
            check(int'(i_samples[m]) == (ci ? vi : -vi), $sformatf("I sample n=%0d m=%0d", nn, m));
            check(int'(q_samples[m]) == (cq ? vq : -vq), $sformatf("Q sample n=%0d m=%0d", nn, m));
          end
        end
      join_none
      @(negedge clk);
    end
    shift_en = 1'b0;
    if (pause_at < 0)
      check(t_end - t_first == 352500ns, $sformatf("frame on data_out took %0t", t_end - t_first));
  endtask

  task automatic run_frame(logic [7:0] seq_num, bit gaps, bit ps_held, int pause_at);
    logic hdr [$];
    make_frame(seq_num, hdr);
    got_chips = {};
    bits_in = 0;
    process_start = ps_held;
    shift_en = 1'b1;                 // may stay high during the load, as on the bench
    if (ps_held) n_held_ps++;
    fork
      send_bits(hdr, gaps);
    join_none
    while (got_chips.size() < N) @(negedge clk);
    // 72 bits in, 704 chips (88 bits) out: the CRC stage added the FCS bits.
    n_fcs_bits += got_chips.size() / 8 - bits_in;
    foreach (got_chips[k]) check(got_chips[k] == exp_chips[k], $sformatf("loaded chip %0d", k));
    if (!gaps) check(load_last - load_first + 1 == int'(N), $sformatf("load took %0d clocks", load_last - load_first + 1));
    check(data_out == 2'b00, "idle before process_start");
    if (!ps_held) begin
      process_start = 1'b1;
      @(negedge clk);
    end
    process_start = 1'b0;
    n_split++;
    shift_out(pause_at, $realtime);
    check(data_out == 2'b00, "idle after frame");
  endtask

  initial begin
    rst = 1'b1; ppdu_valid = 1'b0; ppdu_bit = 1'b0; process_start = 1'b0; shift_en = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    run_frame(8'b10000000, 1'b0, 1'b0, -1);
    // Reference FCS of the fixed frame: 0xA70A.
    begin
      logic mhr [$];
      automatic string ms = "010001000000000010000000";
      foreach (ms[i]) mhr.push_back(ms[i] == "1");
      check(ref_fcs(mhr) == 16'hA70A, "reference FCS");
    end
    run_frame(8'($urandom), 1'b1, 1'b1, 200);
    @(negedge clk);

    $display("mechanisms: backpressure=%0d fcs_bits=%0d chip_loads=%0d splits=%0d q_offset=%0d pauses=%0d held_process_start=%0d",
             n_backpressure, n_fcs_bits, n_loads, n_split, n_q_offset, n_pause, n_held_ps);
    check(n_backpressure > 0, "input back-pressure happened");
    check(n_fcs_bits == 32, "FCS appended to both frames");
    check(n_loads == 2 * int'(N), "1408 chips loaded");
    check(n_split == 2, "two I/Q splits");
    check(n_q_offset > 0, "Q changed one Tc after I");
    check(n_pause == 1, "shift pause");
    check(n_held_ps == 1, "process_start held through a load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
