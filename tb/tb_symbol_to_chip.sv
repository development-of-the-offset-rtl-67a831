// tb_symbol_to_chip: self-checking test of the DSSS spreader.
//
// The expected chips are built here from symbol 0's sequence alone: symbol s
// (s < 8) is symbol 0 rotated right by 4*s chips, and symbol s + 8 is symbol s
// with its odd-indexed chips inverted. Rows of the symbol table are also
// compared literally. All 16 symbols and 200 random ones are sent, first
// back to back with a ready chip sink (32 chips per symbol, one per clock, no
// gaps), then with random gaps and random chip_ready.
module tb_symbol_to_chip;

  import zigbee_pkg::*;

  logic    clk = 1'b0, rst;
  symbol_t sym;
  logic    sym_valid, sym_ready, chip, chip_valid, chip_ready;
  int      checks = 0, failures = 0;
  logic    chips [$];
  int      chip_times [$];
  int      cyc = 0;
  bit      random_sink;

  symbol_to_chip dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(2ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected sequence, index 0 = chip c0.
  function automatic logic [0:31] ref_seq(int s);
    automatic logic [0:31] s0 = 32'b11011001110000110101001000101110;
    logic [0:31] r;
    automatic int b = s % 8;
    for (int k = 0; k < 32; k++) r[k] = s0[(k - 4 * b + 64) % 32];
    if (s >= 8) for (int k = 1; k < 32; k += 2) r[k] = ~r[k];
    return r;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && chip_valid && chip_ready) begin
      chips.push_back(chip);
      chip_times.push_back(cyc);
    end
    chip_ready <= random_sink ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(int list [$], bit gaps, bit timed);
    int t0, cycles;
    bit hs;
    chips = {};
    chip_times = {};
    t0 = 0;
    // Stimulus changes at the falling edge; the sink samples at the rising edge.
    foreach (list[i]) begin
      if (gaps) while ($urandom_range(0, 3) == 0) begin
        sym_valid = 1'b0;
        @(negedge clk);
      end
      sym_valid = 1'b1;
      sym       = symbol_t'(list[i]);
      forever begin
        #1 hs = sym_ready;
        @(negedge clk);
        if (hs) break;
      end
    end
    sym_valid = 1'b0;
    while (chips.size() < 32 * list.size()) @(negedge clk);
    repeat (2) @(negedge clk);
    cycles = chip_times[$] - chip_times[0] + 1;
    if (timed) check(cycles == 32 * list.size(), $sformatf("%0d clocks for %0d symbols", cycles, list.size()));
    check(chips.size() == 32 * list.size(), "chip count");
    foreach (list[i]) begin
      automatic logic [0:31] e = ref_seq(list[i]);
      for (int k = 0; k < 32; k++)
        check(chips[32 * i + k] == e[k], $sformatf("symbol %0d chip %0d", list[i], k));
    end
  endtask

  initial begin
    int list [$];
    check(ref_seq(1)  == 32'b11101101100111000011010100100010, "reference row 1");
    check(ref_seq(7)  == 32'b10011100001101010010001011101101, "reference row 7");
    check(ref_seq(11) == 32'b01110111101110001100100101100000, "reference row 11");
    check(ref_seq(15) == 32'b11001001011000000111011110111000, "reference row 15");

    rst = 1'b1; sym_valid = 1'b0; sym = '0; chip_ready = 1'b1; random_sink = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    for (int s = 0; s < 16; s++) list.push_back(s);
    run(list, 0, 1);
    list = {};
    for (int s = 0; s < 200; s++) list.push_back($urandom_range(0, 15));
    random_sink = 1'b1;
    run(list, 1, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
