// tb_bit_to_symbol: self-checking test of the 4-bit symbol packer.
//
// Random bits go in with random gaps; the symbol sink applies random
// back-pressure. Each symbol must be {b3,b2,b1,b0} of its group of four input
// bits, b0 being the first bit. Also checks the table's example (bits 1,0,0,0
// give symbol 1) and that with a sink that is always ready one symbol leaves
// per four input bits without stalling the input.
module tb_bit_to_symbol;

  import zigbee_pkg::*;

  logic    clk = 1'b0, rst;
  logic    in_bit, in_valid, in_ready;
  symbol_t sym;
  logic    sym_valid, sym_ready;
  int      checks = 0, failures = 0;
  int      stalls = 0;
  logic    bits [$];
  symbol_t syms [$];
  bit      random_sink;

  bit_to_symbol dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(1ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && sym_valid && sym_ready) syms.push_back(sym);
    if (!rst && in_valid && !in_ready) stalls++;
    sym_ready <= random_sink ? ($urandom_range(0, 2) == 0) : 1'b1;
  end

  // Stimulus changes at the falling edge; the sink samples at the rising edge.
  task automatic send(logic b, bit gaps);
    bit hs;
    if (gaps) while ($urandom_range(0, 1) == 0) begin
      in_valid = 1'b0;
      @(negedge clk);
    end
    in_valid = 1'b1;
    in_bit   = b;
    forever begin
      #1 hs = in_ready;
      @(negedge clk);
      if (hs) break;
    end
    bits.push_back(b);
    in_valid = 1'b0;
  endtask

  task automatic compare(string what);
    repeat (4) @(negedge clk);
    checks++;
    if (syms.size() != bits.size() / 4) begin
      failures++;
      $display("FAIL %s: %0d symbols for %0d bits", what, syms.size(), bits.size());
    end
    foreach (syms[i]) begin
      automatic symbol_t e = {bits[4*i+3], bits[4*i+2], bits[4*i+1], bits[4*i]};
      checks++;
      if (syms[i] !== e) begin
        failures++;
        if (failures < 10) $display("FAIL %s symbol %0d: got %h expected %h", what, i, syms[i], e);
      end
    end
    bits = {};
    syms = {};
  endtask

  initial begin
    int t0;
    rst = 1'b1; in_valid = 1'b0; in_bit = 1'b0; sym_ready = 1'b1; random_sink = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    // Table example: b0b1b2b3 = 1000 is symbol 1.
    send(1'b1, 0); send(1'b0, 0); send(1'b0, 0); send(1'b0, 0);
    repeat (2) @(negedge clk);
    checks++;
    if (syms.size() != 1 || syms[0] != 4'd1) begin
      failures++;
      $display("FAIL table example");
    end
    bits = {}; syms = {};

    // Full rate with a ready sink: 64 bits in 64 clocks.
    t0 = stalls;
    for (int k = 0; k < 64; k++) begin
      automatic logic b = 1'($urandom);
      in_valid = 1'b1;
      in_bit   = b;
      @(negedge clk);
      bits.push_back(b);
    end
    in_valid = 1'b0;
    checks++;
    if (stalls != t0) begin
      failures++;
      $display("FAIL input stalled with a ready sink");
    end
    compare("full rate");

    // Random gaps and back-pressure.
    random_sink = 1'b1;
    for (int k = 0; k < 400; k++) send(1'($urandom), 1);
    random_sink = 1'b0;
    compare("random");
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL back-pressure never reached the input");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
