// tb_crc_fcs: self-checking test of the FCS generator.
//
// Sends acknowledgement frames (72 bits: 40 SHR, 8 PHR, 24 MHR) with random
// gaps on the input and random back-pressure on the output, and collects the
// 88 output bits. The first 72 must equal the input; the last 16 must equal a
// CRC worked out here in the non-reflected form: bit-reversed data through
// poly 0x1021 MSB-first, result bit-reversed. The reference is checked first
// against the CRC-16/KERMIT check value (0x2189 for "123456789") and the frame
// of fixed header values against its FCS 0xA70A (sent 0101000011100101).
// Also checks that the input is held off while the FCS goes out.
module tb_crc_fcs;

  logic clk = 1'b0, rst;
  logic in_bit, in_valid, in_ready, out_bit, out_valid, out_ready;
  int   checks = 0, failures = 0;
  int   fcs_stalls = 0;

  crc_fcs dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(2ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_crc(logic bits [$]);
    automatic logic [15:0] c = 16'h0000;
    logic [15:0] r;
    foreach (bits[k]) begin
      automatic logic fb = c[15] ^ bits[k];
      c = {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
    end
    for (int k = 0; k < 16; k++) r[k] = c[15 - k];
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic sent [$];
  logic got [$];

  // Output sink with random back-pressure.
  always @(posedge clk) begin
    if (out_valid && out_ready) got.push_back(out_bit);
    if (out_valid && out_ready && !in_ready && in_valid) fcs_stalls++;
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  // Stimulus changes at the falling edge; the sink samples at the rising edge.
  task automatic send_frame(logic bits [$]);
    bit hs;
    foreach (bits[k]) begin
      while ($urandom_range(0, 2) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_bit   = bits[k];
      forever begin
        #1 hs = in_ready;
        @(negedge clk);
        if (hs) break;
      end
    end
    // Keep offering a dummy bit: it must not be taken during the FCS.
    in_valid = 1'b1;
    in_bit   = 1'b1;
    while (got.size() < 88) begin
      #1;
      if (in_ready) begin
        check(1'b0, "input accepted during FCS");
        break;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    logic q [$];
    logic hdr [$];
    logic [15:0] c;
    string s;
    // Reference self-test.
    s = "123456789";
    foreach (s[i]) for (int b = 0; b < 8; b++) q.push_back(s[i][b]);
    check(ref_crc(q) == 16'h2189, "reference model check value");

    rst = 1'b1; in_valid = 1'b0; in_bit = 1'b0; out_ready = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    for (int f = 0; f < 20; f++) begin
      logic frame [$];
      logic mhr [$];
      automatic string hs = {"00000000000000000000000000000000", "11100101", "10100000"};
      automatic string ms = {"0100010000000000", "10000000"};
      frame = {};
      mhr = {};
      foreach (hs[i]) frame.push_back(hs[i] == "1");
      for (int i = 0; i < 24; i++) begin
        automatic logic b = (f == 0) ? (ms[i] == "1") : 1'($urandom);
        frame.push_back(b);
        mhr.push_back(b);
      end
      got = {};
      send_frame(frame);
      c = ref_crc(mhr);
      if (f == 0) check(c == 16'hA70A, "reference FCS of the fixed frame");
      check(got.size() == 88, "88 output bits");
      for (int i = 0; i < 72; i++) check(got[i] == frame[i], $sformatf("pass-through bit %0d", i));
      for (int i = 0; i < 16; i++) check(got[72 + i] == c[i], $sformatf("frame %0d FCS bit %0d", f, i));
    end
    check(fcs_stalls > 0, "input was held off during an FCS");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
