// bit_to_symbol: packs the serial PPDU bit stream into 4-bit data symbols.
//
// Every BITS_PER_SYMBOL (4) consecutive bits form one symbol; the first bit of
// the group is b0, the least significant bit of the symbol, as in the symbol
// table (symbol 1 is b0b1b2b3 = 1000). Three bits are collected in a small
// register; when the fourth is accepted the symbol is written to the output
// register and offered with sym_valid in the next cycle.
//
// Interface: valid/ready on both sides. The output register accepts the next
// symbol in the same cycle as the current one leaves, so a sink that takes a
// symbol every cycle sees no bubbles; a full output register stalls only the
// fourth bit of the next group. Reset is synchronous and active high.
// The grouping and bit order follow the published design; the handshake is
// this design's choice.
module bit_to_symbol
  import zigbee_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    in_bit,
  input  logic    in_valid,
  output logic    in_ready,
  output symbol_t sym,
  output logic    sym_valid,
  input  logic    sym_ready
);

  localparam int unsigned CNT_W = $clog2(BITS_PER_SYMBOL);

  logic [BITS_PER_SYMBOL-2:0] acc;
  logic [CNT_W-1:0]           cnt;
  logic                       last_bit;
  logic                       out_free;

  assign last_bit = (cnt == CNT_W'(BITS_PER_SYMBOL - 1));
  assign out_free = !sym_valid || sym_ready;
  assign in_ready = !last_bit || out_free;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      cnt       <= '0;
      sym       <= '0;
      sym_valid <= 1'b0;
    end else begin
      if (sym_valid && sym_ready) sym_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (last_bit) begin
          sym       <= {in_bit, acc};
          sym_valid <= 1'b1;
          cnt       <= '0;
        end else begin
          acc[cnt] <= in_bit;
          cnt      <= cnt + 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) sym_valid && !sym_ready |=> sym_valid && $stable(sym))
    else $error("bit_to_symbol: symbol dropped or changed while stalled");

endmodule
