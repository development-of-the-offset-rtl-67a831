// symbol_to_chip: DSSS spreader. Each 4-bit data symbol becomes its 32-chip
// PN sequence (zigbee_pkg::chip_sequence), sent one chip per clock, c0 first.
//
// A symbol is taken when the block is idle or while its last chip leaves, so
// back-to-back symbols give an unbroken chip stream. The 32-chip sequence is
// held in a shift register and the chip counter marks the last chip.
//
// Interface: valid/ready on the symbol side; chip_valid/chip_ready on the chip
// side, where a chip leaves on every cycle with both high. Reset is synchronous
// and active high. The symbol-to-chip table follows the published design; the
// serial output order and the handshake are this design's choices.
module symbol_to_chip
  import zigbee_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  symbol_t sym,
  input  logic    sym_valid,
  output logic    sym_ready,
  output logic    chip,
  output logic    chip_valid,
  input  logic    chip_ready
);

  localparam int unsigned IDX_W = $clog2(CHIPS_PER_SYMBOL);

  chip_seq_t  seq;        // seq[31] is the chip offered now
  logic [IDX_W-1:0] idx;  // number of chips of this symbol already sent
  logic       busy;
  logic       last_out;

  assign chip       = seq[CHIPS_PER_SYMBOL-1];
  assign chip_valid = busy;
  assign last_out   = busy && chip_ready && (idx == IDX_W'(CHIPS_PER_SYMBOL - 1));
  assign sym_ready  = !busy || last_out;

  always_ff @(posedge clk) begin
    if (rst) begin
      seq  <= '0;
      idx  <= '0;
      busy <= 1'b0;
    end else if (sym_valid && sym_ready) begin
      seq  <= chip_sequence(sym);
      idx  <= '0;
      busy <= 1'b1;
    end else if (busy && chip_ready) begin
      seq <= {seq[CHIPS_PER_SYMBOL-2:0], 1'b0};
      idx <= idx + 1'b1;
      if (last_out) busy <= 1'b0;
    end
  end

endmodule
