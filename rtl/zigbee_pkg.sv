// zigbee_pkg: constants and types shared by the 2.4 GHz IEEE 802.15.4 (Zigbee)
// digital transmitter.
//
// Holds the frame geometry of the acknowledgement PPDU (preamble, SFD, PHR,
// MHR, FCS), the DSSS symbol-to-chip table and the CRC-16 polynomial.
//
// Chip sequences are stored with chip c0 in bit 31 and chip c31 in bit 0, so a
// literal reads left to right in transmission order. The 16 sequences follow a
// fixed rule: symbols 1..7 are symbol 0 rotated right by 4*s chips, and symbols
// 8..15 are symbols 0..7 with every odd-indexed chip inverted.
//
// The CRC polynomial x^16 + x^12 + x^5 + 1 (bit-reversed form 0x8408, register
// cleared to zero, bits processed in transmission order) is the IEEE 802.15.4
// FCS; it is a choice of this design taken from that standard.
package zigbee_pkg;

  localparam int unsigned BITS_PER_SYMBOL  = 4;
  localparam int unsigned CHIPS_PER_SYMBOL = 32;

  // Acknowledgement frame geometry, in bits.
  localparam int unsigned PREAMBLE_BITS = 32;
  localparam int unsigned SFD_BITS      = 8;
  localparam int unsigned PHR_BITS      = 8;
  localparam int unsigned MHR_BITS      = 24;   // frame control (16) + sequence number (8)
  localparam int unsigned FCS_BITS      = 16;
  localparam int unsigned ACK_FRAME_BITS =
      PREAMBLE_BITS + SFD_BITS + PHR_BITS + MHR_BITS + FCS_BITS;                   // 88
  localparam int unsigned ACK_FRAME_CHIPS =
      ACK_FRAME_BITS / BITS_PER_SYMBOL * CHIPS_PER_SYMBOL;                          // 704

  typedef logic [BITS_PER_SYMBOL-1:0]  symbol_t;
  typedef logic [CHIPS_PER_SYMBOL-1:0] chip_seq_t;   // bit 31 = c0 ... bit 0 = c31

  // IEEE 802.15.4 FCS polynomial, reflected.
  localparam logic [15:0] CRC16_POLY_REFLECTED = 16'h8408;

  // DSSS table: data symbol -> 32-chip PN sequence, c0 leftmost.
  function automatic chip_seq_t chip_sequence(symbol_t sym);
    unique case (sym)
      4'd0:  return 32'b11011001110000110101001000101110;
      4'd1:  return 32'b11101101100111000011010100100010;
      4'd2:  return 32'b00101110110110011100001101010010;
      4'd3:  return 32'b00100010111011011001110000110101;
      4'd4:  return 32'b01010010001011101101100111000011;
      4'd5:  return 32'b00110101001000101110110110011100;
      4'd6:  return 32'b11000011010100100010111011011001;
      4'd7:  return 32'b10011100001101010010001011101101;
      4'd8:  return 32'b10001100100101100000011101111011;
      4'd9:  return 32'b10111000110010010110000001110111;
      4'd10: return 32'b01111011100011001001011000000111;
      4'd11: return 32'b01110111101110001100100101100000;
      4'd12: return 32'b00000111011110111000110010010110;
      4'd13: return 32'b01100000011101111011100011001001;
      4'd14: return 32'b10010110000001110111101110001100;
      default: return 32'b11001001011000000111011110111000;  // 15
    endcase
  endfunction

endpackage
