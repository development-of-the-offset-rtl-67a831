// crc_fcs: Frame Check Sequence generator for the acknowledgement PPDU.
//
// The PPDU arrives one bit per handshake, in transmission order: preamble and
// SFD (SHR_BITS), PHR (PHR_BITS) and MHR (MHR_BITS). Those bits pass straight
// through to the output. The bits of the MHR also run through a CRC-16 register.
// After the last MHR bit the block stops taking input and sends the 16 FCS bits,
// register bit 0 first, then clears the register and waits for the next frame.
// The output stream is thus the complete 88-bit frame.
//
// CRC: G(x) = x^16 + x^12 + x^5 + 1, register cleared to zero, one input bit per
// step in the reflected (LSB-first) form:
//   fb = crc[0] ^ bit;  crc = (crc >> 1) ^ (fb ? 16'h8408 : 0)
// The frame layout and the fact that the FCS is computed over the MHR are the
// published design's; the polynomial, the bit order and the sizes as
// parameters are this design's choices, taken from IEEE 802.15.4.
//
// Interface: valid/ready on both sides. During the pass-through part the path
// from in_* to out_* is combinational (no added latency); each FCS bit is
// offered from a register. Both sides may stall at any time.
module crc_fcs
  import zigbee_pkg::*;
#(
  parameter int unsigned SHR_BITS = PREAMBLE_BITS + SFD_BITS,   // 40
  parameter int unsigned PHR_LEN  = PHR_BITS,                   // 8
  parameter int unsigned MHR_LEN  = MHR_BITS                    // 24
) (
  input  logic clk,
  input  logic rst,
  input  logic in_bit,
  input  logic in_valid,
  output logic in_ready,
  output logic out_bit,
  output logic out_valid,
  input  logic out_ready
);

  localparam int unsigned HDR_END   = SHR_BITS + PHR_LEN;     // first MHR bit
  localparam int unsigned MHR_END   = HDR_END + MHR_LEN;      // first FCS bit
  localparam int unsigned FRAME_LEN = MHR_END + FCS_BITS;     // 88
  localparam int unsigned POS_W     = $clog2(FRAME_LEN);

  logic [POS_W-1:0] pos;       // index of the output bit offered now
  logic [15:0]      crc;
  logic             in_fcs;
  logic             fire;
  logic [3:0]       fcs_idx;     // FCS bit offered while in_fcs

  assign in_fcs    = (pos >= POS_W'(MHR_END));
  assign fcs_idx   = 4'(pos - POS_W'(MHR_END));
  assign out_bit   = in_fcs ? crc[fcs_idx] : in_bit;
  assign out_valid = in_fcs ? 1'b1 : in_valid;
  assign in_ready  = in_fcs ? 1'b0 : out_ready;
  assign fire      = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      pos <= '0;
      crc <= '0;
    end else if (fire) begin
      if (pos == POS_W'(FRAME_LEN - 1)) begin
        pos <= '0;
        crc <= '0;
      end else begin
        pos <= pos + 1'b1;
        if (pos >= POS_W'(HDR_END) && !in_fcs)
          crc <= (crc >> 1) ^ ((crc[0] ^ in_bit) ? CRC16_POLY_REFLECTED : 16'h0000);
      end
    end
  end

endmodule
