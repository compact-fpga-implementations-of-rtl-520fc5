// JH padding unit, one byte per call (combinational), matching the 8-bit
// output of the design's Pad box. A full block passes unchanged. In the last
// block, bits at or beyond 'len' are cleared and a 1 bit is put at position
// 'len'. JH always appends at least 512 padding bits: if the last block holds
// no message bits (len = 0) it also carries the 128-bit big-endian message
// length in bytes 48..63; otherwise an extra block of zeros carries the length
// there. Lengths are kept in 64 bits; the upper 64 bits of the length field
// are zero. The rule is that of the JH specification.
module jh_pad
  import sha3_pkg::*;
(
  input  logic [7:0]  byte_in,
  input  logic [5:0]  byte_idx,
  input  blk_kind_e   kind,
  input  logic [8:0]  len,
  input  logic [63:0] msg_bits,
  output logic [7:0]  byte_out
);
  logic [7:0] len_byte;
  always_comb begin
    // bytes 48..55 are the upper half of the 128-bit length (zero)
    len_byte = (byte_idx >= 6'd56) ? msg_bits[8*(63 - int'(byte_idx)) +: 8] : 8'h00;
    unique case (kind)
      BLK_FULL: byte_out = byte_in;
      BLK_LAST: begin
        byte_out = pad_byte(byte_in, 8 * int'(byte_idx), int'(len), 1'b1);
        if (len == 9'd0 && byte_idx >= 6'd48) byte_out = len_byte;
      end
      default:  byte_out = (byte_idx >= 6'd48) ? len_byte : 8'h00;
    endcase
  end
endmodule
