// Grostl padding unit, one 64-bit word per call (combinational). For a full
// block the word passes unchanged. For the last block, bits at or beyond
// 'len' are cleared and a 1 bit is put at position 'len'; if at least 65 bits
// remain after the message (len <= 447), word 7 also carries the 64-bit
// big-endian count of padded blocks. An extra block holds only zeros and, in
// word 7, that count. Word 0 is the block's first 64 bits. The rule is that
// of the Grostl specification; the word-wide streaming form follows the 64-bit
// Pad box of the design.
module grostl_pad
  import sha3_pkg::*;
(
  input  logic [63:0] word_in,
  input  logic [2:0]  word_idx,
  input  blk_kind_e   kind,
  input  logic [8:0]  len,
  input  logic [63:0] nblocks,
  output logic [63:0] word_out
);
  always_comb begin
    unique case (kind)
      BLK_FULL:  word_out = word_in;
      BLK_LAST: begin
        word_out = pad_word64(word_in, 64 * int'(word_idx), int'(len), 1'b1);
        if (word_idx == 3'd7 && len <= 9'd447) word_out = nblocks;
      end
      default:   word_out = (word_idx == 3'd7) ? nblocks : 64'h0;
    endcase
  end
endmodule
