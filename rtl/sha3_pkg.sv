// Shared definitions for the three compact hash units (Grostl-256, JH-256,
// Skein-512-256). All three use the same block framing on a 32-bit Fast
// Simplex Link: one length word, then 16 big-endian data words. A length of
// 512 marks a full block that is not the last one; a length below 512 marks
// the last block and counts its valid bits. The padding helpers below turn a
// word of such a block into the padded word: bits past the length are cleared
// and, when asked, a single 1 bit is placed right after the last valid bit.
package sha3_pkg;


  // Kind of block handed to a padding unit.
  typedef enum logic [1:0] {
    BLK_FULL  = 2'd0,  // 512 message bits, no padding
    BLK_LAST  = 2'd1,  // last message block, len valid bits (0..511)
    BLK_EXTRA = 2'd2   // padding-only block appended after the last one
  } blk_kind_e;

  // Mask a W-bit big-endian word that starts at message bit 'base' of the
  // block: bits at positions >= len are cleared, and if 'one' is set the bit
  // at position len is set. Bit W-1 of the word is block position 'base'.
  function automatic logic [63:0] pad_word64(input logic [63:0] w, input int unsigned base,
                                             input int unsigned len, input logic one);
    logic [63:0] r;
    for (int unsigned k = 0; k < 64; k++) begin
      int unsigned pos;
      pos = base + k;
      if (pos < len)                r[63-k] = w[63-k];
      else if (pos == len && one)   r[63-k] = 1'b1;
      else                          r[63-k] = 1'b0;
    end
    return r;
  endfunction

  function automatic logic [7:0] pad_byte(input logic [7:0] w, input int unsigned base,
                                          input int unsigned len, input logic one);
    logic [7:0] r;
    for (int unsigned k = 0; k < 8; k++) begin
      int unsigned pos;
      pos = base + k;
      if (pos < len)                r[7-k] = w[7-k];
      else if (pos == len && one)   r[7-k] = 1'b1;
      else                          r[7-k] = 1'b0;
    end
    return r;
  endfunction

  function automatic logic [63:0] bswap64(input logic [63:0] x);
    logic [63:0] r;
    for (int i = 0; i < 8; i++) r[8*i +: 8] = x[8*(7-i) +: 8];
    return r;
  endfunction

endpackage
