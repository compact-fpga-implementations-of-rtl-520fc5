// Skein padding unit, one 64-bit word per call (combinational). Words of a
// non-final block pass unchanged. In the final block, bits at or beyond 'len'
// are cleared; when 'len' is not a whole number of bytes a single 1 bit is put
// at position 'len' (Skein's bit padding, flagged in the tweak by the caller).
// The remainder of the block is zero. Word 0 is the block's first 64 bits in
// big-endian order. The rule is that of the Skein specification.
module skein_pad
  import sha3_pkg::*;
(
  input  logic [63:0] word_in,
  input  logic [2:0]  word_idx,
  input  logic        last,
  input  logic [8:0]  len,
  output logic [63:0] word_out
);
  always_comb begin
    if (!last) word_out = word_in;
    else       word_out = pad_word64(word_in, 64 * int'(word_idx), int'(len), len[2:0] != 3'd0);
  end
endmodule
