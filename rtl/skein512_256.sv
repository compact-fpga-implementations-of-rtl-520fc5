// Compact Skein-512-256 hash unit with a 64-bit datapath.
//
// Skein chains Threefish-512 blocks in UBI mode: each message block is
// encrypted under the chaining value (the key) with a tweak that holds the
// byte position and the first/final/type flags, and the ciphertext XOR the
// message block becomes the next key. After the final message block one more
// UBI block (type Output, an 8-byte zero counter) produces the digest, the
// first 32 bytes of its result.
//
// Storage: the state RAM (two banks of eight 64-bit words, round r reads bank
// r%2 and writes bank (r+1)%2; round 0 reads the temporary RAM directly), the
// temporary RAM holding the message block for the final XOR, and the key
// schedule (eight key words plus the parity word k8 = C240 ^ k0 ^ ... ^ k7 and
// the three tweak words). One round is 8 cycles: words are read in order 0..7
// through skein_core, which adds the subkey word in every fourth round and
// forms one MIX per word pair with three cycles of latency; the two MIX
// results are written straight to their places after the Threefish word
// permutation (2,1,4,7,6,5,0,3). That permutation lets each round start right
// after the previous one. 72 rounds take 576 cycles; after a 3-cycle drain
// the last subkey addition and the message XOR take 8 more, one word per
// cycle, writing the new key in place.
//
// Since only the tweak says which block is final, a full (512-bit) block is
// held in the temporary RAM until the next length word has been read: a
// following block of length 0 makes it the final block (that empty block is
// then discarded when it has arrived). The held block starts as soon as the
// length word is known, so the next block's data words arrive while it runs;
// a block thus costs 576 + 3 + 8 cycles plus 8 for loading and 4 of control. A final block whose length is
// not a whole number of bytes gets Skein's bit padding and the BitPad flag.
//
// The 64-bit datapath, the RAMs for state, key schedule and temporary buffer,
// and 72 rounds of 8 cycles each follow the reference design; holding back full
// blocks, the constant initial chaining value and the separate output block
// pass are this design's choices.
module skein512_256
  import sha3_pkg::*;
#(
  parameter int unsigned ROUNDS = 72
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] s_data,
  input  logic        s_exists,
  output logic        s_read,
  output logic [31:0] m_data,
  output logic        m_write,
  input  logic        m_full
);
  localparam logic [63:0] C240 = 64'h1BD11BDAA9FC1A22;
  // chaining value after the Skein-512 configuration block for 256-bit output
  localparam logic [63:0] IV [8] = '{
    64'hCCD044A12FDB3E13, 64'hE83590301A79A9EB, 64'h55AEA0614F816E6F, 64'h2A2767A4AE9B94DB,
    64'hEC06025E74DD7683, 64'hE7A436CDC4746251, 64'hC36FBAF9393AD185, 64'h3EEDBA1833EDFC13};
  localparam logic [5:0] ROT [8][4] = '{
    '{6'd46, 6'd36, 6'd19, 6'd37}, '{6'd33, 6'd27, 6'd14, 6'd42},
    '{6'd17, 6'd49, 6'd36, 6'd39}, '{6'd44, 6'd9,  6'd54, 6'd56},
    '{6'd39, 6'd30, 6'd34, 6'd24}, '{6'd13, 6'd50, 6'd10, 6'd17},
    '{6'd25, 6'd29, 6'd39, 6'd43}, '{6'd8,  6'd35, 6'd56, 6'd22}};
  // destination of MIX output f_m after the permutation: v[DEST[m]] = f_m
  localparam logic [2:0] DEST [8] = '{3'd6, 3'd1, 3'd0, 3'd7, 3'd2, 3'd5, 3'd4, 3'd3};
  localparam logic [5:0] T_MSG = 6'd48;
  localparam logic [5:0] T_OUT = 6'd63;

  typedef enum logic [2:0] {K_IDLE, K_LOAD, K_RUN, K_DRAIN, K_FIN, K_NEXT, K_OSTART, K_OUT} k_state_e;
  k_state_e state;

  logic         blk_valid, blk_ready;
  logic [511:0] blk_data;
  logic [31:0]  blk_len;

  fsl_block_rx u_rx (
    .clk, .rst_n, .s_data, .s_exists, .s_read,
    .blk_valid, .blk_ready, .blk_data, .blk_len
  );

  logic         tx_start, tx_busy;
  logic [255:0] digest;

  fsl_digest_tx u_tx (
    .clk, .rst_n, .start(tx_start), .digest, .busy(tx_busy),
    .m_data, .m_write, .m_full
  );

  logic [63:0] v  [2][8];     // state RAM
  logic [63:0] m  [8];        // temporary RAM (message block)
  logic [63:0] k  [8];        // key schedule RAM
  logic [63:0] k8, t0, t1, t2;
  logic [63:0] pos;           // bytes processed before the pending block
  logic        first, pending, is_final, outph;
  logic        len_seen;      // the next block's length word has been read
  logic        drop_empty;    // an empty last block is still to be discarded
  logic [6:0]  pend_bytes;    // bytes of the block in the temporary RAM
  logic        pend_bitpad;
  logic        blk_last;
  logic [2:0]  widx;
  logic [9:0]  cnt;
  logic        load_last;     // block being loaded is the last one

  assign blk_last = (blk_len < 32'd512);

  always_comb begin
    k8 = C240;
    for (int i = 0; i < 8; i++) k8 ^= k[i];
    t2 = t0 ^ t1;
  end

  function automatic logic [63:0] kword(input int unsigned idx);
    return (idx == 8) ? k8 : k[idx];
  endfunction
  function automatic logic [63:0] tword(input int unsigned idx);
    case (idx)
      0:       return t0;
      1:       return t1;
      default: return t2;
    endcase
  endfunction

  // subkey word i of subkey s
  function automatic logic [63:0] subkey(input int unsigned s, input int unsigned i);
    logic [63:0] r;
    r = kword((s + i) % 9);
    if (i == 5) r += tword(s % 3);
    if (i == 6) r += tword((s + 1) % 3);
    if (i == 7) r += 64'(s);
    return r;
  endfunction

  // padding of the word being loaded
  logic [63:0] pad_out;
  skein_pad u_pad (
    .word_in (blk_data[511 - 64*widx -: 64]),
    .word_idx(widx),
    .last    (load_last),
    .len     (blk_len[8:0]),
    .word_out(pad_out)
  );

  // round issue
  logic [6:0] rnd;
  logic [2:0] w;
  logic       issue;
  logic [63:0] ks;
  assign rnd   = 7'(cnt >> 3);
  assign w     = cnt[2:0];
  assign issue = (state == K_RUN);
  assign ks    = subkey(int'(rnd) / 4, int'(w));

  logic        o_valid;
  logic [63:0] y0, y1;
  logic [1:0]  o_j;
  logic        o_wb;
  logic [1:0]  j_d  [3];   // MIX index and write bank, delayed to the core's
  logic        wb_d [3];   // output (three cycles after the second word)
  logic [1:0]  dcnt;

  skein_core u_core (
    .clk, .rst_n, .in_valid(issue), .x((rnd == 7'd0) ? m[w] : v[rnd[0]][w]), .ks(ks),
    .inject(rnd[1:0] == 2'd0), .second(w[0]), .rot(ROT[rnd[2:0]][w[2:1]]),
    .out_valid(o_valid), .y0, .y1
  );

  assign o_j  = j_d[2];
  assign o_wb = wb_d[2];

  always_ff @(posedge clk) begin
    j_d[0]  <= w[2:1];
    wb_d[0] <= ~rnd[0];
    for (int i = 1; i < 3; i++) begin
      j_d[i]  <= j_d[i-1];
      wb_d[i] <= wb_d[i-1];
    end
  end

  // output word: final subkey added, message XORed
  logic [63:0] fin_word;
  assign fin_word = (v[0][widx] + subkey(ROUNDS / 4, int'(widx))) ^ m[widx];

  always_comb begin
    for (int i = 0; i < 4; i++) digest[255 - 64*i -: 64] = bswap64(k[i]);
  end

  assign tx_start = (state == K_OUT) && !tx_busy;

  // a block is taken from the receiver when it is loaded, or when it is an
  // empty last block that only marked the held block as final
  assign blk_ready = ((state == K_LOAD) && (widx == 3'd7)) || (drop_empty && blk_valid);

  // The first word read from the link after reset or after a block has been
  // handed over is the next length word; the receiver keeps it in blk_len.
  // Knowing it is enough to decide whether a held block is the final one.
  always_ff @(posedge clk) begin
    if (!rst_n || blk_ready) len_seen <= 1'b0;
    else if (s_read)         len_seen <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (o_valid) begin
      v[o_wb][DEST[{o_j, 1'b0}]] <= y0;
      v[o_wb][DEST[{o_j, 1'b1}]] <= y1;
    end
    if (state == K_LOAD) begin
      m[widx]    <= bswap64(pad_out);
    end
    if (state == K_NEXT && !(pending && load_last) && is_final && !outph)
      for (int i = 0; i < 8; i++) m[i] <= 64'h0;
  end

  // start a UBI block on the contents of the temporary RAM
  task automatic start_block(input logic fin, input logic [5:0] typ, input logic [63:0] position,
                             input logic bitpad);
    t0       <= position;
    t1       <= {fin, first, typ, bitpad, 55'h0};
    is_final <= fin;
    cnt      <= '0;
    state    <= K_RUN;
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= K_IDLE;
      for (int i = 0; i < 8; i++) k[i] <= IV[i];
      t0          <= '0;
      t1          <= '0;
      pos         <= '0;
      first       <= 1'b1;
      pending     <= 1'b0;
      is_final    <= 1'b0;
      outph       <= 1'b0;
      pend_bytes  <= '0;
      pend_bitpad <= 1'b0;
      widx        <= '0;
      cnt         <= '0;
      load_last   <= 1'b0;
      dcnt        <= '0;
      drop_empty  <= 1'b0;
    end else begin
      if (drop_empty && blk_valid) drop_empty <= 1'b0;
      unique case (state)
        K_IDLE: if (pending && len_seen && !drop_empty) begin
          // the held full block is final only if an empty last block follows;
          // the next block's data words arrive while the held block runs
          pending    <= 1'b0;
          drop_empty <= blk_last && blk_len[8:0] == 9'd0;
          pos        <= pos + 64'(pend_bytes);
          start_block(blk_last && blk_len[8:0] == 9'd0, T_MSG, pos + 64'(pend_bytes), 1'b0);
        end else if (!pending && blk_valid && !drop_empty) begin
          load_last <= blk_last;
          widx      <= '0;
          state     <= K_LOAD;
        end
        K_LOAD: begin
          widx <= widx + 3'd1;
          if (widx == 3'd7) begin
            if (load_last) begin
              pend_bytes  <= 7'((blk_len[8:0] + 9'd7) >> 3);
              pend_bitpad <= (blk_len[2:0] != 3'd0);
              state       <= K_NEXT;
              pending     <= 1'b1;
            end else begin
              pend_bytes  <= 7'd64;
              pend_bitpad <= 1'b0;
              pending     <= 1'b1;
              state       <= K_IDLE;
            end
          end
        end
        K_RUN: begin
          cnt <= cnt + 10'd1;
          if (cnt == 10'(ROUNDS * 8 - 1)) begin
            dcnt  <= '0;
            state <= K_DRAIN;
          end
        end
        K_DRAIN: begin
          // the last MIX of round 71 is written three cycles after its issue
          dcnt <= dcnt + 2'd1;
          widx <= '0;
          if (dcnt == 2'd2) state <= K_FIN;
        end
        K_FIN: begin
          k[widx] <= fin_word;
          widx    <= widx + 3'd1;
          if (widx == 3'd7) begin
            first <= 1'b0;
            state <= K_NEXT;
          end
        end
        K_NEXT: begin
          if (pending && load_last) begin
            // a loaded last block: process it now as the final block
            pending   <= 1'b0;
            load_last <= 1'b0;
            pos       <= pos + 64'(pend_bytes);
            start_block(1'b1, T_MSG, pos + 64'(pend_bytes), pend_bitpad);
          end else if (outph) begin
            state <= K_OUT;
          end else if (is_final) begin
            // the temporary RAM is cleared in this cycle for the output block
            outph <= 1'b1;
            first <= 1'b1;
            state <= K_OSTART;
          end else begin
            state <= K_IDLE;
          end
        end
        K_OSTART: start_block(1'b1, T_OUT, 64'd8, 1'b0);
        K_OUT: if (!tx_busy) begin
          for (int i = 0; i < 8; i++) k[i] <= IV[i];
          pos    <= '0;
          first  <= 1'b1;
          outph  <= 1'b0;
          is_final <= 1'b0;
          state  <= K_IDLE;
        end
        default: state <= K_IDLE;
      endcase
    end
  end
endmodule
