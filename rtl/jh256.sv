// Compact JH-256 hash unit with an 8-bit datapath.
//
// The 1024-bit state is kept in grouped form: 256 four-bit elements, where
// element 2i holds state bits (i, i+256, i+512, i+768) and element 2i+1 holds
// bits (i+128, i+384, i+640, i+896). In that form one JH round is 128 byte
// operations: elements 2k and 2k+1 are read, pass through the S-box/L core
// (jh_core), and the JH permutation layer is done purely by the write
// addresses: the two results go to elements k and (k+128)^1, with the pair
// order swapped for odd k. The 256-bit round constant is stored the same way
// (64 elements) and updated by the same core with 32 further operations per
// round (write addresses k and (k+32)^1). One round is therefore 160 cycles
// and a 42-round compression 6720 cycles. State and constants are
// double-buffered: round r reads bank r%2 and writes bank (r+1)%2.
//
// Message blocks are written into the input RAM (64 bytes) through jh_pad, one
// byte per cycle, by a loader that runs alongside the compression. When a
// compression starts, the block is copied to the temporary RAM and the input
// RAM is free for the next block, so loading costs no time in a long message.
// The block's first half is XORed into the state while round 0 reads it, its
// second half while round 41 writes its result, so no separate message pass
// is needed. At the start of each message the unit first compresses a
// zero block into H(-1) = 0x0100 0...0 to form the JH-256 initial value. The
// digest is the last 256 state bits, read directly out of the grouped state.
//
// Interface: FSL slave in, FSL master out. The 8-bit datapath, the shared
// core for state and constants, the permutation by write addresses, the
// 160-cycle round and 6720-cycle compression follow the reference design; the banked
// RAMs, the in-place message XORs, the whole-block copy into the temporary
// RAM and the on-line initial value are this design's choices. A new block
// starts two cycles after the previous compression ends (6722 cycles per
// block in a long message).
module jh256
  import sha3_pkg::*;
#(
  parameter int unsigned ROUNDS = 42
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
  localparam logic [255:0] RC0 = 256'h6a09e667f3bcc908b2fb1366ea957d3e3adec17512775099da2f590b0667322a;

  typedef enum logic [1:0] {J_IDLE, J_RUN, J_DRAIN, J_OUT} j_state_e;
  typedef enum logic [1:0] {L_IDLE, L_LOAD, L_FULL} l_state_e;
  j_state_e state;      // compression side
  l_state_e ld_state;   // input-RAM loader

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

  logic [3:0] st [2][256];   // state RAM, [bank][element]
  logic [3:0] cr [2][64];    // constants RAM, [bank][element]
  logic [7:0] mb [64];       // input RAM, message bytes being loaded
  logic [7:0] tm [64];       // temporary RAM, message of the running compression

  blk_kind_e   kind;
  logic [8:0]  len;
  logic [63:0] total_bits;
  logic        inmsg;         // a message is being hashed
  logic        ld_final;      // the block in the input RAM is the last one
  logic        ld_extra;      // an extra padding block must still be loaded
  logic        ld_done;       // the last block has been loaded
  logic        cur_final;     // the running compression is the last one
  logic [5:0]  bidx;
  logic [5:0]  rnd;
  logic [7:0]  ph;

  // message bit b of the running compression's block, bit 0 first
  function automatic logic mbit(input logic [8:0] b);
    return tm[b[8:3]][3'd7 - b[2:0]];
  endfunction

  // padding of the byte being loaded
  logic [7:0] pad_out;
  jh_pad u_pad (
    .byte_in (blk_data[511 - 8*bidx -: 8]),
    .byte_idx(bidx),
    .kind    (kind),
    .len     (len),
    .msg_bits(total_bits + 64'(len)),
    .byte_out(pad_out)
  );

  // read side of the core
  logic       rb, issue, is_c;
  logic [6:0] k;
  logic [3:0] ra, rbn;
  logic       sa, sb;

  assign rb    = rnd[0];
  assign issue = (state == J_RUN);
  assign is_c  = (ph >= 8'd128);
  assign k     = is_c ? 7'(ph - 8'd128) : ph[6:0];

  always_comb begin
    if (is_c) begin
      ra = cr[rb][{k[4:0], 1'b0}];
      rbn = cr[rb][{k[4:0], 1'b1}];
      sa = 1'b0;
      sb = 1'b0;
    end else begin
      ra  = st[rb][{k, 1'b0}];
      rbn = st[rb][{k, 1'b1}];
      if (rnd == 6'd0) begin
        ra  ^= {mbit(9'(k)),          mbit(9'(k) + 9'd256), 2'b00};
        rbn ^= {mbit(9'(k) + 9'd128), mbit(9'(k) + 9'd384), 2'b00};
      end
      // round-constant bits 2k and 2k+1
      sa = cr[rb][k[6:1]][k[0] ? 1 : 3];
      sb = cr[rb][k[6:1]][k[0] ? 0 : 2];
    end
  end

  logic       o_valid;
  logic [3:0] ya, yb;
  logic       o_c, o_last;
  logic [6:0] o_k;
  logic       o_wb;

  jh_core u_core (
    .clk, .rst_n, .in_valid(issue), .a(ra), .b(rbn), .sel_a(sa), .sel_b(sb),
    .out_valid(o_valid), .ya, .yb
  );

  always_ff @(posedge clk) begin
    o_c    <= is_c;
    o_k    <= k;
    o_wb   <= ~rb;
    o_last <= (rnd == 6'(ROUNDS - 1));
  end

  // write-back addresses of the permutation layer
  logic [7:0] d_lo, d_hi;      // state destinations
  logic [5:0] c_lo, c_hi;      // constant destinations
  logic [3:0] w_lo, w_hi;      // values written to d_lo / d_hi
  always_comb begin
    d_lo = {1'b0, o_k};
    d_hi = {1'b1, o_k} ^ 8'd1;
    c_lo = {1'b0, o_k[4:0]};
    c_hi = {1'b1, o_k[4:0]} ^ 6'd1;
    w_lo = o_k[0] ? yb : ya;
    w_hi = o_k[0] ? ya : yb;
    if (!o_c && o_last) begin
      // second message half into state bits 512..1023 of each element
      w_lo ^= {2'b00, mbit(9'(d_lo[7:1]) + (d_lo[0] ? 9'd128 : 9'd0)),
                      mbit(9'(d_lo[7:1]) + (d_lo[0] ? 9'd384 : 9'd256))};
      w_hi ^= {2'b00, mbit(9'(d_hi[7:1]) + (d_hi[0] ? 9'd128 : 9'd0)),
                      mbit(9'(d_hi[7:1]) + (d_hi[0] ? 9'd384 : 9'd256))};
    end
  end

  // digest: state bits 768..1023, bit 0 of every element
  always_comb begin
    for (int i = 0; i < 256; i++)
      digest[255 - i] = st[0][(i < 128) ? 2*i : 2*(i - 128) + 1][0];
  end

  logic start_iv, start_blk;
  assign start_iv  = (state == J_IDLE) && !inmsg && blk_valid;
  assign start_blk = (state == J_IDLE) && inmsg && (ld_state == L_FULL);
  assign blk_ready = (ld_state == L_LOAD) && (kind != BLK_EXTRA) && (bidx == 6'd63);
  assign tx_start  = (state == J_OUT) && !tx_busy;

  // RAM writes
  always_ff @(posedge clk) begin
    if (start_iv) begin
      // H(-1): first two bytes 0x01 0x00, i.e. only state bit 7 set; zero message
      for (int e = 0; e < 256; e++) st[0][e] <= (e == 14) ? 4'b1000 : 4'b0000;
      for (int i = 0; i < 64; i++) tm[i] <= 8'h00;
    end
    if (start_blk)
      for (int i = 0; i < 64; i++) tm[i] <= mb[i];
    if (ld_state == L_LOAD) mb[bidx] <= pad_out;
    if (start_iv || start_blk)
      for (int e = 0; e < 64; e++) cr[0][e] <= RC0[255 - 4*e -: 4];
    if (o_valid) begin
      if (o_c) begin
        cr[o_wb][c_lo] <= w_lo;
        cr[o_wb][c_hi] <= w_hi;
      end else begin
        st[o_wb][d_lo] <= w_lo;
        st[o_wb][d_hi] <= w_hi;
      end
    end
  end

  // loader: fills the input RAM through the padding unit, also while a
  // compression runs, until the last (or extra) block of the message is in
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ld_state   <= L_IDLE;
      kind       <= BLK_FULL;
      len        <= '0;
      total_bits <= '0;
      bidx       <= '0;
      ld_final   <= 1'b0;
      ld_extra   <= 1'b0;
      ld_done    <= 1'b0;
    end else begin
      unique case (ld_state)
        L_IDLE: if (inmsg && !ld_done) begin
          bidx <= '0;
          if (ld_extra) begin
            kind     <= BLK_EXTRA;
            ld_state <= L_LOAD;
          end else if (blk_valid) begin
            kind     <= (blk_len >= 32'd512) ? BLK_FULL : BLK_LAST;
            len      <= blk_len[8:0];
            ld_state <= L_LOAD;
          end
        end
        L_LOAD: begin
          bidx <= bidx + 6'd1;
          if (bidx == 6'd63) begin
            if (kind == BLK_FULL) total_bits <= total_bits + 64'd512;
            ld_final <= (kind == BLK_EXTRA) || (kind == BLK_LAST && len == 9'd0);
            ld_extra <= (kind == BLK_LAST && len != 9'd0);
            ld_done  <= (kind == BLK_EXTRA) || (kind == BLK_LAST && len == 9'd0);
            ld_state <= L_FULL;
          end
        end
        L_FULL: if (start_blk) ld_state <= L_IDLE;
        default: ld_state <= L_IDLE;
      endcase
      if (state == J_OUT && !tx_busy) begin
        total_bits <= '0;
        ld_done    <= 1'b0;
        ld_extra   <= 1'b0;
      end
    end
  end

  // compression side
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= J_IDLE;
      inmsg     <= 1'b0;
      cur_final <= 1'b0;
      rnd       <= '0;
      ph        <= '0;
    end else begin
      unique case (state)
        J_IDLE: if (start_iv || start_blk) begin
          inmsg     <= 1'b1;
          cur_final <= start_blk && ld_final;
          rnd       <= '0;
          ph        <= '0;
          state     <= J_RUN;
        end
        J_RUN: begin
          if (ph == 8'd159) begin
            ph  <= '0;
            rnd <= rnd + 6'd1;
            if (rnd == 6'(ROUNDS - 1)) state <= J_DRAIN;
          end else begin
            ph <= ph + 8'd1;
          end
        end
        J_DRAIN: state <= cur_final ? J_OUT : J_IDLE;
        J_OUT: if (!tx_busy) begin
          inmsg <= 1'b0;
          state <= J_IDLE;
        end
        default: state <= J_IDLE;
      endcase
    end
  end
endmodule
