// Compact Grostl-256 hash unit with a 64-bit datapath.
//
// The compression function f(h,m) = P(h^m) ^ Q(m) ^ h runs on one shared,
// pipelined round slice (grostl_round). P and Q live in row-organised
// distributed RAMs: eight byte-wide RAMs per permutation, one per row, so that
// ShiftBytes is just a different read address for each row. Each RAM is
// double-buffered: round r reads bank r%2 and writes bank (r+1)%2. Within a
// round the 8 Q columns are issued, then the 8 P columns, one per cycle, so a
// compression issues 10 x 2 x 8 = 160 columns back to back; because the slice
// latency (2) is below 8, neither permutation ever waits for its previous
// round.
//
// Loading, the chaining update and the slice latency are all hidden, so
// compressions follow each other every 160 cycles:
// - a small loader pads the next block into a 64-byte message RAM (one 64-bit
//   column per cycle) while the current block is being permuted; the message
//   RAM is free again once round 0 has read it;
// - the update h ^= P ^ Q is not a separate step. Round 0 of the next
//   compression reads m ^ h ^ P ^ Q straight out of the RAMs (the previous
//   results still sit in bank 0), and h itself is rewritten in the cycle after
//   the last P column of round 0 has been read;
// - Q's round 0 needs only the message, so it goes first; by the time P's
//   round 0 reads the previous results, the last of them has been written.
// After the last block (and the extra padding block when the length field
// does not fit) the output transformation trunc256(P(h)^h) runs the same
// schedule with no message; Q's result is discarded. After a 2-cycle drain the
// digest (bytes 32..63 of P(h)^h) is sent on the FSL master link.
//
// Interface: FSL slave in (length word + 16 words per block), FSL master out
// (8 digest words). The shared P/Q hardware, the RAMs for P, Q and h, the
// 64-bit datapath and the 160-cycle count follow the reference design; the bank
// scheme, the issue order, the message RAM, the way the update is folded into
// round 0 and the output schedule are this design's choices.
module grostl256
  import sha3_pkg::*;
#(
  parameter int unsigned ROUNDS = 10
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
  localparam logic [63:0] IV7 = 64'h0000_0000_0000_0100;  // 256 in the last bytes
  localparam int unsigned RUN_CYCLES = ROUNDS * 16;

  typedef enum logic [1:0] {G_IDLE, G_RUN, G_DRAIN, G_OUT} g_state_e;
  typedef enum logic [1:0] {L_IDLE, L_LOAD, L_FULL} l_state_e;
  g_state_e state;
  l_state_e ld_state;

  // block input
  logic         blk_valid, blk_ready;
  logic [511:0] blk_data;
  logic [31:0]  blk_len;

  fsl_block_rx u_rx (
    .clk, .rst_n, .s_data, .s_exists, .s_read,
    .blk_valid, .blk_ready, .blk_data, .blk_len
  );

  // digest output
  logic         tx_start, tx_busy;
  logic [255:0] digest;

  fsl_digest_tx u_tx (
    .clk, .rst_n, .start(tx_start), .digest, .busy(tx_busy),
    .m_data, .m_write, .m_full
  );

  // storage
  logic [63:0] h [8];
  logic [7:0]  pq [2][2][8][8];   // [perm Q][bank][row][column]
  logic [7:0]  mr [8][8];         // message RAM [row][column]
  logic        h_pend;            // h ^= P ^ Q of bank 0 still to be applied
  logic        outph;             // output transformation in progress
  logic        cur_final;         // the running block is the message's last
  logic [7:0]  cnt;
  logic [1:0]  dcnt;

  // loader
  blk_kind_e   kind;
  logic [8:0]  len;
  logic [63:0] ld_blocks;         // blocks of this message loaded so far
  logic [2:0]  widx;
  logic        ld_final, ld_extra, ld_done;

  // padding of the word being loaded
  logic [63:0] count_field, pad_out;
  always_comb begin
    if (kind == BLK_LAST) count_field = ld_blocks + ((len > 9'd447) ? 64'd2 : 64'd1);
    else                  count_field = ld_blocks + 64'd1;
  end

  grostl_pad u_pad (
    .word_in (blk_data[511 - 64*widx -: 64]),
    .word_idx(widx),
    .kind    (kind),
    .len     (len),
    .nblocks (count_field),
    .word_out(pad_out)
  );

  // round issue: column j of permutation q in round rnd
  logic [3:0]  rnd;
  logic        isq;
  logic [2:0]  jcol;
  logic [63:0] gather;
  logic        issue;

  assign rnd   = 4'(cnt >> 4);
  assign isq   = ~cnt[3];         // Q columns first, then P
  assign jcol  = cnt[2:0];
  assign issue = (state == G_RUN);

  function automatic logic [2:0] shift_of(input logic q, input int unsigned row);
    if (!q) return 3'(row);
    return (row < 4) ? 3'(2*row + 1) : 3'(2*(row - 4));
  endfunction

  // Round 0 builds its input from the message RAM, h and (when an update is
  // pending) the previous results; later rounds read the bank of the round.
  always_comb begin
    for (int unsigned r = 0; r < 8; r++) begin
      logic [2:0] c;
      logic [7:0] hb, mb;
      c  = 3'(jcol + shift_of(isq, r));
      hb = h[c][63-8*r -: 8] ^ (h_pend ? (pq[0][0][r][c] ^ pq[1][0][r][c]) : 8'h00);
      mb = outph ? 8'h00 : mr[r][c];
      if (rnd == 4'd0) gather[63-8*r -: 8] = isq ? mb : (mb ^ hb);
      else             gather[63-8*r -: 8] = pq[isq][rnd[0]][r][c];
    end
  end

  logic        o_valid, o_q;
  logic [63:0] o_col;
  logic [3:0]  o_rnd;
  logic [2:0]  o_j;

  grostl_round u_round (
    .clk, .rst_n,
    .in_valid(issue), .in_col(gather), .in_q(isq), .in_rnd(rnd), .in_j(jcol),
    .out_valid(o_valid), .out_col(o_col), .out_q(o_q), .out_rnd(o_rnd), .out_j(o_j)
  );

  // digest = bytes 32..63 of P(h) ^ h = columns 4..7
  always_comb begin
    for (int c = 4; c < 8; c++) begin
      logic [63:0] pc;
      for (int r = 0; r < 8; r++) pc[63-8*r -: 8] = pq[0][0][r][c];
      digest[255 - 64*(c-4) -: 64] = pc ^ h[c];
    end
  end

  assign blk_ready = (ld_state == L_LOAD) && (kind != BLK_EXTRA) && (widx == 3'd7);
  assign tx_start  = (state == G_OUT) && !tx_busy;

  // RAM writes (message load and round write-back)
  always_ff @(posedge clk) begin
    if (ld_state == L_LOAD)
      for (int r = 0; r < 8; r++) mr[r][widx] <= pad_out[63-8*r -: 8];
    if (o_valid)
      for (int r = 0; r < 8; r++) pq[o_q][~o_rnd[0]][r][o_j] <= o_col[63-8*r -: 8];
  end

  // only the low bit of the round number picks the bank; the round itself stays below 10
  a_rnd_range: assert property (@(posedge clk) disable iff (!rst_n) !o_valid || o_rnd < 4'd10)
    else $error("grostl256: round number out of range");

  // loader: fills the message RAM while the permutations run
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ld_state  <= L_IDLE;
      kind      <= BLK_FULL;
      len       <= '0;
      widx      <= '0;
      ld_blocks <= '0;
      ld_final  <= 1'b0;
      ld_extra  <= 1'b0;
      ld_done   <= 1'b0;
    end else begin
      unique case (ld_state)
        L_IDLE: if (!ld_done) begin
          widx <= '0;
          if (ld_extra) begin
            kind     <= BLK_EXTRA;
            ld_extra <= 1'b0;
            ld_state <= L_LOAD;
          end else if (blk_valid) begin
            kind     <= (blk_len >= 32'd512) ? BLK_FULL : BLK_LAST;
            len      <= blk_len[8:0];
            ld_state <= L_LOAD;
          end
        end
        L_LOAD: begin
          widx <= widx + 3'd1;
          if (widx == 3'd7) begin
            ld_blocks <= ld_blocks + 64'd1;
            ld_final  <= (kind == BLK_EXTRA) || (kind == BLK_LAST && len <= 9'd447);
            ld_extra  <= (kind == BLK_LAST) && (len > 9'd447);
            ld_done   <= (kind == BLK_EXTRA) || (kind == BLK_LAST && len <= 9'd447);
            ld_state  <= L_FULL;
          end
        end
        L_FULL: if (state == G_RUN && !outph && cnt == 8'd15) ld_state <= L_IDLE;
        default: ld_state <= L_IDLE;
      endcase
      if (state == G_OUT && !tx_busy) begin
        ld_blocks <= '0;
        ld_done   <= 1'b0;
      end
    end
  end

  // permutation schedule
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= G_IDLE;
      outph     <= 1'b0;
      cur_final <= 1'b0;
      h_pend    <= 1'b0;
      cnt       <= '0;
      dcnt      <= '0;
      for (int c = 0; c < 8; c++) h[c] <= (c == 7) ? IV7 : 64'h0;
    end else begin
      unique case (state)
        G_IDLE: if (ld_state == L_FULL) begin
          cur_final <= ld_final;
          cnt       <= '0;
          state     <= G_RUN;
        end
        G_RUN: begin
          cnt <= cnt + 8'd1;
          if (cnt == 8'd16 && h_pend) begin
            for (int c = 0; c < 8; c++) begin
              logic [63:0] pc, qc;
              for (int r = 0; r < 8; r++) begin
                pc[63-8*r -: 8] = pq[0][0][r][c];
                qc[63-8*r -: 8] = pq[1][0][r][c];
              end
              h[c] <= h[c] ^ pc ^ qc;
            end
            h_pend <= 1'b0;
          end
          if (cnt == 8'(RUN_CYCLES - 1)) begin
            cnt <= '0;
            if (outph) begin
              dcnt  <= '0;
              state <= G_DRAIN;
            end else begin
              // the next compression may start at once: its P columns of
              // round 0 come after its Q columns, when all results are in
              h_pend <= 1'b1;
              if (cur_final) begin
                outph <= 1'b1;
              end else if (ld_state == L_FULL) begin
                cur_final <= ld_final;
              end else begin
                state <= G_IDLE;
              end
            end
          end
        end
        G_DRAIN: begin
          // the digest is read only when the last P columns have been written
          dcnt <= dcnt + 2'd1;
          if (dcnt == 2'd1) state <= G_OUT;
        end
        G_OUT: if (!tx_busy) begin
          outph  <= 1'b0;
          h_pend <= 1'b0;
          for (int c = 0; c < 8; c++) h[c] <= (c == 7) ? IV7 : 64'h0;
          state  <= G_IDLE;
        end
        default: state <= G_IDLE;
      endcase
    end
  end
endmodule
