// FSL slave front end shared by the three hash units. It reads one framed
// message block from a Fast Simplex Link: first the 32-bit length word, then
// 16 data words, packed big-endian into a 512-bit buffer (bit 511 is the first
// message bit). When all 17 words are in, blk_valid is raised and held until
// the hash unit takes the block with blk_ready; only then is the next length
// word read. s_read is asserted only while s_exists is high, one word per
// cycle, so a full block arrives in 17 cycles when the link never runs dry.
// The framing (length word then 16 words) follows the interface description;
// the valid/ready hand-off to the hash unit is this design's own choice.
module fsl_block_rx (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [31:0]  s_data,
  input  logic         s_exists,
  output logic         s_read,
  output logic         blk_valid,
  input  logic         blk_ready,
  output logic [511:0] blk_data,
  output logic [31:0]  blk_len
);
  typedef enum logic [1:0] {RX_LEN, RX_DATA, RX_FULL} rx_state_e;
  rx_state_e   state;
  logic [3:0]  cnt;

  assign s_read    = s_exists && (state != RX_FULL);
  assign blk_valid = (state == RX_FULL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= RX_LEN;
      cnt      <= '0;
      blk_len  <= '0;
      blk_data <= '0;
    end else begin
      unique case (state)
        RX_LEN: if (s_exists) begin
          blk_len <= s_data;
          cnt     <= '0;
          state   <= RX_DATA;
        end
        RX_DATA: if (s_exists) begin
          blk_data <= {blk_data[479:0], s_data};
          cnt      <= cnt + 4'd1;
          if (cnt == 4'd15) state <= RX_FULL;
        end
        RX_FULL: if (blk_ready) state <= RX_LEN;
        default: state <= RX_LEN;
      endcase
    end
  end

  // A length word above 512 is outside the framing.
  a_len_range: assert property (@(posedge clk) disable iff (!rst_n)
                                blk_valid |-> blk_len <= 32'd512);
endmodule
