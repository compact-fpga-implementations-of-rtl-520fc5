// FSL master back end shared by the three hash units. A one-cycle start pulse
// captures a 256-bit digest; the unit then writes it as 8 words, first digest
// byte in bits 31:24 of the first word. A word is written in every cycle in
// which the link's FIFO is not full (m_write is never raised while m_full is
// high), so the digest leaves in 8 cycles on an empty FIFO. busy stays high
// until the last word is written. The word order is this design's choice;
// the reference design only names the master's data, write and FIFO-full signals.
module fsl_digest_tx (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [255:0] digest,
  output logic         busy,
  output logic [31:0]  m_data,
  output logic         m_write,
  input  logic         m_full
);
  logic [255:0] sh;
  logic [2:0]   cnt;

  assign m_data  = sh[255:224];
  assign m_write = busy && !m_full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      sh   <= '0;
    end else if (start && !busy) begin
      busy <= 1'b1;
      cnt  <= '0;
      sh   <= digest;
    end else if (m_write) begin
      sh  <= {sh[223:0], 32'h0};
      cnt <= cnt + 3'd1;
      if (cnt == 3'd7) busy <= 1'b0;
    end
  end

  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
                                         m_full |-> !m_write);
endmodule
