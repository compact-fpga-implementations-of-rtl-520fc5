// Three compact SHA-3 round-3 hash units side by side: Grostl-256 (64-bit
// datapath, 160 cycles per block), JH-256 (8-bit datapath, 6720 cycles per
// block) and Skein-512-256 (64-bit datapath, 576 cycles per block). They share
// nothing but the clock and reset; each has its own Fast Simplex Link pair
// with the same framing (a 32-bit length word, then 16 big-endian 32-bit data
// words per 512-bit block; a length below 512 ends the message) and returns
// its 256-bit digest as 8 words on its master link. Putting all three behind
// one identical interface follows the reference design; placing them in one top
// module is this design's choice.
module sha3_compact_top (
  input  logic        clk,
  input  logic        rst_n,
  // Grostl-256
  input  logic [31:0] grostl_s_data,
  input  logic        grostl_s_exists,
  output logic        grostl_s_read,
  output logic [31:0] grostl_m_data,
  output logic        grostl_m_write,
  input  logic        grostl_m_full,
  // JH-256
  input  logic [31:0] jh_s_data,
  input  logic        jh_s_exists,
  output logic        jh_s_read,
  output logic [31:0] jh_m_data,
  output logic        jh_m_write,
  input  logic        jh_m_full,
  // Skein-512-256
  input  logic [31:0] skein_s_data,
  input  logic        skein_s_exists,
  output logic        skein_s_read,
  output logic [31:0] skein_m_data,
  output logic        skein_m_write,
  input  logic        skein_m_full
);
  grostl256 u_grostl (
    .clk, .rst_n,
    .s_data(grostl_s_data), .s_exists(grostl_s_exists), .s_read(grostl_s_read),
    .m_data(grostl_m_data), .m_write(grostl_m_write), .m_full(grostl_m_full)
  );

  jh256 u_jh (
    .clk, .rst_n,
    .s_data(jh_s_data), .s_exists(jh_s_exists), .s_read(jh_s_read),
    .m_data(jh_m_data), .m_write(jh_m_write), .m_full(jh_m_full)
  );

  skein512_256 u_skein (
    .clk, .rst_n,
    .s_data(skein_s_data), .s_exists(skein_s_exists), .s_read(skein_s_read),
    .m_data(skein_m_data), .m_write(skein_m_write), .m_full(skein_m_full)
  );
endmodule
