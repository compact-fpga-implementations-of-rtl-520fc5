// End-to-end test of the whole design at its default parameters: the three
// hash units run at the same time, each hashing the same three messages (448,
// 700 and 1024 bits) sent over its own FSL link with random gaps, while its
// output FIFO is randomly full. Expected digests come from independent
// software models of Grostl-256, JH-256 and Skein-512-256. The test also
// checks the permutation cycle counts (160 per Grostl compression, 6720 per
// JH compression, 576 per Skein block) and counts how often each mechanism
// occurred: input gaps, output back-pressure, Grostl's and JH's extra padding
// block, Grostl and JH loading a block while compressing, a Skein full block
// held back and made final by an empty block, and Skein bit padding. A
// mechanism that never occurred is a failure.
module tb_sha3_compact_top;
  localparam int NMSG = 3;
  localparam int LENS [NMSG] = '{448, 700, 1024};
  localparam int SEED [NMSG] = '{3, 5, 6};
  localparam logic [255:0] EXP [3][NMSG] = '{
    '{256'h5b89a4efc90456c4d75bef6e9ef268be349596b92c7e612152c6f561b476a58b,
      256'h3241b8587f6344f8d096ed162c5cb01a35f6e5564f36575f755bb21df82df6ab,
      256'h3d8e3cbabd3160718b6481eaadbaa79e7df9398474c368ca6dfb7d86c9e2d78d},
    '{256'h12e5643076575add3fb1a075cc6f513bf9ba93eac396b52d417c93d9db081309,
      256'h2f42d559c06fdaf2156691e75c024bd150b447fd896d239dd0a445a363a8afb6,
      256'hff66a694310ecf88ab60375b7ed06f14c5e31d9bb73d0f538bc6c19db39ea4d8},
    '{256'hdbea1a16305399fbb41440a9bdb6344764bf3bd67b6460986c3182f650d2c4fa,
      256'hd971bf36d0db961ba366182f74a1a347a04f1b4f8be8abd9cb71bf7547abc5ea,
      256'h233348e48b7cbff044a67a16500009f68bb89613ccc350160b20933365530131}};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] s_data [3], m_data [3];
  logic        s_exists [3], s_read [3], m_write [3], m_full [3];

  sha3_compact_top dut (
    .clk, .rst_n,
    .grostl_s_data(s_data[0]), .grostl_s_exists(s_exists[0]), .grostl_s_read(s_read[0]),
    .grostl_m_data(m_data[0]), .grostl_m_write(m_write[0]), .grostl_m_full(m_full[0]),
    .jh_s_data(s_data[1]), .jh_s_exists(s_exists[1]), .jh_s_read(s_read[1]),
    .jh_m_data(m_data[1]), .jh_m_write(m_write[1]), .jh_m_full(m_full[1]),
    .skein_s_data(s_data[2]), .skein_s_exists(s_exists[2]), .skein_s_read(s_read[2]),
    .skein_m_data(m_data[2]), .skein_m_write(m_write[2]), .skein_m_full(m_full[2])
  );

  int checks = 0, failures = 0;
  int stalls_in = 0, stalls_out = 0, g_extra = 0, j_extra = 0, s_held = 0, s_bitpad = 0, j_overlap = 0, g_overlap = 0;
  int g_cyc = 0, j_cyc = 0, s_cyc = 0;
  int done [3] = '{0, 0, 0};

  function automatic logic [7:0] mbyte(int k, int seed);
    return 8'((k * 37 + seed * 11 + 5));
  endfunction

  logic [31:0] q [3][$];
  logic        src_en [3];
  for (genvar u = 0; u < 3; u++) begin : g_src
    assign s_exists[u] = (q[u].size() != 0) && src_en[u];
    assign s_data[u]   = (q[u].size() != 0) ? q[u][0] : 32'h0;
  end

  always_ff @(posedge clk) begin
    for (int u = 0; u < 3; u++) begin
      src_en[u] <= ($urandom_range(0, 3) != 0);
      m_full[u] <= ($urandom_range(0, 3) == 0);
      if (s_read[u]) void'(q[u].pop_front());
      if (q[u].size() != 0 && !src_en[u]) stalls_in++;
      if (m_full[u]) stalls_out++;
    end
    if (rst_n && dut.u_grostl.issue) g_cyc++;
    if (rst_n && dut.u_jh.issue) j_cyc++;
    if (rst_n && dut.u_skein.issue) s_cyc++;
    if (dut.u_grostl.ld_state == dut.u_grostl.L_LOAD && dut.u_grostl.kind == sha3_pkg::BLK_EXTRA
        && dut.u_grostl.widx == 0) g_extra++;
    if (dut.u_jh.ld_state == dut.u_jh.L_LOAD && dut.u_jh.kind == sha3_pkg::BLK_EXTRA
        && dut.u_jh.bidx == 0) j_extra++;
    if (dut.u_jh.ld_state == dut.u_jh.L_LOAD && dut.u_jh.state == dut.u_jh.J_RUN) j_overlap++;
    if (dut.u_grostl.ld_state == dut.u_grostl.L_LOAD && dut.u_grostl.state == dut.u_grostl.G_RUN) g_overlap++;
    if (dut.u_skein.blk_ready && dut.u_skein.drop_empty) s_held++;
    if (dut.u_skein.state == dut.u_skein.K_RUN && dut.u_skein.cnt == 0 && dut.u_skein.t1[55]) s_bitpad++;
  end

  task automatic send_msg(int u, int L, int seed);
    int nfr = L / 512 + 1;
    for (int b = 0; b < nfr; b++) begin
      q[u].push_back(32'((b == nfr - 1) ? L % 512 : 512));
      for (int w = 0; w < 16; w++)
        q[u].push_back({mbyte(64*b + 4*w, seed), mbyte(64*b + 4*w + 1, seed),
                        mbyte(64*b + 4*w + 2, seed), mbyte(64*b + 4*w + 3, seed)});
    end
  endtask

  task automatic collect(int u);
    for (int i = 0; i < NMSG; i++) begin
      logic [255:0] got;
      for (int w = 0; w < 8; w++) begin
        do @(posedge clk); while (!m_write[u]);
        got = {got[223:0], m_data[u]};
      end
      checks++;
      if (got !== EXP[u][i]) begin
        failures++;
        $display("FAIL unit %0d msg %0d: got %h exp %h", u, i, got, EXP[u][i]);
      end
    end
    done[u] = 1;
  endtask

  initial begin
    automatic int g_nb = 0, j_nb = 0, s_nb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NMSG; i++) begin
      for (int u = 0; u < 3; u++) send_msg(u, LENS[i], SEED[i]);
      g_nb += (LENS[i] + 65 + 511) / 512 + 1;
      j_nb += 1 + LENS[i] / 512 + ((LENS[i] % 512 != 0) ? 2 : 1);
      s_nb += (LENS[i] + 511) / 512 + 1;
    end
    fork
      collect(0);
      collect(1);
      collect(2);
    join
    repeat (4) @(posedge clk);
    checks += 3;
    if (g_cyc != 160 * g_nb) begin failures++; $display("FAIL Grostl %0d cycles, exp %0d", g_cyc, 160 * g_nb); end
    if (j_cyc != 6720 * j_nb) begin failures++; $display("FAIL JH %0d cycles, exp %0d", j_cyc, 6720 * j_nb); end
    if (s_cyc != 576 * s_nb) begin failures++; $display("FAIL Skein %0d cycles, exp %0d", s_cyc, 576 * s_nb); end
    $display("input gaps %0d, output full %0d, Grostl extra blocks %0d, JH extra blocks %0d, Grostl load/compress overlap %0d, JH load/compress overlap %0d, Skein held blocks %0d, Skein bit padding %0d",
             stalls_in, stalls_out, g_extra, j_extra, g_overlap, j_overlap, s_held, s_bitpad);
    checks++;
    if (stalls_in == 0 || stalls_out == 0 || g_extra == 0 || j_extra == 0 || j_overlap == 0 || g_overlap == 0 || s_held == 0 || s_bitpad == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: done %0d %0d %0d", done[0], done[1], done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
