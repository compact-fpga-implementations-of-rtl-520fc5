// Long-message throughput test of the whole design at its default parameters.
// Each hash unit receives one 8192-bit message (16 full blocks, then the
// empty last block) over a link that never pauses, and its output link is
// never full, so the units run at their best sustained rate. The test checks
// the three digests against independent software models, and checks the
// number of cycles between the starts of consecutive message-block
// compressions in the middle of the message:
//   Grostl  160 = the permutation cycles alone (loading, the chaining
//                 update and the round slice's latency are all hidden);
//   JH     6722 = 42 rounds x 160 + 2 (loading is hidden);
//   Skein   599 = 72 rounds x 8 + 3 drain + 8 final key addition + 8 load
//                 + 4 control (a held block starts two cycles after the
//                 next length word has been read; loading is not
//                 overlapped, because the temporary RAM is in use until
//                 the final key addition).
// It then prints the throughput these counts give at the clock rates
// published for the reference implementation, next to the published figures.
module tb_throughput;
  localparam int NBLK = 16;
  localparam int SEED = 9;
  localparam logic [255:0] EXP [3] = '{
    256'h0fa0ab0075c26677ab842bf0c57da1688de1b3647f684bab85ea271aa967df4e,
    256'h4069e920da4f206cbe7d91de4de547793b20ac8f46f82774d5896a76cf4bd8b5,
    256'h5729cb4bd80e30589f946e3886d382afe4773b368586decb9bc1ee22e7a1c8dd};
  localparam int    PERIOD [3] = '{160, 6722, 599};
  localparam string NAME   [3] = '{"Grostl-256", "JH-256", "Skein-512-256"};
  localparam real   PUB_MHZ  [3] = '{354.0, 341.0, 271.0};
  localparam real   PUB_MBPS [3] = '{1132.0, 27.0, 237.0};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] s_data [3], m_data [3];
  logic        s_exists [3], s_read [3], m_write [3];
  logic        m_full [3] = '{1'b0, 1'b0, 1'b0};

  sha3_compact_top dut (
    .clk, .rst_n,
    .grostl_s_data(s_data[0]), .grostl_s_exists(s_exists[0]), .grostl_s_read(s_read[0]),
    .grostl_m_data(m_data[0]), .grostl_m_write(m_write[0]), .grostl_m_full(m_full[0]),
    .jh_s_data(s_data[1]), .jh_s_exists(s_exists[1]), .jh_s_read(s_read[1]),
    .jh_m_data(m_data[1]), .jh_m_write(m_write[1]), .jh_m_full(m_full[1]),
    .skein_s_data(s_data[2]), .skein_s_exists(s_exists[2]), .skein_s_read(s_read[2]),
    .skein_m_data(m_data[2]), .skein_m_write(m_write[2]), .skein_m_full(m_full[2])
  );

  int checks = 0, failures = 0, cyc = 0;
  int starts [3][$];
  logic jh_was_run = 1'b0;

  function automatic logic [7:0] mbyte(int k, int seed);
    return 8'((k * 37 + seed * 11 + 5));
  endfunction

  logic [31:0] q [3][$];
  for (genvar u = 0; u < 3; u++) begin : g_src
    assign s_exists[u] = (q[u].size() != 0);
    assign s_data[u]   = (q[u].size() != 0) ? q[u][0] : 32'h0;
  end

  // record the first cycle of every compression
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    for (int u = 0; u < 3; u++)
      if (s_read[u]) void'(q[u].pop_front());
    if (rst_n) begin
      if (dut.u_grostl.issue && dut.u_grostl.cnt == 8'd0) starts[0].push_back(cyc);
      if (dut.u_jh.state == dut.u_jh.J_RUN && !jh_was_run) starts[1].push_back(cyc);
      if (dut.u_skein.issue && dut.u_skein.cnt == 10'd0) starts[2].push_back(cyc);
      jh_was_run <= (dut.u_jh.state == dut.u_jh.J_RUN);
    end
  end

  task automatic collect(int u);
    logic [255:0] got;
    for (int w = 0; w < 8; w++) begin
      do @(posedge clk); while (!m_write[u]);
      got = {got[223:0], m_data[u]};
    end
    checks++;
    if (got !== EXP[u]) begin
      failures++;
      $display("FAIL %s digest: got %h exp %h", NAME[u], got, EXP[u]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int u = 0; u < 3; u++) begin
      for (int b = 0; b <= NBLK; b++) begin
        q[u].push_back((b == NBLK) ? 32'd0 : 32'd512);
        for (int w = 0; w < 16; w++)
          q[u].push_back({mbyte(64*b + 4*w, SEED), mbyte(64*b + 4*w + 1, SEED),
                          mbyte(64*b + 4*w + 2, SEED), mbyte(64*b + 4*w + 3, SEED)});
      end
    end
    fork
      collect(0);
      collect(1);
      collect(2);
    join
    // compression starts 2..12 all belong to full message blocks for every
    // unit (JH's first compression computes the initial value)
    for (int u = 0; u < 3; u++) begin
      automatic int bad = 0;
      checks++;
      for (int k = 3; k <= 12; k++)
        if (starts[u][k] - starts[u][k-1] != PERIOD[u]) begin
          bad++;
          $display("FAIL %s: compression %0d started %0d cycles after the previous one, expected %0d",
                   NAME[u], k, starts[u][k] - starts[u][k-1], PERIOD[u]);
        end
      if (bad != 0) failures++;
      $display("%-14s %5d cycles per 512-bit block: %7.1f MBit/s at %5.1f MHz (published: %6.1f MBit/s)",
               NAME[u], PERIOD[u], 512.0 * PUB_MHZ[u] / real'(PERIOD[u]), PUB_MHZ[u], PUB_MBPS[u]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
