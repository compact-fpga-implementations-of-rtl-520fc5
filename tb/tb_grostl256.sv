// Self-checking testbench for the Grostl-256 unit. It hashes eight messages
// (0 to 1100 bits, including lengths that need an extra padding block, an
// exact multiple of 512 bits and a length that is not a whole number of
// bytes) through the FSL links, with random gaps on the input link and random
// FIFO-full on the output link. Expected digests were computed with an
// independent software model of Grostl-256; the empty-message digest is the
// published one. It also checks that every compression issues exactly 160
// round-slice cycles (10 rounds x P/Q x 8 columns), that a compression whose
// block is already loaded starts right after the previous one (160 cycles
// later), and that blocks are loaded while a compression runs.
module tb_grostl256;
  localparam int NMSG = 8;
  localparam int LENS [NMSG] = '{0, 24, 447, 448, 512, 700, 1024, 1100};
  localparam logic [255:0] EXP [NMSG] = '{
      256'h1a52d11d550039be16107f9c58db9ebcc417f16f736adb2502567119f0083467,
      256'hfe6099c59acc440d03350240ac1cb9467c7fd1e7153282c9e6c2e28d6a3918f7,
      256'h142bcfcae31e2c2839b8902e5ba159e740674ffd472a39e07401afeca5380647,
      256'h5b89a4efc90456c4d75bef6e9ef268be349596b92c7e612152c6f561b476a58b,
      256'hbbba72e558ac9eb367b73521b4126c8c3e063db71be9a3cd372d21fcaa7491e4,
      256'h3241b8587f6344f8d096ed162c5cb01a35f6e5564f36575f755bb21df82df6ab,
      256'h3d8e3cbabd3160718b6481eaadbaa79e7df9398474c368ca6dfb7d86c9e2d78d,
      256'h24a8b910a849f82273106a5ef84f2731dfefd68ea057d34b807e710ebe01ae09};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] s_data, m_data;
  logic        s_exists, s_read, m_write, m_full;

  grostl256 dut (.clk, .rst_n, .s_data, .s_exists, .s_read, .m_data, .m_write, .m_full);

  int checks = 0, failures = 0;
  int stalls_in = 0, stalls_out = 0, extra_blocks = 0, issue_cycles = 0;
  int overlap = 0, back_to_back = 0, too_close = 0, cyc = 0, last_start = -1;

  // message byte k of message 'seed'
  function automatic logic [7:0] mbyte(int k, int seed);
    return 8'((k * 37 + seed * 11 + 5));
  endfunction

  // FSL source
  logic [31:0] q [$];
  logic        src_en;
  assign s_exists = (q.size() != 0) && src_en;
  assign s_data   = (q.size() != 0) ? q[0] : 32'h0;
  always_ff @(posedge clk) begin
    src_en <= ($urandom_range(0, 3) != 0);
    m_full <= ($urandom_range(0, 3) == 0);
    if (s_read) void'(q.pop_front());
    if (q.size() != 0 && !src_en) stalls_in++;
    if (m_full) stalls_out++;
    if (rst_n && dut.issue) issue_cycles++;
    if (dut.ld_state == dut.L_LOAD && dut.kind == sha3_pkg::BLK_EXTRA && dut.widx == 0) extra_blocks++;
    if (dut.ld_state == dut.L_LOAD && dut.state == dut.G_RUN) overlap++;
    cyc++;
    if (rst_n && dut.issue && dut.cnt == 8'd0) begin
      if (last_start >= 0 && cyc - last_start == 160) back_to_back++;
      if (last_start >= 0 && cyc - last_start < 160) too_close++;
      last_start = cyc;
    end
  end

  task automatic send_msg(int L, int seed);
    int nfr = L / 512 + 1;
    for (int b = 0; b < nfr; b++) begin
      int bl = (b == nfr - 1) ? L % 512 : 512;
      q.push_back(32'(bl));
      for (int w = 0; w < 16; w++)
        q.push_back({mbyte(64*b + 4*w, seed), mbyte(64*b + 4*w + 1, seed),
                     mbyte(64*b + 4*w + 2, seed), mbyte(64*b + 4*w + 3, seed)});
    end
  endtask

  initial begin
    logic [255:0] got;
    int ic0, nb;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NMSG; i++) begin
      ic0 = issue_cycles;
      send_msg(LENS[i], i);
      for (int w = 0; w < 8; w++) begin
        do @(posedge clk); while (!m_write);
        got = {got[223:0], m_data};
      end
      checks++;
      if (got !== EXP[i]) begin
        failures++;
        $display("FAIL msg %0d len %0d: got %h exp %h", i, LENS[i], got, EXP[i]);
      end
      // padded blocks plus the output transformation, 160 cycles each
      nb = (LENS[i] + 65 + 511) / 512 + 1;
      repeat (4) @(posedge clk);
      checks++;
      if (issue_cycles - ic0 != 160 * nb) begin
        failures++;
        $display("FAIL msg %0d: %0d round cycles, expected %0d", i, issue_cycles - ic0, 160 * nb);
      end
    end
    checks++;
    if (too_close != 0) begin
      failures++;
      $display("FAIL %0d compressions started less than 160 cycles after the previous one", too_close);
    end
    checks++;
    if (stalls_in == 0 || stalls_out == 0 || extra_blocks == 0 || overlap == 0 || back_to_back == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: in-stalls %0d out-stalls %0d extra blocks %0d overlap %0d back-to-back %0d",
               stalls_in, stalls_out, extra_blocks, overlap, back_to_back);
    end
    $display("input stalls %0d, output stalls %0d, extra padding blocks %0d, loading cycles overlapped with a compression %0d, compressions started back to back (160 cycles) %0d",
             stalls_in, stalls_out, extra_blocks, overlap, back_to_back);
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
