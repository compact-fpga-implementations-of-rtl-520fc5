// Self-checking testbench for the Skein-512-256 unit. It hashes eight messages
// (0 to 1100 bits, including exact multiples of 512 bits, which end in an
// empty block that marks the held-back full block as final, and lengths that
// are not whole bytes) through the FSL links, with random gaps on the input
// link and random FIFO-full on the output link. Expected digests were computed with an
// independent software model of Skein-512-256; the empty-message digest is the
// published one. It also checks that every compression issues exactly 576
// core cycles (72 rounds x 8 words).
module tb_skein512_256;
  localparam int NMSG = 8;
  localparam int LENS [NMSG] = '{0, 24, 447, 448, 512, 700, 1024, 1100};
  localparam logic [255:0] EXP [NMSG] = '{
      256'h39ccc4554a8b31853b9de7a1fe638a24cce6b35a55f2431009e18780335d2621,
      256'hd6513085348099c243fd568352a11b61ee1cab178ef32b88281845ca0c0ae7af,
      256'h9aa5bc6cc4a04032c9e1de47cdb57015d368d0a1b3368b72608f033e342cbf2a,
      256'hdbea1a16305399fbb41440a9bdb6344764bf3bd67b6460986c3182f650d2c4fa,
      256'h46702151bf938ea7450cdf026316c3c8963f7a37b23e1d2a3a974c892236df2f,
      256'hd971bf36d0db961ba366182f74a1a347a04f1b4f8be8abd9cb71bf7547abc5ea,
      256'h233348e48b7cbff044a67a16500009f68bb89613ccc350160b20933365530131,
      256'h6e4bb186c8bee084def19300173f491ec5bc7aaa17239254747ae78ccb87d829};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] s_data, m_data;
  logic        s_exists, s_read, m_write, m_full;

  skein512_256 dut (.clk, .rst_n, .s_data, .s_exists, .s_read, .m_data, .m_write, .m_full);

  int checks = 0, failures = 0;
  int stalls_in = 0, stalls_out = 0, held_final = 0, bitpad = 0, issue_cycles = 0;

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
    if (dut.blk_ready && dut.drop_empty) held_final++;
    if (dut.state == dut.K_RUN && dut.cnt == 0 && dut.t1[55]) bitpad++;
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
      // message blocks plus the output block, 576 cycles each
      nb = ((LENS[i] == 0) ? 1 : (LENS[i] + 511) / 512) + 1;
      repeat (4) @(posedge clk);
      checks++;
      if (issue_cycles - ic0 != 576 * nb) begin
        failures++;
        $display("FAIL msg %0d: %0d round cycles, expected %0d", i, issue_cycles - ic0, 576 * nb);
      end
    end
    checks++;
    if (stalls_in == 0 || stalls_out == 0 || held_final == 0 || bitpad == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: in-stalls %0d out-stalls %0d held-final %0d bitpad %0d",
               stalls_in, stalls_out, held_final, bitpad);
    end
    $display("input stalls %0d, output stalls %0d, held blocks made final %0d, bit-padded blocks %0d",
             stalls_in, stalls_out, held_final, bitpad);
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
