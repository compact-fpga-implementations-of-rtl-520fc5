// Self-checking testbench for the JH-256 unit. It hashes eight messages
// (0 to 1100 bits, including lengths that need an extra padding block, an
// exact multiple of 512 bits and a length that is not a whole number of
// bytes) through the FSL links, with random gaps on the input link and random
// FIFO-full on the output link. Expected digests were computed with an
// independent software model of JH-256; the empty-message digest is the
// published one. It also checks that every compression issues exactly 6720
// core cycles (42 rounds x 160), and that blocks are loaded into the input
// RAM while a compression runs.
module tb_jh256;
  localparam int NMSG = 8;
  localparam int LENS [NMSG] = '{0, 24, 447, 448, 512, 700, 1024, 1100};
  localparam logic [255:0] EXP [NMSG] = '{
      256'h46e64619c18bb0a92a5e87185a47eef83ca747b8fcc8e1412921357e326df434,
      256'h8e336b72ad11cf1f8f9980039bb048832ce8f5e6e0d6b0326a58e67423bf1b27,
      256'h6071c64d3a63a95132e3b0df761c8e40aba0370328c5d1f76f42d3fd936aee47,
      256'h12e5643076575add3fb1a075cc6f513bf9ba93eac396b52d417c93d9db081309,
      256'he869818ee5ec1d6d89c01f7b4630027c73f0a375558539c267b7518b653f2be5,
      256'h2f42d559c06fdaf2156691e75c024bd150b447fd896d239dd0a445a363a8afb6,
      256'hff66a694310ecf88ab60375b7ed06f14c5e31d9bb73d0f538bc6c19db39ea4d8,
      256'h99106457d73a44dfb41fa699d224acf9faee162572751ea3efc2c4e1592bce6e};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] s_data, m_data;
  logic        s_exists, s_read, m_write, m_full;

  jh256 dut (.clk, .rst_n, .s_data, .s_exists, .s_read, .m_data, .m_write, .m_full);

  int checks = 0, failures = 0;
  int stalls_in = 0, stalls_out = 0, extra_blocks = 0, issue_cycles = 0, overlap = 0;

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
    if (dut.ld_state == dut.L_LOAD && dut.kind == sha3_pkg::BLK_EXTRA && dut.bidx == 0) extra_blocks++;
    if (dut.ld_state == dut.L_LOAD && dut.state == dut.J_RUN) overlap++;
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
      // initial-value block plus padded blocks, 6720 cycles each
      nb = 1 + LENS[i] / 512 + ((LENS[i] % 512 != 0) ? 2 : 1);
      repeat (4) @(posedge clk);
      checks++;
      if (issue_cycles - ic0 != 6720 * nb) begin
        failures++;
        $display("FAIL msg %0d: %0d round cycles, expected %0d", i, issue_cycles - ic0, 6720 * nb);
      end
    end
    checks++;
    if (stalls_in == 0 || stalls_out == 0 || extra_blocks == 0 || overlap == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: in-stalls %0d out-stalls %0d extra blocks %0d",
               stalls_in, stalls_out, extra_blocks);
    end
    $display("input stalls %0d, output stalls %0d, extra padding blocks %0d, loading cycles overlapped with a compression %0d",
             stalls_in, stalls_out, extra_blocks, overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
