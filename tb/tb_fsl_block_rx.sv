// Checks the FSL block receiver: 30 random frames (length word + 16 words)
// are offered with random gaps on s_exists, and the consumer takes blocks
// with random delays on blk_ready. Each delivered block must hold the frame's
// words packed big-endian and its length word; s_read must never be raised
// without s_exists, and no word may be read while a block waits.
module tb_fsl_block_rx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0]  s_data, blk_len;
  logic         s_exists, s_read, blk_valid, blk_ready;
  logic [511:0] blk_data;

  fsl_block_rx dut (.*);

  int checks = 0, failures = 0, gaps = 0, waits = 0;
  logic [31:0]  q [$];
  logic [511:0] exp_d [$];
  logic [31:0]  exp_l [$];
  logic         src_en;

  assign s_exists = (q.size() != 0) && src_en;
  assign s_data   = (q.size() != 0) ? q[0] : 32'h0;

  always_ff @(posedge clk) begin
    src_en    <= ($urandom_range(0, 2) != 0);
    blk_ready <= ($urandom_range(0, 3) == 0);
    if (s_read) void'(q.pop_front());
    if (q.size() != 0 && !src_en) gaps++;
    if (blk_valid && !blk_ready) waits++;
    if (rst_n) begin
      if (s_read && !s_exists) begin failures++; $display("FAIL read without data"); end
      if (s_read && blk_valid) begin failures++; $display("FAIL read while block waits"); end
      if (blk_valid && blk_ready) begin
        checks++;
        if (exp_d.size() == 0 || blk_data !== exp_d[0] || blk_len !== exp_l[0]) begin
          failures++;
          $display("FAIL block mismatch");
        end
        if (exp_d.size() != 0) begin
          void'(exp_d.pop_front());
          void'(exp_l.pop_front());
        end
      end
    end
  end

  initial begin
    blk_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      logic [511:0] d;
      logic [31:0]  l;
      l = 32'($urandom_range(0, 512));
      q.push_back(l);
      for (int w = 0; w < 16; w++) begin
        d[511 - 32*w -: 32] = $urandom;
        q.push_back(d[511 - 32*w -: 32]);
      end
      exp_d.push_back(d);
      exp_l.push_back(l);
    end
    wait (exp_d.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (gaps == 0 || waits == 0) begin failures++; $display("FAIL stalls not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
