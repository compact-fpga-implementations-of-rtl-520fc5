// Checks the FSL digest transmitter: 20 random digests are started, the
// output FIFO is randomly full, and the eight written words must equal the
// digest's 32-bit slices from the most significant end; m_write must never be
// raised while m_full is high. With the FIFO never full a digest must leave
// in exactly 8 cycles.
module tb_fsl_digest_tx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, m_write, m_full;
  logic [255:0] digest;
  logic [31:0]  m_data;

  fsl_digest_tx dut (.*);

  int checks = 0, failures = 0, fulls = 0;
  logic rnd_full = 1;

  always_ff @(posedge clk) begin
    m_full <= rnd_full ? ($urandom_range(0, 2) == 0) : 1'b0;
    if (m_full) fulls++;
    if (rst_n && m_write && m_full) begin failures++; $display("FAIL write while full"); end
  end

  initial begin
    logic [255:0] d;
    int t0;
    start = 0; digest = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      if (n == 19) begin
        rnd_full = 0;
        repeat (2) @(posedge clk);
      end
      for (int i = 0; i < 8; i++) d[32*i +: 32] = $urandom;
      @(negedge clk);
      start = 1; digest = d;
      @(negedge clk);
      start = 0; digest = '0;
      t0 = $time;
      for (int w = 0; w < 8; w++) begin
        while (!m_write) @(negedge clk);
        checks++;
        if (m_data !== d[255 - 32*w -: 32]) begin
          failures++;
          $display("FAIL digest %0d word %0d: %h exp %h", n, w, m_data, d[255 - 32*w -: 32]);
        end
        @(negedge clk);
      end
      if (n == 19) begin
        checks++;
        if (($time - t0) / 10 != 8) begin failures++; $display("FAIL took %0d cycles", ($time - t0) / 10); end
      end
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL full never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
