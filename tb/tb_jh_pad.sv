// Checks the JH padding unit byte by byte against a 512-bit reference block
// built bit by bit in the testbench: message bits below the length, a 1 at
// the length, zeros, and the 128-bit message length in bits 384..511 of the
// last block when it holds no message bits, or of the extra block otherwise.
module tb_jh_pad;
  import sha3_pkg::*;
  logic [7:0]  byte_in, byte_out;
  logic [5:0]  byte_idx;
  blk_kind_e   kind;
  logic [8:0]  len;
  logic [63:0] msg_bits;

  jh_pad dut (.*);

  int checks = 0, failures = 0;

  task automatic run(blk_kind_e kd, int L);
    logic [511:0] blk, exp;
    for (int i = 0; i < 16; i++) blk[32*i +: 32] = $urandom;
    msg_bits = {$urandom, $urandom};
    for (int p = 0; p < 512; p++) begin
      if (kd == BLK_FULL) exp[511 - p] = blk[511 - p];
      else if (kd == BLK_EXTRA) exp[511 - p] = 1'b0;
      else exp[511 - p] = (p < L) ? blk[511 - p] : (p == L);
    end
    if (kd == BLK_EXTRA || (kd == BLK_LAST && L == 0)) exp[127:0] = {64'h0, msg_bits};
    kind = kd;
    len  = 9'(L);
    for (int w = 0; w < 64; w++) begin
      byte_idx = 6'(w);
      byte_in  = blk[511 - 8*w -: 8];
      #1;
      checks++;
      if (byte_out !== exp[511 - 8*w -: 8]) begin
        failures++;
        $display("FAIL kind %0d len %0d byte %0d: %h exp %h", kd, L, w, byte_out, exp[511 - 8*w -: 8]);
      end
    end
  endtask

  initial begin
    automatic int lens [10] = '{0, 1, 7, 8, 9, 383, 384, 385, 500, 511};
    run(BLK_FULL, 0);
    run(BLK_EXTRA, 0);
    foreach (lens[i]) run(BLK_LAST, lens[i]);
    for (int n = 0; n < 20; n++) run(BLK_LAST, $urandom_range(0, 511));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
