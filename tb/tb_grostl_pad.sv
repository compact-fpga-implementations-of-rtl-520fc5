// Checks the Grostl padding unit word by word against a 512-bit reference
// block built bit by bit in the testbench: message bits below the length, a 1
// at the length, zeros, and the 64-bit block count in bits 448..511 when it
// fits (length <= 447) or in an extra block. Lengths around the word and
// count-field boundaries and random lengths are covered, each with random data.
module tb_grostl_pad;
  import sha3_pkg::*;
  logic [63:0] word_in, nblocks, word_out;
  logic [2:0]  word_idx;
  blk_kind_e   kind;
  logic [8:0]  len;

  grostl_pad dut (.*);

  int checks = 0, failures = 0;

  task automatic run(blk_kind_e kd, int L);
    logic [511:0] blk, exp;
    for (int i = 0; i < 16; i++) blk[32*i +: 32] = $urandom;
    nblocks = {$urandom, $urandom};
    for (int p = 0; p < 512; p++) begin
      logic bit_v;
      if (kd == BLK_FULL) bit_v = blk[511 - p];
      else if (kd == BLK_EXTRA) bit_v = 1'b0;
      else bit_v = (p < L) ? blk[511 - p] : (p == L);
      exp[511 - p] = bit_v;
    end
    if (kd == BLK_EXTRA || (kd == BLK_LAST && L <= 447)) exp[63:0] = nblocks;
    kind = kd;
    len  = 9'(L);
    for (int w = 0; w < 8; w++) begin
      word_idx = 3'(w);
      word_in  = blk[511 - 64*w -: 64];
      #1;
      checks++;
      if (word_out !== exp[511 - 64*w -: 64]) begin
        failures++;
        $display("FAIL kind %0d len %0d word %0d: %h exp %h", kd, L, w, word_out, exp[511 - 64*w -: 64]);
      end
    end
  endtask

  initial begin
    automatic int lens [12] = '{0, 1, 7, 8, 63, 64, 65, 300, 446, 447, 448, 511};
    run(BLK_FULL, 0);
    run(BLK_EXTRA, 0);
    foreach (lens[i]) run(BLK_LAST, lens[i]);
    for (int n = 0; n < 50; n++) run(BLK_LAST, $urandom_range(0, 511));
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
