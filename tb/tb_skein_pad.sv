// Checks the Skein padding unit word by word against a reference built bit by
// bit: a non-final block passes unchanged; in the final block bits from the
// length on are cleared, with a single 1 at the length only when the length
// is not a multiple of 8.
module tb_skein_pad;
  logic [63:0] word_in, word_out;
  logic [2:0]  word_idx;
  logic        last;
  logic [8:0]  len;

  skein_pad dut (.*);

  int checks = 0, failures = 0;

  task automatic run(logic lst, int L);
    logic [511:0] blk, exp;
    for (int i = 0; i < 16; i++) blk[32*i +: 32] = $urandom;
    for (int p = 0; p < 512; p++) begin
      if (!lst) exp[511 - p] = blk[511 - p];
      else exp[511 - p] = (p < L) ? blk[511 - p] : (p == L && (L % 8) != 0);
    end
    last = lst;
    len  = 9'(L);
    for (int w = 0; w < 8; w++) begin
      word_idx = 3'(w);
      word_in  = blk[511 - 64*w -: 64];
      #1;
      checks++;
      if (word_out !== exp[511 - 64*w -: 64]) begin
        failures++;
        $display("FAIL last %0d len %0d word %0d: %h exp %h", lst, L, w, word_out, exp[511 - 64*w -: 64]);
      end
    end
  endtask

  initial begin
    automatic int lens [8] = '{0, 1, 7, 8, 9, 64, 255, 511};
    run(1'b0, 300);
    foreach (lens[i]) run(1'b1, lens[i]);
    for (int n = 0; n < 40; n++) run(1'b1, $urandom_range(0, 511));
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
