// Exhaustive check of the S-box: for each of the 256 inputs the expected value
// is found by searching for the GF(2^8) inverse (the y with x*y = 1) and
// applying the affine map, and four entries are checked against the published
// AES table (00->63, 01->7c, 53->ed, ff->16).
module tb_aes_sbox;
  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.a, .y);

  function automatic logic [7:0] gm(logic [7:0] x, logic [7:0] z);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (z[i]) r ^= x;
      x = (x << 1) ^ (x[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] inv = 0, s;
    for (int c = 1; c < 256; c++) if (gm(x, 8'(c)) == 8'h01) inv = 8'(c);
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] ^= inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return s;
  endfunction

  task automatic chk(logic [7:0] x, logic [7:0] e);
    a = x;
    #1;
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL S(%h) = %h, expected %h", x, y, e);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++) chk(8'(x), ref_sbox(8'(x)));
    chk(8'h00, 8'h63);
    chk(8'h01, 8'h7c);
    chk(8'h53, 8'hed);
    chk(8'hff, 8'h16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
