// Checks the pipelined Grostl round slice against a column-level reference
// written in the testbench: AddRoundConstant for the source column of each
// byte (P: row 0 gets (c<<4)^r; Q: all bytes inverted, row 7 gets
// (c<<4)^r), the S-box from a brute-force GF(2^8) inverse, and MixBytes with
// the circulant (02 02 03 04 05 03 05 07). Random columns, rounds,
// destination columns and P/Q selects are fed one per cycle with random
// gaps; results must appear exactly two cycles later with their tags.
module tb_grostl_round;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, in_q, out_valid, out_q;
  logic [63:0] in_col, out_col;
  logic [3:0]  in_rnd, out_rnd;
  logic [2:0]  in_j, out_j;

  grostl_round dut (.*);

  int checks = 0, failures = 0;
  int unsigned BV [8] = '{2, 2, 3, 4, 5, 3, 5, 7};

  function automatic logic [7:0] gm(logic [7:0] x, logic [7:0] z);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (z[i]) r ^= x;
      x = (x << 1) ^ (x[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction
  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] inv = 0, s;
    for (int c = 1; c < 256; c++) if (gm(x, 8'(c)) == 8'h01) inv = 8'(c);
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] ^= inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return s;
  endfunction
  function automatic logic [63:0] ref_round(logic [63:0] col, logic q, logic [3:0] r, logic [2:0] j);
    int sh_p [8] = '{0, 1, 2, 3, 4, 5, 6, 7};
    int sh_q [8] = '{1, 3, 5, 7, 0, 2, 4, 6};
    logic [7:0] b [8];
    logic [63:0] o;
    for (int i = 0; i < 8; i++) begin
      int c = (j + (q ? sh_q[i] : sh_p[i])) % 8;
      b[i] = col[63 - 8*i -: 8];
      if (q) b[i] ^= 8'hff;
      if ((!q && i == 0) || (q && i == 7)) b[i] ^= 8'(c * 16) ^ 8'(r);
      b[i] = sbox(b[i]);
    end
    for (int i = 0; i < 8; i++) begin
      logic [7:0] v = 0;
      for (int k = 0; k < 8; k++) v ^= gm(b[k], 8'(BV[(k - i + 8) % 8]));
      o[63 - 8*i -: 8] = v;
    end
    return o;
  endfunction

  typedef struct { logic [63:0] col; logic q; logic [3:0] r; logic [2:0] j; } item_t;
  item_t pend [$];

  initial begin
    in_valid = 0; in_col = 0; in_q = 0; in_rnd = 0; in_j = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_col   = {$urandom, $urandom};
      in_q     = 1'($urandom);
      in_rnd   = 4'($urandom_range(0, 9));
      in_j     = 3'($urandom);
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (pend.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", pend.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, two-cycle latency
  logic v1, v2;
  always @(posedge clk) begin
    if (rst_n && in_valid) pend.push_back('{in_col, in_q, in_rnd, in_j});
    v2 <= v1;
    v1 <= rst_n && in_valid;
    if (rst_n && out_valid) begin
      item_t e;
      checks++;
      if (!v2 || pend.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = pend.pop_front();
        if (out_col !== ref_round(e.col, e.q, e.r, e.j) || out_q !== e.q || out_rnd !== e.r || out_j !== e.j) begin
          failures++;
          $display("FAIL col %h q %0d r %0d j %0d: got %h", e.col, e.q, e.r, e.j, out_col);
        end
      end
    end else if (rst_n && v2) begin
      failures++;
      $display("FAIL missing output");
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
