// Checks the Threefish MIX slice built from 32-bit adders. Random word pairs,
// subkey words, rotations and key-injection flags are streamed as
// alternating first/second words, mostly back to back and sometimes with
// gaps; some words have all-ones low halves so that the carries between the
// 32-bit halves are exercised. The reference computes x0' = x0 (+ ks0),
// x1' = x1 (+ ks1), y0 = x0' + x1', y1 = rotl(x1', rot) ^ y0 with 64-bit
// arithmetic. Each result must appear exactly three cycles after its second
// word, in order, and at no other time.
module tb_skein_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, inject, second, out_valid;
  logic [63:0] x, ks, y0, y1;
  logic [5:0]  rot;

  skein_core dut (.*);

  int checks = 0, failures = 0, cyc = 0, carries = 0;
  logic [63:0] exp0 [$], exp1 [$];
  int          due  [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (due.size() == 0) begin
          failures++;
          $display("FAIL unexpected output at cycle %0d", cyc);
        end else begin
          if (due[0] != cyc || y0 !== exp0[0] || y1 !== exp1[0]) begin
            failures++;
            $display("FAIL cycle %0d (due %0d): got %h %h exp %h %h", cyc, due[0], y0, y1, exp0[0], exp1[0]);
          end
          void'(due.pop_front()); void'(exp0.pop_front()); void'(exp1.pop_front());
        end
      end else if (due.size() != 0 && due[0] == cyc) begin
        checks++;
        failures++;
        $display("FAIL missing output at cycle %0d", cyc);
        void'(due.pop_front()); void'(exp0.pop_front()); void'(exp1.pop_front());
      end
    end
  end

  function automatic logic [63:0] rnd_word();
    logic [63:0] v = {$urandom, $urandom};
    if ($urandom_range(0, 3) == 0) v[31:0] = 32'hffff_ffff;
    return v;
  endfunction

  initial begin
    logic [63:0] x0, x1, k0, k1, a, b;
    logic inj;
    logic [5:0] r;
    in_valid = 0; x = 0; ks = 0; inject = 0; second = 0; rot = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      x0 = rnd_word(); x1 = rnd_word(); k0 = rnd_word(); k1 = rnd_word();
      inj = 1'($urandom); r = 6'($urandom_range(1, 63));
      a = inj ? x0 + k0 : x0;
      b = inj ? x1 + k1 : x1;
      if ((33'(a[31:0]) + 33'(b[31:0])) > 33'h0_ffff_ffff) carries++;
      @(negedge clk);
      in_valid = 1; x = x0; ks = k0; inject = inj; second = 0; rot = r;
      @(negedge clk);
      x = x1; ks = k1; second = 1;
      exp0.push_back(a + b);
      exp1.push_back(((b << r) | (b >> (64 - r))) ^ (a + b));
      due.push_back(cyc + 3);
      if ($urandom_range(0, 7) == 0) begin
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (due.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", due.size());
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL no carry between the 32-bit halves of the MIX adder was exercised");
    end
    $display("pairs with a carry from the low to the high half of the MIX sum: %0d", carries);
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
