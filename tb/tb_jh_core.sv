// Exhaustive check of the JH S-box/L core: all 16 x 16 nibble pairs with all
// four S-box selections. The reference applies the two S-box tables of JH and
// the linear map L in its shift form, b ^= (a<<1)^(a>>3)^((a>>2)&2) then
// a ^= the same of b (4 bits). Results must appear one cycle after the input.
module tb_jh_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid, sel_a, sel_b, out_valid;
  logic [3:0] a, b, ya, yb;

  jh_core dut (.*);

  int checks = 0, failures = 0;
  int S [2][16] = '{'{9, 0, 4, 11, 13, 12, 3, 15, 1, 10, 2, 6, 7, 5, 8, 14},
                    '{3, 12, 6, 13, 5, 7, 1, 9, 15, 2, 0, 4, 11, 10, 14, 8}};

  initial begin
    in_valid = 0; a = 0; b = 0; sel_a = 0; sel_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1024; n++) begin
      int ea, eb;
      @(negedge clk);
      a = 4'(n); b = 4'(n >> 4); sel_a = n[8]; sel_b = n[9]; in_valid = 1;
      ea = S[sel_a][a]; eb = S[sel_b][b];
      eb = eb ^ (((ea << 1) ^ (ea >> 3) ^ ((ea >> 2) & 2)) & 15);
      ea = ea ^ (((eb << 1) ^ (eb >> 3) ^ ((eb >> 2) & 2)) & 15);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || ya !== 4'(ea) || yb !== 4'(eb)) begin
        failures++;
        $display("FAIL a %h b %h sel %b%b: got %h %h exp %h %h", a, b, sel_a, sel_b, ya, yb, ea, eb);
      end
    end
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
