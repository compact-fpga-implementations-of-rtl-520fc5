// Compact Threefish-512 round slice for Skein, one 64-bit word per cycle,
// built from three 32-bit adders.
//
// A MIX takes two consecutive words x0, x1 of the state and forms
// y0 = x0' + x1' and y1 = rotl(x1', rot) ^ y0, where x' = x + subkey word in
// the rounds with key injection (0, 4, 8, ...) and x' = x otherwise. Every word
// passes three steps:
//   step A  key injection, low half: 32-bit adder 1, carry kept in a register;
//   step B  key injection, high half: 32-bit adder 2 with that carry. A first
//           word is now complete and is parked in x0_q. For a second word the
//           MIX adder (adder 3) adds the low halves of x0' and x1';
//   step C  (second words only) adder 3 adds the high halves with the carry
//           of step B. It is free here because a MIX needs it only every
//           other cycle. y0 and y1 are then registered.
// So out_valid rises three cycles after the second word of a pair, and a
// round of four MIXes still streams at one word per cycle. The caller must
// alternate first and second words (second = 0, 1, 0, 1, ...), with any gaps.
//
// The 64-bit datapath, the key injection in front of the MIX adder and the use
// of only three 32-bit adders follow the reference design; the exact split of
// the work over the three steps and the sharing of the MIX adder between the
// two halves are this design's reading of it.
module skein_core (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] x,
  input  logic [63:0] ks,
  input  logic        inject,
  input  logic        second,
  input  logic [5:0]  rot,
  output logic        out_valid,
  output logic [63:0] y0,
  output logic [63:0] y1
);
  // step A registers
  logic        a_valid, a_second, a_carry;
  logic [31:0] a_lo, a_xhi, a_khi;
  logic [5:0]  a_rot;
  // step B registers
  logic        b_valid, b_carry;
  logic [31:0] b_lo, b_x0hi;
  logic [63:0] b_x1, x0_q;
  logic [5:0]  b_rot;

  logic [32:0] kadd_lo;           // adder 1
  logic [31:0] kadd_hi;           // adder 2
  logic [63:0] xk;
  logic [31:0] mix_a, mix_b;      // adder 3 operands
  logic        mix_ci;
  logic [32:0] mix_s;
  logic [63:0] sum, rt;

  always_comb begin
    kadd_lo = {1'b0, x[31:0]} + {1'b0, (inject ? ks[31:0] : 32'h0)};
    kadd_hi = a_xhi + a_khi + {31'h0, a_carry};
    xk      = {kadd_hi, a_lo};
    // adder 3: high halves of the pair in step C, else low halves in step B
    if (b_valid) begin
      mix_a  = b_x0hi;
      mix_b  = b_x1[63:32];
      mix_ci = b_carry;
    end else begin
      mix_a  = x0_q[31:0];
      mix_b  = xk[31:0];
      mix_ci = 1'b0;
    end
    mix_s = {1'b0, mix_a} + {1'b0, mix_b} + {32'h0, mix_ci};
    sum   = {mix_s[31:0], b_lo};
    rt    = (b_x1 << b_rot) | (b_x1 >> (7'd64 - {1'b0, b_rot}));
  end

  // adder 3 serves one pair at a time: a second word may not follow a second word
  a_pair_order: assert property (@(posedge clk) disable iff (!rst_n) !(b_valid && a_valid && a_second))
    else $error("skein_core: two second words in a row");

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_valid   <= 1'b0;
      a_second  <= 1'b0;
      a_carry   <= 1'b0;
      a_lo      <= '0;
      a_xhi     <= '0;
      a_khi     <= '0;
      a_rot     <= '0;
      b_valid   <= 1'b0;
      b_carry   <= 1'b0;
      b_lo      <= '0;
      b_x0hi    <= '0;
      b_x1      <= '0;
      b_rot     <= '0;
      x0_q      <= '0;
      out_valid <= 1'b0;
      y0        <= '0;
      y1        <= '0;
    end else begin
      // step A
      a_valid  <= in_valid;
      a_second <= second;
      a_lo     <= kadd_lo[31:0];
      a_carry  <= kadd_lo[32];
      a_xhi    <= x[63:32];
      a_khi    <= inject ? ks[63:32] : 32'h0;
      a_rot    <= rot;
      // step B
      b_valid <= a_valid && a_second;
      if (a_valid && !a_second) x0_q <= xk;
      if (a_valid && a_second) begin
        b_lo    <= mix_s[31:0];
        b_carry <= mix_s[32];
        b_x0hi  <= x0_q[63:32];
        b_x1    <= xk;
        b_rot   <= a_rot;
      end
      // step C
      out_valid <= b_valid;
      if (b_valid) begin
        y0 <= sum;
        y1 <= rt ^ sum;
      end
    end
  end
endmodule
