// JH compact core: one byte (two 4-bit elements) per cycle. Each element goes
// through a 4-bit S-box, S0 or S1 as chosen by its round-constant bit, and the
// pair then goes through the linear transformation L of JH (the MDS code over
// GF(2^4)): b ^= mul2(a), then a ^= mul2(b), with mul2(x) the doubling in
// GF(2^4) modulo x^4+x+1 written as the bit pattern of the JH reference. The
// result is registered: latency 1, one pair per cycle. The same core serves
// both the 1024-bit state (selects from the round constant) and the 256-bit
// round-constant update (select always S0). The S-box + L structure follows
// the reference design; the tables and the L equations are those of the JH
// specification.
module jh_core (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       sel_a,
  input  logic       sel_b,
  output logic       out_valid,
  output logic [3:0] ya,
  output logic [3:0] yb
);
  localparam logic [3:0] S0 [16] = '{4'd9, 4'd0, 4'd4, 4'd11, 4'd13, 4'd12, 4'd3, 4'd15,
                                     4'd1, 4'd10, 4'd2, 4'd6, 4'd7, 4'd5, 4'd8, 4'd14};
  localparam logic [3:0] S1 [16] = '{4'd3, 4'd12, 4'd6, 4'd13, 4'd5, 4'd7, 4'd1, 4'd9,
                                     4'd15, 4'd2, 4'd0, 4'd4, 4'd11, 4'd10, 4'd14, 4'd8};

  // (x<<1) ^ (x>>3) ^ ((x>>2)&2), 4 bits
  function automatic logic [3:0] mul2(input logic [3:0] x);
    return {x[2], x[1], x[0] ^ x[3], x[3]};
  endfunction

  logic [3:0] sa, sb, lb, la;
  always_comb begin
    sa = sel_a ? S1[a] : S0[a];
    sb = sel_b ? S1[b] : S0[b];
    lb = sb ^ mul2(sa);
    la = sa ^ mul2(lb);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ya        <= '0;
      yb        <= '0;
    end else begin
      out_valid <= in_valid;
      ya        <= la;
      yb        <= lb;
    end
  end
endmodule
