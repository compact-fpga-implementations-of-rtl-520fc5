// Compact Grostl round slice, one 64-bit column per cycle. The caller reads
// the column from the row-organised P/Q RAMs with ShiftBytes already applied
// (row i of destination column j comes from source column (j + shift_i) mod 8),
// so this block does the three other round steps:
//   stage 1: AddRoundConstant (for the source column of each byte) and
//            SubBytes through eight S-boxes, registered;
//   stage 2: MixBytes, multiplication of the column by the circulant matrix
//            with first row (02 02 03 04 05 03 05 07), registered.
// Latency is 2 cycles, one column accepted per cycle. The column word holds
// row 0 in bits 63:56. Round constants and shift offsets are those of the
// final Grostl specification: P adds (c<<4)^r to row 0; Q inverts every byte
// and adds (c<<4)^r to row 7; P shifts row i by i, Q by 1,3,5,7,0,2,4,6.
// The 64-bit slice and the extra pipeline registers follow the reference design; the
// two-stage split is this design's choice.
module grostl_round (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] in_col,
  input  logic        in_q,
  input  logic [3:0]  in_rnd,
  input  logic [2:0]  in_j,
  output logic        out_valid,
  output logic [63:0] out_col,
  output logic        out_q,
  output logic [3:0]  out_rnd,
  output logic [2:0]  out_j
);
  function automatic logic [2:0] shift_of(input logic q, input int unsigned row);
    if (!q) return 3'(row);
    return (row < 4) ? 3'(2*row + 1) : 3'(2*(row - 4));
  endfunction

  function automatic logic [7:0] xt(input logic [7:0] x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] mulc(input logic [7:0] x, input int unsigned c);
    logic [7:0] x2, x4;
    x2 = xt(x);
    x4 = xt(x2);
    case (c)
      2: return x2;
      3: return x2 ^ x;
      4: return x4;
      5: return x4 ^ x;
      7: return x4 ^ x2 ^ x;
      default: return x;
    endcase
  endfunction

  localparam int unsigned BV [8] = '{2, 2, 3, 4, 5, 3, 5, 7};

  logic [7:0] arc [8];
  logic [7:0] sb  [8];

  always_comb begin
    for (int unsigned r = 0; r < 8; r++) begin
      logic [2:0] c;
      c = in_j + shift_of(in_q, r);
      arc[r] = in_col[63-8*r -: 8];
      if (in_q) begin
        arc[r] ^= 8'hff;
        if (r == 7) arc[r] ^= {1'b0, c, 4'b0} ^ {4'b0, in_rnd};
      end else if (r == 0) begin
        arc[r] ^= {1'b0, c, 4'b0} ^ {4'b0, in_rnd};
      end
    end
  end

  for (genvar r = 0; r < 8; r++) begin : g_sbox
    aes_sbox u_sbox (.a(arc[r]), .y(sb[r]));
  end

  logic [7:0] s1 [8];
  logic       s1_valid, s1_q;
  logic [3:0] s1_rnd;
  logic [2:0] s1_j;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_q     <= 1'b0;
      s1_rnd   <= '0;
      s1_j     <= '0;
      for (int r = 0; r < 8; r++) s1[r] <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_q     <= in_q;
      s1_rnd   <= in_rnd;
      s1_j     <= in_j;
      for (int r = 0; r < 8; r++) s1[r] <= sb[r];
    end
  end

  logic [63:0] mix;
  always_comb begin
    for (int unsigned i = 0; i < 8; i++) begin
      logic [7:0] v;
      v = '0;
      for (int unsigned k = 0; k < 8; k++) v ^= mulc(s1[k], BV[(k + 8 - i) % 8]);
      mix[63-8*i -: 8] = v;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_col   <= '0;
      out_q     <= 1'b0;
      out_rnd   <= '0;
      out_j     <= '0;
    end else begin
      out_valid <= s1_valid;
      out_col   <= mix;
      out_q     <= s1_q;
      out_rnd   <= s1_rnd;
      out_j     <= s1_j;
    end
  end
endmodule
