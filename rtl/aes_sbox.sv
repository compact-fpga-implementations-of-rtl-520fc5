// Grostl SubBytes S-box (the AES S-box) built with composite-field arithmetic.
// The S-box is the multiplicative inverse in GF(2^8) = GF(2)[x]/(x^8+x^4+x^3+x+1)
// (zero maps to zero) followed by the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
// The inverse is computed in the isomorphic field GF((2^4)^2): GF(2^4) is
// GF(2)[z]/(z^4+z+1) and GF((2^4)^2) is GF(2^4)[y]/(y^2+y+8); an element is
// h*y+l, stored as {h,l}. The input is mapped into that field by the linear
// map that sends x to 0x20 (= 2*y, a root of the AES polynomial there): bit i
// of the input selects column MAP[i] = 0x20^i. The inverse of h*y+l is
// (h*d^-1)*y + (h+l)*d^-1 with d = 8*h^2 + h*l + l^2, which needs only GF(2^4)
// multipliers and one GF(2^4) inverse (d^14). The result is mapped back with
// the inverse linear map (columns UNMAP) and then through the affine map.
// Purely combinational. Using composite-field arithmetic follows the
// reference design; the field polynomials and the basis are this design's
// choice, since the reference design does not give them.
module aes_sbox (
  input  logic [7:0] a,
  output logic [7:0] y
);
  localparam logic [7:0] MAP   [8] = '{8'h01, 8'h20, 8'h46, 8'h4c, 8'h3c, 8'hd5, 8'h34, 8'he5};
  localparam logic [7:0] UNMAP [8] = '{8'h01, 8'h5c, 8'he0, 8'h50, 8'ha2, 8'h02, 8'hb8, 8'hdb};

  // multiplication in GF(2^4) modulo z^4+z+1
  function automatic logic [3:0] mul4(input logic [3:0] p, input logic [3:0] q);
    logic [6:0] r;
    r = '0;
    for (int i = 0; i < 4; i++) if (q[i]) r ^= 7'(p) << i;
    for (int i = 6; i >= 4; i--) if (r[i]) r ^= 7'b0010011 << (i - 4);
    return r[3:0];
  endfunction

  function automatic logic [7:0] lin(input logic [7:0] v, input logic [7:0] cols [8]);
    logic [7:0] r;
    r = '0;
    for (int i = 0; i < 8; i++) if (v[i]) r ^= cols[i];
    return r;
  endfunction

  logic [7:0] c, ci, b;
  logic [3:0] h, l, d, d2, d4, d8, dinv;

  always_comb begin
    c    = lin(a, MAP);
    h    = c[7:4];
    l    = c[3:0];
    d    = mul4(mul4(h, h), 4'h8) ^ mul4(h, l) ^ mul4(l, l);
    d2   = mul4(d, d);
    d4   = mul4(d2, d2);
    d8   = mul4(d4, d4);
    dinv = mul4(mul4(d8, d4), d2);          // d^14 = d^-1 (0 stays 0)
    ci   = {mul4(h, dinv), mul4(h ^ l, dinv)};
    b    = lin(ci, UNMAP);
    y    = b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  end
endmodule
