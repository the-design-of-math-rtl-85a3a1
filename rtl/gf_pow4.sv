// gf_pow4: fourth-power module C = A^4 in GF(2^8), F(x) = x^8 + x^4 + x^3 + x + 1.
//
// A^4 is squaring applied twice and is again linear over GF(2), so it is one
// flat XOR network (up to six inputs per bit) rather than two squarers in a
// row. Purely combinational. Chained, these modules give A^(2^i) for any i,
// the "power circuit" used by the inverse.
module gf_pow4
  import gf8_pkg::*;
(
  input  gf8_t a,
  output gf8_t c
);

  always_comb begin
    c[7] = a[7] ^ a[6] ^ a[5] ^ a[3];
    c[6] = a[7] ^ a[4];
    c[5] = a[6] ^ a[3];
    c[4] = a[6] ^ a[5] ^ a[4] ^ a[2] ^ a[1];
    c[3] = a[4] ^ a[3] ^ a[2];
    c[2] = a[7] ^ a[5] ^ a[4];
    c[1] = a[6] ^ a[5] ^ a[4] ^ a[3] ^ a[2];
    c[0] = a[7] ^ a[6] ^ a[5] ^ a[3] ^ a[2] ^ a[0];
  end

endmodule
