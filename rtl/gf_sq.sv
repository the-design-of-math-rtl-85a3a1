// gf_sq: squarer C = A^2 in GF(2^8), F(x) = x^8 + x^4 + x^3 + x + 1.
//
// Squaring is linear over GF(2): A^2 = sum a_i alpha^(2i), and the terms with
// 2i >= 8 fold back through F. Each output bit is therefore the XOR of two to
// four input bits, the coefficient table the design is built from. Purely
// combinational; a few gates deep, small enough for well under ten 4-input
// logic elements.
module gf_sq
  import gf8_pkg::*;
(
  input  gf8_t a,
  output gf8_t c
);

  always_comb begin
    c[7] = a[7] ^ a[6];
    c[6] = a[5] ^ a[3];
    c[5] = a[6] ^ a[5];
    c[4] = a[7] ^ a[4] ^ a[2];
    c[3] = a[7] ^ a[6] ^ a[5] ^ a[4];
    c[2] = a[5] ^ a[1];
    c[1] = a[7] ^ a[6] ^ a[4];
    c[0] = a[6] ^ a[4] ^ a[0];
  end

endmodule
