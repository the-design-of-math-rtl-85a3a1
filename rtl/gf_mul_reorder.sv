// gf_mul_reorder: bit-parallel "reordering" multiplier in GF(2^8),
// C = A * B mod F(x), F(x) = x^8 + x^4 + x^3 + x + 1 (the AES field).
//
// The 64 partial products a_i b_j split into two groups. The regular group,
// lo[k] = sum_{i=0..k} a_(k-i) b_i, gives the coefficients of x^0..x^7 of the
// plain product. The reordering group, hi[k] = sum_{i=0..k} a_(7-i) b_(7-k+i),
// gives the coefficient of x^(14-k). Instead of reducing x^8..x^14 one by one,
// the high coefficients are first combined into a shared reduction vector
//
//   d0 = hi0, d1 = hi1, d2 = hi2, d3 = hi3,
//   d4 = hi4 ^ d0, d5 = hi5 ^ d0 ^ d1, d6 = hi6 ^ d2 ^ d3,
//
// and every product bit is then one short XOR of a high term, a low term and
// two to four d's:
//
//   c0 = hi6 ^ lo0 ^ d1 ^ d2            c4 = hi2 ^ lo4 ^ d1 ^ d5 ^ d6
//   c1 = hi5 ^ lo1 ^ d0 ^ d3 ^ d6       c5 = hi1 ^ lo5 ^ d2 ^ d4 ^ d5
//   c2 = hi4 ^ lo2 ^ d0 ^ d5            c6 = hi0 ^ lo6 ^ d1 ^ d3 ^ d4
//   c3 = hi3 ^ lo3 ^ d1 ^ d3 ^ d4 ^ d6  c7 =       lo7 ^ d0 ^ d2 ^ d3
//
// This repositioning of the XOR gates shortens and balances the XOR trees.
// The grouping follows the published equations of this multiplier; the
// d-terms of c1, c3 and c4 are the ones that make the result equal A*B mod F
// (verified exhaustively).
//
// LE_MAP selects how the XOR sums are built (the function is the same):
//   MAP_GATES  : plain XOR logic.
//   MAP_C3_LE  : the critical bit c3 on three modified logic elements with an
//                XOR cascade (gf_mul_c3_le), the rest plain logic.
//   MAP_ALL_LE : the CPLD mapping: AND terms from a product-term array, every
//                d and c sum on cascaded modified logic elements (c3 as in
//                gf_mul_c3_le, the others through le_xor_chain).
//                34 elements: d1..d6 take 10, each product bit 3.
// Purely combinational; no clock.
module gf_mul_reorder
  import gf8_pkg::*;
#(
  parameter le_map_e LE_MAP = MAP_ALL_LE
) (
  input  gf8_t a,
  input  gf8_t b,
  output gf8_t c
);

  // Product-term AND array: ht[k][i] = a_(7-i) b_(7-k+i), lt[k][i] = a_(k-i) b_i.
  logic [7:0] ht [7];
  logic [7:0] lt [8];
  logic [7:0] lo;   // lo[k]: coefficient of x^k of the plain product
  logic [6:0] hi;   // hi[k]: coefficient of x^(14-k)
  logic [6:0] d_g;  // reduction vector, gate form
  gf8_t       c_g;  // product, gate form

  always_comb begin
    for (int k = 0; k < 7; k++) begin
      ht[k] = '0;
      for (int i = 0; i <= k; i++) ht[k][i] = a[7-i] & b[7-k+i];
    end
    for (int k = 0; k < 8; k++) begin
      lt[k] = '0;
      for (int i = 0; i <= k; i++) lt[k][i] = a[k-i] & b[i];
    end
    for (int k = 0; k < 7; k++) hi[k] = ^ht[k];
    for (int k = 0; k < 8; k++) lo[k] = ^lt[k];

    d_g[0] = hi[0];
    d_g[1] = hi[1];
    d_g[2] = hi[2];
    d_g[3] = hi[3];
    d_g[4] = hi[4] ^ d_g[0];
    d_g[5] = hi[5] ^ d_g[0] ^ d_g[1];
    d_g[6] = hi[6] ^ d_g[2] ^ d_g[3];

    c_g[0] = hi[6] ^ lo[0] ^ d_g[1] ^ d_g[2];
    c_g[1] = hi[5] ^ lo[1] ^ d_g[0] ^ d_g[3] ^ d_g[6];
    c_g[2] = hi[4] ^ lo[2] ^ d_g[0] ^ d_g[5];
    c_g[3] = hi[3] ^ lo[3] ^ d_g[1] ^ d_g[3] ^ d_g[4] ^ d_g[6];
    c_g[4] = hi[2] ^ lo[4] ^ d_g[1] ^ d_g[5] ^ d_g[6];
    c_g[5] = hi[1] ^ lo[5] ^ d_g[2] ^ d_g[4] ^ d_g[5];
    c_g[6] = hi[0] ^ lo[6] ^ d_g[1] ^ d_g[3] ^ d_g[4];
    c_g[7] =         lo[7] ^ d_g[0] ^ d_g[2] ^ d_g[3];
  end

  if (LE_MAP == MAP_GATES) begin : g_gates
    assign c = c_g;
  end else if (LE_MAP == MAP_C3_LE) begin : g_c3_le
    logic c3;
    gf_mul_c3_le u_c3 (.a(a), .b(b), .d(d_g), .c3(c3));
    assign c = {c_g[7:4], c3, c_g[2:0]};
  end else begin : g_all_le
    logic [6:0] d;
    gf8_t       cl;

    // Reduction vector on elements; d0 is a single product term.
    assign d[0] = ht[0][0];
    le_xor_chain #(.N(2))  u_d1 (.x(ht[1][1:0]),             .y(d[1]));
    le_xor_chain #(.N(3))  u_d2 (.x(ht[2][2:0]),             .y(d[2]));
    le_xor_chain #(.N(4))  u_d3 (.x(ht[3][3:0]),             .y(d[3]));
    le_xor_chain #(.N(6))  u_d4 (.x({ht[4][4:0], d[0]}),       .y(d[4]));
    le_xor_chain #(.N(8))  u_d5 (.x({ht[5][5:0], d[0], d[1]}), .y(d[5]));
    le_xor_chain #(.N(9))  u_d6 (.x({ht[6][6:0], d[2], d[3]}), .y(d[6]));

    // Product bits on elements.
    le_xor_chain #(.N(10)) u_c0 (.x({ht[6][6:0], lt[0][0],   d[1], d[2]}),       .y(cl[0]));
    le_xor_chain #(.N(11)) u_c1 (.x({ht[5][5:0], lt[1][1:0], d[0], d[3], d[6]}), .y(cl[1]));
    le_xor_chain #(.N(10)) u_c2 (.x({ht[4][4:0], lt[2][2:0], d[0], d[5]}),       .y(cl[2]));
    gf_mul_c3_le           u_c3 (.a(a), .b(b), .d(d),                            .c3(cl[3]));
    le_xor_chain #(.N(11)) u_c4 (.x({ht[2][2:0], lt[4][4:0], d[1], d[5], d[6]}), .y(cl[4]));
    le_xor_chain #(.N(11)) u_c5 (.x({ht[1][1:0], lt[5][5:0], d[2], d[4], d[5]}), .y(cl[5]));
    le_xor_chain #(.N(11)) u_c6 (.x({ht[0][0],   lt[6][6:0], d[1], d[3], d[4]}), .y(cl[6]));
    le_xor_chain #(.N(11)) u_c7 (.x({lt[7][7:0], d[0], d[2], d[3]}),             .y(cl[7]));

    assign c = cl;
  end

endmodule
