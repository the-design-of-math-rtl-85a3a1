// gf_mul_c3_le: product bit c3 of the GF(2^8) multiplier, mapped onto logic elements.
//
// c3 is the longest XOR sum of the multiplier and sets its critical path. Here
// the AND terms come from a product-term AND array (plain AND gates), and the
// XOR sum is formed by three modified logic elements (cpld_le) whose LUTs each
// compute the parity of four inputs and whose XOR cascade gates chain them:
//
//   LE0: a7b4 ^ a6b5 ^ a5b6 ^ a4b7          (reordering group, x^11 terms)
//   LE1: a3b0 ^ a2b1 ^ a1b2 ^ a0b3 ^ LE0    (regular group, x^3 terms)
//   LE2: d1 ^ d3 ^ d4 ^ d6 ^ LE1            (reduction vector)  -> c3
//
// so c3 costs exactly three elements, twelve inputs in all. The d vector is the
// reduction vector formed once by gf_mul_reorder and shared by all product bits.
// Purely combinational: the elements are used unregistered.
module gf_mul_c3_le
  import gf8_pkg::*;
(
  input  gf8_t       a,
  input  gf8_t       b,
  input  logic [6:0] d,   // d[k] = d_k
  output logic       c3
);

  localparam logic [15:0] PARITY4 = 16'h6996;

  logic [3:0] pt_hi, pt_lo, dsel;
  logic [2:0] casc;
  logic [2:0] q_unused;

  // Product-term AND array.
  assign pt_hi = {a[7] & b[4], a[6] & b[5], a[5] & b[6], a[4] & b[7]};
  assign pt_lo = {a[3] & b[0], a[2] & b[1], a[1] & b[2], a[0] & b[3]};
  assign dsel  = {d[1], d[3], d[4], d[6]};

  cpld_le #(.LUT_MASK(PARITY4), .CASC_OP(CASC_XOR), .REGISTERED(1'b0)) u_le0 (
    .clk(1'b0), .rst_n(1'b1), .din(pt_hi), .casc_in(1'b0),
    .casc_out(casc[0]), .q(q_unused[0])
  );
  cpld_le #(.LUT_MASK(PARITY4), .CASC_OP(CASC_XOR), .REGISTERED(1'b0)) u_le1 (
    .clk(1'b0), .rst_n(1'b1), .din(pt_lo), .casc_in(casc[0]),
    .casc_out(casc[1]), .q(q_unused[1])
  );
  cpld_le #(.LUT_MASK(PARITY4), .CASC_OP(CASC_XOR), .REGISTERED(1'b0)) u_le2 (
    .clk(1'b0), .rst_n(1'b1), .din(dsel), .casc_in(casc[1]),
    .casc_out(casc[2]), .q(q_unused[2])
  );

  assign c3 = casc[2];

endmodule
