// gf_ref_pkg: reference arithmetic for the testbenches, written independently
// of the design. Multiplication is shift-and-add with reduction by
// x^8 = x^4 + x^3 + x + 1 (0x1B) after each shift; powers are repeated
// multiplication; the inverse is found by exhaustive search (0 maps to 0).
package gf_ref_pkg;

  function automatic logic [7:0] ref_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] acc, sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= sh;
      sh = sh[7] ? ((sh << 1) ^ 8'h1B) : (sh << 1);
    end
    return acc;
  endfunction

  function automatic logic [7:0] ref_pow(logic [7:0] a, int unsigned e);
    logic [7:0] r;
    r = 8'h01;
    for (int unsigned i = 0; i < e; i++) r = ref_mul(r, a);
    return r;
  endfunction

  function automatic logic [7:0] ref_inv(logic [7:0] a);
    if (a == 8'h00) return 8'h00;
    for (int x = 1; x < 256; x++)
      if (ref_mul(a, 8'(x)) == 8'h01) return 8'(x);
    return 8'h00;
  endfunction

endpackage
