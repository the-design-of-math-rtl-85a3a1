// gf8_pkg: types and constants shared by the GF(2^8) math core.
//
// The field is GF(2^8) in polynomial basis with the AES field polynomial
// F(x) = x^8 + x^4 + x^3 + x + 1. Bit i of a gf8_t is the coefficient of
// alpha^i. The package also defines the cascade-gate selection of the modified
// logic element (AND and OR as in the stock cascade chain, XOR as the added gate).
package gf8_pkg;

  typedef logic [7:0] gf8_t;

  // Gate joining a logic element's LUT output to the cascade chain.
  typedef enum logic [1:0] {
    CASC_AND = 2'd0,
    CASC_OR  = 2'd1,
    CASC_XOR = 2'd2
  } casc_op_e;

  // Identity value that starts a cascade chain for a given gate.
  function automatic logic casc_identity(casc_op_e op);
    return (op == CASC_AND);
  endfunction

  // How much of the GF(2^8) multiplier is mapped onto logic elements.
  typedef enum logic [1:0] {
    MAP_GATES  = 2'd0,  // all XOR sums as plain gates
    MAP_C3_LE  = 2'd1,  // only the critical bit c3 on three elements
    MAP_ALL_LE = 2'd2   // reduction vector and all product bits on elements
  } le_map_e;

endpackage
