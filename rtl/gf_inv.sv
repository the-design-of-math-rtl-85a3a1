// gf_inv: multiplicative inverse in GF(2^8), y = a^-1 = a^254 (a = 0 gives 0).
//
// The exponent 254 = 2 + 4 + ... + 128 is reached with four multipliers and
// power modules only (squarer gf_sq, fourth power gf_pow4), in a uniform
// structure of three levels, each one power step followed by one multiplier:
//
//   level 1:  a2   = a^2               a3   = a2 * a
//   level 2:  a12  = (a3)^4            a15  = a12 * a3     a14 = a12 * a2
//   level 3:  a240 = ((a15)^4)^4       y    = a240 * a14   (= a^254)
//
// Fewer multipliers than the plain product of seven squares, and since the
// power modules are a few XOR levels deep, each level's delay is about one
// multiplier.
//
// PIPELINED = 0 (parallel): the three levels are one combinational path;
//   valid_o = valid_i, y follows a in the same cycle, clk and rst_n unused.
// PIPELINED = 1: a register after each level; latency 3 clocks, one new
//   operand accepted every clock, the critical path is one level. valid
//   bits clear on rst_n low; data registers load only with a valid operand.
// The exponent chain and the three-stage split are this implementation's
// choice of the power/multiplier structure.
module gf_inv
  import gf8_pkg::*;
#(
  parameter bit PIPELINED = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid_i,
  input  gf8_t a,
  output logic valid_o,
  output gf8_t y
);

  // Level 1
  gf8_t a2, a3;
  gf_sq          u_sq1  (.a(a),  .c(a2));
  gf_mul_reorder u_mul1 (.a(a2), .b(a), .c(a3));

  // Level 1 -> 2 boundary
  gf8_t s1_a2, s1_a3;
  logic s1_v;

  // Level 2
  gf8_t a12, a15, a14;
  gf_pow4        u_p4a  (.a(s1_a3), .c(a12));
  gf_mul_reorder u_mul2 (.a(a12), .b(s1_a3), .c(a15));
  gf_mul_reorder u_mul3 (.a(a12), .b(s1_a2), .c(a14));

  // Level 2 -> 3 boundary
  gf8_t s2_a15, s2_a14;
  logic s2_v;

  // Level 3
  gf8_t a60, a240, a254;
  gf_pow4        u_p4b  (.a(s2_a15), .c(a60));
  gf_pow4        u_p4c  (.a(a60),    .c(a240));
  gf_mul_reorder u_mul4 (.a(a240), .b(s2_a14), .c(a254));

  if (PIPELINED) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s1_v    <= 1'b0;
        s2_v    <= 1'b0;
        valid_o <= 1'b0;
      end else begin
        s1_v    <= valid_i;
        s2_v    <= s1_v;
        valid_o <= s2_v;
      end
    end

    always_ff @(posedge clk) begin
      if (valid_i) begin
        s1_a2 <= a2;
        s1_a3 <= a3;
      end
      if (s1_v) begin
        s2_a15 <= a15;
        s2_a14 <= a14;
      end
      if (s2_v) y <= a254;
    end
  end else begin : g_par
    assign s1_v    = valid_i;
    assign s1_a2   = a2;
    assign s1_a3   = a3;
    assign s2_v    = s1_v;
    assign s2_a15  = a15;
    assign s2_a14  = a14;
    assign valid_o = s2_v;
    assign y       = a254;
  end

endmodule
