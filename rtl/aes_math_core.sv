// aes_math_core: GF(2^8) math core for AES, a multiplier channel and an
// inverse channel side by side.
//
// Multiplier channel: mul_c = mul_a * mul_b mod x^8 + x^4 + x^3 + x + 1,
//   computed by the reordering multiplier (gf_mul_reorder, mapped onto
//   modified logic elements with XOR cascades) and registered: latency 1 clock, one product per
//   clock.
// Inverse channel: inv_y = inv_a^254 (the inverse, 0 for 0) by gf_inv,
//   followed by an output register. PIPELINED = 1 inserts gf_inv's three
//   pipeline registers (latency 4 clocks, one result per clock, short clock
//   period); PIPELINED = 0 uses the parallel combinational form (latency 1
//   clock, long clock period). Either way a new operand may enter every clock.
//
// Each channel has a valid bit travelling with its data; there is no
// back-pressure. The valid bits clear on rst_n low (asynchronous). The
// registered outputs and valid qualification are this implementation's
// interface choice.
module aes_math_core
  import gf8_pkg::*;
#(
  parameter bit PIPELINED = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic mul_valid_i,
  input  gf8_t mul_a,
  input  gf8_t mul_b,
  output logic mul_valid_o,
  output gf8_t mul_c,
  input  logic inv_valid_i,
  input  gf8_t inv_a,
  output logic inv_valid_o,
  output gf8_t inv_y
);

  gf8_t mul_prod, inv_res;
  logic inv_res_v;

  gf_mul_reorder #(.LE_MAP(MAP_ALL_LE)) u_mul (.a(mul_a), .b(mul_b), .c(mul_prod));

  gf_inv #(.PIPELINED(PIPELINED)) u_inv (
    .clk(clk), .rst_n(rst_n),
    .valid_i(inv_valid_i), .a(inv_a),
    .valid_o(inv_res_v), .y(inv_res)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mul_valid_o <= 1'b0;
      inv_valid_o <= 1'b0;
    end else begin
      mul_valid_o <= mul_valid_i;
      inv_valid_o <= inv_res_v;
    end
  end

  always_ff @(posedge clk) begin
    if (mul_valid_i) mul_c <= mul_prod;
    if (inv_res_v)   inv_y <= inv_res;
  end

endmodule
