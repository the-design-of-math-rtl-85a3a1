// le_xor_chain: an N-input XOR sum built from modified logic elements.
//
// The inputs are taken four at a time; each group feeds the 4-input parity
// LUT of one cpld_le and the elements are joined through their XOR cascade
// gates, so the sum costs ceil(N/4) elements and one cascade hop per
// element. Unused LUT inputs of the last element are tied to 0, which does
// not change the parity. Purely combinational (elements unregistered).
module le_xor_chain
  import gf8_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  output logic         y
);

  localparam int unsigned NLE = (N + 3) / 4;
  localparam logic [15:0] PARITY4 = 16'h6996;

  logic [4*NLE-1:0] xp;
  logic [NLE:0]     casc;
  logic [NLE-1:0]   q_unused;

  assign xp      = (4*NLE)'(x);
  assign casc[0] = 1'b0;

  for (genvar i = 0; i < NLE; i++) begin : g_le
    cpld_le #(.LUT_MASK(PARITY4), .CASC_OP(CASC_XOR), .REGISTERED(1'b0)) u_le (
      .clk(1'b0), .rst_n(1'b1), .din(xp[4*i +: 4]), .casc_in(casc[i]),
      .casc_out(casc[i+1]), .q(q_unused[i])
    );
  end

  assign y = casc[NLE];

endmodule
