// cpld_le: the modified CPLD logic element.
//
// A 4-input look-up table (contents LUT_MASK, bit index = din) produces one
// function of four variables. Its output is joined to the cascade chain coming
// from the previous element by one cascade gate. A stock element offers AND and
// OR there; this element adds an XOR in parallel, so that long XOR sums of a
// finite-field multiplier chain through consecutive elements without extra
// elements or routing. The cascade result leaves on casc_out (combinational,
// to the next element) and on q, either directly or through the element's
// register (REGISTERED = 1), which is what lets a circuit built from these
// elements be configured as parallel or pipelined.
//
// Timing: casc_out is combinational from din and casc_in. With REGISTERED = 1,
// q follows casc_out one clock later; the register clears on rst_n low.
// The gate choice as a configuration parameter, the reset and the register
// placement after the cascade gate are choices of this implementation.
module cpld_le
  import gf8_pkg::*;
#(
  parameter logic [15:0] LUT_MASK   = 16'h6996,  // 4-input parity
  parameter casc_op_e    CASC_OP    = CASC_XOR,
  parameter bit          REGISTERED = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] din,
  input  logic       casc_in,
  output logic       casc_out,
  output logic       q
);

  logic lut_out;

  always_comb begin
    lut_out = LUT_MASK[din];
    unique case (CASC_OP)
      CASC_AND: casc_out = lut_out & casc_in;
      CASC_OR:  casc_out = lut_out | casc_in;
      default:  casc_out = lut_out ^ casc_in;
    endcase
  end

  if (REGISTERED) begin : g_reg
    logic q_r;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q_r <= 1'b0;
      else        q_r <= casc_out;
    end
    assign q = q_r;
  end else begin : g_comb
    assign q = casc_out;
  end

endmodule
