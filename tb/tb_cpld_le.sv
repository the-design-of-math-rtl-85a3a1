// tb_cpld_le: checks the modified logic element in four configurations:
// parity LUT with the XOR cascade gate, an arbitrary LUT with the AND and the
// OR cascade gates, and the XOR configuration with the output register. All
// 32 combinations of din and casc_in are applied; the expected value is
// worked out from the LUT mask bit by bit. The registered element must show
// its value one clock after the inputs change and clear on reset.
module tb_cpld_le;
  import gf8_pkg::*;

  localparam logic [15:0] MASK_B = 16'hA5C3;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [3:0] din;
  logic       casc_in;
  logic [3:0] co, q;
  int checks = 0, failures = 0;

  cpld_le #(.LUT_MASK(16'h6996), .CASC_OP(CASC_XOR), .REGISTERED(1'b0)) u_xor (
    .clk, .rst_n, .din, .casc_in, .casc_out(co[0]), .q(q[0]));
  cpld_le #(.LUT_MASK(MASK_B), .CASC_OP(CASC_AND), .REGISTERED(1'b0)) u_and (
    .clk, .rst_n, .din, .casc_in, .casc_out(co[1]), .q(q[1]));
  cpld_le #(.LUT_MASK(MASK_B), .CASC_OP(CASC_OR), .REGISTERED(1'b0)) u_or (
    .clk, .rst_n, .din, .casc_in, .casc_out(co[2]), .q(q[2]));
  cpld_le #(.LUT_MASK(16'h6996), .CASC_OP(CASC_XOR), .REGISTERED(1'b1)) u_reg (
    .clk, .rst_n, .din, .casc_in, .casc_out(co[3]), .q(q[3]));

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: din=%h casc_in=%b got %b exp %b", what, din, casc_in, got, exp);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; din = '0; casc_in = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check("reset", q[3], 1'b0);
    rst_n = 1'b1;
    for (int k = 0; k < 32; k++) begin
      logic par, lb, exp_x;
      @(negedge clk);
      din = 4'(k);
      casc_in = k[4];
      #1;
      par = din[0] ^ din[1] ^ din[2] ^ din[3];
      lb  = MASK_B[din];
      exp_x = par ^ casc_in;
      check("xor casc_out", co[0], exp_x);
      check("xor q",        q[0],  exp_x);
      check("and casc_out", co[1], lb & casc_in);
      check("or casc_out",  co[2], lb | casc_in);
      check("or q",         q[2],  lb | casc_in);
      check("reg casc_out", co[3], exp_x);
      @(posedge clk);
      #1;
      check("reg q", q[3], exp_x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
