// tb_gf_mul_c3_le: checks the logic-element mapping of product bit c3 over all
// 65536 operand pairs. The reduction vector d is formed here from the plain
// polynomial product (d0 = p14, d1 = p13, d2 = p12, d3 = p11, d4 = p10^p14,
// d5 = p9^p14^p13, d6 = p8^p12^p11) and c3 is compared with bit 3 of the
// shift-and-add product.
module tb_gf_mul_c3_le;
  import gf_ref_pkg::*;

  logic [7:0] a, b;
  logic [6:0] d;
  logic       c3;
  int checks = 0, failures = 0;

  gf_mul_c3_le dut (.a(a), .b(b), .d(d), .c3(c3));

  function automatic logic [14:0] clmul(logic [7:0] x, logic [7:0] y);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (y[i]) p ^= 15'(x) << i;
    return p;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        logic [14:0] p;
        logic [7:0]  exp;
        a = 8'(i);
        b = 8'(j);
        p = clmul(a, b);
        d = {p[8] ^ p[12] ^ p[11], p[9] ^ p[14] ^ p[13], p[10] ^ p[14],
             p[11], p[12], p[13], p[14]};
        #1;
        exp = ref_mul(a, b);
        checks++;
        if (c3 !== exp[3]) begin
          failures++;
          if (failures < 10) $display("mismatch %h*%h: c3 %b exp %b", a, b, c3, exp[3]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
