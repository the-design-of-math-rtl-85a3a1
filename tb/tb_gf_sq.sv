// tb_gf_sq: exhaustive check of the A^2 module over all 256 operands against
// repeated shift-and-add multiplication, plus a check that the map is a
// permutation of the field (no two operands give the same result).
module tb_gf_sq;
  import gf_ref_pkg::*;

  logic [7:0] a, c;
  logic [255:0] seen;
  int checks = 0, failures = 0;

  gf_sq dut (.a(a), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 256; i++) begin
      logic [7:0] exp;
      a = 8'(i);
      #1;
      exp = ref_pow(a, 2);
      checks++;
      if (c !== exp) begin
        failures++;
        if (failures < 10) $display("mismatch %h^2: got %h exp %h", a, c, exp);
      end
      checks++;
      if (seen[c]) failures++;
      seen[c] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
