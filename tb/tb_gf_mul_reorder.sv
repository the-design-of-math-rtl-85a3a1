// tb_gf_mul_reorder: exhaustive check of the reordering multiplier, all
// 65536 operand pairs, in its three forms (plain gates, c3 on logic
// elements, everything on logic elements), against shift-and-add
// multiplication.
// Also checks the known AES products 0x57*0x83 = 0xC1 and 0x57*0x13 = 0xFE.
module tb_gf_mul_reorder;
  import gf_ref_pkg::*;
  import gf8_pkg::*;

  logic [7:0] a, b, c_le, c_xor, c_all;
  int checks = 0, failures = 0;

  gf_mul_reorder #(.LE_MAP(MAP_C3_LE))  dut_le  (.a(a), .b(b), .c(c_le));
  gf_mul_reorder #(.LE_MAP(MAP_GATES))  dut_xor (.a(a), .b(b), .c(c_xor));
  gf_mul_reorder #(.LE_MAP(MAP_ALL_LE)) dut_all (.a(a), .b(b), .c(c_all));

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
        logic [7:0] exp;
        a = 8'(i);
        b = 8'(j);
        #1;
        exp = ref_mul(a, b);
        checks += 3;
        if (c_le !== exp) begin
          failures++;
          if (failures < 10) $display("LE  mismatch %h*%h: got %h exp %h", a, b, c_le, exp);
        end
        if (c_all !== exp) begin
          failures++;
          if (failures < 10) $display("ALL mismatch %h*%h: got %h exp %h", a, b, c_all, exp);
        end
        if (c_xor !== exp) begin
          failures++;
          if (failures < 10) $display("XOR mismatch %h*%h: got %h exp %h", a, b, c_xor, exp);
        end
      end
    end
    a = 8'h57; b = 8'h83; #1;
    checks++; if (c_all !== 8'hC1) failures++;
    a = 8'h57; b = 8'h13; #1;
    checks++; if (c_all !== 8'hFE) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
