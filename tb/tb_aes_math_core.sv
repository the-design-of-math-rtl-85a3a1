// tb_aes_math_core: end-to-end test of the math core in its default, pipelined form
// (gf_inv with three pipeline registers).
// Both channels run at once: every inverse operand 0..255 and a
// sweep of multiplier operands back to back, then random traffic with
// bubbles. Scoreboards check every result against shift-and-add
// multiplication and an exhaustive-search inverse, in order, with the
// multiplier latency of 1 clock and the inverse latency of 4 clocks.
// Counted events (each must occur): back-to-back operands on each channel,
// idle cycles between operands, inverse of zero, both channels busy in one
// clock, and (pipelined form) more than one inverse in flight at once.
module tb_aes_math_core;
  import gf_ref_pkg::*;

  localparam int MUL_LAT = 1;
  localparam int INV_LAT = 4;
  localparam int N_RAND  = 2000;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       mvi, mvo, ivi, ivo;
  logic [7:0] ma, mb, mc, ia, iy;
  int checks = 0, failures = 0;
  int cycle = 0;
  logic [7:0] mexp[$], iexp[$];
  int         mt[$], it[$];
  int n_b2b_mul = 0, n_b2b_inv = 0, n_bubble = 0, n_inv_zero = 0;
  int n_both = 0, n_overlap = 0, n_mul = 0, n_inv = 0;
  logic       prev_mvi = 1'b0, prev_ivi = 1'b0;

  aes_math_core  dut (
    .clk, .rst_n,
    .mul_valid_i(mvi), .mul_a(ma), .mul_b(mb), .mul_valid_o(mvo), .mul_c(mc),
    .inv_valid_i(ivi), .inv_a(ia), .inv_valid_o(ivo), .inv_y(iy)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (mvo) begin
        checks += 2;
        if (mexp.size() == 0) failures += 2;
        else begin
          logic [7:0] e;
          int t;
          e = mexp.pop_front();
          t = mt.pop_front();
          if (mc !== e) begin failures++; $display("mul got %h exp %h", mc, e); end
          if (cycle - t != MUL_LAT) begin failures++; $display("mul latency %0d", cycle - t); end
          n_mul++;
        end
      end
      if (ivo) begin
        checks += 2;
        if (iexp.size() == 0) failures += 2;
        else begin
          logic [7:0] e;
          int t;
          e = iexp.pop_front();
          t = it.pop_front();
          if (iy !== e) begin failures++; $display("inv got %h exp %h", iy, e); end
          if (cycle - t != INV_LAT) begin failures++; $display("inv latency %0d", cycle - t); end
          n_inv++;
        end
      end
      if (mvi) begin mexp.push_back(ref_mul(ma, mb)); mt.push_back(cycle); end
      if (ivi) begin
        iexp.push_back(ref_inv(ia)); it.push_back(cycle);
        if (ia == 8'h00) n_inv_zero++;
      end
      if (mvi && prev_mvi) n_b2b_mul++;
      if (ivi && prev_ivi) n_b2b_inv++;
      if ((!mvi && prev_mvi) || (!ivi && prev_ivi)) n_bubble++;
      if (mvi && ivi) n_both++;
      if (it.size() > 1) n_overlap++;
      prev_mvi <= mvi;
      prev_ivi <= ivi;
    end
  end

  task automatic cyc(logic mv, logic [7:0] x, logic [7:0] y, logic iv, logic [7:0] z);
    @(negedge clk);
    mvi = mv; ma = x; mb = y;
    ivi = iv; ia = z;
  endtask

  task automatic count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("event never happened: %s", what);
    end else $display("%-26s %0d", what, n);
  endtask

  initial begin
    rst_n = 1'b0; mvi = 1'b0; ivi = 1'b0; ma = '0; mb = '0; ia = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (mvo !== 1'b0 || ivo !== 1'b0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 256; i++) cyc(1'b1, 8'(i), 8'(8'hFF - 3 * i), 1'b1, 8'(i));
    for (int i = 0; i < N_RAND; i++)
      cyc(($urandom % 4) != 0, 8'($urandom), 8'($urandom), ($urandom % 3) != 0, 8'($urandom));
    cyc(1'b0, '0, '0, 1'b0, '0);
    repeat (INV_LAT + 3) @(posedge clk);
    checks++;
    if (mexp.size() != 0 || iexp.size() != 0) begin
      failures++;
      $display("results missing: mul %0d inv %0d", mexp.size(), iexp.size());
    end
    $display("products %0d inverses %0d", n_mul, n_inv);
    count("back-to-back multiplies", n_b2b_mul);
    count("back-to-back inverses", n_b2b_inv);
    count("idle cycles after operands", n_bubble);
    count("inverse of zero", n_inv_zero);
    count("both channels in one clock", n_both);
    if (INV_LAT > 1) count("inverses in flight > 1", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
