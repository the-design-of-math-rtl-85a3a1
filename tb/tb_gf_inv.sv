// tb_gf_inv: checks the inverse unit in both configurations against an
// exhaustive-search inverse.
//   Parallel (PIPELINED = 0): every operand 0..255, result in the same cycle.
//   Pipelined (PIPELINED = 1): every operand 0..255 issued back to back, then
//   a stream with random bubbles; each result must appear exactly 3 clocks
//   after its operand, in order, and valid must stay low after reset until
//   the first result. Also checks a*inv(a) = 1 for a != 0 and inv(0) = 0.
module tb_gf_inv;
  import gf_ref_pkg::*;

  localparam int LATENCY = 3;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       vi, vo_p, vo_c;
  logic [7:0] a, y_p, y_c;
  int checks = 0, failures = 0;
  int cycle = 0;
  int issued = 0, retired = 0;
  logic [7:0] exp_q[$];
  int         t_q[$];

  gf_inv #(.PIPELINED(1'b0)) dut_par  (.clk, .rst_n, .valid_i(vi), .a, .valid_o(vo_c), .y(y_c));
  gf_inv #(.PIPELINED(1'b1)) dut_pipe (.clk, .rst_n, .valid_i(vi), .a, .valid_o(vo_p), .y(y_p));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Parallel form: checked combinationally in the middle of each low phase.
  // Pipelined form: scoreboard of expected values and issue cycles.
  always @(posedge clk) begin
    if (rst_n && vo_p) begin
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("unexpected result %h", y_p);
      end else begin
        logic [7:0] e;
        int t;
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (y_p !== e) begin
          failures++;
          $display("pipe mismatch: got %h exp %h", y_p, e);
        end
        if (cycle - t != LATENCY) begin
          failures++;
          $display("pipe latency %0d", cycle - t);
        end
        retired++;
      end
    end
    if (rst_n && vi) begin
      exp_q.push_back(ref_inv(a));
      t_q.push_back(cycle);
      issued++;
    end
  end

  task automatic drive(logic v, logic [7:0] x);
    @(negedge clk);
    vi = v;
    a  = x;
    #1;
    if (v) begin
      logic [7:0] e;
      e = ref_inv(x);
      checks += 2;
      if (y_c !== e || vo_c !== 1'b1) begin
        failures++;
        $display("par mismatch inv(%h): got %h exp %h", x, y_c, e);
      end
      if (x != 0 ? ref_mul(x, y_c) !== 8'h01 : y_c !== 8'h00) failures++;
    end
  endtask

  initial begin
    rst_n = 1'b0; vi = 1'b0; a = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (vo_p !== 1'b0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 256; i++) drive(1'b1, 8'(i));
    for (int i = 0; i < 300; i++) drive(($urandom % 3) != 0, 8'($urandom));
    drive(1'b0, '0);
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (retired != issued || exp_q.size() != 0) begin
      failures++;
      $display("issued %0d retired %0d", issued, retired);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
