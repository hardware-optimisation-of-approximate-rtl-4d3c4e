// Testbench of the approximate multiplier widened to 16 x 16 -> 32 bits
// (five compressor layers). Random operand pairs plus corner cases are
// compared with the reference model in tb_approx_model_pkg.
module tb_multiplier_w16;
  import tb_approx_model_pkg::*;

  localparam int W  = 16;
  localparam int NB = 2 * W;

  logic [W-1:0]  a, b;
  logic [NB-1:0] out;
  int checks = 0, failures = 0;
  int exact = 0, inexact = 0;

  multiplier #(.WIDTH(W)) dut (.a(a), .b(b), .out(out));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    word_t expect_out;
    a = ta;
    b = tb_;
    #1;
    expect_out = approx_product(word_t'(a), word_t'(b), W, W);
    checks++;
    if (out !== expect_out[NB-1:0]) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d out=%0d model=%0d", a, b, out, expect_out);
    end
    if (longint'(out) == longint'(a) * longint'(b)) exact++; else inexact++;
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 16'h0001);
    apply(16'h8000, 16'h8000);
    for (int t = 0; t < 50000; t++) apply(W'($urandom), W'($urandom));
    checks++;
    if (exact == 0 || inexact == 0) failures++;
    $display("exact=%0d inexact=%0d", exact, inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
