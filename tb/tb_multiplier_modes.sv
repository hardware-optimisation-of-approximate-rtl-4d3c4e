// Testbench of the multiplier's approximation boundary APPROX_COLS at 8 bits.
// With APPROX_COLS = 0 no compressor is used and every product must be
// exact, which is checked against a*b for all 65,536 operand pairs. With
// APPROX_COLS = 16 every column of height five or more is approximated, and
// the result is compared with the reference model.
module tb_multiplier_modes;
  import tb_approx_model_pkg::*;

  localparam int W  = 8;
  localparam int NB = 2 * W;

  logic [W-1:0]  a, b;
  logic [NB-1:0] out_exact, out_all;
  int checks = 0, failures = 0;
  int all_inexact = 0;

  multiplier #(.WIDTH(W), .APPROX_COLS(0))  dut_exact (.a(a), .b(b), .out(out_exact));
  multiplier #(.WIDTH(W), .APPROX_COLS(NB)) dut_all   (.a(a), .b(b), .out(out_all));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 2 ** W; ia++) begin
      for (int ib = 0; ib < 2 ** W; ib++) begin
        word_t expect_all;
        a = W'(ia);
        b = W'(ib);
        #1;
        checks++;
        if (int'(out_exact) != ia * ib) begin
          failures++;
          if (failures < 10) $display("FAIL exact %0d*%0d=%0d", a, b, out_exact);
        end
        expect_all = approx_product(word_t'(a), word_t'(b), W, NB);
        checks++;
        if (out_all !== expect_all[NB-1:0]) begin
          failures++;
          if (failures < 10) $display("FAIL all-approx %0d*%0d=%0d model %0d", a, b, out_all, expect_all);
        end
        if (int'(out_all) != ia * ib) all_inexact++;
      end
    end
    checks++;
    if (all_inexact == 0) failures++;
    $display("all-columns mode: %0d inexact products", all_inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
