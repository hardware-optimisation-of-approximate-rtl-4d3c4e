// End-to-end testbench of the approximate multiplier at its default size
// (8 x 8 -> 16 bits), with no parameter overridden.
//
// Applies all 65,536 operand pairs and compares the product with the
// reference model in tb_approx_model_pkg. It also checks that a zero
// operand gives zero, counts exact, low and high results (each must occur),
// and reports the error rate (ER), mean error distance (MED) and mean error
// distance normalised to the largest product (NMED). Finally it runs the
// seven operand pairs of the published output waveform and prints the exact
// and approximate product of each.
module tb_multiplier;
  import approx_mult_pkg::*;
  import tb_approx_model_pkg::*;

  localparam int W  = DEFAULT_WIDTH;
  localparam int NB = 2 * W;

  logic [W-1:0]  a, b;
  logic [NB-1:0] out;
  int checks = 0, failures = 0;
  int exact = 0, low = 0, high = 0;
  longint sum_ed = 0;

  // Operand pairs of the published output waveform.
  localparam int unsigned VA [7] = '{10, 25, 20, 10, 10, 12, 80};
  localparam int unsigned VB [7] = '{50, 20, 12, 12, 15, 10, 10};

  multiplier dut (.a(a), .b(b), .out(out));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real max_p;
    for (int ia = 0; ia < 2 ** W; ia++) begin
      for (int ib = 0; ib < 2 ** W; ib++) begin
        word_t expect_out;
        longint p, ed;
        a = W'(ia);
        b = W'(ib);
        #1;
        expect_out = approx_product(word_t'(a), word_t'(b), W, W);
        checks++;
        if (out !== expect_out[NB-1:0]) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d out=%0d model=%0d", a, b, out, expect_out);
        end
        if (ia == 0 || ib == 0) begin
          checks++;
          if (out != 0) failures++;
        end
        p  = longint'(ia) * longint'(ib);
        ed = longint'(out) - p;
        if (ed == 0) exact++; else if (ed < 0) low++; else high++;
        sum_ed += (ed < 0) ? -ed : ed;
      end
    end
    max_p = real'((2 ** W - 1) * (2 ** W - 1));
    $display("results: exact=%0d low=%0d high=%0d", exact, low, high);
    $display("ER=%f MED=%f NMED=%f", real'(low + high) / real'(2 ** (2 * W)),
             real'(sum_ed) / real'(2 ** (2 * W)),
             real'(sum_ed) / real'(2 ** (2 * W)) / max_p);
    checks++;
    if (exact == 0 || low == 0 || high == 0) begin
      failures++;
      $display("FAIL an outcome class never occurred");
    end
    for (int i = 0; i < 7; i++) begin
      a = W'(VA[i]);
      b = W'(VB[i]);
      #1;
      $display("waveform vector a=%0d b=%0d exact=%0d approx=%0d", a, b, VA[i] * VB[i], out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
