// Self-checking testbench of approx_compressor52: all 32 input patterns.
// Checks Sum and Carry against values worked out from the count of ones and
// the position of the ones, and checks 2*Carry+Sum against the table of
// values the compressor may give for each count:
//   0 -> 0, 1 -> 0 or 1, 2 -> 2 or 3, 3 -> 2 or 3, 4 -> 2 or 3, 5 -> 3.
// Counts how many patterns are exact, low and high.
module tb_approx_compressor52;
  logic [4:0] x;
  logic sum, carry;
  int checks = 0, failures = 0;
  int exact = 0, low = 0, high = 0;

  approx_compressor52 dut (.x(x), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      int n, v;
      logic e_sum, e_carry;
      x = 5'(i);
      #1;
      n = $countones(x);
      e_carry = (n >= 2);
      e_sum = x[4] | ((x[0] != x[1]) & (x[2] != x[3]));
      v = 2 * int'(carry) + int'(sum);
      checks++;
      if (sum !== e_sum || carry !== e_carry) begin
        failures++;
        $display("FAIL x=%05b sum=%0b carry=%0b", x, sum, carry);
      end
      checks++;
      case (n)
        0: if (v != 0) failures++;
        1: if (v > 1) failures++;
        5: if (v != 3) failures++;
        default: if (v < 2) failures++;
      endcase
      if (v == n) exact++; else if (v < n) low++; else high++;
    end
    $display("exact=%0d low=%0d high=%0d", exact, low, high);
    checks++;
    if (exact == 0 || low == 0 || high == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
