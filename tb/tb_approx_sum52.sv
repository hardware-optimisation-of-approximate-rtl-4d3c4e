// Self-checking testbench of approx_sum52: all 32 input patterns. Expected
// value: 1 when X4 is 1, otherwise 1 only when (X0,X1) and (X2,X3) each hold
// exactly one 1. The testbench also counts where the approximate sum agrees
// with and differs from the exact parity of the five inputs.
module tb_approx_sum52;
  logic [4:0] x;
  logic sum;
  int checks = 0, failures = 0;
  int agree = 0, differ = 0;

  approx_sum52 dut (.x(x), .sum(sum));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic expect_sum;
      x = 5'(i);
      #1;
      expect_sum = x[4] || (($countones(x[1:0]) == 1) && ($countones(x[3:2]) == 1));
      checks++;
      if (sum !== expect_sum) begin
        failures++;
        $display("FAIL x=%05b sum=%0b expected %0b", x, sum, expect_sum);
      end
      if (sum == ^x) agree++; else differ++;
    end
    $display("sum equals parity in %0d of 32 patterns", agree);
    checks++;
    if (agree == 0 || differ == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
