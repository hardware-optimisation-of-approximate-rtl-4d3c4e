// Self-checking testbench of approx_carry52: all 32 input patterns. The
// carry equation is 1 exactly when two or more inputs are 1, which the
// testbench computes by counting ones. It also counts how often each of the
// three product terms is the only one that fires, so every term is exercised.
module tb_approx_carry52;
  logic [4:0] x;
  logic carry;
  int checks = 0, failures = 0;
  int only_a = 0, only_b = 0, only_ab = 0;

  approx_carry52 dut (.x(x), .carry(carry));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      int na, nb;
      x = 5'(i);
      #1;
      na = $countones(x[2:0]);
      nb = $countones(x[4:3]);
      checks++;
      if (carry !== ($countones(x) >= 2)) begin
        failures++;
        $display("FAIL x=%05b carry=%0b", x, carry);
      end
      if (na >= 2 && nb == 0) only_a++;
      if (nb == 2 && na == 0) only_b++;
      if (na == 1 && nb == 1) only_ab++;
    end
    checks++;
    if (only_a == 0 || only_b == 0 || only_ab == 0) begin
      failures++;
      $display("FAIL coverage a=%0d b=%0d ab=%0d", only_a, only_b, only_ab);
    end
    $display("terms alone: Cf(A)=%0d Ch(B)=%0d Ch(A,B)=%0d", only_a, only_b, only_ab);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
