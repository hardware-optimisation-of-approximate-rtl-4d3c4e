// Self-checking testbench of modified_half_adder: applies all four input
// pairs and expects the carry to be 1 only when both inputs are 1.
module tb_modified_half_adder;
  logic a, b, c;
  int checks = 0, failures = 0;

  modified_half_adder dut (.a(a), .b(b), .c(c));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {b, a} = 2'(i);
      #1;
      checks++;
      if (c !== (i == 3)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
