// Self-checking testbench of modified_full_adder: all eight input patterns,
// expected carry = 1 when at least two of the three inputs are 1.
module tb_modified_full_adder;
  logic [2:0] x;
  logic cf;
  int checks = 0, failures = 0;

  modified_full_adder dut (.x0(x[0]), .x1(x[1]), .x2(x[2]), .cf(cf));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      x = 3'(i);
      #1;
      checks++;
      if (cf !== ($countones(x) >= 2)) begin
        failures++;
        $display("FAIL x=%03b cf=%0b", x, cf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
