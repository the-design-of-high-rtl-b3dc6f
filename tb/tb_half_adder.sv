// Self-checking testbench for half_adder: applies all four input pairs and
// checks that 2*c + s equals a + b, computed here as an integer sum.
module tb_half_adder;

  logic a, b, s, c;
  int   checks = 0;
  int   failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin
    #1000;
    failures++;
    $display("tb_half_adder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      int exp_sum;
      {a, b} = 2'(i);
      #1;
      exp_sum = int'(a) + int'(b);
      checks++;
      if ({c, s} != 2'(exp_sum)) begin
        failures++;
        $display("FAIL a=%0b b=%0b: got c=%0b s=%0b, expected %0d", a, b, c, s, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
