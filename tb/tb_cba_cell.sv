// Self-checking testbench for cba_cell, one bit position of the barrel adder
// ring. It drives load, the operand bits and the incoming carry at random and
// keeps its own copy of the two stored bits: on load they take the operand
// bits, otherwise A takes A xor B and B takes the incoming carry. After every
// rising edge it checks both stored bits and the outgoing carry (A and B),
// and it checks that the active-low clear empties the cell at once.
module tb_cba_cell;

  logic clk = 1'b0;
  logic clr_n, load, a_in, b_in, carry_in;
  logic a_q, b_q, carry_out;
  logic exp_a, exp_b;
  int   checks = 0;
  int   failures = 0;

  cba_cell dut (
    .clk       (clk),
    .clr_n     (clr_n),
    .load      (load),
    .a_in      (a_in),
    .b_in      (b_in),
    .carry_in  (carry_in),
    .a_q       (a_q),
    .b_q       (b_q),
    .carry_out (carry_out)
  );

  always #5 clk = ~clk;

  task automatic check_state(input string what);
    checks++;
    if (a_q !== exp_a || b_q !== exp_b || carry_out !== (exp_a & exp_b)) begin
      failures++;
      $display("FAIL %s: a_q=%0b b_q=%0b carry_out=%0b, expected a=%0b b=%0b", what,
               a_q, b_q, carry_out, exp_a, exp_b);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("tb_cba_cell: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr_n = 1'b0;
    {load, a_in, b_in, carry_in} = '0;
    exp_a = 1'b0;
    exp_b = 1'b0;
    #2;
    check_state("clear");
    clr_n = 1'b1;

    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      {load, a_in, b_in, carry_in} = 4'($urandom);
      if (load) begin
        exp_a = a_in;
        exp_b = b_in;
      end else begin
        exp_a = exp_a ^ exp_b;
        exp_b = carry_in;
      end
      @(posedge clk);
      #1;
      check_state(load ? "load" : "iterate");
    end

    // Asynchronous clear between edges.
    @(negedge clk);
    {load, a_in, b_in} = 3'b111;
    @(posedge clk);
    #2 clr_n = 1'b0;
    #1;
    exp_a = 1'b0;
    exp_b = 1'b0;
    check_state("asynchronous clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
