// Self-checking testbench for d_flip_flop. It clocks random data through the
// flip-flop and checks q against the value of d at the last rising edge, and
// q_n against ~q. It then asserts clear and preset between clock edges to
// check that they act at once, without a clock edge, that they hold the
// output while asserted, and that clear wins when both are asserted.
module tb_d_flip_flop;

  logic clk = 1'b0;
  logic pre_n, clr_n, d, q, q_n;
  logic expected;
  int   checks = 0;
  int   failures = 0;

  d_flip_flop dut (.clk(clk), .pre_n(pre_n), .clr_n(clr_n), .d(d), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  task automatic check(input logic exp_q, input string what);
    checks++;
    if (q !== exp_q || q_n !== ~exp_q) begin
      failures++;
      $display("FAIL %s: q=%0b q_n=%0b, expected q=%0b", what, q, q_n, exp_q);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("tb_d_flip_flop: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pre_n = 1'b1;
    clr_n = 1'b0;
    d     = 1'b1;
    #2;
    check(1'b0, "clear at start");
    clr_n = 1'b1;

    // Data follows d at rising edges only.
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      expected = d;
      #2;
      check(q, "no change between edges");   // d changed, q must not follow yet
      @(posedge clk);
      #1;
      check(expected, "capture on rising edge");
    end

    // Asynchronous clear, between edges.
    @(negedge clk);
    d = 1'b1;
    @(posedge clk);
    #1;
    check(1'b1, "set up for clear");
    #1 clr_n = 1'b0;
    #1;
    check(1'b0, "asynchronous clear");
    @(posedge clk);
    #1;
    check(1'b0, "clear holds over a clock edge");
    clr_n = 1'b1;

    // Asynchronous preset, between edges.
    @(negedge clk);
    d = 1'b0;
    @(posedge clk);
    #1;
    check(1'b0, "set up for preset");
    #1 pre_n = 1'b0;
    #1;
    check(1'b1, "asynchronous preset");
    @(posedge clk);
    #1;
    check(1'b1, "preset holds over a clock edge");

    // Both asserted: clear has priority.
    clr_n = 1'b0;
    #1;
    check(1'b0, "clear wins over preset");
    clr_n = 1'b1;
    pre_n = 1'b1;
    @(posedge clk);
    #1;
    check(d, "normal operation after release");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
