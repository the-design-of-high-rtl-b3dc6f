// Exhaustive self-checking testbench for barrel_adder at a 4-bit width: after
// the directed cases it adds every pair of 4-bit operands.
//
// Every addition is checked three ways: the sum against a + b computed here
// with the simulator's own adder; the iteration count against a separate
// model of the half-adder recurrence; and the latency, i.e. that done rises
// exactly iterations + 1 cycles after start and lasts one cycle. Directed
// cases make each mechanism happen: an addition that needs no iteration
// (b = 0), one that needs the full N+1 iterations (all ones + 1), a carry into
// the extra top bit, a start that is ignored because the adder is busy, and
// an asynchronous reset in the middle of an addition. The number of times
// each happened is counted, and one that never happened is a failure.
module tb_barrel_adder_exhaustive;

  import cba_pkg::*;

  localparam int unsigned N  = 4;
  localparam int unsigned CW = $clog2(N+2);

  logic          clk = 1'b0;
  logic          rst_n;
  logic          start;
  logic [N-1:0]  a, b;
  logic          ready, done;
  logic [N:0]    sum;
  logic [CW-1:0] iterations;

  int checks = 0;
  int failures = 0;
  int n_zero_iter = 0, n_full_iter = 0, n_carry_out = 0, n_ignored_start = 0;
  int n_reset_mid = 0, n_multi_iter = 0;

  barrel_adder #(.N(N)) dut (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .a          (a),
    .b          (b),
    .ready      (ready),
    .done       (done),
    .sum        (sum),
    .iterations (iterations)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("tb_barrel_adder_exhaustive: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference for the number of half-adder steps: repeat S = A xor B,
  // C = A and B, B = C moved up one bit (top bit to the bottom) until B is 0.
  function automatic int ref_iterations(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N:0] ra, rb, rc;
    int k;
    ra = {1'b0, x};
    rb = {1'b0, y};
    k  = 0;
    while (rb != '0) begin
      rc = ra & rb;
      ra = ra ^ rb;
      rb = {rc[N-1:0], rc[N]};
      k++;
    end
    return k;
  endfunction

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] w;
    w = '0;
    for (int i = 0; i < N; i += 32) w = (w << 32) | N'($urandom);
    return w;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One addition through the handshake, fully checked.
  task automatic add(input logic [N-1:0] x, input logic [N-1:0] y, input bit poke_busy);
    logic [N:0] exp_sum;
    int exp_iter, cycles;
    exp_sum  = {1'b0, x} + {1'b0, y};
    exp_iter = ref_iterations(x, y);

    @(negedge clk);
    check(ready, "ready before start");
    a = x;
    b = y;
    start = 1'b1;
    @(posedge clk);           // start seen here
    @(negedge clk);
    start  = 1'b0;
    cycles = 1;
    check(!ready, "busy after start");
    while (!done && cycles < 4*N) begin
      if (poke_busy) begin
        // A new start while busy must be ignored.
        a = ~x;
        b = ~y;
        start = 1'b1;
        @(posedge clk);
        @(negedge clk);
        start = 1'b0;
        a = x;
        b = y;
        n_ignored_start++;
        poke_busy = 1'b0;
      end else begin
        @(negedge clk);
      end
      cycles++;
    end
    check(done, $sformatf("done seen for %h + %h", x, y));
    check(sum == exp_sum,
          $sformatf("sum %h + %h: got %h expected %h", x, y, sum, exp_sum));
    check(int'(iterations) == exp_iter,
          $sformatf("iterations %h + %h: got %0d expected %0d", x, y, iterations, exp_iter));
    check(cycles == exp_iter + 1,
          $sformatf("latency %h + %h: done after %0d cycles, expected %0d", x, y, cycles, exp_iter + 1));
    @(negedge clk);
    check(!done, "done lasts one cycle");
    check(ready, "ready after done");
    check(sum == exp_sum, "sum holds after done");

    if (exp_iter == 0)  n_zero_iter++;
    if (exp_iter == N+1) n_full_iter++;
    if (exp_iter > 1)   n_multi_iter++;
    if (exp_sum[N])     n_carry_out++;
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    a = '0;
    b = '0;
    repeat (2) @(posedge clk);
    #1;
    check(ready && !done && sum == '0, "reset state");
    rst_n = 1'b1;

    // Directed cases.
    add('0, '0, 1'b0);
    add(N'(12345), '0, 1'b0);          // nothing to carry
    add('1, N'(1), 1'b0);              // carry ripples through all N bits
    add(N'(1), '1, 1'b0);
    add('1, '1, 1'b0);                 // largest sum, carry-out
    add({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}}, 1'b0);
    add(N'(5), N'(10), 1'b0);          // disjoint bits, one step
    add(rand_word(), rand_word(), 1'b1);
    add('1, N'(1), 1'b1);

    // Asynchronous reset in the middle of a long addition.
    @(negedge clk);
    a = '1;
    b = N'(1);
    start = 1'b1;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0;
    repeat (3) @(negedge clk);
    #1 rst_n = 1'b0;
    #1;
    check(ready && !done && sum == '0, "asynchronous reset mid-addition");
    n_reset_mid++;
    @(negedge clk);
    rst_n = 1'b1;
    add(N'(3), N'(1), 1'b0);

    for (int x = 0; x < (1 << N); x++)
      for (int y = 0; y < (1 << N); y++) add(N'(x), N'(y), ((x + y) % 7) == 0);

    $display("mechanisms: zero-iteration=%0d full-N+1-iteration=%0d multi-iteration=%0d carry-out=%0d ignored-start=%0d reset-mid=%0d",
             n_zero_iter, n_full_iter, n_multi_iter, n_carry_out, n_ignored_start, n_reset_mid);
    check(n_zero_iter > 0,     "zero-iteration addition happened");
    check(n_full_iter > 0,     "full N+1-iteration addition happened");
    check(n_multi_iter > 0,    "multi-iteration addition happened");
    check(n_carry_out > 0,     "carry-out addition happened");
    check(n_ignored_start > 0, "ignored start happened");
    check(n_reset_mid > 0,     "mid-addition reset happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
