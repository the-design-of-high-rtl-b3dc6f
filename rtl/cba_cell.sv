// One bit position of the Carry Barrel Adder ring.
//
// The cell holds the addend bit A_i and the summand bit B_i in two D
// flip-flops and feeds them into a half adder. The half adder's sum becomes
// the next A_i; its carry C_i leaves the cell towards the next higher
// position, and the carry arriving from the next lower position becomes the
// next B_i. The control input load (the flip-flops' control terminal) selects
// the operand bits a_in and b_in instead, which starts a new addition.
//
// Once the carry word of the whole ring is zero, A_i xor 0 = A_i and every
// carry is 0, so the cell holds its value without an enable.
//
// Interface: load, a_in, b_in and carry_in (C_{i-1}) in; a_q, b_q (the
// flip-flop outputs) and carry_out (C_i) out. Timing: one clock per
// iteration; clr_n clears both flip-flops asynchronously. The flip-flops'
// inverted outputs are not needed here and are left unused.
module cba_cell (
  input  logic clk,
  input  logic clr_n,
  input  logic load,
  input  logic a_in,
  input  logic b_in,
  input  logic carry_in,
  output logic a_q,
  output logic b_q,
  output logic carry_out
);

  logic s;
  logic a_d, b_d;
  logic a_qn, b_qn;

  half_adder u_ha (
    .a (a_q),
    .b (b_q),
    .s (s),
    .c (carry_out)
  );

  assign a_d = load ? a_in : s;
  assign b_d = load ? b_in : carry_in;

  d_flip_flop u_dff_a (
    .clk   (clk),
    .pre_n (1'b1),
    .clr_n (clr_n),
    .d     (a_d),
    .q     (a_q),
    .q_n   (a_qn)
  );

  d_flip_flop u_dff_b (
    .clk   (clk),
    .pre_n (1'b1),
    .clr_n (clr_n),
    .d     (b_d),
    .q     (b_q),
    .q_n   (b_qn)
  );

endmodule
