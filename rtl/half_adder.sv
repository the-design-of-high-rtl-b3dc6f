// Half adder: adds two one-bit numbers a and b.
//
// The sum bit is a xor b and the carry bit is a and b, so that a + b = 2*c + s.
// Purely combinational, no timing of its own. This is the basic cell of the
// barrel adder, where one half adder sits at every bit position of the ring.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  assign s = a ^ b;
  assign c = a & b;

endmodule
