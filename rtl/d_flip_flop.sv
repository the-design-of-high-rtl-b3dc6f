// Positive-edge D flip-flop modelled on the 7474.
//
// On each rising edge of clk, q takes the value of d; q_n is always the
// complement of q. Two active-low asynchronous inputs override the clock at
// any time: pre_n forces q high, clr_n forces q low. The data sheet leaves
// the case of both asserted undefined; here clear wins, so q is low and q_n
// stays the complement of q (this priority is this design's own choice).
//
// Interface: clk, pre_n, clr_n, d in; q, q_n out. Timing: one register, the
// new d is visible on q right after the rising edge.
module d_flip_flop (
  input  logic clk,
  input  logic pre_n,
  input  logic clr_n,
  input  logic d,
  output logic q,
  output logic q_n
);

  always_ff @(posedge clk or negedge clr_n or negedge pre_n) begin
    if (!clr_n)      q <= 1'b0;
    else if (!pre_n) q <= 1'b1;
    else             q <= d;
  end

  assign q_n = ~q;

endmodule
