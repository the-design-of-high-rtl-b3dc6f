// Carry Barrel Adder (CBA): an iterative integer adder built from a ring of
// half adders and D flip-flops.
//
// Two registers of N+1 bits, A and B, are loaded with the operands (their top
// bit, the carry position, starts at 0). Every clock the ring applies the
// half-adder step at all positions at once:
//   A_i <= A_i xor B_i                 (the sum bits)
//   B_i <= A_{i-1} and B_{i-1}         (the carries, moved up one position)
//   B_1 <= A_{N+1} and B_{N+1}         (the top carry wraps round: the barrel)
// A + B is unchanged by each step, and the carries travel upwards until the
// carry word is zero; A then holds the sum. A carry can only ripple as far as
// the longest run of propagating bits, so an addition takes between 0 and N+1
// iterations depending on the operands. For operands of N bits the wrapped
// carry is always 0, because A + B < 2^(N+1); an assertion checks this.
//
// The ring, its equations and the wrap follow the barrel-adder principle. The
// start/ready/done handshake, the iteration counter and the active-low reset
// are this design's own choices.
//
// Interface: start loads a and b when ready is high (start is ignored while
// busy). done pulses for one cycle when the carry word is zero; sum is valid
// from then on and holds until the next start. iterations gives how many
// half-adder steps the last addition took.
// Timing: with start seen at clock edge 0, the k iterations happen at edges
// 1..k and done is high during the cycle after edge k (k = 0 when b is 0),
// so the result is ready k+1 cycles after start; ready returns one edge later.
module barrel_adder
  import cba_pkg::*;
#(
  parameter int unsigned N = CBA_WIDTH
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [N-1:0]            a,
  input  logic [N-1:0]            b,
  output logic                    ready,
  output logic                    done,
  output logic [N:0]              sum,
  output logic [$clog2(N+2)-1:0]  iterations
);

  localparam int unsigned CW = $clog2(N+2);

  logic [N:0] a_reg, b_reg;   // A^k and B^k, bit i-1 holds position i
  logic [N:0] carry;          // C^k at every position
  logic [N:0] a_in, b_in;
  logic       load;           // the flip-flops' control terminal
  logic       carry_zero;

  cba_state_e      state_q;
  logic [CW-1:0]   iter_q;

  assign a_in = {1'b0, a};
  assign b_in = {1'b0, b};

  // The ring of N+1 cells; cell 0 takes the carry of the top cell.
  for (genvar i = 0; i <= N; i++) begin : g_ring
    cba_cell u_cell (
      .clk       (clk),
      .clr_n     (rst_n),
      .load      (load),
      .a_in      (a_in[i]),
      .b_in      (b_in[i]),
      .carry_in  (carry[(i == 0) ? N : i-1]),
      .a_q       (a_reg[i]),
      .b_q       (b_reg[i]),
      .carry_out (carry[i])
    );
  end

  // The carry word B^k is zero: the iteration has converged.
  assign carry_zero = (b_reg == '0);

  assign ready = (state_q == CBA_IDLE);
  assign load  = start && ready;
  assign done  = (state_q == CBA_RUN) && carry_zero;
  assign sum   = a_reg;
  assign iterations = iter_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= CBA_IDLE;
      iter_q  <= '0;
    end else begin
      unique case (state_q)
        CBA_IDLE: begin
          if (start) begin
            state_q <= CBA_RUN;
            iter_q  <= '0;
          end
        end
        CBA_RUN: begin
          if (carry_zero) state_q <= CBA_IDLE;
          else            iter_q  <= iter_q + 1'b1;
        end
        default: state_q <= CBA_IDLE;
      endcase
    end
  end

  // For N-bit operands the carry out of the top position never wraps round.
  a_no_wrap: assert property (@(posedge clk) disable iff (!rst_n)
                              !(state_q == CBA_RUN && carry[N]))
    else $error("barrel_adder: carry wrapped round from the top position");

  // An addition never needs more than N+1 iterations.
  a_bounded: assert property (@(posedge clk) disable iff (!rst_n)
                              iter_q <= CW'(N+1))
    else $error("barrel_adder: more than N+1 iterations");

endmodule
