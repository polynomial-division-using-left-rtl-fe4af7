// mod_circuit: the MOD circuit, a polynomial divider built from a left shift
// register whose structure does not depend on the divisor p(x).
//
// Registers:
//   C  (N+1 cells) left shift register holding x^(n+i) mod p(x) in its low N
//      cells; the top cell receives the bit shifted out and decides whether P
//      is added back. That cell is only read within the cycle that fills it,
//      so it is a wire here and C keeps N flip-flops.
//   R  (N bits)    accumulator of the remainder.
//   P  (N bits)    the coefficients a_(n-1)..a_0 of the monic divisor
//                  p(x) = x^n + a_(n-1)x^(n-1) + ... + a_0.
// Bit i of every vector is the coefficient of x^i.
//
// Computing f(x) mod p(x) for f of degree m >= n: one MOD_INIT cycle loads
// C = (0, a_(n-1..0)) and R = (f_(n-1)..f_0); then m-n+1 MOD_STEP cycles
// present f_n, f_(n+1), ..., f_m on bit_in, one per cycle. In each step R
// takes R + C when the coefficient is 1, while C is shifted left once and, if
// the bit that left its low N cells is 1, P is added to it (C <= A*C). After
// the last step R holds f(x) mod p(x). Changing the divisor only needs a new
// value in P (MOD_LOAD_P).
//
// The divider is described with a two-phase cycle: shift C and add C into R
// on the positive half, add P into C on the negative half. Here both halves
// are folded into one rising-edge update with the same XORs (N for R + C,
// N for C + P); R adds the contents C held before the shift, as the
// algorithm requires.
//
// For f(x)g(x) mod p(x), MOD_LOAD_C moves x*R mod p(x) into C and clears R
// when g_0 = 0; MOD_STEP cycles then present g_1..g_m. Loading C with x*R
// rather than R lets the same add-then-shift step serve both phases.
// MOD_ADD_R adds an arbitrary vector into R (used by the syndrome generator
// to add the received check bits). Reset is asynchronous, active low, and
// clears all three registers.
module mod_circuit
  import polydiv_pkg::*;
#(
  parameter int unsigned N = 8  // degree n of the divisor
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mod_op_e       op,
  input  logic [N-1:0]  p_in,   // MOD_LOAD_P: a_(n-1)..a_0
  input  logic [N-1:0]  r_in,   // MOD_INIT: initial R;  MOD_ADD_R: addend
  input  logic          bit_in, // MOD_STEP: coefficient;  MOD_LOAD_C: g_0
  output logic [N-1:0]  r_out,
  output logic [N-1:0]  c_out,
  output logic [N-1:0]  p_out
);

  logic [N-1:0] c_q, r_q, p_q;

  // One left shift of the (N+1)-cell register followed by the conditional
  // addition of P: returns x*v mod p(x) in the low N cells.
  function automatic logic [N-1:0] evolve(input logic [N-1:0] v, input logic [N-1:0] p);
    logic [N:0] s;
    s = {v, 1'b0};           // s[N] is the top cell after the shift
    return s[N] ? (s[N-1:0] ^ p) : s[N-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q <= '0;
      r_q <= '0;
      p_q <= '0;
    end else begin
      unique case (op)
        MOD_LOAD_P: p_q <= p_in;
        MOD_INIT: begin
          c_q <= p_q;
          r_q <= r_in;
        end
        MOD_STEP: begin
          if (bit_in) r_q <= r_q ^ c_q;
          c_q <= evolve(c_q, p_q);
        end
        MOD_LOAD_C: begin
          c_q <= evolve(r_q, p_q);
          if (!bit_in) r_q <= '0;
        end
        MOD_ADD_R: r_q <= r_q ^ r_in;
        default: ;
      endcase
    end
  end

  assign r_out = r_q;
  assign c_out = c_q;
  assign p_out = p_q;

endmodule
