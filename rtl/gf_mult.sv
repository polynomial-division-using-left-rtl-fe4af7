// gf_mult: standard basis multiplier for GF(2^N) using the MOD circuit.
//
// An element beta = f_0 + f_1 alpha + ... + f_(N-1) alpha^(N-1) is given as
// the vector a with a[i] = f_i (likewise b for gamma). The product is
// h(alpha) with h(x) = f(x) g(x) mod p(x), where p(x) is the irreducible
// polynomial whose low coefficients sit in P. The multiplier is the
// modulo-multiplication unit (polymod_mul) run with M = N, so the operands are
// taken as polynomials of degree N whose top coefficients f_N and g_N are 0.
// Its structure depends on neither operand, and the field polynomial is
// changed by loading P again.
//
// Interface and timing:
//   p_load/p_in  (idle only) loads the low N coefficients of p(x).
//   start        (idle only) takes a into R and b into an operand shift
//                register in the same cycle.
//   busy         high for exactly N+2 cycles: one cycle for f_N = 0, one for
//                g_0 (C <= x*h, R cleared if g_0 = 0), N cycles for g_1..g_N.
//   done         one-cycle pulse after the last busy cycle; y holds the
//                product until the next start.
// The operand register shifts right once for each g coefficient consumed, so
// its bit 0 always holds the coefficient being asked for; zeros shift in
// behind, which supplies g_N = 0.
module gf_mult #(
  parameter int unsigned N = 8   // field degree
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          p_load,
  input  logic [N-1:0]  p_in,
  input  logic          start,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic          busy,
  output logic          done,
  output logic [N-1:0]  y
);

  localparam int unsigned IW = $clog2(N + 1);

  logic [N-1:0]  g_sr_q;
  logic          coef_in, coef_req, coef_is_g;
  logic [IW-1:0] coef_idx;

  // f_N is 0 (beta has degree below N); g_j comes from the shift register.
  assign coef_in = coef_is_g ? g_sr_q[0] : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_sr_q <= '0;
    end else if (start && !busy) begin
      g_sr_q <= b;
    end else if (coef_req && coef_is_g) begin
      g_sr_q <= g_sr_q >> 1;
    end
  end

  polymod_mul #(.N(N), .M(N)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .p_load    (p_load && !busy),
    .p_in      (p_in),
    .start     (start && !busy),
    .op_mul    (1'b1),
    .f_low     (a),
    .coef_in   (coef_in),
    .coef_req  (coef_req),
    .coef_is_g (coef_is_g),
    .coef_idx  (coef_idx),
    .busy      (busy),
    .done      (done),
    .result    (y)
  );

  // The register must be on g_j exactly when the core asks for g_j.
  a_g_index: assert property (@(posedge clk) disable iff (!rst_n)
                              (coef_req && coef_is_g && coef_idx == IW'(N)) |-> (g_sr_q == '0))
    else $error("gf_mult: operand register out of step with the core");

endmodule
