// polymod_mul: modulo and modulo-multiplication unit built on the MOD circuit.
//
// Computes, for a monic divisor p(x) of degree N held in the MOD circuit's P
// register,
//   op_mul = 0:  f(x) mod p(x)            in M-N+1 cycles   (algorithm A)
//   op_mul = 1:  f(x) g(x) mod p(x)       in 2M-N+2 cycles  (algorithm B)
// for arbitrary f(x), g(x) of degree at most M. Neither f nor g is wired into
// the circuit, so both may change from one operation to the next, and p(x)
// may be replaced by any other polynomial of degree N with p_load.
//
// Interface and timing:
//   p_load/p_in  (idle only) loads a_(N-1)..a_0 of p(x) = x^N + ... + a_0.
//   start        (idle only) begins an operation; f_low = f_(N-1)..f_0 is
//                taken in parallel into R in the same cycle.
//   coef_req     high in each busy cycle: the caller must drive coef_in with
//                the coefficient named by coef_is_g/coef_idx in that cycle.
//                The order, one per cycle from the cycle after start, is
//                f_N .. f_M, then (op_mul only) g_0, g_1 .. g_M.
//   busy         high for exactly M-N+1 (or 2M-N+2) cycles.
//   done         one-cycle pulse right after the last busy cycle; result is
//                valid from then until the next start.
//
// Phase one runs the MOD circuit as a divider. For op_mul, the cycle taking
// g_0 copies x*R mod p(x) into C and clears R if g_0 = 0 (otherwise R keeps
// f mod p = g_0 * h). The following M cycles add x^j h(x) mod p(x) into R for
// each g_j = 1, h = f mod p. Loading x*h rather than h into C is this
// design's choice: the shared step adds C into R before shifting it, which
// is what phase one needs, so phase two starts one power ahead.
module polymod_mul
  import polydiv_pkg::*;
#(
  parameter int unsigned N = 8,   // degree of p(x)
  parameter int unsigned M = 15   // largest degree of f(x) and g(x)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      p_load,
  input  logic [N-1:0]              p_in,
  input  logic                      start,
  input  logic                      op_mul,
  input  logic [N-1:0]              f_low,
  input  logic                      coef_in,
  output logic                      coef_req,
  output logic                      coef_is_g,
  output logic [$clog2(M+1)-1:0]    coef_idx,
  output logic                      busy,
  output logic                      done,
  output logic [N-1:0]              result
);

  if (M < N) begin : g_bad_size
    $error("polymod_mul: M must be at least N");
  end

  localparam int unsigned IW = $clog2(M + 1);

  typedef enum logic [1:0] {S_IDLE, S_F, S_G0, S_G} state_e;

  state_e        state_q;
  logic [IW-1:0] idx_q;
  logic          mul_q;
  logic          done_q;
  mod_op_e       op;

  logic [N-1:0]  r_out, c_out, p_out;

  mod_circuit #(.N(N)) u_mod (
    .clk    (clk),
    .rst_n  (rst_n),
    .op     (op),
    .p_in   (p_in),
    .r_in   (f_low),
    .bit_in (coef_in),
    .r_out  (r_out),
    .c_out  (c_out),
    .p_out  (p_out)
  );

  always_comb begin
    unique case (state_q)
      S_IDLE:  op = start ? MOD_INIT : (p_load ? MOD_LOAD_P : MOD_IDLE);
      S_F:     op = MOD_STEP;
      S_G0:    op = MOD_LOAD_C;
      S_G:     op = MOD_STEP;
      default: op = MOD_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      idx_q   <= '0;
      mul_q   <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_F;
          idx_q   <= IW'(N);
          mul_q   <= op_mul;
        end
        S_F: begin
          if (idx_q == IW'(M)) begin
            if (mul_q) begin
              state_q <= S_G0;
              idx_q   <= '0;
            end else begin
              state_q <= S_IDLE;
              done_q  <= 1'b1;
            end
          end else begin
            idx_q <= idx_q + 1'b1;
          end
        end
        S_G0: begin
          state_q <= S_G;
          idx_q   <= IW'(1);
        end
        S_G: begin
          if (idx_q == IW'(M)) begin
            state_q <= S_IDLE;
            done_q  <= 1'b1;
          end else begin
            idx_q <= idx_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state_q != S_IDLE);
  assign coef_req  = busy;
  assign coef_is_g = (state_q == S_G0) || (state_q == S_G);
  assign coef_idx  = idx_q;
  assign done      = done_q;
  assign result    = r_out;

  // start and p_load are only accepted while idle.
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("polymod_mul: start while busy");
  a_no_pload_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !p_load)
    else $error("polymod_mul: p_load while busy");

endmodule
