// polydiv_top: the left-shift-register polynomial arithmetic units side by
// side, each with its own MOD circuit and its own ports:
//   mm_*   polymod_mul    f(x) mod p(x) or f(x)g(x) mod p(x), deg p = N,
//                         deg f, g <= M, coefficients presented serially.
//   gf_*   gf_mult        GF(2^GF_N) standard basis multiplier, N+2 cycles.
//   enc_*  cyclic_encoder systematic cyclic encoder, K data bits, generator
//                         of degree R, data and check bits low order first.
//   syn_*  syndrome_gen   matching syndrome generator.
// The encoder and syndrome generator are the two ends of a link: a serial
// channel is expected between enc_out_bit and syn_in_bit, outside this
// module. All ports and their timing are those of the submodules; see their
// headers. One clock, one asynchronous active-low reset.
module polydiv_top #(
  parameter int unsigned N    = 8,   // degree of p(x) in the modulo unit
  parameter int unsigned M    = 15,  // largest degree of f(x), g(x)
  parameter int unsigned GF_N = 8,   // field degree of the GF(2^n) multiplier
  parameter int unsigned K    = 7,   // data bits per codeword
  parameter int unsigned R    = 8    // degree of the code generator g(x)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // modulo / modulo-multiplication unit
  input  logic                     mm_p_load,
  input  logic [N-1:0]             mm_p_in,
  input  logic                     mm_start,
  input  logic                     mm_op_mul,
  input  logic [N-1:0]             mm_f_low,
  input  logic                     mm_coef_in,
  output logic                     mm_coef_req,
  output logic                     mm_coef_is_g,
  output logic [$clog2(M+1)-1:0]   mm_coef_idx,
  output logic                     mm_busy,
  output logic                     mm_done,
  output logic [N-1:0]             mm_result,
  // GF(2^n) multiplier
  input  logic                     gf_p_load,
  input  logic [GF_N-1:0]          gf_p_in,
  input  logic                     gf_start,
  input  logic [GF_N-1:0]          gf_a,
  input  logic [GF_N-1:0]          gf_b,
  output logic                     gf_busy,
  output logic                     gf_done,
  output logic [GF_N-1:0]          gf_y,
  // cyclic encoder
  input  logic                     enc_g_load,
  input  logic [R-1:0]             enc_g_in,
  input  logic                     enc_in_valid,
  input  logic                     enc_in_bit,
  output logic                     enc_in_ready,
  output logic                     enc_out_valid,
  output logic                     enc_out_bit,
  output logic                     enc_out_check,
  output logic                     enc_out_last,
  // syndrome generator
  input  logic                     syn_g_load,
  input  logic [R-1:0]             syn_g_in,
  input  logic                     syn_in_valid,
  input  logic                     syn_in_bit,
  output logic                     syn_in_ready,
  output logic                     syn_valid,
  output logic [R-1:0]             syn_syndrome,
  output logic                     syn_error
);

  polymod_mul #(.N(N), .M(M)) u_modmul (
    .clk       (clk),
    .rst_n     (rst_n),
    .p_load    (mm_p_load),
    .p_in      (mm_p_in),
    .start     (mm_start),
    .op_mul    (mm_op_mul),
    .f_low     (mm_f_low),
    .coef_in   (mm_coef_in),
    .coef_req  (mm_coef_req),
    .coef_is_g (mm_coef_is_g),
    .coef_idx  (mm_coef_idx),
    .busy      (mm_busy),
    .done      (mm_done),
    .result    (mm_result)
  );

  gf_mult #(.N(GF_N)) u_gf (
    .clk    (clk),
    .rst_n  (rst_n),
    .p_load (gf_p_load),
    .p_in   (gf_p_in),
    .start  (gf_start),
    .a      (gf_a),
    .b      (gf_b),
    .busy   (gf_busy),
    .done   (gf_done),
    .y      (gf_y)
  );

  cyclic_encoder #(.K(K), .R(R)) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .g_load    (enc_g_load),
    .g_in      (enc_g_in),
    .in_valid  (enc_in_valid),
    .in_bit    (enc_in_bit),
    .in_ready  (enc_in_ready),
    .out_valid (enc_out_valid),
    .out_bit   (enc_out_bit),
    .out_check (enc_out_check),
    .out_last  (enc_out_last)
  );

  syndrome_gen #(.K(K), .R(R)) u_syn (
    .clk        (clk),
    .rst_n      (rst_n),
    .g_load     (syn_g_load),
    .g_in       (syn_g_in),
    .in_valid   (syn_in_valid),
    .in_bit     (syn_in_bit),
    .in_ready   (syn_in_ready),
    .synd_valid (syn_valid),
    .syndrome   (syn_syndrome),
    .error      (syn_error)
  );

endmodule
