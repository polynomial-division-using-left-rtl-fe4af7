// syndrome_gen: syndrome generator for a systematic cyclic code, built on the
// MOD circuit.
//
// The received word v(x) = d'(x) x^R + r'(x) arrives in the order the
// encoder sends it: the K data bits low order first, then the R check bits
// low order first. Its syndrome is s(x) = v(x) mod g(x)
//                                      = (d'(x) x^R mod g(x)) + r'(x),
// since r'(x) has degree below R. The data bits are fed to the MOD circuit
// as they arrive (R starts at 0, d'_i is coefficient f_(R+i)); each check
// bit r'_j that follows is added into bit j of R. The check bits thus cost
// no extra cycles after the word: the syndrome is ready one cycle after its
// last bit, and is zero exactly when v(x) is a multiple of g(x).
//
// Interface and timing:
//   g_load/g_in  loads g_(R-1)..g_0 into P and drops a word in progress; one
//                set-up cycle follows (in_ready low).
//   in_valid/in_bit/in_ready  received bits, one per accepted cycle.
//   synd_valid   one-cycle pulse, the cycle after the last bit of a word;
//                syndrome and error hold their values until the next pulse.
//                error = (syndrome != 0).
// In the last bit's cycle the syndrome register takes R + r'_(R-1) x^(R-1)
// directly and the MOD circuit is set up for the next word, so words may
// arrive back to back. That bypass and the handshake are this design's
// choices.
module syndrome_gen
  import polydiv_pkg::*;
#(
  parameter int unsigned K = 7,   // data bits per codeword
  parameter int unsigned R = 8    // degree of the generator g(x)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          g_load,
  input  logic [R-1:0]  g_in,
  input  logic          in_valid,
  input  logic          in_bit,
  output logic          in_ready,
  output logic          synd_valid,
  output logic [R-1:0]  syndrome,
  output logic          error
);

  localparam int unsigned CW = $clog2((K > R ? K : R) + 1);

  typedef enum logic [1:0] {S_INIT, S_DATA, S_CHECK} state_e;

  state_e         state_q;
  logic [CW-1:0]  cnt_q;
  logic [R-1:0]   synd_q;
  logic           valid_q;
  logic [R-1:0]   check_vec;   // r'_j placed at bit j
  mod_op_e        op;
  logic [R-1:0]   r_out, c_out, p_out;

  assign check_vec = in_bit ? (R'(1) << cnt_q) : '0;
  assign in_ready  = (state_q != S_INIT) && !g_load;

  mod_circuit #(.N(R)) u_mod (
    .clk    (clk),
    .rst_n  (rst_n),
    .op     (op),
    .p_in   (g_in),
    .r_in   ((op == MOD_ADD_R) ? check_vec : '0),
    .bit_in (in_bit),
    .r_out  (r_out),
    .c_out  (c_out),
    .p_out  (p_out)
  );

  always_comb begin
    if (g_load) begin
      op = MOD_LOAD_P;
    end else begin
      unique case (state_q)
        S_INIT:  op = MOD_INIT;
        S_DATA:  op = in_valid ? MOD_STEP : MOD_IDLE;
        S_CHECK: op = !in_valid ? MOD_IDLE
                    : (cnt_q == CW'(R - 1)) ? MOD_INIT : MOD_ADD_R;
        default: op = MOD_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_INIT;
      cnt_q   <= '0;
      synd_q  <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= 1'b0;
      if (g_load) begin
        state_q <= S_INIT;
        cnt_q   <= '0;
      end else begin
        unique case (state_q)
          S_INIT: begin
            state_q <= S_DATA;
            cnt_q   <= '0;
          end
          S_DATA: if (in_valid) begin
            if (cnt_q == CW'(K - 1)) begin
              state_q <= S_CHECK;
              cnt_q   <= '0;
            end else begin
              cnt_q <= cnt_q + 1'b1;
            end
          end
          S_CHECK: if (in_valid) begin
            if (cnt_q == CW'(R - 1)) begin
              synd_q  <= r_out ^ check_vec;
              valid_q <= 1'b1;
              state_q <= S_DATA;
              cnt_q   <= '0;
            end else begin
              cnt_q <= cnt_q + 1'b1;
            end
          end
          default: state_q <= S_INIT;
        endcase
      end
    end
  end

  assign synd_valid = valid_q;
  assign syndrome   = synd_q;
  assign error      = |synd_q;

endmodule
