// cyclic_encoder: systematic cyclic code encoder built on the MOD circuit.
//
// For a data word d(x) of K bits and a generator g(x) = x^R + ... + g_0, the
// codeword is u(x) = d(x) x^R + r(x) with r(x) = d(x) x^R mod g(x). The MOD
// circuit takes its input low order first, so the data bits are sent low
// order first as they arrive and, with the same bit, fed to the divider:
// the low R coefficients of d(x) x^R are zero, so R starts at 0 and the data
// bit d_i is the coefficient f_(R+i). After the K-th data bit R holds r(x),
// which is then sent, again low order first. The serial line therefore
// carries d_0 .. d_(K-1), r_0 .. r_(R-1): the data part leaves with no delay.
//
// Interface and timing:
//   g_load/g_in  loads g_(R-1)..g_0 into P; an encoding in progress is
//                dropped. One set-up cycle follows (in_ready low).
//   in_valid/in_bit/in_ready  data bits, one per accepted cycle. in_ready is
//                low for the R cycles in which check bits are sent.
//   out_valid/out_bit  the code bit stream, one cycle after the data bit it
//                carries; out_check marks check bits, out_last the final bit
//                of a codeword.
// In the first check cycle R is copied into a parity shift register and the
// MOD circuit is set up for the next word, so words can follow back to back.
// The parity shift register and the handshake are this design's choices.
module cyclic_encoder
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
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_check,
  output logic          out_last
);

  localparam int unsigned CW = $clog2((K > R ? K : R) + 1);

  typedef enum logic [1:0] {S_INIT, S_DATA, S_CHECK} state_e;

  state_e         state_q;
  logic [CW-1:0]  cnt_q;
  logic [R-1:0]   par_q;
  logic           out_valid_q, out_bit_q, out_check_q, out_last_q;
  mod_op_e        op;
  logic [R-1:0]   r_out, c_out, p_out;

  mod_circuit #(.N(R)) u_mod (
    .clk    (clk),
    .rst_n  (rst_n),
    .op     (op),
    .p_in   (g_in),
    .r_in   ('0),
    .bit_in (in_bit),
    .r_out  (r_out),
    .c_out  (c_out),
    .p_out  (p_out)
  );

  assign in_ready = (state_q == S_DATA) && !g_load;

  always_comb begin
    if (g_load) begin
      op = MOD_LOAD_P;
    end else begin
      unique case (state_q)
        S_INIT:  op = MOD_INIT;
        S_DATA:  op = in_valid ? MOD_STEP : MOD_IDLE;
        S_CHECK: op = (cnt_q == '0) ? MOD_INIT : MOD_IDLE;
        default: op = MOD_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_INIT;
      cnt_q       <= '0;
      par_q       <= '0;
      out_valid_q <= 1'b0;
      out_bit_q   <= 1'b0;
      out_check_q <= 1'b0;
      out_last_q  <= 1'b0;
    end else begin
      out_valid_q <= 1'b0;
      out_check_q <= 1'b0;
      out_last_q  <= 1'b0;
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
            out_valid_q <= 1'b1;
            out_bit_q   <= in_bit;
            if (cnt_q == CW'(K - 1)) begin
              state_q <= S_CHECK;
              cnt_q   <= '0;
            end else begin
              cnt_q <= cnt_q + 1'b1;
            end
          end
          S_CHECK: begin
            out_valid_q <= 1'b1;
            out_check_q <= 1'b1;
            if (cnt_q == '0) begin
              out_bit_q <= r_out[0];
              par_q     <= r_out >> 1;
            end else begin
              out_bit_q <= par_q[0];
              par_q     <= par_q >> 1;
            end
            if (cnt_q == CW'(R - 1)) begin
              out_last_q <= 1'b1;
              state_q    <= S_DATA;
              cnt_q      <= '0;
            end else begin
              cnt_q <= cnt_q + 1'b1;
            end
          end
          default: state_q <= S_INIT;
        endcase
      end
    end
  end

  assign out_valid = out_valid_q;
  assign out_bit   = out_bit_q;
  assign out_check = out_check_q;
  assign out_last  = out_last_q;

endmodule
