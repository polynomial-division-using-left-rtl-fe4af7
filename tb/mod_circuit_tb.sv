// mod_circuit_tb: drives the MOD circuit datapath operation by operation.
// Checks, against long division in polyref_pkg:
//   - MOD_INIT then MOD_STEP with f_N..f_M leaves f mod p in R, and C holds
//     x^(N+k) mod p after k steps;
//   - MOD_LOAD_C with g_0 then MOD_STEP with g_1..g_M leaves f g mod p in R;
//   - MOD_ADD_R, MOD_IDLE and MOD_LOAD_P behave as documented.
module mod_circuit_tb;
  import polydiv_pkg::*;
  import polyref_pkg::*;

  localparam int N = 8;
  localparam int M = 15;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  mod_op_e      op = MOD_IDLE;
  logic [N-1:0] p_in = '0, r_in = '0;
  logic         bit_in = 1'b0;
  logic [N-1:0] r_out, c_out, p_out;

  int checks = 0, failures = 0;

  mod_circuit dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [N-1:0] got, input logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic do_op(input mod_op_e o, input logic b, input logic [N-1:0] v);
    op = o; bit_in = b; r_in = v; p_in = v;
    @(posedge clk); #1;
    op = MOD_IDLE; bit_in = 1'b0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    poly_t p, f, g, h, xp;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check("reset R", r_out, '0);
    for (int t = 0; t < 300; t++) begin
      p = rand_monic(N);
      f = rand_poly(M);
      if (t % 2 == 0) f[M] = 1'b1;       // the algorithm's f_m = 1 case
      g = rand_poly(M);
      do_op(MOD_LOAD_P, 1'b0, p[N-1:0]);
      check("P", p_out, p[N-1:0]);
      do_op(MOD_INIT, 1'b0, f[N-1:0]);
      check("C init", c_out, p[N-1:0]);
      check("R init", r_out, f[N-1:0]);
      for (int i = N; i <= M; i++) begin
        do_op(MOD_STEP, f[i], '0);
        xp = pmod(poly_t'(1) << (i + 1), p, N);
        check("C power", c_out, xp[N-1:0]);
      end
      h = pmod(f, p, N);
      check("f mod p", r_out, h[N-1:0]);
      // hold
      do_op(MOD_IDLE, 1'b1, '1);
      check("idle R", r_out, h[N-1:0]);
      // modulo multiplication, second phase
      do_op(MOD_LOAD_C, g[0], '0);
      xp = pmod(h << 1, p, N);
      check("C = x*h", c_out, xp[N-1:0]);
      check("R after g0", r_out, g[0] ? h[N-1:0] : '0);
      for (int i = 1; i <= M; i++) do_op(MOD_STEP, g[i], '0);
      xp = pmod(pmul(f, g), p, N);
      check("f*g mod p", r_out, xp[N-1:0]);
      // add into R
      f = rand_poly(N - 1);
      do_op(MOD_ADD_R, 1'b0, f[N-1:0]);
      check("add R", r_out, xp[N-1:0] ^ f[N-1:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
