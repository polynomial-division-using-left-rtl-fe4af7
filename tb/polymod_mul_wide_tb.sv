// polymod_mul_wide_tb: the polymod_mul test at a larger size, N = 16 and
// M = 31, to show that nothing in the unit depends on its default size.
// Runs f mod p and f g mod p with random operands and divisors of degree 16,
// checking each result against long division and the busy-cycle counts
// M-N+1 and 2M-N+2.
module polymod_mul_wide_tb;
  import polyref_pkg::*;

  localparam int N  = 16;
  localparam int M  = 31;
  localparam int IW = $clog2(M + 1);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          p_load = 1'b0;
  logic [N-1:0]  p_in = '0;
  logic          start = 1'b0;
  logic          op_mul = 1'b0;
  logic [N-1:0]  f_low = '0;
  logic          coef_in;
  logic          coef_req, coef_is_g, busy, done;
  logic [IW-1:0] coef_idx;
  logic [N-1:0]  result;

  poly_t f_cur = '0, g_cur = '0;
  int checks = 0, failures = 0;
  int n_g0_zero = 0, n_g0_one = 0;

  polymod_mul #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  // Serve the coefficient asked for in the current cycle.
  assign coef_in = coef_is_g ? g_cur[coef_idx] : f_cur[coef_idx];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_op(input poly_t p, input poly_t f, input poly_t g, input logic mul);
    int cycles;
    poly_t exp;
    f_cur = f; g_cur = g;
    @(negedge clk);
    p_load = 1'b1; p_in = p[N-1:0];
    @(negedge clk);
    p_load = 1'b0;
    start = 1'b1; op_mul = mul; f_low = f[N-1:0];
    @(negedge clk);
    start = 1'b0; f_low = '1;  // R must have taken f_low already
    cycles = 0;
    while (!done) begin
      if (busy) cycles++;
      if (coef_req && coef_is_g && coef_idx == 0) begin
        if (g[0]) n_g0_one++; else n_g0_zero++;
      end
      @(negedge clk);
      if (cycles > 3 * M) break;
    end
    check("done seen", longint'(done), 1);
    check("busy cycles", cycles, mul ? (2 * M - N + 2) : (M - N + 1));
    exp = mul ? pmod(pmul(f, g), p, N) : pmod(f, p, N);
    check(mul ? "f*g mod p" : "f mod p", longint'(result), longint'(exp[N-1:0]));
    @(negedge clk);
    check("done is a pulse", longint'(done), 0);
    check("result holds", longint'(result), longint'(exp[N-1:0]));
  endtask

  initial begin
    poly_t p, f, g;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      p = rand_monic(N);
      f = rand_poly(M);
      g = rand_poly(M);
      if (t % 4 == 0) g[0] = 1'b0;
      if (t % 4 == 1) g[0] = 1'b1;
      run_op(p, f, g, t[0] ^ t[2]);
    end
    check("g0=0 case seen", longint'(n_g0_zero > 0), 1);
    check("g0=1 case seen", longint'(n_g0_one > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
