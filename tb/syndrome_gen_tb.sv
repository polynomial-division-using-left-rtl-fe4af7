// syndrome_gen_tb: feeds received words v(x), data part first and low order
// first within each part, as the encoder sends them. Words are correct
// codewords (reference encoding by long division) or codewords with 1 to 3
// random bit errors. The syndrome must equal v(x) mod g(x) by long division,
// error must be set exactly when it is non-zero, synd_valid must come one
// cycle after the last bit, and words may arrive back to back or with gaps.
// A second generator is loaded part way through.
module syndrome_gen_tb;
  import polyref_pkg::*;

  localparam int K = 7;
  localparam int R = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         g_load = 1'b0;
  logic [R-1:0] g_in = '0;
  logic         in_valid = 1'b0;
  logic         in_bit = 1'b0;
  logic         in_ready, synd_valid, error;
  logic [R-1:0] syndrome;

  int checks = 0, failures = 0;
  int n_err = 0, n_clean = 0;

  syndrome_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_gen(input poly_t g);
    @(negedge clk);
    g_load = 1'b1; g_in = g[R-1:0];
    @(negedge clk);
    g_load = 1'b0;
  endtask

  // Bits in line order: d_0..d_(K-1), then r_0..r_(R-1).
  task automatic send_word(input poly_t line, input bit gaps, input poly_t g);
    int i = 0;
    poly_t v, s;
    while (i < K + R) begin
      in_valid = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      in_bit = line[i];
      @(negedge clk);
      if (in_valid && in_ready) i++;
    end
    in_valid = 1'b0;
    // synd_valid is registered: it is high in the cycle after the last bit
    check("synd_valid timing", longint'(synd_valid), 1);
    v = (line[K-1:0] << R) | line[K+R-1:K];
    s = pmod(v, g, R);
    check("syndrome", longint'(syndrome), longint'(s[R-1:0]));
    check("error flag", longint'(error), longint'(s != 0));
    if (error) n_err++; else n_clean++;
  endtask

  task automatic run(input poly_t g, input int words);
    poly_t d, par, line;
    for (int t = 0; t < words; t++) begin
      d = rand_poly(K - 1);
      par = pmod(d << R, g, R);
      line = d | (par << K);
      if (t % 3 != 0)
        for (int e = 0; e < 1 + (t % 3); e++) line[$urandom_range(0, K + R - 1)] ^= 1'b1;
      send_word(line, t[2], g);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    load_gen(64'h1D1);
    @(negedge clk);
    run(64'h1D1, 300);
    load_gen(64'h107);
    @(negedge clk);
    run(64'h107, 300);
    check("clean words seen", longint'(n_clean > 0), 1);
    check("corrupted words seen", longint'(n_err > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
