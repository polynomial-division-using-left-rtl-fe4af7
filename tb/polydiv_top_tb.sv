// polydiv_top_tb: end-to-end test of polydiv_top at its default parameters
// (N = 8, M = 15, GF_N = 8, K = 7, R = 8), with three threads in parallel:
//   - the modulo unit computes f mod p and f g mod p for random operands and
//     divisors, serving coefficients on request (result and cycle count
//     checked);
//   - the GF(2^8) multiplier multiplies random elements in two fields
//     (product and the N+2 cycle count checked);
//   - the encoder's serial output is sent over a channel that flips chosen
//     bits into the syndrome generator; each codeword is checked against a
//     reference encoding and each syndrome against the error pattern.
// Each mechanism is counted and must occur at least once: both operations,
// g_0 = 0 and g_0 = 1, divisor and field changes, back-to-back codewords,
// clean and corrupted received words, and a generator change.
module polydiv_top_tb;
  import polyref_pkg::*;

  localparam int N = 8, M = 15, GF_N = 8, K = 7, R = 8;
  localparam int IW = $clog2(M + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  logic            mm_p_load = 1'b0, mm_start = 1'b0, mm_op_mul = 1'b0, mm_coef_in;
  logic [N-1:0]    mm_p_in = '0, mm_f_low = '0, mm_result;
  logic            mm_coef_req, mm_coef_is_g, mm_busy, mm_done;
  logic [IW-1:0]   mm_coef_idx;
  logic            gf_p_load = 1'b0, gf_start = 1'b0, gf_busy, gf_done;
  logic [GF_N-1:0] gf_p_in = '0, gf_a = '0, gf_b = '0, gf_y;
  logic            enc_g_load = 1'b0, enc_in_valid = 1'b0, enc_in_bit = 1'b0;
  logic [R-1:0]    enc_g_in = '0;
  logic            enc_in_ready, enc_out_valid, enc_out_bit, enc_out_check, enc_out_last;
  logic            syn_g_load = 1'b0, syn_in_valid, syn_in_bit;
  logic [R-1:0]    syn_g_in = '0, syn_syndrome;
  logic            syn_in_ready, syn_valid, syn_error;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_mod = 0, n_mul = 0, n_g0_zero = 0, n_g0_one = 0, n_p_change = 0;
  int n_gf = 0, n_field_change = 0;
  int n_words = 0, n_back_to_back = 0, n_clean = 0, n_detected = 0, n_gen_change = 0;

  polydiv_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- modulo unit
  poly_t mm_f = '0, mm_g = '0;
  assign mm_coef_in = mm_coef_is_g ? mm_g[mm_coef_idx] : mm_f[mm_coef_idx];

  task automatic mm_run(input poly_t p, input logic mul);
    int cycles = 0, waited = 0;
    poly_t exp;
    @(negedge clk);
    mm_p_load = 1'b1; mm_p_in = p[N-1:0];
    @(negedge clk);
    mm_p_load = 1'b0;
    mm_start = 1'b1; mm_op_mul = mul; mm_f_low = mm_f[N-1:0];
    @(negedge clk);
    mm_start = 1'b0;
    while (!mm_done && waited < 4 * M) begin
      if (mm_busy) cycles++;
      waited++;
      @(negedge clk);
    end
    check("mm cycles", cycles, mul ? 2 * M - N + 2 : M - N + 1);
    exp = mul ? pmod(pmul(mm_f, mm_g), p, N) : pmod(mm_f, p, N);
    check("mm result", longint'(mm_result), longint'(exp[N-1:0]));
    if (mul) begin
      n_mul++;
      if (mm_g[0]) n_g0_one++; else n_g0_zero++;
    end else n_mod++;
  endtask

  task automatic mm_thread();
    poly_t p, p_prev = '0;
    for (int t = 0; t < 60; t++) begin
      p = (t % 10 < 5) ? 64'h11B : rand_monic(N);
      if (t > 0 && p != p_prev) n_p_change++;
      p_prev = p;
      mm_f = rand_poly(M);
      mm_g = rand_poly(M);
      mm_run(p, t[0]);
    end
  endtask

  // ------------------------------------------------------------ GF multiplier
  task automatic gf_thread();
    poly_t p, exp;
    logic [GF_N-1:0] x, z;
    int cycles, waited;
    for (int t = 0; t < 80; t++) begin
      if (t % 40 == 0) begin
        p = (t == 0) ? 64'h11B : 64'h11D;
        if (t != 0) n_field_change++;
        @(negedge clk);
        gf_p_load = 1'b1; gf_p_in = p[GF_N-1:0];
        @(negedge clk);
        gf_p_load = 1'b0;
      end
      x = GF_N'($urandom); z = GF_N'($urandom);
      @(negedge clk);
      gf_start = 1'b1; gf_a = x; gf_b = z;
      @(negedge clk);
      gf_start = 1'b0;
      cycles = 0; waited = 0;
      while (!gf_done && waited < 4 * GF_N) begin
        if (gf_busy) cycles++;
        waited++;
        @(negedge clk);
      end
      check("gf cycles = n+2", cycles, GF_N + 2);
      exp = pmod(pmul(poly_t'(x), poly_t'(z)), p, GF_N);
      check("gf product", longint'(gf_y), longint'(exp[GF_N-1:0]));
      n_gf++;
    end
  endtask

  // ------------------------------------------ encoder -> channel -> syndrome
  localparam int WORDS = 60;
  poly_t sent_d[WORDS];         // data word w
  poly_t sent_e[WORDS];         // channel error pattern of word w, line order
  poly_t line_w[WORDS];         // encoder output of word w, line order
  int    line_word = 0;         // word now on the line
  int    ch_idx = 0;            // bit position within it
  int    rx_word = 0;           // next word whose syndrome is due
  poly_t line_acc = '0;

  assign syn_in_valid = enc_out_valid;
  assign syn_in_bit   = enc_out_bit ^ sent_e[line_word][ch_idx];

  always @(posedge clk) if (rst_n && enc_out_valid) begin
    if (ch_idx == K + R - 1) begin
      line_w[line_word] <= line_acc | (poly_t'(enc_out_bit) << ch_idx);
      line_acc  <= '0;
      ch_idx    <= 0;
      line_word <= line_word + 1;
    end else begin
      line_acc <= line_acc | (poly_t'(enc_out_bit) << ch_idx);
      ch_idx   <= ch_idx + 1;
    end
  end

  poly_t cur_g = '0;

  // Check each received word as its syndrome appears.
  always @(posedge clk) if (rst_n && syn_valid) begin
    poly_t d, e, ev, s, code;
    d = sent_d[rx_word];
    e = sent_e[rx_word];
    code = (d << R) | pmod(d << R, cur_g, R);
    // encoder output, collected in line order, rebuilt as u(x)
    check("codeword", longint'((line_w[rx_word][K-1:0] << R) | line_w[rx_word][K+R-1:K]),
          longint'(code));
    ev = (e[K-1:0] << R) | e[K+R-1:K];
    s = pmod(ev, cur_g, R);
    check("syndrome", longint'(syn_syndrome), longint'(s[R-1:0]));
    check("error flag", longint'(syn_error), longint'(s != 0));
    if (e == 0) n_clean++;
    else if (syn_error) n_detected++;
    rx_word <= rx_word + 1;
    n_words++;
  end

  task automatic load_gen(input poly_t g);
    @(negedge clk);
    enc_g_load = 1'b1; enc_g_in = g[R-1:0];
    syn_g_load = 1'b1; syn_g_in = g[R-1:0];
    cur_g = g;
    @(negedge clk);
    enc_g_load = 1'b0; syn_g_load = 1'b0;
  endtask

  task automatic code_thread();
    poly_t d, e;
    int i, t0;
    for (int w = 0; w < WORDS; w++) begin
      if (w % 30 == 0) begin
        // wait for the line to drain before changing the generator
        while (rx_word != w) @(negedge clk);
        load_gen(w == 0 ? 64'h1D1 : 64'h107);
        if (w != 0) n_gen_change++;
      end
      d = rand_poly(K - 1);
      e = '0;
      if (w % 3 == 1) e[$urandom_range(0, K + R - 1)] = 1'b1;
      if (w % 3 == 2) begin
        e[$urandom_range(0, K + R - 1)] = 1'b1;
        e[$urandom_range(0, K + R - 1)] ^= 1'b1;
      end
      while (!enc_in_ready) @(negedge clk);
      t0 = $time;
      sent_d[w] = d;
      sent_e[w] = e;
      i = 0;
      while (i < K) begin
        enc_in_valid = (w % 2 == 0) ? 1'b1 : ($urandom_range(0, 1) == 1);
        enc_in_bit = d[i];
        @(negedge clk);
        if (enc_in_valid) i++;
      end
      enc_in_valid = 1'b0;
      if (w % 2 == 0) begin
        // sent without gaps: the encoder is ready again K+R cycles later
        while (!enc_in_ready) @(negedge clk);
        check("enc cycles per word", ($time - t0) / 10, K + R);
        n_back_to_back++;
      end
    end
    while (rx_word != WORDS) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    fork
      mm_thread();
      gf_thread();
      code_thread();
    join
    repeat (4) @(negedge clk);
    check("mechanism f mod p", longint'(n_mod > 0), 1);
    check("mechanism f*g mod p", longint'(n_mul > 0), 1);
    check("mechanism g0 = 0 clears R", longint'(n_g0_zero > 0), 1);
    check("mechanism g0 = 1 keeps R", longint'(n_g0_one > 0), 1);
    check("mechanism divisor change", longint'(n_p_change > 0), 1);
    check("mechanism GF multiply", longint'(n_gf > 0), 1);
    check("mechanism field change", longint'(n_field_change > 0), 1);
    check("mechanism codewords", longint'(n_words == WORDS), 1);
    check("mechanism back-to-back words", longint'(n_back_to_back > 0), 1);
    check("mechanism clean word", longint'(n_clean > 0), 1);
    check("mechanism error detected", longint'(n_detected > 0), 1);
    check("mechanism generator change", longint'(n_gen_change > 0), 1);
    $display("counts: mod=%0d mul=%0d g0=0:%0d g0=1:%0d pchg=%0d gf=%0d fchg=%0d words=%0d b2b=%0d clean=%0d det=%0d gchg=%0d",
             n_mod, n_mul, n_g0_zero, n_g0_one, n_p_change, n_gf, n_field_change,
             n_words, n_back_to_back, n_clean, n_detected, n_gen_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
