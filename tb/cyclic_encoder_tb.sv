// cyclic_encoder_tb: encodes random data words with the (15,7) BCH
// generator g(x) = x^8+x^7+x^6+x^4+1 and then with a second generator
// loaded at run time. The serial output of every word is collected and
// checked: the first K bits must be the data, low order first; the last R
// must be d(x) x^R mod g(x), low order first (long division reference); the
// whole codeword must be a multiple of g(x); out_check and out_last must
// mark the right bits. Input gaps (in_valid low) are inserted at random, and
// words are also sent back to back, in which case a word must take exactly
// K+R cycles.
module cyclic_encoder_tb;
  import polyref_pkg::*;

  localparam int K = 7;
  localparam int R = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         g_load = 1'b0;
  logic [R-1:0] g_in = '0;
  logic         in_valid = 1'b0;
  logic         in_bit = 1'b0;
  logic         in_ready, out_valid, out_bit, out_check, out_last;

  int checks = 0, failures = 0;

  // output collection
  poly_t word_q = '0;
  int    nbits_q = 0;
  logic  flags_ok_q = 1'b1;
  int    words_done = 0;
  poly_t last_word;
  logic  last_flags_ok;

  cyclic_encoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    logic ok;
    ok = flags_ok_q && (out_check == (nbits_q >= K)) && (out_last == (nbits_q == K + R - 1));
    if (nbits_q == K + R - 1) begin
      last_word     <= word_q | (poly_t'(out_bit) << nbits_q);
      last_flags_ok <= ok;
      words_done    <= words_done + 1;
      word_q        <= '0;
      nbits_q       <= 0;
      flags_ok_q    <= 1'b1;
    end else begin
      word_q     <= word_q | (poly_t'(out_bit) << nbits_q);
      nbits_q    <= nbits_q + 1;
      flags_ok_q <= ok;
    end
  end

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

  // Send one word; gaps = 0 sends one bit per cycle.
  task automatic send(input poly_t d, input bit gaps);
    int i = 0;
    while (i < K) begin
      in_valid = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      in_bit = d[i];
      @(posedge clk);
      if (in_valid && in_ready) i++;
      #1;
    end
    in_valid = 1'b0;
  endtask

  task automatic expect_word(input poly_t g, input poly_t d, input int seen_before);
    poly_t par, code;
    int waited = 0;
    while (words_done == seen_before && waited < 200) begin
      @(posedge clk); #1; waited++;
    end
    par = pmod(d << R, g, R);
    code = (d << R) | par;
    check("data bits", longint'(last_word[K-1:0]), longint'(d));
    check("check bits", longint'(last_word[K+R-1:K]), longint'(par));
    check("codeword mod g", longint'(pmod((last_word[K-1:0] << R) | last_word[K+R-1:K], g, R)), 0);
    check("flags", longint'(last_flags_ok), 1);
  endtask

  initial begin
    poly_t g, d;
    int seen, t0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    g = 64'h1D1;
    load_gen(g);
    for (int t = 0; t < 200; t++) begin
      d = rand_poly(K - 1);
      seen = words_done;
      send(d, t[0]);
      expect_word(g, d, seen);
    end
    // back to back: a word occupies the input for K cycles and then blocks
    // it for the R cycles of check bits, K+R cycles in all
    for (int w = 0; w < 4; w++) begin
      d = rand_poly(K - 1);
      seen = words_done;
      while (!in_ready) begin @(posedge clk); #1; end
      t0 = $time;
      send(d, 1'b0);
      while (!in_ready) begin @(posedge clk); #1; end
      check("cycles per word", ($time - t0) / 10, K + R);
      expect_word(g, d, seen);
    end
    // second generator, x^8+x^2+x+1 (CRC-8 style)
    g = 64'h107;
    load_gen(g);
    for (int t = 0; t < 200; t++) begin
      d = rand_poly(K - 1);
      seen = words_done;
      send(d, t[0]);
      expect_word(g, d, seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
