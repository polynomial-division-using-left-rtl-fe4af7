// gf_mult_tb: multiplies random elements of GF(2^8) in two fields
// (p(x) = x^8+x^4+x^3+x+1 and p(x) = x^8+x^4+x^3+x^2+1), switching the field
// by reloading P. Each product is checked against a carry-less product
// reduced by long division, and each multiplication must keep busy high for
// exactly N+2 cycles. Also checks a few known products and the identity.
module gf_mult_tb;
  import polyref_pkg::*;

  localparam int N = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         p_load = 1'b0;
  logic [N-1:0] p_in = '0;
  logic         start = 1'b0;
  logic [N-1:0] a = '0, b = '0;
  logic         busy, done;
  logic [N-1:0] y;

  int checks = 0, failures = 0;

  gf_mult dut (.*);

  always #5 clk = ~clk;

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

  task automatic load_field(input poly_t p);
    @(negedge clk);
    p_load = 1'b1; p_in = p[N-1:0];
    @(negedge clk);
    p_load = 1'b0;
  endtask

  task automatic mult(input poly_t p, input logic [N-1:0] x, input logic [N-1:0] z,
                      output logic [N-1:0] prod);
    int cycles, waited;
    poly_t exp;
    @(negedge clk);
    start = 1'b1; a = x; b = z;
    @(negedge clk);
    start = 1'b0; a = ~x; b = ~z;  // operands are captured at start
    cycles = 0;
    waited = 0;
    while (!done && waited < 4 * N) begin
      if (busy) cycles++;
      waited++;
      @(negedge clk);
    end
    check("busy cycles = N+2", cycles, N + 2);
    exp = pmod(pmul(poly_t'(x), poly_t'(z)), p, N);
    check("product", longint'(y), longint'(exp[N-1:0]));
    prod = y;
  endtask

  initial begin
    poly_t p;
    logic [N-1:0] r;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // AES field
    p = 64'h11B;
    load_field(p);
    mult(p, 8'h57, 8'h83, r);
    check("57*83 = c1", longint'(r), 64'hC1);
    mult(p, 8'h53, 8'hCA, r);
    check("53*ca = 01", longint'(r), 64'h01);
    mult(p, 8'h01, 8'h9E, r);
    check("identity", longint'(r), 64'h9E);
    for (int t = 0; t < 300; t++) mult(p, N'($urandom), N'($urandom), r);
    // a second field, only P changes
    p = 64'h11D;
    load_field(p);
    mult(p, 8'h02, 8'h80, r);
    check("02*80 = 1d", longint'(r), 64'h1D);
    for (int t = 0; t < 300; t++) mult(p, N'($urandom), N'($urandom), r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
