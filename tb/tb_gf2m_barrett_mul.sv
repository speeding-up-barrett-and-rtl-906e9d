// tb_gf2m_barrett_mul: self-checking test of the GF(2^n) Barrett multiplier.
//
// Two instances: n = 256, w = 32 and n = 163, w = 16 (n not a whole number
// of digits). Field polynomials M(x) = x^n + D(x) are drawn with random D of
// degree at most n - w (the extreme D = x^(n-w) + ... + 1 included).
// Irreducibility does not affect the reduction, so it is not required here.
// Each result is compared with A*B mod M computed bit by bit in the
// testbench (carry-less product, then long division), and the latency from
// start to done is checked to be NW + 1 cycles.
module tb_gf2m_barrett_mul;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  typedef logic [1023:0] big_t;

  localparam int N0 = 256, W0 = 32;
  logic          st0, busy0, done0;
  logic [N0-1:0] a0, b0, m0, z0;
  gf2m_barrett_mul #(.N(N0), .W(W0)) dut0 (
    .clk, .rst_n, .start(st0), .a(a0), .b(b0), .m(m0), .busy(busy0), .done(done0), .z(z0));

  localparam int N1 = 163, W1 = 16;
  logic          st1, busy1, done1;
  logic [N1-1:0] a1, b1, m1, z1;
  gf2m_barrett_mul #(.N(N1), .W(W1)) dut1 (
    .clk, .rst_n, .start(st1), .a(a1), .b(b1), .m(m1), .busy(busy1), .done(done1), .z(z1));

  function automatic big_t rand_big();
    big_t r;
    for (int i = 0; i < 32; i++) r[i*32 +: 32] = $urandom();
    return r;
  endfunction

  function automatic big_t mask(int nb);
    big_t one = 1;
    return (one << nb) - 1;
  endfunction

  // A*B mod M over GF(2); M has degree n.
  function automatic big_t ref_mulmod(big_t a, big_t b, big_t m, int n);
    big_t p = 0;
    for (int i = 0; i < 512; i++) if (b[i]) p ^= a << i;
    for (int i = 1023; i >= n; i--) if (p[i]) p ^= m << (i - n);
    return p;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run0(big_t d, big_t a, big_t b);
    int cyc;
    big_t e, one;
    one = 1;
    @(negedge clk);
    m0 = d[N0-1:0]; a0 = a[N0-1:0]; b0 = b[N0-1:0]; st0 = 1'b1;
    @(negedge clk); st0 = 1'b0; cyc = 1;
    while (!done0) begin @(negedge clk); cyc++; end
    e = ref_mulmod(a, b, (one << N0) | d, N0);
    check(z0 == e[N0-1:0], $sformatf("n=256 z=%h expected %h", z0, e[N0-1:0]));
    check(cyc == (N0 + W0 - 1) / W0 + 1, $sformatf("n=256 latency %0d", cyc));
  endtask

  task automatic run1(big_t d, big_t a, big_t b);
    int cyc;
    big_t e, one;
    one = 1;
    @(negedge clk);
    m1 = d[N1-1:0]; a1 = a[N1-1:0]; b1 = b[N1-1:0]; st1 = 1'b1;
    @(negedge clk); st1 = 1'b0; cyc = 1;
    while (!done1) begin @(negedge clk); cyc++; end
    e = ref_mulmod(a, b, (one << N1) | d, N1);
    check(z1 == e[N1-1:0], $sformatf("n=163 z=%h expected %h", z1, e[N1-1:0]));
    check(cyc == (N1 + W1 - 1) / W1 + 1, $sformatf("n=163 latency %0d", cyc));
  endtask

  initial begin
    big_t d, a, b;
    st0 = 0; st1 = 0; a0 = '0; b0 = '0; m0 = '0; a1 = '0; b1 = '0; m1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      d = (t == 0) ? mask(N0 - W0 + 1) : rand_big() & mask(N0 - W0 + 1);
      a = (t == 1) ? mask(N0) : rand_big() & mask(N0);
      b = (t == 1) ? mask(N0) : rand_big() & mask(N0);
      run0(d, a, b);
      d = (t == 0) ? mask(N1 - W1 + 1) : rand_big() & mask(N1 - W1 + 1);
      a = (t == 1) ? mask(N1) : rand_big() & mask(N1);
      b = (t == 1) ? mask(N1) : rand_big() & mask(N1);
      run1(d, a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
